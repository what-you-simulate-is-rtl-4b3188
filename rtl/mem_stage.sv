// Memory stage: data-memory access and the choice of the Write Back value.
//
// The ExtoMem register carries the address computed in Execute (in its
// result field) and the store data. A store becomes one word write with
// byte enables and the data replicated into the addressed byte or half;
// a load reads the whole word and the addressed byte, half or word is
// selected and sign- or zero-extended according to funct3 (LB, LH, LW,
// LBU, LHU). For any other instruction the Execute result passes through.
// dmem_re marks a load, so that the data cache can report a miss; the
// word is used in the cycle the cache answers, and until then the core
// holds the pipeline. Accesses are taken to be naturally aligned (this
// design's choice).
module mem_stage
  import comet_pkg::*;
(
  input  extomem_t    extomem,
  output logic [31:0] dmem_addr,
  output logic        dmem_re,
  output logic        dmem_we,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic [31:0] result
);
  logic [1:0]  off;
  logic [31:0] shifted;

  always_comb begin
    off       = extomem.result[1:0];
    dmem_addr = {extomem.result[31:2], 2'b00};
    dmem_re   = extomem.valid && extomem.ctrl.is_load;
    dmem_we   = extomem.valid && extomem.ctrl.is_store;
    unique case (extomem.ctrl.funct3[1:0])
      2'b00:   begin dmem_be = 4'b0001 << off;         dmem_wdata = {4{extomem.store_data[7:0]}};  end
      2'b01:   begin dmem_be = 4'b0011 << {off[1], 1'b0}; dmem_wdata = {2{extomem.store_data[15:0]}}; end
      default: begin dmem_be = 4'b1111;                dmem_wdata = extomem.store_data;            end
    endcase

    shifted = dmem_rdata >> {off, 3'b000};
    if (extomem.ctrl.is_load) begin
      unique case (extomem.ctrl.funct3)
        3'b000:  result = {{24{shifted[7]}},  shifted[7:0]};
        3'b001:  result = {{16{shifted[15]}}, shifted[15:0]};
        3'b100:  result = {24'b0, shifted[7:0]};
        3'b101:  result = {16'b0, shifted[15:0]};
        default: result = dmem_rdata;
      endcase
    end else begin
      result = extomem.result;
    end
  end
endmodule
