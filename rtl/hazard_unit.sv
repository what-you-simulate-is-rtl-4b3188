// Stall logic of the pipeline.
//
// Two situations stop instructions from advancing.
//   Load-use: the instruction in Decode reads a register that a load now in
//   Execute will write. The load's data only exists at the end of Memory,
//   so PC and FtoDC hold for one cycle and a bubble enters DCtoEx; the next
//   cycle the load is in Memory and its data is forwarded.
//   Multi-cycle operator: a division is in Execute and the divider has not
//   raised done. PC, FtoDC and DCtoEx hold and a bubble enters ExtoMem, so
//   older instructions drain while the division runs.
//   Data-cache miss: a load in Memory waits for the data cache (mem_wait).
//   PC, FtoDC, DCtoEx and ExtoMem all hold and a bubble enters MemtoWB.
// Combinational; the outputs are applied by the pipeline registers on the
// next clock edge. A cache miss freezes the whole pipe, as the document's
// loop does for every stall; letting older instructions drain during the
// other two stalls is this design's choice.
module hazard_unit (
  input  logic       dc_valid,
  input  logic       dc_use1,
  input  logic       dc_use2,
  input  logic [4:0] dc_rs1,
  input  logic [4:0] dc_rs2,
  input  logic       ex_valid,
  input  logic       ex_load,
  input  logic [4:0] ex_rd,
  input  logic       ex_multicycle,
  input  logic       mc_done,
  input  logic       mem_wait,
  output logic       load_use,
  output logic       mc_stall,
  output logic       hold_fd,
  output logic       hold_ex,
  output logic       bubble_ex,
  output logic       bubble_mem,
  output logic       hold_mem,
  output logic       bubble_wb
);
  always_comb begin
    mc_stall = ex_valid && ex_multicycle && !mc_done;
    load_use = dc_valid && ex_valid && ex_load && ex_rd != 5'd0 &&
               ((dc_use1 && dc_rs1 == ex_rd) || (dc_use2 && dc_rs2 == ex_rd));
    hold_fd    = mem_wait || mc_stall || load_use;
    hold_ex    = mem_wait || mc_stall;
    hold_mem   = mem_wait;
    bubble_ex  = load_use && !mc_stall && !mem_wait;
    bubble_mem = mc_stall && !mem_wait;
    bubble_wb  = mem_wait;
  end
endmodule
