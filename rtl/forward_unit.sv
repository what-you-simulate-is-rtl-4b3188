// Forwarding unit: supplies the newest value of each source register.
//
// While an instruction moves from Decode into the DCtoEx register, each of
// its two source registers is compared with the destination of the
// instruction now in Execute and of the one now in Memory. The younger
// match wins: the Execute result first, then the Memory-stage result (load
// data or the value computed earlier), otherwise the register file value,
// which already includes the Write Back stage through the register file's
// write-through. The chosen value is what gets written into DCtoEx, so
// Execute never needs a bypass multiplexer of its own. x0 is never
// forwarded. fwd_ex and fwd_mem report that a forward happened, for
// instrumentation. Combinational.
//
// ex_wb must be low for a load in Execute (its data is not there yet);
// the hazard unit stalls that case instead.
module forward_unit (
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic        use1,
  input  logic        use2,
  input  logic [31:0] rf1,
  input  logic [31:0] rf2,
  input  logic        ex_wb,
  input  logic [4:0]  ex_rd,
  input  logic [31:0] ex_result,
  input  logic        mem_wb,
  input  logic [4:0]  mem_rd,
  input  logic [31:0] mem_result,
  output logic [31:0] v1,
  output logic [31:0] v2,
  output logic        fwd_ex,
  output logic        fwd_mem
);
  logic e1, e2, m1, m2;

  always_comb begin
    e1 = ex_wb  && ex_rd  != 5'd0 && ex_rd  == rs1;
    e2 = ex_wb  && ex_rd  != 5'd0 && ex_rd  == rs2;
    m1 = mem_wb && mem_rd != 5'd0 && mem_rd == rs1;
    m2 = mem_wb && mem_rd != 5'd0 && mem_rd == rs2;
    v1 = e1 ? ex_result : m1 ? mem_result : rf1;
    v2 = e2 ? ex_result : m2 ? mem_result : rf2;
    fwd_ex  = (use1 && e1) || (use2 && e2);
    fwd_mem = (use1 && !e1 && m1) || (use2 && !e2 && m2);
  end
endmodule
