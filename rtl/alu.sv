// Integer ALU of the Execute stage.
//
// Computes one RV32I operation on two 32-bit operands: add, subtract,
// shifts by the low five bits of B, signed and unsigned set-less-than,
// the three logic operations, and pass-B (used by LUI, whose immediate is
// already shifted into place by Decode). Purely combinational; the result
// is registered in the ExtoMem pipeline register. The operation set is that
// of the RV32I base ISA the core implements; the encoding of alu_op_e is
// this design's own.
module alu
  import comet_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
