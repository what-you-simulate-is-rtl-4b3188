// RV32M multiplier of the Execute stage.
//
// Produces MUL (low word), MULH (signed x signed, high word), MULHSU
// (signed x unsigned, high word) and MULHU (unsigned x unsigned, high word)
// selected by funct3 = 0..3. Each operand is extended to 33 bits with its
// sign (or a zero for unsigned) and one 66-bit signed product is formed, so
// all four instructions share one multiplier. Combinational: the result is
// ready in the same cycle as an ALU result, so a multiply never stalls. The
// single-cycle timing is this design's choice; the document shows the
// multiplier beside the ALU but gives no latency.
module multiplier (
  input  logic [2:0]  funct3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        a_signed, b_signed;
  logic signed [32:0] ax, bx;
  logic signed [65:0] prod;

  always_comb begin
    a_signed = (funct3[1:0] == 2'd1) || (funct3[1:0] == 2'd2);  // MULH, MULHSU
    b_signed = (funct3[1:0] == 2'd1);                           // MULH
    ax = $signed({a_signed & a[31], a});
    bx = $signed({b_signed & b[31], b});
    prod = ax * bx;
    y = (funct3[1:0] == 2'd0) ? prod[31:0] : prod[63:32];
  end
endmodule
