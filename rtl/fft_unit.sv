// FFT butterfly custom instruction unit of the Execute stage.
//
// A register holds one complex value: real part in bits 31:16 and imaginary
// part in bits 15:0, both signed Q1.15 fixed point. The main instruction
// (funct3 = 0) reads complex a from rs1 and b from rs2, forms t = W * b
// with the twiddle factor W = W_16^k = cos(2*pi*k/16) - j*sin(2*pi*k/16)
// selected by k = imm[2:0], and returns a + t; it keeps a - t in an
// internal register. The second instruction (funct3 = 1) returns that kept
// value. A two-state machine (EMPTY, HOLD) records whether a second result
// is waiting; a new butterfly overwrites it. With N = 16 the eight-entry
// table covers every twiddle of an 8-point radix-2 FFT (W_8^k = W_16^2k,
// W_4^k = W_16^4k).
//
// Timing: the result is combinational, like an ALU result, and the kept
// value is written on the clock edge when valid is high. Products are
// truncated by an arithmetic shift of 15 and sums wrap; there is no
// scaling between stages. Operand layout, number format, table size,
// rounding and the opcode are this design's choices; the document fixes
// only that two 16-bit values share a register, that the index sits in the
// immediate field and that a second instruction returns the second value.
module fft_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,
  input  logic [2:0]  funct3,
  input  logic [11:0] imm,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        pending
);
  typedef enum logic {EMPTY, HOLD} state_e;
  state_e      state;
  logic [31:0] second;

  // Twiddle table: cos and sin of 2*pi*k/16 scaled by 32767 and rounded,
  // for k = 0 .. 7.
  function automatic logic signed [15:0] tw_cos(input logic [2:0] k);
    case (k)
      3'd0: return 16'sd32767;  3'd1: return 16'sd30273;
      3'd2: return 16'sd23170;  3'd3: return 16'sd12539;
      3'd4: return 16'sd0;      3'd5: return -16'sd12539;
      3'd6: return -16'sd23170; default: return -16'sd30273;
    endcase
  endfunction
  function automatic logic signed [15:0] tw_sin(input logic [2:0] k);
    case (k)
      3'd0: return 16'sd0;      3'd1: return 16'sd12539;
      3'd2: return 16'sd23170;  3'd3: return 16'sd30273;
      3'd4: return 16'sd32767;  3'd5: return 16'sd30273;
      3'd6: return 16'sd23170;  default: return 16'sd12539;
    endcase
  endfunction

  logic signed [15:0] ar, ai, br, bi, c, s, tr, ti;
  logic signed [31:0] pr, pi;
  logic [31:0]        first, other;

  always_comb begin
    ar = a[31:16];  ai = a[15:0];
    br = b[31:16];  bi = b[15:0];
    c  = tw_cos(imm[2:0]);
    s  = tw_sin(imm[2:0]);
    // (br + j bi)(c - j s) = (br c + bi s) + j (bi c - br s)
    pr = br * c + bi * s;
    pi = bi * c - br * s;
    tr = 16'(pr >>> 15);
    ti = 16'(pi >>> 15);
    first = {16'(ar + tr), 16'(ai + ti)};
    other = {16'(ar - tr), 16'(ai - ti)};
    y = (funct3 == 3'd1) ? second : first;
    pending = (state == HOLD);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= EMPTY;
      second <= '0;
    end else if (valid) begin
      if (funct3 == 3'd0) begin
        second <= other;
        state  <= HOLD;
      end else if (funct3 == 3'd1) begin
        state  <= EMPTY;
      end
    end
  end
endmodule
