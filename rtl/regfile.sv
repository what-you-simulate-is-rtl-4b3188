// Integer register file: 32 registers of 32 bits, x0 hard-wired to zero.
//
// Two combinational read ports serve Decode and one write port serves
// Write Back on the rising clock edge. A register written in the same cycle
// as it is read is passed straight to the read port (write-through), so an
// instruction in Decode sees the value Write Back is committing and no
// separate Write Back forwarding path is needed. All registers clear on the
// synchronous active-high reset. Write-through and reset are this design's
// choices.
module regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [31:0]              rd1,
  output logic [31:0]              rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [31:0]              wd
);
  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
