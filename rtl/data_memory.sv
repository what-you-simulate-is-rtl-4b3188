// Data memory: WORDS 32-bit words with two ports.
//
// Port A serves the Memory stage: combinational read of the addressed word
// and a clocked write with per-byte enables. Port B lets a host load data
// and read results: combinational read and clocked whole-word write. If
// both ports write the same word in one cycle, port A wins. Addresses are
// byte addresses, word aligned, and wrap modulo the memory size. It stands
// in the place of the data cache; its size and the host port are this
// design's choices.
module data_memory #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] a_addr,
  input  logic        a_we,
  input  logic [3:0]  a_be,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic [31:0] b_addr,
  input  logic        b_we,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr[AW+1:2]] <= b_wdata;
    if (a_we) begin
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[a_addr[AW+1:2]][8*i +: 8] <= a_wdata[8*i +: 8];
    end
  end

  assign a_rdata = mem[a_addr[AW+1:2]];
  assign b_rdata = mem[b_addr[AW+1:2]];
endmodule
