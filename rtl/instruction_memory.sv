// Instruction memory: WORDS 32-bit words, byte addressed, word aligned.
//
// Read port for Fetch, combinational (the instruction is available in the
// cycle its address is presented). Write port, clocked, for loading a
// program from outside the core. Addresses wrap modulo the memory size.
// It stands in the place of the instruction cache; its size and the load
// port are this design's choices.
module instruction_memory #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];
endmodule
