// Fetch stage: program counter and instruction read.
//
// The PC register addresses the instruction memory, which answers in the
// same cycle; the stage offers {valid, pc, instruction} as the next value
// of the FtoDC register. Each cycle the PC moves to PC + 4, or to the
// branch unit's target when it redirects, or stays when the pipeline
// holds or the instruction cache has not got the word (imem_ready low;
// the slot offered is then invalid). A redirect wins over both, since the
// instruction being fetched is being killed. Once stop is raised (an ECALL has been decoded) the stage
// offers only invalid slots. The PC resets to RESET_PC. Fetching PC + 4
// with no prediction is this design's choice.
module fetch
  import comet_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        hold,
  input  logic        redirect,
  input  logic [31:0] target,
  input  logic        stop,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  input  logic        imem_ready,
  output ftodc_t      ftodc
);
  logic [31:0] pc;

  always_ff @(posedge clk) begin
    if (rst)           pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (!hold && !stop && imem_ready) pc <= pc + 32'd4;
  end

  always_comb begin
    imem_addr   = pc;
    ftodc.valid = !stop && imem_ready;
    ftodc.pc    = pc;
    ftodc.instr = imem_rdata;
  end
endmodule
