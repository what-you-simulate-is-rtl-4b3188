// Self-checking testbench for fetch: a model instruction memory returns a
// word derived from the address; random hold, redirect and stop inputs
// and instruction-cache ready inputs are applied and the PC sequence and offered FtoDC record are compared
// with a PC model kept here.
module fetch_tb;
  import comet_pkg::*;
  logic        clk = 0, rst = 1, hold = 0, redirect = 0, stop = 0, imem_ready = 1;
  logic [31:0] target = 0, imem_addr, imem_rdata;
  ftodc_t      ftodc;
  logic [31:0] pc_model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign imem_rdata = imem_addr ^ 32'hA5A5_0000;

  fetch #(.RESET_PC(32'h100)) dut (.clk, .rst, .hold, .redirect, .target, .stop,
                                   .imem_addr, .imem_rdata, .imem_ready, .ftodc);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    pc_model = 32'h100;
    repeat (3000) begin
      hold = $urandom_range(0, 4) == 0;
      redirect = $urandom_range(0, 5) == 0;
      stop = $urandom_range(0, 9) == 0;
      imem_ready = $urandom_range(0, 3) != 0;
      target = $urandom & ~32'd3;
      #1;
      expect_eq(imem_addr, pc_model, "pc");
      expect_eq(ftodc.pc, pc_model, "ftodc.pc");
      expect_eq(ftodc.instr, pc_model ^ 32'hA5A5_0000, "ftodc.instr");
      expect_eq(32'(ftodc.valid), 32'(!stop && imem_ready), "ftodc.valid");
      @(posedge clk);
      if (redirect) pc_model = target;
      else if (!hold && !stop && imem_ready) pc_model = pc_model + 4;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
