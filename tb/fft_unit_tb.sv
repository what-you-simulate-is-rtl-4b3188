// Self-checking testbench for fft_unit: random butterflies with every
// twiddle index; the first result is compared with a + W*b and the second
// instruction's result with a - W*b, both computed here with twiddles from
// $cos and $sin. Also checks the pending flag of the two-state machine.
module fft_unit_tb;
  import rv_tb_pkg::*;
  logic clk = 0, rst = 1, valid = 0, pending;
  logic [2:0]  funct3;
  logic [11:0] imm;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_unit dut (.clk, .rst, .valid, .funct3, .imm, .a, .b, .y, .pending);

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
    logic [31:0] x, z;
    int k;
    funct3 = 0; imm = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1 expect_eq(32'(pending), 0, "pending after reset");
    repeat (1000) begin
      @(negedge clk);
      // keep magnitudes moderate so that sums stay in range
      x = {16'($signed(15'($urandom))), 16'($signed(15'($urandom)))};
      z = {16'($signed(15'($urandom))), 16'($signed(15'($urandom)))};
      k = $urandom_range(0, 7);
      valid = 1; funct3 = 0; imm = 12'(k); a = x; b = z;
      #1 expect_eq(y, fft_ref(x, z, k, 0), "first output");
      @(negedge clk);
      expect_eq(32'(pending), 1, "pending after butterfly");
      valid = $urandom_range(0, 1); funct3 = 1; a = $urandom; b = $urandom; imm = $urandom;
      if (!valid) begin
        @(negedge clk);  // an idle cycle keeps the value
        valid = 1;
      end
      #1 expect_eq(y, fft_ref(x, z, k, 1), "second output");
      @(negedge clk);
      valid = 0;
      #1 expect_eq(32'(pending), 0, "pending cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
