// Self-checking testbench for regfile: random writes and reads against a
// shadow array, x0 stays zero, reset clears, and a register written in a
// cycle is seen by a read in the same cycle (write-through).
module regfile_tb;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

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
    foreach (shadow[i]) shadow[i] = '0;
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; expect_eq(rd1, 32'h0, "after reset");
    end
    repeat (3000) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = $urandom; wd = $urandom;
      ra1 = $urandom_range(0, 3) == 0 ? wa : 5'($urandom);
      ra2 = $urandom;
      #1;
      expect_eq(rd1, (ra1 == 0) ? 32'h0 : (we && wa == ra1) ? wd : shadow[ra1], "port 1");
      expect_eq(rd2, (ra2 == 0) ? 32'h0 : (we && wa == ra2) ? wd : shadow[ra2], "port 2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
