// Self-checking testbench for data_memory: random byte-enable writes on
// port A and whole-word writes on port B, including both ports on the
// same word (port A must win for the bytes it writes), checked by reads on
// both ports against a copy kept here.
module data_memory_tb;
  localparam int WORDS = 64;
  logic clk = 0, a_we = 0, b_we = 0;
  logic [3:0]  a_be = 0;
  logic [31:0] a_addr = 0, a_wdata = 0, a_rdata, b_addr = 0, b_wdata = 0, b_rdata;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_memory #(.WORDS(WORDS)) dut (.clk, .a_addr, .a_we, .a_be, .a_wdata, .a_rdata,
                                    .b_addr, .b_we, .b_wdata, .b_rdata);

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
    // initialise every word through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 32'(i) << 2; b_wdata = $urandom; shadow[i] = b_wdata;
    end
    @(negedge clk);
    b_we = 0;
    repeat (3000) begin
      @(negedge clk);
      a_we = $urandom_range(0, 1); a_be = $urandom; a_wdata = $urandom;
      a_addr = 32'($urandom_range(0, WORDS - 1)) << 2;
      b_we = $urandom_range(0, 2) == 0; b_wdata = $urandom;
      b_addr = $urandom_range(0, 3) == 0 ? a_addr : 32'($urandom_range(0, WORDS - 1)) << 2;
      #1;
      expect_eq(a_rdata, shadow[a_addr[31:2]], "port A read");
      expect_eq(b_rdata, shadow[b_addr[31:2]], "port B read");
      @(posedge clk);
      if (b_we) shadow[b_addr[31:2]] = b_wdata;
      if (a_we) for (int i = 0; i < 4; i++)
        if (a_be[i]) shadow[a_addr[31:2]][8*i +: 8] = a_wdata[8*i +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
