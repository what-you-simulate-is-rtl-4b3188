// Self-checking testbench for instruction_memory: writes random words to
// random addresses through the load port, keeps a copy here, and reads
// them back through the fetch port.
module instruction_memory_tb;
  localparam int WORDS = 256;
  logic clk = 0, we = 0;
  logic [31:0] raddr = 0, rdata, waddr = 0, wdata = 0;
  logic [31:0] shadow [WORDS];
  bit          known [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  instruction_memory #(.WORDS(WORDS)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    foreach (known[k]) known[k] = 0;
    repeat (3000) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      i = $urandom_range(0, WORDS - 1);
      waddr = 32'(i) << 2; wdata = $urandom;
      raddr = 32'($urandom_range(0, WORDS - 1)) << 2;
      #1;
      if (known[raddr[31:2]]) begin
        checks++;
        if (rdata !== shadow[raddr[31:2]]) begin
          failures++;
          $display("FAIL read %h got %h exp %h", raddr, rdata, shadow[raddr[31:2]]);
        end
      end
      @(posedge clk);
      if (we) begin shadow[i] = wdata; known[i] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
