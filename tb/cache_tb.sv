// Self-checking testbench for cache (8 lines of 4 words here).
//
// A next-level memory of 256 words is modelled here and answers
// combinationally. Random reads and byte-enable writes go to a range four
// times the cache size, so hits, misses and conflict evictions all occur.
// A read is held until ready; its data must equal the model memory, and a
// miss must take exactly LINE_WORDS + 1 cycles. Writes must reach the
// model memory in the same cycle (write-through) and later reads must see
// them whether the line was present or not.
module cache_tb;
  localparam int LINES = 8, LW = 4, MW = 256;
  logic        clk = 0, rst = 1;
  logic        rd_req = 0, wr_req = 0, ready, miss, mem_we;
  logic [31:0] addr = 0, wdata = 0, rdata, mem_addr, mem_rdata, mem_wdata;
  logic [3:0]  be = 0, mem_be;
  logic [31:0] mem [MW];
  logic [31:0] model [MW];
  int checks = 0, failures = 0, n_miss = 0, n_hit = 0;

  always #5 clk = ~clk;

  cache #(.LINES(LINES), .LINE_WORDS(LW)) dut (
    .clk, .rst, .rd_req, .wr_req, .addr, .be, .wdata, .rdata, .ready, .miss,
    .mem_addr, .mem_rdata, .mem_we, .mem_be, .mem_wdata);

  assign mem_rdata = mem[mem_addr[9:2]];
  always @(posedge clk)
    if (mem_we) for (int i = 0; i < 4; i++) if (mem_be[i]) mem[mem_addr[9:2]][8*i +: 8] <= mem_wdata[8*i +: 8];

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cycles;
    for (int i = 0; i < MW; i++) begin mem[i] = $urandom; model[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (5000) begin
      @(negedge clk);
      addr = 32'($urandom_range(0, 4 * LINES * LW - 1)) << 2;
      if ($urandom_range(0, 2) == 0) begin
        wr_req = 1; be = $urandom; wdata = $urandom;
        @(posedge clk);
        for (int i = 0; i < 4; i++) if (be[i]) model[addr[9:2]][8*i +: 8] = wdata[8*i +: 8];
        #1 expect_eq(mem[addr[9:2]], model[addr[9:2]], "write-through");
        wr_req = 0;
      end else begin
        rd_req = 1;
        #1;
        wait_cycles = 0;
        if (miss) n_miss++; else n_hit++;
        while (!ready) begin
          @(negedge clk);
          wait_cycles++;
          if (wait_cycles > 100) break;
        end
        expect_eq(rdata, model[addr[9:2]], "read data");
        if (wait_cycles != 0) expect_eq(32'(wait_cycles), LW + 1, "miss latency");
        @(posedge clk);
        #1 rd_req = 0;
      end
    end
    checks++;
    if (n_miss == 0 || n_hit == 0) begin failures++; $display("FAIL no mix of hits and misses"); end
    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
