// Self-checking testbench for forward_unit: random source and destination
// registers drawn from a small set so that matches are frequent; checks
// priority (Execute over Memory over register file), that x0 is never
// forwarded and the forward event flags.
module forward_unit_tb;
  logic [4:0]  rs1, rs2, ex_rd, mem_rd;
  logic        use1, use2, ex_wb, mem_wb, fwd_ex, fwd_mem;
  logic [31:0] rf1, rf2, ex_result, mem_result, v1, v2;
  int checks = 0, failures = 0;
  int n_ex = 0, n_mem = 0;

  forward_unit dut (.rs1, .rs2, .use1, .use2, .rf1, .rf2, .ex_wb, .ex_rd, .ex_result,
                    .mem_wb, .mem_rd, .mem_result, .v1, .v2, .fwd_ex, .fwd_mem);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] pick(logic [4:0] rs, logic [31:0] rf);
    if (rs == 0) return rf;
    if (ex_wb && ex_rd == rs) return ex_result;
    if (mem_wb && mem_rd == rs) return mem_result;
    return rf;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e, m;
    repeat (5000) begin
      rs1 = $urandom_range(0, 3); rs2 = $urandom_range(0, 3);
      ex_rd = $urandom_range(0, 3); mem_rd = $urandom_range(0, 3);
      use1 = $urandom_range(0, 1); use2 = $urandom_range(0, 1);
      ex_wb = $urandom_range(0, 1); mem_wb = $urandom_range(0, 1);
      rf1 = $urandom; rf2 = $urandom; ex_result = $urandom; mem_result = $urandom;
      #1;
      expect_eq(v1, pick(rs1, rf1), "v1");
      expect_eq(v2, pick(rs2, rf2), "v2");
      e = (use1 && rs1 != 0 && ex_wb && ex_rd == rs1) || (use2 && rs2 != 0 && ex_wb && ex_rd == rs2);
      m = (use1 && rs1 != 0 && !(ex_wb && ex_rd == rs1) && mem_wb && mem_rd == rs1) ||
          (use2 && rs2 != 0 && !(ex_wb && ex_rd == rs2) && mem_wb && mem_rd == rs2);
      expect_eq(32'(fwd_ex), 32'(e), "fwd_ex");
      expect_eq(32'(fwd_mem), 32'(m), "fwd_mem");
      n_ex += int'(e); n_mem += int'(m);
    end
    checks++;
    if (n_ex == 0 || n_mem == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
