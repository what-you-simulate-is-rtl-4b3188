// Self-checking testbench for hazard_unit: random Decode/Execute pairs;
// checks the load-use, multi-cycle and data-cache-miss stall conditions and what each one
// holds and where each puts a bubble.
module hazard_unit_tb;
  logic       dc_valid, dc_use1, dc_use2, ex_valid, ex_load, ex_multicycle, mc_done, mem_wait;
  logic [4:0] dc_rs1, dc_rs2, ex_rd;
  logic       load_use, mc_stall, hold_fd, hold_ex, bubble_ex, bubble_mem, hold_mem, bubble_wb;
  int checks = 0, failures = 0, n_lu = 0, n_mc = 0;

  hazard_unit dut (.dc_valid, .dc_use1, .dc_use2, .dc_rs1, .dc_rs2, .ex_valid, .ex_load, .ex_rd,
                   .ex_multicycle, .mc_done, .mem_wait, .load_use, .mc_stall, .hold_fd, .hold_ex,
                   .bubble_ex, .bubble_mem, .hold_mem, .bubble_wb);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit lu, mc;
    repeat (5000) begin
      dc_valid = $urandom_range(0, 3) != 0; ex_valid = $urandom_range(0, 3) != 0;
      dc_use1 = $urandom_range(0, 1); dc_use2 = $urandom_range(0, 1);
      dc_rs1 = $urandom_range(0, 3); dc_rs2 = $urandom_range(0, 3); ex_rd = $urandom_range(0, 3);
      ex_load = $urandom_range(0, 1);
      ex_multicycle = !ex_load && $urandom_range(0, 1);
      mc_done = $urandom_range(0, 3) == 0;
      mem_wait = $urandom_range(0, 4) == 0;
      #1;
      lu = dc_valid && ex_valid && ex_load && ex_rd != 0 &&
           ((dc_use1 && dc_rs1 == ex_rd) || (dc_use2 && dc_rs2 == ex_rd));
      mc = ex_valid && ex_multicycle && !mc_done;
      expect_eq(32'(load_use), 32'(lu), "load_use");
      expect_eq(32'(mc_stall), 32'(mc), "mc_stall");
      expect_eq(32'(hold_fd), 32'(lu || mc || mem_wait), "hold_fd");
      expect_eq(32'(hold_ex), 32'(mc || mem_wait), "hold_ex");
      expect_eq(32'(hold_mem), 32'(mem_wait), "hold_mem");
      expect_eq(32'(bubble_ex), 32'(lu && !mc && !mem_wait), "bubble_ex");
      expect_eq(32'(bubble_mem), 32'(mc && !mem_wait), "bubble_mem");
      expect_eq(32'(bubble_wb), 32'(mem_wait), "bubble_wb");
      n_lu += int'(lu); n_mc += int'(mc);
    end
    checks++;
    if (n_lu == 0 || n_mc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
