// Self-checking testbench for branch_unit: random branch conditions,
// JALR and Decode JAL redirects, checking taken/not taken, the target and
// which instructions are dropped, against expectations computed here.
module branch_unit_tb;
  import comet_pkg::*;
  logic        ex_valid, dc_jal, redirect, redirect_ex, kill_fetch, kill_decode;
  ctrl_t       ex_ctrl;
  logic [31:0] ex_pc, ex_a, ex_b, ex_imm, dc_target, target;
  int checks = 0, failures = 0;

  branch_unit dut (.ex_valid, .ex_ctrl, .ex_pc, .ex_a, .ex_b, .ex_imm, .dc_jal, .dc_target,
                   .redirect, .target, .redirect_ex, .kill_fetch, .kill_decode);

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
    int kind, f3s[6] = '{0, 1, 4, 5, 6, 7};
    bit taken, ex_red;
    repeat (3000) begin
      ex_ctrl = CTRL_NOP;
      ex_valid = $urandom_range(0, 3) != 0;
      kind = $urandom_range(0, 2);  // 0 branch, 1 jalr, 2 other
      ex_ctrl.funct3 = 3'(f3s[$urandom_range(0, 5)]);
      ex_ctrl.is_branch = (kind == 0);
      ex_ctrl.is_jalr = (kind == 1);
      ex_pc = $urandom & ~32'd3; ex_imm = $urandom;
      ex_a = $urandom; ex_b = $urandom_range(0, 3) == 0 ? ex_a : $urandom;
      if ($urandom_range(0, 3) == 0) ex_b = {~ex_a[31], ex_a[30:0]};
      dc_jal = $urandom_range(0, 1); dc_target = $urandom;
      #1;
      case (ex_ctrl.funct3)
        3'd0: taken = ex_a == ex_b;  3'd1: taken = ex_a != ex_b;
        3'd4: taken = $signed(ex_a) < $signed(ex_b);  3'd5: taken = !($signed(ex_a) < $signed(ex_b));
        3'd6: taken = ex_a < ex_b;   default: taken = !(ex_a < ex_b);
      endcase
      ex_red = ex_valid && ((kind == 0 && taken) || kind == 1);
      expect_eq(32'(redirect_ex), 32'(ex_red), "redirect_ex");
      expect_eq(32'(redirect), 32'(ex_red || dc_jal), "redirect");
      expect_eq(32'(kill_decode), 32'(ex_red), "kill_decode");
      expect_eq(32'(kill_fetch), 32'(ex_red || dc_jal), "kill_fetch");
      if (ex_red)
        expect_eq(target, (kind == 1) ? ((ex_a + ex_imm) & ~32'd1) : ex_pc + ex_imm, "ex target");
      else if (dc_jal)
        expect_eq(target, dc_target, "jal target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
