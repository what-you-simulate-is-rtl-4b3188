// Self-checking testbench for decode: instructions of every format with
// random registers and immediates are encoded here and the decoder's
// register indices, immediate, unit, ALU operation and control flags are
// compared with what the RISC-V encoding defines. An invalid FtoDC slot
// must decode to a no-op.
module decode_tb;
  import comet_pkg::*;
  import rv_tb_pkg::*;
  ftodc_t      ftodc;
  ctrl_t       ctrl;
  logic [31:0] imm, jal_target;
  logic [4:0]  rs1, rs2, rd;
  logic        jal;
  int checks = 0, failures = 0;

  decode dut (.ftodc, .ctrl, .imm, .rs1, .rs2, .rd, .jal, .jal_target);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h (instr %h)", what, got, exp, ftodc.instr);
    end
  endtask

  task automatic apply(logic [31:0] ins, logic [31:0] pc);
    ftodc = '{valid: 1'b1, pc: pc, instr: ins};
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r1, r2, d, im;
    logic [31:0] pc;
    repeat (300) begin
      r1 = $urandom_range(0, 31); r2 = $urandom_range(0, 31); d = $urandom_range(1, 31);
      pc = {$urandom_range(0, 1023), 2'b00};

      im = int'($urandom_range(0, 4095)) - 2048;
      apply(ADDI(d, r1, im), pc);
      expect_eq(imm, 32'(im), "addi imm"); expect_eq(32'(rd), 32'(d), "addi rd"); expect_eq(32'(rs1), 32'(r1), "addi rs1");
      expect_eq({ctrl.wb_en, ctrl.b_imm, ctrl.use_rs1, ctrl.use_rs2}, 4'b1110, "addi flags");
      expect_eq(32'(ctrl.alu_op), 32'(ALU_ADD), "addi op"); expect_eq(32'(ctrl.unit), 32'(UNIT_ALU), "addi unit");

      apply(SUB(d, r1, r2), pc);
      expect_eq(32'(ctrl.alu_op), 32'(ALU_SUB), "sub op"); expect_eq(32'(rs2), 32'(r2), "sub rs2");
      expect_eq({ctrl.use_rs1, ctrl.use_rs2, ctrl.b_imm}, 3'b110, "sub flags");

      apply(i_type(32'h400 | 7, 5'(r1), 3'd5, 5'(d), 7'b0010011), pc);
      expect_eq(32'(ctrl.alu_op), 32'(ALU_SRA), "srai op");
      apply(r_type(7'd0, 5'(r2), 5'(r1), 3'd3, 5'(d), 7'b0110011), pc);
      expect_eq(32'(ctrl.alu_op), 32'(ALU_SLTU), "sltu op");

      im = int'($urandom_range(0, 4095)) - 2048;
      apply(STORE(1, r2, r1, im), pc);
      expect_eq(imm, 32'(im), "sh imm");
      expect_eq({ctrl.is_store, ctrl.is_load, ctrl.wb_en}, 3'b100, "sh flags"); expect_eq(32'(ctrl.funct3), 1, "sh f3");

      apply(LOAD(4, d, r1, im), pc);
      expect_eq({ctrl.is_store, ctrl.is_load, ctrl.wb_en}, 3'b011, "lbu flags"); expect_eq(imm, 32'(im), "lbu imm");

      im = 2 * (int'($urandom_range(0, 4095)) - 2048);
      apply(BR(5, r1, r2, im), pc);
      expect_eq(imm, 32'(im), "bge imm"); expect_eq({ctrl.is_branch, ctrl.wb_en}, 2'b10, "bge flags");
      expect_eq(32'(ctrl.funct3), 5, "bge f3");

      im = 2 * (int'($urandom_range(0, 1048575)) - 524288);
      apply(JAL(d, im), pc);
      expect_eq(32'(jal), 1, "jal flag"); expect_eq(jal_target, pc + 32'(im), "jal target");
      expect_eq({ctrl.is_jal, ctrl.wb_en, ctrl.a_pc}, 3'b111, "jal ctrl");

      apply(JALR(d, r1, 12), pc);
      expect_eq({ctrl.is_jalr, ctrl.wb_en, ctrl.use_rs1}, 3'b111, "jalr ctrl"); expect_eq(32'(jal), 0, "jalr not jal");

      im = $urandom;
      apply(LUI(d, im), pc);
      expect_eq(imm, {20'(im), 12'b0}, "lui imm"); expect_eq(32'(ctrl.alu_op), 32'(ALU_PASSB), "lui op");
      apply(AUIPC(d, im), pc);
      expect_eq(imm, {20'(im), 12'b0}, "auipc imm"); expect_eq({ctrl.a_pc, ctrl.b_imm}, 2'b11, "auipc sel");

      apply(MULDIV(3, d, r1, r2), pc);
      expect_eq(32'(ctrl.unit), 32'(UNIT_MUL), "mulhu unit");
      apply(MULDIV(6, d, r1, r2), pc);
      expect_eq(32'(ctrl.unit), 32'(UNIT_DIV), "rem unit"); expect_eq(32'(ctrl.funct3), 6, "rem f3");

      im = $urandom_range(0, 7);
      apply(BFLY(d, r1, r2, im), pc);
      expect_eq(32'(ctrl.unit), 32'(UNIT_FFT), "bfly unit"); expect_eq(32'(imm[2:0]), 32'(im), "bfly index");
      expect_eq({ctrl.use_rs1, ctrl.use_rs2, ctrl.wb_en}, 3'b111, "bfly flags");
      apply(BFLY2(d), pc);
      expect_eq({ctrl.use_rs1, ctrl.use_rs2, ctrl.wb_en}, 3'b001, "bfly2 flags"); expect_eq(32'(ctrl.funct3), 1, "bfly2 f3");

      apply(ADD(0, r1, r2), pc);
      expect_eq(32'(ctrl.wb_en), 0, "rd=x0 no write");
      apply(ECALL(), pc);
      expect_eq({ctrl.is_ecall, ctrl.wb_en}, 2'b10, "ecall");
      apply(32'h0000_000F, pc);
      expect_eq({ctrl.wb_en, ctrl.is_load, ctrl.is_store, ctrl.is_branch}, 4'b0, "fence no-op");

      ftodc = '{valid: 1'b0, pc: pc, instr: JAL(d, 8)};
      #1 expect_eq({ctrl.wb_en, ctrl.is_jal, jal}, 3'b0, "invalid slot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
