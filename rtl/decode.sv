// Instruction decoder of the Decode stage.
//
// Turns the 32-bit instruction held in the FtoDC register into the control
// word that travels down the pipeline (ctrl_t), the sign-extended
// immediate of the instruction's format, and its register indices. It
// covers RV32I, RV32M and the two FFT custom instructions on the custom-0
// opcode. JAL is recognised here and its target PC + imm computed, so the
// branch unit can redirect fetch from Decode without waiting for Execute.
// FENCE, and any opcode it does not know, become no-ops (no register write,
// no memory access); ECALL and EBREAK are marked so the core can stop when
// they retire. Purely combinational.
//
// Encodings follow the RISC-V specification; the treatment of unknown
// opcodes and the custom-0 opcode for the FFT unit are this design's.
module decode
  import comet_pkg::*;
(
  input  ftodc_t      ftodc,
  output ctrl_t       ctrl,
  output logic [31:0] imm,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [4:0]  rd,
  output logic        jal,
  output logic [31:0] jal_target
);
  logic [31:0] ins;
  logic [6:0]  opcode, funct7;
  logic [2:0]  funct3;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    ins    = ftodc.instr;
    opcode = ins[6:0];
    funct3 = ins[14:12];
    funct7 = ins[31:25];
    rs1    = ins[19:15];
    rs2    = ins[24:20];
    rd     = ins[11:7];
    imm_i  = {{20{ins[31]}}, ins[31:20]};
    imm_s  = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    imm_b  = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
    imm_u  = {ins[31:12], 12'b0};
    imm_j  = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};

    ctrl        = CTRL_NOP;
    ctrl.funct3 = funct3;
    imm         = imm_i;

    unique case (opcode)
      OP_LUI: begin
        ctrl.wb_en = 1'b1; ctrl.b_imm = 1'b1; ctrl.alu_op = ALU_PASSB; imm = imm_u;
      end
      OP_AUIPC: begin
        ctrl.wb_en = 1'b1; ctrl.a_pc = 1'b1; ctrl.b_imm = 1'b1; imm = imm_u;
      end
      OP_JAL: begin
        // link value PC + 4 is computed by the ALU in Execute
        ctrl.wb_en = 1'b1; ctrl.is_jal = 1'b1; ctrl.a_pc = 1'b1; imm = imm_j;
      end
      OP_JALR: begin
        ctrl.wb_en = 1'b1; ctrl.is_jalr = 1'b1; ctrl.a_pc = 1'b1; ctrl.use_rs1 = 1'b1;
      end
      OP_BRANCH: begin
        ctrl.is_branch = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; imm = imm_b;
      end
      OP_LOAD: begin
        ctrl.wb_en = 1'b1; ctrl.is_load = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.b_imm = 1'b1;
      end
      OP_STORE: begin
        ctrl.is_store = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.b_imm = 1'b1;
        imm = imm_s;
      end
      OP_IMM: begin
        ctrl.wb_en = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.b_imm = 1'b1;
        unique case (funct3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b001: ctrl.alu_op = ALU_SLL;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b101: ctrl.alu_op = funct7[5] ? ALU_SRA : ALU_SRL;
          3'b110: ctrl.alu_op = ALU_OR;
          default: ctrl.alu_op = ALU_AND;
        endcase
      end
      OP_REG: begin
        ctrl.wb_en = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
        if (funct7 == 7'b0000001) begin
          ctrl.unit = funct3[2] ? UNIT_DIV : UNIT_MUL;
        end else begin
          unique case (funct3)
            3'b000: ctrl.alu_op = funct7[5] ? ALU_SUB : ALU_ADD;
            3'b001: ctrl.alu_op = ALU_SLL;
            3'b010: ctrl.alu_op = ALU_SLT;
            3'b011: ctrl.alu_op = ALU_SLTU;
            3'b100: ctrl.alu_op = ALU_XOR;
            3'b101: ctrl.alu_op = funct7[5] ? ALU_SRA : ALU_SRL;
            3'b110: ctrl.alu_op = ALU_OR;
            default: ctrl.alu_op = ALU_AND;
          endcase
        end
      end
      OP_CUSTOM0: begin
        // funct3 0: butterfly (rs1, rs2, twiddle index in imm); 1: second value
        ctrl.wb_en = 1'b1; ctrl.unit = UNIT_FFT;
        ctrl.use_rs1 = (funct3 == 3'd0); ctrl.use_rs2 = (funct3 == 3'd0);
        // R-type layout; the funct7 field carries the twiddle index
        imm = {25'b0, funct7};
      end
      OP_SYSTEM: begin
        ctrl.is_ecall = (funct3 == 3'b000);
      end
      default: ;  // FENCE and unknown opcodes: no-op
    endcase

    if (rd == 5'd0) ctrl.wb_en = 1'b0;
    if (!ftodc.valid) ctrl = CTRL_NOP;
    jal        = ftodc.valid && (opcode == OP_JAL);
    jal_target = ftodc.pc + imm_j;
  end
endmodule
