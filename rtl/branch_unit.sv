// Branch unit: decides where fetch goes next.
//
// Conditional branches (BEQ, BNE, BLT, BGE, BLTU, BGEU) and JALR are
// resolved when they are in Execute, from the forwarded register values
// held in the DCtoEx register; JAL is resolved one stage earlier, in
// Decode, since its target depends only on the PC. Fetch always continues
// at PC + 4, so a redirect from Execute kills the two younger instructions
// (the one in Decode and the one being fetched) and a redirect from Decode
// kills the one being fetched. An Execute redirect belongs to the older
// instruction and wins over a Decode one. Combinational. Where branches are
// resolved and the absence of a predictor are this design's choices.
module branch_unit
  import comet_pkg::*;
(
  input  logic        ex_valid,
  input  ctrl_t       ex_ctrl,
  input  logic [31:0] ex_pc,
  input  logic [31:0] ex_a,
  input  logic [31:0] ex_b,
  input  logic [31:0] ex_imm,
  input  logic        dc_jal,
  input  logic [31:0] dc_target,
  output logic        redirect,
  output logic [31:0] target,
  output logic        redirect_ex,
  output logic        kill_fetch,  // the instruction being fetched is dropped
  output logic        kill_decode  // the instruction in Decode is dropped
);
  logic taken;

  always_comb begin
    unique case (ex_ctrl.funct3)
      3'b000:  taken = (ex_a == ex_b);
      3'b001:  taken = (ex_a != ex_b);
      3'b100:  taken = ($signed(ex_a) <  $signed(ex_b));
      3'b101:  taken = ($signed(ex_a) >= $signed(ex_b));
      3'b110:  taken = (ex_a <  ex_b);
      3'b111:  taken = (ex_a >= ex_b);
      default: taken = 1'b0;
    endcase

    redirect_ex = ex_valid && ((ex_ctrl.is_branch && taken) || ex_ctrl.is_jalr);
    kill_decode = redirect_ex;
    kill_fetch  = redirect_ex || dc_jal;
    redirect    = redirect_ex || dc_jal;
    if (redirect_ex)
      target = ex_ctrl.is_jalr ? ((ex_a + ex_imm) & ~32'd1) : (ex_pc + ex_imm);
    else
      target = dc_target;
  end
endmodule
