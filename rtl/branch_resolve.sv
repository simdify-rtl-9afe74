// branch_resolve: branch-jump resolve unit of the decode stage.
//
// Branches and jumps are resolved in decode, with the master PE's register
// operands, to keep the misprediction penalty at one cycle. For a conditional
// branch the unit evaluates the condition (BEQ/BNE/BLT/BGE/BLTU/BGEU), compares
// it with the fetch-stage prediction and, on a mismatch, redirects fetch to
// the correct PC (target or fall-through); it also tells the predictor the
// real outcome. JAL and JALR always redirect (one cycle of overhead): JAL to
// PC + J-immediate, JALR to (rs1 + I-immediate) with bit 0 cleared.
// Combinational; `valid` gates everything (a stalled or empty decode slot).
module branch_resolve
  import simd_pkg::*;
(
  input  logic        valid,
  input  br_kind_e    kind,
  input  logic [2:0]  funct3,
  input  logic [31:0] pc,
  input  logic [31:0] imm,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  input  logic        pred_taken,
  output logic        redirect,
  output logic [31:0] redirect_pc,
  output logic        mispredict,
  output logic        jump,
  output logic        bpu_upd,
  output logic        taken
);
  logic cond;

  always_comb begin
    unique case (funct3)
      3'b000:  cond = (rs1 == rs2);
      3'b001:  cond = (rs1 != rs2);
      3'b100:  cond = ($signed(rs1) <  $signed(rs2));
      3'b101:  cond = ($signed(rs1) >= $signed(rs2));
      3'b110:  cond = (rs1 <  rs2);
      3'b111:  cond = (rs1 >= rs2);
      default: cond = 1'b0;
    endcase
    taken       = valid && (kind == BR_BRANCH) && cond;
    bpu_upd     = valid && (kind == BR_BRANCH);
    mispredict  = bpu_upd && (taken != pred_taken);
    jump        = valid && (kind == BR_JAL || kind == BR_JALR);
    redirect    = mispredict || jump;
    unique case (kind)
      BR_JALR: redirect_pc = (rs1 + imm) & ~32'd1;
      BR_JAL:  redirect_pc = pc + imm;
      default: redirect_pc = taken ? pc + imm : pc + 32'd4;
    endcase
  end
endmodule
