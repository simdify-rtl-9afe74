// tb_branch_resolve: random branches of every condition, jumps and
// predictions; checks taken, mispredict, redirect and the redirect PC
// against values computed here.
module tb_branch_resolve;
  import simd_pkg::*;
  logic valid, pred_taken, redirect, mispredict, jump, bpu_upd, taken;
  br_kind_e kind;
  logic [2:0] funct3;
  logic [31:0] pc, imm, rs1, rs2, redirect_pc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  branch_resolve dut (.*);

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int f3s [6] = '{0, 1, 4, 5, 6, 7};
    for (int t = 0; t < 3000; t++) begin
      bit cond, exp_taken, is_br, is_j;
      logic [31:0] exp_pc;
      valid = (t % 10 != 0);
      kind = br_kind_e'($urandom_range(0, 3));
      funct3 = 3'(f3s[$urandom_range(0, 5)]);
      pc = $urandom & 32'hFFFF_FFFC; imm = $urandom_range(0, 8191) - 4096;
      rs1 = $urandom_range(0, 3) - 1; rs2 = (t % 3 == 0) ? rs1 : $urandom_range(0, 3) - 1;
      if (t % 7 == 0) rs1 = $urandom;
      pred_taken = 1'($urandom);
      #1;
      case (funct3)
        0: cond = rs1 == rs2;
        1: cond = rs1 != rs2;
        4: cond = $signed(rs1) < $signed(rs2);
        5: cond = $signed(rs1) >= $signed(rs2);
        6: cond = rs1 < rs2;
        default: cond = rs1 >= rs2;
      endcase
      is_br = valid && kind == BR_BRANCH;
      is_j  = valid && (kind == BR_JAL || kind == BR_JALR);
      exp_taken = is_br && cond;
      chk("taken", taken, exp_taken);
      chk("mispredict", mispredict, is_br && (cond != pred_taken));
      chk("jump", jump, is_j);
      chk("redirect", redirect, is_j || (is_br && (cond != pred_taken)));
      if (redirect) begin
        if (kind == BR_JALR)     exp_pc = (rs1 + imm) & ~32'd1;
        else if (kind == BR_JAL) exp_pc = pc + imm;
        else                     exp_pc = cond ? pc + imm : pc + 4;
        chk("redirect_pc", redirect_pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
