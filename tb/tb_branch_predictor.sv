// tb_branch_predictor: a branch is predicted not taken after reset, taken
// after a taken update, and not taken again after a not-taken update; the
// predicted target is PC + B-immediate; non-branches and other table entries
// are unaffected; the update is visible only after the clock edge.
module tb_branch_predictor;
  import rv_asm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] f_pc, f_instr, pred_target, upd_pc;
  logic pred_taken, upd_valid, upd_taken;
  int checks = 0, failures = 0;
  bit model [64];

  branch_predictor #(.ENTRIES(64)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    upd_valid = 0; upd_pc = 0; upd_taken = 0; f_pc = 0; f_instr = 0;
    for (int i = 0; i < 64; i++) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int off = ($urandom_range(0, 4095) - 2048) * 2;
      @(negedge clk);
      f_pc = $urandom & 32'hFFFF_FFFC;
      f_instr = (t % 4 == 0) ? i_addi(1, 2, 3) : i_beq(1, 2, off);
      upd_valid = 1'($urandom); upd_pc = (t % 2) ? f_pc : ($urandom & 32'hFFFF_FFFC);
      upd_taken = 1'($urandom);
      #1;
      chk("pred", pred_taken, (t % 4 != 0) && model[f_pc[7:2]]);
      if (t % 4 != 0) chk("target", pred_target, 32'(f_pc + off));
      @(posedge clk);
      if (upd_valid) model[upd_pc[7:2]] = upd_taken;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
