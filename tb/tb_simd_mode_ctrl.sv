// tb_simd_mode_ctrl: checks the parallel-mode window (loop start through the
// closing branch, only when SIMD is enabled), the recognition of the two
// loop-bound instructions by PC and destination register, and the one-cycle
// enter/exit pulses over a sequence of issued instructions.
module tb_simd_mode_ctrl;
  import simd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  simd_cfg_t cfg;
  logic [31:0] f_pc, d_pc;
  logic f_par, d_reg_write, issue, issue_par, par_mode, par_enter, par_exit;
  logic [4:0] d_rd;
  logic [1:0] d_init_sel;
  int checks = 0, failures = 0;

  simd_mode_ctrl dut (.*);
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
    bit mode;
    cfg = '0; cfg.simd_en = 1; cfg.loop_start = 32'h40; cfg.loop_branch = 32'h80;
    cfg.set_rs1_pc = 32'h30; cfg.set_rs2_pc = 32'h34; cfg.rs1_reg = 5; cfg.rs2_reg = 6;
    f_pc = 0; d_pc = 0; d_rd = 0; d_reg_write = 0; issue = 0; issue_par = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int pc = 0; pc < 32'hA0; pc += 4) begin
      f_pc = pc; #1; chk("window", f_par, pc >= 32'h40 && pc <= 32'h80);
    end
    cfg.simd_en = 0; f_pc = 32'h50; #1; chk("disabled window", f_par, 0);
    d_pc = 32'h30; d_rd = 5; d_reg_write = 1; #1; chk("init disabled", d_init_sel, 0);
    cfg.simd_en = 1; #1; chk("init rs1", d_init_sel, 1);
    d_rd = 6; #1; chk("init wrong rd", d_init_sel, 0);
    d_pc = 32'h34; #1; chk("init rs2", d_init_sel, 2);
    d_reg_write = 0; #1; chk("init needs write", d_init_sel, 0);
    d_pc = 32'h38; d_reg_write = 1; #1; chk("init other pc", d_init_sel, 0);
    // issue sequence: modes, with idle cycles in between
    mode = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      issue = 1'($urandom); issue_par = (t / 37) % 2 == 1;
      #1;
      chk("enter", par_enter, issue && issue_par && !mode);
      chk("exit", par_exit, issue && !issue_par && mode);
      chk("mode", par_mode, mode);
      @(posedge clk);
      if (issue) mode = issue_par;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
