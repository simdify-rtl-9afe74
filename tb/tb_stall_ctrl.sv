// tb_stall_ctrl: random decode/execute/memory register usage; the stall must
// rise exactly when decode reads a non-zero register that a valid
// instruction in execute or memory writes.
module tb_stall_ctrl;
  logic d_valid, d_use_rs1, d_use_rs2, e_valid, e_reg_write, m_valid, m_reg_write, stall;
  logic [4:0] d_rs1, d_rs2, e_rd, m_rd;
  int checks = 0, failures = 0, nstall = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  stall_ctrl dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      bit exp;
      {d_valid, d_use_rs1, d_use_rs2, e_valid, e_reg_write, m_valid, m_reg_write} = 7'($urandom);
      d_rs1 = 5'($urandom_range(0, 3)); d_rs2 = 5'($urandom_range(0, 3));
      e_rd = 5'($urandom_range(0, 3));  m_rd = 5'($urandom_range(0, 3));
      #1;
      exp = d_valid && (
            (d_use_rs1 && d_rs1 != 0 && e_valid && e_reg_write && e_rd == d_rs1) ||
            (d_use_rs2 && d_rs2 != 0 && e_valid && e_reg_write && e_rd == d_rs2) ||
            (d_use_rs1 && d_rs1 != 0 && m_valid && m_reg_write && m_rd == d_rs1) ||
            (d_use_rs2 && d_rs2 != 0 && m_valid && m_reg_write && m_rd == d_rs2));
      checks++; nstall += int'(exp);
      if (stall !== exp) begin failures++; $display("FAIL stall at %0d", t); end
    end
    checks++;
    if (nstall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
