// tb_regfile: random writes and reads of the register file against a model;
// checks that x0 stays zero, that reads are combinational and that a read of
// the register being written returns the new value.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [32];

  regfile dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); #1; check("reset value", rdata1, 0);
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = $urandom;
      raddr1 = 5'($urandom); raddr2 = (t % 3 == 0) ? waddr : 5'($urandom);
      #1;
      check("rd1", rdata1, (raddr1 == 0) ? 0 : (we && waddr == raddr1) ? wdata : model[raddr1]);
      check("rd2", rdata2, (raddr2 == 0) ? 0 : (we && waddr == raddr2) ? wdata : model[raddr2]);
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
