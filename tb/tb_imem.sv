// tb_imem: loads random words through the write port and reads them back
// asynchronously, in a different order, with the low address bits set.
module tb_imem;
  logic clk = 1'b0;
  logic [31:0] raddr, rdata, waddr, wdata;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [256];

  imem #(.DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = i * 4; wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 255; i >= 0; i--) begin
      raddr = i * 4 + (i % 4); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
