// tb_tagged_dmem: a 4-port tagged data memory. Loads words and tags through
// the load port; checks tag reads on all ports; then random concurrent
// accesses from all ports to disjoint words with random byte enables,
// checked against a model through the data and debug read ports. Disabled
// ports and ports with write enable low must not write.
module tb_tagged_dmem;
  localparam int N = 4, D = 256, TW = 2;
  logic clk = 1'b0;
  logic [N-1:0][31:0] t_addr, addr, wdata, rdata;
  logic [N-1:0][TW-1:0] t_tag;
  logic [N-1:0] en, we;
  logic [N-1:0][3:0] be;
  logic ld_we, ld_tag_we;
  logic [31:0] ld_addr, ld_wdata, dbg_addr, dbg_rdata;
  logic [TW-1:0] ld_tag;
  int checks = 0, failures = 0;
  logic [31:0] model [D];
  logic [TW-1:0] tmodel [D];

  tagged_dmem #(.DEPTH(D), .NPORT(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = '0; we = '0; be = '0; addr = '0; wdata = '0; t_addr = '0; dbg_addr = 0;
    ld_we = 0; ld_tag_we = 0; ld_addr = 0; ld_wdata = 0; ld_tag = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      ld_we = 1; ld_tag_we = 1; ld_addr = i * 4; ld_wdata = $urandom; ld_tag = TW'($urandom);
      model[i] = ld_wdata; tmodel[i] = ld_tag;
      @(negedge clk);
    end
    ld_we = 0; ld_tag_we = 0;
    for (int i = 0; i < D; i++) begin
      t_addr[i % N] = i * 4 + 1; dbg_addr = i * 4; #1;
      chk("tag", t_tag[i % N], tmodel[i]);
      chk("dbg", dbg_rdata, model[i]);
    end
    for (int t = 0; t < 2000; t++) begin
      int base = $urandom_range(0, D / N - 1);
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        addr[p] = (p * (D / N) + base) * 4 + $urandom_range(0, 3);  // disjoint words
        en[p] = 1'($urandom); we[p] = 1'($urandom); be[p] = 4'($urandom);
        wdata[p] = $urandom;
      end
      #1;
      for (int p = 0; p < N; p++) chk("rdata", rdata[p], model[addr[p][31:2]]);
      @(posedge clk);
      for (int p = 0; p < N; p++)
        if (en[p] && we[p])
          for (int b = 0; b < 4; b++)
            if (be[p][b]) model[addr[p][31:2]][b*8 +: 8] = wdata[p][b*8 +: 8];
    end
    @(negedge clk); en = '0;
    for (int i = 0; i < D; i++) begin dbg_addr = i * 4; #1; chk("final", dbg_rdata, model[i]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
