// tb_simd_workloads: the evaluated workloads (MVM, SAD, SSD, KNS and KNQ
// over 150 iterations, ANN over 75) on processors built with unroll factors
// 5, 15 and 25 (the default), one wl_runner instance each; see wl_runner for
// the programs and what each run checks. KNS, KNQ and ANN have a serial part
// after the SIMD loop, so their speed-up stays well below n. A fourth
// instance, with 5 PEs and the multiplier left out (HAS_MUL = 0), runs SAD,
// the only workload without multiplications, and a fifth is the plain
// scalar build with a single PE (unroll factor 1), where the SIMD
// configuration must change nothing. The instances run side by side; the
// testbench ends when all are done, or counts a failure after 5,000,000
// cycles.
module tb_simd_workloads;
  logic [4:0] done;
  int checks [5], failures [5];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  wl_runner #(.NPE(5))  u_n5  (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  wl_runner #(.NPE(15)) u_n15 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  wl_runner #(.NPE(25)) u_n25 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  wl_runner #(.NPE(5), .HAS_MUL(1'b0)) u_n5_nomul
    (.done(done[3]), .checks(checks[3]), .failures(failures[3]));
  wl_runner #(.NPE(1))  u_n1  (.done(done[4]), .checks(checks[4]), .failures(failures[4]));

  function automatic int total(input int v [5]);
    return v[0] + v[1] + v[2] + v[3] + v[4];
  endfunction

  initial begin
    repeat (5000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
