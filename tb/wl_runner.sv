// wl_runner: runs the loop workloads of the evaluation on one processor
// instance with NPE PEs and reports checks and failures.
//
// Each workload processes ROWS independent rows; row i holds COLS inputs and
// one result word, and a vector b of COLS words lies in common memory:
//   MVM  r[i] += sum_j a[i][j] * b[j]          (matrix-vector multiplication)
//   SAD  r[i] += sum_j |a[i][j] - b[j]|        (sum of absolute differences,
//                                               branch-free abs, no multiply)
//   SSD  r[i] += sum_j (a[i][j] - b[j])^2      (sum of squared differences)
//   ANN  h[i] = max(0, r[i] + sum_j a[i][j] * b[j]) over ROWS/2 neurons
//        (hidden layer, branch-free ReLU), then serially
//        out = sum_i h[i] * w2[i] (one output neuron, standard mode)
//   KNS  d[i] = sum_j (a[i][j] - b[j])^2 (distance of point i to query b),
//        then serially a selection sort of all d[i] in place, ascending, so
//        the k nearest neighbours are the first k rows (standard mode)
//   KNQ  the same distances, sorted by an iterative quicksort (Lomuto
//        partition, last element as pivot, an explicit stack of (lo, hi)
//        pointer pairs in common memory) instead
// The row loop is the SIMD loop; the serial parts of ANN and KNS run in
// standard mode after it and touch every partition, which the master may
// do outside the loop. For every workload the runner measures the scalar
// cost of one loop iteration (a scalar run of the loop alone with R rows
// minus one with R-1 rows), then checks that the SIMD run of the whole
// program returns the same results as the values computed here and is
// faster than the scalar run by exactly that cost times the R - R/NPE
// iterations the slaves take over: the serial part costs the same in both.
// With HAS_MUL = 0 the core is built without multipliers and only SAD, the
// one workload without a multiplication, is run.
module wl_runner #(
  parameter int NPE  = 5,
  parameter int ROWS = 150,
  parameter int COLS = 5,
  parameter bit HAS_MUL = 1'b1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import simd_pkg::*;
  import rv_asm_pkg::*;

  localparam int TAGW  = (NPE > 1) ? $clog2(NPE) : 1;
  localparam int RWORD = COLS + 1;
  localparam int A_BASE = 32'h1000;
  localparam int V_BASE = 32'h0100;
  localparam int W2_BASE = 32'h0200;           // ANN output weights
  localparam int OUT_ADDR = 32'h0080;          // ANN output neuron
  localparam int STACK = 32'h0500;             // KNQ work stack
  localparam int STRIDE = RWORD * 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_imem_we = 1'b0, ld_dmem_we = 1'b0, ld_tag_we = 1'b0;
  logic [31:0] ld_addr = '0, ld_wdata = '0;
  logic [TAGW-1:0] ld_tag = '0;
  simd_cfg_t cfg;
  logic [NPE-1:0][31:0] rs1_init, rs2_init;
  logic [31:0] dbg_addr = '0, dbg_rdata;
  logic halted;
  events_t evt;
  // expanded memory unused by these workloads: a zero-wait port
  logic ext_req, ext_we;
  logic [3:0] ext_be;
  logic [31:0] ext_addr, ext_wdata;
  logic [31:0] ext_rdata = 32'h0;
  logic ext_ready = 1'b1;

  simd_riscv_core #(.NPE(NPE), .HAS_MUL(HAS_MUL)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] prog [$];
  int loop_start, loop_branch, set_rs1, set_rs2;
  int amat [ROWS][COLS];
  int vec  [COLS];
  int w2   [ROWS];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL n=%0d %s: got %0d expected %0d", NPE, what, got, exp);
    end
  endtask

  // kernel 0 = MVM, 1 = SAD, 2 = SSD, 3 = ANN, 4 = KNS, 5 = KNQ; serial = 0 leaves
  // out the serial part after the loop
  task automatic build_program(input int kern, input int rows, input bit serial);
    int len = rows * STRIDE;
    int hi = (len + 32'h800) >>> 12;
    prog.delete();
    prog.push_back(i_addi(10, 0, V_BASE));
    prog.push_back(i_lui(11, hi));                  // x11 = rows * STRIDE
    prog.push_back(i_addi(11, 11, len - hi * 4096));
    set_rs1 = prog.size() * 4;
    prog.push_back(i_lui(5, A_BASE >> 12));
    set_rs2 = prog.size() * 4;
    prog.push_back(i_add(6, 5, 11));
    loop_start = prog.size() * 4;
    if (kern >= 4) prog.push_back(i_addi(12, 0, 0));
    else           prog.push_back(i_lw(12, 5, COLS * 4));
    for (int j = 0; j < COLS; j++) begin
      prog.push_back(i_lw(13, 5, j * 4));
      prog.push_back(i_lw(14, 10, j * 4));
      if (kern == 0 || kern == 3) begin
        prog.push_back(i_mul(15, 13, 14));
      end else begin
        prog.push_back(i_sub(15, 13, 14));
        if (kern == 1) begin                       // |d| without a branch
          prog.push_back(i_srai(16, 15, 31));
          prog.push_back(i_xor(15, 15, 16));
          prog.push_back(i_sub(15, 15, 16));
        end else begin
          prog.push_back(i_mul(15, 15, 15));
        end
      end
      prog.push_back(i_add(12, 12, 15));
    end
    if (kern == 3) begin                           // ReLU without a branch
      prog.push_back(i_srai(16, 12, 31));
      prog.push_back(i_xori(16, 16, -1));
      prog.push_back(i_and(12, 12, 16));
    end
    prog.push_back(i_sw(12, 5, COLS * 4));
    prog.push_back(i_addi(5, 5, STRIDE));
    loop_branch = prog.size() * 4;
    prog.push_back(i_bne(5, 6, loop_start - loop_branch));
    if (serial && kern == 3) begin
      prog.push_back(i_lui(20, A_BASE >> 12));
      prog.push_back(i_addi(20, 20, COLS * 4));    // x20 = &h[0]
      prog.push_back(i_add(21, 20, 11));           // x21 = end
      prog.push_back(i_addi(22, 0, W2_BASE));      // x22 = &w2[0]
      prog.push_back(i_addi(23, 0, 0));            // out = 0
      prog.push_back(i_lw(24, 20, 0));             // L:
      prog.push_back(i_lw(25, 22, 0));
      prog.push_back(i_mul(24, 24, 25));
      prog.push_back(i_add(23, 23, 24));
      prog.push_back(i_addi(20, 20, STRIDE));
      prog.push_back(i_addi(22, 22, 4));
      prog.push_back(i_blt(20, 21, -24));          // -> L
      prog.push_back(i_sw(23, 0, OUT_ADDR));
    end
    if (serial && kern == 4) begin
      prog.push_back(i_lui(20, A_BASE >> 12));
      prog.push_back(i_addi(20, 20, COLS * 4));    // x20 = &d[0]
      prog.push_back(i_add(21, 20, 11));           // x21 = end
      prog.push_back(i_addi(22, 20, 0));           // i = &d[0]
      prog.push_back(i_addi(23, 22, 0));           // OUTER: min at i
      prog.push_back(i_lw(24, 22, 0));
      prog.push_back(i_addi(25, 22, STRIDE));      // j = i + 1
      prog.push_back(i_bge(25, 21, 28));           // INNER: j at end -> DONE
      prog.push_back(i_lw(26, 25, 0));
      prog.push_back(i_bge(26, 24, 12));           // d[j] >= min -> NEXT
      prog.push_back(i_addi(24, 26, 0));
      prog.push_back(i_addi(23, 25, 0));
      prog.push_back(i_addi(25, 25, STRIDE));      // NEXT
      prog.push_back(i_jal(0, -24));               // -> INNER
      prog.push_back(i_lw(27, 22, 0));             // DONE: swap d[i], d[min]
      prog.push_back(i_sw(24, 22, 0));
      prog.push_back(i_sw(27, 23, 0));
      prog.push_back(i_addi(22, 22, STRIDE));
      prog.push_back(i_blt(22, 21, -56));          // -> OUTER
    end
    if (serial && kern == 5) begin
      int l_pop, l_loop, l_skip, l_part, f_end, f_part, f_skip;
      prog.push_back(i_lui(20, A_BASE >> 12));
      prog.push_back(i_addi(20, 20, COLS * 4));    // x20 = &d[0]
      prog.push_back(i_add(21, 20, 11));
      prog.push_back(i_addi(23, 21, -STRIDE));     // x23 = &d[last]
      prog.push_back(i_addi(28, 0, STACK));        // push (first, last)
      prog.push_back(i_sw(20, 28, 0));
      prog.push_back(i_sw(23, 28, 4));
      prog.push_back(i_addi(28, 28, 8));
      l_pop = prog.size();                         // POP:
      prog.push_back(i_addi(30, 0, STACK));
      f_end = prog.size(); prog.push_back(32'h0);  // stack empty -> END
      prog.push_back(i_addi(28, 28, -8));
      prog.push_back(i_lw(22, 28, 0));             // lo
      prog.push_back(i_lw(23, 28, 4));             // hi
      prog.push_back(i_bge(22, 23, (l_pop - prog.size()) * 4));
      prog.push_back(i_lw(24, 23, 0));             // pivot = d[hi]
      prog.push_back(i_addi(25, 22, 0));           // i = lo
      prog.push_back(i_addi(26, 22, 0));           // j = lo
      l_loop = prog.size();                        // LOOP:
      f_part = prog.size(); prog.push_back(32'h0); // j reached hi -> PART
      prog.push_back(i_lw(27, 26, 0));
      f_skip = prog.size(); prog.push_back(32'h0); // d[j] >= pivot -> SKIP
      prog.push_back(i_lw(29, 25, 0));             // swap d[i], d[j]
      prog.push_back(i_sw(27, 25, 0));
      prog.push_back(i_sw(29, 26, 0));
      prog.push_back(i_addi(25, 25, STRIDE));
      l_skip = prog.size();                        // SKIP:
      prog.push_back(i_addi(26, 26, STRIDE));
      prog.push_back(i_jal(0, (l_loop - prog.size()) * 4));
      l_part = prog.size();                        // PART: swap d[i], d[hi]
      prog.push_back(i_lw(29, 25, 0));
      prog.push_back(i_sw(24, 25, 0));
      prog.push_back(i_sw(29, 23, 0));
      prog.push_back(i_addi(30, 25, -STRIDE));     // push (lo, i-1), (i+1, hi)
      prog.push_back(i_sw(22, 28, 0));
      prog.push_back(i_sw(30, 28, 4));
      prog.push_back(i_addi(30, 25, STRIDE));
      prog.push_back(i_sw(30, 28, 8));
      prog.push_back(i_sw(23, 28, 12));
      prog.push_back(i_addi(28, 28, 16));
      prog.push_back(i_jal(0, (l_pop - prog.size()) * 4));
      prog[f_end]  = i_beq(28, 30, (prog.size() - f_end) * 4);
      prog[f_part] = i_bge(26, 23, (l_part - f_part) * 4);
      prog[f_skip] = i_bge(27, 24, (l_skip - f_skip) * 4);
    end
    prog.push_back(i_ecall());
  endtask

  function automatic int expected(input int kern, input int r);
    int e = (kern >= 4) ? 0 : r;
    for (int c = 0; c < COLS; c++) begin
      int d = amat[r][c] - vec[c];
      if (kern == 0 || kern == 3) e += amat[r][c] * vec[c];
      else if (kern == 1)         e += (d < 0) ? -d : d;
      else                        e += d * d;    // SSD, KNS, KNQ
    end
    if (kern == 3 && e < 0) e = 0;
    return e;
  endfunction

  task automatic run(input bit simd, input int rows, output int ncyc);
    int a_end = A_BASE + rows * RWORD * 4;
    int psize = (a_end - A_BASE) / NPE;
    rst_n = 1'b0;
    cfg = '0;
    cfg.simd_en = simd; cfg.loop_start = loop_start; cfg.loop_branch = loop_branch;
    cfg.set_rs1_pc = set_rs1; cfg.set_rs2_pc = set_rs2; cfg.rs1_reg = 5; cfg.rs2_reg = 6;
    for (int k = 0; k < NPE; k++) begin
      int p = (k == 0) ? NPE - 1 : k - 1;
      rs1_init[k] = A_BASE + p * psize;
      rs2_init[k] = A_BASE + (p + 1) * psize;
    end
    @(negedge clk);
    ld_imem_we = 1'b1;
    for (int i = 0; i < prog.size() + 4; i++) begin
      ld_addr = i * 4; ld_wdata = (i < prog.size()) ? prog[i] : 32'h0000_0013;
      @(negedge clk);
    end
    ld_imem_we = 1'b0; ld_dmem_we = 1'b1; ld_tag_we = 1'b1;
    for (int a = 0; a < A_BASE + ROWS * RWORD * 4; a += 4) begin
      int p;
      ld_addr = a; ld_wdata = 0; ld_tag = '0;
      if (simd && a >= A_BASE && a < a_end) begin
        p = (a - A_BASE) / psize;
        ld_tag = (p == NPE - 1) ? '0 : TAGW'(p + 1);
      end
      if (a >= A_BASE) begin
        int r = (a - A_BASE) / (RWORD * 4), c = ((a - A_BASE) / 4) % RWORD;
        ld_wdata = (c < COLS) ? amat[r][c] : r;
      end else if (a >= V_BASE && a < V_BASE + COLS * 4) begin
        ld_wdata = vec[(a - V_BASE) / 4];
      end else if (a >= W2_BASE && a < W2_BASE + ROWS * 4) begin
        ld_wdata = w2[(a - W2_BASE) / 4];
      end
      @(negedge clk);
    end
    ld_dmem_we = 1'b0; ld_tag_we = 1'b0;
    rst_n = 1'b1;
    ncyc = 0;
    while (!halted && ncyc < 1000000) begin
      @(posedge clk);
      ncyc++;
      if (simd) check("no tag fault", evt.part_fault, 0);
    end
    @(negedge clk);
  endtask

  task automatic check_rows(input string name, input int kern, input int rows);
    int exp [$];
    for (int r = 0; r < rows; r++) exp.push_back(expected(kern, r));
    if (kern >= 4) exp.sort();
    for (int r = 0; r < rows; r++) begin
      dbg_addr = A_BASE + (r * RWORD + COLS) * 4;
      #1;
      check($sformatf("%s row %0d", name, r), $signed(dbg_rdata), exp[r]);
    end
    if (kern == 3) begin
      longint out = 0;
      for (int r = 0; r < rows; r++) out += longint'(exp[r]) * w2[r];
      dbg_addr = OUT_ADDR;
      #1;
      check({name, " output neuron"}, $signed(dbg_rdata), int'(out));
    end
  endtask

  initial begin
    string names [6] = '{"MVM", "SAD", "SSD", "ANN", "KNS", "KNQ"};
    string build;
    build = HAS_MUL ? "" : " (no multiplier)";
    done = 1'b0; checks = 0; failures = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) amat[r][c] = $urandom_range(0, 2000) - 1000;
    for (int c = 0; c < COLS; c++) vec[c] = $urandom_range(0, 2000) - 1000;
    for (int r = 0; r < ROWS; r++) w2[r] = $urandom_range(0, 200) - 100;
    for (int kern = 0; kern < 6; kern++) begin
      int c_scalar, c_short, c_long, c_simd, iter, rows;
      if (!HAS_MUL && kern != 1) continue;
      rows = (kern == 3) ? ROWS / 2 : ROWS;        // ANN has half the iterations
      build_program(kern, rows - 1, 1'b0);
      run(1'b0, rows - 1, c_short);
      build_program(kern, rows, 1'b0);
      run(1'b0, rows, c_long);
      iter = c_long - c_short;
      build_program(kern, rows, 1'b1);
      run(1'b0, rows, c_scalar);
      check_rows({names[kern], " scalar"}, kern, rows);
      run(1'b1, rows, c_simd);
      check(names[kern], halted, 1);
      check_rows({names[kern], " simd"}, kern, rows);
      check({names[kern], " cycles saved"}, c_scalar - c_simd, (rows - rows / NPE) * iter);
      $display("%s n=%0d%s: %0d iterations, scalar %0d cycles (%0d per iteration, %0d in the loop), SIMD %0d cycles, speed-up %0.2f",
               names[kern], NPE, build, rows, c_scalar, iter, rows * iter, c_simd, real'(c_scalar) / real'(c_simd));
    end
    done = 1'b1;
  end
endmodule
