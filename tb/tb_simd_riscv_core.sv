// tb_simd_riscv_core: end-to-end test of the SIMD processor at its default
// size (25 PEs, 16 KiB instruction and 32 KiB data memory).
//
// Workload: matrix-vector multiplication over 150 rows, A[i][5] += A[i][0..4]
// . v[0..4] + K, written as plain RV32IM code whose row loop is the SIMD loop.
// K is read inside the loop from expanded (external) memory, which a model
// here serves with two wait cycles; after the loop the program also stores
// to and reloads from external memory in standard mode. The
// row data sits in one contiguous block that is cut into 25 partitions of 6
// rows; v lies in common memory. The testbench plays the role of the
// code-generation flow: it writes the program, the data, the partition tags
// and the SIMD configuration, then releases reset.
//
// Runs:
//   1. standard mode only (SIMD disabled): the scalar reference;
//   2. SIMD mode: same results, and exactly (150 - 6) loop iterations of 54
//      cycles fewer, i.e. no cycle is lost entering or leaving the loop;
//   3. SIMD mode with one wrong tag: the partition check must block that
//      PE's store to the mistagged word and report it.
// Every mechanism (stall, mispredict, jump, mode entry/exit, common and
// partition accesses, loop-bound override, tag fault, external access and
// pipeline hold) is counted
// and must occur. Results are compared with sums computed here.
module tb_simd_riscv_core;
  import simd_pkg::*;
  import rv_asm_pkg::*;

  localparam int NPE   = 25;
  localparam int TAGW  = $clog2(NPE);
  localparam int ROWS  = 150;
  localparam int COLS  = 5;
  localparam int RWORD = COLS + 1;            // words per row (result in last)
  localparam int A_BASE = 32'h1000;
  localparam int A_END  = A_BASE + ROWS * RWORD * 4;
  localparam int V_BASE = 32'h0100;
  localparam int FLAG   = 32'h0080;           // written by the subroutine
  localparam int EXT_BASE = 32'h0001_0000;    // beyond the 32 KiB local memory
  localparam int EXT_WAIT = 2;                // wait cycles of the model
  // Steady-state cycles per row: 48 for the plain multiply-accumulate body
  // (instructions plus hazard stalls), 1 + EXT_WAIT for the external load
  // and 3 for the add of K (1 instruction, 2 stall cycles) = 54.
  localparam int ITER_CYCLES = 48 + 1 + EXT_WAIT + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_imem_we = 1'b0, ld_dmem_we = 1'b0, ld_tag_we = 1'b0;
  logic [31:0] ld_addr = '0, ld_wdata = '0;
  logic [TAGW-1:0] ld_tag = '0;
  simd_cfg_t cfg;
  logic [NPE-1:0][31:0] rs1_init, rs2_init;
  logic [31:0] dbg_addr = '0, dbg_rdata;
  logic halted;
  events_t evt;
  logic ext_req, ext_we, ext_ready;
  logic [3:0] ext_be;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic [31:0] ext_mem [int];
  int ext_cnt = 0;
  int ext_k;

  // expanded-memory model: answers after EXT_WAIT waiting cycles
  assign ext_ready = ext_req && (ext_cnt == EXT_WAIT);
  assign ext_rdata = ext_mem.exists(ext_addr[31:2]) ? ext_mem[ext_addr[31:2]] : 32'h0;
  always_ff @(posedge clk) begin
    if (!ext_req || ext_ready) ext_cnt <= 0;
    else                       ext_cnt <= ext_cnt + 1;
    if (ext_ready && ext_we)
      for (int b = 0; b < 4; b++)
        if (ext_be[b]) begin
          logic [31:0] w = ext_mem.exists(ext_addr[31:2]) ? ext_mem[ext_addr[31:2]] : 32'h0;
          w[b*8 +: 8] = ext_wdata[b*8 +: 8];
          ext_mem[ext_addr[31:2]] = w;
        end
  end

  simd_riscv_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles;
  int n_stall, n_mispred, n_jump, n_enter, n_exit, n_par, n_common, n_part, n_fault, n_init;
  int n_ext, n_wait, total_ext, total_wait;
  int total_stall, total_mispred, total_jump, total_enter, total_exit, total_par;
  int total_common, total_part, total_fault, total_init;
  logic [31:0] prog [$];
  int loop_start, loop_branch, set_rs1, set_rs2;
  int amat [ROWS][COLS];
  int vec  [COLS];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Program: the compiler-style MVM loop (inner loop fully unrolled)
  task automatic build_program();
    prog.delete();
    prog.push_back(i_addi(10, 0, V_BASE));          // x10 = &v
    prog.push_back(i_lui(11, 1));                   // x11 = 4096
    prog.push_back(i_addi(11, 11, ROWS*RWORD*4 - 4096)); // x11 = size of A
    set_rs1 = prog.size() * 4;
    prog.push_back(i_lui(5, A_BASE >> 12));         // x5 = &A[0]     (rs1)
    set_rs2 = prog.size() * 4;
    prog.push_back(i_add(6, 5, 11));                // x6 = end of A   (rs2)
    prog.push_back(i_lui(21, EXT_BASE >> 12));      // x21 = external block
    loop_start = prog.size() * 4;
    prog.push_back(i_lw(12, 5, COLS*4));            // acc = A[i][5]
    prog.push_back(i_lw(16, 21, 0));                // K (external, master only)
    for (int j = 0; j < COLS; j++) begin
      prog.push_back(i_lw(13, 5, j*4));             // A[i][j]   (partition)
      prog.push_back(i_lw(14, 10, j*4));            // v[j]      (common)
      prog.push_back(i_mul(15, 13, 14));
      prog.push_back(i_add(12, 12, 15));
    end
    prog.push_back(i_add(12, 12, 16));              // + K
    prog.push_back(i_sw(12, 5, COLS*4));            // A[i][5] = acc
    prog.push_back(i_addi(5, 5, RWORD*4));
    loop_branch = prog.size() * 4;
    prog.push_back(i_bne(5, 6, loop_start - loop_branch));
    prog.push_back(i_sw(12, 21, 8));                // external store
    prog.push_back(i_lw(22, 21, 8));                // external reload
    prog.push_back(i_addi(22, 22, 1));
    prog.push_back(i_sw(22, 0, FLAG + 4));
    prog.push_back(i_jal(1, 8));                    // call subroutine
    prog.push_back(i_ecall());
    prog.push_back(i_addi(20, 0, 77));              // subroutine
    prog.push_back(i_sw(20, 0, FLAG));
    prog.push_back(i_jalr(0, 1, 0));
  endtask

  function automatic int tag_of(input int addr);
    int psize = (A_END - A_BASE) / NPE;
    int p;
    if (addr < A_BASE || addr >= A_END) return 0;
    p = (addr - A_BASE) / psize;                    // partition 0..NPE-1
    return (p == NPE - 1) ? 0 : p + 1;              // last partition = master
  endfunction

  task automatic load_and_run(input bit simd, input int bad_tag_addr, output int ncyc);
    int psize;
    rst_n = 1'b0;
    psize = (A_END - A_BASE) / NPE;
    cfg = '0;
    cfg.simd_en     = simd;
    cfg.loop_start  = loop_start;
    cfg.loop_branch = loop_branch;
    cfg.set_rs1_pc  = set_rs1;
    cfg.set_rs2_pc  = set_rs2;
    cfg.rs1_reg     = 5;
    cfg.rs2_reg     = 6;
    for (int k = 0; k < NPE; k++) begin
      int p = (k == 0) ? NPE - 1 : k - 1;
      rs1_init[k] = A_BASE + p * psize;
      rs2_init[k] = A_BASE + (p + 1) * psize;
    end
    @(negedge clk);
    ld_imem_we = 1'b1;
    for (int i = 0; i < 4096; i++) begin
      ld_addr = i * 4; ld_wdata = (i < prog.size()) ? prog[i] : 32'h0000_0013;
      @(negedge clk);
    end
    ld_imem_we = 1'b0; ld_dmem_we = 1'b1; ld_tag_we = 1'b1;
    for (int a = 0; a < 8192 * 4; a += 4) begin
      ld_addr = a; ld_wdata = 0;
      ld_tag = simd ? TAGW'(tag_of(a)) : '0;
      if (a == bad_tag_addr) ld_tag = TAGW'(3);
      if (a >= A_BASE && a < A_END) begin
        int r = (a - A_BASE) / (RWORD * 4), c = ((a - A_BASE) / 4) % RWORD;
        ld_wdata = (c < COLS) ? amat[r][c] : r;    // result word starts at r
      end else if (a >= V_BASE && a < V_BASE + COLS * 4) begin
        ld_wdata = vec[(a - V_BASE) / 4];
      end
      @(negedge clk);
    end
    ld_dmem_we = 1'b0; ld_tag_we = 1'b0;
    ext_mem.delete();
    ext_mem[EXT_BASE / 4] = ext_k;
    {n_ext, n_wait} = '0;
    {n_stall, n_mispred, n_jump, n_enter, n_exit, n_par, n_common, n_part, n_fault, n_init} = '0;
    rst_n = 1'b1;
    ncyc = 0;
    while (!halted && ncyc < 100000) begin
      @(posedge clk);
      ncyc++;
      n_stall   += int'(evt.stall);      n_mispred += int'(evt.mispredict);
      n_jump    += int'(evt.jump);       n_enter   += int'(evt.par_enter);
      n_exit    += int'(evt.par_exit);   n_par     += int'(evt.par_instr);
      n_common  += int'(evt.common_access); n_part += int'(evt.part_access);
      n_fault   += int'(evt.part_fault); n_init    += int'(evt.rs_init);
      n_ext     += int'(evt.ext_access); n_wait    += int'(evt.ext_wait);
    end
    total_stall += n_stall; total_mispred += n_mispred; total_jump += n_jump;
    total_enter += n_enter; total_exit += n_exit; total_par += n_par;
    total_ext += n_ext; total_wait += n_wait;
    total_common += n_common; total_part += n_part; total_fault += n_fault; total_init += n_init;
    @(negedge clk);
  endtask

  task automatic check_results(input string tag, input int skip_row);
    for (int r = 0; r < ROWS; r++) begin
      int exp = r + ext_k;
      for (int c = 0; c < COLS; c++) exp += amat[r][c] * vec[c];
      dbg_addr = A_BASE + (r * RWORD + COLS) * 4;
      #1;
      if (r == skip_row) check({tag, " blocked row"}, $signed(dbg_rdata), r);
      else               check($sformatf("%s row %0d", tag, r), $signed(dbg_rdata), exp);
    end
    dbg_addr = FLAG; #1;
    check({tag, " subroutine flag"}, dbg_rdata, 77);
    begin
      int last = ROWS - 1, e = last + ext_k;
      for (int c = 0; c < COLS; c++) e += amat[last][c] * vec[c];
      dbg_addr = FLAG + 4; #1;
      check({tag, " external store/reload"}, $signed(dbg_rdata), e + 1);
      check({tag, " external memory word"}, $signed(ext_mem[(EXT_BASE + 8) / 4]), e);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_scalar, c_simd, c_fault;
    {total_stall, total_mispred, total_jump, total_enter, total_exit, total_par} = '0;
    {total_common, total_part, total_fault, total_init, total_ext, total_wait} = '0;
    ext_k = $urandom_range(0, 200) - 100;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) amat[r][c] = $urandom_range(0, 2000) - 1000;
    for (int c = 0; c < COLS; c++) vec[c] = $urandom_range(0, 2000) - 1000;
    build_program();

    // 1. scalar reference
    load_and_run(1'b0, -1, c_scalar);
    check("scalar halted", halted, 1);
    check_results("scalar", -1);
    check("scalar: no parallel instruction", n_par, 0);
    check("scalar: mispredicts (loop entry + exit)", n_mispred, 2);
    check("scalar: jumps (jal + jalr)", n_jump, 2);
    check("scalar: external accesses", n_ext, ROWS + 2);
    check("scalar: external wait cycles", n_wait, (ROWS + 2) * EXT_WAIT);

    // 2. SIMD
    load_and_run(1'b1, -1, c_simd);
    check("simd halted", halted, 1);
    check_results("simd", -1);
    check("simd: enter parallel mode once", n_enter, 1);
    check("simd: leave parallel mode once", n_exit, 1);
    check("simd: loop-bound overrides", n_init, 2);
    check("simd: common accesses (v loads)", n_common, COLS * ROWS / NPE);
    check("simd: partition accesses", n_part, (COLS + 2) * ROWS / NPE);
    check("simd: no tag faults", n_fault, 0);
    check("simd: external accesses", n_ext, ROWS / NPE + 2);
    check("simd: cycles saved", c_scalar - c_simd, (ROWS - ROWS / NPE) * ITER_CYCLES);
    $display("scalar %0d cycles, SIMD(n=%0d) %0d cycles, speed-up %0.2f",
             c_scalar, NPE, c_simd, real'(c_scalar) / real'(c_simd));

    // 3. SIMD with row 7's result word mistagged (row 7 belongs to slave 2)
    load_and_run(1'b1, A_BASE + (7 * RWORD + COLS) * 4, c_fault);
    check("fault run halted", halted, 1);
    check_results("fault", 7);
    check("fault: tag fault reported", (n_fault > 0), 1);

    // every mechanism happened
    check("mechanism stall",       (total_stall   > 0), 1);
    check("mechanism mispredict",  (total_mispred > 0), 1);
    check("mechanism jump",        (total_jump    > 0), 1);
    check("mechanism par_enter",   (total_enter   > 0), 1);
    check("mechanism par_exit",    (total_exit    > 0), 1);
    check("mechanism parallel",    (total_par     > 0), 1);
    check("mechanism common",      (total_common  > 0), 1);
    check("mechanism partition",   (total_part    > 0), 1);
    check("mechanism rs_init",     (total_init    > 0), 1);
    check("mechanism tag fault",   (total_fault   > 0), 1);
    check("mechanism ext access",  (total_ext     > 0), 1);
    check("mechanism ext wait",    (total_wait    > 0), 1);
    $display("events: stall=%0d mispredict=%0d jump=%0d enter=%0d exit=%0d par=%0d common=%0d part=%0d fault=%0d init=%0d ext=%0d wait=%0d",
             total_stall, total_mispred, total_jump, total_enter, total_exit, total_par,
             total_common, total_part, total_fault, total_init, total_ext, total_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
