// simd_riscv_core: SIMD processor that runs unmodified scalar RISC-V code.
//
// One master PE and n-1 slave PEs (NPE = n) share a single five-stage
// pipeline (fetch, decode, execute, memory, writeback). Outside the marked
// SIMD loop only the master works, like an ordinary in-order RV32I core with
// the MUL/MULH/MULHSU/MULHU multiplies (HAS_MUL = 0 leaves the multipliers
// out for programs that need none). When the fetched PC lies inside the
// loop the instruction runs in parallel mode: every PE executes it on its own
// register file and its own partition of the local data memory, so the loop
// runs n iterations at a time. Before the loop, the two instructions that set
// the loop's running and final address registers are overridden at writeback
// with each PE's own partition bounds; the master takes the last partition.
//
// Pipeline rules:
//   * fetch: instruction memory read, 1-bit dynamic branch prediction, mode
//     decision from the PC;
//   * decode: decoding, register read, branch/jump resolution (one cycle
//     penalty on a misprediction or jump), data-hazard stalls (no forwarding;
//     writeback writes through to decode);
//   * execute: ALU per PE, tag lookup of each PE's address;
//   * memory: single-cycle local memory access;
//   * writeback: each register file takes its own result, or the master's
//     result when the slave did not execute the instruction itself.
// In parallel mode slaves sit out LUI, AUIPC, jumps and branches, and any
// load/store where all PEs present the same address (common memory): then
// only the master accesses memory and its result is written to every register
// file. In standard mode all register files receive the master's results, so
// slaves enter the loop with the master's register state (a choice of this
// design). ECALL/EBREAK stops the core (halted rises when it retires).
//
// Data outside the local memory (byte address >= 4*DMEM_DEPTH) lives in
// expanded memory reached through the ext_* port, where a cache or memory
// controller may sit. Such an access is done by the master alone (slaves
// take its result, as for common memory), and the whole pipeline holds in
// the memory stage until ext_ready; the pipeline depth does not change.
//
// Interface: memories and tags are written through the ld_* port while
// rst_n is low; cfg and the per-PE loop bounds (rs1_init, rs2_init, index 0 =
// master) must be stable while the core runs; dbg_* reads data memory; evt
// pulses one-cycle events. Execution starts at RESET_PC when rst_n rises.
// External port: ext_req with ext_we/ext_addr/ext_be/ext_wdata stays stable
// until the cycle ext_ready is high; on a load ext_rdata is taken in that
// cycle (ready may be high in the first cycle for a zero-wait memory).
module simd_riscv_core
  import simd_pkg::*;
#(
  parameter int unsigned NPE         = 25,    // PEs: 1 master + NPE-1 slaves
  parameter int unsigned IMEM_DEPTH  = 4096,  // instruction words
  parameter int unsigned DMEM_DEPTH  = 8192,  // data words
  parameter int unsigned BHT_ENTRIES = 64,
  parameter logic [31:0] RESET_PC    = 32'h0,
  parameter bit          HAS_MUL     = 1'b1,  // MUL/MULH/MULHSU/MULHU built
  parameter int unsigned TAGW        = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // program / data / tag load port
  input  logic                  ld_imem_we,
  input  logic                  ld_dmem_we,
  input  logic                  ld_tag_we,
  input  logic [31:0]           ld_addr,
  input  logic [31:0]           ld_wdata,
  input  logic [TAGW-1:0]       ld_tag,
  // SIMD configuration
  input  simd_cfg_t             cfg,
  input  logic [NPE-1:0][31:0]  rs1_init,
  input  logic [NPE-1:0][31:0]  rs2_init,
  // debug read of data memory
  input  logic [31:0]           dbg_addr,
  output logic [31:0]           dbg_rdata,
  // expanded (external) memory, through a cache or memory controller
  output logic                  ext_req,
  output logic                  ext_we,
  output logic [3:0]            ext_be,
  output logic [31:0]           ext_addr,
  output logic [31:0]           ext_wdata,
  input  logic [31:0]           ext_rdata,
  input  logic                  ext_ready,
  // status
  output logic                  halted,
  output events_t               evt
);
  localparam logic [31:0] LOCAL_BYTES = 32'(DMEM_DEPTH) * 32'd4;

  logic        hold;                         // external access in progress

  // ---------------------------------------------------------------- fetch
  logic [31:0] pc_q, f_instr, pred_target;
  logic        pred_taken, f_par;
  logic        stop_q;                       // a halt has issued

  // ---------------------------------------------------------------- decode
  logic        d_valid, d_pred, d_par;
  logic [31:0] d_instr, d_pc;
  ctrl_t       d_ctrl;
  logic [1:0]  d_init_sel;
  logic        stall, issue;
  logic        redirect, mispredict, jump, bpu_upd, br_taken;
  logic [31:0] redirect_pc;

  // ---------------------------------------------------------------- execute
  logic        e_valid, e_par;
  ctrl_t       e_ctrl;
  logic [31:0] e_pc;
  logic [1:0]  e_init_sel;
  logic        e_is_mem, e_common, e_fault, e_ext;
  logic [NPE-1:0]           e_own, e_acc, e_tag_ok;
  logic [NPE-1:0][31:0]     e_addr;
  logic [NPE-1:0][TAGW-1:0] e_tag;

  // ---------------------------------------------------------------- memory
  logic        m_valid, m_ext;
  ctrl_t       m_ctrl;
  logic [1:0]  m_init_sel;
  logic [NPE-1:0] m_own, m_acc;

  // ---------------------------------------------------------------- writeback
  logic        w_valid;
  ctrl_t       w_ctrl;
  logic [1:0]  w_init_sel;
  logic [NPE-1:0] w_own;

  // lane <-> memory
  logic [NPE-1:0]       mp_en, mp_we;
  logic [NPE-1:0][3:0]  mp_be;
  logic [NPE-1:0][31:0] mp_addr, mp_wdata, mp_rdata, lane_rdata, w_result;
  logic [NPE-1:0][31:0] d_rdata1, d_rdata2;
  logic                 par_mode, par_enter, par_exit;

  // ================================================================ fetch
  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .raddr(pc_q), .rdata(f_instr),
    .we(ld_imem_we), .waddr(ld_addr), .wdata(ld_wdata)
  );

  branch_predictor #(.ENTRIES(BHT_ENTRIES)) u_bpu (
    .clk, .rst_n,
    .f_pc(pc_q), .f_instr(f_instr),
    .pred_taken, .pred_target,
    .upd_valid(bpu_upd && !hold), .upd_pc(d_pc), .upd_taken(br_taken)
  );

  simd_mode_ctrl u_mode (
    .clk, .rst_n, .cfg,
    .f_pc(pc_q), .f_par,
    .d_pc, .d_rd(d_ctrl.rd), .d_reg_write(d_ctrl.reg_write), .d_init_sel,
    .issue, .issue_par(d_par), .par_mode, .par_enter, .par_exit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q    <= RESET_PC;
      d_valid <= 1'b0;
      d_instr <= '0;
      d_pc    <= '0;
      d_pred  <= 1'b0;
      d_par   <= 1'b0;
    end else if (hold) begin
      // memory stage waits for the external memory: everything holds
    end else if (redirect) begin
      pc_q    <= redirect_pc;
      d_valid <= 1'b0;                       // squash the wrong-path fetch
    end else if (!stall) begin
      pc_q    <= pred_taken ? pred_target : pc_q + 32'd4;
      d_valid <= !stop_q && !(issue && d_ctrl.halt);
      d_instr <= f_instr;
      d_pc    <= pc_q;
      d_pred  <= pred_taken;
      d_par   <= f_par;
    end
  end

  // ================================================================ decode
  rv_decoder #(.HAS_MUL(HAS_MUL)) u_dec (.instr(d_instr), .c(d_ctrl));

  stall_ctrl u_stall (
    .d_valid, .d_use_rs1(d_ctrl.use_rs1), .d_use_rs2(d_ctrl.use_rs2),
    .d_rs1(d_ctrl.rs1), .d_rs2(d_ctrl.rs2),
    .e_valid, .e_reg_write(e_ctrl.reg_write), .e_rd(e_ctrl.rd),
    .m_valid, .m_reg_write(m_ctrl.reg_write), .m_rd(m_ctrl.rd),
    .stall
  );

  assign issue = d_valid && !stall && !hold;

  branch_resolve u_br (
    .valid(issue), .kind(d_ctrl.br_kind), .funct3(d_ctrl.funct3),
    .pc(d_pc), .imm(d_ctrl.imm), .rs1(d_rdata1[0]), .rs2(d_rdata2[0]),
    .pred_taken(d_pred),
    .redirect, .redirect_pc, .mispredict, .jump, .bpu_upd, .taken(br_taken)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_q <= 1'b0;
    end else if (issue && d_ctrl.halt) begin
      stop_q <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid    <= 1'b0;
      e_ctrl     <= '0;
      e_pc       <= '0;
      e_par      <= 1'b0;
      e_init_sel <= '0;
    end else if (!hold) begin
      e_valid    <= issue;                   // bubble on a stall
      e_ctrl     <= d_ctrl;
      e_pc       <= d_pc;
      e_par      <= d_par;
      e_init_sel <= d_init_sel;
    end
  end

  // ================================================================ execute
  // Tag-based access enables: which PE may touch memory for this instruction.
  always_comb begin
    e_is_mem = e_valid && (e_ctrl.mem_read || e_ctrl.mem_write);
    e_ext    = e_is_mem && (e_addr[0] >= LOCAL_BYTES);
    e_common = 1'b1;
    for (int k = 1; k < int'(NPE); k++)
      if (e_addr[k][31:2] != e_addr[0][31:2]) e_common = 1'b0;
    e_fault = 1'b0;
    for (int k = 0; k < int'(NPE); k++) begin
      e_tag_ok[k] = (e_tag[k] == TAGW'(k));
      if (k == 0) begin
        e_own[k] = 1'b1;
        e_acc[k] = e_is_mem && !e_ext && (!e_par || e_common || e_tag_ok[k]);
      end else begin
        e_own[k] = e_par && !e_ctrl.master_only && !(e_is_mem && (e_common || e_ext));
        e_acc[k] = e_is_mem && e_own[k] && e_tag_ok[k];
      end
      if (e_is_mem && e_par && !e_common && !e_ext && !e_tag_ok[k]) e_fault = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid    <= 1'b0;
      m_ext      <= 1'b0;
      m_ctrl     <= '0;
      m_init_sel <= '0;
      m_own      <= '0;
      m_acc      <= '0;
    end else if (!hold) begin
      m_valid    <= e_valid;
      m_ext      <= e_ext;
      m_ctrl     <= e_ctrl;
      m_init_sel <= e_init_sel;
      m_own      <= e_own;
      m_acc      <= e_acc;
    end
  end

  // ================================================================ memory
  tagged_dmem #(.DEPTH(DMEM_DEPTH), .NPORT(NPE), .TAGW(TAGW)) u_dmem (
    .clk,
    .t_addr(e_addr), .t_tag(e_tag),
    .en(mp_en & {NPE{!hold}}), .we(mp_we), .be(mp_be), .addr(mp_addr), .wdata(mp_wdata), .rdata(mp_rdata),
    .ld_we(ld_dmem_we), .ld_tag_we, .ld_addr, .ld_wdata, .ld_tag,
    .dbg_addr, .dbg_rdata
  );

  // expanded-memory port: the master's access, pipeline held until ready
  assign ext_req   = m_valid && m_ext;
  assign ext_we    = m_ctrl.mem_write;
  assign ext_be    = mp_be[0];
  assign ext_addr  = mp_addr[0];
  assign ext_wdata = mp_wdata[0];
  assign hold      = ext_req && !ext_ready;

  always_comb begin
    lane_rdata    = mp_rdata;
    lane_rdata[0] = m_ext ? ext_rdata : mp_rdata[0];
  end

  // the request must not change while it waits
  a_ext_stable: assert property (@(posedge clk) disable iff (!rst_n)
      hold |=> ext_req && $stable(ext_addr) && $stable(ext_we) && $stable(ext_wdata))
    else $error("simd_riscv_core: external request changed while waiting");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid    <= 1'b0;
      w_ctrl     <= '0;
      w_init_sel <= '0;
      w_own      <= '0;
    end else if (!hold) begin
      w_valid    <= m_valid;
      w_ctrl     <= m_ctrl;
      w_init_sel <= m_init_sel;
      w_own      <= m_own;
    end
  end

  // ================================================================ lanes
  for (genvar k = 0; k < int'(NPE); k++) begin : g_pe
    wb_sel_e sel;
    always_comb begin
      if (w_init_sel != 2'd0)      sel = WB_INIT;
      else if (k == 0 || w_own[k]) sel = WB_OWN;
      else                         sel = WB_BCAST;
    end

    pe_lane #(.HAS_MUL(HAS_MUL)) u_lane (
      .clk, .rst_n, .hold,
      .d_rs1(d_ctrl.rs1), .d_rs2(d_ctrl.rs2),
      .d_rdata1(d_rdata1[k]), .d_rdata2(d_rdata2[k]),
      .e_ctrl, .e_pc, .e_addr(e_addr[k]),
      .m_ctrl, .m_acc(m_valid && m_acc[k]),
      .mp_en(mp_en[k]), .mp_we(mp_we[k]), .mp_be(mp_be[k]),
      .mp_addr(mp_addr[k]), .mp_wdata(mp_wdata[k]), .mp_rdata(lane_rdata[k]),
      .w_we(w_valid && w_ctrl.reg_write && !hold), .w_rd(w_ctrl.rd), .w_sel(sel),
      .w_bcast(w_result[0]),
      .w_init(w_init_sel == 2'd2 ? rs2_init[k] : rs1_init[k]),
      .w_result(w_result[k])
    );
  end

  // ================================================================ status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            halted <= 1'b0;
    else if (w_valid && w_ctrl.halt && !hold) halted <= 1'b1;
  end

  always_comb begin
    evt               = '0;
    evt.retire        = w_valid && !hold;
    evt.stall         = stall && !hold;
    evt.mispredict    = mispredict;
    evt.jump          = jump;
    evt.par_enter     = par_enter;
    evt.par_exit      = par_exit;
    evt.par_instr     = !hold && e_valid && e_par && !e_ctrl.master_only;
    evt.common_access = !hold && e_is_mem && e_par && e_common && !e_ext;
    evt.part_access   = !hold && e_is_mem && e_par && !e_common && !e_ext;
    evt.part_fault    = !hold && e_fault;
    evt.rs_init       = !hold && e_valid && (e_init_sel != 2'd0);
    evt.ext_access    = ext_req && ext_ready;
    evt.ext_wait      = hold;
  end
endmodule
