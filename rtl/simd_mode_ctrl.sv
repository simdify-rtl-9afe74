// simd_mode_ctrl: standard/parallel mode control of the master PE.
//
// The master decides the execution mode from the program counter in the fetch
// stage: an instruction fetched from inside the SIMD loop (from the loop start,
// the closing branch's target, up to and including that branch) runs in
// parallel mode on all PEs; every other instruction runs in standard mode on
// the master alone. The mode travels with the instruction, so entering and
// leaving the loop costs no cycles.
//
// Before the loop the program sets the two source registers of the loop's
// closing branch (the running address and the final address). The unit
// recognises those two instructions by their PCs and destination registers
// while they are in decode and tags them, so that at writeback every PE
// writes its own partition's start (for rs1) or end (for rs2) value instead
// of the computed result. The PCs, register numbers and per-PE values are the
// pre-computed SIMD configuration.
//
// The registered mode of the last issued instruction gives one-cycle pulses
// on entering and leaving parallel mode. Combinational except that register.
module simd_mode_ctrl
  import simd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  simd_cfg_t   cfg,
  // fetch stage
  input  logic [31:0] f_pc,
  output logic        f_par,
  // decode stage
  input  logic [31:0] d_pc,
  input  logic [4:0]  d_rd,
  input  logic        d_reg_write,
  output logic [1:0]  d_init_sel,   // 0 none, 1 rs1 value, 2 rs2 value
  // issue (decode -> execute) of a real instruction
  input  logic        issue,
  input  logic        issue_par,
  output logic        par_mode,
  output logic        par_enter,
  output logic        par_exit
);
  logic mode_q;

  assign f_par = cfg.simd_en && (f_pc >= cfg.loop_start) && (f_pc <= cfg.loop_branch);

  always_comb begin
    d_init_sel = 2'd0;
    if (cfg.simd_en && d_reg_write) begin
      if (d_pc == cfg.set_rs1_pc && d_rd == cfg.rs1_reg)      d_init_sel = 2'd1;
      else if (d_pc == cfg.set_rs2_pc && d_rd == cfg.rs2_reg) d_init_sel = 2'd2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mode_q <= 1'b0;
    else if (issue) mode_q <= issue_par;
  end

  assign par_mode  = mode_q;
  assign par_enter = issue &&  issue_par && !mode_q;
  assign par_exit  = issue && !issue_par &&  mode_q;
endmodule
