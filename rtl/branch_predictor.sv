// branch_predictor: dynamic one-level branch predictor of the fetch stage.
//
// A table of 1-bit counters, indexed by the low word-address bits of the
// branch PC, remembers whether each branch went taken the last time it was
// resolved. In fetch, the instruction word is pre-decoded: if it is a
// conditional branch and its counter says taken, the predictor supplies the
// target PC + B-immediate as the next PC; otherwise fetch continues at PC + 4.
// Jumps are not predicted (they are resolved in decode with one cycle of
// overhead). The resolve unit in decode writes the actual outcome back at the
// clock edge. Counters reset to not-taken. The table depth and indexing are
// this design's choices.
module branch_predictor
  import simd_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch-side lookup
  input  logic [31:0] f_pc,
  input  logic [31:0] f_instr,
  output logic        pred_taken,
  output logic [31:0] pred_target,
  // decode-side update
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [ENTRIES-1:0] bht;
  logic [31:0]        immb;

  assign immb        = {{20{f_instr[31]}}, f_instr[7], f_instr[30:25], f_instr[11:8], 1'b0};
  assign pred_taken  = (f_instr[6:0] == OP_BRANCH) && bht[f_pc[IW+1:2]];
  assign pred_target = f_pc + immb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bht <= '0;
    else if (upd_valid) bht[upd_pc[IW+1:2]] <= upd_taken;
  end
endmodule
