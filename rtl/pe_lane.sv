// pe_lane: datapath of one processing element (PE).
//
// A lane holds what each PE owns: its register file and the data half of the
// decode, execute, memory and writeback stages. It has no fetch, branch or
// stall logic: the instruction, its decoded control record and every stage's
// valid/enable come from the master's shared control pipeline, because all
// PEs execute the same instruction in the same cycle. Lane 0 is the master's
// datapath; lanes 1..n-1 are the slaves S1..S(n-1).
//
// Stages and timing (one instruction per cycle; data registers load every
// cycle unless the whole pipeline holds for an external access; the control
// pipeline marks bubbles):
//   decode    register file read of d_rs1/d_rs2 (asynchronous, write-through)
//   execute   ALU on (rs1|pc|0, rs2|imm); link value pc+4; memory address
//             rs1+imm, shown on e_addr for the tag lookup
//   memory    data-memory port driven from the registered address; load data
//             is aligned and sign/zero-extended
//   writeback the register file is written with the lane's own result, the
//             master's result (broadcast), or the pre-computed loop-bound
//             value (init), as w_sel says.
module pe_lane
  import simd_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1              // multiplier in the ALU
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,         // pipeline held: data registers keep
  // decode
  input  logic [4:0]  d_rs1,
  input  logic [4:0]  d_rs2,
  output logic [31:0] d_rdata1,
  output logic [31:0] d_rdata2,
  // execute
  input  ctrl_t       e_ctrl,
  input  logic [31:0] e_pc,
  output logic [31:0] e_addr,
  // memory
  input  ctrl_t       m_ctrl,
  input  logic        m_acc,        // this lane accesses memory this cycle
  output logic        mp_en,
  output logic        mp_we,
  output logic [3:0]  mp_be,
  output logic [31:0] mp_addr,
  output logic [31:0] mp_wdata,
  input  logic [31:0] mp_rdata,
  // writeback
  input  logic        w_we,
  input  logic [4:0]  w_rd,
  input  wb_sel_e     w_sel,
  input  logic [31:0] w_bcast,      // master's result
  input  logic [31:0] w_init,       // this lane's loop-bound value
  output logic [31:0] w_result      // this lane's own result
);
  logic [31:0] e_rs1, e_rs2, e_a, e_b, e_y;
  logic [31:0] m_y, m_addr, m_rs2;
  logic [31:0] m_val, w_val, wb_data;

  regfile u_rf (
    .clk, .rst_n,
    .raddr1(d_rs1), .rdata1(d_rdata1),
    .raddr2(d_rs2), .rdata2(d_rdata2),
    .we(w_we), .waddr(w_rd), .wdata(wb_data)
  );

  // decode -> execute operand registers
  always_ff @(posedge clk) begin
    if (!hold) begin
      e_rs1 <= d_rdata1;
      e_rs2 <= d_rdata2;
    end
  end

  always_comb begin
    unique case (e_ctrl.a_sel)
      A_PC:    e_a = e_pc;
      A_ZERO:  e_a = '0;
      default: e_a = e_rs1;
    endcase
    e_b = e_ctrl.b_imm ? e_ctrl.imm : e_rs2;
  end

  rv_alu #(.HAS_MUL(HAS_MUL)) u_alu (.op(e_ctrl.alu_op), .a(e_a), .b(e_b), .y(e_y));

  assign e_addr = e_rs1 + e_ctrl.imm;

  // execute -> memory
  always_ff @(posedge clk) begin
    if (!hold) begin
      m_y    <= e_ctrl.link ? e_pc + 32'd4 : e_y;
      m_addr <= e_addr;
      m_rs2  <= e_rs2;
    end
  end

  assign mp_en    = m_acc;
  assign mp_we    = m_acc && m_ctrl.mem_write;
  assign mp_be    = store_be(m_addr[1:0], m_ctrl.funct3);
  assign mp_addr  = m_addr;
  assign mp_wdata = store_data(m_rs2, m_ctrl.funct3);
  assign m_val    = m_ctrl.mem_read ? load_extend(mp_rdata, m_addr[1:0], m_ctrl.funct3) : m_y;

  // memory -> writeback
  always_ff @(posedge clk) if (!hold) w_val <= m_val;

  assign w_result = w_val;
  always_comb begin
    unique case (w_sel)
      WB_BCAST: wb_data = w_bcast;
      WB_INIT:  wb_data = w_init;
      default:  wb_data = w_val;
    endcase
  end
endmodule
