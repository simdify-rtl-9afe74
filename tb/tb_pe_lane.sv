// tb_pe_lane: runs one PE datapath through a short program, with the shared
// control pipeline (decode -> execute -> memory -> writeback) modelled here
// and a small word memory attached to the lane's memory port. Instructions
// are separated by two bubbles, so operands come from the register file's
// write-through path. Covers ALU, LUI/AUIPC, link values, word and byte
// stores and loads, multiply, and the three writeback sources: own result,
// broadcast master result and the per-PE loop-bound (init) value. Expected
// values are worked out here. The hold input is raised at random (about one
// cycle in three), with the modelled control pipeline, register write and
// memory write held too, as the core does while it waits for expanded
// memory: the results must not change, and across every held edge the
// lane's outputs must stay as they were.
module tb_pe_lane;
  import simd_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] d_rs1, d_rs2, w_rd;
  logic [31:0] d_rdata1, d_rdata2, e_pc, e_addr, mp_addr, mp_wdata, mp_rdata;
  logic [31:0] w_bcast, w_init, w_result;
  ctrl_t d_ctrl, e_ctrl, m_ctrl, w_ctrl;
  logic m_acc, mp_en, mp_we, w_we;
  logic hold = 1'b0, hold_q = 1'b0;
  logic [31:0] snap [4];
  logic [3:0] mp_be;
  wb_sel_e w_sel;
  logic [31:0] d_instr;
  int checks = 0, failures = 0;
  logic [31:0] mem [64];

  typedef struct { logic [31:0] instr; wb_sel_e sel; logic [31:0] side; bit chk; logic [31:0] exp; } op_t;
  op_t prog [$];
  op_t e_op, m_op, w_op, d_op;
  logic d_v, e_v, m_v, w_v;
  logic [31:0] d_pc, m_pc_unused;

  rv_decoder u_dec (.instr(d_instr), .c(d_ctrl));
  pe_lane dut (
    .clk, .rst_n, .hold, .d_rs1(d_ctrl.rs1), .d_rs2(d_ctrl.rs2), .d_rdata1, .d_rdata2,
    .e_ctrl, .e_pc, .e_addr, .m_ctrl, .m_acc, .mp_en, .mp_we, .mp_be, .mp_addr,
    .mp_wdata, .mp_rdata, .w_we, .w_rd, .w_sel, .w_bcast, .w_init, .w_result
  );
  assign d_rs1 = d_ctrl.rs1;
  assign d_rs2 = d_ctrl.rs2;

  always #5 clk = ~clk;

  // word memory on the lane's port
  assign mp_rdata = mem[mp_addr[7:2]];
  always_ff @(posedge clk)
    if (mp_en && mp_we && !hold)
      for (int b = 0; b < 4; b++) if (mp_be[b]) mem[mp_addr[7:2]][b*8 +: 8] <= mp_wdata[b*8 +: 8];

  assign m_acc  = m_v && (m_ctrl.mem_read || m_ctrl.mem_write);
  assign w_we   = w_v && w_ctrl.reg_write && !hold;
  assign w_rd   = w_ctrl.rd;
  assign w_sel  = w_op.sel;
  assign w_bcast = w_op.side + 32'd1;   // distinct from the init value
  assign w_init  = w_op.side;

  task automatic add(input logic [31:0] i, input wb_sel_e s, input logic [31:0] side,
                     input bit c, input logic [31:0] exp);
    op_t o;
    o.instr = i; o.sel = s; o.side = side; o.chk = c; o.exp = exp;
    prog.push_back(o);
    o.instr = 32'h13; o.chk = 0; o.sel = WB_OWN;   // two bubbles (nop)
    prog.push_back(o); prog.push_back(o);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // control pipeline and writeback checks
  always_ff @(posedge clk) begin
    hold_q <= hold;
    snap <= '{e_addr, mp_addr, mp_wdata, w_result};
    if (!hold) begin
      e_ctrl <= d_ctrl; e_pc <= d_pc; e_op <= d_op; e_v <= d_v;
      m_ctrl <= e_ctrl; m_op <= e_op; m_v <= e_v;
      w_ctrl <= m_ctrl; w_op <= m_op; w_v <= m_v;
    end
    if (w_v && w_op.chk && !hold) begin
      checks++;
      if (w_result !== w_op.exp) begin
        failures++; $display("FAIL instr %h result %h exp %h", w_op.instr, w_result, w_op.exp);
      end
    end
  end

  // outputs stay put across a held edge
  always @(negedge clk)
    if (rst_n && hold_q) begin
      checks++;
      if ('{e_addr, mp_addr, mp_wdata, w_result} != snap) begin
        failures++; $display("FAIL lane outputs changed while held");
      end
    end

  initial begin
    logic [31:0] x5, x7;
    for (int i = 0; i < 64; i++) mem[i] = 32'h1111_1111 * (i % 15);
    d_v = 0; d_instr = 32'h13; d_pc = 0;
    e_v = 0; m_v = 0; w_v = 0;
    x5 = 100 + 32'hCAFE;
    x7 = x5 * 32'hBEEF;
    add(i_addi(1, 0, 100),       WB_OWN,   0, 1, 100);
    add(i_lui(2, 32'h12345),     WB_OWN,   0, 1, 32'h12345000);
    add(i_addi(3, 0, 1),         WB_INIT,  32'hCAFE, 0, 0);
    add(i_addi(4, 0, 5),         WB_BCAST, 32'hBEEE, 0, 0);
    add(i_add(5, 1, 3),          WB_OWN,   0, 1, x5);
    add(i_sw(5, 1, 8),           WB_OWN,   0, 0, 0);     // mem[27] = x5
    add(i_lw(6, 1, 8),           WB_OWN,   0, 1, x5);
    add(i_lb(6, 1, 9),           WB_OWN,   0, 1, {{24{x5[15]}}, x5[15:8]});
    add(i_sb(4, 1, 10),          WB_OWN,   0, 0, 0);     // byte 2 of mem[27] = EF
    add(i_lw(6, 1, 8),           WB_OWN,   0, 1, {x5[31:24], 8'hEF, x5[15:0]});
    add(i_lbu(6, 1, 10),         WB_OWN,   0, 1, 32'hEF);
    add(i_mul(7, 5, 4),          WB_OWN,   0, 1, x7);
    add(i_mulhu(8, 4, 4),        WB_OWN,   0, 1, 32'h0);
    add(i_sub(9, 1, 5),          WB_OWN,   0, 1, 100 - x5);
    add(i_srai(9, 9, 4),         WB_OWN,   0, 1, 32'($signed(100 - x5) >>> 4));
    add(i_auipc(10, 2),          WB_OWN,   0, 1, 32'h2000 + 32'd0);  // pc patched below
    add(i_jal(11, 64),           WB_OWN,   0, 1, 0);                 // link patched below
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < prog.size(); k++) begin
      @(negedge clk);
      d_v = 1; d_op = prog[k]; d_instr = prog[k].instr; d_pc = 32'h400 + k * 4;
      if (d_instr[6:0] == 7'b0010111) d_op.exp = 32'h2000 + d_pc;
      if (d_instr[6:0] == 7'b1101111) d_op.exp = d_pc + 4;
      hold = ($urandom_range(0, 2) == 0);
      while (hold) begin                            // held: decode waits too
        @(negedge clk);
        hold = ($urandom_range(0, 2) == 0);
      end
    end
    @(negedge clk); d_v = 0; d_instr = 32'h13; hold = 1'b0;
    repeat (4) @(negedge clk);
    // register file contents through the decode read ports
    d_instr = i_add(0, 3, 4); #1;
    checks++; if (d_rdata1 !== 32'hCAFE) begin failures++; $display("FAIL init write"); end
    checks++; if (d_rdata2 !== 32'hBEEF) begin failures++; $display("FAIL bcast write"); end
    d_instr = i_add(0, 7, 2); #1;
    checks++; if (d_rdata1 !== x7) begin failures++; $display("FAIL x7"); end
    checks++; if (d_rdata2 !== 32'h12345000) begin failures++; $display("FAIL x2"); end
    checks++; if (mem[27] !== {x5[31:24], 8'hEF, x5[15:0]}) begin failures++; $display("FAIL mem"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
