// stall_ctrl: data-hazard stall control unit.
//
// The processor has no forwarding: every read-after-write hazard is solved by
// stalling. The instruction in decode is compared with the instructions in
// execute and memory; if it reads a register (other than x0) that one of
// them will write, decode and fetch hold (stall) and a bubble is sent into
// execute (flush of the decode/execute register). A producer in writeback
// needs no stall because the register file passes its write through to the
// reads. Because all PEs execute the same instruction, one unit serves all of
// them. Combinational.
module stall_ctrl (
  input  logic       d_valid,
  input  logic       d_use_rs1,
  input  logic       d_use_rs2,
  input  logic [4:0] d_rs1,
  input  logic [4:0] d_rs2,
  input  logic       e_valid,
  input  logic       e_reg_write,
  input  logic [4:0] e_rd,
  input  logic       m_valid,
  input  logic       m_reg_write,
  input  logic [4:0] m_rd,
  output logic       stall
);
  function automatic logic hit(input logic use_r, input logic [4:0] r,
                               input logic v, input logic w, input logic [4:0] rd);
    return use_r && (r != 5'd0) && v && w && (rd == r);
  endfunction

  assign stall = d_valid && (hit(d_use_rs1, d_rs1, e_valid, e_reg_write, e_rd) ||
                             hit(d_use_rs2, d_rs2, e_valid, e_reg_write, e_rd) ||
                             hit(d_use_rs1, d_rs1, m_valid, m_reg_write, m_rd) ||
                             hit(d_use_rs2, d_rs2, m_valid, m_reg_write, m_rd));
endmodule
