// rv_asm_pkg: RV32I/RV32M instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction, so a test
// can write its program as a list of calls, e.g. i_addi(5, 0, 12). Register
// arguments are register numbers; immediates are byte offsets as in assembly.
package rv_asm_pkg;

  function automatic logic [31:0] enc_r(input int f7, input int rs2, input int rs1,
                                        input int f3, input int rd, input int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction

  function automatic logic [31:0] enc_i(input int imm, input int rs1, input int f3,
                                        input int rd, input int opc);
    logic [11:0] i12 = 12'(imm);
    return {i12, 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction

  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1, input int f3);
    logic [11:0] i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), 3'(f3), i12[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input int imm, input int rs2, input int rs1, input int f3);
    logic [12:0] b = 13'(imm);
    return {b[12], b[10:5], 5'(rs2), 5'(rs1), 3'(f3), b[4:1], b[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_j(input int imm, input int rd);
    logic [20:0] j = 21'(imm);
    return {j[20], j[10:1], j[11], j[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] i_lui  (input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] i_auipc(input int rd, input int imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] i_addi (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_slti (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_xori (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_andi (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_slli (input int rd, input int rs1, input int sh);  return enc_i(sh, rs1, 1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_srai (input int rd, input int rs1, input int sh);  return enc_i(sh | 32'h400, rs1, 5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] i_add  (input int rd, input int rs1, input int rs2); return enc_r(0, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_sub  (input int rd, input int rs1, input int rs2); return enc_r(32, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_xor  (input int rd, input int rs1, input int rs2); return enc_r(0, rs2, rs1, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_and  (input int rd, input int rs1, input int rs2); return enc_r(0, rs2, rs1, 7, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_sra  (input int rd, input int rs1, input int rs2); return enc_r(32, rs2, rs1, 5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_slt  (input int rd, input int rs1, input int rs2); return enc_r(0, rs2, rs1, 2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_mul  (input int rd, input int rs1, input int rs2); return enc_r(1, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_mulh (input int rd, input int rs1, input int rs2); return enc_r(1, rs2, rs1, 1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_mulhu(input int rd, input int rs1, input int rs2); return enc_r(1, rs2, rs1, 3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] i_lw   (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] i_lb   (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] i_lbu  (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] i_lh   (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 1, rd, 7'b0000011); endfunction
  function automatic logic [31:0] i_sw   (input int rs2, input int rs1, input int imm); return enc_s(imm, rs2, rs1, 2); endfunction
  function automatic logic [31:0] i_sh   (input int rs2, input int rs1, input int imm); return enc_s(imm, rs2, rs1, 1); endfunction
  function automatic logic [31:0] i_sb   (input int rs2, input int rs1, input int imm); return enc_s(imm, rs2, rs1, 0); endfunction
  function automatic logic [31:0] i_beq  (input int rs1, input int rs2, input int off); return enc_b(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] i_bne  (input int rs1, input int rs2, input int off); return enc_b(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] i_blt  (input int rs1, input int rs2, input int off); return enc_b(off, rs2, rs1, 4); endfunction
  function automatic logic [31:0] i_bge  (input int rs1, input int rs2, input int off); return enc_b(off, rs2, rs1, 5); endfunction
  function automatic logic [31:0] i_jal  (input int rd, input int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] i_jalr (input int rd, input int rs1, input int imm); return enc_i(imm, rs1, 0, rd, 7'b1100111); endfunction
  function automatic logic [31:0] i_ecall(); return 32'h0000_0073; endfunction

endpackage
