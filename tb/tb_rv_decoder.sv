// tb_rv_decoder: decodes one instruction of every supported kind, encoded
// here, and checks register fields, immediates (random values, including
// negative ones), ALU operation, memory/branch kind, the master-only flag and
// rejection of unsupported encodings (DIV, CSR access, illegal opcode). A
// second decoder built without the multiplier (HAS_MUL = 0) must reject the
// four multiplies and decode everything else the same way.
module tb_rv_decoder;
  import simd_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t c;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ctrl_t c_nm;
  rv_decoder dut (.instr, .c);
  rv_decoder #(.HAS_MUL(1'b0)) dut_nm (.instr, .c(c_nm));

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d (instr %h)", what, got, exp, instr); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int rd = $urandom_range(1, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
      int i12 = $urandom_range(0, 4095) - 2048;
      int b13 = ($urandom_range(0, 4095) - 2048) * 2;
      int j21 = ($urandom_range(0, 1048575) - 524288) * 2;
      int u20 = $urandom_range(0, 1048575);

      instr = i_addi(rd, r1, i12); #1;
      chk("addi rd", c.rd, rd); chk("addi rs1", c.rs1, r1); chk("addi imm", $signed(c.imm), i12);
      chk("addi op", c.alu_op, ALU_ADD); chk("addi bimm", c.b_imm, 1); chk("addi wr", c.reg_write, 1);
      chk("addi mo", c.master_only, 0); chk("addi use1", c.use_rs1, 1); chk("addi use2", c.use_rs2, 0);

      instr = i_lw(rd, r1, i12); #1;
      chk("lw rd", c.rd, rd); chk("lw imm", $signed(c.imm), i12); chk("lw rd_en", c.mem_read, 1);
      chk("lw f3", c.funct3, 2);

      instr = i_sh(r2, r1, i12); #1;
      chk("sh imm", $signed(c.imm), i12); chk("sh we", c.mem_write, 1); chk("sh wr", c.reg_write, 0);
      chk("sh rs2", c.rs2, r2); chk("sh use2", c.use_rs2, 1); chk("sh f3", c.funct3, 1);

      instr = i_bne(r1, r2, b13); #1;
      chk("bne imm", $signed(c.imm), b13); chk("bne kind", c.br_kind, BR_BRANCH);
      chk("bne mo", c.master_only, 1); chk("bne wr", c.reg_write, 0); chk("bne f3", c.funct3, 1);

      instr = i_jal(rd, j21); #1;
      chk("jal imm", $signed(c.imm), j21); chk("jal kind", c.br_kind, BR_JAL); chk("jal link", c.link, 1);
      chk("jal rd", c.rd, rd); chk("jal mo", c.master_only, 1);

      instr = i_jalr(rd, r1, i12); #1;
      chk("jalr imm", $signed(c.imm), i12); chk("jalr kind", c.br_kind, BR_JALR); chk("jalr use1", c.use_rs1, 1);

      instr = i_lui(rd, u20); #1;
      chk("lui imm", c.imm, u20 << 12); chk("lui op", c.alu_op, ALU_PASSB); chk("lui mo", c.master_only, 1);

      instr = i_auipc(rd, u20); #1;
      chk("auipc imm", c.imm, u20 << 12); chk("auipc asel", c.a_sel, A_PC); chk("auipc mo", c.master_only, 1);

      instr = i_mulhu(rd, r1, r2); #1;
      chk("mulhu op", c.alu_op, ALU_MULHU); chk("mulhu b", c.b_imm, 0); chk("mulhu legal", c.legal, 1);

      instr = i_sub(rd, r1, r2); #1;
      chk("sub op", c.alu_op, ALU_SUB); chk("sub rs2", c.rs2, r2);

      instr = i_srai(rd, r1, t % 32); #1;
      chk("srai op", c.alu_op, ALU_SRA); chk("srai sh", c.imm[4:0], t % 32);

      instr = (t % 2) ? i_add(rd, r1, r2) : i_bne(r1, r2, b13); #1;
      chk("no-mul build same decode", c_nm, c);
      case (t % 4)
        0: instr = i_mul(rd, r1, r2);
        1: instr = i_mulh(rd, r1, r2);
        2: instr = enc_r(1, r2, r1, 2, rd, 7'b0110011);   // MULHSU
        default: instr = i_mulhu(rd, r1, r2);
      endcase
      #1;
      chk("mul legal", c.legal, 1); chk("mul wr", c.reg_write, 1);
      chk("no-mul build: mul illegal", c_nm.legal, 0); chk("no-mul build: mul no write", c_nm.reg_write, 0);
    end
    instr = i_sra(3, 4, 5); #1;  chk("sra", c.alu_op, ALU_SRA);
    instr = i_slt(3, 4, 5); #1;  chk("slt", c.alu_op, ALU_SLT);
    instr = i_mul(3, 4, 5); #1;  chk("mul", c.alu_op, ALU_MUL);
    instr = i_mulh(3, 4, 5); #1; chk("mulh", c.alu_op, ALU_MULH);
    instr = i_ecall(); #1;       chk("ecall halt", c.halt, 1); chk("ecall legal", c.legal, 1);
    instr = 32'h0010_0073; #1;   chk("ebreak halt", c.halt, 1);
    instr = enc_r(1, 5, 4, 4, 3, 7'b0110011); #1;  // DIV
    chk("div illegal", c.legal, 0); chk("div no write", c.reg_write, 0);
    instr = 32'h3000_2573; #1;   // csrr
    chk("csr illegal", c.legal, 0); chk("csr no halt", c.halt, 0);
    instr = 32'hFFFF_FFFF; #1;   chk("bad opcode", c.legal, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
