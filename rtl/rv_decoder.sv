// rv_decoder: instruction decoder of the processor.
//
// Turns one 32-bit RV32I/RV32M-multiply instruction into the ctrl_t record
// that follows the instruction down the pipeline: register numbers, the
// sign-extended immediate of its format, the ALU operation and operand
// sources, memory and branch/jump kind. It also marks the instructions only
// the master PE executes in parallel mode (LUI, AUIPC, JAL, JALR and branches)
// and flags ECALL/EBREAK, which this design uses to stop the core. FENCE
// decodes as a no-op. Division/remainder and CSR instructions are not part of
// the supported set and decode as illegal (executed as a no-op, flagged).
// HAS_MUL = 0 builds the core for a program without multiplications: the
// four multiply instructions then decode as illegal too, and no lane
// carries a multiplier.
// Combinational. One decoder serves all PEs, since they all execute the same
// instruction.
module rv_decoder
  import simd_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1              // multiply instructions decoded
) (
  input  logic [31:0] instr,
  output ctrl_t       c
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];

  always_comb begin
    c             = '0;
    c.rd          = instr[11:7];
    c.rs1         = instr[19:15];
    c.rs2         = instr[24:20];
    c.funct3      = f3;
    c.alu_op      = ALU_ADD;
    c.a_sel       = A_RS1;
    c.br_kind     = BR_NONE;
    unique case (opc)
      OP_LUI: begin
        c.legal = 1'b1; c.reg_write = 1'b1; c.master_only = 1'b1;
        c.imm = {instr[31:12], 12'b0}; c.alu_op = ALU_PASSB; c.b_imm = 1'b1;
      end
      OP_AUIPC: begin
        c.legal = 1'b1; c.reg_write = 1'b1; c.master_only = 1'b1;
        c.imm = {instr[31:12], 12'b0}; c.a_sel = A_PC; c.b_imm = 1'b1;
      end
      OP_JAL: begin
        c.legal = 1'b1; c.reg_write = 1'b1; c.master_only = 1'b1; c.link = 1'b1;
        c.imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
        c.br_kind = BR_JAL;
      end
      OP_JALR: begin
        c.legal = (f3 == 3'b000); c.reg_write = 1'b1; c.master_only = 1'b1;
        c.link = 1'b1; c.use_rs1 = 1'b1;
        c.imm = {{20{instr[31]}}, instr[31:20]};
        c.br_kind = BR_JALR;
      end
      OP_BRANCH: begin
        c.legal = (f3 != 3'b010) && (f3 != 3'b011); c.master_only = 1'b1;
        c.use_rs1 = 1'b1; c.use_rs2 = 1'b1;
        c.imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
        c.br_kind = BR_BRANCH;
      end
      OP_LOAD: begin
        c.legal = (f3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101});
        c.reg_write = 1'b1; c.mem_read = 1'b1; c.use_rs1 = 1'b1; c.b_imm = 1'b1;
        c.imm = {{20{instr[31]}}, instr[31:20]};
      end
      OP_STORE: begin
        c.legal = (f3 inside {3'b000, 3'b001, 3'b010});
        c.mem_write = 1'b1; c.use_rs1 = 1'b1; c.use_rs2 = 1'b1; c.b_imm = 1'b1;
        c.imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      end
      OP_IMM: begin
        c.legal = 1'b1; c.reg_write = 1'b1; c.use_rs1 = 1'b1; c.b_imm = 1'b1;
        c.imm = {{20{instr[31]}}, instr[31:20]};
        unique case (f3)
          3'b000: c.alu_op = ALU_ADD;
          3'b010: c.alu_op = ALU_SLT;
          3'b011: c.alu_op = ALU_SLTU;
          3'b100: c.alu_op = ALU_XOR;
          3'b110: c.alu_op = ALU_OR;
          3'b111: c.alu_op = ALU_AND;
          3'b001: begin c.alu_op = ALU_SLL; c.legal = (f7 == 7'b0); end
          default: begin
            c.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            c.legal  = (f7 == 7'b0) || (f7 == 7'b0100000);
          end
        endcase
      end
      OP_REG: begin
        c.reg_write = 1'b1; c.use_rs1 = 1'b1; c.use_rs2 = 1'b1;
        if (f7 == 7'b0000001) begin
          c.legal = HAS_MUL && !f3[2];
          unique case (f3[1:0])
            2'b00:   c.alu_op = ALU_MUL;
            2'b01:   c.alu_op = ALU_MULH;
            2'b10:   c.alu_op = ALU_MULHSU;
            default: c.alu_op = ALU_MULHU;
          endcase
        end else begin
          c.legal = (f7 == 7'b0) || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101));
          unique case (f3)
            3'b000:  c.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
            3'b001:  c.alu_op = ALU_SLL;
            3'b010:  c.alu_op = ALU_SLT;
            3'b011:  c.alu_op = ALU_SLTU;
            3'b100:  c.alu_op = ALU_XOR;
            3'b101:  c.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110:  c.alu_op = ALU_OR;
            default: c.alu_op = ALU_AND;
          endcase
        end
        if (!c.legal) c.reg_write = 1'b0;
      end
      OP_FENCE: c.legal = 1'b1;
      OP_SYSTEM: begin
        c.legal = (instr[31:7] == 25'b0) || (instr[31:7] == {12'b1, 13'b0});
        c.halt  = c.legal;
      end
      default: c.legal = 1'b0;
    endcase
    if (!c.legal) begin
      c.reg_write = 1'b0; c.mem_read = 1'b0; c.mem_write = 1'b0;
      c.br_kind = BR_NONE; c.use_rs1 = 1'b0; c.use_rs2 = 1'b0; c.link = 1'b0;
    end
  end
endmodule
