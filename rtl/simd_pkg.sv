// simd_pkg: types and constants shared by the SIMD RISC-V processor.
//
// The processor executes plain RV32I code plus the four multiply instructions
// (MUL, MULH, MULHSU, MULHU). One master processing element (PE) runs the
// program; during a marked loop, n-1 slave PEs execute the same instruction
// stream on their own register files and their own slice of the local data
// memory. This package holds the decoded-instruction record that travels down
// the shared control pipeline, the ALU operation codes, the run-time SIMD
// configuration (the values the code-generation flow computes ahead of time)
// and the event record the core reports for observation.
package simd_pkg;

  // RV32 opcodes (instr[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB, ALU_MUL, ALU_MULH, ALU_MULHSU, ALU_MULHU
  } alu_op_e;

  typedef enum logic [1:0] {
    BR_NONE, BR_BRANCH, BR_JAL, BR_JALR
  } br_kind_e;

  // Value a PE writes back: its own result, the master's result, or its
  // pre-computed loop-bound value
  typedef enum logic [1:0] { WB_OWN, WB_BCAST, WB_INIT } wb_sel_e;

  // Source of the ALU "A" operand
  typedef enum logic [1:0] { A_RS1, A_PC, A_ZERO } a_sel_e;

  // Decoded instruction, shared by every PE because all PEs execute the
  // same instruction in the same cycle.
  typedef struct packed {
    logic        legal;
    logic        halt;        // ECALL / EBREAK stop the core
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_rs1;
    logic        use_rs2;
    logic        reg_write;
    logic [31:0] imm;
    alu_op_e     alu_op;
    a_sel_e      a_sel;
    logic        b_imm;       // B operand is the immediate
    logic        mem_read;
    logic        mem_write;
    logic [2:0]  funct3;      // access size / branch condition
    br_kind_e    br_kind;
    logic        link;        // result is pc+4 (JAL/JALR)
    logic        master_only; // LUI, AUIPC, JAL, JALR, BRANCH: slaves idle
  } ctrl_t;

  // SIMD configuration produced ahead of time by the code-generation flow
  // (the "SIMD header"): where the SIMD loop sits in the program and which
  // instructions set its bound registers.
  typedef struct packed {
    logic        simd_en;     // a SIMD loop exists in the program
    logic [31:0] loop_start;  // branch target = first loop instruction
    logic [31:0] loop_branch; // PC of the loop's closing branch
    logic [31:0] set_rs1_pc;  // PC of the instruction that sets rs1
    logic [31:0] set_rs2_pc;  // PC of the instruction that sets rs2
    logic [4:0]  rs1_reg;     // branch source register numbers
    logic [4:0]  rs2_reg;
  } simd_cfg_t;

  // One-cycle event pulses, for performance counting and test.
  typedef struct packed {
    logic retire;        // an instruction left writeback
    logic stall;         // decode held for a data hazard
    logic mispredict;    // branch resolved against the prediction
    logic jump;          // JAL/JALR redirect
    logic par_enter;     // standard -> parallel mode
    logic par_exit;      // parallel -> standard mode
    logic par_instr;     // an instruction executed on all lanes
    logic common_access; // parallel-mode access to common memory
    logic part_access;   // parallel-mode access to own partitions
    logic part_fault;    // a lane addressed a partition not its own
    logic rs_init;       // loop bound registers overridden per lane
    logic ext_access;    // an expanded-memory access completed
    logic ext_wait;      // pipeline held for the expanded memory
  } events_t;

  // Effective load data from a 32-bit word, per funct3
  function automatic logic [31:0] load_extend(input logic [31:0] word,
                                              input logic [1:0]  off,
                                              input logic [2:0]  f3);
    logic [31:0] sh;
    sh = word >> {off, 3'b000};
    unique case (f3)
      3'b000:  load_extend = {{24{sh[7]}}, sh[7:0]};
      3'b001:  load_extend = {{16{sh[15]}}, sh[15:0]};
      3'b100:  load_extend = {24'b0, sh[7:0]};
      3'b101:  load_extend = {16'b0, sh[15:0]};
      default: load_extend = word;
    endcase
  endfunction

  // Byte enables of a store, per funct3 and byte offset
  function automatic logic [3:0] store_be(input logic [1:0] off, input logic [2:0] f3);
    unique case (f3[1:0])
      2'b00:   store_be = 4'b0001 << off;
      2'b01:   store_be = 4'b0011 << off;
      default: store_be = 4'b1111;
    endcase
  endfunction

  // Store data replicated into the byte lanes
  function automatic logic [31:0] store_data(input logic [31:0] v, input logic [2:0] f3);
    unique case (f3[1:0])
      2'b00:   store_data = {4{v[7:0]}};
      2'b01:   store_data = {2{v[15:0]}};
      default: store_data = v;
    endcase
  endfunction

endpackage
