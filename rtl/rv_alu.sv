// rv_alu: execute unit of one processing element.
//
// Computes every RV32I arithmetic, logic, shift and compare operation and the
// four RV32M multiplications MUL, MULH, MULHSU and MULHU in a single cycle,
// as the processor's execute stage does (the multiplier is the slowest path
// of the design). Purely combinational: op, a and b in, y out. Division is not
// part of the instruction set the processor supports. With HAS_MUL = 0 the
// multiplier is not built and the multiply operations return 0 (the decoder
// then never issues them).
module rv_alu
  import simd_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1              // build the 32x32 multiplier
) (
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [63:0] prod_ss, prod_su, prod_uu;

  always_comb begin
    if (HAS_MUL) begin
      prod_ss = 64'($signed(a)) * 64'($signed(b));
      prod_su = 64'($signed(a)) * $signed({32'b0, b});
      prod_uu = {32'b0, a} * {32'b0, b};
    end else begin
      prod_ss = '0; prod_su = '0; prod_uu = '0;
    end
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'b0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = 32'($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_PASSB:  y = b;
      ALU_MUL:    y = prod_uu[31:0];
      ALU_MULH:   y = prod_ss[63:32];
      ALU_MULHSU: y = prod_su[63:32];
      ALU_MULHU:  y = prod_uu[63:32];
      default:    y = '0;
    endcase
  end
endmodule
