// tb_rv_alu: every ALU operation on random and corner operands, compared with
// results computed here with 64-bit arithmetic. A second ALU built without
// the multiplier (HAS_MUL = 0) must match on every other operation and
// return 0 for the multiplies.
module tb_rv_alu;
  import simd_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] y_nm;
  rv_alu dut (.*);
  rv_alu #(.HAS_MUL(1'b0)) dut_nm (.op, .a, .b, .y(y_nm));

  function automatic logic [31:0] ref_y(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    longint ux = longint'({32'b0, x}), uz = longint'({32'b0, z});
    longint p;
    case (o)
      ALU_ADD:    return x + z;
      ALU_SUB:    return x - z;
      ALU_SLL:    return x << z[4:0];
      ALU_SLT:    return (sx < sz) ? 1 : 0;
      ALU_SLTU:   return (ux < uz) ? 1 : 0;
      ALU_XOR:    return x ^ z;
      ALU_SRL:    return x >> z[4:0];
      ALU_SRA:    begin p = sx >>> z[4:0]; return p[31:0]; end
      ALU_OR:     return x | z;
      ALU_AND:    return x & z;
      ALU_PASSB:  return z;
      ALU_MUL:    begin p = sx * sz; return p[31:0]; end
      ALU_MULH:   begin p = sx * sz; return p[63:32]; end
      ALU_MULHSU: begin p = sx * uz; return p[63:32]; end
      ALU_MULHU:  begin p = ux * uz; return p[63:32]; end
      default:    return 0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int o = 0; o <= int'(ALU_MULHU); o++) begin
      for (int t = 0; t < 236; t++) begin
        op = alu_op_e'(o);
        if (t < 36) begin a = corners[t / 6]; b = corners[t % 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        checks++;
        if (y !== ref_y(op, a, b)) begin
          failures++;
          $display("FAIL %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, ref_y(op, a, b));
        end
        checks++;
        if (y_nm !== ((op >= ALU_MUL) ? 32'h0 : ref_y(op, a, b))) begin
          failures++;
          $display("FAIL no-mul build %s a=%h b=%h y=%h", op.name(), a, b, y_nm);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
