// regfile: the 32 x 32-bit integer register file of one processing element.
//
// Two read ports are asynchronous (combinational) and one write port is
// synchronous, as the processor's decode/writeback arrangement requires:
// decode reads both source operands in the same cycle the instruction sits in
// decode, and writeback writes at the clock edge. Register x0 always reads 0.
// A read of the register being written in the same cycle returns the new
// value (write-through), so an instruction in decode sees the result of the
// one in writeback without a stall; this bypass and the clearing reset are
// choices of this design. The processor instantiates one copy per PE, which
// together form the register file array.
module regfile #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic [4:0]      raddr2,
  output logic [XLEN-1:0] rdata2,
  input  logic            we,
  input  logic [4:0]      waddr,
  input  logic [XLEN-1:0] wdata
);
  logic [XLEN-1:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && waddr != 5'd0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    if (raddr1 == 5'd0)                 rdata1 = '0;
    else if (we && waddr == raddr1)     rdata1 = wdata;
    else                                rdata1 = regs[raddr1];
    if (raddr2 == 5'd0)                 rdata2 = '0;
    else if (we && waddr == raddr2)     rdata2 = wdata;
    else                                rdata2 = regs[raddr2];
  end
endmodule
