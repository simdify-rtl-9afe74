// imem: local instruction memory of the master PE.
//
// Holds the whole program as 32-bit words. Reads are asynchronous: the fetch
// stage presents a byte address and gets the instruction in the same cycle.
// Writes are synchronous and come only from the load port, used to place the
// program before the core leaves reset (the processor never writes its own
// instruction memory). Word-addressed; the two low address bits are ignored.
// The depth is this design's choice: programs of the evaluated size fit
// comfortably.
module imem #(
  parameter int unsigned DEPTH = 4096   // words (16 KiB)
) (
  input  logic        clk,
  input  logic [31:0] raddr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];
endmodule
