// tagged_dmem: local data memory with its tag field.
//
// The data field is one 32-bit word per address, stored as four byte-wide
// arrays so that byte and halfword stores write only their lanes. Next to
// each word the tag field holds the number of the memory partition the word
// belongs to: 0 for words only the master PE may touch (common data and the
// master's own SIMD partition), 1..n-1 for the partitions of slave PEs S1 to
// S(n-1). Tags are constant for a given program; here they are written
// through the load port before the core runs, and instructions cannot reach
// them. Each tag is ceil(log2 n) bits wide (at least 1).
//
// Every PE has its own port pair:
//   * a tag read port (t_addr -> t_tag), used in the execute stage to decide
//     which PE may access the address;
//   * a data port (en, we, be, addr, wdata -> rdata) used in the memory stage.
// All reads are asynchronous; writes are synchronous. Partitions are disjoint,
// so two PEs never write the same word in one cycle (an assertion checks it).
// The load port writes words and tags while the core is held in reset; the
// debug port reads a word at any time. Byte addresses; bits [1:0] ignored.
// The multi-port organisation of one array is this design's choice; the
// 32 KiB size matches the local memory the evaluated programs fit in.
module tagged_dmem #(
  parameter int unsigned DEPTH = 8192,   // words (32 KiB)
  parameter int unsigned NPORT = 25,     // one port per PE (unroll factor n)
  parameter int unsigned TAGW  = (NPORT > 1) ? $clog2(NPORT) : 1
) (
  input  logic                        clk,
  // per-PE tag read (execute stage)
  input  logic [NPORT-1:0][31:0]      t_addr,
  output logic [NPORT-1:0][TAGW-1:0]  t_tag,
  // per-PE data access (memory stage)
  input  logic [NPORT-1:0]            en,
  input  logic [NPORT-1:0]            we,
  input  logic [NPORT-1:0][3:0]       be,
  input  logic [NPORT-1:0][31:0]      addr,
  input  logic [NPORT-1:0][31:0]      wdata,
  output logic [NPORT-1:0][31:0]      rdata,
  // load port
  input  logic                        ld_we,
  input  logic                        ld_tag_we,
  input  logic [31:0]                 ld_addr,
  input  logic [31:0]                 ld_wdata,
  input  logic [TAGW-1:0]             ld_tag,
  // debug read port
  input  logic [31:0]                 dbg_addr,
  output logic [31:0]                 dbg_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [7:0]      lane0 [DEPTH];
  logic [7:0]      lane1 [DEPTH];
  logic [7:0]      lane2 [DEPTH];
  logic [7:0]      lane3 [DEPTH];
  logic [TAGW-1:0] tags  [DEPTH];

  function automatic logic [AW-1:0] widx(input logic [31:0] a);
    return a[AW+1:2];
  endfunction

  function automatic logic [31:0] rd_word(input logic [AW-1:0] i);
    return {lane3[i], lane2[i], lane1[i], lane0[i]};
  endfunction

  always_ff @(posedge clk) begin
    if (ld_we) begin
      lane0[widx(ld_addr)] <= ld_wdata[7:0];
      lane1[widx(ld_addr)] <= ld_wdata[15:8];
      lane2[widx(ld_addr)] <= ld_wdata[23:16];
      lane3[widx(ld_addr)] <= ld_wdata[31:24];
    end
    if (ld_tag_we) tags[widx(ld_addr)] <= ld_tag;
    for (int p = 0; p < int'(NPORT); p++) begin
      if (en[p] && we[p]) begin
        if (be[p][0]) lane0[widx(addr[p])] <= wdata[p][7:0];
        if (be[p][1]) lane1[widx(addr[p])] <= wdata[p][15:8];
        if (be[p][2]) lane2[widx(addr[p])] <= wdata[p][23:16];
        if (be[p][3]) lane3[widx(addr[p])] <= wdata[p][31:24];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NPORT); p++) begin
      t_tag[p] = tags[widx(t_addr[p])];
      rdata[p] = rd_word(widx(addr[p]));
    end
    dbg_rdata = rd_word(widx(dbg_addr));
  end

  // Two PEs must never write the same word in the same cycle.
  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(NPORT); p++)
      for (int q = p + 1; q < int'(NPORT); q++)
        assert (!(en[p] && we[p] && en[q] && we[q] && widx(addr[p]) == widx(addr[q])))
          else $error("tagged_dmem: ports %0d and %0d write the same word", p, q);
  end
endmodule
