// fnf_lcp: Load Consumption Predictor (LCP).
//
// A direct-mapped, untagged table of single bits indexed by the load PC. A
// one tells a dispatching load to wait for a value forwarded by a store; a
// zero tells it to read the data cache once its address is known. The table
// is written only at commit, after a re-execution found a wrong load value:
// one if the load should have used a forwarded value, zero if it should have
// read the cache. Because all updates happen at commit, no recovery state is
// kept.
//
// Interface: one combinational read port (rd_pc -> rd_use_fwd) for the load
// being dispatched, and one write port taking effect at the next clock edge.
// Index = PC word address (pc[2 +: log2 ENTRIES]), so PCs 0x4000, 0x4004,
// ... map to consecutive entries. The single-bit entry and the read/write
// ports follow the FnF scheme; the entry count, the index function and the
// all-zero reset are choices of this design.
module fnf_lcp #(
  parameter int unsigned ENTRIES = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fnf_pkg::word_t   rd_pc,
  output logic             rd_use_fwd,
  input  logic             wr_en,
  input  fnf_pkg::word_t   wr_pc,
  input  logic             wr_use_fwd
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] bits_q;

  assign rd_use_fwd = bits_q[rd_pc[2 +: IW]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits_q <= '0;
    else if (wr_en) bits_q[wr_pc[2 +: IW]] <= wr_use_fwd;
  end
endmodule
