// fnf_ssbf: Store Sequence Bloom Filter (SSBF) of the SVW re-execution filter.
//
// A direct-mapped table indexed by word address. Each committing store
// writes its SSN (store sequence number) into the entry of its address, so
// an entry holds the SSN of the youngest committed store whose address maps
// there. At load commit the entry is read:
//  - a load that read the cache re-executes only if the entry's SSN is newer
//    than the youngest store already committed when the load was dispatched;
//  - a load that used a forwarded value skips re-execution only if the
//    entry's SSN equals the SSN that came with the forwarded value.
// Beside the SSN each entry keeps the upper address bits of that store.
// rd_tag_match tells whether that store wrote exactly the address read. The
// original SSBF keeps only SSNs; the tag is this design's addition so that
// an SSN match also proves the forwarding store wrote the load's own address
// and not another one mapping to the same entry. SSN 0 means "no store"
// (SSNs start at 1), which is also the reset value.
//
// Interface: one write port, one combinational read port. Entry count and
// index function (addr[2 +: log2 ENTRIES]) are choices of this design.
module fnf_ssbf #(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  fnf_pkg::word_t  wr_addr,
  input  fnf_pkg::seq_t   wr_ssn,
  input  fnf_pkg::word_t  rd_addr,
  output fnf_pkg::seq_t   rd_ssn,
  output logic            rd_tag_match
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = fnf_pkg::XLEN - 2 - IW;

  typedef struct packed {
    fnf_pkg::seq_t ssn;
    logic [TW-1:0] tag;
  } ssbf_entry_t;

  ssbf_entry_t tab_q [ENTRIES];
  ssbf_entry_t rd_e;

  assign rd_e         = tab_q[rd_addr[2 +: IW]];
  assign rd_ssn       = rd_e.ssn;
  assign rd_tag_match = (rd_e.tag == rd_addr[fnf_pkg::XLEN-1 -: TW]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab_q[i] <= '0;
    end else if (wr_en) begin
      tab_q[wr_addr[2 +: IW]] <= '{ssn: wr_ssn, tag: wr_addr[fnf_pkg::XLEN-1 -: TW]};
    end
  end
endmodule
