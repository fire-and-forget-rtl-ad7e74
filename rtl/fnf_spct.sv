// fnf_spct: Store PC Table (SPCT), modified for Fire-and-Forget.
//
// A direct-mapped, untagged table indexed by the store's word address. When
// a store commits it records its PC and its MRDL (the LSN of the most
// recently dispatched load when the store was dispatched, i.e. where the
// store would sit in the load sequence). When a load re-executes at commit
// and finds a wrong value, it reads the entry for its own address to learn
// which store last wrote there and where that store stood among the loads.
//
// Interface: one write port (one store commits per cycle in this design),
// one combinational read port, as the FnF scheme asks for. Entry count, index
// function (addr[2 +: log2 ENTRIES]) and the per-entry valid bit cleared at
// reset are choices of this design.
module fnf_spct #(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  fnf_pkg::word_t  wr_addr,
  input  fnf_pkg::seq_t   wr_mrdl,
  input  fnf_pkg::word_t  wr_pc,
  input  fnf_pkg::word_t  rd_addr,
  output logic            rd_valid,
  output fnf_pkg::seq_t   rd_mrdl,
  output fnf_pkg::word_t  rd_pc
);
  localparam int unsigned IW = $clog2(ENTRIES);

  typedef struct packed {
    logic           valid;
    fnf_pkg::seq_t  mrdl;
    fnf_pkg::word_t pc;
  } spct_entry_t;

  spct_entry_t tab_q [ENTRIES];
  spct_entry_t rd_e;

  assign rd_e     = tab_q[rd_addr[2 +: IW]];
  assign rd_valid = rd_e.valid;
  assign rd_mrdl  = rd_e.mrdl;
  assign rd_pc    = rd_e.pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab_q[i] <= '0;
    end else if (wr_en) begin
      tab_q[wr_addr[2 +: IW]] <= '{valid: 1'b1, mrdl: wr_mrdl, pc: wr_pc};
    end
  end
endmodule
