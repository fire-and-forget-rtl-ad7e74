// fnf_ldp: Load Distance Predictor (LDP).
//
// A direct-mapped, untagged table indexed by the store PC. Each entry holds
// the distance, counted in loads, from the point where the store would have
// been inserted into the load sequence (its MRDL) to the load that consumes
// its value. A distance of zero means "no prediction": the consuming load is
// always younger than the store's MRDL, so a real distance is at least one.
//
// Interface: a combinational read port for the store being dispatched, and a
// write port used at commit when a misforwarded load trains the table. The
// FnF scheme notes that reads and writes never fall in the same cycle (a write
// follows a flush), so the two ports could share one RAM port. Entry count,
// distance width, index function (pc[2 +: log2 ENTRIES]) and the zero reset
// are choices of this design.
module fnf_ldp #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned DIST_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fnf_pkg::word_t    rd_pc,
  output logic [DIST_W-1:0] rd_dist,
  input  logic              wr_en,
  input  fnf_pkg::word_t    wr_pc,
  input  logic [DIST_W-1:0] wr_dist
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [DIST_W-1:0] dist_q [ENTRIES];

  assign rd_dist = dist_q[rd_pc[2 +: IW]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) dist_q[i] <= '0;
    end else if (wr_en) begin
      dist_q[wr_pc[2 +: IW]] <= wr_dist;
    end
  end
endmodule
