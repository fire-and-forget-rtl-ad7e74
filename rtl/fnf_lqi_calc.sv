// fnf_lqi_calc: predicted load queue index of a store (Fire-and-Forget).
//
// The store's predicted target load is the one whose LSN equals the store's
// MRDL plus the distance read from the load distance predictor; the LQ entry
// of that load is its LSN modulo the LQ size. A distance of zero means the
// store has no prediction and forwards nowhere (lqi_valid = 0).
//
// Purely combinational. LQ_ENTRIES need not be a power of two (the
// scheme's worked example uses six entries); with a power of two the
// modulo reduces to taking the low bits.
module fnf_lqi_calc #(
  parameter int unsigned LQ_ENTRIES = 32,
  parameter int unsigned DIST_W     = 8,
  localparam int unsigned LQI_W     = (LQ_ENTRIES > 1) ? $clog2(LQ_ENTRIES) : 1
) (
  input  fnf_pkg::seq_t     mrdl,
  input  logic [DIST_W-1:0] distance,
  output fnf_pkg::seq_t     pred_lsn,
  output logic              lqi_valid,
  output logic [LQI_W-1:0]  lqi
);
  fnf_pkg::seq_t idx_full;

  always_comb begin
    pred_lsn  = mrdl + fnf_pkg::seq_t'(distance);
    lqi_valid = (distance != '0);
    idx_full  = pred_lsn % fnf_pkg::seq_t'(LQ_ENTRIES);
    lqi       = idx_full[LQI_W-1:0];
  end
endmodule
