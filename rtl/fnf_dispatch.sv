// fnf_dispatch: in-order dispatch (allocation) stage of the Fire-and-Forget
// memory scheduler.
//
// Each accepted instruction gets a ROB entry. A load also gets the next load
// sequence number (LSN), and its LQ entry is that LSN modulo the LQ size; the
// load consumption predictor (LCP) bit read with its PC says whether it will
// wait for a forwarded value. A store gets the next store sequence number
// (SSN) and records its MRDL, the LSN of the most recently dispatched load.
// The store's PC reads the load distance predictor (LDP); a non-zero
// distance gives the predicted LSN (MRDL + distance) and from it the load
// queue index (LQI) the store will forward to. The store is cracked into two
// reservation-station uops, STA (address) and STD (data, carrying the LQI);
// loads and other instructions become one uop each.
//
// Timing: one instruction per cycle. in_ready is combinational from the ROB
// and LQ space signals; the LCP and LDP are read combinationally with in_pc
// and the results appear on the outputs in the same cycle as fire. Counter
// updates take effect at the next edge. On flush the counters are set to the
// values given by commit, which discards the LSNs and SSNs of squashed
// instructions so that LSN modulo the LQ size keeps naming LQ entries.
//
// The Fire-and-Forget scheme defines LSN/SSN/MRDL tracking, the LQI computation and the
// STA/STD cracking. The one-per-cycle width, counter starts (LSN and SSN
// begin at 1, so MRDL 0 and SSN 0 mean "none") and the flush interface are
// choices of this design.
module fnf_dispatch
  import fnf_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES  = 32,
  parameter int unsigned ROB_ENTRIES = 128,
  parameter int unsigned DIST_W      = 8,
  localparam int unsigned LQI_W      = $clog2(LQ_ENTRIES),
  localparam int unsigned ROBI_W     = $clog2(ROB_ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction stream from rename
  input  logic               in_valid,
  input  op_kind_e           in_kind,
  output logic               in_ready,
  // resources
  input  logic               rob_ready,
  input  logic               lq_ready,
  input  logic [ROBI_W-1:0]  rob_idx,
  // predictor read results for in_pc
  input  logic               lcp_use_fwd,
  input  logic [DIST_W-1:0]  ldp_dist,
  // recovery
  input  logic               flush,
  input  seq_t               flush_next_lsn,
  input  seq_t               flush_next_ssn,
  // allocation results (valid with fire)
  output logic               fire,
  output seq_t               lsn,        // load: its LSN
  output logic [LQI_W-1:0]   lq_idx,     // load: its LQ entry
  output logic               use_fwd,    // load: wait for a forwarded value
  output seq_t               ssn_prev,   // SSN of the youngest store dispatched before this one
  output seq_t               ssn,        // store: its SSN
  output seq_t               mrdl,       // store: most recently dispatched load
  output logic               lqi_valid,  // store: has a forwarding prediction
  output logic [LQI_W-1:0]   lqi,        // store: predicted LQ index
  // uops to the reservation stations (STA in slot 0 and STD in slot 1 for a store)
  output logic [1:0]         rs_valid,
  output uop_kind_e          rs_kind   [2],
  output logic [ROBI_W-1:0]  rs_rob_idx[2],
  output logic [LQI_W-1:0]   rs_lq_idx [2]
);
  seq_t next_lsn_q, next_ssn_q;
  seq_t pred_lsn;
  logic [LQI_W-1:0] lqi_raw;
  logic             lqi_valid_raw;

  fnf_lqi_calc #(.LQ_ENTRIES(LQ_ENTRIES), .DIST_W(DIST_W)) u_lqi (
    .mrdl     (mrdl),
    .distance (ldp_dist),
    .pred_lsn (pred_lsn),
    .lqi_valid(lqi_valid_raw),
    .lqi      (lqi_raw)
  );

  logic [LQI_W-1:0] lsn_idx;
  seq_t             lsn_mod;

  always_comb begin
    in_ready  = rob_ready && (in_kind != OP_LOAD || lq_ready) && !flush;
    fire      = in_valid && in_ready;
    lsn       = next_lsn_q;
    lsn_mod   = next_lsn_q % seq_t'(LQ_ENTRIES);
    lsn_idx   = lsn_mod[LQI_W-1:0];
    lq_idx    = lsn_idx;
    use_fwd   = lcp_use_fwd;
    ssn       = next_ssn_q;
    ssn_prev  = next_ssn_q - seq_t'(1);
    mrdl      = next_lsn_q - seq_t'(1);
    lqi_valid = (in_kind == OP_STORE) && lqi_valid_raw;
    lqi       = lqi_raw;

    rs_valid   = '0;
    rs_kind[0] = UOP_ALU;
    rs_kind[1] = UOP_STD;
    rs_rob_idx[0] = rob_idx;
    rs_rob_idx[1] = rob_idx;
    rs_lq_idx[0]  = lsn_idx;
    rs_lq_idx[1]  = lqi_raw;
    if (fire) begin
      unique case (in_kind)
        OP_LOAD:  begin rs_valid = 2'b01; rs_kind[0] = UOP_LD;  end
        OP_STORE: begin rs_valid = 2'b11; rs_kind[0] = UOP_STA; end
        default:  begin rs_valid = 2'b01; rs_kind[0] = UOP_ALU; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_lsn_q <= seq_t'(1);
      next_ssn_q <= seq_t'(1);
    end else if (flush) begin
      next_lsn_q <= flush_next_lsn;
      next_ssn_q <= flush_next_ssn;
    end else if (fire) begin
      if (in_kind == OP_LOAD)  next_lsn_q <= next_lsn_q + seq_t'(1);
      if (in_kind == OP_STORE) next_ssn_q <= next_ssn_q + seq_t'(1);
    end
  end
endmodule
