// fnf_lsu: Fire-and-Forget load/store scheduling with no store queue.
//
// The memory side of an out-of-order core, built without any store queue
// and without any address search (CAM):
//  - fnf_dispatch numbers loads (LSN) and stores (SSN), records each store's
//    MRDL, cracks stores into STA and STD uops, and predicts for each store
//    the LQ index of the load it will forward to (LDP distance + MRDL,
//    modulo the LQ size). The LCP tells each load whether to wait for a
//    forwarded value.
//  - fnf_rob holds every instruction in order; a store's address (from
//    STA) and value (from STD) wait in its ROB entry until commit.
//  - An executing STD also writes its value and SSN blindly into the
//    predicted LQ entry, and forgets about it.
//  - fnf_load_queue completes loads from such a forwarded value or from
//    the data cache.
//  - fnf_commit retires in order, writes stores to the cache, SSBF and
//    SPCT, re-executes loads the SSBF cannot clear, flushes on a wrong load
//    value and trains the LDP and LCP.
//
// External parts: the reservation stations and execution units (they take
// rs_* uops and return sta_*, std_*, agu_* and alu_done_*) and the data
// cache (dc_ld_* read port and rx_* re-execution read port, each returning
// data one cycle after the request; dc_wr_* write port, visible to reads
// from the next cycle on). The STD uop returns the LQI it was given at
// dispatch (std_lqi_valid, std_lqi), as a reservation-station field would.
// ev_* are one-cycle event pulses for performance counting.
//
// The structure follows the Fire-and-Forget design without a store queue. All
// table sizes are this design's choices; the scheme's worked example
// uses a 6-entry LQ, and LQ_ENTRIES may be set to any value of two or more.
module fnf_lsu
  import fnf_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES   = 32,
  parameter int unsigned ROB_ENTRIES  = 128,
  parameter int unsigned LCP_ENTRIES  = 4096,
  parameter int unsigned LDP_ENTRIES  = 1024,
  parameter int unsigned SSBF_ENTRIES = 1024,   // also the SPCT size
  parameter int unsigned DIST_W       = 8,
  localparam int unsigned LQI_W       = $clog2(LQ_ENTRIES),
  localparam int unsigned ROBI_W      = $clog2(ROB_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              disp_valid,
  input  op_kind_e          disp_kind,
  input  word_t             disp_pc,
  output logic              disp_ready,
  // uops to the reservation stations
  output logic [1:0]        rs_valid,
  output uop_kind_e         rs_kind   [2],
  output logic [ROBI_W-1:0] rs_rob_idx[2],
  output logic [LQI_W-1:0]  rs_lq_idx [2],   // LD: own entry; STD: predicted LQI
  output logic              rs_lqi_valid,    // STD has a prediction
  // execution
  input  logic              sta_valid,
  input  logic [ROBI_W-1:0] sta_rob_idx,
  input  word_t             sta_addr,
  input  logic              std_valid,
  input  logic [ROBI_W-1:0] std_rob_idx,
  input  word_t             std_data,
  input  logic              std_lqi_valid,
  input  logic [LQI_W-1:0]  std_lqi,
  input  logic              agu_valid,
  input  logic [LQI_W-1:0]  agu_lq_idx,
  input  word_t             agu_addr,
  input  logic              alu_done_valid,
  input  logic [ROBI_W-1:0] alu_done_rob_idx,
  // load results to dependents
  output logic              ld_fwd_wb_valid,
  output logic [LQI_W-1:0]  ld_fwd_wb_idx,
  output word_t             ld_fwd_wb_data,
  output logic              ld_dc_wb_valid,
  output logic [LQI_W-1:0]  ld_dc_wb_idx,
  output word_t             ld_dc_wb_data,
  // data cache
  output logic              dc_ld_req_valid,
  output word_t             dc_ld_req_addr,
  input  word_t             dc_ld_rsp_data,
  output logic              rx_req_valid,
  output word_t             rx_req_addr,
  input  word_t             rx_rsp_data,
  output logic              dc_wr_en,
  output word_t             dc_wr_addr,
  output word_t             dc_wr_data,
  // retirement and recovery
  output logic              ret_valid,
  output op_kind_e          ret_kind,
  output word_t             ret_pc,
  output word_t             ret_addr,
  output word_t             ret_data,
  output logic              ret_reexec,
  output logic              ret_used_fwd,
  output logic              flush,
  // events
  output logic              ev_disp_stall,    // instruction waiting for ROB/LQ space
  output logic              ev_fwd_write,     // an STD fired a value into the LQ
  output logic              ev_fwd_use,       // a load completed from a forwarded value
  output logic              ev_progress,      // a waiting load gave up and read the cache
  output logic              ev_ldp_train,     // an LDP entry was written
  output logic              ev_lcp_train      // an LCP entry was written
);
  // ---------------- wires ----------------
  logic              d_fire, d_use_fwd, d_lqi_valid, lcp_bit, rob_ready, lq_ready;
  logic [DIST_W-1:0] ldp_dist;
  logic [LQI_W-1:0]  d_lq_idx, d_lqi;
  logic [ROBI_W-1:0] rob_tail;
  seq_t              d_lsn, d_ssn, d_mrdl, d_ssn_prev, std_ssn, commit_ssn;
  seq_t              flush_next_lsn, flush_next_ssn;
  logic              alloc_hit;

  logic              rob_hv, rob_addr_v, rob_data_v, rob_done, rob_pop;
  op_kind_e          rob_kind;
  word_t             rob_pc, rob_addr, rob_data;
  logic [LQI_W-1:0]  rob_lq_idx;
  seq_t              rob_lsn, rob_ssn, rob_mrdl;

  logic              lq_hv, lq_done, lq_addr_v, lq_used_fwd, lq_pop;
  logic [LQI_W-1:0]  lq_head_idx;
  word_t             lq_addr, lq_value, lq_pc;
  seq_t              lq_fwd_ssn, lq_nvul, lq_lsn;

  word_t             ssbf_rd_addr, ssbf_wr_addr, spct_rd_addr, spct_wr_addr, spct_wr_pc, spct_rd_pc;
  seq_t              ssbf_rd_ssn, ssbf_wr_ssn, spct_wr_mrdl, spct_rd_mrdl;
  logic              ssbf_tag, ssbf_wr_en, spct_wr_en, spct_rd_valid;
  logic              ldp_wr_en, lcp_wr_en, lcp_wr_use_fwd;
  word_t             ldp_wr_pc, lcp_wr_pc;
  logic [DIST_W-1:0] ldp_wr_dist;

  // ---------------- predictors ----------------
  fnf_lcp #(.ENTRIES(LCP_ENTRIES)) u_lcp (
    .clk, .rst_n, .rd_pc(disp_pc), .rd_use_fwd(lcp_bit),
    .wr_en(lcp_wr_en), .wr_pc(lcp_wr_pc), .wr_use_fwd(lcp_wr_use_fwd));

  fnf_ldp #(.ENTRIES(LDP_ENTRIES), .DIST_W(DIST_W)) u_ldp (
    .clk, .rst_n, .rd_pc(disp_pc), .rd_dist(ldp_dist),
    .wr_en(ldp_wr_en), .wr_pc(ldp_wr_pc), .wr_dist(ldp_wr_dist));

  fnf_spct #(.ENTRIES(SSBF_ENTRIES)) u_spct (
    .clk, .rst_n, .wr_en(spct_wr_en), .wr_addr(spct_wr_addr), .wr_mrdl(spct_wr_mrdl),
    .wr_pc(spct_wr_pc), .rd_addr(spct_rd_addr), .rd_valid(spct_rd_valid),
    .rd_mrdl(spct_rd_mrdl), .rd_pc(spct_rd_pc));

  fnf_ssbf #(.ENTRIES(SSBF_ENTRIES)) u_ssbf (
    .clk, .rst_n, .wr_en(ssbf_wr_en), .wr_addr(ssbf_wr_addr), .wr_ssn(ssbf_wr_ssn),
    .rd_addr(ssbf_rd_addr), .rd_ssn(ssbf_rd_ssn), .rd_tag_match(ssbf_tag));

  // ---------------- dispatch ----------------
  fnf_dispatch #(.LQ_ENTRIES(LQ_ENTRIES), .ROB_ENTRIES(ROB_ENTRIES), .DIST_W(DIST_W)) u_disp (
    .clk, .rst_n,
    .in_valid(disp_valid), .in_kind(disp_kind), .in_ready(disp_ready),
    .rob_ready, .lq_ready, .rob_idx(rob_tail),
    .lcp_use_fwd(lcp_bit), .ldp_dist,
    .flush, .flush_next_lsn, .flush_next_ssn,
    .fire(d_fire), .lsn(d_lsn), .lq_idx(d_lq_idx), .use_fwd(d_use_fwd),
    .ssn_prev(d_ssn_prev), .ssn(d_ssn), .mrdl(d_mrdl),
    .lqi_valid(d_lqi_valid), .lqi(d_lqi),
    .rs_valid, .rs_kind, .rs_rob_idx, .rs_lq_idx);

  assign rs_lqi_valid = d_lqi_valid;

  // ---------------- reorder buffer ----------------
  fnf_rob #(.ROB_ENTRIES(ROB_ENTRIES), .LQ_ENTRIES(LQ_ENTRIES)) u_rob (
    .clk, .rst_n,
    .ready(rob_ready), .tail_idx(rob_tail),
    .alloc_en(d_fire), .alloc_kind(disp_kind), .alloc_pc(disp_pc),
    .alloc_lq_idx(d_lq_idx), .alloc_lsn(d_lsn), .alloc_ssn(d_ssn), .alloc_mrdl(d_mrdl),
    .sta_en(sta_valid), .sta_idx(sta_rob_idx), .sta_addr,
    .std_en(std_valid), .std_idx(std_rob_idx), .std_data, .std_ssn,
    .alu_done_en(alu_done_valid), .alu_done_idx(alu_done_rob_idx),
    .head_valid(rob_hv), .head_kind(rob_kind), .head_pc(rob_pc), .head_lq_idx(rob_lq_idx),
    .head_lsn(rob_lsn), .head_ssn(rob_ssn), .head_mrdl(rob_mrdl),
    .head_addr(rob_addr), .head_addr_v(rob_addr_v), .head_data(rob_data),
    .head_data_v(rob_data_v), .head_done(rob_done),
    .pop(rob_pop), .flush);

  // ---------------- load queue ----------------
  fnf_load_queue #(.LQ_ENTRIES(LQ_ENTRIES)) u_lq (
    .clk, .rst_n,
    .ready(lq_ready),
    .alloc_en(d_fire && disp_kind == OP_LOAD), .alloc_idx(d_lq_idx), .alloc_pc(disp_pc),
    .alloc_lsn(d_lsn), .alloc_use_fwd(d_use_fwd), .alloc_ssn_nvul(commit_ssn),
    .alloc_ssn_prev(d_ssn_prev), .alloc_hit,
    .agu_en(agu_valid), .agu_idx(agu_lq_idx), .agu_addr,
    .fwd_en(std_valid && std_lqi_valid), .fwd_idx(std_lqi), .fwd_data(std_data), .fwd_ssn(std_ssn),
    .commit_ssn,
    .dc_req_valid(dc_ld_req_valid), .dc_req_addr(dc_ld_req_addr), .dc_rsp_data(dc_ld_rsp_data),
    .fwd_wb_valid(ld_fwd_wb_valid), .fwd_wb_idx(ld_fwd_wb_idx), .fwd_wb_data(ld_fwd_wb_data),
    .dc_wb_valid(ld_dc_wb_valid), .dc_wb_idx(ld_dc_wb_idx), .dc_wb_data(ld_dc_wb_data),
    .progress_issue(ev_progress),
    .head_valid(lq_hv), .head_idx(lq_head_idx), .head_done(lq_done), .head_addr_v(lq_addr_v),
    .head_addr(lq_addr), .head_value(lq_value), .head_used_fwd(lq_used_fwd),
    .head_fwd_ssn(lq_fwd_ssn), .head_ssn_nvul(lq_nvul), .head_lsn(lq_lsn), .head_pc(lq_pc),
    .pop(lq_pop), .flush, .flush_next_lsn);

  // ---------------- commit ----------------
  fnf_commit #(.DIST_W(DIST_W)) u_commit (
    .clk, .rst_n,
    .rob_valid(rob_hv), .rob_kind, .rob_pc, .rob_ssn, .rob_mrdl, .rob_addr, .rob_addr_v,
    .rob_data, .rob_data_v, .rob_done, .rob_pop,
    .lq_valid(lq_hv), .lq_done, .lq_addr_v, .lq_addr, .lq_value, .lq_used_fwd,
    .lq_fwd_ssn, .lq_ssn_nvul(lq_nvul), .lq_lsn, .lq_pc, .lq_pop,
    .ssbf_rd_addr, .ssbf_rd_ssn, .ssbf_rd_tag_match(ssbf_tag),
    .ssbf_wr_en, .ssbf_wr_addr, .ssbf_wr_ssn,
    .spct_rd_addr, .spct_rd_valid, .spct_rd_mrdl, .spct_rd_pc,
    .spct_wr_en, .spct_wr_addr, .spct_wr_mrdl, .spct_wr_pc,
    .ldp_wr_en, .ldp_wr_pc, .ldp_wr_dist, .lcp_wr_en, .lcp_wr_pc, .lcp_wr_use_fwd,
    .dc_wr_en, .dc_wr_addr, .dc_wr_data, .rx_req_valid, .rx_req_addr, .rx_rsp_data,
    .commit_ssn, .flush, .flush_next_lsn, .flush_next_ssn,
    .ret_valid, .ret_kind, .ret_pc, .ret_addr, .ret_data, .ret_reexec, .ret_used_fwd);

  // ---------------- events ----------------
  assign ev_disp_stall = disp_valid && !disp_ready;
  assign ev_fwd_write  = std_valid && std_lqi_valid;
  assign ev_fwd_use    = ld_fwd_wb_valid || alloc_hit;
  assign ev_ldp_train  = ldp_wr_en;
  assign ev_lcp_train  = lcp_wr_en;

  // the ROB head load and the LQ head are the same load
  assert property (@(posedge clk) disable iff (!rst_n)
                   (rob_hv && rob_kind == OP_LOAD) |-> (lq_hv && lq_head_idx == rob_lq_idx));
endmodule
