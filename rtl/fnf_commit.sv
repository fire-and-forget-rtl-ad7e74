// fnf_commit: in-order commit with SVW-filtered load re-execution and the
// training of the Fire-and-Forget predictors.
//
// One instruction retires per cycle from the ROB head:
//  - A non-memory instruction retires once it is done.
//  - A store retires once its address and value are in its ROB entry. It
//    writes the value to the data cache, its SSN into the SSBF, and its PC
//    and MRDL into the SPCT. commit_ssn then holds its SSN.
//  - A load retires once the LQ head has its value and its address. A load
//    that read the cache re-executes if the SSBF holds an SSN newer than
//    the youngest store already committed when it was dispatched (ssn_nvul).
//    A load that used a forwarded value re-executes unless the SSBF entry
//    for its address holds exactly the SSN sent with that value, for the
//    same address. Re-execution reads the cache through its own port (data
//    one cycle later). If the value differs, the load retires with the
//    cache value and everything younger is flushed. The SPCT entry for the
//    load's address then names the store that wrote that word last. If that
//    store committed after the load was dispatched, the load should have
//    received its value by forwarding. The LDP entry of that store's PC is
//    then set to the distance (load LSN - store MRDL) and the load's LCP bit
//    to one. Otherwise the LCP bit is cleared and the LDP is left alone.
//
// Timing: a load without re-execution retires in the cycle its head
// conditions hold; with re-execution it retires one cycle later, in state
// RX. flush is a single-cycle pulse in that cycle, together with pop, and
// carries the LSN and SSN that dispatch resumes from.
//
// The Fire-and-Forget scheme defines the SSBF tests, the SPCT/LDP/LCP training and that
// tables change only at commit. Commit width one, the separate re-execution
// port, the "committed after dispatch" test for the LCP bit and the
// distance limit (1 .. 2^DIST_W-1) are choices of this design.
module fnf_commit
  import fnf_pkg::*;
#(
  parameter int unsigned DIST_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // ROB head
  input  logic              rob_valid,
  input  op_kind_e          rob_kind,
  input  word_t             rob_pc,
  input  seq_t              rob_ssn,
  input  seq_t              rob_mrdl,
  input  word_t             rob_addr,
  input  logic              rob_addr_v,
  input  word_t             rob_data,
  input  logic              rob_data_v,
  input  logic              rob_done,
  output logic              rob_pop,
  // LQ head
  input  logic              lq_valid,
  input  logic              lq_done,
  input  logic              lq_addr_v,
  input  word_t             lq_addr,
  input  word_t             lq_value,
  input  logic              lq_used_fwd,
  input  seq_t              lq_fwd_ssn,
  input  seq_t              lq_ssn_nvul,
  input  seq_t              lq_lsn,
  input  word_t             lq_pc,
  output logic              lq_pop,
  // SSBF: read at the load's address, written by stores
  output word_t             ssbf_rd_addr,
  input  seq_t              ssbf_rd_ssn,
  input  logic              ssbf_rd_tag_match,
  output logic              ssbf_wr_en,
  output word_t             ssbf_wr_addr,
  output seq_t              ssbf_wr_ssn,
  // SPCT
  output word_t             spct_rd_addr,
  input  logic              spct_rd_valid,
  input  seq_t              spct_rd_mrdl,
  input  word_t             spct_rd_pc,
  output logic              spct_wr_en,
  output word_t             spct_wr_addr,
  output seq_t              spct_wr_mrdl,
  output word_t             spct_wr_pc,
  // predictor training
  output logic              ldp_wr_en,
  output word_t             ldp_wr_pc,
  output logic [DIST_W-1:0] ldp_wr_dist,
  output logic              lcp_wr_en,
  output word_t             lcp_wr_pc,
  output logic              lcp_wr_use_fwd,
  // data cache: store write port and re-execution read port
  output logic              dc_wr_en,
  output word_t             dc_wr_addr,
  output word_t             dc_wr_data,
  output logic              rx_req_valid,
  output word_t             rx_req_addr,
  input  word_t             rx_rsp_data,
  // status
  output seq_t              commit_ssn,
  output logic              flush,
  output seq_t              flush_next_lsn,
  output seq_t              flush_next_ssn,
  // retirement report
  output logic              ret_valid,
  output op_kind_e          ret_kind,
  output word_t             ret_pc,
  output word_t             ret_addr,
  output word_t             ret_data,
  output logic              ret_reexec,
  output logic              ret_used_fwd
);
  typedef enum logic {S_IDLE, S_RX} state_e;
  state_e state_q;
  seq_t   commit_ssn_q;

  logic need_rx;
  logic ld_ready, st_ready;
  seq_t dist_full;
  logic should_fwd;

  assign commit_ssn     = commit_ssn_q;
  assign ssbf_rd_addr   = lq_addr;
  assign spct_rd_addr   = lq_addr;
  assign flush_next_lsn = lq_lsn + seq_t'(1);
  assign flush_next_ssn = commit_ssn_q + seq_t'(1);

  always_comb begin
    ld_ready = rob_valid && rob_kind == OP_LOAD && lq_valid && lq_done && lq_addr_v;
    st_ready = rob_valid && rob_kind == OP_STORE && rob_addr_v && rob_data_v;
    if (lq_used_fwd) need_rx = !(ssbf_rd_ssn == lq_fwd_ssn && ssbf_rd_tag_match);
    else             need_rx = (ssbf_rd_ssn > lq_ssn_nvul);

    dist_full  = lq_lsn - spct_rd_mrdl;
    should_fwd = spct_rd_valid && ssbf_rd_tag_match && (ssbf_rd_ssn > lq_ssn_nvul) &&
                 (dist_full != '0) && (dist_full < seq_t'(2**DIST_W));

    rob_pop = 1'b0;  lq_pop = 1'b0;
    ssbf_wr_en = 1'b0; ssbf_wr_addr = rob_addr; ssbf_wr_ssn = rob_ssn;
    spct_wr_en = 1'b0; spct_wr_addr = rob_addr; spct_wr_mrdl = rob_mrdl; spct_wr_pc = rob_pc;
    dc_wr_en   = 1'b0; dc_wr_addr   = rob_addr; dc_wr_data  = rob_data;
    rx_req_valid = 1'b0; rx_req_addr = lq_addr;
    ldp_wr_en = 1'b0; ldp_wr_pc = spct_rd_pc; ldp_wr_dist = dist_full[DIST_W-1:0];
    lcp_wr_en = 1'b0; lcp_wr_pc = lq_pc;      lcp_wr_use_fwd = should_fwd;
    flush = 1'b0;
    ret_valid = 1'b0; ret_kind = rob_kind; ret_pc = rob_pc; ret_addr = rob_addr;
    ret_data = rob_data; ret_reexec = 1'b0; ret_used_fwd = 1'b0;

    if (state_q == S_IDLE) begin
      if (rob_valid && rob_kind == OP_ALU && rob_done) begin
        rob_pop = 1'b1; ret_valid = 1'b1;
      end else if (st_ready) begin
        rob_pop = 1'b1; ret_valid = 1'b1;
        dc_wr_en = 1'b1; ssbf_wr_en = 1'b1; spct_wr_en = 1'b1;
      end else if (ld_ready) begin
        if (need_rx) begin
          rx_req_valid = 1'b1;
        end else begin
          rob_pop = 1'b1; lq_pop = 1'b1; ret_valid = 1'b1;
          ret_addr = lq_addr; ret_data = lq_value; ret_used_fwd = lq_used_fwd;
        end
      end
    end else begin
      // S_RX: the re-executed value is on rx_rsp_data
      rob_pop = 1'b1; lq_pop = 1'b1; ret_valid = 1'b1; ret_reexec = 1'b1;
      ret_addr = lq_addr; ret_data = rx_rsp_data; ret_used_fwd = lq_used_fwd;
      if (rx_rsp_data != lq_value) begin
        flush     = 1'b1;
        lcp_wr_en = 1'b1;
        ldp_wr_en = should_fwd;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      commit_ssn_q <= '0;
    end else begin
      state_q <= (state_q == S_IDLE && rx_req_valid) ? S_RX : S_IDLE;
      if (ssbf_wr_en) commit_ssn_q <= rob_ssn;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) lq_pop |-> rob_pop);
endmodule
