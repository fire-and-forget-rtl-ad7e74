// fnf_load_queue: non-associative load queue (LQ) of the Fire-and-Forget
// memory scheduler.
//
// Loads occupy entries in program order; the entry of a load is its LSN
// modulo LQ_ENTRIES, so the queue is a circular buffer whose head is the
// oldest uncommitted load. Nothing in the LQ is searched by address. Stores
// reach it only through one RAM-style write port: an executing STD writes its
// value and SSN into the entry named by its predicted LQ index, without
// looking at what the entry holds ("fire and forget"). Such a value is kept
// until the entry is released at commit or by a flush, so a value that
// arrives before its load is dispatched is still found by that load.
//
// A load whose LCP bit is set (use_fwd) completes as soon as a forwarded
// value is present: at dispatch if it already arrived, otherwise when the
// STD writes it. It does not need its address for that. A load that does
// not wait, or a waiting load once no store older than it is left
// uncommitted (commit_ssn >= its ssn_prev, the forward-progress rule),
// issues to the data cache once its address is known. One cache read is
// issued per cycle, to the oldest eligible load; the data returns on
// dc_rsp_data exactly one cycle after dc_req_valid. A forwarded value that
// reaches a load which does not wait for one is ignored.
//
// Outputs: fwd_wb_* reports a load completed with a forwarded value,
// dc_wb_* a load completed from the cache (each at most once per cycle
// except that an STD write and a dispatch can both complete a load in one
// cycle; fwd_wb then reports the STD one and alloc_hit the other). The head
// entry is presented for commit; pop releases it. flush clears every entry
// and restarts the queue at flush_next_lsn.
//
// The Fire-and-Forget scheme defines the blind indexed write, the LCP wait, the forward-
// progress rule and the SSN that travels with a forwarded value. The entry
// layout, one cache port, oldest-first selection, fixed one-cycle cache
// latency and the keep-until-release rule are choices of this design.
module fnf_load_queue
  import fnf_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES = 32,
  localparam int unsigned LQI_W     = $clog2(LQ_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  output logic              ready,
  input  logic              alloc_en,
  input  logic [LQI_W-1:0]  alloc_idx,
  input  word_t             alloc_pc,
  input  seq_t              alloc_lsn,
  input  logic              alloc_use_fwd,
  input  seq_t              alloc_ssn_nvul,  // youngest store committed at dispatch
  input  seq_t              alloc_ssn_prev,  // youngest store dispatched before it
  output logic              alloc_hit,       // dispatching load found its value present
  // load address generation
  input  logic              agu_en,
  input  logic [LQI_W-1:0]  agu_idx,
  input  word_t             agu_addr,
  // blind forward from an executing STD
  input  logic              fwd_en,
  input  logic [LQI_W-1:0]  fwd_idx,
  input  word_t             fwd_data,
  input  seq_t              fwd_ssn,
  // store commit progress
  input  seq_t              commit_ssn,
  // data cache read port
  output logic              dc_req_valid,
  output word_t             dc_req_addr,
  input  word_t             dc_rsp_data,
  // completions
  output logic              fwd_wb_valid,
  output logic [LQI_W-1:0]  fwd_wb_idx,
  output word_t             fwd_wb_data,
  output logic              dc_wb_valid,
  output logic [LQI_W-1:0]  dc_wb_idx,
  output word_t             dc_wb_data,
  output logic              progress_issue,  // a waiting load gave up and read the cache
  // head for commit
  output logic              head_valid,
  output logic [LQI_W-1:0]  head_idx,
  output logic              head_done,
  output logic              head_addr_v,
  output word_t             head_addr,
  output word_t             head_value,
  output logic              head_used_fwd,
  output seq_t              head_fwd_ssn,
  output seq_t              head_ssn_nvul,
  output seq_t              head_lsn,
  output word_t             head_pc,
  input  logic              pop,
  input  logic              flush,
  input  seq_t              flush_next_lsn
);
  typedef struct packed {
    logic   valid;
    word_t  pc;
    seq_t   lsn;
    word_t  addr;
    logic   addr_v;
    logic   use_fwd;
    seq_t   ssn_nvul;
    seq_t   ssn_prev;
    logic   issued;
    logic   done;
    word_t  value;
    logic   used_fwd;
    seq_t   val_ssn;    // SSN sent with the forwarded value the load used
    logic   fwd_v;      // a store forwarded into this entry
    word_t  fwd_val;
    seq_t   fwd_ssn;
  } lq_entry_t;

  lq_entry_t        ent_q [LQ_ENTRIES];
  logic [LQI_W-1:0] head_q;
  logic [LQI_W:0]   count_q;
  logic             pend_q;        // cache read in flight
  logic [LQI_W-1:0] pend_idx_q;

  function automatic logic [LQI_W-1:0] wrap(input int unsigned v);
    return LQI_W'(v % LQ_ENTRIES);
  endfunction

  // ---------------- oldest eligible load for the cache ----------------
  logic             sel_v;
  logic [LQI_W-1:0] sel_idx;
  logic             sel_progress;

  always_comb begin
    sel_v        = 1'b0;
    sel_idx      = head_q;
    sel_progress = 1'b0;
    for (int k = 0; k < LQ_ENTRIES; k++) begin
      automatic logic [LQI_W-1:0] i = wrap(int'(head_q) + k);
      automatic lq_entry_t e = ent_q[i];
      automatic logic no_older_st = (commit_ssn >= e.ssn_prev);
      if (!sel_v && e.valid && e.addr_v && !e.issued && !e.done &&
          (!e.use_fwd || no_older_st)) begin
        sel_v        = 1'b1;
        sel_idx      = i;
        sel_progress = e.use_fwd;
      end
    end
  end

  assign dc_req_valid   = sel_v && !flush;
  assign dc_req_addr    = ent_q[sel_idx].addr;
  assign progress_issue = dc_req_valid && sel_progress;

  // ---------------- completions ----------------
  lq_entry_t fe;
  lq_entry_t pe;
  assign fe = ent_q[fwd_idx];
  assign pe = ent_q[pend_idx_q];

  assign fwd_wb_valid = fwd_en && fe.valid && fe.use_fwd && !fe.done && !flush;
  assign fwd_wb_idx   = fwd_idx;
  assign fwd_wb_data  = fwd_data;

  logic fwd_same;   // forward lands on the dispatching load's entry this cycle
  assign fwd_same     = fwd_en && (fwd_idx == alloc_idx);
  assign alloc_hit    = alloc_en && alloc_use_fwd && (ent_q[alloc_idx].fwd_v || fwd_same);

  assign dc_wb_valid  = pend_q && pe.valid && !pe.done && !flush &&
                        !(fwd_wb_valid && fwd_idx == pend_idx_q);
  assign dc_wb_idx    = pend_idx_q;
  assign dc_wb_data   = dc_rsp_data;

  // ---------------- head ----------------
  lq_entry_t hd;
  assign hd            = ent_q[head_q];
  assign ready         = (count_q < (LQI_W+1)'(LQ_ENTRIES));
  assign head_valid    = (count_q != '0);
  assign head_idx      = head_q;
  assign head_done     = hd.done;
  assign head_addr_v   = hd.addr_v;
  assign head_addr     = hd.addr;
  assign head_value    = hd.value;
  assign head_used_fwd = hd.used_fwd;
  assign head_fwd_ssn  = hd.val_ssn;
  assign head_ssn_nvul = hd.ssn_nvul;
  assign head_lsn      = hd.lsn;
  assign head_pc       = hd.pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q     <= wrap(1);   // the first LSN is 1
      count_q    <= '0;
      pend_q     <= 1'b0;
      pend_idx_q <= '0;
      for (int i = 0; i < LQ_ENTRIES; i++) ent_q[i] <= '0;
    end else if (flush) begin
      head_q  <= wrap(int'(flush_next_lsn % seq_t'(LQ_ENTRIES)));
      count_q <= '0;
      pend_q  <= 1'b0;
      for (int i = 0; i < LQ_ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      // blind write of a forwarded value
      if (fwd_en) begin
        ent_q[fwd_idx].fwd_v   <= 1'b1;
        ent_q[fwd_idx].fwd_val <= fwd_data;
        ent_q[fwd_idx].fwd_ssn <= fwd_ssn;
        if (fwd_wb_valid) begin
          ent_q[fwd_idx].done     <= 1'b1;
          ent_q[fwd_idx].used_fwd <= 1'b1;
          ent_q[fwd_idx].value    <= fwd_data;
          ent_q[fwd_idx].val_ssn  <= fwd_ssn;
        end
      end
      if (agu_en) begin
        ent_q[agu_idx].addr   <= agu_addr;
        ent_q[agu_idx].addr_v <= 1'b1;
      end
      // cache response
      if (dc_wb_valid) begin
        ent_q[pend_idx_q].done  <= 1'b1;
        ent_q[pend_idx_q].value <= dc_rsp_data;
      end
      pend_q     <= dc_req_valid;
      pend_idx_q <= sel_idx;
      if (dc_req_valid) ent_q[sel_idx].issued <= 1'b1;
      // release the head; its forwarded value goes with it
      if (pop) begin
        ent_q[head_q] <= '0;
        head_q        <= wrap(int'(head_q) + 1);
      end
      // dispatch (never the entry being released: the queue is not full)
      if (alloc_en) begin
        ent_q[alloc_idx].valid    <= 1'b1;
        ent_q[alloc_idx].pc       <= alloc_pc;
        ent_q[alloc_idx].lsn      <= alloc_lsn;
        ent_q[alloc_idx].addr_v   <= 1'b0;
        ent_q[alloc_idx].use_fwd  <= alloc_use_fwd;
        ent_q[alloc_idx].ssn_nvul <= alloc_ssn_nvul;
        ent_q[alloc_idx].ssn_prev <= alloc_ssn_prev;
        ent_q[alloc_idx].issued   <= 1'b0;
        ent_q[alloc_idx].done     <= alloc_hit;
        ent_q[alloc_idx].used_fwd <= alloc_hit;
        // a forward landing in the same cycle counts as already present
        ent_q[alloc_idx].value    <= fwd_same ? fwd_data : ent_q[alloc_idx].fwd_val;
        ent_q[alloc_idx].val_ssn  <= fwd_same ? fwd_ssn  : ent_q[alloc_idx].fwd_ssn;
      end
      count_q <= count_q + (LQI_W+1)'(alloc_en) - (LQI_W+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> (head_valid && head_done));
  assert property (@(posedge clk) disable iff (!rst_n) alloc_en |-> ready);
endmodule
