// fnf_rob: reorder buffer that also holds what a store queue used to hold.
//
// A circular buffer of ROB_ENTRIES entries allocated in program order at the
// tail and retired at the head. With no store queue, a store's effective
// address (written when its STA uop executes) and its value (written into
// the entry's result-register slot when its STD uop executes) live in the
// store's own ROB entry until commit writes them to the data cache. Each
// entry also keeps the instruction's kind and PC, the load's LQ index and
// LSN, and the store's SSN and MRDL, which commit needs.
//
// Interface: alloc_en writes the entry at tail_idx (combinational output);
// sta_*, std_* and alu_done_* mark execution results by ROB index; the head
// entry is presented combinationally (head_valid, head); pop retires it.
// std_ssn returns the SSN of the store at std_idx in the same cycle, so the
// executing STD can send it along with its forwarded value. flush empties
// the buffer after the head (which pop retires in the same cycle).
//
// The store address and data fields follow the FnF scheme. Entry
// count, one allocation and one retirement per cycle, and the flush
// interface are choices of this design.
module fnf_rob
  import fnf_pkg::*;
#(
  parameter int unsigned ROB_ENTRIES = 128,
  parameter int unsigned LQ_ENTRIES  = 32,
  localparam int unsigned ROBI_W     = $clog2(ROB_ENTRIES),
  localparam int unsigned LQI_W      = $clog2(LQ_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // allocation
  output logic              ready,
  output logic [ROBI_W-1:0] tail_idx,
  input  logic              alloc_en,
  input  op_kind_e          alloc_kind,
  input  word_t             alloc_pc,
  input  logic [LQI_W-1:0]  alloc_lq_idx,
  input  seq_t              alloc_lsn,
  input  seq_t              alloc_ssn,
  input  seq_t              alloc_mrdl,
  // execution results
  input  logic              sta_en,
  input  logic [ROBI_W-1:0] sta_idx,
  input  word_t             sta_addr,
  input  logic              std_en,
  input  logic [ROBI_W-1:0] std_idx,
  input  word_t             std_data,
  output seq_t              std_ssn,
  input  logic              alu_done_en,
  input  logic [ROBI_W-1:0] alu_done_idx,
  // head and retirement
  output logic              head_valid,
  output op_kind_e          head_kind,
  output word_t             head_pc,
  output logic [LQI_W-1:0]  head_lq_idx,
  output seq_t              head_lsn,
  output seq_t              head_ssn,
  output seq_t              head_mrdl,
  output word_t             head_addr,
  output logic              head_addr_v,
  output word_t             head_data,
  output logic              head_data_v,
  output logic              head_done,
  input  logic              pop,
  input  logic              flush
);
  typedef struct packed {
    op_kind_e          kind;
    word_t             pc;
    logic [LQI_W-1:0]  lq_idx;
    seq_t              lsn;
    seq_t              ssn;
    seq_t              mrdl;
    word_t             addr;
    logic              addr_v;
    word_t             data;    // result-register slot, holds the store value
    logic              data_v;
    logic              done;    // non-memory instruction finished
  } rob_entry_t;

  rob_entry_t            ent_q [ROB_ENTRIES];
  logic [ROBI_W-1:0]     head_q, tail_q;
  logic [ROBI_W:0]       count_q;
  rob_entry_t            h;

  assign ready      = (count_q < (ROBI_W+1)'(ROB_ENTRIES));
  assign tail_idx   = tail_q;
  assign head_valid = (count_q != '0);
  assign h          = ent_q[head_q];
  assign head_kind  = h.kind;
  assign head_pc    = h.pc;
  assign head_lq_idx= h.lq_idx;
  assign head_lsn   = h.lsn;
  assign head_ssn   = h.ssn;
  assign head_mrdl  = h.mrdl;
  assign head_addr  = h.addr;
  assign head_addr_v= h.addr_v;
  assign head_data  = h.data;
  assign head_data_v= h.data_v;
  assign head_done  = h.done;
  assign std_ssn    = ent_q[std_idx].ssn;

  function automatic logic [ROBI_W-1:0] inc(input logic [ROBI_W-1:0] p);
    return (p == ROBI_W'(ROB_ENTRIES - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int i = 0; i < ROB_ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      if (sta_en) begin
        ent_q[sta_idx].addr   <= sta_addr;
        ent_q[sta_idx].addr_v <= 1'b1;
      end
      if (std_en) begin
        ent_q[std_idx].data   <= std_data;
        ent_q[std_idx].data_v <= 1'b1;
      end
      if (alu_done_en) ent_q[alu_done_idx].done <= 1'b1;
      if (alloc_en) begin
        ent_q[tail_q] <= '{kind: alloc_kind, pc: alloc_pc, lq_idx: alloc_lq_idx,
                           lsn: alloc_lsn, ssn: alloc_ssn, mrdl: alloc_mrdl,
                           addr: '0, addr_v: 1'b0, data: '0, data_v: 1'b0,
                           done: 1'b0};
      end
      if (flush) begin
        // the head retires (pop) and everything younger is squashed
        head_q  <= inc(head_q);
        tail_q  <= inc(head_q);
        count_q <= '0;
      end else begin
        if (pop) head_q <= inc(head_q);
        if (alloc_en) tail_q <= inc(tail_q);
        count_q <= count_q + (ROBI_W+1)'(alloc_en) - (ROBI_W+1)'(pop);
      end
    end
  end

  // a retiring entry must exist; allocation must have room
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
  assert property (@(posedge clk) disable iff (!rst_n) alloc_en |-> ready);
endmodule
