// tb_fnf_lsu: end-to-end test of the Fire-and-Forget memory scheduler at its
// default sizes (32-entry LQ, 128-entry ROB).
//
// The testbench plays the rest of the core. It streams a dynamic program
// (a loop body of loads, stores and ALU instructions, unrolled) into
// dispatch. It keeps the uops handed to the reservation stations in a pool
// and executes them out of order after random delays. It also models the
// data cache: reads return one cycle after the request, and writes from
// committing stores apply at the clock edge. Inputs are driven just after
// each falling edge and outputs are sampled 1 ns later, for the following
// rising edge.
//
// Every retired instruction is checked in program order against a
// sequential reference run of the same program made before simulation:
// kind, PC, store address and data, and load value. After a flush the
// program is re-dispatched from the instruction after the flushing load.
// The loop body is shaped so that each mechanism occurs: a store that
// always feeds a load two loads later (LDP/LCP training, then forwarding),
// a store whose consumer alternates between two loads (forwards into the
// wrong entry, and waiting loads that must give up and read the cache), a
// random store/load pair, a store that rewrites the value already in memory
// (re-execution that finds the same value) and long ALU latencies that fill
// the LQ and stall dispatch. Each mechanism's count must be non-zero.
`timescale 1ns/1ps
module tb_fnf_lsu;
  import fnf_pkg::*;

  localparam int LQ_ENTRIES  = 32;
  localparam int ROB_ENTRIES = 128;
  localparam int LQI_W  = $clog2(LQ_ENTRIES);
  localparam int ROBI_W = $clog2(ROB_ENTRIES);
  localparam int BODY   = 10;
  localparam int ITERS  = 400;
  localparam int NDYN   = BODY * ITERS;
  localparam int MEMW   = 1024;          // words of modelled memory
  localparam int POOL   = 1024;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic disp_valid, disp_ready;
  op_kind_e disp_kind;
  word_t disp_pc;
  logic [1:0] rs_valid;
  uop_kind_e rs_kind [2];
  logic [ROBI_W-1:0] rs_rob_idx [2];
  logic [LQI_W-1:0] rs_lq_idx [2];
  logic rs_lqi_valid;
  logic sta_valid, std_valid, std_lqi_valid, agu_valid, alu_done_valid;
  logic [ROBI_W-1:0] sta_rob_idx, std_rob_idx, alu_done_rob_idx;
  logic [LQI_W-1:0] std_lqi, agu_lq_idx;
  word_t sta_addr, std_data, agu_addr;
  logic ld_fwd_wb_valid, ld_dc_wb_valid;
  logic [LQI_W-1:0] ld_fwd_wb_idx, ld_dc_wb_idx;
  word_t ld_fwd_wb_data, ld_dc_wb_data;
  logic dc_ld_req_valid, rx_req_valid, dc_wr_en;
  word_t dc_ld_req_addr, dc_ld_rsp_data, rx_req_addr, rx_rsp_data, dc_wr_addr, dc_wr_data;
  logic ret_valid, ret_reexec, ret_used_fwd, flush;
  op_kind_e ret_kind;
  word_t ret_pc, ret_addr, ret_data;
  logic ev_disp_stall, ev_fwd_write, ev_fwd_use, ev_progress, ev_ldp_train, ev_lcp_train;

  fnf_lsu dut (.*);

  // ---------------- program ----------------
  op_kind_e p_kind [NDYN];
  word_t    p_pc   [NDYN];
  word_t    p_addr [NDYN];
  word_t    p_data [NDYN];   // store data, or expected load value
  word_t    mem    [MEMW];   // cache model
  word_t    ref_mem[MEMW];

  function automatic word_t init_val(int w);
    return word_t'(32'h1234_0000 + w * 32'h9e37);
  endfunction

  task automatic build_program();
    for (int it = 0; it < ITERS; it++) begin
      int b = it * BODY;
      int r1 = $urandom % 4, r2 = $urandom % 4;
      for (int k = 0; k < BODY; k++) begin
        p_pc[b+k]   = 32'h4000 + 4 * k;
        p_addr[b+k] = '0;
        p_data[b+k] = '0;
      end
      p_kind[b+0] = OP_STORE; p_addr[b+0] = 32'h400 + 4 * (it % 16); p_data[b+0] = $urandom;
      p_kind[b+1] = OP_ALU;
      p_kind[b+2] = OP_LOAD;  p_addr[b+2] = 32'hC00 + 4 * (it % 32);
      p_kind[b+3] = OP_LOAD;  p_addr[b+3] = 32'h400 + 4 * (it % 16);
      p_kind[b+4] = OP_ALU;
      p_kind[b+5] = OP_STORE; p_addr[b+5] = 32'h800 + 4 * (it % 4); p_data[b+5] = $urandom;
      p_kind[b+6] = OP_LOAD;  p_addr[b+6] = (it % 2 == 0) ? 32'h800 + 4 * (it % 4) : 32'hE00 + 4 * (it % 8);
      p_kind[b+7] = OP_LOAD;  p_addr[b+7] = (it % 2 == 1) ? 32'h800 + 4 * (it % 4) : 32'hE00 + 4 * (it % 8);
      p_kind[b+8] = OP_STORE; p_addr[b+8] = 32'hA00 + 4 * r1; p_data[b+8] = 32'h0000_0055;
      p_kind[b+9] = OP_LOAD;  p_addr[b+9] = 32'hA00 + 4 * r2;
    end
    // sequential reference
    for (int w = 0; w < MEMW; w++) begin ref_mem[w] = init_val(w); mem[w] = init_val(w); end
    for (int i = 0; i < NDYN; i++) begin
      if (p_kind[i] == OP_STORE) ref_mem[p_addr[i][11:2]] = p_data[i];
      else if (p_kind[i] == OP_LOAD) p_data[i] = ref_mem[p_addr[i][11:2]];
    end
  endtask

  // ---------------- uop pool (reservation stations + execution) ----------------
  logic             u_v    [POOL];
  uop_kind_e        u_kind [POOL];
  logic [ROBI_W-1:0] u_rob [POOL];
  logic [LQI_W-1:0] u_lq   [POOL];
  logic             u_lqiv [POOL];
  int               u_dyn  [POOL];
  int               u_time [POOL];

  task automatic pool_add(uop_kind_e k, logic [ROBI_W-1:0] rob, logic [LQI_W-1:0] lq,
                          logic lqiv, int dyn, int t);
    for (int i = 0; i < POOL; i++) if (!u_v[i]) begin
      u_v[i] = 1'b1; u_kind[i] = k; u_rob[i] = rob; u_lq[i] = lq; u_lqiv[i] = lqiv;
      u_dyn[i] = dyn; u_time[i] = t; return;
    end
    $display("ERROR: uop pool overflow"); failures++;
  endtask

  function automatic int pool_pick(uop_kind_e k, int now);
    int s = $urandom % POOL;
    for (int j = 0; j < POOL; j++) begin
      int i = (s + j) % POOL;
      if (u_v[i] && u_kind[i] == k && u_time[i] <= now) return i;
    end
    return -1;
  endfunction

  function automatic int delay_of(uop_kind_e k, int dyn);
    int pos = dyn % BODY;
    if (k == UOP_ALU && pos == 4 && ($urandom % 6) == 0) return 40 + $urandom % 40;
    return $urandom % 10;
  endfunction

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0, cycle = 0;
  int disp_ptr = 0, commit_ptr = 0;
  word_t ld_rsp_q, rx_rsp_q;
  int n_stall, n_fwd_write, n_fwd_use, n_progress, n_ldp, n_lcp;
  int n_reexec, n_flush, n_rx_same, n_fwd_commit_norx, n_loads, n_stores;
  bit done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s (dyn %0d)", cycle, what, commit_ptr);
    end
  endtask

  initial begin
    for (int i = 0; i < POOL; i++) u_v[i] = 1'b0;
    {disp_valid, sta_valid, std_valid, agu_valid, alu_done_valid, std_lqi_valid} = '0;
    disp_kind = OP_ALU; disp_pc = '0;
    sta_rob_idx = '0; std_rob_idx = '0; alu_done_rob_idx = '0; std_lqi = '0; agu_lq_idx = '0;
    sta_addr = '0; std_data = '0; agu_addr = '0; dc_ld_rsp_data = '0; rx_rsp_data = '0;
    ld_rsp_q = '0; rx_rsp_q = '0;
    {n_stall, n_fwd_write, n_fwd_use, n_progress, n_ldp, n_lcp} = '0;
    {n_reexec, n_flush, n_rx_same, n_fwd_commit_norx, n_loads, n_stores} = '0;
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(negedge clk) if (rst_n && !done) begin
    int is_, id_, ia_, il_;
    cycle++;
    // ---- drive this cycle's inputs ----
    dc_ld_rsp_data = ld_rsp_q;
    rx_rsp_data    = rx_rsp_q;
    is_ = pool_pick(UOP_STA, cycle);
    id_ = pool_pick(UOP_STD, cycle);
    ia_ = pool_pick(UOP_LD,  cycle);
    il_ = pool_pick(UOP_ALU, cycle);
    sta_valid = (is_ >= 0);
    if (is_ >= 0) begin sta_rob_idx = u_rob[is_]; sta_addr = p_addr[u_dyn[is_]]; u_v[is_] = 1'b0; end
    std_valid = (id_ >= 0);
    std_lqi_valid = 1'b0;
    if (id_ >= 0) begin
      std_rob_idx = u_rob[id_]; std_data = p_data[u_dyn[id_]];
      std_lqi_valid = u_lqiv[id_]; std_lqi = u_lq[id_]; u_v[id_] = 1'b0;
    end
    agu_valid = (ia_ >= 0);
    if (ia_ >= 0) begin agu_lq_idx = u_lq[ia_]; agu_addr = p_addr[u_dyn[ia_]]; u_v[ia_] = 1'b0; end
    alu_done_valid = (il_ >= 0);
    if (il_ >= 0) begin alu_done_rob_idx = u_rob[il_]; u_v[il_] = 1'b0; end
    disp_valid = (disp_ptr < NDYN) && (($urandom % 8) != 0);
    if (disp_ptr < NDYN) begin disp_kind = p_kind[disp_ptr]; disp_pc = p_pc[disp_ptr]; end
    #1;
    // ---- sample what the next rising edge does ----
    if (ev_disp_stall) n_stall++;
    if (ev_fwd_write)  n_fwd_write++;
    if (ev_fwd_use)    n_fwd_use++;
    if (ev_progress)   n_progress++;
    if (ev_ldp_train)  n_ldp++;
    if (ev_lcp_train)  n_lcp++;
    if (dc_ld_req_valid) ld_rsp_q = mem[dc_ld_req_addr[11:2]];
    if (rx_req_valid)    rx_rsp_q = mem[rx_req_addr[11:2]];
    if (ret_valid) begin
      check(commit_ptr < NDYN, "retire past end of program");
      check(ret_kind == p_kind[commit_ptr] && ret_pc == p_pc[commit_ptr], "retired kind/pc");
      if (p_kind[commit_ptr] == OP_LOAD) begin
        n_loads++;
        check(ret_addr == p_addr[commit_ptr], "load address");
        check(ret_data == p_data[commit_ptr], $sformatf("load value %h exp %h", ret_data, p_data[commit_ptr]));
        if (ret_reexec) n_reexec++;
        if (ret_reexec && !flush) n_rx_same++;
        if (ret_used_fwd && !ret_reexec) n_fwd_commit_norx++;
      end else if (p_kind[commit_ptr] == OP_STORE) begin
        n_stores++;
        check(dc_wr_en && dc_wr_addr == p_addr[commit_ptr] && dc_wr_data == p_data[commit_ptr],
              "store write to cache");
      end else begin
        check(!dc_wr_en, "no cache write for ALU");
      end
      commit_ptr++;
    end else begin
      check(!dc_wr_en, "cache write without retirement");
    end
    if (dc_wr_en) mem[dc_wr_addr[11:2]] = dc_wr_data;
    if (flush) begin
      n_flush++;
      check(ret_valid && ret_reexec && p_kind[commit_ptr-1] == OP_LOAD, "flush comes from a re-executed load");
      for (int i = 0; i < POOL; i++) u_v[i] = 1'b0;
      disp_ptr = commit_ptr;
    end else if (disp_valid && disp_ready) begin
      if (rs_valid[0]) pool_add(rs_kind[0], rs_rob_idx[0], rs_lq_idx[0], 1'b0, disp_ptr,
                                cycle + 1 + delay_of(rs_kind[0], disp_ptr));
      if (rs_valid[1]) pool_add(rs_kind[1], rs_rob_idx[1], rs_lq_idx[1], rs_lqi_valid, disp_ptr,
                                cycle + 1 + delay_of(rs_kind[1], disp_ptr));
      check(rs_valid != 2'b00, "dispatch hands uops to the RS");
      check((p_kind[disp_ptr] == OP_STORE) == (rs_valid == 2'b11), "stores crack into two uops");
      disp_ptr++;
    end
    if (commit_ptr == NDYN) begin
      done = 1;
      $display("retired %0d instructions (%0d loads, %0d stores) in %0d cycles",
               commit_ptr, n_loads, n_stores, cycle);
      $display("events: stall=%0d fwd_write=%0d fwd_use=%0d progress=%0d ldp_train=%0d lcp_train=%0d",
               n_stall, n_fwd_write, n_fwd_use, n_progress, n_ldp, n_lcp);
      $display("events: reexec=%0d reexec_same_value=%0d flush=%0d fwd_commit_without_reexec=%0d",
               n_reexec, n_rx_same, n_flush, n_fwd_commit_norx);
      check(n_stall > 0, "dispatch stall never happened");
      check(n_fwd_write > 0, "no STD forwarded");
      check(n_fwd_use > 0, "no load used a forwarded value");
      check(n_progress > 0, "forward-progress cache read never happened");
      check(n_ldp > 0, "LDP never trained");
      check(n_lcp > 0, "LCP never trained");
      check(n_reexec > 0, "no re-execution");
      check(n_rx_same > 0, "no re-execution with an equal value");
      check(n_flush > 0, "no flush");
      check(n_fwd_commit_norx > 0, "no forwarded load cleared by the SSBF");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at retirement %0d of %0d", commit_ptr, NDYN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
