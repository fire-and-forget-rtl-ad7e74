// tb_fnf_load_queue: directed scenarios on a 4-entry load queue.
//  1. a load that does not wait reads the cache once its address is known;
//  2. a waiting load completes when an STD writes its entry, with the
//     store's value and SSN, before its address is known;
//  3. a waiting load with no forward stays off the cache until every older
//     store has committed, then reads the cache (forward progress);
//  4. a value forwarded into a free entry is found by the load dispatched
//     there later;
//  5. a forward into a load that does not wait is ignored;
//  6. the oldest of two ready loads reads the cache first;
//  7. the queue reports full, releases in order, and a flush empties it.
`timescale 1ns/1ps
module tb_fnf_load_queue;
  import fnf_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready, alloc_en, alloc_use_fwd, alloc_hit, agu_en, fwd_en, dc_req_valid;
  logic [1:0] alloc_idx, agu_idx, fwd_idx, fwd_wb_idx, dc_wb_idx, head_idx;
  word_t alloc_pc, agu_addr, fwd_data, dc_req_addr, dc_rsp_data, fwd_wb_data, dc_wb_data, head_addr, head_value, head_pc;
  seq_t alloc_lsn, alloc_ssn_nvul, alloc_ssn_prev, fwd_ssn, commit_ssn, head_fwd_ssn, head_ssn_nvul, head_lsn, flush_next_lsn;
  logic fwd_wb_valid, dc_wb_valid, progress_issue, head_valid, head_done, head_addr_v, head_used_fwd, pop, flush;
  fnf_load_queue #(.LQ_ENTRIES(N)) dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic idle();
    {alloc_en, agu_en, fwd_en, pop, flush} = '0;
  endtask
  task automatic alloc(seq_t lsn, bit uf, seq_t prev);
    alloc_en = 1; alloc_idx = 2'(lsn % N); alloc_lsn = lsn; alloc_pc = 32'h4000 + lsn * 4;
    alloc_use_fwd = uf; alloc_ssn_nvul = commit_ssn; alloc_ssn_prev = prev;
  endtask
  task automatic step(); @(posedge clk); @(negedge clk); idle(); endtask

  initial begin
    idle(); alloc_idx = 0; agu_idx = 0; fwd_idx = 0; alloc_pc = 0; agu_addr = 0; fwd_data = 0;
    alloc_lsn = 0; alloc_ssn_nvul = 0; alloc_ssn_prev = 0; alloc_use_fwd = 0; fwd_ssn = 0;
    commit_ssn = 3; dc_rsp_data = 0; flush_next_lsn = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    #1 chk(ready && !head_valid && head_idx == 1, "empty, first LSN 1 at entry 1");
    // 1: plain load lsn 1
    alloc(1, 0, 3); step();
    #1 chk(!dc_req_valid, "no cache read before address");
    agu_en = 1; agu_idx = 1; agu_addr = 32'h100; step();
    #1 chk(dc_req_valid && dc_req_addr == 32'h100 && !progress_issue, "cache read issued");
    step(); dc_rsp_data = 32'hAAAA; #1 chk(dc_wb_valid && dc_wb_idx == 1 && dc_wb_data == 32'hAAAA, "cache data back");
    step(); #1 chk(head_done && head_value == 32'hAAAA && !head_used_fwd && head_lsn == 1, "load 1 done");
    // 2: waiting load lsn 2, older store SSN 5 not committed
    alloc(2, 1, 5); step();
    fwd_en = 1; fwd_idx = 2; fwd_data = 42; fwd_ssn = 4;
    #1 chk(fwd_wb_valid && fwd_wb_idx == 2 && fwd_wb_data == 42, "forward completes waiting load");
    step();
    // 3: waiting load lsn 3 with its address, no forward
    alloc(3, 1, 5); step(); agu_en = 1; agu_idx = 3; agu_addr = 32'h300; step();
    repeat (3) begin #1 chk(!dc_req_valid, "waiting load holds off"); step(); end
    commit_ssn = 5; #1 chk(dc_req_valid && dc_req_addr == 32'h300 && progress_issue, "forward-progress read");
    step(); dc_rsp_data = 32'h3333; #1 chk(dc_wb_valid && dc_wb_idx == 3, "progress data back"); step();
    // 4: value forwarded into free entry 0 before load lsn 4 dispatches
    fwd_en = 1; fwd_idx = 0; fwd_data = 77; fwd_ssn = 9; #1 chk(!fwd_wb_valid, "free entry: no completion");
    step();
    alloc(4, 1, 9); #1 chk(alloc_hit, "value already present at dispatch"); step();
    #1 chk(!ready, "queue full with four loads");
    // release in order and check head contents
    #1 chk(head_idx == 1 && head_value == 32'hAAAA, "head lsn 1"); pop = 1; step();
    #1 chk(head_idx == 2 && head_done && head_used_fwd && head_value == 42 && head_fwd_ssn == 4 && !head_addr_v,
           "head lsn 2 used forward 42 with SSN 4, address still unknown");
    agu_en = 1; agu_idx = 2; agu_addr = 32'h200; step();
    #1 chk(!dc_req_valid, "completed load does not read the cache");
    pop = 1; step();
    #1 chk(head_idx == 3 && head_value == 32'h3333 && !head_used_fwd, "head lsn 3 from cache"); pop = 1; step();
    #1 chk(head_idx == 0 && head_done && head_used_fwd && head_value == 77 && head_fwd_ssn == 9, "head lsn 4 from early forward");
    pop = 1; step();
    // 5: forward into a load that does not wait
    alloc(5, 0, 9); step();
    fwd_en = 1; fwd_idx = 1; fwd_data = 55; fwd_ssn = 10; #1 chk(!fwd_wb_valid, "non-waiting load ignores forward");
    step(); agu_en = 1; agu_idx = 1; agu_addr = 32'h500; step();
    #1 chk(dc_req_valid && dc_req_addr == 32'h500, "non-waiting load reads cache"); step();
    dc_rsp_data = 32'h5555; step();
    #1 chk(head_done && head_value == 32'h5555 && !head_used_fwd, "ignored forward left value alone");
    // 6: two loads, the younger gets its address first, both ready together
    alloc(6, 0, 9); step(); alloc(7, 0, 9); step();
    agu_en = 1; agu_idx = 3; agu_addr = 32'h700; step();
    #1 chk(dc_req_valid && dc_req_addr == 32'h700, "only ready load goes");
    agu_en = 1; agu_idx = 2; agu_addr = 32'h600; step();
    dc_rsp_data = 32'h7777;
    #1 chk(dc_wb_valid && dc_wb_idx == 3, "younger load data");
    chk(dc_req_valid && dc_req_addr == 32'h600, "older load now issues");
    step();
    // 7: flush
    flush = 1; flush_next_lsn = 10; step();
    #1 chk(!head_valid && ready && head_idx == 2 && !dc_req_valid && !dc_wb_valid, "flush empties, restarts at LSN 10");
    alloc(10, 1, 9); #1 chk(!alloc_hit, "flush cleared forwarded values"); step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
