// tb_fnf_commit: directed cases for in-order commit. Non-memory retirement;
// store retirement (cache, SSBF and SPCT writes, commit SSN); loads cleared
// by the SSBF without re-execution (cache path and forwarded path);
// re-execution that finds the same value; and the worked misforwarding
// example: the load at PC 0x400C with LSN 28 re-executes, finds a wrong
// value, flushes, and the SPCT entry (MRDL 26, PC 0x4000) trains LDP[0x4000]
// to distance 2 and LCP[0x400C] to one. A final case trains the LCP to zero
// when the last store to the address committed before the load dispatched.
`timescale 1ns/1ps
module tb_fnf_commit;
  import fnf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rob_valid, rob_addr_v, rob_data_v, rob_done, rob_pop;
  op_kind_e rob_kind, ret_kind;
  word_t rob_pc, rob_addr, rob_data;
  seq_t rob_ssn, rob_mrdl;
  logic lq_valid, lq_done, lq_addr_v, lq_used_fwd, lq_pop;
  word_t lq_addr, lq_value, lq_pc;
  seq_t lq_fwd_ssn, lq_ssn_nvul, lq_lsn;
  word_t ssbf_rd_addr, ssbf_wr_addr, spct_rd_addr, spct_rd_pc, spct_wr_addr, spct_wr_pc;
  seq_t ssbf_rd_ssn, ssbf_wr_ssn, spct_rd_mrdl, spct_wr_mrdl;
  logic ssbf_rd_tag_match, ssbf_wr_en, spct_rd_valid, spct_wr_en;
  logic ldp_wr_en, lcp_wr_en, lcp_wr_use_fwd, dc_wr_en, rx_req_valid;
  word_t ldp_wr_pc, lcp_wr_pc, dc_wr_addr, dc_wr_data, rx_req_addr, rx_rsp_data;
  logic [7:0] ldp_wr_dist;
  seq_t commit_ssn, flush_next_lsn, flush_next_ssn;
  logic flush, ret_valid, ret_reexec, ret_used_fwd;
  word_t ret_pc, ret_addr, ret_data;
  fnf_commit dut (.*);
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic step(); @(posedge clk); @(negedge clk); endtask
  task automatic load_head(word_t pc, seq_t lsn, word_t a, word_t v, bit uf, seq_t fssn, seq_t nvul);
    rob_valid = 1; rob_kind = OP_LOAD; rob_pc = pc;
    lq_valid = 1; lq_done = 1; lq_addr_v = 1; lq_addr = a; lq_value = v; lq_used_fwd = uf;
    lq_fwd_ssn = fssn; lq_ssn_nvul = nvul; lq_lsn = lsn; lq_pc = pc;
  endtask
  initial begin
    rob_valid = 0; rob_kind = OP_ALU; rob_pc = 0; rob_addr = 0; rob_data = 0; rob_ssn = 0; rob_mrdl = 0;
    {rob_addr_v, rob_data_v, rob_done, lq_valid, lq_done, lq_addr_v, lq_used_fwd} = '0;
    lq_addr = 0; lq_value = 0; lq_pc = 0; lq_fwd_ssn = 0; lq_ssn_nvul = 0; lq_lsn = 0;
    ssbf_rd_ssn = 0; ssbf_rd_tag_match = 0; spct_rd_valid = 0; spct_rd_mrdl = 0; spct_rd_pc = 0;
    rx_rsp_data = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // ALU not done, then done
    rob_valid = 1; rob_kind = OP_ALU; rob_done = 0; #1 chk(!rob_pop && !ret_valid, "ALU waits");
    rob_done = 1; #1 chk(rob_pop && ret_valid && !dc_wr_en, "ALU retires"); step();
    // store
    rob_kind = OP_STORE; rob_pc = 32'h4000; rob_addr = 32'hA0; rob_data = 99; rob_ssn = 27; rob_mrdl = 26;
    rob_addr_v = 1; rob_data_v = 0; #1 chk(!rob_pop, "store waits for its data");
    rob_data_v = 1; #1;
    chk(rob_pop && dc_wr_en && dc_wr_addr == 32'hA0 && dc_wr_data == 99, "store writes cache");
    chk(ssbf_wr_en && ssbf_wr_addr == 32'hA0 && ssbf_wr_ssn == 27, "store writes SSBF");
    chk(spct_wr_en && spct_wr_addr == 32'hA0 && spct_wr_mrdl == 26 && spct_wr_pc == 32'h4000, "store writes SPCT");
    step(); #1 chk(commit_ssn == 27, "commit SSN");
    // cache-path load, SSBF older than its window: no re-execution
    load_head(32'h4008, 20, 32'hB0, 5, 0, 0, 27); ssbf_rd_ssn = 27; ssbf_rd_tag_match = 1;
    #1 chk(ssbf_rd_addr == 32'hB0 && rob_pop && lq_pop && !rx_req_valid && ret_data == 5 && !ret_reexec,
           "load cleared by SSBF");
    step();
    // forwarded load whose SSN matches the SSBF
    load_head(32'h400C, 21, 32'hA0, 99, 1, 27, 20); ssbf_rd_ssn = 27; ssbf_rd_tag_match = 1;
    #1 chk(rob_pop && !rx_req_valid && ret_used_fwd, "forwarded load cleared by SSN match"); step();
    // forwarded load, same SSN but another address in the entry
    ssbf_rd_tag_match = 0; #1 chk(!rob_pop && rx_req_valid && rx_req_addr == 32'hA0, "tag mismatch re-executes");
    step(); rx_rsp_data = 99;
    #1 chk(rob_pop && lq_pop && ret_reexec && !flush && ret_data == 99, "re-execution equal, no flush"); step();
    // worked example: load 400C, LSN 28, read cache before the store committed
    load_head(32'h400C, 28, 32'hA0, 13, 0, 0, 20); ssbf_rd_ssn = 27; ssbf_rd_tag_match = 1;
    spct_rd_valid = 1; spct_rd_mrdl = 26; spct_rd_pc = 32'h4000;
    #1 chk(rx_req_valid && !rob_pop, "vulnerable load re-executes");
    step(); rx_rsp_data = 99; #1;
    chk(rob_pop && lq_pop && flush && ret_data == 99 && flush_next_lsn == 29 && flush_next_ssn == 28, "flush");
    chk(ldp_wr_en && ldp_wr_pc == 32'h4000 && ldp_wr_dist == 2, "LDP[4000] = 2");
    chk(lcp_wr_en && lcp_wr_pc == 32'h400C && lcp_wr_use_fwd, "LCP[400C] = 1");
    step(); #1 chk(!flush && !lcp_wr_en, "one-cycle flush");
    // forwarded wrong value, store to this address committed long before
    load_head(32'h4010, 40, 32'hA0, 1, 1, 30, 27); ssbf_rd_ssn = 27; ssbf_rd_tag_match = 1;
    #1 chk(rx_req_valid, "wrong SSN re-executes"); step(); rx_rsp_data = 99; #1;
    chk(flush && lcp_wr_en && !lcp_wr_use_fwd && !ldp_wr_en, "LCP trained to read the cache");
    step();
    rob_valid = 0; lq_valid = 0; #1 chk(!ret_valid && !rob_pop, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
