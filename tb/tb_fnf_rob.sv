// tb_fnf_rob: an 8-entry ROB driven with random allocation, STA, STD and
// ALU completions, retirement and flushes, against a queue model. Checks
// space, tail index, every head field, the STD's SSN lookup and that a
// flush retires the head and empties the rest.
`timescale 1ns/1ps
module tb_fnf_rob;
  import fnf_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready, alloc_en, sta_en, std_en, alu_done_en, head_valid, head_addr_v, head_data_v, head_done, pop, flush;
  logic [2:0] tail_idx, sta_idx, std_idx, alu_done_idx;
  op_kind_e alloc_kind, head_kind;
  word_t alloc_pc, sta_addr, std_data, head_pc, head_addr, head_data;
  logic [4:0] alloc_lq_idx, head_lq_idx;
  seq_t alloc_lsn, alloc_ssn, alloc_mrdl, std_ssn, head_lsn, head_ssn, head_mrdl;
  fnf_rob #(.ROB_ENTRIES(N)) dut (.*);
  typedef struct { op_kind_e k; word_t pc; logic [4:0] lq; seq_t lsn, ssn, mrdl;
                   word_t a; bit av; word_t d; bit dv; bit dn; } e_t;
  e_t m [N];
  int head = 0, cnt = 0, checks = 0, failures = 0, npop = 0, nfl = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic int live(int r); return ((r - head + N) % N) < cnt; endfunction
  initial begin
    {alloc_en, sta_en, std_en, alu_done_en, pop, flush} = '0;
    alloc_kind = OP_ALU; alloc_pc = 0; alloc_lq_idx = 0; alloc_lsn = 0; alloc_ssn = 0; alloc_mrdl = 0;
    sta_idx = 0; std_idx = 0; alu_done_idx = 0; sta_addr = 0; std_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      #1;
      chk(ready == (cnt < N) && head_valid == (cnt > 0) && tail_idx == 3'((head + cnt) % N), "occupancy");
      if (cnt > 0) begin
        automatic e_t h = m[head];
        chk(head_kind == h.k && head_pc == h.pc && head_lq_idx == h.lq && head_lsn == h.lsn &&
            head_ssn == h.ssn && head_mrdl == h.mrdl && head_addr_v == h.av && head_data_v == h.dv &&
            head_done == h.dn && (!h.av || head_addr == h.a) && (!h.dv || head_data == h.d), "head fields");
      end
      alloc_en = ready && ($urandom % 2);
      alloc_kind = op_kind_e'($urandom % 3); alloc_pc = $urandom; alloc_lq_idx = $urandom;
      alloc_lsn = $urandom; alloc_ssn = $urandom; alloc_mrdl = $urandom;
      sta_idx = $urandom; sta_en = live(sta_idx) && ($urandom % 3 == 0); sta_addr = $urandom;
      std_idx = $urandom; std_en = live(std_idx) && ($urandom % 3 == 0); std_data = $urandom;
      alu_done_idx = $urandom; alu_done_en = live(alu_done_idx) && ($urandom % 3 == 0);
      pop = head_valid && ($urandom % 3 == 0);
      flush = pop && ($urandom % 20 == 0);
      #1;
      if (std_en) chk(std_ssn == m[std_idx].ssn, "std ssn lookup");
      @(posedge clk);
      if (sta_en) begin m[sta_idx].a = sta_addr; m[sta_idx].av = 1; end
      if (std_en) begin m[std_idx].d = std_data; m[std_idx].dv = 1; end
      if (alu_done_en) m[alu_done_idx].dn = 1;
      if (alloc_en) m[(head + cnt) % N] = '{alloc_kind, alloc_pc, alloc_lq_idx, alloc_lsn, alloc_ssn,
                                           alloc_mrdl, 0, 0, 0, 0, 0};
      if (flush) begin head = (head + 1) % N; cnt = 0; nfl++; end
      else begin
        if (alloc_en) cnt++;
        if (pop) begin head = (head + 1) % N; cnt--; npop++; end
      end
    end
    chk(npop > 100 && nfl > 5, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
