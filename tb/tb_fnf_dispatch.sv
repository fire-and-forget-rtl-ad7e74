// tb_fnf_dispatch: random instruction stream with random ROB/LQ space and
// predictor answers. A reference model of the LSN and SSN counters checks
// acceptance, each load's LSN and LQ entry, each store's SSN, MRDL and
// predicted LQ index, the STA/STD cracking, and recovery after a flush.
`timescale 1ns/1ps
module tb_fnf_dispatch;
  import fnf_pkg::*;
  localparam int LQ = 32, ROB = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, rob_ready, lq_ready, lcp_use_fwd, flush, fire, use_fwd, lqi_valid;
  op_kind_e in_kind;
  logic [6:0] rob_idx;
  logic [7:0] ldp_dist;
  seq_t flush_next_lsn, flush_next_ssn, lsn, ssn_prev, ssn, mrdl;
  logic [4:0] lq_idx, lqi;
  logic [1:0] rs_valid;
  uop_kind_e rs_kind [2];
  logic [6:0] rs_rob_idx [2];
  logic [4:0] rs_lq_idx [2];
  fnf_dispatch dut (.*);
  int checks = 0, failures = 0, nl = 0, ns = 0;
  seq_t m_lsn = 1, m_ssn = 1;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    {in_valid, rob_ready, lq_ready, lcp_use_fwd, flush} = '0;
    in_kind = OP_ALU; rob_idx = 0; ldp_dist = 0; flush_next_lsn = 0; flush_next_ssn = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_valid = $urandom % 4 != 0;
      in_kind = op_kind_e'($urandom % 3);
      rob_ready = $urandom % 8 != 0; lq_ready = $urandom % 8 != 0;
      lcp_use_fwd = $urandom % 2; ldp_dist = ($urandom % 3 == 0) ? 0 : $urandom % 40;
      rob_idx = $urandom;
      flush = ($urandom % 200 == 0);
      flush_next_lsn = m_lsn - ($urandom % 4); flush_next_ssn = m_ssn - ($urandom % 3);
      #1;
      chk(in_ready == (rob_ready && (in_kind != OP_LOAD || lq_ready) && !flush), "ready");
      chk(fire == (in_valid && in_ready), "fire");
      chk(mrdl == m_lsn - 1 && ssn_prev == m_ssn - 1, "mrdl/ssn_prev");
      if (fire) begin
        chk(rs_rob_idx[0] == rob_idx, "rob idx");
        case (in_kind)
          OP_LOAD: begin
            nl++;
            chk(lsn == m_lsn && lq_idx == 5'(m_lsn % LQ) && use_fwd == lcp_use_fwd, "load numbering");
            chk(rs_valid == 2'b01 && rs_kind[0] == UOP_LD && rs_lq_idx[0] == lq_idx, "load uop");
          end
          OP_STORE: begin
            ns++;
            chk(ssn == m_ssn, "store ssn");
            chk(lqi_valid == (ldp_dist != 0), "lqi valid");
            if (ldp_dist != 0) chk(lqi == 5'((m_lsn - 1 + ldp_dist) % LQ), "lqi");
            chk(rs_valid == 2'b11 && rs_kind[0] == UOP_STA && rs_kind[1] == UOP_STD &&
                rs_rob_idx[1] == rob_idx && rs_lq_idx[1] == lqi, "store cracking");
          end
          default: chk(rs_valid == 2'b01 && rs_kind[0] == UOP_ALU && !lqi_valid, "alu uop");
        endcase
      end else chk(rs_valid == 2'b00, "no uop without fire");
      @(posedge clk);
      if (flush) begin m_lsn = flush_next_lsn; m_ssn = flush_next_ssn; end
      else if (fire && in_kind == OP_LOAD) m_lsn++;
      else if (fire && in_kind == OP_STORE) m_ssn++;
    end
    chk(nl > 100 && ns > 100, "stream covered loads and stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
