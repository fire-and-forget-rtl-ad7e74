// tb_fnf_lcp: random writes and reads of the load consumption predictor,
// compared with a reference bit array; checks the all-zero reset and the
// PC-to-entry mapping (PC word address modulo the table size).
`timescale 1ns/1ps
module tb_fnf_lcp;
  localparam int N = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] rd_pc, wr_pc;
  logic rd_use_fwd, wr_en, wr_use_fwd;
  fnf_lcp dut (.*);
  bit ref_bits [N];
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    wr_en = 0; wr_pc = 0; wr_use_fwd = 0; rd_pc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) ref_bits[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_pc = {$urandom % 4, 12'h0, 2'b00} | (($urandom % 64) << 2) | 32'h4000;
      wr_use_fwd = $urandom % 2;
      rd_pc = (t % 3 == 0) ? wr_pc : ({$urandom} & 32'hFFFF_FFFC);
      #1 chk(rd_use_fwd == ref_bits[rd_pc[13:2]], $sformatf("read pc %h", rd_pc));
      @(posedge clk); if (wr_en) ref_bits[wr_pc[13:2]] = wr_use_fwd;
    end
    // aliasing: PCs N words apart share an entry
    @(negedge clk); wr_en = 1; wr_pc = 32'h400C; wr_use_fwd = 1;
    @(negedge clk); wr_en = 0; rd_pc = 32'h400C + 4 * N; #1 chk(rd_use_fwd == 1, "alias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
