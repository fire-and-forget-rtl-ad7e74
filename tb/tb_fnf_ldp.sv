// tb_fnf_ldp: random writes and reads of the load distance predictor,
// compared with a reference array; includes the worked example in which the
// store at PC 0x4000 learns distance 2.
`timescale 1ns/1ps
module tb_fnf_ldp;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] rd_pc, wr_pc;
  logic [7:0] rd_dist, wr_dist;
  logic wr_en;
  fnf_ldp dut (.*);
  logic [7:0] ref_d [N];
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    wr_en = 0; wr_pc = 0; wr_dist = 0; rd_pc = 32'h4000;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) ref_d[i] = 0;
    @(negedge clk); #1 chk(rd_dist == 0, "reset gives no prediction");
    wr_en = 1; wr_pc = 32'h4000; wr_dist = 2;
    @(negedge clk); wr_en = 0; rd_pc = 32'h4000; #1 chk(rd_dist == 2, "example distance");
    ref_d[(32'h4000 >> 2) & (N-1)] = 2;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_pc = 32'h4000 + 4 * ($urandom % 256); wr_dist = $urandom;
      rd_pc = (t % 2 == 0) ? wr_pc : 32'h4000 + 4 * ($urandom % 256);
      #1 chk(rd_dist == ref_d[rd_pc[11:2]], $sformatf("read pc %h", rd_pc));
      @(posedge clk); if (wr_en) ref_d[wr_pc[11:2]] = wr_dist;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
