// tb_fnf_spct: the store PC table. Checks the worked example (the store at
// PC 0x4000 with MRDL 26 commits to address X; a load to X reads back 26
// and 0x4000), then random writes and reads against a reference array.
`timescale 1ns/1ps
module tb_fnf_spct;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_valid;
  logic [31:0] wr_addr, wr_mrdl, wr_pc, rd_addr, rd_mrdl, rd_pc;
  fnf_spct dut (.*);
  bit r_v [N]; logic [31:0] r_m [N]; logic [31:0] r_p [N];
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    wr_en = 0; wr_addr = 0; wr_mrdl = 0; wr_pc = 0; rd_addr = 32'h0000_0a00;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) r_v[i] = 0;
    @(negedge clk); #1 chk(!rd_valid, "empty after reset");
    wr_en = 1; wr_addr = 32'h0000_0a00; wr_mrdl = 26; wr_pc = 32'h4000;
    @(negedge clk); wr_en = 0; #1 chk(rd_valid && rd_mrdl == 26 && rd_pc == 32'h4000, "example X");
    r_v[10'h280] = 1; r_m[10'h280] = 26; r_p[10'h280] = 32'h4000;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_addr = 4 * ($urandom % 2048); wr_mrdl = $urandom; wr_pc = $urandom;
      rd_addr = (t % 2 == 0) ? wr_addr : 4 * ($urandom % 2048);
      #1 begin
        automatic int i = rd_addr[11:2];
        chk(rd_valid == r_v[i] && (!r_v[i] || (rd_mrdl == r_m[i] && rd_pc == r_p[i])),
            $sformatf("read %h", rd_addr));
      end
      @(posedge clk);
      if (wr_en) begin r_v[wr_addr[11:2]] = 1; r_m[wr_addr[11:2]] = wr_mrdl; r_p[wr_addr[11:2]] = wr_pc; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
