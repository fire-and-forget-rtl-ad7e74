// tb_fnf_ssbf: the store sequence Bloom filter. Random store commits and
// load reads against a reference of the last SSN and full address per
// entry; checks the SSN read and the exact-address tag match, including
// two addresses that share an entry.
`timescale 1ns/1ps
module tb_fnf_ssbf;
  localparam int N = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_tag_match;
  logic [31:0] wr_addr, wr_ssn, rd_addr, rd_ssn;
  fnf_ssbf dut (.*);
  logic [31:0] r_s [N]; logic [31:0] r_a [N];
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    wr_en = 0; wr_addr = 0; wr_ssn = 0; rd_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin r_s[i] = 0; r_a[i] = 4 * i; end
    @(negedge clk); rd_addr = 32'h100; #1 chk(rd_ssn == 0, "no store after reset");
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_addr = 4 * ($urandom % 64) + 32'h1000 * ($urandom % 3);
      wr_ssn = t + 1;
      rd_addr = 4 * ($urandom % 64) + 32'h1000 * ($urandom % 3);
      #1 begin
        automatic int i = rd_addr[11:2];
        chk(rd_ssn == r_s[i], $sformatf("ssn at %h", rd_addr));
        chk(rd_tag_match == (r_a[i] == rd_addr), $sformatf("tag at %h", rd_addr));
      end
      @(posedge clk);
      if (wr_en) begin r_s[wr_addr[11:2]] = wr_ssn; r_a[wr_addr[11:2]] = wr_addr; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
