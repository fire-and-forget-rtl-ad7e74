// tb_fnf_lqi_calc: the predicted LQ index. With a 6-entry LQ, MRDL 49 and
// distance 2 give predicted LSN 51 and LQ index 3 (the worked example);
// random cases are checked for a 6-entry and the default 32-entry LQ.
`timescale 1ns/1ps
module tb_fnf_lqi_calc;
  logic [31:0] mrdl, p6, p32;
  logic [7:0] distance;
  logic v6, v32;
  logic [2:0] l6;
  logic [4:0] l32;
  fnf_lqi_calc #(.LQ_ENTRIES(6)) u6 (.mrdl, .distance, .pred_lsn(p6), .lqi_valid(v6), .lqi(l6));
  fnf_lqi_calc u32 (.mrdl, .distance, .pred_lsn(p32), .lqi_valid(v32), .lqi(l32));
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    mrdl = 49; distance = 2; #1;
    chk(p6 == 51 && v6 && l6 == 3, "example 49+2 -> 51 -> index 3");
    distance = 0; #1 chk(!v6 && !v32, "distance 0 means no prediction");
    for (int t = 0; t < 5000; t++) begin
      mrdl = $urandom; distance = $urandom; #1;
      chk(p6 == mrdl + distance && l6 == (mrdl + distance) % 6 && v6 == (distance != 0), "lq6");
      chk(p32 == mrdl + distance && l32 == 5'((mrdl + distance) & 31) && v32 == (distance != 0), "lq32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
