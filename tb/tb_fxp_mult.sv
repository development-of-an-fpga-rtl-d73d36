// tb_fxp_mult: random signed operands through the default (3.32 x 2.30 -> 3.32) multiplier; result compared with the exact product shifted right by 30, two-cycle latency.
module tb_fxp_mult;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  logic signed [34:0] a; logic signed [31:0] b; logic signed [34:0] p;
  logic signed [34:0] ha [$]; logic signed [31:0] hb [$];
  fxp_mult dut (.clk, .rst, .a, .b, .p);
  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (ha.size() >= 2) begin
        logic signed [66:0] e;
        e = (67'(ha[ha.size()-2]) * 67'(hb[hb.size()-2])) >>> 30;
        check(p == 35'(e), $sformatf("t=%0d %0d*%0d -> %0d exp %0d", t, ha[ha.size()-2], hb[hb.size()-2], p, 35'(e)));
      end
      a = 35'(signed'({$urandom, $urandom})) >>> $urandom_range(0, 20);
      b = signed'($urandom) >>> $urandom_range(0, 2);
      ha.push_back(a); hb.push_back(b);
    end
    finish();
  end
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
