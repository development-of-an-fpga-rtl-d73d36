// tb_delay_line: random words through the 24-deep shifter; the output must be the word from 24 cycles earlier.
module tb_delay_line;
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
  logic [15:0] d, q;
  logic [15:0] hist [$];
  delay_line dut (.clk, .rst, .d, .q);
  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (hist.size() >= 24) check(q == hist[hist.size()-24], $sformatf("t=%0d q=%0d", t, q));
      d = 16'($urandom);
      hist.push_back(d);
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
