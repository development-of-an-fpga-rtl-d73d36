// tb_algo_cycle_count: random data-ready pulses through the 29-cycle (master) and 5-cycle (slave) chains; each output must equal the input exactly LATENCY cycles earlier.
module tb_algo_cycle_count;
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
  logic rdy_nd, rdy29, rdy5;
  logic hist [$];
  algo_cycle_count dut (.clk, .rst, .rdy_nd, .rdy_algo(rdy29));
  algo_cycle_count #(.LATENCY(5)) dut5 (.clk, .rst, .rdy_nd, .rdy_algo(rdy5));
  initial begin
    int pulses = 0;
    rdy_nd = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (hist.size() > 29) check(rdy29 == hist[hist.size()-29], $sformatf("29-chain at t=%0d", t));
      if (hist.size() > 5)  check(rdy5  == hist[hist.size()-5],  $sformatf("5-chain at t=%0d", t));
      rdy_nd = (t < 300) && ($urandom_range(0, 3) == 0);
      if (t == 10) rdy_nd = 1;
      pulses += rdy_nd;
      hist.push_back(rdy_nd);
    end
    check(pulses > 10, "enough pulses");
    finish();
  end
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
