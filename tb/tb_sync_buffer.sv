// tb_sync_buffer: the eight paths report one after the other (and in random order); sci_start must come exactly once, the cycle after the last report, with all eight results on the outputs; a repeated pulse from one path must not start the links.
module tb_sync_buffer;
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
  import acfm_pkg::*;
  result_t path_data [8]; logic [7:0] path_rdy; result_t out_data [8]; logic sci_start;
  int starts = 0;
  sync_buffer dut (.clk, .rst, .path_data, .path_rdy, .out_data, .sci_start);
  always @(posedge clk) if (!rst && sci_start) starts++;
  task automatic report(input int i, input result_t v);
    @(negedge clk); path_data[i] = v; path_rdy = 8'(1) << i;
    @(negedge clk); path_rdy = 0; path_data[i] = 16'h5555;
    @(negedge clk);                         // let a resulting sci_start be counted
  endtask
  initial begin
    int order [8];
    path_rdy = 0;
    foreach (path_data[i]) path_data[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 4; r++) begin
      int s0;
      foreach (order[i]) order[i] = i;
      if (r > 0) order.shuffle();
      s0 = starts;
      for (int k = 0; k < 8; k++) begin
        report(order[k], result_t'(100 * r + order[k]));
        if (k == 3) report(order[k], result_t'(100 * r + order[k]));   // stray second pulse
        if (k < 7) check(starts == s0, $sformatf("round %0d: no start after %0d paths", r, k + 1));
      end
      check(starts == s0 + 1, $sformatf("round %0d: one start", r));
      for (int i = 0; i < 8; i++) check(out_data[i] == result_t'(100 * r + i), $sformatf("round %0d path %0d data", r, i));
      repeat (3) @(negedge clk);
      check(starts == s0 + 1, "no second start");
    end
    finish();
  end
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
