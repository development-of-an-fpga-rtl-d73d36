// tb_algo_start_control: drives a frame's data_rdy pulses with the path enabled; algo_start must pulse exactly 7 cycles after each of the 40 sample words and never for header words or while the path is disabled.
module tb_algo_start_control;
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
  logic data_rdy, path_en, algo_start; logic [15:0] total_sample;
  int rdy_time [$]; int start_time [$];
  int cyc = 0;
  algo_start_control dut (.clk, .rst, .data_rdy, .path_en, .total_sample, .algo_start);
  always @(posedge clk) begin
    cyc++;
    if (!rst && algo_start) start_time.push_back(cyc);
  end
  task automatic send(input int words, input bit en, input bit rec);
    path_en = en;
    for (int w = 0; w < words; w++) begin
      repeat (12) @(negedge clk);
      data_rdy = 1;
      if (rec && w >= 6) rdy_time.push_back(cyc + 1);
      @(negedge clk); data_rdy = 0;
    end
    repeat (12) @(negedge clk);
    path_en = 0;
    repeat (4) @(negedge clk);
  endtask
  initial begin
    data_rdy = 0; path_en = 0; total_sample = 16'd40;
    repeat (3) @(posedge clk);
    rst <= 0;
    send(46, 0, 0);
    check(start_time.size() == 0, "no start while disabled");
    for (int f = 0; f < 2; f++) begin
      rdy_time.delete(); start_time.delete();
      send(46, 1, 1);
      check(start_time.size() == 40, $sformatf("starts %0d", start_time.size()));
      for (int i = 0; i < 40 && i < start_time.size(); i++)
        check(start_time[i] - rdy_time[i] == 7, $sformatf("sample %0d delay %0d", i, start_time[i] - rdy_time[i]));
    end
    finish();
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
