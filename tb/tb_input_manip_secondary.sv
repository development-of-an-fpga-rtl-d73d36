// tb_input_manip_secondary: frame 2 through the slave input data manipulation; at every algo_start pulse 'an' must hold the next sample of the frame, 40 in all, and total_n must read 40. A frame for another path in between (path_en low) must start nothing.
module tb_input_manip_secondary;
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
  import tb_frames_pkg::*;
  logic [15:0] data_in, an, total_n; logic data_rdy, path_en, algo_start, frame_done;
  logic [15:0] got [$];
  input_manip_secondary dut (.clk, .rst, .data_in, .data_rdy, .path_en, .an, .algo_start, .total_n, .frame_done);
  always @(posedge clk) if (!rst && algo_start) got.push_back(an);
  initial begin
    sample_arr_t s;
    data_in = 0; data_rdy = 0; path_en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 2; f <= 4; f++) begin
      got.delete();
      path_en = (f != 3);
      for (int w = 0; w < 46; w++) begin
        repeat (15) @(negedge clk);
        data_in = frame_word(f, w); data_rdy = 1;
        @(negedge clk); data_rdy = 0;
      end
      repeat (15) @(negedge clk);
      path_en = 0;
      repeat (5) @(negedge clk);
      if (f == 3) begin
        check(got.size() == 0, $sformatf("%0d starts for another path's frame", got.size()));
        continue;
      end
      s = frame_by_id(f);
      check(total_n == 16'd40, "N");
      check(got.size() == 40, $sformatf("%0d starts", got.size()));
      for (int i = 0; i < 40 && i < got.size(); i++)
        check(got[i] == s[i], $sformatf("A%0d=%0d exp %0d", i, got[i], s[i]));
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
