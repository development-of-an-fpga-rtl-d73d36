// tb_an_manipulation: sends frames 1 and 2 (46 words each) as data_rdy pulses with the path enabled, plus words for another path; N and every sample An must come out in order, header words must not, frame_done must mark the last sample.
module tb_an_manipulation;
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
  logic [15:0] input_data, an, total_n; logic data_rdy, path_en, an_valid, word_stb, frame_done;
  logic [7:0] word_idx;
  int got_n = 0, dones = 0;
  logic [15:0] got [$];
  an_manipulation dut (.clk, .rst, .input_data, .data_rdy, .path_en, .an, .an_valid, .total_n,
                       .word_idx, .word_stb, .frame_done);
  always @(posedge clk) if (!rst) begin
    if (an_valid) got.push_back(an);
    if (frame_done) dones++;
  end
  task automatic send_frame(input int id, input bit en);
    path_en = en;
    for (int w = 0; w < 46; w++) begin
      repeat (5) @(negedge clk);
      input_data = frame_word(id, w); data_rdy = 1;
      @(negedge clk); data_rdy = 0; input_data = 16'hDEAD;
    end
    repeat (4) @(negedge clk);
    path_en = 0;
    repeat (4) @(negedge clk);
  endtask
  initial begin
    sample_arr_t s;
    input_data = 0; data_rdy = 0; path_en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 1; f <= 2; f++) begin
      got.delete();
      send_frame(3, 0);                      // another path's frame: ignored
      check(got.size() == 0, "no samples while path disabled");
      send_frame(f, 1);
      s = frame_by_id(f);
      check(total_n == 16'd40, $sformatf("N=%0d", total_n));
      check(got.size() == 40, $sformatf("frame %0d: %0d samples", f, got.size()));
      for (int i = 0; i < 40 && i < got.size(); i++)
        check(got[i] == s[i], $sformatf("frame %0d A%0d=%0d exp %0d", f, i, got[i], s[i]));
      check(dones == f, $sformatf("frame_done count %0d", dones));
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
