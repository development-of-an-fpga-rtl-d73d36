// tb_input_manip_primary: frame 1 through the master input data manipulation: beta, N, theta = Fc*2^32/Fs (0.025 turn for 50 kHz at 2 MHz) and the 40 samples at algo_start must all come out right; a second frame with Fc = 100 kHz checks the Fc/Fs words are reassembled low half first.
module tb_input_manip_primary;
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
  logic [15:0] data_in, an, total_n, beta; logic data_rdy, path_en, algo_start, n_ready, hdr_ready, frame_done;
  logic [31:0] theta;
  logic [15:0] got [$];
  int hdr_pulses = 0, n_pulses = 0;
  input_manip_primary dut (.clk, .rst, .data_in, .data_rdy, .path_en, .an, .algo_start, .total_n,
                           .n_ready, .beta, .theta, .hdr_ready, .frame_done);
  always @(posedge clk) if (!rst) begin
    if (algo_start) got.push_back(an);
    if (hdr_ready) hdr_pulses++;
    if (n_ready) begin
      n_pulses++;
      check(total_n == 16'd40, $sformatf("total_n %0d when n_ready pulses", total_n));
    end
  end
  task automatic frame(input int id, input int fc);
    path_en = 1;
    for (int w = 0; w < 46; w++) begin
      repeat (80) @(negedge clk);
      data_in = frame_word(id, w, 40, 260, fc); data_rdy = 1;
      @(negedge clk); data_rdy = 0;
    end
    repeat (15) @(negedge clk);
    path_en = 0;
    repeat (5) @(negedge clk);
  endtask
  initial begin
    sample_arr_t s;
    longint exp_theta;
    data_in = 0; data_rdy = 0; path_en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    frame(1, 50000);
    s = frame_by_id(1);
    check(beta == 16'd260, $sformatf("beta %0d", beta));
    check(total_n == 16'd40, "N");
    exp_theta = (64'd50000 << 32) / 64'd2000000;
    check(theta == 32'(exp_theta), $sformatf("theta %0d exp %0d", theta, exp_theta));
    check(hdr_pulses == 1 && n_pulses == 1, "one header and one N pulse per frame");
    check(got.size() == 40, $sformatf("%0d samples", got.size()));
    for (int i = 0; i < 40 && i < got.size(); i++) check(got[i] == s[i], $sformatf("A%0d", i));
    frame(2, 100000 + 65536 * 3);
    exp_theta = (64'(100000 + 65536 * 3) << 32) / 64'd2000000;
    check(theta == 32'(exp_theta), $sformatf("theta2 %0d exp %0d", theta, exp_theta));
    finish();
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
