// tb_sim_data_gen: a receiver in the testbench follows SCLK/MOSI/SSEL of the generator. Each round must carry one frame of 46 words to each path 0..7 in order, every word equal to what word_in returned for that (path, word_idx), SCLK 16 clocks per bit with SSEL low for the whole frame and at least GAP_CYCLES high between frames; frame_sent and round_sent must count the frames and rounds; with enable low no frame may start.
module tb_sim_data_gen;
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
  logic enable; word_t word_in; logic [7:0] word_idx; logic [2:0] path, address;
  logic mosi, sclk, ssel, frame_sent, round_sent;
  int frames_seen = 0, frame_pulses = 0, round_pulses = 0, bad_period = 0, gap_short = 0;
  int words_in_frame = 0, bits = 0, last_fall = -1, cyc = 0, ssel_hi_since = 0;
  word_t sh;
  int exp_path = 0;
  sim_data_gen dut (.clk, .rst, .enable, .word_in, .word_idx, .path, .mosi, .sclk, .ssel, .address, .frame_sent, .round_sent);
  // word contents: a function of path and index
  assign word_in = {5'(path), word_idx, 3'(path)};
  logic sclk_q = 1, ssel_q = 1;
  always @(posedge clk) begin
    cyc++;
    sclk_q <= sclk; ssel_q <= ssel;
    if (!rst) begin
      if (frame_sent) frame_pulses++;
      if (round_sent) round_pulses++;
      if (ssel_q && !ssel) begin                       // frame starts
        if (frames_seen > 0 && cyc - ssel_hi_since < 64) gap_short++;
        words_in_frame = 0; bits = 0; last_fall = -1;
        check(address == 3'(exp_path), $sformatf("frame for path %0d, expected %0d", address, exp_path));
      end
      if (!ssel_q && ssel) begin                       // frame ends
        ssel_hi_since = cyc;
        frames_seen++;
        check(words_in_frame == 46, $sformatf("frame %0d carried %0d words", frames_seen, words_in_frame));
        exp_path = (exp_path + 1) % 8;
      end
      if (!ssel && sclk_q && !sclk) begin              // falling SCLK: sample
        if (bits % 16 != 0 && last_fall >= 0 && cyc - last_fall != 16) bad_period++;
        last_fall = cyc;
        sh = {sh[14:0], mosi};
        bits++;
        if (bits % 16 == 0) begin
          check(sh == {5'(address), 8'(words_in_frame), 3'(address)},
                $sformatf("path %0d word %0d = %h", address, words_in_frame, sh));
          words_in_frame++;
        end
      end
      if (ssel && sclk_q && !sclk) bad_period += 1000;  // SCLK must idle while deselected
    end
  end
  initial begin
    enable = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2000) @(posedge clk);
    check(frames_seen == 0 && ssel, "nothing sent while disabled");
    enable = 1;
    wait (round_pulses == 2);
    @(posedge clk);
    enable = 0;
    repeat (30000) @(posedge clk);
    check(frames_seen == 16, $sformatf("%0d frames in two rounds", frames_seen));
    check(frame_pulses == 16, $sformatf("%0d frame_sent pulses", frame_pulses));
    check(round_pulses == 2, "two round_sent pulses");
    check(bad_period == 0, $sformatf("SCLK period errors %0d", bad_period));
    check(gap_short == 0, "gap between frames at least 64 clocks");
    finish();
  end
  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
