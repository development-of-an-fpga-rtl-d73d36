// tb_master_path: the master path fed with whole frames as SPI words (one every 256 cycles, the 6.25 MHz rate). Frames 1 and 3 must give 968 (reference 968.04 and 967.57); the exported PQ_phase stream must hold 40 values matching the formula to 1e-6; the result must follow the last word by 40 cycles.
module tb_master_path;
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
  import tb_frames_pkg::*;
  word_t data_in; logic data_rdy, path_en, pq_valid, txd_start; pq_t pq_phase; result_t txd_data;
  int cyc = 0, last_word_t = 0, res_t = 0, starts = 0;
  pq_t pqs [$];
  master_path dut (.clk, .rst, .data_in, .data_rdy, .path_en, .pq_phase, .pq_valid, .txd_data, .txd_start);
  always @(posedge clk) begin
    cyc++;
    if (!rst && pq_valid) pqs.push_back(pq_phase);
    if (!rst && txd_start) begin res_t = cyc; starts++; end
  end
  task automatic frame(input int id);
    path_en = 1;
    for (int w = 0; w < 46; w++) begin
      repeat (255) @(negedge clk);
      data_in = frame_word(id, w); data_rdy = 1; last_word_t = cyc + 1;
      @(negedge clk); data_rdy = 0;
    end
    repeat (60) @(negedge clk);
    path_en = 0;
    repeat (10) @(negedge clk);
  endtask
  initial begin
    int expect_v [5] = '{0, 968, 968, 968, 954};
    data_in = 0; data_rdy = 0; path_en = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2; k++) begin
      int f;
      f = (k == 0) ? 1 : 3;
      pqs.delete();
      frame(f);
      check(starts == k + 1, $sformatf("frame %0d: result pulses %0d", f, starts));
      check(txd_data == 16'(expect_v[f]), $sformatf("frame %0d: result %0d exp %0d (reference %f)", f, txd_data, expect_v[f], acfm_ref(f)));
      check(res_t - last_word_t == 40, $sformatf("result %0d cycles after last word", res_t - last_word_t));
      check(pqs.size() == 40, $sformatf("%0d PQ_phase values", pqs.size()));
      for (int i = 0; i < 40 && i < pqs.size(); i++) begin
        real g;
        g = real'(pqs[i]) / 4294967296.0;
        check(g - pq_ref(i) < 1e-6 && pq_ref(i) - g < 1e-6, $sformatf("PQ_phase(%0d) = %f exp %f", i, g, pq_ref(i)));
      end
    end
    finish();
  end
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
