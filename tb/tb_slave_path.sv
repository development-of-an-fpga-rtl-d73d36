// tb_slave_path: a slave path: the master's PQ_phase stream (reference values, as the master path writes them) precedes each frame; frames 2 and 4 must give 968 and 954 (references 968.45 and 954.25), one result per frame, 16 cycles after the last word (7 + 5 + 4); a frame for another path in between must be ignored. Every per-sample product inside the path must equal An times the stored PQ_phase exactly, in sample order.
module tb_slave_path;
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
  word_t data_in; logic data_rdy, path_en, pq_valid, txd_start, pq_empty, pq_full; pq_t pq_phase; result_t txd_data;
  int cyc = 0, last_word_t = 0, res_t = 0, starts = 0;
  slave_path dut (.clk, .rst, .data_in, .data_rdy, .path_en, .pq_phase, .pq_valid, .txd_data, .txd_start, .pq_empty, .pq_full);
  // per-sample products seen at the algorithm output, checked against the frame
  acfm_t prods [$];
  always @(posedge clk) if (!rst && dut.u_algo.rdy_algo) prods.push_back(dut.u_algo.acfm);
  task automatic check_products(input int id);
    sample_arr_t s;
    s = frame_by_id(id);
    check(prods.size() == 40, $sformatf("frame %0d: %0d products", id, prods.size()));
    for (int i = 0; i < 40 && i < prods.size(); i++) begin
      acfm_t e;
      e = acfm_t'($signed({1'b0, s[i]})) * acfm_t'(pq_t'($rtoi(pq_ref(i) * 4294967296.0)));
      check(prods[i] == e, $sformatf("frame %0d product %0d", id, i));
    end
    prods.delete();
  endtask
  always @(posedge clk) begin
    cyc++;
    if (!rst && txd_start) begin res_t = cyc; starts++; end
  end
  task automatic frame(input int id, input bit en);
    path_en = en;
    for (int w = 0; w < 46; w++) begin
      repeat (40) @(negedge clk);
      data_in = frame_word(id, w); data_rdy = 1; last_word_t = cyc + 1;
      // the master writes PQ_phase of sample w-6 while its own frame runs; here
      // the stream is written during the other path's frame
      @(negedge clk); data_rdy = 0;
      if (!en && w >= 6) begin
        pq_phase = pq_t'($rtoi(pq_ref(w - 6) * 4294967296.0)); pq_valid = 1;
        @(negedge clk); pq_valid = 0;
      end
    end
    repeat (30) @(negedge clk);
    path_en = 0;
    repeat (10) @(negedge clk);
  endtask
  initial begin
    data_in = 0; data_rdy = 0; path_en = 0; pq_valid = 0; pq_phase = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    frame(1, 0);
    check(starts == 0, "other path's frame ignored");
    frame(2, 1);
    check(starts == 1, "one result");
    check(txd_data == 16'sd968, $sformatf("frame 2 result %0d", txd_data));
    check(res_t - last_word_t == 16, $sformatf("result %0d cycles after last word", res_t - last_word_t));
    check(pq_empty, "PQ_phase buffer used up");
    check_products(2);
    frame(3, 0);
    frame(4, 1);
    check(starts == 2, "two results");
    check(txd_data == 16'sd954, $sformatf("frame 4 result %0d", txd_data));
    check_products(4);
    finish();
  end
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
