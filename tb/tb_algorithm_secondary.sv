// tb_algorithm_secondary: the slave algorithm module: the master's 40 PQ_phase values (reference values) are written into the buffer, then frame 4's samples arrive; each ACFM must equal An*PQ_phase exactly and come 5 cycles after nd. Two frames; the buffer must be empty after each.
module tb_algorithm_secondary;
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
  word_t an; logic nd, wr_pq, rdy_algo, pq_empty, pq_full; pq_t pq_phase_in; acfm_t acfm;
  int cyc = 0; int in_t [$]; int out_t [$]; acfm_t res [$];
  algorithm_secondary dut (.clk, .rst, .an, .nd, .pq_phase_in, .wr_pq, .acfm, .rdy_algo, .pq_empty, .pq_full);
  always @(posedge clk) begin
    cyc++;
    if (!rst && rdy_algo) begin out_t.push_back(cyc); res.push_back(acfm); end
  end
  initial begin
    sample_arr_t s;
    pq_t pqv [40];
    an = 0; nd = 0; wr_pq = 0; pq_phase_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 40; i++) pqv[i] = pq_t'($rtoi(pq_ref(i) * 4294967296.0));
    for (int f = 3; f <= 4; f++) begin
      s = frame_by_id(f);
      in_t.delete(); out_t.delete(); res.delete();
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); pq_phase_in = pqv[i]; wr_pq = 1;
      end
      @(negedge clk); wr_pq = 0;
      check(!pq_empty, "buffer holds the master's values");
      for (int i = 0; i < 40; i++) begin
        repeat (3) @(negedge clk);
        an = s[i]; nd = 1; in_t.push_back(cyc + 1);
        @(negedge clk); nd = 0;
      end
      repeat (10) @(negedge clk);
      check(pq_empty, "buffer empty after the frame");
      check(res.size() == 40, $sformatf("%0d results", res.size()));
      for (int i = 0; i < 40 && i < res.size(); i++) begin
        check(res[i] == acfm_t'(longint'(s[i]) * longint'(pqv[i])), $sformatf("ACFM(%0d)", i));
        check(out_t[i] - in_t[i] == 5, $sformatf("latency %0d", out_t[i] - in_t[i]));
      end
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
