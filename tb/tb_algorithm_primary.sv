// tb_algorithm_primary: the master algorithm module with P, Q and theta of the document's frames (N=40, beta=260 deg, Fc=50 kHz, Fs=2 MHz). Frame 2's samples enter both back to back (one per cycle) and spaced out; PQ_phase must match P*sin(R*i)+Q*cos(R*i) to 1e-6, ACFM must equal An*PQ_phase exactly, rdy_algo must come 29 cycles after rdy_input and pq_valid 27.
module tb_algorithm_primary;
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
  word_t an; logic rdy_input, frame_start, rdy_algo, pq_valid;
  phase_t theta; pq_t p, q, pq_phase; acfm_t acfm;
  int cyc = 0;
  int in_t [$]; int pq_t_q [$]; int out_t [$];
  pq_t pqs [$]; acfm_t acfms [$];
  algorithm_primary dut (.clk, .rst, .an, .rdy_input, .theta, .p, .q, .frame_start, .acfm, .rdy_algo, .pq_phase, .pq_valid);
  always @(posedge clk) begin
    cyc++;
    if (!rst && pq_valid) begin pq_t_q.push_back(cyc); pqs.push_back(pq_phase); end
    if (!rst && rdy_algo) begin out_t.push_back(cyc); acfms.push_back(acfm); end
  end
  task automatic run(input int gap);
    sample_arr_t s;
    s = frame_by_id(2);
    in_t.delete(); pq_t_q.delete(); out_t.delete(); pqs.delete(); acfms.delete();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int i = 0; i < 40; i++) begin
      an = s[i]; rdy_input = 1; in_t.push_back(cyc + 1);
      @(negedge clk); rdy_input = 0;
      if (gap == 0) begin
        // An must be held until it has been registered: one-cycle spacing is fine
      end else repeat (gap) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(pqs.size() == 40 && acfms.size() == 40, $sformatf("gap %0d: %0d/%0d results", gap, pqs.size(), acfms.size()));
    for (int i = 0; i < 40 && i < pqs.size() && i < acfms.size(); i++) begin
      real e, g;
      e = pq_ref(i);
      g = real'(pqs[i]) / 4294967296.0;
      check(g - e < 1e-6 && e - g < 1e-6, $sformatf("PQ_phase(%0d) %f exp %f", i, g, e));
      check(acfms[i] == acfm_t'(longint'(s[i]) * longint'(pqs[i])), $sformatf("ACFM(%0d)", i));
      check(out_t[i] - in_t[i] == 29, $sformatf("latency %0d", out_t[i] - in_t[i]));
      check(pq_t_q[i] - in_t[i] == 27, $sformatf("pq latency %0d", pq_t_q[i] - in_t[i]));
    end
  endtask
  initial begin
    an = 0; rdy_input = 0; frame_start = 0;
    theta = 32'((64'd50000 << 32) / 64'd2000000);
    p = pq_t'($rtoi(p_const() * 4294967296.0));
    q = pq_t'($rtoi(q_const() * 4294967296.0));
    repeat (3) @(posedge clk);
    rst <= 0;
    run(0);
    run(20);
    // document's worked values for frame 2: PQ_phase(0) = -0.031347, ACFM(A0) = 5.2664
    check(real'(pqs[0]) / 4294967296.0 + 0.031347 < 1e-5 && real'(pqs[0]) / 4294967296.0 + 0.031347 > -1e-5, "PQ_phase(0) = -0.031347");
    finish();
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
