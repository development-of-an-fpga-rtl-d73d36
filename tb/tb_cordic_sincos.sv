// tb_cordic_sincos: a stream of angles, one per cycle, including the quadrant boundaries; sin and cos compared with the real functions (error below 2^-19), latency 24.
module tb_cordic_sincos;
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
  phase_t phase; logic in_valid; trig_t s, c; logic out_valid;
  phase_t hist [$];
  int lat_ok = 0;
  cordic_sincos dut (.clk, .rst, .phase, .in_valid, .sin_o(s), .cos_o(c), .out_valid);
  initial begin
    int sent = 0, got = 0;
    phase = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (out_valid) begin
        real a, es, ec;
        phase_t ph;
        ph = hist.pop_front();
        a = 2.0 * 3.14159265358979 * real'(ph) / 4294967296.0;
        es = real'(s) / 1073741824.0 - $sin(a);
        ec = real'(c) / 1073741824.0 - $cos(a);
        check(es < 2.0e-6 && es > -2.0e-6 && ec < 2.0e-6 && ec > -2.0e-6,
              $sformatf("angle %h: sin err %g cos err %g", ph, es, ec));
        got++;
      end
      in_valid = (t < 200);
      if (t < 8) phase = 32'h2000_0000 * t;               // the octant boundaries
      else if (t < 16) phase = 32'h4000_0000 * (t - 8) + 32'($urandom_range(0, 3)) - 1;
      else phase = $urandom;
      if (in_valid) begin
        hist.push_back(phase);
        sent++;
        if (sent == 1) fork begin
          int k = 0;
          while (!out_valid) begin @(negedge clk); k++; end
          check(k == 24, $sformatf("latency %0d", k));
        end join_none
      end
    end
    check(got == 200, $sformatf("results %0d", got));
    finish();
  end
  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
