// tb_recursive_adder: sums of 40 per-sample values: frame 1 built from exact reference products must give round(968.04) = 968; also random values against a real-number sum, negative results, and saturation at +32767.
module tb_recursive_adder;
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
  acfm_t acfm; logic algo_done, sum_rdy; word_t total_n; result_t sum_out;
  int rdys = 0;
  recursive_adder dut (.clk, .rst, .acfm, .algo_done, .total_n, .sum_out, .sum_rdy);
  always @(posedge clk) if (!rst && sum_rdy) rdys++;
  task automatic run(input acfm_t v [], input int exp_v, input string name);
    int r0, k;
    r0 = rdys;
    total_n = 16'(v.size());
    foreach (v[i]) begin
      repeat (4) @(negedge clk);
      acfm = v[i]; algo_done = 1;
      @(negedge clk); algo_done = 0;
    end
    k = 0;
    while (rdys == r0 && k < 20) begin @(negedge clk); k++; end
    check(rdys == r0 + 1, {name, ": one ready pulse"});
    check(k <= 4, $sformatf("%s: result %0d cycles after the last sample", name, k));
    check(sum_out == 16'(exp_v), $sformatf("%s: sum %0d exp %0d", name, sum_out, exp_v));
  endtask
  initial begin
    acfm_t v [];
    sample_arr_t s;
    real tot;
    acfm = 0; algo_done = 0; total_n = 40;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 1; f <= 4; f++) begin
      s = frame_by_id(f);
      v = new[40];
      tot = 0.0;
      for (int i = 0; i < 40; i++) begin
        v[i] = acfm_t'($rtoi(real'(s[i]) * pq_ref(i) * 4294967296.0));
        tot += real'(v[i]) / 4294967296.0;
      end
      run(v, $rtoi($floor(tot + 0.5)), $sformatf("frame %0d", f));
    end
    for (int r = 0; r < 5; r++) begin
      v = new[$urandom_range(1, 60)];
      tot = 0.0;
      foreach (v[i]) begin
        v[i] = acfm_t'(signed'({$urandom, $urandom}) >>> 40);
        tot += real'(v[i]) / 4294967296.0;
      end
      run(v, $rtoi($floor(tot + 0.5)), $sformatf("random %0d", r));
    end
    v = new[40];
    foreach (v[i]) v[i] = acfm_t'(64'd4000) <<< 32;
    run(v, 32767, "saturation");
    finish();
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
