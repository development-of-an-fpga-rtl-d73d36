// tb_pq_module: P = 4cos(beta)/(N*pi) and Q = 4sin(beta)/(N*pi) for beta = 260 degrees (the document's frames) and other angles, compared with the real formulas to 1e-6; done 27 cycles after start.
module tb_pq_module;
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
  logic start; word_t beta; logic [31:0] inv_npi; pq_t p, q; logic done;
  pq_module dut (.clk, .rst, .start, .beta_deg(beta), .inv_npi, .p, .q, .done);
  task automatic run(input int b, input int nn);
    int cyc = 0; real pe, qe, pg, qg;
    @(negedge clk);
    beta = 16'(b);
    inv_npi = 32'($rtoi(4294967296.0 / (3.14159265358979 * nn)));
    start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 27, $sformatf("latency %0d", cyc));
    pe = 4.0 * $cos(3.14159265358979 * b / 180.0) / (3.14159265358979 * nn);
    qe = 4.0 * $sin(3.14159265358979 * b / 180.0) / (3.14159265358979 * nn);
    pg = real'(p) / 4294967296.0;
    qg = real'(q) / 4294967296.0;
    check(pg - pe < 1e-6 && pe - pg < 1e-6, $sformatf("beta %0d N %0d P %f exp %f", b, nn, pg, pe));
    check(qg - qe < 1e-6 && qe - qg < 1e-6, $sformatf("beta %0d N %0d Q %f exp %f", b, nn, qg, qe));
  endtask
  initial begin
    start = 0; beta = 0; inv_npi = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(260, 40); run(0, 40); run(90, 40); run(180, 20); run(359, 40); run(45, 1); run(300, 100);
    finish();
  end
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
