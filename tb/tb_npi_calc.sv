// tb_npi_calc: 1/(N*pi) for several N, compared with the real value to within 2 units of 2^-32; done must come 67 cycles after start.
module tb_npi_calc;
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
  logic start; logic [15:0] n; logic [31:0] inv_npi; logic done;
  npi_calc dut (.clk, .rst, .start, .n, .inv_npi, .done);
  task automatic run(input int nn);
    int cyc = 0; real exp_v, got;
    @(negedge clk); n = 16'(nn); start = 1;
    @(negedge clk); start = 0; n = 16'hFFFF;     // n only needs to be valid with start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 67, $sformatf("latency %0d", cyc));
    exp_v = 4294967296.0 / (3.14159265358979 * nn);
    got = real'(inv_npi);
    check(got - exp_v < 2.0 && exp_v - got < 2.0, $sformatf("N=%0d got %0d exp %f", nn, inv_npi, exp_v));
  endtask
  initial begin
    start = 0; n = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(40); run(1); run(2); run(20); run(80); run(1000); run(65535);
    finish();
  end
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
