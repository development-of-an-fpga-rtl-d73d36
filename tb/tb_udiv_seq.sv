// tb_udiv_seq: random and edge-case divisions with the 64/48-bit divider; quotient compared with the integer division operator, done timing checked (64 cycles).
module tb_udiv_seq;
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
  logic start; logic [63:0] num, quo; logic [47:0] den; logic busy, done;
  udiv_seq dut (.clk, .rst, .start, .num, .den, .quo, .busy, .done);
  task automatic run(input logic [63:0] n, input logic [47:0] d);
    int cyc = 0;
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 64, $sformatf("latency %0d", cyc));
    if (d != 0) check(quo == n / 64'(d), $sformatf("%0d / %0d = %0d", n, d, quo));
    else        check(quo == '1, "divide by zero gives all ones");
  endtask
  initial begin
    start = 0; num = 0; den = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(64'h4000_0000_0000_0000, 48'd134930377045);   // 2^62 / (40*pi*2^30)
    run(64'd50000 << 32, 48'd2000000);
    run(64'd100, 48'd7);
    run(64'd5, 48'd9);
    run('1, 48'd1);
    run(64'd77, 48'd0);
    for (int i = 0; i < 30; i++) run({$urandom, $urandom}, 48'({$urandom, $urandom} >> $urandom_range(0, 47)) | 48'd1);
    finish();
  end
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
