// tb_sci_tx: a UART receiver in the testbench decodes TxD. The document's test words (0x0100 on all four inputs, then 1,2,3,4) must arrive upper byte first in input order with start and stop bits in place, each bit 217 clocks (460800 baud at 100 MHz); sci_done must pulse once; a second instance with the trailer must add 0x00, 0xA5; a start while busy is ignored.
module tb_sci_tx;
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
  result_t d [4]; logic start, txd, txd_t, done, done_t, busy, busy_t;
  int dones = 0;
  sci_tx dut (.clk, .rst, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .sci_start(start), .txd, .sci_done(done), .busy);
  sci_tx #(.SEND_TRAILER(1'b1)) dut_t (.clk, .rst, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .sci_start(start),
                                      .txd(txd_t), .sci_done(done_t), .busy(busy_t));
  always @(posedge clk) if (!rst && done) dones++;
  localparam int BIT = 217;
  // Receive n bytes from line sel (0 plain, 1 trailer) into q, sampling each
  // bit in its middle, timed from the falling edge of the start bit.
  task automatic rx_bytes(input bit sel, input int n, ref logic [7:0] q [$]);
    for (int b = 0; b < n; b++) begin
      logic [7:0] v;
      while ((sel ? txd_t : txd) == 1'b1) @(posedge clk);
      repeat (BIT / 2) @(posedge clk);
      check((sel ? txd_t : txd) == 1'b0, "start bit low in its middle");
      for (int k = 0; k < 8; k++) begin
        repeat (BIT) @(posedge clk);
        v[k] = sel ? txd_t : txd;
      end
      repeat (BIT) @(posedge clk);
      check((sel ? txd_t : txd) == 1'b1, "stop bit high");
      q.push_back(v);
    end
  endtask
  task automatic send(input result_t a, input result_t b, input result_t c, input result_t e);
    logic [7:0] q [$]; logic [7:0] qt [$];
    logic [7:0] exp_b [10];
    int t0, t1;
    d[0] = a; d[1] = b; d[2] = c; d[3] = e;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t0 = $time / 10;
    @(negedge clk); start = 1; @(negedge clk); start = 0;       // ignored: busy
    fork
      rx_bytes(0, 8, q);
      rx_bytes(1, 10, qt);
    join
    while (busy_t) @(posedge clk);
    t1 = $time / 10;
    for (int i = 0; i < 4; i++) begin exp_b[2*i] = d[i][15:8]; exp_b[2*i+1] = d[i][7:0]; end
    exp_b[8] = 8'h00; exp_b[9] = 8'hA5;
    for (int i = 0; i < 8; i++) check(q[i] == exp_b[i], $sformatf("byte %0d = %h exp %h", i, q[i], exp_b[i]));
    for (int i = 0; i < 10; i++) check(qt[i] == exp_b[i], $sformatf("trailer line byte %0d = %h exp %h", i, qt[i], exp_b[i]));
    check(t1 - t0 >= 100 * BIT - 2 && t1 - t0 <= 100 * BIT + 4, $sformatf("10-byte package took %0d clocks", t1 - t0));
  endtask
  initial begin
    foreach (d[i]) d[i] = 0;
    start = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    send(16'h0100, 16'h0100, 16'h0100, 16'h0100);
    send(16'd1, 16'd2, 16'd3, 16'd4);
    send(16'd970, 16'd956, -16'sd5, 16'h7FFF);
    repeat (300) @(posedge clk);
    check(dones == 3, $sformatf("sci_done pulses %0d", dones));
    finish();
  end
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
