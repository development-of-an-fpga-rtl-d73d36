// tb_pq_phase_fifo: random writes and reads against a queue model; data order, empty and full flags, writes ignored when full and reads ignored when empty; fills all 128 words.
module tb_pq_phase_fifo;
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
  logic [34:0] data_in, data_out; logic wr_en, rd_en, empty, full;
  logic [34:0] model [$];
  logic exp_valid; logic [34:0] exp_data;
  int fulls = 0;
  pq_phase_fifo dut (.clk, .rst, .data_in, .wr_en, .rd_en, .data_out, .empty, .full);
  initial begin
    data_in = 0; wr_en = 0; rd_en = 0; exp_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_valid) check(data_out == exp_data, $sformatf("t=%0d data %h exp %h", t, data_out, exp_data));
      check(empty == (model.size() == 0), $sformatf("empty at t=%0d", t));
      check(full == (model.size() == 128), $sformatf("full at t=%0d", t));
      if (full) fulls++;
      // phases: fill, drain, mixed
      if (t < 140)       begin wr_en = 1; rd_en = 0; end
      else if (t < 290)  begin wr_en = 0; rd_en = 1; end
      else               begin wr_en = $urandom_range(0, 1); rd_en = $urandom_range(0, 1); end
      data_in = 35'({$urandom, $urandom});
      exp_valid = 0;
      if (rd_en && model.size() > 0) begin exp_data = model.pop_front(); exp_valid = 1; end
      if (wr_en && (model.size() < 128 || (rd_en && exp_valid && 0))) model.push_back(data_in);
    end
    check(fulls > 0, "full reached");
    finish();
  end
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
