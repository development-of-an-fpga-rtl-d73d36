// tb_spi_slave: a behavioural SPI master, asynchronous to the system clock, sends frames to every address at 6.25 MHz and at a slower odd rate. Every word must come out once with its value, path_en must be the one-hot address exactly while SSEL is low, SCK toggling with SSEL high must produce nothing, and a word cut short by SSEL rising must be dropped without disturbing the next frame.
module tb_spi_slave;
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
  logic sck, ssel, mosi; logic [2:0] address; word_t output_data; logic data_rdy; logic [7:0] path_en;
  word_t got [$];
  int bad_en = 0;
  spi_slave dut (.clk, .rst, .sck, .ssel, .mosi, .address, .output_data, .data_rdy, .path_en);
  always @(posedge clk) if (!rst) begin
    if (data_rdy) got.push_back(output_data);
    if (!$isunknown(path_en) && $countones(path_en) > 1) bad_en++;
  end
  // one SPI word: MOSI changes while SCK is high, the slave samples on the falling edge
  task automatic spi_word(input word_t w, input realtime half, input int nbits = 16);
    for (int b = 15; b > 15 - nbits; b--) begin
      mosi = w[b];
      #(half);
      sck = 1'b0;
      #(half);
      sck = 1'b1;
    end
  endtask
  task automatic spi_frame(input int a, input int n, input realtime half, input int seed);
    word_t w;
    address = 3'(a);
    #(half) ssel = 1'b0;
    #(half * 3);
    // the path enable must follow SSEL within a few clocks
    check(path_en == 8'(1) << a, $sformatf("path_en %b for address %0d", path_en, a));
    got.delete();
    for (int i = 0; i < n; i++) spi_word(word_t'(seed * 977 + i * 4099), half);
    #(half * 2) ssel = 1'b1;
    #(100ns);
    check(path_en == 8'h00, "path_en clears after SSEL rises");
    check(got.size() == n, $sformatf("address %0d: %0d words received, %0d sent", a, got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == word_t'(seed * 977 + i * 4099), $sformatf("word %0d = %h", i, got[i]));
  endtask
  initial begin
    sck = 1; ssel = 1; mosi = 0; address = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    #(203ns);
    for (int a = 0; a < 8; a++) spi_frame(a, 46, 80ns, a + 1);            // 6.25 MHz
    for (int a = 7; a >= 0; a--) spi_frame(a, 5, 133.7ns, a + 11);       // slower, unrelated
    // SCK activity while deselected
    got.delete();
    for (int i = 0; i < 3; i++) spi_word(16'hFFFF, 80ns);
    #(100ns);
    check(got.size() == 0, "no words while SSEL is high");
    // a frame cut after 9 bits, then a normal frame
    address = 3'd5;
    ssel = 1'b0; #(200ns);
    spi_word(16'hABCD, 80ns, 9);
    ssel = 1'b1; #(300ns);
    check(got.size() == 0, "cut word dropped");
    spi_frame(2, 3, 80ns, 40);
    check(bad_en == 0, "path_en never has two bits set");
    finish();
  end
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish();
  end
endmodule
