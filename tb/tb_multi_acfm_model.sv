// tb_multi_acfm_model: end-to-end test of the eight-path system at its
// default parameters (100 MHz, 460800 baud, 128-deep PQ_phase buffers). The
// simulated data generator sends three rounds of eight frames over SPI at
// 6.25 MHz, master path first; two UART receivers decode TxD_Com1/TxD_Com2.
//   round 1: master frame 1, slaves frame 2                -> 968 on all paths
//   round 2: master frame 4, slave path k frame ((k-1) mod 4)+1 -> 954/968 mixed
//   round 3: new header (Fc = 0, beta = 90), constant samples, master and
//            path 8 at full scale                         -> saturation to 32767
// Each round's eight results must arrive as two 10-byte packages, upper byte
// first, paths 1-4 on Com1 and 5-8 on Com2, each closed by 0x00, 0xA5. The
// mechanisms the design relies on are counted and each must have happened:
// every path enable, PQ_phase written to the slave buffers and read back,
// slave buffers holding data while other frames pass, the synchronise buffer
// waiting on partial results, a stray ready pulse from a path that has
// already reported (forced once in round 2; it must not start the links),
// both SCIs busy together and done, header changes between rounds, and
// saturation.
module tb_multi_acfm_model;
  timeunit 1ns; timeprecision 1ps;
  import acfm_pkg::*;
  import tb_frames_pkg::*;
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

  localparam int ROUNDS = 3;
  localparam int BIT = 217;                 // 100 MHz / 460800
  localparam int PKG = 10;                  // bytes per package and line

  logic enable, mosi, sclk, ssel, frame_sent, round_sent, txd_com1, txd_com2;
  logic [7:0] word_idx; logic [2:0] path, address; logic [1:0] sci_done;
  word_t word_in;
  int round_no = 0;

  sim_data_gen gen (.clk, .rst, .enable, .word_in, .word_idx, .path, .mosi, .sclk, .ssel,
                    .address, .frame_sent, .round_sent);
  multi_acfm_model dut (.clk, .rst, .sclk, .ssel, .mosi, .address, .txd_com1, .txd_com2, .sci_done);

  // ---- stimulus contents ----
  function automatic int set_of(input int r, input int p);
    if (r == 0) return (p == 0) ? 1 : 2;
    return (p == 0) ? 4 : (p % 4) + 1;
  endfunction
  function automatic word_t round3_word(input int p, input int w);
    if (w < 6) return frame_word(1, w, 40, 90, 0, 2000000);
    return (p == 0 || p == 7) ? 16'hFFFF : 16'(4000 * p);
  endfunction
  always_comb begin
    if (round_no >= 2) word_in = round3_word(int'(path), int'(word_idx));
    else               word_in = frame_word(set_of(round_no, int'(path)), int'(word_idx));
  end
  always @(posedge clk) if (!rst && round_sent) round_no <= round_no + 1;

  function automatic result_t expected(input int r, input int p);
    real v;
    if (r < 2) return (set_of(r, p) == 4) ? 16'sd954 : 16'sd968;
    v = 40.0 * ((p == 0 || p == 7) ? 65535.0 : 4000.0 * p) * q_const(40, 90);
    if (v > 32767.0) return 16'sd32767;
    return result_t'($rtoi(v + 0.5));
  endfunction

  // ---- UART receivers ----
  logic [7:0] rx1 [$], rx2 [$];
  int framing_err = 0;
  task automatic uart_rx(input int line);
    forever begin
      logic [7:0] v;
      while ((line == 1 ? txd_com1 : txd_com2) !== 1'b0) @(posedge clk);
      repeat (BIT / 2) @(posedge clk);
      if ((line == 1 ? txd_com1 : txd_com2) !== 1'b0) framing_err++;
      for (int k = 0; k < 8; k++) begin
        repeat (BIT) @(posedge clk);
        v[k] = (line == 1) ? txd_com1 : txd_com2;
      end
      repeat (BIT) @(posedge clk);
      if ((line == 1 ? txd_com1 : txd_com2) !== 1'b1) framing_err++;
      if (line == 1) rx1.push_back(v); else rx2.push_back(v);
    end
  endtask

  // ---- mechanism counters ----
  int en_seen [8];
  int spi_words = 0, pq_writes = 0, slave_reads = 0, hold_cycles = 0, sync_wait = 0;
  int sci_overlap = 0, done1 = 0, done2 = 0, hdr_changes = 0, saturations = 0, pq_full_seen = 0;
  int result_pulses = 0, sci_starts = 0, strays = 0;
  bit stray_window = 0;                     // a forced pulse may be seen now
  logic [31:0] last_theta = '0;
  logic [34:0] last_p = '0;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 8; i++) if (dut.path_en[i]) en_seen[i]++;
    if (dut.spi_rdy) spi_words++;
    if (dut.pq_valid) pq_writes++;
    if (dut.g_slave[7].u_slave.u_algo.nd) slave_reads++;
    // slave path 8's buffer holds PQ_phase values while paths 2..7 are served
    if (!dut.g_slave[7].pq_empty && !dut.path_en[7]) hold_cycles++;
    if (dut.g_slave[1].pq_full || dut.g_slave[7].pq_full) pq_full_seen++;
    if (dut.u_sync.got != '0) sync_wait++;
    if (dut.sci_busy == 2'b11) sci_overlap++;
    if (dut.sci_start) sci_starts++;
    if (sci_done[0]) done1++;
    if (sci_done[1]) done2++;
    if (dut.u_master.hdr_ready && (dut.u_master.theta != last_theta)) hdr_changes++;
    if (dut.u_master.hdr_ready) last_theta <= dut.u_master.theta;
    if (dut.u_master.pq_done) last_p <= dut.u_master.p;
    if (stray_window && dut.res_rdy[3]) strays++;
    else for (int i = 0; i < 8; i++) if (dut.res_rdy[i]) begin
      result_pulses++;
      if (dut.res[i] == 16'sd32767 || dut.res[i] == -16'sd32768) saturations++;
    end
  end

  initial begin
    enable = 1'b0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    fork
      uart_rx(1);
      uart_rx(2);
      begin
        // stray ready pulse on path 4 while path 6's frame of round 2 is sent
        wait (round_no == 1 && path == 3'd5 && word_idx == 8'd10);
        @(negedge clk);
        stray_window = 1;
        force dut.res_rdy = 8'b0000_1000;
        @(negedge clk);
        release dut.res_rdy;
        repeat (2) @(negedge clk);
        stray_window = 0;
      end
    join_none
    repeat (100) @(posedge clk);
    enable = 1'b1;
    wait (round_no == ROUNDS);
    enable = 1'b0;
    wait (done1 == ROUNDS && done2 == ROUNDS);
    repeat (4 * BIT) @(posedge clk);

    check(rx1.size() == PKG * ROUNDS, $sformatf("Com1 carried %0d bytes", rx1.size()));
    check(rx2.size() == PKG * ROUNDS, $sformatf("Com2 carried %0d bytes", rx2.size()));
    for (int r = 0; r < ROUNDS; r++) begin
      int e;
      e = PKG * r + 8;
      if (e + 1 < rx1.size()) check(rx1[e] == 8'h00 && rx1[e + 1] == 8'hA5, $sformatf("round %0d Com1 package end %h %h", r + 1, rx1[e], rx1[e + 1]));
      if (e + 1 < rx2.size()) check(rx2[e] == 8'h00 && rx2[e + 1] == 8'hA5, $sformatf("round %0d Com2 package end %h %h", r + 1, rx2[e], rx2[e + 1]));
    end
    for (int r = 0; r < ROUNDS; r++)
      for (int p = 0; p < 8; p++) begin
        int b;
        result_t got;
        b = PKG * r + 2 * (p % 4);
        if (p < 4) got = (b + 1 < rx1.size()) ? {rx1[b], rx1[b + 1]} : 'x;
        else       got = (b + 1 < rx2.size()) ? {rx2[b], rx2[b + 1]} : 'x;
        check(got === expected(r, p), $sformatf("round %0d path %0d: received %0d expected %0d",
              r + 1, p + 1, got, expected(r, p)));
      end
    check(framing_err == 0, $sformatf("%0d UART framing errors", framing_err));

    // mechanisms
    for (int i = 0; i < 8; i++) check(en_seen[i] > 0, $sformatf("path %0d enable never seen", i + 1));
    check(spi_words == 46 * 8 * ROUNDS, $sformatf("SPI words %0d", spi_words));
    check(pq_writes == 40 * ROUNDS, $sformatf("PQ_phase writes %0d", pq_writes));
    check(slave_reads == 40 * ROUNDS, $sformatf("path 8 PQ_phase reads %0d", slave_reads));
    check(hold_cycles > 0, "slave buffer never held data across other frames");
    check(pq_full_seen == 0, "PQ_phase buffer reached full");
    check(sync_wait > 0, "synchronise buffer never waited on partial results");
    check(strays > 0, "stray ready pulse never seen");
    check(sci_starts == ROUNDS, $sformatf("%0d link starts for %0d rounds", sci_starts, ROUNDS));
    check(result_pulses == 8 * ROUNDS, $sformatf("frame results %0d", result_pulses));
    check(sci_overlap > 0, "the two SCIs never sent at the same time");
    check(done1 == ROUNDS && done2 == ROUNDS, "sci_done count");
    check(hdr_changes >= 2, $sformatf("frame header changes seen %0d", hdr_changes));
    check(saturations == 2, $sformatf("saturated results %0d", saturations));
    $display("mechanisms: spi_words=%0d pq_writes=%0d slave_reads=%0d hold=%0d sync_wait=%0d sci_overlap=%0d hdr_changes=%0d saturations=%0d strays=%0d",
             spi_words, pq_writes, slave_reads, hold_cycles, sync_wait, sci_overlap, hdr_changes, saturations, strays);
    finish();
  end

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (round %0d, sci_done %0d/%0d, bytes %0d/%0d, results %0d)",
             round_no, done1, done2, rx1.size(), rx2.size(), result_pulses);
    finish();
  end
endmodule
