// multi_acfm_model: eight-path ACFM processing system. Frames from eight
// probes arrive over one SPI link (SCLK, SSEL, MOSI, Address2..0); the SPI
// slave turns them into 16-bit words and a path enable. Path 1 is the master
// path: it computes the frame constants (1/(N*pi), P, Q) and, for each sample
// position, PQ_phase = P*sin(R[n-1]) + Q*cos(R[n-1]). Paths 2..8 are slave
// paths that reuse the master's PQ_phase values through their own FIFO and
// only multiply and accumulate. The synchronise buffer waits for all eight
// frame results, then two SCIs send them to the PC at 460800 baud: TxD_Com1
// carries paths 1-4, TxD_Com2 paths 5-8, each result upper byte first; with
// SEND_TRAILER = 1 (the default) each package of four results is closed by
// the bytes 0x00, 0xA5 the PC display program looks for.
// The master frame of a round must be sent before the slave frames and all
// frames of a round must share N, beta, Fc and Fs. Everything runs on the
// single 100 MHz clock; rst is synchronous and active high. The structure,
// the port names of the SPI and SCI sides and the rates follow the document;
// the reset and the sci_done outputs are this design's additions.
module multi_acfm_model
  import acfm_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 460_800,
  parameter int unsigned FIFO_DEPTH   = 128,
  parameter bit          SEND_TRAILER = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sclk,
  input  logic       ssel,
  input  logic       mosi,
  input  logic [2:0] address,
  output logic       txd_com1,
  output logic       txd_com2,
  output logic [1:0] sci_done
);
  word_t   spi_word;
  logic    spi_rdy;
  logic [N_PATHS-1:0] path_en;
  pq_t     pq_phase;
  logic    pq_valid;
  result_t res [N_PATHS];
  logic [N_PATHS-1:0] res_rdy;
  result_t res_sync [N_PATHS];
  logic    sci_start;
  logic [1:0] sci_busy;

  spi_slave u_spi (
    .clk, .rst, .sck(sclk), .ssel, .mosi, .address,
    .output_data(spi_word), .data_rdy(spi_rdy), .path_en);

  master_path u_master (
    .clk, .rst, .data_in(spi_word), .data_rdy(spi_rdy), .path_en(path_en[0]),
    .pq_phase, .pq_valid, .txd_data(res[0]), .txd_start(res_rdy[0]));

  for (genvar i = 1; i < int'(N_PATHS); i++) begin : g_slave
    logic pq_empty, pq_full;
    slave_path #(.FIFO_DEPTH(FIFO_DEPTH)) u_slave (
      .clk, .rst, .data_in(spi_word), .data_rdy(spi_rdy), .path_en(path_en[i]),
      .pq_phase, .pq_valid, .txd_data(res[i]), .txd_start(res_rdy[i]),
      .pq_empty, .pq_full);
  end

  sync_buffer u_sync (
    .clk, .rst, .path_data(res), .path_rdy(res_rdy), .out_data(res_sync), .sci_start);

  sci_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SEND_TRAILER(SEND_TRAILER)) u_sci1 (
    .clk, .rst, .d0(res_sync[0]), .d1(res_sync[1]), .d2(res_sync[2]), .d3(res_sync[3]),
    .sci_start, .txd(txd_com1), .sci_done(sci_done[0]), .busy(sci_busy[0]));

  sci_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SEND_TRAILER(SEND_TRAILER)) u_sci2 (
    .clk, .rst, .d0(res_sync[4]), .d1(res_sync[5]), .d2(res_sync[6]), .d3(res_sync[7]),
    .sci_start, .txd(txd_com2), .sci_done(sci_done[1]), .busy(sci_busy[1]));
endmodule
