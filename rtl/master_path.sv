// master_path: processing chain of path 1, the master path. It parses its own
// frame (input_manip_primary), computes 1/(N*pi) as soon as N arrives, P and
// Q once theta is known at the end of the header, and then runs every sample
// through algorithm_primary and the recursive adder. Besides its own frame
// result (txd_data with the one-cycle txd_start pulse) it exports PQ_phase
// with a valid strobe for every sample; the slave paths store these and reuse
// them, so the division and trigonometry exist only once in the system.
// Timing: a sample's ACFM value is ready 36 cycles after its data_rdy
// (7 data manipulation + 29 algorithm), PQ_phase 34 cycles after it;
// txd_start with the frame result comes 40 cycles after the last sample's
// data_rdy. P and Q are ready about 95 cycles after the last header word,
// well before the first sample, which comes one SPI word (256 cycles at
// 6.25 MHz) later. The module split and the export of PQ_phase are the
// document's; the start points of the header calculations are this design's.
module master_path
  import acfm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  word_t   data_in,
  input  logic    data_rdy,
  input  logic    path_en,
  output pq_t     pq_phase,
  output logic    pq_valid,
  output result_t txd_data,
  output logic    txd_start
);
  word_t  an, total_n, beta;
  logic   algo_start, n_ready, hdr_ready, frame_done;
  phase_t theta;
  logic [INVNPI_W-1:0] inv_npi;
  logic   npi_done, pq_done;
  pq_t    p, q;
  acfm_t  acfm;
  logic   rdy_algo;

  input_manip_primary u_in (
    .clk, .rst, .data_in, .data_rdy, .path_en, .an, .algo_start, .total_n,
    .n_ready, .beta, .theta, .hdr_ready, .frame_done);

  npi_calc u_npi (
    .clk, .rst, .start(n_ready), .n(total_n), .inv_npi, .done(npi_done));

  pq_module u_pq (
    .clk, .rst, .start(hdr_ready), .beta_deg(beta), .inv_npi, .p, .q, .done(pq_done));

  algorithm_primary u_algo (
    .clk, .rst, .an, .rdy_input(algo_start), .theta, .p, .q, .frame_start(hdr_ready),
    .acfm, .rdy_algo, .pq_phase, .pq_valid);

  recursive_adder u_sum (
    .clk, .rst, .acfm, .algo_done(rdy_algo), .total_n, .sum_out(txd_data), .sum_rdy(txd_start));
endmodule
