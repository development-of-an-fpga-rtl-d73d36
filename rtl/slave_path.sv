// slave_path: processing chain of paths 2..8. It parses only N and the
// samples of its frame (input_manip_secondary), multiplies each sample by
// the PQ_phase the master path computed for the same sample position
// (algorithm_secondary, which buffers the master's PQ_phase stream in a FIFO)
// and sums the products (recursive_adder). The slave's frame must use the same
// N, beta, Fc and Fs as the master frame of the same round; its own header
// fields other than N are not used. Timing: a sample's ACFM value is ready 12
// cycles after its data_rdy (7 + 5); the one-cycle txd_start pulse with the
// frame result comes 16 cycles after the last sample's data_rdy. The split
// into these three modules is the document's; the 16-bit rounded result and
// the exposed FIFO flags are this design's.
module slave_path
  import acfm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic    clk,
  input  logic    rst,
  input  word_t   data_in,
  input  logic    data_rdy,
  input  logic    path_en,
  input  pq_t     pq_phase,
  input  logic    pq_valid,
  output result_t txd_data,
  output logic    txd_start,
  output logic    pq_empty,
  output logic    pq_full
);
  word_t an, total_n;
  logic  algo_start, frame_done, rdy_algo;
  acfm_t acfm;

  input_manip_secondary u_in (
    .clk, .rst, .data_in, .data_rdy, .path_en, .an, .algo_start, .total_n, .frame_done);

  algorithm_secondary #(.FIFO_DEPTH(FIFO_DEPTH)) u_algo (
    .clk, .rst, .an, .nd(algo_start), .pq_phase_in(pq_phase), .wr_pq(pq_valid),
    .acfm, .rdy_algo, .pq_empty, .pq_full);

  recursive_adder u_sum (
    .clk, .rst, .acfm, .algo_done(rdy_algo), .total_n, .sum_out(txd_data), .sum_rdy(txd_start));
endmodule
