// input_manip_secondary: input data manipulation of a slave path. The
// An manipulation parser extracts N and the samples An of the path's frame;
// the algorithm start control raises algo_start 7 cycles after each sample's
// data_rdy, when an already holds that sample (an holds until the next
// sample, 256 cycles later at the document's SPI rate). Structure as in the
// document: the two sub-modules side by side on the same word stream.
module input_manip_secondary
  import acfm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t data_in,
  input  logic  data_rdy,
  input  logic  path_en,
  output word_t an,
  output logic  algo_start,
  output word_t total_n,
  output logic  frame_done
);
  logic       an_valid, word_stb;
  logic [7:0] word_idx;

  an_manipulation u_an (
    .clk, .rst, .input_data(data_in), .data_rdy, .path_en,
    .an, .an_valid, .total_n, .word_idx, .word_stb, .frame_done);

  algo_start_control u_start (
    .clk, .rst, .data_rdy, .path_en, .total_sample(total_n), .algo_start);
endmodule
