// sync_buffer: brings the eight frame results together. The paths finish one
// after the other, in the order their frames arrive over SPI. For each path
// the buffer registers the result and sets a flag when the path's ready
// pulse comes; when all eight flags are set it raises sci_start for one cycle
// and clears the flags. A stray extra pulse on one path therefore cannot start
// the serial links on its own: all paths must have reported. out_data holds
// each path's latest result. Timing: sci_start rises the cycle after the
// last ready pulse. Waiting for all eight ready signals and ignoring a
// repeated one follow the document; registering the results (the document
// passes the data straight through) is this design's choice, so the values
// stay fixed while the serial links send them.
module sync_buffer
  import acfm_pkg::*;
#(
  parameter int unsigned NP = N_PATHS
) (
  input  logic    clk,
  input  logic    rst,
  input  result_t path_data [NP],
  input  logic [NP-1:0] path_rdy,
  output result_t out_data [NP],
  output logic    sci_start
);
  logic [NP-1:0] got, got_n;
  assign got_n = got | path_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      got <= '0; sci_start <= 1'b0;
      for (int i = 0; i < int'(NP); i++) out_data[i] <= '0;
    end else begin
      for (int i = 0; i < int'(NP); i++)
        if (path_rdy[i]) out_data[i] <= path_data[i];
      if (&got_n) begin
        sci_start <= 1'b1;
        got       <= '0;
      end else begin
        sci_start <= 1'b0;
        got       <= got_n;
      end
    end
  end
endmodule
