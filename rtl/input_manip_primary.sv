// input_manip_primary: input data manipulation of the master path. Besides
// extracting N and the samples An (as the slave version does) it captures the
// header fields beta (word 1), Fc (words 2-3) and Fs (words 4-5, low half
// first) and computes the phase step between samples,
//     theta = 2*pi*Fc/Fs  held as  Fc * 2^32 / Fs  (fraction of a turn),
// with a sequential divider started after word 5. hdr_ready pulses when theta
// is valid (66 cycles after word 5); n_ready pulses two cycles after word 0,
// the first cycle total_n holds the new N, so that 1/(N*pi) can start early. algo_start comes 7 cycles after each sample's
// data_rdy. The turn-fraction angle is this design's choice; the document
// computes theta in radians.
module input_manip_primary
  import acfm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  data_in,
  input  logic   data_rdy,
  input  logic   path_en,
  output word_t  an,
  output logic   algo_start,
  output word_t  total_n,
  output logic   n_ready,
  output word_t  beta,
  output phase_t theta,
  output logic   hdr_ready,
  output logic   frame_done
);
  logic        an_valid, word_stb;
  logic [7:0]  word_idx;
  logic [31:0] fc, fs;
  logic        div_start, div_busy, div_done, n_seen;
  logic [63:0] quo;

  an_manipulation u_an (
    .clk, .rst, .input_data(data_in), .data_rdy, .path_en,
    .an, .an_valid, .total_n, .word_idx, .word_stb, .frame_done);

  algo_start_control u_start (
    .clk, .rst, .data_rdy, .path_en, .total_sample(total_n), .algo_start);

  always_ff @(posedge clk) begin
    if (rst) begin
      beta <= '0; fc <= '0; fs <= '0; div_start <= 1'b0; n_seen <= 1'b0; n_ready <= 1'b0;
    end else begin
      div_start <= 1'b0;
      n_seen    <= word_stb && (word_idx == 8'(EL_N));
      n_ready   <= n_seen;
      if (word_stb) begin
        unique case (word_idx)
          8'(EL_BETA):   beta       <= data_in;
          8'(EL_FC_LSB): fc[15:0]   <= data_in;
          8'(EL_FC_MSB): fc[31:16]  <= data_in;
          8'(EL_FS_LSB): fs[15:0]   <= data_in;
          8'(EL_FS_MSB): begin
            fs[31:16] <= data_in;
            div_start <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  udiv_seq #(.NUM_W(64), .DEN_W(32)) u_theta (
    .clk, .rst, .start(div_start), .num({fc, 32'd0}), .den(fs),
    .quo, .busy(div_busy), .done(div_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      theta <= '0; hdr_ready <= 1'b0;
    end else begin
      hdr_ready <= div_done;
      if (div_done) theta <= quo[31:0];   // Fc < Fs, so the integer part is 0
    end
  end
endmodule
