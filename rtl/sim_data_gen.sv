// sim_data_gen: simulated data generator, the stand-in for the DSP used to
// exercise the FPGA chain. An SCLK generator divides the system clock by
// CLK_DIV (100 MHz / 16 = 6.25 MHz); an SPI master sends one frame of
// FRAME_WORDS 16-bit words to each path in turn (path 0, the master, first,
// then 1..N_PATHS-1) and starts again, for as long as enable is high.
// For each frame it drives the path number on address and pulls ssel low for
// the whole frame; SCLK idles high, MOSI changes after the rising edge and is
// read by the slave on the falling edge, most significant bit first. The words
// are not stored here: word_idx and path tell the outside which word is
// wanted and word_in must return it (combinationally); it is sampled when
// the word's first bit is sent. GAP_CYCLES idle clocks with ssel high
// separate frames. frame_sent pulses after each frame, round_sent after the
// last path. The SPI mode and the gap are this design's choice.
module sim_data_gen
  import acfm_pkg::*;
#(
  parameter int unsigned CLK_DIV     = 16,
  parameter int unsigned FRAME_WORDS = 46,
  parameter int unsigned NP          = N_PATHS,
  parameter int unsigned GAP_CYCLES  = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  word_t      word_in,
  output logic [7:0] word_idx,
  output logic [2:0] path,
  output logic       mosi,
  output logic       sclk,
  output logic       ssel,
  output logic [2:0] address,
  output logic       frame_sent,
  output logic       round_sent
);
  typedef enum logic [1:0] {GAP, LEAD, SHIFT} state_e;
  state_e state;
  localparam int unsigned DC_W = $clog2(CLK_DIV);
  localparam int unsigned GC_W = $clog2(GAP_CYCLES + 1);

  logic [DC_W-1:0] dcnt;     // SCLK generator: position inside one SPI bit
  logic [GC_W-1:0] gcnt;
  logic [3:0]      bit_i;
  word_t           sh;

  assign address = path;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= GAP; dcnt <= '0; gcnt <= '0; bit_i <= '0; sh <= '0;
      word_idx <= '0; path <= '0; mosi <= 1'b0; sclk <= 1'b1; ssel <= 1'b1;
      frame_sent <= 1'b0; round_sent <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      round_sent <= 1'b0;
      unique case (state)
        GAP: begin
          sclk <= 1'b1;
          ssel <= 1'b1;
          if (gcnt == GC_W'(GAP_CYCLES)) begin
            if (enable) begin
              gcnt     <= '0;
              ssel     <= 1'b0;
              word_idx <= '0;
              dcnt     <= '0;
              state    <= LEAD;
            end
          end else begin
            gcnt <= gcnt + 1'b1;
          end
        end
        LEAD: begin                     // half a bit between ssel low and the first bit
          if (dcnt == DC_W'(CLK_DIV/2 - 1)) begin
            dcnt  <= '0;
            sh    <= word_in;
            mosi  <= word_in[WORD_W-1];
            bit_i <= '0;
            state <= SHIFT;
          end else begin
            dcnt <= dcnt + 1'b1;
          end
        end
        SHIFT: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == DC_W'(CLK_DIV/2 - 1)) sclk <= 1'b0;       // falling: slave samples
          if (dcnt == DC_W'(CLK_DIV - 1)) begin                 // rising: next bit
            sclk <= 1'b1;
            dcnt <= '0;
            if (bit_i == 4'd15) begin
              if (word_idx == 8'(FRAME_WORDS-1)) begin
                frame_sent <= 1'b1;
                state      <= GAP;
                ssel       <= 1'b1;
                if (path == 3'(NP-1)) begin
                  path       <= '0;
                  round_sent <= 1'b1;
                end else begin
                  path <= path + 1'b1;
                end
              end else begin
                word_idx <= word_idx + 1'b1;
                state    <= LEAD;
              end
            end else begin
              bit_i <= bit_i + 1'b1;
              sh    <= {sh[WORD_W-2:0], 1'b0};
              mosi  <= sh[WORD_W-2];
            end
          end
        end
        default: state <= GAP;
      endcase
    end
  end
endmodule
