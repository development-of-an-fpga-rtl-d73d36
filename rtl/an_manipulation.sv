// an_manipulation: frame parser of one path. It counts the 16-bit words that
// arrive while the path is enabled, stores the sample count N from word 0 and
// hands out every word after the six-word header as a sample An.
// States, as in the document: WAIT_DATA (wait for path enable and data
// ready), ADD_COUNT (word 0: store N), SEND_DATA (words 6..N+5: present An).
// Header words 1..5 only advance the counter. After word N+5 the counter is
// cleared; it is also cleared whenever the path is not enabled, so a frame
// always starts at word 0.
// Timing: an/an_valid and total_n update one cycle after the data_rdy that
// carried them; an holds until the next sample. word_stb/word_idx expose the
// incoming word and its position, in the data_rdy cycle, for header capture.
module an_manipulation
  import acfm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      input_data,
  input  logic       data_rdy,
  input  logic       path_en,
  output word_t      an,
  output logic       an_valid,
  output word_t      total_n,
  output logic [7:0] word_idx,
  output logic       word_stb,
  output logic       frame_done
);
  typedef enum logic [1:0] {WAIT_DATA, ADD_COUNT, SEND_DATA} state_e;
  state_e state;
  word_t  data_r;
  logic [15:0] cnt;

  assign word_stb = path_en && data_rdy && (state == WAIT_DATA);
  assign word_idx = cnt[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_DATA; data_r <= '0; cnt <= '0;
      an <= '0; an_valid <= 1'b0; total_n <= '0; frame_done <= 1'b0;
    end else begin
      an_valid   <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        WAIT_DATA: begin
          if (word_stb) begin
            data_r <= input_data;
            if (cnt == 0)                state <= ADD_COUNT;
            else if (cnt > 16'(HDR_LEN-1)) state <= SEND_DATA;
            else                         cnt <= cnt + 1'b1;
          end else if (!path_en) begin
            cnt <= '0;
          end
        end
        ADD_COUNT: begin
          total_n <= data_r;
          cnt     <= cnt + 1'b1;
          state   <= WAIT_DATA;
        end
        SEND_DATA: begin
          an       <= data_r;
          an_valid <= 1'b1;
          if (cnt >= total_n + 16'(HDR_LEN-1)) begin
            cnt        <= '0;
            frame_done <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
          state <= WAIT_DATA;
        end
        default: state <= WAIT_DATA;
      endcase
    end
  end
endmodule
