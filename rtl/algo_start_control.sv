// algo_start_control: produces the algorithm start pulse for each sample of
// the path's frame. Two states, as in the document: WAIT_DATA waits for path
// enable and data ready with the word counter past the header (> 5) and then
// moves to COMPARE, which compares the counter with N + 5 (the frame length)
// and clears it at the end of the frame. The start pulse leaves COMPARE and
// is delayed so that algo_start rises START_DELAY = 7 cycles after the
// data_rdy of its sample, the data manipulation latency the document gives.
// The counter is cleared while the path is not enabled. The sample count N
// comes from an_manipulation (Total_Sample); it is stored one cycle after
// word 0, long before the first sample is compared.
module algo_start_control
  import acfm_pkg::*;
#(
  parameter int unsigned START_DELAY = 7
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  data_rdy,
  input  logic  path_en,
  input  word_t total_sample,
  output logic  algo_start
);
  typedef enum logic {WAIT_DATA, COMPARE} state_e;
  state_e      state;
  logic [15:0] cnt;
  logic        start_1;            // start pulse, one cycle after data_rdy

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_DATA; cnt <= '0; start_1 <= 1'b0;
    end else begin
      start_1 <= 1'b0;
      unique case (state)
        WAIT_DATA: begin
          if (path_en && data_rdy) begin
            if (cnt > 16'(HDR_LEN-1)) begin
              state   <= COMPARE;
              start_1 <= 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end else if (!path_en) begin
            cnt <= '0;
          end
        end
        COMPARE: begin
          if (cnt >= total_sample + 16'(HDR_LEN-1)) cnt <= '0;
          else                                       cnt <= cnt + 1'b1;
          state <= WAIT_DATA;
        end
        default: state <= WAIT_DATA;
      endcase
    end
  end

  // Remaining START_DELAY-1 cycles of the data manipulation latency.
  algo_cycle_count #(.LATENCY(START_DELAY-1)) u_delay (
    .clk, .rst, .rdy_nd(start_1), .rdy_algo(algo_start));
endmodule
