// recursive_adder: sums the N per-sample ACFM values of a frame and outputs
// the frame's ACFM result as a signed 16-bit integer. States, as in the
// document: ADD1 waits for "algorithm done" and adds the input to the running
// sum; ADD2 moves the new sum into the accumulator; CONVERSION compares the
// sample counter with N and either returns to ADD1 or goes to SEND_DATA,
// which rounds the 21.32 sum to an integer (round half up, saturated to 16
// bits), pulses sum_rdy for one cycle and clears the sum. A frame result thus
// appears 3 cycles after the last sample's algo_done. Inputs must be at least
// 3 cycles apart (samples arrive every 256 cycles over SPI); an assertion
// checks it. Rounding and saturation are this design's choice.
module recursive_adder
  import acfm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  acfm_t   acfm,
  input  logic    algo_done,
  input  word_t   total_n,
  output result_t sum_out,
  output logic    sum_rdy
);
  localparam int unsigned SW = ACFM_W + 8;          // headroom for 256 samples
  typedef enum logic [1:0] {ADD1, ADD2, CONVERSION, SEND_DATA} state_e;
  state_e state;
  logic signed [SW-1:0] acc, tmp, rounded;
  logic [15:0] cnt;

  always_comb rounded = (acc + (SW'(1) <<< (PQ_FRAC-1))) >>> PQ_FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ADD1; acc <= '0; tmp <= '0; cnt <= '0; sum_out <= '0; sum_rdy <= 1'b0;
    end else begin
      sum_rdy <= 1'b0;
      unique case (state)
        ADD1: if (algo_done) begin
          tmp   <= acc + SW'(acfm);
          cnt   <= cnt + 1'b1;
          state <= ADD2;
        end
        ADD2: begin
          acc   <= tmp;
          state <= CONVERSION;
        end
        CONVERSION: state <= (cnt >= total_n) ? SEND_DATA : ADD1;
        SEND_DATA: begin
          if (rounded > SW'(32767))       sum_out <= 16'sh7FFF;
          else if (rounded < -SW'(32768)) sum_out <= 16'sh8000;
          else                            sum_out <= result_t'(rounded);
          sum_rdy <= 1'b1;
          acc     <= '0;
          cnt     <= '0;
          state   <= ADD1;
        end
        default: state <= ADD1;
      endcase
    end
  end

  // A sample must not arrive while the adder is busy with the previous one.
  a_spacing: assert property (@(posedge clk) disable iff (rst) algo_done |-> state == ADD1);
endmodule
