// npi_calc: the 1/(N*pi) calculation of the master path. When start pulses
// with the frame's sample count N, it forms N*pi in fixed point (pi held as
// round(pi*2^30) = 3373259426), then divides 2^62 by it with the sequential
// divider, giving 1/(N*pi) as an unsigned 0.32 fraction. done pulses 67 cycles
// after start (1 cycle product, 65 for the divider, 1 result register) and
// inv_npi holds until the next start; N = 0 gives all ones.
// The document converts to floating point, divides and converts back (three
// enables CE0..CE2); the fixed-point route here is this design's choice.
module npi_calc
  import acfm_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  word_t               n,
  output logic [INVNPI_W-1:0] inv_npi,
  output logic                done
);
  localparam logic [31:0] PI_Q30 = 32'd3373259426;

  logic [47:0] npi;          // N*pi, unsigned 18.30
  logic        div_start;
  logic [63:0] quo;
  logic        div_done;
  logic        div_busy;

  // CE0: form N*pi.
  always_ff @(posedge clk) begin
    if (rst) begin
      npi <= '0; div_start <= 1'b0;
    end else begin
      div_start <= start;
      if (start) npi <= 48'(n) * 48'(PI_Q30);
    end
  end

  // CE1: divide.
  udiv_seq #(.NUM_W(64), .DEN_W(48)) u_div (
    .clk, .rst, .start(div_start), .num(64'h4000_0000_0000_0000), .den(npi),
    .quo, .busy(div_busy), .done(div_done)
  );

  // CE2: take the 0.32 result.
  always_ff @(posedge clk) begin
    if (rst) begin
      inv_npi <= '0; done <= 1'b0;
    end else begin
      done <= div_done;
      if (div_done) inv_npi <= (quo[63:32] != 0) ? '1 : quo[31:0];
    end
  end
endmodule
