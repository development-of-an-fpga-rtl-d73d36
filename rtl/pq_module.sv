// pq_module: computes the per-frame constants of the ACFM sum,
//     P = 4*cos(beta)/(N*pi),   Q = 4*sin(beta)/(N*pi).
// beta arrives as an integer number of degrees and is turned into a turn
// fraction by one multiply with round(2^32/360) = 11930465. Its sine and
// cosine come from a CORDIC pipeline (24 cycles); two fixed-point multipliers
// (2 cycles) scale them by 4*inv_npi. P and Q are signed 3.32 and hold until
// the next start; done pulses 27 cycles after start.
// The formulas are the document's; the angle format, the degree conversion
// and the use of a separate CORDIC for beta are this design's choices.
module pq_module
  import acfm_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  word_t               beta_deg,
  input  logic [INVNPI_W-1:0] inv_npi,
  output pq_t                 p,
  output pq_t                 q,
  output logic                done
);
  localparam logic [31:0] DEG_TO_TURN = 32'd11930465;

  phase_t beta_turn;
  trig_t  s_b, c_b;
  logic   trig_vld;
  pq_t    p_m, q_m;
  logic [1:0] vld_d;
  logic signed [INVNPI_W:0] inv_s;

  always_comb begin
    beta_turn = phase_t'(32'(beta_deg) * DEG_TO_TURN);  // wraps modulo one turn
    inv_s     = {1'b0, inv_npi};
  end

  cordic_sincos u_trig (
    .clk, .rst, .phase(beta_turn), .in_valid(start),
    .sin_o(s_b), .cos_o(c_b), .out_valid(trig_vld)
  );

  // (2.30 x 0.32) = 2.62; x4 and back to 3.32 is a right shift by 28.
  fxp_mult #(.A_W(TRIG_W), .B_W(INVNPI_W+1), .SHIFT(28), .OUT_W(PQ_W), .STAGES(2)) u_mp (
    .clk, .rst, .a(c_b), .b(inv_s), .p(p_m));
  fxp_mult #(.A_W(TRIG_W), .B_W(INVNPI_W+1), .SHIFT(28), .OUT_W(PQ_W), .STAGES(2)) u_mq (
    .clk, .rst, .a(s_b), .b(inv_s), .p(q_m));

  always_ff @(posedge clk) begin
    if (rst) begin
      vld_d <= '0; p <= '0; q <= '0; done <= 1'b0;
    end else begin
      vld_d <= {vld_d[0], trig_vld};
      done  <= vld_d[1];
      if (vld_d[1]) begin
        p <= p_m;
        q <= q_m;
      end
    end
  end
endmodule
