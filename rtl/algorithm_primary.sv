// algorithm_primary: per-sample datapath of the master path. For the n-th
// sample An of a frame it forms
//     PQ_phase(n) = P*sin(R[n-1]) + Q*cos(R[n-1]),   R[n-1] = (n-1)*theta
//     ACFM(n)     = An * PQ_phase(n)
// R[n-1] comes from a phase accumulator cleared by frame_start and advanced by
// theta after every sample. Stages (cycles after rdy_input):
//   trigonometric module 24 -> P*sin and Q*cos multipliers 2 -> adder 1
//   (PQ_phase, pq_valid at 27) -> An multiplier 2 (acfm, rdy_algo at 29).
// An is zero-extended to signed (An conversion, 1 cycle) and delayed by the
// shifter to meet PQ_phase. The algorithm cycle count chain turns rdy_input
// into rdy_algo 29 cycles later, the latency the document reports; a new
// sample may enter on any cycle. PQ_phase and pq_valid are exported for the
// slave paths. Formats: P, Q, PQ_phase signed 3.32; acfm signed 21.32.
module algorithm_primary
  import acfm_pkg::*;
#(
  parameter int unsigned LATENCY = 29
) (
  input  logic   clk,
  input  logic   rst,
  input  word_t  an,
  input  logic   rdy_input,
  input  phase_t theta,
  input  pq_t    p,
  input  pq_t    q,
  input  logic   frame_start,
  output acfm_t  acfm,
  output logic   rdy_algo,
  output pq_t    pq_phase,
  output logic   pq_valid
);
  localparam int unsigned TRIG_LAT = 24;
  localparam int unsigned MUL_LAT  = 2;
  localparam int unsigned PQ_LAT   = TRIG_LAT + MUL_LAT + 1;     // 27
  localparam int unsigned SH_DEPTH = PQ_LAT - 1;                 // after the conversion register

  phase_t acc;
  trig_t  s_t, c_t;
  logic   trig_vld;
  pq_t    ps, qc;
  logic signed [WORD_W:0] an_conv, an_dly;
  logic [MUL_LAT-1:0] vld_d;

  // R[n-1]: phase accumulator.
  always_ff @(posedge clk) begin
    if (rst)              acc <= '0;
    else if (frame_start) acc <= '0;
    else if (rdy_input)   acc <= acc + theta;
  end

  // Trigonometric module.
  cordic_sincos #(.LATENCY(TRIG_LAT)) u_trig (
    .clk, .rst, .phase(acc), .in_valid(rdy_input),
    .sin_o(s_t), .cos_o(c_t), .out_valid(trig_vld));

  // P*sin(theta_n), Q*cos(theta_n): 3.32 x 2.30 -> 3.32.
  fxp_mult #(.A_W(PQ_W), .B_W(TRIG_W), .SHIFT(TRIG_FRAC), .OUT_W(PQ_W), .STAGES(MUL_LAT)) u_mp (
    .clk, .rst, .a(p), .b(s_t), .p(ps));
  fxp_mult #(.A_W(PQ_W), .B_W(TRIG_W), .SHIFT(TRIG_FRAC), .OUT_W(PQ_W), .STAGES(MUL_LAT)) u_mq (
    .clk, .rst, .a(q), .b(c_t), .p(qc));

  // Adder module.
  always_ff @(posedge clk) begin
    if (rst) begin
      pq_phase <= '0; vld_d <= '0; pq_valid <= 1'b0;
    end else begin
      vld_d    <= {vld_d[MUL_LAT-2:0], trig_vld};
      pq_phase <= ps + qc;
      pq_valid <= vld_d[MUL_LAT-1];
    end
  end

  // An conversion and shifter.
  always_ff @(posedge clk) begin
    if (rst) an_conv <= '0;
    else     an_conv <= signed'({1'b0, an});
  end
  delay_line #(.W(WORD_W+1), .DEPTH(SH_DEPTH)) u_shift (
    .clk, .rst, .d(an_conv), .q(an_dly));

  // ACFM = An * PQ_phase: 17-bit integer x 3.32 -> 21.32.
  fxp_mult #(.A_W(WORD_W+1), .B_W(PQ_W), .SHIFT(0), .OUT_W(ACFM_W), .STAGES(MUL_LAT)) u_ma (
    .clk, .rst, .a(an_dly), .b(pq_phase), .p(acfm));

  algo_cycle_count #(.LATENCY(LATENCY)) u_count (
    .clk, .rst, .rdy_nd(rdy_input), .rdy_algo);
endmodule
