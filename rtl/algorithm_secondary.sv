// algorithm_secondary: per-sample datapath of a slave path,
//     ACFM(n) = An * PQ_phase(n),
// with PQ_phase(n) taken from the path's own PQ_phase buffer, which the
// master path fills (wr_pq) while it processes its frame. Each sample's nd
// pulse reads the buffer. Stages (cycles after nd): An conversion register
// and buffer read 1 -> shifter register 1 -> multiplier 2 -> output register
// 1; acfm and rdy_algo arrive 5 cycles after nd, the five-register cycle count
// chain of the document. One sample per cycle can be taken. Formats: PQ_phase
// signed 3.32, acfm signed 21.32.
module algorithm_secondary
  import acfm_pkg::*;
#(
  parameter int unsigned LATENCY    = 5,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t an,
  input  logic  nd,
  input  pq_t   pq_phase_in,
  input  logic  wr_pq,
  output acfm_t acfm,
  output logic  rdy_algo,
  output logic  pq_empty,
  output logic  pq_full
);
  pq_t   pq_rd, pq_sh;
  logic signed [WORD_W:0] an_conv, an_sh;
  acfm_t prod;

  pq_phase_fifo #(.W(PQ_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .data_in(pq_phase_in), .wr_en(wr_pq), .rd_en(nd),
    .data_out(pq_rd), .empty(pq_empty), .full(pq_full));

  // An conversion, then the shifter that lines An up with PQ_phase.
  always_ff @(posedge clk) begin
    if (rst) begin
      an_conv <= '0; an_sh <= '0; pq_sh <= '0; acfm <= '0;
    end else begin
      an_conv <= signed'({1'b0, an});
      an_sh   <= an_conv;
      pq_sh   <= pq_rd;
      acfm    <= prod;
    end
  end

  fxp_mult #(.A_W(WORD_W+1), .B_W(PQ_W), .SHIFT(0), .OUT_W(ACFM_W), .STAGES(2)) u_mul (
    .clk, .rst, .a(an_sh), .b(pq_sh), .p(prod));

  algo_cycle_count #(.LATENCY(LATENCY)) u_count (
    .clk, .rst, .rdy_nd(nd), .rdy_algo);
endmodule
