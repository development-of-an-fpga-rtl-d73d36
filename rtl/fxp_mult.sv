// fxp_mult: the "Multiplier Module" of the algorithm datapaths. Signed
// fixed-point multiply p = (a * b) >>> SHIFT, the shift dropping the extra
// fraction bits of the product (truncation toward minus infinity), the result
// cut to OUT_W bits. Pipeline: STAGES register stages (operands, then
// product; further stages delay the product), so p follows a and b by STAGES
// cycles, one product per cycle. Widths, shift and staging are this design's
// choice; the document only names the multiplier.
module fxp_mult #(
  parameter int unsigned A_W    = 35,
  parameter int unsigned B_W    = 32,
  parameter int unsigned SHIFT  = 30,
  parameter int unsigned OUT_W  = 35,
  parameter int unsigned STAGES = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] p
);
  localparam int unsigned PW = A_W + B_W;
  logic signed [A_W-1:0]   a_r;
  logic signed [B_W-1:0]   b_r;
  logic signed [PW-1:0]    prod;
  logic signed [PW-1:0]    prod_sh;
  logic signed [OUT_W-1:0] pipe [STAGES-1];   // STAGES >= 2

  always_comb begin
    prod    = a_r * b_r;
    prod_sh = prod >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_r <= '0; b_r <= '0;
      for (int i = 0; i < int'(STAGES)-1; i++) pipe[i] <= '0;
    end else begin
      a_r     <= a;
      b_r     <= b;
      pipe[0] <= OUT_W'(prod_sh);
      for (int i = 1; i < int'(STAGES)-1; i++) pipe[i] <= pipe[i-1];
    end
  end
  // Stage 1 is the operand register, stage 2 the product register.
  assign p = pipe[STAGES-2];
endmodule
