// cordic_sincos: the trigonometric module. A fully pipelined rotation-mode
// CORDIC that returns sin and cos of a phase angle, one angle per clock.
//
// Angle: unsigned 32-bit fraction of a full turn (2^32 = 2*pi), so any
// accumulated phase wraps for free. Stage 0 folds the angle into
// [-1/4, +1/4) turn by subtracting half a turn and remembering to negate both
// results; ITER stages of shift-and-add rotation follow; a last stage applies
// the fold sign and registers the outputs. x starts at the CORDIC gain
// 1/K = 0.607252935 (in 2.30) so no final scaling is needed.
// Outputs sin_o, cos_o: signed 2.30. Latency LATENCY = ITER + 2 = 24 cycles,
// the figure the document gives for its trigonometric stage; out_valid is
// in_valid delayed by the same amount. Error is about 2^-21.
// The document uses a vendor CORDIC core with a 16-bit 3.13 radian input;
// this core, its angle format and its precision are this design's own.
module cordic_sincos
  import acfm_pkg::*;
#(
  parameter int unsigned LATENCY = 24
) (
  input  logic   clk,
  input  logic   rst,
  input  phase_t phase,
  input  logic   in_valid,
  output trig_t  sin_o,
  output trig_t  cos_o,
  output logic   out_valid
);
  localparam int unsigned ITER = LATENCY - 2;
  localparam int unsigned XW   = 34;              // 2.30 plus guard bits
  localparam logic signed [XW-1:0] X_INIT = XW'(652032874); // round(K*2^30)

  // atan(2^-i) in turns x 2^32: round(atan(2^-i) / (2*pi) * 2^32)
  function automatic logic [31:0] atan_tab(input int i);
    case (i)
      0: return 32'd536870912;  1: return 32'd316933406;  2: return 32'd167458907;
      3: return 32'd85004756;   4: return 32'd42667331;   5: return 32'd21354465;
      6: return 32'd10679838;   7: return 32'd5340245;    8: return 32'd2670163;
      9: return 32'd1335087;   10: return 32'd667544;    11: return 32'd333772;
     12: return 32'd166886;    13: return 32'd83443;     14: return 32'd41722;
     15: return 32'd20861;     16: return 32'd10430;     17: return 32'd5215;
     18: return 32'd2608;      19: return 32'd1304;      20: return 32'd652;
     21: return 32'd326;       22: return 32'd163;       23: return 32'd81;
      default: return 32'd0;
    endcase
  endfunction

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [31:0]   z [ITER+1];
  logic [ITER:0]        neg;
  logic [ITER:0]        vld;

  // Stage 0: quadrant fold.
  always_ff @(posedge clk) begin
    if (rst) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; neg[0] <= 1'b0; vld[0] <= 1'b0;
    end else begin
      x[0]   <= X_INIT;
      y[0]   <= '0;
      vld[0] <= in_valid;
      if (phase[31] != phase[30]) begin      // angle in [1/4, 3/4) turn
        z[0]   <= signed'(phase - 32'h8000_0000);
        neg[0] <= 1'b1;
      end else begin
        z[0]   <= signed'(phase);
        neg[0] <= 1'b0;
      end
    end
  end

  // Rotation stages.
  for (genvar i = 0; i < int'(ITER); i++) begin : g_iter
    always_ff @(posedge clk) begin
      if (rst) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; neg[i+1] <= 1'b0; vld[i+1] <= 1'b0;
      end else begin
        neg[i+1] <= neg[i];
        vld[i+1] <= vld[i];
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - signed'(atan_tab(i));
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + signed'(atan_tab(i));
        end
      end
    end
  end

  // Output stage: undo the fold. |x|,|y| stay below 1.0001, well inside 2.30.
  function automatic trig_t fold(input logic signed [XW-1:0] v, input logic n);
    logic signed [XW-1:0] t;
    t = n ? -v : v;
    return trig_t'(t);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sin_o <= '0; cos_o <= '0; out_valid <= 1'b0;
    end else begin
      sin_o     <= fold(y[ITER], neg[ITER]);
      cos_o     <= fold(x[ITER], neg[ITER]);
      out_valid <= vld[ITER];
    end
  end
endmodule
