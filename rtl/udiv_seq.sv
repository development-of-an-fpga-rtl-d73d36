// udiv_seq: sequential restoring divider for unsigned integers,
// quo = floor(num / den). One quotient bit per clock, most significant first:
// a start pulse loads the operands, done pulses NUM_W cycles after start is taken, with quo
// valid and held until the next start. A start while busy restarts it.
// A zero divisor gives an all-ones quotient. Used for the phase step Fc/Fs and
// for 1/(N*pi); the document divides in floating point at this point, the
// fixed-point division is this design's choice.
module udiv_seq #(
  parameter int unsigned NUM_W = 64,
  parameter int unsigned DEN_W = 48
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic [NUM_W-1:0] quo,
  output logic             busy,
  output logic             done
);
  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] dividend;   // shifts left; quotient bits enter at the bottom
  logic [DEN_W:0]   rem;        // one spare bit for the trial subtraction
  logic [DEN_W-1:0] dvs;
  logic [CNT_W-1:0] cnt;
  logic [DEN_W:0]   trial;
  logic [DEN_W:0]   shifted;

  always_comb begin
    shifted = {rem[DEN_W-1:0], dividend[NUM_W-1]};
    trial   = shifted - {1'b0, dvs};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dividend <= '0; rem <= '0; dvs <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dividend <= num;
        dvs      <= den;
        rem      <= '0;
        cnt      <= CNT_W'(NUM_W);
        busy     <= 1'b1;
      end else if (busy) begin
        if (!trial[DEN_W]) begin
          rem      <= trial;
          dividend <= {dividend[NUM_W-2:0], 1'b1};
        end else begin
          rem      <= shifted;
          dividend <= {dividend[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (!trial[DEN_W]) ? {dividend[NUM_W-2:0], 1'b1} : {dividend[NUM_W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
