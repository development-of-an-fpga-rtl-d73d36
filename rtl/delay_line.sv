// delay_line: the "Shifter" of the ACFM algorithm modules. It delays a word by
// DEPTH clock cycles so that a sample meets the partial result it must be
// multiplied with further down the pipeline. A chain of DEPTH registers, no
// enable: one word in and one word out every cycle. DEPTH = 0 is a wire.
// The document uses 24 cycles in the master path; the default follows it.
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DEPTH-1];
  end
endmodule
