// algo_cycle_count: turns the "data ready" pulse of a sample into the
// "algorithm done" pulse that tells the recursive adder the per-sample ACFM
// value is at the output. As in the document, the control bit travels down a
// chain of LATENCY registers next to the data instead of being counted, so a
// new sample may enter on any cycle while earlier ones are still in flight.
// Timing: rdy_algo is rdy_nd delayed by exactly LATENCY cycles.
// Defaults: 29 cycles for the master path (document's figure); the slave
// path instance uses 5 (the five-register chain ShifReg0..ShifReg4).
module algo_cycle_count #(
  parameter int unsigned LATENCY = 29
) (
  input  logic clk,
  input  logic rst,
  input  logic rdy_nd,
  output logic rdy_algo
);
  logic [LATENCY:0] chain;   // chain[0] is the input, chain[LATENCY] the output
  assign chain[0] = rdy_nd;
  for (genvar i = 1; i <= int'(LATENCY); i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) chain[i] <= 1'b0;
      else     chain[i] <= chain[i-1];
    end
  end
  assign rdy_algo = chain[LATENCY];
endmodule
