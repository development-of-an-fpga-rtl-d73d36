// pq_phase_fifo: the PQ_phase buffer of a slave path. A synchronous
// first-in first-out memory of DEPTH words (128 in the document) that stores
// the PQ_phase values the master path produces for a frame, so that a slave
// path, whose frame arrives later over the shared SPI link, can use them in
// the same order. A write with wr_en stores data_in (ignored when full); a
// read with rd_en presents the oldest word on data_out at the next clock edge
// (ignored when empty). Storage is a plain memory array with a registered
// read port. The document generates this FIFO with a vendor core; the
// implementation is this design's own.
module pq_phase_fifo #(
  parameter int unsigned W     = 35,
  parameter int unsigned DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] data_in,
  input  logic         wr_en,
  input  logic         rd_en,
  output logic [W-1:0] data_out,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; data_out <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) begin
        data_out <= mem[rp];
        rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
