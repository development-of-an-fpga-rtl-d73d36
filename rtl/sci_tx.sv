// sci_tx: serial communication interface (RS-232 transmitter) for the
// results of four paths. On sci_start, when idle, it copies the four 16-bit
// words and sends them in order d0..d3, each as upper byte then lower byte;
// with SEND_TRAILER = 1 it appends the bytes 0x00 and 0xA5 that close a
// ten-byte package for the PC display program. Each byte is framed as one low
// start bit, eight data bits least significant first and one high stop bit,
// and the line idles high. The bit time comes from a counter of
// BIT_CYCLES = round(CLK_HZ/BAUD) system clocks (217 at 100 MHz and
// 460800 baud, 0.01 % fast). sci_done pulses for one cycle after the last stop
// bit. A start while busy is ignored. The byte order, framing and baud rate
// are the document's; the bit order within a byte is the RS-232 convention.
module sci_tx
  import acfm_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 460_800,
  parameter bit          SEND_TRAILER = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  result_t d0,
  input  result_t d1,
  input  result_t d2,
  input  result_t d3,
  input  logic    sci_start,
  output logic    txd,
  output logic    sci_done,
  output logic    busy
);
  localparam int unsigned BIT_CYCLES = (CLK_HZ + BAUD/2) / BAUD;
  localparam int unsigned N_BYTES    = SEND_TRAILER ? 10 : 8;
  localparam int unsigned BC_W       = $clog2(BIT_CYCLES);

  logic [7:0]      bytes [10];
  logic [3:0]      byte_i;
  logic [3:0]      bit_i;         // 0 start, 1..8 data, 9 stop
  logic [BC_W-1:0] bcnt;
  logic [9:0]      frame;

  always_comb frame = {1'b1, bytes[byte_i], 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; txd <= 1'b1; sci_done <= 1'b0;
      byte_i <= '0; bit_i <= '0; bcnt <= '0;
      for (int i = 0; i < 10; i++) bytes[i] <= '0;
    end else begin
      sci_done <= 1'b0;
      if (!busy) begin
        txd <= 1'b1;
        if (sci_start) begin
          bytes[0] <= d0[15:8]; bytes[1] <= d0[7:0];
          bytes[2] <= d1[15:8]; bytes[3] <= d1[7:0];
          bytes[4] <= d2[15:8]; bytes[5] <= d2[7:0];
          bytes[6] <= d3[15:8]; bytes[7] <= d3[7:0];
          bytes[8] <= 8'h00;    bytes[9] <= 8'hA5;
          busy   <= 1'b1;
          byte_i <= '0;
          bit_i  <= '0;
          bcnt   <= '0;
          txd    <= 1'b0;       // start bit of the first byte
        end
      end else begin
        if (bcnt == BC_W'(BIT_CYCLES-1)) begin
          bcnt <= '0;
          if (bit_i == 4'd9) begin
            bit_i <= '0;
            if (byte_i == 4'(N_BYTES-1)) begin
              busy     <= 1'b0;
              sci_done <= 1'b1;
              txd      <= 1'b1;
            end else begin
              byte_i <= byte_i + 1'b1;
              txd    <= 1'b0;
            end
          end else begin
            bit_i <= bit_i + 1'b1;
            txd   <= frame[bit_i + 1'b1];
          end
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end
endmodule
