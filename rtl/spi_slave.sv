// spi_slave: receives the frames the DSP sends as SPI master. SCK, SSEL
// (active low) and MOSI are brought into the system clock domain with
// two-flop synchronisers and SCK is edge-detected with one more register; the
// 6.25 MHz SPI clock is thus over-sampled 16 times by the 100 MHz clock.
// While SSEL is low, MOSI is sampled on every falling SCK edge, most
// significant bit first, and a bit counter collects 16-bit words: output_data
// takes the word and data_rdy pulses for one cycle, about four system clocks
// after the sixteenth falling edge. The 3-bit path address is taken when SSEL
// goes low and decoded into the eight path enables, one of which stays high
// until SSEL rises; a frame must therefore be sent within one SSEL-low period.
// Over-sampling, falling-edge sampling and 16-bit words follow the document;
// the MSB-first order, the address latching and the synchroniser depth are
// this design's choices.
module spi_slave
  import acfm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sck,
  input  logic       ssel,
  input  logic       mosi,
  input  logic [2:0] address,
  output word_t      output_data,
  output logic       data_rdy,
  output logic [N_PATHS-1:0] path_en
);
  logic [2:0] sck_s;        // [0],[1] synchroniser, [2] previous value
  logic [2:0] ssel_s;
  logic [1:0] mosi_s;
  logic [1:0] addr_s [3];
  logic [2:0] addr_q;
  logic [3:0] bitcnt;
  word_t      shreg;
  logic       sck_fall, ssel_active, ssel_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      sck_s <= 3'b111; ssel_s <= 3'b111; mosi_s <= '0;
      for (int i = 0; i < 3; i++) addr_s[i] <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      ssel_s <= {ssel_s[1:0], ssel};
      mosi_s <= {mosi_s[0], mosi};
      for (int i = 0; i < 3; i++) addr_s[i] <= {addr_s[i][0], address[i]};
    end
  end

  assign sck_fall    = sck_s[2] && !sck_s[1];
  assign ssel_active = !ssel_s[1];
  assign ssel_start  = ssel_s[2] && !ssel_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt <= '0; shreg <= '0; output_data <= '0; data_rdy <= 1'b0;
      addr_q <= '0; path_en <= '0;
    end else begin
      data_rdy <= 1'b0;
      if (ssel_start) begin
        addr_q <= {addr_s[2][1], addr_s[1][1], addr_s[0][1]};
      end
      path_en <= ssel_active ? (N_PATHS'(1) << (ssel_start
                   ? {addr_s[2][1], addr_s[1][1], addr_s[0][1]} : addr_q)) : '0;
      if (!ssel_active) begin
        bitcnt <= '0;
      end else if (sck_fall) begin
        shreg  <= {shreg[WORD_W-2:0], mosi_s[1]};
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == 4'd15) begin
          output_data <= {shreg[WORD_W-2:0], mosi_s[1]};
          data_rdy    <= 1'b1;
        end
      end
    end
  end
endmodule
