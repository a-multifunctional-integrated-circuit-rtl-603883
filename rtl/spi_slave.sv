// spi_slave: SPI slave port to the microcontroller (mode 0: SCK idles low,
// data sampled on the rising edge, changed on the falling edge, MSB first,
// SS active low). SCK, SS and SDI are synchronised to the system clock,
// so SCK must be at most a quarter of the system clock.
// rx_valid pulses with rx_byte after eight bits; `first` marks the first
// byte after SS fell. tx_byte is loaded into the output shift register at
// the falling edge that ends each byte, so the byte returned during byte n+1
// must be presented within half an SCK period after byte n. SS low is also a
// wake-up source for the clock controller. The document names the SPI slave;
// mode and framing are this design's choices.
module spi_slave (
  input  logic       clk,
  input  logic       rst,
  input  logic       sck,
  input  logic       ss_n,
  input  logic       sdi,
  output logic       sdo,
  output logic       ss_active,
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  output logic       first,
  input  logic [7:0] tx_byte
);
  logic [2:0] sck_s, ss_s;
  logic [1:0] sdi_s;
  logic [2:0] bitcnt;
  logic [7:0] sh_in, sh_out;
  logic       first_q;
  logic       rise, fall;

  assign rise = sck_s[1] && !sck_s[2];
  assign fall = !sck_s[1] && sck_s[2];
  assign ss_active = !ss_s[1];
  assign sdo = sh_out[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      sck_s <= '0; ss_s <= '1; sdi_s <= '0; bitcnt <= '0; sh_in <= '0; sh_out <= '0;
      first_q <= 1'b0; rx_valid <= 1'b0; rx_byte <= '0; first <= 1'b0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      ss_s  <= {ss_s[1:0], ss_n};
      sdi_s <= {sdi_s[0], sdi};
      rx_valid <= 1'b0;
      if (!ss_active) begin
        bitcnt <= '0; first_q <= 1'b1; sh_out <= '0;
      end else begin
        if (rise) begin
          sh_in  <= {sh_in[6:0], sdi_s[1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 3'd7) begin
            rx_valid <= 1'b1; rx_byte <= {sh_in[6:0], sdi_s[1]};
            first <= first_q; first_q <= 1'b0;
          end
        end
        if (fall) begin
          if (bitcnt == 3'd0) sh_out <= tx_byte;
          else                sh_out <= {sh_out[6:0], 1'b0};
        end
      end
    end
  end
endmodule
