// spi_slave: SPI target port (mode 0: SCLK idles low, data sampled on the
// rising edge and changed on the falling edge, most significant bit first,
// 8-bit words). SCLK, CS_N and MOSI are oversampled with clk through two
// flip-flop synchronisers, so clk must be at least 4x SCLK. When CS_N falls
// the slave takes tx_data (tx_req pulses) and presents its first bit on
// MISO; after each eighth rising edge the received byte appears on rx_data
// with a one-clock rx_valid and the next tx_data is taken at the following
// falling edge. MISO is 0 while CS_N is high.
module spi_slave (
  input  logic       clk,
  input  logic       rst,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_req
);
  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [6:0] rxsh;
  logic [7:0] txsh;
  logic [2:0] bcnt;
  logic       rise, fall, sel, cs_fall;

  assign sel     = !cs_s[1];
  assign cs_fall = (cs_s[2:1] == 2'b10);
  assign rise    = sel && (sclk_s[2:1] == 2'b01);
  assign fall    = sel && (sclk_s[2:1] == 2'b10);
  assign miso    = sel && txsh[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_s <= '0; cs_s <= 3'b111; mosi_s <= '0; rxsh <= '0; txsh <= '0;
      bcnt <= '0; rx_data <= '0; rx_valid <= 1'b0; tx_req <= 1'b0;
    end else begin
      sclk_s   <= {sclk_s[1:0], sclk};
      cs_s     <= {cs_s[1:0], cs_n};
      mosi_s   <= {mosi_s[0], mosi};
      rx_valid <= 1'b0;
      tx_req   <= 1'b0;
      if (!sel) begin
        bcnt <= '0;
      end else if (cs_fall) begin
        bcnt <= '0; txsh <= tx_data; tx_req <= 1'b1;
      end else begin
        if (rise) begin
          rxsh <= {rxsh[5:0], mosi_s[1]};
          bcnt <= bcnt + 1'b1;
          if (bcnt == 3'd7) begin
            rx_data  <= {rxsh[6:0], mosi_s[1]};
            rx_valid <= 1'b1;
          end
        end
        if (fall) begin
          if (bcnt == 3'd0) begin
            txsh <= tx_data; tx_req <= 1'b1;
          end else begin
            txsh <= {txsh[6:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
