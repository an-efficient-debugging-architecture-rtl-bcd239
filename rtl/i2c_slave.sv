// i2c_slave: I2C target port through which a host master sends filter input
// bytes and reads filter results. SCL and SDA are oversampled with clk (two
// flip-flop synchronisers, edge detection), so clk must be many times the bus
// rate (100 or 400 kHz). A START (SDA falling while SCL high) begins address
// reception; STOP (SDA rising while SCL high) ends the transfer. Bytes are
// 8 bits, most significant first, each followed by an acknowledge. When the
// 7-bit address matches ADDR the slave acknowledges it; in a write every data
// byte is acknowledged and given out on rx_data with a one-clock rx_valid; in
// a read the slave takes tx_data (tx_req pulses for one clock when it does)
// and shifts it out, continuing while the master acknowledges. SDA is
// open-drain: sda_oe high means pull the line low. No clock stretching.
module i2c_slave #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_req,
  output logic       active
);
  typedef enum logic [2:0] {IDLE, ADDR_RX, ADDR_ACK, WR_RX, WR_ACK, RD_TX, RD_ACK} st_e;
  st_e        st;
  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c, sda_v, rw, ack_ok;
  logic [7:0] sh;
  logic [2:0] bcnt;

  assign scl_rise = (scl_s[2:1] == 2'b01);
  assign scl_fall = (scl_s[2:1] == 2'b10);
  assign sda_v    = sda_s[1];
  assign start_c  = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b10);
  assign stop_c   = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b01);
  assign active   = (st != IDLE) && (st != ADDR_RX);

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_s <= 3'b111; sda_s <= 3'b111; st <= IDLE; sh <= '0; bcnt <= '0;
      rw <= 1'b0; ack_ok <= 1'b0; sda_oe <= 1'b0;
      rx_data <= '0; rx_valid <= 1'b0; tx_req <= 1'b0;
    end else begin
      scl_s    <= {scl_s[1:0], scl};
      sda_s    <= {sda_s[1:0], sda_i};
      rx_valid <= 1'b0;
      tx_req   <= 1'b0;
      if (start_c) begin
        st <= ADDR_RX; bcnt <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        st <= IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          IDLE: ;
          ADDR_RX, WR_RX: if (scl_rise) begin
            sh   <= {sh[6:0], sda_v};
            bcnt <= bcnt + 1'b1;
            if (bcnt == 3'd7) begin
              if (st == ADDR_RX) begin
                rw <= sda_v;
                st <= (sh[6:0] == ADDR) ? ADDR_ACK : IDLE;
              end else begin
                rx_data  <= {sh[6:0], sda_v};
                rx_valid <= 1'b1;
                st       <= WR_ACK;
              end
            end
          end
          ADDR_ACK, WR_ACK: if (scl_fall) begin
            if (!sda_oe) begin
              sda_oe <= 1'b1;                 // drive the acknowledge
            end else begin
              sda_oe <= 1'b0;                 // acknowledge clock over
              bcnt   <= '0;
              if (st == ADDR_ACK && rw) begin
                st     <= RD_TX;
                sh     <= {tx_data[6:0], 1'b0};
                tx_req <= 1'b1;
                sda_oe <= !tx_data[7];
              end else begin
                st <= WR_RX;
              end
            end
          end
          RD_TX: if (scl_fall) begin
            bcnt <= bcnt + 1'b1;
            if (bcnt == 3'd7) begin
              sda_oe <= 1'b0;                 // release for master ack
              st     <= RD_ACK;
            end else begin
              sda_oe <= !sh[7];
              sh     <= {sh[6:0], 1'b0};
            end
          end
          RD_ACK: begin
            if (scl_rise) ack_ok <= !sda_v;
            if (scl_fall) begin
              if (ack_ok) begin
                st     <= RD_TX;
                bcnt   <= '0;
                sh     <= {tx_data[6:0], 1'b0};
                tx_req <= 1'b1;
                sda_oe <= !tx_data[7];
              end else begin
                st <= IDLE;
              end
            end
          end
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
