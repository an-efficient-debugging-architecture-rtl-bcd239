// trigger_unit: decodes the 14 trigger pins TP0..TP13 of the debug
// architecture. The pins are synchronised by two flip-flops, then:
//   TP0        soft reset (level, to the reset controller)
//   TP1..TP8   tap selection: TPi enables the i-th group of NTAPS/8 taps
//   TP9        capture trigger on the next filter output
//   TP10       UART enable, active low
//   TP11       I2C enable, active low
//   TP12       SPI enable, active low (a pin the numbering leaves free)
//   TP13       capture trigger on the next serial protocol word
// fire pulses one clock after a filter output or protocol word that an armed
// TP9/TP13 trigger selects; fire_src says which (0 filter, 1 protocol).
// The pin assignment follows the trigger table; the grouping of taps and
// the use of TP12 are this design's choices.
module trigger_unit
  import dbg_pkg::*;
#(
  parameter int NTAPS = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_TP-1:0] tp,
  input  logic              y_valid,
  input  logic              proto_valid,
  output logic              soft_rst,
  output logic [NTAPS-1:0]  tap_mask,
  output logic              sel_uart,
  output logic              sel_spi,
  output logic              sel_i2c,
  output logic              fire,
  output logic              fire_src
);
  logic [NUM_TP-1:0] s1, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; fire <= 1'b0; fire_src <= 1'b0;
    end else begin
      s1 <= tp;
      s2 <= s1;
      fire <= (s2[TP_FILTER] && y_valid) || (s2[TP_PROTO] && proto_valid);
      if (s2[TP_FILTER] && y_valid)      fire_src <= 1'b0;
      else if (s2[TP_PROTO] && proto_valid) fire_src <= 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < NTAPS; k++) tap_mask[k] = s2[TP_TAP_LO + (k * 8) / NTAPS];
    soft_rst = s2[TP_RESET];
    sel_uart = !s2[TP_UART];
    sel_i2c  = !s2[TP_I2C];
    sel_spi  = !s2[TP_SPI];
  end
endmodule
