// uart_prescaler: baud-rate generator of the UART. Divides the serial clock
// by DIV and gives a one-clock tick (Prescalar_en) every DIV clocks; the
// transmitter and receiver count 16 ticks per bit. DIV = f_serial/(16*baud);
// the default 27 suits a 50 MHz serial clock at 115200 baud (this design's
// choice). Reset restarts the count.
module uart_prescaler #(
  parameter int DIV = 27
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      cnt  <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
