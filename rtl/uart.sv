// uart: the UART link of the debug architecture: prescaler, transmitter,
// receiver and two asynchronous FIFOs. The serial side (prescaler, tx, rx)
// runs on sclk; the processor side sees the RX buffer (10-bit frames
// {stop, data[7:0], start}, first word fall-through, rx_pop to advance) and
// the TX buffer (tx_push writes a byte unless tx_full). Frames are 8N1 at
// sclk/(16*DIV) baud. tx_irq and rx_irq are one-clock pulses in the sclk
// domain at the end of each sent or received frame; rx_overrun pulses when a
// received frame is lost because the RX buffer is full. Each clock domain has its
// own synchronous reset (srst for sclk, prst for pclk).
module uart #(
  parameter int DIV     = 27,
  parameter int FIFO_AW = 3
) (
  input  logic       sclk,
  input  logic       srst,
  input  logic       pclk,
  input  logic       prst,
  input  logic       rxd,
  output logic       txd,
  output logic [9:0] rx_frame,
  output logic       rx_valid,
  input  logic       rx_pop,
  input  logic [7:0] tx_data,
  input  logic       tx_push,
  output logic       tx_full,
  output logic       tx_irq,
  output logic       rx_irq,
  output logic       rx_overrun
);
  logic       tick, tx_pop, tx_empty, rx_push, rx_full, rx_empty;
  logic [7:0] tx_byte;
  logic [9:0] frame;

  uart_prescaler #(.DIV(DIV)) u_pre (.clk(sclk), .rst(srst), .tick);

  uart_tx u_tx (
    .clk(sclk), .rst(srst), .tick, .data(tx_byte), .valid(!tx_empty),
    .pop(tx_pop), .txd, .irq(tx_irq)
  );

  uart_rx u_rx (
    .clk(sclk), .rst(srst), .tick, .rxd, .frame, .push(rx_push), .irq(rx_irq)
  );

  async_fifo #(.W(8), .AW(FIFO_AW)) u_txbuf (
    .wclk(pclk), .wrst(prst), .push(tx_push), .din(tx_data), .full(tx_full),
    .rclk(sclk), .rrst(srst), .pop(tx_pop), .dout(tx_byte), .empty(tx_empty)
  );

  async_fifo #(.W(10), .AW(FIFO_AW)) u_rxbuf (
    .wclk(sclk), .wrst(srst), .push(rx_push), .din(frame), .full(rx_full),
    .rclk(pclk), .rrst(prst), .pop(rx_pop), .dout(rx_frame), .empty(rx_empty)
  );

  assign rx_valid   = !rx_empty;
  assign rx_overrun = rx_push && rx_full;  // frame lost, sclk domain
endmodule
