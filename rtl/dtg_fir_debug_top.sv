// dtg_fir_debug_top: the DTG-FIR filter with its reconfigurable debug
// architecture.
//   Data path: a host sends 8-bit samples over one of three serial links
//   (UART, SPI or I2C target) or loads them through the input scan chain
//   (scan_mode high). The FSM debug controller forwards the active link's
//   samples to the 16-tap filter; UART frames pass first through the error
//   correction unit, which repairs start/stop bits and reports
//   synchronisation errors. After ERR_LIMIT such errors the FSM fails over
//   from UART to I2C. Each filter result is returned on the active link as
//   four bytes, least significant first, and is compared with an expected
//   value if one was queued (exp_valid/exp_y). One result is held at a
//   time: results finished while the host has not yet read the previous one
//   are dropped (res_dropped), and a change of link discards pending bytes.
//   Debug: the trigger pins TP0..TP13 give soft reset (TP0), tap selection
//   (TP1..TP8), capture triggers (TP9 on a filter output, TP13 on a link
//   word) and link enables (TP10 UART, TP11 I2C, TP12 SPI, active low). A
//   trigger opens a capture window: link words go to the input region and
//   filter outputs to the output region of one common trace buffer, read
//   out on trace_raddr/trace_rdata (one clock latency). The clock
//   controller can halt the filter and the UART input path (dbg_halt, or at
//   the end of a window when halt_on_full is high), resume or single-step
//   it. Counters record cycles, words, errors, outputs, triggers and drops.
//   Clocks: clk runs everything except the UART serial side, which runs on
//   serial_clk; the UART buffers cross between them. clk must be at least
//   4x the SPI clock and well above the I2C clock. Resets: arst_n
//   (asynchronous, active low) and TP0; TP0 resets only the clk domain.
// Module split follows the architecture's block diagrams; protocol details,
// widths and the routing of results back to the host are this design's.
module dtg_fir_debug_top
  import dbg_pkg::*;
#(
  parameter int         NTAPS       = 16,
  parameter int         DATA_W      = 8,
  parameter int         COEF_W      = 16,
  parameter int         ACC_W       = 28,
  parameter int         TRACE_DEPTH = 64,
  parameter int         WINDOW      = 16,
  parameter int         UART_DIV    = 27,
  parameter logic [6:0] I2C_ADDR    = 7'h50,
  parameter int         ERR_LIMIT   = 2,
  localparam int TAW = $clog2(TRACE_DEPTH),
  localparam int CAW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                     clk,
  input  logic                     serial_clk,
  input  logic                     arst_n,
  input  logic [NUM_TP-1:0]        tp,
  // UART
  input  logic                     uart_rxd,
  output logic                     uart_txd,
  // I2C target
  input  logic                     i2c_scl,
  input  logic                     i2c_sda_i,
  output logic                     i2c_sda_oe,
  // SPI target
  input  logic                     spi_sclk,
  input  logic                     spi_cs_n,
  input  logic                     spi_mosi,
  output logic                     spi_miso,
  // input scan chain
  input  logic                     scan_mode,
  input  logic                     scan_en,
  input  logic                     scan_in,
  input  logic                     scan_update,
  output logic                     scan_out,
  // coefficient load
  input  logic                     coef_we,
  input  logic [CAW-1:0]           coef_waddr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  // clock control and fail-over
  input  logic                     dbg_halt,
  input  logic                     dbg_resume,
  input  logic                     dbg_step,
  input  logic                     halt_on_full,
  input  logic                     clear_fail,
  input  logic                     cnt_clear,
  // expected response
  input  logic                     exp_valid,
  input  logic [ACC_W-1:0]         exp_y,
  // trace read-out
  input  logic [TAW-1:0]           trace_raddr,
  output logic [TRACE_W-1:0]       trace_rdata,
  // results and status
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_valid,
  output dbg_state_e               state,
  output proto_e                   proto,
  output logic                     uart_failed,
  output logic                     failover,
  output logic                     capturing,
  output logic                     capture_done,
  output logic                     halted,
  output logic                     cmp_pass,
  output logic                     cmp_fail,
  output logic                     cmp_any_fail,
  output logic [15:0]              n_match,
  output logic [15:0]              n_mismatch,
  output logic [15:0]              cnt_cycles,
  output logic [15:0]              cnt_words,
  output logic [15:0]              cnt_errors,
  output logic [15:0]              cnt_outputs,
  output logic [15:0]              cnt_trigs,
  output logic [15:0]              cnt_drops,
  output logic                     uart_tx_irq,
  output logic                     uart_rx_irq,
  output logic                     uart_rx_overrun,
  output logic                     res_dropped,
  output logic                     trig_src,
  output logic                     i2c_busy,
  output logic                     trace_full_in,
  output logic                     trace_full_out
);
  logic rst, srst, soft_rst, ce;
  logic sel_uart, sel_spi, sel_i2c, fire;
  logic [NTAPS-1:0] tap_mask;

  // reset controllers, one per clock domain
  reset_ctrl u_rst  (.clk, .arst_n, .soft_rst, .rst);
  reset_ctrl u_srst (.clk(serial_clk), .arst_n, .soft_rst(1'b0), .rst(srst));

  // triggers
  logic fsm_word_valid;
  trigger_unit #(.NTAPS(NTAPS)) u_trig (
    .clk, .rst, .tp, .y_valid, .proto_valid(fsm_word_valid), .soft_rst, .tap_mask,
    .sel_uart, .sel_spi, .sel_i2c, .fire, .fire_src(trig_src)
  );

  // clock controller
  clock_ctrl u_clk (
    .clk, .rst, .halt(dbg_halt || (halt_on_full && capture_done)),
    .resume(dbg_resume), .step(dbg_step), .ce, .halted
  );

  // UART link and error correction unit
  logic [9:0] rx_frame, ecu_frame;
  logic       rx_valid, rx_pop, pop_q, tx_push, tx_full;
  logic [7:0] ecu_data;
  logic       ecu_valid, start_err, stop_err, sync_err;
  logic [7:0] res_byte;
  logic       res_valid, res_take;

  uart #(.DIV(UART_DIV)) u_uart (
    .sclk(serial_clk), .srst, .pclk(clk), .prst(rst), .rxd(uart_rxd), .txd(uart_txd),
    .rx_frame, .rx_valid, .rx_pop, .tx_data(res_byte), .tx_push, .tx_full,
    .tx_irq(uart_tx_irq), .rx_irq(uart_rx_irq), .rx_overrun(uart_rx_overrun)
  );

  // frames leave the RX buffer at most every other clock and only while the
  // input path runs
  assign rx_pop = rx_valid && ce && !pop_q && (proto == PROTO_UART);
  always_ff @(posedge clk) begin
    if (rst) pop_q <= 1'b0;
    else     pop_q <= rx_pop;
  end

  uart_ecu u_ecu (
    .clk, .rst, .ce, .frame(rx_frame), .valid(rx_pop), .data(ecu_data),
    .fixed_frame(ecu_frame), .out_valid(ecu_valid), .start_err, .stop_err, .sync_err
  );

  // I2C and SPI targets
  logic [7:0] i2c_rx, spi_rx;
  logic       i2c_rx_valid, i2c_tx_req, spi_rx_valid, spi_tx_req;

  i2c_slave #(.ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst, .scl(i2c_scl), .sda_i(i2c_sda_i), .sda_oe(i2c_sda_oe),
    .rx_data(i2c_rx), .rx_valid(i2c_rx_valid), .tx_data(res_valid ? res_byte : 8'hFF),
    .tx_req(i2c_tx_req), .active(i2c_busy)
  );

  spi_slave u_spi (
    .clk, .rst, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .rx_data(spi_rx), .rx_valid(spi_rx_valid), .tx_data(res_valid ? res_byte : 8'hFF),
    .tx_req(spi_tx_req)
  );

  // FSM debug controller
  logic                x_link_valid;
  logic [7:0]          x_link;
  logic                buf_we, buf_region, room;
  logic [TAW-1:0]      cnt_in, cnt_out, buf_waddr;
  logic [TRACE_W-1:0]  buf_wdata;

  dbg_fsm #(.ACC_W(ACC_W), .AW(TAW), .WINDOW(WINDOW), .ERR_LIMIT(ERR_LIMIT)) u_fsm (
    .clk, .rst, .sel_uart, .sel_spi, .sel_i2c, .clear_fail,
    .uart_valid(ecu_valid), .uart_frame(ecu_frame ^ {stop_err, 8'h00, start_err}),
    .uart_data(ecu_data), .uart_err(sync_err),
    .spi_valid(spi_rx_valid), .spi_data(spi_rx), .i2c_valid(i2c_rx_valid), .i2c_data(i2c_rx),
    .y_valid, .y(y_out), .trig(fire), .state, .proto, .uart_failed, .failover,
    .x_valid(x_link_valid), .x_data(x_link), .word_valid(fsm_word_valid),
    .buf_we, .buf_region, .cnt_in, .cnt_out, .buf_wdata, .capturing, .capture_done
  );

  // common trace buffer and its address decoder
  addr_decoder #(.AW(TAW)) u_dec (
    .region(buf_region), .cnt_in, .cnt_out, .addr(buf_waddr), .room, .full_in(trace_full_in),
    .full_out(trace_full_out)
  );

  trace_buffer #(.DEPTH(TRACE_DEPTH), .W(TRACE_W)) u_buf (
    .clk, .we(buf_we && room), .waddr(buf_waddr), .wdata(buf_wdata),
    .raddr(trace_raddr), .rdata(trace_rdata)
  );

  // filter input: scan chain or active link
  logic [DATA_W-1:0] scan_data;
  logic              scan_valid, x_valid, fir_ready;
  logic signed [DATA_W-1:0] x_in;

  scan_chain #(.DATA_W(DATA_W)) u_scan (
    .clk, .rst, .scan_en, .scan_in, .scan_update, .scan_out, .data(scan_data), .valid(scan_valid)
  );

  assign x_valid = scan_mode ? scan_valid : x_link_valid;
  assign x_in    = scan_mode ? scan_data  : DATA_W'(x_link);

  dtg_fir #(.NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_fir (
    .clk, .rst, .ce, .x_valid, .x_in, .ready(fir_ready), .tap_mask, .y_out, .y_valid,
    .coef_we, .coef_waddr, .coef_wdata
  );

  // results back to the host on the active link
  always_comb begin
    unique case (proto)
      PROTO_UART: res_take = !tx_full;
      PROTO_SPI:  res_take = spi_tx_req;
      PROTO_I2C:  res_take = i2c_tx_req;
      default:    res_take = 1'b1;   // no link: results are discarded
    endcase
    tx_push = res_valid && (proto == PROTO_UART) && !tx_full;
  end

  proto_e proto_q;
  always_ff @(posedge clk) begin
    if (rst) proto_q <= PROTO_NONE;
    else     proto_q <= proto;
  end

  result_serializer #(.ACC_W(ACC_W)) u_ser (
    .clk, .rst, .y_valid, .y(y_out), .byte_out(res_byte), .byte_valid(res_valid),
    .byte_take(res_take), .flush(proto != proto_q), .dropped(res_dropped)
  );

  // response comparator
  response_comparator #(.ACC_W(ACC_W)) u_cmp (
    .clk, .rst, .exp_valid, .exp(exp_y), .act_valid(y_valid), .act(y_out),
    .pass(cmp_pass), .fail(cmp_fail), .any_fail(cmp_any_fail), .n_match, .n_mismatch
  );

  // counters and timer
  dbg_counters #(.CW(16)) u_cnt (
    .clk, .rst, .clr(cnt_clear), .inc_cycle(capturing), .inc_word(fsm_word_valid),
    .inc_err(ecu_valid && sync_err), .inc_out(y_valid), .inc_trig(fire),
    .inc_drop(x_valid && !(fir_ready && ce)),
    .cycles(cnt_cycles), .words(cnt_words), .errors(cnt_errors), .outputs(cnt_outputs),
    .trigs(cnt_trigs), .drops(cnt_drops)
  );
endmodule
