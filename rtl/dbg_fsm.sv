// dbg_fsm: FSM debug controller. It decides which serial link feeds the
// filter, fails over from a faulty UART, and records a trace window in the
// common buffer.
//   States (numbered as in the debug controller's description):
//     0 IDLE      no link enabled
//     1 UART, 2 SPI, 3 I2C            link enabled, waiting for a word
//     4 UART_MEM, 5 SPI_MEM, 6 I2C_MEM a word of that link is being stored
//   Input selection: from IDLE the first enabled link in the order UART,
//   SPI, I2C is taken; dropping the enable of the active link returns to
//   IDLE. Every word of the active link is forwarded at once to the filter
//   (x_valid/x_data) and, while a capture is running, written to region 0
//   of the buffer in the MEM state that follows.
//   Fail-over: each UART word carries the error correction unit's sync_err;
//   after ERR_LIMIT of them the UART is marked failed and the FSM moves to
//   the I2C link; the UART is skipped until clear_fail or reset.
//   Capture: trig starts a window and clears the two region counters (the
//   state machine counter); filter outputs go to region 1 (an output that
//   meets a MEM-state write waits one clock). The window closes, with a
//   one-clock capture_done, when either region holds WINDOW words.
//   Trace word: [31:30] tag (1 UART, 2 SPI, 3 I2C, 0 filter); UART words
//   keep the raw frame in [9:0] and sync_err in [28]; link bytes in [7:0];
//   filter outputs in [27:0], sign-extended or truncated to 28 bits.
// Words of a link may arrive at most every other clock.
module dbg_fsm
  import dbg_pkg::*;
#(
  parameter int ACC_W     = 28,
  parameter int AW        = 6,
  parameter int WINDOW    = 16,
  parameter int ERR_LIMIT = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sel_uart,
  input  logic                sel_spi,
  input  logic                sel_i2c,
  input  logic                clear_fail,
  input  logic                uart_valid,
  input  logic [FRAME_W-1:0]  uart_frame,
  input  logic [7:0]          uart_data,
  input  logic                uart_err,
  input  logic                spi_valid,
  input  logic [7:0]          spi_data,
  input  logic                i2c_valid,
  input  logic [7:0]          i2c_data,
  input  logic                y_valid,
  input  logic [ACC_W-1:0]    y,
  input  logic                trig,
  output dbg_state_e          state,
  output proto_e              proto,
  output logic                uart_failed,
  output logic                failover,
  output logic                x_valid,
  output logic [7:0]          x_data,
  output logic                word_valid,
  output logic                buf_we,
  output logic                buf_region,
  output logic [AW-1:0]       cnt_in,
  output logic [AW-1:0]       cnt_out,
  output logic [TRACE_W-1:0]  buf_wdata,
  output logic                capturing,
  output logic                capture_done
);
  localparam int ECW = $clog2(ERR_LIMIT + 1);
  dbg_state_e         nxt;
  logic [ECW-1:0]     err_cnt;
  logic [TRACE_W-1:0] word_q, y_word;
  logic               y_pend;
  logic               in_mem, wr_in, wr_out, close;

  // the word of the active link in this clock
  always_comb begin
    x_valid = 1'b0;
    x_data  = '0;
    unique case (state)
      ST_UART: begin x_valid = uart_valid; x_data = uart_data; end
      ST_SPI:  begin x_valid = spi_valid;  x_data = spi_data;  end
      ST_I2C:  begin x_valid = i2c_valid;  x_data = i2c_data;  end
      default: ;
    endcase
    word_valid = x_valid;
  end

  always_comb begin
    nxt      = state;
    failover = 1'b0;
    unique case (state)
      ST_IDLE:
        if (sel_uart && !uart_failed) nxt = ST_UART;
        else if (sel_spi)             nxt = ST_SPI;
        else if (sel_i2c)             nxt = ST_I2C;
      ST_UART:
        if (uart_failed) begin
          nxt = ST_I2C; failover = 1'b1;
        end else if (!sel_uart)       nxt = ST_IDLE;
        else if (uart_valid)          nxt = ST_UART_MEM;
      ST_SPI:
        if (!sel_spi)                 nxt = ST_IDLE;
        else if (spi_valid)           nxt = ST_SPI_MEM;
      ST_I2C:
        if (!sel_i2c && !uart_failed) nxt = ST_IDLE;
        else if (i2c_valid)           nxt = ST_I2C_MEM;
      ST_UART_MEM:                    nxt = ST_UART;
      ST_SPI_MEM:                     nxt = ST_SPI;
      ST_I2C_MEM:                     nxt = ST_I2C;
      default:                        nxt = ST_IDLE;
    endcase
  end

  always_comb begin
    unique case (state)
      ST_UART, ST_UART_MEM: proto = PROTO_UART;
      ST_SPI,  ST_SPI_MEM:  proto = PROTO_SPI;
      ST_I2C,  ST_I2C_MEM:  proto = PROTO_I2C;
      default:              proto = PROTO_NONE;
    endcase
    in_mem     = (state == ST_UART_MEM) || (state == ST_SPI_MEM) || (state == ST_I2C_MEM);
    wr_in      = capturing && in_mem && (cnt_in < AW'(WINDOW));
    wr_out     = capturing && !wr_in && y_pend && (cnt_out < AW'(WINDOW));
    buf_we     = wr_in || wr_out;
    buf_region = !wr_in && wr_out;
    buf_wdata  = wr_in ? word_q : y_word;
    close      = capturing && ((cnt_in >= AW'(WINDOW)) || (cnt_out >= AW'(WINDOW)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE; err_cnt <= '0; uart_failed <= 1'b0; word_q <= '0;
      y_word <= '0; y_pend <= 1'b0; cnt_in <= '0; cnt_out <= '0;
      capturing <= 1'b0; capture_done <= 1'b0;
    end else begin
      state        <= nxt;
      capture_done <= 1'b0;

      // UART error count and fail-over
      if (clear_fail) begin
        uart_failed <= 1'b0; err_cnt <= '0;
      end else if (state == ST_UART && uart_valid && uart_err) begin
        if (err_cnt == ECW'(ERR_LIMIT - 1)) uart_failed <= 1'b1;
        err_cnt <= err_cnt + 1'b1;
      end

      // latch the word to be stored in the MEM state
      if (x_valid) begin
        unique case (state)
          ST_UART: word_q <= {TAG_UART, 1'b0, uart_err, 18'd0, uart_frame};
          ST_SPI:  word_q <= {TAG_SPI, 22'd0, spi_data};
          default: word_q <= {TAG_I2C, 22'd0, i2c_data};
        endcase
      end

      // filter outputs waiting for the buffer
      if (y_valid && capturing) begin
        y_word <= {TAG_FIR, 2'b00, 28'(signed'(y))};
        y_pend <= 1'b1;
      end else if (wr_out || !capturing) begin
        y_pend <= 1'b0;
      end

      // window (state machine counter)
      if (trig && !capturing) begin
        capturing <= 1'b1; cnt_in <= '0; cnt_out <= '0;
      end else begin
        if (wr_in)  cnt_in  <= cnt_in + 1'b1;
        if (wr_out) cnt_out <= cnt_out + 1'b1;
        if (close) begin
          capturing <= 1'b0; capture_done <= 1'b1;
        end
      end
    end
  end

  // a link word must not arrive in a MEM state
  a_word_spacing: assert property (@(posedge clk) disable iff (rst)
    in_mem |-> !((proto == PROTO_UART && uart_valid) || (proto == PROTO_SPI && spi_valid) ||
                 (proto == PROTO_I2C && i2c_valid)));
endmodule
