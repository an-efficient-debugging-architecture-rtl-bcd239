// tb_dbg_fsm: walks the FSM debug controller through its mechanisms and
// checks state numbers, forwarding to the filter and every buffer write:
//   input selection (UART, then SPI, priority UART over SPI over I2C),
//   the MEM state after each word, capture windows opened by trig and closed
//   when a region holds WINDOW words, filter outputs in region 1, and the
//   fail-over from UART to I2C after ERR_LIMIT synchronisation errors.
module tb_dbg_fsm;
  import dbg_pkg::*;
  localparam int WINDOW = 16, ERR_LIMIT = 2, AW = 6;
  logic clk = 0, rst = 1;
  logic sel_uart = 0, sel_spi = 0, sel_i2c = 0, clear_fail = 0;
  logic uart_valid = 0, uart_err = 0, spi_valid = 0, i2c_valid = 0, y_valid = 0, trig = 0;
  logic [9:0] uart_frame = 0;
  logic [7:0] uart_data = 0, spi_data = 0, i2c_data = 0;
  logic [27:0] y = 0;
  dbg_state_e state;
  proto_e proto;
  logic uart_failed, failover, x_valid, word_valid, buf_we, buf_region, capturing, capture_done;
  logic [7:0] x_data;
  logic [AW-1:0] cnt_in, cnt_out;
  logic [31:0] buf_wdata;
  logic [32:0] wq [$];     // expected writes {region, data}
  int checks = 0, failures = 0, nfo = 0, ndone = 0, nfwd = 0;

  dbg_fsm dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (!rst) begin
    if (buf_we) begin
      checks++;
      if (wq.size() == 0 || {buf_region, buf_wdata} !== wq[0]) begin
        failures++; $display("FAIL write r%0d %h at %0t", buf_region, buf_wdata, $time);
      end
      if (wq.size() != 0) void'(wq.pop_front());
    end
    if (failover) nfo++;
    if (capture_done) ndone++;
  end

  task automatic expect_state(dbg_state_e s);
    checks++;
    if (state !== s) begin failures++; $display("FAIL state %0d exp %0d at %0t", state, s, $time); end
  endtask

  task automatic uart_word(logic [7:0] d, logic err, bit stored);
    @(negedge clk);
    uart_valid = 1; uart_data = d; uart_err = err; uart_frame = {!err, d, 1'b0};
    #1; checks += 2;
    if (!x_valid || x_data !== d) begin failures++; $display("FAIL forward"); end
    nfwd++;
    if (stored) wq.push_back({1'b0, TAG_UART, 1'b0, err, 18'd0, uart_frame});
    @(negedge clk); uart_valid = 0; uart_err = 0;
    expect_state(ST_UART_MEM);
    @(negedge clk);
  endtask

  task automatic link_word(bit spi, logic [7:0] d, bit stored);
    @(negedge clk);
    if (spi) begin spi_valid = 1; spi_data = d; end else begin i2c_valid = 1; i2c_data = d; end
    #1; checks++;
    if (!x_valid || x_data !== d) begin failures++; $display("FAIL forward link"); end
    if (stored) wq.push_back({1'b0, spi ? TAG_SPI : TAG_I2C, 22'd0, d});
    @(negedge clk); spi_valid = 0; i2c_valid = 0;
    expect_state(spi ? ST_SPI_MEM : ST_I2C_MEM);
    @(negedge clk);
  endtask

  task automatic fir_out(logic [27:0] v, bit stored);
    @(negedge clk); y_valid = 1; y = v;
    if (stored) wq.push_back({1'b1, TAG_FIR, 2'b00, v});
    @(negedge clk); y_valid = 0;
  endtask

  initial begin
    @(posedge clk); @(posedge clk); rst <= 0;
    @(negedge clk); expect_state(ST_IDLE);
    sel_uart = 1; sel_spi = 1; @(negedge clk); @(negedge clk); expect_state(ST_UART);
    uart_word(8'h11, 0, 0);                 // no capture yet
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    checks++; if (!capturing) begin failures++; $display("FAIL not capturing"); end
    uart_word(8'h22, 0, 1);
    fir_out(28'h0ABCDEF, 1);
    uart_word(8'h33, 1, 1);                 // first sync error
    // a filter output in the same clock as a MEM-state write waits a clock
    @(negedge clk); uart_valid = 1; uart_data = 8'h44; uart_frame = {1'b1, 8'h44, 1'b0};
    wq.push_back({1'b0, TAG_UART, 2'b00, 18'd0, 10'({1'b1, 8'h44, 1'b0})});
    wq.push_back({1'b1, TAG_FIR, 2'b00, 28'h0000123});
    @(negedge clk); uart_valid = 0; y_valid = 1; y = 28'h0000123;
    @(negedge clk); y_valid = 0;
    for (int i = 0; i < WINDOW - 4; i++) uart_word(8'($urandom), 0, 1);
    uart_word(8'h55, 0, 1);                 // WINDOW-th input word: window closes
    repeat (2) @(negedge clk);
    checks += 2;
    if (capturing) begin failures++; $display("FAIL window still open"); end
    if (ndone != 1) begin failures++; $display("FAIL capture_done %0d", ndone); end
    uart_word(8'h66, 0, 0);                 // not stored after the window
    uart_word(8'h77, 1, 0);                 // second error: fail-over
    @(negedge clk); expect_state(ST_I2C);
    checks += 2;
    if (!uart_failed) begin failures++; $display("FAIL uart_failed"); end
    if (nfo != 1) begin failures++; $display("FAIL failover pulses %0d", nfo); end
    // I2C words, new window
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    link_word(0, 8'h9A, 1);
    fir_out(28'hFFFFFFF, 1);
    // clear the failure; with UART deselected the SPI link is chosen
    sel_uart = 0; sel_i2c = 0; clear_fail = 1; @(negedge clk); clear_fail = 0;
    repeat (3) @(negedge clk); expect_state(ST_SPI);
    link_word(1, 8'hC3, 1);
    sel_spi = 0; repeat (2) @(negedge clk); expect_state(ST_IDLE);
    repeat (3) @(negedge clk);
    checks += 2;
    if (wq.size() != 0) begin failures++; $display("FAIL %0d writes missing", wq.size()); end
    if (nfwd == 0) begin failures++; $display("FAIL nothing forwarded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
