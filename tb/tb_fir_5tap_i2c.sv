// tb_fir_5tap_i2c: the 5-tap I2C demonstration run on the full design at
// its default parameters. The filter is set up as a 5-tap filter: the
// coefficients of taps 6..16 are written to zero and TP4..TP8 switch those
// tap pairs off, so only taps 1..6 take part (tap 6 has coefficient 0).
// Samples arrive over the I2C link. Every result is read back over I2C
// (four bytes, least significant first) and compared with a reference
// model.
//   Part 1: the demonstration values. Taps 4 and 5 see inputs 3 and 4 with
//           coefficients 4 and 5, taps 1..3 have coefficient 0, so the
//           output after the fifth sample is 3*4 + 4*5 = 32.
//   Part 2: random coefficients on taps 1..5 and random samples, still in
//           the 5-tap setting.
module tb_fir_5tap_i2c;
  import dbg_pkg::*;
  localparam int N = 16;
  localparam int Q = 10;                      // I2C quarter period in clocks

  logic clk = 0, serial_clk = 0, arst_n = 0;
  logic [13:0] tp;
  logic uart_rxd = 1, uart_txd;
  logic i2c_scl = 1, m_low = 0, i2c_sda_oe;
  wire  i2c_sda_i = !(m_low || i2c_sda_oe);
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0, spi_miso;
  logic scan_mode = 0, scan_en = 0, scan_in = 0, scan_update = 0, scan_out;
  logic coef_we = 0;
  logic [3:0] coef_waddr = 0;
  logic signed [15:0] coef_wdata = 0;
  logic dbg_halt = 0, dbg_resume = 0, dbg_step = 0, halt_on_full = 0, clear_fail = 0, cnt_clear = 0;
  logic exp_valid = 0;
  logic [27:0] exp_y = 0;
  logic [5:0] trace_raddr = 0;
  logic [31:0] trace_rdata;
  logic signed [27:0] y_out;
  logic y_valid;
  dbg_state_e state;
  proto_e proto;
  logic uart_failed, failover, capturing, capture_done, halted, cmp_pass, cmp_fail, cmp_any_fail;
  logic [15:0] n_match, n_mismatch, cnt_cycles, cnt_words, cnt_errors, cnt_outputs, cnt_trigs, cnt_drops;
  logic uart_tx_irq, uart_rx_irq, uart_rx_overrun, res_dropped, trig_src, i2c_busy, trace_full_in, trace_full_out;

  dtg_fir_debug_top dut (.*);

  always #5  clk = ~clk;
  always #10 serial_clk = ~serial_clk;

  int checks = 0, failures = 0;
  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference filter with the 5-tap mask
  longint c [N];
  longint xh [N];
  longint yq [$];
  logic [N-1:0] mask_m;
  longint y_last;

  task automatic accept(logic signed [7:0] s);
    longint e;
    e = 0;
    for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = s;
    for (int k = 0; k < N; k++) if (mask_m[k]) e += c[k] * xh[k];
    yq.push_back(e);
  endtask

  always @(posedge clk) if (arst_n && y_valid) begin
    checks++;
    if (yq.size() == 0) begin failures++; $display("FAIL unexpected y %0d", y_out); end
    else begin
      longint e;
      e = yq.pop_front();
      if (y_out !== 28'(e)) begin failures++; $display("FAIL y=%0d exp=%0d at %0t", y_out, e, $time); end
    end
    y_last = longint'(y_out);
  end

  // I2C master
  task automatic wq(int n = 1); repeat (n * Q) @(negedge clk); endtask
  task automatic i2c_start; m_low = 0; i2c_scl = 1; wq(); m_low = 1; wq(); i2c_scl = 0; wq(); endtask
  task automatic i2c_stop; m_low = 1; wq(); i2c_scl = 1; wq(); m_low = 0; wq(2); endtask
  task automatic put_bit(logic b); m_low = !b; wq(); i2c_scl = 1; wq(2); i2c_scl = 0; wq(); endtask
  task automatic get_bit(output logic b); m_low = 0; wq(); i2c_scl = 1; wq(); b = i2c_sda_i; wq(); i2c_scl = 0; wq(); endtask
  task automatic i2c_wr(logic [7:0] v, output logic ack);
    logic b;
    for (int k = 7; k >= 0; k--) put_bit(v[k]);
    get_bit(b); ack = !b;
  endtask
  task automatic i2c_rd(logic ack, output logic [7:0] v);
    for (int k = 7; k >= 0; k--) get_bit(v[k]);
    put_bit(!ack); m_low = 0;
  endtask

  // send one sample, wait for its result and read it back over I2C
  task automatic sample_and_read(logic [7:0] s, output longint y);
    logic ack;
    logic [7:0] rb [4];
    int n;
    accept(s);
    i2c_start(); i2c_wr({7'h50, 1'b0}, ack); check(ack, "address ack (write)");
    i2c_wr(s, ack); check(ack, "data ack");
    i2c_stop();
    n = 0;
    while (yq.size() != 0 && n < 2000) begin @(negedge clk); n++; end
    check(yq.size() == 0, "result produced");
    repeat (5) @(negedge clk);
    i2c_start(); i2c_wr({7'h50, 1'b1}, ack); check(ack, "address ack (read)");
    for (int k = 0; k < 4; k++) i2c_rd(k < 3, rb[k]);
    i2c_stop();
    y = longint'($signed({rb[3], rb[2], rb[1], rb[0]}));
    check({rb[3], rb[2], rb[1], rb[0]} == 32'(y_last), "I2C read-back equals y_out");
  endtask

  task automatic write_coefs();
    for (int k = 0; k < N; k++) begin
      @(negedge clk); coef_we = 1; coef_waddr = 4'(k); coef_wdata = 16'(c[k]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  initial begin
    longint y;
    logic [7:0] s;
    foreach (xh[k]) xh[k] = 0;
    foreach (c[k]) c[k] = 0;
    y_last = 0;
    // 5-tap setting: TP1..TP3 on (taps 1..6), TP4..TP8 off
    tp = '1;
    tp[TP_RESET] = 0; tp[TP_FILTER] = 0; tp[TP_PROTO] = 0;
    tp[8:1] = 8'b0000_0111;
    for (int k = 0; k < N; k++) mask_m[k] = (k < 6);
    repeat (5) @(negedge clk); arst_n = 1;
    repeat (20) @(negedge clk);

    // Part 1: the demonstration values
    c[3] = 4; c[4] = 5;
    write_coefs();
    tp[TP_I2C] = 0;
    repeat (10) @(negedge clk);
    check(state == ST_I2C && proto == PROTO_I2C, "I2C selected");
    sample_and_read(8'd4, y);
    sample_and_read(8'd3, y);
    sample_and_read(8'd0, y);
    sample_and_read(8'd0, y);
    sample_and_read(8'd0, y);
    check(y == 32, "demonstration output 3*4 + 4*5");
    $display("5-tap demonstration: taps 4,5 inputs 3,4 coefficients 4,5 -> y = %0d", y);

    // Part 2: random 5-tap filters and samples
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < 5; k++) c[k] = longint'($urandom % 512) - 256;
      write_coefs();
      for (int i = 0; i < 6; i++) begin
        s = 8'($urandom);
        sample_and_read(s, y);
      end
    end
    check(cnt_errors == 0 && !uart_failed, "no link errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
