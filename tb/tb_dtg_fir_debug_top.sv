// tb_dtg_fir_debug_top: end-to-end test of the whole debug architecture at
// its default parameters (16 taps, 64-word trace buffer, UART divider 27).
// A reference FIR model follows every sample the design accepts and checks
// every y(n). The test walks through, and counts, each mechanism:
//   scan-chain input, coefficient loading, comparator pass and fail,
//   UART input with results returned on the UART, a repaired stop bit,
//   fail-over from UART to I2C, I2C write and read-back, tap selection by
//   TP1..TP8, a sample dropped while halted, single-stepping, SPI input and
//   read-back, capture windows opened by TP13 and TP9, a window closing with
//   halt_on_full, trace buffer read-out, and soft reset by TP0.
module tb_dtg_fir_debug_top;
  import dbg_pkg::*;
  localparam int N = 16;
  localparam int BIT_NS = 16 * 27 * 20;       // UART bit: 16 ticks of 27 serial clocks of 20 ns
  localparam int Q = 10;                      // I2C quarter period in clocks
  localparam int H = 8;                       // SPI half period in clocks

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
  // mechanism counters
  int m_scan, m_coef, m_cmp_pass, m_cmp_fail, m_uart_in, m_uart_res, m_stop_fix, m_failover,
      m_i2c_in, m_i2c_res, m_tapsel, m_drop, m_step, m_spi_in, m_spi_res, m_trig_proto,
      m_trig_filter, m_window_halt, m_trace, m_soft_reset, m_res_drop;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- reference filter ----------------
  longint c [N];
  longint xh [N];
  longint yq [$];
  longint ylog [$];           // every output seen
  logic [N-1:0] mask_m;

  function automatic longint model_push(logic signed [7:0] s);
    longint e;
    e = 0;
    for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = s;
    for (int k = 0; k < N; k++) if (mask_m[k]) e += c[k] * xh[k];
    return e;
  endfunction

  task automatic accept(logic signed [7:0] s);
    yq.push_back(model_push(s));
  endtask

  always @(posedge clk) if (arst_n && y_valid) begin
    checks++;
    if (yq.size() == 0) begin failures++; $display("FAIL unexpected y %0d", y_out); end
    else begin
      longint e;
      e = yq.pop_front();
      if (y_out !== 28'(e)) begin failures++; $display("FAIL y=%0d exp=%0d at %0t", y_out, e, $time); end
    end
    ylog.push_back(longint'(y_out));
  end
  always @(posedge clk) begin
    if (arst_n && cmp_pass) m_cmp_pass++;
    if (arst_n && cmp_fail) m_cmp_fail++;
    if (arst_n && res_dropped) m_res_drop++;
  end

  task automatic wait_outputs();
    int n = 0;
    while (yq.size() != 0 && n < 2000) begin @(negedge clk); n++; end
    check(yq.size() == 0, "outputs pending");
    repeat (3) @(negedge clk);
  endtask

  function automatic logic [N-1:0] mask_of(logic [7:0] g);
    logic [N-1:0] m;
    for (int k = 0; k < N; k++) m[k] = g[k / 2];
    return m;
  endfunction

  // ---------------- scan chain ----------------
  task automatic scan_sample(logic [7:0] v, bit expect_take = 1);
    for (int k = 7; k >= 0; k--) begin @(negedge clk); scan_en = 1; scan_in = v[k]; end
    @(negedge clk); scan_en = 0; scan_update = 1;
    @(negedge clk); scan_update = 0;
    if (expect_take) accept(v);
    m_scan++;
  endtask

  // ---------------- UART host ----------------
  logic [7:0] utx [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      #(BIT_NS / 2);
      for (int k = 0; k < 8; k++) begin #(BIT_NS); b[k] = uart_txd; end
      #(BIT_NS);
      utx.push_back(b);
    end
  end
  task automatic uart_send(logic [7:0] d, logic stop = 1);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int k = 0; k < 10; k++) begin uart_rxd = f[k]; #(BIT_NS); end
    uart_rxd = 1; #(2 * BIT_NS);
  endtask

  // ---------------- I2C master ----------------
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
  task automatic i2c_send_samples(logic [7:0] s [], bit take = 1);
    logic ack;
    i2c_start(); i2c_wr({7'h50, 1'b0}, ack); check(ack, "i2c address ack");
    foreach (s[i]) begin
      if (take) accept(s[i]);
      i2c_wr(s[i], ack); check(ack, "i2c data ack");
      repeat (30) @(negedge clk);
      m_i2c_in++;
    end
    i2c_stop();
  endtask

  // ---------------- SPI master ----------------
  task automatic spi_xfer(logic [7:0] o, output logic [7:0] i);
    for (int k = 7; k >= 0; k--) begin
      spi_mosi = o[k]; repeat (H) @(negedge clk);
      spi_sclk = 1; i[k] = spi_miso; repeat (H) @(negedge clk);
      spi_sclk = 0;
    end
  endtask

  // ---------------- trace read ----------------
  task automatic trace_read(int a, output logic [31:0] v);
    @(negedge clk); trace_raddr = 6'(a);
    @(negedge clk); v = trace_rdata;
    m_trace++;
  endtask

  initial begin
    logic [7:0] b, rb [4];
    logic [31:0] tw;
    logic ack;
    longint y1;
    int n;
    m_scan = 0; m_coef = 0; m_cmp_pass = 0; m_cmp_fail = 0; m_uart_in = 0; m_uart_res = 0; m_stop_fix = 0;
    m_failover = 0; m_i2c_in = 0; m_i2c_res = 0; m_tapsel = 0; m_drop = 0; m_step = 0; m_spi_in = 0;
    m_spi_res = 0; m_trig_proto = 0; m_trig_filter = 0; m_window_halt = 0; m_trace = 0; m_soft_reset = 0; m_res_drop = 0;
    for (int k = 0; k < N; k++) c[k] = 16 * ((k + 1 < N - k) ? k + 1 : N - k);
    foreach (xh[k]) xh[k] = 0;
    // all taps on, all links off, no triggers
    tp = 14'b01_1101_1111_1110;
    tp[TP_UART] = 1; tp[TP_I2C] = 1; tp[TP_SPI] = 1; tp[TP_FILTER] = 0; tp[TP_PROTO] = 0; tp[TP_RESET] = 0;
    tp[8:1] = 8'hFF;
    mask_m = '1;
    repeat (5) @(negedge clk); arst_n = 1;
    repeat (20) @(negedge clk);
    check(state == ST_IDLE, "idle after reset");

    // 1. scan chain input with the reset coefficients; comparator pass and fail
    scan_mode = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); exp_valid = 1; exp_y = 28'(model_push(8'(10 + i))) ^ ((i == 2) ? 28'h1 : 28'h0);
      // undo the model step: the sample is accepted below
      for (int k = 0; k < N - 1; k++) xh[k] = xh[k+1];
      xh[N-1] = 0;
      @(negedge clk); exp_valid = 0;
      scan_sample(8'(10 + i));
      wait_outputs();
    end
    check(n_match == 2 && n_mismatch == 1 && cmp_any_fail, "comparator counts");

    // 2. load new coefficients
    for (int k = 0; k < N; k++) begin
      @(negedge clk); coef_we = 1; coef_waddr = 4'(k); coef_wdata = 16'(($urandom % 512) - 256);
      c[k] = coef_wdata; m_coef++;
    end
    @(negedge clk); coef_we = 0;
    scan_sample(8'h7F); wait_outputs();
    scan_sample(8'h80); wait_outputs();
    scan_mode = 0;

    // 3. UART link, capture armed on the next protocol word (TP13)
    tp[TP_UART] = 0;
    repeat (10) @(negedge clk);
    check(state == ST_UART && proto == PROTO_UART, "UART selected");
    tp[TP_PROTO] = 1;
    accept(8'h21); uart_send(8'h21); m_uart_in++;
    repeat (5) @(negedge clk);
    check(capturing, "capture opened by TP13"); if (capturing) m_trig_proto++;
    tp[TP_PROTO] = 0;
    accept(8'h35); uart_send(8'h35); m_uart_in++;
    accept(8'hC4); uart_send(8'hC4); m_uart_in++;
    wait_outputs();
    // results come back on the UART, four bytes each, LSB first
    n = 0; while (utx.size() < 12 && n < 200000) begin @(negedge clk); n++; end
    check(utx.size() >= 12, "UART result bytes");
    for (int r = 0; r < 3 && utx.size() >= 4; r++) begin
      logic [31:0] w;
      for (int k = 0; k < 4; k++) w[8*k +: 8] = utx.pop_front();
      check(w == 32'(ylog[ylog.size() - 3 + r]), "UART result value");
      m_uart_res++;
    end
    // a frame with a broken stop bit is repaired and still used
    accept(8'h5A); uart_send(8'h5A, 0); m_uart_in++;
    wait_outputs();
    check(cnt_errors == 1 && !uart_failed, "first sync error repaired");
    if (cnt_errors == 1) m_stop_fix++;
    // the second one makes the FSM fail over to I2C
    accept(8'h6B); uart_send(8'h6B, 0); m_uart_in++;
    wait_outputs();
    repeat (5) @(negedge clk);
    check(uart_failed && state == ST_I2C, "fail-over to I2C");
    if (uart_failed && proto == PROTO_I2C) m_failover++;

    // 4. I2C: the result held since the fail-over is read first; of three
    //    samples sent back to back only the first result is kept
    y1 = ylog[ylog.size() - 1];
    i2c_start(); i2c_wr({7'h50, 1'b1}, ack); check(ack, "i2c read address ack");
    for (int k = 0; k < 4; k++) i2c_rd(k < 3, rb[k]);
    i2c_stop();
    check({rb[3], rb[2], rb[1], rb[0]} == 32'(y1), "I2C read-back of held result");
    if ({rb[3], rb[2], rb[1], rb[0]} == 32'(y1)) m_i2c_res++;
    i2c_send_samples('{8'h11, 8'hF0, 8'h09});
    wait_outputs();
    y1 = ylog[ylog.size() - 3];
    i2c_start(); i2c_wr({7'h50, 1'b1}, ack); check(ack, "i2c read address ack");
    for (int k = 0; k < 4; k++) i2c_rd(k < 3, rb[k]);
    i2c_stop();
    check({rb[3], rb[2], rb[1], rb[0]} == 32'(y1), "I2C read-back of oldest unread result");
    if ({rb[3], rb[2], rb[1], rb[0]} == 32'(y1)) m_i2c_res++;

    // 5. tap selection: TP1..TP8 switch off tap pairs
    tp[8:1] = 8'b1010_0111; mask_m = mask_of(8'b1010_0111);
    repeat (5) @(negedge clk);
    i2c_send_samples('{8'h40, 8'hC1});
    wait_outputs(); m_tapsel++;

    // 6. halted: a sample is dropped; then single-stepping
    @(negedge clk); dbg_halt = 1; @(negedge clk); dbg_halt = 0;
    check(halted, "halted");
    n = cnt_drops;
    i2c_send_samples('{8'h77}, 0);
    m_i2c_in--;
    check(cnt_drops == 16'(n + 1), "sample dropped while halted");
    if (cnt_drops == 16'(n + 1)) m_drop++;
    @(negedge clk); dbg_resume = 1; @(negedge clk); dbg_resume = 0;
    scan_mode = 1;
    scan_sample(8'h3C);
    repeat (4) @(negedge clk);
    dbg_halt = 1; @(negedge clk); dbg_halt = 0;
    repeat (60) @(negedge clk);
    check(yq.size() == 1, "no output while halted");
    n = 0;
    while (yq.size() != 0 && n < 40) begin
      dbg_step = 1; @(negedge clk); dbg_step = 0; repeat (3) @(negedge clk); n++;
    end
    check(yq.size() == 0 && n > 3 && n < 20, "single-step completes the output");
    if (yq.size() == 0) m_step++;
    dbg_resume = 1; @(negedge clk); dbg_resume = 0;
    scan_mode = 0;

    // 7. SPI link after clearing the UART failure
    tp[TP_UART] = 1; tp[TP_I2C] = 1; tp[TP_SPI] = 0;
    @(negedge clk); clear_fail = 1; @(negedge clk); clear_fail = 0;
    repeat (10) @(negedge clk);
    check(state == ST_SPI && !uart_failed, "SPI selected");
    spi_cs_n = 0; repeat (2 * H) @(negedge clk);
    accept(8'h2D); spi_xfer(8'h2D, b); m_spi_in++;
    repeat (2 * H) @(negedge clk); spi_cs_n = 1;
    wait_outputs();
    y1 = ylog[ylog.size() - 1];
    spi_cs_n = 0; repeat (2 * H) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      accept(8'(k + 1)); spi_xfer(8'(k + 1), rb[k]); m_spi_in++;
      repeat (2 * H) @(negedge clk);
    end
    spi_cs_n = 1;
    wait_outputs();
    check({rb[3], rb[2], rb[1], rb[0]} == 32'(y1), "SPI read-back of result");
    if ({rb[3], rb[2], rb[1], rb[0]} == 32'(y1)) m_spi_res++;

    // 8. capture on a filter output (TP9); window closes and halts the filter
    tp[TP_SPI] = 1; tp[8:1] = 8'hFF; mask_m = '1;
    halt_on_full = 1; tp[TP_FILTER] = 1;
    repeat (5) @(negedge clk);
    scan_mode = 1;
    begin
      longint cap [$];
      int base;
      base = ylog.size();
      scan_sample(8'h01); wait_outputs();
      check(capturing && trig_src == 1'b0, "capture opened by TP9");
      if (capturing) m_trig_filter++;
      tp[TP_FILTER] = 0;
      for (int i = 0; i < 16; i++) begin scan_sample(8'(i * 7)); wait_outputs(); end
      repeat (5) @(negedge clk);
      check(!capturing && halted, "window closed and filter halted");
      if (halted) m_window_halt++;
      // read the output region back: the 16 outputs after the trigger
      for (int i = 0; i < 16; i++) begin
        trace_read(32 + i, tw);
        check(tw[31:30] == TAG_FIR && tw[27:0] == 28'(ylog[base + 1 + i]), "output trace word");
      end
      // the input region still holds the UART words after the TP13 trigger
      trace_read(0, tw);
      check(tw[31:30] == TAG_UART && tw[9:0] == {1'b1, 8'h35, 1'b0}, "input trace word 0");
      trace_read(2, tw);
      check(tw[31:30] == TAG_UART && tw[28] && tw[9:0] == {1'b0, 8'h5A, 1'b0}, "input trace raw bad frame");
      trace_read(4, tw);
      check(tw[31:30] == TAG_I2C && tw[7:0] == 8'h11, "input trace I2C word");
    end
    dbg_resume = 1; @(negedge clk); dbg_resume = 0; scan_mode = 0;

    // 9. soft reset by TP0
    tp[TP_RESET] = 1; repeat (4) @(negedge clk); tp[TP_RESET] = 0;
    repeat (12) @(negedge clk);
    check(state == ST_IDLE && cnt_outputs == 0 && !cmp_any_fail && !halted, "soft reset");
    if (state == ST_IDLE && cnt_outputs == 0) m_soft_reset++;

    // every mechanism must have happened
    check(m_scan > 0, "mech scan");             check(m_coef > 0, "mech coef");
    check(m_cmp_pass > 0, "mech cmp pass");     check(m_cmp_fail > 0, "mech cmp fail");
    check(m_uart_in > 0, "mech uart in");       check(m_uart_res > 0, "mech uart result");
    check(m_stop_fix > 0, "mech stop fix");     check(m_failover > 0, "mech failover");
    check(m_i2c_in > 0, "mech i2c in");         check(m_i2c_res > 0, "mech i2c result");
    check(m_tapsel > 0, "mech tap select");     check(m_drop > 0, "mech drop");
    check(m_step > 0, "mech step");             check(m_spi_in > 0, "mech spi in");
    check(m_spi_res > 0, "mech spi result");    check(m_trig_proto > 0, "mech TP13");
    check(m_trig_filter > 0, "mech TP9");       check(m_window_halt > 0, "mech window halt");
    check(m_trace > 0, "mech trace read");      check(m_soft_reset > 0, "mech soft reset");
    check(m_res_drop > 0, "mech result drop");
    $display("mechanisms: scan=%0d coef=%0d cmp_pass=%0d cmp_fail=%0d uart_in=%0d uart_res=%0d stop_fix=%0d failover=%0d i2c_in=%0d i2c_res=%0d tapsel=%0d drop=%0d step=%0d spi_in=%0d spi_res=%0d tp13=%0d tp9=%0d window_halt=%0d trace=%0d soft_reset=%0d res_drop=%0d",
      m_scan, m_coef, m_cmp_pass, m_cmp_fail, m_uart_in, m_uart_res, m_stop_fix, m_failover, m_i2c_in, m_i2c_res,
      m_tapsel, m_drop, m_step, m_spi_in, m_spi_res, m_trig_proto, m_trig_filter, m_window_halt, m_trace, m_soft_reset, m_res_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
