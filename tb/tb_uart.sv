// tb_uart: the whole UART with a serial clock and a faster processor clock.
// Frames sent on rxd must appear, in order, as 10-bit frames in the RX
// buffer; bytes pushed into the TX buffer must appear on txd as 8N1 frames.
// The baud rate follows DIV: one bit is 16*DIV serial clocks.
module tb_uart;
  localparam int DIV = 27;
  localparam int BIT = 16 * DIV;    // serial clocks per bit
  logic sclk = 0, pclk = 0, srst = 1, prst = 1, rxd = 1, txd;
  logic [9:0] rx_frame;
  logic rx_valid, rx_pop = 0, tx_push = 0, tx_full, tx_irq, rx_irq, rx_overrun;
  logic [7:0] tx_data;
  logic [9:0] rq [$];
  logic [7:0] tq [$];
  int checks = 0, failures = 0, nrx = 0, ntx = 0;

  uart dut (.*);
  always #10 sclk = ~sclk;
  always #3 pclk = ~pclk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // drive frames on rxd
  initial begin
    repeat (4) @(posedge sclk); srst <= 0;
    repeat (20) @(negedge sclk);
    for (int i = 0; i < 10; i++) begin
      logic [9:0] f;
      f = {1'b1, 8'($urandom), 1'b0};
      rq.push_back(f);
      for (int k = 0; k < 10; k++) begin rxd = f[k]; repeat (BIT) @(negedge sclk); end
      rxd = 1; repeat (BIT) @(negedge sclk);
    end
  end

  // processor side: read RX buffer, write TX buffer
  initial begin
    tx_data = 0;
    repeat (4) @(posedge pclk); prst <= 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge pclk);
      while (tx_full) @(negedge pclk);
      tx_data = 8'($urandom); tx_push = 1; tq.push_back(tx_data);
      @(negedge pclk); tx_push = 0;
    end
  end
  always @(posedge pclk) begin
    rx_pop <= 0;
    if (rx_valid && !rx_pop && !prst) begin
      rx_pop <= 1;
      checks++; nrx++;
      if (rq.size() == 0 || rx_frame !== rq[0]) begin failures++; $display("FAIL rx %b", rx_frame); end
      if (rq.size() != 0) void'(rq.pop_front());
    end
  end

  // decode txd
  initial begin
    logic [7:0] b;
    @(negedge srst);
    for (int i = 0; i < 10; i++) begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge sclk);
      for (int k = 0; k < 8; k++) begin repeat (BIT) @(posedge sclk); b[k] = txd; end
      repeat (BIT) @(posedge sclk);
      checks += 2; ntx++;
      if (txd !== 1) begin failures++; $display("FAIL tx stop"); end
      if (tq.size() == 0 || b !== tq[0]) begin failures++; $display("FAIL tx %h", b); end
      if (tq.size() != 0) void'(tq.pop_front());
    end
    wait (nrx == 10 || $time > 4000000);
    checks += 2;
    if (nrx != 10) begin failures++; $display("FAIL rx count %0d", nrx); end
    if (ntx != 10) begin failures++; $display("FAIL tx count %0d", ntx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
