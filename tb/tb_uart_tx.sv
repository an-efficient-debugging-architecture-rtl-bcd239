// tb_uart_tx: offers random bytes as a FIFO would and decodes the serial
// line at mid-bit: start 0, eight data bits LSB first, stop 1, 16 ticks per
// bit. Checks the data, one pop per byte, irq after each frame.
module tb_uart_tx;
  localparam int TDIV = 2;           // clocks per tick
  localparam int BIT = 16 * TDIV;    // clocks per bit
  logic clk = 0, rst = 1, tick = 0, valid = 0, pop, txd, irq;
  logic [7:0] data;
  logic [7:0] q [$];
  int checks = 0, failures = 0, npop = 0, nirq = 0, tc = 0;

  uart_tx dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    tc <= (tc == TDIV - 1) ? 0 : tc + 1;
    tick <= (tc == TDIV - 1);
    if (!rst && pop) npop++;
    if (!rst && irq) nirq++;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // host side: offer bytes
  initial begin
    data = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      data = 8'($urandom); valid = 1; q.push_back(data);
      @(posedge clk); while (!pop) @(posedge clk);
      @(negedge clk); valid = 0;
      repeat ($urandom % 50) @(negedge clk);
    end
  end

  // line decoder
  initial begin
    logic [7:0] b;
    @(negedge rst);
    for (int i = 0; i < 12; i++) begin
      @(negedge txd);
      repeat (BIT / 2) @(posedge clk);
      checks++; if (txd !== 0) begin failures++; $display("FAIL start"); end
      for (int k = 0; k < 8; k++) begin repeat (BIT) @(posedge clk); b[k] = txd; end
      repeat (BIT) @(posedge clk);
      checks += 2;
      if (txd !== 1) begin failures++; $display("FAIL stop"); end
      if (b !== q.pop_front()) begin failures++; $display("FAIL data %h", b); end
    end
    repeat (BIT) @(posedge clk);
    checks += 2;
    if (npop != 12) begin failures++; $display("FAIL pops %0d", npop); end
    if (nirq != 12) begin failures++; $display("FAIL irqs %0d", nirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
