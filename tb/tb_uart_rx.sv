// tb_uart_rx: drives 8N1 frames (16 ticks per bit) on rxd, some with a bad
// stop bit, and checks each pushed 10-bit frame {stop, data, start}, one push
// and one irq per frame, and recovery after a bad stop bit.
module tb_uart_rx;
  localparam int TDIV = 2;
  localparam int BIT = 16 * TDIV;
  logic clk = 0, rst = 1, tick = 0, rxd = 1, push, irq;
  logic [9:0] frame;
  logic [9:0] q [$];
  int checks = 0, failures = 0, nirq = 0, tc = 0;

  uart_rx dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    tc <= (tc == TDIV - 1) ? 0 : tc + 1;
    tick <= (tc == TDIV - 1);
    if (!rst && irq) nirq++;
    if (push) begin
      checks++;
      if (q.size() == 0 || frame !== q[0]) begin failures++; $display("FAIL frame %b", frame); end
      if (q.size() != 0) void'(q.pop_front());
    end
  end
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic send(logic [7:0] d, logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    q.push_back(f);
    for (int k = 0; k < 10; k++) begin rxd = f[k]; repeat (BIT) @(negedge clk); end
    rxd = 1;
    repeat (BIT * (1 + $urandom % 3)) @(negedge clk);
  endtask

  initial begin
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 16; i++) send(8'($urandom), (i % 5) != 3);
    repeat (BIT) @(negedge clk);
    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL %0d frames missing", q.size()); end
    if (nirq != 16) begin failures++; $display("FAIL irqs %0d", nirq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
