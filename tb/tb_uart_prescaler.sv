// tb_uart_prescaler: checks that tick is a single-clock pulse exactly every
// DIV clocks, that no tick comes during reset, and that the first tick after
// reset comes within DIV clocks. Reset is applied at random moments and for
// random lengths, between runs of random length.
module tb_uart_prescaler;
  localparam int DIV = 27;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0, last, cyc, nt;

  uart_prescaler dut (.*);
  always #5 clk = ~clk;
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int r = 0; r < 12; r++) begin
      int run;
      rst = 1;
      repeat ($urandom_range(1, 5)) begin
        @(posedge clk); #1;
        checks++; if (tick) begin failures++; $display("FAIL tick in reset"); end
      end
      @(negedge clk); rst = 0;
      last = -1; cyc = 0; nt = 0;
      run = $urandom_range(2 * DIV, 8 * DIV);
      repeat (run) begin
        @(posedge clk); #1; cyc++;
        if (tick) begin
          nt++;
          checks++;
          if (last >= 0 && cyc - last != DIV) begin failures++; $display("FAIL period %0d", cyc - last); end
          if (last < 0 && cyc > DIV) begin failures++; $display("FAIL first tick after %0d", cyc); end
          last = cyc;
        end
      end
      checks++;
      if (nt < run / DIV - 1) begin failures++; $display("FAIL only %0d ticks in %0d clocks", nt, run); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
