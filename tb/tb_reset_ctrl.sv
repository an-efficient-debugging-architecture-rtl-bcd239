// tb_reset_ctrl: checks that arst_n asserts rst at once (without a clock
// edge), that release takes the synchroniser plus STRETCH clocks, and that a
// one-clock soft reset keeps rst high for STRETCH+1 clocks. Gaps and the
// moment of asynchronous assertion are random.
module tb_reset_ctrl;
  localparam int STRETCH = 4;
  logic clk = 0, arst_n = 0, soft_rst = 0, rst;
  int checks = 0, failures = 0, n;

  reset_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(negedge clk);
    for (int r = 0; r < 10; r++) begin
      arst_n = 1; n = 0;
      while (rst && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (n < STRETCH || n > STRETCH + 3) begin failures++; $display("FAIL release after %0d", n); end
      repeat ($urandom_range(2, 10)) @(negedge clk);
      soft_rst = 1; @(negedge clk); soft_rst = 0; n = 1;
      checks++; if (!rst) begin failures++; $display("FAIL no soft reset"); end
      while (rst && n < 50) begin @(negedge clk); n++; end
      checks++;
      if (n != STRETCH + 2) begin  // n counts one clock past the last reset clock
 failures++; $display("FAIL soft reset length %0d", n); end
      #($urandom_range(1, 8)) arst_n = 0; #0.5;
      checks++; if (!rst) begin failures++; $display("FAIL async assert"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
