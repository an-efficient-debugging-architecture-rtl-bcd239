// tb_fir_mac: feeds random tap sequences (coefficient, sample, tap enable)
// into the MAC and checks y_out against the sum of enabled products, with
// y_valid one clock after done.
module tb_fir_mac;
  logic clk = 0, rst = 1, ce = 1, load = 0, first = 0, tap_en = 0, done = 0, y_valid;
  logic signed [15:0] coef_in;
  logic signed [7:0]  samp_in;
  logic signed [27:0] y_out;
  longint exp_sum;
  int checks = 0, failures = 0;

  fir_mac dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    coef_in = 0; samp_in = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (50) begin
      int n;
      n = 1 + $urandom % 16;
      exp_sum = 0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        load = 1; first = (k == 0); tap_en = ($urandom % 4) != 0;
        coef_in = 16'($urandom); samp_in = 8'($urandom);
        if (tap_en) exp_sum += longint'(coef_in) * longint'(samp_in);
      end
      @(negedge clk); load = 0; first = 0; done = 1;
      @(negedge clk); done = 0;
      checks += 2;
      if (!y_valid) begin failures++; $display("FAIL no y_valid"); end
      if (y_out !== 28'(exp_sum)) begin failures++; $display("FAIL y=%0d exp=%0d", y_out, exp_sum); end
      @(negedge clk);
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
