// tb_sample_shift_reg: shifts random samples in and checks every position
// of the delay line through the multiplexer against a model.
module tb_sample_shift_reg;
  localparam int N = 16;
  logic clk = 0, rst = 1, shift_en = 0;
  logic signed [7:0] din, tap_out;
  logic [3:0] sel;
  logic signed [7:0] model [N];
  int checks = 0, failures = 0;

  sample_shift_reg dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    foreach (model[k]) model[k] = 0;
    din = 0; sel = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (60) begin
      @(negedge clk);
      shift_en = $urandom % 3 != 0; din = 8'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = N - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
      @(negedge clk); shift_en = 0;
      for (int k = 0; k < N; k++) begin
        sel = k[3:0]; #1; checks++;
        if (tap_out !== model[k]) begin failures++; $display("FAIL k=%0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
