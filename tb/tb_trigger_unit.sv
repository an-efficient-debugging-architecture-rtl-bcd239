// tb_trigger_unit: random trigger pin patterns; after the two-clock
// synchroniser the decoded soft reset, tap mask (TPi enables taps
// 2(i-1) and 2(i-1)+1 for 16 taps), active-low link enables and the capture
// trigger on filter output (TP9) or protocol word (TP13) must match a model.
module tb_trigger_unit;
  localparam int N = 16;
  logic clk = 0, rst = 1, y_valid = 0, proto_valid = 0;
  logic [13:0] tp = '0;
  logic soft_rst, sel_uart, sel_spi, sel_i2c, fire, fire_src;
  logic [N-1:0] tap_mask, em;
  int checks = 0, failures = 0, nfire = 0;

  trigger_unit dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (100) begin
      logic ef, es;
      @(negedge clk); tp = 14'($urandom);
      repeat (2) @(negedge clk);
      for (int k = 0; k < N; k++) em[k] = tp[1 + k / 2];
      checks += 5;
      if (tap_mask !== em) begin failures++; $display("FAIL mask %h tp %b", tap_mask, tp); end
      if (soft_rst !== tp[0]) begin failures++; $display("FAIL soft_rst"); end
      if (sel_uart !== !tp[10]) begin failures++; $display("FAIL uart"); end
      if (sel_i2c !== !tp[11]) begin failures++; $display("FAIL i2c"); end
      if (sel_spi !== !tp[12]) begin failures++; $display("FAIL spi"); end
      y_valid = $urandom % 2; proto_valid = $urandom % 2;
      ef = (tp[9] && y_valid) || (tp[13] && proto_valid);
      es = !(tp[9] && y_valid);
      @(negedge clk); y_valid = 0; proto_valid = 0;
      checks++;
      if (fire !== ef) begin failures++; $display("FAIL fire"); end
      if (ef) begin
        nfire++; checks++;
        if (fire_src !== es) begin failures++; $display("FAIL fire_src"); end
      end
      @(negedge clk);
      checks++; if (fire) begin failures++; $display("FAIL fire held"); end
    end
    checks++; if (nfire == 0) begin failures++; $display("FAIL never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
