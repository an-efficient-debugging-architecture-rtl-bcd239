// tb_dbg_counters: random event pulses against six model counters, clear,
// then all six held incrementing until they saturate at 2**CW-1, and a
// final clear.
module tb_dbg_counters;
  localparam int CW = 16;
  localparam int MAXC = (1 << CW) - 1;
  logic clk = 0, rst = 1, clr = 0;
  logic [5:0] inc = '0;
  logic [CW-1:0] cycles, words, errors, outputs, trigs, drops;
  int m [6];
  int checks = 0, failures = 0;

  dbg_counters dut (.clk, .rst, .clr, .inc_cycle(inc[0]), .inc_word(inc[1]), .inc_err(inc[2]),
    .inc_out(inc[3]), .inc_trig(inc[4]), .inc_drop(inc[5]), .cycles, .words, .errors, .outputs, .trigs, .drops);
  always #5 clk = ~clk;
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [CW-1:0] got [6];
    foreach (m[i]) m[i] = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (200) begin
      @(negedge clk);
      inc = 6'($urandom); clr = ($urandom % 60) == 0;
      @(negedge clk);
      for (int i = 0; i < 6; i++) m[i] = clr ? 0 : ((inc[i] && m[i] < MAXC) ? m[i] + 1 : m[i]);
      inc = 0; clr = 0;
      got = '{cycles, words, errors, outputs, trigs, drops};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (got[i] !== CW'(m[i])) begin failures++; $display("FAIL counter %0d = %0d exp %0d", i, got[i], m[i]); end
      end
    end
    // saturation: hold every increment high past the top of the range
    @(negedge clk); inc = '1;
    repeat (MAXC + 4) @(negedge clk);
    inc = '0;
    @(negedge clk);
    got = '{cycles, words, errors, outputs, trigs, drops};
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (got[i] !== CW'(MAXC)) begin failures++; $display("FAIL counter %0d not saturated: %0d", i, got[i]); end
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    got = '{cycles, words, errors, outputs, trigs, drops};
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (got[i] !== '0) begin failures++; $display("FAIL counter %0d not cleared", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
