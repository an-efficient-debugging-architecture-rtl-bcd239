// tb_response_comparator: queues expected values, delivers results that
// match or not, and checks pass/fail pulses, the counters, the sticky flag,
// and that results without an expectation are not judged.
module tb_response_comparator;
  logic clk = 0, rst = 1, exp_valid = 0, act_valid = 0, pass, fail, any_fail;
  logic [27:0] exp, act;
  logic [15:0] n_match, n_mismatch;
  int checks = 0, failures = 0, em = 0, ex = 0;

  response_comparator dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    exp = 0; act = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    // a result with nothing queued
    @(negedge clk); act_valid = 1; act = 5; @(negedge clk); act_valid = 0;
    checks++; if (pass || fail) begin failures++; $display("FAIL judged without expectation"); end
    repeat (40) begin
      logic [27:0] v [3]; logic good [3];
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); v[i] = 28'($urandom); exp_valid = 1; exp = v[i];
      end
      @(negedge clk); exp_valid = 0;
      for (int i = 0; i < 3; i++) begin
        good[i] = ($urandom % 3) != 0;
        act_valid = 1; act = good[i] ? v[i] : v[i] ^ 28'h40;
        @(negedge clk); act_valid = 0;
        checks += 2;
        if (pass !== good[i]) begin failures++; $display("FAIL pass"); end
        if (fail !== !good[i]) begin failures++; $display("FAIL fail"); end
        if (good[i]) em++; else ex++;
      end
    end
    checks += 3;
    if (n_match !== 16'(em)) begin failures++; $display("FAIL matches"); end
    if (n_mismatch !== 16'(ex)) begin failures++; $display("FAIL mismatches"); end
    if (any_fail !== (ex > 0)) begin failures++; $display("FAIL any_fail"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
