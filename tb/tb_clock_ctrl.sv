// tb_clock_ctrl: random halt/resume/step requests against a model of the
// run state; ce must equal run OR step in every clock.
module tb_clock_ctrl;
  logic clk = 0, rst = 1, halt = 0, resume = 0, step = 0, ce, halted;
  logic run_m;
  int checks = 0, failures = 0;

  clock_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    run_m = 1;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (300) begin
      @(negedge clk);
      halt = ($urandom % 5) == 0; resume = ($urandom % 5) == 0; step = ($urandom % 3) == 0; #1;
      checks += 2;
      if (ce !== (run_m || step)) begin failures++; $display("FAIL ce"); end
      if (halted !== !run_m) begin failures++; $display("FAIL halted"); end
      if (halt) run_m = 0; else if (resume) run_m = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
