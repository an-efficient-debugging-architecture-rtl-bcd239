// clock_ctrl: clock controller of the debug architecture, realised as a clock
// enable rather than a gated clock. After reset the filter runs (ce high).
// halt stops it from the next clock; resume lets it run again; step, while
// halted, gives exactly one enabled clock (ce follows step combinationally).
// halt wins over resume when both are high.
module clock_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic halt,
  input  logic resume,
  input  logic step,
  output logic ce,
  output logic halted
);
  logic run;

  always_ff @(posedge clk) begin
    if (rst)         run <= 1'b1;
    else if (halt)   run <= 1'b0;
    else if (resume) run <= 1'b1;
  end
  assign halted = !run;
  assign ce     = run || step;
endmodule
