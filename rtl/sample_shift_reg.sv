// sample_shift_reg: the shift register and multiplexer of the DTG-FIR filter.
// Holds the last NTAPS input samples; shift_en moves them one place and puts
// din in position 0, so position k holds x(n-k). The multiplexer returns the
// sample at position sel combinationally. Reset clears all positions.
module sample_shift_reg #(
  parameter int NTAPS  = 16,
  parameter int DATA_W = 8,
  localparam int AW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] din,
  input  logic [AW-1:0]            sel,
  output logic signed [DATA_W-1:0] tap_out
);
  logic signed [DATA_W-1:0] sr [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) sr[k] <= '0;
    end else if (shift_en) begin
      sr[0] <= din;
      for (int k = 1; k < NTAPS; k++) sr[k] <= sr[k-1];
    end
  end
  assign tap_out = (int'(sel) < NTAPS) ? sr[sel] : '0;
endmodule
