// fir_mac: the FIR arithmetic of the DTG-FIR filter. Stage 1 is the
// coefficient Register (plus the selected sample and its tap-enable bit),
// loaded when `load` is high. Stage 2 multiplies and accumulates: `first`
// restarts the sum, a disabled tap adds zero. With `done` high the final sum
// including the operands now in stage 1 is written to y_out and y_valid pulses
// for one clock. Everything advances only with ce high. Full-precision signed
// arithmetic: ACC_W should be at least DATA_W+COEF_W+clog2(NTAPS).
module fir_mac #(
  parameter int DATA_W = 8,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 28
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     load,
  input  logic                     first,
  input  logic                     tap_en,
  input  logic                     done,
  input  logic signed [COEF_W-1:0] coef_in,
  input  logic signed [DATA_W-1:0] samp_in,
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_valid
);
  logic signed [COEF_W-1:0] coef_r;   // the Register
  logic signed [DATA_W-1:0] samp_r;
  logic                     en_r, first_r, v_r;
  logic signed [ACC_W-1:0]  acc, sum;
  logic signed [DATA_W+COEF_W-1:0] prod;

  always_comb begin
    prod = coef_r * samp_r;
    sum  = (first_r ? '0 : acc) + (en_r ? ACC_W'(prod) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      coef_r <= '0; samp_r <= '0; en_r <= 1'b0; first_r <= 1'b0; v_r <= 1'b0;
      acc <= '0; y_out <= '0; y_valid <= 1'b0;
    end else if (ce) begin
      v_r <= load;
      if (load) begin
        coef_r  <= coef_in;
        samp_r  <= samp_in;
        en_r    <= tap_en;
        first_r <= first;
      end
      if (v_r) acc <= sum;
      y_valid <= done;
      if (done) y_out <= sum;
    end else begin
      y_valid <= 1'b0;
    end
  end
endmodule
