// dtg_fir: the DTG-FIR filter, y(n) = sum over k of c(k)*x(n-k) for the taps
// enabled in tap_mask. It is time-shared: a controller, an address generator
// walking the taps, a coefficient ROM feeding the coefficient Register, a
// sample shift register whose multiplexer picks x(n-k), and one MAC.
// Handshake: a sample is taken when x_valid and ready are high at a clock
// with ce high; y_valid pulses with y(n) NTAPS+1 enabled clocks later; ready
// returns one clock after that (NTAPS+2 clocks per sample). Coefficients can
// be rewritten through the coef_* port; reset loads a triangular window.
// The split into these parts follows the filter's block diagram; the
// time-shared schedule and the widths of the accumulator are this design's.
module dtg_fir #(
  parameter int NTAPS  = 16,
  parameter int DATA_W = 8,
  parameter int COEF_W = 16,
  parameter int ACC_W  = DATA_W + COEF_W + $clog2(NTAPS),
  localparam int AW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     ready,
  input  logic [NTAPS-1:0]         tap_mask,
  output logic signed [ACC_W-1:0]  y_out,
  output logic                     y_valid,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_waddr,
  input  logic signed [COEF_W-1:0] coef_wdata
);
  logic shift_en, ag_clr, ag_inc, load, first, done, ag_last;
  logic [AW-1:0] addr;
  logic signed [COEF_W-1:0] coef;
  logic signed [DATA_W-1:0] samp;

  dtg_controller u_ctrl (
    .clk, .rst, .ce, .x_valid, .ag_last, .ag_zero(addr == '0),
    .ready, .shift_en, .ag_clr, .ag_inc, .load, .first, .done
  );

  dtg_addr_gen #(.NTAPS(NTAPS)) u_ag (
    .clk, .rst, .ce, .clr(ag_clr), .inc(ag_inc), .addr, .last(ag_last)
  );

  coef_rom #(.NTAPS(NTAPS), .COEF_W(COEF_W)) u_rom (
    .clk, .rst, .raddr(addr), .rdata(coef),
    .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata)
  );

  sample_shift_reg #(.NTAPS(NTAPS), .DATA_W(DATA_W)) u_sr (
    .clk, .rst, .shift_en, .din(x_in), .sel(addr), .tap_out(samp)
  );

  fir_mac #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst, .ce, .load, .first, .tap_en(tap_mask[addr]), .done,
    .coef_in(coef), .samp_in(samp), .y_out, .y_valid
  );
endmodule
