// coef_rom: coefficient memory of the DTG-FIR filter. NTAPS words of COEF_W
// bits, read combinationally by the address generator. Reset loads the
// default coefficients c(k) = 16*min(k+1, NTAPS-k) (a triangular window, a
// choice of this design); a write port lets a host load its own coefficients
// (the filter's coefficient input). Writes take effect at the next clock.
module coef_rom
  import dbg_pkg::*;
#(
  parameter int NTAPS  = 16,
  parameter int COEF_W = 16,
  localparam int AW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [AW-1:0]            raddr,
  output logic signed [COEF_W-1:0] rdata,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic signed [COEF_W-1:0] wdata
);
  logic signed [COEF_W-1:0] mem [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) mem[k] <= COEF_W'(default_coef(k, NTAPS));
    end else if (we && (int'(waddr) < NTAPS)) begin
      mem[waddr] <= wdata;
    end
  end
  assign rdata = (int'(raddr) < NTAPS) ? mem[raddr] : '0;
endmodule
