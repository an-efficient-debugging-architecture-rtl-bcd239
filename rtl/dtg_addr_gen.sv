// dtg_addr_gen: address generator of the DTG-FIR filter. A tap index counter
// that the filter controller clears at the start of each output and advances
// once per multiply; the index addresses both the coefficient ROM and the
// sample multiplexer. `last` is high while the index is NTAPS-1. Counts only
// when ce is high. Registered output, reset to 0.
module dtg_addr_gen #(
  parameter int NTAPS = 16,
  localparam int AW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ce,
  input  logic          clr,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          last
);
  always_ff @(posedge clk) begin
    if (rst)            addr <= '0;
    else if (ce) begin
      if (clr)          addr <= '0;
      else if (inc)     addr <= (addr == AW'(NTAPS - 1)) ? '0 : addr + 1'b1;
    end
  end
  assign last = (addr == AW'(NTAPS - 1));
endmodule
