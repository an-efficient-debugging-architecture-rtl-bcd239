// trace_buffer: the common trace buffer shared by the input trace and the
// output trace. A simple dual-port RAM of DEPTH words of W bits: one write
// port (we, waddr, wdata) and one read port with a registered output (rdata
// is valid the clock after raddr). Contents are not reset.
module trace_buffer #(
  parameter int DEPTH = 64,
  parameter int W     = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
