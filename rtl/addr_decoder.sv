// addr_decoder: address decoder of the common trace buffer. The buffer of
// 2**AW words is split into two equal regions: region 0 (lower half) holds
// the input trace, region 1 (upper half) the output trace. Given the region
// being written and each region's word count, it forms the physical write
// address and says whether the selected region still has room. Purely
// combinational.
module addr_decoder #(
  parameter int AW = 6
) (
  input  logic          region,
  input  logic [AW-1:0] cnt_in,
  input  logic [AW-1:0] cnt_out,
  output logic [AW-1:0] addr,
  output logic          room,
  output logic          full_in,
  output logic          full_out
);
  localparam logic [AW-1:0] HALF = AW'(1 << (AW - 1));

  always_comb begin
    full_in  = (cnt_in  >= HALF);
    full_out = (cnt_out >= HALF);
    addr     = region ? {1'b1, cnt_out[AW-2:0]} : {1'b0, cnt_in[AW-2:0]};
    room     = region ? !full_out : !full_in;
  end
endmodule
