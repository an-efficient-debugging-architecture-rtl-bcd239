// scan_chain: input scan chain that loads test vectors into the filter.
// While scan_en is high, scan_in shifts into a DATA_W-bit register, most
// significant bit first, and scan_out shows the bit leaving the chain.
// scan_update copies the register to data and pulses valid for one clock.
module scan_chain #(
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic              scan_update,
  output logic              scan_out,
  output logic [DATA_W-1:0] data,
  output logic              valid
);
  logic [DATA_W-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; data <= '0; valid <= 1'b0;
    end else begin
      valid <= scan_update;
      if (scan_en)     sh <= {sh[DATA_W-2:0], scan_in};
      if (scan_update) data <= sh;
    end
  end
  assign scan_out = sh[DATA_W-1];
endmodule
