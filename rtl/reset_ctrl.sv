// reset_ctrl: reset controller. The external active-low reset arst_n is
// asserted asynchronously and released synchronously through two
// flip-flops. A synchronous soft reset request (the TP0 trigger) holds the
// reset for at least STRETCH clocks after it is seen. rst is active high and
// registered.
module reset_ctrl #(
  parameter int STRETCH = 4
) (
  input  logic clk,
  input  logic arst_n,
  input  logic soft_rst,
  output logic rst
);
  localparam int CW = $clog2(STRETCH + 1);
  logic [1:0]    sync_n;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync_n <= 2'b00;
    else         sync_n <= {sync_n[0], 1'b1};
  end

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      cnt <= CW'(STRETCH);
      rst <= 1'b1;
    end else begin
      if (soft_rst)      cnt <= CW'(STRETCH);
      else if (cnt != 0) cnt <= cnt - 1'b1;
      rst <= !sync_n[1] || soft_rst || (cnt != 0);
    end
  end
endmodule
