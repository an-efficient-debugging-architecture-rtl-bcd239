// async_fifo: asynchronous FIFO used as the UART's TX and RX buffers between
// the serial clock domain and the processor clock domain. 2**AW words of W
// bits; binary pointers with one extra wrap bit, converted to Gray code and
// passed through two-flop synchronisers to the other side. push is ignored
// when full, pop when empty. The read side is first-word-fall-through: dout
// shows the oldest word whenever empty is low. full and empty are
// conservative (they may stay set a few clocks after the other side moved).
module async_fifo #(
  parameter int W  = 8,
  parameter int AW = 3
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty
);
  localparam int DEPTH = 1 << AW;
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  always_ff @(posedge wclk) begin
    if (push && !full) mem[wbin[AW-1:0]] <= din;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign empty = (rgray == wgray_r2);
  assign dout  = mem[rbin[AW-1:0]];
endmodule
