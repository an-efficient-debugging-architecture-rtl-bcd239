// result_serializer: turns a filter result into four bytes for the active
// serial link, least significant byte first (the result is sign-extended or
// truncated to 32 bits). A result is taken when the serializer is empty;
// one arriving while bytes are still pending is dropped and `dropped` pulses.
// byte_out is valid while byte_valid is high; a clock with byte_take high
// consumes it. flush discards pending bytes (used when the active link
// changes, so a new link never receives the tail of an old result).
module result_serializer #(
  parameter int ACC_W = 28
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             y_valid,
  input  logic [ACC_W-1:0] y,
  output logic [7:0]       byte_out,
  output logic             byte_valid,
  input  logic             byte_take,
  input  logic             flush,
  output logic             dropped
);
  logic [31:0] word;
  logic [2:0]  left;

  assign byte_out   = word[7:0];
  assign byte_valid = (left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      word <= '0; left <= '0; dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (flush) begin
        left <= '0;
      end else if (byte_valid && byte_take) begin
        word <= {8'h00, word[31:8]};
        left <= left - 1'b1;
      end
      if (y_valid && !flush) begin
        if (!byte_valid || (byte_take && left == 3'd1)) begin
          word <= 32'(signed'(y));
          left <= 3'd4;
        end else begin
          dropped <= 1'b1;
        end
      end
    end
  end
endmodule
