// uart_ecu: error correction unit for UART frames. For each received 10-bit
// frame {stop, data, start} it checks the start bit (must be 0) and the stop
// bit (must be 1). A wrong start or stop bit is a synchronisation mismatch:
// it is inverted back in the corrected frame, the data byte is passed on to
// the filter unchanged and sync_err is raised with the result. The data bits
// themselves carry no check bits in a 10-bit frame, so data errors are left
// to the response comparator and the link fail-over. One clock of latency;
// the unit advances only with ce high. fixed_frame[0] and fixed_frame[9]
// are constant (0 and 1): a repaired frame always has a valid start and stop
// bit, and the full frame is kept so it can be traced as received on the line.
module uart_ecu (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [9:0] frame,
  input  logic       valid,
  output logic [7:0] data,
  output logic [9:0] fixed_frame,
  output logic       out_valid,
  output logic       start_err,
  output logic       stop_err,
  output logic       sync_err
);
  always_ff @(posedge clk) begin
    if (rst) begin
      data <= '0; fixed_frame <= 10'h200; out_valid <= 1'b0;
      start_err <= 1'b0; stop_err <= 1'b0; sync_err <= 1'b0;
    end else if (ce) begin
      out_valid <= valid;
      if (valid) begin
        data        <= frame[8:1];
        fixed_frame <= {1'b1, frame[8:1], 1'b0};
        start_err   <= frame[0];
        stop_err    <= !frame[9];
        sync_err    <= frame[0] || !frame[9];
      end
    end else begin
      out_valid <= 1'b0;
    end
  end
endmodule
