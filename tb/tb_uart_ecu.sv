// tb_uart_ecu: random frames with good, inverted start and inverted stop
// bits; checks data, repaired frame, the three error flags and the one-clock
// latency, and that ce low freezes the unit.
module tb_uart_ecu;
  logic clk = 0, rst = 1, ce = 1, valid = 0;
  logic [9:0] frame, fixed_frame;
  logic [7:0] data;
  logic out_valid, start_err, stop_err, sync_err;
  int checks = 0, failures = 0;

  uart_ecu dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    frame = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (100) begin
      logic s, p; logic [7:0] d;
      @(negedge clk);
      d = 8'($urandom); s = ($urandom % 3) == 0; p = ($urandom % 3) != 0;
      frame = {p, d, s}; valid = 1; ce = 1;
      @(negedge clk); valid = 0;
      checks += 6;
      if (!out_valid) begin failures++; $display("FAIL valid"); end
      if (data !== d) begin failures++; $display("FAIL data"); end
      if (fixed_frame !== {1'b1, d, 1'b0}) begin failures++; $display("FAIL fixed"); end
      if (start_err !== s) begin failures++; $display("FAIL start_err"); end
      if (stop_err !== !p) begin failures++; $display("FAIL stop_err"); end
      if (sync_err !== (s || !p)) begin failures++; $display("FAIL sync_err"); end
      // a frame offered while ce is low is not taken
      ce = 0; valid = 1; frame = 10'h3FF;
      @(negedge clk); valid = 0; ce = 1;
      checks += 2;
      if (out_valid) begin failures++; $display("FAIL valid with ce low"); end
      if (data !== d) begin failures++; $display("FAIL data changed with ce low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
