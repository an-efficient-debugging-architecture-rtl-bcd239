// tb_result_serializer: sends signed results, takes their bytes with random
// gaps and checks the four bytes, least significant first; also checks that
// a result arriving while bytes are pending is dropped and flagged, and
// that flush empties the serializer.
module tb_result_serializer;
  logic clk = 0, rst = 1, y_valid = 0, byte_valid, byte_take = 0, flush = 0, dropped;
  logic [27:0] y;
  logic [7:0] byte_out;
  int checks = 0, failures = 0;

  result_serializer dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    @(posedge clk); @(posedge clk); rst <= 0;
    y = 0;
    repeat (30) begin
      logic [31:0] w;
      @(negedge clk); y = 28'($urandom); y_valid = 1; w = 32'(signed'(y));
      @(negedge clk); y_valid = 0;
      // a second result while busy is dropped
      y = 28'h1234567; y_valid = 1; #1;
      @(posedge clk); #1;
      checks++; if (!dropped) begin failures++; $display("FAIL not dropped"); end
      @(negedge clk); y_valid = 0;
      for (int b = 0; b < 4; b++) begin
        repeat ($urandom % 3) @(negedge clk);
        checks += 2;
        if (!byte_valid) begin failures++; $display("FAIL byte_valid"); end
        if (byte_out !== w[8*b +: 8]) begin failures++; $display("FAIL byte %0d", b); end
        byte_take = 1; @(negedge clk); byte_take = 0;
      end
      checks++; if (byte_valid) begin failures++; $display("FAIL extra byte"); end
    end
    // flush discards a pending result
    @(negedge clk); y = 28'h0F0F0F0; y_valid = 1; @(negedge clk); y_valid = 0;
    byte_take = 1; @(negedge clk); byte_take = 0; flush = 1; @(negedge clk); flush = 0;
    checks++; if (byte_valid) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
