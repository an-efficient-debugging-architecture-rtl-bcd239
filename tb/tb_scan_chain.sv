// tb_scan_chain: shifts random vectors in MSB first, updates, and checks the
// parallel word, the valid pulse and the bit leaving the chain.
module tb_scan_chain;
  logic clk = 0, rst = 1, scan_en = 0, scan_in = 0, scan_update = 0, scan_out, valid;
  logic [7:0] data;
  int checks = 0, failures = 0;

  scan_chain dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [7:0] v, prev;
    prev = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (30) begin
      v = 8'($urandom);
      for (int k = 7; k >= 0; k--) begin
        @(negedge clk); scan_en = 1; scan_in = v[k]; #1;
        checks++; if (scan_out !== prev[k]) begin failures++; $display("FAIL scan_out"); end
      end
      @(negedge clk); scan_en = 0; scan_update = 1;
      @(negedge clk); scan_update = 0;
      checks += 2;
      if (!valid) begin failures++; $display("FAIL valid"); end
      if (data !== v) begin failures++; $display("FAIL data %h exp %h", data, v); end
      @(negedge clk); checks++; if (valid) begin failures++; $display("FAIL valid held"); end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
