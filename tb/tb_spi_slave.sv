// tb_spi_slave: a mode-0 SPI master model exchanges several bytes in one
// chip-select period and single bytes in separate ones. Checks the bytes
// received (rx_data/rx_valid) and the bytes sent on MISO, which must be the
// tx_data values the slave requested, in order.
module tb_spi_slave;
  localparam int H = 8;   // clocks per half SCLK period
  logic clk = 0, rst = 1, sclk = 0, cs_n = 1, mosi = 0, miso, rx_valid, tx_req;
  logic [7:0] rx_data, tx_data;
  logic [7:0] rxq [$];
  int checks = 0, failures = 0, ntx = 0;

  spi_slave dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && rx_valid) rxq.push_back(rx_data);
    if (!rst && tx_req) ntx++;
  end
  assign tx_data = 8'h3C ^ 8'(ntx * 17);
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic xfer(logic [7:0] o, output logic [7:0] i);
    for (int k = 7; k >= 0; k--) begin
      mosi = o[k]; repeat (H) @(negedge clk);
      sclk = 1; i[k] = miso; repeat (H) @(negedge clk);
      sclk = 0;
    end
  endtask

  initial begin
    logic [7:0] o, i; int n;
    @(posedge clk); @(posedge clk); rst <= 0; repeat (10) @(negedge clk);
    for (int burst = 0; burst < 4; burst++) begin
      cs_n = 0; repeat (2 * H) @(negedge clk);
      for (int b = 0; b < burst + 1; b++) begin
        n = ntx - 1;   // the slave took this slot's byte at CS_N fall or the last falling edge
        o = 8'($urandom);
        xfer(o, i);
        repeat (4) @(negedge clk);
        checks += 2;
        if (rxq.size() == 0 || rxq.pop_front() !== o) begin failures++; $display("FAIL mosi byte"); end
        if (i !== (8'h3C ^ 8'(n * 17))) begin failures++; $display("FAIL miso %h", i); end
      end
      repeat (H) @(negedge clk); cs_n = 1; repeat (4 * H) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
