// tb_async_fifo: two unrelated clocks, random pushes and pops; checks that
// words come out in order and unchanged, that nothing is lost or invented,
// and that full and empty are respected (pushes while full are refused).
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, push = 0, pop = 0, full, empty;
  logic [9:0] din, dout;
  logic [9:0] q [$];
  int checks = 0, failures = 0, nout = 0, nin = 0, nfull = 0;

  async_fifo #(.W(10), .AW(3)) dut (.*);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    din = 0;
    repeat (3) @(posedge wclk); wrst <= 0;
    repeat (300) begin
      @(negedge wclk);
      push = ($urandom % 3) != 0; din = 10'($urandom);
      @(posedge wclk);
      if (full) nfull++;
      if (push && !full) begin q.push_back(din); nin++; end
    end
    @(negedge wclk); push = 0;
  end

  initial begin
    repeat (3) @(posedge rclk); rrst <= 0;
    forever begin
      @(negedge rclk);
      pop = ($urandom % 4) == 0 || nin >= 200;
      @(posedge rclk);
      if (pop && !empty) begin
        checks++; nout++;
        if (q.size() == 0 || dout !== q[0]) begin failures++; $display("FAIL dout %h", dout); end
        if (q.size() != 0) void'(q.pop_front());
      end
      if (nin > 0 && nout == nin && q.size() == 0 && $time > 5000) begin
        repeat (5) @(posedge rclk);
        if (!push) break;
      end
    end
    checks += 2;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
