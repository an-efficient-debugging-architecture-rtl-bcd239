// tb_dtg_addr_gen: checks that the tap counter clears, counts, wraps after
// NTAPS-1, raises last only at NTAPS-1 and holds while ce is low.
module tb_dtg_addr_gen;
  localparam int N = 16;
  logic clk = 0, rst = 1, ce = 1, clr = 0, inc = 0, last;
  logic [3:0] addr;
  int checks = 0, failures = 0, exp_a = 0;

  dtg_addr_gen dut (.*);
  always #5 clk = ~clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk;
    checks++;
    if (addr != exp_a[3:0] || last != (exp_a == N - 1)) begin
      failures++; $display("FAIL addr=%0d exp=%0d last=%0d", addr, exp_a, last);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1 chk();
    repeat (200) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0; clr = ($urandom % 23) == 0; inc = $urandom % 2;
      @(posedge clk); #1;
      if (ce) begin
        if (clr) exp_a = 0;
        else if (inc) exp_a = (exp_a == N - 1) ? 0 : exp_a + 1;
      end
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
