// tb_trace_buffer: random writes and reads against a model memory; read
// data is checked one clock after the address.
module tb_trace_buffer;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] m [64];
  bit written [64];
  int checks = 0, failures = 0;

  trace_buffer dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = i[5:0]; wdata = $urandom; m[i] = wdata;
    end
    repeat (400) begin
      logic [5:0] ra;
      @(negedge clk);
      we = $urandom % 2; waddr = 6'($urandom); wdata = $urandom;
      ra = 6'($urandom); raddr = ra;
      @(posedge clk); #1;
      checks++;
      if (rdata !== m[ra]) begin failures++; $display("FAIL read %0d", ra); end
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
