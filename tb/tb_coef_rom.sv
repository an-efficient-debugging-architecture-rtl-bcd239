// tb_coef_rom: checks the reset contents c(k)=16*min(k+1,NTAPS-k), then
// random writes against a model, read back on every address.
module tb_coef_rom;
  localparam int N = 16;
  logic clk = 0, rst = 1, we = 0;
  logic [3:0] raddr, waddr;
  logic signed [15:0] rdata, wdata;
  logic signed [15:0] model [N];
  int checks = 0, failures = 0;

  coef_rom dut (.*);
  always #5 clk = ~clk;
  initial begin #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic read_all;
    for (int k = 0; k < N; k++) begin
      raddr = k[3:0]; #1;
      checks++;
      if (rdata !== model[k]) begin failures++; $display("FAIL k=%0d %0d exp %0d", k, rdata, model[k]); end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) model[k] = 16'(16 * ((k + 1 < N - k) ? k + 1 : N - k));
    raddr = 0; waddr = 0; wdata = 0;
    @(posedge clk); @(posedge clk); rst <= 0;
    @(negedge clk); read_all();
    repeat (40) begin
      @(negedge clk);
      we = 1; waddr = 4'($urandom); wdata = 16'($urandom);
      model[waddr] = wdata;
      @(negedge clk); we = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
