// tb_dtg_fir: end-to-end check of the 16-tap filter. Loads random
// coefficients through the write port (and first checks the reset
// coefficients), sends random samples with random tap masks and pauses of
// ce, and compares every y(n) with a reference convolution. Checks the
// latency: y_valid NTAPS+1 enabled clocks after the sample is accepted.
module tb_dtg_fir;
  localparam int N = 16;
  logic clk = 0, rst = 1, ce = 1, x_valid = 0, ready, y_valid, coef_we = 0;
  logic signed [7:0]  x_in;
  logic [N-1:0]       tap_mask;
  logic signed [27:0] y_out;
  logic [3:0]         coef_waddr;
  logic signed [15:0] coef_wdata;
  longint c [N];
  longint x [N];
  int checks = 0, failures = 0;

  dtg_fir dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run_sample(logic signed [7:0] s, logic [N-1:0] m, bit pauses);
    longint e;
    int lat;
    @(negedge clk);
    while (!ready) @(negedge clk);
    x_valid = 1; x_in = s; tap_mask = m;
    @(negedge clk); x_valid = 0;
    for (int k = N - 1; k > 0; k--) x[k] = x[k-1];
    x[0] = s;
    e = 0;
    for (int k = 0; k < N; k++) if (m[k]) e += c[k] * x[k];
    lat = 0;
    while (!y_valid) begin
      if (pauses) ce = ($urandom % 3) != 0;
      @(negedge clk);
      if (ce) lat++;
      if (lat > 100) break;
    end
    ce = 1;
    checks += 2;
    if (y_out !== 28'(e)) begin failures++; $display("FAIL y=%0d exp=%0d", y_out, e); end
    if (!pauses && lat != N + 1) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    x_in = 0; tap_mask = '1; coef_waddr = 0; coef_wdata = 0;
    foreach (x[k]) x[k] = 0;
    for (int k = 0; k < N; k++) c[k] = 16 * ((k + 1 < N - k) ? k + 1 : N - k);
    @(posedge clk); @(posedge clk); rst <= 0;
    // impulse then steady input with the reset coefficients
    run_sample(8'sd1, '1, 0);
    for (int i = 0; i < 20; i++) run_sample(8'sd42, '1, 0);
    // random coefficients
    for (int k = 0; k < N; k++) begin
      @(negedge clk); coef_we = 1; coef_waddr = k[3:0]; coef_wdata = 16'($urandom); c[k] = coef_wdata;
    end
    @(negedge clk); coef_we = 0;
    for (int i = 0; i < 40; i++) run_sample(8'($urandom), (i % 3 == 0) ? N'($urandom) : '1, i % 5 == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
