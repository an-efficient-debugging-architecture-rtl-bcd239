// tb_dtg_controller: runs the sequencer with a tap counter model and checks
// the schedule of one output: accept (shift_en, ag_clr), NTAPS clocks of
// load with first only on tap 0, then one clock of done, and ready again.
// Also checks that nothing moves while ce is low, for a random number of
// clocks at a random tap, and uses random idle gaps between samples.
module tb_dtg_controller;
  localparam int N = 16;
  logic clk = 0, rst = 1, ce = 1, x_valid = 0, ag_last, ag_zero;
  logic ready, shift_en, ag_clr, ag_inc, load, first, done;
  int addr = 0;
  int checks = 0, failures = 0;

  dtg_controller dut (.*);
  always #5 clk = ~clk;
  assign ag_last = (addr == N - 1);
  assign ag_zero = (addr == 0);
  always_ff @(posedge clk) if (ce) begin
    if (ag_clr) addr <= 0; else if (ag_inc) addr <= (addr == N - 1) ? 0 : addr + 1;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time); end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); rst <= 0;
    repeat (12) begin
      int hk, hn;
      hk = $urandom_range(0, N - 1); hn = $urandom_range(1, 4);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      expect_("ready idle", ready, 1);
      x_valid = 1; #1;
      expect_("shift_en", shift_en, 1); expect_("ag_clr", ag_clr, 1);
      @(negedge clk); x_valid = 0;
      for (int k = 0; k < N; k++) begin
        expect_("load", load, 1); expect_("first", first, k == 0); expect_("ready busy", ready, 0);
        expect_("done early", done, 0);
        if (k == hk) begin  // halted clocks in the middle
          ce = 0;
          repeat (hn) begin @(negedge clk); expect_("held load", load, 1); expect_("held first", first, k == 0); end
          ce = 1;
        end
        @(negedge clk);
      end
      expect_("done", done, 1); expect_("load off", load, 0);
      @(negedge clk);
      expect_("ready again", ready, 1); expect_("done off", done, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
