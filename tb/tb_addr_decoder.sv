// tb_addr_decoder: exhaustive over region and both counts for the 64-word
// buffer (two 32-word regions): address = region base + count, room and
// full flags, then random (region, count) pairs with counts past the
// region size.
module tb_addr_decoder;
  localparam int AW = 6;
  localparam int D = 1 << AW, R = D / 2;
  logic region;
  logic [AW-1:0] cnt_in, cnt_out, addr;
  logic room, full_in, full_out;
  int checks = 0, failures = 0;

  addr_decoder dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < D; a++)
        for (int b = 0; b < D; b++) begin
          int c, ea;
          region = r[0]; cnt_in = AW'(a); cnt_out = AW'(b); #1;
          c  = r ? b : a;
          ea = r * R + (c % R);
          checks += 4;
          if (addr !== AW'(ea)) begin failures++; $display("FAIL addr"); end
          if (room !== (c < R)) begin failures++; $display("FAIL room"); end
          if (full_in !== (a >= R)) begin failures++; $display("FAIL full_in"); end
          if (full_out !== (b >= R)) begin failures++; $display("FAIL full_out"); end
        end
    repeat (2000) begin
      int a, b, c;
      a = $urandom_range(0, D - 1); b = $urandom_range(0, D - 1);
      region = 1'($urandom); cnt_in = AW'(a); cnt_out = AW'(b); #1;
      c = region ? b : a;
      checks += 2;
      if (addr !== AW'(region * R + (c % R))) begin failures++; $display("FAIL random addr"); end
      if (room !== (c < R)) begin failures++; $display("FAIL random room"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
