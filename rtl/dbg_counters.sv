// dbg_counters: counter and timer module of the debug architecture. Six
// saturating CW-bit counters: capture cycles (timer), link words received,
// UART synchronisation errors, filter outputs, trigger firings and input
// samples dropped because the filter was busy or halted. Each counts one per
// clock its inc_* input is high; clr clears all of them. Which events are
// counted is this design's choice.
module dbg_counters #(
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          inc_cycle,
  input  logic          inc_word,
  input  logic          inc_err,
  input  logic          inc_out,
  input  logic          inc_trig,
  input  logic          inc_drop,
  output logic [CW-1:0] cycles,
  output logic [CW-1:0] words,
  output logic [CW-1:0] errors,
  output logic [CW-1:0] outputs,
  output logic [CW-1:0] trigs,
  output logic [CW-1:0] drops
);
  function automatic logic [CW-1:0] bump(logic [CW-1:0] c, logic inc);
    return (inc && c != '1) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      cycles <= '0; words <= '0; errors <= '0; outputs <= '0; trigs <= '0; drops <= '0;
    end else begin
      cycles  <= bump(cycles, inc_cycle);
      words   <= bump(words, inc_word);
      errors  <= bump(errors, inc_err);
      outputs <= bump(outputs, inc_out);
      trigs   <= bump(trigs, inc_trig);
      drops   <= bump(drops, inc_drop);
    end
  end
endmodule
