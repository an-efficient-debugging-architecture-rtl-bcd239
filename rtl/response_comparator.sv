// response_comparator: compares the circuit's output response with the
// expected correct response and gives pass or fail. Expected values are
// written ahead (exp_valid/exp) into a 2**QAW-entry queue; each act_valid
// result is compared with the oldest queued value, which is then removed,
// and pass or fail pulses for one clock. A result with no expectation queued
// is not judged. Counters of matches and mismatches saturate at 16 bits;
// any_fail stays set until reset. Results and expectations may arrive in
// the same clock.
module response_comparator #(
  parameter int ACC_W = 28,
  parameter int QAW   = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             exp_valid,
  input  logic [ACC_W-1:0] exp,
  input  logic             act_valid,
  input  logic [ACC_W-1:0] act,
  output logic             pass,
  output logic             fail,
  output logic             any_fail,
  output logic [15:0]      n_match,
  output logic [15:0]      n_mismatch
);
  localparam int QD = 1 << QAW;
  logic [ACC_W-1:0] q [QD];
  logic [QAW:0]     wp, rp;
  logic             q_empty, q_full, judge;

  assign q_empty = (wp == rp);
  assign q_full  = (wp == {~rp[QAW], rp[QAW-1:0]});
  assign judge   = act_valid && !q_empty;

  always_ff @(posedge clk) begin
    if (exp_valid && !q_full) q[wp[QAW-1:0]] <= exp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; pass <= 1'b0; fail <= 1'b0; any_fail <= 1'b0;
      n_match <= '0; n_mismatch <= '0;
    end else begin
      pass <= 1'b0;
      fail <= 1'b0;
      if (exp_valid && !q_full) wp <= wp + 1'b1;
      if (judge) begin
        rp <= rp + 1'b1;
        if (act == q[rp[QAW-1:0]]) begin
          pass <= 1'b1;
          if (n_match != '1) n_match <= n_match + 1'b1;
        end else begin
          fail <= 1'b1;
          any_fail <= 1'b1;
          if (n_mismatch != '1) n_mismatch <= n_mismatch + 1'b1;
        end
      end
    end
  end
endmodule
