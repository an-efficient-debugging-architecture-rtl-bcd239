// dtg_controller: sequencer of the DTG-FIR filter. IDLE accepts a sample
// (ready high): it is shifted into the sample shift register and the address
// generator is cleared. RUN issues one tap per clock (load, with first on tap
// 0) and advances the address generator until its last tap. DRAIN tells the
// MAC to finish and publish y(n). All transitions happen only with ce high.
// A result appears NTAPS+1 clocks after the sample was accepted; the next
// sample is accepted one clock later.
module dtg_controller (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic x_valid,
  input  logic ag_last,
  input  logic ag_zero,
  output logic ready,
  output logic shift_en,
  output logic ag_clr,
  output logic ag_inc,
  output logic load,
  output logic first,
  output logic done
);
  typedef enum logic [1:0] {IDLE, RUN, DRAIN} st_e;
  st_e st;

  always_ff @(posedge clk) begin
    if (rst) st <= IDLE;
    else if (ce) begin
      unique case (st)
        IDLE:    if (x_valid) st <= RUN;
        RUN:     if (ag_last) st <= DRAIN;
        DRAIN:   st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    ready    = (st == IDLE);
    shift_en = ce && (st == IDLE) && x_valid;
    ag_clr   = (st == IDLE) && x_valid;
    ag_inc   = (st == RUN);
    load     = (st == RUN);
    first    = (st == RUN) && ag_zero;
    done     = (st == DRAIN);
  end
endmodule
