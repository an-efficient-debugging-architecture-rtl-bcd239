// uart_tx: UART transmitter. When idle and the TX buffer is not empty it pops
// one byte (pop is a one-clock pulse, data must be valid with it, as from a
// first-word-fall-through FIFO) and sends a 10-bit frame: start bit 0, eight
// data bits least significant first, stop bit 1. Each bit lasts 16 ticks of
// the prescaler. irq pulses for one clock when the stop bit has been sent.
// The line idles high, also during reset.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       pop,
  output logic       txd,
  output logic       irq
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} st_e;
  st_e        st;
  logic [3:0] tcnt;
  logic [2:0] bcnt;
  logic [7:0] sh;

  assign pop = (st == IDLE) && valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; tcnt <= '0; bcnt <= '0; sh <= '0; txd <= 1'b1; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      unique case (st)
        IDLE: begin
          txd <= 1'b1;
          if (valid) begin
            sh <= data; st <= START; tcnt <= '0; txd <= 1'b0;
          end
        end
        START: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            st <= DATA; bcnt <= '0; txd <= sh[0];
          end
        end
        DATA: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            sh <= {1'b0, sh[7:1]};
            if (bcnt == 3'd7) begin
              st <= STOP; txd <= 1'b1;
            end else begin
              bcnt <= bcnt + 1'b1; txd <= sh[1];
            end
          end
        end
        STOP: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin
            st <= IDLE; irq <= 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
