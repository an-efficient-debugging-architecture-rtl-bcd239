// uart_rx: UART receiver. The line is synchronised by two flip-flops; a
// falling edge while idle starts a frame. Using 16 prescaler ticks per bit,
// it samples the start bit, eight data bits (least significant first) and the
// stop bit at mid-bit, then pushes the whole 10-bit frame {stop, data, start}
// into the RX buffer with a one-clock push and pulses irq. A start bit that
// reads 1 at mid-bit is kept in the frame rather than dropped, so that the
// error correction unit downstream can see and repair it. After a stop bit
// that reads 0 the receiver waits for the line to return high.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rxd,
  output logic [9:0] frame,
  output logic       push,
  output logic       irq
);
  typedef enum logic [2:0] {IDLE, START, DATA, STOP, BREAK} st_e;
  st_e        st;
  logic [1:0] sync;
  logic [3:0] tcnt;
  logic [2:0] bcnt;
  logic [8:0] sh;   // {data, start}
  logic       rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= 2'b11; st <= IDLE; tcnt <= '0; bcnt <= '0; sh <= '0;
      frame <= '0; push <= 1'b0; irq <= 1'b0;
    end else begin
      sync <= {sync[0], rxd};
      push <= 1'b0;
      irq  <= 1'b0;
      unique case (st)
        IDLE: if (!rx) begin
          st <= START; tcnt <= '0;
        end
        START: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd7) begin       // middle of the start bit
            sh <= {8'h00, rx}; st <= DATA; tcnt <= '0; bcnt <= '0;
          end
        end
        DATA: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin      // middle of a data bit
            sh[8:1] <= {rx, sh[8:2]};
            if (bcnt == 3'd7) st <= STOP;
            bcnt <= bcnt + 1'b1;
          end
        end
        STOP: if (tick) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 4'd15) begin      // middle of the stop bit
            frame <= {rx, sh};
            push  <= 1'b1;
            irq   <= 1'b1;
            st    <= rx ? IDLE : BREAK;
          end
        end
        BREAK: if (rx) st <= IDLE;    // bad stop bit: wait for idle line
        default: st <= IDLE;
      endcase
    end
  end
endmodule
