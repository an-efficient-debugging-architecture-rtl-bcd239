# DTG-FIR filter with a reconfigurable serial-link debug architecture

A 16-tap FIR filter is only as good as the samples that reach it. Most of
them arrive over a serial link. If that link corrupts a frame, the filter
produces a wrong result, and no amount of probing inside the filter will
explain it. This design puts the filter and its host links under one debug
controller, which:

- takes samples from a UART, an SPI target port, an I2C target port or an
  input scan chain;
- repairs UART framing errors, and moves the traffic to I2C when the UART
  keeps failing;
- records link words and filter outputs in one shared trace buffer, inside a
  window that trigger pins open;
- can halt, single-step, reset and count what the filter does;
- compares every result against an expected value when one is supplied.

It implements, in synthesizable SystemVerilog, the architecture of
"An Efficient Debugging Architecture for DTG Based FIR Filter Using I²C
Protocol in DSP Processor". That description leaves many details open.
Where it does, this design makes its own choices, which are listed in
[Where this design departs or decides](#where-this-design-departs-or-decides).

```
                 +-------------------------- dtg_fir_debug_top --------------------------+
 uart_rxd/txd -->| uart (prescaler, tx, rx,  --> uart_ecu --+                           |
                 |       two async FIFOs)                   |                           |
 spi_*  -------->| spi_slave --------------------------------+--> dbg_fsm --> x(n) --+  |
 i2c_scl/sda --->| i2c_slave -------------------------------+     |  ^             |  |
 scan_* -------->| scan_chain ---------------------(scan_mode)-----|--|------------>+  |
                 |                                                 v  | trig         v  |
 tp[13:0] ------>| trigger_unit --tap_mask, trig, enables--> addr_decoder   dtg_fir -> y_out
                 |      |                                          v        (16 taps)  |
                 |      +-- soft reset --> reset_ctrl         trace_buffer <--- y ----+ |
 dbg_halt/step ->| clock_ctrl --ce--> filter + UART input path    |  64 x 32          |  |
 exp_y --------->| response_comparator <------------------------------------------- y |
                 | result_serializer --bytes--> active link (UART / SPI / I2C)         |
                 | dbg_counters                                                        |
                 +---------------------------------------------------------------------+
```

## The filter: one multiplier, walked by a tap counter

`dtg_fir` computes y(n) = Σ c(k)·x(n−k) over the taps enabled in `tap_mask`.
It has one multiplier that is shared in time. Its parts are:

| part | module | role |
|---|---|---|
| controller | `dtg_controller` | IDLE → RUN (16 clocks) → DRAIN (1 clock) |
| address generator | `dtg_addr_gen` | counts taps 0..15 |
| coefficient memory | `coef_rom` | 16 × 16-bit words, combinational read, write port for new coefficients |
| coefficient register and MAC | `fir_mac` | registers c(k), x(n−k) and the tap-enable bit, then multiplies and accumulates |
| sample shift register and MUX | `sample_shift_reg` | 16 × 8-bit delay line; the multiplexer picks x(n−k) |

**Schedule.** A sample is accepted when `x_valid`, `ready` and `ce` are all
high.

- In that clock the delay line shifts and the tap counter clears.
- During the next 16 clocks, tap k's coefficient and sample are loaded into
  the register stage, one tap per clock, while the MAC adds the product of
  the previous tap.
- A tap that is masked off adds zero.
- `y_valid` pulses with the result 17 enabled clocks after acceptance.
- `ready` returns one clock later, so the filter takes one sample every
  18 clocks.

Every register advances only while `ce` is high. Halting the clock
controller therefore freezes the filter in the middle of a sum, and each
`dbg_step` moves it on by exactly one tap.

**Arithmetic.** Samples are 8-bit signed and coefficients 16-bit signed. The
accumulator is 28 bits (8 + 16 + log2 16), so no sum of 16 products can
overflow. Reset loads a triangular window, c(k) = 16·min(k+1, 16−k). A host
can overwrite any word through `coef_we`/`coef_waddr`/`coef_wdata`.

## Getting samples in: links, the FSM and fail-over

`dbg_fsm` decides which link feeds the filter. Its states are numbered so
that the number says what is happening:

| state | value | meaning |
|---|---|---|
| `ST_IDLE` | 0 | no link enabled |
| `ST_UART`, `ST_SPI`, `ST_I2C` | 1, 2, 3 | that link is enabled and waiting for a word |
| `ST_UART_MEM`, `ST_SPI_MEM`, `ST_I2C_MEM` | 4, 5, 6 | a word of that link is being stored |

- **Link selection.** The links are enabled by active-low trigger pins:
  TP10 for UART, TP11 for I2C and TP12 for SPI.
  - From IDLE, the first enabled link in the order UART, SPI, I2C is taken.
  - Releasing the active link's enable returns the FSM to IDLE.
- **Forwarding.** Every word of the active link goes straight to the filter.
  A word that arrives while the filter is busy or halted is dropped and
  counted in `cnt_drops`. A host should therefore pace samples at least
  18 clocks apart.
- **Scan chain.** With `scan_mode` high, the filter takes its samples from
  `scan_chain` instead. Eight bits are shifted in MSB first with `scan_en`,
  and `scan_update` applies them.

### The UART path and the error correction unit

The UART has three parts:

- A transmitter and a receiver, 8N1, sampling 16 times per bit. Both run
  on `serial_clk`.
- A prescaler that divides `serial_clk` by `UART_DIV` = 27. With a 50 MHz
  serial clock this gives 115 741 baud.
- Two asynchronous FIFOs with Gray-coded pointers, which carry data to and
  from the processor clock `clk`.

The receiver does not throw away a bad frame. It pushes the whole 10-bit
frame, `{stop, data[7:0], start}`, into the RX FIFO, even when the start bit
read 1 at mid-bit or the stop bit read 0. After a bad stop bit it waits for
the line to go idle before looking for the next frame.

`uart_ecu` checks the two framing bits of each frame.

- A wrong start or stop bit is a synchronisation error.
- The unit inverts that bit back and passes the data byte on unchanged.
- It raises `sync_err` with the word.

The eight data bits carry no redundancy in this frame format, so the unit
cannot check or correct them. Data errors show up instead at the response
comparator.

**Fail-over.** The FSM counts UART synchronisation errors. After
`ERR_LIMIT` = 2 of them:

- It marks the UART failed and pulses `failover`.
- It moves to the I2C link, whether or not TP11 enables it, and even if
  the UART is still enabled.
- It skips the UART until `clear_fail` or a reset.

The repaired words before fail-over are still forwarded to the filter, so
nothing is lost while the error count builds up.

### SPI and I2C ports

- **SPI** (`spi_slave`): mode 0, MSB first, 8-bit words. SCLK, CS_N and MOSI
  are oversampled by `clk`, which must be at least 4 × SCLK.
- **I2C** (`i2c_slave`): 7-bit address `I2C_ADDR` = 0x50, with an open-drain
  SDA (`i2c_sda_oe` high pulls the line low). The port does not stretch the
  clock. SCL and SDA are oversampled by `clk`.
  - A write transfer delivers filter samples, one per data byte.
  - A read transfer returns result bytes.

## Getting results out: one result at a time

`result_serializer` turns each filter result into four bytes, least
significant first. The result is sign-extended from 28 to 32 bits. The
serializer always sends its bytes on the link that is active now:

- **UART.** The bytes are pushed into the TX FIFO automatically, so the host
  simply receives 4 bytes per sample. Four frames take four times as long
  to send as the one frame that carried the sample. Once the 8-byte TX FIFO
  is full, results are dropped, so pace UART samples about four frame times
  apart if every result is wanted.
- **SPI.** The transfer is full duplex. The byte clocked out on MISO during
  a transfer is the next byte of the held result, or 0xFF if no result is
  held.
- **I2C.** The host issues a read of 0x50 and reads 4 bytes, acknowledging
  the first three. Again 0xFF means no result is held.

The serializer holds one result at a time, and this is the rule most likely
to surprise a user:

- A result finished while an earlier one is still unread is dropped, and
  `res_dropped` pulses.
- A host that sends several samples before reading therefore gets the
  oldest unread result, not the newest one.
- Sending one sample and then reading four bytes keeps the two sides in
  step.
- When the active link changes, any pending bytes are discarded, so the
  new link starts on a whole result.

## Trigger pins

`trigger_unit` synchronises the 14 pins `tp[13:0]` and decodes them:

| pin | function |
|---|---|
| TP0 | soft reset. High for one clock or more; it resets the `clk` domain for at least 5 clocks |
| TP1..TP8 | tap selection: TPi enables taps 2(i−1) and 2(i−1)+1 (NTAPS/8 taps per pin) |
| TP9 | arm a capture window that opens at the next filter output |
| TP10 | UART enable, active low |
| TP11 | I2C enable, active low |
| TP12 | SPI enable, active low |
| TP13 | arm a capture window that opens at the next link word |

An armed TP9 or TP13 fires once, on the event that follows. `trig_src`
says which one fired: 0 for the filter, 1 for a link.

## Capture windows and the common trace buffer

There is one trace buffer, `trace_buffer`: 64 words of 32 bits, with one
clock of read latency. `addr_decoder` splits it into two regions:

| region | addresses | contents |
|---|---|---|
| 0, input trace | 0..31 | link words, written in the MEM state after each word |
| 1, output trace | 32..63 | filter outputs |

A firing trigger opens a window and clears both region counters. The window
closes when either region holds `WINDOW` = 16 words. Closing pulses
`capture_done`, and also halts the filter if `halt_on_full` is set. A
filter output that meets a link-word write in the same clock waits one
clock. `trace_full_in` and `trace_full_out` report the two counters.

Trace word format:

| bits | link word (region 0) | filter output (region 1) |
|---|---|---|
| 31:30 | tag: 1 UART, 2 SPI, 3 I2C | tag 0 |
| 29:28 | UART: bit 28 is `sync_err` of this frame; otherwise 0 | 0 |
| 27:0 | UART: raw frame in 9:0; SPI/I2C: byte in 7:0 | y(n), 28-bit two's complement |

A UART entry keeps the frame as it was received, before repair. The trace
therefore shows exactly which framing bit was wrong. Read the buffer by
driving `trace_raddr`; `trace_rdata` is valid on the next clock.

## Halting, stepping, comparing and counting

- **`clock_ctrl`** produces the enable `ce`, not a gated clock. It drives
  the filter and the UART input path.
  - `dbg_halt` stops both from the next clock, and `dbg_resume` restarts
    them. Halt wins if both are high.
  - `dbg_step` gives exactly one enabled clock while halted.
- **`reset_ctrl`** asserts the external `arst_n` (active low) at once and
  releases it through a two-flop synchroniser. It stretches a TP0 soft
  reset to at least STRETCH+1 = 5 clocks. The `serial_clk` domain has its own instance,
  which responds to `arst_n` only.
- **`response_comparator`** holds up to four expected results, queued ahead
  on `exp_valid`/`exp_y`.
  - Each filter output is compared with the oldest queued value.
  - The result is a one-clock `cmp_pass` or `cmp_fail`.
  - `n_match`, `n_mismatch` and the sticky `cmp_any_fail` keep the totals.
  - Outputs with nothing queued are not judged.
- **`dbg_counters`** holds six 16-bit saturating counters, cleared by
  `cnt_clear`:
  - clocks spent capturing;
  - link words;
  - UART synchronisation errors;
  - filter outputs;
  - trigger firings;
  - dropped samples.

## Clocks and resets

| clock | drives | requirement |
|---|---|---|
| `clk` | everything except the UART's serial side | ≥ 4 × SPI SCLK, and well above the I2C bus rate (100 MHz against 2.5 MHz I2C is used in simulation) |
| `serial_clk` | UART prescaler, transmitter, receiver | 16 × `UART_DIV` × baud |

The two clocks are unrelated. They meet only in the UART's asynchronous
FIFOs. Link words can reach the FSM at most every other clock; a
simulation assertion in `dbg_fsm` checks this.

## Parameters of `dtg_fir_debug_top`

| parameter | default | meaning |
|---|---|---|
| `NTAPS` | 16 | filter taps; should be a multiple of 8 for the TP1..TP8 grouping |
| `DATA_W` | 8 | sample width |
| `COEF_W` | 16 | coefficient width |
| `ACC_W` | 28 | accumulator and result width; keep ≥ DATA_W+COEF_W+log2(NTAPS) |
| `TRACE_DEPTH` | 64 | trace buffer words (two equal regions) |
| `WINDOW` | 16 | words per region that close a capture window (≤ TRACE_DEPTH/2) |
| `UART_DIV` | 27 | prescaler divider: baud = serial_clk / (16·UART_DIV) |
| `I2C_ADDR` | 0x50 | I2C target address |
| `ERR_LIMIT` | 2 | UART synchronisation errors before fail-over |

The widths of 16 taps, 8-bit samples and 16-bit coefficients come from the
published filter. The other defaults are this design's choices.

## Where this design departs or decides

- **Time-shared filter.** The block diagram names a controller, an address
  generator, a coefficient ROM, a register, a shift register with a
  multiplexer, and the FIR. This is read as a one-multiplier datapath
  producing one product per clock. The 17-clock latency and the
  18-clock-per-sample rate follow from that reading.
- **Coefficient "ROM".** It is writable so that a host can load its own
  coefficients. The triangular reset contents are this design's choice;
  the original gives random coefficients.
- **Trigger numbering.** The trigger table gives TP10 = UART and
  TP11 = I2C, and this design follows it. Elsewhere the original's
  waveform labels name pin 8 for the UART and pin 10 for I2C; those are
  not followed. TP12 is unassigned there, and is used here as the SPI
  enable. The eight tap-selection pins each switch a pair of taps.
- **Fail-over target.** Most of the original says a failing UART hands
  over to I2C, and this design does that. One passage names SPI instead.
- **Error correction.** Only the start and stop bits are checked and
  repaired. The original also asks for the data bits to be checked. A
  10-bit 8N1 frame carries no redundancy for that, so data errors are left
  to the response comparator and to fail-over.
- **Two trace buffers become one.** The block diagram shows an input and
  an output trace buffer. Following the text's "single common buffer",
  they are two regions of one RAM, addressed by `addr_decoder`.
- **Trace read-out.** The original reads traces through JTAG into a vendor
  logic analyser, with an external memory. None of this is built. The
  trace buffer's read port is a plain top-level port instead.
- **Result return.** Results go back over the active link, 4 bytes, least
  significant first, one result at a time. The original says only that the
  links carry "16 bit or 32 bit" words.
- **5-tap operation.** The original demonstrates I2C with a 5-tap filter.
  Here the same 16-tap hardware is used: the unused taps are switched off
  with TP4..TP8 and their coefficients are written to zero.
- **Protocol details.** The original does not specify these, and all of
  them are this design's choices: SPI mode 0, the I2C address, no I2C
  clock stretching, 8N1 with 16× oversampling, FIFO depth 8, the clock
  enable instead of a gated clock, and the soft-reset stretch.

## Verifying and simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
drives random stimulus against a model. It ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog that counts as a
failure. Two testbenches run the complete design at its default
parameters:

- **`tb_dtg_fir_debug_top`** steps through every mechanism in turn and
  counts each one. A reference filter model checks every output. The
  sequence is:
  1. scan-chain input, with one comparator pass and one forced fail;
  2. coefficient loading;
  3. UART input, and results returned on the UART;
  4. a repaired stop bit;
  5. a second error, and fail-over to I2C;
  6. I2C write and read-back;
  7. tap selection by TP1..TP8;
  8. a sample dropped while halted;
  9. single-stepping;
  10. SPI input and read-back;
  11. capture windows opened by TP13 and by TP9, with `halt_on_full`;
  12. trace read-out;
  13. TP0 soft reset.

  It simulates about 1.5 ms.
- **`tb_fir_5tap_i2c`** runs the 5-tap I2C demonstration. Taps 4 and 5 see
  inputs 3 and 4 with coefficients 4 and 5, giving an output of
  3·4 + 4·5 = 32. It then runs random 5-tap filters. Every result is read
  back over I2C.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl rtl/dbg_pkg.sv tb/tb_dtg_fir_debug_top.sv -y rtl -y tb \
    --top-module tb_dtg_fir_debug_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `rtl/dbg_pkg.sv` must come
first, because every module imports it.

What is not covered:

- Timing closure at any clock rate.
- FPGA resource use.
- Electrical I2C behaviour beyond an ideal open-drain wire.
- Links driven by real masters with clock stretching or repeated starts.

## Files

- `rtl/dbg_pkg.sv`: trigger pin numbers, state and tag encodings, the
  default-coefficient function.
- Filter: `rtl/dtg_fir.sv`, `dtg_controller.sv`, `dtg_addr_gen.sv`,
  `coef_rom.sv`, `sample_shift_reg.sv`, `fir_mac.sv`.
- UART: `rtl/uart.sv`, `uart_prescaler.sv`, `uart_tx.sv`, `uart_rx.sv`,
  `async_fifo.sv`, `uart_ecu.sv`.
- Other links: `rtl/spi_slave.sv`, `i2c_slave.sv`, `scan_chain.sv`.
- Debug: `rtl/dbg_fsm.sv`, `trigger_unit.sv`, `addr_decoder.sv`,
  `trace_buffer.sv`, `clock_ctrl.sv`, `reset_ctrl.sv`, `dbg_counters.sv`,
  `response_comparator.sv`, `result_serializer.sv`.
- Top: `rtl/dtg_fir_debug_top.sv`.
- `tb/`: one testbench per module, plus the two full-design testbenches.
