// dbg_pkg: types and constants shared by the DTG-FIR filter and its debug
// architecture. Word sizes follow the 16-tap filter with 8-bit samples and
// 16-bit coefficients; the FSM state numbers follow the debug controller's
// numbering (1..3 = link enabled, 4..6 = store a word of that link).
package dbg_pkg;
  // Trigger pin numbers and word sizes are enumeration constants rather
  // than localparams, so a module that uses none of them compiles clean.
  typedef enum int {
    TP_RESET  = 0,   // soft reset
    TP_TAP_LO = 1,   // TP1..TP8 tap selection
    TP_FILTER = 9,   // capture on filter output
    TP_UART   = 10,  // UART enable, active low
    TP_I2C    = 11,  // I2C enable, active low
    TP_SPI    = 12,  // SPI enable, active low (unlisted pin)
    TP_PROTO  = 13,  // capture on serial protocol word
    NUM_TP    = 14   // trigger pins TP0..TP13
  } tp_pin_e;

  typedef enum int {
    FRAME_W = 10,    // UART frame: start, 8 data, stop
    TRACE_W = 32     // common trace buffer word
  } word_size_e;

  typedef enum logic [1:0] {
    PROTO_NONE = 2'd0,
    PROTO_UART = 2'd1,
    PROTO_SPI  = 2'd2,
    PROTO_I2C  = 2'd3
  } proto_e;

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_UART     = 3'd1,
    ST_SPI      = 3'd2,
    ST_I2C      = 3'd3,
    ST_UART_MEM = 3'd4,
    ST_SPI_MEM  = 3'd5,
    ST_I2C_MEM  = 3'd6
  } dbg_state_e;

  // trace word tags (bits 31:30 of a trace word)
  typedef enum logic [1:0] {
    TAG_UART = 2'd1,
    TAG_SPI  = 2'd2,
    TAG_I2C  = 2'd3,
    TAG_FIR  = 2'd0
  } trace_tag_e;

  // default coefficient of tap k: triangular window scaled by 16
  function automatic int default_coef(int k, int ntaps);
    int a, b;
    a = k + 1;
    b = ntaps - k;
    return 16 * ((a < b) ? a : b);
  endfunction
endpackage
