// daq_pkg: sizes and types shared by the ADC0809 acquisition front end.
// An 8-bit ADC0809 byte stream is spread over four 8-bit latches, packed into
// 32-bit words and buffered in a 16-word asynchronous FIFO. The ADC control
// state machine's five states are the ones of the converter cycle
// (idle, start, wait for end of conversion, output enable, lock).
package daq_pkg;
  localparam int unsigned ADC_W      = 8;               // ADC0809 resolution
  localparam int unsigned LANES      = 4;               // latches per FIFO word
  localparam int unsigned WORD_W     = ADC_W * LANES;   // 32-bit FIFO word
  localparam int unsigned FIFO_DEPTH = 16;              // words in the FIFO
  localparam int unsigned PHASES     = LANES + 1;       // CLK1..CLK4 latches, CLK5 FIFO write
  localparam int unsigned PHASE_MOD  = 7;               // clock conversion counter 0..6

  typedef enum logic [2:0] {
    ADC_IDLE  = 3'd0,   // all controls low
    ADC_START = 3'd1,   // ALE and START high
    ADC_WAIT  = 3'd2,   // converting, wait for EOC
    ADC_OE    = 3'd3,   // output enable
    ADC_LOCK  = 3'd4    // output enable plus lock: byte is latched
  } adc_state_t;
endpackage
