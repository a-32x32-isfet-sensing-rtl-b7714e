`timescale 1ps / 100fs
// isfet_pkg: sizes and types shared by the ISFET array, the column TDCs and
// the readout. The array is 32 x 32 pixels; each column TDC is a coarse-fine
// converter with a 10-bit coarse counter and a 31-stage fine delay line whose
// 31-bit thermometer snapshot is coded into 5 bits, giving a 15-bit result.
// Analog quantities that cross module boundaries in the behavioural models
// (triangle voltage, chemical potential) are carried as signed integers in
// microvolts.
package isfet_pkg;

  localparam int unsigned ROWS        = 32;  // array rows
  localparam int unsigned COLS        = 32;  // array columns, one TDC each
  localparam int unsigned COARSE_W    = 10;  // MSB (coarse) counter width
  localparam int unsigned FINE_STAGES = 31;  // delay-line stages
  localparam int unsigned FINE_W      = 5;   // thermometer-to-binary output width
  localparam int unsigned OUT_W       = COARSE_W + FINE_W;  // 15-bit TDC word

  // Conversion state of one column TDC (see tdc_controller).
  typedef enum logic [2:0] {
    TDC_IDLE     = 3'd0,  // nothing to do until start
    TDC_WAIT_LOW = 3'd1,  // started; waiting for the column line to be low
    TDC_ARMED    = 3'd2,  // delay line follows PWM; waiting for the rising edge
    TDC_COUNT    = 3'd3,  // coarse counter running; waiting for the falling edge
    TDC_DONE     = 3'd4   // result valid
  } tdc_state_e;

  // Value reported by a TDC whose column line gave no complete pulse.
  localparam logic [OUT_W-1:0] TDC_NO_RESULT = '1;

endpackage
