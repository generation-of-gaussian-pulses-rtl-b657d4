// ncs_pkg: constants and types shared by the nuclear counting system.
//
// The counting system generates a periodic Gaussian pulse, plays it out through a
// 12-bit SPI DAC, digitises it again with a 14-bit SPI ADC behind a programmable-gain
// preamplifier, and counts the pulses whose peak falls inside a voltage window.
// This package holds the board facts the blocks share: the 50 MHz clock, the DAC and
// ADC transfer functions, the window limits and the LCD character type.
//
// The 50 MHz clock, 12-bit DAC, 14-bit ADC, the 0.86 V / 1.6 V window and the 16-bit
// counters follow the source design. The DAC reference (3.3 V), the ADC transfer
// function (1.65 V mid-scale, +/-1.25 V span) and the amplifier gain of -1 are the
// data-sheet values of the parts on a Spartan-3E Starter board and are this design's
// choices.
package ncs_pkg;

  // System clock.
  localparam int unsigned CLK_HZ = 50_000_000;

  // DAC: LTC2624, 12-bit unsigned, channel A with a 3.3 V reference.
  localparam int unsigned DAC_BITS   = 12;
  localparam int unsigned DAC_REF_MV = 3300;

  // ADC: LTC1407A-1, 14-bit two's complement.
  //   code = GAIN * (Vin - 1.65 V) / 1.25 V * 8192, GAIN = -1 (LTC6912 setting 0001)
  localparam int unsigned ADC_BITS     = 14;
  localparam int          ADC_MID_MV   = 1650;
  localparam int          ADC_SPAN_MV  = 1250;
  localparam logic [3:0]  AMP_GAIN_CODE = 4'b0001;  // gain -1 on both channels

  // Discriminator window (millivolts).
  localparam int unsigned LLD_MV = 860;
  localparam int unsigned ULD_MV = 1600;

  // Width of the millivolt samples used after the ADC (0..4095 mV).
  localparam int unsigned MV_BITS = 12;

  // Counters.
  localparam int unsigned COUNT_BITS = 16;

  // Character LCD.
  typedef logic [7:0] char_t;
  localparam int unsigned LCD_COLS = 16;
  localparam int unsigned LCD_CHARS = 2 * LCD_COLS;

  // What the rotary switch adjusts.
  typedef enum logic {MODE_FREQ = 1'b0, MODE_AMP = 1'b1} rot_mode_e;

  // Millivolts to DAC code (constant use only).
  function automatic int unsigned mv_to_dac(int unsigned mv);
    return (mv * (1 << DAC_BITS) + DAC_REF_MV / 2) / DAC_REF_MV;
  endfunction

endpackage
