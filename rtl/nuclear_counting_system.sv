// nuclear_counting_system: a Gaussian pulse source and a single-channel counting
// system in one FPGA, linked through a DAC and an ADC.
//
// Source side: the rotary switch (rotary_decoder, pulse_settings) sets the rate and
// amplitude of a periodic Gaussian pulse (gaussian_pulse_gen). One sample per sample
// period goes out to DAC A over SPI. On the board the DAC output is wired to the
// preamplifier/ADC input, so the pulse comes back as analog signal, like a detector
// pulse would.
// Counting side: the same SPI bus reads the ADC once per sample period
// (spi_sequencer). The discriminator (pulse_discriminator) finds every pulse whose
// peak lies between 0.86 V and 1.6 V; count_unit counts those pulses per second
// (timer: prescaler) and in total and keeps the largest peak. Once a second the
// three values are converted to BCD (bin2bcd) and shown on the LCD
// (display_formatter, lcd_driver).
//
// Ports are the board pins: clock, reset, the rotary switch, the shared SPI bus with
// DAC_CS, AMP_CS and AD_CONV, the DAC clear and amplifier shutdown pins (held
// inactive) and the 4-bit LCD bus. At the defaults a sample period is 500 cycles
// (100 k samples/s), the pulse rate is 454.5 Hz to 2 kHz and the display changes
// once a second.
// The block structure, the SPI link, the window and the 1 s counting time follow the
// source design; sample rate, pulse shape, rotary use and display layout are this
// design's choices.
module nuclear_counting_system
  import ncs_pkg::*;
#(
  parameter int unsigned CLK_FREQ      = CLK_HZ,
  parameter int unsigned SEC_DIV       = CLK_HZ,     // cycles per counting interval
  parameter int unsigned FRAME_CLKS    = 500,        // cycles per sample period
  parameter int unsigned SPI_HALF      = 3,
  parameter int unsigned AMP_HALF      = 5,
  parameter int unsigned DEBOUNCE_CLKS = 50_000,
  parameter int unsigned SHAPE_LEN     = 32,
  parameter int unsigned PERIOD_MIN    = 50,
  parameter int unsigned PERIOD_MAX    = 220,
  parameter int unsigned PERIOD_DEFAULT = 50,
  parameter int unsigned AMP_STEP      = 16,
  parameter int unsigned AMP_DEFAULT   = 1489,
  parameter int unsigned LLD           = LLD_MV,
  parameter int unsigned ULD           = ULD_MV
) (
  input  logic       clk,
  input  logic       rst,
  // rotary switch
  input  logic       rot_a,
  input  logic       rot_b,
  input  logic       rot_center,
  // SPI bus to DAC, preamplifier and ADC
  output logic       spi_sck,
  output logic       spi_mosi,
  input  logic       spi_miso,
  output logic       dac_cs_n,
  output logic       dac_clr_n,
  output logic       amp_cs_n,
  output logic       amp_shdn,
  output logic       ad_conv,
  // character LCD
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [3:0] lcd_d
);

  localparam int unsigned PERIOD_BITS = $clog2(PERIOD_MAX + 1);

  // ---------------- pulse source ----------------
  logic                   rot_step, rot_up, rot_press;
  rot_mode_e              mode;
  logic [PERIOD_BITS-1:0] period;
  logic [DAC_BITS-1:0]    amp;
  logic                   gen_step, pulse_start;
  logic [DAC_BITS-1:0]    dac_code;

  rotary_decoder #(.DEBOUNCE_CLKS(DEBOUNCE_CLKS)) u_rotary (
    .clk, .rst, .rot_a, .rot_b, .rot_center,
    .step_o (rot_step), .dir_up_o (rot_up), .press_o (rot_press)
  );

  pulse_settings #(
    .PERIOD_BITS (PERIOD_BITS), .PERIOD_MIN (PERIOD_MIN), .PERIOD_MAX (PERIOD_MAX),
    .PERIOD_DEFAULT (PERIOD_DEFAULT), .AMP_STEP (AMP_STEP), .AMP_DEFAULT (AMP_DEFAULT)
  ) u_settings (
    .clk, .rst, .step_i (rot_step), .dir_up_i (rot_up), .press_i (rot_press),
    .mode_o (mode), .period_o (period), .amp_o (amp)
  );

  gaussian_pulse_gen #(.SHAPE_LEN(SHAPE_LEN), .PERIOD_BITS(PERIOD_BITS)) u_gen (
    .clk, .rst, .step_i (gen_step), .period_i (period), .amp_i (amp),
    .code_o (dac_code), .pulse_start_o (pulse_start)
  );

  // ---------------- SPI link ----------------
  logic                       adc_valid, spi_ready;
  logic signed [ADC_BITS-1:0] adc_code;

  spi_sequencer #(.FRAME_CLKS(FRAME_CLKS), .SPI_HALF(SPI_HALF), .AMP_HALF(AMP_HALF)) u_spi (
    .clk, .rst,
    .gen_step_o (gen_step), .dac_code_i (dac_code),
    .adc_valid_o (adc_valid), .adc_code_o (adc_code), .ready_o (spi_ready),
    .spi_sck, .spi_mosi, .spi_miso, .dac_cs_n, .amp_cs_n, .ad_conv
  );

  assign dac_clr_n = 1'b1;
  assign amp_shdn  = 1'b0;

  // ---------------- counting ----------------
  logic                  smp_valid, peak_found, peak_reject, sec_tick, update;
  logic [MV_BITS-1:0]    smp_mv, peak_mv, max_peak;
  logic [COUNT_BITS-1:0] cps, total;

  pulse_discriminator #(.LLD(LLD), .ULD(ULD)) u_disc (
    .clk, .rst, .valid_i (adc_valid), .code_i (adc_code),
    .sample_valid_o (smp_valid), .sample_mv_o (smp_mv),
    .peak_found_o (peak_found), .reject_o (peak_reject), .peak_mv_o (peak_mv)
  );

  prescaler #(.DIV(SEC_DIV)) u_timer (.clk, .rst, .tick_o (sec_tick));

  count_unit u_count (
    .clk, .rst, .peak_found_i (peak_found), .peak_mv_i (peak_mv), .sec_tick_i (sec_tick),
    .cps_o (cps), .total_o (total), .max_peak_o (max_peak), .update_o (update)
  );

  // ---------------- display ----------------
  logic [19:0] cps_bcd, total_bcd;
  logic [15:0] peak_bcd;
  char_t       text [LCD_CHARS];

  bin2bcd #(.W(COUNT_BITS), .DIGITS(5)) u_bcd_cps (
    .clk, .rst, .start_i (update), .bin_i (cps), .busy_o (), .done_o (), .bcd_o (cps_bcd)
  );
  bin2bcd #(.W(COUNT_BITS), .DIGITS(5)) u_bcd_total (
    .clk, .rst, .start_i (update), .bin_i (total), .busy_o (), .done_o (), .bcd_o (total_bcd)
  );
  bin2bcd #(.W(MV_BITS), .DIGITS(4)) u_bcd_peak (
    .clk, .rst, .start_i (update), .bin_i (max_peak), .busy_o (), .done_o (), .bcd_o (peak_bcd)
  );

  display_formatter u_fmt (
    .cps_bcd_i (cps_bcd), .total_bcd_i (total_bcd), .peak_bcd_i (peak_bcd), .text_o (text)
  );

  lcd_driver #(.CLK_FREQ(CLK_FREQ)) u_lcd (
    .clk, .rst, .text_i (text), .lcd_e, .lcd_rs, .lcd_rw, .lcd_d, .refresh_o ()
  );

endmodule
