// pulse_settings: the pulse period and amplitude that the rotary switch adjusts.
//
// A press of the switch toggles which setting the knob changes. In frequency mode a
// step up shortens the period by PERIOD_STEP samples (higher pulse rate) and a step
// down lengthens it, within PERIOD_MIN..PERIOD_MAX. In amplitude mode a step up or
// down changes the peak DAC code by AMP_STEP, within 0..AMP_MAX. Values clamp at the
// limits. At 100 k samples/s the default period range of 50..220 samples gives pulse
// rates from 2 kHz down to 454.5 Hz, the range the source design quotes.
//
// Interface: step_i/dir_up_i/press_i come from rotary_decoder; period_o (samples per
// pulse) and amp_o (peak DAC code) go to gaussian_pulse_gen. Outputs are registered
// and change one cycle after the event.
// The source gives only that one rotary switch controls both amplitude and
// frequency; the mode toggle, step sizes and start values are this design's choice.
module pulse_settings
  import ncs_pkg::*;
#(
  parameter int unsigned PERIOD_BITS    = 8,
  parameter int unsigned PERIOD_MIN     = 50,
  parameter int unsigned PERIOD_MAX     = 220,
  parameter int unsigned PERIOD_STEP    = 1,
  parameter int unsigned PERIOD_DEFAULT = 50,
  parameter int unsigned AMP_MAX        = (1 << DAC_BITS) - 1,
  parameter int unsigned AMP_STEP       = 16,
  parameter int unsigned AMP_DEFAULT    = 1489          // about 1.2 V on a 3.3 V reference
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   step_i,
  input  logic                   dir_up_i,
  input  logic                   press_i,
  output rot_mode_e              mode_o,
  output logic [PERIOD_BITS-1:0] period_o,
  output logic [DAC_BITS-1:0]    amp_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      mode_o   <= MODE_FREQ;
      period_o <= PERIOD_BITS'(PERIOD_DEFAULT);
      amp_o    <= DAC_BITS'(AMP_DEFAULT);
    end else begin
      if (press_i)
        mode_o <= (mode_o == MODE_FREQ) ? MODE_AMP : MODE_FREQ;
      if (step_i) begin
        if (mode_o == MODE_FREQ) begin
          if (dir_up_i)
            period_o <= (int'(period_o) >= int'(PERIOD_MIN + PERIOD_STEP))
                        ? period_o - PERIOD_BITS'(PERIOD_STEP) : PERIOD_BITS'(PERIOD_MIN);
          else
            period_o <= (int'(period_o) + int'(PERIOD_STEP) <= int'(PERIOD_MAX))
                        ? period_o + PERIOD_BITS'(PERIOD_STEP) : PERIOD_BITS'(PERIOD_MAX);
        end else begin
          if (dir_up_i)
            amp_o <= (int'(amp_o) + int'(AMP_STEP) <= int'(AMP_MAX))
                     ? amp_o + DAC_BITS'(AMP_STEP) : DAC_BITS'(AMP_MAX);
          else
            amp_o <= (int'(amp_o) >= int'(AMP_STEP)) ? amp_o - DAC_BITS'(AMP_STEP) : '0;
        end
      end
    end
  end

endmodule
