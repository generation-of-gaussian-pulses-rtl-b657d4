// gaussian_pulse_gen: digital samples of a periodic Gaussian pulse.
//
// Each pulse period is period_i samples long. The first SHAPE_LEN samples carry a
// Gaussian centred on sample SHAPE_LEN/2 with a standard deviation of SHAPE_LEN/6
// samples; the rest of the period sits at code 0. The shape is a table of
// SHAPE_LEN entries with peak 2^FRAC_BITS, computed at elaboration as
//   g[i] = round(2^FRAC_BITS * exp(-0.5 * ((i - SHAPE_LEN/2) / (SHAPE_LEN/6))^2)),
// and each sample is (g[i] * amp_i) >> FRAC_BITS, so the centre sample equals amp_i.
//
// Interface: step_i advances one sample (the SPI sequencer pulses it once per sample
// period); code_o holds the DAC code of the current sample from the cycle after
// step_i. pulse_start_o marks the cycle in which code_o became the first sample of a
// pulse. A new period_i takes effect at the end of the pulse period in progress;
// period_i must be at least SHAPE_LEN.
// The source gives only that Gaussian pulses are generated and that their amplitude
// and rate are adjustable; the table length, width and baseline are this design's.
module gaussian_pulse_gen
  import ncs_pkg::*;
#(
  parameter int unsigned SHAPE_LEN   = 32,
  parameter int unsigned FRAC_BITS   = 10,
  parameter int unsigned PERIOD_BITS = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   step_i,
  input  logic [PERIOD_BITS-1:0] period_i,
  input  logic [DAC_BITS-1:0]    amp_i,
  output logic [DAC_BITS-1:0]    code_o,
  output logic                   pulse_start_o
);

  typedef logic [FRAC_BITS:0] shape_t [SHAPE_LEN];

  function automatic shape_t make_shape();
    shape_t s;
    real x, sigma;
    sigma = real'(SHAPE_LEN) / 6.0;
    for (int i = 0; i < SHAPE_LEN; i++) begin
      x    = (real'(i) - real'(SHAPE_LEN / 2)) / sigma;
      s[i] = (FRAC_BITS+1)'(int'($floor(real'(1 << FRAC_BITS) * $exp(-0.5 * x * x) + 0.5)));
    end
    return s;
  endfunction

  localparam shape_t SHAPE = make_shape();

  logic [PERIOD_BITS-1:0]         phase;
  logic [FRAC_BITS+DAC_BITS:0]    product;

  always_comb begin
    if (int'(phase) < int'(SHAPE_LEN))
      product = SHAPE[phase[$clog2(SHAPE_LEN)-1:0]] * amp_i;
    else
      product = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase         <= '0;
      code_o        <= '0;
      pulse_start_o <= 1'b0;
    end else begin
      pulse_start_o <= 1'b0;
      if (step_i) begin
        code_o        <= DAC_BITS'(product >> FRAC_BITS);
        pulse_start_o <= (phase == '0);
        if (phase >= period_i - 1'b1)
          phase <= '0;
        else
          phase <= phase + 1'b1;
      end
    end
  end

endmodule
