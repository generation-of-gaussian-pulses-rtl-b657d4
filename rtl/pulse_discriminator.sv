// pulse_discriminator: single-channel window discriminator on the ADC samples.
//
// Each ADC code is first turned back into the input voltage in millivolts,
//   mv = 1650 - (code * 1250) >>> 13,
// the inverse of the ADC transfer function with the preamplifier gain of -1. A pulse
// begins when a sample rises above LLD_MV and ends with the first sample at or below
// LLD_MV; the largest sample in between is the pulse's peak. If the peak is also
// below ULD_MV the pulse is inside the window: peak_found_o pulses for one cycle with
// peak_mv_o holding the peak. A pulse whose peak reaches ULD_MV gives reject_o
// instead; a pulse that never rises above LLD_MV gives nothing.
// Timing: sample_mv_o follows valid_i by one cycle; peak_found_o / reject_o come two
// cycles after the valid_i of the sample that ends the pulse.
// The window (counting a pulse whose value lies above LLD and below ULD, with
// LLD = 0.86 V and ULD = 1.6 V) follows the source design; judging the window on the
// pulse peak, and the strict comparisons, are this design's reading of it.
module pulse_discriminator
  import ncs_pkg::*;
#(
  parameter int unsigned LLD = LLD_MV,
  parameter int unsigned ULD = ULD_MV
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       valid_i,
  input  logic signed [ADC_BITS-1:0] code_i,
  output logic                       sample_valid_o,
  output logic [MV_BITS-1:0]         sample_mv_o,
  output logic                       peak_found_o,
  output logic                       reject_o,
  output logic [MV_BITS-1:0]         peak_mv_o
);

  logic signed [ADC_BITS+11:0] scaled;
  logic signed [12:0]          offset_mv;   // within +/-1250
  logic                        in_pulse;
  logic [MV_BITS-1:0]          run_max;

  assign scaled    = (ADC_BITS+12)'(code_i) * (ADC_BITS+12)'(ADC_SPAN_MV);
  assign offset_mv = 13'(scaled >>> 13);

  // Stage 1: code to millivolts.
  always_ff @(posedge clk) begin
    if (rst) begin
      sample_valid_o <= 1'b0;
      sample_mv_o    <= '0;
    end else begin
      sample_valid_o <= valid_i;
      if (valid_i)
        sample_mv_o <= MV_BITS'(ADC_MID_MV - int'(offset_mv));
    end
  end

  // Stage 2: pulse tracking and window test.
  always_ff @(posedge clk) begin
    if (rst) begin
      in_pulse     <= 1'b0;
      run_max      <= '0;
      peak_found_o <= 1'b0;
      reject_o     <= 1'b0;
      peak_mv_o    <= '0;
    end else begin
      peak_found_o <= 1'b0;
      reject_o     <= 1'b0;
      if (sample_valid_o) begin
        if (int'(sample_mv_o) > int'(LLD)) begin
          if (!in_pulse || sample_mv_o > run_max)
            run_max <= sample_mv_o;
          in_pulse <= 1'b1;
        end else if (in_pulse) begin
          in_pulse <= 1'b0;
          if (int'(run_max) < int'(ULD)) begin
            peak_found_o <= 1'b1;
            peak_mv_o    <= run_max;
          end else begin
            reject_o <= 1'b1;
          end
        end
      end
    end
  end

endmodule
