// tb_table2_rates: the pulse-rate sweep of the measurement table, on the modelled
// board (DAC looped back to the ADC). For each of the nine measured rates, 1947 Hz
// down to 1102 Hz, the knob sets the nearest period the generator can make,
// round(100000 / f) samples, and the counting system must report that rate. To keep
// the run short the counting interval is 0.1 s (SEC_DIV = 5,000,000), so the counts
// of one interval times 10 are compared with 100000 / period (one count of slack for
// the phase of the interval, i.e. 10 counts per second).
module tb_table2_rates;
  import ncs_pkg::*;
  localparam int SEC = 5_000_000;
  localparam int RATES [9] = '{1947, 1816, 1679, 1584, 1521, 1425, 1369, 1221, 1102};
  logic clk = 1'b0, rst = 1'b1;
  logic rot_a = 1'b0, rot_b = 1'b0;
  logic sck, mosi, miso, dac_cs_n, dac_clr_n, amp_cs_n, amp_shdn, ad_conv;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  int vout_uv, writes, bad_frames, gain_writes, conversions;
  logic [31:0] last_word;
  logic [7:0]  gain_word;
  logic signed [13:0] last_code;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  nuclear_counting_system #(.SEC_DIV(SEC)) dut (
    .clk, .rst, .rot_a, .rot_b, .rot_center (1'b0),
    .spi_sck (sck), .spi_mosi (mosi), .spi_miso (miso),
    .dac_cs_n, .dac_clr_n, .amp_cs_n, .amp_shdn, .ad_conv,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d
  );

  ltc2624_model dac (.sck, .mosi, .cs_n (dac_cs_n), .clr_n (dac_clr_n), .vout_uv, .writes, .bad_frames, .last_word);
  ltc1407a_model adc (.sck, .mosi, .amp_cs_n, .ad_conv, .vin_uv (vout_uv), .ch1_code (14'd0), .miso,
                      .gain_word, .gain_writes, .conversions, .last_code);

  task automatic detent_down();
    rot_b = 1'b1; repeat (20) @(posedge clk);
    rot_a = 1'b1; repeat (20) @(posedge clk);
    rot_b = 1'b0; repeat (20) @(posedge clk);
    rot_a = 1'b0; repeat (20) @(posedge clk);
  endtask

  initial begin
    int per, cps_hz, exp_hz;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    for (int r = 0; r < 9; r++) begin
      per = (100000 + RATES[r] / 2) / RATES[r];
      while (int'(dut.period) < per) detent_down();
      @(posedge clk iff dut.update);      // settle
      @(posedge clk iff dut.update);
      cps_hz = 10 * int'(dut.cps);
      exp_hz = 100000 / per;
      $display("measured %0d Hz: period %0d -> generated %0d Hz, counted %0d per s, peak %0d mV",
               RATES[r], per, exp_hz, cps_hz, dut.max_peak);
      checks++;
      if (cps_hz < exp_hz - 10 || cps_hz > exp_hz + 10) begin
        failures++;
        $display("FAIL rate %0d", RATES[r]);
      end
      checks++;
      if ((cps_hz - RATES[r]) > 50 || (RATES[r] - cps_hz) > 50) begin
        failures++;
        $display("FAIL %0d Hz not within 50 Hz of the measured rate", cps_hz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2500ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
