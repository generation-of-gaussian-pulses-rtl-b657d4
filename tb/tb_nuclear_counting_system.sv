// tb_nuclear_counting_system: the whole system on a modelled board. The DAC model's
// output is wired to the preamplifier/ADC model's input, as the pulse generator's
// output is wired back to the analog input on the board, and an LCD model reads the
// display. The counting interval is shortened to 20 ms (SEC_DIV = 1,000,000 cycles)
// and the push-button debounce to 100 cycles; everything else is at its default.
//
// The test turns the knob through these phases and checks, per counting interval,
// the count against 20 ms times the generated pulse rate (100 k samples/s divided by
// the period) and the peak against the DAC voltage:
//   A  default 2 kHz, 1.2 V pulses: all counted, LCD shows the numbers
//   B  knob down 50 detents: 1 kHz, all counted
//   C  press (amplitude mode), knob up 32 detents: 1.61 V peaks, all above ULD
//   D  knob down 62 detents: 0.81 V peaks, all below LLD
//   E  knob up 20 detents: 1.07 V peaks, counted again; press back to frequency mode
//   F  knob up 100 detents: clamps at the 2 kHz limit
// It counts how often each mechanism happened (window hit, ULD reject, pulse below
// LLD, frequency step, amplitude step, mode switch, interval latch, LCD refresh,
// rate clamp) and fails for any that never did.
module tb_nuclear_counting_system;
  import ncs_pkg::*;
  localparam int SEC = 1_000_000;
  logic clk = 1'b0, rst = 1'b1;
  logic rot_a = 1'b0, rot_b = 1'b0, rot_center = 1'b0;
  logic sck, mosi, miso, dac_cs_n, dac_clr_n, amp_cs_n, amp_shdn, ad_conv;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_d;
  int vout_uv, writes, bad_frames, gain_writes, conversions;
  logic [31:0] last_word;
  logic [7:0]  gain_word;
  logic signed [13:0] last_code;
  byte line1 [16], line2 [16];
  int screens, timing_errors, bytes_seen;
  logic four_bit, display_on;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_hit = 0, n_reject = 0, n_below = 0, n_freq = 0, n_amp = 0, n_mode = 0;
  int n_latch = 0, n_clamp = 0, n_pulses = 0;

  always #10 clk = ~clk;   // 50 MHz

  nuclear_counting_system #(.SEC_DIV(SEC), .DEBOUNCE_CLKS(100)) dut (
    .clk, .rst, .rot_a, .rot_b, .rot_center,
    .spi_sck (sck), .spi_mosi (mosi), .spi_miso (miso),
    .dac_cs_n, .dac_clr_n, .amp_cs_n, .amp_shdn, .ad_conv,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d
  );

  ltc2624_model dac (.sck, .mosi, .cs_n (dac_cs_n), .clr_n (dac_clr_n), .vout_uv, .writes, .bad_frames, .last_word);
  ltc1407a_model adc (.sck, .mosi, .amp_cs_n, .ad_conv, .vin_uv (vout_uv), .ch1_code (14'd0), .miso,
                      .gain_word, .gain_writes, .conversions, .last_code);
  hd44780_model lcd (.e (lcd_e), .rs (lcd_rs), .rw (lcd_rw), .d (lcd_d), .line1, .line2, .screens,
                     .timing_errors, .bytes_seen, .four_bit, .display_on);

  // watch the design's internal events
  logic [7:0]  prev_period;
  logic [11:0] prev_amp;
  int pulses_in_interval, hits_in_interval, rejects_in_interval;
  always @(posedge clk) if (!rst) begin
    if (dut.peak_found)  begin n_hit++; hits_in_interval++; end
    if (dut.peak_reject) begin n_reject++; rejects_in_interval++; end
    if (dut.pulse_start) begin n_pulses++; pulses_in_interval++; end
    if (dut.period != prev_period) n_freq++;
    if (dut.amp != prev_amp) n_amp++;
    if (dut.rot_press) n_mode++;
    if (dut.rot_step && dut.mode == MODE_FREQ && dut.rot_up && dut.period == 8'd50) n_clamp++;
    prev_period <= dut.period;
    prev_amp    <= dut.amp;
  end

  task automatic check(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  task automatic detent(bit up);
    if (up) rot_a = 1'b1; else rot_b = 1'b1;
    repeat (20) @(posedge clk);
    rot_a = 1'b1; rot_b = 1'b1;
    repeat (20) @(posedge clk);
    if (up) rot_a = 1'b0; else rot_b = 1'b0;
    repeat (20) @(posedge clk);
    rot_a = 1'b0; rot_b = 1'b0;
    repeat (20) @(posedge clk);
  endtask

  task automatic press();
    rot_center = 1'b1;
    repeat (300) @(posedge clk);
    rot_center = 1'b0;
    repeat (300) @(posedge clk);
  endtask

  // Wait for the next interval latch; skip one to let a setting change settle.
  task automatic next_interval();
    @(posedge clk iff dut.update);
    n_latch++;
  endtask

  // Check one full interval at a steady setting.
  task automatic check_interval(string phase, int period, int amp_code, int exp_in_window);
    int exp_pulses, peak_mv;
    next_interval();            // settling interval
    pulses_in_interval = 0; hits_in_interval = 0; rejects_in_interval = 0;
    next_interval();
    exp_pulses = SEC / (500 * period);
    peak_mv    = (amp_code * 3300) / 4096;
    check({phase, " pulses generated"}, pulses_in_interval, exp_pulses - 1, exp_pulses + 1);
    if (exp_in_window == 1) begin
      check({phase, " CPS"}, int'(dut.cps), exp_pulses - 1, exp_pulses + 1);
      check({phase, " max peak mV"}, int'(dut.max_peak), peak_mv - 3, peak_mv + 1);
    end else begin
      check({phase, " CPS"}, int'(dut.cps), 0, 0);
      if (exp_in_window == 2) check({phase, " rejects"}, rejects_in_interval, exp_pulses - 1, exp_pulses + 1);
      else                    check({phase, " rejects"}, rejects_in_interval, 0, 0);
    end
    $display("%s: period %0d, amp %0d -> %0d pulses, CPS %0d, peak %0d mV, rejects %0d",
             phase, dut.period, dut.amp, pulses_in_interval, dut.cps, dut.max_peak, rejects_in_interval);
  endtask

  function automatic string shown(int line);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(line == 1 ? line1[i] : line2[i])};
    return s;
  endfunction

  initial begin
    int s0, total_before;
    string exp1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;

    // A: defaults
    check_interval("A 2 kHz 1.2 V", 50, 1489, 1);
    s0 = screens;
    wait (screens >= s0 + 2);
    exp1 = $sformatf("CPS=%05d       ", dut.cps);
    checks++;
    if (shown(1) != exp1) begin failures++; $display("FAIL LCD line 1 '%s' expected '%s'", shown(1), exp1); end
    checks++;
    if (shown(2).substr(8, 15) != $sformatf("P=%04dmV", dut.max_peak)) begin
      failures++; $display("FAIL LCD line 2 '%s'", shown(2));
    end
    $display("LCD: [%s] [%s]", shown(1), shown(2));

    // B: slower
    repeat (50) detent(1'b0);
    check("period after 50 down", int'(dut.period), 100, 100);
    check_interval("B 1 kHz 1.2 V", 100, 1489, 1);

    // C: amplitude mode, above ULD
    press();
    check("mode", int'(dut.mode), 1, 1);
    repeat (32) detent(1'b1);
    check("amp after 32 up", int'(dut.amp), 2001, 2001);
    check_interval("C above ULD", 100, 2001, 2);

    // D: below LLD
    repeat (62) detent(1'b0);
    check("amp after 62 down", int'(dut.amp), 1009, 1009);
    check_interval("D below LLD", 100, 1009, 0);
    n_below = pulses_in_interval - hits_in_interval - rejects_in_interval;

    // E: back into the window, back to frequency mode
    repeat (20) detent(1'b1);
    press();
    check("mode", int'(dut.mode), 0, 0);
    check_interval("E 1 kHz 1.07 V", 100, 1329, 1);

    // F: faster than the limit
    repeat (100) detent(1'b1);
    check("period clamped", int'(dut.period), 50, 50);
    total_before = int'(dut.total);
    check_interval("F 2 kHz clamp", 50, 1329, 1);
    check("total grows", int'(dut.total) - total_before, 2 * (SEC / 25000) - 2, 2 * (SEC / 25000) + 2);

    // board-level checks
    check("gain programmed once", gain_writes, 1, 1);
    check("gain word", int'(gain_word), 8'h11, 8'h11);
    check("bad DAC frames", bad_frames, 0, 0);
    check("LCD timing errors", timing_errors, 0, 0);
    check("ADC reads = DAC writes", conversions - writes, -1, 0);

    // every mechanism happened
    check("window hits", n_hit > 0, 1, 1);
    check("ULD rejects", n_reject > 0, 1, 1);
    check("pulses below LLD", n_below > 0, 1, 1);
    check("frequency steps", n_freq > 0, 1, 1);
    check("amplitude steps", n_amp > 0, 1, 1);
    check("mode switches", n_mode, 2, 2);
    check("interval latches", n_latch > 0, 1, 1);
    check("LCD refreshes", screens > 0, 1, 1);
    check("rate clamp", n_clamp > 0, 1, 1);
    $display("mechanisms: hits %0d rejects %0d below %0d freq %0d amp %0d mode %0d latch %0d lcd %0d clamp %0d",
             n_hit, n_reject, n_below, n_freq, n_amp, n_mode, n_latch, screens, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
