// tb_ncs_full_size: the whole system with every parameter at its default (50 MHz
// clock, 1 s counting interval, 100 k samples/s, 15 ms LCD power-up) on the modelled
// board: DAC output looped back to the preamplifier/ADC, LCD model on the display
// pins. It runs two full counting seconds at the reset setting (2 kHz pulses of
// 1.2 V) and checks that the counts per second are 2000, that the peak is the DAC's
// 1.2 V, that the total after two seconds is about 4000, and that the LCD shows
// "CPS=02000" and the peak.
module tb_ncs_full_size;
  logic clk = 1'b0, rst = 1'b1;
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

  always #10 clk = ~clk;   // 50 MHz

  nuclear_counting_system dut (
    .clk, .rst, .rot_a (1'b0), .rot_b (1'b0), .rot_center (1'b0),
    .spi_sck (sck), .spi_mosi (mosi), .spi_miso (miso),
    .dac_cs_n, .dac_clr_n, .amp_cs_n, .amp_shdn, .ad_conv,
    .lcd_e, .lcd_rs, .lcd_rw, .lcd_d
  );

  ltc2624_model dac (.sck, .mosi, .cs_n (dac_cs_n), .clr_n (dac_clr_n), .vout_uv, .writes, .bad_frames, .last_word);
  ltc1407a_model adc (.sck, .mosi, .amp_cs_n, .ad_conv, .vin_uv (vout_uv), .ch1_code (14'd0), .miso,
                      .gain_word, .gain_writes, .conversions, .last_code);
  hd44780_model lcd (.e (lcd_e), .rs (lcd_rs), .rw (lcd_rw), .d (lcd_d), .line1, .line2, .screens,
                     .timing_errors, .bytes_seen, .four_bit, .display_on);

  task automatic check(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  function automatic string shown(int line);
    string s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(line == 1 ? line1[i] : line2[i])};
    return s;
  endfunction

  initial begin
    int s0, w2;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk iff dut.update);
    $display("second 1: CPS %0d, peak %0d mV", dut.cps, dut.max_peak);
    check("CPS in first second", int'(dut.cps), 1999, 2000);
    @(posedge clk iff dut.update);
    $display("second 2: CPS %0d, peak %0d mV, total %0d", dut.cps, dut.max_peak, dut.total);
    check("CPS in second second", int'(dut.cps), 2000, 2000);
    check("peak mV", int'(dut.max_peak), 1197, 1200);
    check("total", int'(dut.total), 3999, 4001);
    w2 = writes;
    s0 = screens;
    wait (screens >= s0 + 2);
    $display("LCD: [%s] [%s]", shown(1), shown(2));
    checks++;
    if (shown(1) != "CPS=02000       ") begin failures++; $display("FAIL LCD line 1"); end
    checks++;
    if (shown(2).substr(8, 15) != $sformatf("P=%04dmV", dut.max_peak)) begin failures++; $display("FAIL LCD line 2"); end
    check("LCD timing errors", timing_errors, 0, 0);
    check("bad DAC frames", bad_frames, 0, 0);
    check("DAC writes in 2 s", w2, 199_990, 200_010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
