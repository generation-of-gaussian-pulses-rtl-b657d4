// tb_spi_sequencer: the sequencer with the DAC model and the preamplifier/ADC model,
// the DAC output looped back to the ADC input as on the board. Checks the one-time
// gain setup, a sample period of exactly FRAME_CLKS cycles, that each DAC write
// carries the code presented after gen_step_o, and that the ADC result read back is
// the conversion of that DAC voltage.
module tb_spi_sequencer;
  logic clk = 1'b0, rst = 1'b1;
  logic gen_step, adc_valid, ready;
  logic [11:0] dac_code;
  logic signed [13:0] adc_code;
  logic sck, mosi, miso, dac_cs_n, amp_cs_n, ad_conv;
  int vout_uv, writes, bad_frames, gain_writes, conversions;
  logic [31:0] last_word;
  logic [7:0]  gain_word;
  logic signed [13:0] last_code;
  int checks = 0, failures = 0;
  int last_step, steps, valids;
  logic [11:0] sent;

  always #5 clk = ~clk;

  spi_sequencer dut (
    .clk, .rst, .gen_step_o (gen_step), .dac_code_i (dac_code),
    .adc_valid_o (adc_valid), .adc_code_o (adc_code), .ready_o (ready),
    .spi_sck (sck), .spi_mosi (mosi), .spi_miso (miso),
    .dac_cs_n, .amp_cs_n, .ad_conv
  );

  ltc2624_model dac (.sck, .mosi, .cs_n (dac_cs_n), .clr_n (1'b1), .vout_uv, .writes, .bad_frames, .last_word);
  ltc1407a_model adc (.sck, .mosi, .amp_cs_n, .ad_conv, .vin_uv (vout_uv), .ch1_code (14'd0), .miso,
                      .gain_word, .gain_writes, .conversions, .last_code);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expect_code(int v);
    longint c = -((longint'(v) - 1_650_000) * 8192) / 1_250_000;
    if (c > 8191) c = 8191;
    if (c < -8192) c = -8192;
    return int'(c);
  endfunction

  int cycle;
  always @(posedge clk) cycle++;

  // Stand-in for the pulse generator: a new random code after each step.
  always @(posedge clk) begin
    if (rst) dac_code <= '0;
    else if (gen_step) dac_code <= 12'($urandom);
  end

  always @(posedge clk) if (!rst) begin
    if (gen_step) begin
      if (steps > 0) check("sample period", cycle - last_step, 500);
      last_step = cycle;
      steps++;
      check("gain set before first sample", int'(gain_word), 8'h11);
    end
    if (adc_valid) begin
      valids++;
      check("DAC code sent", int'(last_word[15:4]), int'(sent));
      check("ADC result", int'(adc_code), expect_code(vout_uv));
      check("ADC result equals model", int'(adc_code), int'(last_code));
    end
  end
  always @(posedge clk) if (gen_step) #1 sent = dac_code;

  initial begin
    cycle = 0; steps = 0; valids = 0; last_step = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (steps == 60);
    repeat (600) @(posedge clk);
    check("gain writes", gain_writes, 1);
    check("DAC writes", writes, 60);
    check("bad DAC frames", bad_frames, 0);
    check("ADC reads", valids, 60);
    check("ADC conversions", conversions, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
