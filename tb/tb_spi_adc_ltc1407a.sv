// tb_spi_adc_ltc1407a: runs conversions against the preamplifier/ADC model with
// random input voltages (including both clipping ends) and a random channel 1 code,
// and checks both results, the AD_CONV pulse, 34 SCK edges per frame and the
// conversion time of CONV_CLKS + 2*HALF*34 + 3 cycles.
module tb_spi_adc_ltc1407a;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic busy, done, ad_conv, sck, mosi, miso;
  logic signed [13:0] ch0, ch1;
  int vin_uv = 0;
  logic [13:0] ch1_code = '0;
  logic [7:0] gain_word;
  int gain_writes, conversions;
  logic signed [13:0] last_code;
  logic amp_cs_n = 1'b1;
  int checks = 0, failures = 0;
  int edges;

  always #5 clk = ~clk;

  spi_adc_ltc1407a dut (
    .clk, .rst, .start_i (start), .busy_o (busy), .done_o (done),
    .ch0_o (ch0), .ch1_o (ch1), .ad_conv, .sck_o (sck), .mosi_o (mosi), .miso_i (miso)
  );

  ltc1407a_model adc (
    .sck, .mosi, .amp_cs_n, .ad_conv, .vin_uv, .ch1_code, .miso,
    .gain_word, .gain_writes, .conversions, .last_code
  );

  always @(posedge sck) edges++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Set the amplifier gain to -1 directly through its SPI pins.
  task automatic program_gain();
    logic [7:0] w = 8'h11;
    amp_cs_n = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      force mosi = w[i];
      #20 force sck = 1'b1;
      #20 force sck = 1'b0;
    end
    #20 amp_cs_n = 1'b1;
    release sck;
    release mosi;
  endtask

  function automatic int expect_code(int v);
    longint c = -((longint'(v) - 1_650_000) * 8192) / 1_250_000;
    if (c > 8191) c = 8191;
    if (c < -8192) c = -8192;
    return int'(c);
  endfunction

  initial begin
    int cyc;
    edges = 0;
    program_gain();
    #1;
    check("gain word", int'(gain_word), 8'h11);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 30; n++) begin
      vin_uv   = (n == 0) ? 0 : (n == 1) ? 3_300_000 : int'($urandom_range(0, 3_300_000));
      ch1_code = 14'($urandom);
      edges = 0;
      @(posedge clk) start <= 1'b1;
      @(posedge clk) start <= 1'b0;
      #1;
      checks++;
      if (!ad_conv) begin failures++; $display("FAIL AD_CONV not raised"); end
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      check("conversion cycles", cyc, 2 + 2 * 3 * 34 + 3);
      check("SCK edges", edges, 34);
      check("channel 0", int'(ch0), expect_code(vin_uv));
      check("channel 1", int'(ch1), int'($signed(ch1_code)));
    end
    check("conversions", conversions, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
