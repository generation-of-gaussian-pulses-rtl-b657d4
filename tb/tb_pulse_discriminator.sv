// tb_pulse_discriminator: feeds Gaussian-shaped pulses of many peak heights, given in
// millivolts and turned into ADC codes here, and checks the millivolt samples, that
// pulses peaking inside (860 mV, 1600 mV) give peak_found with the right peak,
// pulses at or above 1600 mV give reject and pulses at or below 860 mV give nothing.
module tb_pulse_discriminator;
  logic clk = 1'b0, rst = 1'b1;
  logic valid = 1'b0;
  logic signed [13:0] code = '0;
  logic smp_valid, found, reject;
  logic [11:0] smp_mv, peak_mv;
  int checks = 0, failures = 0;
  int n_found = 0, n_reject = 0, got_peak;
  int exp_found = 0, exp_reject = 0, n_below = 0;

  always #5 clk = ~clk;

  pulse_discriminator dut (
    .clk, .rst, .valid_i (valid), .code_i (code),
    .sample_valid_o (smp_valid), .sample_mv_o (smp_mv),
    .peak_found_o (found), .reject_o (reject), .peak_mv_o (peak_mv)
  );

  function automatic int mv_to_code(int mv);
    longint c = ((1650 - longint'(mv)) * 8192) / 1250;
    if (c > 8191) c = 8191;
    if (c < -8192) c = -8192;
    return int'(c);
  endfunction

  // what the block should report back for a code: 1650 - floor(code * 1250 / 8192)
  function automatic int code_to_mv(int c);
    longint p = longint'(c) * 1250;
    longint q = (p >= 0) ? p / 8192 : -((-p + 8191) / 8192);
    return 1650 - int'(q);
  endfunction

  always @(posedge clk) begin
    if (found) begin n_found++; got_peak = int'(peak_mv); end
    if (reject) n_reject++;
  end

  int last_in;
  localparam int FIXED [6] = '{700, 861, 1200, 1599, 1600, 2500};
  always @(posedge clk) if (valid) last_in <= int'(code);
  always @(posedge clk) if (!rst && smp_valid) begin
    checks++;
    if (int'(smp_mv) != code_to_mv(last_in)) begin
      failures++;
      if (failures < 10) $display("FAIL mV of code %0d: got %0d", last_in, smp_mv);
    end
  end

  task automatic sample(int mv);
    @(posedge clk);
    valid <= 1'b1;
    code  <= 14'(mv_to_code(mv));
    @(posedge clk);
    valid <= 1'b0;
    repeat ($urandom_range(1, 4)) @(posedge clk);
  endtask

  // one pulse of the given peak on a 400 mV baseline; returns the largest sample mV
  task automatic pulse(int peak_mv_in, output int seen_max);
    int v;
    real x;
    seen_max = 0;
    for (int i = 0; i < 40; i++) begin
      x = real'(i - 16) / (32.0 / 6.0);
      v = (i < 32) ? 400 + int'(real'(peak_mv_in - 400) * $exp(-0.5 * x * x)) : 400;
      if (code_to_mv(mv_to_code(v)) > seen_max) seen_max = code_to_mv(mv_to_code(v));
      sample(v);
    end
  endtask

  initial begin
    int pk, seen, before_f, before_r;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) sample(400);
    for (int n = 0; n < 300; n++) begin
      pk = (n < 6) ? FIXED[n] : int'($urandom_range(500, 2600));
      before_f = n_found; before_r = n_reject;
      pulse(pk, seen);
      repeat (4) @(posedge clk);
      checks++;
      if (seen > 860 && seen < 1600) begin
        exp_found++;
        if (n_found != before_f + 1 || n_reject != before_r || got_peak != seen) begin
          failures++;
          $display("FAIL pulse %0d peak %0d mV: found %0d peak %0d", n, seen, n_found - before_f, got_peak);
        end
      end else if (seen >= 1600) begin
        exp_reject++;
        if (n_reject != before_r + 1 || n_found != before_f) begin
          failures++;
          $display("FAIL pulse %0d peak %0d mV not rejected", n, seen);
        end
      end else begin
        n_below++;
        if (n_reject != before_r || n_found != before_f) begin
          failures++;
          $display("FAIL pulse %0d peak %0d mV below LLD counted", n, seen);
        end
      end
    end
    checks++;
    if (exp_found == 0 || exp_reject == 0 || n_below == 0) begin
      failures++;
      $display("FAIL not every case occurred");
    end
    $display("in window %0d, above ULD %0d, below LLD %0d", exp_found, exp_reject, n_below);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
