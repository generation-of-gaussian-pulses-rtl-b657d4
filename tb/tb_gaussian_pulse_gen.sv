// tb_gaussian_pulse_gen: steps the generator through several pulse periods at
// different periods and amplitudes and compares every sample with the Gaussian
// computed here, exp(-(i-16)^2 / (2 * (32/6)^2)) scaled to the amplitude. Also checks
// the period (pulse_start spacing), that a period change waits for the end of the
// current pulse period, and the baseline between pulses.
module tb_gaussian_pulse_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic step = 1'b0;
  logic [7:0]  period;
  logic [11:0] amp;
  logic [11:0] code;
  logic        pstart;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gaussian_pulse_gen dut (
    .clk, .rst, .step_i (step), .period_i (period), .amp_i (amp),
    .code_o (code), .pulse_start_o (pstart)
  );

  function automatic int expected(int i, int a);
    real sigma, x;
    int g;
    if (i >= 32) return 0;
    sigma = 32.0 / 6.0;
    x = real'(i - 16);
    g = int'($floor(1024.0 * $exp(-(x * x) / (2.0 * sigma * sigma)) + 0.5));
    return (g * a) / 1024;
  endfunction

  task automatic run(int per, int a, int nper);
    int last_start, s;
    period = 8'(per);
    amp    = 12'(a);
    last_start = -1;
    for (s = 0; s < per * nper; s++) begin
      @(posedge clk) step <= 1'b1;
      @(posedge clk) step <= 1'b0;
      @(negedge clk);
      checks++;
      if (int'(code) != expected(s % per, a)) begin
        failures++;
        if (failures < 10) $display("FAIL per %0d amp %0d sample %0d: got %0d exp %0d", per, a, s, code, expected(s % per, a));
      end
      checks++;
      if (pstart != ((s % per) == 0)) begin
        failures++;
        $display("FAIL pulse_start at sample %0d", s);
      end
      // idle cycles between steps must not move the generator
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  initial begin
    period = 8'd50;
    amp    = 12'd1489;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(50, 1489, 3);
    checks++;
    if (int'(code) != 0) begin failures++; $display("FAIL baseline"); end
    run(220, 4095, 2);
    run(64, 1067, 2);
    run(33, 1986, 3);
    run(100, 0, 1);
    // peak value equals the amplitude
    run(40, 2000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
