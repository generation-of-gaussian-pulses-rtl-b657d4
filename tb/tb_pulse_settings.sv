// tb_pulse_settings: random knob steps and presses against a reference model of the
// two settings, including the clamps at both ends of each range.
module tb_pulse_settings;
  import ncs_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic step = 1'b0, dir_up = 1'b0, press = 1'b0;
  rot_mode_e  mode;
  logic [7:0] period;
  logic [11:0] amp;
  int checks = 0, failures = 0;
  int exp_period, exp_amp, clamps = 0;
  bit exp_amp_mode;

  always #5 clk = ~clk;

  pulse_settings dut (
    .clk, .rst, .step_i (step), .dir_up_i (dir_up), .press_i (press),
    .mode_o (mode), .period_o (period), .amp_o (amp)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    exp_period = 50; exp_amp = 1489; exp_amp_mode = 0;
    @(posedge clk);
    checks++;
    if (period != 8'd50 || amp != 12'd1489 || mode != MODE_FREQ) begin
      failures++; $display("FAIL reset values %0d %0d", period, amp);
    end
    for (int n = 0; n < 4000; n++) begin
      // bias the direction in long runs so the clamps are reached
      automatic bit up = ((n / 400) % 2 == 0) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      automatic bit pr = ($urandom_range(0, 99) == 0);
      step   <= 1'b1;
      dir_up <= up;
      press  <= pr;
      @(posedge clk);
      step  <= 1'b0;
      press <= 1'b0;
      if (!exp_amp_mode) begin
        if (up) begin if (exp_period > 50) exp_period--; else clamps++; end
        else    begin if (exp_period < 220) exp_period++; else clamps++; end
      end else begin
        if (up) begin exp_amp = (exp_amp + 16 > 4095) ? 4095 : exp_amp + 16; if (exp_amp == 4095) clamps++; end
        else    begin exp_amp = (exp_amp < 16) ? 0 : exp_amp - 16; if (exp_amp == 0) clamps++; end
      end
      if (pr) exp_amp_mode = !exp_amp_mode;
      @(posedge clk);
      checks++;
      if (int'(period) != exp_period || int'(amp) != exp_amp || (mode == MODE_AMP) != exp_amp_mode) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: period %0d/%0d amp %0d/%0d", n, period, exp_period, amp, exp_amp);
      end
    end
    checks++;
    if (clamps == 0) begin failures++; $display("FAIL no clamp reached"); end
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
