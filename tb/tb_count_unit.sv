// tb_count_unit: random peak_found pulses with random peaks and ticks every 997
// cycles, some in the same cycle as a pulse, against a reference model. Checks the
// counts per second, the running total (including its wrap at 16 bits, reached by
// preloading through a long burst), the per-second maximum peak and the update pulse.
module tb_count_unit;
  logic clk = 1'b0, rst = 1'b1;
  logic found = 1'b0, tick = 1'b0;
  logic [11:0] pk = '0;
  logic [15:0] cps, total;
  logic [11:0] maxpk;
  logic update;
  int checks = 0, failures = 0;
  int m_sec = 0, m_total = 0, m_max = 0, e_cps = 0, e_max = 0;
  int wraps = 0, coincident = 0;

  always #5 clk = ~clk;

  count_unit dut (
    .clk, .rst, .peak_found_i (found), .peak_mv_i (pk), .sec_tick_i (tick),
    .cps_o (cps), .total_o (total), .max_peak_o (maxpk), .update_o (update)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int rate;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 1; c <= 140_000; c++) begin
      // a dense burst in the middle drives the total past 65535
      rate = (c > 20_000 && c < 90_000) ? 95 : 30;
      found <= ($urandom_range(0, 99) < rate);
      pk    <= 12'($urandom);
      tick  <= (c % 997 == 0);
      @(posedge clk);
      // reference model, same cycle semantics
      if (found) begin
        m_total = (m_total + 1) % 65536;
        if (m_total == 0) wraps++;
        if (int'(pk) > m_max) m_max = int'(pk);
      end
      if (tick) begin
        if (found) coincident++;
        e_cps = m_sec + (found ? 1 : 0);
        e_max = m_max;
        m_sec = 0;
        m_max = 0;
      end else if (found) begin
        m_sec++;
      end
      #1;
      check("total", int'(total), m_total);
      if (update) begin
        check("cps", int'(cps), e_cps);
        check("max peak", int'(maxpk), e_max);
      end
      // update follows the clock edge that saw the tick
      check("update pulse", int'(update), int'(tick));
    end
    check("total wrapped", wraps > 0 ? 1 : 0, 1);
    check("tick with pulse", coincident > 0 ? 1 : 0, 1);
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
