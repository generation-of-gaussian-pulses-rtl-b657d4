// tb_spi_dac_ltc2624: writes random codes to the DAC controller and checks, with the
// DAC model, the 32-bit frame (command, address, code), that DAC_CS frames exactly 32
// SCK edges, the SCK rate and the write time of 2*HALF*32 + 2 cycles.
module tb_spi_dac_ltc2624;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic [3:0]  addr = 4'd0;
  logic [11:0] code = '0;
  logic busy, done, cs_n, sck, mosi;
  int vout_uv, writes, bad_frames;
  logic [31:0] last_word;
  int checks = 0, failures = 0;
  int t0, sck_high, max_high;

  always #5 clk = ~clk;

  spi_dac_ltc2624 dut (
    .clk, .rst, .start_i (start), .addr_i (addr), .code_i (code),
    .busy_o (busy), .done_o (done), .dac_cs_n (cs_n), .sck_o (sck), .mosi_o (mosi)
  );

  ltc2624_model dac (.sck, .mosi, .cs_n, .clr_n (1'b1), .vout_uv, .writes, .bad_frames, .last_word);

  // SCK high time in clock cycles
  always @(posedge clk) begin
    if (sck) sck_high++;
    else begin
      if (sck_high > max_high) max_high = sck_high;
      sck_high = 0;
    end
    if (!cs_n == 1'b0 && sck) begin
      failures++;
      $display("FAIL SCK high while DAC_CS is high");
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    sck_high = 0; max_high = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk);
      code  <= 12'($urandom);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      code  <= 12'($urandom);   // must be captured at start
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      check("write cycles", cyc, 2 * 3 * 32 + 2);
      @(posedge clk);
      check("writes", writes, n + 1);
      check("command", last_word[23:20], 4'b0011);
      check("address", last_word[19:16], 0);
      check("don't-care bits", {last_word[31:24], last_word[3:0]}, 0);
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    check("bad frames", bad_frames, 0);
    check("SCK high time", max_high, 3);
    // one known code: 1489 -> 1.2 V
    @(posedge clk); code <= 12'd1489; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check("code field", last_word[15:4], 1489);
    check("DAC output uV", vout_uv, (1489 * 3300000) / 4096);
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
