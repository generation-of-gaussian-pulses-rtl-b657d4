// tb_spi_amp_ltc6912: programs random gain pairs into the amplifier model and checks
// the received word, the AMP_CS framing (8 SCK edges) and the write time of
// 2*HALF*8 + 2 cycles.
module tb_spi_amp_ltc6912;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic [3:0] ga = '0, gb = '0;
  logic busy, done, cs_n, sck, mosi;
  logic [7:0] word;
  int nbits, writes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_amp_ltc6912 dut (
    .clk, .rst, .start_i (start), .gain_a_i (ga), .gain_b_i (gb),
    .busy_o (busy), .done_o (done), .amp_cs_n (cs_n), .sck_o (sck), .mosi_o (mosi)
  );

  // amplifier input register
  initial begin nbits = 0; writes = 0; word = '0; end
  always @(negedge cs_n) nbits = 0;
  always @(posedge sck) if (!cs_n) begin word = {word[6:0], mosi}; nbits++; end
  always @(posedge cs_n) if (nbits != 0) writes++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    logic [3:0] ea, eb;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20; n++) begin
      ea = 4'($urandom); eb = 4'($urandom);
      @(posedge clk);
      ga <= ea; gb <= eb; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      check("write cycles", cyc, 2 * 5 * 8 + 2);
      @(posedge clk);
      check("bits in frame", nbits, 8);
      check("gain word", int'(word), int'({eb, ea}));
      check("writes", writes, n + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
