// tb_prescaler: checks that ticks are single cycles exactly DIV cycles apart, the
// first one DIV cycles after reset, for a reduced DIV of 1000.
module tb_prescaler;
  localparam int DIV = 1000;
  logic clk = 1'b0, rst = 1'b1;
  logic tick;
  int checks = 0, failures = 0;
  int cycle = 0, last = 0, ticks = 0;

  always #5 clk = ~clk;

  prescaler #(.DIV(DIV)) dut (.clk, .rst, .tick_o (tick));

  always @(posedge clk) begin
    if (rst) cycle <= 0;
    else begin
      cycle <= cycle + 1;
      if (tick) begin
        checks++;
        if (cycle - last != DIV) begin
          failures++;
          $display("FAIL tick spacing %0d", cycle - last);
        end
        last  <= cycle;
        ticks <= ticks + 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    repeat (10 * DIV + 10) @(posedge clk);
    checks++;
    if (ticks != 10) begin failures++; $display("FAIL %0d ticks", ticks); end
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
