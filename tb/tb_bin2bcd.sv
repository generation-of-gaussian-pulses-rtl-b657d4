// tb_bin2bcd: converts corner values and random 16-bit values (5 digits) and random
// 12-bit values (4 digits) and compares with digits taken by division by ten; checks
// the conversion time of W + 1 cycles.
module tb_bin2bcd;
  logic clk = 1'b0, rst = 1'b1;
  logic s16 = 1'b0, s12 = 1'b0;
  logic [15:0] b16 = '0;
  logic [11:0] b12 = '0;
  logic busy16, done16, busy12, done12;
  logic [19:0] bcd16;
  logic [15:0] bcd12;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bin2bcd #(.W(16), .DIGITS(5)) dut16 (.clk, .rst, .start_i (s16), .bin_i (b16), .busy_o (busy16), .done_o (done16), .bcd_o (bcd16));
  bin2bcd #(.W(12), .DIGITS(4)) dut12 (.clk, .rst, .start_i (s12), .bin_i (b12), .busy_o (busy12), .done_o (done12), .bcd_o (bcd12));

  function automatic logic [19:0] ref_bcd(int v, int digits);
    logic [19:0] r = '0;
    for (int d = 0; d < digits; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic conv16(int v);
    int cyc = 0;
    @(posedge clk) begin b16 <= 16'(v); s16 <= 1'b1; end
    @(posedge clk) s16 <= 1'b0;
    while (!done16) begin @(posedge clk); cyc++; end
    checks += 2;
    if (cyc != 16 + 1) begin failures++; $display("FAIL 16-bit cycles %0d", cyc); end
    if (bcd16 != ref_bcd(v, 5)) begin failures++; $display("FAIL %0d -> %h", v, bcd16); end
  endtask

  task automatic conv12(int v);
    int cyc = 0;
    @(posedge clk) begin b12 <= 12'(v); s12 <= 1'b1; end
    @(posedge clk) s12 <= 1'b0;
    while (!done12) begin @(posedge clk); cyc++; end
    checks += 2;
    if (cyc != 12 + 1) begin failures++; $display("FAIL 12-bit cycles %0d", cyc); end
    if (bcd12 != 16'(ref_bcd(v, 4))) begin failures++; $display("FAIL %0d -> %h", v, bcd12); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    conv16(0); conv16(65535); conv16(1947); conv16(9999); conv16(10000); conv16(59999);
    conv12(0); conv12(4095); conv12(1200); conv12(999);
    repeat (500) conv16(int'($urandom_range(0, 65535)));
    repeat (500) conv12(int'($urandom_range(0, 4095)));
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
