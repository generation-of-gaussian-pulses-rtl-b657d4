// tb_lcd_driver: runs the LCD driver, at a reduced clock of 1 MHz so the power-up
// waits stay short in simulation, against the LCD controller model. Checks the
// interface timing, that the controller ends up in 4-bit mode with the display on,
// and that the screen shows the text, including text changed while running.
module tb_lcd_driver;
  import ncs_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  char_t text [LCD_CHARS];
  logic e, rs, rw, refresh;
  logic [3:0] d;
  byte line1 [16], line2 [16];
  int screens, timing_errors, bytes_seen, refreshes = 0;
  logic four_bit, display_on;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;     // 1 MHz

  lcd_driver #(.CLK_FREQ(1_000_000)) dut (
    .clk, .rst, .text_i (text), .lcd_e (e), .lcd_rs (rs), .lcd_rw (rw), .lcd_d (d), .refresh_o (refresh)
  );

  hd44780_model lcd (.e, .rs, .rw, .d, .line1, .line2, .screens, .timing_errors, .bytes_seen,
                     .four_bit, .display_on);

  always @(posedge clk) if (refresh) refreshes++;

  task automatic set_text(string a, string b);
    for (int i = 0; i < 16; i++) begin text[i] = char_t'(a[i]); text[16 + i] = char_t'(b[i]); end
  endtask

  task automatic check_screen(string a, string b);
    for (int i = 0; i < 16; i++) begin
      checks += 2;
      if (line1[i] != byte'(a[i])) begin failures++; $display("FAIL line 1 col %0d", i); end
      if (line2[i] != byte'(b[i])) begin failures++; $display("FAIL line 2 col %0d", i); end
    end
  endtask

  initial begin
    int s0;
    set_text("CPS=01947       ", "T=12345 P=1200mV");
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (screens == 2);
    checks += 2;
    if (!four_bit)   begin failures++; $display("FAIL not in 4-bit mode"); end
    if (!display_on) begin failures++; $display("FAIL display off"); end
    check_screen("CPS=01947       ", "T=12345 P=1200mV");
    set_text("CPS=00454       ", "T=65535 P=0860mV");
    s0 = screens;
    wait (screens == s0 + 2);
    check_screen("CPS=00454       ", "T=65535 P=0860mV");
    checks += 3;
    if (timing_errors != 0) begin failures++; $display("FAIL %0d timing errors", timing_errors); end
    if (refreshes < 3)      begin failures++; $display("FAIL refresh pulses %0d", refreshes); end
    // every refresh is 34 bytes, plus 4 set-up bytes
    if (bytes_seen != 4 + 34 * screens) begin failures++; $display("FAIL bytes %0d", bytes_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
