// tb_display_formatter: random BCD values in, the two text lines out, compared with
// strings built here with $sformatf.
module tb_display_formatter;
  import ncs_pkg::*;
  logic [19:0] cps_bcd, total_bcd;
  logic [15:0] peak_bcd;
  char_t text [LCD_CHARS];
  int checks = 0, failures = 0;

  display_formatter dut (.cps_bcd_i (cps_bcd), .total_bcd_i (total_bcd), .peak_bcd_i (peak_bcd), .text_o (text));

  function automatic logic [19:0] to_bcd(int v);
    logic [19:0] r = '0;
    for (int d = 0; d < 5; d++) begin r[4*d +: 4] = 4'(v % 10); v = v / 10; end
    return r;
  endfunction

  initial begin
    string l1, l2;
    int c, t, p;
    for (int n = 0; n < 200; n++) begin
      c = (n == 0) ? 1947 : int'($urandom_range(0, 65535));
      t = int'($urandom_range(0, 65535));
      p = (n == 0) ? 1200 : int'($urandom_range(0, 4095));
      cps_bcd = to_bcd(c); total_bcd = to_bcd(t); peak_bcd = 16'(to_bcd(p));
      #1;
      l1 = $sformatf("CPS=%05d       ", c);
      l2 = $sformatf("T=%05d P=%04dmV", t, p);
      for (int i = 0; i < 16; i++) begin
        checks += 2;
        if (text[i] != l1[i])      begin failures++; $display("FAIL line 1 col %0d: %s vs %s", i, string'(text[i]), l1); end
        if (text[16 + i] != l2[i]) begin failures++; $display("FAIL line 2 col %0d: %s vs %s", i, string'(text[16+i]), l2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
