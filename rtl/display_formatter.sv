// display_formatter: lays out the counting results as the two 16-character LCD lines.
//
//   line 1:  "CPS=ddddd       "   counts in the last second
//   line 2:  "T=ddddd P=ddddmV"   total counts, largest peak of the last second in mV
//
// The digits come in as BCD (least significant digit in bits [3:0]) and are turned
// into ASCII by adding '0'. text_o[0..15] is line 1 left to right, text_o[16..31]
// line 2. Purely combinational.
// Showing counts per second, total counts and the maximum peak value on the LCD
// follows the source design; the layout is this design's choice.
module display_formatter
  import ncs_pkg::*;
(
  input  logic [19:0] cps_bcd_i,
  input  logic [19:0] total_bcd_i,
  input  logic [15:0] peak_bcd_i,
  output char_t       text_o [LCD_CHARS]
);

  function automatic char_t digit(logic [3:0] d);
    return char_t'("0") + char_t'(d);
  endfunction

  always_comb begin
    for (int i = 0; i < LCD_CHARS; i++) text_o[i] = char_t'(" ");
    // line 1
    text_o[0] = "C"; text_o[1] = "P"; text_o[2] = "S"; text_o[3] = "=";
    for (int i = 0; i < 5; i++) text_o[4 + i] = digit(cps_bcd_i[4*(4-i) +: 4]);
    // line 2
    text_o[16] = "T"; text_o[17] = "=";
    for (int i = 0; i < 5; i++) text_o[18 + i] = digit(total_bcd_i[4*(4-i) +: 4]);
    text_o[24] = "P"; text_o[25] = "=";
    for (int i = 0; i < 4; i++) text_o[26 + i] = digit(peak_bcd_i[4*(3-i) +: 4]);
    text_o[30] = "m"; text_o[31] = "V";
  end

endmodule
