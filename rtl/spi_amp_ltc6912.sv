// spi_amp_ltc6912: programs the gain of the LTC6912-1 dual preamplifier over SPI.
//
// On start_i, AMP_CS goes low and the 8-bit gain word {gain B, gain A} is shifted out
// MSB first; AMP_CS rises after the 8th bit, which loads the new gain into the
// amplifier. done_o pulses in the cycle AMP_CS rises. A write takes 2*HALF*8 + 2
// cycles. The gain code 0001 selects a gain of -1, which maps the ADC input range of
// 0.4 V to 2.9 V onto the full 14-bit scale.
// That the FPGA programs the amplifier over the shared SPI bus with an active-low
// AMP_CS follows the source design; the word format is the part's, and the gain
// setting and the slower SCK (50 MHz / 10 = 5 MHz) are this design's choice.
module spi_amp_ltc6912
  import ncs_pkg::*;
#(
  parameter int unsigned HALF = 5
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start_i,
  input  logic [3:0] gain_a_i,
  input  logic [3:0] gain_b_i,
  output logic       busy_o,
  output logic       done_o,
  output logic       amp_cs_n,
  output logic       sck_o,
  output logic       mosi_o
);

  logic sh_busy, sh_done;

  spi_shifter #(.NBITS(8), .HALF(HALF)) u_shift (
    .clk, .rst,
    .start_i (start_i & ~busy_o),
    .tx_i    ({gain_b_i, gain_a_i}),
    .rx_o    (),
    .busy_o  (sh_busy),
    .done_o  (sh_done),
    .sck_o,
    .mosi_o,
    .miso_i  (1'b0)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      amp_cs_n <= 1'b1;
      done_o   <= 1'b0;
    end else begin
      done_o <= sh_done;
      if (start_i && !busy_o) amp_cs_n <= 1'b0;
      else if (sh_done)       amp_cs_n <= 1'b1;
    end
  end

  assign busy_o = sh_busy | ~amp_cs_n;

endmodule
