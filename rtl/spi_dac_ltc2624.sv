// spi_dac_ltc2624: writes one 12-bit code to the LTC2624 quad DAC over SPI.
//
// On start_i, DAC_CS goes low and a 32-bit word is shifted out MSB first:
//   [31:24] don't care (0), [23:20] command 0011 "write to and update DAC n",
//   [19:16] DAC address, [15:4] 12-bit code, [3:0] don't care (0).
// The DAC takes MOSI on rising SCK edges. After the 32nd bit DAC_CS returns high;
// that rising edge starts the conversion in the DAC. done_o pulses in the cycle
// DAC_CS rises. A write takes 2*HALF*32 + 2 cycles (194 at the default).
// The 32-bit frame, CS low during the transfer and conversion on the CS rising edge
// follow the source design; the command and address fields and the SCK rate
// (50 MHz / 6 = 8.3 MHz) come from the part's data sheet and are this design's choice.
module spi_dac_ltc2624
  import ncs_pkg::*;
#(
  parameter int unsigned HALF = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start_i,
  input  logic [3:0]          addr_i,
  input  logic [DAC_BITS-1:0] code_i,
  output logic                busy_o,
  output logic                done_o,
  output logic                dac_cs_n,
  output logic                sck_o,
  output logic                mosi_o
);

  localparam logic [3:0] CMD_WRITE_UPDATE = 4'b0011;

  logic        sh_busy, sh_done;

  spi_shifter #(.NBITS(32), .HALF(HALF)) u_shift (
    .clk, .rst,
    .start_i (start_i & ~busy_o),
    .tx_i    ({8'h00, CMD_WRITE_UPDATE, addr_i, code_i, 4'h0}),
    .rx_o    (),
    .busy_o  (sh_busy),
    .done_o  (sh_done),
    .sck_o,
    .mosi_o,
    .miso_i  (1'b0)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_cs_n <= 1'b1;
      done_o   <= 1'b0;
    end else begin
      done_o <= sh_done;
      if (start_i && !busy_o) dac_cs_n <= 1'b0;
      else if (sh_done)       dac_cs_n <= 1'b1;
    end
  end

  assign busy_o = sh_busy | ~dac_cs_n;

endmodule
