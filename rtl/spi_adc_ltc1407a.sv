// spi_adc_ltc1407a: one conversion of the LTC1407A-1 two-channel 14-bit ADC.
//
// On start_i the controller raises AD_CONV for CONV_CLKS cycles; its rising edge
// samples both analog inputs. It then clocks 34 SCK cycles and reads SPI_MISO on the
// rising edges. The ADC drives, per frame: 2 idle bits, channel 0 (14 bits, two's
// complement, MSB first), 2 idle bits, channel 1 (14 bits), 2 idle bits.
// ch0_o and ch1_o hold the last results and done_o pulses for one cycle when they
// are updated. A conversion takes CONV_CLKS + 2*HALF*34 + 3 cycles from start_i to done_o
// (209 at the defaults). MOSI is held low during the transfer.
// The 14-bit result and the FPGA-controlled conversion follow the source design;
// the frame layout and the AD_CONV pulse come from the part's data sheet and are this
// design's choice.
module spi_adc_ltc1407a
  import ncs_pkg::*;
#(
  parameter int unsigned HALF      = 3,
  parameter int unsigned CONV_CLKS = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start_i,
  output logic                       busy_o,
  output logic                       done_o,
  output logic signed [ADC_BITS-1:0] ch0_o,
  output logic signed [ADC_BITS-1:0] ch1_o,
  output logic                       ad_conv,
  output logic                       sck_o,
  output logic                       mosi_o,
  input  logic                       miso_i
);

  localparam int unsigned FRAME_BITS = 34;

  logic                              sh_start, sh_busy, sh_done;
  logic [FRAME_BITS-1:0]             sh_rx;
  logic [$clog2(CONV_CLKS+1)-1:0]    conv_cnt;
  logic                              pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      ad_conv  <= 1'b0;
      conv_cnt <= '0;
      pending  <= 1'b0;
      sh_start <= 1'b0;
      done_o   <= 1'b0;
      ch0_o    <= '0;
      ch1_o    <= '0;
    end else begin
      sh_start <= 1'b0;
      done_o   <= 1'b0;
      if (start_i && !busy_o) begin
        ad_conv  <= 1'b1;
        conv_cnt <= '0;
        pending  <= 1'b1;
      end else if (ad_conv) begin
        if (conv_cnt == ($bits(conv_cnt))'(CONV_CLKS - 1)) begin
          ad_conv  <= 1'b0;
          sh_start <= 1'b1;
        end else begin
          conv_cnt <= conv_cnt + 1'b1;
        end
      end
      if (sh_done) begin
        ch0_o   <= sh_rx[31:18];
        ch1_o   <= sh_rx[15:2];
        done_o  <= 1'b1;
        pending <= 1'b0;
      end
    end
  end

  spi_shifter #(.NBITS(FRAME_BITS), .HALF(HALF)) u_shift (
    .clk, .rst,
    .start_i (sh_start),
    .tx_i    ('0),
    .rx_o    (sh_rx),
    .busy_o  (sh_busy),
    .done_o  (sh_done),
    .sck_o,
    .mosi_o,
    .miso_i
  );

  assign busy_o = pending | sh_busy;

endmodule
