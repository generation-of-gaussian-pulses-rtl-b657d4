// spi_sequencer: shares one SPI bus between the preamplifier, the DAC and the ADC.
//
// After reset the sequencer programs the preamplifier gain once. From then on a frame
// counter starts a sample period every FRAME_CLKS cycles (100 k samples/s at the
// default). In each period the sequencer
//   1. pulses gen_step_o so the pulse generator moves to its next sample,
//   2. writes that sample (dac_code_i, read the cycle after gen_step_o) to DAC A,
//   3. runs one ADC conversion and presents channel 0 on adc_code_o with
//      adc_valid_o high for one cycle.
// Only one device controller is active at a time and idle controllers drive SCK and
// MOSI low, so the bus lines are the OR of the three controllers' lines. The DAC
// write and the ADC read take about 410 cycles, which must fit in FRAME_CLKS; an
// assertion flags a frame that starts before the previous one ended.
// That one SPI bus (SCK, MOSI, MISO) links the FPGA to DAC, amplifier and ADC follows
// the source design; the order of transfers and the sample rate are this design's.
module spi_sequencer
  import ncs_pkg::*;
#(
  parameter int unsigned FRAME_CLKS = 500,
  parameter int unsigned SPI_HALF   = 3,
  parameter int unsigned AMP_HALF   = 5
) (
  input  logic                       clk,
  input  logic                       rst,
  // pulse generator side
  output logic                       gen_step_o,
  input  logic [DAC_BITS-1:0]        dac_code_i,
  // sampled signal
  output logic                       adc_valid_o,
  output logic signed [ADC_BITS-1:0] adc_code_o,
  output logic                       ready_o,
  // SPI bus and selects
  output logic                       spi_sck,
  output logic                       spi_mosi,
  input  logic                       spi_miso,
  output logic                       dac_cs_n,
  output logic                       amp_cs_n,
  output logic                       ad_conv
);

  typedef enum logic [2:0] {S_AMP, S_AMP_WAIT, S_IDLE, S_GEN, S_DAC_WAIT, S_ADC_WAIT} state_e;
  state_e state;

  logic [$clog2(FRAME_CLKS)-1:0] frame_cnt;
  logic frame_tick;

  logic amp_start, amp_busy, amp_done, amp_sck, amp_mosi;
  logic dac_start, dac_busy, dac_done, dac_sck, dac_mosi;
  logic adc_start, adc_busy, adc_done, adc_sck, adc_mosi;
  logic signed [ADC_BITS-1:0] adc_ch0;

  // Sample-rate counter, running once the amplifier is set up.
  always_ff @(posedge clk) begin
    if (rst || !ready_o) begin
      frame_cnt  <= '0;
      frame_tick <= 1'b0;
    end else if (frame_cnt == ($bits(frame_cnt))'(FRAME_CLKS - 1)) begin
      frame_cnt  <= '0;
      frame_tick <= 1'b1;
    end else begin
      frame_cnt  <= frame_cnt + 1'b1;
      frame_tick <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_AMP;
      ready_o <= 1'b0;
    end else begin
      unique case (state)
        S_AMP:      state <= S_AMP_WAIT;
        S_AMP_WAIT: if (amp_done) begin
                      state   <= S_IDLE;
                      ready_o <= 1'b1;
                    end
        S_IDLE:     if (frame_tick) state <= S_GEN;
        S_GEN:      state <= S_DAC_WAIT;
        S_DAC_WAIT: if (dac_done) state <= S_ADC_WAIT;
        S_ADC_WAIT: if (adc_done) state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  assign amp_start  = (state == S_AMP);
  assign gen_step_o = (state == S_IDLE) && frame_tick;
  assign dac_start  = (state == S_GEN);
  assign adc_start  = (state == S_DAC_WAIT) && dac_done;

  spi_amp_ltc6912 #(.HALF(AMP_HALF)) u_amp (
    .clk, .rst,
    .start_i  (amp_start),
    .gain_a_i (AMP_GAIN_CODE),
    .gain_b_i (AMP_GAIN_CODE),
    .busy_o   (amp_busy),
    .done_o   (amp_done),
    .amp_cs_n,
    .sck_o    (amp_sck),
    .mosi_o   (amp_mosi)
  );

  spi_dac_ltc2624 #(.HALF(SPI_HALF)) u_dac (
    .clk, .rst,
    .start_i  (dac_start),
    .addr_i   (4'b0000),
    .code_i   (dac_code_i),
    .busy_o   (dac_busy),
    .done_o   (dac_done),
    .dac_cs_n,
    .sck_o    (dac_sck),
    .mosi_o   (dac_mosi)
  );

  spi_adc_ltc1407a #(.HALF(SPI_HALF)) u_adc (
    .clk, .rst,
    .start_i  (adc_start),
    .busy_o   (adc_busy),
    .done_o   (adc_done),
    .ch0_o    (adc_ch0),
    .ch1_o    (),
    .ad_conv,
    .sck_o    (adc_sck),
    .mosi_o   (adc_mosi),
    .miso_i   (spi_miso)
  );

  assign spi_sck     = amp_sck | dac_sck | adc_sck;
  assign spi_mosi    = amp_mosi | dac_mosi | adc_mosi;
  assign adc_valid_o = adc_done;
  assign adc_code_o  = adc_ch0;

  // At most one device on the bus; a new frame only when the last one is over.
  always_ff @(posedge clk) begin
    if (!rst) begin
      a_one_device: assert (2'(amp_busy) + 2'(dac_busy) + 2'(adc_busy) <= 2'd1)
        else $error("two SPI devices active at once");
      a_no_overrun: assert (!frame_tick || state == S_IDLE)
        else $error("sample period too short for DAC write and ADC read");
    end
  end

endmodule
