// spi_shifter: one SPI transfer of NBITS bits, mode 0, most significant bit first.
//
// SCK idles low. After start_i the first bit is placed on MOSI, SCK rises HALF clocks
// later and MISO is sampled in that cycle, SCK falls HALF clocks after that and the
// next bit is placed on MOSI. After the NBITS-th falling edge done_o pulses for one
// cycle and rx_o holds the NBITS bits read, first bit in the most significant place.
// One transfer takes 2*HALF*NBITS + 1 cycles from start_i to done_o.
// Chip selects are the job of the device controllers around this shifter; start_i is
// ignored while busy_o is high.
module spi_shifter #(
  parameter int unsigned NBITS = 32,
  parameter int unsigned HALF  = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_i,
  input  logic [NBITS-1:0] tx_i,
  output logic [NBITS-1:0] rx_o,
  output logic             busy_o,
  output logic             done_o,
  output logic             sck_o,
  output logic             mosi_o,
  input  logic             miso_i
);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;
  state_e                          state;
  logic [NBITS-1:0]                shreg;
  logic [$clog2(NBITS)-1:0]        bit_cnt;
  logic [$clog2(HALF+1)-1:0]       half_cnt;

  assign busy_o = (state != S_IDLE);
  assign mosi_o = busy_o & shreg[NBITS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      shreg    <= '0;
      rx_o     <= '0;
      bit_cnt  <= '0;
      half_cnt <= '0;
      sck_o    <= 1'b0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sck_o <= 1'b0;
          if (start_i) begin
            shreg    <= tx_i;
            bit_cnt  <= '0;
            half_cnt <= '0;
            state    <= S_LOW;
          end
        end
        S_LOW: begin
          if (half_cnt == ($bits(half_cnt))'(HALF - 1)) begin
            half_cnt <= '0;
            sck_o    <= 1'b1;
            rx_o     <= {rx_o[NBITS-2:0], miso_i};
            state    <= S_HIGH;
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_HIGH: begin
          if (half_cnt == ($bits(half_cnt))'(HALF - 1)) begin
            half_cnt <= '0;
            sck_o    <= 1'b0;
            shreg    <= shreg << 1;
            if (bit_cnt == ($bits(bit_cnt))'(NBITS - 1)) begin
              state  <= S_IDLE;
              done_o <= 1'b1;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
              state   <= S_LOW;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
