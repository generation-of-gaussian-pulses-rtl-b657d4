// count_unit: the two 16-bit pulse counters and the peak register.
//
// Every peak_found_i adds one to both counters. The per-second counter is copied to
// cps_o and cleared on each sec_tick_i (a pulse arriving in the tick cycle is counted
// in the closing second), so cps_o holds the counts of the last full second. The
// total counter runs from reset and wraps after 2^COUNT_W - 1. The largest peak_mv_i
// seen during the second is copied to max_peak_o with cps_o. update_o pulses one
// cycle after the tick, when the new cps_o and max_peak_o are valid.
// Two 16-bit counters, one counting over one second into a register and one keeping
// the total, follow the source design; the wrap of the total counter and the
// per-second peak are this design's choice.
module count_unit
  import ncs_pkg::*;
#(
  parameter int unsigned COUNT_W = COUNT_BITS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               peak_found_i,
  input  logic [MV_BITS-1:0] peak_mv_i,
  input  logic               sec_tick_i,
  output logic [COUNT_W-1:0] cps_o,
  output logic [COUNT_W-1:0] total_o,
  output logic [MV_BITS-1:0] max_peak_o,
  output logic               update_o
);

  logic [COUNT_W-1:0] sec_cnt;
  logic [MV_BITS-1:0] run_max, next_max;

  assign next_max = (peak_found_i && peak_mv_i > run_max) ? peak_mv_i : run_max;

  always_ff @(posedge clk) begin
    if (rst) begin
      sec_cnt    <= '0;
      total_o    <= '0;
      cps_o      <= '0;
      run_max    <= '0;
      max_peak_o <= '0;
      update_o   <= 1'b0;
    end else begin
      update_o <= sec_tick_i;
      if (peak_found_i)
        total_o <= total_o + 1'b1;
      if (sec_tick_i) begin
        cps_o      <= sec_cnt + COUNT_W'(peak_found_i);
        max_peak_o <= next_max;
        sec_cnt    <= '0;
        run_max    <= '0;
      end else begin
        if (peak_found_i)
          sec_cnt <= sec_cnt + 1'b1;
        run_max <= next_max;
      end
    end
  end

endmodule
