// prescaler: the counting-time timer. Divides the 50 MHz clock down to one tick per
// second.
//
// A counter runs from 0 to DIV-1 and tick_o is high for the one cycle in which it
// wraps, so ticks are exactly DIV cycles apart; the first tick comes DIV cycles after
// reset. The counting unit uses the tick to latch and clear its per-second counter.
// The one-second interval from the 50 MHz clock follows the source design.
module prescaler
  import ncs_pkg::*;
#(
  parameter int unsigned DIV = CLK_HZ
) (
  input  logic clk,
  input  logic rst,
  output logic tick_o
);

  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      tick_o <= 1'b0;
    end else if (cnt == ($bits(cnt))'(DIV - 1)) begin
      cnt    <= '0;
      tick_o <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      tick_o <= 1'b0;
    end
  end

endmodule
