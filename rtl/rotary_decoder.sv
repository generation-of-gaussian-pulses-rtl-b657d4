// rotary_decoder: turns the quadrature rotary switch and its push button into
// single-cycle events.
//
// The two contacts A and B are synchronised to the clock and passed through a
// contact-bounce filter: q1 is set when both contacts are closed (A=B=1) and cleared
// when both are open, q2 records which contact moved alone last. Bounce on a single
// contact toggles only between states that leave q1 unchanged, so each detent gives
// exactly one rising edge of q1. At that edge, q2 tells the direction: A leading B
// (q2=0) is a step up, B leading A (q2=1) a step down. The push button is
// synchronised and must be stable for DEBOUNCE_CLKS cycles before a press is seen.
//
// Interface: step_o pulses for one cycle per detent with dir_up_o valid in the same
// cycle; press_o pulses for one cycle when the button goes down.
// Timing: step_o comes 3 cycles after the contact that completes the detent changes.
// The source design only says that a rotary switch controls the pulse generator;
// this decoder and its polarity are this design's own.
module rotary_decoder #(
  parameter int unsigned DEBOUNCE_CLKS = 50_000   // 1 ms at 50 MHz
) (
  input  logic clk,
  input  logic rst,
  input  logic rot_a,
  input  logic rot_b,
  input  logic rot_center,
  output logic step_o,
  output logic dir_up_o,
  output logic press_o
);

  logic [1:0] a_sync, b_sync, c_sync;
  logic       q1, q2, q1_d;
  logic       btn_state;
  logic [$clog2(DEBOUNCE_CLKS+1)-1:0] btn_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_sync <= '0;
      b_sync <= '0;
      c_sync <= '0;
    end else begin
      a_sync <= {a_sync[0], rot_a};
      b_sync <= {b_sync[0], rot_b};
      c_sync <= {c_sync[0], rot_center};
    end
  end

  // Bounce filter.
  always_ff @(posedge clk) begin
    if (rst) begin
      q1   <= 1'b0;
      q2   <= 1'b0;
      q1_d <= 1'b0;
    end else begin
      unique case ({b_sync[1], a_sync[1]})
        2'b00: q1 <= 1'b0;
        2'b01: q2 <= 1'b0;   // A closed alone: A leads
        2'b10: q2 <= 1'b1;   // B closed alone: B leads
        2'b11: q1 <= 1'b1;
      endcase
      q1_d <= q1;
    end
  end

  assign step_o   = q1 & ~q1_d;
  assign dir_up_o = ~q2;

  // Push button debounce.
  always_ff @(posedge clk) begin
    if (rst) begin
      btn_state <= 1'b0;
      btn_cnt   <= '0;
      press_o   <= 1'b0;
    end else begin
      press_o <= 1'b0;
      if (c_sync[1] == btn_state) begin
        btn_cnt <= '0;
      end else if (btn_cnt == ($bits(btn_cnt))'(DEBOUNCE_CLKS - 1)) begin
        btn_cnt   <= '0;
        btn_state <= c_sync[1];
        press_o   <= c_sync[1];
      end else begin
        btn_cnt <= btn_cnt + 1'b1;
      end
    end
  end

endmodule
