// bin2bcd: binary to BCD conversion by shift-and-add-3 (double dabble).
//
// On start_i the W-bit binary value is loaded. In each of the next W cycles every BCD
// digit of 5 or more gets 3 added, then digits and binary shift left together by one
// bit. After W cycles bcd_o holds DIGITS decimal digits, least significant in bits
// [3:0], and done_o pulses for one cycle; bcd_o keeps its value until the next
// conversion ends. DIGITS must cover 2^W - 1. start_i is ignored while busy_o is high.
// The source design names a binary-to-BCD stage in front of the LCD; this serial
// implementation is this design's choice.
module bin2bcd #(
  parameter int unsigned W      = 16,
  parameter int unsigned DIGITS = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_i,
  input  logic [W-1:0]          bin_i,
  output logic                  busy_o,
  output logic                  done_o,
  output logic [4*DIGITS-1:0]   bcd_o
);

  logic [W-1:0]           bin_sh;
  logic [4*DIGITS-1:0]    acc, adj;
  logic [$clog2(W+1)-1:0] cnt;

  always_comb begin
    for (int d = 0; d < DIGITS; d++) begin
      if (acc[4*d +: 4] >= 4'd5)
        adj[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      else
        adj[4*d +: 4] = acc[4*d +: 4];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bin_sh <= '0;
      acc    <= '0;
      cnt    <= '0;
      busy_o <= 1'b0;
      done_o <= 1'b0;
      bcd_o  <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          bin_sh <= bin_i;
          acc    <= '0;
          cnt    <= '0;
          busy_o <= 1'b1;
        end
      end else begin
        acc    <= {adj[4*DIGITS-2:0], bin_sh[W-1]};
        bin_sh <= bin_sh << 1;
        cnt    <= cnt + 1'b1;
        if (cnt == ($bits(cnt))'(W - 1)) begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
          bcd_o  <= {adj[4*DIGITS-2:0], bin_sh[W-1]};
        end
      end
    end
  end

endmodule
