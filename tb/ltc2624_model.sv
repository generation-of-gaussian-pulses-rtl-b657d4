// ltc2624_model: behavioural model of the LTC2624 quad 12-bit DAC, channel A only,
// for simulation. Not synthesizable.
// It shifts MOSI in on rising SCK edges while CS is low. When CS rises after exactly
// 32 bits holding command 0011 (write and update) for address 0000, channel A's
// output becomes code * 3.3 V / 4096, given in microvolts on vout_uv. Any other frame
// that clocked any bits is counted in bad_frames.
module ltc2624_model (
  input  logic sck,
  input  logic mosi,
  input  logic cs_n,
  input  logic clr_n,
  output int   vout_uv,
  output int   writes,
  output int   bad_frames,
  output logic [31:0] last_word
);
  int nbits;
  logic framed;   // a real CS low phase started (not the power-on value)

  initial begin
    vout_uv    = 0;
    writes     = 0;
    bad_frames = 0;
    nbits      = 0;
    framed     = 1'b0;
    last_word  = '0;
  end

  always @(negedge cs_n) if ($realtime > 0) begin
    nbits  = 0;
    framed = 1'b1;
  end

  always @(posedge sck) begin
    if (!cs_n && framed) begin
      last_word = {last_word[30:0], mosi};
      nbits++;
    end
  end

  always @(posedge cs_n) if (framed) begin
    framed = 1'b0;
    if (nbits == 32 && last_word[23:20] == 4'b0011 && last_word[19:16] == 4'b0000) begin
      vout_uv = int'((longint'(last_word[15:4]) * 3_300_000) / 4096);
      writes++;
    end else if (nbits != 0) begin
      bad_frames++;
    end
  end

  always @(negedge clr_n) vout_uv = 0;
endmodule
