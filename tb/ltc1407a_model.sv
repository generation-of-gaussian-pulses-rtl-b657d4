// ltc1407a_model: behavioural model of the analog input path for simulation: the
// LTC6912-1 programmable preamplifier followed by the LTC1407A-1 14-bit ADC.
// Not synthesizable.
// The amplifier takes an 8-bit gain word on MOSI (rising SCK) while AMP_CS is low
// and applies it when AMP_CS rises; only gain code 0001 (gain -1) is modelled, any
// other code makes the converted value 0. On the rising edge of AD_CONV the model
// samples vin_uv (microvolts) and forms
//   code = clamp(-(vin - 1.65 V) / 1.25 V * 8192, -8192, 8191)
// (rounded toward zero), then drives the 34-bit frame {2 idle, ch0, 2 idle, ch1,
// 2 idle} on MISO, first bit at once, the following ones after each falling SCK
// edge. Channel 1 returns ch1_code.
module ltc1407a_model (
  input  logic sck,
  input  logic mosi,
  input  logic amp_cs_n,
  input  logic ad_conv,
  input  int   vin_uv,
  input  logic [13:0] ch1_code,
  output logic miso,
  output logic [7:0] gain_word,
  output int   gain_writes,
  output int   conversions,
  output logic signed [13:0] last_code
);
  logic [33:0] frame;
  logic [7:0]  amp_sh;
  int          amp_bits;

  initial begin
    miso        = 1'b0;
    gain_word   = 8'h00;
    gain_writes = 0;
    conversions = 0;
    last_code   = '0;
    amp_bits    = 0;
    frame       = '0;
  end

  always @(negedge amp_cs_n) amp_bits = 0;
  always @(posedge sck) if (!amp_cs_n) begin
    amp_sh = {amp_sh[6:0], mosi};
    amp_bits++;
  end
  always @(posedge amp_cs_n) if (amp_bits == 8) begin
    gain_word = amp_sh;
    gain_writes++;
  end

  function automatic logic signed [13:0] convert(int v);
    longint c;
    if (gain_word[3:0] != 4'b0001) return '0;
    c = -((longint'(v) - 1_650_000) * 8192) / 1_250_000;
    if (c > 8191)  c = 8191;
    if (c < -8192) c = -8192;
    return 14'(c);
  endfunction

  always @(posedge ad_conv) begin
    last_code = convert(vin_uv);
    frame     = {2'b00, last_code, 2'b00, ch1_code, 2'b00};
    miso      = frame[33];
    conversions++;
  end

  always @(negedge sck) if (amp_cs_n) begin
    frame = frame << 1;
    miso  = frame[33];
  end
endmodule
