// hd44780_model: behavioural model of a 2x16 character LCD with an HD44780-type
// controller on a 4-bit bus, write only. Not synthesizable.
// It latches RS and D[3:0] on the falling edge of E. The first four nibbles are the
// 8-bit-mode power-up sequence (only the high nibble is wired); after that nibbles
// pair into bytes, high nibble first. Commands 0x01 (clear), 0x28, 0x06, 0x0C and
// 0x80|address are understood; data bytes go to the display RAM at the address
// counter, which then increments (line 1 at 0x00-0x0F, line 2 at 0x40-0x4F).
// It checks the controller's timing against the data sheet minimums: 15 ms after
// power-up, 4.1 ms / 100 us / 40 us / 40 us after the init nibbles, 1 us between the
// two nibbles of a byte, 40 us after a byte, 1.64 ms after a clear, E high for at
// least 230 ns and RS/D stable while E is high. Violations count in timing_errors.
// screens counts writes to the last character of line 2.
module hd44780_model (
  input  logic       e,
  input  logic       rs,
  input  logic       rw,
  input  logic [3:0] d,
  output byte        line1 [16],
  output byte        line2 [16],
  output int         screens,
  output int         timing_errors,
  output int         bytes_seen,
  output logic       four_bit,
  output logic       display_on
);
  int      nibbles;
  logic    have_high;
  logic [3:0] high;
  logic    high_rs;
  logic [6:0] addr;
  realtime t_rise, t_ready;
  logic    rs_at_rise;
  logic [3:0] d_at_rise;
  logic    rose;      // a real E pulse started (not the power-on value)

  initial begin
    nibbles = 0; have_high = 0; high = 0; high_rs = 0; addr = 0;
    screens = 0; timing_errors = 0; bytes_seen = 0; four_bit = 0; display_on = 0;
    t_ready = 15_000_000.0;       // 15 ms power-up
    t_rise = 0;
    rose = 1'b0;
    for (int i = 0; i < 16; i++) begin line1[i] = " "; line2[i] = " "; end
  end

  task automatic err(string what);
    timing_errors++;
    if (timing_errors < 10) $display("LCD timing: %s at %0t", what, $realtime);
  endtask

  always @(posedge e) if ($realtime > 0) begin
    rose   = 1'b1;
    t_rise = $realtime;
    rs_at_rise = rs;
    d_at_rise = d;
    if ($realtime < t_ready) err("E too soon after previous access");
  end

  always @(rs or d) if (e && rose) err("RS/D changed while E high");

  always @(negedge e) if (rose) begin
    logic [7:0] b;
    rose = 1'b0;
    if ($realtime - t_rise < 230.0) err("E pulse too short");
    if (rw) err("read cycle");
    if (rs != rs_at_rise || d != d_at_rise) err("RS/D not stable");
    nibbles++;
    if (nibbles <= 4) begin
      // 8-bit mode init nibbles
      unique case (nibbles)
        1: t_ready = $realtime + 4_100_000.0;
        2: t_ready = $realtime + 100_000.0;
        default: t_ready = $realtime + 40_000.0;
      endcase
      if (nibbles == 4) four_bit = (d == 4'h2);
    end else if (!have_high) begin
      have_high = 1'b1;
      high      = d;
      high_rs   = rs;
      t_ready   = $realtime + 1_000.0;
    end else begin
      have_high = 1'b0;
      if (rs != high_rs) err("RS changed within a byte");
      b = {high, d};
      bytes_seen++;
      t_ready = $realtime + 40_000.0;
      if (!rs) begin
        if (b == 8'h01) begin
          for (int i = 0; i < 16; i++) begin line1[i] = " "; line2[i] = " "; end
          addr = 0;
          t_ready = $realtime + 1_640_000.0;
        end else if (b[7]) begin
          addr = b[6:0];
        end else if (b[7:3] == 5'b00001) begin
          display_on = b[2];
        end
      end else begin
        if (addr < 7'h10) line1[addr[3:0]] = b;
        else if (addr >= 7'h40 && addr < 7'h50) line2[addr[3:0]] = b;
        if (addr == 7'h4F) screens++;
        addr = addr + 1'b1;
      end
    end
  end
endmodule
