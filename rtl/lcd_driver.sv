// lcd_driver: drives an HD44780-compatible character LCD (2 lines of 16) through its
// 4-bit data interface and keeps it showing text_i.
//
// Every transfer is one nibble on lcd_d with lcd_rs set, a setup time, an lcd_e pulse
// of at least 240 ns, and then a wait. The driver steps through a fixed list:
//   power-up: wait 15 ms, nibble 3 (wait 4.1 ms), 3 (100 us), 3 (40 us), 2 (40 us),
//             which puts the controller into 4-bit mode;
//   set-up:   bytes 0x28 (4-bit, 2 lines), 0x06 (entry mode), 0x0C (display on),
//             0x01 (clear, wait 1.64 ms);
//   refresh:  0x80, 16 characters of line 1, 0xC0, 16 characters of line 2, then
//             the refresh again, for ever.
// A byte is sent as its high nibble, 1 us, low nibble, then 40 us. text_i is copied
// at the start of each refresh so one screen never mixes two updates. At 50 MHz a
// refresh takes about 1.4 ms. lcd_rw stays low: the driver only writes.
// The source design only says that the results are shown on the board's character
// LCD through an LCD driver; the interface mode, command list and timing follow the
// HD44780 controller and are this design's choice.
module lcd_driver
  import ncs_pkg::*;
#(
  parameter int unsigned CLK_FREQ = CLK_HZ
) (
  input  logic       clk,
  input  logic       rst,
  input  char_t      text_i [LCD_CHARS],
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [3:0] lcd_d,
  output logic       refresh_o     // pulses when a full screen has been written
);

  localparam int unsigned CLK_PER_US = (CLK_FREQ + 999_999) / 1_000_000;
  localparam int unsigned T_POWERUP  = 15_000 * CLK_PER_US;
  localparam int unsigned T_4100US   = 4_100 * CLK_PER_US;
  localparam int unsigned T_1640US   = 1_640 * CLK_PER_US;
  localparam int unsigned T_100US    = 100 * CLK_PER_US;
  localparam int unsigned T_40US     = 40 * CLK_PER_US;
  localparam int unsigned T_1US      = CLK_PER_US;
  localparam int unsigned T_SETUP    = (CLK_FREQ / 1_000_000 * 40 + 999) / 1000 + 1;
  localparam int unsigned T_E        = (CLK_FREQ / 1_000_000 * 240 + 999) / 1000 + 1;

  localparam int unsigned N_INIT     = 4;             // single nibbles
  localparam int unsigned N_CFG      = 8;             // 4 bytes
  localparam int unsigned REFRESH0   = N_INIT + N_CFG;
  localparam int unsigned N_REFRESH  = 2 * (2 + LCD_CHARS);
  localparam int unsigned LAST       = REFRESH0 + N_REFRESH - 1;

  localparam int unsigned WAIT_W     = $clog2(T_POWERUP + 1);

  typedef enum logic [1:0] {W_SETUP, W_EHIGH, W_HOLD, W_WAIT} wstate_e;
  wstate_e            wstate;
  logic [6:0]         idx;
  logic [WAIT_W-1:0]  cnt;
  char_t              shown [LCD_CHARS];
  logic               started;   // power-up wait is over

  // What the current list entry sends.
  logic               item_rs;
  logic [3:0]         item_nib;
  logic [WAIT_W-1:0]  item_wait;

  always_comb begin
    char_t      byte_v;
    logic       upper;
    int unsigned k, b;
    byte_v    = 8'h00;
    item_rs   = 1'b0;
    upper     = 1'b1;
    k         = 0;
    b         = 0;
    item_nib  = 4'h0;
    item_wait = WAIT_W'(T_40US);
    if (int'(idx) < int'(N_INIT)) begin
      item_nib = (int'(idx) == int'(N_INIT) - 1) ? 4'h2 : 4'h3;
      unique case (idx[1:0])
        2'd0:    item_wait = WAIT_W'(T_4100US);
        2'd1:    item_wait = WAIT_W'(T_100US);
        default: item_wait = WAIT_W'(T_40US);
      endcase
    end else begin
      if (int'(idx) < int'(REFRESH0)) begin
        k = int'(idx) - N_INIT;
        unique case (k / 2)
          0:       byte_v = 8'h28;
          1:       byte_v = 8'h06;
          2:       byte_v = 8'h0C;
          default: byte_v = 8'h01;
        endcase
      end else begin
        k = int'(idx) - REFRESH0;
        b = k / 2;
        if (b == 0)                      byte_v = 8'h80;
        else if (b <= LCD_COLS)          begin byte_v = shown[b - 1]; item_rs = 1'b1; end
        else if (b == LCD_COLS + 1)      byte_v = 8'hC0;
        else                             begin byte_v = shown[b - 2]; item_rs = 1'b1; end
      end
      upper     = (k % 2) == 0;
      item_nib  = upper ? byte_v[7:4] : byte_v[3:0];
      if (upper)                 item_wait = WAIT_W'(T_1US);
      else if (byte_v == 8'h01 && !item_rs) item_wait = WAIT_W'(T_1640US);
      else                       item_wait = WAIT_W'(T_40US);
    end
  end

  assign lcd_rw = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      wstate    <= W_WAIT;
      idx       <= '0;
      cnt       <= WAIT_W'(T_POWERUP - 1);
      lcd_e     <= 1'b0;
      lcd_rs    <= 1'b0;
      lcd_d     <= 4'h0;
      refresh_o <= 1'b0;
      started   <= 1'b0;
      for (int i = 0; i < LCD_CHARS; i++) shown[i] <= char_t'(" ");
    end else begin
      refresh_o <= 1'b0;
      unique case (wstate)
        W_SETUP: begin
          lcd_rs <= item_rs;
          lcd_d  <= item_nib;
          if (cnt == '0) begin
            lcd_e  <= 1'b1;
            cnt    <= WAIT_W'(T_E - 1);
            wstate <= W_EHIGH;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        W_EHIGH: begin
          if (cnt == '0) begin
            lcd_e  <= 1'b0;
            wstate <= W_HOLD;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        W_HOLD: begin
          cnt    <= item_wait - 1'b1;
          wstate <= W_WAIT;
        end
        W_WAIT: begin
          if (cnt == '0) begin
            cnt     <= WAIT_W'(T_SETUP - 1);
            wstate  <= W_SETUP;
            started <= 1'b1;
            if (started) begin
              // move to the next entry; copy the text when a refresh starts
              if (idx == 7'(LAST) || idx == 7'(REFRESH0 - 1)) begin
                idx       <= 7'(REFRESH0);
                shown     <= text_i;
                refresh_o <= (idx == 7'(LAST));
              end else begin
                idx <= idx + 1'b1;
              end
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: wstate <= W_WAIT;
      endcase
    end
  end

endmodule
