// tmc: text message centre, top level.
//
// Messages typed on a PC keyboard are compressed and kept in an on-chip RAM;
// any stored message can later be called up and shown on a character LCD.
// Data path:
//   keyboard -> keypush (serial receive, F0 release decoding, ASCII)
//            -> compression (8-bit characters to 5-bit words, function keys)
//            -> msgcounter + tmc_ram (8 message slots in 1024 x 5 bits)
//            -> decompression (5-bit words back to ASCII, clear on new read)
//            -> lcd (tick divider + LCD controller) -> LCD pins
// Using the centre: type up to 50 characters (lower-case letters, digits,
// space, comma, period) and press Enter to store them as a message. Press
// Shift, or the Select button, then a digit 0..7 to show that message; the
// display is cleared first. Up to 8 messages are kept; there is no delete.
//
// Everything runs on one system clock. The keyboard lines and the Select
// button are synchronised inside; Select gives one read command per press
// (rising edge, no debouncing). Reset is synchronous and active high.
// The block split and the hand-shakes between blocks follow the report; the
// single clock domain, the reset and the status outputs are this design's.
module tmc #(
  parameter int unsigned KEY_HOLD    = 1024,    // keyboard valid pulse, clocks
  parameter int unsigned KEY_TIMEOUT = 25_000,  // PS/2 idle time-out, clocks
  parameter int unsigned MAX_CHARS   = 50,      // characters per message
  parameter int unsigned MSGS        = 8,       // message slots
  parameter int unsigned DEPTH       = 1024,    // RAM words
  parameter int unsigned LCD_DIV     = 1510,    // clocks per LCD tick
  parameter int unsigned LCD_COLS    = 16       // characters per LCD line
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,     // keyboard clock ("keyclock")
  input  logic       ps2_data,    // keyboard data ("Keyboard")
  input  logic       select_btn,  // push button: read command
  output logic [7:0] lcd_data,    // "dataout0..7"
  output logic       lcd_en,      // "dataoutvalid"
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [$clog2(MSGS):0] msg_count,
  output logic       full,        // all message slots used
  output logic [7:0] key_code,    // scancode of the last key stroke
  output logic       read_armed,  // read command waiting for its digit
  output logic       rd_miss,     // pulse: requested message not stored
  output logic       msg_shown    // pulse: a message has been displayed
);

  import tmc_pkg::*;

  localparam int unsigned MW = $clog2(MSGS);
  localparam int unsigned AW = $clog2(DEPTH);

  // keyboard
  ascii_t     key_ascii;
  logic       key_valid;

  // select button
  logic [2:0] sel_sync;
  logic       read_btn;

  // compression <-> msgcounter
  word_t         c_word;
  logic          c_valid, c_ready, end_msg, rd_req;
  logic [2:0]    rd_num;

  // msgcounter <-> RAM
  logic          ram_we;
  logic [AW-1:0] ram_addr;
  word_t         ram_wdata, ram_rdata;

  // msgcounter <-> decompression
  logic          rd_start, rd_valid, rd_last, rd_ready;
  word_t         rd_word;

  // decompression <-> lcd
  ascii_t        d_char;
  logic          d_valid, d_clear, lcd_ready;

  keypush #(.HOLD(KEY_HOLD), .TIMEOUT(KEY_TIMEOUT)) u_keypush (
    .clk, .rst, .ps2_clk, .ps2_data,
    .scancode_out(key_code), .key_out(key_ascii), .key_valid
  );

  always_ff @(posedge clk) begin
    if (rst) sel_sync <= '0;
    else     sel_sync <= {sel_sync[1:0], select_btn};
  end
  assign read_btn = sel_sync[1] & ~sel_sync[2];

  compression #(.MAX_CHARS(MAX_CHARS)) u_comp (
    .clk, .rst,
    .din(key_ascii), .din_valid(key_valid), .read_btn,
    .ram_ready(c_ready),
    .dout(c_word), .dout_valid(c_valid),
    .end_msg, .rd_req, .rd_num, .rd_mode(read_armed)
  );

  msgcounter #(.DEPTH(DEPTH), .MSGS(MSGS), .SLOT_WORDS(2 * MAX_CHARS)) u_msg (
    .clk, .rst,
    .wr_word(c_word), .wr_valid(c_valid), .wr_ready(c_ready),
    .end_msg, .rd_req, .rd_num(rd_num[MW-1:0]),
    .rd_start, .rd_word, .rd_valid, .rd_last, .rd_ready,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .msg_count, .full, .rd_miss
  );

  tmc_ram #(.DEPTH(DEPTH)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  decompression u_decomp (
    .clk, .rst,
    .start(rd_start), .word(rd_word), .word_valid(rd_valid),
    .word_last(rd_last), .word_ready(rd_ready),
    .lcd_data(d_char), .lcd_valid(d_valid), .lcd_clear(d_clear),
    .lcd_ready, .done(msg_shown)
  );

  lcd #(.DIV(LCD_DIV), .COLS(LCD_COLS)) u_lcd (
    .clk, .rst,
    .message(d_char), .msg_valid(d_valid), .msg_clear(d_clear),
    .ready(lcd_ready),
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en
  );

endmodule
