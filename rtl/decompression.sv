// decompression: expands stored 5-bit words back into ASCII for the LCD.
//
// When the message counter signals start, the engine first asks the LCD to
// clear the screen, then reads words one at a time. A word with bit 4 set is
// a preset character, looked up in the tmc_pkg table. A word with bit 4 clear
// is the high nibble of a normal character; the engine waits for the second
// word, the low nibble, and joins the two.
//
// Handshake with the message counter: word_ready is high while the engine
// wants a word, and a word moves on a clock where word_valid is also high.
// word_last marks the final word of the message.
// Handshake with the LCD: the character (or the clear request, lcd_clear = 1)
// is held with lcd_valid until the display's lcd_ready goes low, meaning the
// display has taken it. The engine then waits for lcd_ready to return high
// before it fetches the next word. done pulses for one clock after the last
// character has been taken.
//
// The clear at the start of a read, the wait for the second nibble and the
// hold-until-ready-low rule follow the report; the word_ready/word_valid
// handshake and the done pulse timing are this design's own.
module decompression
  import tmc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,        // one-cycle pulse: a message follows
  input  word_t  word,
  input  logic   word_valid,
  input  logic   word_last,
  output logic   word_ready,
  output ascii_t lcd_data,
  output logic   lcd_valid,
  output logic   lcd_clear,    // with lcd_valid: clear the display
  input  logic   lcd_ready,
  output logic   done          // one-cycle pulse: message fully shown
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLR, S_CLR_W, S_GET, S_GET2, S_SEND, S_SEND_W
  } state_t;

  state_t     state;
  ascii_t     ch;
  logic [3:0] hi;
  logic       last;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ch    <= '0;
      hi    <= '0;
      last  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) state <= S_CLR;
        S_CLR:    if (!lcd_ready) state <= S_CLR_W;
        S_CLR_W:  if (lcd_ready) state <= S_GET;
        S_GET:    if (word_valid) begin
                    last <= word_last;
                    if (word[4]) begin
                      ch    <= preset_char(word[3:0]);
                      state <= S_SEND;
                    end else begin
                      hi    <= word[3:0];
                      state <= S_GET2;
                    end
                  end
        S_GET2:   if (word_valid) begin
                    last  <= word_last;
                    ch    <= {hi, word[3:0]};
                    state <= S_SEND;
                  end
        S_SEND:   if (!lcd_ready) state <= S_SEND_W;
        S_SEND_W: if (lcd_ready) begin
                    if (last) begin
                      done  <= 1'b1;
                      state <= S_IDLE;
                    end else begin
                      state <= S_GET;
                    end
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign word_ready = (state == S_GET) || (state == S_GET2);
  assign lcd_valid  = (state == S_CLR) || (state == S_SEND);
  assign lcd_clear  = (state == S_CLR);
  assign lcd_data   = (state == S_CLR) ? 8'h00 : ch;

  // The trigger to the display lasts, unchanged, until the display's ready
  // has gone low.
  a_lcd_held: assert property (@(posedge clk) disable iff (rst)
    lcd_valid && lcd_ready |=> lcd_valid && $stable(lcd_data) && $stable(lcd_clear));

endmodule
