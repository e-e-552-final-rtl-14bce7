// lcd_driver: controller for an HD44780-compatible character LCD on an 8-bit
// bus (lcd_data, lcd_rs, lcd_rw = 0 since the display is only written, lcd_en).
//
// After reset it runs the start-up sequence: a 400-tick power-up wait with the
// function-set byte 0x38 on the bus (the enable pulse at the end of the wait),
// entry mode 0x06 and display on 0x0E for 2 ticks each, clear 0x01 for 30
// ticks, and the DDRAM address set 0x80 for 2 ticks. It then raises ready.
// A character offered with valid is written in 2 ticks (lcd_rs = 1); a
// request with valid and clear runs clear and address set instead. The
// controller tracks the cursor on a COLS x 2 display: at the end of line one
// it moves the cursor to line two (address 0xC0), at the end of line two it
// clears the screen and returns the cursor home.
//
// Timing: tick (from counter_lcd) is the time unit. Every command state sets
// the bus for its whole length and drives lcd_en high during its first tick,
// so the display latches on the falling edge one tick later; the power-up
// state drives it during its second-to-last tick instead. ready is high only
// in the idle state; an offer is taken on a clock with tick, and ready drops
// on the next clock and stays low until the command has completed.
// The command bytes and tick counts follow the report's measurements; the
// enable placement, the line-two step and the tick-aligned hand-shake are
// this design's own.
module lcd_driver
  import lcd_pkg::*;
#(
  parameter int unsigned COLS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [7:0] data,
  input  logic       valid,
  input  logic       clear,
  output logic       ready,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en
);

  typedef enum logic [2:0] {
    S_INIT, S_ENTRY, S_DISPON, S_CLEAR, S_ADDR, S_READY, S_WRITE
  } state_t;

  state_t      state;
  logic [8:0]  cnt;       // ticks spent in the current state
  logic [8:0]  len;       // length of the current state in ticks
  logic [7:0]  ch;
  logic [7:0]  addr_cmd;  // DDRAM address for S_ADDR
  logic [$clog2(COLS+1)-1:0] col;
  logic        line;

  always_comb begin
    unique case (state)
      S_INIT:  len = 9'(T_INIT);
      S_CLEAR: len = 9'(T_CLEAR);
      default: len = 9'(T_SHORT);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_INIT;
      cnt      <= '0;
      ch       <= '0;
      addr_cmd <= LCD_LINE1;
      col      <= '0;
      line     <= 1'b0;
    end else if (tick) begin
      if (state == S_READY) begin
        if (valid) begin
          cnt <= '0;
          if (clear) begin
            state <= S_CLEAR;
          end else begin
            ch    <= data;
            state <= S_WRITE;
          end
        end
      end else if (cnt == len - 9'd1) begin
        cnt <= '0;
        unique case (state)
          S_INIT:   state <= S_ENTRY;
          S_ENTRY:  state <= S_DISPON;
          S_DISPON: state <= S_CLEAR;
          S_CLEAR:  begin
                      addr_cmd <= LCD_LINE1;
                      col      <= '0;
                      line     <= 1'b0;
                      state    <= S_ADDR;
                    end
          S_ADDR:   state <= S_READY;
          S_WRITE:  begin
                      if (col == ($bits(col))'(COLS - 1)) begin
                        if (!line) begin
                          line     <= 1'b1;
                          col      <= '0;
                          addr_cmd <= LCD_LINE2;
                          state    <= S_ADDR;
                        end else begin
                          state <= S_CLEAR;
                        end
                      end else begin
                        col   <= col + 1'b1;
                        state <= S_READY;
                      end
                    end
          default:  state <= S_READY;
        endcase
      end else begin
        cnt <= cnt + 9'd1;
      end
    end
  end

  always_comb begin
    lcd_rw = 1'b0;
    lcd_rs = 1'b0;
    lcd_en = (cnt == 9'd0);
    unique case (state)
      S_INIT:   begin lcd_data = LCD_FUNCSET; lcd_en = (cnt == 9'(T_INIT - 2)); end
      S_ENTRY:  lcd_data = LCD_ENTRY;
      S_DISPON: lcd_data = LCD_DISPON;
      S_CLEAR:  lcd_data = LCD_CLEAR;
      S_ADDR:   lcd_data = addr_cmd;
      S_WRITE:  begin lcd_data = ch; lcd_rs = 1'b1; end
      default:  begin lcd_data = 8'h00; lcd_en = 1'b0; end
    endcase
  end

  assign ready = (state == S_READY);

endmodule
