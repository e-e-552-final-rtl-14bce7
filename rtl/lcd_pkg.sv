// lcd_pkg: command bytes and sequence timing of the character LCD
// controller (HD44780-compatible instruction set).
//
// The command bytes and the tick counts of the start-up sequence are the ones
// the original controller was measured with: 0x38 during a 400-tick power-up
// wait, then entry mode 0x06 and display on 0x0E for two ticks each, clear 0x01
// for 30 ticks, and a two-tick DDRAM address set before characters are written.
// The line-two address 0xC0 follows from the 0x38 (two-line) function set.
package lcd_pkg;

  localparam logic [7:0] LCD_FUNCSET = 8'h38; // 8-bit bus, 2 lines, 5x8 font
  localparam logic [7:0] LCD_ENTRY   = 8'h06; // increment, no shift
  localparam logic [7:0] LCD_DISPON  = 8'h0E; // display on, cursor on
  localparam logic [7:0] LCD_CLEAR   = 8'h01; // clear display, home
  localparam logic [7:0] LCD_LINE1   = 8'h80; // DDRAM address 0x00
  localparam logic [7:0] LCD_LINE2   = 8'hC0; // DDRAM address 0x40

  localparam int unsigned T_INIT  = 400; // ticks, power-up wait (~24 ms)
  localparam int unsigned T_SHORT = 2;   // ticks, entry/display/address/char
  localparam int unsigned T_CLEAR = 30;  // ticks, clear display

endpackage
