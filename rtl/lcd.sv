// lcd: display interface of the text message centre.
//
// Joins the tick divider counter_lcd and the controller lcd_driver, so that a
// character (or a clear request) offered on message/msg_valid/msg_clear ends
// up on the LCD pins. ready is the controller's ready. Timing is that of
// lcd_driver with one tick every DIV system clocks. Grouping the two parts in
// one display block follows the report's design hierarchy.
module lcd #(
  parameter int unsigned DIV  = 1510,
  parameter int unsigned COLS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] message,
  input  logic       msg_valid,
  input  logic       msg_clear,
  output logic       ready,
  output logic [7:0] lcd_data,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en
);

  logic tick;

  counter_lcd #(.DIV(DIV)) u_cnt (.clk, .rst, .tick);

  lcd_driver #(.COLS(COLS)) u_drv (
    .clk, .rst, .tick,
    .data(message), .valid(msg_valid), .clear(msg_clear), .ready,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en
  );

endmodule
