// counter_lcd: timing tick for the LCD controller.
//
// A free-running modulo-DIV counter that raises tick for one system clock
// every DIV clocks. The LCD controller steps its command sequence on this
// tick, so one tick is the controller's time unit. The default, 1510 clocks of
// a 25.175 MHz board clock, gives about 60 us per tick, which makes the
// report's 400-tick power-up wait about 24 ms as measured there. The board
// clock frequency is this design's assumption.
module counter_lcd #(
  parameter int unsigned DIV = 1510
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == ($bits(cnt))'(DIV - 1));
      cnt  <= (cnt == ($bits(cnt))'(DIV - 1)) ? '0 : cnt + 1'b1;
    end
  end

endmodule
