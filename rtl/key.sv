// key: PS/2 keyboard serial receiver.
//
// The keyboard sends each byte as an 11-bit frame on its own clock: a start
// bit (0), eight data bits LSB first, an odd parity bit and a stop bit (1).
// Data is valid on the falling edge of the keyboard clock. Both keyboard lines
// are brought into the system clock domain through two flip-flops, and the
// falling edge of the synchronised keyboard clock shifts in one bit. When the
// eleventh bit arrives the frame is checked and, if good, the byte appears on
// scancode with a one-cycle strobe code_stb.
//
// Checking start and stop bits follows the report's description of the driver;
// checking parity and the idle time-out that drops a half-received frame
// (no keyboard clock edge for TIMEOUT cycles) are this design's own choices.
//
// Timing: code_stb rises three system clocks after the keyboard clock edge
// that carries the stop bit.
module key #(
  parameter int unsigned TIMEOUT = 25_000  // system clocks, about 1 ms at 25 MHz
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       ps2_clk,    // keyboard clock line
  input  logic       ps2_data,   // keyboard data line
  output logic [7:0] scancode,   // last good byte
  output logic       code_stb,   // one-cycle strobe: scancode is new
  output logic       frame_err   // one-cycle strobe: bad start, stop or parity
);

  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [9:0]  shreg;  // start, data, parity; the stop bit is checked as it arrives
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT+1)-1:0] idle;
  logic        fall;

  assign fall = clk_sync[2] & ~clk_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync  <= '1;
      dat_sync  <= '1;
      shreg     <= '0;
      nbits     <= '0;
      idle      <= '0;
      scancode  <= '0;
      code_stb  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      clk_sync  <= {clk_sync[1:0], ps2_clk};
      dat_sync  <= {dat_sync[0], ps2_data};
      code_stb  <= 1'b0;
      frame_err <= 1'b0;
      if (fall) begin
        idle  <= '0;
        shreg <= {dat_sync[1], shreg[9:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // shreg holds start (bit 0) .. parity (bit 9); the new bit is the stop bit
          if (!shreg[0] && dat_sync[1] && (^shreg[9:1])) begin
            scancode <= shreg[8:1];
            code_stb <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else begin
          nbits <= nbits + 4'd1;
        end
      end else if (nbits != 0) begin
        if (idle == TIMEOUT[$bits(idle)-1:0]) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
