// keypush: keyboard controller, one ASCII character per key stroke.
//
// A PS/2 keyboard sends a key's make code when it is pressed (repeated while
// held) and the prefix F0 followed by the same code when it is released. This
// block receives the bytes through the serial receiver `key`, waits for the
// F0 prefix and takes the byte after it as the finished key stroke, so that a
// held key gives one character only. The E0 prefix of extended keys is
// skipped. The released key's scancode is translated by `keyascii`; keys
// outside the accepted set are dropped.
//
// Output timing: a finished stroke drives scancode_out and key_out and raises
// key_valid for HOLD system clocks. This long pulse stands for the
// keyboard-speed trigger pulse of the original, which ran from the slow
// keyboard clock; the compression engine starts work only when it ends.
// Using the release code is the report's scheme; the pulse length is this
// design's own choice.
module keypush
  import tmc_pkg::*;
#(
  parameter int unsigned HOLD    = 1024,    // length of key_valid in clocks
  parameter int unsigned TIMEOUT = 25_000   // receiver idle time-out in clocks
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] scancode_out,  // scancode of the last released key
  output ascii_t     key_out,       // its ASCII code
  output logic       key_valid      // held high for HOLD clocks per stroke
);

  logic [7:0] code;
  logic       code_stb, frame_err;
  ascii_t     ascii;
  logic       ascii_ok;
  logic       brk;                   // F0 seen, next byte is a release
  logic [$clog2(HOLD+1)-1:0] hold_cnt;

  key #(.TIMEOUT(TIMEOUT)) u_key (
    .clk, .rst, .ps2_clk, .ps2_data,
    .scancode(code), .code_stb, .frame_err
  );

  keyascii u_map (.scancode(code), .ascii, .valid(ascii_ok));

  always_ff @(posedge clk) begin
    if (rst) begin
      brk          <= 1'b0;
      hold_cnt     <= '0;
      scancode_out <= '0;
      key_out      <= '0;
    end else begin
      if (hold_cnt != 0) hold_cnt <= hold_cnt - 1'b1;
      if (frame_err) begin
        brk <= 1'b0;
      end else if (code_stb) begin
        if (code == 8'hF0) begin
          brk <= 1'b1;
        end else if (code == 8'hE0) begin
          brk <= brk;
        end else if (brk) begin
          brk <= 1'b0;
          if (ascii_ok && hold_cnt == 0) begin
            scancode_out <= code;
            key_out      <= ascii;
            hold_cnt     <= HOLD[$bits(hold_cnt)-1:0];
          end
        end
      end
    end
  end

  assign key_valid = (hold_cnt != 0);

endmodule
