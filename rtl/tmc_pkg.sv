// tmc_pkg: types, constants and the preset code table shared by the text
// message centre.
//
// A character is stored as 5-bit words. Bit 4 set marks a "compressed group":
// the low four bits index a table of 16 frequent characters. Bit 4 clear marks
// a "normal group": the character is split into its high and low nibble, each
// sent as a word 0hhhh / 0llll, high nibble first. The worst case is therefore
// two words per character.
//
// Table entries fixed by the worked examples: 'a' is code 0 (word 10000) and
// 'r' is code 5 (word 10101). The other fourteen entries are this design's own
// choice of frequent English characters (vowels first, then common consonants,
// space and period).
//
// Keyboard function codes: Enter arrives as ASCII CR (0x0D) and ends the
// message being typed; Shift arrives as the code CMD_READ (0x0E, this design's
// own choice) and makes the next digit '0'..'7' a message number to display.
package tmc_pkg;

  typedef logic [4:0] word_t;      // one stored 5-bit word
  typedef logic [7:0] ascii_t;     // one ASCII character

  localparam ascii_t ASCII_CR = 8'h0D;  // Enter: end of message
  localparam ascii_t CMD_READ = 8'h0E;  // Shift: read command prefix

  // Preset pattern table, index 0..15.
  function automatic ascii_t preset_char(input logic [3:0] idx);
    case (idx)
      4'd0:  return 8'h61; // a
      4'd1:  return 8'h65; // e
      4'd2:  return 8'h69; // i
      4'd3:  return 8'h6F; // o
      4'd4:  return 8'h75; // u
      4'd5:  return 8'h72; // r
      4'd6:  return 8'h73; // s
      4'd7:  return 8'h74; // t
      4'd8:  return 8'h6E; // n
      4'd9:  return 8'h6C; // l
      4'd10: return 8'h68; // h
      4'd11: return 8'h64; // d
      4'd12: return 8'h63; // c
      4'd13: return 8'h6D; // m
      4'd14: return 8'h20; // space
      default: return 8'h2E; // period
    endcase
  endfunction

  // Reverse lookup: hit tells whether ch is one of the 16 preset characters.
  function automatic logic [4:0] preset_index(input ascii_t ch);
    case (ch)
      8'h61: return {1'b1, 4'd0};
      8'h65: return {1'b1, 4'd1};
      8'h69: return {1'b1, 4'd2};
      8'h6F: return {1'b1, 4'd3};
      8'h75: return {1'b1, 4'd4};
      8'h72: return {1'b1, 4'd5};
      8'h73: return {1'b1, 4'd6};
      8'h74: return {1'b1, 4'd7};
      8'h6E: return {1'b1, 4'd8};
      8'h6C: return {1'b1, 4'd9};
      8'h68: return {1'b1, 4'd10};
      8'h64: return {1'b1, 4'd11};
      8'h63: return {1'b1, 4'd12};
      8'h6D: return {1'b1, 4'd13};
      8'h20: return {1'b1, 4'd14};
      8'h2E: return {1'b1, 4'd15};
      default: return 5'b0_0000;
    endcase
  endfunction

endpackage
