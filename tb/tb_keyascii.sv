// tb_keyascii: self-checking test of the scancode-to-ASCII table.
//
// Walks all 256 scancodes and compares with a reference map written out here
// from the standard PC keyboard set-2 layout: letters, digits, space, comma,
// period, Enter (0x0D) and both Shift keys (read command 0x0E) must translate;
// every other code must give valid = 0. Also checks the report's two
// examples, 0x1C -> 'a' (0x61) and 0x2E -> '5' (0x35).
module tb_keyascii;
  import tmc_pkg::*;

  logic [7:0] scancode;
  ascii_t     ascii;
  logic       valid;
  int checks = 0, failures = 0;
  logic [7:0] ref_map [256];
  logic       ref_ok  [256];

  keyascii dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic put(input string keys, input string codes_hex);
    // keys[i] has the scancode given by the i-th two-digit hex group
    for (int i = 0; i < keys.len(); i++) begin
      int code;
      code = codes_hex.substr(2 * i, 2 * i + 1).atohex();
      ref_map[code] = keys[i];
      ref_ok[code]  = 1'b1;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin ref_map[i] = 8'h00; ref_ok[i] = 1'b0; end
    put("abcdefghijklm", "1C322123242B3433433B424B3A");
    put("nopqrstuvwxyz", "31444D152D1B2C3C2A1D22351A");
    put("0123456789",    "45161E26252E363D3E46");
    put(" ,.",           "294149");
    ref_map[8'h5A] = ASCII_CR; ref_ok[8'h5A] = 1'b1;
    ref_map[8'h12] = CMD_READ; ref_ok[8'h12] = 1'b1;
    ref_map[8'h59] = CMD_READ; ref_ok[8'h59] = 1'b1;

    scancode = 8'h1C; #1;
    check(valid && ascii == 8'h61, "1C -> 61");
    scancode = 8'h2E; #1;
    check(valid && ascii == 8'h35, "2E -> 35");
    for (int i = 0; i < 256; i++) begin
      scancode = 8'(i); #1;
      check(valid == ref_ok[i], $sformatf("valid for %h", i));
      if (ref_ok[i]) check(ascii == ref_map[i], $sformatf("%h -> %h, expected %h", i, ascii, ref_map[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
