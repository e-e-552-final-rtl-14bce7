// tb_keypush: self-checking test of the keyboard controller.
//
// Drives PS/2 frames for whole key strokes (make code, possibly repeated,
// then F0 and the code again) and checks that each stroke gives exactly one
// key_valid pulse of HOLD clocks carrying the scancode and its ASCII code.
// Covers the report's two examples (0x1C -> 0x61, 0x2E -> 0x35), a held key
// with typematic repeats, an extended key (E0 prefix) and a key outside the
// accepted set, which must give no output.
module tb_keypush;
  import tmc_pkg::*;
  localparam int HALF = 10;
  localparam int HOLD = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  logic [7:0] scancode_out;
  ascii_t     key_out;
  logic       key_valid;
  int checks = 0, failures = 0;
  int n_pulse = 0, pulse_len = 0, last_len = 0;
  logic [7:0] got_code;
  ascii_t     got_ascii;

  keypush #(.HOLD(HOLD), .TIMEOUT(500)) dut (.*);

  always #5 clk = ~clk;

  logic kv_q = 1'b0;
  always @(posedge clk) begin
    kv_q <= key_valid;
    if (key_valid) pulse_len++;
    if (key_valid && !kv_q) begin
      n_pulse++;
      got_code  = scancode_out;
      got_ascii = key_out;
    end
    if (!key_valid && kv_q) begin last_len = pulse_len; pulse_len = 0; end
  end

  task automatic send_bit(input logic b);
    ps2_data = b;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b0;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b1;
  endtask

  task automatic send_byte(input logic [7:0] b);
    send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
    send_bit(~^b);
    send_bit(1'b1);
    ps2_data = 1'b1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic stroke(input logic [7:0] code, input int repeats, input bit ext,
                        input bit expect_out, input ascii_t exp_ascii);
    int p0;
    p0 = n_pulse;
    for (int r = 0; r <= repeats; r++) begin
      if (ext) send_byte(8'hE0);
      send_byte(code);
    end
    check(n_pulse == p0, $sformatf("no output before release of %h", code));
    if (ext) send_byte(8'hE0);
    send_byte(8'hF0);
    send_byte(code);
    repeat (HOLD + 10) @(posedge clk);
    if (expect_out) begin
      check(n_pulse == p0 + 1, $sformatf("one pulse for %h", code));
      check(got_code == code, $sformatf("scancode %h, expected %h", got_code, code));
      check(got_ascii == exp_ascii, $sformatf("ascii %h, expected %h", got_ascii, exp_ascii));
      check(last_len == HOLD, $sformatf("pulse length %0d, expected %0d", last_len, HOLD));
    end else begin
      check(n_pulse == p0, $sformatf("no output for %h", code));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    stroke(8'h1C, 0, 1'b0, 1'b1, 8'h61);   // 'a'
    stroke(8'h2E, 0, 1'b0, 1'b1, 8'h35);   // '5'
    stroke(8'h2D, 4, 1'b0, 1'b1, 8'h72);   // 'r' held with repeats
    stroke(8'h5A, 0, 1'b0, 1'b1, ASCII_CR); // Enter
    stroke(8'h12, 0, 1'b0, 1'b1, CMD_READ); // Shift
    stroke(8'h05, 0, 1'b0, 1'b0, 8'h00);   // F1: not accepted
    stroke(8'h75, 0, 1'b1, 1'b0, 8'h00);   // extended up-arrow: not accepted
    stroke(8'h49, 0, 1'b0, 1'b1, 8'h2E);   // '.'
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
