// tb_key: self-checking test of the PS/2 serial receiver.
//
// Sends random bytes as 11-bit keyboard frames (start, 8 data bits LSB first,
// odd parity, stop) at a keyboard clock of HALF system clocks per half period
// and checks that each appears once on scancode with code_stb. Frames with a
// wrong parity bit or a missing stop bit must give frame_err and no strobe.
// A frame cut off half-way must be dropped by the idle time-out, after which a
// good frame must still be received correctly.
module tb_key;
  localparam int HALF = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  logic [7:0] scancode;
  logic code_stb, frame_err;
  int checks = 0, failures = 0;
  int n_stb = 0, n_err = 0;
  logic [7:0] last_code;

  key #(.TIMEOUT(400)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (code_stb) begin n_stb++; last_code = scancode; end
    if (frame_err) n_err++;
  end

  task automatic send_bit(input logic b);
    ps2_data = b;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b0;
    repeat (HALF) @(posedge clk);
    ps2_clk = 1'b1;
  endtask

  task automatic send_frame(input logic [7:0] b, input logic bad_par, input logic bad_stop);
    send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
    send_bit(~^b ^ bad_par);
    send_bit(~bad_stop);
    ps2_data = 1'b1;
    repeat (3 * HALF) @(posedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int s0, e0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    // fixed examples from the keyboard controller tests, then random bytes
    for (int k = 0; k < 40; k++) begin
      b = (k == 0) ? 8'h1C : (k == 1) ? 8'h2E : (k == 2) ? 8'hF0 : 8'($urandom);
      s0 = n_stb;
      send_frame(b, 1'b0, 1'b0);
      check(n_stb == s0 + 1, $sformatf("one strobe for %h", b));
      check(last_code == b, $sformatf("scancode %h, expected %h", last_code, b));
    end
    // bad parity
    s0 = n_stb; e0 = n_err;
    send_frame(8'h55, 1'b1, 1'b0);
    check(n_stb == s0 && n_err == e0 + 1, "bad parity rejected");
    // bad stop bit
    s0 = n_stb; e0 = n_err;
    send_frame(8'h3C, 1'b0, 1'b1);
    check(n_stb == s0 && n_err == e0 + 1, "bad stop bit rejected");
    // truncated frame: 5 bits, then silence longer than the time-out
    for (int i = 0; i < 5; i++) send_bit(1'b0);
    repeat (600) @(posedge clk);
    s0 = n_stb;
    send_frame(8'hA7, 1'b0, 1'b0);
    check(n_stb == s0 + 1 && last_code == 8'hA7, "recovery after truncated frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
