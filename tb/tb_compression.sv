// tb_compression: self-checking test of the compression engine and its
// function-key decoding.
//
// The testbench plays both neighbours: the keyboard (a long din_valid pulse
// per character) and the RAM side (ram_ready held low at random). Every word
// transferred is compared with an expected stream worked out here from its own
// copy of the preset table: one word 1&index for the 16 preset characters,
// 0&high nibble then 0&low nibble for the rest. The report's examples are
// included: 'a' (0x61) -> 10000 and 0x23 -> 00010, 00011. Also checked: no
// word appears while din_valid is still high; a word stays on dout while
// ram_ready is low; Enter gives end_msg; Shift or read_btn followed by a
// digit gives rd_req with that number, and by another key cancels; characters
// beyond MAX_CHARS in one message are dropped.
module tb_compression;
  import tmc_pkg::*;
  localparam int MAXC = 12;
  localparam string TABLE = "aeiourstnlhdcm .";

  logic clk = 1'b0, rst = 1'b1;
  ascii_t din = '0;
  logic din_valid = 1'b0, read_btn = 1'b0, ram_ready = 1'b0;
  word_t dout;
  logic dout_valid, end_msg, rd_req, rd_mode;
  logic [2:0] rd_num;
  int checks = 0, failures = 0;

  word_t exp_q[$];
  int    exp_end = 0, got_end = 0;
  int    exp_rd[$];
  int    n_hold = 0;

  compression #(.MAX_CHARS(MAXC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // RAM side: random ready, compare each transferred word
  word_t held;
  logic  held_v = 1'b0;
  always @(negedge clk) begin
    if (!rst) begin
      if (dout_valid && din_valid) check(1'b0, "word output while din_valid high");
      if (held_v && !dout_valid) check(1'b0, "dout_valid dropped before transfer");
      if (held_v && dout_valid && dout != held) check(1'b0, "dout changed before transfer");
      if (held_v && dout_valid) n_hold++;
      held_v <= dout_valid && !ram_ready;
      held   <= dout;
      if (dout_valid && ram_ready) begin
        if (exp_q.size() == 0) check(1'b0, $sformatf("unexpected word %b", dout));
        else begin
          word_t e;
          e = exp_q.pop_front();
          check(dout == e, $sformatf("word %b, expected %b", dout, e));
        end
      end
      if (end_msg) begin
        got_end++;
        check(exp_end > 0, "unexpected end_msg");
        if (exp_end > 0) exp_end--;
      end
      if (rd_req) begin
        if (exp_rd.size() == 0) check(1'b0, "unexpected rd_req");
        else begin
          int e;
          e = exp_rd.pop_front();
          check(rd_num == 3'(e), $sformatf("rd_num %0d, expected %0d", rd_num, e));
        end
      end
    end
  end

  // ready changes just after a rising edge, so it is stable at the next one
  always @(posedge clk) ram_ready <= !rst && ($urandom_range(0, 3) != 0);

  function automatic void expect_char(input ascii_t c);
    int idx;
    idx = -1;
    for (int i = 0; i < 16; i++) if (TABLE[i] == c) idx = i;
    if (idx >= 0) exp_q.push_back({1'b1, 4'(idx)});
    else begin
      exp_q.push_back({1'b0, c[7:4]});
      exp_q.push_back({1'b0, c[3:0]});
    end
  endfunction

  // one key stroke: long valid pulse, the value may settle during it
  task automatic key(input ascii_t c);
    din = 8'($urandom);
    din_valid = 1'b1;
    repeat (3) @(negedge clk);
    din = c;
    repeat ($urandom_range(20, 60)) @(negedge clk);
    din_valid = 1'b0;
    repeat (40) @(negedge clk);
  endtask

  task automatic drain;
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d words missing", exp_q.size()));
    check(exp_end == 0, "end_msg missing");
    check(exp_rd.size() == 0, "rd_req missing");
  endtask

  initial begin
    repeat (200000) @(negedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // report examples
    expect_char(8'h61); key(8'h61); drain();
    expect_char(8'h23); key(8'h23); drain();
    check(exp_q.size() == 0, "examples done");
    // a sentence, then Enter
    s = "hello, world 42.";
    for (int i = 0; i < s.len(); i++) begin
      if (i < MAXC - 2) expect_char(s[i]);
      key(s[i]);
    end
    exp_end++; key(ASCII_CR); drain();
    // new message: count restarts after Enter
    s = "zq9";
    for (int i = 0; i < s.len(); i++) begin expect_char(s[i]); key(s[i]); end
    drain();
    // Shift + digit, Shift + letter (cancel), button + digit
    key(CMD_READ); check(rd_mode == 1'b1, "read armed by Shift");
    exp_rd.push_back(3); key(8'h33); drain();
    key(CMD_READ); key(8'h61); drain();
    check(rd_mode == 1'b0, "read cancelled");
    @(negedge clk); read_btn = 1'b1; @(negedge clk); read_btn = 1'b0;
    exp_rd.push_back(7); key(8'h37); drain();
    // a plain character afterwards is stored again
    expect_char(8'h74); key(8'h74); drain();
    exp_end++; key(ASCII_CR); drain();
    check(n_hold > 0, "ram_ready stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
