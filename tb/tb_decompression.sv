// tb_decompression: self-checking test of the decompression engine.
//
// The testbench plays the message counter (start pulse, then words with
// random gaps, the last one marked) and the LCD (ready drops a random time
// after an offer and returns later). It checks that each read begins with a
// clear request, that the characters reaching the LCD equal the expected
// ones worked out here from the testbench's own copy of the preset table, that
// an offer is held until ready goes low, and that done pulses once after the
// last character. The report's examples are included: 10101 -> 'r' (0x72),
// and 01111 then 00001, with a long wait between them, -> 0xF1.
module tb_decompression;
  import tmc_pkg::*;
  localparam string TABLE = "aeiourstnlhdcm .";

  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  word_t word = '0;
  logic word_valid = 1'b0, word_last = 1'b0, word_ready;
  ascii_t lcd_data;
  logic lcd_valid, lcd_clear, lcd_ready = 1'b1, done;
  int checks = 0, failures = 0;

  ascii_t got[$];
  int     n_clear = 0, n_done = 0;

  decompression dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // LCD model: takes an offer after a random delay, busy for a while.
  // It acts on falling clock edges, away from the design's rising edges.
  initial begin
    forever begin
      @(negedge clk);
      if (lcd_valid && lcd_ready) begin
        repeat ($urandom_range(0, 4)) begin
          @(negedge clk);
          if (!lcd_valid) check(1'b0, "offer withdrawn before ready went low");
        end
        if (lcd_clear) n_clear++;
        else begin
          if (n_clear == 0) check(1'b0, "character before clear");
          got.push_back(lcd_data);
        end
        lcd_ready = 1'b0;
        repeat ($urandom_range(2, 12)) @(negedge clk);
        if (lcd_valid) check(1'b0, "offer still held after ready went low");
        lcd_ready = 1'b1;
      end
    end
  end

  always @(posedge clk) if (done) n_done++;

  task automatic put_word(input word_t w, input bit last, input int gap);
    repeat (gap) @(negedge clk);
    @(negedge clk);
    word = w; word_last = last; word_valid = 1'b1;
    while (!word_ready) @(negedge clk);
    @(negedge clk);
    word_valid = 1'b0;
  endtask

  task automatic run_msg(input ascii_t chars[$], input int long_gap);
    word_t ws[$];
    int d0;
    foreach (chars[i]) begin
      int idx;
      idx = -1;
      for (int t = 0; t < 16; t++) if (TABLE[t] == chars[i]) idx = t;
      if (idx >= 0) ws.push_back({1'b1, 4'(idx)});
      else begin
        ws.push_back({1'b0, chars[i][7:4]});
        ws.push_back({1'b0, chars[i][3:0]});
      end
    end
    got.delete(); n_clear = 0; d0 = n_done;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    foreach (ws[i]) put_word(ws[i], i == ws.size() - 1, (i % 2 == 1) ? long_gap : $urandom_range(0, 3));
    repeat (60) @(posedge clk);
    check(n_clear == 1, $sformatf("%0d clear requests", n_clear));
    check(got.size() == chars.size(), $sformatf("%0d characters, expected %0d", got.size(), chars.size()));
    foreach (chars[i]) if (i < got.size())
      check(got[i] == chars[i], $sformatf("char %0d: %h, expected %h", i, got[i], chars[i]));
    check(n_done == d0 + 1, "one done pulse");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ascii_t m[$];
    string s;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    m = '{8'h72};               run_msg(m, 0);   // set pattern 10101
    m = '{8'hF1};               run_msg(m, 50);  // 01111, wait, 00001
    m = '{};
    s = "the quick brown fox, 1999.";
    for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
    run_msg(m, 5);
    m = '{};
    for (int i = 0; i < 50; i++) m.push_back(8'($urandom));
    run_msg(m, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
