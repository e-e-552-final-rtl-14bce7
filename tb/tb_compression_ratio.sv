// tb_compression_ratio: compression ratio of the preset-pattern code on
// English text.
//
// Feeds several lower-case sentences through the compression engine and
// counts the 5-bit words it produces. For each sentence the ratio
// (5 x words) / (8 x characters) is compared with the value worked out here
// from the testbench's own copy of the preset table. It must be no worse than
// 89.62 %, the worst case measured for 16-pattern pre-set coding of ordinary
// text, and cannot be better than 62.5 %, the bound of five bits per character.
// The ratio of every sentence and of the whole set is printed.
module tb_compression_ratio;
  import tmc_pkg::*;
  localparam string TABLE = "aeiourstnlhdcm .";

  logic clk = 1'b0, rst = 1'b1;
  ascii_t din = '0;
  logic din_valid = 1'b0, read_btn = 1'b0, ram_ready = 1'b1;
  word_t dout;
  logic dout_valid, end_msg, rd_req, rd_mode;
  logic [2:0] rd_num;
  int checks = 0, failures = 0;
  int words = 0;

  compression #(.MAX_CHARS(1000)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (dout_valid && ram_ready) words++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic key(input ascii_t c);
    @(negedge clk); din = c; din_valid = 1'b1;
    repeat (4) @(negedge clk);
    din_valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s [6];
    int tot_w = 0, tot_c = 0;
    s[0] = "the meeting has moved to room 204, please come at nine.";
    s[1] = "call me when you get this message.";
    s[2] = "buy one pizza and get the second one for half price.";
    s[3] = "the store is open seven days a week, from eight until ten.";
    s[4] = "remember to send the report to the client before noon.";
    s[5] = "new low rates on long distance calls, sign up today.";
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (s[k]) begin
      int w0, exp_w;
      real r;
      w0 = words; exp_w = 0;
      for (int i = 0; i < s[k].len(); i++) begin
        bit hit;
        hit = 0;
        for (int t = 0; t < 16; t++) if (TABLE[t] == s[k][i]) hit = 1;
        exp_w += hit ? 1 : 2;
        key(s[k][i]);
      end
      key(ASCII_CR);
      check(words - w0 == exp_w, $sformatf("sentence %0d: %0d words, expected %0d", k, words - w0, exp_w));
      r = 100.0 * 5.0 * (words - w0) / (8.0 * s[k].len());
      $display("sentence %0d: %0d characters -> %0d words, ratio %0.2f %%", k, s[k].len(), words - w0, r);
      check(r >= 62.5 && r <= 89.62, $sformatf("sentence %0d ratio %0.2f outside 62.5-89.62 %%", k, r));
      tot_w += words - w0; tot_c += s[k].len();
    end
    $display("all sentences: ratio %0.2f %%", 100.0 * 5.0 * tot_w / (8.0 * tot_c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
