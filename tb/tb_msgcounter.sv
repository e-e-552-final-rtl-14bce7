// tb_msgcounter: self-checking test of the message and address counters with
// the message RAM attached.
//
// Stores messages of random 5-bit words (random lengths, one at the 100-word
// slot limit plus extra words that must be dropped), closes each with
// end_msg, and replays them in random order through rd_req, with the
// decompression side's rd_ready held low at random. Each replay must start
// with rd_start, carry the stored words in order and mark exactly the last one
// with rd_last. Also checked: an empty message is not counted, a read of an
// unused slot gives rd_miss, after 8 messages full is set and further
// messages are discarded, and the words are written at slot base + offset.
module tb_msgcounter;
  import tmc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  word_t wr_word = '0;
  logic wr_valid = 1'b0, wr_ready, end_msg = 1'b0, rd_req = 1'b0;
  logic [2:0] rd_num = '0;
  logic rd_start, rd_valid, rd_last, rd_ready = 1'b0;
  word_t rd_word;
  logic ram_we;
  logic [9:0] ram_addr;
  word_t ram_wdata, ram_rdata;
  logic [3:0] msg_count;
  logic full, rd_miss;
  int checks = 0, failures = 0;
  int n_start = 0, n_miss = 0;
  word_t msgs [8][$];

  msgcounter dut (.*);
  tmc_ram u_ram (.clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rd_start) n_start++;
    if (rd_miss) n_miss++;
  end
  always @(posedge clk) rd_ready <= ($urandom_range(0, 2) != 0);

  task automatic put(input word_t w);
    @(negedge clk);
    wr_word = w; wr_valid = 1'b1;
    while (!wr_ready) @(negedge clk);
    @(negedge clk);
    wr_valid = 1'b0;
  endtask

  task automatic pulse_end;
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    end_msg = 1'b1; @(negedge clk); end_msg = 1'b0;
  endtask

  task automatic read_msg(input int m, input bit expect_ok);
    int s0, mi0, k;
    s0 = n_start; mi0 = n_miss;
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    rd_num = 3'(m); rd_req = 1'b1; @(negedge clk); rd_req = 1'b0;
    if (!expect_ok) begin
      repeat (5) @(negedge clk);
      check(n_miss == mi0 + 1 && n_start == s0, $sformatf("miss for slot %0d", m));
      return;
    end
    k = 0;
    forever begin
      @(negedge clk);
      if (rd_valid && rd_ready) begin
        check(k < msgs[m].size() && rd_word == msgs[m][k],
              $sformatf("msg %0d word %0d: %b", m, k, rd_word));
        check(rd_last == (k == msgs[m].size() - 1), $sformatf("rd_last at word %0d", k));
        k++;
        if (rd_last) break;
      end
    end
    check(k == msgs[m].size(), $sformatf("msg %0d: %0d words, expected %0d", m, k, msgs[m].size()));
    check(n_start == s0 + 1, "one rd_start");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write address must be slot base + offset
  int wr_idx = 0;
  always @(posedge clk) begin
    if (ram_we) begin
      check(ram_addr == 10'(int'(msg_count) * 128 + wr_idx), $sformatf("write address %0d", ram_addr));
      wr_idx++;
    end
    if (end_msg && wr_ready) wr_idx = 0;
  end

  initial begin
    int len;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    pulse_end();                                 // empty message
    @(negedge clk);
    check(msg_count == 0, "empty message not stored");
    read_msg(0, 1'b0);
    for (int m = 0; m < 8; m++) begin
      len = (m == 2) ? 100 : $urandom_range(1, 60);
      for (int i = 0; i < len; i++) begin
        word_t w;
        w = 5'($urandom);
        msgs[m].push_back(w);
        put(w);
      end
      if (m == 2) for (int i = 0; i < 6; i++) put(5'($urandom));  // over the slot limit
      pulse_end();
      @(negedge clk);
      check(msg_count == 4'(m + 1), $sformatf("msg_count %0d", msg_count));
      if (m == 3) begin read_msg(1, 1'b1); read_msg(3, 1'b1); read_msg(5, 1'b0); end
    end
    check(full, "full after 8 messages");
    for (int i = 0; i < 5; i++) put(5'($urandom));
    pulse_end();
    @(negedge clk);
    check(msg_count == 8, "ninth message discarded");
    for (int k = 0; k < 12; k++) read_msg($urandom_range(0, 7), 1'b1);
    for (int m = 0; m < 8; m++) read_msg(m, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
