// tb_codec_chain: the store-and-replay core without keyboard and display.
//
// Wires compression, msgcounter, tmc_ram and decompression as in the top
// level and drives ASCII characters straight into the compression engine,
// with a simple model of the display's ready hand-shake at the far end. The
// first case is one preset and one non-preset character ('a' and '#')
// followed by Enter, then a read command and the message number; the
// decompressed output must be a clear request followed by exactly 'a', '#'.
// Then random messages of random printable characters are stored in every
// slot and read back in random order.
module tb_codec_chain;
  import tmc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  ascii_t din = '0;
  logic din_valid = 1'b0;
  int checks = 0, failures = 0;

  word_t      c_word, rd_word, ram_wdata, ram_rdata;
  logic       c_valid, c_ready, end_msg, rd_req, rd_mode;
  logic [2:0] rd_num;
  logic       rd_start, rd_valid, rd_last, rd_ready, ram_we, full, rd_miss, done;
  logic [9:0] ram_addr;
  logic [3:0] msg_count;
  ascii_t     d_char;
  logic       d_valid, d_clear, lcd_ready = 1'b1;

  compression u_comp (
    .clk, .rst, .din, .din_valid, .read_btn(1'b0), .ram_ready(c_ready),
    .dout(c_word), .dout_valid(c_valid), .end_msg, .rd_req, .rd_num, .rd_mode
  );
  msgcounter u_msg (
    .clk, .rst, .wr_word(c_word), .wr_valid(c_valid), .wr_ready(c_ready),
    .end_msg, .rd_req, .rd_num, .rd_start, .rd_word, .rd_valid, .rd_last, .rd_ready,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata, .msg_count, .full, .rd_miss
  );
  tmc_ram u_ram (.clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));
  decompression u_dec (
    .clk, .rst, .start(rd_start), .word(rd_word), .word_valid(rd_valid),
    .word_last(rd_last), .word_ready(rd_ready),
    .lcd_data(d_char), .lcd_valid(d_valid), .lcd_clear(d_clear), .lcd_ready, .done
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // display hand-shake model: take the offer, stay busy a while
  string shown = "";
  int    n_clear = 0, n_done = 0;
  initial forever begin
    @(negedge clk);
    if (d_valid && lcd_ready) begin
      if (d_clear) begin n_clear++; shown = ""; end
      else shown = {shown, string'(d_char)};
      lcd_ready = 1'b0;
      repeat ($urandom_range(3, 20)) @(negedge clk);
      lcd_ready = 1'b1;
    end
  end
  always @(negedge clk) if (done) n_done++;

  task automatic key(input ascii_t c);
    @(negedge clk); din = c; din_valid = 1'b1;
    repeat (30) @(negedge clk);
    din_valid = 1'b0;
    repeat (15) @(negedge clk);
  endtask

  task automatic read_back(input int m, input string exp);
    int d0, guard;
    d0 = n_done; guard = 0;
    key(CMD_READ); key(byte'(8'h30 + m));
    while (n_done == d0 && guard < 20000) begin @(negedge clk); guard++; end
    repeat (30) @(negedge clk);
    check(n_done == d0 + 1, $sformatf("message %0d replay finished", m));
    check(shown == exp, $sformatf("message %0d: \"%s\", expected \"%s\"", m, shown, exp));
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string msgs [8];
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // one chosen and one non-chosen character, end, read
    key(8'h61); key(8'h23); key(ASCII_CR);
    msgs[0] = "a#";
    read_back(0, "a#");
    check(n_clear == 1, "display cleared before the message");
    // random messages in the other slots
    for (int m = 1; m < 8; m++) begin
      int len;
      len = $urandom_range(1, 50);
      msgs[m] = "";
      for (int i = 0; i < len; i++) begin
        ascii_t c;
        c = 8'($urandom_range(8'h20, 8'h7E));
        msgs[m] = {msgs[m], string'(c)};
        key(c);
      end
      key(ASCII_CR);
      check(msg_count == 4'(m + 1), $sformatf("message %0d stored", m));
    end
    for (int k = 0; k < 12; k++) begin
      int m;
      m = $urandom_range(0, 7);
      read_back(m, msgs[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
