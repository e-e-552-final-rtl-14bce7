// tb_tmc_capacity: the full-capacity workload of the text message centre at
// default parameters.
//
// Fills all eight message slots with 50-character messages made only of
// characters outside the preset table, the worst case for compression (two
// words per character, 100 words per message, 800 of the 1024 RAM words),
// then reads every message back in reverse order and compares the characters
// written to the LCD with what was typed. Also checks that the full flag is
// set and the number of words written to the RAM.
module tb_tmc_capacity;
  localparam int HALF = 60;   // keyboard clock half period, system clocks

  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1, select_btn = 1'b0;
  logic [7:0] lcd_data;
  logic lcd_en, lcd_rs, lcd_rw;
  logic [3:0] msg_count;
  logic full, read_armed, rd_miss, msg_shown;
  logic [7:0] key_code;
  int checks = 0, failures = 0;
  int ram_writes = 0, shown = 0;

  tmc dut (.*);
  lcd_model lcdm (.lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  always @(negedge clk) if (!rst) begin
    if (dut.ram_we) ram_writes++;
    if (msg_shown) shown++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bit(input logic b);
    ps2_data = b;
    repeat (HALF) @(negedge clk);
    ps2_clk = 1'b0;
    repeat (HALF) @(negedge clk);
    ps2_clk = 1'b1;
  endtask

  task automatic send_byte(input logic [7:0] b);
    send_bit(1'b0);
    for (int i = 0; i < 8; i++) send_bit(b[i]);
    send_bit(~^b);
    send_bit(1'b1);
    ps2_data = 1'b1;
    repeat (4 * HALF) @(negedge clk);
  endtask

  // set-2 scancodes of the keys used here
  function automatic logic [7:0] scan_of(input byte c);
    string k, h;
    k = "bfgjkpqvwxyz0123456789,";
    h = "322B343B424D152A1D22351A45161E26252E363D3E4641";
    for (int i = 0; i < k.len(); i++) if (k[i] == c) return 8'(h.substr(2 * i, 2 * i + 1).atohex());
    if (c == 8'h0D) return 8'h5A;
    if (c == 8'h0E) return 8'h12;
    return 8'h05;
  endfunction

  task automatic stroke(input byte c);
    send_byte(scan_of(c));
    send_byte(8'hF0);
    send_byte(scan_of(c));
    repeat (1400) @(negedge clk);
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string pool, msgs [8], got;
    int w0, s0;
    pool = "bfgjkpqvwxyz0123456789,";
    repeat (5) @(negedge clk);
    rst = 1'b0;
    lcdm.clear_log();
    for (int m = 0; m < 8; m++) begin
      msgs[m] = "";
      for (int i = 0; i < 50; i++) msgs[m] = {msgs[m], string'(pool[(m * 7 + i * 3) % pool.len()])};
      for (int i = 0; i < 50; i++) stroke(msgs[m][i]);
      stroke(8'h0D);
      check(msg_count == 4'(m + 1), $sformatf("message %0d stored", m));
    end
    check(full, "all eight slots used");
    check(ram_writes == 800, $sformatf("%0d RAM words written, expected 800", ram_writes));
    for (int m = 7; m >= 0; m--) begin
      w0 = lcdm.written.size(); s0 = shown;
      stroke(8'h0E);
      stroke(byte'(8'h30 + m));
      while (shown == s0) @(negedge clk);
      repeat (100) @(negedge clk);
      got = "";
      for (int i = w0; i < lcdm.written.size(); i++) got = {got, string'(lcdm.written[i])};
      check(got == msgs[m], $sformatf("message %0d read back: \"%s\"", m, got));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
