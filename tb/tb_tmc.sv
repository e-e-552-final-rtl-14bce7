// tb_tmc: end-to-end test of the text message centre at its default
// parameters.
//
// The testbench types on a modelled PS/2 keyboard (make code, F0, make code
// per key stroke, keyboard clock 500 system clocks per bit), presses the
// Select button, and watches the LCD pins through an LCD model. It stores
// nine messages (the ninth must be discarded because all eight slots are
// used), one of them 53 characters long (only the first 50 may be kept), and
// reads several back with Shift + digit and with Select + digit. Every read
// must clear the screen and then write exactly the stored text; the 50-
// character message must wrap to line two and, after 32 characters, clear
// the screen and continue at home.
//
// Each mechanism of the design is counted and must occur at least once:
// preset (one-word) and normal (two-word) characters, end of message, empty
// Enter ignored, read by Shift and by Select, cancelled read, read of an
// unused slot, character limit, memory full, a key held with typematic
// repeats, an unaccepted key, the compression engine waiting for the RAM side,
// the decompression engine waiting for the LCD, the clear at the start of a
// read, the move to line two and the clear at the end of the screen.
module tb_tmc;
  import tmc_pkg::*;
  localparam int HALF = 250;   // keyboard clock half period, system clocks

  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1, select_btn = 1'b0;
  logic [7:0] lcd_data;
  logic lcd_en, lcd_rs, lcd_rw;
  logic [3:0] msg_count;
  logic full, read_armed, rd_miss, msg_shown;
  logic [7:0] key_code;
  int checks = 0, failures = 0;

  tmc dut (.*);
  lcd_model lcdm (.lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- counters
  int m_set = 0, m_normal = 0, m_end = 0, m_rd_shift = 0, m_rd_btn = 0;
  int m_miss = 0, m_full_drop = 0, m_ram_wait = 0, m_lcd_wait = 0, m_shown = 0;
  int m_cap = 0, m_typematic = 0, m_badkey = 0, m_cancel = 0, m_empty = 0;
  logic btn_pending = 1'b0;
  always @(negedge clk) if (!rst) begin
    if (dut.c_valid && dut.c_ready) begin
      if (dut.c_word[4]) m_set++; else m_normal++;
      if (full) m_full_drop++;
    end
    if (dut.c_valid && !dut.c_ready) m_ram_wait++;
    if (dut.d_valid && !dut.d_clear && !dut.lcd_ready) m_lcd_wait++;
    if (dut.end_msg) m_end++;
    if (dut.read_btn) btn_pending = 1'b1;
    if (dut.rd_req) begin
      if (btn_pending) m_rd_btn++; else m_rd_shift++;
      btn_pending = 1'b0;
    end
    if (rd_miss) m_miss++;
    if (msg_shown) m_shown++;
  end

  // ---------------------------------------------------------------- keyboard
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

  function automatic logic [7:0] scan_of(input byte c);
    string k, h;
    k = "abcdefghijklmnopqrstuvwxyz0123456789 ,.";
    h = "1C322123242B3433433B424B3A31444D152D1B2C3C2A1D22351A45161E26252E363D3E46294149";
    for (int i = 0; i < k.len(); i++) if (k[i] == c) return 8'(h.substr(2 * i, 2 * i + 1).atohex());
    if (c == 8'h0D) return 8'h5A;   // Enter
    if (c == 8'h0E) return 8'h12;   // Shift
    return 8'h05;                   // F1, not accepted
  endfunction

  task automatic stroke(input byte c, input int repeats = 0);
    logic [7:0] code;
    code = scan_of(c);
    for (int r = 0; r <= repeats; r++) send_byte(code);
    send_byte(8'hF0);
    send_byte(code);
    repeat (1200 + 300) @(negedge clk);   // key pulse plus compression
  endtask

  task automatic type_text(input string s);
    for (int i = 0; i < s.len(); i++) stroke(s[i]);
  endtask

  task automatic press_select;
    @(negedge clk); select_btn = 1'b1;
    repeat (20) @(negedge clk); select_btn = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- messages
  string stored [8];
  int    nstored = 0;

  task automatic store(input string s);
    int c0;
    c0 = msg_count;
    type_text(s);
    stroke(8'h0D);
    if (nstored < 8 && s.len() > 0) begin
      stored[nstored] = (s.len() > 50) ? s.substr(0, 49) : s;
      nstored++;
      check(msg_count == 4'(c0 + 1), $sformatf("message %0d stored", nstored));
    end else begin
      check(msg_count == 4'(c0), "message not stored");
    end
  endtask

  task automatic expect_display(input int m);
    int w0, c0, cycles;
    string got;
    w0 = lcdm.written.size(); c0 = lcdm.n_clear;
    cycles = 0;
    while (m_shown == 0 && cycles < 2000000) begin @(negedge clk); cycles++; end
    check(m_shown == 1, $sformatf("message %0d shown", m));
    m_shown = 0;
    repeat (5000) @(negedge clk);
    got = "";
    for (int i = w0; i < lcdm.written.size(); i++) got = {got, string'(lcdm.written[i])};
    check(got == stored[m], $sformatf("message %0d on LCD: \"%s\", expected \"%s\"", m, got, stored[m]));
  endtask

  task automatic read_shift(input int m);
    int c0;
    c0 = lcdm.n_clear;
    stroke(8'h0E);
    check(read_armed, "read armed by Shift");
    stroke(byte'(8'h30 + m));
    expect_display(m);
    check(lcdm.n_clear > c0, "screen cleared for the read");
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string long_msg, l2;
    int c0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    lcdm.clear_log();

    store("hello, world.");
    c0 = msg_count; stroke(8'h0D); check(msg_count == 4'(c0), "empty message ignored"); m_empty++;
    stroke("a", 5); m_typematic++;          // held key: one character
    stroke(8'h01);  m_badkey++;              // F1: ignored
    store("bc 123");                         // message 1 is "abc 123"
    stored[1] = "abc 123";
    long_msg = "the quick brown fox jumps over the lazy dog, 0123456";
    store(long_msg);
    m_cap++;
    read_shift(0);
    // read of a slot not yet used
    stroke(8'h0E); stroke("6");
    check(m_miss == 1, "read of an unused slot refused");
    // cancelled read: Shift then a letter, which is not stored
    stroke(8'h0E); stroke("q"); m_cancel++;
    check(!read_armed, "read cancelled");
    store("m4");
    store("five");
    store("6 six");
    store("seven 7");
    store("eight.");
    check(full && msg_count == 8, "eight messages stored");
    store("overflow");
    check(msg_count == 8, "ninth message refused");
    // read with the Select button, the long message
    c0 = lcdm.n_clear;
    press_select();
    check(read_armed, "read armed by Select");
    stroke("2");
    expect_display(2);
    check(lcdm.n_clear == c0 + 2, "clear at start and at the end of the screen");
    check(lcdm.line(1) == stored[2].substr(32, 47), {"line one after wrap: ", lcdm.line(1)});
    l2 = lcdm.line(2);
    check(l2.substr(0, 1) == stored[2].substr(48, 49), {"line two after wrap: ", l2});
    read_shift(1);
    read_shift(7);
    check(lcdm.line(1) == "eight.          ", {"screen shows: ", lcdm.line(1)});

    // mechanisms
    check(m_set > 0,       $sformatf("preset characters: %0d", m_set));
    check(m_normal > 0,    $sformatf("normal characters: %0d words", m_normal));
    check(m_end >= 9,      $sformatf("end of message: %0d", m_end));
    check(m_empty > 0,     "empty Enter");
    check(m_rd_shift >= 3, $sformatf("reads by Shift: %0d", m_rd_shift));
    check(m_rd_btn == 1,   $sformatf("reads by Select: %0d", m_rd_btn));
    check(m_cancel > 0,    "cancelled read");
    check(m_miss == 1,     $sformatf("unused slot reads: %0d", m_miss));
    check(m_cap > 0,       "character limit");
    check(m_full_drop > 0, $sformatf("words dropped while full: %0d", m_full_drop));
    check(m_typematic > 0, "typematic repeat");
    check(m_badkey > 0,    "unaccepted key");
    check(m_ram_wait > 0,  $sformatf("compression waited for RAM: %0d", m_ram_wait));
    check(m_lcd_wait > 0,  $sformatf("decompression waited for LCD: %0d", m_lcd_wait));
    check(lcdm.n_line2 > 0, $sformatf("moves to line two: %0d", lcdm.n_line2));
    $display("mechanisms: set=%0d normal=%0d end=%0d shift=%0d select=%0d miss=%0d full_drop=%0d ram_wait=%0d lcd_wait=%0d line2=%0d clears=%0d",
             m_set, m_normal, m_end, m_rd_shift, m_rd_btn, m_miss, m_full_drop, m_ram_wait, m_lcd_wait,
             lcdm.n_line2, lcdm.n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
