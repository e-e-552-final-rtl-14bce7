// tb_lcd_driver: self-checking test of the LCD controller.
//
// A tick arrives every TDIV clocks. The testbench measures, in ticks, how long
// each byte stays on the bus during start-up and compares with the measured
// sequence of the original controller: 0x38 for 400 ticks, 0x06 and 0x0E for
// 2, 0x01 for 30, address 0x80 for 2, then ready. An LCD model on the pins
// checks the instruction order and what the screen shows. It then writes 40
// characters: each takes 2 ticks, the 17th lands on line two after an
// address set to 0xC0, and after the 32nd the screen is cleared and the
// cursor returned home. Finally a clear request is checked.
module tb_lcd_driver;
  localparam int TDIV = 3;

  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  logic [7:0] data = '0;
  logic valid = 1'b0, clear = 1'b0, ready;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en;
  int checks = 0, failures = 0;

  lcd_driver dut (.*);
  lcd_model  lcdm (.lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  int tdiv = 0;
  always @(posedge clk) begin
    tdiv <= (tdiv == TDIV - 1) ? 0 : tdiv + 1;
    tick <= !rst && (tdiv == TDIV - 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run lengths of bus values, counted in ticks
  logic [7:0] run_val [$];
  int         run_len [$];
  int         busy_ticks = 0;
  always @(negedge clk) if (!rst && tick) begin
    if (!ready) busy_ticks++;
    if (run_val.size() == 0 || run_val[$] != lcd_data) begin
      run_val.push_back(lcd_data); run_len.push_back(1);
    end else run_len[$] = run_len[$] + 1;
  end

  task automatic send(input logic [7:0] c, input logic clr);
    @(negedge clk);
    while (!ready) @(negedge clk);
    data = c; clear = clr; valid = 1'b1;
    while (ready) @(negedge clk);
    valid = 1'b0; clear = 1'b0;
    while (!ready) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_v [6];
    int         exp_l [5];
    string s, l1, l2;
    exp_v = '{8'h38, 8'h06, 8'h0E, 8'h01, 8'h80, 8'h00};
    exp_l = '{400, 2, 2, 30, 2};
    repeat (4) @(negedge clk);
    rst = 1'b0;
    lcdm.clear_log();
    while (!ready) @(negedge clk);
    repeat (2 * TDIV) @(negedge clk);
    check(run_val.size() == 6, $sformatf("%0d bus phases at start-up", run_val.size()));
    for (int i = 0; i < 5 && i < run_val.size(); i++) begin
      check(run_val[i] == exp_v[i], $sformatf("phase %0d byte %h, expected %h", i, run_val[i], exp_v[i]));
      check(run_len[i] == exp_l[i], $sformatf("phase %0d lasted %0d ticks, expected %0d", i, run_len[i], exp_l[i]));
    end
    check(lcdm.instr.size() == 5, $sformatf("%0d instructions", lcdm.instr.size()));
    for (int i = 0; i < 5 && i < lcdm.instr.size(); i++)
      check(lcdm.instr[i] == exp_v[i], $sformatf("instruction %0d: %h", i, lcdm.instr[i]));
    check(lcd_rw == 1'b0, "write only");

    // 40 characters: wrap to line 2 after 16, clear and home after 32
    s = "abcdefghijklmnopqrstuvwxyz0123456789 ,.!";
    for (int i = 0; i < 40; i++) begin
      int b0, expect_busy;
      b0 = busy_ticks;
      send(s[i], 1'b0);
      expect_busy = (i == 15) ? 4 : (i == 31) ? 34 : 2;
      check(busy_ticks - b0 == expect_busy,
            $sformatf("char %0d busy %0d ticks, expected %0d", i, busy_ticks - b0, expect_busy));
      if (i == 31) begin
        check(lcdm.n_clear == 2, "screen cleared at the end of line two");
        check(lcdm.line(1) == "                ", "line one blank after wrap");
      end
      if (i == 30) begin
        l1 = lcdm.line(1); l2 = lcdm.line(2);
        check(l1 == s.substr(0, 15), {"line one: ", l1});
        check(l2.substr(0, 14) == s.substr(16, 30), {"line two: ", l2});
        check(lcdm.n_line2 == 1, "one move to line two");
      end
    end
    l1 = lcdm.line(1);
    check(l1 == {s.substr(32, 39), "        "}, {"line one after wrap: ", l1});
    check(lcdm.n_write == 40, "40 characters written");
    // clear request
    send(8'h00, 1'b1);
    check(lcdm.n_clear == 3, "clear request honoured");
    check(lcdm.line(1) == "                ", "screen blank after clear");
    send(8'h68, 1'b0);
    check(lcdm.ddram[0] == 8'h68, "writes resume at home");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
