// tb_lcd: self-checking test of the display interface (tick divider plus
// LCD controller) at its default divide ratio of 1510 clocks per tick.
//
// Checks that the display becomes ready 436 ticks (400 + 2 + 2 + 30 + 2)
// after reset, that the 400-tick power-up phase lasts 604,000 clocks (24 ms at
// 25.175 MHz), and the report's two pin-level examples: message 0x61 appears
// on the data pins as 0x61 and message 0x1C as 0x1C, written with RS = 1 and
// taking 2 ticks each.
module tb_lcd;
  localparam int DIV = 1510;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] message = '0;
  logic msg_valid = 1'b0, msg_clear = 1'b0, ready;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en;
  int checks = 0, failures = 0;

  lcd dut (.*);
  lcd_model lcdm (.lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, t38_end = -1;
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (t38_end < 0 && lcd_data != 8'h38) t38_end = cyc;
  end

  task automatic send(input logic [7:0] c, output int took);
    int c0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    c0 = cyc;
    message = c; msg_valid = 1'b1;
    while (ready) @(negedge clk);
    msg_valid = 1'b0;
    while (!ready) @(negedge clk);
    took = cyc - c0;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int took;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    lcdm.clear_log();
    while (!ready) @(negedge clk);
    check(cyc >= 436 * DIV && cyc <= 437 * DIV, $sformatf("ready after %0d clocks", cyc));
    check(t38_end >= 400 * DIV && t38_end <= 401 * DIV, $sformatf("power-up phase %0d clocks", t38_end));
    $display("start-up: func %0d entry %0d on %0d clear %0d", lcdm.n_func, lcdm.n_entry, lcdm.n_dispon, lcdm.n_clear);
    check(lcdm.n_func == 1 && lcdm.n_entry == 1 && lcdm.n_dispon == 1 && lcdm.n_clear == 1,
          "start-up instructions");
    send(8'h61, took);
    check(lcdm.written.size() == 1 && lcdm.written[0] == 8'h61, "0x61 on the pins");
    check(took >= 2 * DIV && took <= 3 * DIV, $sformatf("write took %0d clocks", took));
    send(8'h1C, took);
    check(lcdm.written.size() == 2 && lcdm.written[1] == 8'h1C, "0x1C on the pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
