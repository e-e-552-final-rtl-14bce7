// tb_counter_lcd: self-checking test of the LCD tick divider.
//
// Checks at the default divide ratio and a small one that tick is a
// one-clock pulse repeating exactly every DIV clocks after reset.
module tb_counter_lcd;
  logic clk = 1'b0, rst = 1'b1;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  counter_lcd          dut_a (.clk, .rst, .tick(tick_a));   // default DIV = 1510
  counter_lcd #(.DIV(7)) dut_b (.clk, .rst, .tick(tick_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_a = -1, last_b = -1, na = 0, nb = 0;
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (tick_a) begin
      if (last_a >= 0) check(cyc - last_a == 1510, $sformatf("period a %0d", cyc - last_a));
      last_a = cyc; na++;
    end
    if (tick_b) begin
      if (last_b >= 0) check(cyc - last_b == 7, $sformatf("period b %0d", cyc - last_b));
      last_b = cyc; nb++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (1510 * 12 + 5) @(negedge clk);
    check(na == 12, $sformatf("%0d ticks at DIV=1510", na));
    check(nb == (1510 * 12 + 5) / 7, $sformatf("%0d ticks at DIV=7", nb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
