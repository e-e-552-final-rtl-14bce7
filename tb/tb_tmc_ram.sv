// tb_tmc_ram: self-checking test of the 1024 x 5 message RAM.
//
// Fills every address with a value derived from it, reads all of them back,
// then runs random mixed reads and writes against a shadow copy kept in the
// testbench. Checks the one-clock read latency and that a read of the address
// being written returns the old word.
module tb_tmc_ram;
  import tmc_pkg::*;
  localparam int DEPTH = 1024;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [9:0] addr = '0;
  word_t wdata = '0, rdata;
  int checks = 0, failures = 0;
  word_t shadow [DEPTH];

  tmc_ram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 10'(a); wdata = 5'((a * 7) ^ (a >> 5)); shadow[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      addr = 10'(a);
      @(negedge clk);
      check(rdata == shadow[a], $sformatf("addr %0d: %b, expected %b", a, rdata, shadow[a]));
    end
    for (int k = 0; k < 4000; k++) begin
      word_t old;
      we = ($urandom_range(0, 1) == 1); addr = 10'($urandom); wdata = 5'($urandom);
      old = shadow[addr];
      if (we) shadow[addr] = wdata;
      @(negedge clk);
      check(rdata == old, $sformatf("random access %0d at %0d", k, addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
