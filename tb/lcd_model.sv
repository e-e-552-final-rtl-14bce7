// lcd_model: behavioural model of an HD44780-compatible character LCD, for
// testbenches only.
//
// Latches the bus on the falling edge of lcd_en. With lcd_rs = 1 the byte is
// written to display RAM at the cursor and the cursor moves right; with
// lcd_rs = 0 it is an instruction: 0x01 clears the display RAM to spaces and
// homes the cursor, 0x80 | a sets the cursor to address a, 0x38 / 0x06 / 0x0E
// (function set, entry mode, display on) are counted. Testbenches read the
// counters (clear_log() resets them after power-up), the display RAM (line one at 0x00, line two at 0x40) and the
// queue of all characters written.
module lcd_model (
  input logic [7:0] lcd_data,
  input logic       lcd_rs,
  input logic       lcd_rw,
  input logic       lcd_en
);
  logic [7:0] ddram [128];
  logic [6:0] cursor = '0;
  int n_func = 0, n_entry = 0, n_dispon = 0, n_clear = 0, n_addr = 0, n_write = 0;
  int n_line2 = 0;
  logic [7:0] written [$];
  logic [7:0] instr [$];   // all instructions, in order

  initial for (int i = 0; i < 128; i++) ddram[i] = 8'h20;

  always @(negedge lcd_en) begin
    if (!lcd_rw) begin
      if (lcd_rs) begin
        ddram[cursor] = lcd_data;
        written.push_back(lcd_data);
        cursor = cursor + 7'd1;
        n_write++;
      end else begin
        instr.push_back(lcd_data);
        if (lcd_data[7]) begin
          cursor = lcd_data[6:0];
          n_addr++;
          if (lcd_data[6:0] == 7'h40) n_line2++;
        end else if (lcd_data == 8'h01) begin
          for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
          cursor = '0;
          n_clear++;
        end else if (lcd_data == 8'h38) n_func++;
        else if (lcd_data == 8'h06) n_entry++;
        else if (lcd_data == 8'h0E) n_dispon++;
      end
    end
  end

  // forget everything seen so far (bus activity before the controller's reset)
  function automatic void clear_log();
    n_func = 0; n_entry = 0; n_dispon = 0; n_clear = 0; n_addr = 0; n_write = 0;
    n_line2 = 0;
    written.delete();
    instr.delete();
  endfunction

  // the 16 characters of line 1 or 2 as a string
  function automatic string line(input int n);
    string s;
    s = "";
    for (int i = 0; i < 16; i++) s = {s, string'(ddram[(n == 2 ? 8'h40 : 8'h00) + i])};
    return s;
  endfunction
endmodule
