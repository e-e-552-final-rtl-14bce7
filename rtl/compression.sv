// compression: pattern-matching compression engine and keyboard function
// decoder.
//
// Each accepted character becomes one or two 5-bit words for the message RAM.
// A character in the 16-entry preset table (tmc_pkg) becomes one word,
// 1 & index. Any other character is split into two words, 0 & high nibble then
// 0 & low nibble. The engine also decodes the function keys: Enter ends the
// current message (end_msg), and the read command (Shift key, or the Select
// button through read_btn) makes the next key a message number: a digit
// '0'..'7' gives rd_req with rd_num, any other key cancels the command. At
// most MAX_CHARS characters are stored per message; later ones are dropped
// until the next Enter.
//
// Handshake with the keyboard: din_valid is a long pulse. The engine latches
// din while it is high and starts only after it falls, so one stroke is
// stored once. Handshake with the RAM side: a word is offered on dout with
// dout_valid and stays until a clock where ram_ready is also high. end_msg and
// rd_req are one-cycle pulses issued only while ram_ready is high.
// Input strokes that arrive while the engine is still busy are ignored.
//
// The word format, the nibble split, start-after-valid-falls and the RAM-led
// handshake follow the report; the exact valid/ready rule, the digit encoding
// of message numbers and the cancel rule are this design's own choices.
module compression
  import tmc_pkg::*;
#(
  parameter int unsigned MAX_CHARS = 50   // characters per message
) (
  input  logic       clk,
  input  logic       rst,
  input  ascii_t     din,
  input  logic       din_valid,   // long pulse from the keyboard
  input  logic       read_btn,    // one-cycle pulse: read command
  input  logic       ram_ready,   // RAM side can take a word or command
  output word_t      dout,
  output logic       dout_valid,
  output logic       end_msg,     // one-cycle pulse: message complete
  output logic       rd_req,      // one-cycle pulse: display message rd_num
  output logic [2:0] rd_num,
  output logic       rd_mode      // a read command is waiting for its digit
);

  typedef enum logic [2:0] {
    S_IDLE, S_ARMED, S_DECODE, S_SEND1, S_SEND_HI, S_SEND_LO, S_END, S_READ
  } state_t;

  state_t  state;
  ascii_t  ch;
  logic [4:0] hit;
  logic [$clog2(MAX_CHARS+1)-1:0] nchars;

  assign hit = preset_index(ch);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      ch      <= '0;
      nchars  <= '0;
      rd_mode <= 1'b0;
      rd_num  <= '0;
    end else begin
      if (read_btn) rd_mode <= 1'b1;
      unique case (state)
        S_IDLE:  if (din_valid) begin
                   ch    <= din;
                   state <= S_ARMED;
                 end
        S_ARMED: if (din_valid) ch <= din;
                 else           state <= S_DECODE;
        S_DECODE: begin
          if (rd_mode) begin
            rd_mode <= 1'b0;
            if (ch >= 8'h30 && ch <= 8'h37) begin
              rd_num <= ch[2:0];
              state  <= S_READ;
            end else begin
              state <= S_IDLE;
            end
          end else if (ch == CMD_READ) begin
            rd_mode <= 1'b1;
            state   <= S_IDLE;
          end else if (ch == ASCII_CR) begin
            state <= S_END;
          end else if (nchars == MAX_CHARS[$bits(nchars)-1:0]) begin
            state <= S_IDLE;
          end else begin
            nchars <= nchars + 1'b1;
            state  <= hit[4] ? S_SEND1 : S_SEND_HI;
          end
        end
        S_SEND1, S_SEND_LO: if (ram_ready) state <= S_IDLE;
        S_SEND_HI:          if (ram_ready) state <= S_SEND_LO;
        S_END:  if (ram_ready) begin
                  nchars <= '0;
                  state  <= S_IDLE;
                end
        S_READ: if (ram_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    dout       = '0;
    dout_valid = 1'b0;
    unique case (state)
      S_SEND1:   begin dout = {1'b1, hit[3:0]}; dout_valid = 1'b1; end
      S_SEND_HI: begin dout = {1'b0, ch[7:4]};  dout_valid = 1'b1; end
      S_SEND_LO: begin dout = {1'b0, ch[3:0]};  dout_valid = 1'b1; end
      default: ;
    endcase
  end

  assign end_msg = (state == S_END)  && ram_ready;
  assign rd_req  = (state == S_READ) && ram_ready;

  // An offered word stays, unchanged, until the RAM side takes it.
  a_word_held: assert property (@(posedge clk) disable iff (rst)
    dout_valid && !ram_ready |=> dout_valid && $stable(dout));
  // Nothing is sent to the RAM side while the key pulse is still high.
  a_after_key: assert property (@(posedge clk) disable iff (rst)
    din_valid && state == S_ARMED |-> !dout_valid);

endmodule
