// msgcounter: message and address counters in front of the message RAM.
//
// The RAM is split into MSGS slots of STRIDE = DEPTH/MSGS words (8 slots of
// 128 addresses, of which a 50-character message uses at most 100). A message
// counter says which slot is being filled and an address counter counts the
// words written into it. Compressed words from the compression engine are
// written at slot base + address counter. end_msg closes the message: its
// length is kept in a small length table and the message counter moves to
// the next slot. Once MSGS messages are stored the centre is full and further
// words and Enters are accepted but discarded (messages cannot be deleted).
// An empty message (Enter with nothing typed) is not stored.
//
// rd_req with rd_num replays a stored message: rd_start pulses once, then the
// message's words are offered on rd_word/rd_valid, the last with rd_last, each
// moving on a clock where rd_ready is high. A request for a slot not yet
// filled gives a one-cycle rd_miss pulse and nothing else.
//
// Handshake and timing: this block is the master of the input side. wr_ready
// is high only when idle; a word is taken on a clock with wr_valid and
// wr_ready high and written in the following clock, so words are accepted at
// most every second clock. The RAM has one clock of read latency, so each
// replayed word takes two clocks plus the time rd_ready stays low.
// The slot layout follows the report's 8 x 50 characters in 1024 words; the
// length table, the full and empty-message rules are this design's own.
module msgcounter
  import tmc_pkg::*;
#(
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned MSGS       = 8,
  parameter int unsigned SLOT_WORDS = 100,   // 2 words x 50 characters
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned MW        = $clog2(MSGS),
  localparam int unsigned STRIDE    = DEPTH / MSGS,
  localparam int unsigned LW        = $clog2(SLOT_WORDS + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // from compression
  input  word_t         wr_word,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic          end_msg,
  input  logic          rd_req,
  input  logic [MW-1:0] rd_num,
  // to decompression
  output logic          rd_start,
  output word_t         rd_word,
  output logic          rd_valid,
  output logic          rd_last,
  input  logic          rd_ready,
  // to the RAM
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output word_t         ram_wdata,
  input  word_t         ram_rdata,
  // status
  output logic [MW:0]   msg_count,   // messages stored, 0..MSGS
  output logic          full,
  output logic          rd_miss
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_RD_WAIT, S_RD_PRES} state_t;

  state_t          state;
  logic [LW-1:0]   wr_off;
  logic [LW-1:0]   rd_off;
  logic [LW-1:0]   rd_len;
  logic [LW-1:0]   len [MSGS];
  logic [AW-1:0]   addr_r;
  word_t           wdata_r;

  function automatic logic [AW-1:0] slot_base(input logic [MW:0] m);
    return AW'(m) * AW'(STRIDE);
  endfunction

  assign full = (msg_count == (MW+1)'(MSGS));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      msg_count <= '0;
      wr_off    <= '0;
      rd_off    <= '0;
      rd_len    <= '0;
      addr_r    <= '0;
      wdata_r   <= '0;
      rd_start  <= 1'b0;
      rd_miss   <= 1'b0;
      for (int i = 0; i < MSGS; i++) len[i] <= '0;
    end else begin
      rd_start <= 1'b0;
      rd_miss  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (wr_valid) begin
            // the word is taken even when it cannot be stored
            if (!full && wr_off != LW'(SLOT_WORDS)) begin
              addr_r  <= slot_base(msg_count) + AW'(wr_off);
              wdata_r <= wr_word;
              wr_off  <= wr_off + 1'b1;
              state   <= S_WRITE;
            end
          end else if (end_msg) begin
            if (!full && wr_off != 0) begin
              len[msg_count[MW-1:0]] <= wr_off;
              msg_count              <= msg_count + 1'b1;
              wr_off                 <= '0;
            end
          end else if (rd_req) begin
            if ({1'b0, rd_num} < msg_count) begin
              addr_r   <= slot_base({1'b0, rd_num});
              rd_off   <= '0;
              rd_len   <= len[rd_num];
              rd_start <= 1'b1;
              state    <= S_RD_WAIT;
            end else begin
              rd_miss <= 1'b1;
            end
          end
        end
        S_WRITE:   state <= S_IDLE;
        S_RD_WAIT: state <= S_RD_PRES;
        S_RD_PRES: if (rd_ready) begin
          if (rd_last) begin
            state <= S_IDLE;
          end else begin
            addr_r <= addr_r + 1'b1;
            rd_off <= rd_off + 1'b1;
            state  <= S_RD_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wr_ready  = (state == S_IDLE);
  assign ram_we    = (state == S_WRITE);
  assign ram_addr  = addr_r;
  assign ram_wdata = wdata_r;
  assign rd_valid  = (state == S_RD_PRES);
  assign rd_word   = ram_rdata;
  assign rd_last   = (rd_off == rd_len - 1'b1);

  // A replayed word stays, unchanged, until decompression takes it.
  a_rd_held: assert property (@(posedge clk) disable iff (rst)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_word) && $stable(rd_last));
  // Nothing is written into a slot beyond its SLOT_WORDS words.
  a_slot_bound: assert property (@(posedge clk) disable iff (rst)
    ram_we |-> (ram_addr % AW'(STRIDE)) < AW'(SLOT_WORDS));

endmodule
