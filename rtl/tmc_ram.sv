// tmc_ram: message memory, 1024 words of 5 bits (5120 bits).
//
// A single-port synchronous RAM in the style of an FPGA embedded array block
// used as "RAM with one data port": address, write data and write enable are
// taken at the rising clock edge; a write stores wdata, and every access
// places the addressed word on rdata one clock later (on a write, the old
// word). The size follows the report (1024 five-bit words, 8 message slots of
// up to 100 words); the read-during-write behaviour is this design's choice.
// Contents are not cleared at reset; only written words are ever read.
module tmc_ram
  import tmc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    wdata,
  output word_t                    rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
