// tx_lut_mem: small LUT (distributed) memory of the transmitter filter.
//
// One tx_lut_mem serves one of the 24 symbols that contribute to a Tx output
// sample. Entry s holds the complex product of that symbol's filter tap with
// the constellation point of symbol index s, so the filter needs no
// multipliers: the symbol index is the read address. The contents are written
// through the write port when the coefficients are downloaded from the block
// memory. Read is asynchronous (LUT RAM); write is synchronous. There is no
// reset: contents are defined by the download.
// Storing precomputed products is this design's reading of the LUT memories;
// the depth follows from the 16QAM symbol (4 bits).
module tx_lut_mem
  import modem_pkg::*;
#(
  parameter int unsigned AW = SYM_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  tx_lut_word_t  wdata,
  input  logic [AW-1:0] raddr,
  output tx_lut_word_t  rdata
);

  tx_lut_word_t mem [2**AW];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
