// tx_coef_bram: block memory that receives the transmitter filter contents
// uploaded by the host after channel sounding.
//
// Simple dual-port RAM: a write port for the host and a read port with one
// clock of latency (registered output, as a block RAM) used to download the
// contents into the LUT memories. Default size is 1536 words of 24 bits
// (36 Kbit, one 36 Kbit block RAM): for each of the 4 output-sample phases,
// each of the 24 terms and each of the 16 symbol values one complex 12-bit
// product. Word address = (phase * 24 + term) * 16 + symbol.
// No reset; the output register holds its last value when rd_en is low.
module tx_coef_bram
  import modem_pkg::*;
#(
  parameter int unsigned DEPTH = 4 * TX_TERMS * (2**SYM_W),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  tx_lut_word_t  wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output tx_lut_word_t  rdata
);

  tx_lut_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    if (rd_en)                   rdata      <= mem[raddr];
  end

endmodule
