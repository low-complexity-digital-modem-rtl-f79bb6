// qam16_demapper: hard-decision 16QAM demodulation of the equalized symbols.
//
// Each axis of a symbol is sliced against 0 and +/-thr, where thr is twice
// the received amplitude of the innermost level (levels -3A, -A, +A, +3A;
// thr = 2A), and mapped with a Gray code per axis:
//   v < -thr : 00    -thr <= v < 0 : 01    0 <= v < thr : 11    v >= thr : 10
// The 4 bits of a symbol are {I bits, Q bits}, the same symbol index the
// transmitter filter's LUTs are addressed with. Six symbols per clock.
// Timing: one register stage; out_valid follows in_valid by 1 clock.
// The document states 16QAM; the slicer, the Gray mapping and the external
// threshold are this design's own.
module qam16_demapper
  import modem_pkg::*;
#(
  parameter int unsigned W = RX_OUT_W,
  parameter int unsigned N = SYM_PER_CLK
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [N-1:0][W-1:0] sym_re,
  input  logic signed [N-1:0][W-1:0] sym_im,
  input  logic        [W-2:0]       thr,
  output logic                      out_valid,
  output sym_t        [N-1:0]       bits_out
);

  function automatic logic [1:0] slice(input logic signed [W-1:0] v,
                                       input logic signed [W-1:0] t);
    if (v < -t)       return 2'b00;
    else if (v < 0)   return 2'b01;
    else if (v < t)   return 2'b11;
    else              return 2'b10;
  endfunction

  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      bits_out[i] <= {slice(sym_re[i], signed'({1'b0, thr})),
                      slice(sym_im[i], signed'({1'b0, thr}))};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
