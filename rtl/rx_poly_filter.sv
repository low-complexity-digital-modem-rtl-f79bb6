// rx_poly_filter: one polyphase filter of the receiver bank; produces one
// equalized complex symbol from a window of RX_TAPS received samples.
//
// The filter has two parts, one for the real and one for the imaginary part of
// the received signal, whose outputs are added (a widely-linear filter). With
// independent complex weights on the two parts it undoes I/Q imbalance as well
// as the channel response:
//   z = sum_j (ar[j] + j*ai[j]) * xr[j] + (br[j] + j*bi[j]) * xi[j]
// For each tap j the two products that feed the real output (ar*xr + br*xi)
// are formed together, as a cascaded DSP multiplier pair would, and likewise
// for the imaginary output, so each output part has RX_TAPS data words. Each
// data word is scaled by 2^-PSHIFT and saturated to RX_DATA_W (13) bits, then
// summed by a four-level add_tree3 (13/12/11/10-bit levels).
//
// Ports: win[j] is the sample j samples before the newest one of the window;
// coef[j] is the weight applied to win[j]. The filter keeps no state besides
// its pipeline. Latency: 1 clock for the products + 4 clocks of tree.
// The products-per-tap arrangement, PSHIFT and the saturation are this
// design's choices; tap count, the two-part structure and the tree follow
// the document.
module rx_poly_filter
  import modem_pkg::*;
#(
  parameter int unsigned TAPS   = RX_TAPS,
  parameter int unsigned PSHIFT = 8,
  localparam int unsigned OUT_W = RX_DATA_W - tree_levels(TAPS) + 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  adc_sample_t [TAPS-1:0]    win,
  input  rx_coef_t    [TAPS-1:0]    coef,
  output logic                      out_valid,
  output logic signed [OUT_W-1:0]   out_re,
  output logic signed [OUT_W-1:0]   out_im
);

  localparam int unsigned PW = ADC_W + RX_COEF_W + 1;   // sum of two products
  localparam logic signed [PW-1:0] DMAX = PW'((1 << (RX_DATA_W - 1)) - 1);
  localparam logic signed [PW-1:0] DMIN = -PW'(1 << (RX_DATA_W - 1));

  function automatic logic signed [RX_DATA_W-1:0] scale(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] t;
    t = v >>> PSHIFT;
    if (t > DMAX)      t = DMAX;
    else if (t < DMIN) t = DMIN;
    return RX_DATA_W'(t);
  endfunction

  // Sum of two products at full precision (operands sign-extended to PW).
  function automatic logic signed [PW-1:0] mac2(
    input logic signed [RX_COEF_W-1:0] c0, input logic signed [ADC_W-1:0] x0,
    input logic signed [RX_COEF_W-1:0] c1, input logic signed [ADC_W-1:0] x1);
    logic signed [PW-1:0] p0, p1;
    p0 = PW'(c0) * PW'(x0);
    p1 = PW'(c1) * PW'(x1);
    return p0 + p1;
  endfunction

  logic signed [TAPS-1:0][RX_DATA_W-1:0] data_re, data_im;
  logic                                  data_vld;

  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < TAPS; j++) begin
      data_re[j] <= scale(mac2(coef[j].ar, win[j].re, coef[j].br, win[j].im));
      data_im[j] <= scale(mac2(coef[j].ai, win[j].re, coef[j].bi, win[j].im));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) data_vld <= 1'b0;
    else        data_vld <= in_valid;

  logic vld_im;

  add_tree3 #(.N_IN(TAPS), .IN_W(RX_DATA_W), .NARROW(1'b1)) u_tree_re (
    .clk, .rst_n, .in_valid(data_vld), .in_data(data_re),
    .out_valid(out_valid), .out_data(out_re)
  );

  add_tree3 #(.N_IN(TAPS), .IN_W(RX_DATA_W), .NARROW(1'b1)) u_tree_im (
    .clk, .rst_n, .in_valid(data_vld), .in_data(data_im),
    .out_valid(vld_im), .out_data(out_im)
  );

  // Both trees share one pipeline; their valid bits never differ.
  assert property (@(posedge clk) disable iff (!rst_n) out_valid == vld_im);

endmodule
