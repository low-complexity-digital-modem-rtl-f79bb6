// rx_filter: receiver filter bank. Converts 8 received samples per clock
// (2.5 Gsps) into 6 equalized symbols per clock (1.875 Gsps), removing the
// channel response and the I/Q imbalance in the same filters.
//
// Symbol k = 3m + p is produced by polyphase filter p (p = 0, 1, 2), whose
// window ends at received sample 4m + p: the three phases sit at fractional
// offsets 0, 1/3 and 2/3 of a sample from the window end, the rest of each
// symbol's timing being carried by its coefficients:
//   z[3m+p] = sum_{j=0}^{TAPS-1} W_p[j] (x[4m+p-j])
// where W_p is the widely-linear weight of rx_poly_filter. Input beat c holds
// x[8c .. 8c+7] (sym_in[i] = x[8c+i]); output beat c holds z[6c .. 6c+5]
// (sym_out[l] = z[6c+l]), so lane l uses phase l%3 and m = 2c + l/3. The
// filter keeps the previous HIST_BEATS input beats, enough for the longest
// window.
//
// Coefficients are written one tap at a time (coef_we, coef_phase, coef_tap,
// coef_data) by the channel-estimation logic; they take effect on the next
// clock. All six lanes of one phase share that phase's coefficient set.
// Timing: out_valid follows in_valid by 5 clocks (1 product stage + 4 tree
// levels); the filter accepts a beat every clock and never stalls.
// The window alignment, the coefficient write port and its layout are this
// design's choices; the rates, the three phases, the two-part filters, the
// 54 taps and the tree follow the document.
module rx_filter
  import modem_pkg::*;
#(
  parameter int unsigned TAPS   = RX_TAPS,
  parameter int unsigned PSHIFT = 8,
  localparam int unsigned OUT_W = RX_DATA_W - tree_levels(TAPS) + 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // received samples
  input  logic                           in_valid,
  input  adc_sample_t [SAMP_PER_CLK-1:0] samp_in,
  // coefficient write port
  input  logic                           coef_we,
  input  logic [1:0]                     coef_phase,
  input  logic [$clog2(TAPS)-1:0]        coef_tap,
  input  rx_coef_t                       coef_data,
  // equalized symbols
  output logic                           out_valid,
  output logic signed [SYM_PER_CLK-1:0][OUT_W-1:0] sym_re,
  output logic signed [SYM_PER_CLK-1:0][OUT_W-1:0] sym_im
);

  // Previous input beats needed: the oldest sample used in beat c is
  // x[8c - (TAPS - 1)] (lane 0), i.e. TAPS-1 samples before the beat.
  localparam int unsigned HIST_BEATS = (TAPS - 1 + SAMP_PER_CLK - 1) / SAMP_PER_CLK;
  localparam int unsigned HIST = HIST_BEATS * SAMP_PER_CLK;
  localparam int unsigned BUF  = HIST + SAMP_PER_CLK;

  // ---------------------------------------------------------------- coefficients
  rx_coef_t coef [N_PHASE][TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PHASE; p++)
        for (int j = 0; j < TAPS; j++)
          coef[p][j] <= '0;
    end else if (coef_we && coef_phase < 2'(N_PHASE) && coef_tap < $bits(coef_tap)'(TAPS)) begin
      coef[coef_phase][coef_tap] <= coef_data;
    end
  end

  // ---------------------------------------------------------------- sample history
  // buffer[i] = x[8c - HIST + i]; the last SAMP_PER_CLK entries are the current beat.
  adc_sample_t hist [HIST];
  adc_sample_t buffer [BUF];

  always_comb begin
    for (int i = 0; i < HIST; i++)          buffer[i]        = hist[i];
    for (int i = 0; i < SAMP_PER_CLK; i++)  buffer[HIST + i] = samp_in[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < HIST; i++) hist[i] <= buffer[i + SAMP_PER_CLK];
    end
  end

  // ---------------------------------------------------------------- polyphase lanes
  logic [SYM_PER_CLK-1:0] lane_vld;

  for (genvar l = 0; l < SYM_PER_CLK; l++) begin : g_lane
    localparam int unsigned P   = l % N_PHASE;
    localparam int unsigned END = HIST + 4 * (l / N_PHASE) + P;   // buffer index of window end

    adc_sample_t [TAPS-1:0] win;
    rx_coef_t    [TAPS-1:0] cf;

    always_comb begin
      for (int j = 0; j < TAPS; j++) begin
        win[j] = buffer[END - j];
        cf[j]  = coef[P][j];
      end
    end

    rx_poly_filter #(.TAPS(TAPS), .PSHIFT(PSHIFT)) u_poly (
      .clk, .rst_n, .in_valid,
      .win, .coef(cf),
      .out_valid(lane_vld[l]),
      .out_re(sym_re[l]),
      .out_im(sym_im[l])
    );
  end

  assign out_valid = lane_vld[0];

  // Every lane runs the same pipeline.
  assert property (@(posedge clk) disable iff (!rst_n) lane_vld == {SYM_PER_CLK{lane_vld[0]}});

endmodule
