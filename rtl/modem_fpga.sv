// modem_fpga: the filter and demodulation datapath of one baseband FPGA.
//
// One FPGA serves NCH (2) complex channels; each channel carries 16QAM at
// 1.875 Gsps over a 2.5 Gsps DAC/ADC pair. Per channel:
//   transmit: 6 symbol indices per clock -> tx_filter -> 8 DAC samples
//   receive : 8 ADC samples per clock -> rx_filter -> qam16_demapper -> 6 symbols
// The 4-bit symbol index is the bit group that the encoder delivers; the
// constellation itself lives in the Tx LUT contents. LDPC coding, the
// Ethernet interface, synchronization, channel estimation and the converter
// interfaces sit outside this module: their connections are its ports.
// Configuration ports carry a channel number; a write reaches that channel only.
// Latencies: Tx 5 clocks, Rx 6 clocks (filter 5 + demapper 1).
module modem_fpga
  import modem_pkg::*;
#(
  parameter int unsigned NCH = 2,
  localparam int unsigned TX_AW = $clog2(4 * TX_TERMS * (2**SYM_W)),
  localparam int unsigned CHW   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // transmit data
  input  logic                                   tx_valid,
  input  sym_t        [NCH-1:0][SYM_PER_CLK-1:0] tx_sym,
  output logic                                   dac_valid,
  output dac_sample_t [NCH-1:0][SAMP_PER_CLK-1:0] dac_samp,
  // receive data
  input  logic                                   adc_valid,
  input  adc_sample_t [NCH-1:0][SAMP_PER_CLK-1:0] adc_samp,
  output logic                                   rx_valid,
  output sym_t        [NCH-1:0][SYM_PER_CLK-1:0] rx_sym,
  // Tx coefficient upload / download
  input  logic                                   txc_we,
  input  logic [CHW-1:0]                         txc_ch,
  input  logic [TX_AW-1:0]                       txc_addr,
  input  tx_lut_word_t                           txc_data,
  input  logic [NCH-1:0]                         txc_load,
  output logic [NCH-1:0]                         txc_busy,
  // Rx coefficients (from channel estimation)
  input  logic                                   rxc_we,
  input  logic [CHW-1:0]                         rxc_ch,
  input  logic [1:0]                             rxc_phase,
  input  logic [$clog2(RX_TAPS)-1:0]             rxc_tap,
  input  rx_coef_t                               rxc_data,
  input  logic [NCH-1:0][RX_OUT_W-2:0]           rx_thr
);

  logic [NCH-1:0] dac_v, rxf_v, dem_v;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    logic signed [SAMP_PER_CLK-1:0][TX_OUT_W-1:0] t_re, t_im;
    logic signed [SYM_PER_CLK-1:0][RX_OUT_W-1:0]  r_re, r_im;

    tx_filter u_tx (
      .clk, .rst_n,
      .in_valid  (tx_valid),
      .sym_in    (tx_sym[ch]),
      .cw_we     (txc_we && txc_ch == CHW'(ch)),
      .cw_addr   (txc_addr),
      .cw_data   (txc_data),
      .load_start(txc_load[ch]),
      .load_busy (txc_busy[ch]),
      .out_valid (dac_v[ch]),
      .samp_re   (t_re),
      .samp_im   (t_im)
    );

    always_comb
      for (int q = 0; q < SAMP_PER_CLK; q++) begin
        dac_samp[ch][q].re = t_re[q];
        dac_samp[ch][q].im = t_im[q];
      end

    rx_filter u_rx (
      .clk, .rst_n,
      .in_valid  (adc_valid),
      .samp_in   (adc_samp[ch]),
      .coef_we   (rxc_we && rxc_ch == CHW'(ch)),
      .coef_phase(rxc_phase),
      .coef_tap  (rxc_tap),
      .coef_data (rxc_data),
      .out_valid (rxf_v[ch]),
      .sym_re    (r_re),
      .sym_im    (r_im)
    );

    qam16_demapper u_dem (
      .clk, .rst_n,
      .in_valid (rxf_v[ch]),
      .sym_re   (r_re),
      .sym_im   (r_im),
      .thr      (rx_thr[ch]),
      .out_valid(dem_v[ch]),
      .bits_out (rx_sym[ch])
    );
  end

  // All channels share the valid strobes, so their pipelines stay aligned.
  assign dac_valid = dac_v[0];
  assign rx_valid  = dem_v[0];

  assert property (@(posedge clk) disable iff (!rst_n) dac_v == {NCH{dac_v[0]}} && dem_v == {NCH{dem_v[0]}});

endmodule
