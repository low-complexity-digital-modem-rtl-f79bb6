// modem_top: digital baseband platform of the 20 Gbps point-to-point modem.
//
// Two FPGAs (N_FPGA), each with two complex channels, give four 2.5 GHz-wide
// channels of 16QAM at 1.875 Gsps; after coding this carries 2 x 10 Gbps of
// Ethernet traffic in each direction. Every channel has a transmitter filter
// bank (rate conversion 1.875 -> 2.5 Gsps, RRC pulse shaping and
// pre-equalization by LUT lookup) and a receiver filter bank (rate
// conversion 2.5 -> 1.875 Gsps, equalization and I/Q imbalance compensation)
// followed by a 16QAM slicer. Everything the document only names (Ethernet,
// LDPC, synchronization, channel estimation, converter interfaces) connects
// through the ports: coded symbol indices in and out, DAC and ADC sample
// buses, and the coefficient configuration ports written by the host.
// All ports are indexed [fpga][channel][lane]. One 312.5 MHz clock.
// Latencies: Tx 5 clocks, Rx 6 clocks.
module modem_top
  import modem_pkg::*;
#(
  parameter int unsigned N_FPGA = 2,
  parameter int unsigned NCH    = 2,
  localparam int unsigned TX_AW = $clog2(4 * TX_TERMS * (2**SYM_W)),
  localparam int unsigned CHW   = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic                                             clk,
  input  logic                                             rst_n,
  input  logic        [N_FPGA-1:0]                         tx_valid,
  input  sym_t        [N_FPGA-1:0][NCH-1:0][SYM_PER_CLK-1:0]  tx_sym,
  output logic        [N_FPGA-1:0]                         dac_valid,
  output dac_sample_t [N_FPGA-1:0][NCH-1:0][SAMP_PER_CLK-1:0] dac_samp,
  input  logic        [N_FPGA-1:0]                         adc_valid,
  input  adc_sample_t [N_FPGA-1:0][NCH-1:0][SAMP_PER_CLK-1:0] adc_samp,
  output logic        [N_FPGA-1:0]                         rx_valid,
  output sym_t        [N_FPGA-1:0][NCH-1:0][SYM_PER_CLK-1:0]  rx_sym,
  input  logic        [N_FPGA-1:0]                         txc_we,
  input  logic        [N_FPGA-1:0][CHW-1:0]                txc_ch,
  input  logic        [N_FPGA-1:0][TX_AW-1:0]              txc_addr,
  input  tx_lut_word_t [N_FPGA-1:0]                        txc_data,
  input  logic        [N_FPGA-1:0][NCH-1:0]                txc_load,
  output logic        [N_FPGA-1:0][NCH-1:0]                txc_busy,
  input  logic        [N_FPGA-1:0]                         rxc_we,
  input  logic        [N_FPGA-1:0][CHW-1:0]                rxc_ch,
  input  logic        [N_FPGA-1:0][1:0]                    rxc_phase,
  input  logic        [N_FPGA-1:0][$clog2(RX_TAPS)-1:0]    rxc_tap,
  input  rx_coef_t    [N_FPGA-1:0]                         rxc_data,
  input  logic        [N_FPGA-1:0][NCH-1:0][RX_OUT_W-2:0]  rx_thr
);

  for (genvar f = 0; f < N_FPGA; f++) begin : g_fpga
    modem_fpga #(.NCH(NCH)) u_fpga (
      .clk, .rst_n,
      .tx_valid (tx_valid[f]),  .tx_sym  (tx_sym[f]),
      .dac_valid(dac_valid[f]), .dac_samp(dac_samp[f]),
      .adc_valid(adc_valid[f]), .adc_samp(adc_samp[f]),
      .rx_valid (rx_valid[f]),  .rx_sym  (rx_sym[f]),
      .txc_we   (txc_we[f]),    .txc_ch  (txc_ch[f]),   .txc_addr(txc_addr[f]),
      .txc_data (txc_data[f]),  .txc_load(txc_load[f]), .txc_busy(txc_busy[f]),
      .rxc_we   (rxc_we[f]),    .rxc_ch  (rxc_ch[f]),   .rxc_phase(rxc_phase[f]),
      .rxc_tap  (rxc_tap[f]),   .rxc_data(rxc_data[f]), .rx_thr  (rx_thr[f])
    );
  end

endmodule
