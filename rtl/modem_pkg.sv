// modem_pkg: constants shared by the filters of the 20 Gbps single-carrier modem.
//
// The baseband runs on one 312.5 MHz fabric clock. Data symbols arrive at
// 1.875 Gsps (6 per clock) and converter samples run at 2.5 Gsps (8 per
// clock), so both filters convert between the two rates in the ratio 4/3
// with a bank of three polyphase filters. The numbers below are the
// document's; the word widths marked "chosen" are this design's own.
package modem_pkg;

  localparam int unsigned SYM_PER_CLK  = 6;   // 1.875 Gsps / 312.5 MHz
  localparam int unsigned SAMP_PER_CLK = 8;   // 2.5 Gsps / 312.5 MHz
  localparam int unsigned N_PHASE      = 3;   // polyphase filters in each bank

  // Transmitter filter
  localparam int unsigned TX_TAPS      = 32;  // length of each Tx filter (samples)
  localparam int unsigned TX_TERMS     = 24;  // symbols contributing to one output sample
  localparam int unsigned TX_LUT_W     = 12;  // width of one LUT output (per I or Q)
  localparam int unsigned SYM_W        = 4;   // 16QAM symbol index

  // Receiver filter
  localparam int unsigned RX_TAPS      = 54;  // length of each Rx filter (samples)
  localparam int unsigned RX_DATA_W    = 13;  // width of a product entering the addition tree
  localparam int unsigned ADC_W        = 8;   // chosen: ADC sample width
  localparam int unsigned RX_COEF_W    = 12;  // chosen: Rx coefficient width

  // Number of 3-input adder levels needed to reduce n words to one.
  function automatic int unsigned tree_levels(int unsigned n);
    int unsigned l = 0;
    while (n > 1) begin
      n = (n + 2) / 3;
      l++;
    end
    return (l == 0) ? 1 : l;
  endfunction

  // Derived widths
  localparam int unsigned TX_OUT_W = TX_LUT_W + 2 * tree_levels(TX_TERMS); // full-precision Tx sum
  localparam int unsigned RX_OUT_W = RX_DATA_W - tree_levels(RX_TAPS) + 3;  // last Rx tree level + 2

  typedef logic [SYM_W-1:0] sym_t;                  // 16QAM symbol index {I bits, Q bits}

  typedef struct packed {                           // one LUT word: coefficient x symbol
    logic signed [TX_LUT_W-1:0] re;
    logic signed [TX_LUT_W-1:0] im;
  } tx_lut_word_t;

  typedef struct packed {                           // one DAC sample pair (I and Q)
    logic signed [TX_OUT_W-1:0] re;
    logic signed [TX_OUT_W-1:0] im;
  } dac_sample_t;

  typedef struct packed {                           // one ADC sample pair (I and Q)
    logic signed [ADC_W-1:0] re;
    logic signed [ADC_W-1:0] im;
  } adc_sample_t;

  // One Rx tap of the widely-linear filter: the real part of the received
  // signal is weighted by (ar + j ai), the imaginary part by (br + j bi).
  typedef struct packed {
    logic signed [RX_COEF_W-1:0] ar;
    logic signed [RX_COEF_W-1:0] ai;
    logic signed [RX_COEF_W-1:0] br;
    logic signed [RX_COEF_W-1:0] bi;
  } rx_coef_t;

  typedef struct packed {                           // one equalized symbol
    logic signed [RX_OUT_W-1:0] re;
    logic signed [RX_OUT_W-1:0] im;
  } rx_sym_t;

endpackage
