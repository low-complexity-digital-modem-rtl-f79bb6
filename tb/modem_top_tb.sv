// modem_top_tb: end-to-end loopback of the whole baseband (2 FPGAs x 2
// channels, default parameters). For every channel it uploads transmitter
// LUT products for a short pulse that is pre-rotated by +90 degrees
// (pre-equalization), downloads them into the LUTs, and writes receiver
// coefficients that pick each symbol's sample and undo an I/Q imbalance.
// The testbench closes the loop DAC -> channel -> ADC: the channel rotates by
// -90 degrees, leaks a quarter of I into Q and adds a little noise. Random
// symbols (with gaps in the valid strobe) must come back unchanged one beat
// later. Also counted, each must happen: LUT downloads, input gaps, symbols
// that would be wrong without the pre-rotation, and symbols that would be
// wrong without the I/Q imbalance compensation.
`timescale 1ns/1ps
module modem_top_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  localparam int NF = 2, NC = 2, NB = 60;
  localparam int OFF[3] = '{0, 1, 3};            // sample offset of phase p within a group of 4
  localparam int RX_TAP[3] = '{4, 4, 3};         // Rx tap that picks symbol 3m+p
  localparam int G = 32;                         // Tx main tap

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  int gaps = 0, loads = 0, preeq_needed = 0, iq_needed = 0, sym_ok = 0, rx_beats = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        [NF-1:0]                   tx_valid, dac_valid, adc_valid, rx_valid;
  sym_t        [NF-1:0][NC-1:0][5:0]      tx_sym, rx_sym;
  dac_sample_t [NF-1:0][NC-1:0][7:0]      dac_samp;
  adc_sample_t [NF-1:0][NC-1:0][7:0]      adc_samp;
  logic        [NF-1:0]                   txc_we, rxc_we;
  logic        [NF-1:0][0:0]              txc_ch, rxc_ch;
  logic        [NF-1:0][10:0]             txc_addr;
  tx_lut_word_t [NF-1:0]                  txc_data;
  logic        [NF-1:0][NC-1:0]           txc_load, txc_busy;
  logic        [NF-1:0][1:0]              rxc_phase;
  logic        [NF-1:0][5:0]              rxc_tap;
  rx_coef_t    [NF-1:0]                   rxc_data;
  logic        [NF-1:0][NC-1:0][10:0]     rx_thr;

  modem_top dut (
    .clk, .rst_n, .tx_valid, .tx_sym, .dac_valid, .dac_samp, .adc_valid, .adc_samp,
    .rx_valid, .rx_sym, .txc_we, .txc_ch, .txc_addr, .txc_data, .txc_load, .txc_busy,
    .rxc_we, .rxc_ch, .rxc_phase, .rxc_tap, .rxc_data, .rx_thr
  );

  int hr[3][32], hi[3][32];
  int syms[NF][NC][NB*6];
  int tx_beat = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int prod_re(input int p, input int j, input int s);
    return hr[p][j] * axis_amp(s >> 2) - hi[p][j] * axis_amp(s);
  endfunction
  function automatic int prod_im(input int p, input int j, input int s);
    return hr[p][j] * axis_amp(s) + hi[p][j] * axis_amp(s >> 2);
  endfunction

  // nearest 16QAM decision of one axis value, amplitude a per level step
  function automatic int dec(input int v, input int a);
    int best, bd;
    best = 0; bd = 1 << 30;
    for (int l = 0; l < 4; l++) begin
      int d;
      d = v - (2 * l - 3) * a;
      if (d < 0) d = -d;
      if (d < bd) begin bd = d; best = l; end
    end
    return gray2(best);
  endfunction

  // ------------------------------------------------------------ channel
  // DAC -> rotate by -90 degrees -> I/Q leak -> noise -> ADC, one clock.
  always @(posedge clk) begin
    adc_valid <= dac_valid;
    for (int f = 0; f < NF; f++)
      for (int c = 0; c < NC; c++)
        for (int q = 0; q < 8; q++) begin
          int yr, yi, xr, xi;
          yr = int'(dac_samp[f][c][q].re);
          yi = int'(dac_samp[f][c][q].im);
          xr = yi;                                   // multiply by -j
          xi = -yr;
          xi = xi + (xr >>> 2);                      // I/Q imbalance
          xr = xr + int'($urandom_range(0, 4)) - 2;  // noise
          xi = xi + int'($urandom_range(0, 4)) - 2;
          if (xr > 127) xr = 127; if (xr < -128) xr = -128;
          if (xi > 127) xi = 127; if (xi < -128) xi = -128;
          adc_samp[f][c][q].re <= 8'(xr);
          adc_samp[f][c][q].im <= 8'(xi);
          // at a symbol position: would the symbol be wrong without pre-rotation
          // (naive slicing of the DAC sample) or without I/Q compensation?
          if (dac_valid[f] && (q % 4) != 2) begin
            int a;
            a = G;
            if ((dec(yr, a) << 2 | dec(yi, a)) != (dec(xr, a) << 2 | dec(-yr, a))) preeq_needed++;
            if (dec(xi, a) != dec(-yr, a)) iq_needed++;
          end
        end
  end

  // ------------------------------------------------------------ configuration
  initial begin
    tx_valid = '0; tx_sym = '0; txc_we = '0; rxc_we = '0; txc_ch = '0; rxc_ch = '0;
    txc_addr = '0; txc_data = '0; txc_load = '0; rxc_phase = '0; rxc_tap = '0; rxc_data = '0;
    rx_thr = '0; adc_samp = '0; adc_valid = '0;
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < 32; j++) begin
        hr[p][j] = 0;
        hi[p][j] = (j == 4 + OFF[p]) ? G : (j == 3 + OFF[p] || j == 5 + OFF[p]) ? 2 : 0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      for (int r = 0; r < 4; r++)
        for (int t = 0; t < 24; t++)
          for (int s = 0; s < 16; s++) begin
            int p, d;
            p = t % 3; d = t / 3;
            @(negedge clk);
            txc_we = '1; txc_ch = '{default: 1'(c)};
            txc_addr = '{default: 11'((r * 24 + t) * 16 + s)};
            txc_data = '{default: '{re: 12'(prod_re(p, r + 4 * d, s)), im: 12'(prod_im(p, r + 4 * d, s))}};
          end
      @(negedge clk);
      txc_we = '0;
      for (int f = 0; f < NF; f++) txc_load[f][c] = 1'b1;
      @(negedge clk);
      txc_load = '0;
      // Rx: one tap per phase: re = xr, im = xi - xr/4
      for (int p = 0; p < 3; p++) begin
        @(negedge clk);
        rxc_we = '1; rxc_ch = '{default: 1'(c)};
        rxc_phase = '{default: 2'(p)}; rxc_tap = '{default: 6'(RX_TAP[p])};
        rxc_data = '{default: '{ar: 12'sd1024, ai: -12'sd256, br: 12'sd0, bi: 12'sd1024}};
      end
      @(negedge clk);
      rxc_we = '0;
      while (txc_busy != '0) @(negedge clk);
      loads++;
    end
    rx_thr = '{default: '{default: 11'd32}};
    // ---------------------------------------------------------- data
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        tx_valid = '0; gaps++;
        @(negedge clk);
      end
      tx_valid = '1;
      for (int f = 0; f < NF; f++)
        for (int c = 0; c < NC; c++)
          for (int i = 0; i < 6; i++) begin
            syms[f][c][6*b + i] = int'($urandom_range(0, 15));
            tx_sym[f][c][i] = 4'(syms[f][c][6*b + i]);
          end
    end
    @(negedge clk); tx_valid = '0;
    repeat (30) @(posedge clk);
    checks++;
    if (rx_beats != NB) begin failures++; $display("FAIL: %0d rx beats, expected %0d", rx_beats, NB); end
    checks++; if (loads != NC)       begin failures++; $display("FAIL: LUT download not exercised"); end
    checks++; if (gaps == 0)         begin failures++; $display("FAIL: no valid gap exercised"); end
    checks++; if (preeq_needed == 0) begin failures++; $display("FAIL: pre-equalization never mattered"); end
    checks++; if (iq_needed == 0)    begin failures++; $display("FAIL: I/Q compensation never mattered"); end
    $display("downloads=%0d gaps=%0d preeq_needed=%0d iq_needed=%0d symbols_ok=%0d",
             loads, gaps, preeq_needed, iq_needed, sym_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ receive check
  // Rx beat b holds the symbols sent in Tx beat b-1.
  always @(posedge clk) if (rst_n && rx_valid[0]) begin
    checks++;
    if (rx_valid != '1) begin failures++; $display("FAIL: rx_valid differs between FPGAs"); end
    if (rx_beats >= 1)
      for (int f = 0; f < NF; f++)
        for (int c = 0; c < NC; c++)
          for (int l = 0; l < 6; l++) begin
            int e;
            e = syms[f][c][6 * (rx_beats - 1) + l];
            checks++;
            if (int'(rx_sym[f][c][l]) != e) begin
              failures++;
              if (failures < 20)
                $display("FAIL fpga %0d ch %0d beat %0d lane %0d: got %0d exp %0d",
                         f, c, rx_beats, l, rx_sym[f][c][l], e);
            end else sym_ok++;
          end
    rx_beats++;
  end
endmodule
