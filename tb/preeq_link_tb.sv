// preeq_link_tb: pre-equalization workload. A transmitter filter bank with
// real root-raised-cosine pulses (roll-off 0.25, 32 taps) feeds, through a
// channel with a complex echo (x[n] = y[n] + 0.35j * y[n-2]), a receiver
// filter bank with matched RRC filters (54 taps) and the 16QAM slicer. Random
// symbols are sent twice:
//   pass 0: Tx filters are the plain RRC pulses (no pre-equalization);
//   pass 1: Tx filters are the RRC pulses convolved with a truncated inverse
//           of the echo (complex taps), i.e. pre-equalized.
// For each pass the slicer threshold is calibrated from the mean output
// magnitude, then the error vector magnitude (EVM) and the symbol errors are
// measured. Pass 1 must have a lower EVM than pass 0 and no symbol errors.
// The receiver product scaling is raised (PSHIFT = 6) so that the small
// single-channel signal uses more of the 13-bit data words.
`timescale 1ns/1ps
module preeq_link_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  localparam int    NB    = 150;            // beats per pass
  localparam int    DSYM  = 33;             // end-to-end delay in symbols (Rx pulse centre)
  localparam real   BETA  = 0.25;
  localparam real   PI    = 3.14159265358979;
  localparam real   ECHO  = 0.35;           // echo 0.35j, two samples late
  localparam real   GTX   = 400.0;
  localparam real   GRX   = 1500.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUTs
  logic               tx_in_valid, cw_we, load_start, load_busy, tx_out_valid;
  sym_t [5:0]         tx_sym;
  logic [10:0]        cw_addr;
  tx_lut_word_t       cw_data;
  logic signed [7:0][17:0] y_re, y_im;

  logic               rx_in_valid, coef_we, rx_out_valid, dem_valid;
  adc_sample_t [7:0]  x_in;
  logic [1:0]         coef_phase;
  logic [5:0]         coef_tap;
  rx_coef_t           coef_data;
  logic signed [5:0][11:0] z_re, z_im;
  logic [10:0]        thr;
  sym_t [5:0]         dec_sym;

  tx_filter u_tx (.clk, .rst_n, .in_valid(tx_in_valid), .sym_in(tx_sym), .cw_we, .cw_addr,
                  .cw_data, .load_start, .load_busy, .out_valid(tx_out_valid),
                  .samp_re(y_re), .samp_im(y_im));
  rx_filter #(.PSHIFT(6)) u_rx (.clk, .rst_n, .in_valid(rx_in_valid), .samp_in(x_in), .coef_we,
                  .coef_phase, .coef_tap, .coef_data, .out_valid(rx_out_valid),
                  .sym_re(z_re), .sym_im(z_im));
  qam16_demapper u_dem (.clk, .rst_n, .in_valid(rx_out_valid), .sym_re(z_re), .sym_im(z_im),
                  .thr, .out_valid(dem_valid), .bits_out(dec_sym));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- pulses
  // Root-raised cosine, t in symbols, peak 1 - beta + 4 beta / pi.
  function automatic real rrc(input real t);
    real a, d;
    if (t < 1e-9 && t > -1e-9) return 1.0 - BETA + 4.0 * BETA / PI;
    a = 4.0 * BETA * t;
    if (a * a > 0.999999 && a * a < 1.000001)
      return BETA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * BETA)) +
                                  (1.0 - 2.0 / PI) * $cos(PI / (4.0 * BETA)));
    d = PI * t * (1.0 - a * a);
    return ($sin(PI * t * (1.0 - BETA)) + a * $cos(PI * t * (1.0 + BETA))) / d;
  endfunction

  real hre[3][32], him[3][32];

  // Tx filter p, tap j: symbol 3m+p is centred on sample 4m + 4p/3 + 16.
  task automatic make_tx(input bit preeq);
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < 32; j++) begin
        hre[p][j] = 0.0; him[p][j] = 0.0;
        // inverse of (1 + e z^-2) with e = 0.35j: sum_i (-e)^i z^-2i
        for (int i = 0; i < (preeq ? 5 : 1); i++) begin
          real g, cr, ci, mag;
          g = rrc((real'(j - 2 * i) - 16.0) * 0.75 - real'(p));
          mag = ECHO ** i;
          // (-j)^i
          case (i % 4)
            0: begin cr = mag;  ci = 0.0;  end
            1: begin cr = 0.0;  ci = -mag; end
            2: begin cr = -mag; ci = 0.0;  end
            default: begin cr = 0.0; ci = mag; end
          endcase
          hre[p][j] += g * cr;
          him[p][j] += g * ci;
        end
      end
  endtask

  function automatic int rnd12(input real v);
    int r;
    r = $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  task automatic upload_tx();
    for (int r = 0; r < 4; r++)
      for (int t = 0; t < 24; t++)
        for (int s = 0; s < 16; s++) begin
          int p, d, j;
          real ar, ai;
          p = t % 3; d = t / 3; j = r + 4 * d;
          ar = real'(axis_amp(s >> 2)); ai = real'(axis_amp(s));
          @(negedge clk);
          cw_we = 1'b1;
          cw_addr = 11'((r * 24 + t) * 16 + s);
          cw_data = '{re: 12'(rnd12(GTX * (hre[p][j] * ar - him[p][j] * ai))),
                      im: 12'(rnd12(GTX * (hre[p][j] * ai + him[p][j] * ar)))};
        end
    @(negedge clk); cw_we = 1'b0; load_start = 1'b1;
    @(negedge clk); load_start = 1'b0;
    while (load_busy) @(negedge clk);
  endtask

  // Rx filter p, tap j: matched to the symbol DSYM symbols before output 3m+p.
  task automatic upload_rx();
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < 54; j++) begin
        int c;
        c = rnd12(GRX * rrc((28.0 - real'(j)) * 0.75 - real'(p) / 4.0));
        @(negedge clk);
        coef_we = 1'b1; coef_phase = 2'(p); coef_tap = 6'(j);
        coef_data = '{ar: 12'(c), ai: 12'sd0, br: 12'sd0, bi: 12'(c)};
      end
    @(negedge clk); coef_we = 1'b0;
  endtask

  // ---------------------------------------------------------------- channel
  // x[n] = (y[n] + 0.35j y[n-2]) * 3/128, clipped to 8 bits; one clock.
  real prev_re[2], prev_im[2];
  always @(posedge clk) begin
    rx_in_valid <= tx_out_valid;
    if (tx_out_valid) begin
      real yr[10], yi[10];
      yr[0] = prev_re[0]; yi[0] = prev_im[0];
      yr[1] = prev_re[1]; yi[1] = prev_im[1];
      for (int q = 0; q < 8; q++) begin
        yr[q + 2] = real'(signed'(y_re[q]));
        yi[q + 2] = real'(signed'(y_im[q]));
      end
      for (int q = 0; q < 8; q++) begin
        real vr, vi;
        int ir, ii;
        vr = yr[q + 2] - ECHO * yi[q];
        vi = yi[q + 2] + ECHO * yr[q];
        ir = $rtoi(vr * 3.0 / 128.0 + ((vr >= 0.0) ? 0.5 : -0.5));
        ii = $rtoi(vi * 3.0 / 128.0 + ((vi >= 0.0) ? 0.5 : -0.5));
        if (ir > 127) ir = 127; if (ir < -128) ir = -128;
        if (ii > 127) ii = 127; if (ii < -128) ii = -128;
        x_in[q].re <= 8'(ir);
        x_in[q].im <= 8'(ii);
      end
      prev_re[0] = yr[8]; prev_im[0] = yi[8];
      prev_re[1] = yr[9]; prev_im[1] = yi[9];
    end
  end

  // ---------------------------------------------------------------- run
  int  syms[NB*6];
  int  rx_beat;
  int  pass_no;
  real sum_abs, n_abs, err_pow, sig_pow, amp;
  int  n_sym, n_err;
  real evm[2];
  int  errs[2];

  // Output beat c of the receive filter holds estimates of symbols 6c+l-DSYM.
  always @(posedge clk) if (rst_n && rx_out_valid) begin
    for (int l = 0; l < 6; l++) begin
      int k;
      k = 6 * rx_beat + l - DSYM;
      if (k >= 0 && rx_beat >= 10 && rx_beat < 40) begin
        sum_abs += ((z_re[l][11]) ? -real'(signed'(z_re[l])) : real'(signed'(z_re[l])));
        sum_abs += ((z_im[l][11]) ? -real'(signed'(z_im[l])) : real'(signed'(z_im[l])));
        n_abs += 2.0;
      end
      if (k >= 0 && rx_beat >= 40) begin
        real er, ei, ir, ii;
        ir = amp * real'(axis_amp(syms[k] >> 2));
        ii = amp * real'(axis_amp(syms[k]));
        er = real'(signed'(z_re[l])) - ir;
        ei = real'(signed'(z_im[l])) - ii;
        err_pow += er * er + ei * ei;
        sig_pow += ir * ir + ii * ii;
      end
    end
    rx_beat++;
  end

  int dem_beat;
  always @(posedge clk) if (rst_n && dem_valid) begin
    if (dem_beat >= 42)
      for (int l = 0; l < 6; l++) begin
        int k;
        k = 6 * dem_beat + l - DSYM;
        n_sym++;
        if (int'(dec_sym[l]) != syms[k]) n_err++;
      end
    dem_beat++;
  end

  initial begin
    tx_in_valid = 1'b0; tx_sym = '0; cw_we = 1'b0; cw_addr = '0; cw_data = '0; load_start = 1'b0;
    coef_we = 1'b0; coef_phase = '0; coef_tap = '0; coef_data = '0; thr = '0;
    x_in = '0; rx_in_valid = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      pass_no = pass;
      rst_n = 1'b0;
      prev_re = '{0.0, 0.0}; prev_im = '{0.0, 0.0};
      rx_beat = 0; dem_beat = 0; sum_abs = 0.0; n_abs = 0.0; err_pow = 0.0; sig_pow = 0.0; amp = 1.0;
      n_sym = 0; n_err = 0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      make_tx(pass == 1);
      upload_tx();
      upload_rx();
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        tx_in_valid = 1'b1;
        for (int i = 0; i < 6; i++) begin
          syms[6 * b + i] = int'($urandom_range(0, 15));
          tx_sym[i] = 4'(syms[6 * b + i]);
        end
        if (b == 40) begin
          // mean |axis| of uniform {A, 3A} levels is 2A; threshold = 2A
          amp = sum_abs / n_abs / 2.0;
          thr = 11'($rtoi(2.0 * amp + 0.5));
        end
      end
      @(negedge clk); tx_in_valid = 1'b0;
      repeat (20) @(posedge clk);
      evm[pass] = $sqrt(err_pow / sig_pow);
      errs[pass] = n_err;
      $display("pass %0d (%s): A=%0.1f EVM=%0.2f%% symbol errors %0d of %0d", pass,
               pass ? "pre-equalized" : "plain RRC", amp, 100.0 * evm[pass], n_err, n_sym);
    end
    checks++;
    if (!(evm[1] < evm[0])) begin failures++; $display("FAIL: pre-equalization did not lower EVM"); end
    checks++;
    if (errs[1] != 0) begin failures++; $display("FAIL: symbol errors with pre-equalization"); end
    checks++;
    if (evm[1] > 0.10) begin failures++; $display("FAIL: EVM with pre-equalization above 10%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
