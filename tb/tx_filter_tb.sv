// tx_filter_tb: picks three random complex 32-tap filters h_p and a 16QAM
// constellation, computes the LUT products h_p[j] * a(s), uploads them to the
// block memory and triggers the download (checking its duration), then
// streams random symbols (with gaps in in_valid) and compares every output
// sample with the direct rate-converting convolution
//   y[n] = sum_k h_{k mod 3}[n - 4*floor(k/3)] * a(s_k)
// (symbols before the stream have index 0, as after reset). A second,
// different coefficient set is then uploaded and downloaded and the check is
// repeated. Checks 8 samples per 6 symbols and the 5-clock latency.
`timescale 1ns/1ps
module tx_filter_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  localparam int NB = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, gaps = 0, loads = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               in_valid, cw_we, load_start, load_busy, out_valid;
  sym_t [5:0]         sym_in;
  logic [10:0]        cw_addr;
  tx_lut_word_t       cw_data;
  logic signed [7:0][17:0] samp_re, samp_im;

  tx_filter dut (.clk, .rst_n, .in_valid, .sym_in, .cw_we, .cw_addr, .cw_data, .load_start,
                 .load_busy, .out_valid, .samp_re, .samp_im);

  int hr[3][32], hi[3][32];
  int syms[NB*6];
  int sent[$];
  int out_beat;

  initial begin
    #400000;
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

  function automatic int sym_at(input int k);
    return (k < 0) ? 0 : syms[k];
  endfunction

  task automatic upload_and_load();
    int t0;
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < 32; j++) begin
        hr[p][j] = int'($urandom_range(0, 600)) - 300;
        hi[p][j] = int'($urandom_range(0, 600)) - 300;
      end
    for (int r = 0; r < 4; r++)
      for (int d = 0; d < 8; d++)
        for (int p = 0; p < 3; p++)
          for (int s = 0; s < 16; s++) begin
            @(negedge clk);
            cw_we = 1'b1;
            cw_addr = 11'((r * 24 + p + 3 * d) * 16 + s);
            cw_data = '{re: 12'(prod_re(p, r + 4 * d, s)), im: 12'(prod_im(p, r + 4 * d, s))};
          end
    @(negedge clk); cw_we = 1'b0; load_start = 1'b1;
    @(negedge clk); load_start = 1'b0;
    t0 = cyc;
    while (load_busy) @(negedge clk);
    loads++;
    checks++;
    if (cyc - t0 != 1537) begin failures++; $display("FAIL: download took %0d clocks", cyc - t0); end
  endtask

  task automatic stream();
    out_beat = 0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 5) == 0) begin
        in_valid = 1'b0; gaps++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      for (int i = 0; i < 6; i++) begin
        syms[6*b + i] = int'($urandom_range(0, 15));
        sym_in[i] = 4'(syms[6*b + i]);
      end
      sent.push_back(cyc);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (out_beat != NB) begin failures++; $display("FAIL: %0d output beats", out_beat); end
  endtask

  initial begin
    in_valid = 1'b0; sym_in = '0; cw_we = 1'b0; cw_addr = '0; cw_data = '0; load_start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    upload_and_load();
    stream();
    // a new coefficient set replaces the first; the history is reset first
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    upload_and_load();
    stream();
    checks++;
    if (gaps == 0 || loads != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int c0;
    c0 = sent.pop_front();
    checks++;
    if (cyc - c0 != 5) begin failures++; $display("FAIL: latency %0d", cyc - c0); end
    for (int q = 0; q < 8; q++) begin
      longint er, ei;
      int n;
      n = 8 * out_beat + q;
      er = 0; ei = 0;
      for (int k = (n / 4 - 8) * 3; k <= 3 * (n / 4) + 2; k++) begin
        int j;
        j = n - 4 * ((k < 0) ? -((-k + 2) / 3) : k / 3);
        if (j >= 0 && j < 32) begin
          er += prod_re(((k % 3) + 3) % 3, j, sym_at(k));
          ei += prod_im(((k % 3) + 3) % 3, j, sym_at(k));
        end
      end
      checks++;
      if (longint'(signed'(samp_re[q])) != er || longint'(signed'(samp_im[q])) != ei) begin
        failures++;
        $display("FAIL beat %0d lane %0d: got %0d,%0d exp %0d,%0d", out_beat, q,
                 signed'(samp_re[q]), signed'(samp_im[q]), er, ei);
      end
    end
    out_beat++;
  end
endmodule
