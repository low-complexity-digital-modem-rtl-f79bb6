// rx_filter_tb: loads random coefficients for the three phases through the
// write port, streams random received samples (with gaps in in_valid), and
// checks every output symbol z[3m+p] against the polyphase definition
// z[3m+p] = sum_j W_p[j] x[4m+p-j] (x[n] = 0 before the stream), computed
// here from the full sample record. Checks 6 symbols per 8 samples and the
// 5-clock latency.
`timescale 1ns/1ps
module rx_filter_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  localparam int T = 54;
  localparam int NB = 60;                 // input beats
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, gaps = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                          in_valid;
  adc_sample_t [7:0]             samp_in;
  logic                          coef_we;
  logic [1:0]                    coef_phase;
  logic [5:0]                    coef_tap;
  rx_coef_t                      coef_data;
  logic                          out_valid;
  logic signed [5:0][11:0]       sym_re, sym_im;

  rx_filter dut (.clk, .rst_n, .in_valid, .samp_in, .coef_we, .coef_phase, .coef_tap,
                 .coef_data, .out_valid, .sym_re, .sym_im);

  int cr[3][T], ci[3][T], dr_[3][T], di_[3][T];      // ar, ai, br, bi
  int xr[NB*8], xi[NB*8];
  int sent[$];
  int out_beat = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  function automatic int xs(input int n, input bit im);
    if (n < 0) return 0;
    return im ? xi[n] : xr[n];
  endfunction

  initial begin
    in_valid = 1'b0; samp_in = '0; coef_we = 1'b0; coef_phase = '0; coef_tap = '0; coef_data = '0;
    for (int n = 0; n < NB*8; n++) begin xr[n] = rnd(-128, 127); xi[n] = rnd(-128, 127); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < T; j++) begin
        cr[p][j] = rnd(-300, 300); ci[p][j] = rnd(-300, 300);
        dr_[p][j] = rnd(-300, 300); di_[p][j] = rnd(-300, 300);
        if (j == 10 + p) cr[p][j] = 2047;             // a dominant tap
        @(negedge clk);
        coef_we = 1'b1; coef_phase = 2'(p); coef_tap = 6'(j);
        coef_data = '{ar: 12'(cr[p][j]), ai: 12'(ci[p][j]), br: 12'(dr_[p][j]), bi: 12'(di_[p][j])};
      end
    @(negedge clk); coef_we = 1'b0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      while ($urandom_range(0, 5) == 0) begin
        in_valid = 1'b0; gaps++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      for (int i = 0; i < 8; i++) begin
        samp_in[i].re = 8'(xr[8*b + i]);
        samp_in[i].im = 8'(xi[8*b + i]);
      end
      sent.push_back(cyc);
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (out_beat != NB) begin failures++; $display("FAIL: %0d output beats", out_beat); end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL: no input gap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int c0;
    c0 = sent.pop_front();
    checks++;
    if (cyc - c0 != 5) begin failures++; $display("FAIL: latency %0d", cyc - c0); end
    for (int l = 0; l < 6; l++) begin
      longint vr[$], vi[$], er, ei;
      int m, p, e;
      vr = {}; vi = {};
      m = 2 * out_beat + l / 3;
      p = l % 3;
      e = 4 * m + p;
      for (int j = 0; j < T; j++) begin
        vr.push_back(rx_data_ref(cr[p][j], xs(e - j, 0), dr_[p][j], xs(e - j, 1), 8));
        vi.push_back(rx_data_ref(ci[p][j], xs(e - j, 0), di_[p][j], xs(e - j, 1), 8));
      end
      er = tree_ref(vr, 13, 1'b1);
      ei = tree_ref(vi, 13, 1'b1);
      checks++;
      if (longint'(signed'(sym_re[l])) != er || longint'(signed'(sym_im[l])) != ei) begin
        failures++;
        $display("FAIL beat %0d lane %0d: got %0d,%0d exp %0d,%0d", out_beat, l,
                 signed'(sym_re[l]), signed'(sym_im[l]), er, ei);
      end
    end
    out_beat++;
  end
endmodule
