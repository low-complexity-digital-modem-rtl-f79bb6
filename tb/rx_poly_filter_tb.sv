// rx_poly_filter_tb: random 54-sample windows and random widely-linear
// coefficients, one new window per clock; each output symbol (real and
// imaginary) is compared with a reference that forms the tap products,
// scales them to 13 bits and runs the reference tree. Latency must be 5.
`timescale 1ns/1ps
module rx_poly_filter_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  localparam int T = 54;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                   in_valid;
  adc_sample_t [T-1:0]    win;
  rx_coef_t    [T-1:0]    coef;
  logic                   out_valid;
  logic signed [11:0]     out_re, out_im;

  rx_poly_filter dut (.clk, .rst_n, .in_valid, .win, .coef, .out_valid, .out_re, .out_im);

  longint exp_re[$], exp_im[$];
  int     sent[$];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    in_valid = 1'b0; win = '0; coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      longint dr[$], di[$];
      int big;
      dr = {}; di = {};
      big = (n % 5 == 0);
      @(negedge clk);
      in_valid = (n % 7 != 3);
      for (int j = 0; j < T; j++) begin
        win[j].re = 8'(big ? 127 : rnd(-128, 127));
        win[j].im = 8'(big ? -128 : rnd(-128, 127));
        coef[j].ar = 12'(big ? 2047 : rnd(-2048, 2047));
        coef[j].ai = 12'(rnd(-2048, 2047));
        coef[j].br = 12'(big ? -2048 : rnd(-2048, 2047));
        coef[j].bi = 12'(rnd(-2048, 2047));
        dr.push_back(rx_data_ref(coef[j].ar, win[j].re, coef[j].br, win[j].im, 8));
        di.push_back(rx_data_ref(coef[j].ai, win[j].re, coef[j].bi, win[j].im, 8));
      end
      if (in_valid) begin
        exp_re.push_back(tree_ref(dr, 13, 1'b1));
        exp_im.push_back(tree_ref(di, 13, 1'b1));
        sent.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_re.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      longint er, ei;
      int c0;
      er = exp_re.pop_front(); ei = exp_im.pop_front(); c0 = sent.pop_front();
      if (longint'(out_re) != er || longint'(out_im) != ei || cyc - c0 != 5) begin
        failures++;
        $display("FAIL: got %0d,%0d exp %0d,%0d latency %0d", out_re, out_im, er, ei, cyc - c0);
      end
    end
  end
endmodule
