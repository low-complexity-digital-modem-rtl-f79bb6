// qam16_demapper_tb: random equalized values around the 16QAM levels and on
// the decision boundaries; the expected decision is the nearest of the levels
// -3A, -A, A, 3A (A = thr/2, ties to the higher level) and its Gray code.
`timescale 1ns/1ps
module qam16_demapper_tb;
  import modem_pkg::*;
  import modem_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                   in_valid, out_valid;
  logic signed [5:0][11:0] sym_re, sym_im;
  logic [10:0]            thr;
  sym_t [5:0]             bits_out;

  qam16_demapper dut (.clk, .rst_n, .in_valid, .sym_re, .sym_im, .thr, .out_valid, .bits_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nearest(input int v, input int a);
    int best, bd;
    best = 0; bd = 1 << 30;
    for (int l = 0; l < 4; l++) begin
      int d;
      d = v - (2 * l - 3) * a;
      if (d < 0) d = -d;
      if (d <= bd) begin bd = d; best = l; end
    end
    return gray2(best);
  endfunction

  function automatic int pick(input int a);
    case ($urandom_range(0, 3))
      0: return int'($urandom_range(0, 4095)) - 2048;
      1: return (2 * int'($urandom_range(0, 3)) - 3) * a + int'($urandom_range(0, 2 * a / 3)) - a / 3;
      2: return 2 * a * (int'($urandom_range(0, 2)) - 1);          // exactly on a boundary
      default: return 2 * a * (int'($urandom_range(0, 2)) - 1) - 1;
    endcase
  endfunction

  initial begin
    int er[6], ei[6], a;
    in_valid = 1'b0; sym_re = '0; sym_im = '0; thr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = int'($urandom_range(4, 500));
      thr = 11'(2 * a);
      in_valid = 1'b1;
      for (int i = 0; i < 6; i++) begin
        int vr, vi;
        vr = pick(a); vi = pick(a);
        sym_re[i] = 12'(vr); sym_im[i] = 12'(vi);
        er[i] = nearest(vr, a); ei[i] = nearest(vi, a);
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid low"); end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (bits_out[i] !== 4'((er[i] << 2) | ei[i])) begin
          failures++;
          $display("FAIL: %0d,%0d thr %0d got %b exp %0d,%0d", signed'(sym_re[i]),
                   signed'(sym_im[i]), thr, bits_out[i], er[i], ei[i]);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
