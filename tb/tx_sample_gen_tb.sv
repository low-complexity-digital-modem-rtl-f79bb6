// tx_sample_gen_tb: loads the 24 LUT memories with random complex words,
// then feeds a random set of 24 symbol indices every clock (with gaps) and
// checks that each output sample is the sum of the 24 addressed words, with
// a latency of 5 clocks. Full-scale words check that the sum does not wrap.
`timescale 1ns/1ps
module tx_sample_gen_tb;
  import modem_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               in_valid, lut_we, out_valid;
  sym_t [23:0]        sym;
  logic [4:0]         lut_term;
  sym_t               lut_addr;
  tx_lut_word_t       lut_wdata;
  logic signed [17:0] out_re, out_im;

  tx_sample_gen dut (.clk, .rst_n, .in_valid, .sym, .lut_we, .lut_term, .lut_addr, .lut_wdata,
                     .out_valid, .out_re, .out_im);

  int lre[24][16], lim[24][16];
  longint exp_re[$], exp_im[$];
  int sent[$];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; sym = '0; lut_we = 1'b0; lut_term = '0; lut_addr = '0; lut_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 24; t++)
      for (int s = 0; s < 16; s++) begin
        lre[t][s] = (s == 15) ? 2047 : (s == 14) ? -2048 : int'($urandom_range(0, 4095)) - 2048;
        lim[t][s] = (s == 15) ? -2048 : (s == 14) ? 2047 : int'($urandom_range(0, 4095)) - 2048;
        @(negedge clk);
        lut_we = 1'b1; lut_term = 5'(t); lut_addr = 4'(s);
        lut_wdata = '{re: 12'(lre[t][s]), im: 12'(lim[t][s])};
      end
    @(negedge clk); lut_we = 1'b0;
    for (int n = 0; n < 300; n++) begin
      longint er, ei;
      @(negedge clk);
      in_valid = (n % 6 != 5);
      er = 0; ei = 0;
      for (int t = 0; t < 24; t++) begin
        int s;
        s = (n % 10 == 0) ? 15 : (n % 10 == 1) ? 14 : int'($urandom_range(0, 15));
        sym[t] = 4'(s);
        er += lre[t][s];
        ei += lim[t][s];
      end
      if (in_valid) begin exp_re.push_back(er); exp_im.push_back(ei); sent.push_back(cyc); end
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
