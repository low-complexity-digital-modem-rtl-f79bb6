// add_tree3_tb: drives the receiver-style tree (54 words of 13 bits, narrowing)
// and the transmitter-style tree (24 words of 12 bits, full precision) with a
// new random vector every clock, including full-scale vectors that make the
// narrowing saturate, and compares each output with the reference tree and
// with the expected latency (4 and 3 clocks).
`timescale 1ns/1ps
module add_tree3_tb;
  import modem_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0;

  logic                         v_in;
  logic signed [53:0][12:0]     a_in;
  logic signed [23:0][11:0]     b_in;
  logic                         a_vld, b_vld;
  logic signed [11:0]           a_out;
  logic signed [17:0]           b_out;

  add_tree3 #(.N_IN(54), .IN_W(13), .NARROW(1'b1)) dut_a (
    .clk, .rst_n, .in_valid(v_in), .in_data(a_in), .out_valid(a_vld), .out_data(a_out));
  add_tree3 #(.N_IN(24), .IN_W(12), .NARROW(1'b0)) dut_b (
    .clk, .rst_n, .in_valid(v_in), .in_data(b_in), .out_valid(b_vld), .out_data(b_out));

  longint exp_a[$], exp_b[$];
  int     cyc = 0, sent_cyc[$], sent_cyc_b[$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    v_in = 1'b0; a_in = '0; b_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      longint va[$], vb[$];
      int mode;
      mode = n % 4;
      va = {};
      vb = {};
      @(negedge clk);
      v_in = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < 54; i++) begin
        int x;
        case (mode)
          0: x = $signed($urandom_range(0, 8191)) - 4096;          // any
          1: x = 4095 - $urandom_range(0, 20);                      // near +full scale
          2: x = -4096 + $urandom_range(0, 20);                     // near -full scale
          default: x = $signed($urandom_range(0, 200)) - 100;       // small
        endcase
        a_in[i] = 13'(x);
        va.push_back(x);
      end
      for (int i = 0; i < 24; i++) begin
        int x;
        x = (mode == 1) ? 2047 : (mode == 2) ? -2048 : $signed($urandom_range(0, 4095)) - 2048;
        b_in[i] = 12'(x);
        vb.push_back(x);
      end
      if (v_in) begin
        exp_a.push_back(tree_ref(va, 13, 1'b1));
        exp_b.push_back(tree_ref(vb, 12, 1'b0));
        sent_cyc.push_back(cyc);
        sent_cyc_b.push_back(cyc);
        if (mode == 1 || mode == 2) sat_seen++;
      end
    end
    @(negedge clk); v_in = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0) begin
      failures++;
      $display("FAIL: %0d/%0d outputs missing", exp_a.size(), exp_b.size());
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (a_vld) begin
      checks++;
      if (exp_a.size() == 0) begin
        failures++; $display("FAIL: unexpected output A");
      end else begin
        longint e;
        int c0;
        e = exp_a.pop_front();
        c0 = sent_cyc.pop_front();
        if (longint'(a_out) != e || cyc - c0 != 4) begin
          failures++;
          $display("FAIL A: got %0d exp %0d latency %0d", a_out, e, cyc - c0);
        end
      end
    end
    if (b_vld) begin
      checks++;
      if (exp_b.size() == 0) begin
        failures++; $display("FAIL: unexpected output B");
      end else begin
        longint e;
        int c0;
        e = exp_b.pop_front();
        c0 = sent_cyc_b.pop_front();
        if (longint'(b_out) != e || cyc - c0 != 3) begin
          failures++;
          $display("FAIL B: got %0d exp %0d latency %0d", b_out, e, cyc - c0);
        end
      end
    end
  end
endmodule
