// tx_coef_bram_tb: writes random words to the whole 1536-word block memory,
// reads them back in random order checking the one-clock read latency, and
// checks that the output register holds while rd_en is low and that writes
// beyond the depth are ignored.
`timescale 1ns/1ps
module tx_coef_bram_tb;
  import modem_pkg::*;

  localparam int DEPTH = 1536;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         we, rd_en;
  logic [10:0]  waddr, raddr;
  tx_lut_word_t wdata, rdata;
  tx_lut_word_t model [DEPTH];

  tx_coef_bram dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_lut_word_t held;
    we = 1'b0; rd_en = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 11'(a); wdata = tx_lut_word_t'($urandom);
      model[a] = wdata;
    end
    // out-of-range writes
    for (int a = DEPTH; a < 2048; a += 97) begin
      @(negedge clk);
      we = 1'b1; waddr = 11'(a); wdata = tx_lut_word_t'($urandom);
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < 600; k++) begin
      int a;
      a = (k < 512) ? $urandom_range(0, DEPTH - 1) : k - 512;
      @(negedge clk);
      rd_en = 1'b1; raddr = 11'(a);
      @(negedge clk);
      rd_en = 1'b0; raddr = 11'($urandom_range(0, DEPTH - 1));
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: got %h exp %h", a, rdata, model[a]);
      end
      held = rdata;
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL: output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
