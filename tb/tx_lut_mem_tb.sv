// tx_lut_mem_tb: fills the 16-entry LUT memory with random words, reads every
// entry back combinationally, then overwrites a few entries and checks that
// only those changed and that a write without we has no effect.
`timescale 1ns/1ps
module tx_lut_mem_tb;
  import modem_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         we;
  logic [3:0]   waddr, raddr;
  tx_lut_word_t wdata, rdata;
  tx_lut_word_t model [16];

  tx_lut_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 16; a++) begin
      raddr = 4'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: got %h exp %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wdata = tx_lut_word_t'($urandom);
      model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    check_all();
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = 4'($urandom); wdata = tx_lut_word_t'($urandom);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
