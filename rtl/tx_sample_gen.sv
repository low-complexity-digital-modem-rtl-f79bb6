// tx_sample_gen: transmitter filter for one output sample.
//
// Each output sample at 2.5 Gsps is the sum of the contributions of the
// TERMS (24) symbols whose pulses cover it. Term t addresses its own
// tx_lut_mem with the symbol index and reads the product of that symbol's
// tap with the constellation point; the TERMS products are added by a
// full-precision 3-input adder tree (24 -> 8 -> 3 -> 1) for I and Q.
//
// Ports: sym[t] is the symbol index for term t; the LUT write port
// (lut_we, lut_term, lut_addr, lut_wdata) loads entry lut_addr of LUT
// lut_term. Timing: sym is registered, the LUTs are read combinationally and
// their outputs registered, then 3 tree levels: out_valid follows in_valid by
// 5 clocks. One sample per clock, no stalls. The register placement is this
// design's choice; the 24 LUTs feeding one addition follow the document.
module tx_sample_gen
  import modem_pkg::*;
#(
  parameter int unsigned TERMS = TX_TERMS,
  localparam int unsigned OUT_W = TX_LUT_W + 2 * tree_levels(TERMS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  sym_t [TERMS-1:0]              sym,
  input  logic                          lut_we,
  input  logic [$clog2(TERMS)-1:0]      lut_term,
  input  sym_t                          lut_addr,
  input  tx_lut_word_t                  lut_wdata,
  output logic                          out_valid,
  output logic signed [OUT_W-1:0]       out_re,
  output logic signed [OUT_W-1:0]       out_im
);

  sym_t [TERMS-1:0]                    sym_q;
  tx_lut_word_t [TERMS-1:0]            lut_out;
  logic signed [TERMS-1:0][TX_LUT_W-1:0] prod_re, prod_im;
  logic                                vld_q, vld_p, vld_im;

  always_ff @(posedge clk) sym_q <= sym;

  for (genvar t = 0; t < TERMS; t++) begin : g_lut
    tx_lut_mem u_lut (
      .clk,
      .we   (lut_we && lut_term == $bits(lut_term)'(t)),
      .waddr(lut_addr),
      .wdata(lut_wdata),
      .raddr(sym_q[t]),
      .rdata(lut_out[t])
    );
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < TERMS; t++) begin
      prod_re[t] <= lut_out[t].re;
      prod_im[t] <= lut_out[t].im;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {vld_q, vld_p} <= '0;
    else        {vld_q, vld_p} <= {in_valid, vld_q};

  add_tree3 #(.N_IN(TERMS), .IN_W(TX_LUT_W), .NARROW(1'b0)) u_tree_re (
    .clk, .rst_n, .in_valid(vld_p), .in_data(prod_re),
    .out_valid(out_valid), .out_data(out_re)
  );

  add_tree3 #(.N_IN(TERMS), .IN_W(TX_LUT_W), .NARROW(1'b0)) u_tree_im (
    .clk, .rst_n, .in_valid(vld_p), .in_data(prod_im),
    .out_valid(vld_im), .out_data(out_im)
  );

  assert property (@(posedge clk) disable iff (!rst_n) out_valid == vld_im);

endmodule
