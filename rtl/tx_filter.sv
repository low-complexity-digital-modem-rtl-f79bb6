// tx_filter: transmitter filter bank. Turns 6 symbols per clock (1.875 Gsps)
// into 8 pulse-shaped, optionally pre-equalized complex samples per clock
// (2.5 Gsps) for the DACs.
//
// Rate conversion 4/3 by a bank of three filters: symbol k = 3m + p is shaped
// by filter p (a 32-tap RRC pulse sampled at 2.5 Gsps, with time offset p/3
// of a sample plus the integer part of 4p/3, both held in its taps h_p) and
// placed at sample 4m:
//   y[n] = sum_k h_{k mod 3}[n - 4*floor(k/3)] * a(s_k),  0 <= n-4*floor(k/3) < 32
// For sample n = 4M + r the taps used are j = r + 4d (d = 0..7) of all three
// filters, i.e. 24 symbols k = 3(M-d) + p; term t = p + 3d. Each of the 8
// output lanes (sample n = 8c + q, r = q mod 4) is one tx_sample_gen whose
// LUT t holds h_p[r + 4d] * a(s) for the 16 symbol values s. The products,
// and so the constellation a(s) and any pre-equalization, are computed by the
// host; the filter itself has no multipliers.
//
// Coefficient path: the host writes the products into tx_coef_bram (word
// address (r*24 + t)*16 + s). A pulse on load_start copies the whole block
// memory into the LUT memories of all lanes, one word per clock
// (lanes q and q+4 share r and are written together); load_busy is high
// meanwhile (1537 clocks). Output samples are meaningless during a download.
//
// Data path: input beat c holds symbols s[6c .. 6c+5] (sym_in[i] = s[6c+i]);
// output beat c holds samples y[8c .. 8c+7] (samp_out[q] = y[8c+q]).
// out_valid follows in_valid by 5 clocks; no stalls.
// Following the document: three filters, 32 taps, 24 LUT memories added per
// sample, 8 samples per clock, one block memory feeding the LUTs. This
// design's own: the word layout, the download sequence and the pipeline.
module tx_filter
  import modem_pkg::*;
#(
  parameter int unsigned TAPS  = TX_TAPS,
  localparam int unsigned DSPAN = TAPS / 4,                      // symbols per filter per sample
  localparam int unsigned TERMS = N_PHASE * DSPAN,               // 24
  localparam int unsigned DEPTH = 4 * TERMS * (2**SYM_W),
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned OUT_W = TX_LUT_W + 2 * tree_levels(TERMS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // symbols
  input  logic                          in_valid,
  input  sym_t [SYM_PER_CLK-1:0]        sym_in,
  // host upload into the block memory
  input  logic                          cw_we,
  input  logic [AW-1:0]                 cw_addr,
  input  tx_lut_word_t                  cw_data,
  // download block memory -> LUT memories
  input  logic                          load_start,
  output logic                          load_busy,
  // samples to the DACs
  output logic                          out_valid,
  output logic signed [SAMP_PER_CLK-1:0][OUT_W-1:0] samp_re,
  output logic signed [SAMP_PER_CLK-1:0][OUT_W-1:0] samp_im
);

  // Previous beats needed: lane 0 reaches back to s[6c - 3*(DSPAN-1)].
  localparam int unsigned HIST_BEATS = (N_PHASE * (DSPAN - 1) + SYM_PER_CLK - 1) / SYM_PER_CLK;
  localparam int unsigned HIST = HIST_BEATS * SYM_PER_CLK;
  localparam int unsigned BUF  = HIST + SYM_PER_CLK;

  // ---------------------------------------------------------------- block memory
  typedef enum logic {L_IDLE, L_LOAD} load_state_e;

  load_state_e             lstate;
  logic [1:0]              ld_r, wr_r;
  logic [$clog2(TERMS)-1:0] ld_t, wr_t;
  sym_t                    ld_s, wr_s;
  logic                    wr_v;
  tx_lut_word_t            bram_q;
  logic [AW-1:0]           rd_addr;

  assign rd_addr = AW'((32'(ld_r) * TERMS + 32'(ld_t)) * (2**SYM_W) + 32'(ld_s));

  tx_coef_bram #(.DEPTH(DEPTH)) u_bram (
    .clk,
    .we   (cw_we),
    .waddr(cw_addr),
    .wdata(cw_data),
    .rd_en(lstate == L_LOAD),
    .raddr(rd_addr),
    .rdata(bram_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE;
      {ld_r, ld_t, ld_s} <= '0;
      wr_v <= 1'b0;
      {wr_r, wr_t, wr_s} <= '0;
    end else begin
      wr_v <= (lstate == L_LOAD);
      {wr_r, wr_t, wr_s} <= {ld_r, ld_t, ld_s};
      unique case (lstate)
        L_IDLE: if (load_start) begin
          lstate <= L_LOAD;
          {ld_r, ld_t, ld_s} <= '0;
        end
        L_LOAD: begin
          ld_s <= ld_s + 1'b1;
          if (ld_s == '1) begin
            if (ld_t == $bits(ld_t)'(TERMS - 1)) begin
              ld_t <= '0;
              ld_r <= ld_r + 1'b1;
              if (ld_r == 2'd3) lstate <= L_IDLE;
            end else begin
              ld_t <= ld_t + 1'b1;
            end
          end
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  assign load_busy = (lstate == L_LOAD) || wr_v;

  // ---------------------------------------------------------------- symbol history
  // buffer[i] = s[6c - HIST + i]; the last SYM_PER_CLK entries are the current beat.
  sym_t hist [HIST];
  sym_t buffer [BUF];

  always_comb begin
    for (int i = 0; i < HIST; i++)         buffer[i]        = hist[i];
    for (int i = 0; i < SYM_PER_CLK; i++)  buffer[HIST + i] = sym_in[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < HIST; i++) hist[i] <= buffer[i + SYM_PER_CLK];
    end
  end

  // ---------------------------------------------------------------- output lanes
  logic [SAMP_PER_CLK-1:0] lane_vld;

  for (genvar q = 0; q < SAMP_PER_CLK; q++) begin : g_lane
    localparam int unsigned R = q % 4;
    localparam int unsigned H = q / 4;     // which of the two samples groups of 4

    sym_t [TERMS-1:0] sy;
    always_comb begin
      for (int d = 0; d < DSPAN; d++)
        for (int p = 0; p < N_PHASE; p++)
          sy[p + N_PHASE * d] = buffer[HIST + 3 * H - 3 * d + p];
    end

    tx_sample_gen #(.TERMS(TERMS)) u_gen (
      .clk, .rst_n, .in_valid,
      .sym      (sy),
      .lut_we   (wr_v && wr_r == 2'(R)),
      .lut_term (wr_t),
      .lut_addr (wr_s),
      .lut_wdata(bram_q),
      .out_valid(lane_vld[q]),
      .out_re   (samp_re[q]),
      .out_im   (samp_im[q])
    );
  end

  assign out_valid = lane_vld[0];

  // Every lane runs the same pipeline.
  assert property (@(posedge clk) disable iff (!rst_n) lane_vld == {SAMP_PER_CLK{lane_vld[0]}});

endmodule
