// add_tree3: pipelined addition tree built from 3-input adders.
//
// N_IN signed words of IN_W bits are added in levels of 3-input adders, one
// level per clock, until one word is left (54 -> 18 -> 6 -> 2 -> 1 for the
// receiver filter, 24 -> 8 -> 3 -> 1 for the transmitter filter). A level
// whose word count is not a multiple of three pads with zeros, so the last
// receiver level is a 2-input adder, as drawn for the receiver tree.
//
// NARROW = 1 is the receiver arrangement: the input word of every level is
// one bit narrower than that of the level before (13, 12, 11, 10 bits for the
// receiver). Each level's exact sum is shifted right by one bit (the least
// significant bit is dropped) and saturated to the next, narrower width. The
// choice of one-bit shift plus saturation is this design's reading of
// "one bit can be reduced at the input of next level". The last level is kept
// exact, so OUT_W = width of the last level's inputs + 2.
// NARROW = 0 keeps full precision: every level grows the word by two bits.
//
// Timing: one register per level; the output appears LEVELS clocks after the
// inputs, with a valid bit travelling alongside. No stalls.
module add_tree3
  import modem_pkg::tree_levels;
#(
  parameter int unsigned N_IN   = 54,
  parameter int unsigned IN_W   = 13,
  parameter bit          NARROW = 1'b1,
  localparam int unsigned LEVELS = tree_levels(N_IN),
  localparam int unsigned OUT_W  = NARROW ? (IN_W - LEVELS + 1 + 2) : (IN_W + 2 * LEVELS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [N_IN-1:0][IN_W-1:0] in_data,
  output logic                          out_valid,
  output logic signed [OUT_W-1:0]       out_data
);

  // Word count entering level l.
  function automatic int unsigned n_at(int unsigned l);
    int unsigned n = N_IN;
    for (int unsigned i = 0; i < l; i++) n = (n + 2) / 3;
    return n;
  endfunction

  // Word width entering level l.
  function automatic int unsigned w_at(int unsigned l);
    return NARROW ? (IN_W - l) : (IN_W + 2 * l);
  endfunction

  // All levels are held in a common container wide enough for any of them;
  // values are kept sign-extended, so narrowing is an arithmetic shift.
  localparam int unsigned CW = IN_W + 2 * LEVELS + 1;

  logic signed [CW-1:0] lvl [LEVELS+1][N_IN];
  logic                 vld [LEVELS+1];

  always_comb begin
    for (int unsigned i = 0; i < N_IN; i++)
      lvl[0][i] = CW'(signed'(in_data[i]));   // packed elements are unsigned
    vld[0] = in_valid;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NI = n_at(l);
    localparam int unsigned NO = n_at(l + 1);
    localparam int unsigned WN = w_at(l + 1);   // width entering the next level
    localparam bit          LAST = (l == LEVELS - 1);

    for (genvar o = 0; o < NO; o++) begin : g_add
      logic signed [CW-1:0] a, b, c, s, r;
      always_comb begin
        a = lvl[l][3*o];
        b = (3*o + 1 < NI) ? lvl[l][3*o + 1] : '0;
        c = (3*o + 2 < NI) ? lvl[l][3*o + 2] : '0;
        s = a + b + c;
        if (NARROW && !LAST) begin
          r = s >>> 1;
          if (r > CW'(signed'((1 << (WN - 1)) - 1)))
            r = CW'(signed'((1 << (WN - 1)) - 1));
          else if (r < -CW'(signed'(1 << (WN - 1))))
            r = -CW'(signed'(1 << (WN - 1)));
        end else begin
          r = s;
        end
      end
      always_ff @(posedge clk) lvl[l+1][o] <= r;
    end
    for (genvar z = NO; z < N_IN; z++) begin : g_unused
      assign lvl[l+1][z] = '0;
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
  end

  assign out_valid = vld[LEVELS];
  assign out_data  = OUT_W'(lvl[LEVELS][0]);

endmodule
