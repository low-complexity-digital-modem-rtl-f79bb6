// modem_ref_pkg: reference models used by the testbenches. They compute the
// expected outputs directly from the defining sums, with plain integers, and
// share no code with the RTL.
package modem_ref_pkg;

  // Reference addition tree: groups of three (zero-padded), one level at a
  // time. narrow = 1: every level but the last halves its sums (floor) and
  // clips them to a word one bit narrower than the level's inputs.
  function automatic longint tree_ref(input longint v[$], input int in_w, input bit narrow);
    longint cur[$], nxt[$];
    int w;
    cur = v;
    w = in_w;
    while (1) begin
      bit last;
      nxt = {};
      for (int i = 0; i < cur.size(); i += 3) begin
        longint s;
        s = cur[i];
        if (i + 1 < cur.size()) s += cur[i+1];
        if (i + 2 < cur.size()) s += cur[i+2];
        nxt.push_back(s);
      end
      last = (nxt.size() == 1);
      if (narrow && !last) begin
        longint hi, lo;
        w = w - 1;
        hi = (longint'(1) <<< (w - 1)) - 1;
        lo = -(longint'(1) <<< (w - 1));
        foreach (nxt[i]) begin
          longint t;
          t = nxt[i];
          // floor division by two
          t = (t >= 0) ? t / 2 : -((-t + 1) / 2);
          if (t > hi) t = hi;
          if (t < lo) t = lo;
          nxt[i] = t;
        end
      end
      cur = nxt;
      if (last) break;
    end
    return cur[0];
  endfunction

  // Product stage of the receiver: (c0*x0 + c1*x1) / 2^shift (floor), clipped to 13 bits.
  function automatic longint rx_data_ref(input longint c0, input longint x0,
                                         input longint c1, input longint x1,
                                         input int shift);
    longint s, d, t;
    s = c0 * x0 + c1 * x1;
    d = longint'(1) <<< shift;
    t = (s >= 0) ? s / d : -((-s + d - 1) / d);
    if (t > 4095)  t = 4095;
    if (t < -4096) t = -4096;
    return t;
  endfunction

  // Gray code of one 16QAM axis level index (0..3 for -3,-1,+1,+3).
  function automatic int gray2(input int lvl);
    case (lvl)
      0: return 0; 1: return 1; 2: return 3; default: return 2;
    endcase
  endfunction

  // Amplitude (-3,-1,1,3) of the axis whose two Gray bits are g.
  function automatic int axis_amp(input int g);
    case (g & 3)
      0: return -3; 1: return -1; 3: return 1; default: return 3;
    endcase
  endfunction

endpackage
