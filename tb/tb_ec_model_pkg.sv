// tb_ec_model_pkg: integer reference model of the embedded codec, used by
// the testbenches to compute expected values without the RTL's code.
// Blocks are arrays of eight ints (pixel numbering of the 4x2 block: top row
// 0 1 4 5, bottom row 2 3 6 7); segments are 32-bit words with
// Mode[31:30] SP[29:28] DecL[27:26] DecR[25:24] CodedL[23:12] CodedR[11:0].
package tb_ec_model_pkg;

  typedef int blk8_t [8];

  // Pattern groups A, B, C: eight 4-bit bitplanes each, pixel 0 in bit 3.
  function automatic int pat(int g, int k);
    int t [3][8] = '{'{'h0, 'hF, 'hE, 'h7, 'h3, 'hC, 'h1, 'h8},
                     '{'h0, 'hF, 'hE, 'h7, 'hA, 'h9, 'h6, 'h5},
                     '{'h0, 'hF, 'hE, 'h7, 'hD, 'hB, 'h2, 'h4}};
    return t[g][k];
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic blk8_t m_truncate(blk8_t b);
    int sum = 0, mx = 0, mn = 255, avg, diff, lo, hi, lim;
    blk8_t r;
    foreach (b[i]) begin
      sum += b[i];
      if (b[i] > mx) mx = b[i];
      if (b[i] < mn) mn = b[i];
    end
    avg  = sum / 8;
    diff = mx - mn;
    lo   = (avg / 64) * 64;
    hi   = lo + 63;
    lim  = (avg < 64 || avg >= 192) ? 32 : 64;
    foreach (b[i]) r[i] = (diff < lim) ? clampi(b[i], lo, hi) : b[i];
    return r;
  endfunction

  // returns {mode, sp} as mode*4+sp
  function automatic int m_start_plane(blk8_t b);
    int best_sp = -1, best_m = 0;
    for (int m = 0; m < 4; m++) begin
      int s = 3;
      foreach (b[i]) begin
        int t;
        if (((b[i] >> 7) & 1) != (m >> 1))      t = 0;
        else if (((b[i] >> 6) & 1) != (m & 1))  t = 1;
        else if (((b[i] >> 5) & 1) != 0)        t = 2;
        else                                    t = 3;
        if (t < s) s = t;
      end
      if (s > best_sp) begin best_sp = s; best_m = m; end
    end
    return best_m * 4 + best_sp;
  endfunction

  function automatic int m_round(int p, int sp, int nbits);
    int shift = 8 - sp - nbits;
    int field = (p >> shift) & ((1 << nbits) - 1);
    if (((p >> (shift - 1)) & 1) == 1 && field != (1 << nbits) - 1) p += (1 << shift);
    return p;
  endfunction

  function automatic int m_plane(blk8_t b, int base, int bit_no);
    int p = 0;
    for (int j = 0; j < 4; j++) p = p * 2 + ((b[base + j] >> bit_no) & 1);
    return p;
  endfunction

  function automatic int popc(int v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += (v >> i) & 1;
    return c;
  endfunction

  // returns dec*4096 + coded for one side (base 0 = left, 4 = right)
  function automatic int m_side(blk8_t cb, blk8_t nb, int base, int sp);
    int q [4];
    int idx [3][4];
    int nh [3];
    for (int k = 0; k < 4; k++) q[k] = m_plane(cb, base, 7 - sp - k);
    for (int g = 0; g < 3; g++) begin
      nh[g] = 0;
      for (int k = 0; k < 4; k++) begin
        int bestd = 99;
        idx[g][k] = -1;
        for (int n = 0; n < 8; n++) if (pat(g, n) == q[k]) idx[g][k] = n;
        if (idx[g][k] >= 0) begin
          if (nh[g] == k) nh[g]++;
        end else if (k == 3) begin
          for (int n = 0; n < 8; n++)
            if (popc(pat(g, n) ^ q[k]) < bestd) begin bestd = popc(pat(g, n) ^ q[k]); idx[g][k] = n; end
        end
      end
    end
    for (int want = 4; want >= 3; want--)
      for (int g = 0; g < 3; g++)
        if (nh[g] >= want)
          return g * 4096 + idx[g][0] * 512 + idx[g][1] * 64 + idx[g][2] * 8 + idx[g][3];
    return 3 * 4096 + m_plane(nb, base, 7 - sp) * 256 + m_plane(nb, base, 6 - sp) * 16
                    + m_plane(nb, base, 5 - sp);
  endfunction

  function automatic int unsigned m_compress(blk8_t b);
    blk8_t t, cb, nb;
    int ms, mode, sp, l, r;
    t    = m_truncate(b);
    ms   = m_start_plane(t);
    mode = ms / 4;
    sp   = ms % 4;
    foreach (t[i]) begin
      cb[i] = m_round(t[i], sp, 4);
      nb[i] = m_round(t[i], sp, 3);
    end
    l = m_side(cb, nb, 0, sp);
    r = m_side(cb, nb, 4, sp);
    return (mode << 30) | (sp << 28) | ((l / 4096) << 26) | ((r / 4096) << 24)
         | ((l % 4096) << 12) | (r % 4096);
  endfunction

  function automatic blk8_t m_decompress(int unsigned seg);
    blk8_t o;
    int mode = seg >> 30, sp = (seg >> 28) & 3;
    for (int side = 0; side < 2; side++) begin
      int dec   = (seg >> (side == 1 ? 24 : 26)) & 3;
      int coded = (seg >> (side == 1 ? 0 : 12)) & 'hFFF;
      for (int j = 0; j < 4; j++) begin
        int v = 0, top = 7 - sp;
        if (sp >= 1) v += ((mode >> 1) & 1) << 7;
        if (sp >= 2) v += (mode & 1) << 6;
        if (dec == 3) begin
          for (int k = 0; k < 3; k++)
            v += (((coded >> (8 - 4 * k)) >> (3 - j)) & 1) << (top - k);
        end else begin
          for (int k = 0; k < 4; k++)
            v += ((pat(dec, (coded >> (9 - 3 * k)) & 7) >> (3 - j)) & 1) << (top - k);
        end
        o[side * 4 + j] = v;
      end
    end
    return o;
  endfunction

  // Random test block: mostly smooth blocks around a random level, some noise.
  function automatic blk8_t m_rand_block();
    blk8_t b;
    int kind = $urandom_range(0, 9);
    int base = $urandom_range(0, 255);
    int spread = (kind < 4) ? 8 : (kind < 7) ? 40 : (kind < 9) ? 90 : 256;
    foreach (b[i]) b[i] = clampi(base + $urandom_range(0, spread) - spread / 2, 0, 255);
    return b;
  endfunction

endpackage
