// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: syndromes by polynomial long division, matched-filter taps by
// direct convolution, and a straight software model of the whole
// post-Viterbi algorithm (candidate sets, likelihoods, list-correction).
// Conventions shared with the RTL: bit p-1 of a codeword vector is position
// p and weights x^(p-1); syndromes are polynomials (bit i = x^i); samples
// carry QF fractional bits in units of the +-1 target output.
package tb_ref_pkg;
  import pvp_pkg::N, pvp_pkg::M, pvp_pkg::K, pvp_pkg::LG, pvp_pkg::QF,
         pvp_pkg::LLIST, pvp_pkg::LEMAX;

  typedef bit [N-1:0] cw_t;

  // G(x) = 1 + x^2 + x^3 and g(D) = 1 + 6D + 7D^2 + 2D^3, restated here.
  localparam bit [3:0] G_REF = 4'b1101;
  localparam int G_TAP [4] = '{1, 6, 7, 2};
  // Dominant error events, +-[2,-2], +-[2,-2,2], +-[2,-2,2,-2],
  // +-[2,-2,2,-2,2], +-[2,-2,0,2,-2], +-[2,-2,2,-2,2,-2] (halved).
  localparam int R_LEN [6] = '{2, 3, 4, 5, 5, 6};
  localparam int R_PAT [6][6] = '{
    '{1,-1,0,0,0,0}, '{1,-1,1,0,0,0}, '{1,-1,1,-1,0,0},
    '{1,-1,1,-1,1,0}, '{1,-1,0,1,-1,0}, '{1,-1,1,-1,1,-1}};
  // Published syndrome sequences (decimal), start positions 1..7.
  localparam int TABLE_I [6][7] = '{
    '{6,3,4,2,1,5,7}, '{7,6,3,4,2,1,5}, '{2,1,5,7,6,3,4},
    '{5,7,6,3,4,2,1}, '{4,2,1,5,7,6,3}, '{3,4,2,1,5,7,6}};

  // Remainder of sum_p c[p] x^p divided by G(x), highest degree first.
  function automatic bit [2:0] ref_syn(cw_t c);
    bit [3:0] r;
    r = '0;
    for (int p = N - 1; p >= 0; p--) begin
      r = {r[2:0], c[p]};
      if (r[3]) r = r ^ G_REF;
    end
    return r[2:0];
  endfunction

  function automatic int ref_dec(bit [2:0] s);
    return 4 * s[0] + 2 * s[1] + s[2];
  endfunction

  // Mask of error type j starting at position pos (1-based).
  function automatic cw_t ref_mask(int j, int pos);
    cw_t m;
    m = '0;
    for (int k = 0; k < R_LEN[j]; k++)
      if (R_PAT[j][k] != 0 && pos + k <= N) m[pos + k - 1] = 1'b1;
    return m;
  endfunction

  function automatic int ref_tap(int j, int m);
    int a;
    a = 0;
    for (int k = 0; k < R_LEN[j]; k++)
      if (m - k >= 0 && m - k < 4) a += R_PAT[j][k] * G_TAP[m - k];
    return a;
  endfunction

  function automatic int ref_eta(int j);
    int a;
    a = 0;
    for (int m = 0; m < R_LEN[j] + 3; m++) a += ref_tap(j, m) ** 2;
    return a * (1 << QF);
  endfunction

  // Can the detected bits c produce type j at pos? (one sign for all flips)
  function automatic bit ref_bits_ok(cw_t c, int j, int pos);
    for (int k = 0; k < R_LEN[j]; k++)
      if (R_PAT[j][k] != 0) begin
        bit want;
        want = c[pos - 1] ^ (R_PAT[j][k] < 0);
        if (c[pos + k - 1] != want) return 1'b0;
      end
    return 1'b1;
  endfunction

  // Error signal per position, set by the testbench before ref_pvp().
  int ref_e [N];

  function automatic int ref_lik(cw_t c, int j, int pos);
    int a;
    a = 0;
    for (int m = 0; m < R_LEN[j] + 3; m++)
      if (pos - 1 + m < N) a += ref_e[pos - 1 + m] * ref_tap(j, m);
    if (c[pos - 1]) a = -a;   // detected 1 -> event is -pattern
    return a - ref_eta(j);
  endfunction

  // Whole algorithm. Returns the output codeword and fills the status.
  function automatic cw_t ref_pvp(cw_t c, bit ops_en, output bit detected,
                                  output bit corrected, output bit failed,
                                  output int tries, output int typ, output int pos);
    bit [2:0] s;
    bit       valid [6];
    int       best  [6];
    int       bpos  [6];
    bit       used  [6];
    detected = 0; corrected = 0; failed = 0; tries = 0; typ = 0; pos = 0;
    s = ref_syn(c);
    if (s == 0) return c;
    detected = 1;
    for (int j = 0; j < K; j++) begin
      valid[j] = 0; best[j] = 0; bpos[j] = 0; used[j] = 0;
      for (int i = 1; i + R_LEN[j] - 1 <= N; i++) begin
        bit ok;
        ok = !ops_en || (ref_syn(ref_mask(j, i)) == s && ref_bits_ok(c, j, i));
        if (ok) begin
          int l;
          l = ref_lik(c, j, i);
          if (!valid[j] || l > best[j]) begin
            valid[j] = 1; best[j] = l; bpos[j] = i;
          end
        end
      end
    end
    for (int t = 0; t < LLIST; t++) begin
      int sel;
      sel = -1;
      for (int j = 0; j < K; j++)
        if (valid[j] && !used[j] && (sel < 0 || best[j] > best[sel])) sel = j;
      if (sel < 0) break;
      used[sel] = 1;
      tries++;
      if (ref_syn(c ^ ref_mask(sel, bpos[sel])) == 0) begin
        corrected = 1; typ = sel; pos = bpos[sel];
        return c ^ ref_mask(sel, bpos[sel]);
      end
    end
    failed = 1;
    return c;
  endfunction

  // Noiseless target output (scaled by 2^QF) for bit a_k and history
  // h[0] = a_(k-1), h[1] = a_(k-2), h[2] = a_(k-3).
  function automatic int ref_qclean(bit a, bit [2:0] h);
    int y;
    y = (a ? 1 : -1) * G_TAP[0];
    for (int l = 1; l < 4; l++) y += (h[l-1] ? 1 : -1) * G_TAP[l];
    return y * (1 << QF);
  endfunction

  // Roughly Gaussian integer noise, standard deviation about 0.58*sd.
  function automatic int ref_noise(int sd);
    int a;
    if (sd == 0) return 0;
    a = 0;
    for (int i = 0; i < 4; i++) a += int'($urandom_range(0, 2 * sd)) - sd;
    return a / 2;
  endfunction

endpackage
