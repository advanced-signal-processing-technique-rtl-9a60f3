// pvp_pkg: constants, types and elaboration-time functions shared by the
// advanced post-Viterbi processor.
//
// Codeword: an (N, N-M) CRC code with generator G(x) = 1 + x^2 + x^3 (M = 3),
// N = 203, as used for the evaluated system. Bit position p (1..N) of a
// codeword carries the coefficient of x^(p-1); with this ordering the
// syndrome of each dominant error event starting at position 1, 2, ...
// reproduces the period-7 sequences of the published syndrome table
// (e.g. 6 3 4 2 1 5 7 for +-[2,-2]). A syndrome is held as a polynomial
// (bit i = coefficient of x^i); syn_to_dec() gives the decimal value the
// table prints, which reads the x^0 coefficient as the most significant bit.
//
// Channel: partial-response target g(D) = 1 + 6D + 7D^2 + 2D^3. Equalizer
// samples are signed fixed-point numbers with QF fractional bits in units of
// the target output for bipolar (+-1) symbols (design choice).
//
// Dominant error events (K = 6): +-[2,-2], +-[2,-2,2], +-[2,-2,2,-2],
// +-[2,-2,2,-2,2], +-[2,-2,0,2,-2], +-[2,-2,2,-2,2,-2], stored as the
// sign pattern of the + form, halved (entries +1, -1, 0).
package pvp_pkg;

  // ---------------------------------------------------------------- code
  localparam int unsigned M      = 3;            // CRC degree
  localparam logic [M:0]  GPOLY  = 4'b1101;      // 1 + x^2 + x^3 (bit i = x^i)
  localparam int unsigned N      = 203;          // codeword length
  localparam int unsigned KINFO  = N - M;        // information bits (200)

  // ---------------------------------------------------------------- channel
  localparam int unsigned LG     = 4;            // target length
  localparam int          GTAP [LG] = '{1, 6, 7, 2};
  localparam int unsigned QW     = 12;           // equalizer sample width
  localparam int unsigned QF     = 4;            // fractional bits of a sample
  localparam int unsigned EQW    = QW + 2;       // error-signal width
  localparam int unsigned LW     = 24;           // likelihood width

  // ---------------------------------------------------------------- events
  localparam int unsigned K      = 6;            // dominant error types
  localparam int unsigned LLIST  = 3;            // list-correction depth L
  localparam int unsigned LEMAX  = 6;            // longest error event
  localparam int unsigned LHMAX  = LEMAX + LG - 1; // matched-filter length
  localparam int unsigned POSW   = $clog2(N + 1);
  localparam int unsigned TYPW   = $clog2(K);
  localparam int unsigned TRYW   = $clog2(LLIST + 1);

  localparam int EV_LEN [K] = '{2, 3, 4, 5, 5, 6};
  localparam int EV_PAT [K][LEMAX] = '{
    '{1, -1,  0,  0,  0,  0},
    '{1, -1,  1,  0,  0,  0},
    '{1, -1,  1, -1,  0,  0},
    '{1, -1,  1, -1,  1,  0},
    '{1, -1,  0,  1, -1,  0},
    '{1, -1,  1, -1,  1, -1}
  };

  typedef logic [M-1:0]    syn_t;
  typedef logic signed [QW-1:0]  q_t;
  typedef logic signed [EQW-1:0] eq_t;
  typedef logic signed [LW-1:0]  lik_t;
  typedef logic [POSW-1:0] pos_t;
  typedef logic [TYPW-1:0] typ_t;

  // Outcome of one codeword through the post-Viterbi processor.
  typedef struct packed {
    logic                    detected;   // syndrome of the detector output was non-zero
    logic                    corrected;  // a correction gave a zero syndrome
    logic                    failed;     // detected, but no correction within L tries
    logic [TRYW-1:0]         tries;      // corrections tried (1..L), 0 if none
    typ_t                    ev_type;    // error type of the accepted correction
    pos_t                    ev_pos;     // its starting position (1..N)
    syn_t                    syndrome;   // syndrome of the detector output
  } pvp_status_t;

  // ---------------------------------------------------------------- functions
  // Multiply a syndrome polynomial by x modulo G(x).
  function automatic syn_t syn_mulx(syn_t s);
    syn_t r;
    r = {s[M-2:0], 1'b0};
    if (s[M-1]) r = r ^ GPOLY[M-1:0];
    return r;
  endfunction

  // x^e mod G(x)
  function automatic syn_t syn_xpow(int unsigned e);
    syn_t r;
    r = syn_t'(1);
    for (int unsigned i = 0; i < e; i++) r = syn_mulx(r);
    return r;
  endfunction

  // Product of two residues modulo G(x).
  function automatic syn_t syn_mul(syn_t a, syn_t b);
    syn_t r, t;
    r = '0;
    t = a;
    for (int i = 0; i < int'(M); i++) begin
      if (b[i]) r = r ^ t;
      t = syn_mulx(t);
    end
    return r;
  endfunction

  // Period of x modulo G(x) (7 for a primitive cubic).
  function automatic int unsigned syn_period();
    syn_t r;
    int unsigned p;
    r = syn_mulx(syn_t'(1));
    p = 1;
    while (r != syn_t'(1) && p < (1 << M)) begin
      r = syn_mulx(r);
      p++;
    end
    return p;
  endfunction

  // Decimal value as printed in the syndrome table (x^0 coefficient is the MSB).
  function automatic int unsigned syn_to_dec(syn_t s);
    int unsigned d;
    d = 0;
    for (int i = 0; i < int'(M); i++) d = (d << 1) | int'(s[i]);
    return d;
  endfunction

  // Syndrome of error type j when it starts at position 1.
  function automatic syn_t ev_syn1(int j);
    syn_t r;
    r = '0;
    for (int k = 0; k < EV_LEN[j]; k++)
      if (EV_PAT[j][k] != 0) r = r ^ syn_xpow(k);
    return r;
  endfunction

  // Matched-filter tap m of error type j: (g * pattern_j)[m].
  function automatic int mf_tap(int j, int m);
    int acc;
    acc = 0;
    for (int l = 0; l < int'(LG); l++)
      if (m - l >= 0 && m - l < EV_LEN[j]) acc += GTAP[l] * EV_PAT[j][m-l];
    return acc;
  endfunction

  // Offset eta_j in likelihood units: sum of squared taps, scaled by 2^QF.
  function automatic int mf_eta(int j);
    int acc;
    acc = 0;
    for (int m = 0; m < int'(LHMAX); m++) acc += mf_tap(j, m) * mf_tap(j, m);
    return acc << QF;
  endfunction

  // Columns of the parity-check matrix, packed: bits [M*p +: M] hold
  // column p (codeword position p+1), which is x^p mod G(x).
  function automatic logic [N*M-1:0] h_columns();
    logic [N*M-1:0] h;
    syn_t t;
    t = syn_t'(1);
    for (int p = 0; p < int'(N); p++) begin
      h[M*p +: M] = t;
      t = syn_mulx(t);
    end
    return h;
  endfunction

  // Matched-filter taps of type j, packed as TAPW-bit signed fields.
  localparam int unsigned TAPW = 8;
  function automatic logic [LHMAX*TAPW-1:0] mf_taps_packed(int j);
    logic [LHMAX*TAPW-1:0] t;
    for (int m = 0; m < int'(LHMAX); m++) t[TAPW*m +: TAPW] = TAPW'(mf_tap(j, m));
    return t;
  endfunction

endpackage
