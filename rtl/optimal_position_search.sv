// optimal_position_search: candidate starting positions for each dominant
// error type.
//
// The codeword is scanned one starting position i per step. For each of the
// K error types the block keeps the syndrome that type would leave if it
// started at i: it is loaded with the type's syndrome at position 1 on
// 'start' and multiplied by x modulo G(x) on every 'step', which walks the
// period-(2^M - 1) syndrome sequence. Position i is a candidate for type j
// when
//   1. that syndrome equals the syndrome of the recovered codeword,
//   2. the detected bits under the event can produce it: an error flips a
//      detected bit, so at every non-zero entry of the event the detected bit
//      must be the opposite of the event's sign, with one common sign +- for
//      the whole event (e.g. [2,-2] needs two unequal neighbouring bits), and
//   3. the event ends inside the codeword (i + L_e - 1 <= N).
// Steps 1 and 2 are the position search of the design; with 'ops_en' low
// both are skipped and every in-range position is a candidate, as in a
// conventional post-Viterbi processor.
// 'ev_pos_sign[j]' reports the sign implied by the detected bits: 1 when the
// event is +pattern (first flipped detected bit is 0), 0 when it is -pattern.
//
// Timing: 'cand' and 'ev_pos_sign' are combinational in 'win', 'pos' and the
// internal syndrome registers, i.e. valid for the position held in 'pos'
// during the cycle before the 'step' edge.
module optimal_position_search
  import pvp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,               // load position-1 syndromes
  input  logic         step,                // advance to the next position
  input  logic         ops_en,              // 0: conventional, all positions
  input  syn_t         syndrome,            // syndrome of the recovered codeword
  input  pos_t         pos,                 // current starting position i (1..N)
  input  logic [LEMAX-1:0] win,             // detected bits at i .. i+LEMAX-1
  output logic [K-1:0] cand,
  output logic [K-1:0] ev_pos_sign
);

  syn_t ev_syn [K];   // syndrome of type j starting at the current position

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(K); j++) ev_syn[j] <= '0;
    end else if (start) begin
      for (int j = 0; j < int'(K); j++) ev_syn[j] <= ev_syn1(j);
    end else if (step) begin
      for (int j = 0; j < int'(K); j++) ev_syn[j] <= syn_mulx(ev_syn[j]);
    end
  end

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      logic fits, syn_ok, bits_ok;
      fits    = (int'(pos) >= 1) && (int'(pos) + EV_LEN[j] - 1 <= int'(N));
      syn_ok  = (ev_syn[j] == syndrome);
      bits_ok = 1'b1;
      for (int k = 0; k < int'(LEMAX); k++)
        if (k < EV_LEN[j] && EV_PAT[j][k] != 0)
          if (win[k] != (win[0] ^ (EV_PAT[j][k] < 0))) bits_ok = 1'b0;
      cand[j]        = fits && (!ops_en || (syn_ok && bits_ok));
      ev_pos_sign[j] = !win[0];
    end
  end

endmodule
