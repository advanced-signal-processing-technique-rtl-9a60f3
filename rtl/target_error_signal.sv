// target_error_signal: target filter g(D) and error-signal subtractor.
//
// Re-creates the noiseless equalizer output the detected bits would give,
// q^_k = sum_l g_l a^_(k-l) with a^ in {-1,+1} (bit 1 -> +1, bit 0 -> -1),
// and subtracts it from the equalizer sample: e_k = q_k - q^_k. The target is
// g(D) = 1 + 6D + 7D^2 + 2D^3. Samples are fixed-point with QF fractional
// bits, so q^_k is scaled by 2^QF before the subtraction.
//
// The LG-1 previous detected bits are kept in a history register that runs
// on across codewords; after reset it holds 0 bits (a^ = -1), a choice of this
// design. The output is combinational in the current bit and sample; the
// history advances on each clock edge with 'valid' high.
module target_error_signal
  import pvp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic a_bit,     // detected bit a^_k
  input  q_t   q,         // equalizer sample q_k
  output eq_t  e_sig,     // e_q,k = q_k - q^_k
  output eq_t  q_hat      // q^_k
);

  logic [LG-2:0] hist;    // hist[0] = a^_(k-1), hist[1] = a^_(k-2), ...

  always_comb begin
    int acc;
    acc = a_bit ? GTAP[0] : -GTAP[0];
    for (int l = 1; l < int'(LG); l++)
      acc += hist[l-1] ? GTAP[l] : -GTAP[l];
    q_hat = eq_t'(acc <<< QF);
    e_sig = eq_t'(q) - q_hat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     hist <= '0;
    else if (valid) hist <= {hist[LG-3:0], a_bit};
  end

endmodule
