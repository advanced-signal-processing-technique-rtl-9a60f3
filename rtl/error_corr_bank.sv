// error_corr_bank: bank of K error-correlation (matched) filters.
//
// Filter j is matched to dominant error type j seen through the target:
// its taps h_j = g * p_j are the target response convolved with the event's
// sign pattern (p_j, entries +-1/0), and are computed at elaboration time.
// For the starting position i in the scan it forms the normalized likelihood
//     lik_j(i) = s * sum_m e_(i+m) h_j[m]  -  eta_j,
//     eta_j    = 2^QF * sum_m h_j[m]^2,
// where e is the error signal q - q^ and s = +-1 is the event sign implied by
// the detected bits. This is the likelihood of the conventional matched-filter
// post-processor divided by a constant (2 for the +-2 event amplitude, and
// 2^(QF-1) for the sample format), so comparisons across filters are
// unchanged. Error-signal samples beyond the codeword end are supplied as 0 by
// the caller (the window is cut at the codeword boundary).
//
// Each filter keeps the maximum likelihood over the positions flagged by
// 'cand' and where it occurred: the per-type output the list selection works
// on. Equal values keep the earlier position.
//
// Timing: 'lik' is combinational in the window; 'start' clears the maxima;
// on each 'step' edge the current position is compared in. The maxima are
// final one cycle after the last step.
module error_corr_bank
  import pvp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         step,
  input  pos_t         pos,
  input  eq_t          ewin [LHMAX],        // e at i .. i+LHMAX-1
  input  logic [K-1:0] cand,
  input  logic [K-1:0] ev_pos_sign,
  output lik_t         lik      [K],        // likelihood at the current position
  output logic [K-1:0] best_valid,
  output lik_t         best_lik [K],
  output pos_t         best_pos [K],
  output logic [K-1:0] best_sign
);

  for (genvar gj = 0; gj < int'(K); gj++) begin : g_filter
    localparam logic [LHMAX*TAPW-1:0] TAPS = mf_taps_packed(gj);
    localparam lik_t ETA = lik_t'(mf_eta(gj));
    always_comb begin
      lik_t acc;
      acc = '0;
      for (int m = 0; m < int'(LHMAX); m++)
        acc = acc + lik_t'(ewin[m]) * lik_t'($signed(TAPS[TAPW*m +: TAPW]));
      if (!ev_pos_sign[gj]) acc = -acc;
      lik[gj] = acc - ETA;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_valid <= '0;
      best_sign  <= '0;
      for (int j = 0; j < int'(K); j++) begin
        best_lik[j] <= '0;
        best_pos[j] <= '0;
      end
    end else if (start) begin
      best_valid <= '0;
    end else if (step) begin
      for (int j = 0; j < int'(K); j++)
        if (cand[j] && (!best_valid[j] || lik[j] > best_lik[j])) begin
          best_valid[j] <= 1'b1;
          best_lik[j]   <= lik[j];
          best_pos[j]   <= pos;
          best_sign[j]  <= ev_pos_sign[j];
        end
    end
  end

endmodule
