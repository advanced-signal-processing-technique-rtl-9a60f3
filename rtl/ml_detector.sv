// ml_detector: Viterbi (maximum-likelihood) detector for the PR target
// g(D) = 1 + 6D + 7D^2 + 2D^3.
//
// The trellis has 2^(LG-1) = 8 states, a state being the last three detected
// bits. Each accepted equalizer sample q_k updates all states in one cycle
// (add-compare-select): the branch metric is the squared distance between q_k
// and the noiseless target output of the branch, sum_l g_l a_(k-l) with
// a in {-1,+1}, scaled by 2^QF. Path metrics are re-based to the smallest one
// every step so they stay bounded. Survivor paths are kept by register
// exchange, DEPTH bits per state; the bit leaving the survivor of the best
// state is the decision for the sample DEPTH steps back. The equalizer samples
// are delayed by the same DEPTH steps, so each output beat is an aligned pair
// (a^_k, q_k) ready for the post-Viterbi processor.
//
// Only the function (an ML detector using the Viterbi algorithm on the
// equalized samples) comes from the published design; the trellis form,
// metric, survivor depth and the start in the all-zero-bits state after reset
// (matching the target filter's initial history) are this design's choices.
//
// Interface: in_valid/in_ready/in_q, out_valid/out_ready/out_bit/out_q. The
// first output (for sample 1) is registered on the edge that accepts sample
// DEPTH+1; afterwards every accepted input produces one output beat. A stream must be followed by DEPTH
// further samples to flush its last decisions.
module ml_detector
  import pvp_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  q_t   in_q,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output q_t   out_q
);

  localparam int unsigned NS  = 1 << (LG - 1);
  localparam int unsigned PMW = 32;
  typedef logic [PMW-1:0] pm_t;

  pm_t              pm   [NS];
  logic [DEPTH-1:0] surv [NS];      // bit 0 = newest decision
  q_t               qdly [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] fill;
  logic             accept;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  // Add-compare-select. State s: s[0] = a_(k-1), s[1] = a_(k-2), s[2] = a_(k-3).
  pm_t              pm_new   [NS];
  logic [DEPTH-1:0] surv_new [NS];
  logic             out_dec;
  logic [NS-1:0]    dec;            // 1: survivor came through oldest bit 1
  always_comb begin
    pm_t pm_min;
    int  best;
    for (int sn = 0; sn < int'(NS); sn++) begin
      pm_t cand [2];
      for (int o = 0; o < 2; o++) begin
        int sp, y, d;
        sp = ((sn >> 1) & 3) | (o << 2);     // predecessor: drop oldest bit o
        y  = ((sn & 1) != 0 ? GTAP[0] : -GTAP[0])
           + ((sp & 1) != 0 ? GTAP[1] : -GTAP[1])
           + ((sp & 2) != 0 ? GTAP[2] : -GTAP[2])
           + ((sp & 4) != 0 ? GTAP[3] : -GTAP[3]);
        d  = int'(in_q) - (y <<< QF);
        cand[o] = pm[sp] + pm_t'(d * d);
      end
      dec[sn] = (cand[1] < cand[0]);
      if (dec[sn]) begin
        pm_new[sn]   = cand[1];
        surv_new[sn] = {surv[((sn >> 1) & 3) | 4][DEPTH-2:0], sn[0]};
      end else begin
        pm_new[sn]   = cand[0];
        surv_new[sn] = {surv[(sn >> 1) & 3][DEPTH-2:0], sn[0]};
      end
    end
    pm_min = pm_new[0];
    best   = 0;
    for (int s = 1; s < int'(NS); s++)
      if (pm_new[s] < pm_min) begin
        pm_min = pm_new[s];
        best   = s;
      end
    for (int s = 0; s < int'(NS); s++) pm_new[s] = pm_new[s] - pm_min;
    // bit leaving the best state's survivor: the decision DEPTH steps back
    out_dec = surv[((best >> 1) & 3) | (int'(dec[best]) << 2)][DEPTH-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NS); s++) begin
        pm[s]   <= (s == 0) ? '0 : pm_t'(1 << 24);
        surv[s] <= '0;
      end
      for (int i = 0; i < int'(DEPTH); i++) qdly[i] <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_q     <= '0;
    end else begin
      if (accept) begin
        for (int s = 0; s < int'(NS); s++) begin
          pm[s]   <= pm_new[s];
          surv[s] <= surv_new[s];
        end
        qdly[0] <= in_q;
        for (int i = 1; i < int'(DEPTH); i++) qdly[i] <= qdly[i-1];
        if (int'(fill) < int'(DEPTH)) fill <= fill + 1'b1;
      end
      if (accept && int'(fill) == int'(DEPTH)) begin
        out_valid <= 1'b1;
        out_bit   <= out_dec;
        out_q     <= qdly[DEPTH-1];
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // An output beat, once offered, stays until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_bit) && $stable(out_q));

endmodule
