// post_viterbi_proc: advanced post-Viterbi processor.
//
// Corrects the most likely dominant error event in each codeword leaving the
// Viterbi (ML) detector, using the error detection code both to detect the
// error and to narrow down where it can be, and retrying with the next most
// likely event when a correction does not clear the syndrome.
//
// Operation, one codeword at a time:
//   LOAD   N detected bits and their equalizer samples are taken in, one pair
//          per accepted beat. The bits go to the codeword register and the
//          syndrome check; the target filter forms the error signal
//          e_k = q_k - (g * a^)_k, which is stored per position.
//   CHECK  A zero syndrome passes the codeword on untouched. Otherwise:
//   SCAN   Every starting position 1..N is visited, one per cycle. The
//          position search marks, per error type, the positions whose event
//          syndrome equals the codeword syndrome and whose detected bits can
//          produce the event; each matched filter keeps its largest
//          normalized likelihood over its marked positions.
//   LIST   List-correction: the largest remaining per-type maximum is
//          applied to the codeword and the syndrome of the result is computed;
//          a zero syndrome ends the search, otherwise the next largest is
//          tried, up to L times (one try per cycle). If none succeeds, or no
//          candidate exists, the detected codeword is passed on unchanged and
//          the status reports a failure.
//   DONE   The codeword and its status are offered on the output until taken.
//
// The structure (syndrome check, target filter and error signal, position
// search, bank of matched filters, selection of the largest and following
// likelihoods, correction with syndrome re-check) follows the published block
// diagram with K = 6 error types and L = 3. The one-position-per-cycle scan,
// the handshakes, the single codeword buffer (no overlap of input and
// processing) and the fixed-point formats are choices of this design.
// With 'ops_en' low the position search is bypassed and every position is a
// candidate (a conventional processor when L = 1); it is meant for comparison.
//
// Timing: N input beats, 1 cycle CHECK, N cycles SCAN, 1..L cycles LIST,
// then the output handshake. Counted in clock edges after the edge accepting
// the last input beat, out_valid rises on edge 1 for a zero syndrome, on edge
// N+1+t when the t-th try succeeds, and on edge N+2+t when t tries fail (or
// t = 0 candidates exist). in_ready is low from the last input beat until the
// output is taken.
module post_viterbi_proc
  import pvp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ops_en,
  // detector output and aligned equalizer samples, positions 1..N in order
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_bit,
  input  q_t           in_q,
  // corrected codeword, bit p-1 = position p
  output logic         out_valid,
  input  logic         out_ready,
  output logic [N-1:0] out_cw,
  output pvp_status_t  out_status
);

  typedef enum logic [2:0] {S_LOAD, S_CHECK, S_SCAN, S_LIST, S_DONE} state_t;
  state_t state;

  logic [N-1:0] cw;             // codeword register
  eq_t          emem [N];       // error signal per position
  pos_t         cnt;            // load counter (0-based) / scan position (1-based)
  pvp_status_t  status;
  logic [K-1:0] used;

  // ------------------------------------------------------------ load side
  logic accept;
  eq_t  e_sig, q_hat;
  syn_t syndrome;

  assign in_ready = (state == S_LOAD);
  assign accept   = in_valid && in_ready;

  target_error_signal u_target (
    .clk, .rst_n, .valid(accept), .a_bit(in_bit), .q(in_q),
    .e_sig, .q_hat
  );

  syndrome_check u_syn (
    .clk, .rst_n,
    .clear    (state == S_DONE && out_ready),
    .bit_valid(accept),
    .bit_in   (in_bit),
    .syndrome
  );

  // ------------------------------------------------------------ scan side
  logic             scan_start, scan_step;
  logic [LEMAX-1:0] win;
  eq_t              ewin [LHMAX];
  logic [K-1:0]     cand, ev_sign;
  lik_t             lik [K];
  logic [K-1:0]     best_valid, best_sign;
  lik_t             best_lik [K];
  pos_t             best_pos [K];

  assign scan_start = (state == S_CHECK);
  assign scan_step  = (state == S_SCAN);

  always_comb begin
    for (int k = 0; k < int'(LEMAX); k++)
      win[k] = (int'(cnt) - 1 + k < int'(N)) ? cw[int'(cnt) - 1 + k] : 1'b0;
    for (int m = 0; m < int'(LHMAX); m++)
      ewin[m] = (int'(cnt) - 1 + m < int'(N)) ? emem[int'(cnt) - 1 + m] : '0;
  end

  optimal_position_search u_ops (
    .clk, .rst_n, .start(scan_start), .step(scan_step), .ops_en,
    .syndrome, .pos(cnt), .win, .cand, .ev_pos_sign(ev_sign)
  );

  error_corr_bank u_mf (
    .clk, .rst_n, .start(scan_start), .step(scan_step), .pos(cnt),
    .ewin, .cand, .ev_pos_sign(ev_sign), .lik,
    .best_valid, .best_lik, .best_pos, .best_sign
  );

  // ------------------------------------------------------------ list-correction
  logic         sel_valid;
  typ_t         sel_type;
  logic [N-1:0] cw_try;
  syn_t         syn_try;

  list_select u_sel (
    .valid(best_valid), .used, .lik(best_lik), .sel_valid, .sel_type
  );

  correction u_corr (
    .cw_in(cw), .ev_type(sel_type), .ev_pos(best_pos[sel_type]),
    .cw_out(cw_try), .syn_out(syn_try)
  );

  // ------------------------------------------------------------ control
  // Error-signal memory: written during LOAD, read only during SCAN.
  always_ff @(posedge clk)
    if (accept) emem[cnt] <= e_sig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      cnt    <= '0;
      cw     <= '0;
      status <= '0;
      used   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (accept) begin
          cw[cnt]   <= in_bit;
          if (cnt == pos_t'(N - 1)) state <= S_CHECK;
          else                      cnt   <= cnt + 1'b1;
        end
        S_CHECK: begin
          status          <= '0;
          status.syndrome <= syndrome;
          used            <= '0;
          if (syndrome == '0) begin
            state <= S_DONE;
          end else begin
            status.detected <= 1'b1;
            cnt             <= pos_t'(1);
            state           <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (cnt == pos_t'(N)) state <= S_LIST;
          else                  cnt   <= cnt + 1'b1;
        end
        S_LIST: begin
          if (!sel_valid || int'(status.tries) == int'(LLIST)) begin
            status.failed <= 1'b1;
            state         <= S_DONE;
          end else begin
            status.tries <= status.tries + 1'b1;
            used[sel_type] <= 1'b1;
            if (syn_try == '0) begin
              cw               <= cw_try;
              status.corrected <= 1'b1;
              status.ev_type   <= sel_type;
              status.ev_pos    <= best_pos[sel_type];
              state            <= S_DONE;
            end
          end
        end
        S_DONE: if (out_ready) begin
          cnt   <= '0;
          state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign out_valid  = (state == S_DONE);
  assign out_cw     = cw;
  assign out_status = status;

  // The output holds until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_cw) && $stable(out_status));
  // No more than L corrections are ever tried.
  a_tries: assert property (@(posedge clk) disable iff (!rst_n)
    int'(status.tries) <= int'(LLIST));

endmodule
