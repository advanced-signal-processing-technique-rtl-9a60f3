// tb_error_corr_bank: drives random error-signal windows, candidate flags
// and signs through scans of N positions; checks every likelihood against a
// reference correlation with the convolved taps minus the offset, and the
// per-type maximum and its position at the end of each scan. A directed
// case checks that an error signal equal to the target response of an event
// gives the event's own filter the value +eta (half the event energy).
module tb_error_corr_bank;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, step = 0;
  pos_t pos = '0;
  eq_t  ewin [LHMAX];
  logic [K-1:0] cand = '0, ev_pos_sign = '0;
  lik_t lik [K];
  logic [K-1:0] best_valid, best_sign;
  lik_t best_lik [K];
  pos_t best_pos [K];
  int checks = 0, failures = 0;

  error_corr_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want_lik(int j);
    int a;
    a = 0;
    for (int m = 0; m < R_LEN[j] + 3; m++) a += int'(ewin[m]) * ref_tap(j, m);
    if (!ev_pos_sign[j]) a = -a;
    return a - ref_eta(j);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      bit vld [K];
      int bl  [K];
      int bp  [K];
      for (int j = 0; j < K; j++) vld[j] = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int i = 1; i <= N; i++) begin
        pos = pos_t'(i);
        for (int m = 0; m < LHMAX; m++)
          ewin[m] = (m < LHMAX - 1 || (t % 2 == 0)) ? eq_t'($signed($urandom_range(0, 1000)) - 500) : '0;
        cand        = (t % 3 == 0) ? K'($urandom) & K'($urandom) : K'($urandom);
        ev_pos_sign = K'($urandom);
        #1;
        for (int j = 0; j < K; j++) begin
          checks++;
          if (int'(lik[j]) != want_lik(j)) begin
            failures++;
            if (failures < 10) $display("FAIL lik t=%0d i=%0d j=%0d got %0d want %0d", t, i, j, lik[j], want_lik(j));
          end
          if (cand[j] && (!vld[j] || want_lik(j) > bl[j])) begin
            vld[j] = 1; bl[j] = want_lik(j); bp[j] = i;
          end
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
      for (int j = 0; j < K; j++) begin
        checks++;
        if (best_valid[j] != vld[j] || (vld[j] && (int'(best_lik[j]) != bl[j] || int'(best_pos[j]) != bp[j]))) begin
          failures++;
          $display("FAIL best t=%0d j=%0d", t, j);
        end
      end
    end
    // matched response: e = 2^QF * 2 * (g * pattern_j) gives +eta_j
    for (int j = 0; j < K; j++) begin
      for (int m = 0; m < LHMAX; m++) ewin[m] = eq_t'(2 * ref_tap(j, m) * (1 << QF));
      ev_pos_sign = '1;
      #1;
      checks++;
      if (int'(lik[j]) != ref_eta(j)) begin
        failures++;
        $display("FAIL matched j=%0d got %0d want %0d", j, lik[j], ref_eta(j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
