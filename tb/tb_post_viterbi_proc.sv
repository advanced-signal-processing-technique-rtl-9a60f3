// tb_post_viterbi_proc: codewords of the CRC code with injected dominant
// error events (and some single-bit and double-event errors) go through the
// processor together with noisy target samples of the written bits. Every
// output codeword and status word is compared with the reference model of
// the algorithm; the processing latency is checked against
//   1 clock (zero syndrome), N+1+t (t-th try succeeds), N+2+t (t tries fail)
// from the last input beat. Counts and requires: clean codewords, first-try
// corrections, list-correction retries, failures, and true corrections with
// the position search on.
module tb_post_viterbi_proc;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, ops_en = 1;
  logic in_valid = 0, in_ready, in_bit = 0;
  q_t   in_q = '0;
  logic out_valid, out_ready = 0;
  logic [N-1:0] out_cw;
  pvp_status_t  out_status;
  int checks = 0, failures = 0;

  post_viterbi_proc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks from the edge accepting the last input beat to the edge that
  // raises out_valid
  int  lat_cnt = 0, meas_lat = 0;
  bit  meas_done = 0;
  always @(posedge clk) begin
    if (out_valid && !meas_done) begin
      meas_lat  = lat_cnt;
      meas_done = 1;
    end
    if (in_valid && in_ready) begin
      lat_cnt   = 0;
      meas_done = 0;
    end else begin
      lat_cnt++;
    end
  end

  int n_clean = 0, n_first = 0, n_retry = 0, n_fail = 0, n_true = 0;
  bit [2:0] hist = '0;   // written-bit history of the channel model
  bit [2:0] rhist = '0;  // detected-bit history, as the processor's target filter

  // A codeword with zero syndrome (positions 1..3 hold the check bits), with
  // the bits under an event at 'pos' made able to carry error type j.
  function automatic cw_t make_cw(int j, int pos);
    cw_t c;
    bit  s0;
    for (int p = 0; p < N; p++) c[p] = 1'($urandom);
    if (j >= 0) begin
      s0 = 1'($urandom);
      for (int k = 0; k < R_LEN[j]; k++)
        if (R_PAT[j][k] != 0) c[pos + k - 1] = s0 ^ (R_PAT[j][k] < 0);
    end
    c[2:0] = '0;
    c[2:0] = ref_syn(c);
    return c;
  endfunction

  task automatic run_one(int kind, bit en, int sd);
    cw_t a, r, want;
    int  j, i, b1, b2, lat, want_lat;
    bit  det, cor, fl;
    int  tr, ty, ps;
    j = $urandom_range(0, K - 1);
    i = $urandom_range(4, N - R_LEN[j] + 1);
    a = make_cw(kind == 0 ? -1 : j, i);
    r = a;
    if (kind == 1) r = a ^ ref_mask(j, i);                      // one dominant event
    if (kind == 2) begin                                         // single bit error
      b1 = $urandom_range(3, N - 1);
      r[b1] = !r[b1];
    end
    if (kind == 3) begin                                         // event plus two bits
      r = a ^ ref_mask(j, i);
      b1 = $urandom_range(3, N - 1);
      b2 = $urandom_range(3, N - 1);
      r[b1] = !r[b1];
      r[b2] = !r[b2];
    end
    ops_en = en;
    for (int p = 0; p < N; p++) begin
      int qv;
      qv = ref_qclean(a[p], hist) + ref_noise(sd);
      hist = {hist[1:0], a[p]};
      @(negedge clk);
      while ($urandom_range(0, 7) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1; in_bit = r[p]; in_q = q_t'(qv);
      ref_e[p] = qv - ref_qclean(r[p], rhist);
      rhist = {rhist[1:0], r[p]};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    want = ref_pvp(r, en, det, cor, fl, tr, ty, ps);
    while (!meas_done) @(negedge clk);
    lat = meas_lat;
    want_lat = !det ? 1 : (cor ? N + 1 + tr : N + 2 + tr);
    checks += 3;
    if (lat != want_lat) begin
      failures++;
      $display("FAIL latency %0d want %0d", lat, want_lat);
    end
    if (out_cw != want) begin
      failures++;
      $display("FAIL codeword kind %0d en %0d", kind, en);
    end
    if (out_status.detected != det || out_status.corrected != cor || out_status.failed != fl ||
        int'(out_status.tries) != tr || (cor && (int'(out_status.ev_type) != ty || int'(out_status.ev_pos) != ps))) begin
      failures++;
      $display("FAIL status kind %0d en %0d: got d%0d c%0d f%0d t%0d ty%0d p%0d want d%0d c%0d f%0d t%0d ty%0d p%0d",
               kind, en, out_status.detected, out_status.corrected, out_status.failed, out_status.tries,
               out_status.ev_type, out_status.ev_pos, det, cor, fl, tr, ty, ps);
    end
    if (!det) n_clean++;
    if (cor && tr == 1) n_first++;
    if (cor && tr > 1) n_retry++;
    if (fl) n_fail++;
    if (en && kind == 1 && out_cw == a) n_true++;
    // output held until taken
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      checks++;
      if (!out_valid || out_cw != want) failures++;
    end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++)
      run_one(t % 4 == 0 ? 0 : (t % 10 == 3 ? 2 : (t % 10 == 7 ? 3 : 1)), t % 3 != 2, t % 2 ? 12 : 30);
    checks++;
    if (n_clean == 0 || n_first == 0 || n_retry == 0 || n_fail == 0 || n_true == 0) begin
      failures++;
    end
    $display("clean %0d, first-try %0d, retried %0d, failed %0d, true corrections %0d",
             n_clean, n_first, n_retry, n_fail, n_true);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
