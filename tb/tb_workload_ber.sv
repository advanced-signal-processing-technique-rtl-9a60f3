// tb_workload_ber: bit-error-rate run of the whole read chain at the
// default sizes, in the manner of the published BER comparison: random
// codewords of the (203,200) code through the 1+6D+7D^2+2D^3 target with
// Gaussian noise at two noise levels, alternating codewords between the
// position search on (main configuration, L = 3) and off. A second,
// unstalled copy of the Viterbi detector records the decisions before
// post-processing, so the bit errors before and after the post-Viterbi
// processor can be counted for each setting.
// Per codeword it checks: a codeword the detector got right leaves unchanged
// and unflagged; every output either has zero syndrome or is flagged failed
// and equals the detector output. Over the run it checks that detector errors
// occurred and that post-processing with the position search on left fewer
// bit errors than it received.
// The channel here has white noise only; the published figures also include
// jitter noise, so the numbers are not comparable to them.
module tb_workload_ber;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCW   = 1200;
  localparam int DEPTH = 32;
  localparam int NSMP  = NCW * N + DEPTH;

  logic clk = 0, rst_n = 0, ops_en = 1;
  logic enc_in_valid = 0, enc_in_ready, enc_in_bit = 0;
  logic enc_out_valid, enc_out_ready = 1, enc_out_bit, enc_out_last;
  logic rd_in_valid = 0, rd_in_ready;
  q_t   rd_in_q = '0;
  logic rd_out_valid, rd_out_ready = 1;
  logic [N-1:0] rd_out_cw;
  pvp_status_t  rd_out_status;
  logic ref_out_valid, ref_out_bit, ref_in_ready;
  q_t   ref_out_q;
  int checks = 0, failures = 0;

  pvp_system dut (.*);

  // decisions before post-processing
  ml_detector #(.DEPTH(DEPTH)) u_ref_det (
    .clk, .rst_n, .in_valid(rd_in_valid && rd_in_ready), .in_ready(ref_in_ready),
    .in_q(rd_in_q), .out_valid(ref_out_valid), .out_ready(1'b1),
    .out_bit(ref_out_bit), .out_q(ref_out_q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t a_all [NCW];
  bit  det_bits [NCW * N];
  int  q_all [NSMP];
  int  n_det = 0;

  function automatic int gauss(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return int'(sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2));
  endfunction

  function automatic bit mode_of(int b);   // position search on?
    return (b % 2) == 0;
  endfunction
  function automatic real sigma_of(int b); // noise, in 1/16 target units
    return (b < NCW / 2) ? 36.0 : 44.0;
  endfunction

  always @(posedge clk)
    if (rst_n && ref_out_valid && n_det < NCW * N) begin
      det_bits[n_det] = ref_out_bit;
      n_det++;
    end

  initial begin
    bit [2:0] h;
    h = '0;
    for (int b = 0; b < NCW; b++) begin
      for (int p = 0; p < N; p++) a_all[b][p] = 1'($urandom);
      a_all[b][2:0] = '0;
      a_all[b][2:0] = ref_syn(a_all[b]);
      for (int p = 0; p < N; p++) begin
        q_all[b * N + p] = ref_qclean(a_all[b][p], h) + gauss(sigma_of(b));
        h = {h[1:0], a_all[b][p]};
      end
    end
    for (int p = 0; p < DEPTH; p++) begin
      bit x;
      x = 1'($urandom);
      q_all[NCW * N + p] = ref_qclean(x, h);
      h = {h[1:0], x};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    ops_en = mode_of(0);
    for (int k = 0; k < NSMP; k++) begin
      @(negedge clk);
      rd_in_valid = 1;
      rd_in_q = q_t'(q_all[k] > 2047 ? 2047 : (q_all[k] < -2048 ? -2048 : q_all[k]));
      @(posedge clk);
      while (!rd_in_ready) @(posedge clk);
    end
    @(negedge clk);
    rd_in_valid = 0;
  end

  // [noise level][mode]
  int pre_err [2][2], post_err [2][2], cw_err [2][2], cw_fixed [2][2], cw_fail [2][2];

  initial begin
    int b;
    b = 0;
    for (int l = 0; l < 2; l++)
      for (int m = 0; m < 2; m++) begin
        pre_err[l][m] = 0; post_err[l][m] = 0; cw_err[l][m] = 0; cw_fixed[l][m] = 0; cw_fail[l][m] = 0;
      end
    @(posedge rst_n);
    while (b < NCW) begin
      @(posedge clk);
      if (rd_out_valid && rd_out_ready) begin
        cw_t d;
        int  l, m, e0, e1;
        l = (b < NCW / 2) ? 0 : 1;
        m = mode_of(b) ? 1 : 0;
        for (int p = 0; p < N; p++) d[p] = det_bits[b * N + p];
        e0 = $countones(d ^ a_all[b]);
        e1 = $countones(rd_out_cw ^ a_all[b]);
        pre_err[l][m]  += e0;
        post_err[l][m] += e1;
        if (e0 != 0) cw_err[l][m]++;
        if (e0 != 0 && e1 == 0) cw_fixed[l][m]++;
        if (rd_out_status.failed) cw_fail[l][m]++;
        checks++;
        if (e0 == 0 && (rd_out_status.detected || rd_out_cw != a_all[b])) begin
          failures++;
          $display("FAIL codeword %0d: clean input changed", b);
        end
        checks++;
        if (ref_syn(rd_out_cw) != 0 && !(rd_out_status.failed && rd_out_cw == d)) begin
          failures++;
          $display("FAIL codeword %0d: non-zero syndrome not flagged", b);
        end
        b++;
        if (b < NCW) ops_en = mode_of(b);
      end
    end
    for (int l = 0; l < 2; l++)
      for (int m = 1; m >= 0; m--)
        $display("noise sigma %0.1f/16, search %s: codewords %0d, with detector errors %0d, fully repaired %0d, failed %0d, bit errors before %0d after %0d",
                 l ? 44.0 : 36.0, m ? "on " : "off", NCW / 4, cw_err[l][m], cw_fixed[l][m], cw_fail[l][m],
                 pre_err[l][m], post_err[l][m]);
    checks++;
    if (cw_err[0][1] + cw_err[1][1] == 0) begin
      failures++;
      $display("FAIL: no detector errors, noise too low for the run to mean anything");
    end
    checks++;
    if (post_err[0][1] + post_err[1][1] >= pre_err[0][1] + pre_err[1][1]) begin
      failures++;
      $display("FAIL: position-search processing did not reduce bit errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
