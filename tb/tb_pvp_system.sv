// tb_pvp_system: end-to-end run of the whole design at its default sizes
// (203-bit codewords, K = 6, L = 3, 32-step survivors).
// Random information blocks are encoded; the testbench stands in for the
// recording channel and equalizer, producing target samples of the codeword
// bits with small noise. Into chosen codewords it blends the samples of a
// wrong bit sequence (70 % wrong, 30 % right), so that the Viterbi detector
// decides a dominant error event, or a single-bit error, there. The detector
// output then passes through the post-Viterbi processor. Each output codeword
// and status is compared with the reference model of the algorithm run on the
// expected detector output; codewords hit by a dominant event must come out
// equal to what was written when the position search is on.
// Mechanisms that must each occur: encoder parity insertion, clean codewords,
// first-try corrections, list-correction retries, correction failures, the
// position search switched off and on, and the detector held off while the
// processor is busy.
module tb_pvp_system;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  localparam int NCW   = 48;
  localparam int DEPTH = 32;     // default survivor depth of the detector

  logic clk = 0, rst_n = 0, ops_en = 1;
  logic enc_in_valid = 0, enc_in_ready, enc_in_bit = 0;
  logic enc_out_valid, enc_out_ready = 1, enc_out_bit, enc_out_last;
  logic rd_in_valid = 0, rd_in_ready;
  q_t   rd_in_q = '0;
  logic rd_out_valid, rd_out_ready = 0;
  logic [N-1:0] rd_out_cw;
  pvp_status_t  rd_out_status;
  int checks = 0, failures = 0;

  pvp_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [KINFO-1:0] info [NCW];
  cw_t a_all [NCW];        // written codewords
  cw_t r_all [NCW];        // expected detector output
  int  e_all [NCW][N];     // error signal the processor will form
  int  kind  [NCW];        // 0 clean, 1 dominant event, 2 single-bit error
  bit  mode  [NCW];        // position search on
  int  q_all [NCW * N + DEPTH];

  int n_par = 0, n_clean = 0, n_first = 0, n_retry = 0, n_fail = 0;
  int n_ops_off = 0, n_ops_on = 0, n_hold = 0, n_fixed = 0;

  // ---------------------------------------------------------------- encoder
  initial begin
    int blk, pos;
    for (int b = 0; b < NCW; b++)
      for (int p = 0; p < KINFO; p++) info[b][p] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        for (int b = 0; b < NCW; b++)
          for (int p = 0; p < KINFO; p++) begin
            @(negedge clk);
            enc_in_valid = 1; enc_in_bit = info[b][p];
            @(posedge clk);
            while (!enc_in_ready) begin
              n_par++;
              @(posedge clk);
            end
          end
        @(negedge clk);
        enc_in_valid = 0;
      end
      begin
        blk = 0; pos = 0;
        while (blk < NCW) begin
          @(posedge clk);
          if (enc_out_valid && enc_out_ready) begin
            a_all[blk][pos] = enc_out_bit;
            pos++;
            if (pos == N) begin
              pos = 0;
              blk++;
            end
          end
        end
      end
    join
    for (int b = 0; b < NCW; b++) begin
      checks += 2;
      if (a_all[b][KINFO-1:0] != info[b]) failures++;
      if (ref_syn(a_all[b]) != 0) failures++;
    end
    // ---------------------------------------------------------- channel
    begin
      bit [2:0] ha, hr;
      ha = '0; hr = '0;
      for (int b = 0; b < NCW; b++) begin
        int j, i;
        kind[b] = (b % 4 == 0) ? 0 : ((b % 6 == 5) ? 2 : 1);
        mode[b] = !(b % 8 == 5 || b % 8 == 6 || b % 12 == 11);
        r_all[b] = a_all[b];
        if (kind[b] == 1) begin
          // pick a dominant event the written bits can carry
          do begin
            j = $urandom_range(0, K - 1);
            i = $urandom_range(8, N - R_LEN[j] - 4);
          end while (!ref_bits_ok(a_all[b], j, i));
          r_all[b] = a_all[b] ^ ref_mask(j, i);
        end
        if (kind[b] == 2) begin
          i = $urandom_range(8, N - 8);
          r_all[b][i] = !r_all[b][i];
        end
        for (int p = 0; p < N; p++) begin
          int ca, cr, qv;
          ca = ref_qclean(a_all[b][p], ha);
          cr = ref_qclean(r_all[b][p], hr);
          qv = (7 * cr + 3 * ca) / 10 + ref_noise(6);
          q_all[b * N + p] = qv;
          e_all[b][p] = qv - cr;
          ha = {ha[1:0], a_all[b][p]};
          hr = {hr[1:0], r_all[b][p]};
        end
      end
      // flush: the channel runs on with further random bits
      for (int p = 0; p < DEPTH; p++) begin
        bit x;
        x = 1'($urandom);
        q_all[NCW * N + p] = ref_qclean(x, ha);
        ha = {ha[1:0], x};
      end
    end
    // ---------------------------------------------------------- read side
    ops_en = mode[0];
    for (int k = 0; k < NCW * N + DEPTH; k++) begin
      @(negedge clk);
      rd_in_valid = 1; rd_in_q = q_t'(q_all[k]);
      @(posedge clk);
      while (!rd_in_ready) begin
        n_hold++;
        @(posedge clk);
      end
    end
    @(negedge clk);
    rd_in_valid = 0;
  end

  // ---------------------------------------------------------------- checker
  initial begin
    int b;
    b = 0;
    @(posedge rst_n);
    while (b < NCW) begin
      @(negedge clk);
      rd_out_ready = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (rd_out_valid && rd_out_ready) begin
        cw_t want;
        bit  det, cor, fl;
        int  tr, ty, ps;
        for (int p = 0; p < N; p++) ref_e[p] = e_all[b][p];
        want = ref_pvp(r_all[b], mode[b], det, cor, fl, tr, ty, ps);
        checks += 2;
        if (rd_out_cw != want) begin
          failures++;
          $display("FAIL codeword %0d (kind %0d, mode %0d)", b, kind[b], mode[b]);
        end
        if (rd_out_status.detected != det || rd_out_status.corrected != cor ||
            rd_out_status.failed != fl || int'(rd_out_status.tries) != tr) begin
          failures++;
          $display("FAIL status %0d: got d%0d c%0d f%0d t%0d want d%0d c%0d f%0d t%0d", b, rd_out_status.detected, rd_out_status.corrected, rd_out_status.failed, rd_out_status.tries, det, cor, fl, tr);
        end
        if (kind[b] == 1 && mode[b]) begin
          checks++;
          if (rd_out_cw != a_all[b]) begin
            failures++;
            $display("FAIL codeword %0d not restored", b);
          end else n_fixed++;
        end
        if (!det) n_clean++;
        if (cor && tr == 1) n_first++;
        if (cor && tr > 1) n_retry++;
        if (fl) n_fail++;
        if (mode[b]) n_ops_on++; else n_ops_off++;
        b++;
        if (b < NCW) ops_en = mode[b];   // next codeword is not loaded yet
      end
    end
    $display("parity stalls %0d, clean %0d, first-try %0d, retried %0d, failed %0d, search off %0d / on %0d, detector held %0d, restored %0d",
             n_par, n_clean, n_first, n_retry, n_fail, n_ops_off, n_ops_on, n_hold, n_fixed);
    checks++;
    if (n_par == 0 || n_clean == 0 || n_first == 0 || n_retry == 0 || n_fail == 0 ||
        n_ops_off == 0 || n_ops_on == 0 || n_hold == 0 || n_fixed == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
