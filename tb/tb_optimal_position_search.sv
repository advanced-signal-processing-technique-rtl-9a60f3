// tb_optimal_position_search: scans random detected codewords with random
// non-zero syndromes and compares, at every position and for every error
// type, the candidate flag and sign with the reference (syndrome of the
// event mask by long division equal to the codeword syndrome, bits able to
// produce the event, event inside the codeword). Also checks the published
// example with syndrome 2: the candidates of each type lie on the residue
// mod 7 of that type's listed start positions (e.g. 7k-6 for +-[2,-2,2,-2]).
// With ops_en low every in-range position must be a candidate.
module tb_optimal_position_search;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, step = 0, ops_en = 1;
  syn_t syndrome = '0;
  pos_t pos = '0;
  logic [LEMAX-1:0] win;
  logic [K-1:0] cand, ev_pos_sign;
  int checks = 0, failures = 0;
  int ncand = 0, nelim = 0;
  cw_t c;
  localparam int T3_FIRST [6] = '{4, 26, 29, 27, 23, 80};

  optimal_position_search dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int k = 0; k < LEMAX; k++)
      win[k] = (int'(pos) - 1 + k < N) ? c[int'(pos) - 1 + k] : 1'b0;

  task automatic scan(bit [2:0] s, bit en);
    syndrome = s; ops_en = en;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int i = 1; i <= N; i++) begin
      pos = pos_t'(i);
      #1;
      for (int j = 0; j < K; j++) begin
        bit fits, want;
        fits = (i + R_LEN[j] - 1 <= N);
        want = fits && (!en || (ref_syn(ref_mask(j, i)) == s && ref_bits_ok(c, j, i)));
        checks++;
        if (cand[j] != want || (want && ev_pos_sign[j] != !c[i-1])) begin
          failures++;
          if (failures < 10) $display("FAIL pos %0d type %0d got %0d want %0d", i, j, cand[j], want);
        end
        if (en && fits && ref_syn(ref_mask(j, i)) == s) begin
          if (want) ncand++; else nelim++;
        end
        // published example with syndrome 2: the kept positions of each
        // type lie on one residue mod 7, that of the first listed entry
        // (4, 26, 29, 27, 23, 80 for the six types)
        if (want && en && s == 3'b010) begin
          checks++;
          if (i % 7 != T3_FIRST[j] % 7) begin
            failures++;
            $display("FAIL syndrome-2 candidate type %0d at %0d", j, i);
          end
        end
      end
      step = 1;
      @(negedge clk);
      step = 0;
      // idle cycles between steps are allowed
      if ($urandom_range(0, 7) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // syndrome decimal 2 = polynomial x (bit 1)
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < N; p++) c[p] = 1'($urandom);
      scan(t < 4 ? 3'b010 : 3'($urandom_range(1, 7)), t != 7);
    end
    checks++;
    if (ncand == 0 || nelim == 0) begin
      failures++;
      $display("FAIL: search never kept (%0d) or never removed (%0d) a position", ncand, nelim);
    end
    $display("kept %0d positions, removed %0d by the bit check", ncand, nelim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
