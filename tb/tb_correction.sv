// tb_correction: random codewords, error types and positions; checks the
// flipped bits against the event masks and the recomputed syndrome against
// long division. Also checks that removing an event injected into a
// zero-syndrome word restores it with zero syndrome.
module tb_correction;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic [N-1:0] cw_in, cw_out;
  typ_t         ev_type;
  pos_t         ev_pos;
  syn_t         syn_out;
  int checks = 0, failures = 0;

  correction dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cw_t c, want;
      int j, i;
      for (int p = 0; p < N; p++) c[p] = 1'($urandom);
      j = $urandom_range(0, K - 1);
      i = $urandom_range(1, N - R_LEN[j] + 1);
      cw_in = c; ev_type = typ_t'(j); ev_pos = pos_t'(i);
      #1;
      want = c ^ ref_mask(j, i);
      checks += 2;
      if (cw_out != want) begin
        failures++;
        if (failures < 10) $display("FAIL mask t=%0d type %0d pos %0d", t, j, i);
      end
      if (syn_out != ref_syn(want)) failures++;
    end
    // directed: zero-syndrome words built by the reference division
    for (int t = 0; t < 500; t++) begin
      cw_t c;
      int j, i;
      bit [2:0] s;
      for (int p = 0; p < N; p++) c[p] = 1'($urandom);
      // force zero syndrome by fixing positions 1..3 (x^0, x^1, x^2)
      c[2:0] = '0;
      s = ref_syn(c);
      c[2:0] = s;
      j = $urandom_range(0, K - 1);
      i = $urandom_range(1, N - R_LEN[j] + 1);
      cw_in = c ^ ref_mask(j, i); ev_type = typ_t'(j); ev_pos = pos_t'(i);
      #1;
      checks += 2;
      if (cw_out != c) failures++;
      if (syn_out != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
