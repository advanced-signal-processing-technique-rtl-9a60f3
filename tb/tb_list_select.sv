// tb_list_select: random likelihoods, valid and used masks; checks the
// selection against a reference search, and walks a full list in
// descending order (the published two-entry example: a 2nd largest that is
// close to the largest must come next).
module tb_list_select;
  import pvp_pkg::*;

  logic [K-1:0] valid, used;
  lik_t         lik [K];
  logic         sel_valid;
  typ_t         sel_type;
  int checks = 0, failures = 0;

  list_select dut (.*);

  function automatic int ref_sel();
    int s;
    s = -1;
    for (int j = 0; j < K; j++)
      if (valid[j] && !used[j] && (s < 0 || lik[j] > lik[s])) s = j;
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int r;
      valid = K'($urandom);
      used  = (t % 3 == 0) ? '0 : K'($urandom);
      for (int j = 0; j < K; j++)
        lik[j] = (t % 5 == 0) ? lik_t'($urandom_range(0, 3)) : lik_t'($signed($urandom_range(0, 200000)) - 100000);
      #1;
      r = ref_sel();
      checks++;
      if (sel_valid != (r >= 0) || (r >= 0 && int'(sel_type) != r)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d/%0d want %0d", t, sel_valid, sel_type, r);
      end
    end
    // descending walk
    for (int t = 0; t < 200; t++) begin
      lik_t prev;
      valid = '1; used = '0;
      for (int j = 0; j < K; j++) lik[j] = lik_t'($signed($urandom_range(0, 2000)) - 1000);
      prev = lik_t'(32'h7fffff);
      for (int n = 0; n < K; n++) begin
        #1;
        checks++;
        if (!sel_valid || lik[sel_type] > prev) failures++;
        prev = lik[sel_type];
        used[sel_type] = 1'b1;
      end
      #1;
      checks++;
      if (sel_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
