// tb_syndrome_check: checks the serial syndrome against polynomial long
// division for random words, and reproduces the published syndrome
// sequences of the six dominant error events for start positions 1..7
// (e.g. 6 3 4 2 1 5 7 for +-[2,-2]), which fixes the bit ordering.
module tb_syndrome_check;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, bit_valid = 0, bit_in = 0;
  syn_t syndrome;
  int checks = 0, failures = 0;

  syndrome_check dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(cw_t c);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int p = 0; p < N; p++) begin
      bit_valid = 1; bit_in = c[p];
      // an idle cycle now and then must not disturb the result
      if ($urandom_range(0, 9) == 0) begin
        bit_valid = 0;
        @(negedge clk);
        bit_valid = 1;
      end
      @(negedge clk);
    end
    bit_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // published syndrome sequences
    for (int j = 0; j < K; j++)
      for (int i = 1; i <= 7; i++) begin
        feed(ref_mask(j, i));
        checks++;
        if (syn_to_dec(syndrome) != TABLE_I[j][i-1] || ref_dec(syndrome) != TABLE_I[j][i-1]) begin
          failures++;
          $display("FAIL table: type %0d pos %0d got %0d want %0d", j, i, syn_to_dec(syndrome), TABLE_I[j][i-1]);
        end
      end
    // periodicity: position i+7 gives the same syndrome as position i
    for (int j = 0; j < K; j++) begin
      feed(ref_mask(j, 100));
      checks++;
      if (ref_dec(syndrome) != TABLE_I[j][(100 - 1) % 7]) failures++;
    end
    // random words
    for (int t = 0; t < 60; t++) begin
      cw_t c;
      for (int p = 0; p < N; p++) c[p] = 1'($urandom);
      feed(c);
      checks++;
      if (syndrome != ref_syn(c)) begin
        failures++;
        $display("FAIL random %0d: got %0d want %0d", t, syndrome, ref_syn(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
