// tb_edc_encoder: random information blocks through the CRC encoder with
// random stalls on both sides. Checks that the information bits pass
// unchanged, that every codeword divides by G(x) (long division), that
// out_last marks position N, and that a codeword takes N output beats for
// N-M input beats.
module tb_edc_encoder;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_bit = 0;
  logic out_valid, out_ready = 0, out_bit, out_last;
  int checks = 0, failures = 0;

  edc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBLK = 40;
  bit [KINFO-1:0] info [NBLK];

  // source
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int p = 0; p < KINFO; p++) info[b][p] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int p = 0; p < KINFO; p++) begin
        in_valid = ($urandom_range(0, 3) != 0) || b == 0;
        in_bit   = info[b][p];
        while (!in_valid) begin
          @(negedge clk);
          in_valid = 1;
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    in_valid = 0;
  end

  // sink
  initial begin
    cw_t c;
    int  pos, blk, in_beats_at_start;
    pos = 0; blk = 0;
    @(posedge rst_n);
    while (blk < NBLK) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        c[pos] = out_bit;
        checks++;
        if (out_last != (pos == N - 1)) begin
          failures++;
          $display("FAIL out_last at %0d", pos);
        end
        pos++;
        if (pos == N) begin
          checks += 2;
          if (c[KINFO-1:0] != info[blk]) begin
            failures++;
            $display("FAIL info bits of block %0d", blk);
          end
          if (ref_syn(c) != 0) begin
            failures++;
            $display("FAIL syndrome of block %0d = %0d", blk, ref_syn(c));
          end
          pos = 0;
          blk++;
        end
      end
    end
    @(negedge clk);
    // rate: exactly M output beats per codeword take no input
    checks++;
    if (par_beats != NBLK * M) begin
      failures++;
      $display("FAIL parity beats %0d want %0d", par_beats, NBLK * M);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: while emitting parity the encoder takes no input (M beats)
  int par_beats = 0;
  always @(posedge clk)
    if (rst_n && out_valid && out_ready && !(in_valid && in_ready)) par_beats++;
endmodule
