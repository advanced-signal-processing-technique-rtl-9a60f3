// tb_ml_detector: random bits through the PR(1,6,7,2) target with small
// noise; the Viterbi decisions must equal the written bits and the delayed
// samples must equal the samples sent. Checks the latency (first output on
// the edge accepting sample DEPTH+1) and runs with random output stalls.
module tb_ml_detector;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  localparam int DEPTH = 32;
  localparam int NS    = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 1, out_bit;
  q_t   in_q = '0, out_q;
  int checks = 0, failures = 0;
  bit a [NS];
  int q [NS];

  ml_detector #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_in = 0, n_out = 0, first_out_at = -1;

  initial begin
    bit [2:0] h;
    h = '0;
    for (int k = 0; k < NS; k++) begin
      a[k] = 1'($urandom);
      q[k] = ref_qclean(a[k], h) + ref_noise(k < 1000 ? 0 : 20);
      h = {h[1:0], a[k]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_in < NS) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      in_q     = q_t'(q[n_in]);
      out_ready = (n_in < 1500) || ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) n_in++;
    end
    @(negedge clk);
    in_valid = 0;
    out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out != NS - DEPTH) begin
      failures++;
      $display("FAIL outputs %0d want %0d", n_out, NS - DEPTH);
    end
    checks++;
    if (first_out_at != DEPTH + 1) begin
      failures++;
      $display("FAIL first output after %0d inputs, want %0d", first_out_at, DEPTH + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_bit != a[n_out] || int'(out_q) != q[n_out]) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d: bit %0d want %0d", n_out, out_bit, a[n_out]);
      end
      n_out++;
    end
  end
  int acc_in = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (first_out_at < 0 && out_valid) first_out_at = acc_in;
      if (in_valid && in_ready) acc_in++;
    end
endmodule
