// tb_target_error_signal: random detected bits and samples; checks
// q^ = 16 * sum g_l a_(k-l) (bipolar) and e = q - q^ every step, including
// the all-zero history after reset and gaps in 'valid'.
module tb_target_error_signal;
  import pvp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, valid = 0, a_bit = 0;
  q_t   q = '0;
  eq_t  e_sig, q_hat;
  int checks = 0, failures = 0;
  bit [2:0] h = '0;

  target_error_signal dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      a_bit = 1'($urandom);
      q     = q_t'($signed($urandom_range(0, 1200)) - 600);
      #1;
      checks++;
      if (int'(q_hat) != ref_qclean(a_bit, h) || int'(e_sig) != int'(q) - ref_qclean(a_bit, h)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d qhat %0d want %0d", t, q_hat, ref_qclean(a_bit, h));
      end
      @(posedge clk);
      if (valid) h = {h[1:0], a_bit};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
