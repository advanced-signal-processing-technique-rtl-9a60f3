// syndrome_check: serial syndrome computation of the error detection decoder.
//
// The syndrome of a recovered codeword is its remainder modulo G(x). Bits
// arrive in position order 1..N; the block keeps the residue x^(p-1) mod G(x)
// of the current position and XORs it into the syndrome for every 1 bit, so a
// single multiply-by-x register replaces the usual long-division LFSR and the
// bits can be taken in transmission order. A non-zero syndrome flags an error
// and, through its value, the phase of the error starting positions.
//
// Interface: 'clear' restarts a codeword, 'bit_valid'/'bit_in' add one bit.
// 'syndrome' holds the remainder of all bits added since 'clear'; it is
// updated on the clock edge that accepts a bit. The M-bit polynomial form
// (bit i = coefficient of x^i) is used throughout this design.
module syndrome_check
  import pvp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output syn_t syndrome
);

  syn_t wterm;   // x^(p-1) mod G(x) for the next bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syndrome <= '0;
      wterm    <= syn_t'(1);
    end else if (clear) begin
      syndrome <= '0;
      wterm    <= syn_t'(1);
    end else if (bit_valid) begin
      if (bit_in) syndrome <= syndrome ^ wterm;
      wterm <= syn_mulx(wterm);
    end
  end

endmodule
