// correction: applies one error event to a codeword and checks the result.
//
// The re-estimated codeword is the recovered codeword plus the selected error
// event: every bit under a non-zero entry of the event pattern, starting at
// position 'ev_pos', is inverted (in bits, adding a +-2 error to a +-1 symbol
// flips it). The syndrome of the re-estimated codeword is then computed in
// full as the product with the transposed parity-check matrix: column p of H
// is x^(p-1) mod G(x), a constant, so the product is an XOR tree. A zero
// syndrome accepts the correction. Purely combinational.
module correction
  import pvp_pkg::*;
(
  input  logic [N-1:0] cw_in,       // bit p-1 = codeword position p
  input  typ_t         ev_type,
  input  pos_t         ev_pos,      // starting position, 1..N
  output logic [N-1:0] cw_out,
  output syn_t         syn_out
);

  localparam logic [N*M-1:0] HCOL = h_columns();

  always_comb begin
    logic [N-1:0] mask;
    mask = '0;
    for (int j = 0; j < int'(K); j++)
      if (int'(ev_type) == j)
        for (int k = 0; k < int'(LEMAX); k++)
          if (k < EV_LEN[j] && EV_PAT[j][k] != 0 && int'(ev_pos) + k >= 1 &&
              int'(ev_pos) + k <= int'(N))
            mask[int'(ev_pos) + k - 1] = 1'b1;
    cw_out  = cw_in ^ mask;
    syn_out = '0;
    for (int p = 0; p < int'(N); p++)
      if (cw_out[p]) syn_out = syn_out ^ HCOL[M*p +: M];
  end

endmodule
