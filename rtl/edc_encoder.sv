// edc_encoder: systematic CRC encoder of the error detection code.
//
// Takes the KINFO information bits of a codeword one per accepted beat and
// emits the N = KINFO + M codeword bits. Positions 1..KINFO carry the
// information bits unchanged (passed straight through, no latency); positions
// KINFO+1..N carry the M parity bits. With position p weighting x^(p-1), the
// encoder accumulates s = sum m_p x^(p-1) mod G(x) and appends the parity
// polynomial r = s * x^(-KINFO) mod G(x), so that the whole codeword is a
// multiple of G(x) and its syndrome is zero.
//
// The generator polynomial and code length follow the evaluated system
// ((203,200), G(x) = 1 + x^2 + x^3). Where the parity sits (at the end of the
// codeword) and the valid/ready handshake are this design's own choices.
//
// Interface: in_valid/in_ready/in_bit, out_valid/out_ready/out_bit/out_last.
// While the parity bits are emitted (M cycles) in_ready is low.
module edc_encoder
  import pvp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_last
);

  localparam int unsigned PER = syn_period();
  // x^(-KINFO) mod G(x)
  localparam syn_t XINV = syn_xpow((PER - (KINFO % PER)) % PER);

  logic [POSW-1:0] pos;      // 0-based position of the next output bit
  syn_t            acc;      // running remainder of the information part
  syn_t            wterm;    // x^pos mod G(x)
  syn_t            parity;
  logic            in_par;

  assign in_par   = (pos >= POSW'(KINFO));
  assign parity   = syn_mul(acc, XINV);
  assign in_ready = !in_par && out_ready;
  assign out_valid = in_par ? 1'b1 : in_valid;
  logic [POSW-1:0] par_idx;
  assign par_idx  = pos - POSW'(KINFO);
  assign out_bit  = in_par ? parity[par_idx[$clog2(M)-1:0]] : in_bit;
  assign out_last = (pos == POSW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= '0;
      acc   <= '0;
      wterm <= syn_t'(1);
    end else if (out_valid && out_ready) begin
      if (out_last) begin
        pos   <= '0;
        acc   <= '0;
        wterm <= syn_t'(1);
      end else begin
        pos   <= pos + 1'b1;
        wterm <= syn_mulx(wterm);
        if (!in_par && in_bit) acc <= acc ^ wterm;
      end
    end
  end

  // A parity beat, once offered, stays until taken.
  a_parity_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && in_par |=> out_valid && $stable(out_bit));

endmodule
