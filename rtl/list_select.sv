// list_select: picks the next entry of the list used by list-correction.
//
// Given the per-type maximum likelihoods of the K matched filters, which of
// them are valid, and which have already been tried, it returns the type with
// the largest likelihood among the valid untried ones. Called with an empty
// 'used' mask it gives the maximum; with the maximum marked used, the second
// largest; and so on, so repeated calls walk the likelihoods in descending
// order as list-correction needs. Equal likelihoods go to the lower type
// index (design choice). Purely combinational.
module list_select
  import pvp_pkg::*;
(
  input  logic [K-1:0] valid,
  input  logic [K-1:0] used,
  input  lik_t         lik [K],
  output logic         sel_valid,
  output typ_t         sel_type
);

  always_comb begin
    sel_valid = 1'b0;
    sel_type  = '0;
    for (int j = 0; j < int'(K); j++)
      if (valid[j] && !used[j] && (!sel_valid || lik[j] > lik[sel_type])) begin
        sel_valid = 1'b1;
        sel_type  = typ_t'(j);
      end
  end

endmodule
