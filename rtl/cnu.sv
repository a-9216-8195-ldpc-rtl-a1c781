// cnu -- check node unit, one lane of the 256-wide check-node array.
//
// In each cycle of the column-shuffled schedule a check node receives exactly
// one new variable-to-check message z (from the variable of group grp in the
// current block row). The message arrives in sign-magnitude form.
//  * Magnitude part: the 3-to-2 accumulative sorter (acc_sorter) merges |z|
//    into the stored 1st/2nd minima.
//  * Sign part: the check keeps the XOR of the latest signs of all its edges.
//    The edge's previous sign (old_sgn, 0 during the initialization pass) is
//    taken out and the new sign put in.
//  * Syndrome part (this design's addition for the stopping test): par is the
//    XOR of the hard decisions of the variables seen in this pass. It restarts
//    at group 0.
// Purely combinational: st is the stored state, st_nx the state to store.
module cnu
  import ldpc_pkg::*;
(
  input  cn_state_t        st,
  input  logic             z_sgn,
  input  logic [MAG_W-1:0] z_mag,
  input  logic             old_sgn,
  input  logic             hd,
  input  logic [IDX_W-1:0] grp,
  input  logic             first_grp,
  output cn_state_t        st_nx
);

  acc_sorter u_sort (
    .min1   (st.min1),
    .idx1   (st.idx1),
    .min2   (st.min2),
    .idx2   (st.idx2),
    .in_mag (z_mag),
    .in_idx (grp),
    .min1_nx(st_nx.min1),
    .idx1_nx(st_nx.idx1),
    .min2_nx(st_nx.min2),
    .idx2_nx(st_nx.idx2)
  );

  assign st_nx.sgn = st.sgn ^ old_sgn ^ z_sgn;
  assign st_nx.par = (first_grp ? 1'b0 : st.par) ^ hd;

endmodule
