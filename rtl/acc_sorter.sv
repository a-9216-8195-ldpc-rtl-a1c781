// acc_sorter -- 3-to-2 accumulative sorter of one check node (magnitude part).
//
// A check node keeps only its two smallest incoming magnitudes and the groups
// they came from. Each time the variable node of group in_idx sends a new
// magnitude, the sorter ranks three candidates: the stored 1st and 2nd minima and
// the new input. A stored entry that came from the same group as the input is
// stale (it is that variable's message of the previous iteration), so it is
// dropped and treated as the largest magnitude with no index. The two smallest
// candidates become the new 1st and 2nd minima.
//
// Ties follow the "input <= min" replacing rule: on equal magnitudes the new
// input wins, so the latest index is kept; between the two stored entries the
// 1st minimum wins. The exclusion of stale entries and the tie rule follow the
// worked examples of the design; which stored entry wins a tie among the two
// stored ones is this design's choice.
//
// Purely combinational; the registers live in cnu_bank.
module acc_sorter
  import ldpc_pkg::*;
(
  input  logic [MAG_W-1:0] min1,
  input  logic [IDX_W-1:0] idx1,
  input  logic [MAG_W-1:0] min2,
  input  logic [IDX_W-1:0] idx2,
  input  logic [MAG_W-1:0] in_mag,
  input  logic [IDX_W-1:0] in_idx,
  output logic [MAG_W-1:0] min1_nx,
  output logic [IDX_W-1:0] idx1_nx,
  output logic [MAG_W-1:0] min2_nx,
  output logic [IDX_W-1:0] idx2_nx
);

  logic [MAG_W-1:0] a_m, b_m;
  logic [IDX_W-1:0] a_i, b_i;

  always_comb begin
    // Drop the stale contribution of the input's own group.
    a_m = (idx1 == in_idx) ? MAG_MAX  : min1;
    a_i = (idx1 == in_idx) ? IDX_NONE : idx1;
    b_m = (idx2 == in_idx) ? MAG_MAX  : min2;
    b_i = (idx2 == in_idx) ? IDX_NONE : idx2;

    if (in_mag <= a_m && in_mag <= b_m) begin
      min1_nx = in_mag;
      idx1_nx = in_idx;
      if (a_m <= b_m) begin
        min2_nx = a_m;
        idx2_nx = a_i;
      end else begin
        min2_nx = b_m;
        idx2_nx = b_i;
      end
    end else if (a_m <= b_m) begin
      min1_nx = a_m;
      idx1_nx = a_i;
      if (in_mag <= b_m) begin
        min2_nx = in_mag;
        idx2_nx = in_idx;
      end else begin
        min2_nx = b_m;
        idx2_nx = b_i;
      end
    end else begin
      min1_nx = b_m;
      idx1_nx = b_i;
      if (in_mag <= a_m) begin
        min2_nx = in_mag;
        idx2_nx = in_idx;
      end else begin
        min2_nx = a_m;
        idx2_nx = a_i;
      end
    end
  end

endmodule
