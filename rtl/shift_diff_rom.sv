// shift_diff_rom -- table of the differences between the cyclic shifts of
// consecutive groups, one entry per block row and group.
//
// The check-node states of block row r are stored rotated so that lane t always
// faces variable node unit t. When the schedule moves from group g to group g+1,
// the states must rotate by
//     delta(r,g) = (s(r,g+1) - s(r,g)) mod Z        (g+1 taken mod G),
// where s(r,g) is the CPM shift of block row r, block column g. The shifts come
// from the Latin-square construction in ldpc_pkg. For a CPM size Z other than 256
// they are reduced mod Z (used only to simulate small configurations).
// The whole table is computed at elaboration time. Combinational read.
module shift_diff_rom
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = CPM_SIZE,
  parameter int unsigned G = COL_BLOCKS,
  localparam int unsigned SH_W = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic [1:0]       row,
  input  logic [IDX_W-1:0] grp,
  output logic [SH_W-1:0]  delta,
  output logic [SH_W-1:0]  shift
);

  logic [SH_W-1:0] shift_tab [ROW_BLOCKS][G];
  logic [SH_W-1:0] delta_tab [ROW_BLOCKS][G];

  for (genvar r = 0; r < ROW_BLOCKS; r++) begin : g_row
    for (genvar g = 0; g < G; g++) begin : g_grp
      localparam int unsigned S_CUR = base_shift(r, g) % Z;
      localparam int unsigned S_NXT = base_shift(r, (g + 1) % G) % Z;
      assign shift_tab[r][g] = SH_W'(S_CUR);
      assign delta_tab[r][g] = SH_W'((S_NXT + Z - S_CUR) % Z);
    end
  end

  always_comb begin
    delta = '0;
    shift = '0;
    if (32'(grp) < G) begin
      delta = delta_tab[row][grp];
      shift = shift_tab[row][grp];
    end
  end

endmodule
