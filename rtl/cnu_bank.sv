// cnu_bank -- the check-node array: Z check node units, the check-node state
// registers of all 4 x Z checks (1st/2nd min, their group indices, sign product,
// parity) and the shifting network that re-aligns them.
//
// One block row is active per cycle (row). Its Z stored states are aligned so
// that lane t holds the check of variable t of the group being updated (b_grp).
// When b_en is set, CNU t merges that variable's message (z_sgn, z_mag, old_sgn,
// hd) into the state of lane t. The Z results are rotated by delta, the shift
// difference from b_grp to the next group, and written back. That leaves the row
// aligned to the next group. Other rows keep their contents.
//
// rd_state returns the states of the active row as the next group sees them.
// When the row is being updated in the same cycle, that is the rotated result,
// forwarded combinationally. The next group therefore always sees the previous
// group's update, exactly as in sequential column-shuffled decoding. The path
// from the VNU subtractor through CNU, shifter and back into the VNU adder is
// the critical path.
//
// synd_zero is set when no check has odd hard-decision parity, counting the
// update of this cycle. At the last update of a pass it is the syndrome test.
// clear resets every state (1st/2nd min = 1.75, no index, sign 0) before a
// codeword.
module cnu_bank
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = CPM_SIZE,
  localparam int unsigned SH_W = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic [1:0]               row,
  input  logic                     b_en,
  input  logic [IDX_W-1:0]         b_grp,
  input  logic                     b_first,
  input  logic [Z-1:0]             z_sgn,
  input  logic [Z-1:0][MAG_W-1:0]  z_mag,
  input  logic [Z-1:0]             old_sgn,
  input  logic [Z-1:0]             hd,
  input  logic [SH_W-1:0]          delta,
  output cn_state_t [Z-1:0]        rd_state,
  output logic                     synd_zero
);

  cn_state_t [Z-1:0] st [ROW_BLOCKS];
  cn_state_t [Z-1:0] upd;
  cn_state_t [Z-1:0] rot;
  logic [ROW_BLOCKS-1:0] row_odd;

  for (genvar t = 0; t < Z; t++) begin : g_cnu
    cnu u_cnu (
      .st       (st[row][t]),
      .z_sgn    (z_sgn[t]),
      .z_mag    (z_mag[t]),
      .old_sgn  (old_sgn[t]),
      .hd       (hd[t]),
      .grp      (b_grp),
      .first_grp(b_first),
      .st_nx    (upd[t])
    );
  end

  barrel_shifter #(.LANES(Z), .W($bits(cn_state_t))) u_shift (
    .din  (upd),
    .shamt(delta),
    .dout (rot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROW_BLOCKS; r++) st[r] <= {Z{CN_INIT}};
    end else if (clear) begin
      for (int r = 0; r < ROW_BLOCKS; r++) st[r] <= {Z{CN_INIT}};
    end else if (b_en) begin
      st[row] <= rot;
    end
  end

  assign rd_state = b_en ? rot : st[row];

  always_comb begin
    for (int r = 0; r < ROW_BLOCKS; r++) begin
      row_odd[r] = 1'b0;
      for (int t = 0; t < Z; t++) begin
        if (b_en && r == 32'(row)) row_odd[r] = row_odd[r] | rot[t].par;
        else                       row_odd[r] = row_odd[r] | st[r][t].par;
      end
    end
  end

  assign synd_zero = ~|row_odd;

endmodule
