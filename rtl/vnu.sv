// vnu -- variable node unit, one lane of the 256-wide variable-node array.
//
// Column degree 4 lets one variable be processed in 4 cycles, one block row per
// cycle, with one 2-input adder and one 2-input subtractor.
//
// Accumulate phase (group g, a_row = 0..3): the check-to-variable message of the
// check in block row a_row is formed from that check's state (1st/2nd min and
// index, sign product) and the sign this variable last sent it. It is
// min2 if this group holds the 1st min, else min1, scaled by 0.75 (0.25 is kept),
// then turned from sign-magnitude into two's complement. The adder builds
// P + eps0 + eps1 + eps2 + eps3. Each eps and old sign is kept in a 4-entry
// register. In the initialization pass (a_iter0) every eps is 0, so the sum
// is the channel LLR.
//
// Update phase (same group, the 4 cycles after its accumulate phase, running in
// parallel with the next group's accumulate phase): the subtractor forms
// z = sum - eps[b_row]. It is saturated to 4-bit sign-magnitude and sent to the
// check node together with the old sign of that edge and the hard decision
// (sign of the sum).
//
// Timing: a_llr is used only when a_row == 0. The sum of a group is registered
// at the end of its a_row == 3 cycle; b_* outputs depend combinationally on
// b_row and registers only. The saturation to 1.75 and the width of the sum are
// this design's choices.
module vnu
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_en,
  input  logic [1:0]       a_row,
  input  logic             a_iter0,
  input  logic [IDX_W-1:0] a_grp,
  input  msg_t             a_llr,
  input  cn_state_t        a_cn,
  input  logic             a_old_sgn,
  input  logic [1:0]       b_row,
  output logic             b_sgn,
  output logic [MAG_W-1:0] b_mag,
  output logic             b_old_sgn,
  output logic             b_hd
);

  msg_t             eps;
  sum_t             acc, acc_nx, sum_q;
  msg_t             eps_q  [ROW_BLOCKS];
  logic             osgn_q [ROW_BLOCKS];
  sum_t             z;
  logic [SUM_W-1:0] z_abs;

  // Check-to-variable message of the current block row.
  assign eps = a_iter0 ? msg_t'(0) : c2v_msg(a_cn, a_grp, a_old_sgn);

  // 2-input adder: first operand is the channel LLR in row 0, else the sum so far.
  assign acc_nx = ((a_row == 2'd0) ? sum_t'(a_llr) : acc) + sum_t'(eps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      sum_q <= '0;
      for (int r = 0; r < ROW_BLOCKS; r++) begin
        eps_q[r]  <= '0;
        osgn_q[r] <= 1'b0;
      end
    end else if (a_en) begin
      acc           <= acc_nx;
      eps_q[a_row]  <= eps;
      osgn_q[a_row] <= a_iter0 ? 1'b0 : a_old_sgn;
      if (a_row == 2'd3) sum_q <= acc_nx;
    end
  end

  // 2-input subtractor and two's-complement to sign-magnitude conversion.
  assign z     = sum_q - sum_t'(eps_q[b_row]);
  assign z_abs = z[SUM_W-1] ? SUM_W'(-z) : SUM_W'(z);
  assign b_sgn = z[SUM_W-1];
  assign b_mag = (z_abs > SUM_W'(MAG_MAX)) ? MAG_MAX : z_abs[MAG_W-1:0];
  assign b_old_sgn = osgn_q[b_row];
  assign b_hd  = sum_q[SUM_W-1];

endmodule
