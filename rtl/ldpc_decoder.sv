// ldpc_decoder -- decoder for the (9216,8195) quasi-cyclic LDPC code built from a
// Latin square (4 x 36 circulants of size 256, rate 0.889), with 2-bit soft input
// from a NAND flash read.
//
// Algorithm: normalized min-sum (scaling 0.75) in a column-shuffled order. The
// 9216 variables form G = 36 groups of Z = 256, one group per block column. The
// groups are processed one after another, so each group already sees the
// check-node updates of the groups before it in the same iteration. Each group
// takes 4 cycles, one per block row. Z VNUs and Z CNUs work in parallel, and each
// check node receives exactly one new message per cycle. A check node keeps only
// its two smallest magnitudes with their group indices and a running sign
// product, so its update is a 3-to-2 accumulative sorter.
//
// Data flow per cycle (block row r): the VNUs accumulate group g+1 from the
// check-node states of row r (stage A), while the same row's states take the
// updates of group g (stage B). The updated states are rotated by the shifting
// network to face group g+1 and forwarded to stage A in the same cycle.
//
// Interface: load a codeword as G words of Z 2-bit soft values (in_llr[t] for
// code bit g*Z+t, bit 1 = hard decision, bit 0 = reliable) with in_valid/in_ready.
// After decoding, the G words of decoded bits come out with out_valid/out_ready,
// in order, out_grp naming the group. iters_used and syndrome_ok describe the
// last codeword.
// Timing: G load beats, then 4*(G*(iters+1)+1) decode cycles (one initialization
// pass plus iters iterations of 4*G = 144 cycles), then G output beats.
// With MAX_ITER = 4, the 144 cycles per iteration match the 1.58 Gb/s throughput
// figure at a 9 ns clock. Load and output are not overlapped with decoding here.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned Z          = CPM_SIZE,
  parameter int unsigned G          = COL_BLOCKS,
  parameter int unsigned MAX_ITER   = 4,
  parameter bit          EARLY_TERM = 1'b1,
  localparam int unsigned SH_W = (Z > 1) ? $clog2(Z) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [Z-1:0][1:0] in_llr,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [Z-1:0]      out_hd,
  output logic [IDX_W-1:0]  out_grp,
  output logic              out_last,
  output logic              busy,
  output logic [ITER_W-1:0] iters_used,
  output logic              syndrome_ok
);

  logic              ld_en, bank_clear, a_en, a_iter0, b_en, b_first, hd_wr, synd_zero;
  logic [IDX_W-1:0]  ld_addr, a_grp, b_grp;
  logic [1:0]        row;
  logic [Z-1:0][1:0] ch_rd;
  logic [Z-1:0]      sgn_rd;
  logic [SH_W-1:0]   delta, shift_unused;
  cn_state_t [Z-1:0] cn_rd;
  logic [Z-1:0]            z_sgn, z_old, z_hd;
  logic [Z-1:0][MAG_W-1:0] z_mag;

  ldpc_ctrl #(.G(G), .MAX_ITER(MAX_ITER), .EARLY_TERM(EARLY_TERM)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .ld_en, .ld_addr,
    .bank_clear, .row, .a_en, .a_grp, .a_iter0, .b_en, .b_grp, .b_first, .hd_wr,
    .synd_zero,
    .out_valid, .out_ready, .out_addr(out_grp), .out_last,
    .busy, .iters_used, .syndrome_ok
  );

  channel_mem #(.Z(Z), .G(G)) u_ch (
    .clk, .wr_en(ld_en), .wr_addr(ld_addr), .wr_data(in_llr),
    .rd_addr(a_grp), .rd_data(ch_rd)
  );

  sign_mem #(.Z(Z), .G(G)) u_sgn (
    .clk, .wr_en(b_en), .wr_grp(b_grp), .wr_row(row), .wr_data(z_sgn),
    .rd_grp(a_grp), .rd_row(row), .rd_data(sgn_rd)
  );

  hd_mem #(.Z(Z), .G(G)) u_hd (
    .clk, .wr_en(hd_wr), .wr_addr(b_grp), .wr_data(z_hd),
    .rd_addr(out_grp), .rd_data(out_hd)
  );

  shift_diff_rom #(.Z(Z), .G(G)) u_rom (
    .row, .grp(b_grp), .delta, .shift(shift_unused)
  );

  cnu_bank #(.Z(Z)) u_bank (
    .clk, .rst_n, .clear(bank_clear), .row, .b_en, .b_grp, .b_first,
    .z_sgn, .z_mag, .old_sgn(z_old), .hd(z_hd), .delta,
    .rd_state(cn_rd), .synd_zero
  );

  for (genvar t = 0; t < Z; t++) begin : g_vn
    msg_t llr;

    llr_map u_map (.rd(ch_rd[t]), .llr);

    vnu u_vnu (
      .clk, .rst_n,
      .a_en, .a_row(row), .a_iter0, .a_grp,
      .a_llr(llr), .a_cn(cn_rd[t]), .a_old_sgn(sgn_rd[t]),
      .b_row(row),
      .b_sgn(z_sgn[t]), .b_mag(z_mag[t]), .b_old_sgn(z_old[t]), .b_hd(z_hd[t])
    );
  end

endmodule
