// tb_vnu -- drives one VNU through back-to-back groups: 4 accumulate cycles of
// group g+1 overlap the 4 update cycles of group g, as in the decoder. The
// check-to-variable messages, the a-posteriori sum, the saturated
// variable-to-check messages, the old signs and the hard decision are modelled
// independently and compared every update cycle. The first group runs as an
// initialization pass (all messages 0, old signs ignored).
module tb_vnu;
  import ldpc_pkg::*;
  logic             clk = 1'b0, rst_n = 1'b0;
  logic             a_en = 1'b0, a_iter0 = 1'b0, a_old_sgn = 1'b0;
  logic [1:0]       a_row = '0, b_row = '0;
  logic [IDX_W-1:0] a_grp = '0;
  msg_t             a_llr = '0;
  cn_state_t        a_cn = CN_INIT;
  logic             b_sgn, b_old_sgn, b_hd;
  logic [MAG_W-1:0] b_mag;
  int checks = 0, failures = 0, n_sat = 0;

  vnu dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int scale_tab[8] = '{0, 1, 2, 2, 3, 4, 5, 5};
  int prev_eps[4], cur_eps[4];
  bit prev_os[4], cur_os[4];
  int prev_sum, cur_sum;
  bit have_prev = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int grp = 0; grp < 400; grp++) begin
      automatic bit iter0 = (grp < 3);
      automatic int llr = ($urandom_range(0, 1) ? 7 : 2) * ($urandom_range(0, 1) ? -1 : 1);
      cur_sum = llr;
      for (int r = 0; r < 4; r++) begin
        int m, e;
        @(negedge clk);
        a_en = 1'b1; a_row = 2'(r); b_row = 2'(r); a_iter0 = iter0;
        a_grp = IDX_W'(grp % 36); a_llr = msg_t'(llr);
        a_cn.min1 = MAG_W'($urandom); a_cn.min2 = MAG_W'($urandom);
        a_cn.idx1 = ($urandom_range(0, 2) == 0) ? a_grp : IDX_W'($urandom_range(0, 35));
        a_cn.idx2 = IDX_W'($urandom_range(0, 35));
        a_cn.sgn = 1'($urandom); a_old_sgn = 1'($urandom);
        m = (a_cn.idx1 == a_grp) ? int'(a_cn.min2) : int'(a_cn.min1);
        e = scale_tab[m];
        if (a_cn.sgn ^ a_old_sgn) e = -e;
        if (iter0) e = 0;
        cur_eps[r] = e;
        cur_os[r] = iter0 ? 1'b0 : a_old_sgn;
        cur_sum += e;
        #1;
        if (have_prev) begin
          automatic int z = prev_sum - prev_eps[r];
          automatic int zm = (z < 0) ? -z : z;
          if (zm > 7) begin zm = 7; n_sat++; end
          checks++;
          if (b_sgn != (z < 0) || int'(b_mag) != zm || b_old_sgn != prev_os[r] ||
              b_hd != (prev_sum < 0)) begin
            failures++;
            if (failures < 10)
              $display("FAIL group %0d row %0d: got %0d/%0d os %0d hd %0d, expected z=%0d os %0d sum %0d",
                       grp - 1, r, b_sgn, b_mag, b_old_sgn, b_hd, z, prev_os[r], prev_sum);
          end
        end
      end
      prev_eps = cur_eps; prev_os = cur_os; prev_sum = cur_sum; have_prev = 1;
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
