// tb_cnu -- random check-node updates compared with an independent model of the
// magnitude part (two smallest of: stored minima with the input group's stale
// entry dropped, and the new input; the new input wins ties), the sign part
// (running XOR with the old edge sign taken out) and the parity part.
module tb_cnu;
  import ldpc_pkg::*;
  cn_state_t        st, st_nx;
  logic             z_sgn, old_sgn, hd, first_grp;
  logic [MAG_W-1:0] z_mag;
  logic [IDX_W-1:0] grp;
  int checks = 0, failures = 0;

  cnu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int a, ai, b, bi, x, m1, i1, m2, i2;
      bit es, ep;
      st.min1 = MAG_W'($urandom); st.min2 = MAG_W'($urandom);
      st.idx1 = IDX_W'($urandom_range(0, 36)); st.idx2 = IDX_W'($urandom_range(0, 36));
      if (n % 11 == 0) st.idx2 = IDX_NONE;
      st.sgn = 1'($urandom); st.par = 1'($urandom);
      z_sgn = 1'($urandom); z_mag = MAG_W'($urandom); old_sgn = 1'($urandom);
      hd = 1'($urandom); grp = IDX_W'($urandom_range(0, 35)); first_grp = 1'($urandom);
      #1;
      x = int'(z_mag);
      a = int'(st.min1); ai = int'(st.idx1); b = int'(st.min2); bi = int'(st.idx2);
      if (ai == int'(grp)) begin a = 7; ai = 63; end
      if (bi == int'(grp)) begin b = 7; bi = 63; end
      if (x <= a && x <= b) begin
        m1 = x; i1 = int'(grp);
        if (a <= b) begin m2 = a; i2 = ai; end else begin m2 = b; i2 = bi; end
      end else if (a <= b) begin
        m1 = a; i1 = ai;
        if (x <= b) begin m2 = x; i2 = int'(grp); end else begin m2 = b; i2 = bi; end
      end else begin
        m1 = b; i1 = bi;
        if (x <= a) begin m2 = x; i2 = int'(grp); end else begin m2 = a; i2 = ai; end
      end
      es = st.sgn ^ old_sgn ^ z_sgn;
      ep = (first_grp ? 1'b0 : st.par) ^ hd;
      checks++;
      if (int'(st_nx.min1) != m1 || int'(st_nx.idx1) != i1 || int'(st_nx.min2) != m2 ||
          int'(st_nx.idx2) != i2 || st_nx.sgn != es || st_nx.par != ep) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
