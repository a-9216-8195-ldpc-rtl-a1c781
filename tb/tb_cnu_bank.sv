// tb_cnu_bank -- the check-node array with its state registers and shifting
// network, against a model that keeps the same Z x 4 states as plain arrays.
// Each cycle one row takes random messages from Z variables and is rotated by a
// random amount. The test checks:
//  * the forwarded read (rotated new states of the active row, same cycle);
//  * the registered states of every row on the next read;
//  * the syndrome flag: set exactly when every stored parity bit is even;
//  * clear restoring all states.
module tb_cnu_bank;
  import ldpc_pkg::*;
  localparam int Z = 256;

  logic                    clk = 1'b0, rst_n = 1'b0, clear = 1'b0, b_en = 1'b0, b_first = 1'b0;
  logic [1:0]              row = '0;
  logic [IDX_W-1:0]        b_grp = '0;
  logic [Z-1:0]            z_sgn = '0, old_sgn = '0, hd = '0;
  logic [Z-1:0][MAG_W-1:0] z_mag = '0;
  logic [7:0]              delta = '0;
  cn_state_t [Z-1:0]       rd_state;
  logic                    synd_zero;
  int checks = 0, failures = 0, n_zero = 0, n_nonzero = 0;

  cnu_bank dut (.*);
  always #5 clk = ~clk;

  cn_state_t m [4][Z];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cn_state_t upd(cn_state_t s, bit zs, int zm, bit os, bit h, int g, bit first);
    cn_state_t o;
    int a = s.min1, ai = s.idx1, b = s.min2, bi = s.idx2;
    int c[3], ci[3], p1, p2;
    if (ai == g) begin a = 7; ai = 63; end
    if (bi == g) begin b = 7; bi = 63; end
    c[0] = zm; ci[0] = g; c[1] = a; ci[1] = ai; c[2] = b; ci[2] = bi;
    p1 = 0;
    for (int k = 1; k < 3; k++) if (c[k] < c[p1]) p1 = k;
    p2 = -1;
    for (int k = 0; k < 3; k++) if (k != p1 && (p2 < 0 || c[k] < c[p2])) p2 = k;
    o.min1 = 3'(c[p1]); o.idx1 = 6'(ci[p1]); o.min2 = 3'(c[p2]); o.idx2 = 6'(ci[p2]);
    o.sgn = s.sgn ^ os ^ zs;
    o.par = (first ? 1'b0 : s.par) ^ h;
    return o;
  endfunction

  task automatic cmp_row(int r, string what);
    int bad = 0;
    for (int t = 0; t < Z; t++) if (rd_state[t] != m[r][t]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 10) $display("FAIL %s row %0d: %0d lanes differ", what, r, bad);
    end
  endtask

  initial begin
    for (int r = 0; r < 4; r++) for (int t = 0; t < Z; t++) m[r][t] = CN_INIT;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 600; step++) begin
      cn_state_t u [Z];
      automatic int r = step % 4;
      automatic int g = (step / 4) % 36;
      automatic int d = $urandom_range(0, Z - 1);
      automatic bit sparse = (step / 144) == 1;   // second pass: all decisions 0
      @(negedge clk);
      // registered contents of this row before the update
      row = 2'(r); b_en = 1'b0;
      #1 cmp_row(r, "stored");
      b_en = 1'b1; b_grp = 6'(g); b_first = (g == 0); delta = 8'(d);
      for (int t = 0; t < Z; t++) begin
        z_sgn[t] = 1'($urandom); z_mag[t] = 3'($urandom); old_sgn[t] = 1'($urandom);
        hd[t] = sparse ? 1'b0 : 1'($urandom);
      end
      for (int t = 0; t < Z; t++)
        u[t] = upd(m[r][t], z_sgn[t], int'(z_mag[t]), old_sgn[t], hd[t], g, g == 0);
      for (int t = 0; t < Z; t++) m[r][t] = u[(t - d + Z) % Z];
      #1 cmp_row(r, "forwarded");
      begin
        automatic bit odd = 0;
        for (int q = 0; q < 4; q++) for (int t = 0; t < Z; t++) odd |= m[q][t].par;
        checks++;
        if (synd_zero != !odd) begin
          failures++;
          $display("FAIL syndrome flag step %0d", step);
        end
        if (odd) n_nonzero++; else n_zero++;
      end
    end
    // clear
    @(negedge clk);
    b_en = 1'b0; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int r = 0; r < 4; r++) begin
      for (int t = 0; t < Z; t++) m[r][t] = CN_INIT;
      row = 2'(r);
      #1 cmp_row(r, "cleared");
    end
    checks++;
    if (n_zero == 0 || n_nonzero == 0) begin
      failures++;
      $display("FAIL syndrome flag not exercised both ways (%0d/%0d)", n_zero, n_nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
