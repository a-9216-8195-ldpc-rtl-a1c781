// tb_ldpc_decoder -- end-to-end test of the decoder at its full size
// (Z = 256, G = 36, 4 iterations), against a behavioural reference model.
//
// The reference builds the (9216,8195) parity-check matrix on its own, with its
// own GF(2^8) tables, and decodes sequentially, group by group, in
// column-shuffled order: normalized min-sum with a 2-minimum accumulative
// sorter, scaling 0.75 and 4-bit messages. Several all-zero codewords are sent
// through a 2-bit chan channel with different amounts of noise. The test checks:
//  * every decoded bit, the iteration count and the syndrome flag against the
//    model;
//  * error correction: decoded word = all zeros whenever the model converged;
//  * cycle count: 4*(G*(iters+1)+1) decode cycles, so 144 cycles per iteration;
//  * valid/ready: load with gaps, output with back-pressure.
// It counts how often each mechanism happened and fails if one never did:
// early stop, stop at the iteration limit, stop after the initialization pass,
// stale-index removal in the sorter, tie replacement, message saturation,
// input stall, output back-pressure.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int Z  = 256;
  localparam int G  = 36;
  localparam int N  = Z * G;
  localparam int NR = 4;
  localparam int MAXIT = 4;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid = 1'b0;
  logic              in_ready;
  logic [Z-1:0][1:0] in_llr = '0;
  logic              out_valid;
  logic              out_ready = 1'b0;
  logic [Z-1:0]      out_hd;
  logic [IDX_W-1:0]  out_grp;
  logic              out_last;
  logic              busy;
  logic [ITER_W-1:0] iters_used;
  logic              syndrome_ok;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int gexp[255];
  int glog[256];
  int shift[NR][G];

  logic [1:0] chan[N];
  int         st_m1[NR][Z], st_m2[NR][Z], st_i1[NR][Z], st_i2[NR][Z];
  bit         st_s[NR][Z], st_p[NR][Z];
  bit         esgn[NR][N];
  bit         ref_hd[N];
  int         ref_iters;
  bit         ref_ok;
  int         n_stale = 0, n_tie = 0, n_sat = 0;

  function automatic void build_code();
    int x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x; glog[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    for (int r = 0; r < NR; r++)
      for (int g = 0; g < G; g++)
        shift[r][g] = glog[gexp[(205 + r) % 255] ^ gexp[(209 + g) % 255]];
  endfunction

  function automatic int llr_of(logic [1:0] s);
    int m = s[0] ? 7 : 2;
    return s[1] ? -m : m;
  endfunction

  function automatic int scale(int m);
    case (m)
      0: return 0; 1: return 1; 2: return 2; 3: return 2;
      4: return 3; 5: return 4; 6: return 5; default: return 5;
    endcase
  endfunction

  task automatic sort_in(int r, int j, int mag, int g);
    int a = st_m1[r][j], ai = st_i1[r][j], b = st_m2[r][j], bi = st_i2[r][j];
    int c[3], ci[3];
    int o1, o2;
    if (ai == g) begin a = 7; ai = 63; n_stale++; end
    if (bi == g) begin b = 7; bi = 63; n_stale++; end
    if ((mag == a && ai != 63) || (mag == b && bi != 63)) n_tie++;
    c[0] = mag; ci[0] = g; c[1] = a; ci[1] = ai; c[2] = b; ci[2] = bi;
    o1 = 0;
    for (int k = 1; k < 3; k++) if (c[k] < c[o1]) o1 = k;
    o2 = -1;
    for (int k = 0; k < 3; k++) if (k != o1 && (o2 < 0 || c[k] < c[o2])) o2 = k;
    st_m1[r][j] = c[o1]; st_i1[r][j] = ci[o1];
    st_m2[r][j] = c[o2]; st_i2[r][j] = ci[o2];
  endtask

  task automatic ref_decode();
    for (int r = 0; r < NR; r++)
      for (int j = 0; j < Z; j++) begin
        st_m1[r][j] = 7; st_m2[r][j] = 7; st_i1[r][j] = 63; st_i2[r][j] = 63;
        st_s[r][j] = 0; st_p[r][j] = 0;
      end
    for (int it = 0; it <= MAXIT; it++) begin
      bit odd = 0;
      for (int g = 0; g < G; g++) begin
        for (int t = 0; t < Z; t++) begin
          int n = g * Z + t;
          int eps[NR];
          int sum = llr_of(chan[n]);
          for (int r = 0; r < NR; r++) begin
            int j = (t - shift[r][g] % Z + Z) % Z;
            if (it == 0) eps[r] = 0;
            else begin
              int m = (st_i1[r][j] == g) ? st_m2[r][j] : st_m1[r][j];
              m = scale(m);
              eps[r] = (st_s[r][j] ^ esgn[r][n]) ? -m : m;
            end
            sum += eps[r];
          end
          ref_hd[n] = (sum < 0);
          for (int r = 0; r < NR; r++) begin
            int j = (t - shift[r][g] % Z + Z) % Z;
            int z = sum - eps[r];
            bit zs = (z < 0);
            int zm = zs ? -z : z;
            bit os = (it == 0) ? 1'b0 : esgn[r][n];
            if (zm > 7) begin zm = 7; n_sat++; end
            sort_in(r, j, zm, g);
            st_s[r][j] = st_s[r][j] ^ os ^ zs;
            st_p[r][j] = ((g == 0) ? 1'b0 : st_p[r][j]) ^ ref_hd[n];
            esgn[r][n] = zs;
          end
        end
      end
      for (int r = 0; r < NR; r++) for (int j = 0; j < Z; j++) odd |= st_p[r][j];
      if (!odd || it == MAXIT) begin
        ref_iters = it; ref_ok = !odd;
        return;
      end
    end
  endtask

  // ---------------- stimulus ----------------
  // p_flip: per-mille of bits received with the wrong sign,
  // p_rel_err: per-mille of those wrong bits that are read as reliable.
  task automatic make_word(int p_flip, int p_rel_err, int p_unrel);
    for (int n = 0; n < N; n++) begin
      bit flip = ($urandom_range(0, 999) < p_flip);
      bit rel;
      if (flip) rel = ($urandom_range(0, 999) < p_rel_err);
      else      rel = ($urandom_range(0, 999) >= p_unrel);
      chan[n] = {flip, rel};
    end
  endtask

  int n_early = 0, n_limit = 0, n_init_stop = 0, n_in_stall = 0, n_out_bp = 0, n_corrected = 0;

  task automatic run_word(string name);
    int t_start, t_out, errs_in = 0, exp_cycles;
    for (int n = 0; n < N; n++) errs_in += chan[n][1];
    ref_decode();
    // load, with an idle beat every 7 words; the decoder is ready whenever it
    // is not decoding or unloading
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int g = 0; g < G; g++) begin
      if (g % 7 == 3) begin
        in_valid = 1'b0;
        n_in_stall++;
        @(negedge clk);
      end
      for (int t = 0; t < Z; t++) in_llr[t] = chan[g * Z + t];
      in_valid = 1'b1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    t_start = cycle;
    // wait for the output
    while (!out_valid) @(negedge clk);
    t_out = cycle;
    exp_cycles = 4 * (G * (ref_iters + 1) + 1);
    checks++;
    if (t_out - t_start != exp_cycles) begin
      failures++;
      $display("FAIL %s: decode took %0d cycles, expected %0d", name, t_out - t_start, exp_cycles);
    end
    checks++;
    if (int'(iters_used) != ref_iters || syndrome_ok != ref_ok) begin
      failures++;
      $display("FAIL %s: iters %0d ok %0d, model %0d %0d", name, iters_used, syndrome_ok, ref_iters, ref_ok);
    end
    // unload with back-pressure: ready is low on every fifth cycle
    begin
      int target = mon_beats + G;
      int k = 0;
      forever begin
        @(negedge clk);
        if (mon_beats >= target) break;
        out_ready = (k % 5 != 2);
        if (k % 5 == 2) n_out_bp++;
        k++;
      end
      out_ready = 1'b0;
    end
    if (ref_iters == 0 && ref_ok) n_init_stop++;
    else if (ref_ok) n_early++;
    if (ref_iters == MAXIT && !ref_ok) n_limit++;
    $display("%s: %0d channel errors, model: %0d iterations, syndrome %0s",
             name, errs_in, ref_iters, ref_ok ? "met" : "not met");
  endtask

  // Output monitor: compares every accepted beat with the model.
  int    mon_beats = 0;
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      int g, bad, nz;
      g = int'(out_grp);
      bad = 0;
      nz = 0;
      for (int t = 0; t < Z; t++) begin
        if (out_hd[t] != ref_hd[g * Z + t]) bad++;
        if (out_hd[t]) nz++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL group %0d: %0d bits differ from the model", g, bad);
      end
      checks++;
      if (out_grp != IDX_W'(mon_beats % G) || out_last != (mon_beats % G == G - 1)) begin
        failures++;
        $display("FAIL output order: grp %0d beat %0d", out_grp, mon_beats);
      end
      if (ref_ok) begin
        checks++;
        if (nz != 0) begin
          failures++;
          $display("FAIL group %0d: %0d bits not corrected", g, nz);
        end else if (g == G - 1) n_corrected++;
      end
      mon_beats++;
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    build_code();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    make_word(0, 0, 50);        run_word("error-free");
    make_word(4, 0, 100);       run_word("light noise");
    make_word(12, 100, 150);    run_word("medium noise");
    make_word(25, 200, 250);    run_word("moderate noise");
    make_word(150, 500, 400);   run_word("heavy noise");

    $display("mechanisms:");
    need(n_init_stop, "stop after init pass");
    need(n_early,     "early stop (syndrome)");
    need(n_limit,     "stop at iteration limit");
    need(n_corrected, "codeword corrected");
    need(n_stale,     "stale index removed");
    need(n_tie,       "tie replaced (<= rule)");
    need(n_sat,       "message saturated");
    need(n_in_stall,  "input stall");
    need(n_out_bp,    "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
