// tb_ldpc_snr -- early-termination workload: the full-size decoder on noisy
// codewords from a BPSK / AWGN channel at Eb/N0 = 4.5, 4.75, 5.0 and 5.25 dB.
//
// Each codeword is random: the testbench brings its own H to reduced row echelon
// form once (Gaussian elimination over GF(2), rank 1021), picks the 8195 free
// bits at random and solves for the 1021 pivot bits. Bit 0 is sent as +1, bit 1
// as -1, Gaussian noise of variance
// 1/(2*R*Eb/N0) with R = 8195/9216 is added, and the sample is quantized to the
// decoder's 2-bit soft read with the threshold f = 0.35: the hard bit is the
// sign, the reliable bit says |y| > f. The decoder runs with an iteration limit
// of 20 and stops as soon as all parity checks are met.
//
// Checks, all worked out in the testbench with its own copy of the
// parity-check matrix:
//  * syndrome_ok agrees with the syndrome of the decoded word;
//  * every encoded word meets all checks before transmission;
//  * a word whose syndrome is met is the transmitted word;
//  * iters_used is at most the limit and the decode time is
//    4*(36*(iters+1)+1) cycles;
//  * at 5.25 dB every word is decoded;
//  * the average iteration count is within 0.75 of the published average
//    for 10^5 words (4.137, 3.323, 2.853, 2.426) and does not grow with the SNR.
// It prints, per SNR, the raw bit error rate, the words decoded and the
// average iteration count next to the published one; with 40 words per point
// the sample spread is about 0.15 iterations.
module tb_ldpc_snr;
  import ldpc_pkg::*;

  localparam int Z      = 256;
  localparam int G      = 36;
  localparam int N      = Z * G;
  localparam int NR     = 4;
  localparam int MAXIT  = 20;
  localparam int WORDS  = 40;     // codewords per SNR point
  localparam int NSNR   = 4;
  localparam real RATE  = 8195.0 / 9216.0;
  localparam real F_Q   = 0.35;
  localparam real PI    = 3.14159265358979;
  localparam real AVG_TOL = 0.75;  // allowed distance from the published average

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

  ldpc_decoder #(.MAX_ITER(MAXIT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NSNR * WORDS * 3400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- code ----------------
  int gexp[255];
  int glog[256];
  int shift[NR][G];

  function automatic void build_code();
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x;
      glog[x] = i;
      x = x << 1;
      if ((x & 256) != 0) x = x ^ 'h11D;
    end
    for (int r = 0; r < NR; r++)
      for (int g = 0; g < G; g++)
        shift[r][g] = glog[gexp[(205 + r) % 255] ^ gexp[(209 + g) % 255]];
  endfunction

  // ---------------- encoder ----------------
  typedef logic [N-1:0] hrow_t;
  hrow_t hm[NR*Z];
  int    piv[NR*Z];
  int    rank;
  hrow_t cw;

  function automatic void build_rref();
    for (int r = 0; r < NR; r++)
      for (int j = 0; j < Z; j++) begin
        hm[r*Z + j] = hrow_t'(0);
        for (int g = 0; g < G; g++) hm[r*Z + j][g*Z + (j + shift[r][g]) % Z] = 1'b1;
      end
    rank = 0;
    for (int c = N - 1; c >= 0 && rank < NR*Z; c--) begin
      int p;
      p = -1;
      for (int r = rank; r < NR*Z && p < 0; r++) if (hm[r][c]) p = r;
      if (p >= 0) begin
        hrow_t t;
        t = hm[p]; hm[p] = hm[rank]; hm[rank] = t;
        for (int r = 0; r < NR*Z; r++)
          if (r != rank && hm[r][c]) hm[r] ^= hm[rank];
        piv[rank] = c;
        rank++;
      end
    end
  endfunction

  function automatic void encode();
    hrow_t pmask;
    pmask = hrow_t'(0);
    for (int i = 0; i < rank; i++) pmask[piv[i]] = 1'b1;
    for (int n = 0; n < N; n++) cw[n] = $urandom_range(0, 1) != 0;
    cw &= ~pmask;
    for (int i = 0; i < rank; i++) cw[piv[i]] = ^(hm[i] & cw);
  endfunction

  // ---------------- channel ----------------
  logic [1:0] chan[N];
  bit         dec[N];

  function automatic real uniform01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = uniform01();
    u2 = uniform01();
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int make_word(real snr_db);
    real sigma, y;
    int  errs;
    sigma = $sqrt(1.0 / (2.0 * RATE * (10.0 ** (snr_db / 10.0))));
    errs = 0;
    for (int n = 0; n < N; n++) begin
      y = (cw[n] ? -1.0 : 1.0) + sigma * gauss();
      chan[n] = {y < 0.0, (y > F_Q) || (y < -F_Q)};
      if ((y < 0.0) != cw[n]) errs++;
    end
    return errs;
  endfunction

  // ---------------- decoder runs ----------------
  int mon_beats = 0;
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      for (int t = 0; t < Z; t++) dec[int'(out_grp) * Z + t] <= out_hd[t];
      mon_beats <= mon_beats + 1;
    end
  end

  int n_iters, n_ok;

  task automatic run_word(string name);
    int t_start, exp_cycles, odd, wrong, target;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int g = 0; g < G; g++) begin
      for (int t = 0; t < Z; t++) in_llr[t] = chan[g * Z + t];
      in_valid = 1'b1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    t_start = cycle;
    while (!out_valid) @(negedge clk);
    exp_cycles = 4 * (G * (int'(iters_used) + 1) + 1);
    checks++;
    if (cycle - t_start != exp_cycles || int'(iters_used) > MAXIT) begin
      failures++;
      $display("FAIL %s: %0d iterations in %0d cycles, expected %0d cycles", name,
               iters_used, cycle - t_start, exp_cycles);
    end
    target = mon_beats + G;
    out_ready = 1'b1;
    while (mon_beats < target) @(negedge clk);
    out_ready = 1'b0;

    odd = syndrome_weight(1'b1);
    wrong = 0;
    for (int n = 0; n < N; n++) wrong += int'(dec[n] != cw[n]);
    checks++;
    if (syndrome_ok != (odd == 0)) begin
      failures++;
      $display("FAIL %s: syndrome_ok %0d but %0d checks odd", name, syndrome_ok, odd);
    end
    if (odd == 0) begin
      checks++;
      if (wrong != 0) begin
        failures++;
        $display("FAIL %s: syndrome met on a wrong codeword (%0d bits)", name, wrong);
      end
    end
    n_iters += int'(iters_used);
    n_ok    += int'(odd == 0);
  endtask

  // Independent syndrome of the decoded word (dec) or of the encoded word (cw):
  // check j of block row r sees variable g*Z + (j + shift(r,g)) mod Z of every
  // group g. Returns the number of unsatisfied checks.
  function automatic int syndrome_weight(bit of_dec);
    int odd;
    odd = 0;
    for (int r = 0; r < NR; r++)
      for (int j = 0; j < Z; j++) begin
        bit p;
        p = 1'b0;
        for (int g = 0; g < G; g++) begin
          int n;
          n = g * Z + (j + shift[r][g]) % Z;
          p ^= of_dec ? dec[n] : cw[n];
        end
        odd += int'(p);
      end
    return odd;
  endfunction

  real snr_db[NSNR] = '{4.5, 4.75, 5.0, 5.25};
  real ref_avg[NSNR] = '{4.137, 3.323, 2.853, 2.426};

  initial begin
    real prev_avg, avg;
    int  raw;
    build_code();
    build_rref();
    checks++;
    if (rank != N - 8195) begin
      failures++;
      $display("FAIL rank of H is %0d, expected %0d", rank, N - 8195);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    prev_avg = 1.0e9;
    for (int s = 0; s < NSNR; s++) begin
      n_iters = 0;
      n_ok = 0;
      raw = 0;
      for (int w = 0; w < WORDS; w++) begin
        encode();
        checks++;
        if (syndrome_weight(1'b0) != 0) begin
          failures++;
          $display("FAIL encoder produced a non-codeword");
        end
        raw += make_word(snr_db[s]);
        run_word($sformatf("%.2f dB word %0d", snr_db[s], w));
      end
      avg = real'(n_iters) / real'(WORDS);
      $display("Eb/N0 %.2f dB: raw BER %.4f, decoded %0d/%0d, average iterations %.3f (published %.3f)",
               snr_db[s], real'(raw) / real'(N * WORDS), n_ok, WORDS, avg, ref_avg[s]);
      if (s == NSNR - 1) begin
        checks++;
        if (n_ok != WORDS) begin
          failures++;
          $display("FAIL %.2f dB: only %0d of %0d words decoded", snr_db[s], n_ok, WORDS);
        end
      end
      checks++;
      if (avg < ref_avg[s] - AVG_TOL || avg > ref_avg[s] + AVG_TOL) begin
        failures++;
        $display("FAIL %.2f dB: average iterations %.3f, published %.3f", snr_db[s], avg, ref_avg[s]);
      end
      checks++;
      if (avg > prev_avg + 0.5) begin
        failures++;
        $display("FAIL average iterations rose from %.3f to %.3f", prev_avg, avg);
      end
      prev_avg = avg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
