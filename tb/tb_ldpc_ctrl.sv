// tb_ldpc_ctrl -- checks the decoder schedule cycle by cycle.
// Run 1: the syndrome flag is forced high only at the end of pass 2, so the
// decode must stop there (early termination) after 4*(36*3+1) cycles.
// Run 2: the flag never rises, so decoding runs to the limit: 4*(36*5+1) = 724
// cycles, 144 per iteration. Throughout, the accumulate/update group, row,
// initialization flag, first-group flag and hard-decision write strobe are
// compared with counters kept by the test. Loading (with gaps) and unloading
// (with back-pressure) check the handshakes, addresses and out_last.
// Run 3: a second instance with EARLY_TERM = 0 (fixed iteration count) sees the
// syndrome flag high all the time and must still run all MAX_ITER iterations.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int G = 36, MAXIT = 4;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              in_valid = 1'b0, out_ready = 1'b0, synd_zero = 1'b0;
  logic              in_ready, ld_en, bank_clear, a_en, a_iter0, b_en, b_first, hd_wr;
  logic              out_valid, out_last, busy, syndrome_ok;
  logic [IDX_W-1:0]  ld_addr, a_grp, b_grp, out_addr;
  logic [1:0]        row;
  logic [ITER_W-1:0] iters_used;
  int checks = 0, failures = 0;

  ldpc_ctrl dut (.*);

  // fixed-iteration instance
  logic              f_in_valid = 1'b0, f_out_ready = 1'b0;
  logic              f_in_ready, f_ld_en, f_bank_clear, f_a_en, f_a_iter0, f_b_en, f_b_first;
  logic              f_hd_wr, f_out_valid, f_out_last, f_busy, f_syndrome_ok;
  logic [IDX_W-1:0]  f_ld_addr, f_a_grp, f_b_grp, f_out_addr;
  logic [1:0]        f_row;
  logic [ITER_W-1:0] f_iters_used;

  ldpc_ctrl #(.EARLY_TERM(1'b0)) dut_fixed (
    .clk, .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .ld_en(f_ld_en),
    .ld_addr(f_ld_addr), .bank_clear(f_bank_clear), .row(f_row), .a_en(f_a_en),
    .a_grp(f_a_grp), .a_iter0(f_a_iter0), .b_en(f_b_en), .b_grp(f_b_grp),
    .b_first(f_b_first), .hd_wr(f_hd_wr), .synd_zero(1'b1), .out_valid(f_out_valid),
    .out_ready(f_out_ready), .out_addr(f_out_addr), .out_last(f_out_last), .busy(f_busy),
    .iters_used(f_iters_used), .syndrome_ok(f_syndrome_ok));

  task automatic run_fixed();
    int cyc = 0;
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      f_in_valid = 1'b1;
    end
    @(negedge clk);
    f_in_valid = 1'b0;
    while (!f_out_valid && cyc < 2000) begin
      #1 chk(f_busy, "fixed: busy while decoding");
      @(negedge clk);
      cyc++;
    end
    chk(cyc == 4 * (G * (MAXIT + 1) + 1), "fixed: decode cycle count");
    chk(int'(f_iters_used) == MAXIT && f_syndrome_ok, "fixed: iterations used");
    f_out_ready = 1'b1;
    repeat (G) @(negedge clk);
    f_out_ready = 1'b0;
    #1 chk(f_in_ready && !f_out_valid, "fixed: back to load");
  endtask
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int stop_pass);
    int cyc = 0;
    // load with a gap every 5 beats
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      if (g % 5 == 4) begin
        in_valid = 1'b0;
        #1 chk(!ld_en && bank_clear && in_ready, "idle load beat");
        @(negedge clk);
      end
      in_valid = 1'b1;
      #1 chk(ld_en && int'(ld_addr) == g && bank_clear, "load beat");
    end
    @(negedge clk);
    in_valid = 1'b0;
    // decode
    forever begin
      int t = cyc;
      int ag = (t / 4) % G, ai = (t / 4) / G;
      int bt = t / 4 - 1;
      int bg = (bt >= 0) ? bt % G : 0, bi = (bt >= 0) ? bt / G : 0;
      bit pe = (bt >= 0) && (t % 4 == 3) && (bg == G - 1);
      synd_zero = pe && (bi == stop_pass);
      #1;
      chk(busy && a_en && !in_ready && !out_valid, "decode state");
      chk(int'(row) == t % 4 && int'(a_grp) == ag && a_iter0 == (ai == 0), "accumulate stage");
      chk(b_en == (bt >= 0), "update enable");
      if (bt >= 0) chk(int'(b_grp) == bg && b_first == (bg == 0) && hd_wr == (t % 4 == 0), "update stage");
      @(negedge clk);
      cyc++;
      if (pe && (bi == stop_pass || bi == MAXIT)) break;
    end
    synd_zero = 1'b0;
    chk(cyc == 4 * (G * ((stop_pass < MAXIT ? stop_pass : MAXIT) + 1) + 1), "decode cycle count");
    chk(int'(iters_used) == (stop_pass < MAXIT ? stop_pass : MAXIT), "iterations used");
    chk(syndrome_ok == (stop_pass <= MAXIT), "syndrome flag");
    // unload with back-pressure
    for (int g = 0; g < G; g++) begin
      if (g % 3 == 1) begin
        out_ready = 1'b0;
        #1 chk(out_valid && int'(out_addr) == g, "held output");
        @(negedge clk);
      end
      out_ready = 1'b1;
      #1 chk(out_valid && int'(out_addr) == g && out_last == (g == G - 1) && !busy, "output beat");
      @(negedge clk);
    end
    out_ready = 1'b0;
    #1 chk(in_ready && !out_valid, "back to load");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(2);
    run(99);
    run_fixed();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
