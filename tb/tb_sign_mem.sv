// tb_sign_mem -- fills all 36 x 4 words of the sign memory, then runs the
// decoder's access pattern: each cycle read word (g+1, r) and write word (g, r).
// Every read is compared with a shadow copy, including a read and a write of the
// same word in one cycle, which must return the old contents.
module tb_sign_mem;
  localparam int Z = 256, G = 36;
  logic         clk = 1'b0;
  logic         wr_en = 1'b0;
  logic [5:0]   wr_grp = '0, rd_grp = '0;
  logic [1:0]   wr_row = '0, rd_row = '0;
  logic [Z-1:0] wr_data = '0, rd_data;
  logic [Z-1:0] shadow [G][4];
  int checks = 0, failures = 0;

  sign_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [Z-1:0] rnd();
    logic [Z-1:0] d;
    for (int t = 0; t < Z; t += 32) d[t +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    for (int g = 0; g < G; g++)
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_grp = 6'(g); wr_row = 2'(r); wr_data = rnd();
        shadow[g][r] = wr_data;
      end
    for (int g = 0; g < G; g++)
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        rd_grp = 6'((g + 1) % G); rd_row = 2'(r);
        wr_en = 1'b1; wr_grp = 6'(g); wr_row = 2'(r); wr_data = rnd();
        #1;
        checks++;
        if (rd_data != shadow[(g + 1) % G][r]) begin
          failures++;
          $display("FAIL read (%0d,%0d)", (g + 1) % G, r);
        end
        shadow[g][r] = wr_data;
      end
    // same-word read during write returns the old value
    @(negedge clk);
    rd_grp = 6'd3; rd_row = 2'd2;
    wr_en = 1'b1; wr_grp = 6'd3; wr_row = 2'd2; wr_data = ~shadow[3][2];
    #1;
    checks++;
    if (rd_data != shadow[3][2]) failures++;
    @(negedge clk);
    wr_en = 1'b0;
    checks++;
    if (rd_data != ~shadow[3][2]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
