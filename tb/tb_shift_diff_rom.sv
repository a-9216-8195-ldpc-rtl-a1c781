// tb_shift_diff_rom -- checks the shift table of the Latin-square code.
//  * The printed corner of the base matrix (block columns 0..6 of the four block
//    rows) is compared entry by entry.
//  * Every delta is checked against the shifts: delta(r,g) = s(r,g+1) - s(r,g)
//    mod 256, wrapping from group 35 to group 0, so a pass sums to 0 mod 256.
//  * The full matrix is checked for 4-cycles (no two block rows may see the same
//    shift difference between two block columns, mod 256).
module tb_shift_diff_rom;
  logic [1:0] row;
  logic [5:0] grp;
  logic [7:0] delta, shift;
  int checks = 0, failures = 0;
  int s_tab[4][36], d_tab[4][36];

  shift_diff_rom dut (.*);

  // Printed corner of the base matrix (rows R0..R3, groups G0..G6).
  int corner[4][7] = '{
    '{ 50,  88, 141,  62, 150,  70, 226},
    '{174,  51,  89, 142,  63, 151,  71},
    '{  2, 175,  52,  90, 143,  64, 152},
    '{233,   3, 176,  53,  91, 144,  65}};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc4;
    for (int r = 0; r < 4; r++)
      for (int g = 0; g < 36; g++) begin
        row = 2'(r); grp = 6'(g);
        #1;
        s_tab[r][g] = int'(shift);
        d_tab[r][g] = int'(delta);
      end
    for (int r = 0; r < 4; r++)
      for (int g = 0; g < 7; g++) begin
        checks++;
        if (s_tab[r][g] != corner[r][g]) begin
          failures++;
          $display("FAIL shift(%0d,%0d) = %0d, printed %0d", r, g, s_tab[r][g], corner[r][g]);
        end
      end
    for (int r = 0; r < 4; r++) begin
      automatic int total = 0;
      for (int g = 0; g < 36; g++) begin
        checks++;
        if (d_tab[r][g] != (s_tab[r][(g + 1) % 36] - s_tab[r][g] + 256) % 256) begin
          failures++;
          $display("FAIL delta(%0d,%0d) = %0d", r, g, d_tab[r][g]);
        end
        total += d_tab[r][g];
      end
      checks++;
      if (total % 256 != 0) begin
        failures++;
        $display("FAIL row %0d deltas sum to %0d", r, total);
      end
    end
    cyc4 = 0;
    for (int m = 0; m < 4; m++)
      for (int n = m + 1; n < 4; n++)
        for (int s = 0; s < 36; s++)
          for (int t = s + 1; t < 36; t++)
            if ((s_tab[m][t] - s_tab[m][s] - s_tab[n][t] + s_tab[n][s] + 512) % 256 == 0) cyc4++;
    checks++;
    if (cyc4 != 0) begin
      failures++;
      $display("FAIL %0d 4-cycles", cyc4);
    end
    // out-of-range group reads as zero
    grp = 6'd40; #1;
    checks++;
    if (delta != 0 || shift != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
