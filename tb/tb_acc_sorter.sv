// tb_acc_sorter -- self-checking test of the 3-to-2 accumulative sorter.
//
// 1. Replays the worked example of the "input <= min" replacing rule (row degree
//    5, five groups, inputs in units of 0.25) and checks the 1st/2nd min after
//    every step of the second iteration; then the worked example of the stale
//    entry (a group's old magnitude is dropped when the group sends a new one).
// 2. Random states and inputs compared with a reference that ranks the three
//    candidates as a list ordered (input, 1st, 2nd) with a stable sort.
module tb_acc_sorter;
  import ldpc_pkg::*;

  logic [MAG_W-1:0] min1, min2, in_mag, min1_nx, min2_nx;
  logic [IDX_W-1:0] idx1, idx2, in_idx, idx1_nx, idx2_nx;
  int checks = 0, failures = 0;

  acc_sorter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int mag, input int idx);
    logic [MAG_W-1:0] n1, n2;
    logic [IDX_W-1:0] j1, j2;
    in_mag = MAG_W'(mag);
    in_idx = IDX_W'(idx);
    #1;
    n1 = min1_nx; j1 = idx1_nx; n2 = min2_nx; j2 = idx2_nx;
    min1 = n1; idx1 = j1; min2 = n2; idx2 = j2;
    #1;
  endtask

  task automatic expect_mins(input int e1, input int e2, input string what);
    #1;
    checks++;
    if (int'(min1) != e1 || int'(min2) != e2) begin
      failures++;
      $display("FAIL %s: got %0d/%0d expected %0d/%0d", what, min1, min2, e1, e2);
    end
  endtask

  // reference: candidates in priority order x, a, b; stable selection of 2 smallest
  task automatic ref_sort(input logic [MAG_W-1:0] m1, input logic [IDX_W-1:0] i1,
                          input logic [MAG_W-1:0] m2, input logic [IDX_W-1:0] i2,
                          input logic [MAG_W-1:0] x, input logic [IDX_W-1:0] xi,
                          output logic [MAG_W-1:0] r1, output logic [IDX_W-1:0] ri1,
                          output logic [MAG_W-1:0] r2, output logic [IDX_W-1:0] ri2);
    int v[3]; int ix[3]; int best, second;
    v[0] = int'(x);  ix[0] = int'(xi);
    v[1] = (i1 == xi) ? 7 : int'(m1); ix[1] = (i1 == xi) ? 63 : int'(i1);
    v[2] = (i2 == xi) ? 7 : int'(m2); ix[2] = (i2 == xi) ? 63 : int'(i2);
    best = 0;
    for (int k = 1; k < 3; k++) if (v[k] < v[best]) best = k;
    second = -1;
    for (int k = 0; k < 3; k++)
      if (k != best && (second < 0 || v[k] < v[second])) second = k;
    r1 = MAG_W'(v[best]); ri1 = IDX_W'(ix[best]);
    r2 = MAG_W'(v[second]); ri2 = IDX_W'(ix[second]);
  endtask

  initial begin
    logic [MAG_W-1:0] q1, q2; logic [IDX_W-1:0] qi1, qi2;
    int seq[5];
    seq = '{1, 1, 3, 1, 3};   // 0.25 0.25 0.75 0.25 0.75
    min1 = MAG_MAX; min2 = MAG_MAX; idx1 = IDX_NONE; idx2 = IDX_NONE;
    // initialization pass and iteration 1
    for (int it = 0; it < 2; it++)
      for (int g = 0; g < 5; g++) step(seq[g], g);
    expect_mins(1, 1, "after iteration 1");
    // iteration 2: inputs 1.25, 1.5, 1.75 for groups 0..2
    step(5, 0); expect_mins(1, 1, "iter2 group0");
    step(6, 1); expect_mins(1, 6, "iter2 group1");
    step(7, 2); expect_mins(1, 6, "iter2 group2");
    checks++;
    if (idx1 != 6'd3 || idx2 != 6'd1) begin
      failures++; $display("FAIL indices %0d %0d", idx1, idx2);
    end
    // stale-entry example: 0.25 0.5 0.75 1.0 0.75 twice, then 1.25 1.5 1.75;
    // the entry of the input's own group is dropped before sorting
    seq = '{1, 2, 3, 4, 3};
    min1 = MAG_MAX; min2 = MAG_MAX; idx1 = IDX_NONE; idx2 = IDX_NONE;
    for (int it = 0; it < 2; it++)
      for (int g = 0; g < 5; g++) step(seq[g], g);
    expect_mins(1, 2, "stale example after iteration 1");
    step(5, 0); expect_mins(2, 5, "stale example iter2 group0");
    step(6, 1); expect_mins(5, 6, "stale example iter2 group1");
    step(7, 2); expect_mins(5, 6, "stale example iter2 group2");
    // tie rule: equal input replaces 1st min and keeps the latest index
    min1 = 3'd2; idx1 = 6'd4; min2 = 3'd5; idx2 = 6'd9;
    step(2, 7);
    checks++;
    if (!(min1 == 2 && idx1 == 7 && min2 == 2 && idx2 == 4)) begin
      failures++; $display("FAIL tie rule");
    end
    // random
    for (int n = 0; n < 20000; n++) begin
      min1 = MAG_W'($urandom); min2 = MAG_W'($urandom);
      idx1 = IDX_W'($urandom_range(0, 40)); idx2 = IDX_W'($urandom_range(0, 40));
      in_mag = MAG_W'($urandom); in_idx = IDX_W'($urandom_range(0, 40));
      #1;
      ref_sort(min1, idx1, min2, idx2, in_mag, in_idx, q1, qi1, q2, qi2);
      checks++;
      if (min1_nx != q1 || min2_nx != q2 || idx1_nx != qi1 || idx2_nx != qi2) begin
        failures++;
        if (failures < 10) $display("FAIL rnd %0d/%0d %0d/%0d in %0d/%0d -> %0d/%0d %0d/%0d exp %0d/%0d %0d/%0d",
          min1, idx1, min2, idx2, in_mag, in_idx, min1_nx, idx1_nx, min2_nx, idx2_nx, q1, qi1, q2, qi2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
