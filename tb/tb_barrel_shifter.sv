// tb_barrel_shifter -- checks the 256-lane rotation for every shift amount,
// with random words, against dout[t] = din[(t - shamt) mod 256].
module tb_barrel_shifter;
  localparam int L = 256;
  localparam int W = 20;

  logic [L-1:0][W-1:0] din, dout;
  logic [7:0]          shamt;
  int checks = 0, failures = 0;

  barrel_shifter #(.LANES(L), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int s = 0; s < L; s++) begin
        int bad;
        for (int t = 0; t < L; t++) din[t] = W'($urandom);
        shamt = 8'(s);
        #1;
        bad = 0;
        for (int t = 0; t < L; t++)
          if (dout[t] != din[(t - s + L) % L]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL shift %0d: %0d lanes wrong", s, bad);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
