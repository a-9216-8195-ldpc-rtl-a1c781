// tb_llr_map -- checks the 2-bit to 4-bit LLR mapping: +-0.5 for unreliable and
// +-1.75 for reliable reads (units of 0.25), negative when the hard bit is 1.
module tb_llr_map;
  import ldpc_pkg::*;
  logic [1:0] rd;
  msg_t       llr;
  int checks = 0, failures = 0;
  int expv[4] = '{2, 7, -2, -7};

  llr_map dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      rd = 2'(k);
      #1;
      checks++;
      if (int'(llr) != expv[k]) begin
        failures++;
        $display("FAIL code %0d -> %0d, expected %0d", k, llr, expv[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
