// tb_hd_mem -- writes random hard-decision words to all 36 entries, overwrites
// some, and reads every entry back against a shadow copy.
module tb_hd_mem;
  localparam int Z = 256, G = 36;
  logic         clk = 1'b0;
  logic         wr_en = 1'b0;
  logic [5:0]   wr_addr = '0, rd_addr = '0;
  logic [Z-1:0] wr_data = '0, rd_data;
  logic [Z-1:0] shadow [G];
  int checks = 0, failures = 0;

  hd_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [Z-1:0] d, bit en);
    @(negedge clk);
    wr_en = en; wr_addr = 6'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int g = 0; g < G; g += pass + 1) begin
        logic [Z-1:0] d;
        for (int t = 0; t < Z; t += 32) d[t +: 32] = $urandom;
        shadow[g] = d;
        wr(g, d, 1'b1);
      end
    wr(7, ~shadow[7], 1'b0);
    for (int g = 0; g < G; g++) begin
      rd_addr = 6'(g);
      #1;
      checks++;
      if (rd_data != shadow[g]) begin
        failures++;
        $display("FAIL read %0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
