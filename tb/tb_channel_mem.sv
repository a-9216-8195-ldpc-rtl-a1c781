// tb_channel_mem -- writes random 2-bit words to all 36 entries, reads them back
// in random order and compares with a shadow copy; writes without wr_en and
// to out-of-range addresses must change nothing.
module tb_channel_mem;
  localparam int Z = 256, G = 36;
  logic              clk = 1'b0;
  logic              wr_en = 1'b0;
  logic [5:0]        wr_addr = '0, rd_addr = '0;
  logic [Z-1:0][1:0] wr_data = '0, rd_data;
  logic [Z-1:0][1:0] shadow [G];
  int checks = 0, failures = 0;

  channel_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [Z-1:0][1:0] d, bit en);
    @(negedge clk);
    wr_en = en; wr_addr = 6'(a); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    for (int g = 0; g < G; g++) begin
      logic [Z-1:0][1:0] d;
      for (int t = 0; t < Z; t++) d[t] = 2'($urandom);
      shadow[g] = d;
      wr(g, d, 1'b1);
    end
    wr(5, ~shadow[5], 1'b0);           // disabled write
    wr(40, '1, 1'b1);                  // out of range
    for (int k = 0; k < 100; k++) begin
      automatic int a = $urandom_range(0, G - 1);
      rd_addr = 6'(a);
      #1;
      checks++;
      if (rd_data != shadow[a]) begin
        failures++;
        $display("FAIL read %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
