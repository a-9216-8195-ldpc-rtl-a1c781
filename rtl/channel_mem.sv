// channel_mem -- channel value memory: the 2-bit soft read of every code bit.
//
// G words of Z 2-bit entries; word g holds the variables of group g (code bits
// g*Z .. g*Z+Z-1, lane t = bit g*Z+t). One synchronous write port fills a word
// per cycle while a codeword is loaded. One asynchronous read port is used by
// the variable node units in the first cycle of each group.
// No reset: every word is written before it is read.
module channel_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = CPM_SIZE,
  parameter int unsigned G = COL_BLOCKS
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [IDX_W-1:0]     wr_addr,
  input  logic [Z-1:0][1:0]    wr_data,
  input  logic [IDX_W-1:0]     rd_addr,
  output logic [Z-1:0][1:0]    rd_data
);

  logic [Z-1:0][1:0] mem [G];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < G) mem[wr_addr] <= wr_data;
  end

  assign rd_data = (32'(rd_addr) < G) ? mem[rd_addr] : '0;

endmodule
