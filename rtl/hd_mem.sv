// hd_mem -- hard decision memory: the current decoded value of every code bit.
//
// G words of Z bits, word g = group g, lane t = code bit g*Z+t. The decoder
// writes a group's decisions once per pass, when that group's check-node updates
// begin. The output port reads it asynchronously, one group per cycle, after
// decoding stops. No reset: each word is written before it is read.
module hd_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = CPM_SIZE,
  parameter int unsigned G = COL_BLOCKS
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_addr,
  input  logic [Z-1:0]     wr_data,
  input  logic [IDX_W-1:0] rd_addr,
  output logic [Z-1:0]     rd_data
);

  logic [Z-1:0] mem [G];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < G) mem[wr_addr] <= wr_data;
  end

  assign rd_data = (32'(rd_addr) < G) ? mem[rd_addr] : '0;

endmodule
