// sign_mem -- sign bit memory: the sign of every variable-to-check message.
//
// Each of the Z*G variables has one edge per block row (column degree 4), so the
// memory holds G x 4 words of Z bits: word (g,r) lane t is the sign last sent by
// variable g*Z+t to its check in block row r. In every decoding cycle the
// variable node units read the signs of the group being accumulated and the
// check node units write those of the group being updated. That takes one
// asynchronous read port and one synchronous write port. A read and a write of
// the same word in one cycle return the old contents. No reset: the decoder
// ignores the stored signs during the initialization pass, which writes all of
// them.
module sign_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = CPM_SIZE,
  parameter int unsigned G = COL_BLOCKS
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_grp,
  input  logic [1:0]       wr_row,
  input  logic [Z-1:0]     wr_data,
  input  logic [IDX_W-1:0] rd_grp,
  input  logic [1:0]       rd_row,
  output logic [Z-1:0]     rd_data
);

  logic [Z-1:0] mem [G][ROW_BLOCKS];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_grp) < G) mem[wr_grp][wr_row] <= wr_data;
  end

  assign rd_data = (32'(rd_grp) < G) ? mem[rd_grp][rd_row] : '0;

endmodule
