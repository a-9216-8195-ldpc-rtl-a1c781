// barrel_shifter -- cyclic rotation of LANES words of W bits (the shifting
// network between the check node units and their state registers).
//
// dout[t] = din[(t - shamt) mod LANES]: the word at lane u moves to lane
// u + shamt. It is a logarithmic barrel shifter: stage s rotates by 2^s when bit
// s of shamt is set. With LANES = 256 that is 8 stages of 2:1 multiplexers per
// bit. Purely combinational.
module barrel_shifter #(
  parameter int unsigned LANES = 256,
  parameter int unsigned W     = 20,
  localparam int unsigned SH_W = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [LANES-1:0][W-1:0] din,
  input  logic [SH_W-1:0]         shamt,
  output logic [LANES-1:0][W-1:0] dout
);

  logic [LANES-1:0][W-1:0] stage [SH_W+1];

  assign stage[0] = din;

  for (genvar s = 0; s < SH_W; s++) begin : g_stage
    for (genvar t = 0; t < LANES; t++) begin : g_lane
      localparam int unsigned SRC = (t + LANES - ((1 << s) % LANES)) % LANES;
      assign stage[s+1][t] = shamt[s] ? stage[s][SRC] : stage[s][t];
    end
  end

  assign dout = stage[SH_W];

endmodule
