// llr_map -- non-linear mapping of the 2-bit rd read to a 4-bit LLR.
//
// The read channel quantizes each received value into four regions with a
// threshold f around zero. The 2-bit code is rd[1] = hard bit (1 = the value
// is negative, i.e. data bit '1') and rd[0] = reliable (|value| > f). The
// decoder uses LLR +-Vmax for reliable reads and +-Vmin for unreliable ones, with
// (Vmin, Vmax) = (0.5, 1.75), in units of 0.25: +-2 and +-7. A positive LLR
// means data bit 0. The values follow the chosen quantization; the bit order of
// the 2-bit code is this design's choice. Combinational.
module llr_map
  import ldpc_pkg::*;
#(
  parameter int unsigned VMIN = VMIN_Q,
  parameter int unsigned VMAX = VMAX_Q
) (
  input  logic [1:0] rd,
  output msg_t       llr
);

  always_comb begin
    case (rd)
      2'b00:   llr =  msg_t'(VMIN);
      2'b01:   llr =  msg_t'(VMAX);
      2'b10:   llr = -msg_t'(VMIN);
      default: llr = -msg_t'(VMAX);
    endcase
  end

endmodule
