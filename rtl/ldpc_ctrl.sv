// ldpc_ctrl -- schedule of the column-shuffled decoder.
//
// Three states: LOAD accepts the G channel words of a codeword (valid/ready
// handshake, one group per beat) and clears the check-node states. DECODE runs
// the passes. OUTPUT hands out the G hard-decision words (valid/ready handshake).
//
// DECODE is a two-stage pipeline over (group, block row), one block row per
// cycle:
//   accumulate stage A: group a_grp, rows 0..3 -> the VNUs sum P + sum(eps)
//   update stage B:     group a_grp-1, rows 0..3 -> the CNUs take z = sum - eps
// Both stages work on the same block row (row) in a cycle, so B of group g and
// A of group g+1 overlap, and a pass over all G groups takes 4*G cycles
// (144 for the full code). Pass 0 is the initialization pass (eps forced to 0, so
// every check sees the channel LLRs). Passes 1..MAX_ITER are decoding iterations.
// After the last update of a pass the decoder stops when the pass reached
// MAX_ITER, or with EARLY_TERM when every check's hard-decision parity is even.
// A full run therefore takes 4*(G*(MAX_ITER+1)+1) cycles.
// The fixed iteration count and the 4-cycle-per-group schedule follow the
// design. The initialization pass being scheduled like an ordinary pass, the
// syndrome-based early stop and the handshakes are this design's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned G          = COL_BLOCKS,
  parameter int unsigned MAX_ITER   = 4,
  parameter bit          EARLY_TERM = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // channel input handshake
  input  logic              in_valid,
  output logic              in_ready,
  output logic              ld_en,
  output logic [IDX_W-1:0]  ld_addr,
  // decode schedule
  output logic              bank_clear,
  output logic [1:0]        row,
  output logic              a_en,
  output logic [IDX_W-1:0]  a_grp,
  output logic              a_iter0,
  output logic              b_en,
  output logic [IDX_W-1:0]  b_grp,
  output logic              b_first,
  output logic              hd_wr,
  input  logic              synd_zero,
  // output handshake
  output logic              out_valid,
  input  logic              out_ready,
  output logic [IDX_W-1:0]  out_addr,
  output logic              out_last,
  // status
  output logic              busy,
  output logic [ITER_W-1:0] iters_used,
  output logic              syndrome_ok
);

  // The pass counter must reach MAX_ITER+1 without wrapping.
  if (MAX_ITER < 1 || MAX_ITER + 1 >= (1 << ITER_W)) begin : g_bad_iter
    $error("ldpc_ctrl: MAX_ITER must be in 1..%0d", (1 << ITER_W) - 2);
  end

  typedef enum logic [1:0] {S_LOAD, S_DECODE, S_OUTPUT} state_e;

  state_e            state;
  logic [IDX_W-1:0]  cnt;       // load / output word counter
  logic [ITER_W-1:0] a_iter, b_iter;
  logic              b_valid;
  logic              pass_end, stop;

  assign in_ready   = (state == S_LOAD);
  assign ld_en      = in_ready && in_valid;
  assign ld_addr    = cnt;
  assign bank_clear = (state == S_LOAD);

  assign a_en     = (state == S_DECODE);
  assign a_iter0  = (a_iter == '0);
  assign b_en     = (state == S_DECODE) && b_valid;
  assign b_first  = (b_grp == '0);
  assign hd_wr    = b_en && (row == 2'd0);
  assign pass_end = b_en && (row == 2'd3) && (32'(b_grp) == G - 1);
  assign stop     = pass_end && ((32'(b_iter) == MAX_ITER) || (EARLY_TERM && synd_zero));

  assign out_valid = (state == S_OUTPUT);
  assign out_addr  = cnt;
  assign out_last  = out_valid && (32'(cnt) == G - 1);
  assign busy      = (state == S_DECODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      cnt         <= '0;
      row         <= '0;
      a_grp       <= '0;
      a_iter      <= '0;
      b_grp       <= '0;
      b_iter      <= '0;
      b_valid     <= 1'b0;
      iters_used  <= '0;
      syndrome_ok <= 1'b0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (in_valid) begin
            if (32'(cnt) == G - 1) begin
              cnt     <= '0;
              state   <= S_DECODE;
              row     <= '0;
              a_grp   <= '0;
              a_iter  <= '0;
              b_grp   <= '0;
              b_iter  <= '0;
              b_valid <= 1'b0;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_DECODE: begin
          row <= row + 1'b1;
          if (row == 2'd3) begin
            b_valid <= 1'b1;
            b_grp   <= a_grp;
            b_iter  <= a_iter;
            if (32'(a_grp) == G - 1) begin
              a_grp  <= '0;
              a_iter <= a_iter + 1'b1;
            end else begin
              a_grp <= a_grp + 1'b1;
            end
          end
          if (stop) begin
            state       <= S_OUTPUT;
            iters_used  <= b_iter;
            syndrome_ok <= synd_zero;
          end
        end
        S_OUTPUT: begin
          if (out_ready) begin
            if (32'(cnt) == G - 1) begin
              cnt   <= '0;
              state <= S_LOAD;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // The output word must hold while it is offered and not taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_addr));
  // Decoding never runs past the iteration limit.
  a_iter_lim: assert property (@(posedge clk) disable iff (!rst_n)
    b_en |-> 32'(b_iter) <= MAX_ITER);

endmodule
