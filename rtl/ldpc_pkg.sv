// ldpc_pkg -- shared constants, types and code-construction functions of the
// (9216,8195) quasi-cyclic LDPC decoder.
//
// The parity-check matrix H has 4 block rows and 36 block columns of 256x256
// circulant permutation matrices (CPMs). The shift of the CPM in block row r and
// block column g is the exponent k of the Latin-square entry
//     w(r,g) = alpha^(205+r) + alpha^(209+g) = alpha^k      in GF(2^8),
// with alpha a root of x^8+x^4+x^3+x^2+1. The CPM of shift k connects check j of the
// block row to variable (j+k) mod 256 of the block column. This construction is
// the published one: it reproduces every printed entry of the base matrix
// (block columns 0..6 of all four block rows) and, at CPM size 256, the full
// matrix has no 4-cycles. The functions below compute the matrix at elaboration,
// so no table of shifts is stored in the source.
//
// Messages between check and variable nodes are 4-bit two's complement with two
// fraction bits (unit 0.25). Inside the check node they are sign-magnitude with a
// 3-bit magnitude. The check-node state is one cn_state_t per check.
package ldpc_pkg;

  localparam int unsigned CPM_SIZE   = 256;  // p, CPM size
  localparam int unsigned ROW_BLOCKS = 4;    // dv, column degree
  localparam int unsigned COL_BLOCKS = 36;   // dc = G, row degree and group count

  localparam int unsigned MAG_W = 3;         // magnitude bits of a message
  localparam int unsigned MSG_W = 4;         // two's-complement message bits
  localparam int unsigned IDX_W = 6;         // group index bits (36 groups)
  localparam int unsigned SUM_W = 7;         // a-posteriori sum: |P| + 4*|eps| <= 35
  localparam int unsigned ITER_W = 5;        // iteration counter bits (up to 30 iterations)

  localparam logic [IDX_W-1:0] IDX_NONE = '1;  // index of an empty sorter slot
  localparam logic [MAG_W-1:0] MAG_MAX  = '1;  // largest magnitude, 1.75

  // 2-bit soft input mapped to Vmin = 0.5 and Vmax = 1.75 (in units of 0.25).
  localparam int unsigned VMIN_Q = 2;
  localparam int unsigned VMAX_Q = 7;

  // Latin-square construction constants.
  localparam int unsigned GF_POLY  = 'h11D;
  localparam int unsigned LS_ROW0  = 205;
  localparam int unsigned LS_COL0  = 209;

  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  // State of one check node: accumulative-sorter contents, product of the
  // latest edge signs and the parity of the hard decisions of this pass.
  typedef struct packed {
    logic [MAG_W-1:0] min1;
    logic [MAG_W-1:0] min2;
    logic [IDX_W-1:0] idx1;
    logic [IDX_W-1:0] idx2;
    logic             sgn;
    logic             par;
  } cn_state_t;

  localparam cn_state_t CN_INIT = '{min1: MAG_MAX, min2: MAG_MAX,
                                    idx1: IDX_NONE, idx2: IDX_NONE,
                                    sgn: 1'b0, par: 1'b0};

  // alpha^e in GF(2^8).
  function automatic int unsigned gf_exp(input int unsigned e);
    int unsigned x;
    x = 1;
    for (int unsigned i = 0; i < e % 255; i++) begin
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ GF_POLY;
    end
    return x;
  endfunction

  // Discrete logarithm of a non-zero element of GF(2^8).
  function automatic int unsigned gf_log(input int unsigned v);
    int unsigned x;
    int unsigned l;
    x = 1;
    l = 0;
    for (int unsigned i = 0; i < 255; i++) begin
      if (x == v) l = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ GF_POLY;
    end
    return l;
  endfunction

  // Cyclic shift of the CPM in block row r, block column g (0..254).
  function automatic int unsigned base_shift(input int unsigned r, input int unsigned g);
    return gf_log(gf_exp(LS_ROW0 + r) ^ gf_exp(LS_COL0 + g));
  endfunction

  // Rounded scaling by 0.75 of a magnitude; 0.25 stays 0.25.
  function automatic logic [MAG_W-1:0] scale_mag(input logic [MAG_W-1:0] m);
    return MAG_W'((3 * int'(m) + 2) >> 2);
  endfunction

  // Check-to-variable message for the variable of group grp on this check
  // (min-sum with the variable's own contribution excluded, then scaled).
  function automatic msg_t c2v_msg(input cn_state_t st, input logic [IDX_W-1:0] grp,
                                   input logic own_sgn);
    logic [MAG_W-1:0] m;
    logic             s;
    m = (st.idx1 == grp) ? st.min2 : st.min1;
    m = scale_mag(m);
    s = st.sgn ^ own_sgn;
    return s ? -msg_t'({1'b0, m}) : msg_t'({1'b0, m});
  endfunction

endpackage
