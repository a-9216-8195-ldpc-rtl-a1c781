# Column-shuffled min-sum decoder for a (9216,8195) Latin-square QC-LDPC code

This is the RTL of an LDPC decoder for NAND flash pages. A page holds 8195 data bits
protected by 1021 parity bits, so a codeword is 9216 bits at rate 0.889. The flash read
gives every bit a 2-bit soft value: its hard value and whether it lies far enough
from the decision threshold to be trusted. The decoder runs normalized min-sum in a *column-shuffled* order. It needs
144 clock cycles per iteration, and with 4 iterations at a 9 ns clock that is about
1.58 Gb/s of user data.

The central idea is to make the check nodes cheap. Variable nodes are processed in 36
groups of 256. Each check node sees exactly one new message per cycle, so it can be
updated with a 3-input, 2-output "accumulative" sorter. A full 36-input minimum finder
is never needed. There are 256 check-node units and 256 variable-node units. Each check
node stores only a small state of 20 bits.

## The code

The parity-check matrix H is a 4 x 36 array of 256 x 256 circulant permutation matrices
(CPMs). It has column degree 4 and row degree 36, 1024 check nodes and 9216 variable
nodes. The shift of the CPM in block row `r` and block column `g` comes from a Latin
square over GF(2^8):

    alpha^shift(r,g) = alpha^(205+r) + alpha^(209+g),   alpha a root of x^8+x^4+x^3+x^2+1

Rows and columns use different cosets of alpha, so the sum is never zero and every block
is a full CPM. Each row and each column of the base matrix holds distinct shifts. The
matrix has no 4-cycles at CPM size 256. The shifts run from 0 to 254 because the field
has 255 non-zero elements, and the CPM is made 256 wide so that the group width is a
power of two. The first eight block columns are:

| block row | g=0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| 0 | 50 | 88 | 141 | 62 | 150 | 70 | 226 | 195 |
| 1 | 174 | 51 | 89 | 142 | 63 | 151 | 71 | 227 |
| 2 | 2 | 175 | 52 | 90 | 143 | 64 | 152 | 72 |
| 3 | 233 | 3 | 176 | 53 | 91 | 144 | 65 | 153 |

A CPM with shift `k` connects check `j` of its block row to variable `(j+k) mod 256`
of its block column. Code bit `n` is variable `n mod 256` of group `n / 256`.

No shift table is stored in the source. `ldpc_pkg::base_shift` computes each shift
when the design is elaborated, from `gf_exp` and `gf_log`.

## Decoding schedule

Min-sum with flooding would update all 1024 checks from all 9216 variables at once.
Column-shuffled decoding processes the variables one group (one block column) at a
time instead. Each group uses the check states that the groups before it already
updated in the same iteration, which is why it converges in fewer iterations. For the
variable `n` of group `g`, the steps are:

1. Read the channel LLR `P_n`.
2. For each of its 4 checks `m`, form `eps_mn`. This is the check's smallest stored
   magnitude, or the second smallest if the smallest came from this group. It is scaled
   by 0.75 and given the sign product of the check without this edge's own sign.
3. Compute `sum_n = P_n + sum(eps)`. The hard decision is the sign of `sum_n`.
4. Send `z_mn = sum_n - eps_mn` back to each check. The check puts it into its sorter,
   replaces this edge's old sign in the sign product, and flips its parity bit if the
   hard decision is 1.

The 256 variables of a group touch each check of a block row exactly once. The hardware
therefore treats one block row per cycle, which makes 4 cycles per group, 144 per
iteration. Two stages run together on the same block row:

```
cycle      0      1      2      3      4      5      6      7      8  ...
row        0      1      2      3      0      1      2      3      0
stage A  g0/r0  g0/r1  g0/r2  g0/r3  g1/r0  g1/r1  g1/r2  g1/r3  g2/r0   accumulate sum
stage B    -      -      -      -    g0/r0  g0/r1  g0/r2  g0/r3  g1/r0   z = sum - eps, update CNU
```

In one cycle, stage B writes row `r`'s check states with group `g`'s messages. In the
same cycle, stage A reads row `r`'s states for group `g+1`. The updated states are
forwarded combinationally (`cnu_bank.rd_state`), so stage A always sees group `g`'s
update. The result is bit-exact sequential column-shuffled decoding, not an
approximation. The critical path is one cycle long: CNU, then shifting network, then
VNU adder.

**Passes.** Pass 0 initializes the decoder. All `eps` are forced to 0, so every check
collects the raw channel values. Passes 1 to `MAX_ITER` are the iterations. A decode
takes `4*(G*(iters+1)+1)` cycles: 724 cycles at the default of 4 iterations. The last 4
cycles drain stage B.

**Stopping.** Every check keeps the parity of the hard decisions it received in the
current pass. Group 0 restarts it. At the last update of a pass, that parity is the
check's syndrome bit for the word now in the hard-decision memory. The decoder stops
when all 1024 bits are 0 (with `EARLY_TERM=1`) or when the pass reaches `MAX_ITER`. It
can stop right after pass 0 if the received word is already a codeword.

## Check-node unit: the accumulative sorter

Each check stores one `cn_state_t`:

| field | bits | meaning |
|---|---|---|
| min1, idx1 | 3 + 6 | smallest magnitude and the group it came from |
| min2, idx2 | 3 + 6 | second smallest and its group |
| sgn | 1 | XOR of the newest sign on each of the 36 edges |
| par | 1 | hard-decision parity of the current pass |

When group `g` sends a new magnitude `z`:

- **Stale entry.** The check may still hold `g`'s magnitude from the previous iteration.
  That entry is out of date. It is dropped, which sets it to 1.75 with an index of "none".
  This handles, for example, a stored 0.25 from group 0 followed by a new 1.25 from
  group 0.
- **Sorting.** The new input and the two remaining entries are sorted, and the two
  smallest are kept.
- **Ties.** On a tie between the new input and a stored entry, the new input wins
  (`input <= min`). The newer value then carries the more recent index. On a tie between
  the two stored entries, `min1` wins.
- **Sign.** `sgn ^= old_sign ^ new_sign`. The old sign of each edge is kept in the sign
  memory. It counts as 0 in pass 0.

The check state is all the decoder keeps about a check: 1024 x 20 bits of registers.
The check-to-variable messages are rebuilt from it whenever they are needed
(`ldpc_pkg::c2v_msg`), so no message memory is needed.

## Variable-node unit and number formats

Messages are 4-bit two's complement with two fraction bits (unit 0.25, range -2 to
+1.75). Inside the CNU they are sign-magnitude with a 3-bit magnitude, so 1.75 at most.

- **Channel LLR.** The soft read maps to ±0.5 (unreliable) or ±1.75 (reliable):

  | `in_llr[t]` | LLR |
  |---|---|
  | `00` | +0.5 |
  | `01` | +1.75 |
  | `10` | -0.5 |
  | `11` | -1.75 |

  Bit 1 is the hard value. A positive LLR means bit 0.
- **Scaling.** The factor is 0.75, rounded to the nearest step with halves rounded up.
  The smallest step, 0.25, is kept as it is:

  | in | 0 | .25 | .5 | .75 | 1.0 | 1.25 | 1.5 | 1.75 |
  |---|---|---|---|---|---|---|---|---|
  | out | 0 | .25 | .5 | .5 | .75 | 1.0 | 1.25 | 1.25 |

- **Accumulation.** Each VNU has one 2-input adder. It builds `sum_n` over the 4 cycles
  of stage A and keeps the 4 `eps` values and the 4 old signs in registers.
- **Subtraction.** One 2-input subtractor forms `z_mn` in stage B. The 7-bit sum cannot
  overflow. `z` saturates to ±1.75 before it goes to the CNU.
- **Zero.** A zero `z` is sent as positive. The hard decision is 1 when `sum_n < 0`.

## Shifting network and the difference table

The VNUs reach their memories through fixed wiring. The only rotation sits between the
CNUs and the check-state registers. Row `r`'s states are stored pre-rotated so that lane
`t` holds the check that variable `t` of the group being accumulated connects to.
Moving from group `g` to `g+1` needs the rotation

    delta(r,g) = shift(r,g+1) - shift(r,g)  mod 256,   new[t] = old[(t - delta) mod 256]

This is applied by a 256-lane, 8-stage logarithmic barrel shifter on the updated states
in stage B. `shift_diff_rom` provides `delta`, computed at elaboration. The
wrap from group 35 back to group 0 is one more entry of the same table. All
check-to-variable alignment is handled by this one shifter.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| in_valid / in_ready | in / out | 1 | load handshake; `in_ready` is high only while loading |
| in_llr | in | 256 x 2 | soft reads of one group: `in_llr[t]` is code bit `g*256+t` |
| out_valid / out_ready | out / in | 1 | output handshake |
| out_hd | out | 256 | decoded bits of group `out_grp` |
| out_grp, out_last | out | 6, 1 | group index and last-group flag |
| busy | out | 1 | decoding |
| iters_used | out | 5 | iterations of the last word (0 = stopped after pass 0) |
| syndrome_ok | out | 1 | the last word met every parity check |

A codeword takes 36 load beats, groups in order (gaps allowed). Then come
`4*(36*(iters+1)+1)` decode cycles, then 36 output beats (back-pressure allowed).
Loading, decoding and unloading do not overlap. The 1.58 Gb/s figure counts only the
decoding: 8195 bits / (144 x 4 x 9 ns).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `Z` | 256 | CPM size = lanes = VNUs = CNUs |
| `G` | 36 | block columns = groups per iteration |
| `MAX_ITER` | 4 | iteration limit, 1..30 (checked at elaboration) |
| `EARLY_TERM` | 1 | stop as soon as the syndrome is zero |

The code itself is fixed by `ldpc_pkg`: the field polynomial, the two coset offsets
(205, 209) and 4 block rows. A smaller `Z` or `G` gives a smaller code: the shifts are taken
modulo `Z` and only the first `G` block columns are used. Such a code may have 4-cycles,
and it is not the (9216,8195) code.

## Structure

```
ldpc_decoder
├── ldpc_ctrl          load / decode / output FSM, (group,row) schedule, stop test
├── channel_mem        36 x 512 bits, 2-bit soft reads
├── sign_mem           36 x 4 x 256 bits, newest sign of every edge
├── hd_mem             36 x 256 bits, hard decisions
├── shift_diff_rom     delta(r,g), computed at elaboration
├── llr_map   x256     2-bit read -> 4-bit LLR
├── vnu       x256     accumulate / subtract / saturate
└── cnu_bank           4 x 256 check states, forwarding, syndrome
    ├── cnu   x256     sorter + sign + parity
    │   └── acc_sorter
    └── barrel_shifter 256 x 20 bits
```

`ldpc_pkg` holds the sizes, the message and state types, the GF(2^8) functions, the
scaling and `c2v_msg`. The memories are plain arrays with synchronous write and
asynchronous read, so a synthesis flow can map them to register files. After generic
synthesis the design has about 30.6k cells, 29.2k flip-flop bits and 64.5k memory bits.

## What follows the published design and what does not

These parts follow the published design:

- the code construction;
- 36 groups of 4 cycles;
- the 3-to-2 accumulative sorter with stale-index removal and the `<=` replacement rule;
- 4-bit messages and the 0.75 scaling that leaves 0.25 unchanged;
- the (0.35, 0.5, 1.75) soft-input mapping;
- a barrel shifter with a shift-difference table;
- 256 CNUs and 256 VNUs with 2-input adders;
- 4 iterations.

These are choices of this implementation:

- **Initialization.** It is scheduled as an ordinary pass of 144 cycles with zero
  `eps`. The published text counts it as 36 cycles.
- **Early stop.** The design stops early, as the published algorithm allows, by
  accumulating each check's hard-decision parity during the pass.
- **Same-cycle overlap.** Stage B of group `g` and stage A of group `g+1` run in the
  same cycle, with forwarding of the updated check states.
- **Handshakes and reset.** Both are valid/ready. Reset is asynchronous. Memories are
  not reset.
- **Arithmetic details.** The sum is 7 bits wide. Scaling rounds to the nearest step.
  A tie between the two stored entries goes to `min1`. A zero message is positive. The
  bit order of `in_llr` is `{hard, reliable}`.
- **No equivalent base matrix.** Block column 0 is not normalized to identity
  matrices, which would let the shifter sit idle for group 0. The rotation from
  group 35 to group 0 is simply one more entry of the difference table, at no extra
  cost.
- **No I/O overlap.** Loading and unloading are not overlapped with decoding, so
  sustained throughput is lower than the decode-only figure.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an independent
model written in the testbench. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Each one was also run against a
deliberately broken copy of its module to make sure that it fails.

| testbench | what it covers |
|---|---|
| `tb_acc_sorter` | a worked 5-group example of the tie rule, then random states and inputs |
| `tb_cnu` | random updates: magnitudes, sign bookkeeping and parity against an independent model |
| `tb_vnu` | overlapped accumulate/update groups, saturation, pass 0 |
| `tb_barrel_shifter` | every shift amount |
| `tb_shift_diff_rom` | the known corner of the base matrix, every delta, absence of 4-cycles |
| `tb_llr_map`, `tb_channel_mem`, `tb_hd_mem`, `tb_sign_mem` | mapping and memory behaviour |
| `tb_cnu_bank` | forwarding, rotation, clear, syndrome flag |
| `tb_ldpc_ctrl` | schedule, stop rules (early and fixed-iteration), handshakes, cycle counts |
| `tb_ldpc_decoder` | full-size decoder, bit-exact against a sequential column-shuffled reference |
| `tb_ldpc_snr` | full size, `MAX_ITER=20`, AWGN at Eb/N0 4.5 to 5.25 dB |

`tb_ldpc_decoder` runs the default configuration on five words, from error-free to heavy
noise. It checks:

- every decoded bit, the iteration count, the syndrome flag and the cycle count against
  the model;
- that each of these mechanisms happens at least once: stop after pass 0, early stop,
  stop at the limit, stale-index removal, tie replacement, saturation, input gaps and
  output back-pressure.

`tb_ldpc_snr` sends random codewords. It encodes them with its own H, reduced by
Gaussian elimination (rank 1021), adds Gaussian noise and quantizes with threshold 0.35.
It checks the decoder's syndrome flag against its own H and checks that every converged
word is the transmitted one. It also compares the average iteration count with the
published one. With 40 words per point, four different seeds gave these averages:

| Eb/N0 (dB) | 4.5 | 4.75 | 5.0 | 5.25 |
|---|---|---|---|---|
| this RTL | 4.15-4.53 | 3.20-3.38 | 2.63-2.90 | 2.20-2.38 |
| published (10^5 words) | 4.14 | 3.32 | 2.85 | 2.43 |

All words converged within the 20-iteration limit.

Run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv rtl/*.sv tb/tb_ldpc_decoder.sv \
          --top tb_ldpc_decoder -o sim
./obj_dir/sim +verilator+seed+1
```

The full-size build takes under a minute, and the simulation itself takes seconds.

## Not covered

- **Outside the decoder.** The flash array and the channel emulator are not part of the
  RTL. The decoder starts from the 2-bit soft reads.
- **Other codes.** Only the 256-wide Latin-square code is built. The 255-wide variant and
  the 127-wide codes used for comparison are not.
- **Timing.** No timing closure was done. The single-cycle path from CNU through the
  shifter to the VNU is what sets the clock.
