# AES-128 with cone-aware group parity against laser fault attacks

A laser shot on a chip disturbs a small area. It can flip several
flip-flops at once, either directly or through the combinational logic
that feeds them. A plain parity bit over a register misses every even
number of flips, and a laser shot can easily produce two. This design
protects an AES-128 encryption core with parity groups chosen so that
one shot cannot put two faults in the same group.

The rule behind the grouping is simple. The logic feeding a flip-flop
(its *logic cone*) is traced back to other flip-flops or primary inputs.
Flip-flops whose cones share no gate and no input are *independent*.
A shot is assumed to stay inside one set of intersecting cones. Each
parity group therefore holds only bits whose cones are independent of
each other. With at most one fault per group, every fault shows up as a
parity change.

Every group parity is checked against a *predicted* parity. A duplicate
of the next-state logic computes what each group's parity must become at
the next clock edge. Only that one parity bit per group is stored, not a
copy of the register. This mixes hardware redundancy (the duplicated
logic) with information redundancy (the parity code).

## Block diagram

```
              plaintext, key, start
                     |
     +---------------+-------------------------------+
     |               |                               |
 +---v---+   +-------v--------+   +----------+  +----v-----------------------+
 |  CU   |-->| DU  (128-bit   |   |  KU      |  | predictor                  |
 | FSM + |   | state, 16 byte |<--| (128-bit |  | duplicated aes_du_next and |
 | round |-->| cells)         |   |  key)    |  | aes_ku_next -> group       |
 +-------+   +-------+--------+   +----+-----+  | parity -> 128 x 1-bit reg  |
                     |                 |        +-------------+--------------+
              group_parity      group_parity                  |
                 (64)              (64)                   ppar_q (128)
                     \                 /                      |
                      +---> parity_comparator (128 checkers) <+
                                       |
                                     error[127:0]
```

| module | role |
|---|---|
| `aes_fm_top` | top: core plus countermeasure |
| `aes_control_unit` | control unit (CU): load, ten rounds, done; not protected |
| `aes_data_unit` | data unit (DU): 128-bit state register and `aes_du_next` |
| `aes_du_next` | DU next-state logic: SubBytes, ShiftRows, MixColumns, AddRoundKey |
| `aes_key_unit` | key unit (KU): round-key register and `aes_ku_next` |
| `aes_ku_next` | on-the-fly AES-128 key expansion |
| `group_parity` | parity generator: 64 group parities from one 128-bit register |
| `parity_predictor` | predictor: duplicated next-state logic and the parity register |
| `parity_comparator` | one XOR checker per group |
| `aes_sbox`, `aes_mixcolumn` | S-box lookup and one MixColumns column |
| `aes_pkg` | shared types, GF(2^8) functions, the S-box table and the grouping |

## The parity groups

The DU state and the KU key are both treated as a 4×4 array of 8-bit
cells. Rows 0..3 are the AES state rows. The cells A..D of a row are the
state columns 0..3. Byte `i` of the 128-bit vector (bits `[127-8i -: 8]`)
is cell (row `i%4`, column `i/4`).

A group is **the same bit position of two cells** on a diagonal of that
array. Eight cell pairs times eight bit positions give 64 groups of two
bits per register.

| pair | cells | pair | cells |
|---|---|---|---|
| 0 | A0 – B1 | 4 | B2 – A3 |
| 1 | B0 – C1 | 5 | C2 – B3 |
| 2 | C0 – D1 | 6 | D2 – C3 |
| 3 | D0 – A1 | 7 | A2 – D3 |

Group `g` is bit `g % 8` of both cells of pair `g / 8`
(`aes_pkg::group_bit`).

Why this works: after ShiftRows, output byte (r, c) is fed from the
diagonal of input bytes (r', c + r'). MixColumns only mixes bytes inside
one column. So two output cells in different columns have disjoint input
cones, and every pair above spans two columns. One consequence: all 32
flip-flops of one AES column (a shot into one MixColumns unit) fall into
32 different groups.

The key register uses the same cell pairing. The A0–B1 pair, the
two-cell groups and their placement on diagonals follow the published
grouping. The exact list of the other seven pairs is this design's
reading of that diagonal pattern. Any
pairing that keeps the two cells in different columns gives the same
DU property.

## Detection timing

- The predictor register always holds the parity that the DU and KU
  registers must have after the last edge. This holds while loading,
  during rounds and while idle, because the duplicated logic includes the
  hold path.
- A fault captured at edge *t* shows in `error` during the cycle after
  *t*, and only in that cycle. From then on the predictor works from the
  faulty register value, so prediction and register agree again while the
  wrong data moves on.
- A system that must react should latch `error`, or OR-reduce and latch
  it. The core does neither, so the error vector stays visible bit by bit.
- Reset clears all registers, including the parity register. Parity of
  zero is zero, so the checkers are quiet after reset.

What the scheme cannot see:
- An even number of faults in one group.
- A fault in a parity flip-flop together with an odd number of faults in
  its own group.
- Anything in the control unit, which is left unprotected.
- A flip of a predicted-parity flip-flop alone raises an alarm with a
  correct result (a false positive).

## AES core: interface and timing

`aes_fm_top` ports:

| port | width | direction | meaning |
|---|---|---|---|
| `clk`, `rst_n` | 1 | in | rising-edge clock, asynchronous active-low reset |
| `start` | 1 | in | start one block; sampled only when idle |
| `plaintext`, `key` | 128 | in | must be valid in the start cycle |
| `ciphertext` | 128 | out | DU state; the ciphertext when `done` is high, held until the next start |
| `busy` | 1 | out | rounds in progress |
| `done` | 1 | out | one-cycle pulse |
| `error` | 128 | out | checker outputs: `[63:0]` DU groups, `[127:64]` KU groups |
| `fi_du`, `fi_ku`, `fi_pred` | 128 each | in | fault-injection masks; **tie to zero** in normal use |

How one block goes through the core:
- The edge that samples `start` loads `plaintext ^ key` into the state and
  `key` into the key register.
- Each of the next ten edges performs one full round. Round 10 leaves out
  MixColumns.
- The round key of round *r* is computed from key *r−1*, combinationally
  in the same cycle. The key register moves to key *r* on the same edge.
- `done` is high in the cycle after the tenth round edge, so a block
  takes 11 edges. A `start` while busy is ignored.

The fault-injection masks XOR into the D inputs of the selected
flip-flops for one edge. That models a laser upset of the flip-flop, or a
transient in its cone that gets captured. They exist to run RTL fault
campaigns. A product should remove them, or tie them to zero and let
synthesis remove them.

## Departures and open points

- Only the proposed grouping is built. A comparison scheme with 8-bit
  groups taken from a single register (which ignores cone dependencies)
  is not included.
- Only 128-bit keys are supported. The AES the countermeasure was applied
  to also accepts 192-bit and 256-bit keys.
- The internal structure of the AES core is this design's own: one round
  per clock, 16 S-boxes in the DU, 4 in the KU, and on-the-fly key
  expansion. So are the CU's encoding, the start/done handshake and the
  reset values. The arithmetic follows FIPS-197.
- The S-box table is computed at elaboration from the GF(2^8) inverse and
  the affine map (`aes_pkg::sbox_table`).
- The predictor is written as a full copy of `aes_du_next` and
  `aes_ku_next` followed by parity trees. Reducing it to parity outputs
  is left to the synthesis tool.
  - The copy has its own key expansion, so a fault in the original KU
    logic cannot reach both sides.
- How the key-register bits are grouped is not specified by the method's
  case study. The DU pairing is reused.
- The groups come from an analysis of the logic cones in the RTL. After
  synthesis and place-and-route, cones can merge or move. Layout-level
  detection rates are therefore only as good as that correlation, and they
  cannot be checked in RTL simulation.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The reference model `tb/aes_ref_pkg.sv`
is written independently of the RTL:
- its S-box comes from a different construction;
- its key schedule is fully expanded;
- its grouping is computed from cell coordinates.

| testbench | what it checks |
|---|---|
| `tb_aes_fm_top` | end to end at default size: FIPS-197 B and C.1 vectors, 20 random blocks, 11-edge latency, start-while-busy, no false alarm without faults, single DU/KU flips reported in the right group, predictor flips (alarm, correct result), 2–10 faults in distinct groups all reported, two faults in one group missed, faults in the held registers while idle; counts that each case happened |
| `tb_fault_campaign` | RTL campaign for multiplicities M2–M10 over the 384 injectable flip-flops, in three sampling modes (one fault per group, faults confined to one AES column, unconstrained); prints detected / undetected / silent / false-positive rates and checks the checker vector of every sample |
| `tb_aes_data_unit`, `tb_aes_key_unit` | state after every round and every round key against the reference; hold; fault hook |
| `tb_aes_control_unit` | load, round numbering, `last_round`, 11-edge `done`, start ignored while busy |
| `tb_group_parity` | every bit lands in its group; each group holds exactly two bits |
| `tb_parity_predictor` | stored parity equals the parity of the reference's next state and key for load, every round and hold |
| `tb_parity_comparator` | each checker on random and single-mismatch inputs |

Campaign results with 300 samples per point:
- One fault per group: the alarm rose in every sample.
- Faults confined to one column: the alarm rose in every sample.
- In the other samples the alarm rose with a correct result (a false
  positive). These samples had hit only predicted-parity flip-flops. They
  were 10–15 % at M2 and fell to 0 % by M6.
- Unconstrained sampling rarely puts two faults in one group, so its rates
  are close to the constrained ones. The even-count escape is exercised
  explicitly in `tb_aes_fm_top`.

To run a testbench with plain Verilator (from the folder that holds
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
  rtl/aes_sbox.sv rtl/aes_mixcolumn.sv rtl/aes_du_next.sv rtl/aes_ku_next.sv \
  rtl/aes_data_unit.sv rtl/aes_key_unit.sv rtl/aes_control_unit.sv \
  rtl/group_parity.sv rtl/parity_predictor.sv rtl/parity_comparator.sv \
  rtl/aes_fm_top.sv tb/tb_aes_fm_top.sv --top-module tb_aes_fm_top -o sim
./obj_dir/sim
```

Swap `tb_aes_fm_top` for any other testbench. Each one finishes within a
few seconds.

## Changing the design

- **Grouping:** edit `aes_pkg::pair_cell` (which two cells form a pair)
  or `aes_pkg::group_bit`, and the matching `ref_group_of` in the
  testbench package.
  - Groups of more cells (cheaper, weaker) need `GROUP_SIZE`, `NGROUPS`
    and `pair_cell` changed together.
  - The predictor and comparator widths follow `NGROUPS`.
- **Adding protection to the CU:** its state and round counter would need
  their own groups and a duplicated next-state function, built the same
  way as for the DU and KU.
