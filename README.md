# Multiplier-free RNS CNN accelerator

This is a synthesizable SystemVerilog model of a CNN accelerator that does its
arithmetic in a residue number system (RNS). It follows the design in the paper
"A multiplier-free RNS-based CNN accelerator exploiting bit-level sparsity". The
processing elements (PEs) contain no multipliers. A weight is treated as a set
of signed power-of-two digits. Each non-zero digit means "add (or subtract) the
input to the accumulator for that bit position". Zero digits cost nothing, so
the design gains speed from bit-level sparsity in the weights.

## Main ideas

- **Small channels.** Numbers are held as residues modulo (5, 7, 31, 32, 33).
  Every channel is at most 6 bits wide, and the channels never exchange carries.
- **Weights as digit masks.** Each channel encodes its weight residue in signed
  digits: plain binary, CSD (canonical signed digit) or a joint encoding of a
  weight pair. Digit j of the weight chooses whether the input is added to,
  subtracted from or skipped for accumulator Y_j.
- **Distributed accumulators.** Every digit position has its own adder and
  accumulator. When all inputs have been summed, one shift-add unit computes
  `sum_j 2^j * Y_j mod m`.
- **Two inputs per cycle (MF-D).** Each step applies two weights to two FMAPs
  (input feature-map values). The step takes one cycle when the two weights'
  non-zero digits fall in different positions. A shared position is a
  *conflict*.
- **Stacks (MF-D-S).** A small stack at each digit position stores conflicting
  operands. The stack drains later, whenever that position's adder is idle,
  which removes most of the conflict stalls.

## Number system and storage formats

| item | base | range |
|---|---|---|
| full base (accumulation) | {5, 7, 31, 32, 33}, M = 1,145,760 | signed [-572880, 572879] |
| FMAPs in memory | {7, 31, 32}, M = 6944 | 12-bit signed FMAPs |
| weights in memory | {31, 32}, M = 992 | 8-bit signed weights |

The moduli have the forms 2^n, 2^n-1 and 2^n+1, with n = 2, 3, 5, 5 and 5
digit positions. Reduced-base values are extended to the full base by
`base_ext`, which uses the CRT with a sign correction and constant factors
only. Storage formats:

- An FMAP is stored in 13 bits as {r32, r31, r7}. An FMEM word holds two FMAPs
  (26 bits).
- A weight is stored in 10 bits as {r32, r31}. A WMEM word holds one weight pair
  for each of the 16 cores (320 bits).

## Modules (rtl/)

| module | role |
|---|---|
| `rns_pkg` | constants, types, residue helpers, pack/unpack functions |
| `sd_encoder` | binary or CSD signed-digit encoding of one residue |
| `opt_encoder` | joint encoding of a weight pair that keeps conflicts low |
| `mfds_ctrl` | stall and stack controller of one channel, shared by all PEs of a core |
| `mfds_pe_ch` | datapath of one PE channel: adders, accumulators and stacks |
| `shift_add` | Horner evaluation of `sum 2^j Y_j mod m` |
| `base_ext` | reduced base to full base |
| `sync_fifo` | weight FIFO and block buffer |
| `fmap_shreg` | FMAP shift register of a core (NPE+2 entries, shifts by 2) |
| `rns_core` | 16 PEs with shared encoders and controllers |
| `rns2bin`, `asp_unit` | CRT to binary, shift scaling, ReLU, saturation, 1x2 max pooling, re-encoding |
| `sram_sp` | single-port memory with synchronous read |
| `rns_accel` | top level: 16 cores, FMEM, WMEM, block buffer, pass sequencer |

### The MF-D-S channel and its stall rule

Each digit position handles its operands in a fixed order of priority within a
cycle:

1. The adder takes the top of the stack if the stack is not empty.
2. Otherwise it takes the digit of weight A (applied to F0).
3. Otherwise it takes the digit of weight B (applied to F1).

Operands the adder cannot take are pushed onto the stack, already negated where
needed, as long as there is room. Anything still left is remembered in a
per-digit "consumed" mask. The step then stalls: the inputs are held, and the
next cycle retries only the digits not yet consumed. With S = 0 there is no
stack, and every conflict costs one extra cycle. Stacks also drain with no step
present. A pass ends only after every stack is empty.

The schedule depends only on the weights. All 16 PEs of a core share them, so
one controller per channel makes the schedule and broadcasts it to all 16
datapaths.

### Encoders

- **CSD** is computed as the non-adjacent form.
  - For 2^n-1 and 2^n+1, a weight whose CSD would need digit n is encoded as
    `-CSD(m - w)` instead.
  - For 2^n+1 in binary mode, the residue 2^n is encoded as -1 at position 0.
- **Joint encoding** (`opt_encoder`) chooses the sign of each CSD digit, working
  from the least significant bit. It picks the sign that leaves the other
  weight's next bit free. For mod 32 it reaches a conflict probability of
  341/1024 = 0.333, the same value as the paper. For the 2^n-1 and 2^n+1
  channels, each weight has up to four digit forms that fit in n positions and
  are all worth w mod m: CSD(w), -CSD(m-w), the bits of w, and minus the bits of
  m-w. The encoder takes the pair of forms with the fewest shared positions.
  CSD is tried first, so it never does worse than independent CSD.

### Core dataflow

A core computes 16 neighbouring outputs of one output row for one output
channel. PE i needs x[i+k] and x[i+k+1] for the weight pair (w_k, w_k+1), so
the shift register shifts in two FMAPs each step. A kernel row is streamed as:

- NPE/2 = 8 *fill* steps with zero weights, which push x[0..15];
- ceil(K/2) weight steps, where step s pushes x[16+2s], x[17+2s] with weights
  (w[2s], w[2s+1]). An odd K is padded with a zero weight.

Kernel rows (input channels times kernel height) follow one another in the same
pass. The accumulators keep summing across all of them. The cores advance in
lockstep: a step retires (`step_go`) only when every channel of every core has
finished it. A stall in one core therefore holds all of them, and one FMAP
stream can serve all 16 cores.

### Accelerator pass

The host writes FMEM and WMEM through the `h_*` ports while the accelerator is
idle. It then sets `f_base`, `w_base`, `n_steps`, `o_base`, `shift`, `relu_en`
and `pool_en`, and pulses `start`. The sequencer runs these states:

1. **CLR** zeroes the accumulators.
2. **RUN** reads step t from FMEM[f_base+t] and WMEM[w_base+t]. The FMAP pair
   goes through the block buffer and the weights go into each core's weight FIFO.
3. **DRAIN** waits until every stack is empty.
4. **WB** passes the 256 results through two shared ASP units and writes them
   back, two per word:
   - without pooling, core c writes to `o_base + c*8 + q`;
   - with 1x2 pooling, core c writes to `o_base + c*4 + q`.
5. **DONE** pulses `done`.

`cyc_cnt`, `step_cnt` and `stall_cnt` report the last pass.

## Measured channel throughput

These are results for the mod-32 channel with dense random 5-bit weights, in
steps per cycle relative to one weight per cycle:

| stack S | binary | CSD | joint |
|---|---|---|---|
| 0 | 1.10 (paper 1.13) | 1.30 (1.32) | 1.49 (1.50) |
| 1 | 1.43 (paper 1.32) | 1.68 (1.65) | 1.74 (1.74) |

All values agree with the paper except binary with S = 1, where this model is
faster. A likely cause is the stack priority rule used here, since the paper
does not fully specify its drain order.

## Departures and limits

- **PE arrangement.** The 16 PEs of a core form a 1-D row with a linear shift
  register. The paper's 4x4 data movement is not reproduced.
- **ASP units.** Two ASP units are shared by all cores during write-back, not
  one per core. Pooling is 1x2 only. Scaling is an arithmetic right shift
  followed by saturation to 12 bits.
- **Joint encoder for 2^n±1.** The paper's optimal encoder for these channels
  is not reproduced. The four-form choice above gives a conflict probability of
  0.067 for mod 31 and 0.176 for mod 33. The paper reports 0.339 and 0.327 for
  its optimal encoder, so it must restrict the allowed forms in some way.
  Independent CSD gives 0.522 and 0.529 here.
- **Memory split.** The paper gives 448 KB of total on-chip memory. The split
  used here (FMEM 64K x 26 bit, WMEM 6K x 320 bit) is an assumption.
- **Pass length.** A pass is limited to 6144 steps by the WMEM depth. That is
  enough for 3x3 layers up to about 200 input channels and 1x1 layers up to 682
  input channels. Larger layers (the deep VGG, Yolo and ResNet layers) would need
  partial sums carried across passes, which is not implemented.
- **Dynamic range.** The full base holds sums up to ±572,879. Long sums of 12-bit
  × 8-bit products wrap modulo M, as the number system dictates. The end-to-end
  test includes such wraps in its reference model.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. Example
with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/rns_pkg.sv tb/tb_rns_accel.sv --top-module tb_rns_accel
obj_dir/Vtb_rns_accel
```

## Verification

Each module has its own testbench in `tb/`:

- The encoders are checked exhaustively over every residue and weight pair: the
  value is preserved, the digits are non-adjacent, and the conflict counts are
  correct.
- The controller is checked for S = 0, 1 and 2 with all three encodings. Every
  digit must reach its accumulator exactly once with the right sign. The cycle
  count must be exact for S = 0, and the throughput figures above must be met.
- The datapath, the shift-add unit and base extension are checked against
  integer references.
- `tb_rns_accel` runs the full-size accelerator for two passes and compares every
  output word. It also checks that stalls, stack use, block-buffer filling, ReLU,
  saturation, pooling, negative digits and zero-weight steps all occurred.

Each module testbench was also run against a copy of its module with one deliberate
fault inserted, and it caught that fault.
