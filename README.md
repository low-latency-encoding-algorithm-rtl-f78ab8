# Low-latency tail-biting encoder for duo-binary turbo codes

Duo-binary turbo codes, such as the one in IEEE 802.16e (mobile WiMAX), use
*tail biting*: each constituent convolutional code must begin and end a frame
in the same state, the circulation state S_0. No tail bits are sent. The cost is
that S_0 depends on the whole frame. A plain encoder therefore makes two
passes over the data:

1. It encodes the frame once from state 0, one symbol per clock, to find the
   zero-state end state S_N^[zs].
2. It derives S_0 from S_N^[zs] and encodes the frame a second time from S_0.

Both passes take N cycles, so encoding takes 2N cycles.

This RTL replaces the first pass with a parallel computation that reads the
frame memory W bits (W/2 two-bit symbols) per clock. For W = 16 the
zero-state phase takes about N/8 cycles, and a frame takes about 1.13·N
cycles instead of 2N. For W = 32 the figures are N/16 and 1.06·N.

## The idea: A^7 = I

The constituent code has three delay elements. Its state-space form over
GF(2) is

    S(n+1) = A S(n) + B u(n),       y(n) = C S(n) + D u(n)

        | 1 0 1 |       | 1 1 |       | 0 0 0 |       | 1 0 |
    A = | 1 0 0 |   B = | 0 1 |   C = | 0 0 0 |   D = | 0 1 |
        | 0 1 0 |       | 0 1 |       | 1 1 0 |       | 1 1 |

Here S = (s1, s2, s3) are the delay elements, counted from the input side, and
u = (u0, u1) is the bit couple of one symbol. The outputs are the two
systematic bits and one parity bit, p = s1 ^ s2 ^ u0 ^ u1.

The zero-state end state is

    S_N^[zs] = sum_{n=0}^{N-1} A^(N-1-n) B u_n .

The feedback polynomial is primitive, so A^7 = I and the power of A depends
only on n mod 7. The symbols can therefore first be XOR-summed into 7 classes,
one per residue n mod 7, with each class holding 2 bits (one for u0, one for
u1). After that, a single fixed combination of the seven constant matrices
B, AB, ..., A^6B gives the result. The summing is pure XOR and can take many
symbols per clock. The matrix step runs once per frame.

Tail biting then requires (A^N + I) S_0 = S_N^[zs]. This matrix depends only
on N mod 7 and is invertible unless 7 divides N. So S_0 comes from a 7 × 8
lookup table.

## Input accumulation and the rotation trick (hardest part)

Each clock brings one word with W/2 symbols. The bit planes are separated:
the u0 bits go to one `input_accumulator` and the u1 bits to another. Each
accumulator holds 7 bits, one per residue class.

- **Folding.** Within a word, positions j and j+7 belong to the same class.
  The word is therefore folded to 7 bits first. For W = 16, bit 7 is XORed
  onto bit 0.
- **Rotating.** W/2 is not a multiple of 7. So from one word to the next, the
  class arriving at a fixed bit position advances by SH = (W/2) mod 7. That is
  1 for W = 16 and 2 for W = 32. The fixed input positions are kept and the
  register is rotated by SH before each new word is XORed in:
  `acc'[p] = acc[(p+SH) mod 7] ^ fold[p]`.
- **Result.** After K words, `acc[p]` holds class ((K-1)·SH + p) mod 7.

`matrix_calc` undoes the rotation with one barrel rotator per plane, then
applies a fixed XOR network. In the network, position p is multiplied by
A^((7-p) mod 7) B. The rotation amount is

    rot = ( (N-1) - floor((N-1)/(W/2)) · ((W/2) mod 7) ) mod 7

The second term removes the per-word rotation. The (N-1) term maps class
n mod 7 onto the power (N-1-n) mod 7 of A that it needs. Including it keeps
the XOR network the same for every frame length. Without it, the network
would have to change with N mod 7.

If the last word is only partly filled, the symbols past N are forced to zero
before folding.

## Blocks

| module | role |
|---|---|
| `ctc_pkg` | Types, A/B matrix helpers, trellis step and parity, circulation-state solver (constant functions) |
| `rsc_encoder` | Constituent encoder: one symbol per clock, loadable start state, registered outputs |
| `input_accumulator` | One bit plane: folds W/2 bits to 7 and applies the rotate-and-XOR update |
| `barrel_rotator` | Rotation of an N-bit vector by a run-time amount (log stages, modulo N) |
| `matrix_calc` | Two barrel rotators plus the fixed XOR network for B … A^6B |
| `zero_state_solver` | Two accumulators, the matrix calculation, frame-length masking and control |
| `circulation_lut` | S_0 from (N mod 7, S_N^[zs]); table computed at elaboration time |
| `frame_buffer` | Frame memory, W-bit words, one synchronous read port |
| `tailbiting_encoder` | One constituent code end to end: buffer, zero-state pass, lookup, encoding pass |
| `ctc_encoder_top` | Turbo encoder: two `tailbiting_encoder`s (natural and interleaved order) in lock step |

The turbo interleaver is not included. The top takes the interleaved frame
through a second write port (`il_wr_*`), so any permutation can be applied
outside, including swapping u0 and u1 inside a symbol.

## Interfaces and timing

Word format in the frame memory: bit 2j is u0 and bit 2j+1 is u1 of symbol j.
Word k holds symbols k·W/2 through k·W/2 + W/2 − 1.

`ctc_encoder_top` / `tailbiting_encoder`:

1. Write the frame(s): `wr_en`, `wr_addr`, `wr_data`, and `il_*` for the
   interleaved copy.
2. Pulse `start` for one cycle with `frame_len` = N.
3. With K = ceil(N / (W/2)):
   - The encoders read K words, one per clock.
   - `done` of the zero-state solver comes K + 2 cycles after its first word.
   - The first encoded symbol appears K + 5 cycles after `start`.
   - Then one symbol per clock follows (`out_valid`, `sys_a`, `sys_b`,
     `par_1`, `par_2`).
   - `done` pulses K + N + 5 cycles after `start`.
4. `tb_ok` reports whether each constituent code really ended in its S_0. This
   is a built-in self-check.

`len_err` pulses, and nothing starts, if N = 0, N > NMAX or N mod 7 = 0. For
these lengths no circulation state exists.

Reset is asynchronous and active low (`rst_n`).

Parameters (top and `tailbiting_encoder`): `W` (16, or 32 for the wider
memory) and `NMAX` (2400 symbols). The derived `LW`, `DEPTH` = ceil(NMAX/(W/2))
and `AW` follow from these two. `W/2` must be a power of two.

## Measured latency

From `tb_table1_latency`, in clock cycles from `start`:

| N | W=16 zero-state phase | W=16 total | W=32 zero-state phase | W=32 total | serial two-pass |
|---|---|---|---|---|---|
| 240 | 35 | 275 (1.15 N) | 20 | 260 (1.08 N) | 480 |
| 960 | 125 | 1085 (1.13 N) | 65 | 1025 (1.07 N) | 1920 |
| 2399 | 305 | 2704 (1.13 N) | 155 | 2554 (1.06 N) | 4798 |

The ideal figures are 1 + 1/8 and 1 + 1/16 of N. The small extra comes from
five pipeline cycles: memory read, accumulator, result register, lookup/load
and output register.

## Where this design departs from, or adds to, the method

- **Rotation amount.** The method rotates the accumulators back by
  floor((N−1)/W') mod 7 before a "pre-defined" XOR. Taken alone, that still
  leaves the XOR dependent on N mod 7. Here the (N−1) mod 7 alignment is folded
  into the same rotation, so the XOR network is truly fixed. This is
  equivalent, not an approximation, and is verified against a serial encoder
  for every N from 1 to 64, for the largest lengths, and for random lengths.
- **Own choices.** These are not specified by the method:
  - word layout
  - partial-last-word masking
  - `len_err` handling
  - `tb_ok` end check
  - one-cycle memory read
  - frame-buffer depth and `NMAX`
- **Circulation-state table.** Only the idea of a lookup is given. The table
  contents are derived here from (A^N + I) S_0 = S_N^[zs].
- **Constituent code.** It has one parity output, the one defined by C and D.
  A second parity per constituent code, and puncturing, are not part of this
  RTL.
- **Encoding pass.** It reads the same frame memory one symbol per clock.
- **Not included.** The interleaver and the conventional serial first pass
  (the baseline) are not implemented.
- **Gate counts.** The original method reports gate counts of roughly 150–180
  gates for the accumulation and 190 for the matrix step. These have not been
  reproduced. Synthesis sizes depend on the target library.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from a reference model (`tb_ref_pkg`) written from the encoder's adder
structure rather than from the matrices:

- `tb_rsc_encoder`: per-symbol outputs and state, loads, idle cycles.
- `tb_input_accumulator`: class sums after every word, for W/2 = 8 and 16.
- `tb_matrix_calc`: every rotation, single-bit and random inputs.
- `tb_circulation_lut`: the tail-biting condition for every entry, and that
  each row is a permutation.
- `tb_frame_buffer`: read data and read timing.
- `tb_zero_state_solver`: against serial encoding from state 0, for W = 16
  and W = 32, lengths 1–64, 2395–2400 and random, with and without input
  gaps. The latency is checked.
- `tb_tailbiting_encoder`: full frames for W = 16 and 32. Checks the output
  stream, the circulation state found by brute force, `tb_ok`, refusal of
  N mod 7 = 0, and latency.
- `tb_ctc_encoder_top`: turbo encoder at default parameters, with a random
  interleaver, including one 2400-symbol frame. It counts that each mechanism
  occurred: partial word, non-zero rotation, refusal, every N mod 7 class,
  largest frame, end check.
- `tb_table1_latency`: the latency table above.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. To run one with
Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ctc_pkg.sv tb/tb_ref_pkg.sv tb/tb_ctc_encoder_top.sv \
        --top-module tb_ctc_encoder_top
    ./obj_dir/Vtb_ctc_encoder_top

All testbenches finish in seconds.
