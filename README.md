# Booth/Barrett modular multiplier

This design computes `X * Y mod M` for 1024-bit operands, the core operation of RSA
encryption and decryption (`C = T^E mod M` is a chain of such products). It avoids a
divider. It uses one large combinational radix-4 Booth multiplier three times in a row,
and replaces the division by `M` with Barrett's quotient estimate:

```
mu = floor(2^(2N) / M)                      pre-computed once per modulus
step 1   P = X * Y
step 2   Q = floor( floor(P / 2^(N-1)) * mu / 2^(N+1) )
step 3   R = P - Q * M,  then R -= M at most twice, until R < M
```

Divisions by powers of two are only wiring, so every step is one pass through the same
multiplier. A reducer with carry look-ahead adders finishes the job.

## Datapath

```
            x ──┐ 00                           y ──┐ 00
 P/2^(N-1) ──┤ 01  MUX 1 ─► register1        mu ──┤ 01  MUX 2 ─► register2
         Q ──┘ 10                     │        M ──┘ 10               │
                                      ▼                               ▼
                              ┌──────────── booth_multiplier ────────────┐
                              │  ppg (Booth rows)  ─►  pp_adder (tree)   │──► product (2N+4 bits)
                              └──────────────────────────────────────────┘        │
                                         register3 ◄── product (step 2)           │
                                             │                                    ▼
                                             └──────────► reducer ◄──── product (step 3)
                                                             │
                                                             ▼
                                                            acc ──► result
```

* **MUX 1 / MUX 2** share the select code `{Mux_H, Mux_L}`. Code 00 picks X and Y,
  01 picks `P >> (N-1)` and `mu`, and 10 picks `Q = product >> (N+1)` and `M`.
* **register1 / register2** (`Load_Reg`) hold the multiplier operands. They are N+2 bits
  wide, because `P >> (N-1)` needs N+1 bits and `mu` needs up to N+2 bits (when
  `M = 2^(N-1)`). The product is therefore 2N+4 bits.
* **register3** (`Load_Reg_4`) takes P at the end of step 1 and holds it for the reducer.
  It keeps only the low N+2 bits. Barrett's bound says `P - Q*M < 3M < 2^(N+2)`, so the
  higher bits cancel and are never needed.
* **M and mu** are captured in holding registers when an operation starts.
* **acc** (`Load_Acc`) receives the reducer's output at the end of step 3.

The multiplier has no registers inside. The sequencer (`modmul_ctrl`) loads the operand
registers and then waits for the combinational path to settle: `SETTLE_CYCLES` clock
cycles for the partial product generator and adder, plus `REDUCE_CYCLES` more in step 3 for
the reducer. Pick the clock period and the two counts together so that the path fits.

## Radix-4 Booth partial products (`booth_recoder`, `pp_generator`, `ppg`)

This part is the subtlest. Write the W-bit unsigned multiplier x (W = N+2, even) in radix-4
digits, taking bit triples that overlap by one bit:

```
d_i = x(2i-1) + x(2i) - 2*x(2i+1),   i = 0 .. W/2,   x(-1) = x(W) = x(W+1) = 0
```

Each digit is in {-2, -1, 0, 1, 2}, and `x*y = sum d_i * y * 4^i`. That gives
`K = W/2 + 1` rows (514 for N = 1024), about half as many as plain shift-and-add.

| triple (msb..lsb) | digit | sy | s2y | s |
|---|---|---|---|---|
| 000 | 0  | 0 | 0 | 0 |
| 001, 010 | +1 | 1 | 0 | 0 |
| 011 | +2 | 0 | 1 | 0 |
| 100 | -2 | 0 | 1 | 1 |
| 101, 110 | -1 | 1 | 0 | 1 |
| 111 | 0 (as -0) | 0 | 0 | 1 |

`booth_recoder` produces `sy`, `s2y` and `s` (the top bit of the triple).
`pp_generator` builds each bit of the row with one and-or-xor cell,
`((sy & y[j]) | (s2y & y[j-1])) ^ s`. This gives `|d|*y` in W+1 bits, complemented when
the digit is negative. On top of that sits `~s`.

A negative row must become a two's-complement number, and every row must be sign-extended
up to 2W bits. Neither is done with real logic:

* **Sign extension by constants.** The negative weights of all the sign bits add up to one
  constant. Folded into the rows, that constant turns into fixed prefix bits:
  * row 0 gets `~s0 s0 s0` above its W+1 data bits;
  * rows 1 .. K-2 get `1 ~s_i`;
  * the last row gets none. Its digit is never negative, because x is unsigned.

  Modulo 2^(2W), the constant and the sign-bit weights cancel exactly.
* **The "+1" of the two's complement.** Row i is shifted left by 2i, so row i+1 has two
  zero bits at positions 2i and 2i+1. The correction bit `s_i` is placed at position 2i
  of row i+1. This way the two's complement needs no incrementer in any row.

`ppg` delivers all K rows already aligned in 2W-bit words. Their plain sum modulo
2^(2W) is `x*y`.

## Summing the rows (`csa`, `dca`, `adder_cell`, `pp_adder`)

* `csa`: W full adders with no carry chain. It turns three words into a delayed-carry
  pair (sum, carry), with the carry word already shifted one place.
* `dca`, the delayed carry adder, adds two delayed-carry pairs and one plain word into
  a single word. It runs three carry-save rows and then one carry-propagate row.
* `adder_cell` adds seven rows. CSA_1 takes rows 0-2, CSA_2 takes rows 4-6, and the
  DCA adds both pairs and row 3.
* `pp_adder` arranges cells in a tree. Each level groups its inputs by seven and pads
  the last group with zeros. For 514 rows that is 74 + 11 + 2 + 1 cells in four levels.

All words are 2W bits wide. Carries out of the top are dropped, since the arithmetic is
modulo 2^(2W).

## The reducer (`reducer`, `cla`)

Barrett's estimate Q is never too large and at most 2 too small. That holds when
`2^(N-1) <= M < 2^N` and `X, Y < M`. So `P - Q*M` lies in `[0, 3M)`.

The reducer works on N+2 bits. It computes `P + ~(Q*M) + 1`, then applies two
compare-and-subtract stages. Each stage forms `d - M` and keeps it when the adder's carry
out shows there was no borrow.

All three additions use `cla`, a carry look-ahead adder. It works from the per-bit
generate `G = a & b` and propagate `P = a | b`. Every carry
`C(i+1) = G(i) + P(i)G(i-1) + ... + P(i)..P(0)C(0)` is formed in a Kogge-Stone
parallel-prefix network of `ceil(log2(WIDTH+1))` levels. Only then is the sum
`a ^ b ^ C` taken.

The reducer also reports which corrections it used (`corr`).

## Interface and timing (`modmul`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin an operation; taken only when idle |
| `x`, `y` | in | N | operands, each `< m` |
| `m` | in | N | modulus, top bit set |
| `mu` | in | N+2 | `floor(2^(2N) / m)` |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; `result` valid from this cycle on |
| `result` | out | N | `x*y mod m` (the accumulator) |

Inputs are sampled in the cycle in which `start` is taken; call that cycle 0. Steps 2
and 3 load their operands at the end of cycles `S` and `2S`, where `S = SETTLE_CYCLES`.
`acc` loads at the end of cycle `3S + R`, where `R = REDUCE_CYCLES`. `done` is high in
cycle `3S + R + 1`, which is cycle 5 at the defaults. A `start` seen while busy is
ignored. `result` holds its value until the next operation ends.

Parameters of `modmul`: `N = 1024`, `SETTLE_CYCLES = 1` and `REDUCE_CYCLES = 1`.
`mu` must be computed outside the design, once per modulus.

## Where this design departs from, or adds to, the original architecture

* **Delayed carry adder.** The original cell has five rows of half adders and one row
  of full adders, with carries from each row merged into the next. Its correctness rests
  on a property of delayed-carry numbers that is not reproduced here. This design builds the same function, the sum of
  five words, from three carry-save rows and a carry-propagate row. The function is the
  same, but the cell count differs.
* **Sign-extension prefix.** The prefix of the middle rows is `1 ~s`, and the
  two's-complement `+s` goes into the gap below the next row, not into the row itself.
* **Final corrections.** The original notes that one or two subtractions of M may be
  needed, without saying where they happen. Here they are part of the reducer.
* **Other choices made here.** The wait counts, the handshake, the reset and the
  internal widths (N+2-bit operand registers, N+2-bit register3) are choices of this
  design. So is the MUX 1 code for each input, which follows the code order of MUX 2.
* **Carry look-ahead organisation.** The original writes the flat look-ahead formula.
  It does not say how the formula is grouped for 1026-bit words; this design uses a
  parallel-prefix network.
* **Timing.** The original reports 3570 ns for a 1024-bit operation in a 0.6 µm standard
  cell library. This RTL is cycle-level and makes no claim about delays. At the default
  wait counts, one operation is 5 cycles after the start cycle.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_booth_recoder`: all 8 codes against the digit table.
* `tb_pp_generator`: every digit with random multiplicands, read back as two's
  complement.
* `tb_ppg`: W = 8 exhaustively (65,536 pairs), and W = 66 on random and corner operands.
  The row sum must equal x*y.
* `tb_booth_multiplier`: W = 8 exhaustively, plus W = 130 and W = 258 on random operands.
* `tb_csa`, `tb_dca`, `tb_adder_cell`, `tb_pp_adder`: modular sums, including
  all-ones overflow and trees of 1, 3 and 50 operands.
* `tb_cla`: 6 bits exhaustively with both carry-ins, and 1026 bits with full-length
  carry chains.
* `tb_reducer`: 3000 cases with quotient estimates short by 0, 1 and 2. Checks the result
  and the correction flags.
* `tb_modmul_ctrl`: the strobe order, select codes and cycle offsets at `S = 2`, `R = 3`,
  plus a start held high while busy.
* `tb_modmul`: end to end at N = 16 (over 4,000 random operations) and at N = 256
  (300), with corners (0, 1, M-1, the smallest and largest moduli). It checks the result and the latency of
  each one. It counts the reducer finishing with 0, 1 and 2 corrections, starts ignored
  while busy, and modulus changes. It fails if any of these never happened.
* `tb_modmul_full`: the top at its default size, N = 1024. It runs five modular
  multiplications with random 1024-bit moduli and checks results and latency.

The 1024-bit design is large for a cycle simulator. Verilator turns the 514 rows of
2052 bits into roughly 190 MB of C++. Building `tb_modmul_full` takes about nine minutes
on one core, and up to 8 GB of compiler memory per generated file. With two parallel
make jobs (`-j 2`), plan for 16 GB or more. Once built, it runs in
milliseconds. The other testbenches build in well under a minute.

### Running with Verilator

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/modmul_pkg.sv tb/tb_modmul.sv \
          --top-module tb_modmul -o sim
./obj_dir/sim
```

Use the same command with any other `tb/tb_*.sv`. The package `rtl/modmul_pkg.sv` must
come first; the other modules are found through `-Irtl -Itb`. To try another operand size,
change the `N` parameter of a `modmul_runner` instance in `tb_modmul`. `tb/modmul_runner.sv` drives one `modmul` and keeps the counts. N must be even, because W = N+2 must be even.
`mu = floor(2^(2N)/M)` is computed by the testbench.

## Files

| file | contents |
|---|---|
| `rtl/modmul_pkg.sv` | Booth select struct, MUX select codes |
| `rtl/modmul.sv` | top: muxes, registers, acc, multiplier, reducer, sequencer |
| `rtl/modmul_ctrl.sv` | three-step sequencer with wait states |
| `rtl/booth_multiplier.sv` | combinational W x W multiplier (ppg + pp_adder) |
| `rtl/ppg.sv` | Booth rows, aligned, with sign-extension prefixes |
| `rtl/booth_recoder.sv`, `rtl/pp_generator.sv` | one recoder, one row |
| `rtl/pp_adder.sv`, `rtl/adder_cell.sv`, `rtl/csa.sv`, `rtl/dca.sv` | row adder tree |
| `rtl/reducer.sv`, `rtl/cla.sv` | subtraction, corrections, look-ahead adder |
