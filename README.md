# Parallel circular-scan test architecture

Scan test spends most of its time and tester memory shifting test vectors
into the scan chains. Circular scan reduces that cost. Each scan chain's
output is fed back to its own input. The response that a vector leaves in the
flip-flops then becomes the starting point for the next vector. A typical ATPG
vector specifies only a few percent of its bits, and about half of those
already agree with the response. So only the few specified bits that disagree,
the **conflict bits**, need to change.

This RTL implements the parallel form of circular scan. It has two features:

* **Conflicts are fixed inside the chip.** Each chain's feedback path can
  invert the bit that passes through it. The tester does not send the new bit
  value. It only says which chains should invert.
* **Many chains can be fixed in one clock.** A plain binary decoder selects one
  chain per clock. Here a *multiple-hot decoder* is used instead. Its address
  may contain don't-care positions, so one address can select 2, 4, 8 … chains
  at once. A slice with several conflicts can often be repaired in a single
  pass rather than one pass per conflict.

The default size is 256 chains of 7 cells: 1792 scan cells, enough for each of
the five largest ISCAS'89 circuits.

## The test matrix and one rotation

The scan cells form a matrix with `CHAIN_LEN` rows and `NUM_CHAINS` columns:

* column `c` is chain `c`;
* row `r` is **slice** `r+1`, which is cell `r` of every chain;
* cell 0 is at the scan-input end of a chain, and cell `CHAIN_LEN-1` drives
  `scan_out`.

The top-level ports `state_q` and `resp_d` use the same layout,
`[CHAIN_LEN-1:0][NUM_CHAINS-1:0]`, so `state_q[r]` is slice `r+1`.

Shifting with the feedback closed moves every chain one place. After
`CHAIN_LEN` shifts, one **full rotation**, the matrix is back where it started.
During the rotation every slice has passed the chain outputs exactly once. In
the `c`-th cycle of a rotation (counting from 0), row `CHAIN_LEN-1-c` is at the
outputs.

In that cycle the tester drives the decoder address for that slice. Every
selected chain writes its output bit back inverted, and every other chain
writes it back unchanged. A rotation is therefore one chance to apply one
address to each slice:

```
cycle      0          1          ...   CHAIN_LEN-1
at output  row n-1    row n-2    ...   row 0          (n = CHAIN_LEN)
scan_sel   addr(n-1)  addr(n-2)  ...   addr(0)        one address per slice
```

Some slices need more than one address. This happens when no single address
covers exactly the chains that must flip. Such a slice gets its second address
in the second rotation, and so on. In a given rotation, slices that have
nothing left to fix get the **empty address**, which selects no chain. A
vector costs `R × CHAIN_LEN` shift cycles, where `R` is the most addresses any
of its slices needs. A one-hot decoder would need `R` equal to the most
conflicts in any slice.

The chains have no reset, like the functional flip-flops they are built from.
The first vector is loaded in **broadcast** mode. The single `data_in` pin
feeds every chain, so the whole matrix is loaded with `CHAIN_LEN` bits, one
per slice. Every later vector is built from the captured response of the
previous one.

## Multiple-hot decoder addresses (`mhd`)

An address has `log2(NUM_CHAINS)` symbols, each taken from `{0, 1, d, ∅}`.
Each symbol uses two pins in positional-cube code, so the decoder uses
`2·log2(NUM_CHAINS)` tester pins: 16 for 256 chains. A plain binary decoder
would use 8.

| symbol | code `[1:0]` | bit `[1]`: accepts 0 | bit `[0]`: accepts 1 |
|--------|-------------|----------------------|----------------------|
| ∅      | `00`        | no                   | no                   |
| 1      | `01`        | no                   | yes                  |
| 0      | `10`        | yes                  | no                   |
| d      | `11`        | yes                  | yes                  |

Chain `i` is selected when every symbol `k` accepts bit `k` of `i`. `scan_sel[k]`
is the symbol for address bit `k`. The examples below are for 8 chains, with
the address written MSB first and the selects written chain 7 first:

```
11d -> 11000000   chains 6, 7
dd0 -> 01010101   chains 0, 2, 4, 6
101 -> 00100000   chain 5
ddd -> 11111111   all chains
0d1 -> 00001010   chains 1, 3
```

The decoder is combinational, and each output is an AND of `log2(S)` symbol
matches.

Selecting a chain whose bit is don't-care in the next vector costs nothing.
Selecting a chain whose bit is specified and already correct spoils that bit.
It becomes a conflict that a later rotation must fix again. Choosing addresses
is therefore a covering problem, solved offline (see *Choosing addresses*).

## Selection unit (`scan_sel_unit`)

There is one selection unit per chain, between `scan_out` and the first cell:

```
                 +-- buffer ---+
scan_out --------+             MUX2 --+
                 +-- inverter -+      |
                    dec_sel ---^      MUX1 ----> scan_in (cell 0)
                         data_in -----+
                                broadcast ^
```

MUX2 picks the inverted copy when the decoder selects this chain. MUX1 picks
the shared `data_in` pin in broadcast mode. Because the new bit value never
comes from the tester, a single address can fix conflicts in both directions
(0→1 and 1→0) at once. If the fix came from the data pin, one address could
only write one value.

## Signature register (`misr`)

Every chain output also feeds one bit of a `NUM_CHAINS`-bit multiple-input
signature register. The response that rotates out is compacted there, and the
tester reads only the final signature. The register is in Galois form:

```
sig' = (sig << 1) ^ (sig[W-1] ? POLY : 0) ^ d
```

The default polynomial for 256 bits is `x^256 + x^254 + x^251 + x^246 + 1`.
The package `pcsa_pkg` holds primitive polynomials for the power-of-two widths
from 4 to 256. Other widths fall back to `x^W + x^(W-1) + 1`. The register
compacts only in cycles where `misr_en` is high. The intended use is the first
rotation after each capture, when every response bit passes the outputs once.

## Driving the top level (`pcsa_top`)

| port         | dir | width                       | use |
|--------------|-----|-----------------------------|-----|
| `clk`        | in  | 1                           | test clock |
| `rst_n`      | in  | 1                           | active-low synchronous reset, signature only |
| `shift_en`   | in  | 1                           | shift/rotate one place |
| `capture_en` | in  | 1                           | load `resp_d` into every cell |
| `broadcast`  | in  | 1                           | feed `data_in` into every chain |
| `data_in`    | in  | 1                           | data input pin |
| `scan_sel`   | in  | `log2(S)` × 2               | decoder address, symbol `k` at `[k]` |
| `misr_clear` | in  | 1                           | zero the signature |
| `misr_en`    | in  | 1                           | compact `scan_out` this cycle |
| `resp_d`     | in  | `CHAIN_LEN` × `NUM_CHAINS`  | response from the circuit under test |
| `state_q`    | out | `CHAIN_LEN` × `NUM_CHAINS`  | cell contents, drives the circuit under test |
| `scan_out`   | out | `NUM_CHAINS`                | chain outputs |
| `signature`  | out | `NUM_CHAINS`                | signature |

Everything is registered on the rising edge. The operations for one vector
are:

1. Run `R` rotations of `CHAIN_LEN` cycles each with `shift_en=1` and the
   planned address for the outgoing slice on `scan_sel`. Keep `misr_en=1` for
   the first rotation after a capture.
2. Hold one cycle with `capture_en=1`.

For the first vector, shift `CHAIN_LEN` cycles with `broadcast=1`. Put the
bit for the slice that must end up in row `CHAIN_LEN-1` on `data_in` first.

Capture takes priority over shift inside a chain. Two assertions in `pcsa_top`
enforce the intended protocol:

* `capture_en` and `shift_en` are never high together;
* `misr_en` is high only while shifting.

The circuit under test itself is not part of this RTL. Connect its
combinational logic between `state_q` and `resp_d`.

## Choosing addresses

The address sequence is computed offline from the test set. It is not
hardware. `tb/pcsa_ate_model.sv` contains a greedy version. For each slice:

* **conflict bits**: specified bits that differ from the response;
* **agreeing bits**: specified bits that already match.

The search then repeats three steps until the slice has no conflict bits left:

1. Score each of the `3^log2(S)` addresses over `{0,1,d}` as the conflicts it
   flips minus the agreeing bits it spoils. There are 6561 addresses for 256
   chains.
2. Take the best address.
3. Update the slice as the hardware would.

An address that spoils a bit is allowed. The spoiled bit becomes a conflict
and a later address repairs it. Subtracting spoiled bits from the score
guarantees progress, because any single conflict can always be flipped alone
by a fully specified address.

This heuristic is simple and not optimal. The hardware accepts any address
sequence.

**Worked example (8 chains × 5 slices).** The slices, written chain 7 first,
are:

```
captured response        next vector              conflicts      address
1 0 1 1 1 0 0 0          0 1 x x 1 x x x          1 1 x x 0 x x x   11d
1 0 0 0 1 1 1 0          x 1 x x x x x 1          x 1 x x x x x 1   dd0
0 1 0 0 1 1 0 0          x x 1 x x x 0 x          x x 1 x x x 0 x   101
0 1 1 1 1 0 1 0          x x 0 x x 1 0 x          x x 1 x x 1 1 x   ddd
0 1 1 1 0 0 1 1          0 x x x 1 x 0 1          0 x x x 1 x 1 0   0d1
```

Each slice needs one address, so the whole vector is ready after one rotation
(5 cycles). Slice 4 has three conflicts, so a one-hot decoder would need three
rotations. `tb_pcsa_top` replays this example.

**Worked example (256 chains, one slice).** This slice holds 17 specified bits:

* 9 conflict bits, in chains 62, 63, 67, 69, 71, 86, 128, 129, 130;
* 8 agreeing bits, in chains 72, 74, 75, 77, 78, 125, 127, 135.

The address `dddd0ddd` selects the 128 chains whose bit 3 is 0. It fixes 7
conflicts but also spoils the agreeing bit of chain 135. After the first
rotation, chains 62, 63 and 135 are left in conflict. The address `d0ddd11d`
selects 32 chains, including exactly those three, and the slice is correct
after the second rotation.

A one-hot decoder needs nine rotations here. Counting address bits, that is
8 × 9 = 72, against 16 × 2 = 32 for the multiple-hot decoder. The greedy
search also finds a two-address plan for this slice. `tb_pcsa_full` replays
the example on the default 256 × 7 build and checks the slice after each
rotation.

## Sizes and cost

* **Parameters.** `NUM_CHAINS` defaults to 256 and `CHAIN_LEN` to 7. The
  decoder width follows as `log2(NUM_CHAINS)`. `NUM_CHAINS` should be a power
  of two. With other values the decoder has unused addresses.
* **Tester pins.** `2·log2(S)` address pins, 1 data pin, and the controls.
* **Control data.** `2·log2(S)` bits per slice per rotation, so
  `R × CHAIN_LEN × 2·log2(S)` bits per vector.
* **Logic.** The default build synthesises to 1792 chain flip-flops, a
  256-bit signature register, 256 × (2 muxes + inverter) in the feedback
  paths, and a 256-output decoder of about 500 two-input ANDs.

Only the number of chains and cells limits which test sets fit. The test
vectors stream from the tester and are not stored on chip.

| circuit | flip-flops | vectors | specified bits | cells used at 256 × 7 |
|---------|-----------:|--------:|---------------:|----------------------:|
| s13207  | 700        | 291     | 5.1 %          | 700 of 1792 |
| s15850  | 611        | 190     | 10.8 %         | 611 of 1792 |
| s35932  | 1763       | 39      | 10.4 %         | 1763 of 1792 |
| s38417  | 1664       | 294     | 13.7 %         | 1664 of 1792 |
| s38584  | 1464       | 267     | 8.3 %          | 1464 of 1792 |

At 64 or 128 chains the same circuits need `CHAIN_LEN = ceil(flip-flops / S)`,
which means chains of 11 to 28 cells at 64 chains.

## Files

| file | contents |
|------|----------|
| `rtl/pcsa_pkg.sv` | positional-cube symbol type, MISR polynomials |
| `rtl/mhd.sv` | multiple-hot decoder |
| `rtl/scan_sel_unit.sv` | per-chain feedback/broadcast selection |
| `rtl/scan_chain.sv` | one chain of scan cells with capture |
| `rtl/misr.sv` | signature register |
| `rtl/pcsa_top.sv` | the architecture |
| `tb/tb_mhd.sv`, `tb/tb_scan_sel_unit.sv`, `tb/tb_scan_chain.sv`, `tb/tb_misr.sv` | unit testbenches |
| `tb/pcsa_ate_model.sv` | tester model: address search, sequencing, random responses, reference signature, checks |
| `tb/tb_pcsa_top.sv` | end to end at 8×5 (worked example plus random vectors) and 16×6 (dense vectors) |
| `tb/tb_pcsa_full.sv` | default 256×7 build: five test sets shaped like the benchmark circuits, and the 256-chain worked example |
| `tb/tb_pcsa_nsc.sv` | the same five test sets at 64 and 128 chains |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
The package must be compiled first:

```
RTL="rtl/pcsa_pkg.sv rtl/mhd.sv rtl/scan_sel_unit.sv rtl/scan_chain.sv rtl/misr.sv rtl/pcsa_top.sv"
verilator --binary --timing --assert $RTL tb/pcsa_ate_model.sv tb/tb_pcsa_top.sv --top-module tb_pcsa_top
./obj_dir/Vtb_pcsa_top
```

Substitute `tb_pcsa_full`, `tb_pcsa_nsc` or a unit testbench as needed. The
unit testbenches need only the package and their own module. For lint, run
`verilator --lint-only -Wall $RTL --top-module pcsa_top`.

## Verification

* **Unit testbenches.** The decoder is checked exhaustively at 8 outputs and
  against a symbol-by-symbol reference at 256. The selection unit is checked
  over all 16 input combinations. The chain runs against a queue model. The
  signature register runs against a GF(2) polynomial model at widths 256 and
  8.
* **End-to-end testbenches.** After every vector's rotations they check every
  specified bit of every slice. They also check:
  * that the number of shift cycles is `R × CHAIN_LEN`;
  * broadcast loads and captures;
  * the final signature.

  They count each mechanism and fail if one never occurs: broadcast load,
  capture, multi-chain update, empty address, multi-rotation vector, repair of
  a spoiled bit, and signature compaction.
* **Fault tests.** Every module has a deliberately broken copy that its
  testbench catches.

With random test sets of the benchmark sizes and densities, the default
256-chain build needs roughly 37–43 % of the rotations a one-hot decoder would.
In one run the s38417-shaped set needed 2501 rotations against 6710. Counting
tester bits spent on repairs, 16 address bits per shift cycle here against 8
address bits plus a data bit per shift cycle for a one-hot decoder, the saving
is roughly 24–34 %: 280,112 bits against 422,730 for the same set. The
testbenches print these figures per instance. They also check that no vector
ever needs more rotations than the one-hot case.

## How far this follows the original architecture

These parts follow the architecture as published:

* the organisation into parallel circular chains;
* the multiple-hot decoder, its positional-cube symbols and its pin count;
* the per-chain buffer/inverter feedback selected by the decoder, with a
  broadcast data input;
* the signature register on the chain outputs;
* the default size;
* the two worked examples (8×5, and one 256-chain slice).

These parts are choices made for this implementation:

* the control signals (`shift_en`, `capture_en`, `misr_en`, `misr_clear`,
  `rst_n`), their polarities and their priority;
* the cell order within a chain, with slice 1 at the scan-input end;
* the one-address-per-slice-per-rotation schedule with the empty address for
  idle slices;
* everything inside the signature register: its form, polynomial, width and
  controls. The architecture only places one there;
* the scoring rule of the address search;
* placing the 256-chain example slice in slice 1 (any slice would do).

Not included:

* **The circuit under test.** Its netlist is not part of this design.
* **The one-hot baselines.** The earlier form of circular scan uses a one-hot
  decoder, and its selection unit loads each new bit from the data pin. It
  serves only as the point of comparison, so it is not built. The testbenches
  count its rotations and bits analytically.
* **Real benchmark vectors.** The testbenches use random vectors and random
  responses with the published densities of specified bits. Their rotation
  counts show the trend but do not reproduce published reductions in data
  volume or test time.
