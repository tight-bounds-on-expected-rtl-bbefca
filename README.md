# Fast Adder: exact addition with short expected delay

A worst-case adder needs about log2(n) gate levels, because one output bit can
depend on every input bit below it. For random operands that almost never
happens: carries usually die out within a few positions. This design uses that
fact. It adds in about half the gate depth of a worst-case adder for typical
inputs, and every result is still exact.

It combines three combinational parts that all see the same operands:

* **Near Adder.** A fast adder that is occasionally wrong. It adds short,
  overlapping windows of the operands independently.
* **Checker.** A quick test that says whether the Near Adder's result can be
  trusted. It may raise false alarms, but it never passes a wrong result.
* **Fallback adder.** A conventional full-width adder of logarithmic depth.
  Its result is used only when the Checker raises an alarm.

The output `slow` tells which path produced the result. In a clocked system the
fast result can be taken at once, and the fallback can be given a longer,
multicycle path. This RTL does not include such a controller.

## Sizes

The design has three parameters:

| name | meaning | default | rule |
|------|---------|---------|------|
| `N`  | operand width | 64 | this design's choice |
| `D`  | block size; the Near Adder's windows are `2*D` bits | 8 | `D = sqrt(N)` |
| `C`  | bit pairs the Checker samples per block | 6 | `C = log2(N)` |

`fast_adder_pkg` computes the rules with `isqrt` and `clog2`. `N` must be a
multiple of `D`, with `N/D >= 2` and `1 <= C <= D`; other sizes stop
elaboration with an error. With the default rule this means that `N` must be a
perfect square. For any other `N`, set `D` by hand: for example `N=32`, `D=4`.

## The Near Adder (`near_adder`)

The operands are cut into `NB = N/D` blocks of `D` bits, numbered from bit 0
upwards. Window `w` covers blocks `w` and `w+1`. Each of the `NB-1` windows has
its own `2D`-bit adder with a carry-in of 0:

```
 block:     NB-1 ... 3   2   1   0
 window 0:                 [ 1 | 0 ]   keep both halves (exact)
 window 1:             [ 2 | 1 ]       keep block 2
 window 2:         [ 3 | 2 ]           keep block 3
 ...
```

Window 0 really does have a carry-in of 0, so all `2D` of its bits are kept.
Every higher window keeps only its upper block. Its lower block only lets a
carry generated inside that block reach the upper half.

The kept half is wrong only if a carry should have entered the window *and*
all `D` bit pairs of the discarded block propagate it (`a[i] ^ b[i]` = 1).
For uniform random operands that probability is at most
`(NB-2) * 1/2 * 2^-D`. At the defaults this is 6/512 ≈ 1.2 %; random
simulation measures about 1.1 %. The depth is that of one `2D`-bit adder,
not an `N`-bit one.

`cout` is the top window's carry out. It is exactly as reliable as the top
sum bits.

Used on its own, the Near Adder trades block size for error rate: with
`D = log2(n/ε)` it is wrong on at most a fraction ε of inputs. `N=64`, `D=8`
corresponds to ε = 1/4.

## The Checker (`near_checker`)

A Near Adder error needs a fully propagating discarded block. Testing all `D`
pairs of a block would take as long as adding, so the Checker tests only `C` of
them. For each of the `NB-2` discarded blocks (blocks 1 to `NB-2`) it computes:

* an XOR for each sampled pair, which gives the pair's propagate signal;
* an AND over the block's `C` propagates (`blk_prop[k-1]`);
* a NOR over all blocks, which gives `ok`. `fail` is its complement.

The lowest block and the top block are never discarded, so they are not
checked. The sampled pairs are the `C` least significant bits of each block.

The Checker does not test whether a carry actually reaches a block. It
assumes that one does. This makes it safe: a real error always means that
all `D` pairs of some block propagate, so the `C` sampled pairs propagate too.
The price is false alarms, with probability at most `(NB-2) * 2^-C`. At the
defaults that is 6/64 ≈ 9.4 %; random simulation measures about 9.1 %. Most
alarms are false: only about one in eight marks a real error.

The Checker's depth is 1 (XOR) + log2(C) (AND) + log2(NB-2) (NOR) levels.

## The fallback adder (`conv_adder`)

This is a Kogge-Stone parallel-prefix adder with a carry-in of 0. It has one
generate/propagate level, `ceil(log2 W)` prefix levels and one sum XOR level.
The same module is used for the Near Adder's `2D`-bit windows and for the
`N`-bit fallback. The method only needs *some* worst-case adder of
logarithmic depth. The asymptotically fastest known construction, with depth
`log n + O(sqrt(log n))`, is more involved and is not built here. Any adder
with the same ports can be substituted.

## Timing and what the depth buys

All blocks are purely combinational, with no clock and no reset. In unit gate
delays, the expected delay is

    max(T_near, T_check) + T_fallback * Pr[fail]

With `D = sqrt(N)` and `C = log2(N)`, both terms of the max grow as about
(1/2)·log2 N, and `Pr[fail]` falls as `sqrt(N)/N`. The expected delay is
therefore about half that of a worst-case adder. The gain is asymptotic. At
N = 64 the depths of this implementation are 6 levels (Near Adder), 7 levels
(Checker) and 8 levels (fallback). The expected delay is about 7.7 levels
against 8, so the benefit only becomes large for much wider operands.

The RTL computes the fallback in parallel with the other two parts. A static
timing analysis therefore sees the full-width adder on the `sum` path. To get
the expected-time benefit, constrain the fallback as a multicycle path and use
`slow` to wait for it. The `slow` output and this usage are this design's
additions.

## Files

| file | contents |
|------|----------|
| `rtl/fast_adder_pkg.sv` | default sizes and the `isqrt` / `clog2` sizing functions |
| `rtl/conv_adder.sv` | Kogge-Stone adder, `W` bits |
| `rtl/near_adder.sv` | Near Adder |
| `rtl/near_checker.sv` | Checker |
| `rtl/fast_adder.sv` | top: Near Adder + Checker + fallback + result select |
| `tb/tb_conv_adder.sv` | adder at 16 and 64 bits against integer addition |
| `tb/tb_near_adder.sv` | window-by-window model, error property, error rate against the bound |
| `tb/tb_near_checker.sv` | per-block flags, safety (no wrong sum passes), false-alarm rate |
| `tb/tb_fast_adder.sv` | top at default size: exactness, `slow` flag, counts of fast / slow / caught error / false alarm, expected-depth estimate |
| `tb/tb_fast_adder_exhaustive.sv` | all operand pairs for `N=8,D=2,C=2` and `N=9,D=3,C=2`, with the exact slow-path counts |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each run takes well under a second. For
example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fast_adder_pkg.sv tb/tb_fast_adder.sv --top-module tb_fast_adder
./obj_dir/Vtb_fast_adder
```

Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/fast_adder_pkg.sv rtl/fast_adder.sv`.
The remaining lint warnings are benign. Some package constants are unused in
a given module. The Checker leaves the operand bits it does not sample unused,
by design. The per-block Checker output is left unconnected at the top.

## Departures and choices

* Operand width 64 is a chosen default. The method gives only the rules for
  `D` and `C`.
* The lowest window keeps all `2D` bits. Every other window keeps its upper `D`
  bits.
* Only the `NB-2` discarded blocks are checked. The lowest and the top block
  are not.
* The Checker samples the low `C` bits of each block. The method leaves the
  choice open, and any choice is equally safe.
* A Kogge-Stone adder stands in for the worst-case adder.
* The outputs `cout` and `slow`, and the parallel evaluation of the fallback
  selected by a mux, are this design's additions.
