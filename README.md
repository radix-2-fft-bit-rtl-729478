# Parallel bit-reversal circuit for continuous-flow P-parallel FFTs

A parallel pipelined FFT (MDC or MDF) with P paths emits its N outputs in
bit-reversed order, P samples per clock. In cycle `t` path `p` carries
`X(BR(P*t + p))`, where `BR` reverses the m = log2 N bits of the index. Most
receivers (a frequency-domain equaliser, for example) need them back in natural
order, again P per clock and without gaps between symbols. This circuit
reorders such a stream. Output cycle `r` carries `X(P*r) ... X(P*r + P - 1)`,
in that order on paths `0 ... P-1`.

The design has three features:

* **Single-port memory only.** The memory is 2·P banks, each a one-port RAM of
  N/(2P) words.
* **N words in total.** A symbol-level ping-pong buffer needs 2N. Here the two
  memory groups swap roles every few cycles, not every symbol. Each location
  freed by a read is refilled by the next symbol a few cycles later.
* **Run-time FFT length.** The same hardware handles every power-of-two length
  from 2·P² up to the built maximum. At the defaults that is 128 to 32768
  points, 8 paths and 32-bit samples.

```
 in_data_i[P] ──► CMT_WR ──►┬─► group A: bank 0 .. P-1 (single port, N/2P words) ─┐
 (bit-reversed)   (rotate)  │                                                     ├─► group mux ──► CMT_RD ──► out_data_o[P]
                            └─► group B: bank 0 .. P-1 (single port, N/2P words) ─┘   (rd sel)      (rotate)   (natural order)
                                  ▲ addresses, write/read enables, patterns
                              controller (two cycle counters + two address generators)
```

## Why the paths have to be rotated

Split the index k of a sample into a time part and a path part. The P samples
needed in one natural-order output cycle, `X(Pr) .. X(Pr+P-1)`, differ only in
their low q = log2 P bits. After bit reversal those bits become the high bits,
so all P samples reach the circuit on the **same path**, in P different
cycles. If path i always wrote into bank i, all P samples would sit in one
bank. A single bank cannot deliver them in one cycle.

The write commutator therefore rotates the paths before they reach the banks:

```
bank(i, J) = (i + J) mod P             path i → bank, CMT_WR
path(b, J) = (b + P - J) mod P         bank b → path, CMT_RD
J(t)       = BR_q( floor(t / (N/P²)) ) switching pattern, changes every N/P² cycles
```

For P = 8 and N = 128 the pattern runs 0 4 2 6 1 5 3 7, each value held for two
cycles. The samples of one output cycle were written under P different
patterns, so they sit in P different banks. On the read side, J is computed from
the read counter, and the read commutator undoes the rotation. Each commutator
is P multiplexers of P inputs (`cmt_wr.sv`, `cmt_rd.sv`).

## Two single-port groups used as a cycle-based ping-pong

The schedule hinges on two numbers, α = log2(N / (2P²)) and β = ⌊α/2⌋.

* **Writes.** They alternate between group A and group B:
  * α even: runs of 2^β cycles each.
  * α odd: 2^β cycles to A, then runs of 2^(β+1) cycles alternating B, A, …

  The select is a counter bit or the XOR of two counter bits:
  `grp = c_β` (α even) or `grp = c_β xor c_(β+1)` (α odd).
* **Reads.** Reading a symbol starts in the same cycle as write number
  `N/P − L` of that symbol, where L = 2^β (α even) or 2^(β+1) (α odd). It then
  runs for N/P consecutive cycles. The read counter is exactly L cycles ahead
  of the write counter of the next symbol. Adding L to the counter always flips
  the group select, so in every cycle one group is written and the other read.
  Neither group is ever asked for two accesses.
* **Refill.** The next symbol is written into exactly the locations the read
  freed L cycles earlier. That is why N words are enough.

| N (P = 8) | α | β | write groups from cycle 0 | read starts at write cycle | latency (cycles) |
|---|---|---|---|---|---|
| 128   | 0 | 0 | A B A B …           | 15   | 16   |
| 256   | 1 | 0 | A B B A A B B …     | 30   | 31   |
| 512   | 2 | 1 | A A B B A A …       | 62   | 63   |
| 1024  | 3 | 1 | A A B B B B A A A A … | 124 | 125 |
| 2048  | 4 | 2 | runs of 4           | 252  | 253  |
| 4096  | 5 | 2 | 4, then runs of 8   | 504  | 505  |
| 8192  | 6 | 3 | runs of 8           | 1016 | 1017 |
| 16384 | 7 | 3 | 8, then runs of 16  | 2032 | 2033 |
| 32768 | 8 | 4 | runs of 16          | 4080 | 4081 |

Latency is counted from the first input set of a symbol to its first output
set: N/P − L + 1. The "+1" is the one-cycle read of the memory banks. The
throughput is P samples per cycle, with no gap between symbols.

## Addressing: odd and even symbols

Within a burst, symbols are numbered from 1. The two parities use different
write addresses. Let `c = (c_top, c_low)` be the write counter, where `c_top`
is the q high bits and `c_low` the m − 2q low bits.

* **Odd symbols.** All banks get the same address: the counter with bit `c_β`
  removed, i.e. `c_top·2^α + drop(c_low, β)`. Bit `c_β` is left out because it
  (with `c_(β+1)`) already chooses the group.
* **Even symbols.** The sample that would be `X(k)` goes to the location that
  held `X(BR(k))` of the previous symbol. That location was freed by the read
  L cycles earlier. For path p the address is
  `BR_q(p)·2^α + drop(BR(c_low), β)`. These per-path addresses are then rotated
  onto the banks by a second write commutator, with the same pattern J as the
  data.

Reading is the mirror image. A symbol is read with the address formula of the
**next** symbol's parity, evaluated on the read counter. The controller
therefore has two identical address generators (`addr_gen.sv`): one on the
write counter, one on the read counter. Because the layout alternates between
the two parities, a sample is never moved once written, and nothing needs
double buffering.

In the 128-point, 8-parallel case the layout after the first symbol is as
follows. Group A bank 0 holds, at addresses 0..7:

```
0 20 50 38 113 101 83 71
```

After the second symbol, the same bank holds:

```
0 20 38 50 71 83 101 113
```

The end-to-end testbench checks these rows and two others.

## Interface (`par_bitrev`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset; clears counters and flags, not memory |
| `cfg_log2n_i` | in | $clog2(MMAX+1) | log2 N, from 2·log2 P + 1 up to MMAX; sampled only while idle |
| `in_valid_i` / `in_ready_o` | in / out | 1 | input handshake, see below |
| `in_data_i[P]` | in | DATA_W each | bit-reversed input: path p, symbol cycle t = `X(BR(P*t+p))` |
| `out_valid_o` | out | 1 | an output set is on `out_data_o` |
| `out_sop_o` | out | 1 | first output set of a symbol |
| `out_data_o[P]` | out | DATA_W each | natural order: path p, output cycle r = `X(P*r+p)` |

Parameters: `P` (power of two, default 8), `MMAX` (log2 of the largest
length, default 15), and `DATA_W` (default 32). The memory is 2·P banks of
2^(MMAX − log2 P − 1) words.

**Handshake.** The architecture assumes an endless stream. This RTL adds a
minimal handshake around it:

* Once a symbol starts, its N/P sets must arrive on consecutive cycles, with
  `in_valid_i` high throughout. An assertion checks this.
* The next symbol may follow with no gap. Any number of symbols can flow this
  way at full rate.
* If the next symbol does not follow at once, the circuit drains the last
  symbol. `in_ready_o` then stays low until that read is finished. Without this
  rule, a late symbol would break the fixed L-cycle phase between reads and
  writes.
* A new length is taken at the start of a burst.

## Files

| file | content |
|---|---|
| `rtl/bitrev_pkg.sv` | `rev_bits` (bit reversal of the low w bits), `drop_bit` |
| `rtl/par_bitrev.sv` | top: wires the blocks below |
| `rtl/br_ctrl.sv` | counters, symbol parity, read start, handshake, output flags |
| `rtl/addr_gen.sv` | J, group select, per-bank addresses for odd/even symbols |
| `rtl/cmt_wr.sv`, `rtl/cmt_rd.sv` | write and read commutators |
| `rtl/mem_group.sv` | P banks with a per-bank write/read address mux |
| `rtl/sp_ram.sv` | single-port bank, synchronous one-cycle read |
| `rtl/grp_mux.sv` | group A / B output multiplexer |
| `tb/tb_*.sv` | one self-checking testbench per module, plus P = 4 and P = 2 end-to-end variants |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/bitrev_pkg.sv \
          tb/tb_par_bitrev.sv --top-module tb_par_bitrev
./obj_dir/Vtb_par_bitrev
```

Replace `tb_par_bitrev` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

## What the testbenches establish

* **`tb_par_bitrev`** runs at the default parameters: 8 paths, 32768 words.
  * Every length from 128 to 32768, as three back-to-back symbols.
  * Then random bursts, some offered while the previous burst still drains.
  * Every output sample is checked, along with `out_sop`, gap-free output and
    the exact latency formula.
  * The 128-point memory layout is compared with the reference example.
  * It counts that each mechanism occurred: both schedule types, odd- and
    even-symbol reads, back-to-back symbols, drain with `in_ready` low, a length
    change, and a write to one group overlapping a read of the other.
* **`tb_par_bitrev_p4`** and **`tb_par_bitrev_p2`** repeat this for P = 4 and
  P = 2, with lengths up to 32768.
* **`tb_addr_gen`** checks every counter value for every length against its
  own model:
  * the switching pattern;
  * the group schedule;
  * that odd-symbol addresses are unique per group;
  * that each even-symbol sample lands where its bit-reversed counterpart of
    the previous symbol was stored.
* **`tb_br_ctrl`** checks the cycle-by-cycle schedule. At 128 points the read
  starts at cycle 15, and at 256 points at cycle 30. It also checks the
  single-port rule, the output flags and the handshake.
* **Unit tests.** The commutators, the bank, the group and the mux each have
  their own testbench.

## Departures from the reference architecture and open points

* **Read addresses** come from a second address generator on the read counter.
  The reference describes them only as a delayed copy of the write address.
* **Length selection.** The reference picks the counter fields for each length
  with one multiplexer per length. Here, shifts by `cfg_log2n_i` do the same
  for any P and MMAX.
* **Handshake, reset and read latency** are this design's choices. These are
  the drain rule, the synchronous reset and the registered one-cycle bank
  read. The latency still equals the reference formula.
* **Memories** are plain arrays. The reference implementation uses
  compiler-generated single-port SRAM macros of 2048 × 32 bits, 16 of them.
  Replacing `sp_ram` with a macro wrapper of the same ports is the intended
  route to silicon.
* **Not included.**
  * The FFT processor that feeds the circuit. The testbenches generate its
    output order instead.
  * Any multi-stream (MIMO) mode. The architecture mentions it only as a
    future extension.
* **Size limits.** Lengths below 2·P² are not supported. P is fixed at elaboration.
