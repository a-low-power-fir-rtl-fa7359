# Low-power FIR filtering core with Hamming-ordered coefficients

A sequential direct-form FIR filter spends most of its dynamic power in its
multiplier. In the conventional schedule the multiplier sees a new coefficient
and a new data sample every clock cycle: h(0)x(n), then h(1)x(n-1), and so on.
Both inputs switch all the time. This core computes the same sum,

    y(n) = sum_{k=0}^{N-1} h(k) * x(n-k)

but visits the taps in a different order. Successive coefficients are chosen
to differ in as few bit positions as possible (minimum Hamming distance). The
coefficient bus, the coefficient register and the multiplier's coefficient
input then switch far less. The data sample for each tap still has to be
found, and that takes a small address generator: a look-up table plus an
adder. The order is fixed once, when the filter is designed. It costs no clock
cycles, and the filter's result is bit-exact with the conventional one.

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, with self-checking
testbenches in `tb/`.

## Block structure

```
             +------------+    +-------+
 counter --->|   h_rom    |--->| h_reg |-----------+
  (cnt) |    +------------+    +-------+           v
        |                                      +-------+    +---------+
        |   xram_addr_gen                      |  mac  |--->| out_reg |---> y
        |   +-----+   +-------+                |       |    +---------+
        +-->| LUT |-->|       |   +-------+    |       |
            +-----+   | adder |-->| x_ram |--->| x_reg |--->
 write_pointer ------>|  mod N|   +-------+    +-------+
                      +-------+       ^
                                      | x_in (external data)
```

| Block | Module | Role |
|---|---|---|
| counter | `fir_ctrl` | Step counter 0..N-1 addressing `h_rom` and the LUT together. Also sequences the core. |
| h_rom | `h_rom` | Coefficients, stored in processing order. |
| xram_addr_gen | `xram_addr_gen` | LUT of tap offsets plus a modulo-N adder. Gives the data-memory read address. |
| write_pointer | `write_pointer` | Slot of the newest sample in the circular buffer. |
| x_ram | `x_ram` | Circular buffer of the last N samples: one write port, one read port. |
| h_reg, x_reg | `data_reg` | Registers at the multiplier inputs. |
| mac | `mac` | Multiplier and accumulator. |
| multiplier | `mult_csa` or `mult_booth_wallace` | Carry-save array, or radix-4 Booth with a Wallace tree. |
| out_reg | `data_reg` | Holds the output y. |
| — | `fir_pkg` | Word lengths, the coefficient sets, and the ordering functions. |
| top | `fir_core` | Wires the blocks as drawn above. |

## Finding the data sample for a reordered coefficient

This is the part that needs care.

**Circular buffer.** `x_ram` holds the last N samples. Samples never move.
A new sample overwrites the oldest one. `write_pointer` (wp) holds the slot
of the newest sample x(0) while an output is computed. So sample x(k), the
one that pairs with coefficient h(k), sits at slot `(wp + k) mod N`. After
each output, wp steps back by one, modulo N. It then points at the slot of
the oldest sample, where the next input is written. That sample becomes the
new x(0).

**Look-up table.** ROM word i holds h(k_i), where k_i is the tap scheduled in
step i. The LUT, addressed by the same counter, holds k_i: how far the
matching sample lies from x(0). The read address is therefore

    addr(i) = (wp + LUT[i]) mod N

The adder reduces the sum with one conditional subtraction of N, because N
(80 or 73) is not a power of two. In the conventional order LUT[i] = i, and
the table reduces to the counter itself.

**Example (BPF2).** The first ten steps of the ordered schedule are:

| step i | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| tap k_i = LUT[i] | 0 | 79 | 5 | 74 | 3 | 76 | 12 | 67 | 4 | 75 |
| h(k_i) | -37 | -37 | -41 | -41 | -58 | -58 | -26 | -26 | -18 | -18 |
| bits changed vs. previous step | – | 0 | 2 | 0 | 2 | 0 | 1 | 0 | 1 | 0 |

In natural order, the same ten steps change 14, 4, 10, 2, 4, 5, 11, 4 and
5 bits. The schedule often pairs h(k) with h(N-1-k). A linear-phase filter
has symmetric coefficients, so those are equal and the coefficient bus does
not switch at all.

**Ordering algorithm.** `fir_pkg::ham_order()` is a greedy
nearest-neighbour walk:

1. Start at h(0).
2. Step to the unused coefficient at the smallest Hamming distance from the
   current one. Ties go to the lowest tap index.

It runs at elaboration. From its result, `fir_pkg::rom_image()` builds the
ROM contents, and `fir_core` builds the LUT. Set `ORDERED = 0` to get the
conventional schedule, for comparison.

## Operation sequence and timing

`fir_ctrl` runs four states:

- **INIT**, N cycles after reset. It writes zero to every `x_ram` word while
  wp steps once round the buffer, ending where it started. The filter
  therefore starts from an all-zero history.
- **IDLE.** `in_ready` is high. A cycle with `in_valid` high writes `x_in` at
  wp and starts an output.
- **RUN**, N cycles, with cnt = 0..N-1. Each cycle one coefficient and its
  sample are loaded into `h_reg` and `x_reg`.
- **DRAIN**, two cycles.
  - In the first, the last product is accumulated.
  - In the second, the accumulator is copied to `out_reg` and wp is
    decremented.

The MAC accumulates one cycle behind the fetch. On the first product of an
output it adds onto zero instead of the old sum, so clearing the accumulator
costs no cycle.

Counted from the cycle that accepts a sample:

- fetch in cycles 1..N
- accumulate in cycles 2..N+1
- `out_reg` load and pointer decrement in cycle N+2
- `y_valid` in cycle N+3; `in_ready` is high again in that same cycle

If a sample is always waiting, the core takes one sample every N + 3 cycles:
83 cycles for BPF2, 76 for BPF1.

## Top-level interface (`fir_core`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock; all flip-flops use the rising edge. |
| `rst_n` | in | 1 | Asynchronous active-low reset. |
| `x_in` | in | 16 | Signed input sample. |
| `in_valid` / `in_ready` | in / out | 1 | Handshake. A sample is taken when both are high. |
| `y` | out | 32 + ceil(log2 N) = 39 | Signed output, at full accumulator precision. Updated with `y_valid`, held otherwise. |
| `y_valid` | out | 1 | One-cycle pulse: `y` holds a new output. |

Coefficients are Q15, so `y` carries 15 fraction bits. For a 16-bit result
with the scale of the input, take `y[30:15]` and saturate as needed. The core
itself does no rounding. Its 7 guard bits make overflow impossible.

| Parameter | Default | Meaning |
|---|---|---|
| `FILTER` | `BPF2` | `BPF1` (73 taps) or `BPF2` (80 taps). Sets N and the ROM. |
| `ORDERED` | 1 | 1: Hamming-ordered schedule. 0: conventional order. |
| `MULT` | `MULT_CSA` | `MULT_CSA` (carry-save array) or `MULT_WALLACE` (Booth with Wallace tree). |

## Coefficient sets

Two linear-phase bandpass filters are built in. Both are 16-bit, rounded as
round(h * 32768).

| | fs | Stopbands | Passband | Ripple / attenuation | Taps | Method |
|---|---|---|---|---|---|---|
| BPF1 | 1 kHz | 0–0.1, 0.3–0.5 kHz | 0.15–0.25 kHz | – / 60 dB | 73 | Kaiser window. Beta is set by the 60 dB target; cut-offs at 0.125 and 0.275 kHz. |
| BPF2 | 10 kHz | 0–1, 4–5 kHz | 1.375–3.625 kHz | 0.1 dB / 68.4 dB | 80 | Parks-McClellan, with band weights set by the two ripple limits. |

The specifications are those of the reference design. The integer values are
this design's own. To use another filter, add its Q15 table and length to
`fir_pkg` and extend `taps()` and `coeff()`. The ordering, ROM and LUT follow
automatically.

## Multipliers

Both take signed 16 x 16 operands, give an exact 32-bit product, and are
purely combinational.

**`mult_csa`.** 16 partial products `b[i] ? a<<i : 0`, each sign-extended.
The sign-bit row has negative weight, so it enters inverted, and its +1 is
fed in as the first carry. A linear chain of carry-save (3:2) rows adds the
partial products, and one carry-propagate adder finishes.

**`mult_booth_wallace`.**

1. Radix-4 Booth recoding turns the multiplier into 8 digits in {-2..2}.
2. Negative partial products enter inverted. Their +1 terms are collected in
   a ninth correction row.
3. A Wallace tree of word-wide 3:2 compressor rows reduces the 9 rows to 2
   in 4 levels.
4. A carry-propagate adder finishes.

## What the simulations show

`tb_fir_workloads` runs all eight variants (both filters, both multipliers,
both orders) on 1000 uniformly distributed random 16-bit samples. It checks
every output exactly and counts bit toggles on the two multiplier input
buses while the MAC is working:

| Filter | Coefficient-bus toggles, natural → ordered | Data-bus toggles, natural → ordered |
|---|---|---|
| BPF1 | 468015 → 118008 (−75%) | +2.6% (CSA run), +0.7% (Wallace run) |
| BPF2 | 616014 → 130004 (−79%) | +3.1% (CSA run), +2.3% (Wallace run) |

The coefficient bus switches about 80% less. The data bus switches slightly
more, because samples are uncorrelated and are now read out of order. The
reference design reports both effects. Its gate-level power figures are
quoted here for orientation only and are not reproduced by this RTL:

- about 16% less power for the whole core
- about 29% less in the multiplier

## Departures from the reference design and choices made here

- The coefficient values, the ordering algorithm, the handshake, the reset
  behaviour, the memory clearing, the pipeline timing (N + 3 cycles per
  output), the accumulator width and the output format are this design's
  choices. The reference design does not specify them.
- The internals of both multipliers are this design's. The reference design
  names only the two multiplier types.
- Power and area are not modelled. The toggle counts above stand in for the
  switching activity that drives power.
- In BPF2's lower stopband, 0–1 kHz is used. This gives equal 0.375 kHz
  transition bands on both sides.
- The reference design presents the filter design method as Parks-McClellan
  (Remez), and also lists a Kaiser window for BPF1. Kaiser is used for BPF1
  and Parks-McClellan for BPF2.
- The ROM and LUT are fixed at elaboration. Changing the filter means
  re-elaborating the core; coefficients cannot be loaded at run time.

## Testbenches

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_fir_core` | Default core (BPF2, ordered, CSA), 1000 samples with random gaps and back-pressure. Checks every output against a direct-form reference, the N+3 latency, and that `in_ready` first rises N cycles after reset. Fails if any mechanism never occurs: memory clearing, writes, wp wrap, address wrap, accumulator clears, out_reg loads, back-pressure, waiting for data. Checks that ordering reduces coefficient switching. |
| `tb_fir_workloads` | All eight variants, as above. |
| `tb_fir_ctrl` | Cycle-exact schedule of every control output, with N = 8. |
| `tb_xram_addr_gen` | All 80 x 80 combinations of counter and pointer, with the BPF2 LUT. |
| `tb_write_pointer`, `tb_x_ram`, `tb_h_rom`, `tb_data_reg` | The storage blocks, against models. |
| `tb_mac` | Both multiplier types, random operands with clears, against a 64-bit model. |
| `tb_mult_csa`, `tb_mult_booth_wallace` | 16-bit corner values and random pairs; 8-bit exhaustive. |

`tb/fir_env.sv` is the stimulus and reference-model module shared by the
two system-level benches.

To run one with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_fir_core \
    -y rtl -y tb +libext+.sv -Irtl rtl/fir_pkg.sv tb/tb_fir_core.sv -o sim
./obj_dir/sim
```

Replace `tb_fir_core` with any other testbench name. Every bench finishes in
well under a second of simulation time. Building any design that
instantiates `fir_core` takes 10–15 s, because the tap ordering is computed
during elaboration.
