# Turbo encoder for the eCall in-vehicle modem

An in-vehicle emergency-call system (eCall) sends a Minimum Set of Data (MSD):
1120 bits of crash information plus a 28-bit CRC, 1148 bits in all. Before
modulation, the modem protects the block with the rate-1/3 turbo code of the
3GPP standards, which turns it into 3456 coded bits. This RTL is that encoder.
It can run in two ways, chosen per block by the `mode` input:

- **serial** (`mode = 0`): one bit per clock through a sequence of phases,
  8054 clocks in all for a block;
- **parallel** (`mode = 1`): the whole coded block is computed in a single
  clock once the input is in, so the output starts 2 clocks after the last
  input bit.

The phases are sequenced by a cycle counter. A magnitude comparator (`<`, `=`,
`>`) decides when each phase ends.

## The code

The encoder is a parallel concatenation of two identical 8-state recursive
systematic convolutional (RSC) encoders:

```
            +---------------------------------------------> x      (systematic)
   x ------>|
            +--> RSC 1 ---------------------------------------> z      (parity 1)
            +--> interleaver pi --> x' --> RSC 2 -------------> z'     (parity 2)
```

Each RSC encoder has three delay cells, d1 (newest), d2 and d3, all zero at
the start of a block. With input `u`:

```
a      = u ^ d2 ^ d3          feedback     g0 = 1 + D^2 + D^3
parity = a ^ d1 ^ d3          feed-forward g1 = 1 + D + D^3
(d1, d2, d3) <= (a, d1, d2)
```

After the K information bits, each encoder is **terminated** in three steps.
Its input switch takes the feedback value instead of data (`u = d2 ^ d3`), so
`a = 0` and the register empties. Each step gives one systematic tail bit (`u`)
and one parity tail bit. The two encoders together give 12 tail bits.

## The interleaver

The second encoder sees the block in permuted order, `x'[k] = x[pi(k)]`. The
permutation is the 3GPP TS 25.212 turbo-code internal interleaver. Of the 3GPP
interleavers, only this one accepts a 1148-bit block. `turbo_interleaver`
computes it at elaboration with a constant function, for any K from 40 to
5114, and keeps the result as a ROM of K addresses. The construction is:

1. **Matrix size.** R = 5 rows for K ≤ 159. R = 10 for K ≤ 200 or
   481 ≤ K ≤ 530. Otherwise R = 20. The prime p is 53 for 481 ≤ K ≤ 530.
   Otherwise p is the smallest prime (≥ 7) with K ≤ R·(p+1). The number of
   columns C is the smallest of p−1, p and p+1 with K ≤ R·C. v is the least
   primitive root of p.
2. **Base sequence.** s(0) = 1 and s(j) = v·s(j−1) mod p.
3. **Row primes.** q(0) = 1. Each later q(i) is the next prime above 6 that
   shares no factor with p−1. The row pattern T is ⟨4…0⟩ for R = 5 and ⟨9…0⟩
   for R = 10. For R = 20 it is pattern A
   ⟨19,9,14,4,0,2,5,7,12,18,10,8,13,17,3,1,16,6,15,11⟩, or pattern B
   (K 2281–2480 and 3161–3210). The primes are assigned as r(T(i)) = q(i).
4. **Intra-row permutation.** Row i takes position
   U_i(j) = s(j·r(i) mod (p−1)), minus 1 when C = p−1. When C = p or p+1,
   extra columns map to 0 and p. There is a swap in the last row when
   K = R·(p+1).
5. **Read-out.** The block fills the R × C matrix row by row, with dummy cells
   after bit K−1. It is read out column by column over the permuted rows, and
   the dummies are skipped: pi = T(i)·C + U_T(i)(j) for every value below K.

For the MSD block (K = 1148): R = 20, p = 59, C = 58 (= p−1), v = 2,
pattern A, and 12 dummy cells.

The ROM has two ports:

- a random-access lookup `rd_idx → rd_addr`, used by the serial method;
- a fixed wiring `blk_out[k] = blk_in[pi(k)]`, used by the parallel method.

## The coded block

The 3456 coded bits leave in this order, bit 0 first:

| field        | bits | content                               |
|--------------|------|---------------------------------------|
| systematic   | 1148 | the MSD+CRC block itself              |
| tail1        | 3    | systematic tail bits of encoder 1     |
| tail2        | 3    | systematic tail bits of encoder 2     |
| parity1      | 1148 | parity of encoder 1                   |
| ptail1       | 3    | parity tail bits of encoder 1         |
| parity2      | 1148 | parity of encoder 2 (interleaved)     |
| ptail2       | 3    | parity tail bits of encoder 2         |

This grouping differs from the bit-interleaved tail order of TS 25.212.
`tenc_pkg` holds the offset of each field.

## Serial and parallel computation

| phase  | serial clocks | parallel clocks | what happens                                            |
|--------|---------------|-----------------|---------------------------------------------------------|
| READ   | 1148          | 1148            | shift `in_MSD_CRC` into `msd_input_reg`                 |
| BUILD  | 1148          | –               | copy the systematic bits into the output buffer         |
| PAR1   | 1148          | –               | `rsc_encoder` 1, natural order, one parity bit per clock |
| TAIL1  | 3             | –               | terminate encoder 1 (two buffer writes per clock)       |
| PAR2   | 1148          | –               | `rsc_encoder` 2, reads `msd[pi(k)]`                     |
| TAIL2  | 3             | –               | terminate encoder 2                                     |
| ENCODE | –             | 1               | two `rsc_block_encoder`s plus the interleaver wiring load the whole buffer |
| WRITE  | 3456          | 3456            | shift the buffer out on `out_TE_data`                   |
| total  | **8054**      | 1148 + **3457** |                                                         |

Serial total: 1148·4 + 3 + 3 + 3456 = 8054.

`rsc_block_encoder` is the RSC recursion unrolled over the whole block as
combinational logic. Its logic depth grows linearly with K: about 1150 XOR
levels for the MSD block. This is what "one clock" costs. A real clock
period for this path has to come from timing analysis on the target.

The serial method needs only one RSC encoder's worth of logic per constituent
code, plus the lookup ROM. The parallel method needs the full unrolled XOR
network twice (about 9200 XOR cells after synthesis for K = 1148). Both
methods share the input register, the output buffer and the controller, and
the module contains both.

## Interface

| port          | dir | meaning |
|---------------|-----|---------|
| `clk`         | in  | clock, rising edge |
| `rst`         | in  | synchronous reset, active high |
| `ack`         | in  | while `busy` is low, a clock with `ack = 1` starts a block; ignored while busy |
| `mode`        | in  | 0 serial, 1 parallel; sampled on the `ack` clock only |
| `in_MSD_CRC`  | in  | block bits, sampled on the K clocks that follow the `ack` clock, first bit first |
| `out_TE_data` | out | coded bits, straight from a flip-flop |
| `out_valid`   | out | high for the 3456 clocks on which `out_TE_data` carries a coded bit |
| `busy`        | out | high from the clock after `ack` until the last coded bit |

Latency from the last input bit to the first coded bit:

- parallel: 2 clocks;
- serial: 3·K + 7 = 3451 clocks.

There is no back-pressure. The consumer must take one bit per clock while
`out_valid` is high.

Parameters of `turbo_encoder`:

- `K`: block length, default 1148. Any value from 40 to 5114 works, because
  the interleaver is generic. The output length is 3K + 12.
- `CNT_W`: phase counter width, default 32.

## Controller and magnitude comparator

`te_controller` has one counter, `cnt`, which restarts at 0 in every phase.
One `mag_comparator` compares `cnt` with the last count of the current phase:

- while `cnt < last`, the counter increments;
- otherwise the next phase starts.

The comparator is an MSB-first cascade. At each bit, greater-than and
less-than are qualified by the equality of all higher bits. Two assertions
check the controller:

- the counter never passes the end of its phase;
- a phase never ends without equality.

Two more assertions in the top check that each serial encoder is back in the
zero state after its tail.

## Modules

| file | role |
|------|------|
| `rtl/tenc_pkg.sv` | block length, phase and mode enums, buffer field offsets |
| `rtl/turbo_encoder.sv` | top: wires the blocks for both methods |
| `rtl/te_controller.sv` | phase sequencer with the cycle counter |
| `rtl/mag_comparator.sv` | W-bit magnitude comparator |
| `rtl/msd_input_reg.sv` | serial-in input register |
| `rtl/turbo_interleaver.sv` | 3GPP interleaver ROM, lookup port and block permutation |
| `rtl/rsc_encoder.sv` | bit-serial RSC encoder with termination |
| `rtl/rsc_block_encoder.sv` | RSC encoder unrolled over a block (one clock) |
| `rtl/te_output_buffer.sv` | 3456-bit coded-block register: two bit-write ports, block load, shift-out |

## Simulation

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>`. The reference models in
`tb/tenc_ref_pkg.sv` are written separately from the RTL:

- the interleaver is built from an explicit matrix, with the primitive root
  found by a prime-factor test;
- the RSC encoder works on generator tap vectors.

For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tenc_pkg.sv tb/tenc_ref_pkg.sv tb/tb_turbo_encoder.sv \
    --top-module tb_turbo_encoder
./obj_dir/Vtb_turbo_encoder
```

`tb_turbo_encoder` runs the default configuration (K = 1148). It sends five
blocks:

- serial, parallel, parallel (all-zero data), serial, parallel;
- mode switches between blocks, and `ack` pulses during blocks.

It checks:

- every coded bit;
- the serial total of 8054 clocks;
- the parallel 3457 clocks after the input;
- the 2-clock parallel latency.

It counts each mechanism, and a mechanism that never happens is a failure.

`tb_turbo_interleaver` checks the permutation against the reference for
K = 40, 190, 512, 1148, 2300 and 5114. Together these cover every branch of
the construction.

## How far to trust it, and where it is its own

These parts follow the published design:

- the rate-1/3 PCCC with two 8-state encoders and zero start state;
- the 1148 → 3456 bit sizes;
- the output field order;
- the two methods and their clock counts: 8054 serial; 1 + 3456 after the
  input in parallel;
- the port names `clk`, `rst`, `ack`, `mode`, `in_MSD_CRC` and `out_TE_data`;
- a 32-bit cycle counter.

These are choices of this implementation:

- **Generator polynomials and termination.** These are the 3GPP ones the
  design refers to.
- **Interleaver.** This is TS 25.212. The design says only "3GPP".
  Conformance rests on the reference model, which was written from the same
  description, not on published test vectors. Check it against a known-good
  encoder before using it on air.
- **`ack`.** Its use as a start strobe is this design's choice, as are the
  `out_valid`/`busy` outputs and the synchronous active-high reset.
- **Comparator.** Where the magnitude comparator is used, and its gate
  structure, are this design's choices.
- **Output buffer.** The two-port write structure is this design's choice.

On timing: the original work reports 22 ns from the end of the input to the
start of the output in parallel mode. This design takes 2 clocks, which is
consistent with that figure. The original work also reports 9218 ns for the
serial method. That figure does not correspond to the 8054-clock sequence at
any stated clock rate, and this design follows the clock counts.

The original work, on a Xilinx Virtex-6 Lower Power XC6VLX75TL, reports
2904 LUTs and 35.1 mW with the magnitude comparator. It reports 3226 LUTs and
54.1 mW with a plain equality comparator. This RTL has not been mapped to that
device, and those figures do not describe it.

The following parts of the surrounding modem are not included:

- the CRC generator (its output is `in_MSD_CRC`);
- the modulator (it takes `out_TE_data`);
- the demodulator;
- the BCH decoder (its ACK/NACK/START drives `ack`);
- the vehicle ECU;
- the GSM radio module.
