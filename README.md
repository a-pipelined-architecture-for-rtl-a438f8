# Block-interleaved pipelined Log-MAP turbo decoder

The recursion at the heart of a turbo decoder — the add-compare-select-offset
(ACSO) update of the forward (alpha) and backward (beta) state metrics — limits
the clock rate. It cannot simply be pipelined, because step k+1 needs the
result of step k. This design pipelines the ACSO kernel anyway, with four
register stages. It keeps the kernel busy by splitting the frame into four
independent sub-blocks and feeding them to the kernel in strict rotation, one
per cycle. This is **block-interleaved pipelining**: when a sub-block's
result leaves stage 4, that sub-block's next step is due, so each
recursion unit still finishes one trellis step per cycle.

Sub-blocks need starting metrics at their borders, and sliding windows need
starting metrics for the backward recursion. Neither is obtained by a warm-up
recursion here. Each start comes from the metrics that an earlier pass
computed at that border. This is **next iteration initialisation (NII)**. It
avoids the extra latency that warm-up would add on top of the deeper pipeline.

The RTL decodes a rate-1/3 parallel-concatenated turbo code: two 8-state
recursive systematic codes with a 512-bit interleaver. It uses the Log-MAP
algorithm and runs a configurable number of iterations. It is written in
synthesizable SystemVerilog, and every module has a self-checking testbench.

## Decoding flow (`turbo_decoder`)

A single SISO (soft-in soft-out) decoder serves both constituent codes in turn.
Each turn is called a half-iteration:

| pass    | systematic   | parity  | a-priori from E | extrinsic to E | 
|---------|--------------|---------|-----------------|----------------|
| code 1  | `sys[k]`     | `p1[k]` | `E[k]`          | `E[k]`         |
| code 2  | `sys[pi(k)]` | `p2[k]` | `E[pi(k)]`      | `E[pi(k)]`     |

`E` is the interleaver/de-interleaver memory (`extrinsic_mem`). Interleaving
and de-interleaving come only from the choice of address. Each address is read
in a half-iteration before it is rewritten in that same half-iteration, so one
array is enough. `pi(k) = (31k + 64k^2) mod 512` comes from two combinational
`qpp_interleaver` instances, one for the read side and one for the write side.
The first half-iteration of a frame uses zero a-priori values and clears the
SISO's border-metric stores. The hard decisions of the last code-2 pass are
written, in natural order, to a decision buffer.

Interface of the top:

- Load the frame one step per cycle: `ld_en`, `ld_addr`, `ld_sys`, `ld_p1`, `ld_p2`.
  These are 6-bit signed LLRs, LSB = 1/4 nat, and positive means bit 1.
- Pulse `start` with `n_iter` (1..15 full iterations).
- Wait for `done`.
- Read the result: `out_bit` gives decoded bit `out_addr` one cycle later.

A decode takes `2*n_iter*((N/(M*L)+1)*M*L + 11) + 1` cycles. That is 6511
cycles for 5 iterations at the default sizes.

## Block-interleaved pipelining (`acso`, `sm_unit`)

`acso` computes `max*(m0+g0, m1+g1) = max + ln(1+exp(-|d|))` for one state, in
four registered stages:

1. add
2. compare/select, and |difference|
3. correction from a 4-entry table, plus the offset
4. re-scaling

Re-scaling works like this. If any of the unit's 8 stage-3 metrics exceeds
2^(q-2) = 128 (q = 9), then 128 is subtracted from all of them. A metric that
would go negative is clamped to 0. Branch metrics are below 128. So the
metrics stay in 0..128 after stage 4 and never exceed 225 before it, which
means 9 unsigned bits are enough.

`sm_unit` wires 8 kernels to the trellis, forwards (alpha unit) or backwards
(beta unit). Its input vector is either `init_vec` (`load`) or stage 4 fed
straight back. Nothing in the unit knows about sub-blocks. The schedule
supplies them in rotation, and the 4-cycle loop latency does the rest. The
alpha unit also outputs its stage-1 registers (alpha+gamma for each branch)
to the LLR unit. The SISO checks `M == 4` with an assertion, because the
number of sub-blocks must equal the kernel depth.

## Windows and the warm-up-free schedule (`siso_decoder`)

The frame of N = 512 steps is cut into M = 4 sub-blocks of S = 128 steps.
Each sub-block is cut into W = 4 windows of L = 32 steps. Cycle `c` of a phase
serves sub-block `c mod 4` and step `c div 4`. A phase lasts D = M·L = 128
cycles. A half-iteration has W+1 phases:

| phase | beta unit (backward)                    | alpha + LLR units (forward)          |
|-------|-----------------------------------------|--------------------------------------|
| 0     | window 0 of all sub-blocks              | idle                                 |
| p     | window p                                | window p-1, results written          |
| W     | idle                                    | window W-1                           |

The phases use these stores and buffers:

- **Input LIFO and beta LIFO (`lifo_ram`, 4L entries each).** The beta side
  reads the channel and a-priori values in reverse time order. It pushes them,
  and every beta vector entering a step (beta_{k+1}), into these buffers. The
  alpha side pops them in forward order one phase later.
  - Reversal is done per sub-block: entry `4j+b` maps to `4(L-1-j)+b`.
  - The address direction alternates every phase. So the entry read in one
    phase is the one written at the same moment for the next phase, and a
    single array per LIFO is enough.
- **beta_in RAM (`metric_store`, 2 codes × 4 sub-blocks × 4 windows).**
  - The beta vector reached at the lower border of window p is stored as the
    starting vector of window p-1.
  - The vector reached at the start of a sub-block is stored as the starting
    vector of the previous sub-block's last window. It is held in a pending
    register until the pass ends. So, like every other stored vector, it is
    first used in the next pass of the same code.
  - The frame's last window always starts from the zero vector, because the
    trellis is unterminated.
  - Entries that have not been written in this frame read as zero.
- **Sub-block border store (`metric_store`, 2 codes × 4).** The forward
  recursion runs on across the windows of a sub-block. The alpha vector at the
  end of sub-block b starts sub-block b+1 in the next pass of the same code.
  Sub-block 0 starts in encoder state 0: state 0 has weight 64 and the others 0.
- **LLR unit (`llr_unit`).**
  - Adds beta_{k+1} to the 16 alpha+gamma sums.
  - Reduces the u=1 and u=0 branches with two 3-level max* trees.
  - Outputs the LLR, the extrinsic value `sat(LLR - La - Ls, ±63)` and the
    hard decision, 5 cycles after its inputs.

A half-iteration takes `(W+1)·D + 10` cycles from `start` to `done`: the issue
phases, an 8-cycle pipeline drain and the handshake.

## Fixed-point arithmetic (`turbo_pkg`, `bmu`)

| quantity                  | format                                       |
|---------------------------|----------------------------------------------|
| channel LLR               | 6-bit signed, LSB 1/4 nat                    |
| a-priori / extrinsic      | 7-bit signed, saturated to ±63               |
| branch metric             | 7-bit unsigned (≤ 94)                        |
| state metric              | 9-bit unsigned, re-scaled by 128             |
| LLR                       | 13-bit signed                                |
| max* correction           | round(4·ln(1+e^(-d/4))): 3, 2 (d=1..3), 1 (d=4..8), 0 |

`bmu` uses the fact that a rate-1/2 branch metric `±A/2 ± B/2` has only four
values (A = La+Ls, B = Lp). Adding `(|A|+|B|)/2` makes them unsigned without
changing any decision:
`gamma{u,p} = [u agrees with sign A]·|A| + [p agrees with sign B]·|B|`,
with |A| ≤ 63 and |B| ≤ 31. The constituent code is the 3GPP one: feedback
1+D²+D³, parity 1+D+D³.

## How closely this follows the published architecture

Taken from the published design:

- four-stage pipelined ACSO with a table-based correction and the
  "subtract 2^(q-2)" re-scaling rule
- 9-bit state metrics
- four interleaved sub-blocks (block size N = 16L, sub-blocks of 4L)
- alpha, beta, gamma and LLR units
- input LIFO and beta LIFO of 4L entries
- beta_in RAM for next iteration initialisation, and alpha hand-over at
  sub-block borders
- zero starting vectors in the first iteration
- 512-bit interleaver and five iterations

Chosen here, because the published description leaves them open:

- the constituent code
- the word lengths other than the state metrics
- the correction table
- the interleaver law (LTE QPP for 512 bits)
- where the register cuts fall inside the ACSO
- the phase schedule and LIFO addressing
- the memory organisation and all interfaces

Departures and limits:

- **One SISO for both codes.** The top-level diagram of a turbo decoder shows
  two SISO decoders. This implementation has one SISO decoder and alternates it.
- **Full vectors in the beta_in RAM.** Each entry holds all 8 metrics of a
  window border, one set per constituent code. The published size
  (windows × 2·W_pm bits) would not hold a state vector.
- **Lower throughput than published.** At the published 192.3 MHz clock, this
  RTL delivers 15.1 Mb/s for 5 full iterations: 12.7 cycles per bit, because
  of the fill and drain phase of every half-iteration and two passes per
  iteration. If one pass counts as an iteration, it is 30.2 Mb/s. The
  published 38.46 Mb/s and 11.3 µs latency correspond to 5 cycles per bit and
  2173 cycles. The published schedule that would reach them is not known in
  enough detail to reproduce.
- **Not included.**
  - Trellis termination (tail bits)
  - A double-buffered input buffer
  - Anything physical: standard-cell implementation, pads, layout

## Modules

```
turbo_decoder            iteration control, address mapping, decision buffer
├── input_buffer         sys / p1 / p2 frame store
├── extrinsic_mem        interleaver/de-interleaver memory
├── qpp_interleaver ×2   pi(k)
└── siso_decoder         schedule, stores, LIFOs
    ├── bmu ×2           gamma units (beta side, alpha side)
    ├── sm_unit ×2       beta unit, alpha unit
    │   └── acso ×8      pipelined kernel
    ├── lifo_ram ×2      input LIFO, beta LIFO
    ├── metric_store ×2  beta_in RAM, sub-block border store
    └── llr_unit
turbo_pkg                widths, trellis functions, correction table
```

Defaults are `N = 512`, `M = 4`, `L = 32`. `N` must be a multiple of `M·L`, and
`M` must stay 4.

## Simulation

Each `tb/tb_<module>.sv` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The testbenches share a reference model,
`tb/tb_ref_pkg.sv`. It contains the trellis, a floating-point correction term,
a plain sliding-window Log-MAP model with the same window schedule and border
stores, a turbo encoder and the interleaver. Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  rtl/turbo_pkg.sv tb/tb_ref_pkg.sv tb/tb_turbo_decoder.sv \
  --top-module tb_turbo_decoder -Mdir obj
./obj/Vtb_turbo_decoder
```

What the tests establish:

- **`tb_siso_decoder`** runs five half-iterations on random inputs. It compares
  every LLR, extrinsic value and decision bit-exactly with the model, and
  checks the cycle count.
- **`tb_turbo_decoder`** runs the whole design at its default size. It encodes
  random 512-bit frames and adds noise: 39 and 45 channel errors in the two
  noisy frames. It decodes with 5 iterations, then checks that:
  - the output is error-free;
  - the output matches the reference decoder bit for bit;
  - the decode takes the expected number of cycles;
  - every mechanism happened at least once: re-scaling in both units,
    warm-up-free window starts, sub-block hand-over, both codes, and
    extrinsic and branch-metric saturation.
- The unit testbenches check each block against the reference, at the
  latencies given above.
