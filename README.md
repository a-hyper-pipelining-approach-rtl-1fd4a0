# Single-micro-pipeline hybrid multiplier (32 x 32 bit, double-edge, hyper-pipelined)

A hybrid multiplier sits between a fully parallel multiplier, which is fast but large, and a
bit-serial one, which is small but slow. The operands arrive and the product leaves as parallel
words. Inside, the multiplication is done by one short pipeline of identical cells
(*pipes*). Each pipe is a single full adder with two stored bits. The multiplier operand enters
one bit per step, and the product leaves one bit per step. Adding and shifting happen in the
same stage, so the pipeline needs no shifter and no final carry-propagate adder. Its longest
path is one full adder plus the carry feedback loop of a pipe.

Two techniques are applied to that pipeline:

* **Double-edge triggering (DET).** Every storage bit captures on the rising *and* the falling
  clock edge. A product then takes 33 clock periods instead of 66, so the same throughput
  needs half the clock frequency, which lowers clock-network power.
* **Combined memory (register retiming, "hyper-pipelining").** The sum and carry bits of a
  pipe are merged into one 2-bit storage element with a single clock and reset connection,
  instead of two separate flip-flops. This shortens the clock wiring of each stage and makes
  clock skew less likely. It does not change the function or the number of stages.

The default configuration uses both techniques: DET storage with combined memory per pipe. The
single-edge (SET) and separate-memory forms can still be selected by a parameter.

## How a product is formed

The multiplicand `B` (N = 32 bits) is held in parallel, with one pipe per bit. The
multiplier `A` is fed in serially, least significant bit first, followed by N zero bits. At
step t, pipe i computes

    {carry_i, sum_i} <= (a_t & b_i) + sum_{i+1} + carry_i        (sum_N = 0)

Each pipe keeps its own carry (the Cout -> Cin loop). The sums move one pipe towards the low end
every step. The stored bits form a carry-save accumulator U = sum(S_i 2^i) + 2 sum(C_i 2^i).
One step of the whole row computes

    U <= a_t * B + floor(U / 2)

so the bit that falls out at the bottom, `S_0`, is product bit p_t. After 2N steps all 64 product
bits have come out, least significant first. By then every stored carry is 0, and only `S_0` may
still hold a 1. No pipe reads `S_0`, so the next operation can start at once without a clear.

```
step            0     1     2   ...  N-1    N   ...  2N-1
a_ser           a0    a1    a2       aN-1   0         0
S_0 after step  p0    p1    p2       pN-1   pN        p2N-1
```

## The pipe and its storage styles

`pipe` is an AND gate for the partial product `a_ser & b_bit`, a full adder, and a two-bit
memory. The parameter `MEM` (type `hm_pkg::mem_style_e`) chooses the memory:

| `MEM`          | edges | memory of a pipe                               | storage bits per pipe |
|----------------|-------|------------------------------------------------|-----------------------|
| `MEM_SET_SEP`  | rising| two 1-bit flip-flops (`pipe_mem_sep`)          | 2                     |
| `MEM_SET_COMB` | rising| one 2-bit register (`pipe_mem_comb`)           | 2                     |
| `MEM_DET_SEP`  | both  | two 1-bit DET flip-flops (`pipe_mem_sep`)      | 4                     |
| `MEM_DET_COMB` | both  | one 2-bit DET register (`pipe_mem_comb`), **default** | 4              |

All four compute the same thing. They differ only in how the storage is built and in whether a
step is a rising edge or any edge. The choice of DET or SET is passed to every sequential part
of the design (the converters and the sequencer as well), so the whole multiplier keeps pace
with its pipes.

## The double-edge flip-flop

The classic DET flip-flop puts two storage halves in parallel. One captures on the rising
edge and one on the falling edge. A multiplexer, steered by the clock level, picks the half
that was written last. `det_dff` keeps the two halves but changes how they are combined:

    rising edge:   pos_half <= d ^ neg_half
    falling edge:  neg_half <= d ^ pos_half
    q = pos_half ^ neg_half

After a rising edge q = (d ^ n) ^ n = d. After a falling edge q = p ^ (d ^ p) = d. The
behaviour and the cost (two storage bits per data bit) are the same as the multiplexed cell.
But the clock never enters the datapath, which has two benefits:

* the output has no glitch when the clock changes level;
* a zero-delay simulation has no race between a flip-flop sampling its input on an edge and
  the multiplexer switching on that same edge.

The race is real: in Verilator, a chain of multiplexed cells captures the wrong data, because
the select switches before the next stage samples. A chain of `det_dff` cells does not. The
output now passes through an XOR, where the classic cell had a multiplexer.

Things to know when using the DET styles:

* Inputs are sampled on both edges. `start`, `a` and `b` must be stable around both edges of the
  step that takes them. The testbenches change inputs a quarter period after an edge.
* The timing budget is half a clock period per step. Both halves of the clock need enough time,
  so the clock duty cycle matters.
* FPGAs and standard-cell libraries seldom offer DET cells. `det_dff` maps onto ordinary
  rising-edge and falling-edge flip-flops plus an XOR gate.

## Around the pipeline: converters and sequencer

```
 a[31:0] ──► ┌──────┐ a_ser  ┌────────────────┐ p_ser ┌──────┐
 b[31:0] ──► │ PTSC │──────► │ micro_pipeline │─────► │ STPC │──► p[63:0]
             │      │ b_hold │  32 pipes      │       └──────┘
             └──────┘──────► └────────────────┘          ▲ shift_en
 start ──► hm_ctrl ── load ──┘(PTSC)                      │
                    ── shift_en ──────────────────────────┘
                    ── busy, done
```

* **`ptsc` (parallel-to-serial converter).** On `load` it takes `a` into a shift register
  and `b` into a hold register. On every other step the `a` register shifts right with zero
  fill, so `a_ser` gives a0 ... a31 and then zeros, and the zeros flush the pipeline.
* **`stpc` (serial-to-parallel converter).** A 64-bit right-shift register with an enable. It
  shifts the serial product in from the top. Once the enable drops, the finished product stays
  on `p`.
* **`hm_ctrl` (sequencer).** Four states with one-hot encoding (one flip-flop per state, so
  every transition toggles exactly two bits):
  `IDLE -> RUN (2N steps) -> CAP (1 step) -> DONE`. `load` is combinational, so the operands
  are taken on the same step that samples `start`. The STPC shifts from the second RUN step
  through CAP: it takes p_t one step after the pipeline produces it. A start is accepted
  in IDLE or DONE and ignored while busy. An assertion checks that the state stays one-hot.

`step_reg` is a small helper: a W-bit register that is `set_dff` (rising edge) or `det_dff`
(both edges), selected by `DET`.

### Interface and timing of `hybrid_multiplier`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`, `rst`  | in  | 1     | clock; asynchronous active-high reset |
| `start`       | in  | 1     | begin a multiplication (taken while not busy) |
| `a`, `b`      | in  | N     | multiplier and multiplicand, unsigned; free to change after the start step |
| `busy`        | out | 1     | operation in progress |
| `done`        | out | 1     | product valid; stays high until the next start |
| `p`           | out | 2N    | `a * b`, valid while `done` is high |

Parameters: `N` (default 32) and `MEM` (default `MEM_DET_COMB`).

`done` rises 2N + 2 = 66 steps after the step that sampled `start`. That is **33 clock periods**
in the DET styles and 66 in the SET styles. A new `start` may be given in the same step that
first sees `done`, so back-to-back products come every 66 steps.

## Size

At the defaults the multiplier has 406 storage bits. DET doubles every bit, so these are
203 logical bits: 64 in the pipes, 64 in the PTSC, 64 in the STPC and 11 in the sequencer. The
combinational logic is 32 full adders plus the converters' multiplexers and the sequencer's
counter. In the SET styles the storage halves to 203 bits.

## Where this RTL departs from, or goes beyond, the original description

* **DET cell structure.** The XOR-combined halves described above replace the
  clock-multiplexed output of the classic cell. The behaviour is the same.
* **Number of pipes.** The reference implementation reports 62 flip-flops for its 32-bit SET
  multiplier (126 for DET), which suggests 31 two-bit pipes. Here there are 32 pipes, one per
  multiplicand bit, and the top pipe's neighbour sum is tied to 0. The totals in the Size
  section are larger than the reference because they include the converters and the
  sequencer.
* **I/O.** The reference design's small pin count (20 pins SET, 36 DET) suggests serial ports
  on its synthesised top. Here the top has parallel 32-bit operand ports and a 64-bit product
  port.
* **Converters and control.** The PTSC, STPC and sequencer are described only by their role.
  Their shift-register structure, the start/busy/done handshake and the 2N+2-step sequence are
  this design's own. The one-hot state encoding follows the low-power argument of the
  reference design (fewer state bits switching per transition).
* **Clocking of the converters.** The converters are said to run on the master clock. Here
  every part runs from the one clock and takes one step per active edge. In the DET styles the
  converters and sequencer are therefore also double-edge.
* **Unsigned only.** Signed operands are not handled.
* **Not modelled:** the published delay and power figures (FPGA timing from 50 to 500 MHz),
  supply-voltage scaling, and the transistor-level view of the DET cell.

## Files

| file | contents |
|------|----------|
| `rtl/hm_pkg.sv` | `mem_style_e`, `HM_WIDTH`, helper functions |
| `rtl/set_dff.sv`, `rtl/det_dff.sv` | single- and double-edge register with async reset |
| `rtl/step_reg.sv` | selects one of the two by `DET` |
| `rtl/pipe_mem_sep.sv`, `rtl/pipe_mem_comb.sv` | separate / combined pipe memory |
| `rtl/pipe.sv` | one pipe: partial product, full adder, memory |
| `rtl/micro_pipeline.sv` | N pipes in a row |
| `rtl/ptsc.sv`, `rtl/stpc.sv` | converters |
| `rtl/hm_ctrl.sv` | one-hot sequencer |
| `rtl/hybrid_multiplier.sv` | top |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_hybrid_multiplier_full.sv` | the top exactly at its defaults |

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=<n> failures=<m>`. To run one
with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/hm_pkg.sv tb/tb_hybrid_multiplier_full.sv --top-module tb_hybrid_multiplier_full
./obj_dir/Vtb_hybrid_multiplier_full
```

What the testbenches check:

* **`tb_set_dff`, `tb_det_dff`.** Capture on the right edges, hold between edges, and
  asynchronous reset.
* **`tb_pipe_mem_sep`, `tb_pipe_mem_comb`.** Both clocking styles against a reference, with
  sum and carry kept apart.
* **`tb_pipe`.** All four styles against a reference full adder with state; the carry loop is
  counted.
* **`tb_micro_pipeline`.** 32-bit DET-combined and SET-separate pipelines run back to back
  without reset, with corner cases and random operands. It also checks 32 or 64 clock periods
  per product.
* **`tb_ptsc`, `tb_stpc`, `tb_hm_ctrl`.** Serial order, zero fill, operand hold, an early
  reload, hold when the enable is low, the 2N+2-step latency, the 2N shifts, a start ignored
  while busy, a start from DONE, and a reset in mid-operation.
* **`tb_hybrid_multiplier`.** All four styles at full 32-bit width, run concurrently. It checks
  the products (all-ones and other corner cases, plus random operands) and the latency in
  steps and clock periods. It counts back-to-back starts, ignored starts, aborts by reset and
  DET half-rate operation, and fails if any of them never happened.
* **`tb_hybrid_multiplier_full`.** The default top with no parameter overrides, 34
  multiplications.
