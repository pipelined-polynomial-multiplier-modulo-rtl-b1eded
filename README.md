# Pipelined multiplier of binary polynomials modulo P(x)

Cryptosystems built on a non-positional polynomial number system represent a
value by its residues modulo several irreducible polynomials P1(x), P2(x), …
over GF(2). Each residue channel does its arithmetic independently and has no
carries, since coefficients are single bits and addition is XOR. The core
operation of such a cipher is the modular product

    R(x) = A(x) · B(x)  mod  P(x)

with A and B of degree below N and P of degree exactly N. This design computes
that product in an N-stage pipeline. Each stage handles one coefficient of the
multiplier B, starting from the lowest. A new triple (A, B, P) can enter on
every clock. Once the pipeline is full, one finished product leaves on every
clock. Each triple carries its own modulus, so neighbouring multiplications may
belong to different residue channels.

The default size is N = 4: 4-bit operands, a 5-bit modulus, four stages.
`N` is a parameter, and the design has also been simulated at N = 10.

## The low-order-first algorithm

Write B = b0 + b1·x + … + b(N-1)·x^(N-1). Then

    A·B mod P = Σ b_i · (x^i · A mod P)

The terms x^i·A mod P are made one from the other by a doubling step, which
multiplies by x:

    r_0 = A                      R_0 = b_0 · r_0
    r_i = (x · r_(i-1)) mod P    R_i = R_(i-1) + b_i · r_i      (+ is XOR)
    result = R_(N-1)

Multiplying by x is a one-place shift towards the high coefficients. The
shifted value has N+1 bits. If its top bit H is 1, the value has reached degree
N. Adding P once (XOR) then clears that bit, because bit N of P is always 1.
This single conditional subtraction is all the reduction there is. Unlike a
high-order-first (Horner) scheme, the reduction chain r_i depends only on A and
P, and the accumulation chain R_i depends on B. The two run side by side.

Worked example, with P = x^4 + x + 1 (10011), A = 0101, B = 1011:

| step | b_i | r_i  | R_i  |
|------|-----|------|------|
| 0    | 1   | 0101 | 0101 |
| 1    | 1   | 1010 | 1111 |
| 2    | 0   | 0111 | 1111 |
| 3    | 1   | 1110 | 0001 |

So (x²+1)(x³+x+1) mod (x⁴+x+1) = 1.

## Pipeline structure

Stage k (k = 1 … N) takes the state that stage k-1 left in its buffer
registers. It does one step of the algorithm and stores the new state:

```
          r_(k-1) ──┬──────────────► PRF ─────────────► [Rg r_k]
                    │                 ▲ P
  b_(k-1) (bit 0) ─►AND──► AddM2 ──────────────────────► [Rg R_(k-1)]
                             ▲ R_(k-2)
          B >> 1 ───────────────────────────────────────► [RgB.k]
          P      ───────────────────────────────────────► [RgP.k]
```

* **AND block** (`and_block`): passes r_(k-1) when b_(k-1) = 1, else zero.
* **Adder modulo two** (`addm2`): R_(k-1) = R_(k-2) XOR the gated term.
  Stage 1 has no adder. Its result register takes b_0·A directly.
* **Partial remainder former** (`prf`): builds r_k from r_(k-1) and P. It has
  three parts:
  * a shift of r_(k-1), whose top bit is H;
  * an N-bit XOR with the low N bits of P;
  * a multiplexer steered by H. It picks the XOR result when H = 1 and the
    plain shift when H = 0.
* **Buffer registers**:
  * the partial remainder r_k;
  * the running result R_(k-1);
  * the multiplier, shifted one place down so that the next stage finds its
    coefficient in bit 0;
  * the modulus.
* **Last stage** (k = N): it has only the AND block, the adder and the result
  register RgR. Nothing follows it, so it keeps no remainder, multiplier or
  modulus.

`pmm_top` chains the N stages. Optionally, with `IN_REG = 1`, it puts the input
registers RgA, RgB and RgP (`pmm_input_reg`) in front of them. The critical
path in a stage is one shift, one XOR and one 2:1 multiplexer. The AND and the
second XOR run in parallel with it. The clock period is set by this path plus
the register delay, and it does not grow with N.

## Interface and timing (`pmm_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, all registers on the rising edge |
| `rst_n`     | in  | 1     | asynchronous active-low reset, clears every register |
| `in_valid`  | in  | 1     | a triple is presented this clock |
| `a`, `b`    | in  | N     | A(x), B(x); bit i is the coefficient of x^i |
| `p`         | in  | N+1   | P(x); bit N must be 1 (an assertion checks it) |
| `out_valid` | out | 1     | `r` holds a product |
| `r`         | out | N     | A·B mod P |
| `stage_acc` | out | N × N | `stage_acc[k]` is R_k as held in stage k+1. It lets the pipeline be watched stage by stage |

* **Latency, `IN_REG = 0` (default).** A triple is taken in by a rising edge.
  Its product is on `r` after the N-th edge, counting that one. For N = 4, a
  triple taken by clock 1 gives its result after clock 4.
* **Latency, `IN_REG = 1`.** One clock more: N+1 clocks.
* **Throughput.** One triple per clock. There is no handshake and no stall:
  the pipeline advances on every clock. `in_valid` is carried along with the
  data as a valid bit, so gaps in the input stream show up as gaps in
  `out_valid`.
* **Stream time.** K triples take N + K − 1 clocks. A unit that did one
  multiplication at a time with the same clock period would take N·K clocks.
  For K = 50 and N = 10 that is 59 clocks against 500.

Three triples through the default pipeline show how it overlaps work. The table
gives R_k in each stage after each clock:

| after clock | stage 1 (R_0) | stage 2 (R_1) | stage 3 (R_2) | stage 4 (R_3 = r) |
|-------------|---------------|---------------|---------------|-------------------|
| 1 | 0101 (T1) | | | |
| 2 | 1011 (T2) | 1111 (T1) | | |
| 3 | 0000 (T3) | 1011 (T2) | 1111 (T1) | |
| 4 | | 0111 (T3) | 1100 (T2) | **0001** (T1) |
| 5 | | | 0111 (T3) | **0010** (T2) |
| 6 | | | | **0100** (T3) |

The three triples are:

* T1 = (0101, 1011, 10011)
* T2 = (1011, 1101, 11001)
* T3 = (1100, 1010, 11111)

## Choices made in this implementation

* **Latency and input registers.** The pipeline was specified with input
  registers RgA, RgB and RgP, loaded on the falling clock edge. Its stage
  registers load on the rising edge. One statement gives the result after N+1
  clocks. The step table and the timing diagram give it after N clocks. Here
  every register uses the rising edge, and `IN_REG` selects between the two:
  * `IN_REG = 0` (default): the step table's N-clock schedule;
  * `IN_REG = 1`: input registers in front, N+1 clocks.
* **Valid bit and reset.** These are additions. The original pipeline had
  neither.
* **Multiplier register.** It stays N bits wide in every stage and is shifted
  right with zero fill. The original drops one bit per stage. After synthesis,
  the constant and unused bits are trimmed away.
* **Modulus width in the pipeline.** Only the N low bits of P travel down the
  pipeline. Bit N is known to be 1 and is checked at the input.
* **Resources.** At N = 4 the design synthesizes to 46 flip-flop bits and
  about 30 word-level cells. The published FPGA build reports 52 flip-flops
  and 14 LUTs. The RTL is generic and was not tuned to match those figures.
* **Timing not checked.** The published build multiplies 4-bit polynomials at
  a 10 ns clock. This RTL has not been run through an FPGA flow.
* **Wider steps not built.** Handling several multiplier bits per stage was
  suggested as a future improvement and is not built.

## Verification

Every testbench checks itself. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. The
reference results come from `tb/pmm_ref_pkg.sv`. It computes the full
carry-less product and then does long division by P from the top. It does not
use the pipeline's own recurrence.

| testbench | what it checks |
|-----------|----------------|
| `tb_and_block` | every 4-bit word with the control bit 0 and 1 |
| `tb_addm2` | all 256 pairs of 4-bit operands |
| `tb_prf` | every remainder against every degree-4 modulus, and both multiplexer paths |
| `tb_pmm_input_reg` | one-clock delay of random triples, and reset |
| `tb_pmm_stage` | first, middle and last forms of a stage under random inputs, and reset |
| `tb_pmm_top` | the test at the default size, described below |
| `tb_pmm_stream_n10` | N = 10, K = 50 back to back, described below |

`tb_pmm_top` runs at the default size and goes through these steps:

1. The three-triple example above, checked stage by stage and clock by clock.
2. All 768 (A, B) pairs for the three irreducible degree-4 moduli, fed back to
   back. Every result must arrive exactly N clocks after its input, and the
   burst must take N + K − 1 clocks.
3. 2000 random triples with random gaps.
4. An asynchronous reset in the middle of a stream.

The test also counts how often each mechanism occurred: reduction and
pass-through in the remainder former, zero multiplier bits, a full pipeline,
gaps in the stream, changes of modulus and the reset. Any mechanism that never
occurs counts as a failure.

`tb_pmm_stream_n10` feeds 50 triples back to back into a ten-stage pipeline.
The moduli are drawn from the 99 irreducible polynomials of degree 10. It runs
twice, with `IN_REG` 0 and 1, and checks a stream time of 59 and 60 clocks.

To run a testbench with Verilator 5 (from the folder that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert rtl/pmm_pkg.sv tb/pmm_ref_pkg.sv rtl/*.sv \
    tb/tb_pmm_top.sv --top-module tb_pmm_top -Mdir obj_tb_pmm_top
./obj_tb_pmm_top/Vtb_pmm_top
```

Replace `tb_pmm_top` with any other testbench name. Each testbench finishes in
well under a second.

## Files

* `rtl/pmm_pkg.sv`: the default size `DEFAULT_N`.
* `rtl/pmm_top.sv`: the pipeline (top).
* `rtl/pmm_stage.sv`: one stage with its buffer registers.
* `rtl/prf.sv`: the partial remainder former.
* `rtl/addm2.sv`: the adder modulo two.
* `rtl/and_block.sv`: the gating block.
* `rtl/pmm_input_reg.sv`: the optional input registers.
* `tb/`: the testbenches and the reference package.

To change the size, set `N` on `pmm_top`. Any N ≥ 2 works. The testbench
reference handles N up to 32.
