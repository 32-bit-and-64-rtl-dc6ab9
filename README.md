# CDC-7-XPUF: a component-differentially challenged XOR arbiter PUF

A physically unclonable function (PUF) turns a challenge into a response
that depends on the manufacturing variation of one particular chip. An
**arbiter PUF** races one edge down two nominally identical paths of
multiplexer stages. Each challenge bit decides whether the two edges stay in
their lanes or swap lanes at its stage. A flip-flop at the end records which
edge arrived first. Arbiter PUFs are small but easy to model with machine
learning. XORing several of them helps. Giving each component its *own*
challenge helps much more. The result is a **component-differentially
challenged XOR PUF (CDC-XPUF)**. With seven components and 64-bit challenges
(CDC-7-XPUF) it is regarded as resistant to the known modelling attacks.

This RTL implements the programmable-logic side of a CDC-7-XPUF system for a
Zynq-7000 class SoC:

* seven 64-stage arbiter chains, XORed into one response bit (32 stages for
  the 32-bit variant)
* a linear congruential PRNG that expands one seed challenge into
  per-component challenges
* a dual-port block RAM through which the processor posts seed challenges
  and collects 128-bit responses
* the wrapper state machine that runs it all

```
          processor side (port A)                       programmable logic
  ps_* ──► dual_port_bram ◄── port B ── xpuf_ctrl ──load/next──► challenge_gen (lcg_step)
                                          │   ▲                         │ 7 x K-bit challenges
                                     trig │   │ resp (2-flop sync)      ▼
                                          └───┼──────────────────► cdc_xpuf
                                              └──── XOR ◄── 7 x apuf_chain (K x apuf_stage + apuf_arbiter)
```

## The arbiter chain and how it is simulated

`apuf_stage` is one switch stage: two 2:1 multiplexers driven by the same
challenge bit. With the bit at 1 the edges stay in their lanes. With the bit
at 0 they swap lanes. `apuf_chain` feeds the trigger into both lanes of K
stages. It ends in `apuf_arbiter`, a D flip-flop whose data input is the top
lane and whose clock is the bottom lane. A response of 1 means the top edge
won the race.

The logic of a chain is trivial: both lanes always carry the same value. Its
whole function lies in picosecond delay differences, which neither a
synthesis tool nor a zero-delay simulator can see. Two consequences follow:

* **Simulation.** Each stage has four delay parameters, one for each input
  wire of its two multiplexers. `apuf_chain` fills them from
  `cdc_pkg::wire_delay_ps(DEVICE_SEED, stream, stage, wire)`. That is a
  60 ps base plus 0–39 ps taken from an integer hash. Both lanes have the
  same mean delay, which models a placement that balances the two lanes.
  The spread stands in for process variation. Changing `DEVICE_SEED` gives
  "another chip" with the same logic. Simulate with `--timing` so that
  Verilator honours the delays. All files use `timeunit 1ps`.
* **Synthesis.** Synthesis ignores the delays. The lane nets carry
  `keep`/`dont_touch` attributes so that the duplicated lanes survive
  optimisation. The PUF only works if each stage's two lanes are placed and
  routed symmetrically. That needs placement constraints (for example
  relative placement of the multiplexer LUTs per stage), and they are not
  part of this RTL. Without them the response will be strongly biased.

The arbiter output is asynchronous. `xpuf_ctrl` passes it through a two-flop
synchroniser. An edge pair closer than the flip-flop's setup/hold window
resolves unpredictably. In silicon this is where the small unsteadiness of a
PUF comes from. The simulation model has no such window: exact ties are
avoided by the testbenches, and responses are perfectly repeatable.

## Component-differential challenges

`cdc_xpuf` fires all seven chains with one trigger but gives each its own
K-bit challenge, and XORs the seven answers. The challenges come from the
PRNG of Eq. (1):

    C(n+1) = (a * C(n) + g) mod 2^K

`lcg_step` computes one step: a K×K multiplier (low half only) and an adder.
`challenge_gen` holds the state and fills the streams one per clock:

* a seed `C(0)` is loaded
* each request produces the next seven values in `STREAMS` cycles
* evaluation *j* of a seed therefore uses `C(7j+1) … C(7j+7)` for streams
  0…6

One shared multiplier keeps the 64-bit version small; seven parallel
multipliers would give one set per cycle instead.

The constants are a design choice (any full-period pair, with `a mod 4 = 1`
and `g` odd, works). `cdc_pkg::lcg_a/lcg_g` select them:

| K  | a                     | g                     |
|----|-----------------------|-----------------------|
| 64 | 6364136223846793005   | 1442695040888963407   |
| 32 | 1664525               | 1013904223            |

Other values of K use the low bits of the 64-bit pair.

## Processor interface: the BRAM mailbox

The processor reaches the logic only through port A of `dual_port_bram`:
2048 × 32 bits, read-first, one-cycle read latency, one clock (125 MHz from
the processor side). Port B wins a write collision. The word layout (from
`cdc_pkg`) is:

| word address            | written by | contents                                               |
|-------------------------|------------|--------------------------------------------------------|
| 0 `MB_CMD`              | processor  | job token; a new non-zero value starts a job           |
| 1 `MB_COUNT`            | processor  | number of seed challenges in the job                   |
| 2 `MB_DONE`             | logic      | token of the last finished job                         |
| 16… `MB_CH_BASE`        | processor  | seed challenges, K/32 words each, low word first       |
| 1024… `MB_RSP_BASE`     | logic      | responses, 4 words (128 bits) each, bit 0 = first eval |

To run a job, the processor:

1. writes the challenges and the count
2. writes a token that differs from the previous one
3. polls `MB_DONE` until it shows that token

Re-writing an old token does nothing. Counts above the mailbox capacity are
clamped: 256 challenges at K = 64, 1008 at K = 32. The published measurement
campaign repeats every challenge 32 times. The processor does that by
posting the job again.

## Wrapper state machine and timing

`xpuf_ctrl` polls `MB_CMD`, reads the count and then, for each seed:

1. reads the seed and loads the PRNG
2. builds a 128-bit response, one bit per evaluation:
   * request a challenge set (`STREAMS` cycles)
   * raise the trigger for `EVAL_CYCLES` cycles and sample the synchronised
     response in the last one
   * drop the trigger for `IDLE_CYCLES` cycles so that every lane is low
     again before the challenges change
3. writes the four response words

An assertion checks that the trigger is low while challenges are generated.
One evaluation takes `STREAMS + EVAL_CYCLES + IDLE_CYCLES + 2` cycles: 25 at
the defaults, so one 128-bit response takes 3,200 cycles (25.6 µs at
125 MHz). `EVAL_CYCLES` (default 8, at least 3) must cover the slowest chain
plus the synchroniser. In silicon a 64-stage chain of LUT multiplexers can
take several clock periods, so choose it from the timing report.

## Parameters

| parameter     | default | meaning                                                     |
|---------------|---------|-------------------------------------------------------------|
| `K`           | 64      | stages per chain = challenge width (32 for the 32-bit PUF) |
| `STREAMS`     | 7       | component arbiter PUFs                                      |
| `RESP_BITS`   | 128     | response length per seed challenge (multiple of 32)        |
| `AW`          | 11      | BRAM address width (≥ 11 for the mailbox layout)           |
| `EVAL_CYCLES` | 8       | trigger-high cycles per evaluation                          |
| `IDLE_CYCLES` | 8       | trigger-low cycles per evaluation                           |
| `DEVICE_SEED` | 1       | simulated chip instance (delays only)                       |

## Files

RTL (`rtl/`):

* `cdc_pkg.sv`: constants, mailbox map, delay model
* `apuf_stage.sv`, `apuf_arbiter.sv`, `apuf_chain.sv`: one arbiter PUF
* `cdc_xpuf.sv`: the XOR PUF core
* `lcg_step.sv`, `challenge_gen.sv`: the PRNG
* `dual_port_bram.sv`: the shared BRAM
* `xpuf_ctrl.sv`: the wrapper state machine
* `cdc7_xpuf_pl.sv`: the top

Testbenches (`tb/`): one self-checking testbench per module (`tb_<module>.sv`)
and `tb_puf_metrics.sv`. The reference models are in `puf_ref_pkg.sv`:

* an additive delay model that sums the same per-wire delays stage by stage
  and swaps lanes where a bit is 0
* Eq. (1) in 64-bit arithmetic

Each testbench prints `TB_RESULT checks=N failures=M`.

* `tb_cdc7_xpuf_pl` runs the top at its default size. A host process posts
  two 64-bit seeds, checks all 256 response bits against the model, repeats
  a challenge, re-sends an old token and sends an empty job.
* `tb_xpuf_ctrl` uses a stand-in PUF to check the evaluation period, the
  challenge stability while triggered, the token rules and the clamping of
  an oversized job.
* `tb_puf_metrics` evaluates three simulated chips of the 32-bit core on
  128-bit responses. It checks every bit and reports uniformity (fraction of
  ones), diffuseness (Hori's pairwise-distance measure) and uniqueness (mean
  inter-chip Hamming distance). Because the model has no noise, steadiness
  and correctness would be 1 by definition and are not computed.

Simulate, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/cdc_pkg.sv tb/puf_ref_pkg.sv tb/tb_cdc7_xpuf_pl.sv --top-module tb_cdc7_xpuf_pl
    ./obj_dir/Vtb_cdc7_xpuf_pl

Build time grows with the number of chains. Each stage has its own delay
parameters, so Verilator makes a separate module for every stage. The
default top (448 stages) builds in about two minutes and runs in about two
more. Lint warnings about unused package constants and outputs (`comp_o`,
`ready_o`, `busy_o` of the generator in the top) are expected.

## How far it follows the published design, and where it departs

Taken from the design:

* the two-multiplexer stage
* the D flip-flop arbiter with the top lane on D and the bottom lane on the
  clock
* the XOR of seven components, each with its own challenge
* the PRNG form of Eq. (1) with modulus 2^K
* the 32- and 64-bit variants
* 128-bit responses
* a 125 MHz clock from the processor side
* the dual access BRAM as the only channel to the processor
* a state-machine wrapper

Choices of this implementation:

* the PRNG constants
* which value of a challenge bit means "straight"
* bit k steering stage k
* how PRNG outputs are assigned to streams and evaluations
* one sequential multiplier
* the mailbox protocol and layout
* trigger timing and the synchroniser
* BRAM size and collision rule
* asynchronous active-low reset

Outside this RTL:

* the processor software, the UART link (230,400 bit/s) and the USB bridge
* the PC-side metric computation
* the placement constraints that make the lanes symmetric

A separate DSP-per-stream PRNG arrangement, which the published resource
figures (12 and 68 DSP blocks) may reflect, is not reproduced. Silicon
metrics such as steadiness and the measured uniqueness cannot come from a
delay-hash model. The numbers `tb_puf_metrics` prints describe that model,
not a chip.
