# A turbo codec for sensor nodes built on four add-compare-select units

Turbo codes let a wireless sensor transmit with less energy for the same bit
error rate. The price is paid at the receiver: a turbo decoder runs the BCJR
algorithm over and over, and its energy can eat up what the transmitter saved.
This design keeps that decoder small. It uses the LUT-Log-BCJR variant, which
approximates the optimal Log-BCJR more closely than Max-Log-BCJR, and it has no
dedicated hardware for the branch metrics, the forward recursion, the backward
recursion or the extrinsic output. All of them are broken down into one kind of
operation, done by a tiny **add-compare-select (ACS) unit**:

* an addition or a subtraction is one ACS operation;
* the Jacobian logarithm `max*(p,q) = max(p,q) + ln(1 + e^-|p-q|)`, the core of
  Log-BCJR, is four ACS operations, using a four-entry look-up table for the
  correction term.

The constituent code has m = 2 memory elements, so its trellis has 2^m = 4
states. Four ACS units work side by side, one per state, so the max* of all
four states in a trellis step takes 4 clock cycles. A single shared unit would
take 16.

The RTL contains:

* the ACS unit and the four-lane **LUT-Log-BCJR processor** around it (main
  memory, register bank, step controller);
* a complete **iterative turbo decoder** that runs both component decoders as
  command programs on that processor;
* the matching rate-1/3 **turbo encoder**;
* a top level, `turbo_wsn_top`, holding encoder and decoder side by side.

All SystemVerilog is synthesizable (IEEE 1800-2017) and every module has a
self-checking testbench.

## Number format

Every soft value is a 7-bit two's complement number with 5 integer and 2
fractional bits (Q5.2). One LSB is 0.25 and the range is -16 .. +15.75. LLRs use
the convention LLR = ln(P(bit=0) / P(bit=1)), so a positive value favours 0.

The ACS adder wraps modulo 2^7 and never saturates. All metrics are therefore
modulo numbers. Differences stay correct as long as the true difference lies
within +-16, and a max* decision is right as long as the two operands are
closer than 16. This property sets the limits discussed under
[Keeping the metrics inside 7 bits](#keeping-the-metrics-inside-7-bits).

## The ACS unit (`rtl/acs_unit.sv`)

One 7-bit adder does all the work, controlled by a 6-bit operation code
O = O0 O1 O2 O3 O4 O5. O0 is the leftmost character and is stored in bit 5 of
`opcode_t`.

* `q` passes through an XOR with O0: O0 = 1 inverts it.
* The carry-in is O0 when O1 = 0, and NOT C0 when O1 = 1.
* The sum's MSB, ANDed with O2, inverts the whole sum (one's complement) to
  give `r`.
* C0, C1 and C2 are 1-bit registers. Each loads the sum's MSB when O3, O4 or O5
  respectively is 1.

| O        | r                                        | flag            |
|----------|------------------------------------------|-----------------|
| `000000` | p + q                                    |                 |
| `100000` | p - q                                    |                 |
| `101100` | p - q if p >= q, else (q - p) - 0.25     | C0 = (p < q)    |
| `110010` | p - q, minus 0.25 if C0 = 1              | C1 = (r < 0)    |
| `110001` | p - q, minus 0.25 if C0 = 1              | C2 = (r < 0)    |

`r` is combinational. The flags update at the clock edge, so one operation
takes one clock.

## max* in four ACS steps

This is the least obvious part of the design. The correction
ln(1 + e^-|d|), with d = p - q, is approximated by a four-entry table:

| \|d\|          | correction | C1 | C2 |
|----------------|------------|----|----|
| 0              | 0.75       | 0  | 0  |
| 0.25 .. 0.75   | 0.5        | 0  | 1  |
| 1.0 .. 2.0     | 0.25       | 1  | 0  |
| > 2.0          | 0          | 1  | 1  |

The four steps, and where each lane's operands come from
(`lut_log_bcjr_processor.sv`, per-lane operand mux):

1. **OP1 `101100`**, with p and q from the main memory.
   Result r1 = |d| - 0.25·C0, where C0 = (p < q). The negative case costs
   0.25 because it is a one's complement instead of a two's complement
   negation. r1 is stored in the lane's register MAXi.
2. **OP2 `110010`**, with p = 0.75 from the register bank and q = r1.
   The carry-in is NOT C0, which removes that 0.25 again, so
   r = 0.75 - |d| exactly. C1 = 1 exactly when |d| > 0.75. Nothing is stored.
3. **OP3 `110001`**, with p = 2 if C1 = 1 (else 0) and q = r1.
   C2 = |d| > 2 or |d| > 0, depending on which threshold was used.
4. **OP4 `000000`**, with p = q if C0 = 1 (else p), re-read from the main
   memory, and the table value chosen by {C1, C2} added. The result is stored
   in MAXi.

Example (tested): p = 2.25 (`0001001`) and q = 1.25 (`0000101`). OP1 gives
r = 1.0 (`0000100`) and C0 = 0. OP2 finds 1.0 > 0.75, so C1 = 1. OP3 compares
with 2 and gets C2 = 0. OP4 returns 2.25 + 0.25 = 2.5.

The same datapath gives a plain **max** or **min** in two steps: OP1, then the
operand picked by C0 plus 0. If the four table entries are rewritten to 0
through the register bank, max* becomes max and the decoder runs Max-Log-BCJR
instead.

## The LUT-Log-BCJR processor (`rtl/lut_log_bcjr_processor.sv`)

```
 mem in ──► MAIN MEMORY ──p,q──► ACS1 ACS2 ACS3 ACS4 ──r──► REGISTER BANK (MAX1..4, LUT constants)
 mem out ◄──     ▲                       ▲ opcode                  │
                 └──────────────── write-back ◄────────────────────┘
                                  ACS CONTROLLER (command in, done out)
```

* **`main_memory`** has 512 words of Q5.2. It has the `mem in` write port, the
  `mem out` read port, one p and one q read port per lane (combinational) and
  one write-back port per lane. When several writes hit the same word, the
  highest lane wins, then the lower lanes, then `mem in`.
* **`register_bank`** holds:
  * the seven LUT constants, with reset values 0.75, 0, 2 and
    0.75 / 0.5 / 0.25 / 0, rewritable through `reg in` and readable through
    `reg out` (index `kidx_e`);
  * the four result registers MAX1..MAX4.
* **`acs_controller`** accepts one command at a time on `cmd_valid` /
  `cmd_ready`. A command (`cmd_t`) has an operation, a 4-bit lane mask, and a
  p, q and destination address for each lane. All enabled lanes execute it at
  once.

Timing, measured from the cycle a command is accepted to `done`:

| command          | ACS cycles | write-back | accept → done | accept → next accept |
|------------------|------------|------------|---------------|----------------------|
| `CMD_ADD`, `CMD_SUB` | 1      | 1          | 2             | 3                    |
| `CMD_MAX`, `CMD_MIN` | 2      | 1          | 3             | 4                    |
| `CMD_MAXSTAR`    | 4          | 1          | 5             | 6                    |

Only one command is in flight. Results are in memory when `done` pulses, so
the next command can read them.

## The turbo decoder (`rtl/turbo_decoder.sv`, `rtl/bcjr_sequencer.sv`)

The two component decoders share the one processor and take turns: decoder 1,
then decoder 2, make one iteration. `ITER` = 8 iterations run per frame.

**The component decoder is a program.** `bcjr_sequencer` holds no arithmetic.
It generates the command stream of one decoder pass, with lane s working on
trellis state s. The branch metric of a branch with uncoded bit y and coded
(parity) bit c at step k is

    gamma = (1-y)·yh[k] + (1-c)·Lp[k],   yh[k] = La[k] + Ls[k]

So only four values ever occur: yh + Lp, yh, Lp and 0. `yh` and `g00 = yh + Lp`
are computed for the whole frame first, 4 steps per command. Then:

* **Forward, per step:** two adds (alpha of each predecessor plus its branch
  metric) and one max* give alpha_{k+1} for all four states.
* **Backward, per step, 13 commands:**
  * 2 adds for gamma + beta_{k+1} of the two outgoing branches;
  * 4 adds for the branch deltas `alpha_k + (1-c)·Lp + beta_{k+1}`, which
    leave out the yh term, so the result is extrinsic;
  * 2 levels of max* that reduce the four y = 0 and four y = 1 deltas;
  * a subtraction giving the extrinsic LLR;
  * a min and a max that clip it;
  * an add that forms the posterior yh + extrinsic;
  * a max* giving beta_k.

Start values: alpha_0 = (0, -6, -6, -6), since the encoder starts in state 0.
beta_N = 0 for all states, since the trellis is not terminated.

**Interleaving by address.** Decoder 2 reads the systematic and a-priori words
of step k at position pi(k), and writes its extrinsic and posterior words back
to pi(k). The extrinsic array thus always stays in natural order. Neither an
interleaver nor a deinterleaver buffer is needed.

**Memory map** for a frame of N bits:

| words | region |
|-------|--------|
| k·N .. k·N+N-1, k = 0..6 | systematic, parity 1, parity 2, extrinsic, yh, g00, posterior |
| 7N .. 11N+3 | alpha for steps 0..N |
| 11N+4 .. 11N+42 | beta and scratch words, plus the constants 0, -6, +1.5, -1.5 (offsets in `turbo_pkg`) |

N = 32 needs 395 of the 512 words.

**Operation:**

1. While the decoder is idle, the host writes the channel LLRs through
   `ld_we`, `ld_sel` (0 systematic, 1 parity 1, 2 parity 2), `ld_idx` and
   `ld_data`.
2. `start` clears the extrinsic words and writes the constants (N + 4
   cycles), then runs the iterations.
3. `decision_stage` then reads the posterior LLRs in order. It outputs one bit
   per clock on `dec_valid` / `dec_bit` / `dec_last`, with bit = 1 for a
   negative LLR.

A half-iteration is 63.5·N + 6 cycles, so a 32-bit frame with 8 iterations
takes about 32.6k cycles.

### Keeping the metrics inside 7 bits

Wrapping arithmetic handles the growth of alpha and beta on its own, because
only their differences matter. The delta of a branch, though, adds alpha and
beta. The max* over deltas is only correct while the spread of alpha + beta
stays below 16. Without limits, the extrinsic LLRs grow from iteration to
iteration, and after a few iterations about half of the bits decode wrongly.
The decoder therefore:

* saturates the channel LLRs at +-`CH_CLAMP` = +-2.0 as they are loaded;
* clips every extrinsic LLR at +-`EXT_CLIP` = +-1.5, using the processor's
  min/max commands.

These levels were chosen by simulation. With them, the decoder makes no errors
at noise sigma = 0.5 and clearly beats a hard decision at sigma = 0.9 (for
example 4 errors against 28 in 192 bits).

## The turbo encoder (`rtl/turbo_encoder.sv`)

Two identical recursive systematic encoders (`rsc_encoder`) run in parallel.
They use the 4-state (7,5) code: feedback 1 + D + D^2, feedforward 1 + D^2. The
second encoder is fed through a row-column block `interleaver`:

    pi(i) = (i mod ROWS)·COLS + i div ROWS,   ROWS = 4, COLS = 8, N = 32

A frame is first collected into the interleaver (`in_valid` / `in_ready`, one
bit per clock). It is then sent as N consecutive triples `sys`, `par1`, `par2`
with `out_last` on the final one. Both encoders start each frame in state 0 and
are not terminated. `state1` and `state2` show the encoder registers.

## Top level (`rtl/turbo_wsn_top.sv`)

The encoder (`enc_*` ports) and the decoder (`ld_*`, `dec_*`, `mem_out_*`,
`reg_*` ports) share only `clk` and the synchronous active-low `rst_n`. The
radio channel between them (modulation, noise, soft demodulation) is not part
of the design. Parameters: `ROWS`, `COLS` (frame length and interleaver) and
`ITER`.

## What follows the published architecture and what is this design's own

Taken from the published architecture:

* the ACS unit's gates and opcode table;
* the four-step max* with its thresholds 0.75 / 0 / 2 and corrections
  0.75 / 0.5 / 0.25 / 0;
* the Q5.2 format;
* 2^m = 4 parallel ACS units with a main memory (`mem in` / `mem out`) and a
  register bank (`reg in` / `reg out`);
* the Log-BCJR equations;
* the parallel-concatenated encoder;
* the iterative decoder structure with about 8 iterations.

Choices of this design, where the source is silent:

* the memory depth (512);
* the command interface and the separate write-back cycle;
* all reset behaviour (synchronous, active low);
* the constituent code polynomials and the interleaver;
* the frame length;
* the start values of alpha and beta;
* the order of the max* tree;
* the whole command schedule of the component decoder and its memory map;
* one processor shared by both component decoders;
* the hard-decision rule and its read-out;
* the host interfaces.

Additions that go beyond the source:

* the plain max/min commands;
* the channel LLR saturation and the extrinsic clipping, without which the
  7-bit datapath does not decode.

Known differences from the source's figures:

* Its ACS schematic puts a register on r. Here r is combinational, and the
  register bank's MAX register plays that role, still one operation per clock.
* Its processor waveform shows a separate opcode signal per ACS unit. Here the
  four are still brought out separately (`acs_op`), but the controller drives
  them all with the same opcode, since every lane runs the same step.
* Its encoder waveform takes the interleaved bit as an input. Here the encoder
  interleaves internally.
* It reports its FPGA resource usage for an unnamed part of the design. That
  cannot be compared with this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
values worked out independently of the RTL, and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_acs_unit` | every opcode against an arithmetic model of the table; 1500 full max* sequences against the LUT formula; the example above |
| `tb_main_memory`, `tb_register_bank` | all ports against shadow models, including write collisions; constant reset values |
| `tb_acs_controller` | the opcode sequence, enables and latency of every command kind, cycle by cycle |
| `tb_lut_log_bcjr_processor` | random commands on random memory against a model; the latencies; that zeroing the corrections through `reg in` turns max* into max |
| `tb_bcjr_sequencer` | one pass of each component decoder: every alpha, extrinsic and posterior word bit-exact against a software LUT-Log-BCJR with the same 7-bit arithmetic; the command count per kind |
| `tb_decision_stage` | address order, sign rule, stream framing |
| `tb_turbo_decoder` | 10 noisy frames: memory contents and decisions bit-exact against the software model; no errors at sigma 0.5; fewer errors than hard decision at sigma 0.9; run time against the schedule |
| `tb_rsc_encoder`, `tb_interleaver`, `tb_turbo_encoder` | against a state table, the permutation formula, and a software turbo encoder |
| `tb_turbo_wsn_top` | end to end at the default parameters: RTL encoder → noisy channel → RTL decoder over 8 frames, one of them in Max-Log mode. It counts every command kind, each of the four LUT outcomes, input saturation, extrinsic clipping, both component decoders and all iterations, and fails if any never occurred |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/acs_pkg.sv rtl/turbo_pkg.sv tb/tb_turbo_wsn_top.sv --top-module tb_turbo_wsn_top
./obj_dir/Vtb_turbo_wsn_top
```

Replace the last file and the top module name for any other testbench. Every
testbench finishes in well under a second of run time.

## Changing the design

* **Frame length:** `ROWS`, `COLS` on `turbo_wsn_top` / `turbo_decoder` /
  `turbo_encoder`. N = ROWS·COLS must be a multiple of 4 and satisfy
  11·N + 43 <= 2^AW. The sequencer stops elaboration otherwise.
* **Memory depth:** `AW` in `acs_pkg`.
* **Word width:** `W` in `acs_pkg`. The constants in `acs_pkg` and the clip and
  saturation levels (`CH_CLAMP`, `EXT_CLIP`, `NEG_INIT`) are in Q5.2 LSBs and
  must be rescaled with it.
* **Iterations:** `ITER`.
* **Max-Log-BCJR:** write 0 into the four correction constants through
  `reg_in_*` before `start`.
