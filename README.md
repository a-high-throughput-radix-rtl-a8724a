# Radix-4 log-MAP decoder with trace-back LLR unit

A turbo decoder spends most of its time in its soft-in/soft-out (SISO)
component decoder, and the SISO's speed is set by the state-metric recursion:
each new metric depends on the previous one, so the recursion cannot be
pipelined. This design decodes **two trellis steps per clock** by running the
recursion on the radix-4 trellis, where one step jumps from even time k
directly to k+2. It is built around three ideas:

1. **A fast radix-4 recursion unit.** The four-input max* is approximated in two
   stages, and the additions are rearranged so that the critical path is about
   three adder delays. Correction terms are added one clock late
   (offset-add-compare-select), and candidates are compared while they are
   still in carry-save form.
2. **A cheaper radix-4 LLR unit.** The first bit of each radix-4 step gets its
   LLR by *trace-back*. The two path metrics leaving each state are recovered
   from the backward metric and the difference that the backward recursion
   already computed. They are not recomputed from the odd-time metrics.
3. **A two-bank sliding window.** A dummy backward recursion runs directly on
   the arriving symbols. As a result, two input memory banks are enough and
   the latency is about two windows.

The code is the 16-state recursive systematic code of the CCSDS turbo code
(feedback 1+D^3+D^4, parity 1+D+D^3+D^4). The default sizes handle the CCSDS
frame of 1784 information bits.

## Using the decoder

Top module: `map_decoder` (parameters `WIN_L = 32` bits per window,
`MAX_WIN = 56` windows per frame).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `n_win` | in | request a frame of `n_win` windows (1..`MAX_WIN`); accepted while `start_ready` is high |
| `start_ready` | out | no request is waiting; one request can be queued behind the frame in progress |
| `busy` | out | some window is in flight |
| `in_ready` | out | a soft-input word is consumed this clock |
| `in_valid` | in | must be high whenever `in_ready` is (assertion); there is no back-pressure |
| `in_sym` | in | `sym2_t`: systematic `ys`, parity `yp` (5,2) and a-priori `la` (6,2) of two trellis steps (`s0` = bit 2i, `s1` = bit 2i+1) |
| `llr_valid`, `llr_step` | out | an LLR pair for radix-4 step `llr_step` |
| `llr0`, `llr1` | out | L(u) of bits 2·`llr_step` and 2·`llr_step`+1, 9-bit (9,2), positive means bit 1 |
| `frame_done` | out | high with the last LLR pair |

**Input order.** A frame's windows arrive directly after those of the frame
before it, or from the clock after `start` if the decoder is idle. `in_ready`
is then high for `n_win`·16 clocks. The
windows arrive in order, but **within a window the steps arrive last-first**:
step w·16+15 first and step w·16 last. The dummy backward recursion consumes
the symbols as they arrive, which is why it needs this order. The LLRs leave
in the same per-window reverse order. The first LLRs appear two windows after
the first input.

**Timing.** On an idle decoder a frame takes (`n_win`+2)·16 + 5 clocks from
`start` to `frame_done`; a 1792-bit frame takes 933 clocks. Frames requested
back to back overlap: the next frame arrives while the last two windows of
the previous one are still in the forward and backward recursions. The
decoder then delivers one LLR pair every clock without a gap; two 1792-bit
frames take 1829 clocks. At two bits per clock, 600 Mbit/s needs a 300 MHz
clock.

**Input scaling.** `ys` and `yp` are the received samples already multiplied
by the channel reliability Lc, in quarter units. Bit 1 is sent as +1. The
branch metric of a branch with input bit u and parity bit p is
u·(la+ys) + p·yp. This differs from the textbook ½(x·La + Lc(ys·xs + yp·xp))
only by a constant per step, which cancels.

**Frame boundaries.** The forward recursion starts in state 0. The other
states start 16.0 lower. The backward recursion of the last window starts
from all-equal metrics, and no tail handling is done. To decode a frame that
is not a multiple of 32 bits, pad it with zero symbols. For example,
1784 information bits plus 4 termination bits plus 4 zero steps make
56 windows.

The decoder outputs the full LLR L(u). The extrinsic value (L minus a-priori
and systematic terms), the interleaver and the iteration loop of a complete
turbo decoder are outside this design.

## Number formats and wrapped metrics

All values are two's complement with 2 fractional bits (quarter units):

| quantity | format |
|---|---|
| received systematic / parity | (5,2) |
| a-priori (extrinsic) input | (6,2) |
| radix-2 branch metric la+ys | (7,2) |
| state metrics, radix-4 branch sums, LLRs | (9,2) |

State metrics are **never normalised**. They wrap modulo 512 and are compared
only through the MSB of their wrapped difference. This is exact as long as
every set of compared metrics spans less than 256 quarter units. The LLR is
the wrapped difference of two such values, so it is valid under the same
condition. The end-to-end test stayed bit-exact against an unbounded integer
model, including noiseless frames at full-scale input (±15). No formal bound
is claimed. If you need a larger margin, widen `SMW` in `map_pkg`.

The max* correction term ln(1+e^-|d|) is a small table in quarter units:
lut(d) = round(4·ln(1+exp(-|d|/4))). This gives 3 for |d| = 0, 2 for 1..3,
1 for 4..8 and 0 beyond.

## The radix-4 recursion unit (`r4_acs`)

This is the part that sets the clock rate. For each state, four two-step
paths compete. The candidates come in two pairs, and the two candidates of a
pair pass through the same odd-time state. For the backward recursion this
means they share the first input bit.

```
max*(w,x,y,z) ~ max(max(w,x), max(y,z))
              + lut(max(w,x) - max(y,z))          second-stage correction
              + lut of the pair that won          first-stage correction
```

Compared with an exact max* over four values, this replaces the inner max*
by max and reuses the winning pair's correction.

How a step is computed in one clock:

1. **Split metric (offset-add-compare-select).** Each stored metric is kept
   as two registered parts. A is the selected maximum. B is the sum of the
   two registered correction terms, and that adder sits *after* the register.
   So the corrections of step n are added in step n+1, inside the next
   additions.
2. **Carry-save row.** A + B + γ is reduced by one row of full adders to a
   carry-save pair (a, b). No carry propagation happens yet.
3. **Hybrid add/subtract (`hybrid_addsub`).** The first-stage comparison
   needs (a0+b0) − (a1+b1). Two full-adder rows take b0, a0 and ¬a1, then
   the row-1 carries (a 1 injected at bit 0) and ¬b1. A single
   carry-propagate adder, with a second injected 1, finishes the job. The
   sign of the result drives the pair multiplexer, and the value addresses
   the correction table. In parallel a plain adder resolves a+b, which is the
   value the multiplexer passes on.
4. **Second stage.** The two pair maxima are subtracted. Call the result
   Diff. The larger maximum, the winning pair's correction and lut(Diff) are
   registered. Diff itself is also registered and exported, because the
   trace-back unit needs it.

The critical path is roughly CSA → add/sub → subtract → multiplexer: about
three adder delays. `acs_array` wires 16 such units to the trellis (forward or
backward, parameter `BACKWARD`), together with the branch metric unit (`bmu`)
and a start multiplexer on the feedback. The multiplexer lets a recursion
start from given metrics, with B = 0.

## Sliding-window schedule (`sw_ctrl`)

Time is cut into slots of 16 clocks. Every window passes through three
stages, one slot each, and a small descriptor (valid, first/last window of
its frame, window index) travels with it from stage to stage. Numbering the
windows of the input stream 0, 1, 2, … across frame boundaries, in slot t:

| unit | works on | data source |
|---|---|---|
| input RAM write + dummy β | window t (arriving, last step first) | the input port, directly |
| forward α recursion | window t−1, first step first | bank (t−1) mod 2 |
| backward β recursion + LLR | window t−2, last step first | bank t mod 2 |

The backward read of bank t mod 2 and the write of the arriving window go to
the **same address in the same clock**. The old word is read, then
overwritten. So each bank cycles through written → read forward →
read backward while being refilled, and the two banks stay in opposite
phases.

The bank for each role simply alternates from slot to slot, so frames need
no special treatment in the memories. The forward recursion restarts from
the known initial state whenever its window is the first of a frame.

The dummy recursion restarts from all-equal metrics at every slot. Its
register still holds last slot's final value during the first clock of the
new slot. At that moment the backward recursion starts from it through its
start multiplexer. The last window of a frame has no successor in its own
frame, so its backward pass starts from all-equal metrics instead, even when
the next frame is already arriving.

The α values of each window go to `alpha_ram`. This memory has two ping-pong
banks of 16 vectors of 16×9 bits, because a window is written in forward
order while the previous one is read backward.

## LLR unit (`llr_unit`) and trace-back (`tb_unit`)

A radix-4 step k→k+2 decides two bits:

* **u(k+1), by trace-back.** The backward unit computes β_k(s) as
  max(P0', P1') + lut(Diff) + c. Here P0'/P1' are the best paths through the
  two odd-time successors, Diff = P0' − P1', and c is the winner's pair
  correction. `tb_unit` inverts this:
  path0 = β_k(s) − lut(Diff) is the winner and path1 = path0 − |Diff| is the
  loser. The sign of Diff says which one belongs to first bit 0 and which to
  bit 1. One adder per path then adds α_k(s). A max* tree over the 16 paths
  of each bit value gives the two LLR terms. The loser carries the winner's
  correction c; this approximation is inherent to the method.
* **u(k+2), conventionally.** All 64 paths α_k(s'') + γ(two steps) + β_{k+2}(s)
  are formed and reduced by a max* tree over the 32 paths of each bit value.

The LLR unit uses the exact two-input max* (max + lut). Each path has four
pipeline stages. The conventional path gets one extra register so that both
LLRs leave together, five clocks after the step.

## Turbo decoding with this SISO

The decoder is one soft-in/soft-out component. A turbo decoder runs it twice
per iteration: once on the code in natural order, once on the interleaved
code. Between the passes it exchanges extrinsic information,
Le = L − La − Ys, where L is the output LLR, La the a-priori input and Ys
the systematic channel value. The interleaver, the extrinsic arithmetic and
the iteration control are not part of this RTL. `tb_turbo_ccsds` models them
around one `map_decoder` at its default size:

* the rate-1/3 CCSDS code with 1784 information bits, with both component
  codes left unterminated and the last 8 steps fed as erased symbols;
* the CCSDS interleaver (k1 = 8, k2 = 223, primes 31, 37, 43, 47, 53, 59,
  61, 67);
* BPSK over AWGN, with channel values 2y/σ² quantised to (5,2) and extrinsic
  values saturated to the (6,2) a-priori format;
* eight iterations, that is 16 passes of 933 clocks per frame.

Bit-error rate after eight iterations, over 40 frames (71,360 bits) per
point:

| Eb/N0 | errors | BER |
|---|---|---|
| 0.3 dB | 1488 | 2.1e-2 |
| 0.5 dB | 7 | 1e-4 |
| 0.8 dB | 0 | < 1.4e-5 |

The testbench fails if the BER rises with Eb/N0 or exceeds 1e-3 at 0.8 dB.
It also fails if iterating ever leaves a frame with more errors than the
first pass, or if a frame at 2 dB is not decoded without error. Turbo errors
cluster in a few frames, so the 0.5 dB figure is rough. The result depends
on the channel scaling and on saturating the input to (5,2), and both are
choices of this testbench.

## What follows the source architecture and what is this design's choice

Follows the architecture:

* radix-4 recursion with the two-stage max* approximation and late
  correction;
* the carry-save row and the two-row hybrid add/subtract with its injected
  ones;
* two input banks with write-after-read;
* a dummy backward recursion fed from the input;
* the start multiplexer seeding β from the dummy result;
* trace-back LLR for the first bit of each step and conventional LLR for the
  second;
* the quantisation formats.

Chosen here, because the source leaves these open:

* the window length (32 bits) and the maximum frame (56 windows);
* the per-window reverse input order (the reading of the schedule drawing
  that lets the dummy recursion work on arriving data);
* wrap-around metrics with no normalisation;
* the correction table values and tie-breaking (the first pair wins on
  equality);
* the CCSDS polynomials and the state encoding;
* the branch metric form;
* asynchronous-read memories and the ping-pong α memory;
* the frame handshake, the descriptor pipeline that lets frames follow
  each other without a gap, and the start and end states;
* the pipeline cut points inside the max* trees;
* |Diff| rather than a signed Diff in the trace-back subtraction. This is
  the only reading under which the survivor selection rule returns the two
  path values.

The stand-alone `hybrid_addsub` defaults to 10 bits, the width of the
published adder diagram. The recursion uses it at the 9-bit metric width.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference functions
shared by the block tests (`map_ref_pkg`) use unbounded integers and real
arithmetic for the correction table.

* `tb_map_decoder` drives the whole decoder at its default size. A
  behavioural CCSDS encoder produces the data, which is mapped to ±A with
  approximately Gaussian noise and quantised. The frames include 1-, 3- and
  56-window frames and a 1784-bit frame with termination and padding. The
  testbench recomputes everything with an integer model of the same
  algorithm and requires:
  * bit-exact LLRs (modulo 512);
  * the right output order;
  * contiguous output;
  * the latency (`n_win`+2)·16+5, also for two frames requested back to
    back (counting both frames' windows);
  * error-free hard decisions on noiseless frames.

  It also counts dummy-seeded windows, end-of-frame windows and
  write-after-read clocks, and fails if any of them never occurred.
* `tb_acs_array` checks the forward and backward arrays step by step,
  including restarts and stalls. `tb_r4_acs`, `tb_hybrid_addsub`, `tb_bmu`,
  `tb_tb_unit`, `tb_llr_unit`, `tb_sw_ctrl`, `tb_input_ram` and
  `tb_alpha_ram` check the single blocks.
* `tb_turbo_ccsds` uses the decoder as the component decoder of a complete
  turbo decoder; see the next section.

To run a test with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_map_decoder \
  -y rtl -y tb +libext+.sv rtl/map_pkg.sv tb/map_ref_pkg.sv tb/tb_map_decoder.sv
./obj_dir/Vtb_map_decoder
```

For the other tests, replace the top module and testbench file.

Not verified:

* the clock rate or area of a synthesized netlist;
* bit-error rates below about 1e-4, which need far more frames than a
  simulation of a few seconds decodes.

## Files

| file | content |
|---|---|
| `rtl/map_pkg.sv` | formats, `sym_t`/`sym2_t`, trellis functions, correction table, max* |
| `rtl/map_decoder.sv` | top level |
| `rtl/sw_ctrl.sv` | sliding-window schedule |
| `rtl/input_ram.sv`, `rtl/alpha_ram.sv` | memories |
| `rtl/acs_array.sv`, `rtl/r4_acs.sv`, `rtl/hybrid_addsub.sv`, `rtl/bmu.sv` | recursion |
| `rtl/llr_unit.sv`, `rtl/tb_unit.sv` | soft output |
| `tb/*.sv` | testbenches, reference package and the turbo-decoding model |
