# Timing-error-tolerant digital filters

When supply voltage is pushed down or process variation is large, a register
can occasionally capture its input before the combinational logic in front of
it has settled. This RTL makes such a transient timing error harmless in two
digital filters. It does not stop the clock and it does not slow it down.

Every pipeline register samples its input twice:

- a **main** flip-flop samples on `clk`;
- a **delay** flip-flop samples on `clk_d`, the same clock delayed by a large
  fraction of a period (for example three quarters).

When the two disagree, the main copy was late. The stage then does three
things:

- It marks the value it is showing as invalid.
- It takes the delay flip-flop's correct copy into a third, **buffer**,
  flip-flop.
- From then on it shows the buffer flip-flop.

So the corrected value comes out one cycle later than it would have. Nothing
is lost (one IIR stage pair is the exception, see below), and the extra
cycle is given back at the next invalid sample that passes through the stage.

The technique and the two example filters follow the design described in
"Design of VLSI Digital Filters for Tolerating Transient Timing Errors":

- a 16-bit low-pass FIR filter in transposed form;
- a 16-bit 3-parallel 2nd-order IIR filter.

The control protocol inside the stage controllers is not specified there in
detail. It is worked out here and described below, and it is the part to read
most carefully.

## Files

| file | what it is |
|---|---|
| `rtl/er_pkg.sv` | sample type (`sample_t`, signed 16 bit), control bundle `er_ctl_t`, Q1.15 multiply `qmul` |
| `rtl/er_buffer_cell.sv` | one-bit buffer: main FF, delay FF, XOR, MUX1, buffer FF, MUX2 |
| `rtl/er_pipe_stage.sv` | W-bit stage of buffer cells, error bits OR'ed |
| `rtl/er_regular_ctrl.sv` | controller for a stage on a plain linear path |
| `rtl/er_forward_ctrl.sv` | controller for one of two stages that meet at one operator |
| `rtl/er_feedback_ctrl.sv` | controller for a stage inside a loop (with a forward input: the combined forward + feedback controller) |
| `rtl/er_fbjoin_ctrl.sv` | controller for a stage that feeds a loop |
| `rtl/er_fir.sv` | the FIR filter |
| `rtl/er_iir3.sv` | the 3-parallel IIR filter |
| `rtl/er_filters_top.sv` | both filters side by side |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_er_filters_top` runs both filters end to end at default parameters |

## The one-bit buffer

`er_buffer_cell` has the following structure:

```
 d ──┬──► main FF (clk)  ──┬────────────────────────► MUX2 ──► q
     │                     │                            ▲
     └──► delay FF (clk_d) ┴─► MUX1 ──► buffer FF ──────┘
              │                 ▲          ▲ en      ▲ sel2
              └── XOR(main,delay) ─► err   sel1
```

The stage controller drives one control word, `er_ctl_t {sel1, sel2, en}`, to
all bits of a stage:

- `sel1 = 1` loads the buffer FF from the delay FF.
- `sel2 = 1` puts the buffer FF on the output.
- `en` lets the buffer FF load.

In a real circuit `en` gates the buffer FF's clock, so the FF costs no power
while nothing goes wrong. Here it is a clock enable; a clock-gating cell gives
the same behaviour. `er_pipe_stage` ORs the per-bit `err` into one stage error.

`err` means something only when sampled at the next `clk` edge, after `clk_d`
has fired. So the delay `clk` → `clk_d` must be shorter than the clock period
minus the hold margin of the delay FF. The worst-case logic delay must fit in
the period plus that delay. These constraints belong to the physical design;
the RTL does not model them.

## The two-mode protocol

Every stage is in one of two modes:

- **normal**: the output is the main FF;
- **delay**: the output is the buffer FF, one cycle behind.

Validity flags travel with the data and are **active low** (`0` = valid).
Where two streams meet, the flags are simply OR'ed.

Entering delay mode (`er_regular_ctrl`):

- The stage error rises while the stage is in normal mode.
- The wrong value on the output is flagged invalid (`valid_out_n = 1`) in that
  same cycle.
- `sel1 = en = 1` capture the correct copy.
- From the next edge `sel2 = 1`, and the correct value appears, flagged valid.

In delay mode:

- Every value passes through the buffer FF.
- A further late value is simply taken from the delay FF without another
  invalid cycle.
- The stage carries its own validity tags for the main and buffer values.

Leaving delay mode: when an invalid value reaches the main FF, the buffer
does not load it and the stage switches back to normal mode. The invalid value
disappears and the stage is one cycle faster again. This "bubble absorption"
is why the filters need an invalid sample now and then: with a permanently
valid input, a stage that caught an error stays in delay mode. That costs one
cycle of latency and nothing else.

A single buffer FF can add only one cycle. If a second stage on the same path
raises latency before a bubble has passed, the path is misaligned. A
controller that switches modes only once per bubble is this design's rule.
Transient errors are assumed to be rare compared with invalid samples.

## Forward pairs: keeping both operands aligned

Two stages whose outputs meet at one adder must always be in the same mode.
Otherwise the adder would combine values of different time steps.
`er_forward_ctrl` handles this in three ways.

- **stall**: a stage that catches an error raises `stall_out`. The partner's
  `stall_in` makes it enter delay mode on the same edge, without an invalid
  output of its own. The partner's copy is moved one cycle later with it.
- **leaving together**: `valid_in1_n` is the validity of the value entering
  this stage. `valid_in2_n` is the validity of the value entering the partner.
  Both stages leave delay mode as soon as either incoming value is invalid.
  The sum they would have formed is invalid anyway, so both drop it.
- **lag** (`lag_in`): in a transposed FIR the branch stages all take the input
  sample in the same cycle. The accumulation line, however, is a pipeline. A
  latency step raised at pair *i* reaches pair *i+1* through the accumulation
  line one cycle later. Branch stage *b(i+1)* therefore follows the mode of
  *b(i)* one cycle later, and *b1* follows the input stage P1. An inherited
  delay mode ends when `lag_in` falls. The stage does not need an invalid
  value of its own for that, because its predecessor already absorbed one.

## Feedback loops: hold, repeat and forward stall

A stage inside a loop holds the filter state. It must never skip an
iteration, so it cannot absorb a bubble. Instead `er_feedback_ctrl` **holds**:
the buffer FF keeps the current state for one more cycle, and the main FF's
new result is discarded. There are three reasons to hold, and they mark the
two copies differently.

| cause | state shown now | held copy next cycle |
|---|---|---|
| own error (`error`) | invalid (it is the late value) | valid (corrected copy from the delay FF) |
| a joining value invalid (`valid_in_n`) or a joining stage reports an error (`stall_in`) | valid | invalid (a repeat, not a new sample) |
| forward partner error (`fwd_stall_in`) | valid | valid (the partner's corrected copy comes next, and the pair stays aligned) |

On its own error the loop stage raises `stall_out`. The stages feeding the
loop (`er_fbjoin_ctrl`) then offer their value again: they mark the current
copy invalid and repeat it from their buffer FF. A joining stage that catches
its own error corrects it like a regular stage and raises `stall_out` to the
loop, which holds for that cycle. The joining stage leaves delay mode by
absorbing a bubble, as a regular stage does.

With `fwd_stall_in` connected, the feedback controller becomes the combined
"feedback + forward" controller. It is used where a loop register also meets
another stage at an operator, such as the two coupled state registers of the
IIR filter.

Limitation: a second stall from the loop while the joining stage is already
in delay mode cannot be buffered (one buffer FF), and one joining value is
then lost.

## The FIR filter (`er_fir`)

y[n] = h0·x[n-1] + h1·x[n-2] + h2·x[n-3] + h3·x[n-4] + h2·x[n-5] + h1·x[n-6] + h0·x[n-7]

The filter is in transposed form:

- The input stage P1 (regular control) feeds the h0 product into the first
  adder.
- Six accumulation stages m1..m6 each carry a partial sum.
- Six branch stages b1..b6 each hold the input sample, multiplied by
  h1 h2 h3 h2 h1 h0.
- Pair (m*i*, b*i*) meets at adder *i*, and the last adder drives `out`.
- All m and b stages use forward control, cross-connected in pairs, with the
  lag chain described above.

Latency: `out` shows y one cycle after the newest sample was presented, plus
one cycle while a corrected error is still pending.

Coefficients are parameters `H0..H3`, signed Q1.15. The defaults (983, 3277,
6554, 11141) are a symmetric low-pass set with DC gain 1.0; they are not the
original design's values, which were not published. The filter is described
there as "8-tap", but its structure has seven coefficient multipliers. This
RTL follows the structure.

## The 3-parallel IIR filter (`er_iir3`)

Three samples enter per clock (`in0..in2`) and three outputs leave. With every
stage written as a one-cycle register, the filter computes:

```
P6a <= in0 + C1*in1 + in2          P2a <= in1
P6b <= in1 + C0*in0                P2b <= in2
P3b <= C2*P2b + P2a + in0
P4a <= P6a + C3*P6b + C4*P3b       P4b <= P6b + C5*P3b
y0  <= P4a + C7*y0 + C6*y1         y1  <= P4b + C8*y1 + C9*y0     (loop)
P2c <= P3b
out0 = y0   out1 = y1   out2 = P2c + C10*y1 + C11*y0
```

Controllers:

- **P2a/P2b**: forward pair.
- **P6a/P6b**: forward pair, also paired with P3b at the P4 adders; they follow
  P2a one cycle later.
- **P3b**: forward control.
- **P4a/P4b**: feedback joining.
- **y0/y1**: feedback, each with the other (and P2c) as forward partner.
- **P2c**: forward, paired with the loop at the `out2` adder.

A stall from any member of the loop group makes P4a, P4b and P2c repeat. An
invalid input block makes the loop hold and is dropped from the output.
Latency is three cycles from input block to outputs, plus one while a
correction is pending.

The coefficients `C[0..11]` are parameters. The defaults are chosen for a
stable loop and are not the original design's.

**Where the IIR is not fully tolerant.** The raw input `in0` also enters the
P3b adder directly, and there is no stage on that path that could delay it.
While P2a/P2b are in delay mode, the P3b sum would mix time steps, so it is
marked invalid. A late value caught in P2a or P2b therefore costs all input
blocks up to the next invalid input block. Their outputs are flagged invalid,
and the loop skips those blocks as it skips invalid input blocks. That is a
loss of data, not a corruption: the values flagged valid afterwards are the
filter's response to the input with those blocks removed.

A correction in P3b is also special. P3b feeds the loop through P4a/P4b (two
stages to y) and the `out2` branch through P2c (one stage). So P2c skips the
invalid value one cycle before the loop holds. A one-cycle-delayed copy of
P3b's `stall_out` (`gap_p3b`) drives the loop's forward-stall input. The
loop's held copy is then flagged valid, and it pairs with P2c's corrected
value.

Errors in P6a, P6b, P3b, P4a, P4b, y0, y1 and P2c are fully corrected.

## Departures from the original design

- All controller insides (mode rules, validity tags, bubble absorption, the
  hold rules of the loop controller) are this design's own. The original
  names the controllers, their ports and their purpose only.
- `lag_in` on the forward controller, `fwd_stall_in` on the feedback
  controller and the `gap_p3b` flag in the IIR are additions. They are
  needed for the transposed FIR and for the coupled IIR loop.
- Late values in the IIR's P2a/P2b stages are detected and flagged but not
  corrected (see above).
- In the IIR, the lower P3 stage is drawn with feedback control in the
  original but lies on no loop. It uses forward control here.
- Gated clock of the buffer FF → clock enable.
- Coefficient values, Q1.15 format, truncation of products to bits [30:15]
  and wrap-around sums are choices; the original gives only the 16-bit width.
- The delayed clock `clk_d` is an input; no delay circuit is included.

## Simulating

The RTL has no delays, so in simulation `clk_d` is tied to `clk` and no path
is ever late. The testbenches emulate a late value by inverting one main FF
right after a rising edge. The delay FF keeps the correct value, exactly as
after a real late arrival:

```systemverilog
@(posedge clk); #1;
begin logic v; v = dut.u_fir.g_tap[2].u_b.g_cell[3].u_cell.main_q;
      force dut.u_fir.g_tap[2].u_b.g_cell[3].u_cell.main_q = ~v;
      release dut.u_fir.g_tap[2].u_b.g_cell[3].u_cell.main_q; end
```

`release` of a flip-flop variable keeps the forced value until the next
clock edge.

Build and run a testbench with plain Verilator:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/er_pkg.sv \
          tb/tb_er_filters_top.sv --top tb_er_filters_top
./obj_dir/Vtb_er_filters_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Error-free phases:** the filter testbenches compare cycle by cycle against
  a reference model.
- **Phases with injected errors:** they check that every output flagged valid
  is the next pending valid reference output and that no valid reference
  output is skipped.
- **Mechanism counts:** they count each mechanism (corrections, partner
  stalls, lag inheritance, bubble absorption, loop holds, joining repeats,
  forward stalls of the loop) and fail if one never occurs.

`tb_er_filters_top` does all of this for both filters at default parameters.

## Using it in a design

- Feed an invalid sample (`*_in_valid_n = 1`) every so often. Each one gives
  back the latency added by an earlier correction.
- Consumers must honour `*_out_valid_n`. An invalid output is a dropped or
  repeated slot, not a sample.
- The output rate is one valid result per valid input, except in the IIR
  cases listed above.
- Timing closure: the main path must meet `clk` in the normal case, and every
  path must meet `clk_d`. Also constrain the short paths into the delay FF,
  which are sampled `clk_d` after the launching edge.
