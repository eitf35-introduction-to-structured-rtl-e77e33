# '1011' sequence detector: Mealy and Moore state machines

A serial bit stream arrives one bit per clock cycle. The detector raises its
output for exactly one clock cycle each time the last four bits received are
`1`, `0`, `1`, `1`, in that order. Matches may overlap: in `1011011` the final
`1` of the first match starts the second, so the stream gives two pulses.

The same function is built twice, as the two classic kinds of finite state
machine, and both run side by side in the top level:

* **Mealy** (`seq_detector_mealy`): four states; the output depends on the
  state *and* the present input, so the pulse appears in the same cycle as the
  final `1`.
* **Moore** (`seq_detector_moore`): five states; the output depends on the
  state alone, so the pulse appears one cycle later, when the machine has
  entered the extra "match" state.

For any stream started from reset, the Moore output equals the Mealy output
delayed by one clock cycle.

## The state machines

State `sK` means "the last K bits received are the first K bits of `1011`".
When a bit breaks the pattern, the machine falls back to the longest suffix of
what it has seen that is still a prefix of `1011`. That fallback is what makes
overlapping matches work.

Mealy machine (arcs are `input/output`):

| state | input 0     | input 1     |
|-------|-------------|-------------|
| s0    | s0 / 0      | s1 / 0      |
| s1    | s2 / 0      | s1 / 0      |
| s2    | s0 / 0      | s3 / 0      |
| s3    | s2 / 0      | s1 / **1**  |

Moore machine (the output belongs to the state):

| state | output | input 0 | input 1 |
|-------|--------|---------|---------|
| s0    | 0      | s0      | s1      |
| s1    | 0      | s2      | s1      |
| s2    | 0      | s0      | s3      |
| s3    | 0      | s2      | s4      |
| s4    | **1**  | s2      | s1      |

The two arcs that are easy to get wrong are the ones leaving a match:

* After a match the last bit seen is `1`, so a following `1` goes to s1.
* A `0` after `1011` leaves `10`, which is two bits of a new match, so it goes
  to s2, not s0.

The same reasoning sends s3 to s2 on a `0`, because `1010` ends in `10`.

## Structure and timing

Each machine has the same two parts:

* a register block, which holds `current_state`;
* a combinational block, which computes `next_state` and `d_out` from
  `current_state` (and, for the Mealy machine, `d_in`).

| signal  | dir | meaning |
|---------|-----|---------|
| `clk`   | in  | `d_in` is sampled on the rising edge |
| `rst`   | in  | asynchronous, active high; forces s0 at once |
| `d_in`  | in  | serial data, one bit per cycle |
| `d_out` | out | detection pulse, one cycle wide |

Timing:

* **Mealy.** `d_out` is combinational from `d_in`. It is valid once `d_in`
  has settled during the cycle that carries the final `1`, and should be
  sampled at the same rising edge as that bit. A glitch on `d_in` can show on
  `d_out`, so the output should only be used as a synchronous signal.
* **Moore.** `d_out` is a decode of the state register. It is high for the
  whole cycle after the edge that sampled the final `1`, and has no path
  from `d_in`.
* **Both.** Two pulses are always at least three cycles apart.

`seq_detector_top` drives both machines from one `d_in` and one `rst`, and
brings out `d_out_mealy` and `d_out_moore`. It has no parameters. After
synthesis the Mealy machine uses 2 flip-flops and the Moore machine 3.

## What is specified and what is chosen here

These points follow the specification of the detector:

* the states, the transitions and the outputs of both machines;
* the one-clock-cycle output pulse;
* the split into a register block and a combinational block;
* a rising-edge clock;
* an asynchronous, active-high reset.

These points are choices of this implementation:

* **State encoding.** Binary, with sK encoded as K, defined in
  `seq_detector_pkg`. Any other encoding gives the same behaviour.
* **Reset state.** Reset goes to s0, the initial state.
* **Unused Moore codes.** The three codes of the Moore machine's 3-bit
  register that name no state lead back to s0.
* **Module names.** The modules are named after their style so that both can
  live in one design.
* **Shared input.** In the top, one stream feeds both machines.
* **Fixed sequence.** The sequence is fixed at `1011`. A different sequence
  needs its own state diagram, and so new transition tables in the two
  combinational blocks. The package holds only the state types.

## Files

| file | content |
|------|---------|
| `rtl/seq_detector_pkg.sv`   | state enums of both machines |
| `rtl/seq_detector_mealy.sv` | Mealy detector |
| `rtl/seq_detector_moore.sv` | Moore detector |
| `rtl/seq_detector_top.sv`   | both detectors on one input |
| `tb/tb_seq_detector_mealy.sv`, `tb/tb_seq_detector_moore.sv` | unit testbenches |
| `tb/par2ser_model.sv`       | testbench model of a parallel-to-serial converter |
| `tb/tb_seq_detector_top.sv` | end-to-end testbench |

## Verification

Every testbench checks against a reference model that does not use the state
machines. The model keeps the bits received since the last reset and expects a
pulse exactly when they end in `1011`. That is the definition of the
function, so it catches a wrong arc in either machine.

* **Unit testbenches.** These drive:
  * directed strings: a single match, overlapping matches, a match after a
    `1010` near miss, `100` falling back to s0;
  * 4000 random bits;
  * asynchronous resets in the middle of a clock cycle, including while a
    pulse is being shown. The output must drop without waiting for a clock
    edge, and a sequence cut by a reset must not be reported.

  Every arc of the state diagram must be taken at least once: all 8 of the
  Mealy machine and all 10 of the Moore machine. An arc never taken counts as
  a failure.
* **End-to-end testbench.** This follows a typical lab test setup. Random
  8-bit words are serialised MSB first by `par2ser_model` and fed to the top.
  The testbench checks:
  * the serial stream itself;
  * both outputs against the reference;
  * that the Moore output is the Mealy output delayed by one cycle.

  It counts detections, overlapping detections, detections that restart from
  `1010`, and resets in mid-stream. Each of these must occur at least once.
  The top runs with its only configuration, so this is also the full-size
  test. In one run of 2000 words it saw 1015 detections, 126 overlapping
  detections, 242 detections after `1010` and 8 resets.

The reference model was also run against broken copies of each module. Each
copy had one arc redirected, or the two outputs swapped. The testbenches
reported failures in every case.

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/seq_detector_pkg.sv tb/tb_seq_detector_top.sv \
    --top-module tb_seq_detector_top -o sim
./obj_dir/sim
```

Replace `tb_seq_detector_top` with `tb_seq_detector_mealy` or
`tb_seq_detector_moore` to run a unit testbench. To lint the RTL alone:

```
verilator --lint-only -Wall rtl/seq_detector_pkg.sv rtl/seq_detector_mealy.sv \
    rtl/seq_detector_moore.sv rtl/seq_detector_top.sv --top-module seq_detector_top
```

## Not included

The file reader, the parallel-to-serial stage and the clock generator of a
lab test bench are simulation components, not part of the detector. The
end-to-end testbench makes its own random words and its own clock. The
serialiser is modelled only in `tb/`, and its word width, bit order and
handshake are choices of that model.
