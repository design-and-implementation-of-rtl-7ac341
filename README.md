# 10-bit FSM-based SAR logic

A successive approximation (SAR) ADC turns a sampled voltage into an N-bit
code with a binary search. It tries the MSB first: the code `100...0` goes
to a DAC, a comparator says whether the input is above the DAC voltage, and
the bit is kept if it is and cleared if it is not. Then the next lower bit
is tried, down to the LSB. The analog parts (sample-and-hold, DAC and
comparator) do the measuring. A small digital block decides what to try next
and when the result is ready.

This repository holds that digital block for a 10-bit converter. It is a
four-state machine with a 10-bit SAR register and a bit counter. It resolves
one bit per clock. The analog parts are not included. They appear only as a
behavioural model used by the testbenches.

## The conversion sequence

The controller (`sar_fsm`) has four states:

| state   | leaves when                | goes to   | outputs                 |
|---------|----------------------------|-----------|-------------------------|
| IDLE    | `start` = 1                | SAMPLE    | `hold` = 1              |
| IDLE    | `start` = 0                | IDLE      | `hold` = 1              |
| SAMPLE  | always, after one clock    | CONVERT   | `sample` = 1, `hold` = 0 |
| CONVERT | bit counter = 0            | DONE      | `hold` = 1              |
| CONVERT | bit counter > 0            | CONVERT   | `hold` = 1              |
| DONE    | always, after one clock    | IDLE      | `hold` = 1, `eoc` = 1   |

Each clock, CONVERT works on the bit that the counter points to. The counter
holds the index of the bit under trial, not a count of bits done. It starts
at N-1 and counts down. When the counter reaches 0, that clock resolves the
LSB and is the last CONVERT clock. N CONVERT clocks therefore resolve N bits.

## How the SAR register moves (`sar_register`)

This is the part that takes the most care to follow. The register has two
commands:

* **load**: given in the SAMPLE clock. The register becomes `100...0`, so
  the MSB trial is already on the DAC in the first CONVERT clock. The counter
  is set to N-1.
* **step**: given in each CONVERT clock. At the clock edge, the comparator
  output is written into the bit under trial, `code[bit_count]`. A 1 keeps
  the bit and a 0 clears it. If the counter is above 0, the same edge also
  sets the next lower bit to 1 as the next trial, and the counter
  decrements.

For example, with N = 4 and an input between codes 10 and 11, one
conversion looks like this:

| clock       | code on DAC | bit_count | comp | code after the edge |
|-------------|-------------|-----------|------|---------------------|
| SAMPLE      | (old)       | (old)     | -    | 1000                |
| CONVERT 1   | 1000        | 3         | 1    | 1100                |
| CONVERT 2   | 1100        | 2         | 0    | 1010                |
| CONVERT 3   | 1010        | 1         | 1    | 1011                |
| CONVERT 4   | 1011        | 0         | 0    | 1010                |
| DONE (eoc)  | 1010        | 0         | -    | 1010                |

With neither command the register keeps its value. The result therefore
stays on `code` through DONE and IDLE until the next conversion loads a new
trial. The same register drives the DAC and serves as the data output.

## Interface and timing (`sar_logic`, the top)

| port        | dir | width      | meaning |
|-------------|-----|------------|---------|
| `clk`       | in  | 1          | clock; everything changes on the rising edge |
| `rst`       | in  | 1          | asynchronous reset, active high: IDLE, register and counter cleared |
| `start`     | in  | 1          | start a conversion (sampled in IDLE; a level) |
| `comp`      | in  | 1          | comparator: 1 when the held input is above the DAC voltage |
| `sample`    | out | 1          | sampling switch, high in SAMPLE |
| `hold`      | out | 1          | high outside SAMPLE |
| `code`      | out | N          | SAR register: trial code to the DAC, and the result |
| `eoc`       | out | 1          | end of conversion, one clock in DONE |
| `state`     | out | 2          | current state (`sar_pkg::sar_state_e`), for observation |
| `bit_count` | out | clog2(N)   | bit counter, for observation |

Parameter: `N` (resolution), default 10.

Latency: call the clock edge that sees `start` = 1 in IDLE edge 0. SAMPLE is
the next clock, then N CONVERT clocks, then DONE. `eoc` is therefore high in
the (N+2)-th clock after edge 0, which is the 12th clock for N = 10. If
`start` is held high, a new conversion begins every N+3 clocks (13 for
N = 10).

The comparator is assumed to settle within one clock after each code
change. The design has no wait states for a slow DAC or comparator.

Synthesis gives 16 flip-flops: 10 for the register, 4 for the counter and 2
for the state.

## Where the design makes its own choices

The following come from the source design:

* the four states and the state table;
* the MSB-first binary search, one bit per clock;
* the bit counter, with counter = 0 ending the conversion;
* `hold` high in IDLE;
* the comparator rule that a higher input keeps the bit;
* the 10-bit resolution.

The following are this implementation's own choices:

* the reset, which is asynchronous and active high;
* the state encoding (binary, IDLE = 0 to DONE = 3);
* loading the MSB trial in the SAMPLE clock;
* setting the next trial bit in the same clock as the decision;
* the counter holding the index of the bit under trial, which equals the
  number of bits still left after the current one;
* `hold` also high in CONVERT and DONE;
* `eoc` lasting exactly one clock;
* the port names;
* the `state` and `bit_count` observation ports.

The source reports a 90 nm standard-cell implementation of 137 cells,
1257.968 µm² and 0.02545 µW. Those numbers belong to that cell library. This
RTL has not been taken through such a flow.

## Files

* `rtl/sar_pkg.sv`: state type and the default resolution.
* `rtl/sar_fsm.sv`: the controller. It holds assertions that SAMPLE and
  DONE last one clock.
* `rtl/sar_register.sv`: the SAR register and bit counter. It holds an
  assertion that load and step are never given together.
* `rtl/sar_logic.sv`: the top.
* `tb/sar_afe_model.sv`: behavioural analog front end, for simulation only.
  It has a track-and-hold, an ideal DAC (`vdac = code * VREF / 2^N`) and a
  comparator.
* `tb/tb_sar_fsm.sv`: random `start` and counter-zero inputs, compared every
  clock with a reference copy of the state table. It includes a reset in the
  middle of the run.
* `tb/tb_sar_register.sv`: random comparator decisions. It checks the code
  and the counter after every step.
* `tb/tb_sar_logic.sv`: the full design at N = 10 with the analog model. It
  covers:
  * all 1024 codes, each at half an LSB above its threshold;
  * clipping below zero and above full scale;
  * random inputs;
  * an input that changes during CONVERT, which must not alter the result;
  * back-to-back conversions;
  * a reset during CONVERT.

  It checks the exact `eoc` latency and counts each of these cases.
* `tb/tb_sar_logic_sizes.sv`: the same design at 6 and 12 bits.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sar_pkg.sv tb/tb_sar_logic.sv --top-module tb_sar_logic
./obj_dir/Vtb_sar_logic
```

To run the other testbenches, replace `tb_sar_logic` with `tb_sar_fsm`,
`tb_sar_register` or `tb_sar_logic_sizes`. Each run takes well under a
second.

To change the resolution, set `N` on `sar_logic`. The counter width follows
it as clog2(N).
