# SAR ADC with built-in test support: fast DC-linearity testing and comparator-error injection

Production testing of an embedded successive-approximation (SAR) ADC is
dominated by the DC-linearity test: a slow staircase is applied and every
code of the converter is measured, each with a full N-step search. On the
tester, though, the input at every sampling instant is *known*. If the SAR
search starts from a reference already close to that known input, only the
last few comparisons are needed. This RTL adds exactly that to a SAR ADC:
a small test-mode RAM of preset references, a multiplexer that picks the
start point, and a controller that walks a staircase. A 10-bit conversion then
needs 4 comparison steps per test point instead of 10.

The same converter runs a *generalized non-binary* (redundant) search. Its
per-step weights come from a weight RAM, so it can use more steps than bits.
The overlap between steps lets later steps correct a wrong comparator
decision. That property is hard to test, because a real comparator rarely
errs on demand. So a 4-way multiplexer (MUX4) between the comparator and the
SAR logic can pass, invert, force-0 or force-1 the decision of any chosen
step. The tester then checks that the output code is still right.

Everything digital is synthesizable SystemVerilog. The sample-and-hold, the
comparator and the capacitor DAC are behavioural models with real-valued
voltages. They are good enough to close the loop in simulation, and the DAC
model has a settling option for the DAC speed test described below.

## The search, with programmable weights

Voltages are in LSB units; the input range is 0 .. 2^N-1. Steps are
numbered j = 0 .. M-1. The reference starts at mid-scale, Vref(0) = 2^(N-1).
After each decision d(j) (1 when Vin > Vref):

    Vref(j+1) = Vref(j) + w[j]   if d(j) = 1
    Vref(j+1) = Vref(j) - w[j]   if d(j) = 0
    Dout      = Vref(M-1)        if d(M-1) = 1
              = Vref(M-1) - 1    if d(M-1) = 0

* **Binary search:** M = N and w[j] = 2^(N-2-j) (256, 128, ..., 1 for 10 bits).
  There is no redundancy, so one wrong decision gives a wrong code.
* **Redundant search:** M > N and the weights shrink more slowly than by 2.
  A classic choice is radix 2^(N/M), i.e. w[j] ~ 2^(N/M)^(M-2-j). Here any
  integer set can be loaded. A wrong decision at step j is recovered if the
  input is within about (sum of w[i] for i > j) - w[j] + 1 of Vref(j). The
  testbenches use a 12-step 10-bit set, 192 128 80 48 32 16 10 6 4 2 1.
  That set converts every code, and a wrong step-1 decision is corrected for
  inputs within -72 .. +71 LSB of the step-1 reference.

Weights are integers in LSB. The reference register is N+2 bits and signed,
because a redundant search may go slightly below 0 or above full scale
before it settles. The final code is saturated to 0 .. 2^N-1.

## Linearity test mode

In test mode (`test_mode = 1`) the test controller takes an address range of
the test-mode RAM. For each address a it:

1. reads the preset P(a) and starts a conversion;
2. loads `Vref = P(a)` at the end of the sample phase, in place of mid-scale;
3. starts at step `num_steps - test_steps`, so only the last `test_steps`
   comparisons run, with the smallest weights;
4. reports `dout` with `result_addr = a`.

With binary weights and 4 steps the reachable codes are P-8 .. P+7. A preset
equal to the ideal code therefore covers an INL of -8 .. +7 LSB. If a device's
code lies outside that window, the result comes out wrong and flags the
failure. The tester loads presets from its expected staircase; one RAM entry
per code (1024) lets a whole 10-bit ramp run in one go. The staircase input
must move to the next level between conversions. The testbench does this when
it sees `result_valid`.

Cost per test point, with the default 2-cycle sample phase, through the
controller:

| mode                   | steps | start to eoc | cycles per point in a run |
|------------------------|-------|--------------|---------------------------|
| normal, binary 10-bit  | 10    | 12           | 14                        |
| linearity test         | 4     | 6            | 8                         |

That is 43% fewer cycles per point on the chip. On a real tester, set-up
overhead also counts. If about 20% of the time is fixed overhead and 6 of 10
steps are saved, the saving is (6/10) x 80% = 48%.

## Comparator-error injection (MUX4)

`err_sel` is applied to the decision of whichever step is running:

| err_sel | decision given to the SAR logic |
|---------|---------------------------------|
| 0       | comparator output (normal)      |
| 1       | inverted comparator output      |
| 3       | 0                               |
| 4       | 1                               |
| 2, 5-7  | comparator output (this RTL's choice) |

The converter brings out `step_en` and `step`. The tester can then drive
`err_sel` only at the step it wants to disturb: for example, force the
"upper" or "lower" branch at the second step, or invert it. `decisions`
(bit j = decision used at step j) shows afterwards which path was taken.
The pass criterion is simply that `dout` is still the right code. With binary
weights the same injection gives a wrong code. The testbench checks that too,
to show that the test can detect a converter without redundancy.

## DAC settling-speed test

`cap_dac` can model a DAC whose output starts to move only after a decoding
delay `T_DEC`, and then settles as a first-order RC system with time
constant `TAU`. Take an input just below the second-step reference. The
second-step comparison sees a reference that has not yet finished rising, so
it decides 1 instead of 0. The redundancy corrects this, so the code is still
right, but `decisions[1]` shows the error. Sweep the input downwards and note
the largest distance r(P) that still gives the wrong decision, at clock
period P:

    r(P) = w[0] * exp(-(P - T_DEC) / TAU)

Two clock periods give two equations, and so both `TAU` and `T_DEC`.
`tb_sar_adc_speed` does this with T_DEC = TAU = 2 ns. It measures
r = 3.43 LSB at 10 ns and 1.28 LSB at 12 ns, and estimates TAU = 2.02 ns and
T_DEC = 1.85 ns.

## Structure

    vin --> sample_hold --> comparator --> comp_err_mux --> sar_logic --> dac_code
                                ^            (MUX4)        ^   ^   |
                                |                          |   |   v
                                +------------- cap_dac <---+---|---+
                                                           |   |
    timing_gen: sample / load / step_en / step / last / eoc+   +-- weight_ram[step]
    test_controller --> test_vref_ram --> vref_preset_mux --> start_vref, start_step

| module            | kind        | what it does |
|-------------------|-------------|--------------|
| `sar_pkg`         | package     | default sizes, the `err_sel_e` select codes |
| `sar_adc_top`     | top         | analog models around `sar_digital` |
| `sar_digital`     | RTL         | all synthesizable parts, wired together |
| `test_controller` | RTL         | walks start..end address, one conversion per point, reports results |
| `test_vref_ram`   | RTL memory  | preset references, 1-cycle synchronous read |
| `vref_preset_mux` | RTL         | start at mid-scale/step 0, or at preset / step num_steps-test_steps |
| `timing_gen`      | RTL         | sample phase, one step per clock, eoc pulse |
| `weight_ram`      | RTL memory  | per-step weights, asynchronous read addressed by the step |
| `comp_err_mux`    | RTL         | MUX4 error injection |
| `sar_logic`       | RTL         | reference register, output code, decision record |
| `sample_hold`     | behavioural | ideal track-and-hold |
| `comparator`      | behavioural | Vin > Vref (+ optional offset) |
| `cap_dac`         | behavioural | code to voltage, optional decode delay and RC settling |

## Timing and interface

* One comparison per clock. The comparator decision is sampled on the rising
  edge that ends a step, and the DAC code changes on that same edge.
* Start to `eoc`: `SAMPLE_CYC + steps` cycles. `eoc` is a 1-cycle pulse.
  `result_valid`, `result_addr` and `done` follow one cycle later. `dout`
  holds until the next conversion ends.
* All conversions, normal ones included, go through the controller: pulse
  `run` with `start_addr`/`end_addr`. With `start_addr = end_addr` it makes a
  single conversion. Addresses count up and wrap modulo the RAM depth.
* Before use, load the weights through `w_we/w_addr/w_data`, set
  `num_steps`, and in test mode load presets through `t_we/t_addr/t_data`
  and set `test_steps`. Neither RAM is reset. Keep `num_steps`,
  `test_steps` and `test_mode` stable during a run.
* Reset `rst_n` is asynchronous and active low.

Parameters (defaults): `N_BITS = 10`, `MAX_STEPS = 16`, `TEST_DEPTH = 1024`,
`SAMPLE_CYC = 2`; behavioural `CMP_OFFSET = 0`, `DAC_T_DEC = 0`,
`DAC_TAU = 0` (ideal). At the defaults the synthesizable core has about 86
flip-flops plus 160 bits of weight RAM and 12,288 bits of test RAM.

## What is taken from the published technique, and what is this design's own

Taken from the technique: the SAR configuration (sample-and-hold,
comparator, DAC, SAR logic, timing generator). Also the search equations,
including the final "-1 when the last decision is 0". Also: the weight RAM
of a generalized non-binary search; presetting the reference from a
test-mode RAM through a multiplexer, under a controller with start and end
addresses; the 10-bit, 10-to-4-step example; the MUX4 with codes 0, 1, 3, 4;
and the first-order DAC settling used by the speed test. One description of
the MUX4 pairs code 3 with "output 1". This RTL follows the explicit list,
in which 3 forces 0 and 4 forces 1.

Chosen here, where the technique is silent:

* step limit 16, test RAM depth 1024 (one preset per code), 2-cycle sample
  phase, one step per clock;
* the test mode skips the *first* steps and runs the last `test_steps`
  ones. `test_steps` is programmable (4 in the 10-bit example; some
  measurements were also reported after 3 steps);
* an on-chip test controller. A tester can play the same role through the
  ports, and the controller is built on chip here as the simplest way;
* integer weights, reference register N+2 bits signed, output saturation,
  the `decisions` record, unused MUX4 codes acting as normal;
* weight values for the redundant examples (12-step 10-bit set above; 5-bit
  6-step set 10 6 3 2 1, the radix-2^(5/6) weights rounded);
* analog parts are ideal behavioural models. The DAC is driven by the
  reference code, not by individual capacitor switches; the capacitor array
  itself is not modelled.

Limits to keep in mind: the analog models say nothing about a real circuit's
noise, offset drift or capacitor mismatch. INL shows up here only because a
preset is deliberately placed far from the input. Bad weight sets (weights
with sum far above 2^N) could overflow the N+2-bit reference; no check is
made.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Build any of them with Verilator 5, for
example the full-size end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_sar_adc_top \
        -y rtl -y tb rtl/sar_pkg.sv tb/tb_sar_adc_top.sv
    ./obj_dir/Vtb_sar_adc_top

| testbench           | what it covers |
|---------------------|----------------|
| `tb_sar_adc_top`    | default size. All 1024 codes in normal binary mode (12-cycle latency). A 1024-point staircase in 4-step test mode (8 cycles per point), with points whose preset is outside the window detected. All codes with the 12-step redundant search. Inversion, force-0 and force-1 at step 1 corrected; inversion not corrected by the binary search |
| `tb_sar_adc_5bit`   | 5-bit instance: 5-step binary search, 6-step redundant search with error correction, 2-step test mode over all 32 codes |
| `tb_sar_adc_speed`  | DAC settling test; estimates RC and decode delay |
| `tb_sar_logic`      | search, test-mode windows, error correction, saturation, with a testbench comparator |
| `tb_timing_gen`     | phase sequence and latency for every start step and length |
| `tb_test_controller`| address walking, wrap, result addresses, per-point period |
| `tb_comp_err_mux`, `tb_weight_ram`, `tb_test_vref_ram`, `tb_vref_preset_mux`, `tb_sample_hold`, `tb_comparator`, `tb_cap_dac` | the single blocks |

Each testbench has a cycle watchdog. The full-size test runs in a few
seconds.
