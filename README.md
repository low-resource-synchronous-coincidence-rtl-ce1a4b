# Synchronous multi-phase coincidence processor for PET

In positron emission tomography two detectors facing each other must decide
whether the photons they saw came from the same annihilation, that is whether
their trigger pulses arrived within a few nanoseconds of each other. This
design makes that decision with ordinary synchronous logic on an FPGA:

* every asynchronous detector trigger is synchronized into a small, very fast
  clock domain (288 MHz in the reference configuration);
* each rising edge becomes a pulse exactly one clock period long;
* a coincidence is declared when pulses of the two detector subsets are high
  in the same clock cycle, by a plain synchronous AND/OR network;
* the coincidence triggers are carried back into the slower system clock
  domain for the acquisition logic.

No time-to-digital converters, delay chains or special I/O are needed: one
input buffer per channel and a few flip-flops and gates per channel. The
price is that the time resolution is tied to the clock period tau. Running
two copies of the processor on opposite phases of the clock and ORing their
results narrows the coincidence window to 3*tau/2 (5.2 ns at 288 MHz).

## Geometry and equations

The detector is a dual planar arrangement: subset A (`N_A` channels) faces
subset B (`N_B` channels), and any A channel may be in coincidence with any B
channel. With shaped pulses `A_i`, `B_j` the prompt coincidence outputs are

    C_A,i = A_i & (B_0 | B_1 | ... | B_{N_B-1})
    C_B,j = B_j & (A_0 | A_1 | ... | A_{N_A-1})

Random coincidences are estimated with a delayed window. All synchronized
triggers are also delayed by `DELAY_CYCLES` fast cycles in a shift register
and shaped again (`Ad`, `Bd`). A channel's prompt pulse is then gated with
the delayed pulses of the other subset:

    R_A,i = A_i & OR_j Bd_j        R_B,j = B_j & OR_i Ad_i

A random trigger is therefore always raised at the time of a prompt event and
needs no extra latency for the window delay. The exact form of these random
equations is this design's reading of the delayed-window variant; the prompt
equations are the reference ones.

## Why one-cycle pulses lose pairs, and how the phases recover them

Two triggers whose rising edges fall in the same clock period are captured by
the same clock edge and give overlapping one-cycle pulses. Two triggers that
are 0.1 ns apart but straddle a clock edge are captured one cycle apart and
are missed. This is the *hazard*. For a pair with offset `d`, the chance of
detection with one clock is `1 - |d|/tau`, so the window is only tau wide and
never 100 % efficient except at `d = 0`.

There are two remedies, both parameters of this design:

* **Two-cycle pulses (single clock, `PULSE_CYCLES = 2`).** Pairs captured one
  edge apart still overlap. Every pair closer than tau is detected, and the
  efficiency falls linearly to zero at 2*tau: a window of 3*tau full width at
  half maximum (10.4 ns at 288 MHz).
* **Several clock phases (`NUM_PHASES = 2`, one-cycle pulses, the default).**
  Two identical processors run on clocks 180 degrees apart. A pair that
  straddles an edge of one clock lies inside one period of the other. Every
  pair closer than tau/2 is detected by at least one replica. Between tau/2 and
  tau the efficiency is `2*(1 - |d|/tau)`. The FWHM is 3*tau/2, 5.2 ns at
  288 MHz.

`NUM_PHASES` can be raised (phases spread evenly over a period). With the
plain OR of one-cycle replicas used here, four phases give a window of
7*tau/4 (9.1 ns at 192 MHz). That is the value this RTL reaches; a narrower
four-phase window would need a different way of combining the phases.

## Block structure

```
                     coinc_top  (NUM_PHASES replicas, outputs ORed)
  trig_a, trig_b --+--------------------------------------------+
                   |  coinc_processor  (clk_fast[p])            |
                   |   input_sync --+--> pulse_shaper ------+    |
                   |                |                       v    |
                   |                +--> delay_line -->   gating_network --> output_sync --> (OR) --> coinc_*, rand_*
                   |                     pulse_shaper ------^     (clk_fast)   (clk_fast -> clk_sys)
                   +--------------------------------------------+
```

| module | role |
|---|---|
| `coinc_top` | `NUM_PHASES` replicas of `coinc_processor`, one per phase of the fast clock; ORs their system-domain outputs |
| `coinc_processor` | one complete processor in one fast clock phase |
| `input_sync` | `IN_SYNC_STAGES` flip-flops per channel against metastability |
| `pulse_shaper` | rising edge to a pulse of `PULSE_CYCLES` cycles |
| `delay_line` | shift register of `DELAY_CYCLES` stages for the delayed window |
| `gating_network` | the prompt and random equations above, optionally pipelined |
| `or_tree_pipe` | pipelined OR reduction used by the gating network |
| `output_sync` | toggle synchronizer from the fast domain to the system clock |
| `coinc_pkg` | default parameters and elaboration-time helper functions |

The clock manager that makes the fast clock phases and the system clock, the
acquisition logic that consumes the outputs, and the input buffers are FPGA
resources outside this RTL. The clocks enter as ports.

## Pipelining of the gating network

For wide subsets at high clock rates the OR over all channels of a subset is
too slow for one cycle. `PIPE_STAGES` splits each OR reduction into a tree of
that many registered levels. Each level has fan-in `ceil(N^(1/PIPE_STAGES))`.
The per-channel pulses are delayed by the same number of registers so that
`A_i` meets the OR of the B pulses from the same cycle. Each stage adds one
fast cycle of latency and some flip-flops. Nothing else changes. Reference
figures for the stages needed at 288 MHz are:

| detectors (A+B) | 2 | 4 | 8 | 18 | 32 | 64 | 80 | 96 |
|---|---|---|---|---|---|---|---|---|
| Spartan-3E class | 0 | 0 | 0 | 0 | 1 | 2 | 3 | 4 |
| Spartan-6 class | 0 | 0 | 0 | 0 | 0 | 2 | 3 | 3 |

The default, 48 + 48 channels with 4 stages, is the largest of these.
The equal-fan-in split is this design's choice; on a real device the
placement of the registers would follow timing analysis.

## Crossing back to the system clock

A one-cycle pulse at 288 MHz can fall between two edges of a slower system
clock. `output_sync` therefore turns the rising edge of each fast-domain
trigger into a flip of a per-channel toggle flag. The flag passes through
`OUT_SYNC_STAGES` system-clock flip-flops, and each change gives one
registered system-clock pulse. Consequences the user of the outputs must know:

* Two triggers on the same channel less than about `OUT_SYNC_STAGES + 2`
  system periods apart may merge into one or cancel. At the event rates of a
  single PET channel this is far from the limit, but it is a real dead time.
* In the multi-phase top, the same coincidence is usually seen by several
  replicas. Their re-synchronized pulses can land in adjacent system cycles,
  so an OR-ed output pulse can be one or two system cycles long. **Count rising
  edges, not high cycles.** No further merging is done, since none is
  specified for the reference design.

## Timing

Counted from the fast-clock edge that first samples a trigger high, in one
replica:

* fast-domain coincidence trigger: `IN_SYNC_STAGES + PIPE_STAGES + 1` edges
  later (7 edges, 24 ns, at the defaults);
* system-domain output: a further 1 fast cycle plus `OUT_SYNC_STAGES + 1` to
  `OUT_SYNC_STAGES + 2` system cycles.

Triggers must be active-high and stay high for at least one fast period so
that the synchronizer is sure to see them. They must also go low again
before the next event on the channel.

Resets are active low and asynchronous in every domain. `rst_fast_n[p]` must
be released synchronously to `clk_fast[p]`, and `rst_sys_n` to `clk_sys`.

## Parameters (`coinc_top`)

| parameter | default | meaning |
|---|---|---|
| `N_A`, `N_B` | 48, 48 | channels in each subset |
| `NUM_PHASES` | 2 | processor replicas / clock phases |
| `PIPE_STAGES` | 4 | registered levels of the gating OR trees |
| `PULSE_CYCLES` | 1 | shaped pulse length (2 for the single-clock hazard remedy) |
| `IN_SYNC_STAGES` | 2 | synchronizer depth at the inputs (choose so that depth*tau exceeds the device's metastability resolving time) |
| `OUT_SYNC_STAGES` | 2 | synchronizer depth into the system domain |
| `DELAY_CYCLES` | 32 | delayed window for randoms, in fast cycles (111 ns at 288 MHz) |

The channel counts, phase count, pulse length and pipeline depth follow the
reference design. The synchronizer depths, the delay length, the toggle
re-synchronizer, the reset scheme and the tree split are choices of this
implementation.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_coinc_top rtl/coinc_pkg.sv tb/tb_coinc_top.sv
./obj_dir/Vtb_coinc_top
```

| testbench | what it shows |
|---|---|
| `tb_coinc_top` | full default configuration (48+48, two phases at 288 MHz, 72 MHz system clock). Sweeps the A-B offset from -10 to +10 ns in 20 ps steps; runs random-coincidence, multi-channel and single-trigger trials. Every output channel is compared with a reference model built from the clock edge times. The measured window is about 5.2 ns, and both hazard recovery by a single phase and detection by both phases occur. |
| `tb_coinc_variants` | the same sweep for a single clock with one-cycle pulses (window about tau), a single clock with two-cycle pulses (about 10.5 ns) and four phases at 192 MHz (about 9.1 ns) |
| `tb_coinc_processor` | one replica with one- and two-cycle pulses: exact fast-domain latency, random coincidences through the delayed window, system-domain pulses |
| `tb_gating_network` | equations, with and without pipelining, against a model |
| `tb_input_sync`, `tb_delay_line`, `tb_pulse_shaper`, `tb_output_sync` | the small blocks, cycle by cycle |

The simulator is two-state and the trigger times are kept at least 150 ps
away from clock edges. Metastability is therefore not modelled: the tests show
the logic, not the analogue behaviour of a real synchronizer. The reference
measurements also added Gaussian jitter (sigma 0.5 ns) to the trigger times,
and the sweeps here do not. Their windows are therefore ideal trapezoids, a
little sharper than measured curves.

## Limits

* The gating function is fixed to the dual planar A-versus-B geometry. Other
  geometries need a different `gating_network`; there is no run-time
  configuration of channel pairs.
* Outputs are per-channel trigger pulses only. Counting, time stamping and
  readout belong to the acquisition logic.
* Timing closure at 288 MHz depends on the device and its placement. The RTL
  only provides the pipelining knob.
