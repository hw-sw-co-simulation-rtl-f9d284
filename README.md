# Hardware-in-the-loop emulator IP for power converter digital controllers

A digitally controlled power converter is hard to validate before its power stage
exists. Simulating the controller's RTL together with an electrical model of the
converter is accurate but slow (about an hour for one closed-loop run),
and it never exercises the synthesized hardware. This design takes a different route
on an FPGA system-on-chip: the embedded processor simulates the power stage at
electrical level, while the controller's own RTL runs in the programmable logic.
The two advance in lock-step.

This repository holds the programmable-logic side:

- a reusable emulator IP (`hil_emulator_ip`) that steps the controller for a
  programmed number of clock cycles at a time;
- the controller of a synchronous buck converter as the case study: an error node,
  a PI compensator and a DPWM.

The processor software, the power stage and the ADC are not hardware in this design.
The testbenches model them.

## The idea: a controller whose clock the processor owns

The controller runs on a gated copy of the system clock. While no step is running
its clock is stopped, so its state is frozen while the processor computes. One
synchronization step runs like this:

```
processor                                     emulator IP
---------                                     -----------
integrate power stage up to the sync point
write Vsens[n], Vref[n] to shared memory
write START  ───────────────────────────────► read the 2 input words (AXI master)
integrate the power stage over the            open the controller clock for exactly
  next N clock periods (in parallel)            N edges
                                              snapshot the controller outputs
                                              write the 4 output words (AXI master)
wait for irq (or poll STATUS)  ◄───────────── set DONE, raise irq
read outputs, clear DONE, repeat
```

The processor chooses N for each step.

- With a fixed integration step h, h should be a multiple or a submultiple of the
  clock period. Steps then fall every lcm(h, Tclk), and N is that span in clock cycles.
- With a variable-step (SPICE-like) solver, the processor writes a new N before
  each step.

The resolution on the digital side is always one clock cycle.

### Cycle accounting, the part that must be exact

The emulation is only faithful if the controller sees exactly N clock edges per step
and none in between. Three blocks make that so:

- **`sync_controller`** raises `run_en`, a register output. `run_en` is high for
  exactly N consecutive `clk` cycles: a down-counter is loaded with N when the input
  read finishes. With N = 0 the step only exchanges data.
- **`clock_gate`** samples `run_en` on the falling edge of `clk` and ANDs it with `clk`.
  - The sampled enable changes only while `clk` is low, so `gclk` never carries a
    short pulse.
  - Each `clk` cycle that starts with `run_en` high yields one `gclk` rising edge, one
    cycle later. N cycles of `run_en` therefore give exactly N controller edges.
  - On an FPGA this block stands for the vendor's clock buffer with enable.
- **`io_data_buffer`** holds the controller's inputs constant for the whole window. It
  takes a snapshot of the outputs one cycle after the last gated edge, so the processor
  receives a consistent set.

Everything else runs on `clk`. There is no clock-domain crossing: the controller's
clock is the same clock with pulses removed.

Besides the N cycles, a step costs a handful of sequencer cycles plus six single-beat
AXI4-Lite accesses (two reads, four writes), each a few cycles long.

## Block structure

```
            AXI4-Lite slave                               
 processor ───────────────► sync_controller ──run_en──► clock_gate ──gclk──► digital_controller
  (control)                   │ xfer cmd / done                                 ▲ Vsens, Vref │ d, duty,
                              ▼                                                 │             │ e, counter
 shared    ◄───────────────  io_data_controller ◄──────► io_data_buffer ────────┴─────────────┘
 memory     AXI4-Lite master   (read inputs / write outputs)
```

| module | role |
|---|---|
| `hil_emulator_ip` | top: wires the blocks below; ports are the two AXI4-Lite buses and `irq` |
| `sync_controller` | command registers (AXI4-Lite slave), step sequencer, interrupt |
| `io_data_controller` | AXI4-Lite master: fetches the input words, stores the output words |
| `io_data_buffer` | input registers driving the controller; output snapshot for the write-back |
| `clock_gate` | glitch-free clock enable for the controller |
| `digital_controller` | the emulated device under test (buck controller) |
| `pi_controller` | error node e[n] = Vref[n] − Vsens[n] and PI compensator |
| `dpwm` | counter-comparator DPWM with complementary low-side gate |
| `hil_pkg` | bus widths, register map, buffer layout, transfer commands |

Only `digital_controller` and its two sub-blocks are specific to the buck case study.
To emulate another controller, replace `digital_controller` and adapt three things:
the input and output word counts in `hil_pkg` (`N_IN`, `N_OUT`), the word mapping in
`io_data_buffer`, and the instance in `hil_emulator_ip`.

## Programming model

The slave registers are at byte offsets in a 256-byte window. Only address bits [7:0]
are decoded.

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | W / RW | bit0 START (write 1 to launch a step; ignored while busy), bit1 IRQ_EN |
| 0x04 | STATUS | R / W1C | bit0 BUSY, bit1 DONE (sticky), bit2 BUS_ERR (sticky) |
| 0x08 | NCYCLES | RW | controller clock cycles per step (32 bits) |
| 0x0C | IN_ADDR | RW | byte address of the input buffer in shared memory |
| 0x10 | OUT_ADDR | RW | byte address of the output buffer |
| 0x14 | CYCLES | R | controller cycles emulated since reset |
| 0x18 | SYNCS | R | steps completed since reset |

Other offsets:

- Accesses to any other offset answer SLVERR.
- `irq` is a level signal equal to DONE & IRQ_EN. The processor clears it by writing
  1 to STATUS bit 1.
- BUS_ERR is set when a shared-memory access answers with anything other than OKAY.
  The step still completes.

Shared-memory buffers hold one 32-bit word per state variable:

| buffer | word | contents |
|---|---|---|
| input | 0 | Vsens[n], ADC code of the sensed output voltage |
| input | 1 | Vref[n], reference in ADC codes |
| output | 0 | bit0 high-side gate d(t), bit1 low-side gate, bit2 compensator saturated |
| output | 1 | duty applied in the current switching period (DPWM counts) |
| output | 2 | e[n], sign-extended |
| output | 3 | DPWM counter at the end of the window |

The gate value alone is a single sample at the end of the window. The counter and
duty words let the processor reconstruct the whole gate waveform for the next window:
the gate is on while `(counter + j) mod PERIOD < duty`. The testbenches do this, so
windows much longer than one cycle keep the converter model accurate.

## The case-study controller

This is a voltage-mode loop for a synchronous buck: sensed voltage → error → PI → DPWM
→ gate of the high-side switch. The low-side switch is driven by the complement.

**Timing.** The DPWM counter runs 0 … PERIOD−1. On count 0 the compensator samples
Vsens[n] and Vref[n], and it registers the new duty one clock later. The DPWM loads
that duty on its last count, so it applies from the next period. A new sample
therefore reaches the gate one to two switching periods later.

**Compensator.** Position form with gains in Q8:

- I[n] = clamp(I[n−1] + KI·e[n], 0, DUTY_MAX·256)
- u[n] = clamp((I[n] + KP·e[n]) >> 8, 0, DUTY_MAX)
- DUTY_MAX = PERIOD − 1.

Clamping the integrator is the anti-windup.

**Configurations.**

| | first configuration (defaults) | second configuration |
|---|---|---|
| clock | 100 MHz (system and DPWM) | DPWM clock 200 MHz |
| DPWM | 10 bits, PERIOD = 1000, f_sw = 100 kHz | 9 bits, PERIOD = 512, f_sw = 390.625 kHz |
| ADC | 8 bits, 3.3 V full scale, LSB 12.9 mV | same |
| control | PI | integral only |
| parameters | defaults | `DPWM_BITS=9, PERIOD=512, KP=0, KI=4` |

The DPWM's voltage step (11 V / 1000 = 11 mV) is finer than the ADC's, so the loop
does not develop limit cycles.

The gains are not taken from an existing design. With the first configuration's power
stage (38 µH, 200 µF, 5 Ω, Q ≈ 11) the LC resonance is at about 1.8 kHz. The gains
keep the loop crossover well below it:

- KP = 16/256 and KI = 2/256 give a crossover near 80 Hz, with loop gain about 0.7
  at the resonance.
- For the second configuration, KI = 4/256 gives a crossover near 450 Hz.

Change `KP` and `KI` on `hil_emulator_ip` to try others.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_dpwm` | gate level on every clock against a reference counter; duty takes effect only at the period boundary; 1000-clock period; always-off and always-on commands |
| `tb_pi_controller` | integer model of PI and I-only variants over random inputs; both clamps and anti-windup reached |
| `tb_digital_controller` | cycle-level model of the whole controller for 120 periods with inputs changing mid-period |
| `tb_clock_gate` | N enabled cycles give exactly N full-width gated edges, none while `clk` is low |
| `tb_io_data_buffer` | inputs reach the controller; outputs are captured only on the strobe and held |
| `tb_io_data_controller` | AXI4-Lite master against memory stalling 40 % of cycles; word order, no stray writes, error responses |
| `tb_sync_controller` | step order (read, run, capture, write, DONE), `run_en` exactly N cycles, registers, SLVERR, START while busy, interrupt masking and clearing, counters, bus error |
| `tb_hil_emulator_ip` | end-to-end closed loop at default parameters (details below) |
| `tb_exp2_reference_step` | second configuration: 1.65 V → 1.86 V reference step on a 6.1 V, 1 µH / 377 µF stage with switch resistances |

`tb_hil_emulator_ip` plays the processor:

- The power stage is integrated with Runge–Kutta 2 at one step per controller clock.
- The ADC is an 8-bit model.
- One synchronization step covers 100 cycles (1 µs), with some steps of 0 and 37 cycles.
- Completion uses the interrupt on most steps and polling on the others.

It compares every output buffer with an independent cycle model of the controller. A
missing or extra controller edge would therefore show as a mismatch. It also requires
the output to settle:

- within 2 % of 2.0 V after 12 ms;
- within 2 % of 2.2 V after a reference step and 8 ms more.

It counts each mechanism (step, interrupt, polling, idle clock, memory back-pressure,
reference step, zero-length step, START while busy, bus error) and fails if any never
occurred. It covers 20 ms of converter time and runs in a few seconds.

To run a testbench with Verilator 5 from the repository root (here `tb_hil_emulator_ip`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hil_emulator_ip \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/hil_pkg.sv tb/tb_hil_emulator_ip.sv
./obj_dir/Vtb_hil_emulator_ip
```

`tb/axil_mem_model.sv` is the behavioural shared-memory model. It stalls randomly and
returns SLVERR above a configurable address. `tb/axil_cpu_tasks.svh` holds the
processor's AXI4-Lite read and write tasks.

The RTL has AXI handshake-stability assertions: valid held until ready, payload stable.
They run when the simulation is built with `--assert`.

## What follows the original proposal, and what is this implementation's own

**Taken from the proposal:**

- The partition into a slave sync controller, a master I/O data controller, an I/O
  data buffer, a gated controller clock and the controller.
- The step sequence: wait for start, read inputs from shared memory, run N cycles
  fixed by the processor, write outputs, interrupt.
- The use of AMBA buses.
- The case-study structure: error node, PI, DPWM, complementary switches.
- The widths, clock rates and switching frequencies of the two configurations.
- The power-stage values used in the testbenches.

**Chosen here:**

- AXI4-Lite specifically, at 32 bits, with single-beat transfers.
- The register map, the sticky DONE flag, the level interrupt, the error flag and the
  counters.
- The shared-memory word layout, including the extra output words.
- The falling-edge clock gate.
- The sampling instant and the one-period update latency.
- The fixed-point format, anti-windup and gain values of the PI.
- The absence of dead time in the DPWM.
- The reset values (everything zero, duty 0).

**Limitations:**

- The second configuration's separate 50 MHz system clock is not modelled. Its
  controller is simply run from the gated 200 MHz clock.
- The defaults are the first configuration. The second needs the parameter overrides
  listed above.
- Transfers are sequential single beats. An AXI4 burst master would shorten each step
  at the cost of more logic. This matters only when N is small.
