# Mixed-architecture digital PID controller

This is a PID controller built as a small datapath rather than as software.
Each time START is pulsed it computes the next control value from the new
error sample and the previous state, and raises DONE six clock cycles later.
The arithmetic is shared in time. Where a fully parallel version would need
three multipliers, this one has a single combinational multiplier, two
adders and an accumulator, driven by a state machine that processes one term
of the control law per cycle. This "mixed" organisation, between a fully
serial and a fully parallel datapath, is the main architecture of the paper
*FPGA Implementation of Digital PID*. The RTL here is an independent
SystemVerilog implementation of it.

## The control law

The controller uses the incremental (velocity) form of a PID. It is
discretised with the mixed PID structure and trapezoidal integration:

    L_k = L_{k-1} + A*e_k + B*e_{k-1} + C*e_{k-2}

    A = Kp + Kd + Ki/2
    B = Ki/2 - Kp - 2*Kd
    C = Kd

Here `e_k` is the current error, `L_k` the controller output, and Kp, Ki, Kd
the discrete gains. For a continuous controller
`Kp (1 + 1/(Ti s) + Td s)` sampled every `Te` seconds, the gains are
`Ki = Kp*Te/Ti` and `Kd = Kp*Td/Te`.

Because the law is incremental, the accumulator is never cleared: at the
start of a sample it already holds `L_{k-1}`, and the three products are
added to it.

**Doubled coefficients.** `Ki/2` has a fractional part when Ki is odd. To stay
exact, the datapath works with `2A`, `2B` and `2C`, so the accumulator holds
`2*L`. The output register halves the value when it captures it. The halving
is an arithmetic shift, so `L_k` is rounded toward minus infinity.

## Datapath

```
 Ki ──►┌────────┐  sum1  ┌────────┐ coef  ┌────────────┐  prod  ┌─────────────┐      ┌────────────┐
2Kp ──►│ adder1 │──────►│ adder2 │─────►│ multiplier │──────►│ accumulator │─────►│ output reg │──► L_k
       └────────┘  2Kd ─►└────────┘  ┌──►└────────────┘       │ (holds 2L)  │ 2L   │ /2, clamp  │
                                     │                        └─────────────┘      └────────────┘
 e_k ──► [e0] ──► [e1] ──► [e2]      │
          └───────┴────────┴──► operand register ("3-state" bus, one-hot select)
```

| Block | File | Role |
|---|---|---|
| error registers | `pid_error_regs.sv` | Three-stage shift chain holding e_k, e_{k-1}, e_{k-2}. Shifted once per sample. |
| operand register | `pid_tristate_reg.sv` | Puts one of the three errors on the multiplier input. In the original design the registers share a bus through three-state drivers; here those become a one-hot AND-OR mux followed by a register. An assertion checks that the select is one-hot. |
| adder 1, adder 2 | `pid_adder.sv` | Form the coefficient. Each adder can gate either operand to zero, double operand b, and add or subtract it. |
| multiplier | `pid_multiplier.sv` | Signed, combinational, full precision. |
| accumulator | `pid_accumulator.sv` | Adds each product. It saturates at its width instead of wrapping. |
| output register | `pid_out_reg.sv` | Captures `2L/2`, clamped to the output width. |
| state machine | `pid_fsm.sv` | Drives every control listed above. |
| shared types | `pid_pkg.sv` | Adder-control struct, per-coefficient settings, state enum, cycle count. |
| top | `pid_mixed_top.sv` | Wires the blocks together. |

The adders take `Ki`, `2Kp` and `2Kd`. `2Kp` and `2Kd` are plain wiring
shifts. The settings per coefficient are:

| coefficient | adder 1 | adder 2 | value |
|---|---|---|---|
| 2A, multiplies e_k     | Ki + 2Kp | + 2Kd | Ki + 2Kp + 2Kd |
| 2B, multiplies e_{k-1} | Ki − 2Kp | − 4Kd (b doubled) | Ki − 2Kp − 4Kd |
| 2C, multiplies e_{k-2} | 0        | + 2Kd | 2Kd |

## Sample schedule

The state machine is a Moore machine. Edge 0 is the clock edge at which
START is seen in IDLE.

| after edge | state | what happens at the next edge |
|---|---|---|
| 0 | SHIFT | error registers take `ek` |
| 1 | T2 | operand register ← e_{k-2} |
| 2 | T1 | acc += 2C·e_{k-2}; operand register ← e_{k-1} |
| 3 | T0 | acc += 2B·e_{k-1}; operand register ← e_k |
| 4 | A0 | acc += 2A·e_k |
| 5 | WR | output register ← clamp(acc/2) |
| 6 | IDLE | DONE = 1, `lk` holds L_k |

Each operand is loaded in the same cycle as the previous product is
accumulated, so three terms cost four cycles instead of six.

The START/DONE behaviour follows the original timing diagram:

- DONE is high while idle.
- DONE goes low on the edge after START.
- DONE returns high with the new output.

START is ignored while a sample is running. If START is still high when
DONE rises, the next sample begins at the following edge.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset. Clears the error history, the accumulator (L_{-1} = 0) and the output. |
| `start` | in | 1 | compute one sample |
| `kp`, `ki`, `kd` | in | `GAIN_W` | gains, unsigned |
| `ek` | in | `E_W` | error sample, signed two's complement |
| `lk` | out | `OUT_W` | control output, signed, clamped to `[-2^(OUT_W-1), 2^(OUT_W-1)-1]` |
| `done` | out | 1 | idle, `lk` valid |

Keep `kp`, `ki`, `kd` and `ek` stable from START until DONE. The gains are
read during states T1 to A0, and `ek` at SHIFT.

Parameters of `pid_mixed_top`:

| parameter | default | origin |
|---|---|---|
| `GAIN_W` | 12 | from the original timing diagram, which shows the inputs as `FFF` |
| `E_W` | 12 | from the same diagram |
| `OUT_W` | 12 | from the same diagram |
| `ACC_W` | 32 | this design's choice |

The coefficient width is `GAIN_W+4` and the product width `GAIN_W+4+E_W`.
Both are derived inside the top and cannot overflow. The worst case is
`|2B| < 7*2^GAIN_W`.

## Limits and overflow

Two limits apply, and both saturate instead of wrapping:

- **Accumulator** (`ACC_W` bits, holding 2L). A long-lasting error winds the
  integral up until the accumulator saturates.
- **Output** (`OUT_W` bits). The halved accumulator value is clamped. The
  accumulator keeps its full value, so the output stays at its limit until
  the accumulated value comes back into range.

There is no anti-windup beyond this. The original design only notes that the
actuator may reach its limits.

## What follows the original and what does not

**Taken from the original design:**

- the control law and its three coefficients
- the block set: three error registers, a three-state operand register, two
  adders in series fed by the gains, one combinational multiplier, an
  accumulator, an output register, and one state machine that controls all
  of them
- the START/DONE handshake
- the 12-bit bus widths

**Choices of this design** (the original leaves them open):

- the number formats: unsigned gains, signed error and output
- the doubled coefficients that keep `Ki/2` exact
- how the adders are controlled
- the order of the terms (e_{k-2} first) and the 6-cycle schedule
- saturation of the accumulator and clamping of the output
- asynchronous reset to zero
- modelling the three-state bus as a mux

**Not included:**

- The serial and parallel variants of the datapath. The original only
  compares them by FPGA area.
- The microcontroller implementation used as a speed baseline. It is
  software, together with its ADC inputs, PWM output, DC motor and optical
  encoder.

The original reports FPGA area in CLBs of an XC4000-family part, and an
execution time read off a simulation. Neither is reproduced: the cycle count
here is this design's own, and no XC4000 mapping was done.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against values computed independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_pid_adder` | random operands and controls; the three coefficient settings for random gains and all-ones gains |
| `tb_pid_multiplier` | random and corner-case signed products |
| `tb_pid_error_regs` | history against a queue model with random shift enables |
| `tb_pid_tristate_reg` | random one-hot selects and loads |
| `tb_pid_accumulator` | random sums, driven into both saturation limits |
| `tb_pid_out_reg` | halving and clamping, in range and beyond both limits |
| `tb_pid_fsm` | the control word in every state, the 6-cycle timing, START while busy, back-to-back START |
| `tb_pid_mixed_top` | ~1400 samples against an integer model of the law at default sizes. Covers random and full-range inputs, the all-`FFF` case of the timing diagram, accumulator saturation both ways, output clamping both ways, START while busy and back-to-back samples. It counts each of these and fails if one never occurs. |
| `tb_pid_step_response` | closed-loop step response (see below) |

`tb_pid_step_response` drives a second-order plant,
`wn²/(s²+2ζwn·s+wn²)` with ζ = 0.3 and wn = 1, through a 5 V step. The loop
settings are Kp = 0.3, Ti = 2 s, Td = 0.5 s and Te = 0.1 s. The discrete
gains Kp : Ki : Kd = 0.3 : 0.015 : 1.5 are passed as the integers
20 : 1 : 100, and one error unit is 5/16 V. Every output is checked against
the integer model, and the plant output must end within one error unit of
the set point after 30 s. The coarse error quantisation, which is needed so
that the 12-bit output can hold the steady state, makes the response settle
slowly.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_pid_mixed_top \
    -y rtl -y tb +libext+.sv rtl/pid_pkg.sv tb/tb_pid_mixed_top.sv
./obj_dir/Vtb_pid_mixed_top
```

Change the module name to run another testbench. Every testbench stops
itself through a watchdog if the design hangs.

## Changing it

- **Wider gains or errors.** Set `GAIN_W` and `E_W`. The internal widths
  follow automatically. Make sure `ACC_W` is at least `GAIN_W+E_W+4` plus
  headroom for the integral.
- **Wider output.** Set `OUT_W`.
- **Different term order or a faster schedule.** Edit `pid_fsm.sv`. The
  coefficient encodings live in `pid_pkg::coef_ctl`, and
  `pid_pkg::CYCLES_PER_SAMPLE` must match the new schedule, because the
  testbenches check against it.
