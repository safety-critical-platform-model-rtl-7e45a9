# Two-core Safe Torque Off add-on

This is synthesizable SystemVerilog for a small safety controller. It sits
between the emergency stop and reset buttons of a machine and the frequency
converter that drives its motor. Its one job is to order **Safe Torque Off
(STO)** shortly after the emergency stop is pressed, and not to withdraw that
order until somebody has deliberately reset the machine.

The controller is built as two identical cores that run in lock-step. They
follow the 1oo2 ("one out of two") arrangement of IEC 61508, in which each of
two channels can carry out the safety function and a shared diagnosis compares
them. Each core:

- works out on its own whether STO is needed;
- sends that result to the other core over a checked link, the *safe channel*;
- drives its own *redundant output* only when its own result and the other
  core's result both call for STO.

An external interpreter commands STO when both redundant outputs are active. A
core that disagrees with its partner for too long forces STO itself. A
component that fails its start-up check keeps its core in STO. The aim is that
no single fault of one core, of the link or of the drive can hide an emergency
stop.

The structure comes from a published SystemC model of a drive safety add-on.
That model has two processors, four modules per processor, crossed diagnostics
and two redundant outputs. The model describes what each module does but not
how it works. So every state machine, encoding, timer and latency below is
this design's own choice, and each is marked as such in the source comments.

```
                 estop_i  reset_i                       torque_off_fb
                    |        |                                 |
        +-----------+--------+---------------------------------+----+
        |  safety_platform                                     |    |
        |   +------------------------+   ch_ab   +------------------------+
        |   | safety_core (core 1)   |---------->| safety_core (core 2)   |
        |   |  sync2 x2, reset_module|<----------|  ... same ...          |
        |   |  power_up_self_test    |   ch_ba   |                        |
        |   |  diagnostics           |           |                        |
        |   |  safe_channel_1oo2     |           |                        |
        |   +-----------+------------+           +-----------+------------+
        |          red_out_a                            red_out_b
        +--------------+-------------------------------------+-------------+
                       +------------> sto_interpreter <------+
                                       |            |
                                  safe_sto_o   nonsafe_removal_o
```

The top module is `safety_addon`.

## The cross-check between the cores

This is the part that takes the most care to understand.

Each core keeps one register, `local_sto`. It is that core's own verdict on
whether STO is needed. Every cycle it is loaded with the OR of these causes:

| cause | where it comes from |
|---|---|
| emergency stop pressed | button, through a 2-flop synchroniser |
| self test not ready | power-on, a failed check, or waiting for a reset after an STO |
| channel fault | the word received from the other core is invalid, now or since the last reset |
| discrepancy fault | `local_sto` and the partner's verdict differed for `DISC_CYCLES` cycles in a row |
| torque feedback fault | STO commanded for `FB_TIMEOUT` cycles while the drive still reports torque |

The verdict goes to the other core as a two-bit word, `chan_word_t`, made of
the bit and its complement. A word whose two bits are equal is invalid. That
covers a stuck line or a short between the two lines. An invalid word is read
as "STO requested" and sets a sticky channel fault.

The redundant output of each core is

    red_out = local_sto AND ext_sto

where `ext_sto` is the partner's decoded verdict. The word is driven straight
from the sender's `local_sto` flop, and the decoder in the receiver is pure
logic. So both cores see each other's verdict in the same cycle. Both are
clocked together and fed the same synchronised buttons, so in normal
operation `red_out_a` and `red_out_b` are identical in every cycle. The two
cores can never be a cycle apart.

Consider what happens when only one core calls for STO, for example because
its self test found a broken component. The AND keeps both redundant outputs
low, so for a short while the add-on does **not** order STO. The healthy core
now sees `ext_sto = 1` against its own `local_sto = 0`. After `DISC_CYCLES`
cycles it latches a discrepancy fault, which forces its own `local_sto` high.
Both outputs then go high. The window of disagreement is bounded by
`DISC_CYCLES` + 1 cycles, 5 at the defaults. This is the one place where a
fault delays STO, and the delay is bounded. The interpreter separately flags
a disagreement of the two outputs that lasts `NS_CYCLES` cycles. At the default
parameters that cannot happen while the discrepancy check works, because
`DISC_CYCLES` is below `NS_CYCLES`. It catches, for example, a
redundant output line stuck low.

## Start-up, restart and the power up self test

`power_up_self_test` is a small state machine:

```
 rst_n -> TEST --pass--> WAIT_RESET --reset pulse--> READY
           |                                          |
          fail                              safety function activated
           v                                          v
          FAIL --reset pulse--> TEST      ARMED --reset pulse--> RETEST --pass--> READY
                                                                   |
                                                                 fail --> FAIL
```

- **TEST and RETEST** scan the `N_COMP` component flags `comp_ok`, one per
  cycle. A single 0 sends the machine to FAIL.
- **After power-on** the core stays in STO until the reset button is pressed,
  even when the check passed.
- **ARMED**: once the core is ready, any activation of the safety function
  (`sto_trip` from the diagnostics) sends it to ARMED. It then waits for a
  reset, re-runs the scan and only then is ready again. This is what makes
  STO latch. Releasing the emergency stop does not end STO; a reset does.

`sto_trip` deliberately excludes the "not ready" cause. Otherwise the STO
that the self test itself requests while not ready would re-arm it in its
first ready cycle, and the platform could never start.

## The reset status machine

`reset_module` turns the synchronised reset button into a one-cycle
`sys_reset` pulse. The pulse comes on the *release* of the button, one cycle
after the release is sampled. The button must have been held at least
`MIN_PRESS` cycles, and the emergency stop must not be pressed.

A press or a release while the emergency stop is held is ignored. The machine
then waits in BLOCKED for the button to be let go. So the platform cannot be
reset while the stop is held, and a stuck reset button cannot restart it.

The same pulse clears the latched channel, discrepancy and feedback faults.
It also moves the self test out of WAIT_RESET, ARMED or FAIL.

## Latencies at the default parameters

| event | cycles |
|---|---|
| `estop_i` rises → `local_sto`, `red_out_a/b` | `SYNC_STAGES` + 1 = 3 |
| `estop_i` rises → `safe_sto_o` | `SYNC_STAGES` + 2 = 4 |
| reset released → STO withdrawn, first start after power-on | `SYNC_STAGES` + 3 = 5 at the cores, 6 at `safe_sto_o` |
| reset released → STO withdrawn, after an STO (includes the re-scan) | `SYNC_STAGES` + 3 + `N_COMP` = 9 at the cores, 10 at `safe_sto_o` |
| power-on self test scan | `N_COMP` = 4 |
| one core disagrees → the other core follows | `DISC_CYCLES` + 1 = 5 |

## The diagnostics signal interpreter

`sto_interpreter` stands for the equipment that receives the two redundant
outputs. It has two outputs:

- `safe_sto_o` is the registered AND of the two redundant outputs.
- `nonsafe_removal_o` is set when the two outputs disagree for `NS_CYCLES`
  cycles in a row, and stays set until `rst_n`. It is meant to remove the
  torque by a path that does not rely on the platform, such as a contactor.

The bus between platform and drive is not modelled, nor is the drive. The
drive's answer comes back as the single input `torque_off_fb`.

## Parameters

All parameters are on `safety_addon` and are passed down unchanged. None of
the values comes from the reference description; they are plausible defaults.

| parameter | default | meaning |
|---|---|---|
| `N_COMP` | 4 | component flags per core checked by the self test |
| `SYNC_STAGES` | 2 | synchroniser depth on the two buttons (at least 2) |
| `MIN_PRESS` | 2 | shortest reset press accepted, in cycles |
| `DISC_CYCLES` | 4 | disagreement allowed between the cores before a discrepancy fault |
| `FB_TIMEOUT` | 16 | cycles the drive may take to confirm torque removal |
| `NS_CYCLES` | 8 | disagreement of the redundant outputs before non-safe removal |

## Ports of `safety_addon`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous power-on reset, active low |
| `estop_i` | in | 1 | emergency stop, 1 = pressed (asynchronous) |
| `reset_i` | in | 1 | reset button, 1 = pressed (asynchronous) |
| `comp_ok_a`, `comp_ok_b` | in | `N_COMP` | component health flags seen by core 1 and core 2 |
| `torque_off_fb` | in | 1 | drive reports torque removed |
| `safe_sto_o` | out | 1 | Safe Torque Off command |
| `nonsafe_removal_o` | out | 1 | the two redundant outputs disagreed too long |
| `red_out_a`, `red_out_b` | out | 1 | redundant outputs of core 1 and core 2 |
| `status_a`, `status_b` | out | `core_status_t` | per-core status: self test and reset states, local and external STO, the three fault flags |

All outputs are in a safe state at reset: STO is ordered and the self test
starts scanning.

## Files

`rtl/`:

| file | contents |
|---|---|
| `safety_pkg.sv` | `chan_word_t`, `core_status_t`, the two state enums, the channel encode and check functions |
| `sync2.sv` | button synchroniser |
| `power_up_self_test.sv` | self test state machine |
| `reset_module.sv` | reset status machine |
| `safe_channel_1oo2.sv` | link encoder and decoder with sticky fault |
| `diagnostics.sv` | local verdict, redundant output, discrepancy and feedback checks |
| `safety_core.sv` | one core: two synchronisers and the four modules |
| `safety_platform.sv` | two cores and their crossed channel |
| `sto_interpreter.sv` | evaluation of the two redundant outputs |
| `safety_addon.sv` | top |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_case_study.sv`. Each prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog if it hangs.

- The leaf testbenches compare the module with a cycle-level reference model
  under random stimulus, after a directed part that checks the latencies
  above.
- `tb_safety_addon` runs the top at its default parameters. It plays 300
  random emergency stop, reset and component failure episodes against a
  behavioural drive model. Then it forces an invalid channel word, a drive
  that never removes torque and a stuck redundant output. It checks three
  properties on every cycle:
  - an emergency stop always leads to STO;
  - STO is withdrawn only shortly after a reset;
  - the outputs stay in step.

  It also counts every mechanism listed above and fails if one never
  happens.
- `tb_case_study` replays three stop/reset episodes. In every cycle it checks
  that each core's local verdict equals what the other core receives, and
  that the redundant outputs rise and fall together.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/safety_pkg.sv \
          tb/tb_safety_addon.sv --top-module tb_safety_addon
./obj_dir/Vtb_safety_addon
```

Replace `tb_safety_addon` with any other testbench name. Every run takes well
under a second. For a lint run, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/safety_pkg.sv rtl/safety_addon.sv`.

At the defaults the whole add-on synthesises to about 240 word-level cells and
58 flip-flops, with no memories.

## How far to trust it, and where it departs from the reference

- **What follows the reference.** Two processors share the emergency stop
  and reset inputs. Each has four modules: power up self test, diagnostics,
  1oo2 safe channel and reset. Each sends its diagnosis to the other. The
  redundant outputs are generated when the local and the external STO
  verdicts agree. Both outputs change at the same moment, with no delay
  between the cores. STO is ordered when both redundant outputs are active.
  The drive feeds back the state of the torque.
- **What is this design's own.**
  - All timing and all parameter values.
  - The one-flag-per-cycle component scan, and the `comp_ok` inputs that
    represent "the system components".
  - The release-edge reset rule with its emergency stop interlock.
  - The complement encoding of the channel.
  - The discrepancy and torque feedback timers.
  - The non-safe removal output.
  - The input synchronisers.
- **Behaviour that differs from the reference simulation.** In the reference
  simulation, the redundant outputs appear as pulses tied to the button
  activity. Here STO is *latched*: it lasts from the emergency stop until a
  valid reset. This is the usual behaviour for an emergency stop, but the
  reference waveforms are not reproduced edge for edge.
- **Single emergency stop input.** The emergency stop is taken as one signal
  shared by both cores. A dual-contact button wired separately to each core
  would strengthen the design, but the reference draws a single shared
  signal.
- **Not included.**
  - The bus to the drive, the drive itself, the contactor and the buttons;
    they are ports.
  - The error detection and correction modules and the run-time monitor that
    the reference names as further safety elements or future work.
- **Verification.** The testbenches are simulation only. No formal proof and
  no fault-injection campaign beyond the scenarios listed above has been
  run. The design has not been assessed against IEC 61508 or ISO 13849.
