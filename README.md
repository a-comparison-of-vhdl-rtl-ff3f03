# Microprogrammed synchronous state machines

A synchronous finite state machine can be built as hand-written next-state
logic. It can also be built as a *microprogram*: a small memory holds one word
per state, and a fixed sequencer fetches one word per clock. The word's own
fields pick the condition input to test and the address of the next word.
The word also carries the state's output bits. The sequencer's logic and
clock speed stay the same whatever machine it runs. Changing or replacing the
machine means changing only the memory contents.

This repository holds SystemVerilog for three such sequencers:

* the **basic microsequencer**: a microprogram counter, one branch field and
  a polarity bit;
* the **scaled-down microsequencer**: every word carries *both* successor
  addresses, and the tested condition picks one. It has no counter and no
  stack;
* the **full-scale microsequencer**: the scaled-down one plus an
  incrementer, a return-address stack and a loop counter with its own stack.
  It adds subroutines, counted (nested) loops and two-way branches.

Each sequencer can use either of two memory styles. Microprograms are
included for three machines:

* the IEEE 1149.1 Test Access Port (TAP) controller (16 states);
* a temperature control unit (22 states);
* a quarter-inch tape cartridge controller (61 states).

A four-state example machine is also included. The top level,
`fsm_useq_top`, runs these machines side by side.

## The scaled-down sequencer

```
 cond_in ──► DREG ──► MUXSTATTH ──sel──► MUX2 ──addr──► memory ──► pipeline register (uword)
                        ▲ select          ▲ A  ▲ B        (ROM, registered output)   │
                        │                 │    │                                     │
                        └──────── fields of the current word ◄───────────────────────┘
 nreset ──► D flip-flop ──► MUX2 (forces address 0)
```

Word layout (`16 + SEL_W + N_OUT` bits; the document's example has SEL_W = 3
and N_OUT = 2):

| bits                       | field                                   |
|----------------------------|-----------------------------------------|
| `[7:0]`                    | bus A: next address if the condition is 0 |
| `[15:8]`                   | bus B: next address if the condition is 1 |
| `[16+SEL_W-1:16]`          | condition select                        |
| above                      | the state's outputs                     |

* **Continue or unconditional branch:** the same address goes on both
  buses.
* **Conditional branch:** the two successors go on A and B.

The highest condition input is tied to 0, so selecting it always takes bus A.
With a 3-bit select there are seven real condition inputs. The temperature
unit needs nine, so it uses a 4-bit select (fifteen inputs).

## The full-scale sequencer

The single branch field feeds both MUX4 multiplexers and also the counter's
load input. Each MUX4 picks its next address from one of four sources:

| select | source                                              |
|--------|-----------------------------------------------------|
| `00`   | the branch field                                    |
| `01`   | the counter value (STACKCTR)                        |
| `10`   | the top of the return-address stack (STACK)         |
| `11`   | INCREM: the address of the current word plus one    |

The first MUX4 gives the next address when the condition is 0; the second
gives it when the condition is 1.

Word layout (`ADDR_W + 9 + SEL_W + N_OUT` bits):

| bits            | field                                                       |
|-----------------|-------------------------------------------------------------|
| `[7:0]`         | branch field (also the counter's load value)                |
| `[9:8]`         | sel0: MUX4 used when the condition is 0                     |
| `[11:10]`       | sel1: MUX4 used when the condition is 1                     |
| `12`            | counter-stack enable                                        |
| `13`            | `cntnload`: 0 loads the counter from the branch field       |
| `14`            | `cnten`: count down                                         |
| `15`            | `pushpop`: 1 push, 0 pop (shared by both stacks)            |
| `16`            | return-stack enable                                         |
| `[17+SEL_W-1:17]` | condition select                                          |
| above           | outputs                                                     |

`useq_pkg::fs_ctl_t` describes bits 16..8 as a packed struct.

How each kind of instruction is coded:

* **Continue:** sel0 = sel1 = INCREM.
* **Branch:** sel0 = sel1 = branch field.
* **Conditional branch:** one select is INCREM, the other is the branch
  field. This works when one of the two successors is at the next address.
* **Two-way branch, neither successor next in line:** an earlier word loads
  the counter with one target (`cntnload = 0`). The branching word then
  selects the counter for one outcome and the branch field for the other.
* **Subroutine call:** branch through the branch field and push. The stack
  takes INCREM, which is the return address.
* **Return:** select the stack and pop.
* **Counted loop:**
  * Load the count.
  * The last word of the loop body tests UNDERFLOW (count = 0). It branches
    back while the count is not 0, and counts down every pass.
  * A body run this way executes count + 1 times.
* **Nested loops:** push the outer count and load the inner one in the same
  word. Pop the outer count when the inner loop ends.

UNDERFLOW drives the highest condition input. In the scaled-down sequencer
that input is tied to 0.

## Timing and reset

All three sequencers execute one word, that is one state, per clock.

The scaled-down and full-scale sequencers register their condition inputs
(DREG) and their reset input. This gives them two clocks of latency:

* A state entered at clock edge *k* depends on the inputs as they were just
  before edge *k − 1*.
* After reset is released, the machine leaves its first state on the second
  rising edge.
* While the registered reset is 0, MUX2 forces address 0. The pipeline
  register therefore holds word 0, the machine's initial state.
* In the full-scale sequencer the registered reset also empties both stacks
  and clears the counter.

The memory has an unregistered address and a registered output. That output
register *is* the pipeline register, so a state's outputs are stable for the
whole clock.

The basic sequencer works differently. It tests its conditions
combinationally and applies reset on the next edge.

## Memory styles

The microprogram memory has 8 address bits (256 words). It comes in two
interchangeable styles, chosen by the `MEM` parameter:

* **`eab_rom`:** one ROM of the kind an FPGA embedded memory block provides:
  combinational address, registered data.
* **`lut_rom`:** banks of 16-word lookup-table arrays (each bank is
  `WIDTH` 4-input LUTs). A multiplexer on the upper address bits picks one
  bank, and output registers hold the result. This style suits devices whose
  block memories are busy or missing.

Both styles give the same cycle behaviour.

Contents come from the `IMAGE` parameter, a `useq_pkg::image_t`: 256 words
of 64 bits, of which each sequencer keeps the low bits it needs. The images
are computed by functions in `tap_ucode_pkg`, `temp_ucode_pkg`,
`tape_ucode_pkg` and `rep_ucode_pkg`. No files are read.

## The machines

**TAP controller** (`tap_ctrl`, `tap_ucode_pkg`):

* One input, `tms`.
* Sixteen outputs, one per state (one-hot). Bit 0 is Test-Logic-Reset,
  followed by Run-Test/Idle, the eight DR-column states and the six
  IR-column states in standard order (see the package header).
* The scaled-down program places state *k* at address *k*.
* The full-scale program adds one extra state between Test-Logic-Reset and
  Run-Test/Idle. That state loads the counter with the address of
  Run-Test/Idle, and it drives no output bit.
  * Run-Test/Idle, Update-DR and Update-IR then go to Run-Test/Idle through
    the counter when `tms` = 0, and to Select-DR-Scan through the branch
    field when `tms` = 1.
  * This costs one extra clock on the Test-Logic-Reset → Run-Test/Idle path.

**Temperature control unit** (`temp_ctrl`, `temp_ucode_pkg`):

* Nine inputs: `end`, `strobe`, `sl`, `sh`, `dl`, `dh`, `enter`, `ageb`,
  `altb`.
* Twelve output bits: `start`, `set_low`, `set_high`, `clr_low`,
  `clr_high`, `ld_low`, `ld_high`, `selhilo`, `seldisp[1:0]`, `fan_on`,
  `lamp_on`.
* The 22 states A..V do four jobs:
  * run a measurement;
  * compare the result with the low limit (lamp) and the high limit (fan);
  * let an operator load either limit;
  * set display flags.
* Placing the states in letter order gives every two-way state one
  successor at the next address. The same order therefore serves both
  sequencers.

These choices are this design's reading of the source state chart:

* The exits of the lamp state F, the fan state H, and the `ageb` = 0 exit of
  G return to state B.
* Transitions that re-enter the `sl` test go through state I, one clock
  later, because a word tests only one condition.
* `start` is active low: it is 0 only in state C.
* `selhilo` is 1 only in state G.
* `seldisp` stays 0.

**Tape cartridge controller** (`tape_ctrl`, `tape_ucode_pkg`):

* Five tested inputs, `cc` and `t[3:0]`, and thirteen outputs `p[12:0]`.
  Inputs and outputs keep the generic names of the source state chart
  (CC, T0..T3, P0..P12), which does not say what they mean.
* 61 states, lettered A..Z, AA..AZ, BA..BI, at addresses 0..60. After
  power-up (A, B) the machine idles in state C.
  * When `cc` = 1 it enters a chain of `cc` tests, D to K. Each 0 result
    moves one step down the chain. Each 1 result enters a branch of its
    own, mostly states that wait for `cc` = 1 before moving on.
  * When `cc` = 0 it goes to a decision tree on `t3`, `t2`, `t1` and `t0`.
  * Every branch ends back in C.
* In letter order every two-way state has one successor at the next
  address, so the full-scale program needs no counter load.
* Readings of the chart that are this design's own:
  * The chart names two boxes "AK". The second one, the `t0` = 0 exit of
    AL, is taken to be AM, the one letter otherwise unused.
  * State BE is marked "BE=1", which is not one of the P outputs. BE
    therefore drives no output.
  * P7..P10 are never set on the chart and stay 0.

**Four-state example** (`rep_ucode_pkg`; in the top it runs on `basic_useq`):

* The outputs are 00, 01, 10, 11.
* The machine stays in a state while `tms` = 1 and advances while `tms` = 0.
* Each state branches to itself or continues to the next address. The basic
  sequencer has only one branch field, so the way back from the last state
  to the first goes through one extra word. That step takes two clocks.
* The package also has a four-word version for the full-scale sequencer
  (`FLSC_IMAGE`):
  * State D needs two successors, A and D itself, and neither is the next
    address. So D's exit is a two-way branch through the counter.
  * State A loads the counter with its own branch field, 0, which is A's
    address. D then takes the counter when `tms` = 0 and its branch field
    when `tms` = 1.

## What is not included

* **Direct HDL state machines.** These are the baseline that microprograms
  are usually compared against, and they are not part of this design. The
  testbench reference models `tb/tap_ref.sv`, `tb/temp_ref.sv` and
  `tb/tape_ref.sv` are written in that style.
* **FPGA timing and area.** Clock rates and cell counts depend on the device
  and the vendor tool, and nothing here reproduces them.
* **Stack depth.** The source gives no depth for the two stacks, so the
  depth is a parameter (`STACK_DEPTH`, default 4). A push onto a full stack
  drops the oldest entry. A pop from an empty stack yields 0.
* **Field positions.** In the full-scale word the field positions follow the
  source schematic. The rest is this design's own choice: the MUX4 select
  codes, `pushpop` = 1 meaning push, a down-counting counter, and UNDERFLOW
  on the spare condition input. The basic sequencer's field order is also
  this design's own.

## Files

| file | contents |
|------|----------|
| `rtl/useq_pkg.sv` | image type, architecture/memory enums, field-packing helpers |
| `rtl/dreg.sv`, `muxstatth.sv`, `mux2.sv`, `mux4.sv`, `increm.sv`, `stack.sv`, `stackctr.sv` | sequencer building blocks |
| `rtl/eab_rom.sv`, `rtl/lut_rom.sv` | the two memory styles |
| `rtl/basic_useq.sv`, `scaled_down_useq.sv`, `full_scale_useq.sv` | the sequencers |
| `rtl/tap_ucode_pkg.sv`, `temp_ucode_pkg.sv`, `tape_ucode_pkg.sv`, `rep_ucode_pkg.sv` | microprograms |
| `rtl/tap_ctrl.sv`, `rtl/temp_ctrl.sv`, `rtl/tape_ctrl.sv` | machines with named ports; `ARCH` and `MEM` parameters pick the sequencer and the memory |
| `rtl/fsm_useq_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tap_ref.sv`, `tb/temp_ref.sv`, `tb/tape_ref.sv` | reference models used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the whole design at default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/useq_pkg.sv rtl/tap_ucode_pkg.sv rtl/temp_ucode_pkg.sv rtl/tape_ucode_pkg.sv \
  rtl/rep_ucode_pkg.sv tb/tb_fsm_useq_top.sv --top-module tb_fsm_useq_top -Mdir obj_top
./obj_top/Vtb_fsm_useq_top
```

Replace the testbench name to run any other test. The packages must come
first on the command line.

## How far it is verified

* Every module has a testbench that compares it with values worked out
  independently.
* The TAP, temperature and tape testbenches check every output every clock, on all
  four sequencer/memory combinations, against reference models. Inputs are
  random, and the run fails unless every state is visited.
* The full-scale test runs a program through every next-address source and
  compares the executed addresses with a trace worked out by hand. The
  program covers conditional branches both ways, a two-way branch, nested
  calls and a two-level loop. The same test also runs the full-scale
  four-state example with random input.
* The top-level test runs 20,000 clocks at default sizes. It counts resets,
  continues, unconditional and conditional branches, counter loads, two-way
  branches and polarity branches, and fails if any never happens.
  Subroutines and loops are not used by the included machines, so the
  full-scale test is the one that covers them.
* A deliberately broken copy of each module was checked to make its
  testbench fail.
