# Assertion processors: keeping assertion checkers alive in the shipped chip

Assertions written for simulation watch a design's internal signals. When
one fails, it points at the error where it happens, without waiting for the
error to reach an output pin. Normally they are thrown away before tape-out.
This design keeps them in the silicon as synthesised checkers and adds the
hardware that makes a failure in the field useful:

* a **chained checker**: each assertion checker gets one error flag. The flag
  is linked into two daisy chains, an *error chain* (a wired OR that says
  "something failed") and an *error scan chain* (a shift register that says
  *which* assertion failed);
* an **assertion processor** at the end of the chain. When the error chain
  fires, the processor scans the flags out and works out the number of the
  failing assertion. It then looks up what to do for that assertion and
  either halts the chip, resets it or raises a software interrupt.

Two example chains are included. One holds the checks of an 8051
microcontroller core and one the checks of an I2C controller. A third is a
four-gate teaching circuit. The monitored cores themselves are not part of
this RTL. The signals their checkers watch are ports of the top level.

All code is synthesizable SystemVerilog (IEEE 1800-2017) with a single clock.

## The chained checker

Every checker has the same chain interface:

| port      | dir | meaning |
|-----------|-----|---------|
| `reset_n` | in  | asynchronous reset, active low; clears the flag |
| `clk`     | in  | system clock |
| `test_expr` (and `start_event`, `end_event` where the property needs them) | in | watched signals |
| `ei`      | in  | error input, from the previous checker |
| `esci`    | in  | error scan input, from the previous checker |
| `esclck`  | in  | error scan clock |
| `escen_n` | in  | error scan enable, active low |
| `eo`      | out | error output: `ei \| flag` |
| `esco`    | out | error scan output: the flag |

The property logic only produces a one-cycle `fail` signal. The shared
`chain_cell` turns it into the chain behaviour with a single flip-flop:

* **Normal mode** (`escen_n = 1`): a failure sets the flag, and the flag stays
  set. `eo` is the OR of this flag and everything before it in the chain.
* **Scan mode** (`escen_n = 0`): the flag no longer records failures. Instead,
  at each clock edge where `esclck` is high, it loads `esci`. The chain is
  then a shift register that moves one place towards the processor per
  `esclck` pulse.

`esclck` is therefore used as a clock enable, not as a second clock. A shift
is the same as a flip-flop clocked by `clk & esclck`. The scan master must
produce `esclck` as pulses that are synchronous to `clk`. This keeps the
design in one clock domain.

Numbering follows the scan order. Flag 1 is the checker nearest the
processor, because it is on `esco` before any shift. Flag k appears after
k−1 shifts. A scan of N flags that shifts N times pushes zeros in from the
start of the chain (`esci = 0` there). After the scan every flag is clear and
`eo` falls again, ready for the next failure.

```
          clk   _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
          eo    ___/‾‾‾‾‾‾‾ (don't care during scan) ‾‾\___
       escen_n  ‾‾‾‾‾\_______________________________/‾‾‾‾
       esclck   ____________/‾‾‾\_____/‾‾‾\_____/‾‾‾\_____
          esco  ------< flag 1 >< flag 2   >< flag 3 >----
```

Failures that happen while a scan is running are lost. That window is 2N
clocks long.

### Checker library

| module | property (checked at each rising `clk` while out of reset) |
|--------|--------------------------------------------------------------|
| `assert_always` | `test_expr` is 1 |
| `assert_never` | `test_expr` is 0 |
| `assert_one_hot #(WIDTH)` | exactly one bit of `test_expr` is set |
| `assert_window` | from the edge after `start_event` up to and including the edge of `end_event`, `test_expr` is 1 |
| `assert_time #(NUM_CKS=4)` | for the `NUM_CKS` edges after `start_event`, `test_expr` is 1 |
| `assert_frame #(MIN_CKS=2, MAX_CKS=8)` | after a rising edge of `start_event`, `test_expr` becomes 1 no earlier than `MIN_CKS` and no later than `MAX_CKS` edges later (0 = no upper bound) |
| `assert_no_overflow #(WIDTH, MIN, MAX)` | a value that was `MAX` does not step above `MAX` or wrap to `<= MIN` |
| `assert_no_underflow #(WIDTH, MIN, MAX)` | a value that was `MIN` does not step below `MIN` or wrap to `>= MAX` |

The properties follow the checkers of the same names in the Open
Verification Library (OVL). The corner cases are this design's reading of
those checkers: whether the end-event edge counts, whether start events are
ignored during a running check, and how the frame counter counts. Each
module's header comment gives the exact rules.

## The assertion processor

`assertion_processor #(N_ASSERT, RESET_CYCLES, ACTION_TABLE)` has three parts:

1. **Scan detection.** In the idle state it watches `eo`. When `eo` is high it
   pulls `escen_n` low. Then it repeats N times: it samples the chain's
   `esco` (its input is named `esci`), counts the bit, and gives one
   `esclck` pulse. When bit k is 1, `error_no` becomes k. If several flags are
   set, the **last one read wins**, which is the highest number.
2. **Priority encoding.** `ACTION_TABLE[error_no]` is a 3-bit action vector
   (`ap_pkg::action_t`): bit 0 halt, bit 1 hardware reset, bit 2 software
   interrupt. The tables in this design come from each assertion's OVL-style
   severity level through `ap_pkg::sev2act`:
   * fatal → halt
   * error → reset
   * warning → interrupt
   * info → no action
3. **Error handling.** The vector is decoded with halt first, then reset, then
   interrupt, so a vector with several bits set takes the strongest action.
   * **Halt**: `halt` stays high until `reset_n`.
   * **Reset**: `chip_reset_n` goes low for `RESET_CYCLES` clocks. Then the
     processor goes back to monitoring.
   * **Interrupt**: `sw_irq` stays high until `irq_ack`. Failures that happen
     meanwhile stay in their flags and are scanned after the acknowledge.
   * **No action**: only `error_no` / `error_valid` report the failure.

**Timing.** The first clock edge that sees `eo` high starts the scan. Each
flag takes two clocks (sample, then shift), and one more clock decodes the
action. The action is therefore visible **2N + 2 clocks after the edge at
which `eo` rose**: 16 clocks for the 7-assertion 8051 chain and 1026 clocks
for a 512-assertion chain. `error_no`, `error_priority` and `error_valid`
stay valid until the next scan starts.

The processor must be reset by the system `reset_n`, not by its own
`chip_reset_n`. Two concurrent assertions in the module check the scan
protocol:
* `esclck` only pulses while `escen_n` is low;
* every scan ends after exactly N flags.

`error_no` is `$clog2(N_ASSERT+1)` bits wide. The default `N_ASSERT = 4`
matches the four-assertion ALU example below. The parameter has been
simulated at 5, 8, 11, 32, 64, 128, 256 and 512.

## The example chains

### 8051 core (`c8051_assert_chain`, `c8051_pkg`)

| seq | checker | watches | action |
|-----|---------|---------|--------|
| 1 | `assert_no_underflow` ("u_flow", divider) | divider iteration counter, legal 1..8 | reset |
| 2 | `assert_frame` (divider) | `div_done` 2..8 cycles after `div_en` | reset |
| 3 | `assert_always` ("always2", divider) | `div_ok` | reset |
| 4 | `assert_always` ("always1", ALU top) | ALU receives a valid opcode | halt |
| 5 | `assert_window` | no new `div_en` before `div_done` | interrupt |
| 6 | `assert_time` | interrupt trigger answered by a 4-cycle `int_ack` | interrupt |
| 7 | `assert_no_overflow` | stack pointer stays in 07h..7Fh (128-byte RAM) | halt |

Entries 1–4 are the chain through the ALU hierarchy. It enters at the ALU top
level (`alu_top_chain`) and passes always1. It then enters the divider
(`alu_divide_chain`), passes always2, frame and u_flow, and leaves through the
ALU top level. Every level of the hierarchy that the chain crosses gains the
chain ports; that interface change is the main cost of adding chained
assertions to an existing design. The scan therefore reads u_flow,
frame, always2, always1 in that order. Entries 5–7 are further checks on the
core, placed ahead of the ALU part.

A full 8051 instrumentation would have 11 assertions. Only these seven are
specified, so the other four are absent. The names of the monitored signals,
the bounds and the severities are this design's choices.

### I2C controller (`i2c_assert_chain`, `i2c_pkg`)

Five checkers:

| seq | checker | watches | action |
|-----|---------|---------|--------|
| 1 | `assert_one_hot` | command sequencer state (4 bits) | reset |
| 2 | `assert_one_hot` | bit controller state (5 bits) | halt |
| 3 | `assert_one_hot` | byte controller state (6 bits) | halt |
| 4 | `assert_never` | read and write commands at the same time | reset |
| 5 | `assert_always` | the interrupt request agrees with its flag and enable | interrupt |

The checker types and their count are given. Which state machines are
checked, their widths and the order are choices.

### Black-box vs. white-box example (`wb_example`)

Three registered inputs feed three gates:
* OR gate X: `xz = a | b`
* AND gate Y: `yz = a & c`
* AND gate Z: `d = xz & yz`

`d` is registered again, so `d_q` follows the inputs after two clock edges.
Logically `d = a & c`, so a stuck-at-0 on `b` can never be seen at `d`:
black-box testing cannot find it. The white-box assertion probes the
internal nets f1 = `xz` and f2 = `yz` and flags `f1 + f2 > 1` with a chained
`assert_never`. In this small circuit the condition is reachable (a = c = 1).
The example uses it to show the checker firing.

## Top level (`ap_top`)

`ap_top` contains three independent chain + processor pairs:
* the 8051 chain (N = 7);
* the I2C chain (N = 5);
* the example circuit (N = 1).

Inputs:
* `c8051_mon` and `i2c_mon`: packed structs of the watched core signals;
* `wb_a`, `wb_b`, `wb_c`: inputs of the example circuit;
* one `*_irq_ack` per processor.

Outputs:
* one `ap_status_t` per processor (`halt`, `chip_reset_n`, `sw_irq`,
  `error_valid`, `error_priority`, 10-bit `error_no`);
* `wb_d`, the output of the example circuit.

A processor's `chip_reset_n` also resets the checkers of its own chain. In a
chip it would reset the monitored core as well. The first checker of each
chain gets `ei = esci = 0`.

## How far to trust it, and where it is this design's own

What the design fixes and what follows it:
* **Fixed by the design:**
  * the chain port set and its meaning;
  * the daisy-chained error and scan chains;
  * the scan order of the ALU example;
  * a processor that counts scanned bits to find the failing assertion;
  * the three actions and their priority order;
  * the use of severity levels as action priorities;
  * the checker types and their purposes in the two cores.
* **Chosen here:**
  * the one-flip-flop flag/scan cell;
  * `esclck` realised as a clock enable;
  * active-high `eo`, with scanning while `escen_n` is low;
  * the 2-clock-per-bit scan;
  * keeping the highest failing number;
  * the halt, reset and interrupt handshakes and the reset pulse length;
  * the severity-to-action mapping;
  * all monitored-signal names and bounds;
  * one processor per chain.

What is not built:
* the monitored 8051 and I2C cores;
* any processor or coprocessor that would run an error-handling routine or
  report errors over a network;
* four of the eleven 8051 assertions;
* a five-action priority encoding (only the three actions above exist).

Known limitations:
* failures during a scan are not recorded;
* with several failures only the highest-numbered one is reported;
* checker resets are the AND of `reset_n` and the processor's `chip_reset_n`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_chain_cell` | random set, shift, hold and reset against a reference flag model |
| `tb_assert_*` | each property against an independent reference model over 3000 random cycles; `ei` forwarding; scan shifting with failures ignored |
| `tb_assertion_processor` | against a behavioural 6-flag chain: 2N+2 timing, exactly N `esclck` pulses, highest number kept, priority decode of mixed vectors, reset pulse length, interrupt held until acknowledge, failure during a pending interrupt |
| `tb_alu_top_chain` | the four ALU checks land on numbers 1–4 in hierarchy order; `ei` and `esci` pass through both levels |
| `tb_c8051_assert_chain`, `tb_i2c_assert_chain` | legal activity raises nothing; each property broken alone lands on its sequence number; chain empty after a scan |
| `tb_wb_example` | all truth-table rows at the registered output, and the assertion firing exactly for a = c = 1 |
| `tb_ap_top` | end to end, default parameters: all 13 assertions broken in turn through the processors, with timing, actions, a double failure, and counts of scans, halts, resets and interrupts |
| `tb_ap_scaling` | processors with chains of 5, 8, 11, 32, 64, 128, 256 and 512 checkers (helper `always_chain`) |

Run one with Verilator 5, for example the top level:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/ap_pkg.sv rtl/c8051_pkg.sv rtl/i2c_pkg.sv \
  --top-module tb_ap_top tb/tb_ap_top.sv -o sim
./obj_dir/sim
```

Replace the top-module and file for the other testbenches. The packages must
come first. Every testbench finishes in well under a second.

## Changing it

* **New checker type.** Compute a one-cycle `fail` and instantiate
  `chain_cell`, as the existing `assert_*` modules do.
* **New chain.** Link `eo → ei` and `esco → esci` from checker to checker,
  and tie the first checker's `ei`/`esci` to 0. Sequence number k is the
  k-th checker counted back from the processor. Give the processor
  `N_ASSERT` = chain length and an `action_t [N:1]` table; build the table
  with `sev2act` from severities, as `c8051_pkg` does.
