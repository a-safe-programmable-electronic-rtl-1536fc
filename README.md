# Dual-channel master/slave PLC for safety-related control

This is synthesizable SystemVerilog for a programmable logic controller that is
meant to be licensed for safety-critical use. Two ideas shape it:

* **No semantic gap between program and machine.** Application programs are
  function block diagrams (IEC 61131-3 FBD) and sequential function charts.
  A *master* processor runs only the wiring of the diagram: sequences of
  "send this block's tag and its arguments, fetch its results". It knows just
  two instructions, `MOVE` and `STEP`. A *slave* processor executes the
  function blocks themselves. Those blocks come from a small library that is
  verified once. Object code for the master can be read back into the
  diagram almost line by line. That is what makes verification by "diverse
  back translation" cheap.
* **Every word is checked across two channels.** Two masters and two slaves
  run the same work. Every word going from the masters to the slaves, and
  every result coming back, passes through a comparator. The comparator takes
  one word from each channel and passes the word on only if both agree.
  Actuator outputs are compared the same way before they reach the plant. Any
  disagreement, overrun, watchdog expiry or protocol fault stops the whole
  system and drives the outputs to a safe state.

Each comparator also has a model of a *fast fail-safe comparator*. This is a
4-bit comparator that turns "equal" into a 100 kHz rectangular wave. A
second stage holds its output low for good once the wave breaks.

## Structure

```
            PROM  RAM                              PROM  RAM
         +------------+                         +------------+
         |  master 1  |                         |  master 2  |
         +------------+                         +------------+
        tx |      ^ rx                         tx |      ^ rx
        [FIFO]  [FIFO]                         [FIFO]  [FIFO]
           |      ^------------+     +------------|------^
           |                   |     |            |
           +------> m2s comparator <---------------+      (fifo_comparator)
                        |      |  s2m comparator         (fifo_comparator)
           +------------+      |     ^   ^
           v                   v     |   |
        [FIFO]  [FIFO]      [FIFO]  [FIFO]               ...and the mirror
         rx |      ^ tx      rx |      ^ tx                image for channel 2
         +------------+      +------------+
         |  slave 1   |      |  slave 2   |
         +------------+      +------------+
          in buf  out latch   in buf  out latch
            ^         \          ^        /
   sensor_in+          +-> output_comparator -> actuator_out
```

There are four fall-through FIFOs per channel. `fifo_comparator` takes the
head word of the same queue in both channels and latches both. If they are
equal it pushes the word into the next queue of both channels. If they differ
it stops.

| module | role |
|---|---|
| `pes_top` | the whole system: both channels, 8 FIFOs, 2 FIFO comparators, output comparator, 3 fail-safe comparators, step cycle generator, 4 watchdogs, global comparator unit |
| `master_processor` | MOVE/STEP processor with PC, step registers, transition condition and step-clock-occurred registers; contains `master_prom` and `data_ram` |
| `slave_processor` | function block engine (tag, arguments, execute, results) with the I/O blocks |
| `fifo_queue` | fall-through FIFO with FULL/EMPTY |
| `fifo_comparator` | latch-compare-forward stage between the channels |
| `input_buffer` | per-slave snapshot of the sensor inputs at each step cycle |
| `output_comparator` | both slaves' output latches, compared and put out at each step cycle; safe state |
| `step_cycle_gen` | step cycle signal (the PLC's time base) and cycle counter |
| `watchdog` | retriggerable timeout per processor |
| `global_comparator_unit` | AND of all correctness signals, sticky, with error-source record |
| `square_wave_gen` | 100 kHz rectangular wave (digital stand-in for the 555 timer) |
| `fs_primary_unit` | 4-bit primary unit: two 7485 comparators (one on inverted words), wave on the cascade inputs |
| `fs_secondary_unit` | **behavioural model** of the analogue, self-holding secondary unit |
| `fs_comparator` | W/4 primary/secondary pairs side by side for a W-bit word |
| `pes_pkg` | word, address and instruction types, address map, function block tags and their argument counts |

## The master: MOVE and STEP

Instruction word (32 bits):

```
 31..28  opcode   0 = MOVE, 1 = STEP
 23..12  source address                (MOVE)
 11..0   destination address (MOVE) or next-step address (STEP)
```

Address space (12-bit addresses, 16-bit data):

| address | contents | read | write |
|---|---|---|---|
| `0x000-0x7FF` | PROM (low 16 bits of the word when read as data) | yes | access error |
| `0x800-0xBFF` | data RAM | yes | yes |
| `0xC00` | FIFO transmit register (to the slaves) | access error | yes, waits while FULL |
| `0xC01` | FIFO receive register (from the slaves) | yes, waits while EMPTY | access error |
| `0xC02` | step identifier | yes | yes |
| `0xC03` | step initial address | yes | yes |
| `0xC04` | transition condition (non-zero = true) | yes | yes |

The PC and the step-clock-occurred flag are not addressable.

A program is a sequence of *segments*, one per SFC step. Each segment ends
in `STEP next`. The timing is the hardest part to get right:

1. After reset the master waits for the first step cycle signal, with PC = 0
   and step initial address = 0.
2. A step cycle signal (`tick`) comes while the master waits at a `STEP`.
   The master then sets step-clock-occurred and decides:
   * Transition condition false: PC is reloaded from the step initial
     address, so the same segment runs again.
   * Transition condition true: PC and step initial address both get `next`.

   The transition condition is then cleared. The program must write it again
   in every cycle in which it wants to leave the step.
3. The segment runs at one MOVE per clock cycle. A RAM-to-RAM MOVE takes two
   cycles. Any MOVE may wait on the FIFO flags.
4. Reaching `STEP` clears step-clock-occurred and waits for the next tick.
5. A tick that arrives while a segment is still running is an **overrun**.
   The master stops and raises `overrun`. Branching exists only through
   `STEP`, so a program can start only at the beginning of a step segment.

A function block call in master code looks like this:

```
MOVE  ROM(tag of C) -> TX       ; block tag
MOVE  RAM(TMP-X)    -> TX       ; inputs ...
MOVE  ROM(2.0)      -> TX
MOVE  RAM(B2-isv1)  -> TX       ; ... then internal states
MOVE  RX -> RAM(TMP-Y)          ; outputs ...
MOVE  RX -> RAM(B2-isv1)        ; ... then the new internal states
```

A connection in the diagram is one `RX -> RAM(temp)` followed by one or more
`RAM(temp) -> TX`. Internal states are stored back into the same cells they
were read from.

## The slave: function blocks

The slave takes a tag, takes as many words as that block needs, executes the
block in one clock cycle, and pushes its results. It keeps nothing between
calls. It only reads the input buffer and writes the output latch. After the
tag, a call takes *arguments + 1 + results* clock cycles if the queues do not
wait.

| tag | block | arguments (in order) | results |
|---|---|---|---|
| 1 | `IN_A` analog input | XMIN, XMAX, XUNIT, HWADR | X |
| 2 | `C` PID controller | X, KP, TN, TV, I, e_prev, y_prev | Y, I, e_prev, y_prev |
| 3 | `OUT_A` analog output | Y, HWADR | none |
| 4 | `SAM` limit switch | X, LOW, S, state | QS, state |
| 5 | `OR` | I1, I2 | Q |
| 6 | `AM` alarm/message | I, AON, AMODE, APRIO, state | state |
| 7 | `AND` | I1, I2 | Q |
| 8 | `NOT` | I | Q |
| 9 | `TON` on-delay timer | IN, PT, elapsed | Q, elapsed |

Analog values are signed Q8.8. Booleans are 0/1, and any non-zero value reads
as true. The arithmetic is this design's own, not a certified library:

* `IN_A`: X = XMIN + (XMAX−XMIN)·raw/2^16, where raw is the unsigned input
  word HWADR.
* `C`: works on the deviation e = X. I' = I + e/TN (no integral if TN = 0),
  D = TV·(e − e_prev), Y = KP·(e + I' + D). Every step saturates at 16 bits.
* `SAM`: QS = X > S when LOW = 0 (high limit), and QS = X < S otherwise.
* `AM`: on a rising I with AON true, writes {APRIO[7:0], step cycle
  number[7:0]} to output channel `ALARM_CH` (7). AMODE is accepted but has
  no effect.
* `TON`: counts calls, i.e. step cycles.

An unknown tag stops the slave (`fault`).

## Cross-channel checking and stopping

The global comparator unit has 14 correctness inputs. `error_source` shows
which inputs were low when the system stopped:

| bit | source |
|---|---|
| 0 / 1 | master-to-slave / slave-to-master FIFO comparator saw unequal words |
| 2 | output comparator saw unequal output latches |
| 3 / 4 / 5 | fail-safe comparator on those three places dropped |
| 6 / 7 | master 1 / 2 overrun or access error |
| 8 / 9 | slave 1 / 2 unknown tag |
| 10 / 11 | watchdog of master 1 / slave 1 |
| 12 / 13 | watchdog of master 2 / slave 2 |

When any input goes low, `global_ok` falls and stays low. Every unit is
enabled by `global_ok`, so every unit freezes. `actuator_out` shows the safe
value (0). Only `init` re-activates the system.

A master's watchdog needs a STEP decision at least every two step cycles. A
slave's watchdog needs the slave to be idle at least once per step cycle.

**Fast fail-safe comparator.** `fs_primary_unit` feeds two 7485-type
comparators with the words: U1 gets them direct and U2 gets them inverted.
The A=B cascade input of both comparators is driven with the 100 kHz wave and
the A<B input with the inverted wave. So Q1 and Q2 carry the wave only while
the words are equal. `fs_secondary_unit` models the analogue second stage:

* A pulse is a rising edge on Q1 and Q2 together.
* If no pulse arrives within 1.5 wave periods, the unit blocks.
* VGL then falls 40 µs after the last pulse and stays low until `init`.
* At power-on VGL is low. Holding `init` high while the pulses run brings it
  up.

These comparators watch the latched pairs, so a disagreement must persist
for one wave period (10 µs) to be seen. The one on the output latches
watches them all the time. It can therefore stop the system in the middle of
a cycle, before the output comparator's check at the cycle boundary. The FIFO comparator's digital
equality check is what stops the system within one clock cycle. The
fail-safe comparator is a second, slower, independent check.

## Step cycle and process I/O

The `tick` from `step_cycle_gen` does four things:

* Each slave's `input_buffer` takes a snapshot of all `sensor_in` words.
  Every `IN_A` in that cycle reads the snapshot.
* `output_comparator` compares the two slaves' output latches, written by
  `OUT_A`/`AM` during the previous cycle. If they are equal, it copies them
  to `actuator_out`.
* The masters take their STEP decision.
* The cycle counter advances.

An output computed in cycle *k* therefore appears at the tick that starts
cycle *k+1*. Input sampling and output timing are thus fixed to the cycle
grid, whatever the timing inside the cycle.

## Start-up

1. Hold `rst_n` low for a few clocks, then release it.
2. Hold `init` high for at least 50 µs (500 clocks at 10 MHz). This lets the
   fail-safe comparators see pulses and charge. Then lower it.
3. `global_ok` rises. The first tick comes `STEP_CYCLES` clocks after reset,
   and the masters start at address 0.

The data RAM is not cleared by hardware. The program's first step must write
every parameter and internal state it later reads.

## Example program

`rtl/pressure_program.hex` is the default image for both masters. It is a
pressure regulation and supervision loop. `IN_A` → `C` (PID) → `OUT_A`, with
two `SAM` limit switches whose outputs are ORed into an `AM` alarm.

* **Step 0** (address 0) writes the parameters into RAM: xmin −5.0,
  xmax 5.0, input 0, kp 1.5, output 0, high limit 3.0, low limit −3.0. It
  also clears all internal states, sets the transition condition and steps
  to step 1.
* **Step 1** (address 16) is the diagram's call sequence. It repeats every
  cycle.

Image layout: code from address 0, constants from address `0x100`,
variables from RAM address `0x800`. Each line holds one 32-bit word:
`opcode<<28 | src<<12 | dst` for MOVE and `1<<28 | next` for STEP. Constants
are Q8.8 values (value·256) or tags.

The program is 64 instructions plus 20 constants. It uses 18 RAM cells.
Step 1 takes 124 clocks (12.4 µs) of the 10 ms step cycle. Most of those
clocks are spent waiting for the slave's results.

A second example, `tb/tb_esd_program.hex`, is an emergency shut-down diagram
built from three Boolean blocks and a timer:

* valve = P1 OR P2;
* indicator = TON(valve, 500 cycles = 5 s) AND NOT inhibit.

Its inputs are switch words, read with `IN_A` over the range 0 … 1.0, so any
word of 256 or more reads as true.

## Parameters (`pes_top`)

| parameter | default | note |
|---|---|---|
| `CLK_HZ` | 10 000 000 | system clock; sets the 100 kHz wave and the 40 µs discharge |
| `STEP_CYCLES` | 100 000 | step cycle = 10 ms; must exceed the longest segment |
| `FIFO_DEPTH` | 16 | the longest call in the example needs 8 words |
| `PROM_WORDS` / `RAM_WORDS` | 2048 / 1024 | |
| `NUM_IN` / `NUM_OUT` | 8 / 8 | output 7 carries alarm records |
| `PROM_INIT1` / `PROM_INIT2` | `rtl/pressure_program.hex` | the two channels may run diverse but equivalent programs |

The word width (16), the address width (12) and the instruction format are
fixed in `pes_pkg`.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. The testbenches use relative paths for
program images, so run them from the folder that holds `rtl/` and `tb/`.

```
verilator --binary --timing --assert -Irtl rtl/pes_pkg.sv tb/tb_pes_top.sv \
          --top-module tb_pes_top -Mdir obj_top
./obj_top/Vtb_pes_top
```

Replace `tb_pes_top` with any other testbench in `tb/`. Verilator finds the
other modules through `-Irtl`.

* `tb_pes_top` runs the system end to end with short step cycles (2000
  clocks) and 4-deep FIFOs. It uses four instances:
  * a normal run of the example, checked every cycle against a reference
    model, including alarm records;
  * channel 2 with a different gain, which must be stopped by the
    master-to-slave comparator, with the fail-safe comparator dropping and
    the outputs going safe;
  * an 80-clock step cycle, which must stop with an overrun;
  * a program that sends a tag without arguments, which must be stopped by
    a slave watchdog.

  It counts step transitions and repeats, FIFO FULL and EMPTY waits,
  comparator transfers, output transfers, input snapshots and alarm records,
  and requires each to occur.
* `tb_pes_full` runs the same normal check at the default sizes for 8 step
  cycles (800 000 clocks). It also measures the longest step segment.
* `tb_pes_esd` runs the emergency shut-down example with a 400-clock step
  cycle for 760 cycles. It checks every output against a cycle model. It also
  checks that the indicator lights exactly 499 cycles after the valve opens.
  Input words change inside each cycle, to show that the snapshot holds.
* `tb_pes_inject` injects faults into channel 2 of one system instance:
  * a corrupted input word, which the slave-to-master comparator must catch;
  * a corrupted output-latch write, which the fail-safe comparator on the
    latches must catch within the cycle;
  * a latch corrupted 3 µs before a step cycle signal, which the output
    comparator must catch at that signal.

  Between the cases it restarts with reset and `init`. It checks which
  error source stopped the system, and that the corrupted word never
  reaches the actuators.
* One testbench per block: `tb_master_processor`, `tb_slave_processor`,
  `tb_fifo_queue`, `tb_fifo_comparator`, `tb_output_comparator`,
  `tb_input_buffer`, `tb_step_cycle_gen`, `tb_watchdog`,
  `tb_global_comparator_unit`, `tb_square_wave_gen`, `tb_fs_primary_unit`,
  `tb_fs_secondary_unit`, `tb_fs_comparator`, `tb_master_prom`,
  `tb_data_ram`.

The `tb/*.hex` files are small program images used by these tests.

## How far to trust it, and where it is this design's own

Taken from the underlying architecture:

* the two-processor split and the MOVE/STEP instruction set;
* the register set;
* the FIFO waits;
* the STEP repeat/transition rule and the overrun error;
* the fall-through FIFOs with FULL/EMPTY;
* latch-compare-forward between the channels;
* input snapshots and compared outputs at the cycle boundary;
* the global correctness signal;
* the structure of the 4-bit fail-safe comparator: two 7485s, inverted
  words, the wave on the cascade inputs, 100 kHz, 40 µs to the safe state,
  self-holding until re-initialised;
* the argument and result lists of the example's blocks.

Chosen here:

* all widths and sizes, the clock frequency and the step cycle length;
* the instruction encoding and address map;
* clearing the transition condition after each decision;
* the freeze-on-error behaviour;
* the watchdog rules;
* the error-source record;
* widening the 4-bit fail-safe comparator to words by placing units side by
  side;
* all function block arithmetic and tags;
* AM's record format.

Known limits:

* The slave's library is hard-wired and holds nine blocks. A real system
  would run verified firmware for a library of about 70 blocks. The scratch
  RAM and firmware ROM of the slave are therefore absent.
* The secondary unit of the fail-safe comparator is an analogue circuit. Here
  it is a clocked behavioural model and is not meant for synthesis.
* The slow commercial fail-safe module that watches the fast comparators is
  not modelled. The fast comparators feed the global unit directly.
* The external fail-safe hardware that carries out error handling is not
  modelled either. `global_error` is brought out for it.
