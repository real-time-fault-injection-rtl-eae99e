# Real-time fault injection through an enhanced on-chip debug unit

Fault injection checks how a processor system behaves when a single event
upset (SEU) flips a bit in its memory or registers. On a real-time system the
flip must happen while the application runs at full speed, at a precise
instant and place. Ordinary debuggers cannot do this. They need the host PC
in the loop, so the read-modify-write of the target word takes milliseconds.
By the time the faulty value arrives, the application may have overwritten the
word, and the "single bit flip" becomes something else.

This RTL puts the whole fault-injection set-up on one chip and moves the
decisions close to the target, in two steps:

1. **A customized debugger.** It runs a fault campaign script from its own
   memory. It reacts by itself to a watchpoint event from the on-chip debug
   (OCD) unit, then sends the write, or does the read/XOR/write, over the
   debug port. The host only loads the script and collects the trace.
2. **An OCD with a fault-injection (FI) module.** The debugger preloads the
   target address and value (or XOR mask) and arms the module. When the
   watchpoint fires, the module inserts the fault itself in 2 clock cycles
   (preset value) or 4 (read-modify-write), with no debug-port traffic.

Both paths are present in the same design. A campaign picks one path per
experiment.

```
 host ──script / trace──► debugger ──MDI (8b) + valid──►  ocd_fi  ──debug port B──► target_mem ◄── port A ── CPU
                          (ctrl +   ◄──MDO (8b) + valid──  (Class-2+ OCD               (dual-port)
                           2 banks) ◄──evto (watchpoint)──  + FI module) ◄── fetch / data / branch ─── CPU
                                                                         ──► halt, debug register port ──► CPU
```

The CPU core is not part of the RTL. `fi_system` brings its signals out as
ports. The testbench has a small behavioural CPU.

## Modules

| file | role |
|---|---|
| `rtl/ocd_pkg.sv` | shared types: command and output messages, config register map, script entry, access request |
| `rtl/fi_system.sv` | top: debugger + OCD-FI + target memory |
| `rtl/debugger.sv` | campaign controller with script bank and trace bank (`dbg_mem`) |
| `rtl/ocd_fi.sv` | OCD: MDI receive and command decode, config registers, run control, and the units below |
| `rtl/watchpoint_unit.sv` | address comparator on fetch or data bus; watchpoint or breakpoint |
| `rtl/fi_module.sv` | Basic / Plus fault-injection module |
| `rtl/rt_access.sv` | real-time access port shared by the FI module and debugger commands |
| `rtl/trace_unit.sv` | message generation, per-source holding registers, FIFO, overrun reporting |
| `rtl/aux_ser.sv`, `rtl/aux_des.sv` | AUX port serializer / deserializer (used on both sides) |
| `rtl/target_mem.sv` | target data memory, CPU port and OCD port |
| `rtl/dbg_mem.sv` | 1-write / 1-read synchronous RAM for the debugger banks |

Each `rtl/X.sv` with a testbench has a self-checking `tb/tb_X.sv`.

## The FI module: the hardest part to get right

The module (`fi_module`) has three preload registers, written by
`CMD_WR_CFG`:

* `FI_ADDR`: the target, a memory byte address or a CPU register index.
* `FI_DATA`: the faulty value, or the XOR mask in read-modify-write mode.
* `FI_CTRL`: `{rmw, space, arm}`. Writing it with `arm=1` arms the module.
  Writing it with `arm=0` disarms it.

Trigger and sequence, counting from the CPU bus cycle *t* that matched the
watchpoint:

| cycle | preset value (Basic, or Plus with `rmw=0`) | read-modify-write (Plus, `rmw=1`) |
|---|---|---|
| t   | CPU access matches the watchpoint | same |
| t+1 | registered hit reaches the FI module | same |
| t+2 | **write** on the access port | read on the access port |
| t+3 | (register target: resume pulse) | read data back, XOR with mask |
| t+4 | | **write** on the access port |
| t+5 | | (register target: resume pulse) |

These are the 2- and 4-cycle injection delays and the 3- and 5-cycle halt
times that the reference implementation reports. `tb_fi_module`,
`tb_ocd_fi`, `tb_fi_system` and `tb_configs` all check them.

* **Memory target (`space=0`).** A watchpoint triggers it. The CPU keeps
  running, and the write goes through the memory's second port.
* **Register target (`space=1`).** A breakpoint triggers it. The OCD raises
  `cpu_halt` from cycle t+1 (combinationally from the registered hit). The FI
  module writes the register through the CPU's debug register port, then
  pulses `resume`. The OCD drops the halt and clears the breakpoint bit,
  so the CPU does not stop again at the same instruction. Arm the FI module
  *before* enabling the breakpoint. A breakpoint with nothing armed halts the
  CPU until a `CMD_RESUME`.
* From the trigger to the end of the write, the module owns the access port.
  A debugger read or write that arrives in that window waits in a one-entry
  holding register in `rt_access`.
* The module is one-shot: after one injection it reports `TC_FI_DONE` with
  the value written and disarms itself.
* `PLUS=0` (Basic) ignores the `rmw` bit. The value to write must then be
  known in advance, which the reference calls predetermination. Basic has no
  XOR datapath. Synthesized to generic gates, the module is 242 cells as
  Basic and 287 as Plus. About 105 of those cells are flip-flops: the
  registered access request and the reported value.

A fault can still be lost if the CPU writes the target word between *t* and
the insertion. That window is now 2 or 4 cycles instead of tens of cycles
(debugger path) or milliseconds (host path). If both ports of `target_mem`
write the same word in the same cycle, the OCD port wins.

## AUX port and messages

The debug port is two one-way streams, each with a `valid` line that is high
for every beat of a message. Messages have a fixed length and are sent
least significant beat first. A low `valid` between messages re-aligns the
receiver.

**Commands, debugger → OCD, on the MDI bus** (`cmd_msg_t`, 72 bits
`{data[31:0], addr[31:0], op[7:0]}`): 9 beats at `MDI_W=8`, 36 beats at
`MDI_W=2`.

| op | meaning |
|---|---|
| `CMD_WR_CFG` | write the config register `addr` (0 `WP_ADDR`, 1 `WP_CTRL {brk, kind[1:0], en}`, 2 `FI_ADDR`, 3 `FI_DATA`, 4 `FI_CTRL {rmw, space, arm}`, 5 `MSG_EN {branch, wp}`) |
| `CMD_MEM_WR` / `CMD_MEM_RD` | real-time memory write / read (the read answers with `TC_RD_DATA`) |
| `CMD_REG_WR` / `CMD_REG_RD` | CPU register write / read (meaningful while halted) |
| `CMD_HALT` / `CMD_RESUME` | run control |

Watchpoint kinds: `WP_FETCH` (instruction address), `WP_READ`, `WP_WRITE`
and `WP_RW` (data address). With `brk=1`, a hit also halts the CPU.

**Messages, OCD → debugger, on the MDO bus** (`out_msg_t`, 40 bits
`{payload[31:0], tcode[7:0]}`): 5 beats at `MDO_W=8`.

| tcode | payload |
|---|---|
| `TC_WP_HIT` | address that hit |
| `TC_RD_DATA` | data from a read command |
| `TC_BRANCH` | program trace: target of a taken branch |
| `TC_FI_DONE` | value the FI module wrote |
| `TC_OVERRUN` | number of messages lost since the last overrun message |

A watchpoint hit also pulses the `evto` pin, so the debugger can react
without waiting about 7 cycles for the message. The trace unit keeps one
pending message per source. It moves one message per cycle into an 8-entry
FIFO, by fixed priority (FI done, watchpoint, read data, branch). A 5-beat
MDO therefore carries at most one message per 5 cycles. When a source's
pending slot is still full as its next event arrives, that event is counted
as lost and reported with `TC_OVERRUN`. Tracing continues while the FI
module works.

`MSG_EN` (both bits set after reset) switches off the watchpoint messages,
the branch messages, or both. The `evto` pulse, read answers and FI
completions are not affected. The debugger stores every message it receives,
so with program trace on, a long campaign fills its 256-entry trace bank
after a few hundred taken branches. Messages after that are dropped. A
campaign that only needs the outcome of each injection runs with `MSG_EN=0`.

## The debugger and its scripts

A script entry (`script_t`, 80 bits) is `{dop[7:0], cmd_msg_t}`:

| dop | action |
|---|---|
| `D_SEND` | send the entry's command |
| `D_WAIT_WP` | wait for an `evto` pulse |
| `D_WAIT_EX` | wait for `ext_trig` high |
| `D_DELAY` | wait `addr + 1` cycles |
| `D_FLIP` | send `CMD_MEM_RD addr`, wait for `TC_RD_DATA`, send `CMD_MEM_WR addr, data ^ mask`. With the entry's op set to `CMD_REG_WR`, the same on a CPU register (`CMD_REG_RD`, `CMD_REG_WR`) |
| `D_WAIT_FI` | wait for a `TC_FI_DONE` message |
| `D_END` | stop and pulse `done` |

While it waits, the controller already reads the next entry, so the next
message starts two cycles after the trigger.

A `SEND` step ends as soon as the serializer accepts its message, when
transmission starts rather than when it ends. A following `WAIT_WP` can
therefore fire while the message is still going out, and the next command
then queues behind it. This matters at `MDI_W=2`, where a command takes 36
cycles. A script that needs exact timing puts a `DELAY` after the last send
before a wait.

Every received message is stored in the trace bank in arrival order, until
the bank is full. `trace_count` says how many were stored. `start` clears
the count.

Typical experiments:

* **Debugger, preset value:** `WAIT_WP`, `SEND MEM_WR`.
* **Debugger, no predetermination:** `WAIT_WP`, `FLIP`.
* **FI module:** `SEND FI_ADDR`, `SEND FI_DATA`, `SEND FI_CTRL(arm)`,
  `WAIT_FI`.
* **Debugger, CPU register:** `SEND WP_CTRL(brk)`, `WAIT_WP`, then
  `SEND REG_WR` or `FLIP` with op `CMD_REG_WR`, then `SEND RESUME`. The
  resume clears the breakpoint bit, as the FI module's resume does. Switch
  the watchpoint off (`WP_CTRL 0`) before re-enabling it as a breakpoint.
  Otherwise `WAIT_WP` can take a plain hit from just before the change, and
  the register write lands while the CPU still runs.

A campaign of 10 FI experiments needs six entries per experiment: `WAIT_EX`
for the run start, then `WP_ADDR`, `FI_ADDR`, `FI_DATA`, `FI_CTRL` and
`WAIT_FI`. Add `MSG_EN`, `WP_CTRL` and `END`, and the campaign takes 63
entries. The script bank holds 64.

## Fault campaigns on two applications

`tb_campaign` runs two complete 10-experiment campaigns through the top at
its default parameters. The FI module is used in read-modify-write mode with
single-bit masks. A behavioural CPU issues one bus operation per cycle from
fixed instruction addresses. It runs two applications protected by
duplication: every operation is done twice on separate copies of the data,
and the copies are compared. A mismatch stops the application with an error.

* **MatrixAddFT** computes `C1 = A + B` and `C2 = A2 + B2`, 16 words each.
  Each pair of results is compared right after it is computed.
* **VectorSortFT** bubble-sorts the 8-word vectors `V1` and `V2`, then
  compares them element by element.

For each experiment the testbench restarts the application with fresh data
and raises `ext_trig`. The script then sets the watchpoint on the chosen
instruction, loads the FI address and mask, arms the module and waits for the
completion message. Each run ends in one of four outcomes:

| outcome | meaning |
|---|---|
| detected | the comparison found the fault and the application stopped |
| masked | both results are correct |
| silent | wrong result: the fault landed after the last comparison |
| inconclusive | the CPU wrote the target word between the FI read and write, so the result is not a clean bit flip |

Each outcome is checked against the class worked out by hand from the
instruction timing (FI read 2 cycles and write 4 cycles after the trigger).
The testbench also checks that every write equals the value read XOR the
mask. The results are:

| application | detected | masked | silent | inconclusive |
|---|---|---|---|---|
| MatrixAddFT | 5 | 3 | 0 | 2 |
| VectorSortFT | 6 | 1 | 1 | 2 |

The inconclusive cases show the window that remains even with the FI module.
A word the CPU writes within 4 cycles of the trigger can still mix with the
injected fault. The experiments were chosen to produce every outcome, so
these counts are not rates. The reference reports about 1 % inconclusive
results for this configuration, and 2 to 7 % for the debugger-only paths,
whose window is longer.

The matrix campaign runs with program trace on and stores 192 messages. Its
branch messages match the CPU's taken branches one for one and in order, so
the program flow can be rebuilt from the trace bank. The sort campaign runs
with `MSG_EN=0`, because its branches would overflow the trace bank.

## Measured timing against the reference figures

The reference compares eight configurations. They differ in MDI width (2 or
8 bits) and in the injection path:
* debugger only, with a preset value;
* debugger only, with read / mask / write (marked `+`);
* FI module, Basic (`_FI`) or Plus (`_FI+`).

`tb_configs` builds all four MDI / FI-module combinations side by side and
measures each path. All values are in clock cycles. *Set-up* runs from the
script start until the trigger is armed. *Injection* runs from the bus cycle
that matched the watchpoint to the write of the faulty value.

| configuration | set-up | injection | reference set-up | reference injection |
|---|---|---|---|---|
| MDI2     | 76  | 42 | 22 | 35 |
| MDI2+    | 76  | 91 | 22 | 44 |
| MDI8     | 22  | 15 | 6  | 9  |
| MDI8+    | 22  | 37 | 6  | 18 |
| MDI2_FI  | 184 | 2  | 57 | 2  |
| MDI2_FI+ | 184 | 4  | 57 | 4  |
| MDI8_FI  | 49  | 2  | 15 | 2  |
| MDI8_FI+ | 49  | 4  | 15 | 4  |

All of these follow from the message length. A command is B = 72 / MDI_W
beats: 9 at MDI8 and 36 at MDI2.
* The first configuration message is decoded B + 4 cycles after the start.
  Each further one follows B cycles later.
* A watchpoint takes 2 messages. The FI preload takes 3 more.
* The debugger's preset write lands B + 6 cycles after the trigger.
* The debugger's read / mask / write lands 2B + 19 cycles after the trigger.
  That includes the read answer's 5 beats on MDO.
* If a trace message is already queued on MDO, the read answer waits behind
  it, adding up to 5 cycles.

Time the CPU stays halted for a register injection:

| path | this RTL | reference |
|---|---|---|
| FI module, Basic / Plus (either MDI) | 3 / 5 | 3 / 5 |
| debugger, preset / read-mask-write, MDI8 (`tb_fi_system`) | 22 / 44 | 12 / 20 |

The FI module reproduces the reference's cycle counts exactly. The other
paths are slower by a roughly constant factor:
* Every command is one 72-bit message here. The reference's numbers point to
  a denser encoding, whose format is not known.
* The read answer shares the 8-bit MDO with the trace.
* A register injection through the debugger needs a separate resume command.

The shape of the reference's results holds:
* Set-up with the FI module takes about 2.5 times as long as without it.
* MDI2 costs about 4 times MDI8 on the command side.
* The FI module's delays do not depend on the MDI width.

Set-up can run while the application runs, as long as it ends before the
trigger.

## Where this design makes its own choices

The reference describes what the parts do, their configurations and their
timings. It does not give their internal structure. The following are this
design's choices:

* Message encoding, AUX framing (a beat-valid line instead of the Nexus
  MSEO/MSEI protocol) and the config register map.
* One watchpoint comparator with exact address match.
* Program trace as one full-address message per taken branch, with no Nexus
  branch-history compression.
* Target memory as a dual-port RAM.
* Sizes: 1024-word target memory, 64-entry script bank, 256-message trace
  bank, 8-entry OCD message FIFO.
* Clearing the breakpoint bit on every resume.
* The `MSG_EN` message-enable register.
* The script format and step codes.
* Reset: active-low, asynchronous, for all control state. Memories are not
  reset.

Not modelled: the CPU core (a generated RISC core in the reference set-up),
the host PC, trace timestamps, and more than one watchpoint.

## Parameters

`fi_system` defaults: `MDI_W=8`, `MDO_W=8`, `FI_PLUS=1` (the MDI8_FI+
configuration), `MEM_WORDS=1024`, `SCRIPT_DEPTH=64`, `TRACE_DEPTH=256`,
`OCD_FIFO=8`.

* The other configurations the reference compares are `MDI_W=2` and/or
  `FI_PLUS=0`.
* `MDI_W` and `MDO_W` must divide 72 and 40.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ocd_pkg.sv tb/tb_fi_system.sv \
          --top-module tb_fi_system -Mdir obj_fi_system -o sim && obj_fi_system/sim
```

Replace `fi_system` with `fi_module`, `ocd_fi`, `debugger`, `rt_access`,
`trace_unit`, `watchpoint_unit` or `target_mem` to run the unit tests:

* `tb_fi_module` runs Basic and Plus side by side.
* `tb_ocd_fi` uses the 2-bit MDI configuration.
* `tb_campaign` runs the two application campaigns described above.
* `tb_configs` runs four systems (MDI 2 / 8, Basic / Plus) side by side and
  checks the timing table above.
* `tb_fi_system` runs the eight-experiment campaign at the top's default
  parameters (under a second). It prints the measured delays and a count of
  every mechanism used: watchpoint events, program trace, read answers, FI
  completions, halted cycles and the external trigger.
