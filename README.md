# Autonomous real-time emulator core for power-electronic drives

An emulator stands in for a physical process: a static converter driving an
electric motor and its load, seen through sensors. It runs in real time, so a
new digital control unit can be validated, or a running drive diagnosed,
against it. The *autonomous* arrangement keeps the emulator hardware
independent of the processor that configures it. The processor and the
emulator core share one external SRAM on one bus and meet only twice per run:

1. The processor (a DSP56600) writes the process parameters into the SRAM.
   It raises **Start** and then keeps off the bus.
2. The emulator core reads the parameters and computes one state step every
   microsecond. Once per *storage period* Ts it writes its output vector into
   the next locations of a results table in the same SRAM.
3. When the table is full, the core raises **End** on the processor's
   interrupt input and releases the bus. The processor then reads the table.

Nothing arbitrates the bus. Each side leaves it alone while the other owns it.
That is why the core needs only two small bus-master state machines: **Init**
(read the parameters) and **Storage** (write a record). A sequencer and two
clock generators pace them.

This RTL is the core's sequencing and communication logic and the shared bus.
The process models are not included: converter, motor/load (electric and
mechanical parts) and sensor conversion. The core hands the loaded
parameters and a computing-step event to them, and it stores whatever
outputs they return (see *Connecting the process models*).

## Block structure

```
                 +-------------------------- emulator_top ---------------------------+
 start --------->|  emul_core                                                         |
 end_irq <-------|   sequencer IDLE -> INIT -> RUN -> END                             |
                 |   init_fsm ------+                                                 |
 params <--------|   clock_gen(step)|--- bus mux ---> asic pins --+                   |
 step   <--------|   clock_gen(Ts)  |                             |  sys_bus          |
 results ------->|   storage_fsm ---+                             +--> wired-AND ---->|--> mem (SRAM pins)
                 |                                         dsp -->+     strobes       |<-- mem_q
 dsp pins ------>|------------------------------------------------+                   |--> d (data bus)
                 +--------------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/emul_pkg.sv` | bus widths, the `bus_req_t` pin bundle, the phase enum |
| `rtl/clock_gen.sv` | clock-generator behaviour: one event every PERIOD counted cycles |
| `rtl/init_fsm.sv` | Init machine: parameter vector from SRAM into local registers |
| `rtl/storage_fsm.sv` | Storage machine: result vector into the next table locations |
| `rtl/emul_core.sv` | sequencer, Start synchroniser, End event, clock generators, bus mux |
| `rtl/sys_bus.sv` | the shared bus: two masters, one SRAM, conflict flag |
| `rtl/emulator_top.sv` | top: core plus shared bus |
| `tb/km68257c_model.sv` | behavioural SRAM with access-time checks (test only) |
| `tb/dsp56600_model.sv` | behavioural processor bus master and interrupt flag (test only) |

## The bus and its timing

The bus has the DSP56600 external-bus pins: address `A[15:0]`, data
`D[23:0]`, and the active-low strobes `/MCS`, `/RD` and `/WR`. These connect
straight to the SRAM's `A`, `D`, `/CS`, `/OE` and `/WE`, with no glue logic.
In the RTL, `bus_req_t` carries one master's outgoing pins. Since there are no
tri-states, the data bus is split into an outgoing word with an enable
(`d_oe`) and the value seen on the bus (`d`, or `rdata` inside the core).

Both machines make one SRAM access from a fixed sequence of states, one clock
each:

| state | read (Init) | write (Storage) |
|---|---|---|
| S1 | `/MCS` low, address driven | `/MCS` low, address driven |
| S2 | `/RD` low (+`WAIT_CYCLES`) | `/WR` low (+`WAIT_CYCLES`) |
| S3a | I/O register samples `D` | I/O register loads local copy `y[n]` |
| S3b | I/O register into parameter register `n`; `n++` | I/O register drives `D`; `n++` |
| S4 | `/RD` high | `/WR` high, data still driven |
| S5 | `/MCS` high | `/MCS` high |
| S6 | more words: S1, else done | more words: S7, else S_End |
| S7 | – | address + 1, back to S1 |
| End | `done` (one cycle) | address + 1, record count + 1, `done` |

The address stays put from S1 to S5 and changes only while `/MCS` is high.
Assume a 10 ns clock. Then `/RD` or `/WR` is low for 30 ns, and a read samples
the data 30 ns after the address and 20 ns after `/RD` fell. Write data is on
the bus 10 ns before `/WR` rises and is held one cycle after. This satisfies:

- the SRAM's printed figures: 12 ns address access, 6 ns output enable,
  9 ns write pulse and 7 ns data set-up;
- the processor's: 17.0 ns read pulse and 19.3 ns write pulse.

For a faster clock, raise `WAIT_CYCLES`, which stretches S2. `tb_init_fsm`
shows that three wait states are needed at 2 ns.

A parameter read takes 7 + `WAIT_CYCLES` clocks. A record of `E_LEN` words
takes 8·`E_LEN` clocks (64 at the defaults, 0.64 µs), well inside a storage
period.

## Sequencing an emulation (`emul_core`)

- **IDLE.** Start arrives from another clock domain. It passes through a
  two-flop synchroniser, and its rising edge moves the core to INIT, 2–3
  clocks after the pulse.
- **INIT.** `init_fsm` loads `P_LEN` words from `PARAM_BASE` upward into
  `params`.
- **RUN.** One `clock_gen` raises `step` every `STEP_CYCLES` clocks; this is
  the computing step. A second `clock_gen` counts `XS` of those events and
  raises `store`; this is the storage period Ts = XS steps. On every `store`,
  `storage_fsm` copies all `E_LEN` `results` at once and writes them. The
  table address only increments, so record *k* (from 0) lands at
  `RESULT_BASE + k·E_LEN`. Records are exactly `STEP_CYCLES·XS` clocks apart.
- **END.** After `N_RECORDS` records, `end_irq` goes high and the core drives
  no pin. It stays in END, with `end_irq` held, until the next Start, which
  starts a new run at INIT and rewinds the table.

Rules kept by assertions:

- The core drives the bus only in INIT and RUN.
- `/RD` and `/WR` are never low together.
- Strobes are low only under `/MCS`.
- No storage event is ever lost.
- In `emulator_top`, the two masters never use the bus together.

`storage_fsm` holds one storage event that arrives while a record is still
being written, and serves it right after. A third event in that time sets
`overrun`, which fails the `emul_core` assertion. At the defaults this cannot
happen.

## Connecting the process models

The computing behaviours sit outside this RTL and attach at the top's ports:

- `params[P_LEN]`: the process parameters, valid from the end of INIT.
- `step`: a one-cycle event per computing step (1 µs at the defaults).
  Advance the model state here.
- `results[E_LEN]`: the model outputs E_i. They are sampled, all at once, in
  the cycle after the `store` event.

The processor's bus pins come in on `dsp`, and the bus value goes back to it
on `d`. The SRAM is wired to `mem` and `mem_q`. `phase`, `records`,
`record_done`, `store` and `conflict` are status outputs.

## Parameters

| parameter | default | meaning | basis |
|---|---|---|---|
| `P_LEN` | 8 | parameter words | "fewer than ten" exchanged variables; 8 chosen |
| `E_LEN` | 8 | result words per record | same |
| `STEP_CYCLES` | 100 | clocks per computing step | 1 µs step; the 100 MHz clock is assumed |
| `XS` | 10 | steps per storage period | assumed (Ts = 10 µs) |
| `N_RECORDS` | 1024 | records per run | assumed |
| `PARAM_BASE` | 0x0000 | parameter vector address | assumed |
| `RESULT_BASE` | 0x0010 | first table address | assumed |
| `WAIT_CYCLES` | 0 | extra strobe-low clocks | assumed |
| `ADDR_W`, `DATA_W` | 16, 24 | bus widths (package) | from the bus drawings |

At the defaults the table holds 8192 words from 0x0010, which fits a 32K-word
SRAM.

## Where this departs from, or adds to, the source design

- **Data width.** The SRAM named for the system has 8 data lines, but the bus
  drawings show a 24-bit data bus into the memory. The bus is built 24 bits
  wide, and the memory model treats the SRAM as three 8-bit devices side by
  side.
- **Figure details.** The source's state graphs give S3 two sub-steps, so S3
  takes two clocks here. S7 has no printed action and is used to advance the
  address. The Storage graph's comment on S4 says "read stopped"; it is taken
  as write stopped.
- **Chosen values.** The clock frequency, the reset style (synchronous,
  active-low), the address map, the table length and the storage period are
  all choices made here.
- **End.** End is a level that stays high until the next Start. The source
  only calls it an asynchronous event wired to an interrupt input.
- **Own additions.** These are the Start synchroniser, the held and overrun
  handling of storage events, `WAIT_CYCLES`, and the bus conflict flag.
- **No transducers.** Protocol transducers between the components and the
  bus are not needed, because the core already speaks the bus protocol and
  the SRAM is fast enough. None is built.
- **Not part of this RTL:**
  - the process models: converter, electric and mechanical motor/load parts,
    and sensors, whose equations are not specified;
  - the processor and its software: parameter set-up, interrupt handler,
    monitoring;
  - the SRAM itself.

  The processor and SRAM have behavioural models in `tb/` for testing only.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_clock_gen` | chained dividers against a reference count, restart on clear |
| `tb_init_fsm` | parameters loaded from the SRAM model, 7·P_LEN+1 clock latency, access timing, wait states at 2 ns |
| `tb_storage_fsm` | records in successive locations, 8·E_LEN clock latency, held and lost events, table full, rewind, write timing |
| `tb_sys_bus` | 2000 random pin states against the sharing rule, both conflict kinds |
| `tb_emul_core` | full runs at small sizes, records predicted from a step-counting stand-in model, record spacing, restart from END |
| `tb_emulator_top` | two complete runs at the default sizes (about 2.3 M clocks, about 1 s): processor writes, Start, Init, 20480 steps at a checked 100-clock period, 2048 records, End, interrupt flag, 16384 table words read back and checked, restart; every mechanism is counted and must occur |

The SRAM model returns the inverted word to a read sampled before the
access time, so a machine that samples too early reads wrong data. It also
counts every breach of the write pulse, the data set-up, or address
stability.

Simulating with plain Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/emul_pkg.sv tb/tb_emulator_top.sv --top-module tb_emulator_top
./obj_dir/Vtb_emulator_top
```

The other testbenches build the same way with their own top module.

Not verified:

- timing against a real DSP56600 or SRAM;
- a clock other than 10 ns, except the one 2 ns wait-state case;
- any process model.
