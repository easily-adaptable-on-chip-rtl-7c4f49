# Monitoring-mode on-chip debug for multicore processors

Debug hardware for a multicore processor, reached through one JTAG port. It
supports breakpoints and watchpoints, single-step, register and memory
read/write, processor-status read/write, and debug/resume. It can stop several
cores together when one of them hits a breakpoint.

The main idea is **monitoring-mode debugging**. Run-stop debuggers halt a core
and push instructions into it through scan chains. This design never halts a
core. A breakpoint makes the core take a *debug exception*. A short service
routine in the core's own software then does the debugger's work. The routine
talks to the debugger through a small coprocessor, the **CFD** (coprocessor
for debug). The core keeps running on the system clock the whole time. The
debug logic needs nothing from the core except:

- a coprocessor interface;
- a view of its instruction and data memory buses;
- an `Exception_ack` output that says the core is in the debug exception.

So the same debug logic can be attached to different cores without changing
them. The cost is that the service routine must be linked into the user
program.

## Block structure

```
 JTAG pins ──► ext_jtag ──── debug register bus (system clock) ─────┐
 (TCK TMS TDI    │  TAP, IR, ID, bypass, JTAG selection reg,         │
  nTRST SEL TDO) │  decoder, DBG register, TCK→clk handshake         │
                 └─► ip_* : JTAG ports of other JTAG-based IPs       │
                                                                     │
        ┌──────────────────────── per core c ────────────────────────┤
        │ ea_edu                                                     │
        │   bp_comparator  ◄── I_*, D_*, Exception_ack ── core c     │
        │        │ int_bkpt_en[c]                                    │
        │   cfd            ◄──► COP_* ────────────────── core c      │
        └────────┼───────────────────────────────────────────────────┘
                 ▼
              mdsu (cross breakpoint manager) ── ext_bkpt_en[c] ──► core c
```

| file | what it is |
|---|---|
| `rtl/ea_mocd.sv` | top: `ext_jtag`, `mdsu`, `NUM_CORES` × `ea_edu` |
| `rtl/ext_jtag.sv` | extended JTAG block |
| `rtl/tap_controller.sv` | IEEE 1149.1 TAP state machine |
| `rtl/ea_edu.sv` | per-core debug unit = `bp_comparator` + `cfd` |
| `rtl/bp_comparator.sv` | two-entry breakpoint register set and comparator |
| `rtl/cfd.sv` | coprocessor for debug (MMCR mailbox) |
| `rtl/mdsu.sv` | multicore debug support unit = cross breakpoint manager |
| `rtl/ea_mocd_pkg.sv` | shared types, MMCR layout, address map, JTAG codes |

Top parameters: `NUM_CORES` (default 4, up to 16) and `NUM_IPS`, the number
of other JTAG IPs (default 4). With `NUM_CORES = 1` the MDSU is left out and
`ext_bkpt_en = int_bkpt_en`.

## The monitoring-mode handshake (CFD and MMCR)

This is the part that needs the most care. Each core's CFD holds four 32-bit
registers. They are visible to the core as coprocessor registers (`COP_NUMB`)
and to the debugger over JTAG:

| no. | register | written by | use |
|---|---|---|---|
| 0 | MMCR | both (see below) | command and handshake |
| 1 | ADDR | debugger | memory address |
| 2 | RDATA | core | result for the debugger (register value, memory word, return address) |
| 3 | WDATA | debugger | value to write |

**MMCR** (monitoring mode control register, 12 bits):

| bit | field | meaning |
|---|---|---|
| 11 | EN | debug unit enabled; the comparator ignores breakpoints while 0 |
| 10 | D.ACK | a debugger command is waiting for the core |
| 9:6 | register number | register for a register read/write (16 registers) |
| 5 | R/W | 0 read, 1 write |
| 4 | R/M | 0 register, 1 memory |
| 3 | PS | processor-status operation |
| 2 | SS&END | leave the exception (single-step or end of debug) |
| 1 | D.EXP | core is in the debug exception; read-only, mirrors `Exception_ack` |
| 0 | C.ACK | the core has finished; the debugger may use the registers |

The hardware enforces three rules:

- A debugger write loads every bit except D.EXP, and it clears C.ACK.
- A core write changes only D.ACK and C.ACK.
- When the core enters the exception (rising `Exception_ack`), D.ACK is
  cleared, so an old command is not taken as a new one.

If both sides write the MMCR in the same cycle, the debugger's write wins.

One command runs like this:

1. The debugger polls the MMCR until D.EXP = 1 and C.ACK = 1.
2. It writes ADDR and/or WDATA if the command needs them.
3. It writes the command with EN = 1 and D.ACK = 1:
   - register read `0xC00 | i<<6`, register write `0xC20 | i<<6`;
   - memory read `0xC10`, memory write `0xC30`;
   - status read `0xC08`, status write `0xC28`;
   - step or end `0xC04`.
4. The core's routine polls the MMCR, sees D.ACK, and does the work. It puts
   any result in RDATA. Then it writes C.ACK = 1 and D.ACK = 0.
5. For a read, the debugger polls again and reads RDATA.

The flows built from these commands:

- **Entering monitoring mode.** Set a breakpoint with "any address" on the
  instruction bus, then wait for D.EXP = 1. On entry the routine writes the
  return address to RDATA before setting C.ACK.
- **Single-step.** Set the any-address breakpoint and send `0xC04`. The core
  leaves the exception, fetches and executes one instruction, and hits the
  breakpoint again. RDATA then holds the new return address.
- **End (resume).** Disable the breakpoint and send `0xC04`.

D.ACK and C.ACK are flags that the two sides agree on in software. The
hardware does not block a register access when the wrong side holds the
token.

The CFD does not decode the command bits. Only the service routine reads them.
A different routine can therefore add debug functions without changing the
hardware.

## Breakpoints (`bp_comparator`)

There are two breakpoints per core. Each has:

- an address register;
- a data register;
- a control register `{any_addr[4], data_cmp[3], kind[2:1], enable[0]}`.

`kind` selects what is watched: 0 instruction fetch, 1 data read, 2 data
write, 3 data read or write. A breakpoint matches when all of these hold:

- it is enabled;
- an access of its kind is requested in this cycle;
- the address matches, or `any_addr` is set;
- if `data_cmp` is set, the data word matches (I_DATA, D_RDATA or D_WDATA).

`int_bkpt_en` is registered. It rises the cycle after the matching access and
stays high until the core answers with `Exception_ack`. While `Exception_ack`
is high nothing matches, so the service routine's own accesses are never
trapped. As a result the core stops *after* the matching instruction, and its
return address is the next instruction.

Register 8 holds one sticky hit bit per breakpoint. Writing 1 to a bit clears
it.

## Cross breakpoints (`mdsu`)

Each output `j` has a stop-mode value register `V[j]` and a mask register
`M[j]`, one bit per core:

```
ext_bkpt_en[j] = AND_i ( (int_bkpt_en[i] == V[j][i]) | M[j][i] )  &  ~(all bits of M[j] set)
```

Examples:

- "Core 0 stops everyone": every output gets V = 0001, M = 1110.
- "Each core stops alone": output j gets V = 1<<j, M = ~(1<<j).

After reset every mask is all ones, which means "off", so no core is stopped.
The path from `int_bkpt_en` to `ext_bkpt_en` is combinational, so all cores
see the request in the same cycle.

## JTAG side (`ext_jtag`)

The TAP is standard IEEE 1149.1 with a 4-bit instruction register:

| code | instruction | data register |
|---|---|---|
| `1` | IDCODE | 32-bit ID, `0x1EADB0C1`; selected after reset |
| `8` | JSEL | JTAG selection register (`$clog2(NUM_IPS)` bits) |
| `9` | DBG | 43 bits `{wr, addr[9:0], data[31:0]}`, LSB first |
| `F` | BYPASS | 1 bit; every unlisted code also selects bypass |

No boundary-scan register is included.

**SEL pin.** With SEL high, TCK/TMS/TDI/nTRST go to the IP chosen by JSEL, and
that IP's TDO drives the TDO pin. The local TAP is frozen while SEL is high.
Unselected IPs see TCK = 0, TMS = 1, TDI = 0, nTRST = 1.

**Debug register address map** (`addr[9:0]`):

| field | bits | values |
|---|---|---|
| unit | `[9:8]` | 0 CFD, 1 breakpoints, 2 CBM |
| core | `[7:4]` | core index (for the CBM: output index `j`) |
| register | `[3:0]` | CFD: 0..3; breakpoints: `4b+0` address, `4b+1` data, `4b+2` control, 8 status; CBM: 0 value, 1 mask |

**Clock crossing.** TCK and the system clock are independent. On Update-DR of
a DBG scan, the request is latched in the TCK domain and a toggle flips. Two
flip-flops carry it into the system clock. 2–3 cycles later the request is on
the debug bus for exactly one cycle. Read data is stored, and an acknowledge
toggle returns through two TCK flip-flops.

Capture-DR of DBG loads `{busy, last address, last read data}`. A scan
therefore returns the result of the previous access. An update made while busy
is dropped. With TCK much slower than the system clock, busy is always clear
by the next scan.

## Timing summary

| event | latency |
|---|---|
| matching access → `int_bkpt_en` | 1 system cycle |
| `int_bkpt_en` → `ext_bkpt_en` | combinational |
| `Exception_ack` → `int_bkpt_en` low | 1 system cycle |
| JTAG Update-DR → debug bus access | 2–3 system cycles |
| coprocessor and debug-bus reads | combinational, same cycle |

Debug-function costs in TCK cycles, with TCK = 10 MHz and the system clock at
100 MHz. Two debugger scan sequences were measured:

- **simple** (`tb_ea_mocd`): it polls before every command, and every read
  takes two scans;
- **pipelined** (`tb_ea_mocd_single`): each scan also collects the previous
  access's result.

| function | simple | pipelined | original evaluation |
|---|---|---|---|
| 16 register reads | 5,376 | 2,352 | 2,168 |
| 16 register writes | 3,168 | 2,352 | 2,411 |
| 16 memory reads | 6,144 | 3,120 | 3,912 |
| 16 memory writes | 3,936 | 3,120 | 4,133 |
| single-step | 624 (step only) | 5,040 (restore and save 16 registers around the step) | 7,598 (same sequence as pipelined) |

The hardware sets only the floor. One DBG scan is 48 TCK cycles, and each
mailbox access needs one scan. Everything above that floor is debugger
software.

## Where this RTL goes beyond its source

The source design defines the following, and the RTL follows them:

- the block split;
- the core-boundary signal names;
- the MMCR fields and bit positions;
- the command values used by the polling flow;
- the value/mask structure of the cross breakpoint manager;
- the two breakpoints per core;
- the SEL / JTAG-selection-register pin routing;
- the four-core configuration.

The following are this implementation's own choices:

- the IR length and instruction codes, the ID code, and the DBG register with
  its clock-crossing handshake;
- the path from the JTAG block to the debug units. The source's block diagrams
  draw TAP signals going into the CFD and the breakpoint register set. Here,
  each DBG scan becomes one access on a system-clock register bus instead.
  All debug-unit registers therefore sit in the system-clock domain. Only the
  `ext_jtag` shift and update registers run on TCK;
- the debug address map, and the CFD register numbers;
- the breakpoint control fields, data compare, hit-status register, and the
  hold-until-acknowledge behaviour of `int_bkpt_en`;
- one value/mask pair per MDSU output, with "all masked = off";
- the MMCR write rules listed above, and D.EXP wired to `Exception_ack`;
- the coprocessor timing: one access per cycle, combinational read, and
  `COP_TYPE` = 1 meaning the core writes;
- the polarity choices: `D_nRW` = 1 means write, SEL = 1 means route away.

The command values could be read two ways. The source's flowchart writes
`0xC10` (plus the register index) for register reads, register writes and
memory writes alike. Under the MMCR bit definitions, that value means
"memory, read". This design follows the bit definitions, so each command
says what it is:

- register read `0xC00`;
- register write `0xC20`;
- memory read `0xC10`;
- memory write `0xC30`.

The hardware is not affected, because only the service routine decodes the
command.

Not included: the processor cores, their interconnect and memories, the
service routine, and the other JTAG IPs, which only have ports here.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example with plain
Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_ea_mocd \
  rtl/ea_mocd_pkg.sv rtl/*.sv tb/jtag_driver.sv tb/core_model.sv tb/tb_ea_mocd.sv
./obj_dir/Vtb_ea_mocd
```

To run another testbench, change `--top-module` and the last file. The two
system-level tests, `tb_ea_mocd` and `tb_ea_mocd_single`, also need
`tb/jtag_driver.sv` and `tb/core_model.sv`. Add `+verilator+rand+reset+2` to
start the simulation with random register values.

Two concurrent assertions state the handshake rules:

- in `ext_jtag`, a debug-bus request lasts one cycle;
- in `bp_comparator`, `Exception_ack` clears `int_bkpt_en`.

Add `--assert` to the verilator command to check them while simulating.

| testbench | covers |
|---|---|
| `tb_tap_controller` | 2,000 random TMS steps against the standard state table, clock enable, resets |
| `tb_ext_jtag` | IDCODE, IR capture, bypass, DBG read/write and busy, SEL/JSEL routing |
| `tb_mdsu` | random value/mask programs checked exhaustively over all breakpoint patterns |
| `tb_bp_comparator` | every breakpoint kind, data compare, latency, acknowledge, EN, status |
| `tb_cfd` | both sides of a command, MMCR write rules |
| `tb_ea_edu` | core decode, EN gating, merged read data |
| `tb_ea_mocd` | four-core system at default parameters (see below) |
| `tb_ea_mocd_single` | `NUM_CORES = 1` (no MDSU), pipelined debugger, timed debug functions, single-step with register save/restore |

`tb_ea_mocd` is the end-to-end test. It uses `tb/jtag_driver.sv`, a JTAG
master that acts as the debugger. It also uses `tb/core_model.sv`, a
behavioural core that runs a small loop and plays the service routine. The
test exercises:

- monitor entry, and register/memory/status reads and writes;
- single-step;
- instruction breakpoints and watchpoints;
- a cross breakpoint that stops all four cores;
- resume;
- EN = 0;
- JTAG IP routing.

Each mechanism is counted and must occur at least once. Every value the
debugger reads is compared with the core model's own state.
