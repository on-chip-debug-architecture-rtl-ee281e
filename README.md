# MOCD: run-stop on-chip debug for a multicore processor

A multicore chip is hard to debug from the outside. Its cores run in parallel
and share work, and almost none of their state can be seen at the pins. This
RTL adds a small debug infrastructure that works in *run-stop* style:

- each core can be halted at a breakpoint;
- other cores can be halted with it;
- a stopped core can be inspected and changed one controlled clock pulse at a
  time;
- all of this goes through **one** IEEE 1149.1 (JTAG) port.

The architecture is the MOCD (multicore on-chip debug) scheme from the article
"On-Chip Debug Architecture for Multicore Processor" (Park, Xu, Kim, Park). The
RTL is an independent implementation of it. Where the article leaves a detail
open, this implementation makes its own choice. Those choices are listed in
[Departures and choices](#departures-and-choices).

The design has three parts:

| Part | Modules | Job |
|---|---|---|
| EDU, embedded debug unit (one per core) | `edu` = `edu_comparator` + `edu_smc` + `edu_scan_chain` | detects breakpoints, moves the core between run and stop mode, inserts instructions and data into a stopped core |
| MDSU, multicore debug support unit | `mdsu` = `clock_controller` + `cbm` | makes every core clock; cross-triggers stops between cores |
| Extended JTAG | `jtag_block` (with `tap_controller`) | one TAP for everything; scan chain selection; SEL pin to reach other JTAG-based IPs |

`mocd_top` wires N_CORES EDUs (default 4), one MDSU and the JTAG block together.
The processor cores are not part of the RTL. Each core's debug interface is a
set of array ports on `mocd_top`. A behavioural five-stage core model,
`tb/mini_core.sv`, shows what a core must provide.

```
            ext_clk[i] ──► MDSU clock controller ──► core_clk[i] ──► core i
                                   ▲  ▲
         stop_mode_en[i] ──────────┘  └── TCK, Run-Test/Idle, scan_sel
                │
   core i ──memory access signals──► EDU i: comparator ─int_bkpt_en─► SMC ──► stop_mode_en[i]
          ◄─debug_ctrl (flush/hold)────────────────────────────────── SMC
          ──status info (branch_taken, pipe_empty)──────────────────► SMC
          ◄─IR / LSU insert ─── EDU i bus scan chain ◄──► JTAG block ◄──► TCK TMS TDI TDO nTRST SEL
   other cores' stop_mode_en ──► MDSU CBM ──ext_bkpt_en[i]─┬─► SMC
                           other IPs ──ip_dbg_req[i]───────┘ (ORed)
```

## Stopping a core at the right instruction

This is the most delicate part of the design. Suppose the breakpoint is on the
instruction at address `a2`. When the core stops, the instruction before it
(`i1`) must have completed. `i2` and everything fetched after it must have
been cancelled. On resume the core then restarts cleanly at `a2`.

**Comparator (`edu_comparator`).** It watches the core's memory access signals
(`mem_bus_t`). `int_bkpt_en` is combinational in the cycle of the access. It is
raised for either of these:

- an instruction fetch whose address matches `ADDR_VAL` under `ADDR_MASK`
  (address breakpoint);
- a load or store whose data matches `DATA_VAL` under `DATA_MASK` (data value
  breakpoint). Optionally the data address must also match.

A mask bit of 1 means "don't care". Control register bits enable each kind.

**Switch mode controller (`edu_smc`).** The SMC runs on the core's external
clock. It steps through six states:

| State | Lasts | What happens |
|---|---|---|
| `RUN_MODE` | until an event | waits for `int_bkpt_en` or a rising `ext_bkpt_en`; latches the fetch address |
| `RECOG_BKPT` | 1 cycle | records the cause: address, data or external |
| `ANALYZE_CORE` | 1 cycle | reads the status info. If a conditional branch ahead of an address breakpoint was taken, the breakpoint instruction will never run, so the SMC drops the event and goes back to `RUN_MODE`. |
| `DEBUG_CONTROL` | 1 cycle | `debug_ctrl.flush` = 1: the core cancels the breakpoint instruction and all younger ones |
| `WAIT` | until `status.pipe_empty` (the stop point) | `debug_ctrl.hold` = 1: no new fetches while older instructions drain. Multi-cycle instructions simply make this state longer. |
| `STOP_MODE` | until `debug_end` | `stop_mode_en` = 1 |

**What the core must provide.** This is the contract that `mini_core`
implements:

- `status.branch_taken`: a conditional branch resolves taken this cycle.
- `status.pipe_empty`: no valid instruction remains in any stage.
- `debug_ctrl.flush` is ORed into the core's existing pipeline-flush logic.
  - With `precise` = 1 (address breakpoints), the core cancels the oldest stage
    holding `flush_pc` and every younger stage.
  - With `precise` = 0 (data and external stops), it cancels every stage before
    MEMORY.
  - Either way, fetch restarts at the PC of the oldest cancelled instruction.
- `debug_ctrl.hold` blocks new fetches.
- In stop mode, the IR input takes `ir_insert` instead of program memory. A
  load takes `lsu_insert`, and a store goes to `cap_lsu` instead of data memory.

With the model core, `stop_mode_en` rises 5 external-clock cycles after the
breakpoint fetch (`tb_edu` prints the count). The timing is:

| Edge | SMC | Core |
|---|---|---|
| 1 | enters `RECOG_BKPT` | |
| 2 | enters `ANALYZE_CORE` | |
| 3 | enters `DEBUG_CONTROL` | the flush acts on this edge |
| 4 | enters `WAIT` | the pipe empties |
| 5 | enters `STOP_MODE` | |

A multi-cycle instruction ahead of the breakpoint stretches `WAIT`. `tb_edu`
replaces the store before the breakpoint with a 4-word load-multiple. That
instruction holds the memory stage for 3 extra cycles, and the stop comes
exactly 3 cycles later, after the last word is loaded.

**Resuming.** `debug_end` is a command written through JTAG (see below). If an
address breakpoint is still armed at the resume address, the core stops again
at once. The debugger must disable or move the breakpoint before resuming.
Single stepping works the same way: move the breakpoint to the next address,
then resume.

**Halting without a breakpoint.** Writing bit 1 of `CMD` asks a running core
to stop. The SMC treats the request like an external stop: `cause` is
external, and the flush cancels the stages before MEMORY. A request that
arrives while the core is already stopping or stopped is dropped.

## Clocks: run mode and controlled pulses

`clock_controller` gives each core its own 2:1 clock multiplexer:

```
core_clk[i] = stop_mode_en[i] ? (TCK & debug_clk_en[i]) : ext_clk[i]
```

`debug_clk_en[i]` is set while both of these hold:

- the TAP is in Run-Test/Idle;
- the scan chain selection register holds chain `i`, the bus chain of core `i`.

It is registered on the falling edge of TCK, so the pulses are whole TCK high
phases. **Every rising TCK edge spent in Run-Test/Idle gives the selected,
stopped core one clock pulse, including the edge that leaves the state.** The
host tasks in `tb/jtag_host.svh` end every scan in Run-Test/Idle. So while a
stopped core's bus chain is selected, each scan also clocks that core once. A
debugger must plan for this: insert NOPs, and never leave a STR or LDR in the
IR insert register.

The multiplexer is the plain combinational clock mux of the published
architecture. `stop_mode_en` changes on a rising `ext_clk` edge, so switching
clips at most one high phase. A silicon implementation would use a glitch-free
clock switch here.

## Cross breakpoints (`cbm`)

For each core `i`, `ext_bkpt_en[i]` is high when both of these hold:

- every *unmasked* other core `j` has `stop_mode_en[j]` equal to bit `j` of
  `stop_mode_reg[i]`;
- at least one other core is unmasked in `mask_reg[i]` (bit `i` itself is ignored).

For example, to make core 1 stop whenever core 0 stops:

```
stop_mode_reg[1][0] = 1
mask_reg[1]         = all ones except bit 0
```

The SMC acts on the *rising edge* of `ext_bkpt_en`. A resumed core is
therefore not caught again by a partner that is still stopped. After reset
all mask bits are set, so there is no cross triggering.

Other hardware can also stop a core. At the top level, `ip_dbg_req[i]` is
ORed with the CBM's `ext_bkpt_en[i]` before it reaches EDU `i`. An IP's debug
request or interrupt line can drive it. Like `ext_bkpt_en`, it acts on its
rising edge.

## JTAG programmer's model

The instruction register is 4 bits. Its capture value is `0001`. TLR selects
IDCODE.

| Instruction | Code | Data register |
|---|---|---|
| `SEL_SCAN_CHAIN` | `0010` | scan chain selection register (`$clog2(2*N_CORES+1)` bits; 4 at the default size) |
| `SEL_JTAG` | `0011` | JTAG selection register (`$clog2(N_IP)` bits) |
| `SCAN_ACCESS` | `1100` | the scan chain named by the selection register |
| `IDCODE` | `1110` | 32-bit ID, `0x10000A5B` |
| `BYPASS` | `1111` (and every unused code) | 1-bit bypass |

All data registers shift LSB first. Capture and shift happen on rising TCK.
Update happens on falling TCK, and so does TDO.

Scan chains are never concatenated. Each has its own number:

| Chain | Length | Contents |
|---|---|---|
| `c` (0 … N_CORES-1) | 64 | bus chain of core `c`: `{instruction[63:32], data[31:0]}`. Update-DR loads `ir_insert` / `lsu_insert`; Capture-DR loads the core's IR contents and its LSU store data. |
| `N_CORES + c` | 36 | breakpoint registers of core `c`: `{rw[35], addr[34:32], data[31:0]}`. Update-DR with rw=1 writes `data` to register `addr`. Every Update-DR also remembers `addr`, and the next Capture-DR returns that register. |
| `2*N_CORES` | 2·N² | CBM: `{mask_reg[N-1..0], stop_mode_reg[N-1..0]}`, core `i` at bits `i*N` of each half. It reads back on capture. |

Breakpoint registers:

| Address | Name | Contents |
|---|---|---|
| 0 | `ADDR_VAL` | address value |
| 1 | `ADDR_MASK` | address mask |
| 2 | `DATA_VAL` | data value |
| 3 | `DATA_MASK` | data mask |
| 4 | `CTRL` | bit 0: address breakpoint enable<br>bit 1: data breakpoint enable<br>bit 2: match loads<br>bit 3: match stores<br>bit 4: data breakpoint also checks the address |
| 5 | `STATUS` | read only: `{smc_state[5:3], cause[2:1], stop_mode_en[0]}`, synchronised to TCK |
| 6 | `CMD` | writing bit 0 = 1 issues `debug_end` (resume); writing bit 1 = 1 asks the running core to halt |

**Reading register rN of a stopped core `c`** (procedure `read_reg` in
`tb_mocd_top`):

1. Select chain `c`.
2. Scan in `{STR rN, 0}`. The pulse that follows fetches it.
3. Scan in `{NOP, 0}`.
4. Stay in Run-Test/Idle until the STR has passed the MEMORY stage. The model
   core needs five pulses in all.
5. Scan once more. The captured data field is rN.

**Writing rN** is the same with `{LDR rN, value}`.

## SEL: other JTAG-based IPs on the same pins

Load the JTAG selection register with `k` (instruction `SEL_JTAG`), then drive
the SEL pin high. While SEL is high:

- TCK, TMS, TDI and nTRST go straight to internal port `k`, and TDO comes from
  `ip_tdo[k]`;
- the MOCD TAP sees TCK held low, so it keeps its state;
- unselected ports see TCK low, TMS and TDI high, and nTRST high.

Change SEL only while TCK is low.

## Departures and choices

Taken from the published architecture:

- the three-part structure;
- the SMC states and their order;
- the debug interface signals (`int_bkpt_en`, `ext_bkpt_en`, `stop_mode_en`,
  status info, debug control);
- the kinds of breakpoint register and masking;
- the TCK/`debug_clk_en` pulse scheme and the 2:1 clock mux;
- the CBM's value/mask combination;
- the scan chain selection register with `sel_scan_chain`;
- the JTAG selection register with `sel_jtag` and the SEL pin.

Choices of this implementation:

- **Register layouts and JTAG formats.** The breakpoint register map and its
  36-bit access chain, the bus chain layout, the instruction codes, the chain
  numbering, the IDCODE value and the `CMD` register that issues `debug_end`
  and the halt request.
- **Debug control and status info.** Their contents are fixed as described
  above. The article leaves them core-specific.
- **Cancelled breakpoints.** The `ANALYZE_CORE → RUN_MODE` exit for a
  breakpoint behind a taken branch. The article states the rule but draws no
  such transition.
- **External breakpoints.** `ext_bkpt_en` is edge-triggered and
  synchronised. The CBM's "at least one unmasked core" guard is also added.
- **Clock domain crossings.** Two-flop synchronisers for `ext_bkpt_en`,
  `debug_end`, the halt request and the status read-back. The breakpoint registers are quasi-static
  and live in the TCK domain. Change them while the breakpoint is disabled or
  the core is stopped.
- **Public JTAG instructions.** Only BYPASS and IDCODE exist. There is no
  boundary register on the chip pins, so SAMPLE/PRELOAD and EXTEST are absent.
  Full IEEE 1149.1 compliance would need them.
- **Breakpoint units.** There is one breakpoint unit (one address and one data
  comparison) per EDU.

Not in the RTL:

- the processor cores themselves;
- the prototype's FIFOs, memories, bus and peripherals;
- the host-side GDB stub.

## Size compared with the published gate counts

The published area figures are in 2-input NAND equivalents for a 90 nm
library. For a rough comparison, each block was run through yosys
(`synth -flatten`, then `abc -g NAND`). The estimate counts each NAND or
inverter cell as 1 and each flip-flop as 6.

| Block | Size | NAND / NOT / FF | Estimate | Published |
|---|---|---|---|---|
| `edu_comparator` | 1 core | 1035 / 552 / 189 | about 2,700 | 13,127 |
| `edu_smc` | 1 core | 41 / 35 / 48 | about 360 | 268 |
| `clock_controller` | 4 cores | 26 / 22 / 4 | about 70 | 64 |
| `cbm` | 4 cores | 168 / 46 / 64 | about 600 | 553 |
| `jtag_block` (TAP, IR, selection registers, muxes) | 4 cores | 200 / 148 / 71 | about 770 | 2,323 (TAP controller) |
| `edu_scan_chain`, 64-bit bus chain | 1 core | 196 / 2 / 128 | about 970 | 6,355 (scan chain) |

The SMC, the clock controller and the CBM come out close to the published
numbers. The comparator and the scan chain come out much smaller. Here the
comparator has a single set of breakpoint registers, and the chain covers
only a 32-bit instruction and a 32-bit data word. The published blocks very
likely cover more of the core's bus.

## Files

- `rtl/mocd_pkg.sv`: shared types (`mem_bus_t`, `status_info_t`,
  `debug_ctrl_t`, `dr_ctrl_t`, state enums) and constants.
- `rtl/mocd_top.sv`: the top level. Parameters `N_CORES` (default 4) and
  `N_IP` (internal JTAG ports, default 4).
- `rtl/edu*.sv`, `rtl/mdsu.sv`, `rtl/clock_controller.sv`, `rtl/cbm.sv`,
  `rtl/jtag_block.sv`, `rtl/tap_controller.sv`: the blocks above.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_mocd_single.sv`: the top level in its smallest configuration (one
  core, one internal JTAG port): stop, register read, resume.
- `tb/mini_core.sv`: behavioural core model. Ops are `NOP`, `ADDI`, `LDR`,
  `STR`, `BNEZ` and `LDM` (load-multiple, one word per cycle, stalling the
  younger stages). Instruction format: `[31:28]` op, `[27:24]` register,
  `[23:16]` word count (`LDM` only), `[15:0]` immediate or address.
- `tb/jtag_host.svh`: pin-level JTAG host tasks.

## Verification

`tb_mocd_top` runs the whole design at its default size: four cores, each
with a model core running a small loop, all driven only through the JTAG pins.
It covers:

- an address breakpoint on core 0, with core 1 cross-stopped by the CBM;
- a data value breakpoint on core 2;
- an address breakpoint on core 3;
- precise stop points (for example, on core 0 the store before the breakpoint
  is done and the breakpoint instruction is not);
- status read-back;
- register read and write through the bus scan chain with controlled pulses;
- a single step;
- a breakpoint behind a taken branch, which must be dropped on every loop;
- SEL pass-through;
- resuming every core;
- halting core 2 alone by a halt request, then resuming it;
- stopping core 3 from `ip_dbg_req`, then resuming it.

It counts each mechanism and fails if any never happened. The block
testbenches check the comparator against a reference model with random bus
traffic, the SMC's state sequence and cycle timing, the stop latency with and
without a multi-cycle instruction, the TAP state sequence,
the clock pulse counts and the CBM against a reference model for all
stop patterns.

Build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mocd_pkg.sv tb/tb_mocd_top.sv --top-module tb_mocd_top -o sim
./obj_dir/sim
```

Any other `tb_<block>` builds the same way. `-Wno-fatal` keeps the width warnings of the testbenches' generic 32-bit `check` task from stopping the build. After synthesis, yosys counts
about 1,600 flip-flops for the four-core `mocd_top`. About 360 are in each
EDU, most of them the 36-bit and 64-bit chains and the four 32-bit breakpoint
registers.
