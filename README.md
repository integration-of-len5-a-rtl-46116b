# LEN5 on a 32-bit microcontroller bus: bridge, debug support and JTAG TAP

LEN5 is a 64-bit out-of-order RISC-V core. X-HEEP is a 32-bit microcontroller
platform whose memories and peripherals sit on an OBI bus. This RTL is the logic
that lets the core live in that platform:

* a **bridge** that turns the core's 64-bit instruction, load and store
  requests into 32-bit OBI transactions, then puts the answers back together;
* a **4-to-1 crossbar** that serialises the bridge's four data ports onto the
  single data port the platform offers;
* the **debug-mode logic inside the core**: debug CSRs, the debug states of
  the issue unit and the debug entry and exit sequences of the commit unit.
  These let the platform's external debug module halt and resume the core;
* a **JTAG Test Access Port** (IEEE 1149.1) with IDCODE, BYPASS and
  boundary-scan controls.

The main difficulty is the bridge. A 64-bit access becomes two 32-bit
transactions, and the bus may grant and answer those halves in any order and
in different cycles. The core, meanwhile, has already moved on. The bridge
has to re-pair the halves, keep the request's size and alignment until the
answer arrives, and never drop a response the core is not ready to take.

## Block map

```
                       len5_xheep_top
 ┌────────────────────────────────────────────────────────────────────────┐
 │ bridge                                                                 │
 │  instr_module ── instr_cu, 33-bit instr buffer, tag FIFO ──────────────┼─► bus instr port
 │  load_module  ── grant_cu, addr_splitter, load FIFO,                   │
 │                  rvalid_cu, data buffer, byte_selector ─┐ port 0, 1    │
 │  store_module ── grant_cu, addr_splitter, store FIFO,   ├─► obi_xbar ──┼─► bus data port
 │                  rvalid_cu, data_aligner ───────────────┘ port 0, 1    │   (round robin, 4:1)
 │                                                                        │
 │ issue_debug_cu ─► in-order stand-in for the ROB ─► commit_debug_cu     │
 │        ▲                                             │                 │
 │        └──────── debug_csr (dm, DCSR, DPC, DSCRATCH0/1) ◄┘             │
 │                                                                        │
 │ jtag_tap ── tap_controller, IR (tap_shift_reg), IDCODE, BYPASS,        │
 │             boundary-scan strobes brought out                          │
 └────────────────────────────────────────────────────────────────────────┘
```

Packages: `bridge_pkg` holds the widths, byte-enable codes, FSM encodings and
the packed OBI structs `obi_req_t`/`obi_rsp_t`. `debug_pkg` holds the CSR
addresses, exception causes, the ROB entry type and the commit states.
`jtag_pkg` holds the IR width and opcodes.

## The bridge

### Sizes and byte enables

The core states the size of a data access with an 8-bit byte enable. Only
four codes occur:

| `len5_be` | access | bus ports used |
|---|---|---|
| `8'hFF` | DOUBLEWORD | port 0 (low word) and port 1 (high word) |
| `8'h0F` | WORD | port 1 |
| `8'h03` | HALFWORD | port 1 |
| `8'h01` | BYTE | port 1 |

A request is a doubleword exactly when `be[7:4]` are all ones. All 32-bit or
narrower accesses use port 1 only.

### Addresses (`addr_splitter`)

For a 32-bit access both port addresses are `addr[31:0]`. For a doubleword:

* port 0 gets `addr[31:0]`;
* port 1 gets the upper word's address. If `addr[2]` is 0 (aligned), it is
  `addr` with bit 2 set. If not, it is `addr + 4`.

The adder on the misaligned path is the longest combinational path of the
bridge: core address in, port 1 address out.

### Address phase (`grant_cu`)

This is a Mealy FSM with states ISSUE, WAIT_GNT0 and WAIT_GNT1.

* In ISSUE a doubleword drives both port requests in the same cycle.
* If both grants arrive together, the core is granted at once.
* If only one arrives, the FSM waits in WAIT_GNT0 or WAIT_GNT1. It keeps only
  the missing request up, and grants the core when that request is accepted.
* The response FIFO is pushed on the *first* grant. Its entry records what the
  response phase will need: the byte enable, `addr[1:0]` for loads, and the tag.

The core must therefore keep address, byte enable and data stable until it is
granted, as OBI requires.

This design adds one rule: while the response FIFO is full, the core's
request is held off the bus. Without it, a grant could arrive with no room
left to record the transaction.

### Response phase (`rvalid_cu`, data buffer, `byte_selector`)

The FSM has five states: IDLE, WAIT_RVALID0, WAIT_RVALID1, WAIT_RVALID0_ERR
and WAIT_RVALID1_ERR. It reads the byte enable from the head of the FIFO,
because the core's own `be` now belongs to a later request.

* **32-bit response.** Everything follows port 1. The byte selector moves the
  addressed byte or halfword (chosen by the stored `addr[1:0]`) to bit 0.
  Bits above the loaded size keep whatever the bus word held there, and the
  upper 32 bits are zero. The core sign- or zero-extends the low bits itself.
* **Both halves in the same cycle.** The response is passed straight through
  as `{rdata1, rdata0}`.
* **One half first.** That half is written into the 32-bit data buffer
  (`reg_en`, with `reg_ctr_mux` picking the port). The FSM then waits for the
  other half. When it arrives, two cascaded muxes (`exit0`, `exit1`) put the
  buffered and live halves in the right places, and `len5_rvalid` is raised
  for one cycle.
* **Errors.** If the first half reports an error, the FSM goes to the matching
  `_ERR` state. The error is then reported together with the second half, so
  the core sees one response with `except_raised` set.

The FIFO is popped when `len5_rvalid` is raised, which frees the entry for
the next transaction.

Example: an aligned LOAD DOUBLEWORD where port 1 is served first.

```
cycle        0        1        2        3
len5_req     1        0
bus_req0     1        1        0
bus_req1     1        0
bus_gnt1     1
bus_gnt0              1                      -> len5_gnt in cycle 1
push_fifo    1
bus_rvalid1           1                      -> high word into data buffer
bus_rvalid0                    1             -> len5_rvalid, rdata = {buffer, rdata0}
```

### Stores (`store_module`, `data_aligner`)

The store module reuses the same grant CU, address splitter and rvalid CU. It
has no data buffer and no byte selector, because a store response carries
only `rvalid` and the error bit. The FIFO keeps the byte enable and the tag.

Write data is aligned during the address phase:

* a doubleword is split into low and high words;
* a word passes through;
* a halfword or byte is copied to every lane of the 32-bit word, and port 1's
  byte enable selects the lane from `addr[1:0]`.

### Instructions (`instr_module`, `instr_cu`)

Fetches are always 32 bits, so they use one port with `be = 4'hF`. The
problem here is `rready`. The core may refuse an instruction in the very
cycle the bus delivers it.

The two-state Mealy FSM (IDLE, BUFFER) handles this:

* When the bus answers while `len5_rready` is low, the instruction and its
  error bit are written into a 33-bit register.
* `len5_rvalid` stays high from that register until the core takes the
  instruction.
* Meanwhile, new requests and grants are blocked.

A tag FIFO returns each fetch's tag with its response. An access error is
reported with the fixed code `E_I_ACCESS_FAULT`. `flush` resets the FSM and
empties the FIFO and the buffer. Flush only reaches the instruction module:
loads and stores already on the bus must complete.

The buffer holds one instruction, so the module expects at most one fetch
outstanding. A fetch unit that pipelines fetches would need a deeper buffer.

### Crossbar (`obi_xbar`)

The platform's bus gives the core one data port. The four data ports of the
bridge are masters 0 to 3 in this order:

| master | port |
|---|---|
| 0 | load port 0 |
| 1 | load port 1 |
| 2 | store port 0 |
| 3 | store port 1 |

Arbitration is round robin. A grant is given only when the slave grants. A
small FIFO of master ids (`OUTSTANDING` deep) routes each response back to
its requester; responses are assumed to arrive in request order, as on a
single OBI port.

Because of this serialisation, a doubleword always shows the
"one half first" case in the response phase. This is also why loads and
stores cannot overtake each other on the data bus.

## Debug support in the core

The platform's debug module halts the core with a level `debug_req`. It
expects the core to:

1. enter debug mode;
2. save the PC in DPC;
3. record the cause in DCSR;
4. jump to the debug ROM at `dm_halt_addr`.

To leave, the debugger executes DRET.

### Debug CSRs (`debug_csr`)

* `dm` is a custom flag at 0x7C0 that is 1 in debug mode.
* DCSR, DPC, DSCRATCH0 and DSCRATCH1 are at the standard 0x7B0–0x7B3.
* The four debug registers can be accessed only in debug mode. Outside it,
  `csr_illegal_o` is raised and nothing is written.
* In DCSR, `xdebugver` = 4, `stopcount` = `stoptime` = `mprven` = 1 and
  `stepie` = 0 are hard-wired. `ebreakm/s/u`, `step` and `prv` are writable.
* `cause` and `nmip` change only when the commit unit writes them.
* Commit-unit writes win over a software write in the same cycle.

### Issue (`issue_debug_cu`)

A halt request is turned into an exception that travels down the pipeline
like any other, so that the commit unit sees it in program order.

* The **Debug Sampler** flag catches a request that arrives outside debug
  mode, and keeps it until the issue unit has acted on it.
* In **S_ISSUE_DEBUG** the unit sends a dummy ROB entry: exception `E_DEBUG`,
  order-critical, carrying the PC of the instruction at the head of the issue
  queue. That instruction is not consumed, and runs again after DRET.
* An EBREAK that must enter debug mode (`ebreakm` = 1, not yet in debug mode)
  takes **S_ISSUE_EBREAK_DM**.
* Both paths then wait in **S_STALL** until the commit unit says the entry
  sequence is finished.
* A misprediction flush has priority over everything.
* DRET is issued without an execution unit. Outside debug mode it raises an
  illegal-instruction exception.

### Commit (`commit_debug_cu`)

Each sequence is a chain of one-cycle states.

| ROB head | sequence |
|---|---|
| halt request | dm := 1 and flush → DPC := pc → DCSR cause 3, prv M, front-end flush → PC := `dm_halt_addr` → clear commit register |
| EBREAK, not in dm, `ebreakm` = 1 | dm := 1 → DPC := pc → cause 1 → PC := `dm_halt_addr` |
| EBREAK in dm | commit, flush → PC := `dm_halt_addr` |
| exception, ECALL or MRET in dm | commit, flush, no CSR update → PC := `dm_exception_addr` |
| exception, or ECALL, outside dm | MEPC, MCAUSE → PC := `mtvec` (direct mode) |
| DRET | dm := 0 and flush → PC := DPC |

The front-end flush also flushes the bridge's instruction module. This drops
a fetch that was in flight when the PC was redirected.

### The stand-in reorder buffer

The core's reorder buffer is not part of this RTL. In `len5_xheep_top`, a
`ROB_DEPTH`-entry in-order FIFO sits between the issue and commit units so
that the two can be used and tested together. The execution flush empties it.
Normal issue and commit are reduced to a valid/ready pass-through of the
instruction class and PC.

## JTAG TAP (`jtag_tap`, `tap_controller`, `tap_shift_reg`)

`tap_controller` is the standard 16-state FSM driven by TMS on the rising
edge of TCK. It decodes the capture, shift and update strobes for the
instruction and data registers, plus `output_sw_ctrl`, which sends the IR to
TDO in the IR branch.

The instruction register:

* is a 5-bit shift register that captures `...01`;
* has an update register clocked on the falling edge of TCK;
* resets to IDCODE on `trst_ni` or in Test-Logic-Reset.

The data registers:

| instruction | opcode | register |
|---|---|---|
| IDCODE | 1 | 32-bit register, captures `IDCODE_VAL` (default 32'h1000_5001) |
| BYPASS | all ones, or any unknown code | one flip-flop |
| EXTEST | 0 | external boundary-scan register |
| SAMPLE/PRELOAD | 2 | external boundary-scan register |

The boundary-scan cells themselves are not part of this RTL. Their
capture/shift/update strobes, enable and serial data are outputs, and their
serial output returns on `bsr_data_i`.

TDO changes on the falling edge of TCK. Registers shift towards bit 0, so
TDO shows bit 0 first.

## Design choices not fixed by the original description

| Item | Choice here |
|---|---|
| FIFO depths (tag, load, store) | 4 (`FIFO_DEPTH`) |
| Tag width | 4 (`TAG_W`), as in the original design |
| Push when full / pop when empty | ignored, and flagged by an assertion |
| Core request while FIFO full | held off the bus |
| Narrow load data above the loaded size | bits 63:32 zero; bits 31:size left as read |
| Unknown byte-enable codes | treated as WORD |
| Store data alignment | uses the live `be`/address in the address phase |
| Crossbar | round robin, in-order responses |
| `E_I_ACCESS_FAULT` | 1 |
| `dm` CSR address | 0x7C0 |
| DCSR hard-wired fields | as listed above |
| JTAG | IR width, opcodes and IDCODE value |
| Reorder buffer | in-order stand-in |
| `mtvec` | direct mode only |

Two structural differences from the original description:

* **IDCODE register.** The original keeps the IDCODE value in a separate
  register that is loaded at reset, and feeds the shift register from it.
  Here the shift register captures the `IDCODE_VAL` parameter directly. Since
  that register can never change, the behaviour seen at TDO is the same, and
  one 32-bit register is saved.
* **Tag FIFO timing.** The instruction tag FIFO is pushed on `bus_req &
  len5_gnt` and popped on `len5_rvalid & len5_rready`, as originally
  described. Load and store FIFOs are popped on `len5_rvalid`, since those
  ports have no `rready`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run with a
failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/bridge_pkg.sv rtl/debug_pkg.sv rtl/jtag_pkg.sv tb/tb_mem_pkg.sv \
  -y rtl -y tb tb/tb_len5_xheep_top.sv --top-module tb_len5_xheep_top
./obj_dir/Vtb_len5_xheep_top
```

Replace the testbench name to run another one.

Test models in `tb/`:

* `obi_mem_model` is an OBI slave with random grant delay and random
  response latency. It returns errors for addresses with `addr[31:28] == 4'hF`.
* `len5_port_agent` drives random fetches, loads and stores of every size and
  alignment on the core side. It checks every response against a reference
  memory image.

Traffic patterns covered:

* The block tests drive random traffic and compare against reference models.
* `tb_bridge` and `tb_load_module` put a real multi-master bus in front of the
  memory, so doubleword halves are granted and answered in either order.
* `tb_len5_xheep_top` runs the whole top at its default parameters. It mixes
  random bridge traffic through the crossbar with JTAG scans (IDCODE read,
  BYPASS) and debug scenarios:
  * halt request, including one held by the sampler;
  * EBREAK entry into debug mode;
  * ECALL taken to `mtvec`;
  * CSR protection;
  * DRET;
  * a misprediction during a request.

  It counts each mechanism and fails if any never happened: rready stall,
  doubleword split, misaligned access, narrow access, bus error, crossbar
  contention, grant wait and response wait.
* `tb_len5_xheep_workload` replays the load/store traffic of small firmware
  kernels through the whole top at its default parameters, one access at a
  time, into a single-cycle memory. The kernels are: printing a string
  (SB/LB), memset and an array sum (SD/LD), and multiply/divide results
  stored with SD and read back with LW. It also reports the cost of each
  access class. A 32-bit load takes about 3.4 cycles from request to data,
  and a 64-bit load or store about 4.7: the second half costs roughly one
  extra cycle on the shared data port.

## Limits

* The core, the platform's bus, memories and debug module are not included.
  The testbenches model the bus and memory behaviourally.
* The debug units cover only the debug-related behaviour of the issue and
  commit stages. They are meant to be merged into the core's own units.
* Single-step (`dcsr.step`) is stored but not acted upon.
* `fence` after a program-buffer run is not supported either; the original
  design leaves both of these open.
* No timing or area numbers are claimed for this RTL. For reference, the
  original bridge was reported at about 1.4 ns minimum cycle time in a 65 nm
  low-power library, with the misaligned-address adder on the critical path.
