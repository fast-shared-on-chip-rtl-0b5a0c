# SPIRA shared scratchpad memory system

A coarse-grained reconfigurable array (CGRA) runs inner loops well. The
loop control around them is a different matter: outer loops, setting up
array registers, starting the array and waiting for it. If the host
processor does this work, it has to reach the array through the system
interconnect, and that overhead can eat much of the speed-up.
SPIRA (Sequential Processor Integrated Reconfigurable Array) gives the array
its own small in-order sequential processor (SP). The SP sits right next to
the reconfigurable array (RA) and uses the RA's scratchpad memory (SPM) as
its only data memory.

The hard part is to share the SPM without slowing the SP. The RA reaches
its memory banks through a crossbar that arbitrates bank conflicts and costs
several cycles per access. Putting the SP on another crossbar port would
add that latency to every SP load. SPIRA avoids this by never letting the SP
and the RA run at the same time. With exclusive execution, no arbiter is
needed between them:

* every bank gets a two-way mux that picks either the crossbar or the SP;
* an address decoder on the SP side enables one bank, and all banks see
  the same SP address and data lines;
* a controller sets the mux select and changes it only when one of the two
  goes to sleep and the other wakes up.

The SP's path to the SPM is then the bank itself plus a mux, so an SP load
takes two cycles. The RA keeps its crossbar path unchanged, at five cycles
per load without conflicts.

This repository holds synthesizable SystemVerilog for one SPIRA accelerator's
memory system and control: the banks, the bank muxes, the SP memory
interface with its decoder, the RA register file, the RA crossbar and the
controller. The SP core, the PE array and the host are not included. Their
connections are ports of the top module `spira_top`.

## Structure

```
 host ──START/STATUS──► spira_ctrl ──wakeup, start address, sp_run──► (SP core)
                          │  ▲  ▲
                  sel_ra  │  │  └── ra_start_req ── ra_regs ◄── SP stores (RA registers)
                          │  │                        │ cfg ──► (PE array)
                          ▼  └── sp_idle, xbar_idle   ▲ live-out write-back
 (SP core) ── sp_mem_if ──┬── shared SP lines + bank enables ──► spm_bank_mux[b] ──► spm_bank[b]
              │ decoder   ├── RA registers                        ▲
              │           └── ext port (other addresses)          │
 (PE array LSU ports) ── xbar (round robin per bank) ─────────────┘
```

| Module | Role |
|---|---|
| `spira_pkg` | data width, SP address map, `bank_req_t`, controller states |
| `spm_bank` | one SPM bank: single port, pipelined two-cycle read, byte enables |
| `spm_bank_mux` | per-bank 2:1 mux between SP lines and crossbar output |
| `sp_addr_decoder` | SP address → bank enable / RA register / external |
| `sp_mem_if` | SP data interface: request handshake, two-cycle return path, external port, ordering |
| `ra_regs` | RA registers written and read by the SP; register 0 bit 0 invokes the RA |
| `xbar` | crossbar from the load-store PEs to the banks with bank-conflict arbitration |
| `spira_ctrl` | host start, SP wakeup, exclusive SP/RA execution, mux select |
| `spira_top` | one accelerator wiring all of the above |

## Exclusive execution: how control passes between host, SP and RA

This sequence is the core of the design. `spira_ctrl` is a four-state
machine (`CTRL_IDLE`, `CTRL_SP_RUN`, `CTRL_SP_DRN`, `CTRL_RA_RUN`).

1. **Start.** The host writes the SP's start address to the START register
   (`host_addr=0`). The controller holds it on `sp_start_addr`, pulses
   `sp_wakeup` for one cycle and raises `sp_run`. The SP owns the SPM
   (`sel_ra=0`). A START while busy is ignored.
2. **SP phase.** The SP runs the outer-loop code. It loads and stores the
   SPM directly and writes the RA registers: base addresses, trip counts
   and whatever else the array's configuration expects.
3. **Invoke.** A store to RA register 0 with bit 0 set records an RA
   invocation. It takes effect when the SP goes to sleep (`sp_sleep` high
   for a cycle, e.g. when the core executes a wait instruction). The
   controller drops `sp_run` and waits in `CTRL_SP_DRN` until no SP load is
   in flight (`sp_mem_if.idle_o`). Then it moves the bank muxes to the
   crossbar, pulses `ra_start` and holds `ra_run`.
4. **RA phase.** The load-store PEs use the crossbar. The array can write
   live-out values into the RA registers through `ra_reg_we/idx/wdata`.
   When it raises `ra_done`, the controller waits until the crossbar has
   nothing in flight. Then it hands the banks back to the SP and raises
   `sp_run` again. The SP resumes where it stopped. It needs no new start
   address.
5. **End.** If the SP sleeps with no invocation pending, the kernel is
   finished. The controller returns to idle, sets STATUS bit 1 (done) and
   pulses `host_irq`. STATUS bit 0 is busy.

At no cycle are `sp_run` and `ra_run` both high; an assertion checks this.
The mux select equals `ra_run`, so it changes only at these hand-overs.
Loads issued by the SP just before it sleeps still return while it sleeps.
`rvalid` does not depend on `sp_run`.

## SP memory interface

Request side: `sp_req`, `sp_we`, `sp_be`, `sp_addr` (byte address) and
`sp_wdata`. The request is accepted in a cycle with `sp_gnt` high; hold it
until then. Response: `sp_rvalid` with `sp_rdata`, in request order.

| Target | Addresses (default) | Load latency |
|---|---|---|
| SPM bank *b* | `b*256K … b*256K+256K-1`, from 0 to 1 MB | exactly 2 cycles after acceptance |
| RA registers | `0x4000_0000 … 0x4000_0FFF` (register = `addr[5:2]`, aliased in the window) | exactly 2 cycles |
| external | everything else | whenever `ext_rvalid` returns |

SPM and RA-register accesses are accepted every cycle, back to back.
Stores complete at acceptance. An external access is forwarded as
`ext_req` and accepted with `ext_gnt`. It waits until no internal load is
more than one cycle old. While an external load is outstanding, nothing
else is accepted. This keeps responses in order with a single
`rvalid` stream.

The banks are laid out one after another (bank = word address / bank
size), not interleaved. The crossbar uses the same mapping, so both masters
see one memory image.

## RA side and the crossbar

Each load-store port drives `lsu_req/we/be/addr/wdata` and holds them until
`lsu_gnt`. In each cycle, each bank grants one requester, chosen round-robin
starting after the last winner. Losers see `lsu_conflict` and retry. No port
waits more than `NUM_LSU-1` cycles for a bank. A load granted in cycle *c*
returns on `lsu_rvalid` in cycle *c*+5:

* one request register;
* two bank cycles;
* `XBAR_RSP_STAGES` = 2 response registers.

This 5-cycle figure is the crossbar latency this design starts from. The
SP's 2-cycle path is what the shared-bus arrangement buys. Set
`XBAR_RSP_STAGES` to model a faster or slower crossbar.

The RA registers appear to the array as `ra_cfg[0..NUM_RA_REGS-1]`. Their
meaning, apart from the start bit of register 0, is up to the array's
configuration.

## Parameters (`spira_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_BANKS` | 4 | SPM banks |
| `NUM_LSU` | 4 | load-store PE ports on the crossbar |
| `BANK_WORDS` | 65536 | 32-bit words per bank (256 KB) |
| `NUM_RA_REGS` | 16 | RA registers visible to the SP |
| `XBAR_RSP_STAGES` | 2 | crossbar response registers (RA load latency = 3 + this) |

The defaults are the main configuration: a 4x4 array with four load-store
PEs and four 256 KB banks. The larger configuration used for MPEG2 kernels
is a 6x6 array with six banks. It is `NUM_BANKS=6, NUM_LSU=6`, and the
six-port count is an assumption. Keep the SPM (`NUM_BANKS*BANK_WORDS*4`
bytes) below `0x4000_0000`, the start of the RA register window.

## What follows the published architecture and what is this design's own

These parts follow the published SPIRA architecture:

* the shared banks with an SP-side decoder and per-bank mux, with no arbiter;
* exclusive SP/RA execution;
* the host writing the SP start address, which reaches the SP with a
  wakeup signal;
* the SP initialising RA registers with stores before invoking the RA;
* four load-store PEs, four 256 KB banks and a full crossbar;
* two-cycle SP access to the SPM and to the RA registers;
* five-cycle conflict-free crossbar loads.

These are this design's own choices:

* the address map;
* contiguous rather than interleaved banks;
* byte enables;
* the req/gnt/rvalid handshakes and the external-port ordering rule;
* round-robin arbitration and how the five crossbar cycles are split into
  pipeline stages;
* the invoke-on-sleep protocol;
* the drain waits before each hand-over;
* the RA register count, the start bit and the live-out write-back port;
* the host register layout and irq.

The published text gives the SPM size both as "256 KB" in total and as
four 256 KB banks. This design uses 256 KB per bank.

Not included:

* the SP core, an ARM11-class single-issue in-order pipeline without cache
  or address translation;
* the PE array (ADRES-style, mesh-plus-diagonal interconnect), its
  operations and its configuration memory;
* the host processor and its caches;
* the system interconnect, DMA engine and main memory;
* the system-level arrangement of several SPIRA accelerators on one bus.

No DMA port into the SPM is provided: data is assumed to be in place
before a kernel starts. Power gating is represented only by the
`sp_run`/`ra_run` enables.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and stops itself with a cycle
watchdog. The independent reference models live in the testbenches:

* `tb_spm_bank`: byte-enable writes and back-to-back reads, checked for
  data and the exact 2-cycle latency.
* `tb_spm_bank_mux`: random requests on both inputs.
* `tb_sp_addr_decoder`: bank boundaries, the register window, and random
  addresses against a separate formula for the address map.
* `tb_sp_mem_if`: random SPM, register and external traffic against bank,
  register and external models. Checks data, 2-cycle latency, ordering,
  one-hot enables and idle.
* `tb_ra_regs`: stores, 2-cycle loads, cfg outputs, start pulses and RA
  priority.
* `tb_spira_ctrl`: the full start → SP → drain → RA → drain → SP → done
  sequence, with exclusivity checked every cycle.
* `tb_xbar`: four ports on four banks. Checks data, 5-cycle latency, one
  grant per bank, round-robin bound, no grants while disabled, and idle.
* `tb_spira_top`: the whole accelerator at default size. A behavioural
  SP runs three outer-loop iterations. Each one fills an array that
  straddles banks, reads the external port, programs the RA registers and
  invokes the RA. A behavioural four-port RA computes
  `B[i] = A[i]*k + 1` and writes back the sum. The SP checks every
  result. The test counts, and requires, these events: wakeup, SP access
  to every bank, RA-register and external access, RA starts, owner
  switches, bank conflicts, both drain waits and the irq. It also checks
  the 2- and 5-cycle latencies on every load.
* `tb_spira_top_6x6`: the same test with six banks and six load-store
  ports.

Run one with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/spira_pkg.sv tb/tb_spira_top.sv --top-module tb_spira_top
./obj_dir/Vtb_spira_top
```

Each run takes well under a second. The simulator is two-state, and
memory contents are not reset. The testbenches write every word before
they read it.

Lint notes: Verilator reports `SYNCASYNCNET` because the assertions
sample `rst_n` synchronously (`disable iff`) while the flops use it as an
asynchronous reset. This is intended. The external-port outputs of
`sp_mem_if` are straight copies of the SP request. They exist so the
port is a complete bus.
