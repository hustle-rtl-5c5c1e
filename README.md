# HUSTLE — serving self-test code to a core without the instruction cache

Safety-critical processors run *self-test libraries* (STLs): short routines
that exercise the core's logic and compare a signature against a known value,
so that a permanent hardware fault is found while the system is in the field.
STL code is pure overhead for the application. Fetched like ordinary code it
costs cycles twice: the test instructions themselves miss in the instruction
cache (IC), and they evict lines of the application, which then misses more.

HUSTLE is a small unit inserted on the fetch path between the core and its
IC. It keeps the STL in a private ROM. While the core runs application code,
HUSTLE is transparent and forwards fetches to the IC. When the core fetches
from the address range of the ROM, HUSTLE answers from the ROM and never
passes those fetches to the IC. No line of the IC is used for test code, and
test fetches take one cycle. Nothing inside the core changes.

The second idea is *when* to run the STL. An IC miss leaves the core with
nothing to do until the line is refilled. HUSTLE turns each miss into an
interrupt request. With the STL installed as the service routine of that
interrupt, the core spends the refill time running test code from the ROM.
Meanwhile the IC finishes the refill. This only works because the service
routine does not come through the IC: redirecting into code that itself
missed would add misses instead of hiding one.

## Structure

```
            +------------------------- hustle --------------------------+
 core       |  hustle_csr --enable--> hustle_ctrl (OFF/IDLE/ACTIVE)     |
 fetch <--->|                           |  state, route_rom             |     IC
 port       |  hustle_bypass <----------+--------------------------->   |<--> fetch
            |      |  ROM read port                                     |     port
            |  hustle_rom (STL image)                                   |
            |                                                           |
 irq <------|  hustle_irq <---------------------------------------------|<--- ic_miss
            +-----------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/hustle_pkg.sv` | state type `hustle_state_e`, instruction width |
| `rtl/hustle.sv` | top: wires the five blocks below |
| `rtl/hustle_bypass.sv` | STL address decode, request routing, response mux |
| `rtl/hustle_ctrl.sv` | OFF / IDLE / ACTIVE state machine |
| `rtl/hustle_rom.sv` | STL ROM, one-cycle synchronous read, `$readmemh` image |
| `rtl/hustle_csr.sv` | software enable register |
| `rtl/hustle_irq.sv` | IC miss to interrupt request |
| `rtl/hustle_stl.hex` | example STL image (26 RV64 instructions) |

The core, the IC and the interrupt controller are outside this design. Their
signals are ports of `hustle`.

## The three states

| state | meaning | fetch in STL range | fetch elsewhere | IC responses |
|---|---|---|---|---|
| OFF | unit disabled | to the IC | to the IC | forwarded |
| IDLE | enabled, application code | to the ROM, go ACTIVE | to the IC | forwarded |
| ACTIVE | core is inside the STL | to the ROM | to the IC, go IDLE | dropped |

The transitions are:

- OFF to IDLE when enable is set.
- IDLE to OFF when enable is cleared.
- IDLE to ACTIVE on a fetch inside the STL range.
- ACTIVE to IDLE on a fetch outside it.

The state changes on an *accepted* fetch request. The request that causes a
change is already routed the new way: the fetch that enters the STL is served
by the ROM, and the fetch that leaves it goes to the IC. That is why
`hustle_ctrl` gives the routing decision `route_rom` combinationally from the
current state and the decode, rather than from the registered state alone.

There is no edge from ACTIVE to OFF. If software clears enable while the STL
is running, the unit stays ACTIVE until the core fetches outside the ROM. It
then passes through IDLE and goes OFF. A test routine is never cut off
halfway, with its remaining fetches sent to an IC that may not hold them.

In OFF the unit behaves as if it were absent. An STL range fetch then goes
to the IC, so the same address map works with the unit disabled, provided
the system also has the STL in ordinary memory at those addresses. That is
the baseline the testbenches compare against.

## Fetch port and timing

Both sides of `hustle_bypass` use the same bundle, with `PKT_W = 32*FETCH_WORDS`:

| signal | dir (core side) | meaning |
|---|---|---|
| `*_req_valid`, `*_req_ready`, `*_req_addr[ADDR_W]` | in, out, in | fetch request (byte address) |
| `*_resp_valid`, `*_resp_ready`, `*_resp_data[PKT_W]` | out, in, out | one fetch packet |
| `cpu_flush` / `ic_flush` | in / out | redirect: drop outstanding fetches |

- IC traffic passes through combinationally, in both directions.
- A ROM fetch accepted in cycle *t* is answered in cycle *t+1*. The answer is
  held while `cpu_resp_ready` is low. A new ROM fetch is accepted in the same
  cycle that the previous answer is taken, so the ROM sustains one packet
  per cycle.
- `cpu_flush` drops a ROM answer that is still waiting. A request accepted
  in the same cycle as the flush survives it. The flush is passed to the IC
  as `ic_flush`.
- Rule for the core: flush the outstanding fetch before redirecting into the
  STL range. A core does this anyway when it takes an interrupt. In ACTIVE,
  IC responses are drained and dropped, so a late IC response can never be
  taken for an STL instruction.
- `irq` goes high one cycle after `ic_miss` is seen in IDLE. It stays high
  until the core enters the STL (ACTIVE) or the unit goes OFF. Misses seen in
  ACTIVE or OFF are ignored, so the STL is not re-entered while it runs.

Two assertions in `hustle_bypass` check the handshake rules. One says that a
ROM-routed request never appears on the IC port. The other says that a waiting
ROM answer stays valid until it is taken or flushed.

## Software view

CSR `CSR_ADDR` (default `0x7C0`, in the RISC-V machine-mode custom
read/write range):

| bits | field | access |
|---|---|---|
| 0 | EN, enables the unit, reset 0 | RW |
| 2:1 | STATE: 0 OFF, 1 IDLE, 2 ACTIVE | RO |

To use the event-driven schedule:

1. Point the handler address of the interrupt that `irq` drives at `ROM_BASE`.
2. Set EN.
3. Unmask the interrupt.

The STL must save and restore what it uses and end with `mret`. The example
image `rtl/hustle_stl.hex` follows that pattern. It saves three registers,
runs a chain of add/xor/shift/or/sub/and operations from two constants, and
compares the result with the expected signature `0x4400e`. On a mismatch it
writes 1 to `mscratch`. It then restores the registers and returns. Replace
the image through the `INIT_FILE` parameter: one 32-bit hexadecimal word per
line, word *i* at byte address `ROM_BASE + 4*i`. Words the file does not
cover read as zero.

## Parameters of `hustle`

| parameter | default | note |
|---|---|---|
| `ADDR_W` | 32 | fetch address width |
| `FETCH_WORDS` | 1 | instructions per fetch packet; ROM rows are packet-aligned |
| `ROM_BASE` | `32'h0001_0000` | start of the STL range; align it to the packet size |
| `ROM_WORDS` | 1024 | ROM size in 32-bit words (4 KiB); a multiple of `FETCH_WORDS` |
| `CSR_ADDR` | `12'h7C0` | CSR number of the enable register |
| `INIT_FILE` | `"rtl/hustle_stl.hex"` | ROM image, read relative to the simulator's working directory |

## What follows the source design, and what is chosen here

These parts are taken from the HUSTLE proposal:

- the placement between core and IC;
- the bypass logic plus ROM organisation;
- the three states and their transitions;
- enabling through a CSR;
- using the IC miss as an interrupt that runs the STL as its service routine.

The proposal was built inside an out-of-order RISC-V core generator. It does
not give the interface signals, widths, sizes or latencies. These are
choices made here:

- the valid/ready/flush fetch bundle;
- 32-bit addresses and one instruction per packet;
- the ROM base, its size and its one-cycle latency;
- the CSR number and layout, including the state read-back;
- the reset state OFF;
- no direct ACTIVE-to-OFF exit;
- the level-sensitive `irq` and its clearing rule;
- dropping IC responses in ACTIVE.

In the proposal the miss signal is wired to the interrupt controller. Here
the miss is gated by the state first. The contents of the proposal's
library, ten signature-based tests plus a context switch, are not available;
the shipped image is only an example.

To put the unit into a real core, adapt `hustle_bypass` to the frontend's
packet format. A wider `FETCH_WORDS` covers multi-instruction packets.
Compressed (16-bit) instructions are not handled by the ROM addressing.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_hustle_ctrl` | 4000 random cycles against a reference model of the state diagram; every transition occurs |
| `tb_hustle_bypass` | range decode at its edges; forwarding with both handshake polarities; one ROM packet per cycle; back-pressure; flush; IC responses blocked in ACTIVE; OFF goes to the IC; packet index with 2-word packets |
| `tb_hustle_rom` | every row of 1- and 2-word instances; one-cycle latency; hold; blank words |
| `tb_hustle_csr` | reset value, own/foreign CSR numbers, read-back layout |
| `tb_hustle_irq` | random miss/state traffic against a reference model |
| `tb_hustle` | whole unit at default parameters, with a core fetch model and `tb/icache_model.sv` (blocking, direct-mapped, 16 lines of 8 words, 20-cycle refill) |

`tb_hustle` runs in four phases:

1. **Baseline.** Unit off. The STL is called after every pass of a workload
   loop twice the IC size, and is fetched through the IC.
2. **Enabled.** The same schedule with the unit on. No STL fetch reaches the
   IC, and the STL takes fewer cycles. It prints the ratio, about 0.6 with
   this model.
3. **Event-driven.** The STL runs as the handler of `irq`, taken on IC
   misses. The core flushes the missed fetch and fetches it again after `mret`.
4. **Disable.** Enable is cleared inside the STL. The unit stays ACTIVE until
   the STL returns, then goes OFF and raises no more requests.

In all phases, every fetched word is compared with the memory map. Every ROM
answer must arrive exactly one cycle after its request. Every `irq` rise must
follow an IC miss. The testbench counts the mechanisms (forwarding, ROM
service, interrupts, flushes, back-pressure, each state transition) and fails
if one never happened. The core model fetches sequentially and does not
execute branches, so it measures fetch behaviour, not program results.

### The three schedules

`tb_hustle_workloads` uses the unit at its defaults with `tb/core_fetch_model.sv`.
It runs a workload of 4 passes over a 256-word loop plus 4 runs of the example
STL, each scenario from reset:

| scenario | how the STL is started |
|---|---|
| `test_1` | called after every workload pass |
| `test_2` | started by a periodic timer |
| `test_3` | started by the miss interrupt |

`test_1` and `test_2` run once with the unit off and once with it on.
`test_3` runs with the unit on and is compared with `test_2` with the unit
off. The testbench prints three ratios, each computed against the workload
run alone:

- **OR** = 1 − C_h/C, with C the extra cycles.
- **dIPC** = N/C_h − N/C, with N the number of STL instructions fetched.
- **IR** = 1 − M_h/M, with M the extra IC misses.

The subscript h marks the unit on.

With this model the unit removes every STL miss, so IR is 1. OR is about 0.66
for `test_1` and `test_2` and about 0.77 for the miss-driven schedule. These
numbers describe the single-issue fetch model and the small IC model, not a
real core. The model also cannot reproduce a case where part of the STL is
still cached when it starts. The testbench checks the following:

- every scenario does the same STL work;
- each trigger fires;
- the unit lowers the extra cycles and misses;
- the miss-driven schedule beats the periodic one.

Run a testbench from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/hustle_pkg.sv tb/tb_hustle.sv --top-module tb_hustle -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` name for the block testbenches.
Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/hustle_pkg.sv rtl/hustle.sv`.
It leaves two kinds of warning, both benign:

- `SYNCASYNCNET`: the assertions sample the asynchronous reset through
  `disable iff`.
- `UNUSEDSIGNAL`: the upper write-data bits of the CSR are unused.

`INIT_FILE` is opened relative to the tool's working directory. Run
synthesis from the repository root, or pass an absolute path, or the ROM is
initialised with zeros.
