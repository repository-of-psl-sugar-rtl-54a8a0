# Property-specified building blocks: stack, FIFO, configuration registers and an AHB-Lite protocol checker

Many designs are built from the same few parts: a buffer, a register file
behind a simple access port, a standard bus interface. If such a part always
uses the same signals and follows the same rules, one set of formal properties
can check every design that contains it. This RTL implements parts that
follow those rules: each one has a fixed interface and a behaviour defined
cycle by cycle, so the reusable properties apply to it directly. The four
parts are:

| part | module | what it is |
|---|---|---|
| LIFO stack | `stack` | 64 × 8-bit stack with pointer, empty/full flags and three ways of handling a push and a pop in the same cycle |
| FIFO | `sync_fifo` | 16 × 32-bit FIFO with request/grant handshakes on both sides |
| configuration registers | `cfg_regs` | four 32-bit registers behind a req / r_req access interface |
| AHB-Lite protocol checker | `ahb_lite_checker` | synthesizable monitor that flags, rule by rule, every violation of the AHB-Lite master and slave protocol |

The parts do not depend on each other. `prosyd_top` places them side by side,
each with its own ports, so that all four can be built and simulated together.

## The stack

### Pointer and flags

The stack is a memory plus a pointer `s_ptr` to the **top entry**. The
bottom of the stack is location 0. Because the pointer addresses the top
entry and not the next free slot, it is 0 both for an empty stack and for a
stack holding one entry. A separate `empty` flag tells the two apart. Treating
"pointer is 0" as "empty" is the classic mistake, and this convention is
meant to catch it.

| operation | condition | next cycle |
|---|---|---|
| push | not full | `memory[p] <= d_in`, `s_ptr <= p`, where p = `s_ptr+1`, or 0 if the stack was empty; `empty` low; `full = (p == DEPTH-1)`; `d_out = 0` |
| pop | not empty | `d_out = memory[s_ptr]`; `s_ptr` decrements, or stays 0 and `empty` rises if it was 0; `full` low |
| nop, push when full, pop when empty | | nothing changes; `d_out = 0` |

Example with the default 64 × 8 stack. It holds 12, 03, 4C, FE and 51 at
locations 0 to 4, with the pointer at 4. A pop puts 51 on `d_out` and leaves
the pointer at 3. A push of 2B then writes 2B at location 4 and moves the
pointer back to 4.

`d_out` is a register. It holds the popped word for exactly one cycle and is
0 otherwise. The flags and the pointer are registers too. `rst` is
synchronous and active high. It empties the stack and clears `d_out`, but
leaves the memory contents as they were.

### Simultaneous push and pop: `RW_POLICY`

A push and a pop in the same cycle is the case where stack designs differ.
All three policies are built in, selected by the `RW_POLICY` parameter
(`stack_pkg::rw_policy_e`):

* `PUSH_OVERRIDES` (default): the push is served. If the stack is full, the
  pop is served instead.
* `FULL_BYPASS`: the memory is not touched. The pushed word comes out on
  `d_out` in the next cycle, as if it had been pushed and then popped at once.
  The pointer, the memory and the flags stay as they were, even if the stack
  is empty or full.
* `SAFE_BYPASS`: bypasses like `FULL_BYPASS` when the stack is neither empty
  nor full. When it is empty it serves the push, and when it is full it serves
  the pop. This suits an environment that relies on the flags.

The module contains assertions for the pointer invariants (never empty and
full together, pointer 0 when empty, pointer at the top when full). It also
asserts the effect of each operation one cycle later.

## The FIFO

`sync_fifo` is a circular buffer with a write pointer, a read pointer and an
occupancy counter. A transfer happens on a clock edge where the environment's
request and the FIFO's grant are both high:

* `wr_gnt = wr_req && !full` and `rd_gnt = rd_req && !empty`. Grants are
  combinational, so the FIFO grants only what is requested. A write is
  accepted in any cycle the FIFO is not full, and a read in any cycle it is
  not empty: both latencies are zero.
* `data_out` always shows the oldest word (show-ahead). The word read is the
  one on `data_out` in the cycle of `rd_gnt`.
* A read and a write may happen in the same cycle. When the FIFO is full, a
  write is still refused even if a read happens in that cycle.
* Some environments must never see a read and a write accepted together.
  With `ONE_XFER_PER_CYCLE = 1`, the FIFO grants at most one of them per
  cycle, and the read wins. A write request is then refused in any cycle
  with a read grant, so the write latency is no longer zero while reads are
  going on. It is still never blocked forever: a write goes through at the
  latest when the FIFO runs empty.
* `full`, `empty` and `count` come from the counter. One clock drives both
  sides.

The correctness conditions this FIFO is meant to meet:

* writes are never blocked forever;
* there are never more reads than writes;
* a read is possible whenever there have been more writes than reads;
* the n-th read returns the n-th written word.

Its testbench checks all four, together with the grant rules and the flags.

## The configuration register block

### Access protocol

`cfg_regs` uses a generic register-access framework, the same shape as an APB
slave or a simple target port:

* The initiator raises `req` with `addr` (byte-address bits 15..2), `we`,
  `be` (byte enables) and `data`. It holds them until `r_req`.
* `r_req` is high for one cycle, the cycle after the request is first seen.
  `r_data` and `error` are valid in that cycle.
* If `req` is still high in the next cycle, that is a new request.
* The block never raises `r_req` without `req`, and never in the first cycle
  of a request. Assertions in the module check both rules.
* A valid write takes effect at the clock edge that ends the first cycle of
  its request. The register outputs therefore show the new value in the
  `r_req` cycle, one cycle after the request was first seen. An output
  follows a written bit both one cycle after the write request and in the
  cycle the write completes, so either way of stating that timing holds.

### Register map

| register | byte address | access | effect |
|---|---|---|---|
| CTRL | 0x6000 | read/write | drives `ctrl_out`; `outsig = ctrl_out[4] & insig` |
| WO | 0x6004 | write-only | drives `wo_out`; reads return 0 |
| STATUS | 0x6008 | read-only | samples `status_in` every cycle |
| EVENT | 0x600C | read/write | bit i is also set by a pulse on `ev_set[i]`; the external set wins over a write in the same cycle |

* All four registers reset to 0.
* Only the bytes whose `be` bit is set are written.
* An unmapped address, or a write to STATUS, is invalid. It changes nothing,
  returns 0 and raises `error`.
* The addresses are parameters.

## The AHB-Lite protocol checker

`ahb_lite_checker` watches one AHB-Lite bus: a single master, with no
arbitration and no SPLIT/RETRY handshake. Its 27-bit output `viol` has one bit
per rule. A bit is high in a cycle whose bus values break that rule.
`viol_sticky` collects the bits until reset, and `any_viol` is their OR. The
rule indices are `ahb_lite_pkg::ahb_rule_e`.

The rules fall into a slave set (`ahb_slave_rules()` in the package) and a
master set (all the others). `master_viol` and `slave_viol` are the OR
of each set. To check a design with a master interface, `master_viol` is the
design's fault, and `slave_viol` means the environment broke its side of the
protocol. For a slave interface, the roles are swapped.

| group | rules |
|---|---|
| transfer type | after the NONSEQ of a SINGLE only IDLE/NONSEQ; after IDLE only IDLE/NONSEQ; after BUSY only BUSY/SEQ; after the first beat of a burst only BUSY/SEQ |
| wait states | while HREADY is low the master holds HTRANS, HADDR, HWRITE, HBURST, HSIZE, HPROT, and the write data of a write data phase |
| bursts | 4/8/16-beat bursts have exactly that many SEQ beats; HWRITE, HSIZE, HBURST and HPROT are constant along a burst; HADDR is held during BUSY; at most `BUSY_BOUND` (15) consecutive BUSY transfers; a burst stays within one 1 KB block; incrementing and wrapping address sequences |
| structure | address aligned to the transfer size; transfer no wider than `DATA_BUS_SIZE` (32) |
| slave | zero-wait OKAY response to IDLE and to BUSY; ERROR/RETRY/SPLIT take two cycles (HREADY low, then high, same HRESP); at most `WAIT_STATES_BOUND` (15) consecutive wait states |

### How it tracks a burst

Most rules compare the present cycle with the previous one, which is kept in
one register stage. The burst rules need more state:

* On the first beat of a burst (NONSEQ accepted, HBURST not SINGLE), the
  checker records HWRITE, HSIZE, HBURST, HPROT and the 1 KB block of the
  address.
* For a 4-, 8- or 16-beat burst, it loads the number of SEQ beats still due.
* `exp_addr` holds the address the next SEQ must carry. Each accepted
  NONSEQ/SEQ beat moves it forward by the transfer size. In a wrapping burst,
  the step wraps inside the window of beats × size bytes:
  `next = (a & ~mask) | ((a + size) & mask)`, with `mask = beats*size - 1`.
  A BUSY must show the same address as the SEQ that follows it, so a BUSY
  does not advance `exp_addr`.
* The burst ends at the next IDLE or NONSEQ. If that comes while beats are
  still due, the beat-count rule fires. A SEQ after the last beat fires it
  too.

A non-OKAY response ends the burst being tracked. It also suspends the master
rules for that cycle and the next, because the master may then cancel the
rest of the burst.

### Where the checker is stricter or more precise than the literal rules

* **Wait states:** signals must stay stable up to and including the cycle in
  which HREADY returns high, which is what "until HREADY is sampled high"
  means on a real bus.
* **HWDATA:** its stability is required only in the data phase of a write.
* **Bounds:** the BUSY bound and the wait-state bound are upper limits. The
  BUSY run counts BUSY *transfers*, so a BUSY held through a slave's wait
  states counts once.
* **Addresses:** a burst's addresses are checked against the expected-address
  register, not against the previous cycle plus one step. The two agree when
  there is no BUSY.
* **Alignment and bus width:** checked on NONSEQ/SEQ transfers only.
* **INCR bursts:** an undefined-length INCR burst must have at least two
  beats, because the first beat of any burst must be followed by BUSY or SEQ.
  The full AMBA specification allows a one-beat INCR. This rule set does not.

## Files

| file | content |
|---|---|
| `rtl/stack_pkg.sv` | `rw_policy_e`, `stack_op_e` |
| `rtl/stack.sv` | stack |
| `rtl/sync_fifo.sv` | FIFO |
| `rtl/cfg_regs.sv` | configuration register block |
| `rtl/ahb_lite_pkg.sv` | AHB encodings, rule indices, helper functions |
| `rtl/ahb_lite_checker.sv` | AHB-Lite checker |
| `rtl/prosyd_top.sv` | the four parts side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/stack_pkg.sv rtl/ahb_lite_pkg.sv tb/tb_prosyd_top.sv --top-module tb_prosyd_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_prosyd_top` with `tb_stack`, `tb_sync_fifo`, `tb_cfg_regs` or
`tb_ahb_lite_checker` to run one part on its own.

* `tb_stack` runs three 8-entry stacks, one per `RW_POLICY`, against a
  reference model under random traffic. It also replays the example above on
  a default 64-entry stack, then fills and drains it.
* `tb_sync_fifo` runs random traffic against a queue model, on a FIFO in
  each of the two `ONE_XFER_PER_CYCLE` modes.
* `tb_cfg_regs` issues random accesses, including invalid ones and
  back-to-back ones, while external events arrive.
* `tb_ahb_lite_checker` first drives 30,000 cycles of random legal traffic,
  which must raise no flag. The traffic includes every burst type, BUSY runs
  and wait-state runs up to the bounds, and ERROR responses with the burst
  cancelled. It then breaks each of the 27 rules in turn and checks that the
  right flag rises.
* `tb_prosyd_top` uses the default parameters throughout. It takes each part
  through a complete operation and counts every mechanism: stack full and
  empty refusals and both outcomes of push+pop, FIFO full/empty/simultaneous
  transfers, every register access kind, and AHB wait/BUSY/ERROR cycles plus
  two detected violations.

All simulations take well under a second.

## Changing the design

* **Sizes:** `DEPTH`/`WIDTH` of `stack` and `sync_fifo`, the register
  addresses of `cfg_regs`, and `DATA_BUS_SIZE`, `WAIT_STATES_BOUND`,
  `BUSY_BOUND` of the checker are parameters. The stack needs `DEPTH >= 2`.
* **Modes:** `RW_POLICY` of `stack` and `ONE_XFER_PER_CYCLE` of `sync_fifo`
  select the behaviour variants described above. `prosyd_top` passes them on
  as `STACK_RW_POLICY` and `FIFO_ONE_XFER`.
* **Register map:** to add a register, extend `sel_e` and the decode, read
  mux and write logic in `cfg_regs.sv`. Which accesses are invalid is decided
  by `valid_op`.
* **Checker rules:** to add a rule, add an index to `ahb_rule_e` before
  `R_NUM_RULES` and set its bit in the rule block of `ahb_lite_checker.sv`.
  A rule that binds the slave must also be added to `ahb_slave_rules()`.

## Limits

* **FIFO clocking:** there is one clock for both sides. A FIFO with separate
  read and write clocks, or one where the FIFO rather than the environment
  takes the initiative, is a different design and is not included.
* **Register map:** only CTRL at 0x6000 and the kinds of register (read/write,
  write-only, read-only, updated by an input) come from the register
  framework. The other addresses, the byte-enable encoding and the one-cycle
  response are choices made here.
* **AHB-Lite checker:**
  * It flags violations but does not drive the bus, and it is not a master or
    a slave.
  * It checks only AHB-Lite: there are no arbitration rules and no SPLIT or
    RETRY handshake.
  * The two-beat burst count has no counterpart, because AMBA has no two-beat
    burst type.
