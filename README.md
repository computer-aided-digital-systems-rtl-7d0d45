# A synchronous RAM that copies blocks of itself, and the datapath pieces around it

The main design is a 64 x 8 synchronous RAM with a block-transfer feature. It behaves as a plain
RAM until it is told to copy WCNT consecutive words from address FROM to address TO. It then does
the copy on its own, one word every two clocks, and raises `busy` while it works. It is a small
example of splitting a design into a *datapath* and a *controller*. The datapath holds the
counters, the multiplexers and the RAM, and does no deciding. The controller is a three-state
machine that only sequences the datapath's enables and selects.

Next to it, and sharing only the clock, are the building blocks such a datapath is made of:
- two ways to move data between registers (a mux in front of a register, and a shared bus);
- a three-state register and bus;
- three RAM timing styles (asynchronous, synchronous, synchronous with registered output);
- two ways of driving a RAM address from a counter;
- a counter with both synchronous and asynchronous controls.

The design follows a classic course case study on datapath design. Where that material leaves a
detail open, the choice made here is stated below and in each file's header.

## 1. The block-transfer RAM (`xfer_ram`)

### Interface

| port | dir | width | use |
|---|---|---|---|
| `clk`, `reset` | in | 1 | rising-edge clock, synchronous reset (controller to idle, counters to 0) |
| `we`, `addr`, `din` | in | 1, 6, 8 | normal RAM write port |
| `dout` | out | 8 | RAM output: the word at the address latched at the last edge |
| `cmd_we` | in | 1 | load one of the three transfer counters |
| `xfer` | in | 1 | start a transfer |
| `busy` | out | 1 | a transfer is running |
| `state`, `cnt_words` | out | 2, 6 | controller state and word counter, for observation |

### Using it

1. Write and read words normally with `we`/`addr`/`din`. Read data appears on `dout` one clock
   after the address, because the RAM latches its address.
2. Load the three counters, one per clock. Drive `cmd_we = 1`, put the value on `addr` and the
   counter code on `din[1:0]`: 0 = WCNT (number of words), 1 = FROM (first source address),
   2 = TO (first destination address). Code 3 loads nothing.
3. Pulse `xfer` for one clock. `busy` rises at the next edge and stays high for exactly
   2 × WCNT clocks. Keep `we` and `cmd_we` low until it falls; an assertion checks this.

Words are copied in ascending address order. Overlapping ranges therefore behave like a forward
copy: if TO is above FROM and the ranges overlap, words already copied are read again. A WCNT of 0
copies all 64 words, because the down-counter wraps. Addresses also wrap past 63.

### Datapath (`xfer_datapath`)

```
 addr ──┬──────────────► WCNT (down) ──► cnt_words ──► controller
        ├──────────────► FROM (up) ──┐
        ├──────────────► TO   (up) ──┤ 3:1 mux ──► RAM addr
        └────────────────────────────┘
 din ─────────────────────────────── 2:1 mux ──► RAM data      RAM dout ──┬──► dout
                                       ▲                                  │
                                       └──────────────────────────────────┘
 we ─┐
     OR ──► RAM we
 fsm_we ┘
```

All three counters load from `addr`. A small decode of `cmd_we` and `din[1:0]` picks the one to
load, and a load takes priority over counting. The RAM write enable is the OR of the external `we`
and the controller's `fsm_we`. So the external port stays usable as a plain RAM whenever the
controller is idle.

### Controller (`xfer_fsm`)

| state | busy | address mux | data mux | enables | next |
|---|---|---|---|---|---|
| S0 idle | 0 | `addr` | `din` | – | S1 if `xfer`, else S0 |
| S1 read | 1 | FROM | RAM output | FROM++, WCNT-- | S2 |
| S2 write | 1 | TO | RAM output | TO++, `fsm_we` | S0 if `cnt_words == 0`, else S1 |

The controller is a Moore machine, so its outputs depend only on the state register. The test in
S2 sees WCNT *after* the decrement made in S1. A transfer of N words therefore runs exactly N
read/write pairs. The RAM has one port, so a read and a write cannot share a clock, and each word
costs two clocks. The state codes and select encodings are in `xfer_pkg`.

### Why feeding `dout` back into `din` works

This is the subtle part of the design, and it depends on the RAM being synchronous.

- **Edge ending S1.** The RAM latches the FROM address, with the write enable low. FROM and WCNT
  step.
- **During S2.** `dout` shows the word at the latched FROM address. The data mux routes that word
  to the RAM's data input, and the address mux selects TO.
- **Edge ending S2.** The RAM latches the TO address, the write enable (high) and that data word
  together, so the word is written to TO.

Two conditions make this safe. The data the RAM writes was latched on a clock edge. And the RAM
output it came from was fixed by the *previous* edge. With an asynchronous RAM, the output would
change as soon as the address switched to TO, and the loop would copy garbage.

## 2. RAM timing styles

All three are 16 x 4 by default, the size of the timing examples they reproduce. The testbenches
write $F=3, $0=5, $1=$A, $2=$D, $3=$8, $4=$B, then read addresses F, 0, 1, 2, 3, 4.

| module | inputs | output | latency from address to data |
|---|---|---|---|
| `async_ram` | not latched; write while `we` is high | combinational | propagation delay only |
| `sync_ram` | address, data, `we` latched on `clk` | not latched | one edge |
| `sync_ram_oreg` | latched on `inclock` | latched on `outclock` | two edges (clocks tied) |

`sync_ram` is the RAM of the block-transfer design, instantiated there at 64 x 8. A write is
committed at the latching edge, and a read of the word just written returns the new value
(write-first). That read-during-write behaviour is a choice made here. `async_ram` models each word
as a latch that is open while `we` is high and the address selects it. Synthesis therefore reports
64 latch bits for it, and that is its intended behaviour. None of the RAMs clear their contents on
reset.

## 3. Driving a RAM address from a counter

A counter output changes just after each rising edge. The two ways to handle this are:

- **`counter_async_ram`.** With an asynchronous RAM, a write enable held for a whole cycle would
  still be active while the counter moves to the next address. That could write two words. The
  write enable is therefore ANDed with the inverted clock, so the RAM writes only in the low half of
  the cycle, once the address has settled. The write ends at the rising edge, before the counter
  output changes. In silicon this relies on the AND gate being faster than the counter's
  clock-to-output delay. Zero-delay simulation satisfies that automatically. The testbench shows
  what happens without the gate: with the gating removed, words are also written at the next
  address.
- **`counter_sync_ram`.** A synchronous RAM latches the address and the write enable on the same
  edge, so no gating is needed. The cost is one extra clock before read data for a new counter value
  appears.

## 4. Moving data between registers

- **`mux_transfer`** (4 bit). R0 loads from R1 or R2 through a 2:1 mux. The select is K1 (1 = R1,
  0 = R2) and the load is K1 OR K2, so R1 wins when both are high. External loads for R1 and R2 are
  added here so the example can be driven.
- **`bus_transfer`** (8 bit). A 3:1 mux puts R0, R1 or R2 on a bus, and each register has its own
  load line. One source can reach several registers in the same clock. The fourth select value,
  3, puts an external value on the bus; that input is added here so the registers can be given
  values.
- **`tri_reg` / `tri_bus`** (1 bit by default, any width by parameter). A register with a
  bidirectional port: it loads from the port on `load` and drives it while `en` is high. Three of
  them share one three-state bus. `tri_bus` adds an external three-state driver (`ext_en`,
  `ext_data`); without it every register would stay at its reset value. It also brings out the bus
  value, and an assertion reports two drivers enabled at once. Some synthesis front ends cannot
  flatten an `inout` connection between modules. `tri_bus` and the top then need a tool that
  supports that, or the bus has to be rewritten as a mux.

## 5. The counter (`counter`)

A loadable up/down counter (`DOWN` parameter), 6 bits by default. Its controls, highest priority
first:

1. `aclr`: asynchronous clear.
2. `aload`: asynchronous load of `d`.
3. `sclr`: synchronous clear.
4. `sload`: synchronous load of `d`.
5. `en`: count by one.

The two asynchronous controls share one asynchronous-load flip-flop, whose load value is 0 or `d`.
`aload` therefore captures `d` at its rising edge and does not follow later changes of `d` while it
stays high. The designs here use only the synchronous controls, which is the recommended practice
for anything driven by a state machine: a glitch on an asynchronous control line acts immediately.

## 6. Top level (`datapath_design_top`)

The top instantiates every example side by side, with its own ports and prefix:

| prefix | example |
|---|---|
| `xt_` | block-transfer RAM |
| `mt_` | mux transfer |
| `bt_` | bus transfer |
| `tb3_` | three-state bus |
| `car_` | counter plus async RAM |
| `csr_` | counter plus sync RAM |
| `sro_` | registered-output RAM |

They share `clk` and nothing else. The top has no parameters. Each example is fixed at its default
size: 64 x 8 for the block-transfer RAM and 16 x 4 for the other RAMs.

## Choices made here

These details are not fixed by the source material:

- The counter-select codes on `din[1:0]`, and the binary codes of the states and mux selects.
- The counters are cleared by `reset`.
- A load overrides counting.
- WCNT = 0 means 64 words.
- The external drivers and load ports added to the register-transfer examples.
- The bus widths of `bus_transfer` (8) and `tri_bus` (1, from a one-bit example).
- Write-first behaviour of `sync_ram`.
- The latch model of `async_ram`.
- The priority order of the counter's controls.

One explanation in the source material attributes the TO address to the read state and the FROM
address to the write state. That contradicts its own state chart and its description of the
operations. This design follows the state chart: read through FROM, write through TO.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog. The testbenches compare against
reference models written independently of the RTL:

- RAM arrays.
- Counter models.
- A cycle-exact state sequence for the controller.
- The `busy` length of 2 × WCNT.
- The two-edge latency of the registered-output RAM.

Every testbench was also run against a deliberately broken copy of its module, and each one
reported failures. Examples of the breakages:

- Swapped count enables.
- An inverted exit test in the controller.
- A missing clock gate on the async RAM's write enable.

`tb_datapath_design_top` runs all examples at once at their default sizes. It counts how often each
mechanism happened and fails if any never did. The mechanisms are:

- normal writes and reads;
- each counter load;
- transfers of up to 63 words;
- both mux transfers;
- bus transfers from a register and from outside;
- three-state drives by a register and from outside;
- gated async writes;
- counter-addressed sync writes;
- registered-output reads.

Not verified: any gate-level or timing behaviour. Simulation is zero-delay and two-state, so bus
contention and the physical races that the clock gating guards against show up only as assertions
and as functional effects.

## Simulating

Each testbench is a top-level module with no ports. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_xfer_ram rtl/xfer_pkg.sv tb/tb_xfer_ram.sv
./obj_dir/Vtb_xfer_ram
```

Swap in any other `tb_<module>`. `xfer_pkg.sv` must be read first by anything that uses the
block-transfer RAM. Sizes are parameters with the defaults described above (`AW`/`DW` for the
RAMs, `W` for registers and counters).

## Files

| file | contents |
|---|---|
| `rtl/xfer_pkg.sv` | shared enums of the block-transfer RAM |
| `rtl/xfer_ram.sv`, `rtl/xfer_datapath.sv`, `rtl/xfer_fsm.sv` | block-transfer RAM, its datapath and its controller |
| `rtl/sync_ram.sv`, `rtl/sync_ram_oreg.sv`, `rtl/async_ram.sv` | RAM timing styles |
| `rtl/counter.sv`, `rtl/counter_async_ram.sv`, `rtl/counter_sync_ram.sv` | counter and counter-addressed RAMs |
| `rtl/mux_transfer.sv`, `rtl/bus_transfer.sv`, `rtl/tri_reg.sv`, `rtl/tri_bus.sv` | register-transfer examples |
| `rtl/datapath_design_top.sv` | everything side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
