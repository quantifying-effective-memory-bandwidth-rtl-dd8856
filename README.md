# Memory-bandwidth test cores for a platform FPGA

How much off-chip memory bandwidth does a hardware core in the FPGA fabric
really get when it reaches DDR SDRAM through the usual embedded buses, bus
attachments and memory controller? The peak figures of the DIMM (1600–3200
MB/s) and of the bus (800 MB/s for a 64-bit, 100 MHz processor bus) do not
answer that. The cores in this repository measure it in hardware. A test
core issues reads to off-chip memory exactly as a compute core would, and
counts the bus-clock cycles during which it waits for data. It leaves out
everything else: fetching the next address, storing the data, and the
software set-up. Dividing the bytes moved by the counted time gives the
effective bandwidth of one core, and of several cores that share the bus.

Two set-ups are provided and sit side by side in the top module
`membw_top`:

* **Single-core set-up** (`test_core`): one core that reads any list of
  addresses that software loads into it. That one mechanism covers
  sequential, strided and random access patterns. It reads in single-beat
  or burst transactions.
* **Multi-core set-up** (`controller_core` + eight `seq_test_core`): small
  cores that do sequential reads only. All of them start on the same clock
  edge from a controller core, so they contend for the bus.

The processor, the buses with their arbiters and bridges, the vendor bus
attachment and the DDR controller are not part of this RTL. Every
connection to them is a port of `membw_top` (see "Bus-side interface").

## A single-core measurement, step by step

1. Software writes the off-chip addresses into the core's **address BRAM**.
   It also writes the test settings: number of requests, burst or single,
   transfer length in bytes, and the local address of the core's data
   register. The core has no address generator, so a new access pattern
   needs only new software.
2. A write of 1 to `CTRL` starts the test. The **slave FSM** clears the
   counters and loops through these states: `READ_ADDR` (a synchronous
   BRAM read), `RD_REQ` (hand the command to the master FSM), `WAIT_DATA`,
   `CHECK` (last request? otherwise read the next address).
3. The **master FSM** issues the bus reads (next section). The bus writes
   each returned 64-bit beat into the core, at the local address given in
   the command. The core stores every beat that hits its data register in
   the **data BRAM**, in arrival order.
4. The timer counts only while the slave FSM is in `WAIT_DATA`. The
   transaction counter counts completed requests. The error counter counts
   requests that the bus ended with an error.
5. When `CTRL` bit 0 (busy) drops, software reads `TIMER`, `XACT`, `ERR`,
   `DCOUNT` and the stored data. It checks the data against memory.

## The master FSM: single reads and burst splitting

`master_fsm` has five states: `IDLE`, `SINGLE_REQ`, `BURST_REQ`,
`CHECK_BURST` and `LAST_BURST`. It keeps one request outstanding at a time.

* A **single** command (burst = 0) becomes one request of one beat (8 bytes, `BEAT_BYTES`).
  The FSM returns to `IDLE` when the bus reports completion.
* A **burst** command of `xfer_len` bytes first issues
  `min(xfer_len, BURST_BYTES)` bytes. `BURST_BYTES` is 128 (sixteen 64-bit
  beats), the largest burst of the 64-bit processor bus. After each burst,
  `CHECK_BURST` looks at the bytes still to request, in this order:
  * 0: done. `master_ack` is pulsed to the slave FSM.
  * ≤ 8: one single-beat request (`SINGLE_REQ`). It ends the command.
  * ≥ 128: another full burst (`BURST_REQ`).
  * otherwise: a shorter final burst (`LAST_BURST`).

  For example, 336 bytes becomes 128 + 128 + 80, and 264 bytes becomes
  128 + 128 + a single beat. Each request starts where the previous one
  ended.

If any request of a command ends with `bus_err`, `master_err` is set when
the command completes.

## What the timer measures, cycle by cycle

Suppose the bus accepts a request in the same cycle it is raised, and its
first beat arrives `L` cycles after acceptance, with one beat per cycle
after that. Then:

| command | `TIMER` increment per request |
|---|---|
| single read | `L + 1` |
| one 128-byte burst | `L + 17` (16 beats + the check cycle) |
| k full bursts | `k · (L + 17)` |

Address fetch and the `CHECK` state are not counted. They cost 4 cycles per
request in `test_core` and 2 in `seq_test_core`. Waiting for the bus grant
is counted, which is the point: contention shows up in the timer. Bandwidth
is `bytes / (TIMER × 10 ns)` at a 100 MHz bus clock.

The testbenches calibrate their bus model to the simulated figures for the
processor bus: 18 cycles per single read (44.44 MB/s) and 48 cycles per
128-byte burst (266.67 MB/s). They check that the timer reproduces exactly
those numbers.

## Multi-core set-up

`seq_test_core` keeps the slave/master split and the counters of the full
core, but drops both BRAMs. Its slave FSM (`seq_slave_fsm`) generates the
addresses itself: it starts at `BASE` and steps one beat (8 bytes) per single read, or
`xfer_len` bytes per burst. The core keeps only the most recent beat
(`LAST_LO/HI`), so software can check the final datum against memory. This
keeps each core small enough for eight to fit in the FPGA.

`controller_core` has a `SELECT` mask register. Any write to `GO` raises,
one cycle later and for one cycle, the start line of every selected core.
The start lines are wires, not bus transactions, so all selected cores
start on the same edge. Reading `GO` returns the cores' busy lines.

## Register maps

All registers are 32-bit words. A read returns `rdata` one cycle after
`reg_req.rd`. Addresses are word addresses.

`test_core`: `addr[15:14]` selects the window.

| window | `addr[3:0]` / index | register |
|---|---|---|
| 0 | 0 `CTRL` | write bit 0 = start; read bit 0 = busy, bit 1 = master busy |
| 0 | 1 `MODE` | bit 0 = burst |
| 0 | 2 `XFER_LEN` | bytes per request (burst mode) |
| 0 | 3 `NUM_REQ` | requests in the test |
| 0 | 4 `LOCAL` | local address the bus writes the data to |
| 0 | 5/6/7 `TIMER`/`XACT`/`ERR` | read only |
| 0 | 0xB `DCOUNT` | beats stored in the test (read only) |
| 1 | `addr[8:0]` | address BRAM entry (write only) |
| 2 / 3 | `addr[8:0]` | data BRAM entry, low / high 32 bits (read only) |

`seq_test_core`: the same registers 0–7 in `addr[3:0]`, plus 8 `BASE`,
9 `LAST_LO` and 0xA `LAST_HI`. `controller_core`: 0 `SELECT`, 1 `GO`.

## Bus-side interface

Each core exposes the user-logic side of a bus attachment. The types are
in `membw_pkg`.

* `bus_req`, `bus_cmd` (`mst_cmd_t`: `addr`, `local_addr`, `burst`,
  `nbytes`) and `bus_req_ack` form a valid/ready read request. The command
  is held stable until it is accepted, and an assertion checks this.
* `bus_done`/`bus_err` is a one-cycle pulse with the last beat of the
  request.
* `bus_wr` (`bus_wr_t`: `en`, `addr`, `data`) carries each data beat, which
  the bus writes into the core. Beats to any other local address are
  ignored.
* `reg_req` (`reg_req_t`) and `reg_rdata` carry the processor's register
  accesses.

To use the cores on a real bus, an adapter must map these bundles onto the
bus attachment's master and slave signals. That adapter is not included.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_CORES` | 8 | sequential cores in the multi-core set-up (at most 32) |
| `BURST_BYTES` | 128 | largest burst; 64 gives the peripheral-bus burst size |
| `BEAT_BYTES` | 8 | bytes per bus data beat: 8 on the 64-bit processor bus, 4 on the 32-bit peripheral bus |
| `ADDR_DEPTH`, `DATA_DEPTH` | 512 | address / data BRAM entries |
| `CNT_W` | 32 | counter width |

`DATA_W` (64) and the other widths are fixed in `membw_pkg`. With
`BEAT_BYTES = 4` a beat travels in the low 32 bits of the 64-bit `data`
field, and the core still stores the whole field. `BEAT_BYTES` must divide
`BURST_BYTES` and be at most 8; elaboration stops with an error otherwise.

For a core on the 32-bit peripheral bus, set `BURST_BYTES = 64` and
`BEAT_BYTES = 4`. A single read is then one 4-byte beat, and the master
splits long bursts into 64-byte pieces, with a 4-byte single read as the
tail where 4 bytes or fewer remain. With 10 cycles per single read and 28
per 64-byte burst, the timer gives 40 MB/s and 228.57 MB/s. Those are the
simulated figures for that bus.

## Departures and design choices

These follow the described architecture: the slave/master split, the state
sequences of both FSMs, the 128-byte burst with its splitting thresholds,
timing only the wait for data, the three counters, the data store, the
eight sequential cores without BRAMs and their direct start lines.

These are choices made here:

* the register maps;
* the BRAM depths and their one-cycle read latency;
* the valid/ready request handshake and the one-cycle completion pulse;
* asynchronous active-low reset;
* saturating counters;
* the data BRAM wrapping after 512 beats;
* the controller's busy read-back.

Other points where this RTL departs or is limited:

* **Reads only.** The request type (read/write) is not a setting; every
  measurement here reads.
* **Error counter.** It counts requests that the bus ended with an error.
  It is not a data-compare error count.
* **Short bursts.** A burst command shorter than 128 bytes goes out as one
  burst of its own length.
* **32-bit bus through a parameter.** The data bundle stays 64 bits wide
  on both buses. A 32-bit bus uses `BEAT_BYTES = 4` and its low half. This
  variant is tested on `test_core` and `seq_test_core`, not through the
  full top.

Verilator reports `SYNCASYNCNET` for `rst_n`. It is used both as the
asynchronous flop reset and in the `disable iff` of the assertions. The
warning is harmless.

## Files

* `rtl/membw_pkg.sv`: shared types and register addresses.
* `rtl/membw_top.sv`: both set-ups side by side.
* `rtl/test_core.sv`: the single-core core. It contains `slave_fsm`,
  `master_fsm`, two `tc_bram` and `result_counters`.
* `rtl/seq_test_core.sv`: the sequential core. It contains `seq_slave_fsm`,
  `master_fsm` and `result_counters`.
* `rtl/controller_core.sv`: the start-line controller.
* `tb/bus_mem_model.sv`: behavioural bus, arbiter and memory. It serves
  NPORTS masters round robin, one transfer at a time, with configurable
  single and burst latency and beat size. The word at byte address `a` is
  `{(a & ~3) ^ 32'hA5A50000, a & ~3}`. Reads with address bit 31 set end in
  a bus error.
* `tb/tb_*.sv`: one self-checking testbench per module. `tb_membw_top`
  runs the whole design at its default parameters. It covers single,
  strided and random reads, full and short bursts, single-beat tails, bus
  errors, data-BRAM wrap, starting a subset of cores and eight-core
  contention. It fails if any of these mechanisms never occurs.
* `tb/tb_opb_config.sv`: `test_core` and `seq_test_core` built for the
  32-bit bus (`BEAT_BYTES = 4`, `BURST_BYTES = 64`). It checks the 40 MB/s
  and 228.57 MB/s timer figures, the 64-byte burst splitting and the
  4-byte address step.
* `tb/tb_multicore_sweep.sv`: the multi-core workload at default
  parameters. It runs 1, 2, 4 and 8 cores × 1, 4, 16, … 65536 reads
  (powers of four), in single and burst mode. It prints per-core
  bandwidth, the sum over the cores, and the delivered rate. It takes
  about a minute.

  With the model used there, one core gets 44.44 MB/s. Eight cores sharing
  the bus get 5.97 MB/s each. These numbers show how the counters behave
  under contention. They are properties of the model, not measurements of
  real hardware.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/membw_pkg.sv tb/tb_membw_top.sv --top-module tb_membw_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<name>.sv` and its top module name. Each
testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog. All
testbenches pass. A deliberately broken copy of each module makes its
testbench fail.
