# AXI shared-bus system with a hardware performance monitor

Inside a system-on-chip it is hard to see where bus time goes. This design
puts a small hardware monitor on an AXI bus. It counts, per slave and per
direction, how many transactions ran, how many bytes they moved, how many data
beats crossed the bus, how many cycles the bus was occupied and how long the
transactions took. The monitor sits in a complete, simulatable AXI system. Two
AXI masters share one interconnect in front of three memory slaves, and the
monitor watches the shared bus inside the interconnect, so it sees every
transaction that any master makes.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). It has no vendor
primitives.

```
 user ports        +------------+      shared bus       +-------------+     +-----------+
 (cmd / data) ---> | axi_master |--+                +-->|             |---->| axi_slave | 0x0xxxxxxx
                   +------------+  |  +----------+  |   |  axi_slave  |     +-----------+
                                   +->|axi_master|--+-->|    _ctrl    |---->| axi_slave | 0x1xxxxxxx
 user ports        +------------+  |  |  _ctrl   |  |   |  (+DECERR)  |     +-----------+
 (cmd / data) ---> | axi_master |--+  +----^-----+  |   |             |---->| axi_slave | 0x2xxxxxxx
                   +------------+         |        |   +------^------+     +-----------+
                               write/read arbiters  |     AW / AR address decoders
                                                    v
                                         +-----------------+
                                         | axi_bus_monitor |--> 3 write + 3 read counter banks
                                         +-----------------+
```

## The AXI channels

All five AXI channels are used. Each one transfers on a cycle where VALID and
READY are both high. The source holds VALID and the payload steady until READY
comes. The payloads are packed structs in `axi_pkg`:

| Channel        | struct | Fields                                                   | Width with VALID/READY |
|----------------|--------|----------------------------------------------------------|------------------------|
| Write address  | `ax_t` | ID 4, ADDR 32, LEN 4, SIZE 3, BURST 2, LOCK 2, CACHE 4, PROT 3 | 56 |
| Write data     | `w_t`  | ID 4, DATA 32, STRB 4, LAST 1                            | 43 |
| Write response | `b_t`  | ID 4, RESP 2                                             | 8  |
| Read address   | `ax_t` | same as write address                                    | 56 |
| Read data      | `r_t`  | ID 4, DATA 32, RESP 2, LAST 1                            | 41 |

A burst has LEN+1 beats (1 to 16) of 2^SIZE bytes each. The burst types are
FIXED, INCR and WRAP. The beat address follows the usual AXI rule:
`aligned = floor(addr / 2^SIZE) * 2^SIZE` and the next address is
`aligned + 2^SIZE`. A WRAP burst wraps back to the boundary aligned to
`2^SIZE * (LEN+1)`. `axi_pkg::next_addr` computes this, and the slave uses it.

While ARESETn is low, every master and slave drives all of its outputs to zero.
The reset is asynchronous.
No AXI output of a master or a slave depends combinationally on an AXI input:
every VALID, READY and payload signal they drive comes from registers, and in
the master's RREADY also from the user's `rd_ready`. Only the interconnect between them is combinational.

## Masters and slaves

**`axi_master`** has two engines that run in parallel.

- The write engine goes through three phases, one after the other:
  - It places a command from the `wcmd` port on AW, with AWVALID high one cycle
    after the command is taken. AW is held until AWREADY.
  - It then takes LEN+1 beats from the `wd` stream and drives them on W, with
    WID = AWID. Each beat is held until WREADY, and WLAST marks beat LEN+1.
  - It raises BREADY and reports the response on `b_done`/`b_resp`/`b_id` for
    one cycle.
- The read engine places `rcmd` on AR and passes the R beats to the `rd`
  stream. RREADY follows the user's `rd_ready`.

**`axi_slave`** is a 128-byte memory (`MEM_BYTES`) that handles one write burst
and one read burst at a time.

- Write side:
  - It accepts an address, then writes the strobed bytes of each beat.
  - After WLAST it drives BVALID with BID = WID and holds it until BREADY. Then
    all B signals return to zero.
- Read side:
  - It accepts an address, then returns beats with RID = ARID and RLAST on beat
    LEN+1.
  - Each beat's data is registered, so it stays stable while RREADY is low.
- Byte lane `k` of a beat at address `A` is memory byte `((A & ~3) + k) mod 128`.
  Narrow and unaligned transfers therefore use the normal AXI lanes.
- A beat size wider than the 32-bit bus (SIZE > 2) gets SLVERR and changes
  nothing.

## Interconnect: arbitration, decoding, routing

`axi_interconnect` is a shared bus made of four parts:

- **Two arbiters (`axi_arbiter`)**, one for the write group (AW, W, B) and one
  for the read group (AR, R). A master's AWVALID or ARVALID is its request. A
  free arbiter grants in round-robin order and registers the grant. It holds
  the grant until that group's transaction ends, which is when the write
  response, or the last read beat, is accepted. One master can therefore write
  while the other reads, but two masters never write, or read, at the same time.
- **Master controller (`axi_master_ctrl`)**: a combinational multiplexer. It
  puts the granted master's signals on the shared bus and returns READY/VALID to
  that master only.
- **Address decoders (`axi_addr_decoder`)** on AWADDR and ARADDR. Bits [31:28]
  select the slave: regions 0, 1 and 2 are the three slaves, and any other
  region is unmapped.
- **Slave controller (`axi_slave_ctrl`)**:
  - It sends AW or AR to the decoded slave and latches that slave's index. The
    W, B and R channels follow the latched index until the transaction ends.
  - It answers an unmapped address itself. For a write it takes the data and
    returns DECERR. For a read it returns LEN+1 zero beats with DECERR.

Timing without stalls:

- **Write.** Arbitration adds one cycle. AWVALID rises on the master at cycle
  `t`, and the AW handshake happens at `t+1`. The first W beat is accepted at
  `t+3`, and one beat follows per cycle. The response handshake happens on the
  cycle after the last beat.
- **Read.** The AR handshake happens at `t+1`. Beats arrive from `t+2`, one per
  cycle.
- **Release.** After a group finishes, the next master's grant comes one cycle
  later.

## The bus monitor

`axi_bus_monitor` only observes. It drives nothing on the bus. It has the
following parts:

- **Control register (`perf_ctrl_reg`)**. A write to it sets bit 0, the enable,
  which stays until the next write. Bit 1 of a write clears all counters
  through a one-cycle pulse on the next cycle. After reset the monitor is
  disabled.
- **Address decoder**, one per direction. It uses the same map as the
  interconnect and turns AWADDR or ARADDR into a bank index, so traffic to each
  slave is counted separately. Transactions to unmapped addresses are not
  counted.
- **Event unit (`perf_event_unit`)**, one per direction. It turns the
  handshakes into per-cycle increments.
- **Counter banks (`perf_counter_bank`)**: three write banks (`wr_pc[0..2]`)
  and three read banks (`rd_pc[0..2]`). In register-map terms these are PC_0 to
  PC_2 for writes and PC_4 to PC_6 for reads, one of each per slave. Each bank holds five 32-bit counters
  (`perf_cnt_t`). A bank adds an event only if the event's bank index matches
  its own, which acts as the demultiplexer. The counters wrap on overflow and
  change on the clock edge after the event.

The exact meaning of each counter is the part that is easiest to misread.

| Counter     | Adds                          | When |
|-------------|-------------------------------|------|
| `xfer_cnt`  | 1                             | on each address handshake (AxVALID and AxREADY) |
| `size_cnt`  | (AxLEN+1) * 2^AxSIZE bytes    | on the same handshake: the bytes the burst announces |
| `valid_cnt` | 1                             | on each data handshake (WVALID and WREADY, or RVALID and RREADY): beats that actually moved |
| `busy_cnt`  | 1                             | on every cycle from the address handshake to the last-beat handshake, both included |
| `lat_cnt`   | latency of the transaction    | when its last beat is accepted |

Latency is measured differently for each direction:

- **Write latency** runs from the first cycle WVALID is high to the WLAST
  handshake. It measures how long the master takes to deliver the data and
  ignores the address phase.
- **Read latency** runs from the first cycle ARVALID is high to the RLAST
  handshake. It covers the whole read, address phase included.

Both ends are counted. `lat_cnt` is a sum, so the mean latency is
`lat_cnt / xfer_cnt`.

Because the monitor watches the shared bus, a master's AxVALID becomes visible
only once that master holds the grant. Time spent waiting for arbitration is
therefore not part of the read latency. An unstalled 8-beat write shows a write
latency of 8 and a busy count of 10. An unstalled read of N beats shows a read
latency of N+1. `tb_axi_workloads` prints such values.

The event unit keeps one open transaction per direction. That is exactly what
the shared-bus interconnect produces. On a bus with several outstanding
transactions per direction, the busy and latency counts would be wrong.

## Address map and parameters

| Parameter (top)  | Default | Meaning |
|------------------|---------|---------|
| `NUM_MASTERS`    | 2       | masters, arbitrated round robin |
| `NUM_SLAVES`     | 3       | slaves, which is also the number of counter banks per direction (at most 16, limited by the 4-bit region field) |
| `MEM_BYTES`      | 128     | bytes per slave memory (power of two) |

Fixed in `axi_pkg`: 4-bit IDs, 32-bit address and data, 4-bit LEN, 32-bit
counters, and region select on address bits [31:28] (`REGION_LSB`,
`REGION_W`).

## Files

- `rtl/axi_pkg.sv`: channel structs, enums, the burst address function and the
  counter record.
- `rtl/axi_soc_top.sv`: the whole system.
- `rtl/axi_master.sv`, `rtl/axi_slave.sv`: the AXI masters and memory slaves.
- `rtl/axi_interconnect.sv`, `axi_arbiter.sv`, `axi_addr_decoder.sv`,
  `axi_master_ctrl.sv`, `axi_slave_ctrl.sv`: the interconnect.
- `rtl/axi_bus_monitor.sv`, `perf_event_unit.sv`, `perf_counter_bank.sv`,
  `perf_ctrl_reg.sv`: the monitor.
- `tb/tb_<module>.sv`: a self-checking testbench for each module.
- `tb/tb_axi_workloads.sv`: the named test scenarios, described under
  Verification.

## Simulating

With Verilator 5, from the project folder:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_axi_soc_top rtl/axi_pkg.sv tb/tb_axi_soc_top.sv
./obj_dir/Vtb_axi_soc_top
```

Replace `tb_axi_soc_top` with any other testbench name to run that one. Every
testbench ends with the line `TB_RESULT checks=N failures=M`. Each one has a
watchdog that counts a failure if the simulation hangs. Memories start with
undefined contents, and the testbenches write before they read.

## Verification

- **Per-module tests.** Each module has a testbench that compares its outputs
  with values worked out independently:
  - a byte model of the slave memory, with its own burst address arithmetic;
  - a reference round-robin model for the arbiter;
  - for the monitor, counter values derived from the cycle numbers at which the
    testbench raised VALID and saw each handshake.
- **`tb_axi_soc_top`** runs the full system at its default parameters. Both
  masters issue random bursts at the same time:
  - FIXED, INCR and WRAP bursts, narrow and unaligned beats, and random strobes;
  - reads with stalls;
  - DECERR and SLVERR cases;
  - a monitor clear, a disabled period and re-enabling.

  The testbench checks every read beat and every counter bank. It counts each
  mechanism (arbiter contention in both groups, a write overlapping another
  master's read, each burst type, narrow beats, DECERR, SLVERR, read stalls,
  clear and disable) and fails if any of them never happened. It takes about
  twenty seconds.
- **`tb_axi_workloads`** runs these scenarios:
  - a write and a read at the same address;
  - a write and a read at different addresses;
  - single and multiple writes and reads;
  - a monitor scenario with 4-byte write beats and 16-byte read beats at address
    0x0A7E0FA5. The read beats are wider than the bus and get SLVERR, but the
    monitor still counts the transfer.
- **Assertions** in the master and slave check that a raised VALID, with its
  payload, stays until READY. The arbiter asserts that its grant is one-hot.

## Where this design is limited or departs from a full AXI system

- **One transaction per group at a time.** There are no multiple outstanding
  transactions, no out-of-order completion and no ID-based reordering. The
  write group and the read group do run in parallel.
- **Two address decoders instead of one per channel.** A decoder on each of
  the five channels would be needed for several outstanding transactions. Here
  only AW and AR are decoded, and W, B and R follow the slave index latched at
  the address handshake.
- **AXI3-style fields.** LEN is 4 bits (16 beats) and LOCK is 2 bits. The
  AXI4 signals QOS, REGION and USER are absent, and 256-beat bursts are not
  supported.
- **Sequential writes.** The master sends the write address before the write
  data and never overlaps them. The slave does not accept write data before the
  address.
- **No 4 KB boundary check.** Masters do not check the 4 KB boundary rule, and
  the slave address simply wraps modulo the memory size.
- **No low-power interface.** The clock and reset signals are the only system
  signals.
- **Choices made in this design.** The following are design choices: the
  arbitration order, the address map, the numbers of masters and slaves, the
  monitor's control-register layout, the exact cycle boundaries of the busy and
  latency counts, and the accumulation of latency.
- **Monitor output.** The monitor only keeps counters. Logging transactions to
  memory and any software display of the results are outside this design. The
  counters are ports of the top.
