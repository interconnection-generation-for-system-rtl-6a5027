# Circuit-switched crossbar interconnect for a system-on-chip

A shared bus lets only one transfer happen at a time. A packet-switched
network-on-chip is too much machinery for a chip with a dozen modules. This
design sits between the two. It is a star: every master and every slave
attaches to one block of network logic. That block decodes each master's
address, arbitrates separately for each slave with a fixed priority, and then
*circuit-switches* the winning master onto the slave for the whole transfer.
Transfers to different slaves run side by side, so up to `min(NM, NS)` of them
are in flight in every cycle:

    peak throughput = min(NM, NS) * f_clk * DW

With the default 4 masters, 5 slaves and 32-bit data, that is 4 x 32 = 128 bits
per cycle. At 400 MHz this is 51.2 Gbit/s.

Everything is parameterised: the number of masters and slaves, data and address
width, maximum burst length, the address map, and a matrix that says which
master is wired to which slave. The same RTL therefore covers the whole family
of networks, from 1 master x 20 slaves to 20 masters x 1 slave.

## The transfer protocol

Each master and each slave has one request/response bundle. A master drives:

| signal | width | meaning |
|---|---|---|
| `mode` | 1 | 1 = write, 0 = read |
| `burst` | 4 | number of words minus one (1 to 16 words) |
| `byte_sel` | DW/8 | byte enables |
| `addr_strobe` | 1 | request; held until `addr_ack` |
| `addr` | AW | start byte address; the words of a burst follow at consecutive word addresses |
| `data_strobe` | 1 | a write word is on `wdata` |
| `wdata` | DW | write data |

The network returns `addr_ack` (a one-cycle pulse), `rdata`, `rw_ack`
(1 = success) and `rw_ack_strobe`, which qualifies `rw_ack` and `rdata`.
A slave sees the same request signals, except that `addr_strobe` is a
one-cycle pulse. It answers with `rdata`, `rw_ack` and `rw_ack_strobe`. A slave
has no address acknowledge of its own: the network acknowledges the master as
soon as it has connected it.

**Write burst of 3 words**, no contention (cycle numbers relative to the
request):

| cycle | master | network | slave |
|---|---|---|---|
| 0 | `addr_strobe`=1, addr, mode=W, burst=2 | arbitrates, registers winner | |
| 1 | still holds `addr_strobe` | `addr_ack`=1 | `addr_strobe`=1 with addr/mode/burst |
| 2 | `data_strobe`, word 0 | passes through | takes word 0 |
| 3 | word 1 | | takes word 1 |
| 4 | word 2 | | takes word 2 |
| 5+ | sees `rw_ack_strobe`, `rw_ack` | passes through, releases | one `rw_ack_strobe` |

Data words may come with gaps. The slave must take every word that arrives
with a strobe, because there is no back-pressure signal. The single write
acknowledge says whether all words were received.

**Read burst of N words:** the address phase is the same. The slave then
returns N words, each with an `rw_ack_strobe`, and it may leave gaps between
them. The master must take every strobed word.

**Release.** The slave port counts acknowledge strobes: one for a write,
`burst+1` for a read. After the last one the slave stays idle for one cycle.
It can grant the next master at the end of that idle cycle, and that master's
`addr_ack` comes in the cycle after.

**Latency.** An uncontended address phase takes one cycle: `addr_ack` comes in
the cycle after `addr_strobe` is first seen. Write data, read data and
acknowledges cross the network with no register, only through multiplexers
whose select is a registered owner. A master that loses arbitration holds its
strobe until its slave is free and it has the highest priority among those
still waiting.

## Arbitration and connections

Arbitration happens on the slave side (`xbar_slave_port`, one per slave). Each
slave port arbitrates independently of the others:

* It collects the requests of all masters whose address decodes to it.
* While it is free, a fixed-priority arbiter (`xbar_fixed_prio_arbiter`) picks
  the lowest-numbered requester. The master number is its priority.
* The winner is stored in a one-hot owner register. From then on, that
  master's data strobe, write data and byte select are multiplexed onto the
  slave. The slave's acknowledge strobes are counted until the transfer ends.

Fixed priority can starve a low-priority master. With 20 masters and one
slave, the masters are served strictly in index order whenever they all ask
at once.

On the master side (`xbar_master_port`, one per master), the address goes
through `xbar_addr_decoder`, and `addr_strobe` becomes a request to exactly
one target. A master holds at most one connection, so its request is blocked
while it is connected. Responses are selected by the connection bits that the
slave ports send back. Adding a slave only widens these multiplexers. Adding a
master only widens the slave ports' multiplexers.

## Address map, connection matrix and error responder

The address space is cut into regions of `2**REGION_BITS` bytes (64 KiB by
default). Region `s` belongs to slave `s`. `CONNECT[m][s]` says whether master
`m` is wired to slave `s`; by default every master reaches every slave.

An address can fall outside every slave region, or in a region whose slave
this master is not wired to. Such an address goes to an internal error
responder, target index `NS`. It is arbitrated like any slave:

* A read gets `burst+1` strobes, each with `rw_ack`=0 and zero data.
* A write takes its words and then returns one strobe with `rw_ack`=0.

Its data and acknowledge outputs are constant by design; only the strobe
carries information.

## Parameters (`xbar_network`)

| parameter | default | |
|---|---|---|
| `NM` | 4 | masters |
| `NS` | 5 | slaves |
| `DW` | 32 | data width |
| `AW` | 32 | address width |
| `MAX_BURST` | 16 | longest burst in words; `burst` is `$clog2(MAX_BURST)` bits wide |
| `REGION_BITS` | 16 | log2 of the region size per slave |
| `CONNECT` | all ones | `[NM-1:0][NS-1:0]` wiring matrix |

The top's ports are packed arrays indexed by master (`m_*`, `[NM-1:0]`) or by
slave (`s_*`, `[NS-1:0]`).

## Files

| file | contents |
|---|---|
| `rtl/xbar_pkg.sv` | mode enum, acknowledge constants, index-width function |
| `rtl/xbar_network.sv` | top: master ports, slave ports, error responder |
| `rtl/xbar_master_port.sv` | per master: decoder, request gating, response multiplexer |
| `rtl/xbar_addr_decoder.sv` | address to one-hot target |
| `rtl/xbar_slave_port.sv` | per slave: arbiter, owner register, request multiplexer, release counter |
| `rtl/xbar_fixed_prio_arbiter.sv` | lowest-index-wins arbiter |
| `rtl/xbar_err_slave.sv` | responder for unmapped or unwired addresses |
| `tb/xbar_master_model.sv` | behavioural master that checks its own reads against a shadow of its writes |
| `tb/xbar_mem_slave_model.sv` | behavioural memory slave with random wait cycles |
| `tb/xbar_traffic_harness.sv` | network plus models plus traffic, for any size |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/xbar_pkg.sv \
        tb/tb_xbar_network.sv --top-module tb_xbar_network
    ./obj_dir/Vtb_xbar_network

Replace `tb_xbar_network` with any other `tb_*` name.

* `tb_xbar_network` runs the default-size network (4x5) end to end:
  * single transfers with a one-cycle address acknowledge;
  * four masters asking one slave at once, granted in priority order;
  * four 16-word bursts to four slaves, measured at 4 words per cycle;
  * refused addresses;
  * byte-select writes;
  * 240 random transfers.

  It counts each of these mechanisms and fails if one never happened.
* `tb_xbar_workloads` builds the network at 4x5, 10x10, 12x12, 1x20 and 20x1
  and runs a parallel-burst phase and random traffic on each. The
  parallel-burst phase must reach `min(NM, NS)` simultaneous transfers.
* `tb_xbar_slave_port`, `tb_xbar_master_port`, `tb_xbar_addr_decoder`,
  `tb_xbar_fixed_prio_arbiter` and `tb_xbar_err_slave` test each block against
  a reference model or against directed expectations.

Each master in the system tests uses its own slice of every slave's memory.
Its read checks therefore depend only on what it wrote itself. Slave ports
carry assertions, enabled with `--assert`: the owner is one-hot, a slave
acknowledges only while it is connected, and a read never produces a data
strobe.

## What follows the source and what is this design's own

**Follows the paper it is based on:**

* the star topology with one arbitration-and-multiplexing block;
* circuit switching;
* the master signal set: address ack, read data, read/write ack and its
  strobe, mode, burst length, byte select, address strobe, address, data
  strobe and write data;
* the same bundle on the slave side;
* the network, not the slave, acknowledging the address;
* burst transfers, ended by a slave acknowledge that reports success;
* fixed priority by module ID;
* independent per-slave arbitration;
* a configurable master-to-slave connection pattern;
* the 4-master, 5-slave, 32-bit example configuration.

**This design's own choices**, where the source names a signal or a
parameter but not its details:

* address width, maximum burst length and the `burst` = words-1 encoding;
* the 1 = write and 1 = success encodings;
* lower index = higher priority;
* the region-based address map;
* reads answered with one acknowledge strobe per word;
* the one-cycle grant latency and the idle cycle after release;
* live byte select during data beats;
* the asynchronous active-low reset;
* the error responder for unmapped or unwired addresses.

**Not covered:**

* The source reports cycle time (about 1.5 ns at 10x10) and area (kNAND
  gates) for a 130 nm library. This RTL is not tuned for or checked against
  those numbers.
* The masters and slaves themselves are not part of the network. Only
  behavioural stand-ins exist, in `tb/`.
* Adapters that would translate other module interfaces onto this bundle are
  not provided, because their behaviour is not defined.
* No back-pressure exists on data beats. A slave that cannot take a word every
  cycle would need an adapter of its own.
