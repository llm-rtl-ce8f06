# LLM: a low-latency DRAM subsystem with a wavelength-routed data plane

Irregular workloads (graph traversal, pointer chasing, random updates) spend
most of their memory time not in the DRAM array but waiting: for the shared
data bus inside a channel, for other requests in deep controller queues, and
for their turn on a bus that serialises many banks. This design removes those
queues. Every DRAM micro-bank (μbank) gets its own optical wavelength.
Every requestor reaches every μbank of every channel over a passive
Arrayed Waveguide Grating Router (AWGR). The only contention left is two
requests to the same μbank, and that is settled once, electrically, before any
data moves.

The design has two planes:

* **Control plane (electrical, low bandwidth).** A requestor sends a
  command to the memory controller of the target channel. The controller
  arbitrates and replies with a *notification*: the number of cycles until the
  data window opens. It then puts the command on the channel's command bus.
* **Data plane (optical, high bandwidth).** When the notification arrives, the
  requestor tunes one microring to the μbank's wavelength. For a write it then
  modulates the line onto that wavelength. For a read it filters the line off
  the read waveguide. Nothing on the data path is arbitrated or queued.

All of it is parameterised SystemVerilog. It simulates with plain Verilator.

## Blocks

| File | Role |
|---|---|
| `llm_top` | Requestors, control network, one controller and one channel per memory channel, write and read AWGRs |
| `llm_requestor` | Request slots, command issue, ring choice and tuning, SerDes of the line onto a lane |
| `llm_ctrl_net` | All-to-all electrical control network with a fixed latency in both directions |
| `llm_mem_ctrl` | Per-channel controller: single-entry queue per requestor, round-robin arbiter, μbank occupancy, tFAW limit, notification, guard delay |
| `llm_cmd_queue`, `llm_rr_arbiter`, `llm_faw_limiter`, `llm_delay_line` | Controller parts |
| `llm_channel` | μbanks on one shared command/address bus, each on its own wavelength |
| `llm_ubank` | Closed-page sequencer, two sub-μbanks behind a multiplexer, SerDes |
| `llm_sub_ubank` | Cell array, row decode, row buffer, column select, restore |
| `llm_serdes` | 512-bit line ↔ 16-bit lane shift register |
| `llm_awgr` | Behavioural model of the passive router (a fixed permutation) |
| `llm_wg_combiner` | Behavioural model of the write waveguides: the light from all rings on one waveguide |
| `llm_pkg` | Shared defaults, the command enum and the ring-index function |

## Wavelengths, rings and ports

This is the part that takes the most care to follow.

An N×N AWGR sends wavelength *w* entering input port *i* to output port
(*i* + *w*) mod N. This design uses that cyclic rule. Each requestor has an
array of N microrings, one on each waveguide into an input port of the write
AWGR. Channel *c* sits on output port *c*, and μbank *b* of that channel
owns wavelength λ*b*. To write to (*c*, *b*), the requestor lights the ring on
waveguide *k* = (*c* − *b*) mod N and tunes it to λ*b*. The light leaves the
AWGR at port *c* on λ*b*, and the channel's filter for λ*b* delivers it to
μbank *b*.

The read AWGR is entered from the memory side. The μbank modulates λ*b* onto
port *c*, and the reverse routing, (*o* − *w*) mod N, brings it to waveguide
*k* at every requestor. Each requestor therefore uses the same ring index for
a read as for a write. Only the requestor that was notified listens in that
window. With 64 wavelengths and a 64-port AWGR, one channel holds 64 μbanks.
Ports from `NUM_CH` up to N − 1 stay dark.

Two consequences are built into the requestor:

* One ring holds one wavelength at a time. Two requests that need the same
  ring in the same direction, such as (c=0, b=0) and (c=1, b=1), cannot
  overlap. The second waits; `stat_ring_block` shows this.
* Requests to different μbanks, or to different channels on different rings,
  run fully in parallel.

`llm_wg_combiner` checks with an assertion that two rings never put the same
wavelength on the same waveguide at once. The controllers make this true,
because a μbank serves one access at a time.

## Timing and the notification

One clock cycle is 0.5 ns (the 2 GHz command clock). Default timings, in
cycles:

| Name | Cycles | ns | Source |
|---|---|---|---|
| `T_NET` control network, each way | 40 | 20 | from the source design |
| `T_GUARD` delay from grant to activate | 20 | 10 | from the source design |
| `T_CAS` | 10 | 5 | from the source design |
| `T_BURST` 64 B at 32 Gb/s | 32 | 16 | from the source design |
| `T_FAW` window / `FAW_ACTS` | 24 / 32 | 12 | from the source design |
| `T_RCD`, `T_RP` | 28 each | 14 | this design's choice |
| `T_TUNE` ring tuning | 4 | 2 | this design's choice |

For a request accepted in cycle 0:

1. It is registered and enters the control network (cycle 1). It reaches the
   controller queue T_NET cycles later.
2. The arbiter grants it in cycle *g* if the μbank is free and the tFAW window
   allows another activation. In that same cycle the notification leaves with
   `ack_dly = T_GUARD + T_RCD + T_CAS + 1 − T_NET`.
3. The command reaches the channel bus at *g* + T_GUARD. The μbank activates
   for T_RCD cycles and accesses the column for T_CAS cycles. It then moves the
   line for T_BURST cycles and precharges for T_RP cycles.
4. The notification reaches the requestor at *g* + T_NET. The requestor tunes
   its ring (T_TUNE ≤ ack_dly) and drives or samples the lane in exactly the
   burst window.

With no contention the latency from acceptance to response is
`3 + T_NET + T_GUARD + T_RCD + T_CAS + T_BURST` = 133 cycles (66.5 ns). A μbank
stays busy for `1 + T_RCD + T_CAS + T_BURST + T_RP` = 99 cycles. A second
access to the same μbank therefore completes 99 cycles after the first.

Optical time of flight, E-O/O-E conversion and SerDes pipeline delay are
constant and not modelled. Both ends agree on the same cycles, so adding them
would only shift the window. The guard time is there so that the notification
can cross the control network before the data does.

## The μbank

A μbank is two sub-μbanks. Each sub-μbank holds 4 mats of 512×512 cells, so
its row is 2048 bits, or four 64-byte columns. The closed-page policy opens one
row per access and closes it right after. The controller therefore sends a
single combined command (activate, column, auto-precharge), and the μbank
sequences it internally:

* **RCD:** the row is read into the row buffer. For a read, the addressed
  column is loaded into the SerDes.
* **CAS**, then **BURST:** a read shifts 16 bits per cycle onto its
  wavelength. A write collects 16 bits per cycle from its filter ring and
  merges the line into the row buffer in the last burst cycle.
* **PRE:** the row buffer is written back to the cells.

Only the selected sub-μbank is activated. A line address is laid out, from
the most significant bits down, as {row, sub-μbank, column, μbank, channel}. At
the defaults this is 10 + 1 + 2 + 6 + 3 = 22 bits. The row field is {subarray,
row within the mat}, and `SUBARRAYS` = 2 by default.

## Memory controller

Each requestor has a single-entry queue. It holds only the command, because
the data stays at the requestor. Every cycle a round-robin arbiter picks one
queue whose μbank is free and for which the tFAW limiter allows an activation.
There are three event outputs:

* `stat_conflict`: a command waits for its μbank.
* `stat_faw`: a command waits only for tFAW.
* `stat_contend`: more than one command was ready.

At the defaults the bus can issue at most 24 activations in a tFAW window, so
the limit of 32 never engages. It is still built, and the reduced test lowers
it so that it does.

## Parameters

`llm_top` defaults: `NUM_REQ`=16, `NUM_CH`=8, `NUM_UBANK`=64 (= AWGR ports =
wavelengths), `NUM_SLOTS`=8 outstanding requests per requestor,
`LINE_BITS`=512, `LANE_BITS`=16, `SUBARRAYS`=2, `MAT_DIM`=512,
`MATS_PER_SUB`=4, `TAG_W`=8, and the timings above. Peak bandwidth at the
defaults is 8 channels × 64 μbanks × 32 Gb/s × 2 waveguides ≈ 4.1 TB/s. The
simulated array is 8 × 64 × 512 KB = 256 MB. Set `SUBARRAYS` higher for a
realistic capacity, at the cost of simulation memory.

Each requestor is the interface of one core's last-level-cache miss path: a
valid/ready request and an un-throttled response.

## Where this design departs from, or fills in, the source

* The AWGR routing rule, the ring index (c − b) mod N, and entering the read
  AWGR from the memory side are this design's choices. The source only says
  that each wavelength of an input port reaches a distinct output port.
* The source gives the lane rate as 32 Gb/s in one place, and describes
  16 Gb/s SerDes elsewhere. This design uses 32 Gb/s, which matches the 16 ns
  burst.
* tRCD, tRP, the tuning time, slot count, tag width, address layout, reset and
  handshakes are not given by the source and were chosen here.
* Subarray-level parallelism inside a μbank (the extra latches) is not built:
  the μbank is the unit of conflict.
* Lasers, microring devices, vertical optical vias, packaging, sense
  amplifiers and the cores are not logic. They are represented only by their
  digital behaviour.
* Refresh is not modelled.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --top-module tb_llm_top -o sim \
        rtl/llm_pkg.sv $(ls rtl/*.sv | grep -v llm_pkg) tb/tb_llm_top.sv
    ./obj_dir/sim

The package goes first so that every module can import it.

* `tb_llm_top` runs the whole system at a reduced size (4 requestors, 4
  channels, 8 μbanks, short timings). It checks the isolated latency formula,
  then runs random traffic against a reference memory. It counts every
  mechanism (bank conflicts, tFAW stalls, arbitration contention, ring
  conflicts, parallel μbanks and channels) and fails if one never occurs.
* `tb_llm_workloads` runs the three synthetic access patterns at the same
  reduced size, with the default timings. Stream has each generator walk its
  own run of consecutive lines. Random issues independent reads and writes.
  GUPS does read-modify-write updates. It checks every response against a
  reference memory and prints the average latency and run time of each
  pattern. Under this load the average is 141 to 142 cycles, against the
  133-cycle uncontended minimum.
* `tb_llm_top_full` uses every default (16 requestors, 8 channels, 64×64
  AWGRs). It writes and reads back one line per requestor, checks the
  133-cycle latency, and checks that a bank-conflicting pair of reads takes
  133 + 99 cycles. It builds in a few minutes and needs about 300 MB.

Assertions check the handshakes: no enqueue into a full queue, no command to a
busy μbank, no activation beyond tFAW, no wavelength collision, ring tuned
before the data window, and notifications that match the pending command.
