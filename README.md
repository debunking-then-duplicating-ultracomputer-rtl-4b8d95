# Combining network with adaptive combining queues

When many processors poll or update one shared variable, all their requests
head for the same memory module. That module serves one request at a time, so
the switch queues in front of it fill. The congestion then spreads backwards
through the network and slows traffic to every other module as well.

A *combining* network avoids this serialisation. Inside a switch, two
fetch-and-add requests to the same word are merged into one request that
carries the sum of their addends. The switch records how to split the answer.
When the memory's reply comes back through that switch, the switch makes two
replies from it. If this happens at every stage, N processors polling one word
put about one request on the memory instead of N.

This RTL is a complete such system: processor ports, a shuffle-exchange
network of 2x2 combining switches, and memory modules with fetch-and-add
adders. The switches are the *improved* design, which makes busy-wait polling
work well. The original design has two flaws that hurt polling, and the
improved switch changes the original in two ways:

* **Large wait buffers.** Each switch output keeps up to 100 decombining
  records instead of 8.
* **Adaptive combining queues.** A 4-slot forward queue declares itself full
  as soon as it holds 2 combined requests. This is true even when slots are
  free.

The second change sounds backwards, but it works. A queue can merge only
pairs, so many requests collapse into one only if combining happens in many
stages. With large queues, polling traffic piles up in the few stages nearest
the memory, and the stages nearer the processors stay empty. Those empty
stages never combine. Declaring the queues full early pushes the backlog (the
back-pressure) outwards into more stages. More stages then combine, and the
polling latency falls. Uniform traffic rarely combines, so it never reaches
the limit and keeps the full queue capacity.

## Fetch-and-add combining, worked through

`FAA(X, e)` returns the old value of word X and adds e to it. A load is
`FAA(X, 0)`.

Say `FAA(X, e)` is already queued in a switch, and `FAA(X, f)` arrives on the
same input:

1. The queued entry becomes `FAA(X, e+f)`. The arriving request is not
   queued.
2. The wait buffer of that output stores the record
   `{key = id of the queued request, second = id of the arriving one, e}`.
3. The memory adds e+f to X and replies with the old value X, tagged with the
   key.
4. The reply passes the wait buffer, which finds the record by the key.
   * The reply goes on unchanged: the queued request gets X.
   * In the next cycle a second reply goes out: the arriving request gets X+e.

Each requester sees the same result as if `FAA(X, e)` had run just before
`FAA(X, f)`. A merged request can be merged again in a later stage, so four
requests can become one in two stages. The replies then split in the reverse
order.

Example: four processors add 1, 2, 4 and 8 to a word that starts at 0.

* Stage 0 merges 1 and 2 into `FAA(X,3)`, keeping 1. It merges 4 and 8 into
  `FAA(X,12)`, keeping 4.
* Stage 1 merges the two results, keeping 12.
* The memory sees only `FAA(X,15)`, returns 0, and ends at 15.
* On the way back the processors get 12, 13, 0 and 4.

## The switch

```
 PE side                                      MM side
 in 0  ──┬──────────────► fcq 0 ──(pace)──► out 0 ──► toward MM
 in 1  ──┼──────────────► fcq 1 ──(pace)──► out 1
         │   records│          records│
         │          ▼                 ▼
         │       wait_buffer 0   wait_buffer 1
 out 0 ◄─(pace)── rq 0 ◄──┬───── wb 0 ◄── in 0 ◄── from MM
 out 1 ◄─(pace)── rq 1 ◄──┴───── wb 1 ◄── in 1
```

**Forward path.** A request goes to output *k*, where *k* is bit `STAGE` of
its address. Each output has a dual-input combining queue (`fcq`). This queue
is "type B": it is built from two independent single-input queues
(`fcq_single`), one per switch input, whose heads share the output through a
round-robin multiplexer. This lets both inputs deliver in the same cycle, at a
cost: a request can only combine with requests that came through the same
input.

The queues are *decoupled*: the head entry is never a combining target. This
keeps the adder out of the cycle that drives the output. A side effect is that
a single-input queue needs at least three requests before it can combine.

**Reverse path.** A response arriving on MM-side input *k* passes wait buffer
*k*. It then goes to the PE-side output given by bit `STAGE` of its PE number,
through that output's reverse queue (`rq`, again two FIFOs and a
multiplexer). Both requests of a combine came in on the same input, so both
replies go to the same reverse queue.

**Combining rules in detail:**

* Only fetch-and-adds combine. Stores are never combined.
* An arriving fetch-and-add merges into the *oldest* queued entry that meets
  all of these conditions:
  * it is not the head;
  * it has not already been combined;
  * it is to the same address.
* An entry that is the result of a combine is not combined again in the same
  queue, so a switch merges pairs only.
* No combining happens while the wait buffer is full. The request is then
  queued normally.
* Each wait buffer takes at most one record per cycle. If both single-input
  queues want to combine in the same cycle, one of them is granted (the two
  take turns) and the other request is simply queued.
* Requests are never held back just to wait for a combining chance.

**Adaptive limit.** Each single-input queue reports *not ready* when it holds
`FCQ_SLOTS` entries, or when it holds `COMB_LIMIT` combined entries. The
`ev_adapt_block` output and the network's `stage_adapt_full` counters count
the cycles in which a request was refused only because of the second rule.

## The network

There are `LOG2_N` stages of `N/2` switches, and lines are numbered 0..N-1.

* PE *i* drives line *i* of stage 0.
* Switch *j* owns lines 2j and 2j+1.
* Output line L of a stage feeds line `rotr(L)` of the next stage, where
  `rotr` rotates the LOG2_N-bit line number right by one bit.
* After the last stage, line `rotr(L)` is memory module `rotr(L)`.

With this wiring, stage *s* routes requests on address bit *s* and responses
on PE-number bit *s*. For example, in an eight-PE system PE1 reaches MM3
through switch 0 of stage 0, switch 2 of stage 1 and switch 3 of stage 2.

The low `LOG2_N` address bits select the memory module. The next bits select
a word inside it, so consecutive addresses are spread over the modules.

## Timing

All timing is in network clock cycles.

* **Switch hop:** a message that meets an empty queue and an idle link
  leaves the switch in the cycle after it arrived.
* **Link pacing:** every link carries at most one message every
  `LINK_CYCLES` (2) cycles. This covers the processor inputs, switch outputs
  and reverse outputs.
* **Memory module:** accepts at most one request every `MM_INTERVAL` (4)
  cycles. It offers the reply `MM_LATENCY` (2) cycles after accepting the
  request, and holds it until it is taken.
* **Unloaded round trip:** from the cycle a processor's request is accepted
  to the cycle its response is valid takes `2*LOG2_N + MM_LATENCY` cycles,
  i.e. one cycle per stage in each direction plus the memory.
* **Decombining:** this adds one cycle per split, because the second reply
  follows the first.

The modern-memory setting in the parameter table (accept every 40 cycles,
38 cycles latency) is a parameter change only.

## Interfaces

Every link is a valid/ready pair with a packed struct from `ucomb_pkg`:

| type | fields (MSB first) | bits |
|---|---|---|
| `req_t` | `op` (0 fetch-and-add, 1 store), `addr` 24, `data` 32, `id` | 72 |
| `rsp_t` | `data` 32, `id` | 47 |
| `msg_id_t` | `pe` 11, `tag` 4 | 15 |
| `wb_entry_t` | `key` id, `second` id, `addend` 32 | 62 |

Responses return to the PE named in `id.pe`. **A processor must not reuse a
tag while a request with that tag is outstanding.** The `{pe, tag}` pair is
what the wait buffers search for.

The top, `ucomb_system`, has these ports:

* PE ports, as arrays indexed by PE number: `pe_req_*` and `pe_rsp_*`.
* Per-stage counters, where stage 0 is next to the processors:
  * `stage_combines`
  * `stage_decombines`
  * `stage_adapt_full`
* Per-module request counters: `mm_requests`.

The counters make the per-stage combining rate directly observable. The
processors themselves are not part of the RTL.

Reset is synchronous and active low (`rst_n`). It empties all queues and
buffers and clears the memories.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LOG2_N` | 10 | stages; the system has 2^LOG2_N PEs and memory modules |
| `FCQ_SLOTS` | 4 | slots per single-input combining queue |
| `COMB_LIMIT` | 2 | combined entries at which a queue declares itself full |
| `COUPLED` | 0 | 1 lets the head entry combine (the adder then drives the output in the same cycle) |
| `WB_DEPTH` | 100 | wait-buffer records per switch output |
| `RQ_DEPTH` | 4 | entries per reverse FIFO |
| `LINK_CYCLES` | 2 | cycles per message on a link |
| `MM_WORDS` | 256 | words per memory module |
| `MM_INTERVAL` | 4 | cycles between accepted memory requests |
| `MM_LATENCY` | 2 | cycles from acceptance to reply |

Named configurations:

* **Original switch:** `COMB_LIMIT=4 WB_DEPTH=8`.
* **Original queues with large wait buffers:** `COMB_LIMIT=4`.
* **Slow memory:** `MM_INTERVAL=40 MM_LATENCY=38`.

The default of 1024 PEs is below the largest system of interest, 2048 PEs,
because of elaboration memory. Verilator's lint pass grows about 2.2x per
doubling of the system and would need about 34 GB at 2048 PEs. The RTL
itself works for `LOG2_N` = 1 to 11.

`ucomb_network` on its own defaults to the eight-PE, three-stage network; the
system top passes its own size down.

## Files

| file | contents |
|---|---|
| `rtl/ucomb_pkg.sv` | message types and field widths |
| `rtl/fcq_single.sv` | single-input combining queue with the adaptive limit |
| `rtl/fcq.sv` | dual-input (type B) forward queue, wait-buffer write arbitration |
| `rtl/wait_buffer.sv` | decombining records, associative search, X+e adder |
| `rtl/sync_fifo.sv` | FIFO used by the reverse queue |
| `rtl/rq.sv` | dual-input reverse queue |
| `rtl/comb_switch.sv` | 2x2 combining switch |
| `rtl/ucomb_network.sv` | shuffle-exchange network and per-stage counters |
| `rtl/mm.sv` | memory module with fetch-and-add |
| `rtl/ucomb_system.sv` | top: network plus memory modules |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
cycle-count watchdog ends a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ucomb_pkg.sv tb/tb_ucomb_system.sv \
          --top-module tb_ucomb_system -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run the others. Verilator finds the modules
through `-Irtl`.

What the testbenches check:

* `tb_ucomb_system` runs the system with 8 PEs and all other parameters at
  their defaults. It runs, in order:
  * an unloaded round trip, whose cycle count is checked;
  * hot-spot polling with one and then four outstanding requests per PE;
  * uniform traffic with random response back-pressure;
  * stores read back by loads.

  The main correctness check needs no model of the network. For every word,
  the old values returned to all fetch-and-adds must chain into one serial
  order: start at 0 and repeatedly find the response equal to the running
  sum. It also checks that combining, decombining, combining in more than one
  stage, adaptive refusals and input back-pressure all occurred, and that
  fewer requests reached the hot module than were issued.
* `tb_ucomb_network` uses 16 PEs and memory models. It sends every PE to
  every module and checks where each request and response arrives, the
  unloaded latency, and the serial-order check under a hot spot.
* `tb_comb_switch` tests one switch with 4-record wait buffers, so that they
  fill. It checks routing by address and PE bits, link pacing, the serial
  order, and that no more combined requests are ever waiting than the wait
  buffer can hold.
* `tb_fcq_single`, `tb_fcq`, `tb_wait_buffer`, `tb_rq` and `tb_mm` are
  directed and random tests of the parts. They check the combining rules
  listed above, the 100-record capacity, FIFO order, and the 4-cycle accept
  interval and 2-cycle latency of the memory.

The largest system simulated as a whole is 16 PEs (network) and 8 PEs
(network plus memories).
The 1024-PE default elaborates cleanly in slang. Its Verilator lint needs
about 16 GB and did not finish on a 16 GB machine. Its gate-level synthesis
did not finish within 10 minutes. The default has not been simulated.

## Where this RTL makes its own choices

These points are not fixed by the design it follows. Change them with that in
mind.

* **Matching by parallel compare.** Combining uses a parallel address compare
  against every queue slot. The original switches are said to find combining
  partners without associative search, but that mechanism is not described.
  The behaviour is the same: any queued, non-head entry can be the partner.
* **Which request gets X.** The queued request gets X and the arriving one
  gets X+e.
* **Stores never combine.** Loads are fetch-and-adds of 0 and do combine.
* **Decombined replies are serial.** The two replies of a decombine leave in
  consecutive cycles, and the wait buffer's input waits meanwhile.
* **Sizes and field widths.** The following were all chosen here:
  * one wait-buffer write per cycle per output;
  * the per-single-queue application of the adaptive limit;
  * round-robin output multiplexers;
  * reverse-queue depth;
  * memory size;
  * field widths and tag count.
* **Message transfer.** A message moves as one parallel word per link
  transfer. Packet framing over narrower links is not modelled.
* **Not built: type A queue.** The "aggressive" switch's type A dual-input
  queue, which combines across both inputs, is not built. `COUPLED=1` only
  removes the head restriction within each single-input queue.
* **Not built: processors.** The processors, and the barrier and
  readers-writers software run on them, are outside this RTL.
