# Streaming Caches: stream communication for a RISC-V core

A core that consumes data produced elsewhere, whether in DRAM or on another core in a different
coherence island, usually goes through its data cache. Each cache miss then costs a full memory
round trip. Writes leave through cache-line evictions, and both sides need coherence or polling
to agree on what is valid. This design adds a separate path for such data: **streams**.

A stream is a sequence of 32-bit words that the core reads (or writes) strictly once. The words
are reached with ordinary loads and stores to a dedicated virtual-address region. No new
instructions are needed. Next to the core's L1 data cache sit two small caches:

* The **Incoming Stream Cache** serves loads. It prefetches the stream from a memory or from a
  remote node ahead of the core. A word is invalidated as soon as it has been read
  (*read-invalidate*).
* The **Outgoing Stream Cache** takes stores. It combines neighbouring words into 64-Byte
  packets and sends each packet as soon as it is complete (*write-through-combine*).
  Packets go either as AXI write bursts to a memory, or as AXI read responses to a remote
  Incoming Stream Cache that asked for them.

If the data are already there, a stream load or store costs what an L1 hit costs: two cycles
alone, one cycle back to back. The core never waits for a miss that prefetching could hide, and
never stalls on write-backs. An Outgoing Stream Cache paired with a remote Incoming Stream Cache
forms a producer/consumer channel between two nodes. The consumer pulls the data and the producer
answers once the data exist. This gives flow control in both directions without polling or
coherence traffic.

The RTL is SystemVerilog in `rtl/`. It covers the two caches, their channel logic, their network
adapters, and the load unit, store unit and store buffer that steer accesses between the stream
caches and the normal data cache. The core pipeline, its L1 data cache, its MMU and the
interconnect are not included. Their connections are ports of the top module
`streaming_cache_top`.

---

## 1. Addressing a stream

| Field | Meaning |
|---|---|
| `VA[63:40] == 0x000001` | The address is in the stream region (1 TByte). Such loads and stores skip the MMU and the data cache. |
| `VA[63:32]` | **Stream tag**. Each stream owns a 4 GByte slice of the region. |
| `VA[31:0]` | Byte offset inside the stream. It wraps inside its 4 GByte slice, so streams can be unbounded. |
| `VA[3:2]` | Word within a 16-Byte line. |

The position of the region is set in `stream_pkg` (`STREAM_REGION_BASE`, `STREAM_REGION_BITS`).
Every addition on a stream address or a remote address changes only the low 32 bits. The
function `stream_pkg::wrap_add` does this. As a result, an address never leaves its stream's
slice.

A channel is opened with one configuration write (`chan_cfg_t`), which sets:

* `base_va`: the first stream address, which also fixes the tag. It must be 64-Byte aligned.
* `remote_base`: the address on the network side that matches `base_va`. It must be 64-Byte
  aligned.
* `mode` (outgoing channels only): `MODE_MEM` writes to a memory. `MODE_ISC` answers a remote
  Incoming Stream Cache.
* `enable`.

A configuration write clears all state of the channel. An incoming channel starts prefetching
in the next cycle.

## 2. The sliding window

Each channel owns a circular buffer of **256 lines × 128 bits (4 KByte)**. At any time the buffer
holds a *window* of 256 consecutive lines of the stream. The window starts at the pointer
`localBase`, the oldest line still in use. Lines behind the window are finished: read, or sent.
Lines ahead of it are not yet in the buffer. The buffer slot of stream line *p* is `p mod 256`.

The network moves data in **packets of four lines (64 Bytes)**, one AXI burst of four 128-bit
beats. Every AXI ID is `{channel number (2 bits), buffer line index (8 bits)}`, so a response
finds its channel and its slot without any lookup table.

### Incoming channel (`in_stream_channel`)

State per slot:

| Bits | Granularity | Meaning |
|---|---|---|
| `notread[line][word]` | word | The word has arrived and not been read yet. |
| `fetched[line]` | line | The line holds stream data. It stays set after every word has been read, until the line is recycled. |
| `outstanding[pkt]` | packet | A read burst for this packet is in flight. |
| `ocnt[pkt]` (2 bits) | packet | How many beats of that burst have arrived. |

A slot is thus *Free*, *Allocated* (outstanding), *Fetched* (data not read), or *Read* (waiting
for recycling). Three pointers move independently in every cycle:

* **Prefetcher** (`next_req` and `remote_next`). While the next packet lies inside the window
  and its slot is free, the prefetcher issues an AR burst of four lines. The burst uses address
  `remote_next` and ID `{ch, index}`. Both pointers then advance by 64 Bytes. Several bursts can
  be in flight at once, up to the whole window of 64 packets.
* **Responses**. An R beat whose ID names this channel is written to line
  `{ID[7:2], ocnt}`. The first beat of a burst goes to the first line of its packet, and later
  beats follow. The line's words become *not read*. The last beat clears `outstanding`. The
  arriving line is also kept in a register for one cycle, so a load that is waiting for it is
  answered from that register and does not wait for a RAM read.
* **Recycling** (`localBase`). When the oldest line is fetched and all four of its words have
  been read, it is freed and `localBase` moves on by one line per cycle. This is where
  *read-invalidate* happens: a word can be read only once, and reading it is what frees buffer
  space for the prefetcher.

Core side: a two-state controller (`S_IDLE`, `S_ACTIVE`) handles one load at a time.

1. A load whose tag matches is **granted in the cycle it is presented**.
2. The data come back as soon as the word is fetched and not yet read, and the channel is at
   the head of the order queue (section 3). That is at the earliest one cycle after the grant.
3. The channel can grant the next load in the cycle it answers the previous one. Stream loads
   therefore run at one per cycle.
4. A load **ahead of the window** simply waits: the core stalls until the data arrive.
5. A load **behind the window, or to a word already read**, ends with `word_error` instead of
   data.

### Outgoing channel (`out_stream_channel`)

State per slot:

| Bits | Granularity | Meaning |
|---|---|---|
| `written[line][word]` | word | The core has stored the word. |
| `sent[line]` | line | The line has left and was acknowledged. It can be recycled. |
| `outstanding[pkt]` | packet | **Memory mode**: the write burst is in flight. **ISC mode**: the remote side has requested the packet. |

A store whose tag matches, and whose word is inside the window and not yet written, is granted in
the same cycle. The word is then written and marked. A store **ahead of the window** waits. A store
**behind the window, or to a word already written**, gives `word_error`.

One cycle after a store, the channel checks whether the store completed its packet (all
16 words written). Packets that are ready go into a **ready queue** of packet indices. The head of
that queue is sent as one burst. What "ready" means depends on the mode:

* **`MODE_MEM`** (AXI write master). A packet is ready as soon as it is complete. The channel
  sends AW with `AWID = {ch, index}` and
  `AWADDR = remoteBase + 16 × ((index − localBase index) mod 256)`, followed by four W beats.
  `outstanding` is set when AW is accepted. The B response marks the four lines *sent* and
  clears `outstanding`.
* **`MODE_ISC`** (AXI read slave). A read request belongs to this channel when its address lies
  in `[remoteBase, remoteBase + 4 KByte)`. It names its packet through the line index in its ID.
  The requester's 2-bit channel number is saved. A packet is ready when it is both complete and
  requested, in whichever order these happen. Either event can push it into the queue. The queue
  has two push ports because both events can complete different packets in the same cycle. The
  packet goes out as four R beats with `RID = {saved requester, index}`, and the last beat marks
  it sent.

Using the request ID as the buffer index requires the two ends of a channel to be **aligned line
for line**. That is, the incoming channel's `base_va` and the outgoing channel's `base_va` must
have the same offset modulo 4 KByte.

When the oldest line is *sent*, it is recycled. `localBase` and `remoteBase` then advance
together by one line per cycle.

## 3. Keeping loads in order

The core's load unit may have several loads in flight. Each stream channel holds at most one load,
but loads to different channels can overlap. A channel whose data are present could then answer
before an older load to another channel that is still waiting. `in_load_handler` prevents this
with an **order queue** of channel numbers, which is `NUM_STREAMS` deep:

* A grant pushes the channel number.
* Only the channel at the head may answer (`resp_allow`).
* An answer, or a `word_error`, pops the head.

The load unit (`stream_load_unit`) keeps the three states of the original core's load controller
(`IDLE`, `WAIT_GRANT`, `SEND_TAG`) and adds the stream steering:

* A stream address goes to the Incoming Stream Cache untranslated. Any other address first needs
  a translation hit, is retried until it gets one, and then goes to the data cache, whose tag
  follows a cycle later.
* The data cache and the stream cache each return data in order, but not in order with each
  other. A load to the *other* cache therefore waits until every load in flight has returned.
* At most `NUM_STREAMS + 1` loads are in flight.
* A stream load that no channel owns (`miss_error`) is accepted once nothing else is in flight.
  Like a load that ends in `word_error`, it returns `res_error` in program order.

## 4. Store path

Stream stores use the core's normal store path. The path is extended so that a store keeps its
virtual address, because stream stores are never translated.

* `stream_store_unit` (`IDLE`, `WAIT_SB_READY`, `VALID_STORE`) takes a store from the store queue
  when the store buffer has room. Ordinary stores also need a translation hit. The store is
  pushed one cycle later. In that same cycle the next store can already be taken, except after
  an atomic store. A lone store thus takes two cycles, and back-to-back stores take one each.
* `stream_store_buffer` has two queues:
  * a speculative queue of 4 entries, which `flush` empties;
  * a commit queue of 8 entries, which `commit` feeds.
* The oldest committed store goes to the Outgoing Stream Cache if it is a stream store, and to
  the data-cache store port otherwise.
* If the Outgoing Stream Cache refuses a stream store with an error, the store is dropped and
  reported on `sb_error`, so the queue keeps moving.

## 5. Network side

Both caches use a reduced AXI4 subset. It carries only id, addr, len, data, strb and last, with
128-bit data and 10-bit IDs. Bursts are always INCR bursts of four full beats, and responses are
always OKAY. The bundles are the structs `ax_t`, `r_t`, `w_t` and `b_t` in `stream_pkg`.

| Adapter | Role | Behaviour |
|---|---|---|
| `in_net_handler` | AR/R master of the Incoming cache | Round-robin over channels that request a burst. The choice is held while ARREADY is low. R beats are routed by `ID[9:8]`. RREADY is always 1. |
| `out_mem_handler` | AW/W/B master of the Outgoing cache | Round-robin over channels with a ready packet. Sends one whole burst (AW, then 4 W) before choosing again. B is routed by `ID[9:8]`. |
| `out_isc_handler` | AR/R slave of the Outgoing cache | An AR request is shown to every channel. ARREADY = some channel owns the address. R bursts are chosen round-robin and never interleaved. |
| `rr_arbiter` | shared | Rotating-priority pointer that moves past the last winner when its owner says so. |

To let the core read its own outgoing stream (a loopback), connect `in_ar*`/`in_r*` to
`out_ar*`/`out_r*` for the remote-base address range of that stream. The top-level testbench
does this.

## 6. Top level: `streaming_cache_top`

There are no parameters. All sizes come from `stream_pkg`. The port groups are:

* **Configuration**: `in_cfg_we`, `out_cfg_we`, `cfg_chan`, `cfg`. Outputs `*_chan_enabled`.
* **Load queue side**: `ld_valid`/`ld_vaddr`/`ld_pop`, results `res_valid`/`res_data`/`res_error`.
* **Store queue side**: `st_valid`/`st_vaddr`/`st_data`/`st_amo`/`st_pop`, `commit`/`commit_ready`,
  `flush`, `sb_empty`, `sb_error`.
* **MMU**: `ld_mmu_*` and `st_mmu_*`. The request and the hit/physical address come back in the
  same cycle.
* **Data cache**:
  * load port `dcl_*`: request and grant; then `dcl_tag_valid`/`dcl_tag` one cycle after the
    grant; in-order `dcl_rvalid`/`dcl_rdata`.
  * store port `dcs_*`.
* **Errors**: `in_miss_error`, `in_word_error`, `out_miss_error`, `out_word_error`.
* **Incoming AXI read master**: `in_ar*`, `in_r*`.
* **Outgoing AXI write master**: `out_aw*`, `out_w*`, `out_b*`.
* **Outgoing AXI read slave**: `out_ar*`, `out_r*`.

Timing summary (clock cycles):

| Operation | Cycles |
|---|---|
| Stream load, data present, alone | 2 (granted in cycle t, data in t+1) |
| Stream loads back to back, data present | 1 each |
| Stream store alone / back to back | 2 / 1 each |
| Load waiting for a prefetched line | answered the cycle after the line arrives (bypass register) |
| Complete outgoing packet → AW / first R beat | a few cycles: packet check, ready queue, buffer read |
| Recycling | 1 line per cycle per channel |

Storage: 4 × 256 × 128 bits = 128 Kbit of buffer per cache. Each line is 128 bits wide, and a
36-Kbit FPGA block RAM is at most 72 bits wide, so the buffers map to 2 block RAMs per channel,
8 per cache. The state bits are kept in flip-flops: generic synthesis gives about 7.2 k
flip-flops for the Incoming and 7.6 k for the Outgoing Stream Cache, most of them the
per-word and per-line state. Moving those bits into RAM would need several read and write ports
per cycle, because the prefetcher, the responses, the core side and recycling all access them
in the same cycle.

## 7. Choices made in this implementation

These points either go beyond what the original design description states, or interpret it:

* **Accesses ahead of the window wait; accesses behind it are errors.** The description treats
  any access outside the window as an error, but it also expects the core to stall when the
  buffer is too small. Here, waiting is used for data not yet in the window, and an error for
  data already consumed.
* **Errors end the access.** The description raises the error signals but leaves their
  handling open. Here an erroneous load returns `res_error` and an erroneous store is dropped
  with `sb_error`, so nothing blocks. A core would turn these into exceptions.
* **Write address of a memory-mode packet.** It is
  `remoteBase + 16 × ((index − localBase) mod 256)`, the distance of the packet from the window
  start, because `remoteBase` moves with `localBase`.
* **A prefetch slot counts as free only once it is recycled**, not merely read.
* **The outgoing ready queue has two push ports**, so a store and a read request can complete
  two packets in the same cycle.
* **Configuration port**, stream region position, reduced AXI subset and 32-bit-only loads and
  stores (no byte enables) are this implementation's.
* **Store buffer depths of 4 and 8** are the original core's.
* **An atomic store blocks the store unit for one cycle.** This simplifies how the original core
  handles atomics.

Not included: the core pipeline, the L1 data cache, the MMU, the interconnect and DRAM, address
translation for remote addresses (an I/O MMU), and terminating or draining a stream. Closing a
channel by configuration discards its contents.

## 8. Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each testbench compares the block's
outputs against an independent model, has a watchdog, and prints
`TB_RESULT checks=N failures=M`. Helpers:

* `tb/tb_pkg.sv`: the memory data pattern and stream address helpers.
* `tb/tb_axi_mem.sv`: a behavioural AXI memory with configurable latency and optional
  out-of-order, gapped read bursts.

Cycle-exact checks include:

* a lone stream load answered one cycle after its grant;
* 200 back-to-back loads from a full window in 200 cycles;
* 64 prefetch bursts filling an empty window;
* 100 back-to-back stores pushed at one per cycle;
* four beats and one AW per combined packet.

`tb_streaming_cache_top` runs the whole design at its default sizes against a 150-cycle memory.
A loopback feeds the outgoing ISC-mode channel into an incoming channel. The run has four
phases:

1. Mixed load and store programs: three incoming streams, two outgoing streams, plus ordinary
   loads and stores.
2. Every kind of error.
3. A 16 KByte stream through one incoming channel.
4. 4096 back-to-back stores to memory.

It counts every mechanism and fails if any of them never happened: prefetching, loopback requests
and responses, write bursts, waiting loads, back-to-back loads, the order queue holding two loads,
the forwarding register, buffer wrap-around on both sides, both ISC ready orders, store stalls,
store buffer full, the other-cache rule, translation retries, data-cache traffic, each error kind
and reopening a channel.

Measured results:

| Workload | Result here | Original evaluation |
|---|---|---|
| 16 KByte stream, back-to-back loads | 4096 loads in about 4250–4460 cycles; about 1.04–1.08 cycles from grant to data per load | 9 cycles per load, measured on the full core with its interconnect, where bursts arrive more slowly than here |
| Back-to-back stores to memory | 4096 stores in 4096 cycles | 1 cycle per store |

To run one testbench with Verilator 5, from the repository root (the package must come first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/stream_pkg.sv tb/tb_pkg.sv tb/tb_streaming_cache_top.sv \
    --top-module tb_streaming_cache_top -o sim --Mdir obj && obj/sim
```

Replace the testbench file and module name to run the others. All run in well under a minute.
The assertions in the RTL check the handshake rules: stable AR while stalled, no response without
a request, and no queue overflow. They are active under `--assert`.

## 9. Files

| File | Contents |
|---|---|
| `rtl/stream_pkg.sv` | Sizes, address layout, AXI structs, configuration type, helpers |
| `rtl/stream_line_ram.sv` | 256 × 128-bit buffer, word write enables, registered read |
| `rtl/rr_arbiter.sv` | Round-robin arbiter |
| `rtl/in_stream_channel.sv` | Incoming channel: window, prefetcher, read-invalidate |
| `rtl/in_load_handler.sv` | Load demultiplexing and the order queue |
| `rtl/in_net_handler.sv` | AXI read master adapter |
| `rtl/incoming_stream_cache.sv` | Four incoming channels with their handlers |
| `rtl/out_stream_channel.sv` | Outgoing channel: window, write combining, both modes |
| `rtl/out_store_handler.sv` | Store demultiplexing |
| `rtl/out_mem_handler.sv` | AXI write master adapter |
| `rtl/out_isc_handler.sv` | AXI read slave adapter |
| `rtl/outgoing_stream_cache.sv` | Four outgoing channels with their handlers |
| `rtl/stream_load_unit.sv` | Load unit with stream steering |
| `rtl/stream_store_unit.sv` | Store unit with stream steering |
| `rtl/stream_store_buffer.sv` | Speculative and commit store queues |
| `rtl/streaming_cache_top.sv` | Everything above, wired together |

To change the geometry, edit `stream_pkg`. `BUF_BYTES` sets the buffer size, and the line, packet
and ID widths follow from it. `NUM_STREAMS` sets the channel count, and the ID width follows it.
The testbenches assume the default sizes.
