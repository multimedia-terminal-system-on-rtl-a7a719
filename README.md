# Audio-video multimedia terminal SoC

This is the RTL for the shared part of a two-core audio-video terminal chip. Two
VLIW DSP cores code speech (G.723) and video (H.263) in parallel. Each core reads
samples that a real-time timer releases frame by frame. The cores write their
compressed output into a hardware multiplexer. The multiplexer packs audio and
video into H.223-like MUX-frames, and the audio coder's end-of-frame interrupt sets
the pace of the outgoing stream. A bus arbiter sits between the cores, the
memories and the multiplexer. It routes by address, gives shared slaves to the
audio core first, and keeps access statistics.

The cores themselves are not here. They are commercial ST210 processors whose
insides the original design does not give. They appear as ports of the top
module: a data-bus port, a program-memory port, a frame-start input and an
end-of-frame interrupt for each core. The cores' caches are here, though. Each
core has a 32 kB direct-mapped instruction cache and a 32 kB 4-way data cache,
and both sit right behind the top's core ports.

```
                 int_audio ─────────────┐
                                        v
  core 0 (audio) ──dreq──D$─┐     ┌──────────┐
  core 1 (video) ──dreq──D$─┤     │  av_mux  │── MUX byte stream
                         v        └────▲─────┘
                   ┌───────────┐       │ arbitrated port (0x0A200000)
                   │bus_arbiter│───────┘
                   └─┬──┬──┬──┬──┬─
         datamem0 ◄──┘  │  │  │  └──► datamem4 (free port, brought out)
      (audio only)      │  │  └────► datamem3 ◄── memloader 1 ◄── video samples
         datamem1 ◄─────┘  └───────► datamem2 ◄── memloader 0 ◄── audio samples
      (video only)
  core 0/1 ──ireq──I$──► progmem0/1       rt_timer 0/1 ──► core_activate[0/1]
```

## How a frame moves through the chip

1. After reset the two **memory loaders** (`memloader`) write the sample streams
   into datamem2 (audio) and datamem3 (video). They use the second port of
   these dual-port memories and start at a configurable address.
2. When `run` is high and both loaders are done, the two **real-time timers**
   (`rt_timer`) start. Each pulses its core's `core_activate` once per frame
   period: 30 ms for audio, i.e. 7,500,000 cycles at 250 MHz, and 40 ms for video.
3. A core reads the frame's samples over the bus and codes them, using its
   reserved data memory as working store. It writes the coded bytes into the
   multiplexer's audio or video field and signals end of frame.
4. The audio interrupt makes the multiplexer swap its buffers and send one
   MUX-frame. A full video buffer does the same for video alone.

## The bus

All slaves share one request/grant bus. Its types are in `soc_pkg`
(`bus_req_t`, `bus_rsp_t`).

* The master raises `req` with `we`, `addr` (a byte address), `wdata` and `be`.
  It holds them unchanged until it sees `gnt` in the same cycle. `gnt` low
  stalls the master; this is the "request, then check for grant" access of the
  cores.
* Read data comes back with `rvalid` exactly one cycle after the grant. Every
  slave must keep to this fixed latency, because the arbiter routes the answer
  by remembering where the read went.
* `err` is set, together with `gnt` for a write or with `rvalid` for a read,
  when the address belongs to no slave the master may use.

The assertions in `bus_arbiter` check both rules of the handshake during
simulation.

### Address map

Each slave has a 1 MiB window, selected by `addr[31:20]`. The slave sees only
the displacement, `addr[19:0]`.

| region | address | slave | access |
|---|---|---|---|
| 0x000 | 0x00000000 | datamem0 | master 0 (audio) only |
| 0x001 | 0x00100000 | datamem1 | master 1 (video) only |
| 0x002 | 0x00200000 | datamem2, audio samples | both |
| 0x003 | 0x00300000 | datamem3, video samples | both |
| 0x004 | 0x00400000 | datamem4, external port `dm4_*` | both |
| 0x0A2 | 0x0A200000 | multiplexer (arbitrated port) | both |

The multiplexer base address is part of the original design. The 1 MiB window
size is a choice made here; the original says only that an offset field picks
the device and the rest is the displacement inside it.

## Bus arbiter (`bus_arbiter`)

The decode and the grant are combinational. In one cycle each slave can serve
one master. When both masters ask for the same shared slave, master 0 (the
audio core) gets it and master 1 has to hold its request. This fixed priority
comes from the original design. Both masters can use different slaves in the
same cycle, for example their own reserved memories.

Counters, all 32 bits:

* `rd_cnt` and `wr_cnt`: granted reads and writes, per master.
* `denied_cnt`: cycles a master lost a shared slave to the other master.
* `stall_cnt`: cycles a request waited, for any reason.
* `mux_denied_cnt`: the part of `denied_cnt` lost on the multiplexer port, i.e.
  conflicts on the one truly shared device.
* `conflict_cnt`: cycles in which both masters asked for the same shared slave.

These are the bus figures that the original evaluation reports per core. Its
run of 210 million cycles, with up to 18 million bus reads per core, fits the
32-bit counters easily.

## Multiplexer (`av_mux`)

This block needs the most care, because three activities overlap in it. The
coders keep writing, a frame is being sent, and the audio interrupt may arrive
at any time.

**Fields and buffers.** The multiplexer has three fields inside its window, at
`addr[13:12]`:

| offset | field | behaviour |
|---|---|---|
| 0x0000 | audio | Byte-addressed. Bytes past `AUDIO_BYTES` are dropped. |
| 0x1000 | video | Any address. The enabled bytes of each write are appended, lowest byte lane first, so a partly filled last word is fine. |
| 0x2000 | status (read) | `{frames sent[15:0], video bytes waiting[13:0], assembler busy, audio interrupt pending}` |

The audio field and the video field each exist twice, as ping-pong pairs. The
coders always write into the "fill" half, while the frame assembler reads the
other half.

**MUX-frame format.** Bytes leave on `out_data`, one per `out_valid & out_ready`
transfer. `out_sof` marks the first byte and `out_eof` the last.

| bytes | content |
|---|---|
| 2 | start of frame, 0xE1 0x4D |
| 1 | MUX table index: 1 = audio only, 2 = video only, 3 = audio and video |
| 2 | total frame size in bytes, header included, big-endian |
| `AUDIO_BYTES` | audio (only in frames triggered by the audio interrupt) |
| 0..`VIDEO_MAX_BYTES` | video bytes received since the last swap |

The field order, the fixed audio size and the variable video size come from the
original design. The sync word (the H.223 Annex A pattern), the index codes,
the field widths and the byte order are choices made here.

**When frames are made.** There are two triggers.

* **Audio swap.** A rising edge on `int_audio` swaps both pairs and starts a
  frame with the audio field and whatever video has arrived.
* **Video overflow swap.** If the video fill buffer holds more than
  `VIDEO_MAX_BYTES - 4` bytes first, which happens when the audio coder runs
  late, only the video pair swaps and a video-only frame goes out. The original
  design asks for this swap so that the video buffer never overflows. Swapping
  the video pair alone is a choice made here, so that half-written audio is
  never sent.

**While a frame is being sent.** A swap can only happen when the assembler is
idle, because the half it would hand over is still being read.

* An audio interrupt in this time is remembered and served as soon as the
  frame ends.
* A video write that finds the fill buffer full is held off (`gnt` low). This
  stalls the video core instead of losing data.
* In the single cycle of a swap, every write is held off, so that no byte lands
  on the wrong side.

**Sizes.** `VIDEO_MAX_BYTES` must be a multiple of 4. With the defaults
(24 + 224 + 5) a frame is at most 253 bytes. That is near the 240 bytes that a
64 kbit/s channel carries in one 30 ms audio period. `AUDIO_BYTES` = 24 is the
size of a G.723.1 frame at 6.3 kbit/s.

`int_video`, the video coder's end-of-frame signal, only feeds a counter
(`video_int_cnt`). The original system diagram wires it to the multiplexer but
gives it no function.

## Memories, loaders, timers

* `mem_sp` is a single-port synchronous RAM with byte enables. It is used for
  datamem0/1 and for the two program memories. It always grants and reads with
  a latency of one cycle. The array is not reset.
* `mem_dp` is the same RAM with a second port, which the loader uses. If both
  ports write the same byte in one cycle, port 0 wins.
* `memloader` writes one word per cycle from a valid/ready stream, at
  `START_ADDR + 4*i`. It stops after `src_last` or `MAX_WORDS` words and then
  raises `done`.
* `rt_timer` pulses `activate` in the first enabled cycle and then every
  `PERIOD` cycles. Dropping `enable` rewinds it.

## Caches (`cache`)

One module serves as both caches, with the bus request/grant handshake on
both sides. The instruction cache has `WAYS = 1`. The data cache has
`WAYS = 4`, with one round-robin pointer per set that moves on after each line
fill of that set.

* **Hit.** The tags are read combinationally, so a hit is granted in the cycle
  of the request. The word comes from the synchronous data array one cycle
  later, just as from a memory.
* **Read miss.** The cache holds `gnt` low, which stalls the core the same way
  a busy bus would. It fetches the whole line (`LINE_BYTES/4` bus reads, which
  may themselves be held off) into the victim way and then marks the line
  valid. The core's request, still held, then hits.
* **Write.** Writes go through to the bus and are not allocated. A write that
  hits also updates the cached word. Because of this, the memories are always
  current.
* **Uncached region.** The multiplexer region (0x0A2 in `addr[31:20]`) passes
  straight through, because its status and buffers are device registers.
* **Error.** If a line fill gets an error answer, for example a read of the
  other core's reserved memory, the line stays invalid and the core's read is
  answered with `err`.

`access_cnt` counts granted cacheable accesses, hits and misses alike.
`miss_cnt` counts line fills, plus write misses when `WRITE_MISSES` is set.
These are the data-memory and program-memory access counts and the miss counts
of the original evaluation: data-cache misses include write misses, while
instruction-cache misses are read misses only. The top brings the counters
out as `icache_*_cnt` and `dcache_*_cnt`.

Several points are chosen here because the original does not give them:

* the 32-byte line;
* write-through;
* stalling on a miss;
* the uncached region.

Caching has no coherence protocol. This is safe in this chip for three
reasons. The loaders finish before the cores start. Each core writes only its
own reserved memory and the uncached multiplexer. The shared input memories
are only read.

## Parameters of the top (`av_terminal_soc`)

| parameter | default | origin |
|---|---|---|
| `AUDIO_PERIOD` | 7,500,000 | 30 ms at 250 MHz, from the original design |
| `VIDEO_PERIOD` | 10,000,000 | 40 ms (25 frames/s), chosen here |
| `MEM_WORDS`, `PROG_WORDS` | 262,144 (1 MiB) | chosen here; one address window |
| `AUDIO_BYTES` | 24 | chosen here (G.723.1 at 6.3 kbit/s) |
| `VIDEO_MAX_BYTES` | 224 | chosen here |
| `AUDIO_START`, `VIDEO_START` | 0 | chosen here |
| `ICACHE_BYTES`, `DCACHE_BYTES` | 32,768 | from the original core configuration |
| `DCACHE_WAYS` | 4 | from the original core configuration |
| `LINE_BYTES` | 32 | chosen here |

The video period is not given in the original. 40 ms agrees with its reported
run: about 210 million cycles hold 28 audio frames of 7.5 million cycles, and
20 video frames fit in that span at 40 ms.

The 1 MiB input memories hold the original evaluation's workload:

* 28 G.723 frames need 13,440 bytes (240 samples of 16 bits each).
* 20 H.263 frames at QCIF 4:2:0 need 760,320 bytes. The resolution is an
  assumption; the original does not state it.

## Where this departs from the original, or fills a gap

* The cores are outside the RTL (see above). In the original, the caches sit
  inside the cores; here they sit at the top's core ports.
* The original multiplexer writes its stream to a file; here it is a byte
  stream with valid/ready.
* The original memory loaders read files; here they take a word stream.
* The following are filled in by this design, since the original gives only the
  behaviour or the name:
  * the bus width (32 bits) and the handshake timing;
  * the window size, the error answer and the counter widths;
  * all memory sizes;
  * the multiplexer's register map, header coding and busy-time behaviour;
  * the start-up sequence: the timers wait for both loaders and for `run`.
* datamem4, the sixth slave port, has nothing attached in the original and is
  brought out as `dm4_req`/`dm4_rsp`.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_bus_arbiter` checks the decode, the reservation, the error answer,
  priority, stalls and the counters.
* `tb_mem_sp` and `tb_mem_dp` check random data, byte enables, port collisions
  and the read latency.
* `tb_memloader` checks addresses, data, back-pressure and both end conditions.
* `tb_cache` runs a small 4-way data-cache shape and a small direct-mapped
  instruction-cache shape (`tb_cache_port`) against a memory that grants at
  random. A reference model predicts every hit and miss. The testbench checks
  the read data, the `err` answers, the latency, whole-line fills and the
  absence of bus traffic on a hit, write-through, and both counters.
* `tb_rt_timer` checks the pulse timing against a cycle-by-cycle model, with
  pauses.
* `tb_av_mux` checks complete frames against a byte-level model. It covers
  audio+video, audio-only and overflow frames, hold-off, a remembered interrupt,
  partial words, the status register, and the latency: the first byte is
  presented right after the clock edge that samples `int_audio`.
* `tb_av_terminal_soc` runs the whole chip at small sizes, with periods of 700
  and 500 cycles and a 32-byte video limit. Behavioural core models
  (`tb_core_model`) play the coders with stand-in "codecs" (`tb_media_pkg`), and
  the harness (`tb_soc_harness`) checks every MUX-frame byte against values it
  computes from the sample data alone. It also requires each mechanism to
  happen at least once: loading, both timers, an arbiter conflict won by the
  audio core on the multiplexer port, a reserved-memory error, audio-only,
  audio+video and video-only
  frames, write hold-off, a remembered audio interrupt, partial video words,
  and hits and misses in every cache.
* `tb_av_terminal_soc_full` runs the top with every default, using the whole
  workload of the original evaluation. That is 28 G.723 frames and 20 QCIF
  video frames in real time: 30 ms and 40 ms periods at 250 MHz, about 203
  million cycles. It takes about 5 minutes.
* `tb_case_study` runs the same workload with only the timer periods divided by
  100, in a few seconds. It multiplexes 28 audio frames, of which 6 of the
  resulting 34 MUX-frames are video-only overflow frames.

To simulate with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/soc_pkg.sv tb/tb_media_pkg.sv tb/tb_av_terminal_soc.sv \
    --top-module tb_av_terminal_soc
./obj_dir/Vtb_av_terminal_soc
```

For a block testbench, name the package, the block and its testbench, for
example `rtl/soc_pkg.sv rtl/av_mux.sv tb/tb_av_mux.sv --top-module tb_av_mux`.
The simulator starts uninitialised variables at random values. Everything the
design reads is reset or written first.

To change a size, override the top's parameters. The end-to-end testbench shows
how, together with the matching harness parameters.
