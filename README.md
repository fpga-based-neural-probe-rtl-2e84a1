# Online multi-channel spike sorting: NEO detector and OSort cluster engine

This is synthesizable SystemVerilog for a real-time spike sorter for neural
recordings. Twenty neighbouring electrodes (a 5 x 4 patch of a larger array)
are sampled together at 16 bits. A spike from one neuron usually shows up on
several of these electrodes at once. The design therefore treats the whole
patch as a single feature vector: 20 channels x 64 samples = 1280 values per
spike.

The design has two halves joined by a stream FIFO:

1. **Spike detector.** It computes the nonlinear energy operator (NEO) of
   every channel. It derives a detection threshold from the running mean of
   that energy. When the threshold is crossed, it cuts a 64-sample window out
   of all 20 channels and streams it out.
2. **Cluster engine.** This is an online OSort (template matching) engine. It
   compares each incoming spike with the mean waveform of every cluster it
   has so far. It then either adds the spike to the nearest cluster or
   starts a new cluster. After that it checks whether the updated cluster
   has come close enough to another cluster to merge with it. For every
   spike it emits one cluster number.

There is no training phase. Clusters appear, grow and merge while data
streams in.

The defaults are: 20 channels, 64 samples per spike, 128 cluster slots, a
200 MHz clock target and a 20 kHz sampling rate. Sorting one spike takes at
most 17,804 clocks. At 200 MHz that is 89 µs, or about 11,200
spikes per second. A 20-channel patch produces far fewer spikes than that.

```
ch_data[20] ──► probe_serializer ──► neo_unit ──► avg_shift ──► T_D
   (frame)          │  (1 sample/clk)   │ (BRAM x(n), x(n-1))      │
                    │                   └──────► threshold_module ◄┘
                    └──────────────► sample_ring_buffer  (inside it)
                                                │ AXI-Stream, 1280 words/spike
                                        spike_stream_buffer (FIFO)
                                                │
                                         cluster_module ──► m_id (cluster number)
                                                ▲
                                     AXI-Lite: T_C, T_M
```

## Files

| file | role |
|---|---|
| `rtl/osort_pkg.sv` | shared enums: arithmetic unit mode, controller stage |
| `rtl/osort_top.sv` | detector + FIFO + cluster engine, status outputs |
| `rtl/spike_detector.sv` | serializer, NEO, threshold averaging, window extraction |
| `rtl/probe_serializer.sv` | parallel frame → one sample per clock, with channel index |
| `rtl/channel_delay_ram.sv` | per-channel one-sample delay memory (two of them hold x(n) and x(n−1)) |
| `rtl/neo_unit.sv` | ψ = x(n)² − x(n+1)·x(n−1) per channel |
| `rtl/avg_shift.sv` | block mean of the NEO values, times 8 → T_D |
| `rtl/sample_ring_buffer.sv` | last 128 frames of raw samples |
| `rtl/threshold_module.sv` | detection, window timing, window streaming |
| `rtl/spike_stream_buffer.sv` | AXI-Stream FIFO, 2048 words |
| `rtl/cluster_module.sv` | the cluster engine, wiring only |
| `rtl/osort_controller.sv` | stage sequencer of the cluster engine |
| `rtl/spike_deserializer.sv` | stream → rows of 20 lanes in mean format |
| `rtl/spike_memory.sv`, `rtl/cluster_memory.sv` | current spike; 128 cluster means |
| `rtl/arithmetic_unit.sv` | one lane: (x−m)² or m + w·(x−m), one multiplier |
| `rtl/adder_tree.sv`, `rtl/distance_accumulator.sv`, `rtl/min_register.sv` | distance reduction |
| `rtl/threshold_regs.sv` | AXI-Lite T_C / T_M registers and comparator |
| `rtl/local_memory.sv` | per-cluster alive flag, count, weight, merge table; free-slot finder |
| `rtl/serial_divider.sv` | restoring divider for the weights |

Each file starts with a comment that gives the module's function, timing and
design choices.

## Spike detection

### Serial datapath

`probe_serializer` captures one frame (20 samples) on `ch_valid`. It then
plays the frame out one channel per clock. A frame that arrives while the
previous one is still being sent is dropped, and `overrun` pulses for one
clock. At 20 kHz and 200 MHz there are 10,000 clocks between frames, and
serializing takes 20 of them.

The NEO of sample n needs x(n−1), x(n) and x(n+1). Because the channels are
interleaved, two small memories indexed by channel hold the previous two
samples of every channel:

- `neo_unit` reads both memories with the incoming sample x(n+1).
- One clock later it writes the new sample and shifts the old x(n) into the
  x(n−1) memory.
- It outputs ψ for sample n of that channel, two clocks after the input
  sample.

The result is exact: 2·16+1 = 33 bits, signed. Entries not yet written
since reset read as zero.

### Threshold

`avg_shift` sums 2^14 consecutive NEO values over all channels. It divides
the sum by a shift, shifts the mean left by 3 (correction factor 8), and
holds the result as T_D until the next block is complete. No spike is
detected before the first block has completed (`thr_ok`). With 20 channels
at 20 kHz a block lasts about 41 ms. The block length (`LOG2N`) is this
design's choice.

### Window extraction

`threshold_module` compares each NEO value as it is produced against the
current T_D. A crossing at frame d selects the window that:

- starts at frame d − 20 (`PRE`);
- is 64 frames long (`SAMPLES`).

The module then:

1. waits until the last frame of the window has been written into the raw
   sample ring (128 frames);
2. streams the window out frame by frame, channel by channel, with `tlast`
   on word 1280.

One word goes out every two clocks, so a window takes 2560 clocks.

While a window is pending or being sent, new crossings are ignored. So are
crossings whose window would overlap the last one sent. At 200 MHz the
dead time is the window itself plus a fraction of a frame. If frames are fed
much faster than real time, as in the testbenches, spikes closer than
`WIN + 2·M·WIN/frame_period` frames are merged into the first one. The
end-to-end testbench spaces its spikes accordingly.

`spike_stream_buffer` is a first-word-fall-through FIFO. It decouples
detection from clustering, which takes up to 17,804 clocks per spike in the
worst case.

## The cluster engine

### Number formats

| quantity | format |
|---|---|
| spike samples | 16-bit signed ADC counts |
| means and spikes in the engine | 18-bit signed, 2 fractional bits (sample << 2) |
| squared difference per lane | 37 bits |
| row sum (20 lanes) | 42 bits |
| distance (64 rows) | 48 bits |
| weights | unsigned fraction, 16 fractional bits (1.0 = 65536) |
| counts | 20 bits per cluster |

Distances are in units of (count/4)², so **one squared ADC count is 16
distance units**. The thresholds written over AXI-Lite must use the same
unit. For the usual choice T = σ²·c·N_S (σ = noise standard deviation in
counts, c ≈ 1.15, N_S = 1280 values), write σ²·c·1280·16.

### Memories

- `cluster_memory`: 128 clusters x 64 rows x (20 lanes x 18 bits) =
  2.95 Mbit. It is addressed `{cluster, row}` and has a one-clock read.
- `spike_memory`: 64 rows of 360 bits. It holds the incoming spike and,
  after stage 2, the updated mean of the cluster that the spike joined.
- `local_memory` keeps these per cluster:
  - the alive flag;
  - the spike count n;
  - the precomputed weight 1/(n+1);
  - a merge-table entry: merged flag and the cluster it went into.

  It also provides the lowest free slot through a priority encoder.

### One arithmetic unit per lane

Each of the 20 lanes has one multiplier. In distance mode the unit gives
(x − m)². In blend mode it gives m + round(w·(x − m)). This is the weighted
mean n/(n+1)·m + 1/(n+1)·x rewritten so that a single multiply serves it. A
merge uses the same form with w = n/(n+m).

Rounding is to nearest: (d·w + 2^15) >> 16. Results are registered.

The `adder_tree` sums the 20 lanes of one row. The `distance_accumulator`
sums 64 rows. `min_register` keeps the smallest distance and its cluster
number. It replaces the stored value only on a strictly smaller distance,
so ties keep the lower cluster number.

### Stages for one spike

`osort_controller` sequences these stages. `stage` shows the current one.

| stage | what happens | clocks |
|---|---|---|
| LOAD | 1280 words from the stream into 64 spike-memory rows | 1282 |
| S1 | distance of the spike to every live cluster, one row per clock, pipelined | 64·live + 5 |
| DECIDE | MIN < T_C → join that cluster; else new cluster in the lowest free slot; if no slot is free → join the nearest anyway | 1 |
| S2 | m ← m + w·(x − m) for all rows; written to the cluster memory and to the spike memory (a new cluster copies the spike) | 67 |
| UPD | divider computes 1/(n+2); count and weight are written | 19 |
| S3 | distance of the updated mean to every *other* live cluster | 64·(live−1) + 5 |
| DEC3 | MIN < T_M → merge, else go to OUT | 1 |
| MDIV | divider computes n/(n+m) | 19 |
| S4 | B ← B + (A − B)·n/(n+m) for all rows | 67 |
| MUPD | A is freed and entered in the merge table; B gets count n+m and weight 1/(n+m+1) | 19 |
| OUT | cluster number (B after a merge) offered on `m_id` | ≥ 1 |

The worst case (128 live clusters, a forced assignment and a merge) measures
17,804 clocks in `tb_cluster_latency`, against 18,127 published for the same
configuration.
Without a merge, S4 and the two divisions after stage 3 are skipped. At
most one merge is made per spike.

The spike stream is not accepted during the other stages: `s_axis_tready`
is high only in LOAD. The FIFO in front absorbs the wait.

The events `ev_new`, `ev_update`, `ev_merge` and `ev_full` pulse for one
clock when the corresponding decision is taken. `ev_full` means a spike was
forced into the nearest cluster because every slot was in use.

### Register map (AXI-Lite, 32-bit data, 4-bit address)

| address | register |
|---|---|
| 0x0 / 0x4 | T_C bits 31:0 / 63:32 (the low 48 bits are used) |
| 0x8 / 0xC | T_M bits 31:0 / 63:32 |

Both registers reset to all ones. Until the host writes them, no spike is
close enough to anything, so every spike opens a new cluster until the
slots are full. Byte strobes are honoured. Responses are always OKAY.

## Where this design departs from the published architecture, or fills gaps

- **Spike-to-memory path.** The detector originally writes the interleaved
  samples and NEO values to external memory and re-reads them. Here, NEO
  values are compared as they are produced. Only the raw samples are kept,
  in an on-chip ring of 128 frames. There is no external memory interface.
- **Detection choices.** The averaging block (2^14 values), the alignment of
  the window (20 frames before the crossing) and the dead time after a
  detection are this design's choices.
- **Update and save in one pass.** The mean update and the write-back are
  done in one pass (about 66 clocks) instead of two 64-clock loops.
- **Free slot lookup.** The lowest free cluster slot comes from a priority
  encoder, not from a 128-step scan of the merge table. The merge table is
  kept in `local_memory` (merged flag and target per cluster) but nothing in
  the design reads it out. The output stream reports the surviving cluster
  number directly.
- **Weights.** The weight rule is 1/(count+1) everywhere, also after a merge.
- **Stage 3.** Stage 3 excludes the updated cluster itself (its distance
  would be zero).
- **Full cluster memory.** When all 128 slots are used and no cluster is
  within T_C, the spike joins the nearest cluster. The original leaves this
  case open.
- **Wider accumulator.** The accumulator is 48 bits rather than 42. 1280
  squared 19-bit differences can need 47 bits.
- **One physical memory per store.** The cluster memory is one 360-bit-wide
  array rather than 80 separate 72-bit block RAMs. A synthesis tool maps it
  onto whatever RAM it has. The spike memory is handled the same way.
- **No narrow output serializer.** The optional serializer that narrows the
  datapath output for several engines sharing a bus is not built. Neither is
  the multi-engine arrangement it serves.
- **Outside this design.** The amplifiers and ADC interface, DMA, Ethernet
  and the control processor are not included. The top brings out the
  AXI-Lite threshold port and the cluster-number stream for them.

The original design was written in a high-level synthesis flow. This RTL is
an independent register-level implementation. Its cycle counts match the
published stage latencies within a few clocks: load 1282 against 1281, and a
distance pass of 8197 against 8197.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

- compares the outputs with a model computed inside the testbench;
- checks the cycle counts where they are part of the design (load, distance
  pass, update pass, divider latency);
- prints `TB_RESULT checks=N failures=M`.

The main ones are:

- **`tb_cluster_module`.** Four lanes, eight samples and eight cluster slots.
  It runs the engine against a bit-exact model of the OSort algorithm with
  the same rounding, and checks every cluster number. It checks the stage
  timing, and that new, update, merge and all-slots-full cases occur.
- **`tb_osort_top`.** End to end at reduced size: 4 channels, 8-sample
  windows, 8 slots, a 64-value threshold block and a 16-word FIFO. It
  generates noisy multi-channel recordings from several neuron templates.
  It computes the expected NEO, thresholds, windows and cluster numbers
  itself, and checks each one. It counts these mechanisms and fails if any
  never happened: detection, threshold update, new cluster, update, merge,
  all slots used, FIFO back-pressure, and serializer overrun.
- **`tb_osort_top_full`.** The same test with every parameter at its
  default: 20 channels, 64 samples, 128 slots, 2^14-value threshold blocks
  and a 2048-word FIFO. Back-pressure and a full cluster memory are not
  reached at this size.
- **`tb_cluster_latency`.** The cluster engine at its default size. It
  fills all 128 slots, then sends the worst-case spike: a forced
  assignment followed by a merge. It checks the length of every stage and
  that the total stays within 18,127 clocks. The measured total is 17,804.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/osort_pkg.sv \
    tb/tb_osort_top.sv --top-module tb_osort_top -o sim
./obj_dir/sim
```

Replace `tb_osort_top` with any other testbench name. Each testbench runs in
seconds.

### What is not verified

- Timing closure at 200 MHz has not been checked.
- The thresholds are set in the testbenches from the known templates, not
  from measured noise.
- Synthesis maps the memories as inferred arrays. The RAM primitives a
  given FPGA needs (and any output register they want) may need a wrapper.
