# A timing-aware architecture for ECG biometric authentication

ECG-based authentication (EBA) identifies a person by the shape of their
heartbeat. A recording is filtered, cut into single beats around their
R-peaks, reduced to a feature vector and matched against stored templates.
Each of these four steps has branches that depend on the data. So the time a
software implementation takes reveals something about the signal and the
templates, which is a timing side channel. Padding every step with dummy work
removes the leak, but it costs a lot of time and energy.

This RTL builds the hardware around a processor core that makes EBA
constant-time more cheaply. It has four parts:

* **Segmentation block (`segblk`).** Segmentation is the costliest step, so it
  gets its own accelerator. The accelerator finds R-peaks in a fixed number of
  cycles for a given record length.
* **Segmentation buffer (`seg_buffer`).** A small scratch memory that the core
  and the accelerator reach with ordinary loads and stores.
* **STTRAM caches (`stt_cache`).** Instruction and data caches with short
  retention times. STTRAM is non-volatile, but its data can be made to last
  only for a set time. A 2-bit counter per block writes the block back before
  its data fades.
* **Architecture controller (`arch_ctrl`) and execution-order multiplexer
  (`exec_mux`).** After segmentation is fast, the controller slows down every
  other step, through the clock frequency and through in-order or
  out-of-order execution. The aim is that every step takes about as long as
  segmentation, and that no step is fast on some inputs and slow on others.

The core itself is not part of this RTL: its fetch and decode stages, its
out-of-order backend, its in-order execute stage and its execution units. The
clock generator and main memory are not part of it either. Their signals are
ports of the top, `eba_dsa_top`.

```
          fetch ──► u_icache (stt_cache, 10 ms) ──► im_* (next level)
                         ▲ ret_tick
                    u_ret_i (retention_timer) ◄── freq_l
 flags ─► u_ctrl (arch_ctrl) ── freq_l ─► clock generator (outside)
                    │ sel
 decode ─► u_mux (exec_mux) ─► out-of-order backend / in-order stage (outside)
                                   ooo_pwr_en ─► backend power gate
 core data port ─┐
                 ├─► port owner (segblk while busy) ─┬─► u_buf (seg_buffer, 4 KB @ 0x1000_0000)
 u_segblk ───────┘                                  └─► u_dcache (stt_cache, 75 µs) ─► dm_*
                    u_ret_d (retention_timer) ── ret_tick ─┘
```

## Phases and the step configuration table

The authentication program runs in six phases. At the end of each phase it
raises a one-bit flag:

* `auth_req` leaves `S_WAIT`;
* `rd_flag`, `filt_flag`, `seg_flag`, `feat_flag` and `mat_flag` end
  reading, filtering, segmentation, feature extraction and matching.

`arch_ctrl` is a Moore machine with one state per phase. A flag that does not
belong to the current state is ignored. The registered outputs change one
cycle after the flag:

| state   | step               | clock   | `freq_l` | execution    | `sel` |
|---------|--------------------|---------|----------|--------------|-------|
| S_WAIT  | idle               | 2.1 GHz | 0        | out-of-order | 1     |
| S_READ  | reading the signal | 2.1 GHz | 0        | out-of-order | 1     |
| S_FILT  | filtering          | 600 MHz | 3        | in-order     | 0     |
| S_SEG   | segmentation       | 2.1 GHz | 0        | out-of-order | 1     |
| S_FEAT  | feature extraction | 500 MHz | 2        | in-order     | 0     |
| S_MAT   | matching           | 400 MHz | 1        | in-order     | 0     |

The four step rows are the architecture's own. The two rows for S_WAIT and
S_READ are this design's choice: the base configuration.

The architecture describes the polarity of `sel` in two ways. Its
configuration table gives 1 for out-of-order. Its prose says out-of-order
runs when `sel` is 0. This RTL follows the table.

`freq_l` is a level ID, not a divider. A clock generator outside the design
would turn it into a frequency. Everything in this RTL runs on one clock. The
frequency level matters in one place only: the retention timers use it to
convert cycles into real time (see below).

## Execution-order multiplexer

Decoded instructions go out on one of two valid/ready ports: the out-of-order
backend (`ooo_*`) or the in-order execute stage (`io_*`). When `sel` changes,
`exec_mux` stops dispatching and waits until the backend in use reports idle.
Then it flips `cur_sel` (brought out of the top as `exec_order`) and pulses
`switch_pulse`. So instructions never run out of order across the switch.

`ooo_pwr_en` is low while the in-order path is in force and the out-of-order
backend is idle. The core can use it to power-gate that backend.

## The segmentation block

Most of the design's complexity is here. `segblk` runs the Pan-Tompkins QRS
detector over a filtered ECG record held in memory. It writes the sample
indices of the R-peaks to a result array, so that software can cut beats
around them.

### Programming model

The core writes three operands:

* `src_ptr`: byte address of the samples. There is one signed sample per 32-bit
  word, in the low `SAMPLE_W` bits.
* `dst_ptr`: byte address of the result array.
* `n_samples`: number of samples.

It then pulses `start` and can sleep. `busy` stays high during the run. At the
end the block writes exactly `MAX_PEAKS` words at `dst_ptr`: the R indices in
increasing order, then `0xFFFF_FFFF` in the unused slots. After that, `irq`
pulses for one cycle and `done` stays high until the next start. `n_peaks`
gives the number found.

The block is a master on the core's data port. Its accesses go to the
segmentation buffer or through the data cache, depending on the address. The
samples can therefore be anywhere in memory.

### Signal path

The block works in integers and reads each sample once per pass:

```
x[n] ─► d[n] = (2x[n] + x[n-1] - x[n-3] - 2x[n-4]) / 8       derivative
      ─► s[n] = d[n]²                                        squaring
      ─► m[n] = s[n-MWI_LEN+1] + … + s[n]                    moving-window integral
      ─► m[n-1] is a peak if m[n-1] > m[n-2] and m[n-1] ≥ m[n]
```

`MWI_LEN` is 150 ms of samples. The integral is not divided by the window
length, and all thresholds use the same unscaled units.

### Two passes

1. **Learning pass** over the first `INIT_SAMPLES` samples (2 s). It sets the
   initial thresholds:
   * SPKI (the signal-peak level) to one third of the largest integrated
     value;
   * NPKI (the noise-peak level) to half of the mean integrated value.

   Both RR averages start at `FS` samples (one second).
2. **Detection pass** over all `n_samples`. It classifies every peak against
   two thresholds:
   * THR1 = NPKI + (SPKI − NPKI)/4, which stays at NPKI should NPKI ever be
     the larger;
   * THR2 = THR1/2.

   Each peak then falls into one of three cases:
   * A peak above THR1 that lies more than `REFRACT` samples (200 ms) after
     the last QRS is a QRS. It updates SPKI ← SPKI·7/8 + peak/8.
   * A peak inside the refractory period is ignored. The ripples on top of
     one integrated QRS would otherwise inflate NPKI.
   * Any other peak is noise. It updates NPKI the same way, and if it is
     above THR2 it becomes the search-back candidate (the largest one is
     kept).

**Search-back.** If no QRS has been seen for 1.66 × RR_AVG2 samples, the
candidate is accepted as a missed beat, with SPKI ← SPKI·3/4 + peak/4. This
is how the block recovers a beat whose amplitude is well below the others.
`searchback_pulse` marks it.

**RR averages.** Each keeps an 8-entry history of RR intervals:

* RR_AVG1 averages the last eight intervals.
* RR_AVG2 averages only intervals within 92 %–116 % of RR_AVG2.

Intervals are held in 16 bits and saturate there. The first interval
measured re-seeds all slots of both. Without this, a heart
rate far from 60 bpm would never fall inside the limits.

The index reported for a beat is the location of the integrated peak minus
`DELAY` (2). That offset cancels the derivative's delay. Because of the
integration window, the index lies between the R-peak and about `MWI_LEN`
samples after it.

### Constant time

Detection branches on the data, but the block's timing does not. Every sample
costs its bus read plus three cycles, whatever happens in the detector, and
the result array always has `MAX_PEAKS` words. For a given record length and
memory, the run takes

    (INIT_SAMPLES + n_samples) · (read + 4) + MAX_PEAKS · (write + 1) + 1 cycles

where `read` and `write` are the latencies in cycles after the request. The
testbench checks that records with many beats, few beats and none at all take
the same number of cycles.

### Parameters

| parameter      | default | meaning                                       |
|----------------|---------|-----------------------------------------------|
| `FS`           | 500     | sample rate in Hz                             |
| `SAMPLE_W`     | 16      | sample width                                  |
| `MWI_LEN`      | FS·0.15 | integration window (150 ms)                   |
| `REFRACT`      | FS/5    | refractory period (200 ms)                    |
| `INIT_SAMPLES` | 2·FS    | learning pass length (2 s)                    |
| `MAX_PEAKS`    | 40      | size of the result array (beats per user)     |
| `DELAY`        | 2       | index correction                              |

For 1000 Hz or 5000 Hz recordings, set `FS` to match: the window and
refractory lengths follow from it. At 5000 Hz the window has 750 registers.

Not built: the T-wave test of the original detector, and the band-pass
filter. Filtering is its own software step before segmentation, and the block
expects an already filtered signal.

## Reduced-retention STTRAM caches and their monitor

`stt_cache` is used twice:

| cache       | port            | retention |
|-------------|-----------------|-----------|
| instruction | fetch           | 10 ms     |
| data        | core / `segblk` | 75 µs     |

The architecture gives the retention times the other way round in one place.
This design follows the pairing that fits the reasoning behind the numbers:
data blocks stay useful for much less time than instructions.

Each cache is 16 KB, 4-way set associative, with 64-byte blocks, which gives
64 sets. It is write-back and write-allocate, with round-robin replacement
that prefers an invalid way. It handles word accesses, one at a time. A hit
is acknowledged one cycle after the request. A miss writes back a dirty
victim if there is one, fetches the block over the 512-bit next-level
interface, then finishes as a hit.

**The monitor.** Every block has a 2-bit counter. It is cleared when the
block is filled or written, and counts `ret_tick` pulses, saturating at 3.
While the cache is idle, a scanner visits one block per cycle. A block whose
counter is at 3 has seen at least three quarter-retention ticks since it was
refreshed, so its retention is about to run out:

* if dirty, it is written back (`ret_wb`) and invalidated;
* if clean, it is invalidated (`ret_inv`).

The scanner covers the 256 blocks in 256 idle cycles, which is far shorter
than a quarter of either retention time. Reads do not refresh a block.

**Real time under frequency scaling.** `retention_timer` adds the clock
period of the current `freq_l` (476, 1667, 2000 or 2500 ps) to an
accumulator every cycle. It ticks whenever a quarter of the retention time
has passed, and carries the remainder. Retention therefore stays a wall-clock
quantity when the clock slows down.

The storage is modelled as ordinary flip-flop or RAM arrays. The short
retention is a property of the cells, which this RTL does not model. The
counter is what guarantees that nothing is read after it has faded.

## Segmentation buffer and the shared data port

`seg_buffer` is 4 KB (1024 × 32-bit words) at `0x1000_0000`–`0x1000_0FFF`.
The top decodes address bits 31:12 to send an access to the buffer or to the
data cache.

The STTRAM buffer's latencies (0.25 ns read, 0.988 ns write) round up at the
2.1 GHz base clock to:

* a load acknowledged 1 cycle after the request;
* a store acknowledged 3 cycles after the request.

Its 100 µs retention is not modelled. The buffer holds data only for the
length of a segmentation step.

`segblk` owns the data port while `busy`. A core request made in that time is
held off (no `ack`) until the block is done. That is the stall counted in the
end-to-end test.

## Bus protocol

All word ports (`if_req`/`if_rsp`, `d_req`/`d_rsp`, the buffer and
`segblk`'s master port) use the `bus_req_t`/`bus_rsp_t` structs of
`eba_pkg`:

* the master raises `req` with `we`, `addr` and `wdata`, and holds them until
  a one-cycle `ack`;
* read data is valid with `ack`;
* one request is outstanding at a time.

`segblk` asserts the hold rule. The caches' next-level ports follow the same
rule with 512-bit data and `mem_ack`.

## Files

| file                   | content                                                      |
|------------------------|--------------------------------------------------------------|
| `rtl/eba_pkg.sv`       | step and select encodings, frequency levels, bus structs, address map, event struct |
| `rtl/eba_dsa_top.sv`   | top: controller, multiplexer, caches, timers, buffer, `segblk`, port sharing |
| `rtl/arch_ctrl.sv`     | architecture controller                                      |
| `rtl/exec_mux.sv`      | execution-order multiplexer                                  |
| `rtl/stt_cache.sv`     | reduced-retention cache with monitor counters                |
| `rtl/retention_timer.sv` | real-time quarter-retention tick                           |
| `rtl/seg_buffer.sv`    | 4 KB segmentation buffer                                     |
| `rtl/segblk.sv`        | Pan-Tompkins segmentation block                              |
| `tb/tb_*.sv`           | self-checking testbenches, one per module plus the top       |
| `tb/tb_block_mem.sv`   | behavioural next-level memory used by the cache and top testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends it if it hangs. The package must come first on the command
line:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_segblk \
    rtl/eba_pkg.sv rtl/segblk.sv tb/tb_segblk.sv
./obj_dir/Vtb_segblk
```

For the whole design:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_eba_dsa_top \
    rtl/eba_pkg.sv rtl/arch_ctrl.sv rtl/exec_mux.sv rtl/retention_timer.sv \
    rtl/stt_cache.sv rtl/seg_buffer.sv rtl/segblk.sv rtl/eba_dsa_top.sv \
    tb/tb_block_mem.sv tb/tb_eba_dsa_top.sv
./obj_dir/Vtb_eba_dsa_top
```

What the testbenches check:

* **`tb_segblk`** runs three synthetic records of 8000 samples:
  * a regular beat with one weak beat, which only search-back recovers;
  * a faster heart rate;
  * a flat line.

  It compares every result word with an independent model of the detector,
  checks that each reported index is within the window after a true R-peak,
  and checks that all three runs take the same number of cycles (the
  formula above).
* **`tb_segblk_datasets`** runs three block instances side by side on
  synthetic records shaped like common ECG databases:
  * 20 s at 500 Hz, with every parameter at its default;
  * 40 s at 1000 Hz;
  * 40 s at 5000 Hz.

  The last two set `FS` to match their rate. It checks the beats found, the
  result layout, that search-back happens, and the cycle formula above. At
  the default 40-entry result array, only the first 40 beats of the longer
  records are reported.
* **`tb_stt_cache`** runs random traffic against a shadow memory, checks the
  hit latency, and checks retention: after three ticks, every one of the 256
  blocks is written back or invalidated, and main memory equals the shadow.
  It also checks that writing a block resets its counter.
* **`tb_exec_mux`** checks ordering across switches with randomly stalling
  backends.
* **`tb_seg_buffer`** checks contents and both latencies.
* **`tb_arch_ctrl`** checks every state's outputs and ignored flags.
* **`tb_eba_dsa_top`** takes the top at its default parameters through one
  whole authentication, about 3.2 M cycles and a few seconds:
  1. reads 1000 samples into the buffer;
  2. filters through the data cache;
  3. segments twice: once from the buffer, and once from a 3000-sample record
     in main memory with its result in the buffer, while a core load waits on
     the busy port;
  4. runs feature extraction and matching long enough for data-cache and
     instruction-cache retention to act.

  It counts each mechanism and fails if one never happened: every state, the
  four execution-order switches, out-of-order power-down, cache hits and
  misses, retention write-backs and invalidations, buffer accesses, QRS and
  search-back detections, interrupts, the port stall, and timer ticks at all
  four frequency levels.

## Where this RTL goes beyond the source

The architecture names these blocks and says what they do. It describes the
controller's states, its table and the cache organisation in detail. The
following are this design's own choices:

* the Pan-Tompkins constants and the learning pass of `segblk`;
* the word bus and the address map;
* the drain-then-switch rule of the multiplexer;
* the counter-clearing and scanning policy of the caches;
* replacement and write policy;
* the base configuration in S_WAIT and S_READ;
* the rounding of the buffer latencies to cycles.

Two known gaps:

* the buffer's retention is not modelled;
* the configuration table gives no timing per clock level, so the controller
  does not check that a phase really fits its time budget. Choosing the
  frequencies is left to whoever sets the table.
