# BLETC — beam loss monitor threshold comparator

Ionisation chambers along an accelerator measure beam losses. If the loss rate
gets too high over any time scale, from a 40 µs spike to a slow rise over a
minute and a half, the beam has to be dumped before magnets quench or get
damaged. This card receives the measurements of 16 detectors. For each one it
keeps twelve moving sums over windows from 40 µs to about 84 s. Every sum is
compared with a threshold that depends on the detector, the window and the
present beam energy. The beam permit is withdrawn as soon as one sum is
above its threshold.

It has to be fail-safe. Every measurement arrives twice, over two independent
optical links, and is protected by a CRC. Tunnel faults, link faults and
missing tables also withdraw the permit. The permit leaves the card as a
frequency rather than a level, so a dead output cannot look like "beam
permitted".

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) of the
card's processing FPGA, one self-checking testbench per block, and two
testbenches of the whole card at its default sizes: one walks through every
mechanism, the other is an exhaustive test of the threshold table.

## Data flow

```
          card 0: primary, redundant         card 1: primary, redundant
                     |                                   |
               +-----v-----+                       +-----v-----+
               |    rcc    |  CRC-32 per link,     |    rcc    |
               |           |  compare, select,     |           |
               +-----+-----+  status / ID checks   +-----+-----+
                     | 8 channels                        | 8 channels
     16 x  data_combine -> srs (RS01..RS12)   ... 192 running sums
                                   |
                          running-sum mux  <-- scan address
                       /                     \
       threshold_comparator             max_values (max of last second)
       (table: detector x energy x sum)
                  | 16 dump requests
           channel_masking ----------+
                  |                  |   error_status (link / tunnel failures)
           permit_output x 2  <------+
           un-maskable, maskable lines (square wave while permitted)

  table_loader: NV-RAM -> threshold table + masking table (power-on, on request)
  read-back of the loaded tables; error counters and an error strobe per link pair
```

There is a single clock domain. Link words arrive as 16-bit words with a
valid strobe. One "step" is one frame per tunnel card, nominally every 40 µs.
The rest of the design works on strobes, not on a fixed clock rate. At an
assumed 40 MHz a step is 1600 clocks: a frame needs 16 of them, and the
comparator sweeps all 192 sums every 192 clocks.

## Link frames and redundancy (`link_receiver`, `signal_select`, `rcc`)

A frame is 256 bits: 224 data bits and a 32-bit CRC remainder, sent as 16
words with the first word flagged by `sof`. The field layout is this design's
own choice. Only the 16-bit card ID, the frame ID, the 224 + 32 split and the
8 channels per tunnel card are fixed by the original system.

| bits    | field                                          |
|---------|------------------------------------------------|
| 255:240 | tunnel card ID                                 |
| 239:224 | frame ID (increments every frame)              |
| 223:64  | 8 channels; channel k at 64+20k: {counts[7:0], adc[11:0]} |
| 63:32   | tunnel status (any set bit is a fault)         |
| 31:0    | CRC-32 over bits 255:32                        |

The CRC is CRC-32 with polynomial 0x04C11DB7 and seed 0xFFFFFFFF, MSB
first, with no reflection and no final inversion. It is updated word by
word as the words arrive.

`rcc` pairs the frames of the two links. The first frame opens a window of
`PAIR_TIMEOUT` clocks. A link that sends nothing within it counts as a CRC
error. The choice between the two frames follows the original selection
table:

| CRC primary | CRC redundant | CRC remainders equal | use        |
|-------------|---------------|----------------------|------------|
| bad         | bad           | any                  | dump       |
| bad         | ok            | any                  | redundant  |
| ok          | bad           | any                  | primary    |
| ok          | ok            | no                   | dump       |
| ok          | ok            | yes                  | primary    |

Every row except the last also raises a software trigger, which is counted.
The selected frame is then checked:

- A non-zero tunnel status word requests a dump.
- A card ID different from `expected_card_id` is reported.
- A frame ID that is not the previous one plus 1 is reported as a lost frame.

A dumped pair reports its errors but gives no data (`data_valid` stays low),
so broken data never reaches the sums.

## From counts and ADC to charge (`data_combine`)

The tunnel front end measures with a current-to-frequency converter. An
integrator collects the detector charge, and every time it crosses its
threshold it is reset and a count is sent. A 12-bit ADC also reads the
integrator level, which gives a resolution finer than one count. In this data
the ADC reading *falls* as charge accumulates and jumps back up by about 4096
at each count.

So one step's charge is `counts*4096 + (previous level - present level)`.
The ADC is noisy, and `data_combine` filters that noise with a minimum-value
hold (MVH):

- **Without a count:** a reading below the MVH adds `MVH - adc` and becomes
  the new minimum. A reading at or above the MVH adds 0.
- **With counts:** the output is `counts*4096 + MVH - adc`. Here the
  difference is negative, because the level jumped up at the reset. The MVH
  is then reloaded with the new reading.

Noise that makes the reading go up and down therefore never adds charge
twice. Over a long run, the sum of the outputs equals the injected charge to
within the noise amplitude, and the testbench checks this. The difference is
kept as 13 signed bits: a 12-bit signed difference would wrap on every count.
The output is 20 bits.

## Moving sums from 40 µs to 84 s (`running_sum`, `srs`)

A moving sum over N steps does not need N adders. A shift register holds the
last N values, and an accumulator adds the new value and subtracts the one
leaving the window. `running_sum` does this for two windows that share one
buffer, a short one at tap `TAP` and a long one at `LEN`. The buffer is a
circular memory. Entries not yet written read as zero, so the memory needs no
reset.

An 84 s window would need 2^21 entries per channel, so the long windows are
built from sums of shorter ones. `srs` chains six stages. Each slow stage
stores one sum per refresh period of a faster stage:

| stage | fed with              | refresh (steps) | length | short window        | long window          |
|-------|-----------------------|-----------------|--------|---------------------|----------------------|
| SR0   | the 40 µs value       | 1               | 2      | RS01 = 1 (40 µs)    | RS02 = 2             |
| SR1   | the 40 µs value       | 1               | 16     | RS03 = 8            | RS04 = 16 (0.64 ms)  |
| SR2   | RS02, every 2nd step  | 2               | 128    | RS05 = 64           | RS06 = 256 (10 ms)   |
| SR3   | RS05, every 64th      | 64              | 256    | RS07 = 2048         | RS08 = 16384 (655 ms)|
| SR4   | RS07, every 2048th    | 2048            | 64     | RS09 = 32768        | RS10 = 131072 (5.2 s)|
| SR5   | RS08, every 16384th   | 16384           | 128    | RS11 = 524288       | RS12 = 2097152 (84 s)|

A stage is fed with a sum exactly when that sum covers a block of steps
disjoint from the previous one. Each entry of a slow register is therefore
the exact sum of one refresh period. A slow sum is exact at its refresh
instants and holds its value in between. This is the price of the scheme: a
window of 2^21 steps costs only 128 stored entries. The windows, refresh
periods and widths (20, 22, 22, 22, 26, 26, 32, 32, 36, 36, 40, 40 bits)
come from the original configuration table. Which sum feeds which stage
follows from them. Per channel the buffers take 15,976 bits; for 16 channels,
about 256 kbit.

The widths are sized for at most 2^18 per step. At exactly that value on
every step, RS04, RS06 and RS08 reach 2^width and wrap to 0. The shorter sums
are over threshold long before then, but the widths are worth widening if
that case matters.

## Thresholds, masking and the permit lines

**`threshold_comparator`** holds one threshold per detector, energy level and
sum: 16 × 32 × 12 = 6144 values, 262,144 bits in all.

- RS01–RS08 use 32-bit thresholds; RS09–RS12 use 64-bit ones.
- The comparator sweeps the 192 (detector, sum) pairs, one per clock, through
  the running-sum multiplexer, using the threshold of the present
  `beam_energy` (5 bits).
- A sum strictly greater than its threshold marks the detector.
- At the end of each sweep the marks become `dump_req`. Requests are not
  latched beyond a sweep; latching the dump is left to the interlock system.

**`channel_masking`** applies the masking table (two bits per detector):

- Requests of unconnected detectors are ignored.
- A maskable detector withdraws the maskable permit.
- An un-maskable detector withdraws both permits, so masking can never hide
  it.
- Both permits are withdrawn while the tables are not loaded.

Masking itself, which is allowed only with a safe beam, is done by the
interlock system that receives the maskable line.

**`error_status`** counts every error flag of both link pairs in saturating
16-bit counters, and also counts frames. It gives a one-clock strobe on `err_out`
for every frame pair that carried any error; this is meant for a TTL output or
for triggering a logic analyser. It withdraws both permits while the
last frame of either pair requested a dump (both links bad, CRC mismatch,
tunnel fault), and until both pairs have delivered a frame.

**`permit_output`** drives one daisy-chained permit line. The output is a
square wave with a half period of `DIV` clocks while the previous card's
permit and this card's permit are both given. Otherwise the line is held low.
The receiver sees a missing frequency as a dump request. The frequency and the
level-coded input from the previous card are this design's choices.

## Tables (`table_loader`)

After reset, and on `reload_req` (the request from the combiner card), the
loader reads NV-RAM words 0..8192, one per clock. The NV-RAM is assumed to
return data one clock after the read.

| NV-RAM word  | content                                               |
|--------------|-------------------------------------------------------|
| 0..4095      | 32-bit thresholds, index {detector[3:0], energy[4:0], rs[2:0]} (RS01..RS08) |
| 4096..8191   | 64-bit thresholds as {index, half}, half 0 = low word, index {detector, energy, rs-8} |
| 8192         | masking: bits 15:0 connected, bits 31:16 maskable     |

`table_ok` is low during a load, so both permits are withdrawn while the
tables are incomplete. A load takes 8195 clocks.

The tables in use can be read back through `tbl_rd_addr` / `tbl_rd_data`, with
the same word map and one clock of latency. The control system uses this to
compare what the card actually holds with the master copy.

## MAX values (`max_values`)

`max_values` watches the same sweep as the comparator. For every detector and
sum it keeps the maximum of the current second (`SAMPLES_PER_SEC` = 25000
steps of card 0). The first sweep after a second ends moves the maxima to a
readout store. The value present at that boundary counts for both seconds.
Reads go through `max_rd_addr = {detector, rs}`; the value is 0 until a first
second has been published.

## Top-level interface (`blm_tc_top`)

| port | dir | meaning |
|------|-----|---------|
| `rx_valid/rx_sof/rx_word/rx_code_err[card][link]` | in | decoded link words from the transceivers, link 0 primary, 1 redundant |
| `expected_card_id[card]` | in | tunnel card IDs to expect |
| `beam_energy[4:0]` | in | energy level, selects the threshold set |
| `nv_addr, nv_rd / nv_rdata` | out / in | NV-RAM read port |
| `reload_req` | in | reload the tables |
| `tbl_rd_addr / tbl_rd_data` | in / out | read-back of the loaded tables (NV-RAM word map) |
| `permit_in_unmask, permit_in_mask` | in | permits from the previous card of the chain |
| `permit_out_unmask, permit_out_mask` | out | permit lines (square wave while permitted) |
| `dump_req[15:0], table_ok` | out | per-detector requests of the last sweep, tables loaded |
| `max_rd_addr / max_rd_data, max_second_done` | in / out | MAX values readout |
| `status` | out | error counters, frame counters, failure flags (`blm_pkg::status_t`) |
| `err_out[card]` | out | one-clock strobe for each frame pair with an error |

Parameters: `PERMIT_DIV` (4), `SAMPLES_PER_SEC` (25000), `PAIR_TIMEOUT` (64).
The sizes (16 detectors, 12 sums, 32 energies, frame format) are constants in
`blm_pkg`.

Latency: a frame pair reaches the data path 2 clocks after its later frame
completes. A sum that crosses its
threshold is seen within one sweep (192 clocks). The permit lines follow 2–4
clocks after the sweep.

## What is not here

- **Transceivers (8b/10b, clock recovery):** external chips. Their decoded
  words, start-of-frame and error flags are ports of the top.
- **NV-RAM, external SRAMs, the VME bus interface and FPGA configuration:**
  not built. The NV-RAM read port and the readout ports are plain signals.
- **Post-mortem, capture, XPOC and collimation buffers:** only their existence
  is known, so they are not built. They would read the same running sums as
  `max_values`.
- **Warning levels next to the thresholds:** the original tables show them,
  but their use is not described, so they are not built.
- **Transceiver clock domains:** not modelled. The link words are assumed to
  be on the system clock already.

## Design choices to be aware of

These are choices made where the original description gives no detail:

- The frame layout and the CRC conventions.
- The pairing window.
- Which errors request a dump: select dump and tunnel fault do; card ID and
  frame ID errors are only counted.
- The MVH update rule and the 13-bit difference.
- The strict `>` comparison.
- Un-maskable requests withdraw both lines.
- Permits are withdrawn while the tables load.
- The NV-RAM layout.
- The permit frequency.

Each is also stated in the opening comment of its module.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. It has a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/blm_pkg.sv tb/tb_pkg.sv tb/tb_blm_tc_top.sv --top-module tb_blm_tc_top -o sim
obj_dir/sim
```

Replace `tb_blm_tc_top` with any other testbench.

| testbench | what it checks |
|-----------|----------------|
| `tb_blm_tc_top` | whole card at default parameters. It covers: table load, normal operation, maskable, unconnected and un-maskable detectors over threshold, energy change, each link fault, lost frame and wrong card ID, broken daisy chain, a 64-bit RS09 threshold, table reload, read-back of all 8193 table words, and a full second (25,005 steps) of MAX values. Each mechanism is counted, and one that never occurs fails the test. About 1 s. |
| `tb_tc_exhaustive` | the whole card at default parameters. Each of the 6144 threshold fields is changed alone and the table is reloaded through `reload_req`. With the threshold one below the frozen sum, exactly that detector must request a dump, and the permits must follow the masking. With the threshold equal to the sum at the next energy, nothing must be requested. The changed words are read back after each load. About 1 min. |
| `tb_srs` | 2,228,224 random steps through the full-size SRS; all 12 sums compared with a prefix-sum reference after every step. About 6 s. |
| `tb_link_receiver`, `tb_rcc`, `tb_signal_select` | frame assembly, CRC, every selection row, timeouts, ID and status checks |
| `tb_data_combine` | an integrator model with noise; each output and the total charge |
| `tb_running_sum`, `tb_threshold_comparator`, `tb_channel_masking`, `tb_max_values`, `tb_error_status`, `tb_table_loader`, `tb_permit_output` | each block against an independent reference |

`tb/nvram_model.sv` is a behavioural NV-RAM. `tb/tb_pkg.sv` builds frames with
a bit-serial reference CRC.

## Files

- `rtl/blm_pkg.sv`: constants, frame layout, types, the word-wise CRC step.
- `rtl/<block>.sv`: one module per file; `blm_tc_top.sv` is the top.
- `tb/`: testbenches, the frame helper package and the NV-RAM model.
