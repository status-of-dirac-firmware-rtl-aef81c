# Zero-suppressed data packaging for a 20-channel calorimeter digitiser

This RTL is the data path of the FPGA on a 20-channel waveform digitiser board for a
crystal calorimeter. Each channel is sampled continuously at 12 bits. Only the pieces of
waveform that contain a pulse ("hits") are worth keeping, and the board could not store or
ship the raw stream. So every channel runs a zero-suppression pipeline that:

- recognises a pulse by its peak;
- keeps the baseline before it and the tail after it;
- merges pulses that pile up on each other;
- appends a short footer with the hit's time, peak position and length.

The hits of all 20 channels that fall into one *event window* are then gathered into one
event: a header word followed by the channels' data, in 256-bit words. The event goes into
a large FIFO, and from there into external DDR memory. Later, the readout system asks for
an event by its tag, and the board reads that event back from DDR and sends it out.

```
 adc[0..19] ─► 10 × adc_handler ─────────────────────────────────► event_builder ─► whole event FIFO ─► event_store
 (12 bit)      └ 2 × channel_handler                               (252-bit mux,     (256 × 500)         (ring buffer
                  zs_shift_register ─► hit_preproc ─► word_packer   header, parity)                       + tag index)
                  zs_pileup ─────────┘   (12-bit mux)  (21 × 12 b)                                         │      ▲
                                                   ─► channel FIFO (252 × 48)                mem_* ports ◄─┘      │
                                                                                     (DDR controller)  req_*/resp_* ports
 ew ─► ew_delay (25 clk) ─► all channels          event_tag ─► tag queue in event_builder   (data requests)
```

Everything runs on one clock, the ADC sample clock. The board's link interface, DDR
controller, DDR memory, LVDS receivers and slow control are not part of this RTL. Their
signals are the ports of `dirac_top`.

## What a hit is

Picture a pulse on a flat baseline. A hit consists of:

1. The **17 samples before the peak**, so that the baseline level and the whole rising
   edge are kept.
2. The **peak**.
3. **Every following sample until the waveform has been under threshold for four
   consecutive samples.** Those four samples are not stored. The last stored sample is the
   last one that was not yet part of that run of four.

The peak must be over threshold. It is a local maximum over a five-sample neighbourhood:
greater than or equal to its direct neighbours, and strictly greater than the samples two
away. A flat top of two equal samples therefore still counts as one peak. A plateau three
or more samples wide is not a peak.

### How the shift register does it

Each channel pushes its samples through a 21-entry shift register
(`zs_shift_register`). A sample enters at position 20 and leaves at position 0. The three
tests are combinational on fixed taps:

| signal      | condition                                                    |
|-------------|--------------------------------------------------------------|
| `peak_flag` | pos17 ≥ pos18, pos17 ≥ pos16, pos17 > pos15, pos17 > pos19    |
| `thr_flag`  | pos17 ≥ threshold                                            |
| `thr_low`   | positions 0, 1, 2 and 3 all < threshold                      |

When a peak over threshold sits at position 17, positions 0..16 hold exactly the 17 samples
before it. So a hit is written by copying position 0 to the output, one sample per clock,
from the clock the peak is seen at position 17 until the end condition holds. The end
condition is `thr_low`, looked at where the samples leave the register. Nothing is stored
twice and no extra buffer is needed for the pre-peak samples.

### Why the end-of-hit test must be blinded (`zs_pileup`)

When the hit starts, positions 0..3 hold baseline, which is under threshold. `thr_low` is
therefore true at once and would end every hit on its first clock. For this reason, a peak
over threshold at position 17 switches the pile-up state machine from `WAIT_PEAK` to
`BLIND_TH` and loads a 17-clock counter. `blind` stays high until the peak itself has left
through position 0, and only then may `thr_low` end the hit.

The same mechanism merges pile-up. A second peak that reaches position 17 while the first
hit is still being written reloads the counter. This happens if the second peak arrives
within 17 samples of the waveform dropping under threshold, because those
under-threshold samples have not yet reached positions 0..3. The end of the hit is pushed
past the second peak, so both pulses end up in one longer hit. Recording one merged hit
costs less bandwidth than two hits that would each carry 17 baseline samples.

### The footer (`hit_preproc`)

While the hit streams out, `hit_preproc` keeps:

- the number of samples written;
- the largest sample so far and its index within the hit (first occurrence on ties);
- the hit time: the clock count since the start of the event window, on the clock the
  first sample was written.

After the last sample it appends five 12-bit words through the same 12-bit multiplexer:

| word | content                                                    |
|------|------------------------------------------------------------|
| 1    | hit time                                                   |
| 2    | peak position (17 for a clean single pulse)                |
| 3    | number of samples                                          |
| 4    | error flag word, constant `0x555`                          |
| 5    | end word, constant `0xFFF`                                 |

The state machine is `WAIT_OT → WRITING → FOOTER → WAIT_OT`. The footer takes five clocks,
and the samples leaving position 0 during them are not stored. A peak that reaches
position 17 during those five clocks is remembered, and its hit starts as soon as the
footer is done. That hit then carries 12 to 16 pre-peak samples instead of 17. A hit that
reaches 4095 samples is closed so that its length fits the 12-bit field.

## From 12-bit words to event words

**Rows.** `word_packer` collects 21 twelve-bit words into one 252-bit row:

- the first word goes in bits 251:240;
- a row is written to the channel FIFO when all 21 slots are full, or after the end word
  of a hit;
- a new hit always starts in slot 0;
- the slots after the end word in a partial row keep whatever they held before, and
  readers find the end of a hit from the `0xFFF` end word and the sample count.

21 × 12 = 252 bits is the widest whole number of samples that fits in the 256-bit words of
the DDR side.

**Channel FIFO.** Each channel has a 252 × 48 FIFO. A row that finds it full is dropped,
and the event is flagged as overflowed.

**Event windows.** `ew` is a level that is high during each event window. It reaches the
channels through a 25-clock delay (`ew_delay`). In each channel:

- the rising edge restarts the hit-time counter;
- hits may start only while the window is high;
- a hit that is still running when the window falls is finished;
- after the window falls and the last row of that hit is in the FIFO, the channel *closes*
  the event: it queues (rows, hits, overflow flag) for that event in a 4-entry queue;
- if that queue is full, closing waits and no new hit starts.

**Event builder.** The tag of each event arrives with the rising edge of the undelayed
`ew` and is queued (8 entries). Once every channel has closed its oldest event and a tag is
waiting, `event_builder` writes one header word. It then writes channel 0's rows for that
event, then channel 1's rows, and so on up to channel 19, one word per clock. Finally it
removes the event from all queues. The builder stalls while the whole event FIFO is full.

Each 256-bit event word is `{parity[3:0], payload[251:0]}`. `parity[i]` is the even parity
of `payload[63*i +: 63]`. The header payload is:

| bits      | field                                                       |
|-----------|-------------------------------------------------------------|
| 251:204   | event tag (48 bits)                                         |
| 203:188   | total data rows in this event                               |
| 187:68    | rows of channel c in bits `187-6c -: 6`, c = 0..19           |
| 67:48     | overflow flag of channel c in bit `67-c`                     |
| 47:0      | zero                                                        |

The header gives the number of rows of each channel, so a reader can split the event
without parsing the hits. Within a channel's rows, hits follow each other, and each hit ends
with its footer.

**Whole event FIFO.** 256 × 500, first-word-fall-through. The event store empties it
whenever the memory accepts a write.

## Storing events and answering data requests (`event_store`)

The memory is seen as 2^24 words of 256 bits (4 Gbit). Events are written to consecutive
addresses, and the address wraps at the end, so the oldest events are eventually
overwritten. The store counts off each event from its header: the total-row field says how
many words follow.

When the last word of an event has been accepted, the store writes an index entry
{tag, start address, length}. The entry goes into a direct-mapped table of 8192 entries,
addressed by the low 13 bits of the tag. With consecutive tags, the last 8192 events can
be found. An event whose tag shares those bits with a later event is no longer found.

The write pointer also counts laps of the ring in 8 extra bits. An event becomes a miss
once more than 2^24 words have been written since its first word, because its start has
then been overwritten. Two cases go undetected: an entry left untouched for 256 laps, and
writes that overtake an event while it is being read.

A data request carries a 48-bit tag, and the store serves one request at a time:

- `req_ready` is high when the store can take a request.
- On a hit, the store issues one read per word of the event. The returned words go out
  on `resp_data` with `resp_valid`, and `resp_last` marks the final word.
- On a miss, a single zero word goes out, with `resp_valid`, `resp_last` and `resp_miss`
  all high.
- The response stream has no back-pressure.

Towards the DDR controller there are two request ports, each a valid/ready handshake:

- the write port carries address and data;
- the read port carries an address.

Read data comes back on `mem_rdata_valid`, in request order, at least one clock after its
request. Only the table's valid bits are reset, so the table itself can be block RAM
(about 800 kbit).

## Parameters (defaults)

| module            | parameter   | default | meaning                                      |
|-------------------|-------------|---------|----------------------------------------------|
| `dirac_top`       | `N_CH`      | 20      | channels                                     |
|                   | `CH_PER_HDL`| 2       | channels per `adc_handler`                   |
|                   | `CH_DEPTH`  | 48      | rows per channel FIFO                        |
|                   | `EVF_DEPTH` | 500     | words in the whole event FIFO                |
|                   | `EW_DELAY`  | 25      | event-window delay, clocks (at least 2)      |
|                   | `TAG_W`     | 48      | event tag width                              |
|                   | `EVQ_DEPTH` | 4       | closed events a channel can queue            |
|                   | `ADDR_W`    | 24      | DDR word address bits (4 Gbit of 256-bit words) |
|                   | `IDX_BITS`  | 13      | tag index size, 2^13 entries                 |
| `zs_pkg`          | constants   |         | 12-bit samples, 21 positions, peak at 17, 4 under-threshold samples, 17-clock blind window, footer words |

The threshold `thr` is an input, meant to be set by slow control.

## Where this RTL follows its source and where it chooses

The following come from the firmware description this RTL was built from:

- the 21-position shift register;
- the peak and under-threshold taps;
- the 17 pre-peak samples and the four under-threshold samples;
- the blind window that runs until the peak reaches position 0, and the resulting pile-up
  merge;
- the hit fields (time, number of samples, peak position, error flag);
- the 21 × 12-bit registers and 252 × 48 channel FIFOs;
- the 252-bit multiplexer with event header insertion and parity;
- the 256 × 500 whole event FIFO;
- 20 channels grouped in ten handlers;
- a 25-flip-flop event-window delay;
- storing events in DDR, seen as a 256-bit-wide memory of 4 Gbit, and reading an event
  back when it is requested by its tag.

The following are this implementation's own choices:

- **Footer order and constants.** They are read from a dump of FIFO words: three fields,
  the middle one 17, then `0x555` and `0xFFF`. The error flag's meaning was still open in
  the source, so it is the constant `0x555`.
- **Header layout, the 4 × 63-bit parity split and the 48-bit tag.**
- **Event bookkeeping.** The close-after-window rule and the (rows, hits, overflow)
  queues. The source does not say how the multiplexer knows which rows belong to an event.
- **Hit time reference.** The clock count when the first sample is written. This differs
  by a fixed offset from the time the sample was taken.
- **Peaks during a footer.** Such a hit starts after the footer with fewer pre-peak
  samples.
- **The 25-clock delay.** It is taken from the delay block's size. What it aligns the
  window with is not known.
- **How events are found in DDR.** The ring buffer, the direct-mapped tag index, the miss
  word and the request handshakes. The source names only the function.
- **Drop-on-full behaviour and all reset behaviour.**
- **One clock.** The DDR side runs at 166 MHz. The clock crossing would sit at the memory
  request ports, which is left to the DDR controller.

Not built:

- **ADC LVDS receiver and deserialiser.** This RTL takes parallel 12-bit samples.
- **DDR controller and DDR memory.** The write side takes 256-bit words at 166 MHz, and the
  memory is 32 bits wide at 1333 MHz. The event store uses a generic request interface in
  their place. In simulation, `tb/ddr_model.sv` stands in for both.
- **Link interface.** It delivers the event window, the tag and the data requests, and
  sends the answered words out over the optical link.
- **Slow control.**
- **Two small blocks of unknown function** that appear only by name in a resource report.
- **The pattern-generator board** used for hardware stress tests.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The central piece is `tb/zs_ref_pkg.sv`. It is a
clock-by-clock behavioural model of one channel, written as a plain loop over recorded
inputs rather than as registers. It returns the rows the channel FIFO must receive,
grouped by event, and the footer fields of every hit.

- `tb_zs_shift_register`, `tb_zs_pileup`, `tb_word_packer`, `tb_sync_fifo` and
  `tb_ew_delay` check their blocks against histories or queues kept in the testbench.
  `tb_sync_fifo` uses both the 48-deep and the 500-deep sizes.
- `tb_hit_preproc` compares every 12-bit word against the model. It covers merged
  pile-up, a hit started during a footer, and a hit cut at 4095 samples.
- `tb_channel_handler` and `tb_adc_handler` compare FIFO rows and per-event counts with
  the model. The channel test also fills a small FIFO to check the overflow flag, and has a
  hit still running when its window closes.
- `tb_event_builder` drives 40 random events through all 20 channel inputs, with random
  full stalls and tags arriving ahead of data. It checks every output word.
- `tb_event_store` uses a 256-word memory and a 64-entry index, so that the address wraps,
  tags collide, and indexed events get overwritten. It writes 160 events of random length, some with repeated tags, with
  random gaps and memory stalls. During writing it requests recent events, including
  every event that straddles the wrap when it can. Afterwards it requests every tag, plus
  tags never sent. Overwritten events must be answered with a miss. Hit or miss and every returned word are predicted in the testbench.
- `tb_dirac_top` runs the whole design at its default sizes, with the DDR model behind
  the event store.
  - It runs eight event windows of random pulses on all channels. The events are then
    fetched back from the DDR model by data requests for their tags. Every word fetched
    is compared with the model: header, rows in channel order, and parity. A request for
    a tag never sent must be answered with a miss.
  - It then runs one window in which a single channel receives a hit of about 70 rows. The
    header must report 48 rows and the overflow flag for that channel.
  - It counts hits, pile-up merges, footer-time starts, multi-row hits, builder stalls on
    a full event FIFO, dropped rows and overflow headers, and fails if any count is zero.

- `tb_event_list` fills the event store at its default sizes with 7000 events of 0 to
  200 rows, about 714,000 words. It then fetches every event back by its tag, in shuffled
  order, and checks each word.
- `tb_stress` is a load test of the whole design at default sizes. It runs 228 event
  windows back to back, with the DDR model taking a write on only 5 clocks out of 6.
  - The first 100 windows carry 3 to 6 pulses per channel, a third of them piled up.
  - The other 128 windows carry two-level square waves: 2 samples high, then 8 to 30
    samples at a lower level. A pattern generator board can produce such stimulus.
  - Every event is fetched back by its tag and compared with the model. No row and no
    tag may be lost.
  - At this load the whole event FIFO peaks at 25 to 30 of its 500 words.

Simulate one testbench with Verilator 5 like this, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/zs_pkg.sv tb/zs_ref_pkg.sv rtl/*.sv tb/ddr_model.sv tb/tb_dirac_top.sv \
    --top-module tb_dirac_top -o sim
./obj_dir/sim
```

The same command line works for any testbench. `tb_dirac_top` builds in about 15 s and
runs in well under a second.

Not verified:

- synthesis timing on a real FPGA;
- behaviour with real detector waveforms;
- a real DDR controller's interface and timing; the memory side was only run against the
  behavioural model.
