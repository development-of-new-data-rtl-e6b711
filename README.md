# 8b10b link between a pixel-module emulator and a back-of-crate decoder

A pixel detector module of the ATLAS Pixel Detector (FE-I3 front-end chips
behind a Module Control Chip, MCC) sends its events to the read-out driver
(ROD) as a raw serial bit stream at 40 Mbit/s. The raw stream has no
framing, no DC balance and no error detection. A transmission error shows
up only when the ROD fails to parse an event.

This RTL puts an 8b10b link into that path without changing either end.

- **Module side.** An FPGA **module emulator** answers Level-1 trigger
  commands with MCC-format events. It sends every event twice: raw on one
  output line and 8b10b encoded, framed by start and end words, on the
  other.
- **Back-of-crate side.** A **decoding unit** inside the routing FPGA of the
  electrical back-of-crate card (eBOC) finds the frames and decodes them.
  It buffers each event and replays it towards the ROD as the exact raw
  bit stream the ROD already understands. A running-disparity monitor
  pulses a spare ROD channel whenever the encoded stream breaks the 8b10b
  rules.

Everything runs on one 40 MHz clock, one bit per clock per line.

The structure follows the laboratory set-up of a bachelor's thesis, *Development
of new data transmission methods for the read-out system of the ATLAS Pixel
Detector*. The thesis gives the dataflow, the formats, the FIFO sizes and the
expected latency. Much of the cycle-level behaviour is this design's own
choice. The section "Own choices and departures" lists what comes from where.

```
            module emulator (mcc_emulator)                        eBOC (eboc)
 DTI ─► level1_detector ─► fei3_event_emulator ─┬─ raw ─────────► DTO1 ──────────────► (plain channel) ─► ROD
                            (trigger buffer,    │
                             event generator)   └► mcc_deserializer ─► frame_builder ─► word_serializer ─► DTO0
                                                   (bytes + FIFO)      (+encoder_8b10b,   (10 bit, MSB first)
                                                                        SOF/data/EOF/idle)     │
 word_clock_enable: one tick per 10 clocks = word slot                                         ▼
                                                                                    decoding_unit (channel DEC_CH)
   stream_analyser ─ start/stop ─► ebc_deserializer ─► decoder_8b10b ─► Event Data FIFO (8 x 32)
     (SOF hunt, EOF,                      │                                    │
      byte count) ──── length ────────────┼──────────────► Event Length FIFO   │
                                          ▼                        │           ▼
                                  decoding_monitor ─► debug   ebc_serializer ──► decoded raw stream ─► ROD
                                  (running disparity)   (channel DBG_CH)
```

`readout_chain_top` contains one `mcc_emulator` and one `eboc`. The cables and
the patch panel between them are left as ports, so a testbench or a board wires
them up.

## The raw event (MCC format)

An event is a run of fields. Each field except the header ends with a **sync
bit `1`**. Every field is sent MSB first.

| field | bits | content |
|---|---|---|
| lead | `LEAD_BITS` (2) | zeros sent after `sending_event` rises, before the header |
| header | 5 | `11101` |
| L1 word | 8 + 1 | skipped-trigger count [7:4], Level-1 ID [3:0] |
| BCID | 8 + 1 | bunch-crossing counter at the trigger |
| FE word | 8 + 1 | `1110`, FE chip number [3:0] |
| hit × N | 22 each | Row (8), Column (5), ToT (8), sync |
| trailer | 22 | zeros |

Head (header to FE word) = 32 bits. Hit = 22 bits.

- **Trailer.** A sync `1` followed by 22 zeros cannot occur inside the data.
  That is how any receiver, including the testbenches, cuts events out of a
  stream.
- **Idle line.** The raw line is 0 between events.
- **Hit contents.** They are arbitrary but predictable. Hit *i* has Row = *i*
  mod 240, Column = *i* mod 24, ToT = (7*i* + 16·L1ID) mod 256.
- **Hits per event.** A push button (`hit_step`) steps the count 1, 2, …,
  15, 0, 1, …

Triggers queue in a 16-entry buffer. The Level-1 ID and the BCID are taken at
trigger arrival. A trigger that finds the buffer full is dropped and counted;
the count goes out in the top nibble of the next event's L1 word.

## 8b10b as used on the link

Each byte HGFEDCBA becomes ten bits `abcdei fghj`. The 5b/6b part codes EDCBA
(x) and the 3b/4b part codes HGF (y).

**Running disparity (RD).**

- RD is −1 or +1 and starts at −1. Each 6-bit or 4-bit sub-block is either
  balanced or exists as a pair of forms with one more 1 or one more 0 than
  balanced, and a whole word has a disparity of 0 or ±2.
- The encoder picks the form that pulls RD back. The stream therefore never
  drifts, and runs of equal bits stay at five or fewer.
- The alternate code A7 (`0111`/`1000` for y = 7) replaces the normal one after
  x = 17, 18, 20 at RD− and after x = 11, 13, 14 at RD+.

**Bit order.** In this RTL a word is `logic [9:0]` with `a` in bit 9. `a` is
sent first. RD is a single bit: 0 = RD−, 1 = RD+.

**Control words.** The RD+ form of a control (K) word is the bitwise
complement of its RD− form. The link uses three K words:

| symbol | byte | role | RD− form |
|---|---|---|---|
| K.28.7 | `0xFC` | start of frame (SOF) | `0011111000` |
| K.28.5 | `0xBC` | end of frame (EOF) | `0011111010` |
| K.28.1 | `0x3C` | idle between frames, filler inside one | `0011111001` |

**Frame.** A frame on DTO0 is SOF, the event bytes, then EOF. The event bytes
are the raw stream, lead and trailer included, cut into bytes without regard to
field boundaries. The last byte is padded with zeros.

**Idle words.** K.28.1 words fill the line between frames; it is unbalanced, so
consecutive idles alternate forms by themselves. If the emulator's byte FIFO is
momentarily empty inside a frame, a K.28.1 filler goes out. The receiver
ignores control words other than EOF inside a frame.

**Finding word boundaries.** The receiver finds them by searching for the SOF
pattern at every bit position. The `0011111` / `1100000` comma cannot appear
across the boundary of two valid data words.

## Module emulator (`mcc_emulator`)

- **`level1_detector`** shifts the DTI command line into a 5-bit register.
  When the register holds `11101`, it emits a one-clock `lv1` pulse and clears
  itself.
- **`fei3_event_emulator`** holds the trigger buffer, the BCID and Level-1 ID
  counters (cleared by `bcr`, `ecr`) and a field sequencer. The sequencer
  loads one field at a time into a shift register and sends it on `raw_out`.
  - `sending_event` is high from the first lead bit to the last trailer bit.
  - A new event may start only when `start_ok` is high. `start_ok` is the
    frame builder's `idle`, which is true once the previous frame's EOF has
    gone out. So events never overlap and a frame holds exactly one event.
- **`mcc_deserializer`** shifts raw bits into bytes while `sending_event` is
  high and writes them into a FIFO (`FIFO_DEPTH` = 1024). Bytes enter every
  8 clocks but leave every 10, so the FIFO peaks at about one fifth of an
  event. `busy` covers the zero-padded last byte, which is written one clock
  after `sending_event` falls.
- **`word_clock_enable`** divides the 40 MHz clock by 10. `tick` marks a word
  slot and `pre_tick` comes one clock earlier. The word rate is a clock
  enable, not a second clock.
- **`frame_builder`** chooses one word per slot: idle, SOF, a data byte or
  EOF. It keeps the RD register for the combinational `encoder_8b10b`.
  - Data bytes are requested at `pre_tick` because the FIFO read is
    registered.
  - EOF is sent when the deserializer is no longer busy and its FIFO is
    empty.
- **`word_serializer`** is the two-register serializer. `cw_load` writes the
  chosen word into Data_In. At `tick` the word moves into the Data_Out shift
  register, which then shifts towards its MSB; the MSB is the output. The
  serializer adds one word (10 clocks) of latency.

DTO1 is the raw stream itself. DTO0 is the encoded stream. Each event byte costs
10 bit periods on DTO0 against 8 on DTO1, so DTO0 falls 2 bit periods further
behind per byte.

## Decoding unit (`decoding_unit`)

This is the part with the least obvious timing.

1. **`stream_analyser`, hunting.** It keeps a 10-bit window of the incoming
   encoded bits. When the window equals SOF, in either RD form, it pulses
   `start` and enters FRAME. `sof_rd_pos` records which form was seen.
2. **`ebc_deserializer`.** `start` marks the *next* bit on the line as bit
   `a` of the first word inside the frame. From then on every 10 bits become a
   `word` with a one-clock `word_valid`.
3. **`decoder_8b10b`** is combinational and table based. It returns the byte
   and a K flag and does no error checking; that job belongs to the monitor.
4. **`stream_analyser`, in FRAME.**
   - A data word is written into the **Event Data FIFO** (8 bits × 32) and
     counted.
   - A K word other than EOF is ignored.
   - EOF stops the deserializer and writes the byte count into the **Event
     Length FIFO** (4 entries).
5. **`ebc_serializer`** waits for a length entry. It then reads exactly that
   many bytes and shifts them out MSB first, one bit per clock, with no gap
   between bytes. The next byte is requested two clocks before the current one
   ends. The output is 0 between events. The ROD therefore sees the original
   raw event, lead zeros and trailer included.
6. **`decoding_monitor`** runs alongside, on the same words.
   - RD is seeded from the SOF form.
   - Legal words: a balanced word, a +2 word at RD−, or a −2 word at RD+.
   - Anything else raises `debug` for one clock. This covers a word of the
     wrong sign for the current RD and any word with |disparity| > 2. RD
     then follows the received word, so one fault is reported once.
   - A single flipped bit changes the disparity sum by 2. It is therefore
     caught at the latest at the next unbalanced word, and EOF is always
     unbalanced.
   - The monitor does not check code-table validity. A bit error that lands
     on another valid word of the right disparity shows up only through that
     later RD mismatch.

### Store and forward

An event leaves the unit only after its EOF has arrived. This is what makes
the decoded output a faithful copy of the raw line: its bits leave without
gaps, and bytes that arrived with fillers between them go out back to back.
It also limits the event size to the 32-byte data FIFO.

- The FIFO holds 2 + 32 + 22·N + 22 bits, rounded up to bytes.
- N = 9 hits needs 254 bits (32 bytes) and fits.
- N = 10 needs 276 bits (35 bytes) and does not.

A byte that finds the FIFO full is dropped and `overflow` pulses once per
dropped byte. The stored length counts only the kept bytes, so the ROD gets a
truncated event and later events are unaffected.

An EOF that finds the length FIFO full is lost and also pulses `overflow`.
Its bytes then stay in the data FIFO and spoil the next event. At the
default sizes this cannot happen with the emulator's traffic:

- The shortest event is 7 bytes, which take 90 clocks to arrive (9 words).
- Replaying those bytes takes 56 clocks.
- So at most one or two lengths are ever waiting, and the length FIFO holds
  four.

### Latency

The decoded event starts later than the raw event by:

- 10 bit periods for every event byte (2 for the wider encoding, 8 for the
  buffering of the byte in the eBOC);
- 10 for the SOF;
- a constant.

That is 27.5 bit periods per hit (22 bits = 2.75 bytes). The end-to-end
testbench fits 27.51 bit/hit with an offset of about 114 bit periods over
1 to 9 hits.

- At 1 to 2 hits, a typical occupancy, the added delay is tens of bit periods.
- Calibration-sized events (1440 hits) would add about 40 kbit (about 1 ms).
  They do not fit the 32-byte buffer at all.

## eBOC routing (`eboc`)

32 command lines go from the ROD to the modules, and 32 data lines from the
modules to the ROD. Each passes through one register. Two data channels are
changed:

- **`DEC_CH` (0)** enters the decoding unit; the ROD receives the decoded
  stream on the same channel.
- **`DBG_CH` (2)** carries the monitor's `debug` pulse instead of module
  data.

`overflow` and `debug` are also brought out as ports.

## Own choices and departures

What the thesis gives is described above. The following points are decisions
of this RTL:

- **Clocking.**
  - A single 40 MHz clock with a divide-by-10 enable replaces the FPGA clock
    manager that made a 4 MHz word clock.
  - Reset is synchronous and active low everywhere.
- **Speed modes.** Only the 40 Mbit/s mode is built. The eBOC's 80 and
  160 Mbit/s channel splitting is not.
- **Emulator details.**
  - Two lead zeros before each header.
  - A 16-entry trigger buffer with skipped-trigger counting.
  - Zero padding of the last byte.
  - The `start_ok` rule that keeps one event per frame.
  - K.28.1 filler inside a frame.
  - The hit contents.
  - The initial hit count of 1.
  - A 1024-byte FIFO.
- **Decoding-unit details.**
  - An Event Length FIFO of 4 × 8 bits.
  - Dropping bytes on a full FIFO.
  - Skipping zero lengths.
  - The serializer's prefetch timing.
  - RD resynchronisation after an error.
  - The channel numbers 0 and 2.
- **Serializer shift direction.** The serializer shifts towards its MSB and
  outputs the MSB, so that bit `a` goes first.
- **Hand-written tables.** The 8b10b decoder and encoder are written from the
  code tables (the 5b/6b table is the standard one). No third-party core is
  used.
- **One FE chip per event.** The MCC format can group hits of several FE
  chips in one event, each group opened by its own FE word. Here every event
  carries one FE number (`fe_id`) and all its hits.
- **No flag word.** The 21-bit MCC/FE flag word of the format (it starts with
  `11111`) is never generated.
- **Serializer without a FIFO.** The emulator serializer holds a single
  Data_In register, not a FIFO of words. The frame builder delivers exactly
  one word per slot, so a deeper buffer would never fill.
- **Not modelled.** The MCC's configuration commands.
- **Passive parts.** The LVDS drivers, patch panel, add-on board, ROD,
  single-board computer, configuration PROM and oscillator are passive
  hardware or parts from elsewhere. They appear only as ports or as the clock
  input.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. All pass with uninitialised state randomised.

| testbench | what it checks against an independent model |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue, flags, count |
| `tb_level1_detector` | random DTI streams with embedded commands against a scan of the same bits; pulse one clock after the last command bit |
| `tb_word_clock_enable` | tick period and pre_tick position |
| `tb_word_serializer` | bit order and the one-word latency |
| `tb_encoder_8b10b` | the 12 K symbols in both forms against the code table, the A7 cases, known code words; for all 512 data inputs legal disparity and `rd_out`; run length ≤ 5 in a long random stream |
| `tb_decoder_8b10b` | the K symbols in both forms and, through the encoder, every data byte at both RDs |
| `tb_mcc_deserializer` | bytes and zero padding of random event windows, `busy` until the last byte is stored |
| `tb_fei3_event_emulator` | every field of generated events, BCID spacing, no start while `start_ok` is low, skipped count in a burst, ECR and BCR |
| `tb_frame_builder` | decodes its words: idle alternation, SOF, bytes in order, fillers only while the FIFO is empty, EOF, legal RD |
| `tb_mcc_emulator` | raw header, FE number and length; encoded frames decode to the raw events; hit button wrap |
| `tb_ebc_deserializer` | word alignment from the start mark |
| `tb_stream_analyser` | one start, stop and length per frame; drop and overflow with a full FIFO |
| `tb_decoding_monitor` | no error on clean streams; single bit flips; +2 at RD+; disparity 4 |
| `tb_ebc_serializer` | gapless MSB-first output per length entry, zero lengths skipped |
| `tb_decoding_unit` | 1–32 byte frames decoded exactly; flipped bits raise debug; a 40-byte frame drops 8 bytes |
| `tb_eboc` | pass-through of all other channels with one clock; decoded and debug channels |
| `tb_readout_chain_top` | the whole chain at default parameters (below) |
| `tb_random_trigger_run` | 27,000 events with exponentially distributed trigger gaps and 0–9 hits through the whole chain: zero event errors, delay slope 27.5 bit/hit |

`tb_readout_chain_top` plays the ROD and the patch panel, with no parameter
overrides.

- It compares every raw event with a bit model of the MCC format, including
  the BCID at the trigger.
- It compares every decoded event bit for bit with its raw event and checks
  its delay against 10 bit periods per byte.
- Its phases:
  - a 20-trigger burst (buffering and skipped triggers);
  - ECR and BCR;
  - 1 to 9 hits, four events each (delay slope);
  - a flipped link bit (debug pulse);
  - 10 hits (overflow);
  - the button wrapping to 0 and a 0-hit event.
- It counts each of these mechanisms and fails if any never happened.
- It runs in a few seconds.

`tb_random_trigger_run` is an event-error-rate run at default parameters.
Triggers arrive at exponentially distributed intervals (mean 700 clocks).
Every decoded event is compared with its raw event. It takes about 10 s
with Verilator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/readout_pkg.sv rtl/*.sv tb/frame_source.sv tb/tb_readout_chain_top.sv \
    --top-module tb_readout_chain_top -Mdir obj -o sim
./obj/sim
```

Use any other `tb_*.sv` and its module name the same way. `tb/frame_source.sv`
is a transmitter model used by the eBOC-side testbenches. It sends idle words
and SOF/bytes/EOF frames, and can flip one chosen bit.

## Parameters worth changing

| module | parameter | default | meaning |
|---|---|---|---|
| `decoding_unit`, `eboc` | `DATA_DEPTH` | 32 | Event Data FIFO bytes. The largest event is ⌊(8·DATA_DEPTH − 56) / 22⌋ hits. |
| `decoding_unit` | `LEN_DEPTH`, `LEN_W` | 4, 8 | Event Length FIFO. `LEN_W` must hold `DATA_DEPTH`. |
| `mcc_emulator` | `FIFO_DEPTH` | 1024 | Emulator byte FIFO. About event size / 5 is enough. |
| `mcc_emulator` | `LEAD_BITS`, `INIT_HITS` | 2, 1 | Lead zeros; hit count after reset. |
| `fei3_event_emulator` | `TRIG_DEPTH` | 16 | Trigger buffer. |
| `eboc`, `readout_chain_top` | `N_CH`, `DEC_CH`, `DBG_CH` | 32, 0, 2 | Channel count and channel roles. |

Shared constants are in `rtl/readout_pkg.sv`: the K words in both forms, the
header and trigger patterns, and the field widths. The 8b10b helper functions
are there too.
