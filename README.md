# ES-DCC: zero-suppressing readout board for the CMS endcap Preshower

The CMS endcap Preshower is a silicon strip detector. Each of its 1208 optical
fibres sends 600 bytes per level-1 trigger, and the trigger can come at up to
100 kHz on average. That adds up to about 72 GB/s. The links that carry
Preshower data into the central DAQ take only about 11 GB/s, so the data must
shrink by a factor of at least 7 before they leave the counting room.

The ES-DCC (Endcap Preshower Data Concentrator Card) is the VME board that
does this. It takes in up to 36 links and removes the electronic offsets and
noise from every strip. It keeps only the strips that carry a real signal,
and it sends one event per trigger to the DAQ over an S-Link. Alongside the
reduced data, either the raw link data or the reduced data can be recorded in
on-board memory and read back over VME.

This repository is synthesizable SystemVerilog for the logic of that board:

- the three reduction FPGAs;
- the three spy FPGAs;
- the merger FPGA;
- the VME64x / local-bus controller;
- the TTC distribution.

Each block has a self-checking testbench, and one more runs the whole board.

## Board map

```
 36 links ──► reduction FPGA ×3 ──64-bit zs bus──► merger FPGA ──► S-Link (64-bit, K/D flag)
 (decoded       │ (12 link channels                ▲   ▲  │
 8b/10b chars)  │  + event collector)              │   │  └──► TTS throttling status
                │120-bit raw bus   private cfg bus │   │
                ▼                  ▲               │   TTC distributor ◄── TTCrx (L1A, BC0, EC0)
            spy FPGA ×3 ───────────┘               │
            3 SRAMs each                           │
                ▲                                  │
                └────────── local bus ◄── VME64x interface ◄── VME backplane
```

| Module | Role |
|---|---|
| `es_dcc` | The top. It wires the whole board; external chips appear as ports. |
| `reduction_fpga` | One OptoRx-12 module: 12 `link_channel`s and an `event_collector`. |
| `link_channel` | One link's chain: `link_word_aligner` → `kchip_deformatter` (with `crc16_ccitt`) → `pedestal_calib` → `common_mode` → `bx_threshold` → hit FIFO. |
| `spy_fpga` | Capture of raw or zero-suppressed data into three 512K×36 SRAMs, VME read-back, and forwarding of parameters to its reduction FPGA. |
| `merger_fpga` | Builds the event in the CMS DAQ format, drives the S-Link and the throttling status. |
| `ttc_distributor` | Bunch and event counters, and a FIFO of (LV1_id, BX_id) for each accepted trigger. |
| `vme_interface` | Turns VME A32/D32 cycles into local-bus cycles. |
| `local_bus_decoder` | Sends local-bus cycles to spy FPGA 1–3 or to the merger. |
| `sync_fifo`, `crc16_ccitt` | Helpers. |
| `esdcc_pkg` | All sizes, word layouts, field positions and codes. |

The whole board runs on one clock, `clk`, at twice the bunch-crossing rate
(80.16 MHz). One decoded link character arrives per clock. The reset `rst` is
synchronous and active high.

## The link packet and its de-formatting

The front end works like this:

- A micromodule has 32 strips.
- For each trigger it delivers three time samples per strip: one on the baseline, one near the pulse peak and one after it.
- Each sample is a 12-bit ADC value.
- A K-chip multiplexes up to four micromodules into 16-bit words.
- A GOL serialises those words onto the fibre at 800 Mbit/s, 8b/10b encoded.

The 600-byte size and that content are fixed. The word layout is this
design's own, chosen so that the data fill exactly 600 bytes:

| Word | Content |
|---|---|
| 0 | `{4'h5 marker, 4'h0, 8-bit K-chip flags}` |
| 1 | `{4'h0, BX[11:0]}` |
| 2 | event counter [15:0] |
| 3–10 | two status words per micromodule |
| 11–298 | 384 samples × 12 bits, four samples in every three words; order is micromodule, then time sample, then strip |
| 299 | CRC-16-CCITT (x^16+x^12+x^5+1, preset 0xFFFF, MSB first) over words 0–298 |

On the wire the link sends its characters in this order:

- Between packets it sends idle pairs: K28.5 (0xBC, K flag set) followed by 0x50.
- A packet's words go high byte first.

`link_word_aligner` locks onto the comma and pairs the bytes into words. It
also copies every character onto the raw bus.

`kchip_deformatter` handles the packet itself:

- It finds the marker and checks the CRC.
- It unpacks the samples, up to one per clock. A word takes two clocks, so the four samples of every three-word group fit in the six clocks the group occupies.
- It emits an end-of-event record holding BX, event counter and an error flag.
- The error flag is set by a CRC mismatch, a link code error or non-zero K-chip flags. The samples are still processed; the flag travels with the event.

## Reduction chain (per link)

All values after the ADC are signed 16-bit and saturate.

1. **Pedestal and gain** (`pedestal_calib`): `y = sat16(((x − ped[ch]) × gain[ch]) >>> 8)`.
   - There are 128 channels per link.
   - The gain is 10-bit unsigned, with 8 fraction bits (1.0 = 256).
   - After reset, ped = 0 and gain = 1.0.
2. **Common mode** (`common_mode`): this is the subtlest timing in the chain.
   - The 32 strips of one micromodule and time sample arrive back to back.
   - They are written into one bank of a two-bank buffer while they are summed.
   - After the 32nd strip the mean is latched as `sum >>> 5`, rounded down, with hits included. The banks then swap.
   - The stored strips leave as `x − mean`, one per clock, while the next group fills the other bank.
   - The link's end-of-event record is held back until the last bank has drained, so it never overtakes its own data.
3. **Bunch-crossing assignment and threshold** (`bx_threshold`): the three corrected samples of a strip are s0, s1 and s2.
   - The strip is kept if `s1 > thr[ch]`, `s1 > s0` and `s1 ≥ s2`.
   - The threshold is on the peak sample.
   - The other two conditions reject pulses that belong to an earlier or a later bunch: their peak is not in the middle sample.
   - Thresholds are per channel and reset to 0.
4. **Buffering** (`link_channel`):
   - Kept strips go into a 256-entry hit FIFO and end-of-event records into an 8-entry FIFO.
   - A full link event has at most 128 hits.
   - If the hit FIFO ever fills, the extra hits are dropped and a sticky `overflow` is raised.
   - `almost_full` (above 3/4) feeds the throttling status.

`event_collector` waits until all 12 links have finished an event. It then
sends one fragment on the 64-bit zero-suppressed bus (`valid`/`ready`/`last`):

| Word | Bits |
|---|---|
| fragment header | `[63:60]=4'hC [59:58]=OptoRx id [57:46]=BX [45:30]=event counter [29:18]=packet-error mask [17:6]=BX/event-counter mismatch mask (vs link 0) [5:0]=0` |
| hit (one per kept strip, links 0..11 in order) | `[63:60]=link [59:58]=micromodule [57:53]=strip [52:48]=0 [47:32]=s0 [31:16]=s1 [15:0]=s2` |

## Event building, S-Link and throttling (merger FPGA)

The TTC distributor counts bunch crossings: two clocks per crossing and 3564
crossings per orbit, reset by BC0. It counts triggers from 1 after EC0. Each
accepted trigger pushes its LV1_id and BX_id into a 16-deep FIFO.

For each trigger the merger sends:

- a header word with `slink_ctrl` = 1: `[63:60]=5 (BOE_1) [59:56]=Evt_ty [55:32]=LV1_id [31:20]=BX_id [19:8]=Source_id [7:4]=FOV=0 [3]=H=0`;
- the fragments of reduction FPGA 0, 1 and 2, copied word by word;
- a trailer word with `slink_ctrl` = 1: `[63:60]=A (EOE_1) [55:32]=Evt_lgth [31:16]=CRC [11:8]=Evt_stat [7:4]=TTS [3]=T=0`.

The trailer fields work as follows:

- `Evt_lgth` counts every 64-bit word, header and trailer included.
- The CRC is CRC-16-CCITT over every word of the event, with the trailer's CRC field taken as zero.
- `Evt_stat` bit 0 means a fragment's event counter differs from LV1_id[15:0].
- `Evt_stat` bit 1 means a link had a packet error.
- `Evt_stat` bit 2 means hits were lost.

The merger writes at most one word per clock. It stalls while the S-Link
reports link-full (`slink_lff`); an assertion checks that no word is written
in that state.

The registered `tts` output has these states, in priority order:

| State | Code | Condition |
|---|---|---|
| OUT_OF_SYNC | 0010 | An event-number mismatch was seen; cleared over VME. |
| BUSY | 0100 | Hits were lost, or at least 14 triggers are pending. |
| WARNING | 0001 | A link buffer is almost full, or at least 8 triggers are pending. |
| READY | 1000 | Otherwise. |

## Control path: VME, local bus, spy memories and parameters

`vme_interface` handles A32/D32 single cycles (AM 0x09 or 0x0D):

- The board answers when A[31:27] equals the slot number from the geographic address pins.
- All backplane inputs pass through two-flop synchronisers.
- The cycle is forwarded as a 25-bit longword local-bus address, A[26:2]. Its top four bits choose the target: 1–3 are the spy FPGAs and 4 is the merger.
- Local-bus requests stay valid until a one-clock acknowledge. Unmapped targets return 0xBAD0ADD0.

The spy FPGA decodes local address bits [20:19]:

| Value | Function |
|---|---|
| 0 | Registers: 0 CTRL (bit 0 starts a capture and reads back as busy; bit 1 selects the source), 1 DEPTH, 2 WPTR, 3 BANK, 4 ID = 0x53500001 + FPGA number. |
| 1 | A write becomes a private-bus write to the reduction FPGA: address = local address [15:0], data = write data [15:0]. |
| 2 | SRAM read at address [18:0]. BANK[1:0] picks the chip; BANK[2] returns bits 35:32 instead of 31:0. |

A capture writes DEPTH beats at consecutive addresses. CTRL bit 1 picks
what a beat is:

- **Raw bus (bit 1 = 0):** each beat stores the 12 lanes' {K flag, byte}, 9 bits each, across three SRAMs at one address. Lanes 0–3 go to chip 0, lanes 4–7 to chip 1 and lanes 8–11 to chip 2. The lane error bit is not stored.
- **Zero-suppressed bus (bit 1 = 1):** the spy only observes the 64-bit bus to the merger. Each word that is actually transferred (valid and ready) is stored: bits 35:0 in chip 0 and `{7'b0, last, bits 63:36}` in chip 1.

The private bus addresses the reduction FPGA as
`{link[3:0], 3'b0, table[1:0], channel[6:0]}`:

- Table 0 is pedestal, table 1 is gain and table 2 is threshold.
- Link 15 writes all 12 links at once.

The merger registers are:

| Register | Meaning |
|---|---|
| 0 | Source_id (12 bits, reset 520) |
| 1 | Evt_ty (4 bits, reset 1) |
| 2 | Events sent |
| 3 | Status: `{tts[7:4], sync error[0]}`. Writing 1 to bit 0 clears the sync error. |

## Top-level ports

`es_dcc` brings out every part that is not logic on the board itself:

- **Links:** `rx_valid/rx_k/rx_err[3][11:0]` and `rx_byte[3][12][7:0]`, the outputs of the transceivers' 8b/10b decoders.
- **TTC:** `ttc_l1a`, `ttc_bcnt_res`, `ttc_evcnt_res`, from the TTC receiver chip.
- **VME:** the backplane signals, with separate in and out data and an output enable.
- **Spy SRAMs:** the nine chips, `sram_*[3]`, are synchronous flow-through SRAMs. The address is registered by the SRAM and the data are sampled one clock later.
- **S-Link:** `slink_we/ctrl/data/lff`, plus the throttling status `tts`.

The top's parameters are `HIT_DEPTH` = 256, `EOE_DEPTH` = 8 and
`TRIG_DEPTH` = 16.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run.

The package files go first. `-y` lets verilator find the other modules by
name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_es_dcc --Mdir obj_tb_es_dcc -o sim \
    rtl/esdcc_pkg.sv tb/tb_esdcc_pkg.sv tb/tb_es_dcc.sv
./obj_tb_es_dcc/sim
```

To run a block testbench, replace `tb_es_dcc` with its name. The testbenches
are `tb_crc16_ccitt`, `tb_sync_fifo`, `tb_link_word_aligner`,
`tb_kchip_deformatter`, `tb_pedestal_calib`, `tb_common_mode`,
`tb_bx_threshold`, `tb_link_channel`, `tb_event_collector`,
`tb_reduction_fpga`, `tb_spy_fpga`, `tb_merger_fpga`, `tb_ttc_distributor`,
`tb_vme_interface` and `tb_local_bus_decoder`.

`tb/tb_esdcc_pkg.sv` holds the reference model the testbenches compare
against:

- a bit-serial CRC;
- packet and event generators: noise plus in-time, early and late pulses;
- a reference reduction written with plain integer arithmetic.

`tb/cy7c1371_model.sv` is a behavioural model of the SRAM.

`tb_es_dcc` runs the complete board at its default sizes in under a minute, build included:

1. It loads parameters over VME.
2. It sends 20 events on all 36 links, including one with a CRC error and one out of sync.
3. It fills the trigger FIFO until WARNING and then BUSY.
4. It raises S-Link full at random.
5. It captures raw data on one spy FPGA and a fragment of the zero-suppressed bus on another, and reads both back over VME.
6. It compares every S-Link word with the reference.

It counts each of these mechanisms and fails if any of them never happened.

## Departures from the original board

- **Layouts are this design's own.** The published description gives the packet size and content, the CRC polynomial, the bus widths and the names of the DAQ header fields. The packet layout, fragment format, private-bus format, register maps and VME address map are invented here.
  - The header and trailer field positions, the TTS codes and the 3564-crossing orbit follow common CMS practice rather than the description.
  - A real system needs the actual Preshower formats in place of these.
- **The algorithms are the simplest that do the job.** Common mode is the plain mean of all 32 strips, hits included. A real implementation would likely exclude hits or use a median. Bunch-crossing assignment is the peak-in-middle rule above. Gain has 8 fraction bits.
- **One clock.** Receivers, VME and DAQ link are all treated as synchronous to `clk`, apart from the VME synchronisers. There are no clock-domain crossings for the recovered link clocks.
- **Spy capture is started only by a register write.** There is no trigger-driven or event-selective capture.
- **The reduction FPGAs get no TTC signals.** Only the merger compares event numbers with the TTC count; the reduction FPGAs compare their links with each other.
- **Not modelled:**
  - the optional second DAQ header and trailer words;
  - the memories and USB port of the merger FPGA;
  - the USB interfaces of the spy FPGAs;
  - JTAG reconfiguration;
  - the spare mezzanine sockets;
  - VME block transfers and CR/CSR space.
- **Missing or short packets are not detected.** The error flag covers only CRC, code errors and K-chip flags. A link that stops sending stalls event collection.

## How far it can be trusted

- Every block's testbench compares against values worked out independently: a reference CRC, a reference unpacker and the integer reduction model.
- Each testbench was also run against a deliberately broken copy of its block, and it caught the fault every time.
- The board test checks, end to end and word by word, that the board reproduces the reference reduction. It also checks that the throttling, sync-error, CRC-error and back-pressure paths all trigger.
- The code passes Verilator lint and slang elaboration.
- Because the formats above are this design's own, the events it produces are self-consistent, not bit-compatible with real CMS Preshower data.
- No timing closure or FPGA fit has been done. Throughput was checked only in simulation: one character per clock per link and one 64-bit DAQ word per clock.

Throughput against the requirements:

- **Links:** a 600-byte packet takes 600 clocks, which is 7.5 µs, against the 10 µs between triggers at 100 kHz.
- **Event size:** at 2% strip occupancy an event is about 0.8 kB, and at 5% about 1.9 kB. Both fit the 2 kB per event the DAQ link allows.
- **Buffers:** a hit FIFO holds two fully occupied link events.
