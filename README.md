# HUB control links: Readout_CTRL receiver and Combined_TTC/DATA fan-out

The HUB module of an L1Calo ATCA shelf sits between three parties:

- the **ROD**, which sends link-control information (mainly resets and enables for the Aurora data links of the FEX modules);
- **FELIX**, which sends the TTC information (L1A, BCR, ECR, L1ID, ECRID, back-pressure, a control channel) over a GBT link;
- the **FEX modules in slots 3-14**, the ROD and the other HUB, which all need both kinds of information.

Only the HUB receives Readout_CTRL from the ROD. It merges the ROD's link controls with the TTC information and sends each destination its own **Combined_TTC/DATA** stream. This RTL implements that control path: the Readout_CTRL receiver, the field decoder, the merger, 14 Combined_TTC transmitters and a small diagnostic block. The serial transceivers, the GBT receiver, IPbus and the Aurora cores sit outside it as ports.

```
 ROD ── Readout_CTRL words ──► shadow_reg_rx ──► rdctrl_decode ──┬──► rdctrl (HUB's own Aurora links)
                                    │                           │
                               link_monitor                     ▼
 GBT receiver ── ttc_info_t ─────────────────────────────────► ttc_merger
                                                                │ 14 messages
                                                                ▼
                                        14 × ctrl_reg_tx ──► cttc_tx_data / cttc_tx_charisk
                                        (FEX slots 3-14, this ROD, other HUB)
```

## The idea: registers mirrored over a serial link

Both link types use the same scheme. The sender has four 32-bit **control registers**, Word_0 to Word_3. Logic on the sending side writes them whenever it likes. The link sends all 128 bits again and again, one complete message per LHC clock. The receiver keeps a read-only copy, the **shadow registers**. No handshake or addressing takes place: whatever is written at one end shows up at the other end one LHC clock later.

The numbers fit exactly. At 6.4 Gbps with 8b10b coding, one 25 ns LHC clock carries 160 line bits, which is 128 data bits. That is four 32-bit words at a 160 MHz word clock. The lowest byte of Word_0 is always the K28.5 comma (0xBC), which marks the start of a message. Word_3[31:23] holds a 9-bit CRC. The remaining 111 bits are content.

Bit *k* of the message is bit *k mod 32* of Word_*k/32*. In the RTL a message is a `logic [127:0]` (`hub_link_pkg::msg_t`) with Word_n in bits `[32n+31:32n]`. Byte 0 is the comma.

### Transmitter (`ctrl_reg_tx`)

- The control registers are written per word: `wr_en[n]` writes Word_n. Writes to the comma byte and the CRC bits are ignored. `ctrl_regs` reads the registers back.
- When a frame starts, the four registers are copied into a frame buffer. The comma and the CRC of that copy are inserted at this point. The copy is then sent as Word_0, Word_1, Word_2, Word_3, one word per clock. Because of the copy, every message is self-consistent, even if the registers change in the middle of a frame.
- A frame starts in the clock after `bc_strobe`. Without a strobe, the next frame starts right after Word_3, so the link runs freely and realigns whenever a strobe comes. A strobe in the middle of a frame cuts that frame short. This happens once after reset.
- `tx_charisk` is `4'b0001` on Word_0 and 0 on the other words. The transceiver's 8b10b encoder turns byte 0 of Word_0 into the comma.

### Receiver (`shadow_reg_rx`)

- The transceiver is assumed to deliver comma-aligned 32-bit words, with K28.5 in byte 0, in the same clock domain.
- A word with `rx_charisk == 4'b0001` and `rx_data[7:0] == 8'hBC` is Word_0. The next three words are Word_1 to Word_3, and Word_0 must follow again straight after.
- When Word_3 arrives, the CRC of the whole message is checked. A good message is written into all four shadow registers at once, on the edge that samples Word_3, and `update` pulses. A bad message leaves the shadow registers alone and pulses `crc_error`.
- A missing comma where Word_0 is due, or a comma where a data word is due, pulses `align_error`. After a missing comma, `aligned` drops and the receiver waits for the next comma. A misplaced comma is taken as the new Word_0.
- `shadow_valid` is set by the first good message after reset.

Concurrent assertions in both modules encode two link rules: only Word_0 carries a K flag, and a received message is either accepted or rejected. Run with `--assert` to enable them.

### Latency

Take a write made during LHC clock *n*. It is copied into the frame that starts with clock *n+1*, and it is in the receiver's shadow registers at the end of that clock, plus the transceiver latency, which is not modelled here. Through the whole HUB, from the edge that samples the ROD's Word_3 to the edge that samples Word_3 of the resulting Combined_TTC frame at a FEX, it takes at most 9 word clocks:

- 1 clock for the shadow registers;
- 1 clock for the merger register;
- 1 clock for the control-register write;
- up to 3 clocks waiting for the next frame start;
- 3 more words.

The end-to-end testbench measures this bound on every destination.

### CRC (`link_crc9`)

The link specification defines only the 9-bit field. The rest is this design's choice, and it must match the far end:

- it covers bits 118 down to 8, that is everything except the comma and the CRC field, taken most significant bit first;
- the generator is x⁹+x⁸+x⁴+x³+x+1 (`POLY = 9'h11B`);
- the initial value is all ones (`INIT = 9'h1FF`);
- the result is not inverted.

`POLY` and `INIT` are parameters of `link_crc9`. The transmitter and the receiver use the defaults, so change both ends together.

## Readout_CTRL message (ROD → HUB)

| Word | Bits | Field |
|---|---|---|
| 0 | 7:0 | K28.5 |
| 0 | 11:8 | version |
| 0 | 14 | ROD XOFF (to all slots) |
| 0 | 15 | Global Link Reset |
| 0 | 12, 13, 16-31 | 0 |
| 1 | 11:0 | link reset, link 0 of slots 3…14 (bit *s*−3 for slot *s*) |
| 1 | 13-15 / 16-18 / 19-21 / 22-24 / 25-27 / 28-30 | link reset, links 1-3 of slots 4 / 5 / 8 / 9 / 12 / 13 |
| 1 | 12, 31 | 0 |
| 2 | same layout as Word_1 | channel up |
| 3 | 11:0 | link enable of slots 3…14 |
| 3 | 22:19 | shelf |
| 3 | 31:23 | CRC |

Slots 4, 5, 8, 9, 12 and 13 have four links and the others one. `rdctrl_decode` turns the message into `hub_link_pkg::rdctrl_t`. Per-slot arrays in that struct are indexed by slot − 3. The bit positions come from the package functions `slot_links` and `slot_link_bit`. The decoded struct is also a port of the top, so that the HUB's own Aurora links can use the ROD XOFF and Global Link Reset.

## Combined_TTC/DATA message (HUB → FEX, ROD, other HUB)

| Word | Bits | Field | Source |
|---|---|---|---|
| 0 | 7:0 | K28.5 | transmitter |
| 0 | 11:8 | version | `CTTC_VERSION` parameter |
| 0 | 15:12 | reserved (0) | |
| 0 | 16 / 17 / 18 / 19 | L1A / BCR / ECR / Privileged Readout | TTC |
| 0 | 31:20 | felix_backpressure(11:0) | TTC |
| 1 | 23:0 | L1ID | TTC |
| 1 | 31:24 | ECRID | TTC |
| 2 | 31:0 | control channel | TTC |
| 3 | 3:0 | Link_reset(3:0) | Readout_CTRL, this slot, ORed with Global Link Reset |
| 3 | 7:4 | Link_up(3:0) | Readout_CTRL channel up, this slot |
| 3 | 10:8 | Link Enable(2:0) | bit 8 = this slot's link enable, bits 9-10 = 0 |
| 3 | 11 | ROD XOFF | Readout_CTRL, every destination |
| 3 | 18:12 | ROD reserved (0) | |
| 3 | 22:19 | shelf | Readout_CTRL |
| 3 | 31:23 | CRC | transmitter |

### How the merger fills it in (`ttc_merger`)

- Word_0 to Word_2 are the same for every destination.
- Word_3 is where the destinations differ. FEX slot *s* gets its own link resets, channel-up bits and link enable from the Readout_CTRL message. The Global Link Reset is ORed into all four of its Link_reset bits.
- The ROD and the other HUB get ROD XOFF and shelf, but no per-link fields.
- Until the first good Readout_CTRL message has arrived, every field taken from Readout_CTRL is sent as 0, so a HUB without a ROD link still distributes TTC.
- The merger output is registered. The top writes all four control registers of every transmitter on every clock.

The TTC fields should be held for a whole LHC clock and change in step with `bc_strobe`. Each Combined_TTC frame then carries exactly one LHC clock's TTC content, and none is dropped or repeated. The end-to-end testbench checks this over 100 consecutive LHC clocks.

## Destinations and transceiver placement

`cttc_tx_data[d]` and `cttc_tx_charisk[d]` of `hub_fw_top` drive these links:

| d | Destination | Transceiver (quad, TX channel) |
|---|---|---|
| 0 | FEX slot 3 | GTY 129, Tx 2 |
| 1 | FEX slot 4 | GTY 130, Tx 0 |
| 2 | FEX slot 5 | GTY 130, Tx 2 |
| 3 | FEX slot 6 | GTY 132, Tx 3 |
| 4 | FEX slot 7 | GTY 133, Tx 2 |
| 5 | FEX slot 8 | GTY 133, Tx 3 |
| 6 | FEX slot 9 | GTH 233, Tx 3 |
| 7 | FEX slot 10 | GTH 233, Tx 2 |
| 8 | FEX slot 11 | GTH 232, Tx 3 |
| 9 | FEX slot 12 | GTH 230, Tx 2 |
| 10 | FEX slot 13 | GTH 230, Tx 0 |
| 11 | FEX slot 14 | GTH 229, Tx 2 |
| 12 | this ROD | GTH 228, Tx 0 |
| 13 | other HUB | GTY 129, Tx 0 |

The placement column comes from the board's link-placement drawing. It is a constraint for the transceiver wrapper and is not encoded in the RTL. Check it against the board pin-out before use. The drawing also places the HUB's own readout to the ROD (Aurora, GTH 229 Tx 0 and GTH 228 Tx 2). That readout is not part of this RTL.

## Top-level interface (`hub_fw_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst` | in | word clock (4 per LHC clock, 160 MHz); synchronous active-high reset |
| `bc_strobe` | in | high for one word clock per LHC clock; Combined_TTC frames start in the next clock |
| `rdctrl_rx_data[31:0]`, `rdctrl_rx_charisk[3:0]` | in | Readout_CTRL transceiver output, 8b10b-decoded and comma-aligned |
| `ttc` (`ttc_info_t`) | in | TTC fields from the GBT receiver |
| `cttc_tx_data[14][32]`, `cttc_tx_charisk[14][4]` | out | Combined_TTC transceiver inputs |
| `rdctrl` (`rdctrl_t`), `rdctrl_aligned`, `rdctrl_valid` | out | decoded Readout_CTRL and link state |
| `diag_clear` | in | clears the diagnostic counters |
| `diag_frames`, `diag_crc_errors`, `diag_align_errors` | out | 16-bit saturating counters of the Readout_CTRL receiver (`link_monitor`) |

All logic runs in one clock domain. In hardware, each transceiver has its own user clock, so clock-domain crossings or a shared TX user clock would be needed in the wrapper.

## Files

| File | Contents |
|---|---|
| `rtl/hub_link_pkg.sv` | constants (comma, widths, slot count), `rdctrl_t`, `ttc_info_t`, slot/link bit map |
| `rtl/link_crc9.sv` | combinational CRC-9 |
| `rtl/ctrl_reg_tx.sv` | control registers + frame transmitter |
| `rtl/shadow_reg_rx.sv` | comma alignment, CRC check, shadow registers |
| `rtl/rdctrl_decode.sv` | Readout_CTRL field decoder |
| `rtl/ttc_merger.sv` | per-destination Combined_TTC message builder |
| `rtl/link_monitor.sv` | diagnostic counters |
| `rtl/hub_fw_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | independent reference: CRC by long division, transcribed Readout_CTRL bit table |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb_hub_fw_top` runs the whole design at its default parameters |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a watchdog. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hub_link_pkg.sv tb/tb_ref_pkg.sv rtl/link_crc9.sv rtl/ctrl_reg_tx.sv \
  rtl/shadow_reg_rx.sv rtl/rdctrl_decode.sv rtl/ttc_merger.sv rtl/link_monitor.sv \
  rtl/hub_fw_top.sv tb/tb_hub_fw_top.sv --top-module tb_hub_fw_top
./obj_dir/Vtb_hub_fw_top
```

For a single block, list the package(s), the block with the modules it instantiates, and its testbench. All tests finish in well under a second of simulation time.

`tb_hub_fw_top` runs the following:

- **Before the ROD link:** TTC is distributed with the reset fields at 0.
- **60 random phases:** each one changes the ROD content and the TTC content. The test checks every destination's frame, the CRC, the comma and the latency bound, and it includes a Global Link Reset alone and a reset of link 1 of slot 4 alone.
- **Damaged ROD frames:** one frame has a corrupted CRC. It is rejected, and the test checks that the diagnostic counter sees it. One Word_0 is sent without its comma. Alignment is lost, counted, and regained.
- **Streaming:** the TTC changes every LHC clock, and every destination must see each value exactly once.

The test counts each of these mechanisms and fails if any of them never happens.

## What comes from the specification and what is this design's own

From the link specification:

- the four-control-register / four-shadow-register scheme;
- 128 bits per LHC clock at 6.4 Gbps;
- K28.5 in the lowest byte of Word_0;
- the bit layout of both messages;
- the 9-bit CRC field;
- the set of Combined_TTC destinations (FEX slots 3-14, ROD, other HUB);
- the merge of Readout_CTRL resets with TTC information.

This design's own choices:

- the CRC polynomial, initial value and coverage;
- the snapshot at frame start;
- free-running frames that realign on `bc_strobe`;
- the receiver's alignment rules and the rejection of bad-CRC messages;
- the single word clock;
- how Readout_CTRL fields map onto each destination's Word_3: Global Link Reset ORed in, one link enable into Link Enable(0), no per-link fields for the ROD and the other HUB, zeros until Readout_CTRL is valid;
- the version field as a parameter, default 0;
- the diagnostic counters;
- the destination order.

Points to check against a real partner before using this on hardware:

- **Readout_CTRL version field.** It is decoded but not forwarded. The Combined_TTC version is this HUB's own.
- **Combined_TTC Word_0 version field.** It is taken as four bits (11:8), like Readout_CTRL, with bits 15:12 reserved.
- **Link Enable field.** Word_3 of Combined_TTC has three Link Enable bits and ROD XOFF in bit 11, but Readout_CTRL has only one enable per slot.
- **CRC.** The CRC algorithm must match the FEX and ROD firmware.

Not included:

- the MGT transceivers (GTH/GTY) and their 8b10b coding;
- the GBT receiver that extracts the TTC fields from the FELIX link;
- IPbus and any register map;
- the Aurora 8b/10b readout links;
- the IBERT/ILA/VIO diagnostic cores and the diagnostic firmware configurations built around them;
- the MiniPOD optics.
