# 802.11 MAC and interface circuits for a wireless LAN card

This is synthesizable SystemVerilog for the MAC side of an IEEE 802.11 wireless LAN card. The card can also act as an access point that bridges to a Fast Ethernet distribution system (DS).

The logic does in hardware the byte-level work of the MAC:
- It cuts host data into fragments and builds the MAC header and CRC of each fragment.
- It waits out DIFS and a random backoff, and runs the RTS/CTS handshake.
- It checks received frames and answers them with an ACK or a CTS.
- It converts frames between the wireless format and the Ethernet format.

A small host processor keeps the slower tasks, such as setting the NAV, filling the address table, and management.

The design follows a published FPGA prototype of an 802.11 MAC: "Rapid Implementation of the MAC and Interface Circuits for the Wireless LAN Cards Using FPGA". All of the RTL was written anew from that description. Places where this design had to choose for itself, or where it departs from the prototype, are marked in each file's opening comment and in the section "Departures and open points" below.

## Block diagram

```
 host bus ──► host_tx_if ──► tx_dma ──┐               ┌─► mpdu_out / txrts_req  (to the PHY)
  (SRAM + TX_FIFO_FREE / TX_FIFO_READY) ├─► tx_unit ────┤
 Ethernet in ──► eth_to_wlan ─────────┘   (fragment,   └── cts_ind ◄──┐
                 (address table, FCS)     txsm, timer,                │
                                          backoff)                    │
 PHY bytes ──► rx_unit (loadmpdu, rxsm, timer) ──► gen_ack / gen_cts (to the PHY)
                     │                         ──► cts_ind ───────────┘
                     ├─► receive FIFO ──► host   (enqueue_rxq)
                     └─► wlan_to_eth ──► ds_enc4b5b ──► ds_tx_sym (enqueue_todsq)
 core ──► nav ──► nav_zero ──► tx_unit
```

`wlan_mac_top` wires these blocks together. Its ports are the signals of the parts that are not built here: the PHY/PLCP, the host bus, the core processor, and the rest of the Ethernet convergence sublayer.

## Frame format

Every MPDU in this design has a five-byte header, then the body, then a CRC-16:

| byte | field | contents |
|---|---|---|
| 0 | FC  | protocol version(2), type(2), subtype(4), MSB first. Data = `0x20`, RTS = `0x1B`, CTS = `0x1C`, ACK = `0x1D` |
| 1 | DA  | destination address, 8 bits |
| 2 | SA  | source address, 8 bits |
| 3 | LEN | header plus body in bytes. The CRC is not counted |
| 4 | SEQ | `{ToDS, MoreFrag, fragment number[1:0], sequence number[3:0]}` |
| … | body | at most 250 bytes |
| last 2 | CRC | CRC-16, high byte first |

The CRC is CRC-16/CCITT:
- polynomial 0x1021
- preset 0xFFFF
- MSB first
- no final inversion

The receiver runs the same CRC over the whole frame, CRC bytes included, and accepts the frame when the remainder is zero.

The reference frame used throughout the testbenches is the 8-byte MSDU 10…17 sent from station 10 to station 30. It must produce exactly these bytes:

```
32, 30, 10, 13, 0, 10, 11, 12, 13, 14, 15, 16, 17, 215, 102
```

The CRC register must pass through C592, E816, CB6C, … D766, 6600 and end at 0000.

Addresses are 8 bits, and there is no Duration/ID field, because the reference frame has neither. Real 802.11 frames with 48-bit addresses and a duration field would need a wider header builder and a wider header parser. The rest of the design would not change.

The placement of ToDS and MoreFrag inside the SEQ byte is this design's own choice.

## Transmit path

### Host buffer (`host_tx_if`)

The host sees a 256 KiB SRAM (18 address bits) cut into fixed blocks of 2312 bytes. Two 256-entry pointer FIFOs manage the blocks:
- **TX_FIFO_FREE** holds the numbers of blocks that can be written.
- **TX_FIFO_READY** holds `{block, length}` for frames that are waiting to be sent.

The host bus is a plain synchronous byte bus. When `h_addr[18]` is 0, the access goes to an SRAM byte. When it is 1, `h_addr[2:0]` selects one of these registers:

| reg | write | read |
|---|---|---|
| 0 FREE | push a free block | pop the next free block |
| 1 RDY_PTR | block number of the frame | – |
| 2 RDY_LEN_L | length bits 7:0 | – |
| 3 RDY_LEN_H | length bits 11:8; this write queues the entry | – |
| 4 STATUS | – | `{rdy_full, rdy_empty, free_full, free_empty}` |

Read data arrives one clock after `h_re`. The host procedure is:
1. Write every block number into FREE once.
2. For each frame, pop FREE.
3. Write the frame to `block*2312`.
4. Write RDY_PTR, then RDY_LEN_L, then RDY_LEN_H.

### Transmit core (`tx_dma`)

`tx_dma` starts only when the transmitter is idle. It pops an entry from TX_FIFO_READY and copies `length` bytes into the MSDU FIFO at one byte every two clocks. It then pushes the block back into TX_FIFO_FREE, so the host can reuse blocks as soon as their data has been copied.

### Fragmentation (`fragment`, `prepare_header`)

The MSDU FIFO holds 4096 bytes. When the MSDU source signals that the frame is complete, the fragment unit raises `f_txq`.

Each `frag_req` from the state machine builds one MPDU into the 2000-byte MPDU FIFO. The MPDU holds the header, up to `FRAG_THRESH` = 250 body bytes, and the CRC. MoreFrag is set on every fragment except the last, and the fragment number counts up.

### Transmit state machine (`txsm`) and timing

| state | leaves when | goes to |
|---|---|---|
| IDLE | frame queued and medium idle: start DIFS, build the first MPDU | DELAY_DIFS |
| IDLE | backoff done, medium idle and NAV zero: `txrts_req` | WAIT_CTS |
| DELAY_DIFS | DIFS over: start or resume the backoff | BACKOFF |
| DELAY_DIFS | medium busy | IDLE |
| BACKOFF | count reached zero | IDLE |
| BACKOFF | medium busy; the count freezes | IDLE |
| WAIT_CTS | CTS received (`cts_ind`) | TX_MPDU |
| WAIT_CTS | SIFS over: retry with a new backoff; after `RTS_RETRY_MAX` retries, drop the frame (`tx_drop`) | BACKOFF or IDLE |
| TX_MPDU | MPDU sent, more fragments left: build the next one, start SIFS | WAIT_ACK |
| TX_MPDU | MPDU sent, nothing left: `tx_ok`, CW back to 8 | IDLE |
| WAIT_ACK | SIFS over | TX_MPDU |

The PHY takes MPDU bytes by strobing `mpdu_o` whenever `mpdu_valid` is high.

Backoff:
- The backoff draws `INT(CW × Random())` slots, with `Random() = backoff_val/256` supplied from outside.
- CW starts at 8 and doubles on every retry, up to 256.
- During the backoff the slot timer runs and the count drops by one per idle slot.

All delays count a `tick` strobe: SIFS 10, PIFS 30, DIFS 50, slot 20. The original gives these numbers with "ms" as the unit. Here the integrator sets the real-time meaning by choosing the tick period.

The CTS must arrive within SIFS after `txrts_req`, because the state machine retries when SIFS runs out. With a one-clock tick, the receiver cannot deliver a CTS frame that fast. The end-to-end testbench therefore uses a tick every 4 clocks.

## Receive path

### Front end (`loadmpdu`)

`loadmpdu` watches the byte stream that follows `rx_ind`:
- `macheader` latches the five header bytes and flags a wrong address. A frame that is not for this station and has ToDS = 0 is an address error.
- `decapsulation` writes bytes 5…LEN−1 into the 2000-byte receive FIFO.
- `crccheck` runs over every byte, including the two CRC bytes.

### Receive state machine (`rxsm`)

The states are INACTIVE, IDLE, CRC_CHECK and PROCESS_RX.

- **CRC error:** the frame is discarded after SIFS.
- **Address error:** the frame is discarded.
- **Received CTS or ACK:** passed to the transmitter at once (`cts_ind`, `ack_ind`).
- **RTS:** after SIFS, `gen_cts` asks the PHY to send a CTS.
- **Data frame:** after SIFS, `gen_ack` asks for an ACK. The last fragment is also queued:
  - ToDS = 0: `enqueue_rxq`, for the host
  - ToDS = 1: `enqueue_todsq`, for the DS

The PHY builds and sends the ACK and CTS frames themselves.

## Access point: packet filter

**Wireless to Ethernet (`wlan_to_eth`).** A queued ToDS frame is read out of the receive FIFO and sent out as an Ethernet frame. The frame is DA, SA, a 16-bit length, the body, and a CRC-32 FCS, high byte first. The FCS uses polynomial 0x04C11DB7 with an all-ones preset, not reflected.

The frame then goes to the line encoder `ds_enc4b5b`, which puts one 5-bit code group per clock on `ds_tx_sym`:
- Idle between frames
- J K at the start of a frame
- two data code groups per byte, low nibble first
- T R at the end of the frame

The encoder takes a byte every two clocks. It pulls the bytes from the converter through a ready handshake.

Preamble, serialisation and NRZI are left to the rest of the convergence sublayer.

**Ethernet to wireless (`eth_to_wlan`).** An incoming Ethernet frame is buffered and its FCS is checked. The frame is forwarded only if:
- the remainder is zero,
- its DA is not this station, and
- its DA is one of the `TABLE_SIZE` entries of the address table, which the core writes.

A forwarded frame becomes the next MSDU of the wireless transmitter. Its header carries the Ethernet DA and SA. Any other frame is dropped with a `fwd_drop` pulse.

## Departures and open points

- **Host buffer size.**
  - The original cuts a 00000–3FFFF SRAM into 2312-byte blocks addressed by 256 pointers, but 256 × 2312 bytes is more than twice that SRAM.
  - This design keeps the SRAM size and the 256-entry pointer FIFOs, and uses 113 blocks (`NUM_BLOCKS`).
  - The ready queue also carries the frame length, which the original does not describe.
- **Maximum MPDU.**
  - The original allows 2312-byte MPDUs but gives the receiver an 8-bit length byte.
  - This design keeps the 8-bit field, so a frame body is at most 250 bytes and longer MSDUs are always fragmented.
- **Block release.** A block is released as soon as its data has been copied into the MSDU FIFO. An alternative reading of the original releases it only after a successful transmission.
- **Both FIFOs empty.**
  - One passage says the transmitter waits for an acknowledgement when both FIFOs are empty.
  - The flow chart instead finishes the frame there and waits between fragments.
  - The flow chart was followed.
  - No ACK timeout or MPDU retransmission is modelled: WAIT_ACK is just a SIFS pause.
- **Busy medium during the backoff.** The count freezes, as the text says. The flow chart's "reset" on busy was not followed.
- **Receive flow chart.**
  - The last data fragment is answered with an ACK where the chart prints a CTS.
  - The address test comes before the type tests.
  - Received CTS and ACK frames are handed to the transmitter.
- **NAV.** There is no duration field, so the NAV is loaded by the core (`nav_set`, `nav_dur`) and cleared with `nav_reset`. The module itself applies the 802.11 rule: only a longer duration from a frame addressed to another station raises the NAV.
- **Reassembly and duplicates.**
  - Fragments are reassembled simply by letting the receive FIFO collect the bodies of consecutive fragments.
  - A fragment discarded for a CRC or address error empties the whole FIFO.
  - Duplicate filtering is not built.
  - There is one receive FIFO for the host and the DS converter. The host must drain a frame queued with `enqueue_rxq` before a ToDS frame arrives, or the converter will also send the host's bytes.
- **CRC width.** The generic 802.11 frame format carries a CRC-32. This design follows the prototype's choice of CRC-16 for the MPDU and uses a CRC-32 only for the Ethernet FCS.
- **Single clock.** The original's second clock is not used.
- **`RTS_RETRY_MAX`.** Its value of 7 is an assumption.
- **`TABLE_SIZE` and the buffer depths of `eth_to_wlan`.** These are assumptions.

## Not included

The following parts are only ports of the top:
- the RF front end and baseband
- the PLCP transmit and receive state machines
- the core microprocessor and its firmware
- the ISA bus unit with its interrupt controller, timers and DMA0
- the receive path from the MAC into host memory
- the rest of the Fast Ethernet convergence sublayer (the 4B/5B decoder, PISO/SIPO, preamble/SFD, clock recovery) and the Ethernet MAC/PMD
- the management, PCF and DS-service parts of the MAC state machine

## Files and parameters

- `rtl/mac_pkg.sv` holds the frame-control codes, header layout, CRC constants, inter-frame spaces, CW limits and the 4B/5B code table.
- Every other `rtl/<name>.sv` file holds one module, described in its opening comment.

Default parameters of `wlan_mac_top`:

| parameter | value |
|---|---|
| `MY_ADDR` | 30 |
| `FRAG_THRESH` | 250 |
| `SRAM_AW` | 18 |
| `BLOCK_BYTES` | 2312 |
| `NUM_BLOCKS` | 113 |
| `SIFS_T` | 10 |
| `PIFS_T` | 30 |
| `DIFS_T` | 50 |
| `SLOT_T` | 20 |
| `TABLE_SIZE` | 8 |

At these defaults the design holds about 2.2 Mbit of memory. Most of it is the 256 KiB SRAM, and the rest is the FIFOs: MSDU 4096 bytes, MPDU 2000 bytes, receive 2000 bytes, and Ethernet buffer 2048 bytes.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv` that prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_wlan_mac_top \
    rtl/mac_pkg.sv tb/tb_wlan_mac_top.sv $(ls rtl/*.sv | grep -v mac_pkg)
./obj_dir/Vtb_wlan_mac_top +verilator+rand+reset+2
```

`tb_wlan_mac_top` runs the whole design at its default parameters, in a few seconds, with models of the host, the PHY and the Ethernet side. It sends the reference frame and compares it byte by byte. It then makes each of these happen and counts each one, failing if any never happens:
- fragmentation of a 300-byte frame into 250 + 50
- a busy medium during the backoff
- a NAV hold-off
- a frame with no CTS, which gives 8 RTS, CW growing to 256, and a drop
- block recycling
- ACK and CTS generation
- a CRC error
- ToDS-to-Ethernet conversion, checked by decoding the 4B/5B line
- Ethernet-to-wireless forwarding, and a dropped Ethernet frame

The access delay is checked against DIFS plus the drawn number of slots.

The block testbenches check other things:
- the CRC running values
- the exact inter-frame times
- CW doubling
- the fragment contents at a small threshold
- FIFO behaviour against a queue model
- the 4B/5B code groups against an independent table
