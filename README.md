# 802.11n MAC hardware: frames at wire speed, responses within SIFS

An IEEE 802.11n/11e MAC is split into two parts. The CPU keeps everything that can wait: association, queues, retries, rate choice, and the choice of what goes into a TXOP. This hardware does everything that has to happen on a microsecond scale:

- It builds MAC headers, A-MPDU delimiters and the FCS on the fly.
- It keeps a whole aggregate ready, so it can go on the air one SIFS (16 µs) after a CTS or BlockAck.
- It runs EDCA contention.
- It splits a received A-MPDU into MPDUs and checks each one.
- It keeps the BlockAck scoreboard.
- It answers with ACK, CTS or BlockAck one SIFS after the frame that asked for it.

The architecture follows a published high-throughput 802.11n MAC design for a 600 Mb/s, 4-stream PHY. That design has ten hardware blocks on a private bus router with eleven bus interfaces, clocked at 50 MHz. This RTL keeps those blocks, their names and their order. Everything the published description leaves open is filled in here and marked as such below:

- the descriptor format
- the register maps
- the PHY byte interface
- the response timing rules
- the scoreboard

## Block map

```
             system bus (valid/ready, 32-bit)
                    |
              bus_router ---- 11 windows of 8 KB, one per block (+ PHY)
                    |
 Tx path:  tx_buffer -> header_gen -> fcs_gen -> plcp_tx ----> PHY (TXENABLE/TXDATA/TXCONFIRM)
                                        ^
                                     ack_gen <----------+
                                                        |
           protocol_manager (timing, sequences) <-- events
                                                        |
 Rx path:  rx_buffer <- header_check <- fcs_check <- plcp_rx <- PHY (RXENABLE/RXINDICATION/RXDATA)
```

| Block | Module | What it does |
|---|---|---|
| Tx Buffer | `tx_buffer` | 512 x 32 dual-port RAM used as a ring. Software writes descriptors and MSDUs into it. |
| Header Generation | `header_gen` | Turns descriptors into delimiter + MAC header + body bytes. |
| FCS Generation | `fcs_gen` | Appends the CRC-32 FCS to each MPDU. |
| PLCP Transmit | `plcp_tx` | 64 KB PPDU FIFO. Pads A-MPDU subframes and sends TXVECTOR + PSDU to the PHY. |
| Protocol Manager | `protocol_manager` | EDCA, RTS/CTS, waiting for responses, timeouts, TXOP continuation, sending responses. |
| ACK Generation | `ack_gen` | Builds ACK, CTS and compressed BlockAck frames. |
| PLCP Receive | `plcp_rx` | Reads RXVECTOR + PSDU and splits A-MPDUs at their delimiters. |
| FCS Check | `fcs_check` | CRC-32 residue check per MPDU. |
| Header Check | `header_check` | Decodes the header and filters by address. Decides the response, keeps the BlockAck scoreboard, commits frames to the Rx ring and raises an interrupt. |
| Rx Buffer | `rx_buffer` | 2k x 32 dual-port RAM. Written byte by byte, read as words by software. |
| Bus router | `bus_router` | Address decode to the eleven bus interfaces. |
| Top | `mac_hw` | Wires all of the above together. The PHY register interface is brought out as bus interface 11. |

Shared types and constants are in `mac_pkg`:

- the byte-stream structs `txbyte_t` and `rxbyte_t`
- the bus structs
- the frame type codes
- SIFS and the slot time
- the CRC-32 and CRC-8 functions

Everything runs in one clock domain with an active-low asynchronous reset.

## The byte streams

Between blocks, data moves one byte per cycle.

**Transmit stream.** Each transmit byte is a `txbyte_t`: the data byte, a `kind` (delimiter, header, body or FCS), and two end flags, `mpdu_last` and `ppdu_last`. The transmit stream has valid/ready handshakes. This lets Header Generation wait for software and PLCP Transmit refuse bytes while it inserts padding.

**Receive stream.** The receive stream (`rxbyte_t`: data, `first`, `last`) has no back-pressure: the PHY cannot be stopped. An MPDU can be thrown away in two ways:

- An `abort` pulse, when RXENABLE falls inside an MPDU.
- Header Check simply not moving the ring write pointer.

## Transmit: from descriptor to air

### Descriptors in the Tx ring

Software writes each frame into the Tx Buffer as eight descriptor words followed by the body, packed little-endian and padded to a whole word. It then advances `TX_WPTR`. Header Generation stalls whenever its read pointer catches up with the write pointer. So a frame larger than the ring, or a 42-frame aggregate, can be streamed through a 2 KB ring while software keeps refilling it.

| Word | Bits 31:16 | Bits 15:0 |
|---|---|---|
| 0 | duration/ID | frame control |
| 1 | address 1 [31:0] | |
| 2 | address 2 [15:0] | address 1 [47:32] |
| 3 | address 2 [47:16] | |
| 4 | address 3 [31:0] | |
| 5 | sequence control | address 3 [47:32] |
| 6 | body length (bytes) | QoS control |
| 7 | HT control | |

The header that goes on the air depends on the frame type:

| Frame | Header | Size |
|---|---|---|
| Data and management | FC, duration, A1, A2, A3, sequence control | 24 bytes |
| QoS data | as above, plus QoS control | 26 bytes |
| QoS data with the Order bit set | as above, plus HT control | 30 bytes |
| RTS, BAR, BA | FC, duration, RA, TA | 16 bytes |
| CTS, ACK | FC, duration, RA | 10 bytes |

Address 4 is never produced, because the design targets an infrastructure BSS (AP and stations).

### A-MPDU delimiters and padding

In aggregate mode, Header Generation puts an 802.11n delimiter in front of each MPDU:

- `{length[3:0], 0000}`
- `length[11:4]`
- CRC-8 over those 16 bits (x^8+x^2+x+1, preset ones, inverted)
- `0x4E`

Here `length` is the header plus body plus FCS. FCS Generation passes delimiter bytes through without feeding them to the CRC. PLCP Transmit then inserts 0-3 zero bytes after every subframe except the last, so each delimiter starts on a 4-byte boundary.

### Timing and the PPDU FIFO

Header Generation needs 2 cycles per word it reads and 1 cycle per byte it emits, plus 3 cycles to start and finish.

PLCP Transmit is store-and-forward. A PPDU becomes ready only after its last byte is in the FIFO. The FIFO holds 64 KB, enough for a 42 x 1500-byte A-MPDU (64,512 bytes including delimiters, headers, FCS and padding). This is what allows the next aggregate to be built while the current exchange is still running, and to go out exactly one SIFS after the BlockAck.

### PHY interface

On `tx_go`, PLCP Transmit raises TXENABLE and then presents one byte per cycle in which the PHY asserts TXCONFIRM:

1. First the 16-byte TXVECTOR:
   - bytes 0-2: PSDU length
   - byte 3: MCS
   - byte 4 bit 0: aggregation
   - the rest zero
2. Then the PSDU.

TXENABLE falls after the last byte, and `tx_done` pulses. The receive side mirrors this: while RXENABLE is high, every cycle with RXINDICATION carries one byte, first a 16-byte RXVECTOR with the same layout and then the PSDU.

## Receive: splitting, checking, filtering

### PLCP Receive

PLCP Receive takes the PSDU length and the aggregation bit from the RXVECTOR:

- **Single MPDU:** the PSDU is passed on as one MPDU.
- **A-MPDU:** each 4-byte word at a delimiter position is checked for signature, CRC-8 and non-zero length.
  - A good delimiter gives the length of the MPDU that follows. That MPDU is passed on and its padding is skipped.
  - A bad delimiter is counted, and the search moves on by four bytes. So one corrupted delimiter costs only its own subframe, which is how an 802.11n receiver recovers.

### FCS Check

FCS Check runs CRC-32 over each MPDU including its FCS. It reports `fcs_ok` with the last byte when the register holds the residue 0xDEBB20E3.

### Header Check

Header Check captures the first 30 bytes and decodes them. At the last byte, if the FCS is good and address 1 is this station or a group address, it does three things.

**1. It reports the frame to the Protocol Manager, with the response it asks for:**

| Received frame | Response |
|---|---|
| RTS | CTS |
| BlockAckReq | BlockAck |
| QoS data, normal-ack policy, inside an A-MPDU | BlockAck (implicit BlockAck request) |
| QoS data otherwise | ACK |
| Non-QoS unicast data | ACK |
| Unicast management | ACK |
| Group-addressed frames | none |

**2. It updates the BlockAck scoreboard.** This is a 64-bit bitmap starting at `ba_ssn`.

- A QoS data MPDU that arrived inside an A-MPDU and was actually stored sets its bit.
- A newer sequence number slides the window so that it becomes the last bit.
- A BlockAckReq moves the start to its starting sequence number.

The bitmap and start feed ACK Generation directly. So the BlockAck sent after an aggregate with lost subframes has exactly the bits of the MPDUs that made it.

**3. It commits the frame to the Rx ring** (data, management, BAR and BA frames):

- Bytes are written into the Rx Buffer as they arrive, at the write pointer plus their offset.
- A frame is committed by moving the write pointer to the next word boundary and pushing a descriptor: valid bit, length, start word.
- A frame that is bad, foreign, not to be kept, or does not fit is dropped by leaving the pointer where it was.
- Overflowing frames are counted.
- Every commit raises the Header Check interrupt.

## Protocol Manager: the timed part

Every time in the design comes from `CLK_PER_US` (50 cycles per µs):

| Interval | Length |
|---|---|
| SIFS | 16 µs = 800 cycles |
| Slot | 9 µs = 450 cycles |
| AIFS | SIFS + AIFSN x slot |
| Response timeout | 50 µs |

Software starts a sequence by writing CMD:

- bit 0: start
- bit 1: send an RTS first
- bit 2: aggregate
- bit 3: expect a response
- bit 4: continue the TXOP
- bits 15:8: MPDU count

The sequence then runs as follows:

1. **Build.** Header Generation builds the RTS (one descriptor), if one was asked for. It then builds the data PPDU (`count` descriptors). Contention starts only once the data PPDU is complete in the FIFO. This way the data can follow the CTS after exactly one SIFS, however long the aggregate is.
2. **EDCA.** The medium (CCA busy or RXENABLE) must be idle for AIFS. Then comes a backoff of `LFSR & CW` slots.
   - A busy medium during AIFS restarts AIFS.
   - A busy medium during backoff freezes the remaining slots and returns to AIFS.
   - AIFSN and CW are software registers. One access category is run at a time.
   - **TXOP continuation** (CMD bit 4) skips contention. The PPDU goes SIFS after the end of the last received PPDU, or as soon as it is ready if that is later. This is how the second aggregate of a TXOP follows the first BlockAck.
   - A continuation command may be written while a sequence is still running. It is then queued (STATUS bit 4), with room for one. Its PPDU is built into the PLCP Transmit FIFO while the current data PPDU goes out, so it is complete when the BlockAck arrives and leaves exactly SIFS later. The queued command starts right after the current one succeeds. The RTS bit of a queued command is ignored. Any other CMD write during a sequence is ignored.
3. **Transmit and wait.**
   - After an RTS, the Protocol Manager waits for a CTS, then sends the data SIFS after the CTS ends.
   - After the data, it waits for an ACK or BlockAck if one is expected.
   - A received PPDU must start within the timeout, and must contain the awaited frame (checked a few cycles after RXENABLE falls, when Header Check has finished). Otherwise the sequence fails and the rest of the FIFO is flushed. A queued command is dropped in that case, after its PPDU has been built, so that its descriptors still leave the Tx ring.
   - Success and failure are shown in STATUS and counted, and raise the Protocol Manager interrupt.

**Responses.** When Header Check asks for a response and no own sequence is running, the Protocol Manager waits until the received PPDU has ended. If a later MPDU of the same A-MPDU asks for a BlockAck, the BlockAck wins. ACK Generation then builds the frame through FCS Generation into the FIFO, and `tx_go` is issued when SIFS has passed since the end of reception. The duration field of a response is the received duration minus SIFS and a 44 µs response allowance, floored at zero.

Left to software:

- how many MPDUs fit in the TXOP limit
- NAV
- retries
- fragmentation
- rate choice (the MCS register)

## Software's view: register map

The bus is a simple valid/ready protocol:

- A request is `{valid, we, addr[16:0], wdata[31:0]}`.
- The addressed slave answers with `ready` one cycle later. Read data comes with `ready`.
- Writes take effect when `valid && we && !ready`.
- Address bits 16:13 select the window. Addresses beyond window 10 read as 0.

| Window | Base | Block | Registers (offset: meaning) |
|---|---|---|---|
| 0 | 0x00000 | Tx Buffer | 0x000-0x7FC RAM words; 0x1000 TX_WPTR (r/w); 0x1004 read pointer (r/o) |
| 1 | 0x02000 | Header Generation | 0x0 MPDUs built; 0x4 read pointer |
| 2 | 0x04000 | FCS Generation | 0x0 FCS appended |
| 3 | 0x06000 | PLCP Transmit | 0x0 PPDUs sent; 0x4 FIFO fill |
| 4 | 0x08000 | Protocol Manager | 0x00 CMD; 0x04 STATUS {queued, intr, fail, ok, busy}, write bit 3 to clear; 0x08 EDCA {CW[25:16], AIFSN[3:0]}; 0x0C MCS; 0x10/0x14 ok/fail counts; 0x18 responses sent; 0x1C cycles from the first PPDU to the end of the last sequence, queued ones included |
| 5 | 0x0A000 | ACK Generation | 0x0 responses built |
| 6 | 0x0C000 | Rx Buffer | RAM words (read only) |
| 7 | 0x0E000 | Header Check | 0x00/0x04 own address; 0x08 ring read pointer (bytes); 0x0C ring write pointer; 0x10 descriptor pop {valid, length[29:16], start word[15:0]}; 0x14 interrupt (write 1 to clear); 0x18 overflow drops |
| 8 | 0x10000 | FCS Check | 0x0 good; 0x4 bad |
| 9 | 0x12000 | PLCP Receive | 0x0 PPDUs; 0x4 bad delimiters; 0x8 interrupt (write 1 to clear) |
| 10 | 0x14000 | PHY | brought out on `phy_bus_req` / `phy_bus_rsp` |

The three interrupts, `pr_intr`, `prmgr_intr` and `hc_intr`, are top-level outputs.

## Sizes and throughput

| Parameter | Default | Origin |
|---|---|---|
| `CLK_PER_US` | 50 | 50 MHz MAC clock of the published design |
| `TXBUF_WORDS` | 512 | 512 x 32 transmit memory |
| `RXBUF_WORDS` | 2048 | 2k x 32 receive memory |
| `TXFIFO_BYTES` | 65536 | 16K x 32 FIFO |
| SIFS | 16 µs | 802.11 |
| Slot | 9 µs | this design (802.11 short slot) |
| Response timeout | 50 µs | this design |
| Response allowance in the duration | 44 µs | this design |

**Throughput limit.** The PHY interface carries one byte per cycle, so at 50 MHz it tops out at 400 Mb/s. The published design reports 462 Mb/s: 61 MPDUs of 1500 bytes in 1584 µs. That rate needs a wider PHY data path: the published timing diagram shows 32-bit TXDATA/RXDATA. This RTL keeps the 8-bit data path of the published block diagram's internal bus. Widening it would touch `plcp_tx`, `plcp_rx` and the PHY model.

**Measured.** In the end-to-end test, 61 MPDUs take about 1.96 ms of simulated time, of which the STA transmitter is busy for 1.88 ms. The 61 MPDUs are an A-MPDU of 42, then one of 19 queued behind it and sent SIFS after the BlockAck. The time includes software refilling the 2 KB Tx ring and draining the 8 KB Rx ring through the bus. The payload sent is about 361 Mb/s, close to the 400 Mb/s ceiling of the byte-wide PHY interface.

**Buffer limits.**

- The Rx ring holds five 1500-byte frames. A 42-MPDU aggregate is received only because software drains the ring while it arrives.
- A frame body can be up to 7955 bytes as a single MPDU. Inside an A-MPDU, the 12-bit delimiter length limits an MPDU to 4095 bytes.

## Where this departs from the published design

- **8-bit PHY data** instead of 32-bit (see above). The 462 Mb/s figure is not reachable at 50 MHz.
- **Two memories of the published SoC have no counterpart:** a 512 x 32 aggregation FIFO and a 512 x 32 receive MPDU FIFO. Padding happens inside the PLCP Transmit FIFO, and the receive path never stalls.
- **One BlockAck agreement and one EDCA access category** are held in hardware at a time.
- **No 802.11i encryption** in the data path.
- **The published text is inconsistent about the burst:** it describes the measured burst as 61 MPDUs in two A-MPDUs, while its figure shows aggregates of 42 and 22. The test uses 42 + 19 = 61.
- **ACK Generation builds CTS and BlockAck as well as ACK.** The published description names only ACK, but its list of supported exchanges needs all three.
- **Added by this design, not in the published description:** the response rules, the duration arithmetic, the response timeout and the CCA input.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. CRC references come from `tb_ref_pkg`: the FCS is computed bit by bit, non-reflected, on bit-reversed data, and the CRC-8 by polynomial division. So they do not share code with the RTL's CRC functions.

| Testbench | Checks |
|---|---|
| `tb_header_gen` | Every byte, kind and end flag of management, RTS, CTS and a 3-MPDU A-MPDU against headers built from the fields. Delimiter CRC. Ring stalls. Exact cycle count. |
| `tb_fcs_gen` / `tb_fcs_check` | FCS values against the reference. The CRC-32 check value of "123456789". Good and corrupted frames. |
| `tb_plcp_tx` | TXVECTOR fields. PSDU bytes with padding. TXENABLE length. One byte per cycle. Flush. |
| `tb_plcp_rx` | De-aggregation with a corrupted delimiter. Abort of a cut PPDU. One-cycle latency. Interrupt. |
| `tb_header_check` | Responses for each frame kind. Ring contents and descriptors. Scoreboard against a reference set, including the BAR move. Overflow. |
| `tb_protocol_manager` | AIFS, AIFS restart, backoff in whole slots, data exactly SIFS after the CTS, 50 µs timeout and flush, TXOP continuation, a continuation queued during a sequence (sent SIFS after the ACK, or flushed on failure), ACK exactly SIFS after a frame. All in cycles. |
| `tb_ack_gen`, `tb_tx_buffer`, `tb_rx_buffer`, `tb_bus_router` | Frame layouts, RAM ports and latency (every Rx Buffer word, and reads that collide with a write), address decode. |
| `tb_mac_hw` | Two full `mac_hw` instances (a station and an access point) at default parameters, over a channel model with PHY back-pressure and on-air corruption. Runs association + ACK, beacon, QoS+HTC data + ACK with a busy medium, RTS/CTS + 42-MPDU A-MPDU + BlockAck, TXOP continuation (queued during the first aggregate) with two corrupted subframes (their bits must be missing from the BlockAck), a timeout with flush, Rx overflow, QoS data under the No Ack policy, and an A-MPDU under the Block Ack policy followed by BlockAckReq and BlockAck. Every stored byte is checked. The test counts each mechanism (ring stall, backoff slot, AIFS restart, padding, PHY stall, ACK, CTS, BlockAck, RTS, TXOP continuation, flush, A-MPDU reception, BlockAckReq, No Ack data) and fails if any count is zero. It also checks that every response, the data after the CTS, and the continuation aggregate start SIFS ± 2 cycles after the PPDU they follow. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mac_hw \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/mac_pkg.sv tb/tb_mac_hw.sv
./obj_dir/Vtb_mac_hw
```

The full end-to-end test takes a few seconds.

All RTL is plain synthesizable SystemVerilog. The RAMs are written as arrays with one write port and registered reads, so synthesis infers block RAM. The only lint warnings are for unused bits: read-only bus slaves ignore `wdata`, and some header bytes are captured but not decoded.
