# Inline decryption of 1-RTT QUIC packets

QUIC runs over UDP and encrypts almost every byte of its packets. That moves
the cost of decryption from a network card's TCP offload back onto the host
CPU. This design removes that cost for the common case. It sits between an
Ethernet MAC and the processor, watches every frame go by and recognises
1-RTT QUIC packets of connections whose secrets software has registered. For
those packets it removes header protection, decrypts the payload with
AEAD_AES_128_GCM and checks the authentication tag, all while the frame
streams through.

The frame keeps its length and position in the stream. Headers and payload
come out as plaintext. The 16-byte tag is kept when it is correct and
replaced by zeros when it is not, so software knows from the tag alone
whether the packet can be trusted. Any other frame passes through unchanged,
74 clock cycles later.

The hardware never stalls. It takes one 32-bit AXI4-Stream word per cycle,
which is 2.67 Gbit/s at 83.33 MHz, and has no back-pressure path. Every stage
is a fixed-length delay line. Next to it is a small amount of logic that must
finish its work before the data it applies to reaches the end of the line.
Most of this README explains how each stage meets that deadline.

```
 s_axis ──► stream_parser ─► dcid_lookup ─► key_memory ─► header_protection ─► payload_protection ──► m_axis
             1 cycle          11 cycles      6 cycles      24 cycles            32 cycles
             byte tags        hash + CAM     5-word fetch  AES-ECB mask         AES-GCM engine
                                  ▲              ▲
 s_axil ──► axil_controller ──────┴──────────────┘   (DCIDs, secrets, failure counter)
```

## Scope

The design handles only a narrow set of packets:

- Ethernet II, then IPv4 with a 20-byte header, then UDP, then a QUIC short
  header.
- A 20-byte destination connection ID (DCID).
- AEAD_AES_128_GCM for the payload and AES-128-ECB for header protection.

With these limits every field of interest sits at a fixed byte offset:

- The first QUIC byte is frame byte 42, which is word 10, byte lane 2.
- The DCID is bytes 43–62.
- The packet number (PN) starts at QUIC byte 21 and is 1–4 bytes long.
- The header-protection sample is QUIC bytes 25–40.

Everything else passes through untouched. That includes VLAN-tagged frames,
IPv6, IPv4 options, long-header QUIC and unknown DCIDs. So does any packet
too short to be sampled, meaning fewer than 41 QUIC bytes.

## Bytes and metadata

A 32-bit data word travels down the pipeline with a metadata word beside it,
`quic_pkg::meta_t`. The metadata holds:

- TVALID, TLAST and the 4 TSTRB bits.
- For each byte lane, a 3-bit protocol code: 000 Ethernet, 001 IPv4, 010 UDP,
  011 QUIC, 100 unknown, 101 padding.
- For each byte lane, a DCID flag.

Lane 0 (bits 7:0) is the earliest byte, as AXI4-Stream defines it.

Every stage follows the same pattern. The pair (data, metadata) enters a
`delay_line` of the stage's length. In parallel, the stage reads the input
words it needs, such as a DCID, a sample or a length field. It then changes
the words, or the metadata, as they leave the line. Where a stage must tell
the next stage that a packet's secrets are ready, it raises a one-cycle pulse
(`address_valid`, `keys_valid`) in the same cycle as the word that holds the
first QUIC byte. Every stage uses that word as its reference point, so no
stage needs to count back to find where a packet began.

Each stage counts bytes by protocol (`quic_pkg::quic_before`), not by word
position. That keeps the logic correct when TSTRB removes bytes from the
last word of a frame.

## stream_parser: tagging every byte

A word counter from the start of the frame gives each byte's offset. The
parser then checks three things:

- EtherType 0x0800.
- IPv4 protocol 17.
- The header-form bit of the first QUIC byte: it must be 0, a short header.

These decide whether the bytes after each header get a known protocol code or
"unknown". The UDP length field sets where the datagram ends. Bytes after that
point (Ethernet padding), and lanes whose TSTRB bit is low, are tagged
"padding". Bytes 1–20 of a QUIC packet get the DCID flag.

A field the parser needs may arrive in the same word it decides on. In that
case the value is taken from the incoming word directly rather than from its
register. The output is registered: 1 cycle.

## dcid_lookup: a hash-addressed connection table

The 20 flagged DCID bytes are collected into a 160-bit register. When the last
one arrives (word 15), the DCID enters `xoodoo_hash`, which works like this:

- The DCID fills lanes 0–4 of the 384-bit Xoodoo state, byte k at bits
  8·(k mod 4) of lane k/4.
- A 0x01 padding byte follows.
- The 12 Xoodoo rounds run in 4 registered stages of 3 rounds each.
- The low 10 bits of lane 0 form the hash.

The hash addresses a 1024×10-bit memory whose entries are key-memory base
addresses. An entry of 0 means "no connection".

The table does not store the DCIDs themselves, so two DCIDs with the same
hash share an entry. Software has to avoid or accept such collisions. Writes
from the controller go through a second hash instance, so registering a
connection never disturbs a lookup in flight. After reset the memory is
cleared one entry per cycle, and `init_done` rises after 1024 cycles.

Timing: the last DCID byte arrives 5 words after the first QUIC byte. Hashing
takes 4 cycles and the read takes 1, and the delay line is 11 cycles long. At
the end of the line, `address_valid` and `address` come out with the word
holding the first QUIC byte.

On a miss, or when the frame ended before a full DCID arrived, every QUIC byte
of the frame is re-tagged "unknown". All later stages then leave it alone.

## key_memory: five secrets in five cycles

Each connection occupies five consecutive 128-bit words:

| Offset from base | Contents |
|---|---|
| +0 | `hp_key`, the header-protection key |
| +1 | `pp_key0`, the payload key for key phase 0 |
| +2 | `iv0`, the IV for key phase 0 |
| +3 | `pp_key1`, the payload key for key phase 1 |
| +4 | `iv1`, the IV for key phase 1 |

Each 96-bit IV sits in the upper bits of its word; the low 32 bits are zero.
A single memory read on five successive cycles is enough, because one fetch
per packet is all the pipeline needs.

Software can rewrite any single word. This matters because a key update only
changes one key/IV pair. The delay line is 6 cycles long, and `keys_valid`
again coincides with the first QUIC word.

## header_protection: the mask must win a race

This stage needs a deadline argument to work.

The mask is AES-128(hp_key, sample), and the sample is QUIC bytes 25–40. The
position of the sample does not depend on the PN length, because the sample
always assumes a 4-byte PN. The last sample byte arrives 10 words after the
first QUIC byte. `aes_iterative` then needs 10 more cycles: one shared round
datapath computes round keys on the fly. So the mask is ready 20 cycles after
the first QUIC word entered the stage.

The first QUIC word is the first one that must be changed. It therefore has
to wait at least that long, plus the register stages around it. The delay
line is set to 24 cycles.

At the end of the line:

1. The low 5 bits of the first QUIC byte are XORed with the low 5 bits of mask
   byte 0. This reveals the PN length (bits 1:0, plus 1) and the key phase
   (bit 2).
2. The next PN-length bytes after the DCID are XORed with mask bytes 1–4.
3. The key phase selects (`pp_key0`, `iv0`) or (`pp_key1`, `iv1`). The
   selected pair is sent on with `keys_valid_out`, aligned with the first QUIC
   word.

The secrets are copied into registers on `keys_valid`. They are copied a
second time, into an output-side register set, when the mask is done. Without
that second copy, the shortest packets sent back to back would break. Such a
packet makes a 21-word frame, so the next packet's `keys_valid` arrives before
this packet's first word has left the delay line. One register set would be
overwritten too early.

## payload_protection: scheduling a 13-cycle engine onto a stream

This is the hardest part of the design. The GCM engine, `aesgcm_pipelined`,
accepts a 128-bit block at most every 4 cycles, which is exactly the rate at
which 32-bit words deliver 16 bytes. Its results arrive 13 cycles after each
command. The data, meanwhile, cannot wait: it must leave this stage exactly 32
cycles after it entered.

### The engine

The engine takes five commands. `din & mask` zero-pads partial blocks.

| Command | What it does |
|---|---|
| S | Encrypts the zero block with the key to get the hash subkey H. Clears GHASH and sets the counter to 1. |
| A | Feeds associated data (the plaintext header) to GHASH. |
| AD | Decrypts: increments the counter, encrypts nonce‖counter, returns the plaintext and feeds the ciphertext to GHASH. |
| AE | Encrypts: the same as AD, but GHASH absorbs the ciphertext it produces. |
| F | Feeds the length block len(A)‖len(C) to GHASH. Encrypts J0 = nonce‖1 and returns the tag. |

Inside the engine:

- `aes_pipelined` has 9 register stages. Round keys are expanded alongside the
  data, and the last round is combinational.
- `ghash` then takes 4 cycles. It has a state machine with states INIT,
  CALCULATE and WAITING, and a shift-and-add multiplier over GF(2^128) that
  processes 64 bits of the operand per cycle.
- Command, data and mask travel beside both parts.

### The input side

The nonce is the IV XOR the received PN, right-aligned. The stage reads the PN
length from the header byte that was just unprotected. It takes the QUIC length
L from the UDP length field: L = UDP length − 8.

QUIC bytes go into a 64-byte ring buffer, except the last 16 bytes, which are
the tag and go into a tag register. A state machine walks through
WAIT → START → AUTHENTICATE → DECRYPT → FINISHED. It issues the next command
once all bytes of the block are in the buffer and 4 cycles have passed since
the previous command (A may follow S at once). The commands are:

1. **S**, on the first QUIC word.
2. **A, A**: the header is 22–25 bytes, sent as a 16-byte block and then a
   6–9-byte masked block.
3. **AD** for every 16 payload bytes, the last block masked to 1–16 bytes.
4. **F** with len(A) = 8·(21 + PN length) and
   len(C) = 8·(L − 21 − PN length − 16).

Because the second header block is short, the payload blocks are not aligned
to words. The byte buffer absorbs that, instead of wide multiplexers.

### The output side

Plaintext blocks coming back from the engine are written into a second byte
ring buffer. As each ciphertext byte leaves the 32-cycle delay line, it is
replaced by the next plaintext byte in order.

When F returns, the computed tag is compared with the received one. The
received tag was copied aside when F was issued: with 21-word frames, the next
packet's tag can arrive before F's result does. If the tags differ, the tag
bytes leave as zeros and `auth_fail_count` is incremented.

Why 32 cycles is enough: a payload block is complete in the buffer at most 5
cycles after its first byte arrived. It then waits at most 4 cycles for a
command slot, because blocks arrive at the same rate as slots open. Its
plaintext returns 13 cycles later. That is about 22 cycles after its first
byte arrived, against the 32 cycles that byte spends in the delay line.

A sticky `underrun` output would report a byte that had to leave before its
plaintext was ready. No test has ever raised it.

## axil_controller: the software interface

Registers are 32 bits wide and addressed by byte offset over AXI4-Lite:

| Offset | Register |
|---|---|
| 0x00 | CR. Write 0x1 to store the DCID, 0x2 to invalidate it, 0x4 to store the key word, 0x8 to clear all value registers. Each bit produces a one-cycle pulse; CR reads back as 0. |
| 0x04–0x14 | DCID words 0–4 (word 0 is the least significant) |
| 0x18 | DCID address, the connection's key base address |
| 0x1C–0x28 | Key words 0–3 (word 0 is the least significant) |
| 0x2C | Key address |
| 0x30 | Failed-authentication counter (read only) |

To register a connection:

1. Write the DCID, then its base address, then CR = 0x1.
2. For each of the five secrets, write the key words, then the key address,
   then CR = 0x4.

Byte strobes are honoured. BVALID and RVALID follow their request by one
cycle, and each is held until accepted; assertions check this.

## Latency budget

| Stage | Cycles |
|---|---|
| stream_parser | 1 |
| dcid_lookup | 11 |
| key_memory | 6 |
| header_protection | 24 |
| payload_protection | 32 |
| **Total** | **74** (888 ns at 83.33 MHz) |

## Where this design departs from the thesis it implements

The architecture follows the thesis: the stages and their order, the CAM
addressed by a Xoodoo hash, the 5-cycle key fetch, the S/A/AD/AE/F engine, the
WAIT…FINISHED state machine, the zeroed tag and the register-driven
controller. The differences are these:

- **Header-protection latency is 24 cycles, not 14.** The thesis's latency
  budget gives 14 cycles for this stage (63 in total). As explained above, the
  mask cannot be ready before about 21 cycles here, so 24 is used and the total
  is 74 cycles. The extra parser cycle accounts for the rest.
- **Tag generation uses J0 = nonce‖1**, as the GCM standard requires. The
  thesis's text at one point describes the nonce followed by 32 zero bits,
  which would not give standard tags.
- **Byte buffers replace the thesis's input-selection and output
  multiplexers** in payload protection. The command schedule is the same.
- **Stricter parsing.** The thesis says its prototype treated every packet as
  QUIC. This parser checks EtherType, the IP protocol and the short-header
  bit, as the thesis's description of the parser says it should, and it tags
  Ethernet padding.
- **Choices where the thesis is silent:**
  - The controller's register offsets and word order.
  - The 0x8 clear command.
  - The lookup memory size (1024 entries).
  - How Xoodoo is applied: padding, 4×3-round staging, and which output bits
    form the address.
  - The 32-bit failure counter.
  - The `init_done` clearing walk.
  - The second secret register set in header protection and the tag copy in
    payload protection. Both are needed for back-to-back minimum-size packets.
- **Not built**, because they are outside the hardware: the Linux driver, the
  Ethernet PHY-to-AXI4-Stream IP, the processor system and the test FIFOs. The
  top brings the AXI4-Stream and AXI4-Lite ports out in their place.
  `m_axis_tready` is not used: like the original, the pipeline never stalls,
  so the sink must always accept data.

## Files

| File | Contents |
|---|---|
| `rtl/quic_pkg.sv` | Shared constants, metadata struct, protocol codes, GCM commands |
| `rtl/aes_pkg.sv` | AES-128 round functions and S-box |
| `rtl/delay_line.sv` | Parameterised register chain |
| `rtl/stream_parser.sv` | Byte protocol tagging |
| `rtl/xoodoo_hash.sv` | Pipelined Xoodoo-based DCID hash |
| `rtl/dcid_lookup.sv` | Hash-addressed connection table |
| `rtl/key_memory.sv` | Secret storage and fetch |
| `rtl/aes_iterative.sv` | Iterative AES-128, 10 cycles |
| `rtl/header_protection.sv` | Mask computation and header unmasking |
| `rtl/aes_pipelined.sv` | 9-stage AES-128 |
| `rtl/ghash.sv` | GHASH with a two-cycle multiplier |
| `rtl/aesgcm_pipelined.sv` | Command-driven AES-GCM engine |
| `rtl/payload_protection.sv` | Command scheduling, plaintext substitution, tag check |
| `rtl/axil_controller.sv` | AXI4-Lite register file |
| `rtl/quic_decrypt_top.sv` | Top level, no parameters |

The top's AXI4-Stream and AXI4-Lite ports follow the usual naming
(`s_axis_*`, `m_axis_*`, `s_axil_*`). The top also has the status outputs
`init_done`, `auth_fail_count` and `underrun`.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

`tb/tb_ref_pkg.sv` is an independent reference model written for the
testbenches: AES-128, GCM encryption and a generator for protected QUIC
frames. It builds a frame by encrypting with GCM, then applying header
protection, exactly as a QUIC sender would. It also returns the frame the
pipeline should deliver.

Build and run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/quic_pkg.sv rtl/aes_pkg.sv tb/tb_ref_pkg.sv tb/tb_quic_decrypt_top.sv \
    --top-module tb_quic_decrypt_top -Mdir obj_top
./obj_top/Vtb_quic_decrypt_top
```

The end-to-end test runs the top at its default sizes. It:

- registers three connections over AXI4-Lite;
- streams protected packets with every PN length and both key phases, damaged
  tags, unknown and invalidated DCIDs, non-QUIC frames, Ethernet padding, the
  shortest packets back to back, a full 1518-byte frame, and a key update
  that rewrites one key/IV pair of a live connection;
- compares every output frame with the reference model;
- checks the 74-cycle latency and the failure counter;
- prints how often each of these cases occurred.

To run another testbench, replace the last file and the top module. For
example, for the payload stage use `tb/tb_payload_protection.sv` and
`--top-module tb_payload_protection`. The packages must come first on the
command line; `-y rtl` finds the modules.
