# Two-board BB84 key distribution: sifting, Cascade and privacy amplification in RTL

This is the digital part of a BB84 quantum key distribution link. Two boards do the work. Alice's board sends one of four polarisation states in each 400 ps time bin. Bob's board records which of its four single-photon detectors fired, and when. From there, everything that turns those raw events into a shared secret key runs in logic, on both boards:

- framing into packets;
- compensating for the path delay;
- sifting out the events measured in the wrong basis;
- Cascade error correction, run as four parallel threads;
- a hash check;
- privacy amplification.

The host only reads finished key words from a FIFO.

Detectors set the speed limit of such a link, not the logic. The design therefore lets the transmission rate be lowered: a state goes out in every 1st, 2nd, 4th or 8th bin (2.5 GHz, 1.25 GHz, 625 MHz, 312.5 MHz). At the lower rates, Bob can either keep only events in the transmission bin (gated) or keep any event of the period (ungated). A 16-bin detection histogram helps characterise detector jitter.

The top level (`qkd_system_top`) holds both board designs side by side. It brings out the signals that, on real hardware, go through serialisers, lasers and detectors:

- Alice's four one-hot quantum lines and Bob's four detector lines, one time bin per clock;
- per board, a sifting channel of 32-bit words;
- per board, an error-correction (EC) channel of 40-bit words.

## Time bins, packets and Sync

One clock cycle is one 400 ps time bin throughout. This keeps the timing logic exact and easy to follow. A real FPGA would take 16 or more bins per clock from its deserialisers. Widening the datapath that way is the main change a hardware port would need.

Alice groups 2048 transmissions into a packet. Slot *s* of packet *p* is the *s*-th transmission, not the *s*-th bin, so the same slot numbering works at every spacing. With the first state of a packet, Alice sends a `SYNC` word carrying the packet number.

On Bob's side, the quantum signal arrives some bins after the Sync. Its path differs from the classical one, so the host measures the difference and writes it to the `CHAN_DELAY` register. Bob delays the received Sync by that many bins in a delay line (up to 1024 bins) and opens the packet's capture window when it comes out. Inside the window:

- bin *b* belongs to slot `b >> spacing_log2`;
- an event counts as "in the transmission bin" when the low bits of *b* are zero.

## Alice: states, spacing and the match memory

Two 32-bit Galois LFSRs (taps `0x80200003`, host-seeded) give the value bit and the basis bit. Together they form the state `{basis, value}`, which selects one of the four quantum lines.

A test memory of 2048 two-bit entries can replace the generator. The host writes it, and it repeats over a programmable length. Test packets are what make the histogram measurement reproducible.

States pass through a small FIFO to the `spacing` block. For each transmission, that block:

- drives the one-hot line;
- writes `{valid, basis, value}` into the match memory at page `packet mod 8`, row `slot`;
- issues the Sync on slot 0.

A new packet starts only while fewer than eight packets are waiting for Bob's answer. This is the design's flow control, and it shows up as a stall counter. If the generator ever runs dry inside a packet, the slot goes out empty, is marked invalid and is counted as an underflow.

## Bob: recovering detections

Each detector line first passes through a programmable 0-15-bin alignment delay (`ALIGN` register), which evens out cable and detector skew. A detection is a rising edge, so a pulse several bins long counts once. During the capture window, each edge becomes an event `{pkt, slot, detector mask}`. The filtering is as follows:

- **Gated mode:** edges outside the transmission bin are dropped.
- **Repeated events:** only the first event in a slot is kept; later ones are counted as duplicates.
- **Multi-clicks:** an event on two or more detectors at once carries no bit. It is dropped one stage later and counted.

Every packet ends with an end marker, even when it contains no detection.

Each single-detector event becomes a triple `(slot, basis, value)`, using `basis = detector[1]` and `value = detector[0]`:

- the triple waits in the Det FIFO, which holds one packet;
- the pair `(slot, basis)` goes to Alice as a `DET` word;
- the packet ends with `DET_END`.

The histogram block counts, for one host-selected detector, the edges in each capture bin modulo 16. At 312.5 MHz that is two transmission periods, so the jitter tail after each transmission bin becomes visible.

## Sifting over the classical channel

Sifting words are 32 bits: a 24-bit message `{type, pkt, slot, basis}` followed by a CRC-8 (polynomial 0x07). The all-zero word means idle, and any word that fails its CRC is dropped and counted.

Alice's sift stage reads the match memory for every `DET` word, which takes one clock. If the stored slot is valid and the basis agrees:

- the stored value becomes a sifted bit;
- the pair is returned as an `ACK`.

On `DET_END`, Alice sends `ACK_END` and frees the packet's match-memory page.

Bob keeps the acknowledge list in the Sift FIFO. Both of Bob's lists are in slot order, so a single merge pass sifts them: a triple on the list gives a sifted bit, and a triple not on it is discarded. Both boards therefore produce the same sequence of sifted positions. Only the bit values differ, wherever the channel caused an error.

## Cascade threads

Sifted bits are cut into blocks of 4096 (`LOGN = 12`). The `sift2pa` stage deals block *k* to thread *k mod 4*. It later collects the threads' key output in block order, however the threads finish, and packs it into 32-bit words for the Key FIFO, first bit in bit 0.

The two ends of Cascade do different work and are called Active and Passive. On Alice, threads 0 and 2 are Active and threads 1 and 3 are Passive; Bob has the mirror image, so each thread pair has one of each. Passive corrects its bits towards Active's.

**Shuffle.** Each pass first permutes the block with `pos(i) = (a*i + b) mod 4096`, where `a` is odd. `a` and `b` come from an LFSR seeded with the shared `EC_SEED` and the block number, so both sides permute identically without exchanging anything. Shuffled position *i* belongs to group `i >> glog`.

**Phase 1 (groups of 8 bits):**

- Passive sends the parity of every group, 16 per message.
- Active counts the groups whose parity differs. More than 194 of the 512 groups suggests an error rate too high to correct, and the block is dropped.
- Otherwise, for every differing group Active sends a syndrome: the XOR of the in-group offsets of its one bits.
- Passive XORs that syndrome with its own. The result is the offset of a single error, and Passive flips that bit.

**Phase 2:** the same exchange with the group size doubled each pass, up to 64 bits. The phase ends after a pass in which no group differs. After six passes the block is dropped.

**Phase 3 (one final pass, group size doubled once more, still at most 64 bits):**

- Active sends syndrome and parity for every group.
- If the parity differs, Passive corrects one bit.
- If the parity agrees but the syndrome does not, the group holds an even number of errors. It is discarded on both sides, and Passive reports the discarded group to Active.

**Leak.** Every disclosed bit is counted: one per parity and `glog` per syndrome (`glog + 1` in phase 3). This count is what privacy amplification removes later.

**Signature and output.** Both sides then read out their kept bits in phase-3 order, skipping discarded groups, into privacy amplification. At the same time they compute a CRC-32 signature of those bits. Passive sends its signature, and Active compares it and returns the verdict. A failed verdict empties the block on both sides.

Each thread stores its block one bit per address, reads one bit per clock, and queues the messages it receives in a small FIFO. A block at 1-3 % errors takes roughly 17,000-27,000 clocks after loading, back to back. The four threads share the EC channel in round-robin order. Each 40-bit EC word is `{thread, type, 26-bit payload}` plus a CRC-8.

## Privacy amplification

Each thread has its own Toeplitz hash unit. While the thread reconciles, the unit fills a 4096-bit window from an LFSR seeded with `PA_SEED` and the block number. Then, for every kept bit that streams in:

- a one bit XORs the window into the accumulator;
- the window shifts in one fresh LFSR bit.

The accumulator is therefore T·x over GF(2), where T is a Toeplitz matrix shared by both sides. The output length is `kept - leak - 32 - margin`, where `margin` is a host register (default 64). A dropped block, a failed signature or a non-positive length gives an "empty" result instead.

## Host interface

Each board has a simple register bus (8-bit address, 32-bit data) and a Key FIFO read port. The bus stands in for the PCI/USB link of the original boards.

| Address | Register |
|---|---|
| 0x00 | control: `[0]` run, `[1]` gated, `[3:2]` spacing (log2), `[4]` use test pattern, `[5]` load RNG seeds (pulse), `[6]` clear histogram (pulse), `[9:8]` histogram detector |
| 0x01, 0x02 | RNG seeds (value, basis) |
| 0x03 | channel delay in bins |
| 0x04 | four 4-bit alignment delays |
| 0x05, 0x06 | EC and PA seeds |
| 0x07 | PA margin |
| 0x08 | test-pattern length |
| 0x09 | test-memory write: address in `[31:16]`, state in `[1:0]` |
| 0x20+i | status counter *i*, listed in the opening comments of `alice_fpga.sv` and `bob_fpga.sv` |
| 0x40+i | histogram bin *i* |

## What is not here, and where the design departs from the original

- **Not modelled:** serialisers, optics, detectors, the board-level delay and merge parts, the PCI/USB link and the external dual-port SRAM. The quantum and classical signals are plain ports instead.
- **Match memory:** eight packets (about 6.6 µs at 2.5 GHz). That is enough on a short link but stalls on a long one. A 200 km link needs about 2,400 packets in flight.
- **Throughput:** four threads produce roughly 0.35-0.45 key bits per clock at 1-2 % error rate. That is enough for about 12 Mb/s at a ~35 MHz clock on a short link. Over 200 km each block needs several 2 ms round trips, so four threads fall far below that rate.
- **Own choices:** Cascade's group sizes and thresholds, the permutation, the message formats, the CRC-32 signature, the Toeplitz/LFSR construction, the PA margin, the FIFO depths and the register map were all chosen for this design.
- **Dropped blocks:** a dropped Cascade block is simply lost. The thread moves on to the next block rather than restarting on the same one.

## Simulating

Compile the package first, then the other RTL files and a testbench. For example, the end-to-end link test:

```
verilator --binary --top-module tb_qkd_system_top -Wno-fatal \
    rtl/qkd_pkg.sv $(ls rtl/*.sv | grep -v qkd_pkg) \
    tb/qkd_channel_model.sv tb/tb_qkd_system_top.sv
./obj_dir/Vtb_qkd_system_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- **`tb_qkd_system_top`** connects the two boards through `qkd_channel_model`, a behavioural model of the optics in `tb/`. That model has loss, bit errors, jitter spread over neighbouring bins, multi-photon clicks, dark counts and separate quantum, classical and EC delays. Five runs cover:
  - all four spacings (2.5 GHz, 1.25 GHz, 625 MHz and 312.5 MHz);
  - gated and ungated capture;
  - the test pattern with the histogram;
  - a 25 % error rate.

  The keys read from both Key FIFOs must be identical. Every mechanism (stall, gating, duplicate, multi-click, correction, phase-2 pass, dropped block, histogram hit) must occur at least once. This test uses a smaller block size (512 bits) and a one-packet match memory to stay short.
- **`tb_qkd_full`** runs the top with every parameter at its default and checks that both boards deliver the same key words.
- **The unit testbenches** (`tb_<module>`) compare each block with an independent model. For example, the privacy amplification test uses a software Toeplitz product, and the Cascade test uses an Active/Passive pair back to back with injected errors.
