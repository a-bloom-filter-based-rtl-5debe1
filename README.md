# Bloom filter traffic inspector for a lawful-interception monitoring station

A monitoring station on an aggregation link sees the traffic of tens of
thousands of subscribers, of whom only a handful are suspects under a wiretap
warrant. The station must pass or drop everything else at line rate and never
miss a suspect's packet. This RTL does the hardware half of that job: every
packet's IPv4 source and destination addresses are looked up in a Bloom
filter that holds the suspects' addresses, and the outcome is written into
the packet's routing header so that matching packets are copied to the host,
where software removes the rare false positives and stores the capture.

The module is built to take the place of the output-port lookup stage of a
NetFPGA-style 1 Gbit/s packet pipeline: 64-bit words at 125 MHz (8 Gbit/s
raw), eight output queues (four Ethernet MAC ports, four host/CPU ports), and
a module header word in front of every packet whose destination bits tell the
output queues where the packet goes. The rest of that pipeline (reception
queues, input arbiter, output and transmission queues, MACs, the PCI-X DMA
path) and the host software are not part of this RTL; the top level's ports
are where they connect.

## The Bloom filter

A Bloom filter is a bit array of N bits, all zero at the start, plus k hash
functions. Adding an address sets the k bits its hashes point at; an address
is reported present when all k of its bits are set. It never misses an added
address, but an address that was never added can hit by chance (a false
positive) with probability about (1 - e^(-kn/N))^k for n added addresses.

Here N = 65536 and k = 2:

| suspects n | false-positive probability |
|-----------:|---------------------------:|
| 10         | 9.31e-8                    |
| 100        | 9.28e-6                    |
| 1000       | 9.03e-4                    |

Both hashes are Fibonacci (multiplicative) hashes: the key is multiplied by
0x9E3779B9 modulo 2^32 and the top 16 bits are the bit index. `h1` hashes
the address itself, `h2` hashes the address with its bit order reversed
(the reversal is this design's choice of "fixed permutation").
For example, address 0.0.0.1 sets bits 0x9E37 and 0x8000.

The array lives in one 2048 x 32 dual-port block RAM (`bloom_filter.sv`).
Port A reads the word holding the `h1` bit, port B the word holding the
`h2` bit, so a lookup takes one cycle and returns one cycle later. After
reset a sweep clears the array (2048 cycles) and then raises `bf_ready`.

## Packet flow

```
 in_* --> Input FIFO --> Packet Buffer --+--> Output FIFO --> output stage --> out_*
                              |          |                      ^ decision
                              v          |                      |
                          Inspector -----+----------------------+
                              | two lookups per packet (high priority)
                              v
  usr_* <--> USBI <-----> Bloom filter (low priority)
```

1. A packet enters the **Input FIFO** (`pkt_fifo`, 32 x 72 bits).
2. The **Packet Buffer** (`packet_buffer`) moves each word on to the
   **Output FIFO** and, in the same cycle, keeps the packet's first six words
   (module header plus the first 40 bytes of the frame, enough to reach the
   end of the IPv4 destination address).
3. The **Inspector** (`inspector`) reads the header's source port, the
   EtherType and both addresses out of the buffer, one word per cycle.
4. It looks up the source address and then the destination address in
   consecutive cycles. The packet matches if either one hits. A packet that
   is not IPv4, or too short to hold both addresses, never matches.
5. The **output stage** (`out_gate`) holds the packet's header at the Output
   FIFO head until the decision is ready, replaces the header's destination
   bits with the decision and lets it go. The rest of the packet follows
   with no further checks. A packet whose decision selects no port is drained
   and discarded instead.

The buffer holds one packet at a time. The first word of the next packet
waits in the Input FIFO until the current packet's header has left, and this
is the only stall in the data path. The Inspector then starts on the next
packet while the body of the previous one is still streaming out, so the two
overlap. From the moment the buffer is full, the decision takes 7 cycles.
Through an otherwise empty module with the output ready, a packet's header
leaves 14 cycles after it is written in.

### Throughput

With the output always ready and back-to-back input, the module accepts one
word per cycle (8 Gbit/s at 125 MHz) for 256-, 512- and 1500-byte packets.
For minimum-size 60-byte packets it accepts about 0.69 words per cycle
(5.5 Gbit/s including the header word): the per-packet inspection time is
longer than the packet itself. Both figures are above the 4 Gbit/s that four
Gigabit ports can deliver.

## Interception modes and header bits

Header word layout (data bits; control byte = 0xFF):

| bits    | field                                               |
|---------|-----------------------------------------------------|
| [63:48] | one-hot destination ports: bit 2i = MAC i, 2i+1 = CPU i |
| [47:32] | packet length in words                              |
| [31:16] | source port number: 2i = MAC i, 2i+1 = CPU i        |
| [15:0]  | packet length in bytes                              |

Data words carry control byte 0, and the last word carries a non-zero control
byte marking its last valid byte. Exactly one header word per packet is
assumed. The field layout and control coding follow common NetFPGA practice
and are this design's assumption.

For a packet arriving on port index i (MAC i or CPU i), the module writes
these destination bits:

| `mode`              | match            | no match        |
|---------------------|------------------|-----------------|
| Forward and Tap (0) | MAC (i^1) + CPU i | MAC (i^1)       |
| Tap and Drop (1)    | CPU i            | none: discarded |

Forward and Tap is meant for a station placed in series with the link, so
ports are paired as a wire (0<->1, 2<->3). The pairing is this design's
choice. Tap and Drop is meant for a passive copy of the link. `mode` is
sampled when the Inspector starts on a packet. Change it only between
packets if a clean switch is needed.

## Updating the filter at run time

The USBI (`usbi`) serves host software through a request/response port:
hold `usr_req` with the operation and its operands until `usr_ack` pulses,
then drop `usr_req`.

| `usr_op`       | effect                                                   |
|----------------|----------------------------------------------------------|
| `USR_READ`     | `usr_rdata` = word `usr_addr` of the bit array          |
| `USR_WRITE`    | word `usr_addr` = `usr_wdata`                            |
| `USR_ADD_IP`   | set both hash bits of `usr_ip` (two read-modify-writes) |
| `USR_TEST_IP`  | `usr_hit` = both hash bits of `usr_ip` are set          |

A single address cannot be removed from a Bloom filter. Software recomputes
the array for the new suspect list and rewrites it with `USR_WRITE`.

Every USBI access uses the filter's low-priority port. The priority-encoded
controller grants it only in a cycle with no Inspector lookup, so traffic
classification never waits for software. A user request is delayed for as
long as lookups keep coming. With the filter idle, `usr_ack` for a `USR_READ` comes about four cycles after the request.
Bit-array word w holds bits 32w..32w+31, and bit index b lies in word
b >> 5 at position b & 31.

## Files

| file | contents |
|------|----------|
| `rtl/bi_pkg.sv` | bus word type, header and frame field positions, mode and operation enums, hash constant |
| `rtl/bloom_inspector.sv` | top level: wiring of all blocks |
| `rtl/pkt_fifo.sv` | Input and Output FIFO |
| `rtl/packet_buffer.sv` | copy to Output FIFO, first-word buffer, stall |
| `rtl/inspector.sv` | address extraction, two lookups, decision |
| `rtl/out_gate.sv` | header hold, rewrite, forward or discard |
| `rtl/bloom_filter.sv` | bit array RAM, priority controller, clear sweep |
| `rtl/bf_hash.sv` | the two Fibonacci hashes |
| `rtl/usbi.sv` | user-space request handling |
| `tb/tb_util_pkg.sv` | reference hashes, packet builder, expected ports |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_bloom_inspector.sv` | end to end at full size: both modes, back-pressure, concurrent user access, throughput |
| `tb/tb_fp_rate.sv` | false-positive rate for 10, 100, 1000 suspects, no false negatives |

Top-level parameters: `N_BITS` (65536), `WORD_W` (32, RAM word),
`FIFO_DEPTH` (32), `BUF_WORDS` (6, must stay at least 6 so that it
reaches the destination address). `N_BITS` sets the hash index width
(log2 N_BITS).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/bi_pkg.sv tb/tb_util_pkg.sv tb/tb_bloom_inspector.sv \
  --top-module tb_bloom_inspector -Mdir obj && ./obj/Vtb_bloom_inspector
```

`-y rtl -y tb` lets Verilator find each module in the file of the same name;
the two packages are listed first because they are imported, not
instantiated.

Replace the testbench name to run another one. All of them run in seconds at
the default sizes. The end-to-end testbench reads a few internal signals
(`pb_stall`, `lp_req`, `hp_req`) only to count how often the buffer stall
and the user-access hold-off occur.

## What to trust, and where this departs from the source design

Checked by simulation:
- Classification against an independent reference model, in both modes.
- Header rewriting and drops.
- Ordering under random input gaps and output back-pressure.
- Priority of lookups over user accesses.
- Line-rate throughput for 256-byte and larger packets.
- The false-positive rate: about 8.6e-4 measured for 1000 suspects, against
  9.03e-4 predicted.

Assertions check these handshakes:
- no FIFO overflow or underflow;
- `out_wr` only while `out_rdy`;
- `in_wr` only while `in_rdy`;
- held user requests.

The source design fixes the block structure, the copy-while-buffering data
path, the two lookups per packet, the priority of the Inspector over user
access, k = 2 Fibonacci hashes over the address and a permutation of it,
N = 65536, and the two interception modes. The following are this design's
own choices and may differ from the original:
- The bus control coding and header layout.
- The permutation used by `h2`.
- The RAM word width and the clear-on-reset sweep.
- The FIFO depths and buffer size.
- The lookup order.
- The Forward-and-Tap port pairing.
- Which CPU port receives captures.
- Discarding unmatched Tap-and-Drop packets inside the module rather than
  passing them on with an empty destination.
- The USBI operation set.

Not included:
- The surrounding pipeline, the Ethernet ports and the host DMA path.
- The host software. Its jobs are recomputing the filter, filtering out
  false positives and writing capture files.
- The host register bus that would carry the `usr_*` requests.
- The measured capture limits of the original prototype (about 400 Mbit/s
  over PCI-X, 250 Mbit/s to disk, 9e4 packets/s). These are properties of
  the host, not of this logic.
