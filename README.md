# DEC-NoC network interface

A network on chip that guards its links with an error control code and
retransmission (ARQ) spends much of its traffic, and power, on resending
packets. A single flipped bit anywhere in a flit forces a resend. Much of that
effort is wasted. Many applications tolerate a small relative error in their
data, and a flip in the low mantissa bits of a floating-point word changes its
value by only a tiny fraction.

DEC-NoC ("dynamic error control") uses this. For every approximable 32-bit
word, the sending network interface works out how many most-significant bits
must arrive intact to stay within the application's error threshold. The check
bits of each flit are then computed over those bits only. A flip in an
unprotected bit passes the check and is delivered as is. It changes the word by
less than the threshold, and no retransmission is needed. Integers gain from
the same rule: a small integer is converted to a float before sending and
converted back on arrival. Words that must be exact, and integers too large to
convert exactly, keep full protection.

This repository holds synthesizable SystemVerilog for one node's network
interface (NI). The send path has the approximate coding logic, packet
assembly, the masked encoder, the packet buffer and retransmission. The receive
path has the masked decoder, ACK/NACK generation and conversion back to
integer. There are also self-checking testbenches. The router, the mesh and the
cores are not part of this design; the NI brings their sides out as ports.

## How many bits a word needs

A float that keeps its sign, all 8 exponent bits and its top `n` mantissa bits
is within a relative error of `2^-n`, however the remaining low bits are
corrupted. A threshold of `2^-n` therefore needs `9 + n` protected MSBs. The
threshold is snapped down to one of eight levels. Each level has a 3-bit
*protection code*:

| code | threshold level   | protected MSBs | mask          |
|------|-------------------|----------------|---------------|
| 000  | 2^-3  (12.5 %)    | 12             | `0xFFF00000`  |
| 001  | 2^-4  (6.25 %)    | 13             | `0xFFF80000`  |
| 010  | 2^-6  (1.5625 %)  | 15             | `0xFFFE0000`  |
| 011  | 2^-9              | 18             | `0xFFFFC000`  |
| 100  | 2^-13             | 22             | `0xFFFFFC00`  |
| 101  | 2^-16             | 25             | `0xFFFFFF80`  |
| 110  | 2^-19             | 28             | `0xFFFFFFF0`  |
| 111  | 0 (exact)         | 32             | `0xFFFFFFFF`  |

A threshold that falls between two levels uses the lower level, which is the
safe side. For example, 7 % maps to code 001, and 5 % maps to 010. A threshold
at or above 12.5 % uses 000. A non-zero threshold below 2^-19 uses 111. The
threshold comes from the core with every word as an unsigned fraction in
0.32 fixed point (value / 2^32), so 10 % is `32'd429496730`. See
`prot_code_calc.sv`. `prot_len`/`prot_mask` in `dec_noc_pkg.sv` give the bit
count and mask for a code.

## Sending integers as floats (CIF)

An IEEE single holds every integer with `|x| <= 2^24` exactly. Inside that
conversion range, `int_to_cif` turns an approximable integer into a float,
called a CIF (converted integer to float). It then gets the same protection code
as a float with that threshold. 1029 becomes `0x4480A000`. `cif_to_int`
converts back at the receiver by truncating toward zero, so 1033.57 (1029 with
some flipped low bits) arrives as 1033. An approximable integer outside the
range is sent unchanged with code 111. A word that the core does not mark
approximable always gets code 111, whatever its type.

## Approximation code and packet format

Each word gets a 4-bit *approximation code* `{conv, prot[2:0]}`, where `conv=1`
marks a CIF. The four words of the worked example (15 %, 10 % floats, a
convertible and a large integer) give 0010, 0001, 1010 and 0111.

A packet is 16 words sent as 5 flits: one head flit, then four flits of four
words each (body, body, body, tail). The head flit carries the codes of all 16
words, which is why the whole packet is assembled before the head can be sent.

```
flit_t  = { ftype[1:0], seq[7:0], payload[127:0], check[15:0] }   154 bits
head payload:  [63:0]   approximation codes, word i at [4i+3:4i]
               [69:64]  destination node     [75:70] source node   rest 0
body payload:  word 4k+j at [32j+31:32j] of the k-th body/tail flit
```

`ftype` and `seq` (the packet's sequence number) are link control fields outside
the code. Only `payload` and `check` are assumed to suffer bit errors.

## Masked error control

The encoder computes each flit's protection mask. The mask is all ones for the
head flit, and for a body or tail flit it is the four words' masks from their
codes. The check bits are computed over `payload & mask`. Zeroing the
unprotected bits is the same as coding only the selected bits. The decoder
takes the codes from the head it received, rebuilds the same mask and checks
`received_payload & mask`. This lets flips in unprotected bits through.

Two codes are built in, chosen by the `ECC` parameter:

* **`ECC_CRC`** (default, ARQ+CRC): CRC-16 with polynomial
  x^16+x^12+x^5+1, initial value 0xFFFF, MSB first, over the 128 masked bits.
  Any mismatch is an error.
* **`ECC_SECDED`** (ARQ+SECDED): an extended Hamming code over the 128 masked
  bits. It uses 8 Hamming bits plus one overall parity bit, in `check[8:0]`,
  with the upper check bits zero. A single flip in the protected bits, or in the
  check bits, is corrected. Two flips are detected and count as an error.
  Correction applies only to the masked data. Flips in unprotected bits are
  neither seen nor repaired.

## Send path (`ni_tx`)

1. **ACL** (`acl.sv`, approximate coding logic). Each accepted core word goes
   through the decision: exact → code 0111, data unchanged. Approximable float →
   `{0, prot}`. Approximable integer inside the range → CIF data and `{1, prot}`.
   Approximable integer outside → `0111`. The result is registered.
2. **Assembly.** 16 ACL results fill a packet register. `core_ready` drops only
   while a full packet waits to be sent.
3. **Encode and send.** When the packet is full and a buffer slot is free, it
   gets the next sequence number. Its five flits are encoded one per cycle
   (`packet_encoder`), registered onto `tx_flit`, and written into the slot.
4. **Packet buffer** (`packet_buffer.sv`, `NBUF` slots of 5 encoded flits).
   An ACK with a matching sequence number frees the slot. A NACK marks it
   pending. Pending packets are resent from the stored flits ahead of any new
   packet, lowest slot first, with their original sequence number.

With all slots waiting for ACKs, a full packet waits and the core is stalled.

## Receive path (`ni_rx`)

1. **Decoder** (`packet_decoder.sv`). It checks the head flit with full
   protection and stores its codes, source and sequence number. It then checks
   each body and tail flit with the mask built from those codes. Results are
   registered.
2. **ACK/NACK.** One answer per packet, tagged with its sequence number:
   * ACK after a good tail.
   * NACK on the first failed flit, and the rest of that packet is ignored.
   * A failed head flit also gets a NACK. The sequence number is a control field
     and is still valid, so the sender resends the whole packet.
3. **Conversion back.** Four `cif_to_int` converters sit behind a multiplexer on
   the `conv` bit of each word. CIF words become integers; other words pass
   through unchanged.
4. **Delivery.** Words are collected per packet. A packet goes to the core
   (`pkt_valid` for one cycle, with `pkt_data`, `pkt_src`, `pkt_seq`) only when
   its tail has passed. A packet that is later NACKed is therefore never seen
   by the core, and a retransmission cannot duplicate words.

`ev_corrected` pulses when SECDED repaired a flit. `ev_error` pulses when a flit
failed its check.

## Timing

All flops use `clk` with asynchronous active-low `rst_n`.

* **Source: 2 extra cycles.** The ACL result is registered at the edge that
  accepts a word. The head flit is encoded and registered at the next edge. The
  router can take the head flit at the second edge after the edge that accepted
  the packet's last word. After that, one flit per cycle follows while
  `tx_ready` is high. `tx_flit` holds steady while `tx_valid && !tx_ready`.
* **Destination: 1 extra cycle.** The decoder checks and registers a flit at
  the edge that samples it. The finished packet is registered at the next edge.
  The core sees `pkt_valid` in the cycle after that, 2 edges after the tail
  flit was sampled. The receiver accepts a flit every cycle (no back-pressure),
  and the core must take `pkt_*` in the cycle it is valid.
* **ACK/NACK** leave the receiver on `rx_ack_*` in the same registered cycle as
  the decoder's verdict on the tail, or on the failing flit. They must be
  carried back to the sender's `tx_ack_*` by the network; any delay is allowed.

## Top level (`dec_noc_ni`) and parameters

| parameter | default   | meaning |
|-----------|-----------|---------|
| `ECC`     | `ECC_CRC` | `ECC_CRC` (ARQ+CRC) or `ECC_SECDED` (ARQ+SECDED) |
| `NBUF`    | 3         | packet-buffer slots (packets in flight per NI) |

Fixed in `dec_noc_pkg`: 32-bit words, 4 words per flit, 16 words per packet,
16 check bits, 8-bit sequence numbers, 6-bit node ids (an 8x8 mesh has 64
nodes), 32-bit thresholds.

| port | dir | meaning |
|------|-----|---------|
| `node_id[5:0]` | in | this node's id, written into the head as the source |
| `core_valid/core_ready`, `core_word`, `core_dest` | in/out | one word per handshake: `core_word_t {data, approx, dtype, thr}`; `core_dest` is sampled with the packet's first word |
| `tx_valid/tx_ready`, `tx_flit` | out/in | flits to the router |
| `tx_ack_valid`, `tx_ack_nack`, `tx_ack_seq` | in | ACK/NACK from the receiver of our packets |
| `rx_valid`, `rx_flit` | in | flits from the router |
| `rx_ack_valid`, `rx_ack_nack`, `rx_ack_seq` | out | ACK/NACK for packets received here |
| `pkt_valid`, `pkt_data[16][32]`, `pkt_src`, `pkt_seq` | out | a whole received packet |
| `ev_corrected`, `ev_error` | out | per-flit event pulses |

The file hierarchy is `dec_noc_ni` → `ni_tx` (`acl` → `prot_code_calc`,
`int_to_cif`; `packet_encoder`; `packet_buffer`) and `ni_rx` (`packet_decoder`,
`cif_to_int` ×4). `dec_noc_pkg.sv` holds the types, CRC and SECDED functions.

## Design choices and departures

The method fixes the protection rule, the threshold levels and codes, the
conversion range, the codes carried in the head flit, full protection of the
head, masked coding of each flit, and NACK with retransmission from a packet
buffer. It also fixes the 2-cycle source and 1-cycle destination overheads.
The following are this design's own choices, or places where it differs:

* **Head-flit errors.** The method has the router resend a bad head flit. With
  no router here, the receiver NACKs the packet and the sender resends all five
  flits.
* **Delivery of whole packets.** The method passes words on as they are checked.
  Here a packet is delivered only after its tail is good. Otherwise a NACK after
  some words had already gone to the core would cause duplicates.
* **One ACK/NACK per packet**, matched by an 8-bit sequence number. The ACK path
  is a separate sideband, since its transport is left open.
* **SECDED rule.** A flit with two errors in protected bits counts as failed
  (NACK), as standard SECDED requires.
* **Code choices.** The CRC polynomial and width, and the SECDED construction,
  are not specified by the method. The ones above are common choices.
* **Threshold format** (0.32 fraction), **word type flag** (`dtype`: 0 float,
  1 integer), **CIF rounding** (truncation toward zero, which matches the worked
  example), **conversion range inclusive of ±2^24**.
* **`NBUF = 3`**, retransmissions before new packets, lowest free slot first.
* **Flit layout.** Head field positions and 154-bit flits, with `ftype` and
  `seq` outside the code.

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_prot_code_calc` | every level exactly at, just above and just below its boundary; the 3, 5, 10 and 15 % thresholds |
| `tb_int_to_cif` | zero, ±1, ±2^24 and just beyond, 1029 → 0x4480A000, random values against a double-precision reference |
| `tb_cif_to_int` | exact integers, values with a fraction (as left by flipped low bits), values below one, negatives, saturation, 0x4481324A → 1033 |
| `tb_acl` | the worked-example codes and every branch of the decision |
| `tb_packet_encoder` | head full protection, CRC against a byte-wise reference (known value 0x296E), masked bits ignored, both codes |
| `tb_packet_decoder` | flips in protected, unprotected and check bits, single/double flips for SECDED, NACK and dropping after a failed flit |
| `tb_packet_buffer` | random alloc/ACK/NACK/retransmit traffic against a reference model |
| `tb_ni_tx` | 2-cycle head latency, flit order and codes, retransmission on NACK, stalls |
| `tb_ni_rx` | decode, ACK/NACK, conversion, 2-edge delivery latency |
| `tb_dec_noc_ni` | two NIs sending 120 packets each way over a noisy link (flip probability 1.5e-3 per bit, at most 2 flips per flit), ACKs delayed 40 cycles, random stalls, defaults only; every packet arrives once and within its threshold, and every mechanism (each protection code, CIF, out-of-range integers, exact words, tolerated flips, NACK, retransmission, head errors, full buffer) must occur |
| `tb_dec_noc_ni_secded` | the same with `ECC_SECDED`, and corrections must occur |
| `tb_workload_parsec` | retransmissions and latency against a fully protected baseline (below) |

For each module, a copy with one planted fault was run against its testbench,
and every fault was caught. Examples: a wrong level boundary, exponent bias
126, a shift off by one, the mask left off in the encoder or decoder, ACK not
freeing a slot, retransmission sending the new packet's flits, NACK ignored at
the top.

**Traffic comparison.** `tb_workload_parsec` uses synthetic packets shaped like
seven PARSEC benchmarks. Each mix has the stated share of float packets, and the
rest are integer packets. Bit error rate is 1e-4, with ARQ+CRC, 250 packets per
run, and the same packets for the fully protected baseline and for DEC-NoC.
Results at 75 % of integers convertible:

| mix (float share) | baseline retx | DEC-NoC retx at 5 / 10 / 15 % |
|-------------------|---------------|-------------------------------|
| blackscholes (63 %) | 22 | 13 / 12 / 12 |
| fluidanimate (31 %) | 22 | 16 / 16 / 16 |
| x264 (43 %)         | 19 | 8 / 6 / 6 |
| ferret (29 %)       | 19 | 16 / 16 / 16 |
| vips (21 %)         | 17 | 11 / 11 / 11 |
| swaptions (33 %)    | 22 | 12 / 10 / 10 |
| dedup (0 %)         | 27 | 19 / 19 / 19 |
| **all**             | **148** | **95 / 90 / 90** |

Fewer integers converted means more retransmissions. For example, fluidanimate
goes 16 → 17 → 20 as conversion drops from 75 % to 25 %. The testbench prints
all 63 runs. Mean packet latency drops by only 1–3 % here. On one link, latency
is dominated by the 16 cycles of packet assembly, and a retransmission costs
only a few cycles. The large latency and power gains reported for a loaded 8x8
mesh come from network congestion, which this setup does not model. With so
few retransmissions per run, these counts vary with the random seed; treat them
as a direction, not a measurement.

## Simulating

Plain Verilator 5 is enough. The package must come first. `-y` finds the other
modules:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/dec_noc_pkg.sv tb/tb_dec_noc_ni.sv --top-module tb_dec_noc_ni -o sim
./obj_dir/sim
```

Replace `tb_dec_noc_ni` with any testbench name. The end-to-end test finishes
in a couple of seconds. Its knobs are the `localparam`s at the top of each
testbench (`NPKT`, `ACK_DELAY`, `BER_PPM`). To build the ARQ+SECDED variant,
instantiate `dec_noc_ni #(.ECC(dec_noc_pkg::ECC_SECDED))`. Verilator reports
`SYNCASYNCNET` for `rst_n`, because the assertions sample it synchronously
while the flops reset asynchronously; this is intended.

## Limits

* No router, mesh, core model or link error model is included. The testbenches
  contain simple link and ACK-delay models.
* Real benchmark traces, output-quality studies and area figures are not
  reproduced. The traffic comparison above uses synthetic data.
* A packet is always 16 words. The core must supply all 16 before anything is
  sent.
* Sequence numbers are 8 bits. They are unique as long as no packet stays
  unacknowledged while 256 newer packets are sent.
