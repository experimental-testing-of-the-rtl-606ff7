# Dual-cipher IPsec engine: Rijndael (AES) and Triple DES in CBC mode

This RTL implements the two bulk ciphers of an IPsec accelerator side by side:
Rijndael/AES (128-bit blocks, 128-, 192- and 256-bit keys) and Triple DES
(EDE, three 56-bit keys). Both run in Cipher Block Chaining (CBC) mode, the
mode IPsec requires, and both keep several independent streams (packets or
security associations) apart. The architecture follows the article
"Experimental Testing of the Gigabit IPsec-Compliant Implementations of
Rijndael and Triple DES Using SLAAC-1V FPGA Accelerator Board". There the two
engines share one Xilinx Virtex XCV1000 on a PCI accelerator card.

The main ideas:

* **One round per clock, and the S-box memory holds the round register.** The
  AES S-boxes are 512 x 8 block ROMs. Each ROM stores the forward and the
  inverse table, so encryption and decryption share it. Its output register
  is the only register in the round loop (R1). A block therefore takes Nr+1
  clocks: 11, 13 or 15.
* **Decryption is built like encryption.** The decryption loop adds the
  round key *before* InvMixColumn. It therefore uses the encryption round keys
  unchanged, in reverse order, so no second key schedule is needed.
* **Round keys are made ahead of time.** A "3-in-1" key scheduler handles all
  three AES key lengths. It produces 64 bits of key material per clock into
  16 banks of round keys. A new key can be expanded while blocks are being
  processed with another one.
* **Triple DES needs only one DES round.** The round is iterated 48 times
  with the keys generated on the fly. Two small multiplexers suppress the DES
  half-swap at the boundaries between the three DES operations.
* **An extended version of each engine** trades area for throughput. AES gets
  one extra pipeline stage inside the round, so two streams are in flight.
  Triple DES is unrolled into a 16-stage ring, so 16 streams are in flight.
  The top-level parameter `EXTENDED` selects these versions.

## Files

| file | what it is |
|------|------------|
| `rtl/ipsec_crypto_top.sv` | top: AES engine and Triple DES engine, parameter `EXTENDED` |
| `rtl/aes_pkg.sv` | AES types, key lengths, GF(2^8) arithmetic, S-box computed from its definition |
| `rtl/aes_core.sv` | AES engine: key scheduler, round key memory and the encryption/decryption unit |
| `rtl/aes_encdec.sv` | basic iterative AES unit, CBC, 16 streams |
| `rtl/aes_encdec_ext.sv` | extended AES unit (inner-round pipelining, two blocks in flight) |
| `rtl/aes_bytesub.sv`, `rtl/aes_sbox_bram.sv` | 16 S-box lookups in 8 dual-port 512 x 8 ROMs, whose output registers form R1 |
| `rtl/aes_mixcol.sv`, `rtl/aes_invmixcol.sv` | MixColumn / InvMixColumn |
| `rtl/aes_cbc_buffer.sv` | 16 x 128 chaining-value buffer (used as M1, M2, M3) |
| `rtl/aes_key_sched.sv` | 3-in-1 key scheduler, two key words per clock |
| `rtl/aes_roundkey_mem.sv` | 16 sets x 16 round keys, built as two 256 x 64 memories |
| `rtl/des_pkg.sv` | DES tables (IP, FP, E, P, S1..S8, PC-1, PC-2, shift schedule) and helpers |
| `rtl/tdes_core.sv` | basic iterative Triple DES, 48 clocks per block, CBC |
| `rtl/des_round.sv` | one DES round with the load and swap multiplexers |
| `rtl/des_f.sv` | the DES function F |
| `rtl/des_key_sched.sv` | key banks after PC-1, encryption and decryption round-key paths |
| `rtl/tdes_pipe.sv` | extended Triple DES: 16 unrolled rounds in a ring, 16 streams |
| `rtl/des_next_key.sv` | per-stage next-key module of the ring |

Every file opens with a comment that gives its function, timing and interface.
That comment also says which parts follow the published design and which
are choices of this implementation.

## Data conventions

* AES state: a 128-bit vector. Byte 0 is in bits [127:120]. Bytes fill the
  columns in order, as in FIPS-197, so a test vector written as a hex string
  maps directly onto the vector.
* AES keys enter 64 bits at a time, most significant word first: 2, 3 or 4
  words.
* DES blocks and keys: 64-bit vectors, bit 1 of the standard is bit 63.
  Parity bits of the keys are ignored (PC-1 drops them).
* Handshakes: a block is taken at a rising edge where `in_valid && in_ready`.
  Results appear for exactly one clock with `out_valid`. There is no output
  back-pressure: the consumer (on the card, the output FIFO) must accept
  every result.
* Reset `rst_n` is asynchronous and active low. Memories (chaining buffers,
  key banks, round keys) are not reset. They must be written before use: an
  IV per stream and a key per key set.

## The AES unit (basic iterative architecture)

`aes_encdec` computes one round per clock. The only state in the loop is R1,
the output of the S-box ROMs. In each clock the logic in front of the ROMs
computes the next S-box input from R1 and the round key k of that clock:

```
encryption:  next = ShiftRow( MixColumn(R1) ^ k )
decryption:  next = InvShiftRow( InvMixColumn(R1 ^ k) )
```

The first clock of a block takes the input block instead of R1. The last
clock skips the column mixing. In detail, with t counting clocks after the
edge that accepted the block:

| t | encryption | decryption |
|---|------------|------------|
| accept edge | latch block, stream, key set, length; read M1 into R3, M2 into R4, key k0; write the block into M3 | same, key kNr |
| 0 | R1 <= S(ShiftRow(din ^ R3 ^ k0)) | R1 <= S⁻¹(InvShiftRow(din ^ kNr)) |
| 1..Nr-1 | R1 <= S(ShiftRow(MixColumn(R1) ^ k_t)) | R1 <= S⁻¹(InvShiftRow(InvMixColumn(R1 ^ k_Nr-t))) |
| Nr | out = R1 ^ kNr, written into M1 | out = R1 ^ k0 ^ R4; M3 -> R5 -> M2 |

A new block can be accepted at the end of clock Nr. The unit therefore
sustains one block every Nr+1 clocks, for any mix of streams, directions and
key lengths. Key length and key set travel with each block, so switching
between them costs nothing.

**CBC state.** Three 16-entry buffers, one entry per stream, hold the chaining
values:

* M1 holds the last ciphertext of each encrypting stream. It is read into R3
  and XORed into the next plaintext. M1 is write-through: the result of a
  block and the first read of the same stream's next block can happen in the
  same clock.
* M2 holds the last ciphertext of each decrypting stream. It is read into R4
  and XORed into the decryption result.
* M3 keeps the ciphertext under decryption. It reaches M2 (through R5) when
  the block finishes.

`iv_we` writes a stream's IV into M1 and M2. It is only accepted while the unit
is idle (`iv_ready`). An assertion checks this rule.

## The extended AES unit

`aes_encdec_ext` adds register R0 after the input key addition. It also adds
three registers after the round logic: R2a (MixColumn + key, encryption), R2c
(key + InvMixColumn, decryption) and R2b (final key addition). A round now
takes two clocks: ROM stage into R1, then mixing stage into R2.

Two blocks share the loop in two *slots*. The slot of a block is the parity
of the clock in which it was accepted. The slots alternate, so in any clock
one slot uses the ROMs and the other uses the mixing logic and the round-key
port. Each block takes 2(Nr+1) clocks from acceptance to result. With two
streams offered, the unit delivers two blocks every 22 clocks (128-bit key).

CBC limits which blocks can overlap:

* Two encryptions of the same stream cannot overlap, because each needs the
  previous ciphertext. The second one is held off: `in_ready` goes low and
  `stall` goes high until the first one leaves.
* Decryptions of the same stream may overlap. The incoming ciphertext moves
  from M3 to M2 one clock after acceptance, and the slot keeps the chaining
  value it read in its own register.

This gives the rule of the source design: two encryptions of different
packets, or two decryptions of the same or different packets, can be in
flight at once.

The extended unit has exactly the ports of the basic one plus `stall`. In
`aes_core`, `EXTENDED` picks one of the two.

## Round keys

`aes_key_sched` generates the key words w_i and w_i+1 in every clock:

```
i mod Nk = 0         : w_i = w_i-Nk ^ Sub(Rot(w_i-1)) ^ Rcon
Nk = 8, i mod Nk = 4 : w_i = w_i-Nk ^ Sub(w_i-1)
otherwise            : w_i = w_i-Nk ^ w_i-1
always               : w_i+1 = w_i-Nk+1 ^ w_i
```

Past words sit in a chain of word-pair registers (w_i-2 ... w_i-8). The tap
for w_i-Nk depends on the key length. Sub() uses two more dual-port S-box
ROMs. Their output register is loaded in the clock in which w_i+1 appears, so
the substitution is ready for the next pair and no clock is lost. A schedule
takes 2(Nr+1) clocks after the key is in: 22, 26 or 30 clocks.

Each 64-bit half round key goes into `aes_roundkey_mem`. This memory is two
256 x 64 arrays addressed by {set, round}: 16 sets of up to 15 round keys
each. One set per security association can be kept. The scheduler has its own
write port, so it can fill one set while the cipher reads another. The
caller must not use a set before `kx_done`.

## The Triple DES unit (basic iterative architecture)

`tdes_core` iterates one DES round (`des_round`) 48 times. A block is
accepted, goes through IP, and then runs rounds 1..48 in the next 48 clocks.
In the 48th clock the result leaves through FP (and the CBC XOR), and the
next block may be accepted. Encryption is E_K3(D_K2(E_K1(x))); decryption is
the reverse.

The round computes `L ^ F(R, K)`. Normally the halves swap for the next round.
In plain DES the last round does not swap. In Triple DES the next DES must
start from exactly that unswapped value, because FP of one DES and IP of the
next cancel. The swap multiplexers (`swap = 0`) are therefore switched off at
rounds 16, 32 and 48.

Round keys are made on the fly by `des_key_sched` from the main keys. The main
keys are stored after PC-1 in four banks of three. A block names its bank,
and one bank can be rewritten while another is in use. There are two
round-key paths:

* the encryption path, loaded with the key rotated left once (C1D1) and then
  rotated left by 1 or 2 per round;
* the decryption path, loaded with the unrotated key (C16D16 = C0D0) and
  then rotated right by 1 or 2 per round.

Each path has its own PC-2, and an e/d multiplexer picks the active path.
The cipher controller reloads a path at each DES boundary. Stage s (0, 1, 2)
uses the decryption path when (block is decrypted) XOR (s = 1). It uses key
index s for encryption and 2 - s for decryption.

CBC for Triple DES uses one chaining register. `in_first` with `in_iv` starts
a packet. The basic engine chains one packet at a time. The published design
names no stream memory for the basic Triple DES unit.

## The extended Triple DES unit

`tdes_pipe` unrolls the 16 rounds of one DES into 16 pipeline stages. Each
stage has a register at its input and its own next-key module. The output
of round 16 goes back to round 1, and each block makes three passes (48
clocks). A fed-back block has priority at the ring input. A new block enters
in a clock in which no block is being fed back, typically the clock in which
a finished block leaves. Up to 16 blocks of 16 streams are in the ring, so
the engine delivers 16 blocks per 48 clocks.

With a fixed stage per round, the swap multiplexers disappear: rounds 1..15
swap and round 16 never does. The key schedule becomes constant wiring. Stage
n's next-key module (`des_next_key`) rotates the previous stage's 56-bit key
state by a fixed m, left for encryption or right for decryption, and
registers the result. It then applies PC-2. The values of m:

| stage n | 1 | 2 | 3..8 | 9 | 10..15 | 16 |
|---|---|---|---|---|---|---|
| encryption: left by s(n) | 1 | 1 | 2 | 1 | 2 | 1 |
| decryption: right by s(18-n), none in stage 1 | 0 | 1 | 2 | 1 | 2 | 1 |

Here s(1..16) = 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1 is the DES shift schedule.
For decryption, stage 1 takes C16D16 = C0D0 unchanged, and stage n then
undoes the left shift of round 18-n. The key state travels down the
stages together with its block.

16 key banks of three keys feed stage 1. For a fed-back block they supply the
key of the next pass. CBC uses one chaining register per stream:

* A second encryption of a stream is held off (`stall`) while one is in the
  ring. When the earlier block leaves, the new block enters in the same clock
  and takes the just-computed ciphertext through a bypass.
* Decryptions of one stream may overlap. Each block carries its own chaining
  value.

## Top level

`ipsec_crypto_top` holds both engines. They share only clock and reset. All
ports are plain signals, prefixed `aes_` and `des_`:

* AES: key expansion (`aes_kx_*`), IV load (`aes_iv_*`), blocks in
  (`aes_in_*`: data, stream, key set, key length, direction) and out
  (`aes_out_*`), plus `aes_stall`.
* Triple DES: key write (`des_kw_*`: bank, index 0..2, 64-bit key), blocks in
  (`des_in_*`: data, stream, bank, direction, first, iv) and out
  (`des_out_*`), plus `des_stall`.

Set `EXTENDED = 0` (default) for the basic iterative engines, or 1 for the
extended ones. The Triple DES bank and stream ports are 4 bits wide to fit
the extended engine. The basic engine uses only bank bits [1:0] (four banks),
and it passes the stream number through to `des_out_stream`. In the basic
configuration both stall outputs are constant 0.

On the accelerator card these ports would connect to the host interface.
That interface (PCI core, DMA, 256 x 64 input/output FIFOs, board SRAMs,
inter-FPGA buses) is board infrastructure and is not part of this RTL.

## Throughput

Clocks per block are set by the RTL. The clock rates below are the ones
reported for the original FPGA implementation; this RTL has not been placed
and routed. Mbit = 2^20 bits.

| engine | clocks per block | clock | throughput |
|--------|------------------|-------|------------|
| AES basic, 128-bit key | 11 | 52 MHz (measured) / 47 MHz (static timing) | 577 / 521 Mbit/s |
| AES basic, 192 / 256-bit key | 13 / 15 | 52 MHz | 488 / 423 Mbit/s |
| AES extended, 128-bit key, two streams | 2 blocks per 22 | ~80 MHz implied by the reported 887 Mbit/s | 887 Mbit/s |
| Triple DES basic | 48 | 91 MHz (measured) / 72 MHz (static timing) | 116 / 91 Mbit/s |
| Triple DES extended, 16 streams | 16 blocks per 48 | ~70-75 MHz for the targeted ~1.5 Gbit/s | ~1.5 Gbit/s |

Formula: throughput = block size x blocks per clock x clock rate.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
independent software implementations of AES and DES: the NIST SP 800-38A
CBC examples and OpenSSL-generated vectors. They never come from the RTL's
own package functions, except where a testbench needs DES round keys to drive
a single round. The tests check cycle counts wherever the design defines
them (Nr+1, 2(Nr+1), 48 clocks).

| testbench | what it covers |
|-----------|----------------|
| `tb_ipsec_crypto_top` | both basic engines at default parameters, concurrently: three key lengths, interleaved encryption/decryption of six streams, key expansion overlapping traffic, back-to-back blocks of one stream, Triple DES key writes during traffic |
| `tb_ipsec_crypto_top_ext` | the same traffic with `EXTENDED = 1`; also counts two AES blocks in flight, AES and Triple DES hold-offs, and several blocks in the Triple DES ring |
| `tb_monte_carlo` | reduced CBC Monte Carlo chains (next plaintext = ciphertext two blocks back, key changed after each period): 3 periods x 40 blocks for each AES key length (three chains run concurrently) and for Triple DES, compared at the end of each period |
| `tb_monte_carlo_ext` | the same chains with `EXTENDED = 1`; the AES chains overlap in the two slots of the extended unit |
| `tb_tdes_kat` | Triple DES known answer tests (variable plaintext, 64 vectors each way; variable key, 56 vectors) through the top, with key writes into the idle bank between blocks |
| `tb_aes_encdec`, `tb_aes_encdec_ext`, `tb_aes_core`, `tb_tdes_core`, `tb_tdes_pipe` | the cipher units on their own, including latency, stream interleaving and the CBC hold-off rules |
| `tb_aes_bytesub`, `tb_aes_mixcol`, `tb_aes_invmixcol`, `tb_aes_cbc_buffer`, `tb_aes_key_sched`, `tb_aes_roundkey_mem`, `tb_des_f`, `tb_des_round`, `tb_des_key_sched` | the building blocks |

The full NIST Monte Carlo test runs 4,000,000 encryptions, with a new key
every 10,000. That is about 44 million clocks for AES-128 and 192 million for
Triple DES, too long for a routine simulation, so `tb_monte_carlo` runs a
reduced chain of the same shape, in both configurations. The Monte Carlo key-update rule used here
(XOR with the last ciphertext bits) is this testbench's own choice.

To simulate with Verilator (5.x), for example the top-level test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv rtl/des_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_ipsec_crypto_top.sv --top-module tb_ipsec_crypto_top -Mdir obj -o sim
./obj/sim
```

For a single block, list only the files it uses, with the packages first.
Every testbench finishes in well under a minute.

## Where this RTL departs from, or adds to, the published design

* **Control and handshakes are this implementation's.** The article gives
  the datapaths (registers, multiplexers, memories, key paths). It does not
  give the controllers, port protocols, reset behaviour or exact timing
  inside a block. Examples: the point at which the AES result is taken, the
  IV-load rule, and the slot schedule of the extended AES unit.
* **The extended Triple DES unit was work in progress in the article.** It
  gives the structure (16 unrolled rounds, 16 key banks, next-key modules)
  and the goal of ~1.5 Gbit/s. The feedback control, the per-stage rotation
  amounts, the per-stream chaining registers and the hold-off rule were
  worked out here.
* **The Triple DES key banks use a combinational read**, like distributed
  RAM. The AES round-key memory and S-boxes use registered reads, like block
  RAM.
* **Only CBC is implemented.** Counter mode is mentioned in the article only
  as a future extension.
* **MixColumn / InvMixColumn are written as GF(2^8) expressions.** Mapping
  them onto two layers of XOR gates, as the article describes for the FPGA,
  is left to synthesis.
* **The S-box and DES tables are computed or listed from the standards.** The
  article prints no tables.
* **No FPGA-specific primitives are used.** Block RAMs are inferred from
  arrays. Resource figures and clock rates of the original (15% of slices and
  56% of block RAMs for both basic engines) are not reproduced here.
* **Not included:** the PCI interface, DMA, host FIFOs, board memories,
  inter-FPGA buses and configuration logic of the accelerator card.
