# Cryptographic module for an IoT system-on-chip, with a dynamically routed multi-hash

An IoT system-on-chip usually carries hardware for the common cryptographic
primitives so the processor does not have to compute them in software. This
module holds four such units: an X11-style multi-hash, SHA-256, AES-128 and
an RSA exponentiation engine.

The multi-hash is the main idea. X11 hashes a message through eleven hash
functions, one after another, in a fixed order. Here the hash functions are
separate cores placed between a 13-to-1 multiplexer and a 1-to-13
demultiplexer. By stepping the two selects, the controller can send a
message through any of the cores, in any order and as many times as it
likes. So the final digest depends on the message, on which functions were
used, in what order, and how often. Whoever checks the digest must know that
recipe, and the recipe can be kept secret. Three of the eleven X11 functions
are built: Skein-512, Keccak-512 and JH-512. Channels for the other eight
are brought out as ports.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017), and every
unit has a self-checking testbench.

## Block structure

```
crypto_module_top
├── x11_routing_top           multi-hash with dynamic routing
│   ├── dynamic_routing       source/destination crossbar, data + handshake
│   │   ├── mux_13to1   (x3)  64-bit data, 1-bit valid, 1-bit "taken"
│   │   └── demux_1to13 (x3)
│   ├── skein512_core         channel A
│   ├── keccak512_core        channel B
│   └── jh512_core            channel C
├── sha256_core
├── aes128_core
└── rsa_modexp                (RSA_W = 2048 by default)
x11_pkg                       shared constants, channel names, helpers
```

In the SoC, a CPU reaches all four units over an internal bus. That bus has
no specification, so `crypto_module_top` brings out each unit's own
interface as a group of ports, with the unit's name as prefix (`x11_`,
`sha_`, `aes_`, `rsa_`). A bus adapter or CPU model connects there. The four
units share the clock and the synchronous, active-high reset, and otherwise
run independently of each other.

## The routing fabric

### Channels

The fabric has 13 channels, lettered A to M after the pins of the
multiplexer and demultiplexer. Each channel has two sides: a *source* that
the multiplexer can read, and a *destination* that the demultiplexer can
drive.

| channel | source (multiplexer input) | destination (demultiplexer output) |
|---|---|---|
| A | Skein core output | Skein core input |
| B | Keccak core output | Keccak core input |
| C | JH core output | JH core input |
| D–L | `ext_dout[0..8]` (external core output) | `ext_din[0..8]` (external core input) |
| M | `hash_input` | `hash_output` |

`sel` (the multiplexer select) names the source channel, and `sel_0` (the
demultiplexer select) names the destination channel. Both take the binary
channel number, A = 0 to M = 12. Codes 13 to 15 select nothing. The
multiplexer output X goes to the demultiplexer and is also the
`hash_output` port.

### Handshake

Each hash core has the same port set: `din`, `src_ready` and `src_read` on
the input side, and `dout`, `dst_write` and `dst_ready` on the output side.
They behave as follows:

* `src_ready` is high when a word is waiting on `din`.
* `src_read` is high in the cycle the core takes that word. It equals "the
  core can accept" AND `src_ready`, so it is a read strobe and never fires
  without a word.
* `dst_write` is high while a word waits on `dout`. It does not depend on
  `dst_ready`.
* A word leaves the core in a cycle where `dst_write` and `dst_ready` are
  both high.

`dynamic_routing` routes this handshake with the same two selects as the
data:

* The source's valid goes forward through a 1-bit multiplexer/demultiplexer
  pair and arrives as the destination's `src_ready`.
* The destination's `src_read` goes back through a 1-bit pair with the
  selects swapped and arrives as the source's `dst_ready`.

So a word moves from one core into the next in one clock, with no buffer in
between. There is no combinational loop: the forward valid comes from a
register, and the backward strobe depends only on it. On channel M, the
input side uses `hash_input_valid` / `hash_input_read`. The output side uses
`hash_output_write` / `hash_output_ready`, and there a word counts as taken
in any cycle where both are high.

### Running a job

The controller (normally the CPU) hashes a message through, say,
Keccak → Skein → JH → Keccak as follows:

1. Set `sel = M`, `sel_0 = B` and stream the message into `hash_input`.
2. Wait until Keccak has its digest (`core_dst_write[1]` goes high). Set
   `sel = B`, `sel_0 = A`. The 9-word answer flows straight into Skein.
   Wait until `core_dst_write[1]` falls.
3. Do the same for `sel = A, sel_0 = C`, then for `sel = C, sel_0 = B`.
4. Set `sel = B`, `sel_0 = M` and read 9 words from `hash_output`.

Change the selects only between messages: while the source core is holding
its answer and the destination core is idle, waiting for a header. A core
can appear any number of times in a chain, as long as it is not its own
destination in the same step. External cores on D–L join a chain the same
way, through the `ext_*` ports.

To abandon a message part-way, pulse that core's bit of `core_rst` (bit 0
Skein, 1 Keccak, 2 JH) for one clock. The core drops what it holds and
waits for a new header; the other cores carry on.

## Word stream format

All hash cores use the same 64-bit stream, so the output of any core is a
valid input for any other:

* **Input:** one header word holding the message length in bytes. Then
  ⌈len/8⌉ data words. Message byte *k* sits in bits `[8*(k%8) +: 8]` of its
  word, so byte 0 is the least significant byte of the first data word.
  Bytes past the end of the message in the last word are ignored.
* **Output:** one header word holding the digest length in bytes (64 for
  the X11 cores, 32 for SHA-256). Then the digest words, with the same byte
  order.

Because the X11 cores emit 64 as their header, a core-to-core transfer is
simply a 64-byte message.

## The hash cores

All cores run one round per clock and share the same five-state controller:
wait for the header, load a block, pad and absorb it, run the rounds, stream
out the result. Padding is generated inside the core from the byte count.

**Keccak-512** (`keccak512_core`) is the SHA-3 competition version with
`0x01 … 0x80` padding, as X11 uses it. This is not the FIPS 202 SHA3-512
padding. The rate is 576 bits (9 lanes), and Keccak-f[1600] runs 24 rounds.
The round constants are generated at elaboration from the Keccak LFSR.
Timing: 1 cycle per input word, 26 cycles per 72-byte block, then 9 output
cycles.

**Skein-512-512** (`skein512_core`) is Skein 1.3. Each 64-byte block is a
UBI step: Threefish-512 with 72 rounds (four MIX operations and a word
permutation per round, with a subkey added every fourth round). The tweak
carries the byte position and the first/final/type flags. An output UBI
block follows the last message block. The Skein-512-512 initial chaining
value is a constant: the result of the standard configuration block.
Timing: 74 cycles per block, plus 73 for the output block.

**JH-512** (`jh512_core`) is round-3 JH. A 1024-bit state is regrouped into
256 4-bit elements. Each of the 42 rounds applies an S-box layer, with one
of two S-boxes chosen per element by a round-constant bit. Then comes the
linear map L on element pairs, which is multiplication by 2 in GF(2^4),
followed by the P8 permutation. The round constant is advanced each clock by
the same round function over 64 elements, starting from the fractional part
of √2. The core computes the initial hash value itself at the start of each
message, which takes 42 extra cycles. Timing: 44 cycles per 64-byte block.
A message that does not end on a block boundary takes one extra
length-only block.

**SHA-256** (`sha256_core`) follows FIPS 180-4. It keeps a 16-word sliding
message schedule and uses 64 rounds. The constants K and H0 are computed at
elaboration from exact integer cube and square roots of the first primes.
Timing: 66 cycles per block.

## AES-128 and RSA

`aes128_core` encrypts or decrypts one 128-bit block per `start`. Done
arrives after 10 cycles when encrypting and 20 when decrypting. Round keys
are expanded on the fly. To decrypt, the key schedule first runs forward
for 10 cycles to reach the last round key, and then runs backwards, so no
key RAM is needed. The S-box and its inverse are computed at elaboration
from the GF(2^8) inverse and the affine map. Byte 0 of each 128-bit value
is bits `[127:120]`, matching the FIPS 197 byte order.

`rsa_modexp` computes `base^exponent mod modulus` for `KEY_W`-bit operands
(2048 by default). It uses left-to-right square-and-multiply over a
bit-serial interleaved modular multiplier. Each clock handles one bit of
one operand: the running value is doubled and reduced, then the other
operand is added and the sum reduced again. The base is reduced first, and
leading zero bits of the exponent are skipped. For an exponent with *s*
significant bits, *m* of them ones, the operation takes
`(KEY_W+1)*(1+s+m) + (KEY_W-s) + 1` cycles. That is about 41 k cycles for a
2048-bit public-key operation (e = 65537) and about 6 M cycles for a
private-key one. Padding schemes and key generation are left to software.

## Relation to the original description

The source publication gives these points, and the RTL keeps them:

* The SoC's crypto units: SHA-256, RSA, AES, and X11 behind dynamic
  routing.
* The routing as a 13-to-1 multiplexer and a 1-to-13 demultiplexer with
  pins A–M, binary selects `Sel[3:0]`, and 64-bit data.
* Channel M as the hash input, selected at start-up, with the multiplexer
  output feeding the hash output.
* JH, Keccak and Skein as the three built X11 functions.
* The hash cores' port names: `din`, `dout`, `src_ready`, `src_read`,
  `dst_ready`, `dst_write`, `clk`, `rst`.

The following are choices made in this design, where the description is
silent:

* **Handshake routing.** Valid and taken travel through their own
  multiplexer/demultiplexer pairs. In the original schematic, each core's
  handshake pins were top-level pins.
* **Handshake meaning.** The exact semantics of `src_read` and `dst_write`
  are as given in the Handshake section above. The original names both
  `src_ready` and `dst_ready` as conditions for a core to start. Here a
  core starts on `src_ready` alone, and `dst_ready` only paces its output.
  In a chain, the next core's read strobe reaches the source only once the
  source is routed to it, so waiting for `dst_ready` at the start would
  stall the chain.
* **Stream format.** The header-word framing and the byte order.
* **Channel assignment.** Skein, Keccak and JH are placed on A, B and C.
  Demultiplexer output M is used as the hash-output destination.
* **Reset.** Synchronous and active high. Each X11 core keeps its own
  reset (`core_rst`, as in the schematic), and a global `rst` resets
  everything.
* **Algorithm variants and sizes.** 512-bit X11 functions, AES-128 (ECB,
  one block at a time) and RSA-2048.
* **Core internals.** All of the core internals and all cycle timings.

These are not included:

* The processor, the internal bus, the FLASH/DDR memory, the connectivity
  modules (Wi-Fi, Bluetooth, Ethernet, USB, Z-Wave, GPIO) and the serial
  interfaces (UART, SPI, I2C, CAN). Only their names are known.
* The eight remaining X11 functions (BLAKE, BMW, Grøstl, Luffa, CubeHash,
  SHAvite-3, SIMD, ECHO). Their channels D–L are ports.
* The optional RAM between the multiplexer and the demultiplexer for
  holding intermediate hashes. It was only suggested as a possible
  addition.
* No sequencer is built. The order and repetition of a chain are set by
  whoever drives `sel`/`sel_0`.

## Verification

Each testbench checks the RTL against values computed independently of it.
It prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_mux_13to1`, `tb_demux_1to13` | all 16 select codes with random data |
| `tb_dynamic_routing` | all 256 (source, destination) pairs: data, valid and taken paths, and that unselected channels stay quiet |
| `tb_keccak512_core`, `tb_skein512_core`, `tb_jh512_core`, `tb_sha256_core` | 11 message lengths (0, 5, 55, 56, 64, 71, 72, 80, 119, 143, 200 bytes) that cover every padding case; then the same again with random input gaps and output back-pressure; the latency of each message checked against the cycle formula |
| `tb_aes128_core` | FIPS 197 and SP 800-38A examples plus 9 random vectors, each in both directions, with latency checks |
| `tb_rsa_modexp` | 10 vectors at 128 bits (exponents 0, 1, 3, 65537 and random ones; odd and even moduli), with cycle-count checks |
| `tb_x11_routing_top` | four routed jobs, including Keccak used twice, two orders of the same cores giving different digests, a chain through an external channel, the empty message, and a message abandoned half-way through `core_rst` |
| `tb_crypto_module_top` | the whole module at default sizes with all units running at once: an abandoned Keccak message, three X11 jobs, a two-block SHA-256 message, AES encrypt and decrypt, and a 2048-bit RSA encrypt/decrypt round trip |

Where the expected digests come from:

* Software reference models of Keccak-512, Skein-512 and JH-512 produced
  them. Each model reproduces the published empty-message digest of its
  algorithm, and the Keccak model also matches a standard SHA3-512 library
  when the SHA-3 padding is used.
* Standard libraries produced the SHA-256, AES and RSA values.

The stream cores also carry two concurrent assertions, which Verilator
checks when run with `--assert`. The first says a core reads a word only
when one is offered. The second says an offered output word stays unchanged
until the sink takes it.

The top-level tests also count how often each mechanism occurs: route
changes, core-to-core transfers, core reuse, external channels,
back-pressure, input gaps, order effects, core aborts, and each AES and RSA
direction. A mechanism that never occurs is counted as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/x11_pkg.sv tb/tb_crypto_module_top.sv \
          --top tb_crypto_module_top -o sim && obj_dir/sim
```

Swap in another testbench name to run that one. The full-module test
needs about 6.3 million clock cycles, almost all of them the RSA private-key
operation, and runs in well under a minute. The other tests take seconds.

## Changing the design

* **Attach another hash function.** Connect its stream ports to one of the
  `ext_*` groups (channel D = index 0, up to L = index 8), using the
  handshake described above. Any core that follows the stream format can
  chain with the built ones.
* **Change the RSA width.** Set `RSA_W` on `crypto_module_top`, or `KEY_W`
  on `rsa_modexp`. The run time grows with the square of the width.
* **Change shared sizes.** The channel count, data width and select width
  are constants in `x11_pkg`. The hash cores themselves are fixed at 64-bit
  words.
