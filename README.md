# RSA link between two FPGA boards

Two computers exchange data through two FPGA boards. The boards are wired to each
other and apply textbook RSA to everything that crosses between them. Each computer
talks to its own board over a USB-UART at 12 MBaud. The boards talk to each other
over two SPI links, one per direction. A board encrypts what its computer sends with
the peer board's public key. It decrypts what arrives from the peer with its own
private key. For a classroom demonstration, the switches on a board select what its
computer sees: the plaintext, the ciphertext as it crossed the wire, or both.

The RSA size `M` is a parameter. It sets the key size and also the packet body size.
The default is RSA-512: 256-bit primes and a 512-bit modulus. Everything is written to
save area rather than to be fast. All wide arithmetic is done one bit per clock on
shift-and-add and shift-and-subtract units. No full-width products are made in a
single cycle.

Textbook RSA with fixed primes and no padding is a teaching tool, not a secure
channel. RSA-512 can be factored cheaply today.

## Block structure

```
 computer A                      board A                                   board B
   UART  ──► uart_rx ► uart_rx_bridge ► packet_fifo ► packet_crypt(enc) ► spi_tx ──SPI──► spi_rx ► packet_fifo ► packet_crypt(dec) ► uart_out_arbiter ► uart_tx_bridge ► uart_tx ──► computer B
   UART  ◄── ... the same path in the other direction ...                  ◄──SPI──
                  key_derivation (at reset): N, phi, d, N', N'peer
```

| module | role |
|---|---|
| `rsa_fpga_top` | one board: everything below, wired as in the diagram |
| `key_derivation` | computes N, (p-1)(q-1), d, N' and the peer's N' once after reset |
| `mod_inverse` | extended Euclid, a^-1 mod m |
| `divider` | restoring divider: quotient and remainder |
| `seq_multiplier` | shift-add multiplier |
| `mod_exp` | x^e mod N by square-and-multiply on Montgomery products |
| `montgomery_mult` | a·b·R^-1 mod N (Montgomery reduction, R = 2^M) |
| `packet_crypt` | runs one packet body through `mod_exp` and keeps the header |
| `uart_rx`, `uart_tx` | 8N1 UART, 12 MBaud from 100 MHz |
| `uart_rx_bridge`, `uart_tx_bridge` | bytes ↔ packets |
| `packet_fifo` | packet buffer with fill count |
| `spi_tx`, `spi_rx` | packet-framed SPI, mode 0 |
| `uart_out_arbiter` | plaintext/ciphertext/both selection, stall and unstall signals |
| `rsa_pkg` | header struct, signal IDs, e = 2^16+1, switch-mode enum |

All blocks use the same valid/ready handshake: a transfer happens on a clock edge
where both are high. The producer holds its data steady until the transfer. The two
receivers are the exception: `uart_rx` and `spi_rx` emit one-clock pulses, because the
wires that feed them cannot be paused.

## Packets and the link protocol

A packet is a 32-bit header followed by an M-bit body. Header bits, LSB first:

| bits | field |
|---|---|
| 0 | data flag. 1 = data packet; 0 = signal, which has no body |
| 1 | START flag. It marks the first packet of a transmission |
| 2 | raw flag. Here it means "do not encrypt this body" |
| 3-6 | reserved |
| 7-14 | transmission ID. In a signal, it holds the signal kind: 1 = stall, 2 = unstall |
| 15-22 | packet number |
| 23-31 | body length in bytes, minus 1 |

- **On the UART**, the header goes first, most significant byte first, then the
  body, also MSB first. A signal is sent as its 4 header bytes and nothing else.
- **On SPI**, `cs_n` goes low for exactly one packet. The 32+M bits go out MSB first,
  header first. The receiver knows the packet length, so it needs no length field.
  SCK is 25 MHz (100 MHz / 4). That is fast enough that the SPI link never holds
  back the UART.
- **The computer handles transmissions.** Several packets with the same transmission
  ID make one transmission. Its START packet body carries the data type in bits 0-7
  and the packet count from bit 16 up. The computer also reassembles the data. The
  boards never read these fields. They forward each packet on its own, and the header
  crosses the RSA engine unchanged.

## RSA engine

### Key derivation (once after reset)

`key_derivation` takes the primes P and Q, which are parameters. It then works
through these steps one after another:

1. N = p·q and φ = (p-1)(q-1). Both use one M/2-bit shift-add multiplier.
2. d = e^-1 mod φ, with the fixed public exponent e = 65537.
3. N' = N^-1 mod 2^M. This is the Montgomery constant, explained below.
4. N'peer = Npeer^-1 mod 2^M. The encryptor works modulo the peer's N, so it needs
   the peer's constant too.

N is put on `pub_n` as soon as step 1 finishes. A peer board can then start its own
step 4 without waiting for the whole derivation. `keys_ready` rises when all four
steps are done. The encryptor and decryptor accept no packets before that.

`mod_inverse` runs the extended Euclidean algorithm. It keeps (r0, r1) and the
coefficients (t0, t1). Each step asks `divider` for q = r0 / r1 and the remainder.
It then asks a shift-add multiplier for q·|t1|, and updates t1 ← t0 − q·t1. The
coefficients never grow past ±m, so (W+2)-bit two's complement is enough. At the end,
a negative t0 has m added. `ok` reports gcd = 1. The unit is M+1 bits wide so that
R = 2^M fits as a modulus. The multiplier stops as soon as its multiplier operand has
no set bits left. Since q is usually small, most steps cost about one division,
M+1 cycles.

At M = 512 the whole derivation takes about 334,000 cycles, or 3.3 ms at 100 MHz.
The two inversions modulo 2^512 take most of that.

### Montgomery multiplication

Reducing a 1024-bit product modulo a 512-bit N would need a full division.
Montgomery's method replaces that division with shifts and masks. A value x is kept
as x̄ = x·R mod N, with R = 2^M. The product of two such values is brought back into
range by REDC:

```
x = ā · b̄                      (2M bits)
m = (x mod R) · N' mod R       (keep the low M bits of each product)
t = (x − m·N) / R              (x − m·N is an exact multiple of R: drop M zero bits)
result = t < 0 ? t + N : t
```

N' = N^-1 mod R, so m·N ≡ x (mod R) and the subtraction clears the low half exactly.
When both operands are below N, t lies in (−N, N), so one conditional addition brings
the result into [0, N). `montgomery_mult` computes the three products x, m and m·N on
a single M-bit shift-add multiplier, one after another. A Montgomery product
therefore takes at most about 3(M+2)+6 clocks, roughly 1,550 at M = 512.

The sign convention matters. Using N' = +N^-1 requires subtracting m·N. The other
common form uses N' = −N^-1 and adds m·N. Mixing the two gives wrong results.

### Exponentiation

`mod_exp` computes x^e mod N in three phases.

1. **Into Montgomery form.** Horner's rule, one step per clock: v ← 2v + bit, minus N
   if the result is ≥ N. Feeding in the bits of x and then M zeros gives base = x·R
   mod N. Feeding in a single 1 and then M zeros gives prod = R mod N, which is the
   Montgomery form of 1. Both run in parallel and take 2M clocks. This also reduces
   an x that is not below N.
2. **Square-and-multiply, right to left.** For each exponent bit, LSB first: if the
   bit is 1, prod ← REDC(prod·base). Then base ← REDC(base²). The loop ends once no
   set bit is left, and the square after the last set bit is skipped. Encryption
   with e = 65537 therefore costs 16 squarings and 2 multiplications. Decryption with
   a 512-bit d costs about 511 squarings and ~256 multiplications.
3. **Out of Montgomery form.** result = REDC(prod·1).

Measured at M = 512, one 512-bit packet makes a full round trip through one board
with its SPI output looped back to its input. It goes UART in, encryption, SPI,
decryption, then ciphertext and plaintext back out on the UART. This takes
1.25 million clocks after its last byte has arrived, and decryption accounts for
almost all of it. At 100 MHz that is about 12.5 ms, or about 40 kbit/s of payload.
Encryption (19 Montgomery products) is about 40 times faster than decryption.

## Flow control

The input buffer on the computer side holds 4 packets (`IN_DEPTH`).
`uart_out_arbiter` watches it:

- When 2 or more packets are buffered (`STALL_LEVEL`), it sends the computer a
  **stall** signal. This only happens between packets: a packet already going out to
  the computer is finished first.
- When the buffer is empty again, it sends **unstall**.
- Signals take priority over data packets waiting to go to the computer.

The stall threshold leaves room for a packet that is already on the UART when the
stall goes out. A packet that still arrives with no room is dropped by
`uart_rx_bridge`, which pulses `rx_overflow`.

The SPI link has no return path, so there is no flow control between the boards.
Decryption is much slower than encryption. A long burst can therefore fill the
receiving board's link buffer (`LINK_DEPTH` = 4). Further packets are then lost, and
each loss pulses `link_overflow`. The sender never finds out. The top-level test
provokes this on purpose and checks that every packet either arrives intact, in
order, or is counted as lost.

## Output selection

`sw_mode` selects what a board sends to its computer:

| `sw_mode` | computer receives |
|---|---|
| 0 | decrypted plaintext |
| 1 | the ciphertext as received over SPI |
| 2 | both, ciphertext first |

Packets that were never encrypted (raw flag set, or signals) are sent only once, even
in mode 2. Mode 2 halves the useful bandwidth to the computer.

## Parameters of `rsa_fpga_top`

| parameter | default | meaning |
|---|---|---|
| `M` | 512 | RSA size and packet body size. Must be a multiple of 16 |
| `P`, `Q` | two fixed 256-bit primes | this board's primes. gcd(65537, (P-1)(Q-1)) must be 1. Give each board its own pair |
| `CLK_HZ`, `BAUD` | 100 MHz, 12 MBaud | UART timing. A phase accumulator gives bits of 8 or 9 clocks that average exactly 12 MBaud |
| `SPI_HALF` | 2 | SCK half period in clocks (25 MHz) |
| `IN_DEPTH`, `LINK_DEPTH` | 4, 4 | buffer depths in packets |
| `STALL_LEVEL` | 2 | input-buffer level that triggers a stall |

Size: a generic synthesis of the full 512-bit board counts about 37,000 flip-flops,
plus 4,352 bits of packet buffers. Most of the flip-flops are the wide operand and
state registers of the two `mod_exp` units and of `key_derivation`. A mid-size FPGA
such as an Artix-7 50T has 65,200 flip-flops and 32,600 LUTs. The 512-bit build uses
more than half of those flip-flops, and its wide adders and comparators would use a
large share of the LUTs. Both counts scale roughly linearly with `M`. An earlier
implementation of this architecture met 100 MHz timing only at M = 64, and fitted
the device only up to M = 128. This RTL has not been through FPGA place and route.

## Where this RTL departs from, or fills in, the original description

- **Peer public key.** How a board learns its peer's modulus is not specified. Here
  it is a port pair: `pub_n`/`pub_valid` out, `peer_n`/`peer_valid` in. The two
  boards' ports are wired to each other.
- **Receive path from the computer.** It is built as described in the intended data
  path. The original implementation reportedly never got packetized UART reception
  working.
- **Exponentiation pseudo-code.** The published pseudo-code starts from 1 and x mod N
  and multiplies with REDC directly. Taken literally, that leaves stray factors of
  R^-1. It is implemented here as proper Montgomery-domain exponentiation, with
  conversion in and out.
- **Unspecified details.** These are choices made here: the raw flag meaning
  "bypass encryption", the signal IDs, the byte order, SPI mode 0, the buffer depths,
  the stall thresholds, and the handling of short SPI frames and bad UART stop bits.
- **SPI clock.** It is 25 MHz instead of 24 MHz, because 24 MHz is not an integer
  division of 100 MHz.
- **Body values must be below N.** A body value at or above the receiver's N cannot
  be recovered after encryption. The computer must keep body values below N. For
  example, leaving the top byte zero is enough, because N ≥ 2^(M-2) when both primes
  have their top two bits set.
- **No prime generation.** Primes are fixed parameters. Random prime generation, key
  exchange for symmetric ciphers, and reuse of one exponentiation unit for both
  directions are not built.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=F` and
stops on a watchdog if the design hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/rsa_pkg.sv tb/tb_rsa_fpga_top.sv \
  --top-module tb_rsa_fpga_top --Mdir obj && obj/Vtb_rsa_fpga_top
```

- **Block tests.** `tb/tb_<module>.sv` tests one block. The arithmetic blocks are
  tested at 32 to 64 bits against the simulator's own `*`, `/` and `%`.
  `tb_mod_exp` and `tb_packet_crypt` also run an RSA round trip with a 64-bit key.
- **`tb_rsa_fpga_top`.** Two boards wired together with 64-bit keys and two computer
  models. It covers START, data and raw packets; all three switch modes, checking the
  ciphertext against m^e mod N; a burst that triggers stall, unstall and link-buffer
  overflow; and the reverse direction. It counts each of these events and fails if
  one never happens. It runs in a few seconds.
- **`tb_rsa_fpga_top_full`.** One board at full default size (RSA-512), looped back
  to itself. It runs key derivation and one 512-bit packet through encryption, SPI
  and decryption, then checks the ciphertext and plaintext. It takes well under a
  minute.

Testbenches that change `M` also pass matching 32-bit primes as `P` and `Q`.
