# Two-layer AES-128 / DES link cipher for vehicle-to-everything traffic

This RTL encrypts a serial data stream twice. Each 128-bit block first goes through AES-128.
The AES result is then cut into two 64-bit halves, and each half goes through its own DES
engine with its own key. The receiver undoes the two DES branches and then AES. Both DES
engines get their S-boxes from the AES S-box table, and each branch uses the eight tables in a
different order, so one table serves all three ciphers. The scheme follows the paper
"Multi-Layer Security Framework for Secure Communication in Internet of Vehicles Networks"
(Elomda, Ibrahim, Abdelaziz), which implements it on a Xilinx FPGA. This is an independent
SystemVerilog implementation. Where the paper gives no detail, the choices made here are
listed in [Choices and departures](#choices-and-departures).

## Data path

```
 transmit (iov_tx)
 ser_in ─► serial_to_parallel ─► block_packer ─► aes_encrypt ─┬─[127:64]─► des_core (enc, order FWD, key_hi) ─┐
  50 MHz        bytes              128-bit block   10 rounds   └─[63:0]───► des_core (enc, order REV, key_lo) ─┴─► block_buffer ─► rd port
                                                                                                               {hi, lo}
 receive (iov_rx)
 ser_in ─► serial_to_parallel ─► block_packer ─┬─[127:64]─► des_core (dec, order FWD, key_hi) ─┐
                                                └─[63:0]───► des_core (dec, order REV, key_lo) ─┴─► aes_decrypt ─► block_buffer ─► rd port
```

`freq_down_conv` in each chain divides the 50 MHz board clock by `DIV = 4`, giving 12.5 MHz.
The serial input runs at the board clock, one bit per clock. Everything after it runs at the
12.5 MHz rate: byte hand-over, packing, AES, DES and buffer writes. `aes_key_expand` computes
the eleven AES round keys once per `aes_key_load`. `iov_crypto_top` places one transmit chain
and one receive chain side by side. They share only the clock and reset. Each has its own keys,
serial input, buffer read port and status outputs, with `tx_` and `rx_` prefixes.

Block format: the first serial bit of a block is its MSB. The first byte goes to bits
[127:120], which is AES byte 0. The ciphertext is `{DES_hi(AES[127:64]), DES_lo(AES[63:0])}`.

## The shared S-box and what it does to DES

This is the least standard part of the design. Read it before you compare outputs with any
other DES implementation.

A DES S-box maps 6 bits to 4. Its 64 entries are arranged as 4 rows by 16 columns: row
`{b1,b6}`, column `{b2..b5}`, entry index `i = 16*row + col`. Eight such boxes hold
8 × 64 × 4 = 2048 bits, exactly the size of the 256-byte AES S-box. `des_sbox` with the default
`SRC = SBOX_AES_DERIVED` builds DES table `k` (0..7) from AES S-box bytes `32k .. 32k+31`:

```
DES_k[i] = AES_SBOX[32k + i/2][7:4]   if i is even
           AES_SBOX[32k + i/2][3:0]   if i is odd
```

The lookup goes through an `aes_sbox` ROM, the same module the AES rounds use. The parameter
`SBOX_ORDER` of `des_core` chooses which table each of the eight S-box slots uses:

| branch | `SBOX_ORDER` | slot j uses table |
|---|---|---|
| upper half (bits 127:64) | `SBOX_ORDER_FWD` | j |
| lower half (bits 63:0) | `SBOX_ORDER_REV` | 7 − j |

The rest of DES is unchanged: IP and FP, E, P, PC-1, PC-2 and the 16-round key schedule of
FIPS 46-3. So each branch is a DES-structured cipher, but not DES. Its output will not match a
standard DES library. Two things follow from the AES-derived tables:

- The derived tables are not permutations within a row, as the real DES boxes are.
- They were not designed against differential cryptanalysis.

Their strength is a property of the scheme, not something this RTL claims. With
`SRC = SBOX_DES_STANDARD` and `SBOX_ORDER_FWD`, `des_core` is plain FIPS 46-3 DES. The testbench
uses that setting to check the permutations and key schedule against published vectors.

The AES S-box itself is computed, not listed. `iov_pkg` builds it at elaboration time: the
multiplicative inverse in GF(2^8) mod x^8+x^4+x^3+x+1 (computed as a^254), then the affine map
with constant 0x63. The inverse S-box is derived from the forward one.

## Timing

All stages after the serial input change state only on clocks where `ce` is high (one clock in
`DIV`). They pass blocks with valid/ready: a transfer happens on a clock where `ce`, `valid` and
`ready` are all high. The cores are iterative:

| stage | slow cycles per block | note |
|---|---|---|
| serial input | 32 (128 board clocks) | 1 bit per clock |
| AES-128 enc/dec | 10 after accept | one round per cycle, one block in flight |
| DES enc/dec | 16 after accept | one Feistel round per cycle, subkeys on the fly |
| AES key schedule | 10 after `aes_key_load` | `key_ready` gates the AES core |

From the last serial bit of a block to the block appearing in the buffer takes 30 slow cycles
in both directions, measured by `tb_iov_tx` and `tb_iov_rx`. That is 2.4 µs, or about 5 µs
including the 2.56 µs of serial input. The serial link limits the rate to 50 Mbit/s. The
cipher stages could accept a block every 18 slow cycles (DES-bound), which is about 89 Mbit/s.
The paper estimates 100–300 Mbit/s for its implementation; this RTL does not reach that at
12.5 MHz.

The two DES branches of a chain always start in the same cycle. Because they have the same
latency, they also finish together, and an assertion checks this.

## Flow control and loss

The serial link cannot be paused, so congestion ends in a drop:

1. `block_buffer` (16 × 128 bit FIFO, first-word fall-through) deasserts `in_ready` when full.
2. The stage in front of it holds its result: the DES pair (TX) or AES (RX). The stage before
   that then holds its own block.
3. `block_packer` keeps assembling. If a new block completes while its output register is still
   occupied, that new block is dropped. The drop raises `pack_overflow` for one clock and
   increments `pack_drops`.

A chain that is never read therefore holds 19 blocks: 16 in the buffer, 1 in DES, 1 in AES and
1 in the packer. `serial_to_parallel` has a sticky `s2p_overrun` flag. It cannot fire at
`DIV = 4`, where a byte lasts 8 clocks and is taken within 4. The buffer's read side runs at
the board clock: `rd_data` shows the oldest block and `rd_en` removes it. Reading an empty
buffer is an assertion failure.

## Keys

- `aes_key` (128 bit) is captured and expanded when `aes_key_load` pulses. `key_ready` rises 10
  slow cycles later. Blocks wait until then.
- `des_key_hi` and `des_key_lo` (64 bit each, parity bits ignored) are sampled when a block
  enters the DES branches.
- The receive chain needs the same three keys as the transmit chain.

The paper does not say how keys are chosen or distributed, so all three are plain input ports.

## Choices and departures

The paper leaves the following open or says different things in different places. This design
settles them as follows:

- **Order of the layers.** The abstract speaks of applying DES and then AES. The methodology,
  implementation and results sections all put AES first and then the two DES branches. This
  design follows the latter.
- **Slow clock.** The implementation section gives 50 MHz → 12.5 MHz. The simulation figure
  discussion gives a 160 ns period (6.25 MHz). The default `DIV = 4` follows the former;
  `DIV = 8` gives the latter. At `DIV = 8` a block arrives every 16 slow cycles but DES needs
  18, so an uninterrupted stream overflows. In simulation, 28 of 256 back-to-back blocks were
  dropped. At `DIV = 4` nothing is lost.
- **Clocking.** The slow stages use a clock enable rather than a divided clock. This keeps a
  single clock domain. `clk_slow` still brings the divided square wave out.
- **S-box division and orders.** The mapping of the AES table onto eight DES tables and the two
  slot orders are this design's reading of "the AES will be divided into 8 DES S-box" and
  "the order of these S-boxes will not be the same in the two DES branches".
- **Added blocks.** The byte packer and the AES key schedule are not among the sub-systems the
  paper lists. Both are needed to feed a 128-bit AES.
- **Serial input.** The paper's lab setup talks to a PC over UART. Here each chain starts from a
  plain bit stream with a valid strobe; no UART is included.
- **Buffer.** Depth, the read interface, the handshakes, the drop policy, bit order and reset
  (synchronous, active low) are all this design's choices.
- **Core architecture.** The cores are iterative, one round per cycle. The paper does not
  describe its architecture. Its reported FPGA use (TX 38,222 registers / 25,389 LUTs, RX
  14,782 / 21,078) is much larger than these cores need, so it probably unrolls or pipelines
  the rounds. This design does not try to match it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_aes_sbox` | all 256 forward and inverse entries against an S-box built by exhaustive inverse search |
| `tb_des_sbox` | every entry of the 8 derived tables; standard tables are row permutations, S1(011011)=0101 |
| `tb_aes_key_expand` | FIPS-197 A.1 and C.1 round keys, 10-cycle latency |
| `tb_aes_encrypt` / `tb_aes_decrypt` | FIPS-197 B and C.1 vectors plus 3 more blocks, 10-cycle latency, output hold |
| `tb_des_core` | standard DES against FIPS vectors (enc and dec); derived variant, both orders, both directions; 16-cycle latency |
| `tb_freq_down_conv`, `tb_serial_to_parallel`, `tb_block_packer`, `tb_block_buffer` | rate, bit order, block assembly, drop and overrun, FIFO order, full and count |
| `tb_iov_tx` / `tb_iov_rx` | reference blocks through a chain, 30-cycle latency, buffer full → stall → exactly 2 drops |
| `tb_image_stream` | a generated 64 × 64 8-bit image (256 blocks) streamed TX → RX at the full serial rate: no loss, every pixel recovered, equal plaintext blocks give equal ciphertext and unequal ones differ |
| `tb_iov_crypto_top` | default parameters, TX → loop-back → RX: reference ciphertexts, 24 blocks streamed without loss, a 22-block burst into an undrained buffer (fill, stall, 3 drops), every survivor decrypts; counts each mechanism |

Expected ciphertexts for the derived DES variant and for the full chain came from a separate
software model of the same scheme. Standard DES and AES came from the FIPS documents.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/iov_pkg.sv tb/tb_iov_crypto_top.sv \
          --top-module tb_iov_crypto_top
./obj_dir/Vtb_iov_crypto_top
```

The full top-level test takes a few seconds. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/iov_pkg.sv rtl/iov_crypto_top.sv`. The only
warnings are package constants that a given top does not use.

## Files

- `rtl/iov_pkg.sv`: types, the computed AES S-box, AES linear layers, DES tables and permutations
- `rtl/aes_sbox.sv`, `rtl/des_sbox.sv`: the shared table and its DES view
- `rtl/aes_key_expand.sv`, `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv`, `rtl/des_core.sv`: cipher cores
- `rtl/freq_down_conv.sv`, `rtl/serial_to_parallel.sv`, `rtl/block_packer.sv`, `rtl/block_buffer.sv`: stream plumbing
- `rtl/iov_tx.sv`, `rtl/iov_rx.sv`, `rtl/iov_crypto_top.sv`: the two chains and the top

Parameters worth changing: `DIV` (slow rate), `BUF_DEPTH` (power of two), and on `iov_tx` /
`iov_rx` `DES_SBOX_SRC`, `DES_ORDER_HI` and `DES_ORDER_LO`. Both chains must use the same S-box
settings.
