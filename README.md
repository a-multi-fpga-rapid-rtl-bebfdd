# AES-128 cores for the PCI-mFCU four-FPGA prototyping board

This is synthesizable SystemVerilog for a small reconfigurable coprocessor: a 32-bit PCI
card with four Spartan-II FPGAs, and the AES-128 cores that run on it. A host PC reaches
the FPGAs through a PLX PCI-9052 bridge and its 16-bit local bus. It writes a key and a
128-bit block into an FPGA, starts it, then polls or takes an interrupt and reads the
result back. Each of the four FPGAs holds its own AES core, so four blocks are processed
at once. FPGA1 also holds the logic that configures the other three FPGAs over JTAG from
the PCI bus.

The published design of the PCI-mFCU system has two AES core architectures, each in an
encryption and a decryption variant. Both are here:

| core | architecture | data I/O | cycles per block |
|---|---|---|---|
| `aes_enc_iter`, `aes_dec_iter` | iterative loop: one round unit, used ten times | 128 bit | 12 |
| `aes_enc_regular`, `aes_dec_regular` | regular array: 4 x 4 "State Cells", one per state byte | 32 bit, one column per cycle | 17 |

All four cores work on AES-128 only (128-bit key, ten rounds). They were checked against
the known-answer vectors of FIPS-197 and against an independent software model.

## How the parts fit together

```
 host ── PCI ── PLX 9052 ══ local bus (la[11:0], ld[15:0], wr_n, rd_n, lreset_n) ══╗
                                                                                   ║
   pci_mfcu_top ───────────────────────────────────────────────────────────────────╢
     aes_ctrl_unit   address decode -> cs_aes[3:0], cs_jtag; INT_EN/INT_STAT; int_o
     jtag_cfg_ctrl   JTAG master -> TCK/TMS/TDI of FPGA2..4, TDO back
     aes_wrapper x4  registers + one core each (KIND1..KIND4)
        └─ aes_enc_iter | aes_dec_iter | aes_enc_regular | aes_dec_regular
              └─ aes_sbox, aes_shift_rows, aes_mix_column, aes_add_round_key,
                 aes_key_schedule, aes_state_cell_enc / aes_state_cell_dec
```

`aes_pkg` holds the shared types (`byte_t`, `word_t`, `block_t`), the AES constants, the
GF(2^8) helpers (`xtime`, `gf_mul`, `gf_inv`) and the `core_kind_e` enum.

State byte order throughout: byte *k* of a block is bits `[127-8k -: 8]`. The state cell
in row *r*, column *c* holds byte *r+4c*. A 32-bit column word has row 0 in `[31:24]`.

## The host's view: address map and registers

Addresses are 16-bit word addresses on the local bus.

| address | what |
|---|---|
| `000h-0FFh` | FPGA1 wrapper |
| `100h-1FFh` | FPGA2 wrapper |
| `200h-2FFh` | FPGA3 wrapper |
| `300h-3FFh` | FPGA4 wrapper |
| `400h` | `INT_EN`, r/w: bits 3:0 enable the interrupt of each FPGA |
| `401h` | `INT_STAT`, r: bits 3:0 are the four done flags |
| `410h-412h` | JTAG controller (see below) |

Inside each wrapper, word offsets 0..31 are used. Word 0 of a block is its most
significant 16 bits.

| offset | register | |
|---|---|---|
| 0-7 | `DIN` | r/w, input block (plaintext or ciphertext) |
| 8-15 | `KEY` | r/w, cipher key |
| 16-23 | `DOUT` | r, result |
| 24 | `CTRL` | w: bit 0 starts a block; bit 1 starts key setup (decryption cores) |
| 25 | `STAT` | r: bit 0 done, bit 1 busy, bit 2 key ready, bits 5:4 core kind |

A write takes effect once per bus access, on the first clock in which the wrapper is
selected and `wr_n` is low. Reads are combinational. `ld_oe` tells when the board drives
the data bus. The done flag is sticky: a new start clears it. Writing `CTRL` while the
core is busy does nothing.

The interrupt line `int_o` is the OR of the done flags that are enabled in `INT_EN`. The
PCI-9052 latches rising edges on its interrupt input, so every block that completes makes
one edge.

Sequence for one decryption on FPGA2: write `KEY` at `108h-10Fh`, write 2 to `CTRL`
(`118h`), wait for `STAT` bit 2. Then write `DIN` at `100h-107h`, write 1 to `CTRL`,
wait for `STAT` bit 0 or the interrupt, and read `DOUT` at `110h-117h`. The key setup is
needed only once per key.

The wrapper feeds the 32-bit regular cores itself: the four columns on four consecutive
cycles, and it gathers the four result columns. So all four core kinds look the same to
the host.

## Shared AES building blocks

**S-box (`aes_sbox`).** One 256 x 8 table of multiplicative inverses in GF(2^8) serves
both SubBytes and InvSubBytes:

- SubBytes: the byte indexes the table and the affine map is applied to the output.
- InvSubBytes: the inverse affine map is applied first and the table output is used
  as it is.

Two multiplexers switch the path. On the FPGA the table sits in block RAM. Here it is a
constant array, built at elaboration as `a^254` (0 maps to 0), which synthesis turns into
a ROM. The affine constants are the standard ones:

- forward: `b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ c_i`, with `c = 63h`
- inverse: `b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ d_i`, with `d = 05h`

**ShiftRows (`aes_shift_rows`).** This is pure wiring. Row 0 does not move, and row 2
rotates by two places in either direction. So only rows 1 and 3 go through a
forward/inverse multiplexer.

**MixColumns (`aes_mix_column`).** One column is computed with `xtime`:
`s0' = xtime(s0^s1) ^ s1^s2^s3`, and the other rows follow by rotation.
InvMixColumns needs no separate circuit. The inverse matrix {0e,0b,0d,09} equals the
forward matrix times the circulant {05,00,04,00}. So a cheap pre-mix step runs first:

- `s0 ^ 4(s0^s2)`
- `s1 ^ 4(s1^s3)`
- `s2 ^ 4(s0^s2)`
- `s3 ^ 4(s1^s3)`, where `4x = xtime(xtime(x))`

A multiplexer then feeds either the raw column or the pre-mixed one into the same
MixColumns logic.

**Key schedule (`aes_key_schedule`).** Keys are made on the fly. Only the current round
key is stored, in one 128-bit register, and the next key is computed in a single cycle:

- `W4 = W0 ^ SubWord(RotWord(W3)) ^ Rcon`
- `W5 = W1 ^ W4`, `W6 = W2 ^ W5`, `W7 = W3 ^ W6`

Decryption needs the keys in reverse order, so the block can also step backwards with
the same four S-boxes:

- `W3 = W7 ^ W6`, `W2 = W6 ^ W5`, `W1 = W5 ^ W4`
- `W0 = W4 ^ SubWord(RotWord(W3)) ^ Rcon`

In this direction Rcon is divided by {02} after each step.

## Version 1: the iterative loop cores

One round of hardware is built, and a 128-bit register closes the loop. It has 16
S-boxes, the ShiftRows wiring, four MixColumns units and AddRoundKey. A multiplexer in
front of the register picks either the input block after the first AddRoundKey, or the
output of the previous round.

Timing of `aes_enc_iter`, counting clock edges from the edge that samples `start`:

| edge | action |
|---|---|
| 1 | `din` and `key` captured |
| 2 | state = `din` ^ round key 0 |
| 3-11 | rounds 1-9 |
| 12 | round 10 (no MixColumns) into `dout`; `done` pulses |

That is 12 cycles per block. The published critical path of 13.4 ns gives
128 / (12 x 13.4 ns) ≈ 796 Mbit/s.

`aes_dec_iter` runs its loop in the order InvShiftRows, InvSubBytes, AddRoundKey,
InvMixColumns; the last pass leaves out InvMixColumns. It also takes 12 cycles per
block. Round keys run from 10 down to 0 through the backward key schedule. Round key 10
comes from a key setup that is done once per key: pulse `key_setup`, and `key_ready`
rises 12 cycles later.

## Version 2: the regular State Cell array

This architecture is the harder one to follow. It trades cycles for a regular layout
that mirrors the AES state.

**The cell.** Each of the 16 State Cells holds one state byte in an 8-bit register. It
has its own S-box on the register output, and eight XOR gates for AddRoundKey. Two
multiplexers pick what the XOR and the register see.

- Encryption cell (`aes_state_cell_enc`):
  - The XOR takes one of three inputs, each XORed with the round-key byte: `data_in`
    from the right-hand neighbour, the MixColumns result, or the ShiftRows result.
  - The register loads either `data_in` (a plain shift) or the XOR output.
- Decryption cell (`aes_state_cell_dec`):
  - The XOR takes `data_in` or the InvShiftRows result.
  - The XOR output leaves the cell towards the column's InvMixColumns unit.
  - The register loads `data_in`, the InvMixColumns result, or the XOR output.

**The array.**

- Cells sit in the 4 x 4 layout of the state, and each column has an MC (or IMC) unit.
- Every cell's S-box output goes through the ShiftRows wiring to its new position.
- With this, one clock edge does a whole round.
- Column 3 takes the 32-bit input `din`, and each column loads from its right-hand
  neighbour when shifting.
- Column 0 drives `dout`.
- A cycle counter plays the control unit: it sets the multiplexers of all 16 cells and
  steps the key schedule.

**Timing**, counting edges from the one that samples `start` (column 0 must be on `din`
with `start`, and columns 1-3 follow on the next cycles):

| edge | encryption | decryption |
|---|---|---|
| 1-3 | shift in columns 0-2 | same |
| 4 | shift in column 3 and XOR round key 0 | shift in column 3 and XOR round key 10 |
| 5-13 | rounds 1-9: load MixColumns(ShiftRows(SubBytes)) ^ key | load InvMixColumns(InvShiftRows(InvSubBytes) ^ key), keys 9-1 |
| 14 | final round: ShiftRows(SubBytes) ^ key 10; column 0 of the result on `dout` | InvShiftRows(InvSubBytes) ^ key 0 |
| 15-17 | shift out; columns 1-3 of the result on `dout` | same |

- `dout_valid` is high while a result column is on `dout`.
- A new block may start on the last output cycle (edge 17), so the period is 17 cycles.
- The input shifting overlaps the initial round and the output shifting overlaps the
  final round. That is how 4 + 4 I/O cycles plus 9 normal rounds make 17.
- The published figure is 67.9 MHz x 128 / 17 ≈ 511 Mbit/s.
- The key is sampled together with `start` (edge 1).
- The decryption unit has the same 12-cycle key setup as `aes_dec_iter`.

## JTAG configuration of FPGA2..4

On the board, FPGA1 is configured from its own PROM or from the parallel port. The other
three FPGAs form a JTAG chain that FPGA1 drives. The host plays the boundary-scan
bitstream into that chain through `jtag_cfg_ctrl`, up to 8 bits per access:

| address | register |
|---|---|
| `410h` | write: TMS bits in bits 7:0, bit count - 1 in bits 10:8 |
| `411h` | write: TDI bits in bits 7:0; this starts the shift |
| `412h` | read: captured TDO bits in bits 7:0, busy in bit 15 |

- Bits go out LSB first.
- TCK runs at half the local clock and idles low.
- TDO is sampled as TCK rises.

## What is this design's own choice

The datapaths follow the published description closely:

- the S-box sharing, the ShiftRows multiplexers on rows 1 and 3 only, the MixColumns
  pre-mix factorisation and the single-cycle key expansion
- the loop structure of version 1
- the cell contents, the array and the 17-cycle schedule of version 2
- the 12 and 17 cycle counts

The following were not specified and were chosen here:

- **Register map, address map, start/done/busy handshake and the sticky done flag.**
  The source only says that the host writes data, polls and reads back, and that the
  control unit makes chip selects and the interrupt.
- **How the 12 cycles of version 1 are spent.** One input-register cycle, one initial
  AddRoundKey cycle and ten rounds.
- **Decryption round keys.** They come from a backward walk of the key schedule, starting
  from round key 10, which a key setup phase computes once per key. The 12 and 17 cycle
  counts hold per block, not for the first block after a key change.
- **The JTAG controller's interface and bit timing.** Only its purpose is given.
- **Which core sits in which FPGA.** The board loads one bitstream per FPGA as needed.
  The top's defaults put a different core in each FPGA (iterative encryption,
  iterative decryption, regular encryption, regular decryption) so that all four are
  present. Set `KIND1`..`KIND4` to any mix.
- **Reset.** It is asynchronous and active low (`lreset_n`) on every register.
- **S-box tables.** Each S-box instance has its own ROM. On the FPGA, two tables share
  one 4096-bit block RAM.

## Differences from the source

- **Board wiring.** The 32-bit links between neighbouring FPGAs, the 12-bit on-board bus
  and the 16-bit extension headers are wiring, not logic, and are not modelled. As in
  the multi-AES block diagram, the local-bus lines go straight to all four wrappers.
  The local data bus is 16 bits wide, as on the PLX side.
- **The printed affine matrix.** The published S-box matrix, whose constant vector is
  05h, is the inverse affine map. It is used for InvSubBytes, and the forward map with
  63h for SubBytes.
- **Position of the InvMixColumns pre-mix.** The published text puts the pre-mix step
  after MixColumns, while its equations and block diagram put it before. This design
  puts it before. The result is the same, because the two matrices commute.
- **Key sizes.** Only AES-128 is built. The regular architecture is described as easy to
  extend to 192- and 256-bit keys, but that is not done here.
- **Combined encryption/decryption core.** The building blocks have direction selects
  for one, but the system uses separate encryption and decryption cores, and so does
  this RTL. A combined core is not built.
- **Pipelining of version 1.** It is mentioned only as a possible improvement and is not
  built.
- **Outside the RTL.** The PCI-9052 bridge, its 93LC46 EEPROM, the XC18V01 PROM, the
  oscillators, the regulator, the parallel-port cable and the host software (driver,
  API, configuration utility).

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The reference model
in `tb/aes_ref_pkg.sv` is written independently of the RTL: it finds S-box entries by
search, multiplies by the full matrices, and expands all 44 key words. It also carries
the FIPS-197 test vectors.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_enc_regular.sv \
    --top-module tb_aes_enc_regular -Mdir obj && obj/Vtb_aes_enc_regular
```

`tb/tb_pci_mfcu_top.sv` runs the whole board at its default parameters through the
local-bus pins only, and takes well under a second:

- it plays JTAG strings through a three-device bypass chain model
- it runs key setup on both decryption FPGAs
- it starts all four cores together and checks that none has finished when the last one
  starts
- it waits for the interrupt and checks all four results, four times over
- it counts each of these events and fails if one never happened

Cycle counts are checked in the core testbenches: 12 for the iterative cores, 17 for the
regular ones, and 12 for key setup.

`tb/tb_pci_mfcu_uniform.sv` builds four boards, each with one core kind loaded into all
four FPGAs. That is how the multi-AES system is normally used. Each board encrypts or
decrypts four blocks at once under four different keys.

`tb/tb_aes_throughput.sv` streams 32 blocks back to back through each core. It checks
the sustained period, which is 12 or 17 cycles per block, and prints the throughput at
the published clock rates:

| core | clock | throughput |
|---|---|---|
| iterative encryption | 74.6 MHz | 795.7 Mbit/s |
| iterative decryption | 65.9 MHz | 702.9 Mbit/s |
| regular encryption | 67.9 MHz | 511.2 Mbit/s |
| regular decryption | 61.9 MHz | 466.1 Mbit/s |

The clock rates themselves come from the FPGA implementation and are not something the
RTL simulation can confirm.
