# Layered-encryption link for 128-bit data

This design takes a 128-bit word from a small ALU-based data generator and
protects it for transmission with four transforms in a row. The 128 bits become
256 bits of coded data. A matching receiver undoes the transforms and can repair
single-bit channel errors. The chain is:

```
 operands A, B (128) ─┐
 control code (4) ────┤ data generation unit ── 128 ──► modified DES ── 128 ("middle data")
 chip enable C ───────┘   (ALU + backup + memory)        112-bit key
                                                                  │
   256-bit coded data ◄── iterated product cipher ◄── 256 ◄── pad ◄── 224 ◄── Hamming (224,128)
                           128-bit key                   to 256            32 × Hamming (7,4)

 receiver: reverse product cipher → drop padding → Hamming decode/correct → DES decryption → 128
```

The RTL follows a published VHDL design of a satellite data link, written for
FPGA simulation. Every layer is described there in terms of bit selections,
XORs, swaps and concatenations. Where the source spells out the bits (the DES
round keys, permutations and round function, and the Hamming code), this RTL
follows it exactly. It reproduces the three intermediate results the source
shows for its test vector. Where the source only names a part (the ALU's
operation set, the product cipher's key mixer and P-boxes, the whole receiver),
the part here is this design's own minimal construction. Each such choice is
listed below.

**Security caveat.** Read this before relying on the design for anything. No
layer contains a non-linear element: there are no S-boxes, and there are no
additions in the cipher layers. The chain from the generated word to the coded
data is therefore an affine function of the data and the keys over GF(2), and
a handful of known plaintext/ciphertext pairs reveals it. Treat the design as a structural
exercise, not as a cipher.

## Data generation unit

`data_generation_unit` has three parts:

- **Control unit** (`dgu_control_unit`). It decodes the 4-bit control code into
  the ALU's control signals (`sdl_pkg::dgu_ctl_t`). These signals select the
  result unit, form the adder's B input (B, 0, or complemented), set the carry
  in, pick the logic function and its output inversion, and pick the shift type.
- **Data path** (`dgu_datapath`). This is the ALU (`dgu_alu`: adder, logic unit
  and shifter behind a multiplexer) plus the **backup unit** (`dgu_backup_unit`),
  a register holding the last result.
- **Memory unit** (`dgu_memory_unit`). A 128-bit register. It drives its
  contents only while the chip enable C is 1 and drives zeros while C is 0.

| code | op | code | op | code | op | code | op |
|---|---|---|---|---|---|---|---|
| 0 | A+B | 4 | A&B | 8 | ~A | C | A<<1 |
| 1 | A−B | 5 | A\|B | 9 | ~B | D | A>>1 |
| 2 | A+1 | 6 | A^B | A | ~(A&B) | E | rotate A left 1 |
| 3 | A−1 | 7 | ~(A^B) | B | ~(A\|B) | F | B |

The source fixes only two entries. Code 1 is subtraction: 0A − 07 gives 03 in
its simulation. Code 8 gives a word that starts with FFFFFFFF, which fits ~A.
The rest of the table is this design's choice. Carries and overflow are
discarded.

**Timing.** The ALU result is loaded into both the backup register and the
memory on every rising clock edge. `backup_result` always shows it. The
generated data (the memory output) shows it only when C = 1. With C = 0 the
rest of the chain encrypts an all-zero word, and the ALU result stays readable
on `backup_result`. This matches the source's simulation, which shows zero
output for C = 0. The source has no clock at all. The register stage, the
active-low asynchronous reset and the one-word memory are this design's
reading of "a memory unit which stores the 128-bit data".

## Modified DES (`mdes_encrypt`, `mdes_decrypt`)

The structure is a DES-like Feistel network on 128 bits with 64-bit halves, 16
rounds and 96-bit round keys.

- **Initial and final permutation.** Bits j and 127−j trade places for
  j = 0..3, and bits 123..4 stay where they are. The two permutations are the
  same and each is its own inverse.
- **Round** (`mdes_round`). L = d[127:64] and R = d[63:0]. The output is
  {R, L ^ F(R, K)}. The 128-bit result of round 16 goes straight into the final
  permutation; no swap is undone.
- **F(R, K)** (`mdes_des_function`), all 32-bit fields:
  - expansion: e = {R[31:0], R[63:32], 0};
  - XOR with K;
  - straight P-box: s = {x[31:0], x[63:32], x[95:64]};
  - compression: f = {s[15:0], s[31:16], s[63:32]}.

  The compression keeps only s[63:0], so bits 95..64 of the XOR (the part of K
  that meets the expansion's zero field) never reach the data.
- **Round keys** (`mdes_round_key_gen`) are built from k = key[95:0]:

  | keys | value |
  |---|---|
  | K1–K4 | k rotated right by 1, 2, 3, 4 |
  | K5, K6, K7 | ~k (all three are the same) |
  | K8, K9, K10 | {k[45], k[95:1]}, {k[48], k[95:1]}, {k[41], k[95:1]} |
  | K11 | {k[45], k[94:1], k[90]} |
  | K12–K16 | {k[j], k[95:1]} for j = 91, 45, 46, 40, 1 |

  Bits 111..96 of the 112-bit key feed no round key. That is what the source's
  equations say, and the design keeps it: only 96 key bits matter.

**Decryption.** `mdes_decrypt` uses the Feistel identity
round⁻¹(x) = swap(round(swap(x))), with the keys in the order K16..K1,
between the same two permutations.

**Known answer.** Data 128'h3 under key 112'h12 encrypts to
128'h00008000000080008000200000008003. This matches the source's printed
result.

## Hamming (224,128) layer

`hamming_encoder_224` splits the word into 32 nibbles. Nibble i is m[4i+3:4i],
and its 7-bit code goes to e[7i+6:7i]. `hamming74_encoder` produces the code
in the classic position order p1 p2 d p3 d d d:

```
h[6] = B3^B2^B0   h[5] = B3^B1^B0   h[4] = B3   h[3] = B2^B1^B0   h[2:0] = B2 B1 B0
```

The source's written equations put B3 in h[3] and the third parity bit in
h[4]. Its simulated output, however, matches only the order above, and that
order is also the one under which a syndrome names the flipped position.
This design follows the simulated output. For the middle data above, the
224-bit result is
224'h0000000e0000000000000e000000e00000054000000000000e000043.

On the receiver side, `hamming74_decoder` computes the 3-bit syndrome, which is
the position (1..7) of a single flipped bit. It flips that bit back and raises
`corrected`. Two errors in one 7-bit word are miscorrected, as with any (7,4)
code. The decoding and correction are this design's; the source only names the
receiver unit.

## Padding and the iterated product cipher

`conv_224_to_256` puts 32 zero bits on top of the 224-bit word, as the source's
simulation shows. `conv_256_to_224` drops them again without checking them.

`iterated_product_cipher` cuts the 256 bits into two 128-bit halves and runs
each half through two product ciphers in series:

- the upper half through cipher 1 (key K1), then cipher 2 (K2);
- the lower half through cipher 3 (K3), then cipher 4 (K4).

The outputs are then joined. The source's block diagram shows four 128-bit
ciphers between a 256-bit separator and a 256-bit append unit, which only fits
as two chains of two. Which half takes which chain is this design's choice.

Each `product_cipher` is a key mixer, then a P-box of four 32-bit permutations
P1..P4, then re-assembly. The source names these parts but does not define
them. Here:

- the key mixer is XOR with Ki;
- each Pj reverses the bit order of its 32-bit word (P1 on bits 127..96, P4 on
  bits 31..0).

Because of this, the coded output differs from the one the source shows for its
product-cipher test. The transmitter and receiver drive K1..K4 all from one
128-bit `ipc_key`, as the source's test does.

**Error correction through the cipher.** The product cipher layer uses only
XORs and bit permutations, so one flipped bit in the 256-bit channel word
becomes exactly one flipped bit after `rev_iterated_product_cipher`. It then
lands either in one 7-bit Hamming word, where it is corrected and reported in
`rx_corrected`, or in the padding, where it is dropped.

## Top level: `secure_data_link`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, active-low asynchronous reset |
| first_input_data, second_input_data | in | 128 | ALU operands A, B |
| control_signal | in | 4 | ALU operation code (table above) |
| chip_enable | in | 1 | memory chip enable C |
| des_key | in | 112 | modified DES key (bits 111..96 unused) |
| ipc_key | in | 128 | product cipher key (K1 = K2 = K3 = K4) |
| backup_result | out | 128 | backup unit |
| generated_data | out | 128 | data generation output (0 when C = 0) |
| middle_data | out | 128 | modified DES output |
| hamming_data | out | 224 | Hamming code word |
| converted_data | out | 256 | padded word |
| tx_coded_data | out | 256 | transmitted coded data |
| rx_coded_data | in | 256 | received coded data |
| rx_data | out | 128 | recovered data |
| rx_corrected | out | 32 | per Hamming word: one bit was corrected |

The channel between the two sides (antennas and a satellite in the original
system) is not logic, so its two ends are ports. Connect `tx_coded_data` to
`rx_coded_data` for a loop-back. Both sides use the same `des_key` and
`ipc_key`.

**Latency.** The only state is the backup and memory registers. The outputs
from `generated_data` through `tx_coded_data` are valid one clock after the ALU
inputs. `rx_data` follows `rx_coded_data` combinationally. The original design
is likewise one long combinational path: it quotes about 30 ns for the whole
transmitter on its FPGA. The path through 16 unrolled rounds is long, so
register the chain if it has to meet a fast clock.

## Departures and own choices, in one place

- The ALU operation set (14 of the 16 codes), the register and reset of the
  backup and memory units, and zeros as the memory's "no output".
- The Hamming bit order: the source's simulated values are followed over its
  written equations.
- The product cipher's key mixer (XOR) and its P-boxes (32-bit bit reversal),
  and which 128-bit half takes which cipher chain. The source's product-cipher
  output is therefore not reproduced.
- The whole receiver (reverse product cipher, 256→224, Hamming decoder with
  single-error correction, DES decryption). The source only names these units;
  each is built as the exact inverse of its transmitter counterpart.
- All four product-cipher keys come from one 128-bit key.

## Files

`rtl/`:

| file | contents |
|---|---|
| `sdl_pkg` | widths, ALU codes, the control struct |
| `data_generation_unit` | data generation top |
| `dgu_control_unit`, `dgu_datapath`, `dgu_alu`, `dgu_backup_unit`, `dgu_memory_unit` | data generation parts |
| `mdes_*` | modified DES |
| `hamming74_*`, `hamming_*_224` | Hamming layer |
| `conv_*` | padding and its removal |
| `product_cipher`, `iterated_product_cipher`, `rev_*` | product cipher layer and its inverses |
| `transmitter`, `receiver` | the two sides |
| `secure_data_link` | top |

`tb/`:

- `sdl_ref_pkg.sv` holds independent bit-level reference models and the
  known-answer vectors.
- `tb_<module>.sv` is a self-checking testbench for each module.
- `tb_secure_data_link` runs the whole link at full size. It loops the channel
  back with random single-bit errors and counts each mechanism: all 16 ALU
  codes, C low and high, corrected errors, padding hits, key changes and the
  known-answer vector.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/sdl_pkg.sv tb/sdl_ref_pkg.sv tb/tb_secure_data_link.sv \
  --top-module tb_secure_data_link -o sim
./obj_dir/sim
```

Replace `secure_data_link` with any module name to run that module's
testbench. Each testbench finishes in well under a second.

`verilator --lint-only -Wall` reports a few unused-bit warnings. They are
intended and follow from the algorithm:

- key bits 111..96;
- the dropped straight-P-box bits in F;
- the padding bits in the receiver's converter;
- the parity bits of a corrected code word, which the decoder does not output.
