# DDP-64: a block cipher built only from bit permutations and XOR

DDP-64 encrypts 64-bit blocks under a 128-bit key in ten rounds. It has no
S-boxes, adders or multipliers. Its non-linearity comes from
*data-dependent permutations* (DDP): one half of the block is used to
generate the control bits of a switching network, and that network permutes
the other half. A network of 2-bit swap elements is only a few gate delays
deep. This makes the cipher cheap and fast in hardware, and its key schedule
is trivial: a round key is just a selection of the four 32-bit key words.
Switching from encryption to decryption needs no new key material. The key
words are reordered by a layer of switches, and a per-round switching bit
chooses a permutation or its inverse.

This repository holds synthesizable SystemVerilog for the cipher and for the
two hardware organisations published with it:

* a **full-rolling** core, with one round core and a state register. It
  does one round per clock and finishes a block every 10 clocks.
* a **pipelined** core, with ten round cores and ten register stages. It
  accepts one block per clock, with a latency of 10 clocks.

Both cores share a key-expansion unit and a round-key store in the top
module `ddp64_top`. Everything is tested against an independent bit-level
model of the cipher (`tb/ddp64_ref_pkg.sv`).

The published description of the cipher leaves several structural details
unspecified. These are the wiring inside the 8-bit permutation boxes, the
extension box that makes the 96 control bits, and the exact taps of the round
function. This RTL fills them in with a consistent choice, which is described
below. **Ciphertexts from this RTL are therefore not guaranteed to match any
other DDP-64 implementation.** Read the section "What is fixed by the cipher
and what is this design's choice" before relying on interoperability.

## Conventions

* Bits are numbered as in the cipher's vector notation: x1 is the least
  significant bit, which is index 0 in the RTL. The "low half" X_l of a word
  is `X[n/2-1:0]`.
* A block is M = (L, R) with **L = M[31:0]** and R = M[63:32]. The result has
  the same layout.
* The key is K = (K1, K2, K3, K4) with **K1 = key[31:0]**.
* Rotation `X<<<k` is defined by the cipher as y_i = x_{i+k}, so output bit
  i takes input bit (i+k) mod n. In index terms this is a shift toward bit 0
  (`ddp64_pkg::rot32/rot16`). For the rotations by half a word (<<<16 on 32
  bits and <<<8 on 16 bits) the direction does not matter. For the
  rotations by 5, 6, 10 and 12 it does.

## Controlled permutation boxes

All of the cipher's non-linearity lives in these boxes, so they are described
first.

**P2/1** (`p2_1`) takes two bits and one control bit v. It passes the bits
straight when v=0 and swaps them when v=1.

**Active layer** (`cp_layer`): N/2 switches in parallel. In this RTL a layer
pairs bits that are STRIDE apart, so a layer is always its own inverse.

**P8/12 and P^-1 8/12** (`cp_box_8_12`): three layers on 8 bits, 12
control bits. Layer 1 pairs bits 1 apart and takes V1 = v[3:0]. Layer 2 pairs
bits 2 apart and takes V2 = v[7:4]. Layer 3 pairs bits 4 apart and takes
V3 = v[11:8]. This is a butterfly, so any input bit can reach any output
bit. The inverse box is the mirror image: the same layers in reverse order,
with V_j driving layer 4-j. With the same control vector the two boxes undo
each other.

**P32/96 and P^-1 32/96** (`cp_box_32_96`): these permute the right
half-block. Data passes through four P8/12 boxes (one per byte), then a fixed
involution, then four P^-1 8/12 boxes. That gives six layers of 16 switches
and 96 control bits V = (V1..V6), with V1 = v[15:0]. Bit 4b+s of V_j drives
switch s of layer j in byte box b. The central involution sends bit k of each
nibble of byte b to byte k: bit 8b+4h+k goes to bit 8k+4h+b. This is the
cipher's list (1)(2,9)(3,17)(4,25)(5)(6,13)... in closed form. The inverse
box has the same topology with the control sub-vectors applied in reverse
order (V6 first), so `P^-1(V)` is exactly the inverse of `P(V)`.

**P32/48 and P^-1 32/48** (`cp_box_32_48`): four P8/12 boxes (or four P^-1
8/12 boxes) side by side. These are the two boxes of the F-box. Bits never
leave their byte.

## The F-box: a permutation that changes bit weight

A pure permutation preserves the number of ones, and the XOR of all its
output bits is a linear function of its input. The F-box (`f_box`) breaks
this while still using only permutations. It has a data input Z and a control
input Z'.

1. The extension box E' spreads Z' into W1 = Z'_l, W2 = Z'_l<<<5,
   W3 = Z'_l<<<10, W4 = Z'_h and W5 = Z'_h<<<5.
2. P32/48 permutes Z under (W1, W2, W3) and gives D.
3. The 40-bit word (D, C) is rearranged by the fixed permutation Pi'. C is
   the constant (c1..c8) = (1,0,1,0,1,0,1,0), with c1 at bit 32. Pi' moves
   the eight constant bits into the data word and moves data bits d1, d8,
   d10, d15, d19, d22, d28 and d29 (two per byte) out, into H5.
4. H5 is dropped from the data path, but it is reused as control. The box
   Ext forms W6 = (H5, H5).
5. P^-1 32/48 permutes (H1..H4). Its first, second and third layers (pairs 4,
   2 and 1 apart) take W4, W5 and W6.

Because P32/48 can move any bit of a byte onto the two positions that Pi'
removes, which eight bits of Z are replaced by the constant depends on the
data. The output weight of F therefore varies with the input. With Z = 0 it
is exactly 4, and with Z all ones it is exactly 28 (both are checked in
`tb_f_box`). The Pi' table is the `PI_PRIME_SRC` localparam in `f_box.sv`. It
is written as a source index per output bit and derived from the cipher's
cycle list, where a cycle (a,b,...) moves bit a to position b. That reading
reproduces the cipher's statement of which d-bits make up H5.

## The round and why the same hardware decrypts

One round, Crypt^(e) (`crypt_round`), with round subkeys Q1..Q4 and switching
bit e':

```
L' = (Pi^(e')(L)) <<< 16                      left branch
R1 = R  xor F(Z = L  xor Q4, Z' = L  xor Q2)
R2 = P32/96   (R1), V  = E(L  xor Q1)
R3 = I(R2)            each 16-bit half rotated by 8
R4 = P^-1 32/96(R3), V' = E(L' xor Q3)
R' = R4 xor F(Z = L' xor Q2, Z' = L' xor Q4)
```

The parts are defined as follows:

* E is the extension box. It maps U to (U_l, U_l<<<6, U_l<<<12, U_h,
  U_h<<<6, U_h<<<12).
* Pi^(e') (`pi_switch`) rotates every byte. For e'=0 it applies
  Pi(0) = (1,4,7,2,5,8,3,6), which moves bit i of a byte to position
  (i+3) mod 8. For e'=1 it applies the inverse.

Between rounds 1–9 the two halves are swapped. Round 10 is not followed by a
swap. The initial transformation is L0 = L xor O2 and R0 = R xor O1. The final
transformation is L_C = L10 xor O4 and R_C = R10 xor O3.

**Decryption** runs the same rounds with mode bit e=1, with no inverse round
hardware. It works because of three properties:

* The round is symmetric. Every element driven from L has a twin driven from
  L', and the twins use the subkey pairs (Q1, Q3) and (Q2, Q4) in mirror
  positions. Running the round on (L', R') with Q1 and Q3 exchanged, Q2 and Q4
  exchanged, and Pi(1) in place of Pi(0) undoes it. Pi acts inside bytes and
  therefore commutes with <<<16. The involution I is its own inverse, and
  the P^-1 box is the exact inverse of the P box.
* The schedule table provides this exchange. `key_swap` turns K into O.
  For encryption O = (K1,K2,K3,K4). For decryption O = (K3,K4,K1,K2).
  Reading the table for round 11-j with that O gives the Q1/Q3 and Q2/Q4
  exchange of round j.
* The e' row for decryption is the encryption row reversed and complemented.

The e' sequence is 1011011101 for encryption and 0100010010 for decryption.
It is not periodic. This is what stops keys of the form (X, X, X, X) from
making every round identical (a slide-attack weakness).

`tb_crypt_round` checks the round inversion directly. `tb_ddp64_top` checks
that decrypting a ciphertext returns the plaintext on both cores.

## Key expansion and round-key store

`key_expansion` captures the key and e when `load` is pulsed. It passes the
key through the swap box, registers O1..O4 (`okey`, used by the initial and
final XORs), and then writes one round key per clock to `round_key_ram`.
The 129-bit `round_key_t` holds {esw, q1, q2, q3, q4}. `ready` rises 11 clocks
after the load. A load during expansion restarts it.

`round_key_ram` is a 10 x 129 register array. Reads are asynchronous. The
iterative core reads the word for the current round, and the pipeline reads
all ten words at once, because every stage needs its own key every clock.

A mode change means a new `key_load` with the other `e`. That takes 11
clocks, about one block time of the full-rolling core.

## The two cores

**`ddp64_fr`** (full rolling). A 2x64 multiplexer chooses either the new
block after the initial XOR or the state register. It feeds one round core,
whose result is written back to the register.

* Cycle 0: `in_valid && in_ready` accepts the block, and round 1 is computed
  in that cycle.
* Cycles 1–9: rounds 2–10. The core reads RAM address `round-1` through
  `rk_addr`.
* Cycle 10: `out_valid` is high for one clock and `dout` holds the final XOR
  of the register. `in_ready` is already high again, so a held `in_valid`
  starts the next block in that same clock.

The core therefore delivers one block per 10 clocks. `in_ready` is low during
a block, which is the stall a producer sees.

**`ddp64_pipe`** (pipelined). Stage j is round j followed by a 64-bit
register and a valid bit. The initial XOR sits before stage 1 and the final
XOR after stage 10, so `out_valid/dout` follow `in_valid/din` by exactly 10
clocks. A block can enter every clock. There is no back-pressure. The key and
the schedule must not change while blocks are in flight. The `NROUNDS`
parameter exists only for structure; leave it at 10.

**`ddp64_top`** connects the key unit, the store and both cores:

| port group | signals | notes |
|---|---|---|
| key | `key_load`, `key[127:0]`, `e`, `key_ready`, `key_busy` | e=0 encrypt, e=1 decrypt |
| full rolling | `fr_in_valid`, `fr_in_ready`, `fr_din`, `fr_out_valid`, `fr_dout` | `fr_in_ready` is low while the key unit is busy |
| pipelined | `p_in_valid`, `p_in_ready`, `p_din`, `p_out_valid`, `p_dout` | blocks offered while `p_in_ready` is low are dropped |

Reset (`rst_n`) is asynchronous and active low. The round-key store is not
reset: load a key before offering data.

Throughput follows from the cycle counts. The full-rolling core gives 6.4
bits per clock: 544 Mbps at 85 MHz, or 589 Mbps at 92 MHz. The pipeline gives
64 bits per clock: 6.1 Gbps at 95 MHz, or 6.5 Gbps at 101 MHz. These are the
clock rates the cipher's designers reported for FPGA and 0.33 µm ASIC
implementations. This RTL has not been timed on either.

## What is fixed by the cipher and what is this design's choice

Taken from the cipher's definition:

* block and key sizes, and the ten rounds with swaps
* the initial and final XORs with O2/O1 and O4/O3
* the subkey swap box
* the schedule table of Q1..Q4 and e'
* P2/1, and the construction of P32/96 from P8/12 boxes around the listed
  central involution
* the F-box: E', P32/48, the constant, Pi', Ext, and the W-to-layer
  assignment
* Pi(0)/Pi(1), the involution I, and the rotation by 16
* the use of Q1/Q3 for V/V' and of Q2/Q4 for the F-boxes
* the full-rolling and pipelined organisations and their cycle counts

Chosen here:

* **P8/12 wiring.** Only "three layers separated by fixed permutations" is
  given. A butterfly (pairs 1, 2, 4 apart) is used. It satisfies the stated
  property that any bit of a byte reaches H5 with probability 1/4. The
  numbering of switches within a layer is also a choice.
* **Extension box E.** Its definition is not available. By analogy with
  E', it uses rotations by 0, 6 and 12 of each half.
* **Round taps.** Which F-box sees L and which sees L', which subkey goes to
  the F-box's data input and which to its control input, and where the
  rotation by 16 sits were reconstructed. The constraint was that the printed
  schedule table must decrypt correctly, and it does.
* **F-box inverse box.** Its layer order follows the literal statement that
  W4, W5 and W6 drive its first, second and third layers.
* **Interfaces.** The handshake and valid signalling, the one-round-key-per-
  clock key expansion, the asynchronous round-key read and the shared key
  unit in the top are all choices made here.
* **Switchable permutation.** Pi^(e') is built as a 2:1 selection between the
  two wirings.

Some points do not match the published implementation results:

* The published flip-flop counts (207 for full rolling, 640 for pipelined)
  cannot be matched. The split between flip-flops and RAM is not known. Here
  the full-rolling core has 70 flip-flops, the pipeline 650 (10 x 64 data
  plus 10 valid bits), the key unit 135, and the round-key store 1290 bits.
* No known-answer test vectors exist for the cipher as reconstructed here, so
  correctness is established by agreement with an independently written
  reference model and by encrypt/decrypt round trips.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* The leaf boxes are checked against `tb/ddp64_ref_pkg.sv`. That package
  applies the fixed permutations from their published cycle lists and builds
  the layers bit by bit. The leaf tests also check inverse pairs, weight
  preservation and reachability.
* `tb_crypt_round` checks single rounds and their inversion.
* `tb_key_expansion` checks every written round key and the 11-clock latency.
* `tb_ddp64_fr` checks results, the 10-clock latency and 10-clock rate, and
  stalls.
* `tb_ddp64_pipe` checks results, the 10-clock latency and a full-rate burst
  of 40 blocks.
* `tb_ddp64_throughput` streams 200 blocks through the full-rolling core and
  2000 through the pipeline, checks every result, and measures the rates.
  It gets 6.40 bits per clock for full rolling. For the pipeline it gets 63.7
  bits per clock including the 10-clock fill, or 64 in steady state.
* `tb_ddp64_top` is the end-to-end test at the default size. It runs four
  keys; encrypts on both cores; switches mode; decrypts on both cores; and
  counts key expansions, mode switches, full-rolling stalls, inputs held off
  during expansion, and pipeline bursts.

To simulate with Verilator (run from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/ddp64_pkg.sv tb/ddp64_ref_pkg.sv tb/tb_ddp64_top.sv --top-module tb_ddp64_top
./obj_dir/Vtb_ddp64_top
```

Replace `tb_ddp64_top` with any other testbench name. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/ddp64_pkg.sv rtl/<module>.sv`.
Lint reports `SYNCASYNCNET` on `rst_n`. It comes from the reset-disabled
assertions in `ddp64_fr` and `key_expansion` and is harmless.

## Files

| file | content |
|---|---|
| `rtl/ddp64_pkg.sv` | round-key struct, schedule table, constant C, rotations, involutions, extension boxes E and E' |
| `rtl/p2_1.sv`, `rtl/cp_layer.sv` | switch element and active layer |
| `rtl/cp_box_8_12.sv`, `rtl/cp_box_32_48.sv`, `rtl/cp_box_32_96.sv` | controlled permutation boxes and their inverses |
| `rtl/f_box.sv` | non-linear operation F |
| `rtl/pi_switch.sv`, `rtl/key_swap.sv` | switchable permutation Pi^(e') and subkey swap box |
| `rtl/crypt_round.sv` | one round |
| `rtl/key_expansion.sv`, `rtl/round_key_ram.sv` | key unit and round-key store |
| `rtl/ddp64_fr.sv`, `rtl/ddp64_pipe.sv` | full-rolling and pipelined cores |
| `rtl/ddp64_top.sv` | top level |
| `tb/ddp64_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | one testbench per module |
