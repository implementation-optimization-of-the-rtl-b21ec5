# DES8x2: an eight-round, two-cipher-function DES-style encryptor

A smartcard crypto-processor has to encrypt 64-bit blocks quickly with little
logic. Standard DES runs sixteen rounds one after the other, and each round
needs the result of the round before it. This core cuts that to **eight
rounds, one per clock**. It does so by giving each 32-bit half of the block its
own cipher function. The left half and the right half are transformed at the same
time, and neither waits for the other. Each round uses one of the eight DES
S-boxes, S1 in round 1 through S8 in round 8, so every table is used exactly once
per block. One clock loads the key and the plaintext, and eight clocks do the
rounds. A block therefore takes **nine clocks** from start to ciphertext.

All the building blocks are the standard DES ones: IP, the final permutation,
E, P, PC-1, PC-2, the eight S-boxes and the key-rotation schedule. The way they
are put together is not. **The core does not produce FIPS 46 DES ciphertext**,
and it does not interoperate with a standard DES implementation. See
"Departures and open points" before you rely on it for security.

## Datapath

```
 datain ──► IP ──► L0 ─►[L reg]──► f_left  (E, ⊕K(2r+1), S(r+1), P, ⊕L) ──┐
                └─► R0 ─►[R reg]──► f_right (E, ⊕K(2r+2), S(r+1), P, ⊕R) ──┤
                          ▲ feedback, one round per clock ◄────────────────┘
                                                              round 8 ──► FP(L8‖R8) ──► [dataout reg]
 key ──► PC-1 ──► [C,D regs] ──► rotate 1/2 and 2/3/4 ──► PC-2 ──► K(2r+1), K(2r+2)
```

For rounds r = 0 … 7:

```
L(r+1) = L(r) ⊕ P( S_(r+1)( E(L(r)) ⊕ K(2r+1) ) )
R(r+1) = R(r) ⊕ P( S_(r+1)( E(R(r)) ⊕ K(2r+2) ) )
ciphertext = FP( L8 ‖ R8 )
```

* **Input block** (`des_ip`). Applies the initial permutation and splits the
  result into L0 (the first 32 bits) and R0.
* **Cipher function** (`des_cipher_f`, two instances). Expands the half to 48
  bits with E and XORs the sub-key. It then substitutes, permutes with P, and
  XORs the result back onto the same half. The two halves never swap or mix.
* **S-box unit** (`des_sbox`). The 48-bit value is cut into eight 6-bit
  groups. In round r, *all eight* groups go through the same table S(r+1). The
  row is taken from the outer bits of the group and the column from the middle
  four, as in DES. The hardware is eight lookups, each choosing among the eight
  tables by the round number.
* **Output block** (`des_output`). Joins L8 and R8, with no swap, applies the
  final permutation (IP⁻¹), and holds the result on `dataout` until the next
  block completes.

The two halves stay separate through all eight rounds. So the left 32 bits
after IP depend only on the left 32 bits of the plaintext, and likewise on the
right. This follows from the round structure above, and it is the main reason
the output is not DES.

## Sub-key generation

`des_key_schedule` stores PC-1(key), 56 bits without the parity bits, as the
28-bit halves C and D. Each round needs two sub-keys, one per cipher function.
They are taken from the standard sixteen-entry DES schedule two at a time:

| round r | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| left sub-key | K1 | K3 | K5 | K7 | K9 | K11 | K13 | K15 |
| right sub-key | K2 | K4 | K6 | K8 | K10 | K12 | K14 | K16 |
| rotation for left sub-key (`ROT_L`) | 1 | 2 | 2 | 2 | 1 | 2 | 2 | 2 |
| rotation for right sub-key and register step (`ROT_R`) | 2 | 4 | 4 | 4 | 3 | 4 | 4 | 3 |

Both sub-keys come from C and D through combinational rotators and two PC-2
networks. C and D then advance by `ROT_R[r]`. The rotations add up to 28, so
after eight rounds the registers hold PC-1(key) again. The sixteen sub-keys are
bit-for-bit the standard DES sub-keys. For example, K1 of key 133457799BBCDFF1
is 1B02EFFC7072.

## Sequencing and interface

`des_ctrl` holds three pieces of state: `busy`, `dataready` and a 3-bit round
counter.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears every register |
| `first` | in | 1 | start; `datain` and `key` are sampled on the edge where `first` is high and `busy` is low |
| `datain` | in | 64 | plaintext |
| `key` | in | 64 | key, parity bits included (they are ignored) |
| `dataout` | out | 64 | ciphertext, held until the next block finishes |
| `busy` | out | 1 | high during the eight round clocks |
| `dataready` | out | 1 | `dataout` is valid; stays high until the next start |

Timing, counted in rising edges after `first` is raised:

```
edge 1      load: C,D <= PC-1(key); L,R <= IP(datain); busy rises
edges 2..9  rounds 0..7; on edge 9 dataout <= FP(L8‖R8), busy falls, dataready rises
```

* The latency is nine clocks, and a block occupies the core for nine clocks.
* A new block may start in the cycle where `dataready` is first seen, so
  back-to-back blocks run at one block per nine clocks.
* `first` is ignored while `busy` is high.
* `key` and `datain` need only be valid on the edge that samples `first`.
* Two assertions in `des_ctrl` guard the protocol: `busy` and `dataready` are
  never high together, and the last round is always followed by `dataready`.

**Bit order.** All 64-bit ports are `[63:0]`, and bit 63 is DES bit 1. Bit 63 is
therefore the bit called `datain[0]` / `key[0]` / `dataout[0]` in a `[0:63]`
naming. With this order, hex constants read the same way as in the DES standard.

## Files

| file | contents |
|---|---|
| `rtl/des_pkg.sv` | widths, types, all DES tables, rotation schedules, 28-bit rotate |
| `rtl/des_ip.sv` | input block (IP, split) |
| `rtl/des_sbox.sv` | round-selected S-box unit |
| `rtl/des_cipher_f.sv` | one cipher function (E, ⊕key, S, P, ⊕half) |
| `rtl/des_key_schedule.sv` | PC-1, C/D registers, paired rotations, two PC-2 |
| `rtl/des_output.sv` | final permutation and output register |
| `rtl/des_ctrl.sv` | sequencer (first / busy / dataready, round counter) |
| `rtl/des_top.sv` | the core: the blocks above plus the L and R registers |
| `tb/tb_*.sv` | one self-checking testbench per module |

The core has no size parameters. The widths (64/64/48/32/28) and the round
count of 8 are package constants, because the tables and schedules are fixed to
them.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The expected values do not come from the RTL under test:

* **`tb_des_ip`, `tb_des_output`.** IP is computed from its closed form. Output
  bit 8·row+col+1 takes input bit 8·(7−col) + (2·row+2 for row<4, else
  2·row−7). The tests cover single-bit inputs, random inputs, and the worked
  vector 0123456789ABCDEF → CC00CCFF/F0AAF0AA. FP must undo IP, and
  `des_output` must hold its value and clear on reset.
* **`tb_des_sbox`.** Entries of the published S-boxes are typed in by hand:
  corner entries and the first-round lookups of the classic worked example. The
  test also checks that every row of every box is a permutation of 0…15, and
  that all eight groups agree.
* **`tb_des_cipher_f`, `tb_des_key_schedule`.** Checked against vectors from a
  separate software model. That model reproduces the FIPS 46 vector (key
  133457799BBCDFF1, plaintext 0123456789ABCDEF → 85E813540F0AB405).
* **`tb_des_ctrl`.** Checks the cycle-exact sequence, the nine-clock latency, an
  ignored `first`, back-to-back starts and a mid-block reset.
* **`tb_des_top`** (end to end, default configuration). It carries its own
  bit-serial model of the core. As a self-test, the model's primitives, run as
  standard 16-round DES, must give 85E813540F0AB405. The test then runs 8 fixed
  vectors and 40 random blocks, checking each result and each nine-clock
  latency. It counts, and requires, each mechanism at least once: load, all
  eight rounds/S-boxes, rotations by 1, 2, 3 and 4, `first` while busy,
  back-to-back blocks, held output and mid-block reset.

Run one with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/des_pkg.sv tb/tb_des_top.sv --top-module tb_des_top
./obj_dir/Vtb_des_top
```

Replace `tb_des_top` with any other testbench name. Each runs in well under a
second.

A few reference results of the core (plaintext, key → ciphertext):

| plaintext | key | ciphertext |
|---|---|---|
| 0123456789ABCDEF | 133457799BBCDFF1 | 986CD9E2BA4360F1 |
| 0000000000000000 | 0000000000000000 | F3300CF0CFFCFF03 |
| FFFFFFFFFFFFFFFF | FFFFFFFFFFFFFFFF | 0CCFF30F300300FC |

## Departures and open points

The choices below are this design's own. The description it implements fixes
the round structure, the one-S-box-per-round rule, the nine-clock timing and the
port names. It leaves the following open:

* **Halves do not interact.** This follows the description: the two halves
  are processed independently, each XORed with its own cipher-function output,
  and FP is applied to L8‖R8 without a swap. A variant in which the halves
  cross would need a different round equation, and the description does not give
  one.
* **Which sub-key goes to which half.** The left half gets the odd sub-keys
  and the right half the even ones. This is a choice.
* **S-box use.** In round r one table serves all eight groups. This is the
  reading of "S1 in the first round … S8 in the eighth".
* **Output hold.** The original build kept the output in latches. Here
  `dataout` is an edge-triggered register. This avoids a latch whose enable comes
  from the same clock's state.
* **Reset** (`rst_n`) was added. The `first`-while-busy behaviour and the held
  `dataready` level were chosen here.
* **Pins.** Parallel 64-bit `datain`, `key` and `dataout` plus five control
  pins make 197 I/Os. That is more than the 190 user I/Os of the
  XC3S1200E-FT256 the original targeted. The original reported 136 bonded IOBs,
  so one of its inputs must have been narrower. How is not known, so the ports
  here stay at 64 bits.
* **Register count.** This core has 189 flip-flops: 64 for L/R, 56 for C/D, 64
  for `dataout` and 5 in control. The original reported 98 slice registers plus
  64 IOB latches. The two counts are not directly comparable.
* **Clock rate.** The original quotes 500 MHz (2 ns) on a Spartan-3E. Nothing
  here confirms that figure. The round path is E, an 8-way choice of 6→4
  lookups, P and an XOR. The key path has a 4-place rotator and PC-2 in
  parallel with it. `tb_des_top` uses a 2 ns period only as a simulation time
  base.
* **Encryption only.** No decryption path is described or built.
