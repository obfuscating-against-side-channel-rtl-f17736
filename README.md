# AES-128 with hiding countermeasures against power analysis

Differential power analysis recovers an AES key by correlating many measured
power or EM traces with a model of what the hardware computes. The model is
usually the Hamming weight (HW) of an intermediate value or the Hamming
distance (HD) between two values that follow each other in a register. The
attack also needs the traces to line up in time. This design does not change
the AES algorithm. It hides the leakage instead, with two measures used
together:

* **Random clock.** The AES datapath advances on the edges of a clock whose
  period changes at random between 3, 4, 5 and 6 system clocks. Each
  encryption therefore has a different timing, and the traces do not align.
* **System-level bit-balancing.** A second AES core computes on the
  complement of the data, so every intermediate bit has a partner of opposite
  value and the total HW stays constant at 128 per register. Two more
  measures remove HD leakage. The round logic is precharged to zero between
  rounds, and each round result goes to a storage register chosen at random.

The core is an iterative AES-128 engine that computes one round per
random-clock cycle, for encryption and for decryption. A host processor drives it through a small register
interface.

## Block diagram

```
            bus (we, addr, wdata, rdata)
                     |
               +-----------+   key, din, KRDY, DRDY, SRST
               | aes_regs  |-----------------------------------+
               +-----------+                                   |
                  ^   |DRDY                                    v
   dout, status   |   v                          +-------------------------+
                  |  +----------+ seed +-------+ | bitbal_aes              |
                  |  | rclkgen  |<-----| lfsr16| |  slot lfsr16 ---+-------|
                  |  | (lfsr16) |      | seed  | |                 v       |
                  |  +----------+      +-------+ |  aes_core   (din, key)  |
                  |     | rclk_en (clock enable) |  aes_core  (~din, key)  |
                  |     +----------------------->|  INVERTED=1             |
                  +------------------------------+-------------------------+
```

Everything runs on one system clock, `clk`. The random clock is a one-cycle
enable pulse, `rclk_en`. It marks the system-clock cycle that ends at a
rising edge of the random clock. The square-wave version, `rclk_o`, is
brought out for observation only.

## Bit-balancing: the inverted AES core

This is the part of the design that needs the most explanation.

The second core (`aes_core` with `INVERTED=1`) gets the complemented
plaintext `~din` and the **unchanged** key. Its key schedule is also
unchanged, so both cores use the same round keys. Its goal is that every
register and every combinational intermediate holds the exact complement of
its partner in the normal core.

Three of the four round functions keep the complement for free:

* ShiftRows only moves bytes around.
* AddRoundKey: `~a ^ k = ~(a ^ k)`.
* MixColumns: each output byte is `2a ^ 3b ^ c ^ d`. Written out, that is
  `xtime(a) ^ xtime(b) ^ b ^ c ^ d`. `xtime` is linear, so complementing an
  input adds the constant `xtime(0xFF) = 0xE5`. The two `xtime` terms add
  `0xE5` twice, which cancels. The three plain terms add `0xFF` three times,
  which leaves `0xFF`. So `MixColumns(~s) = ~MixColumns(s)`.

SubBytes is not linear, so its table must change. The inverted core uses

```
SBOX_INV_ROT[x] = ~SBOX[~x]
```

This is the normal table with the index reversed, so entry `x` moves to
`255 - x`, and every entry complemented. For example, `SBOX[0x03] = 0x7B`
becomes `SBOX_INV_ROT[0xFC] = 0x84`. With this table, `S'(~x) = ~S(x)`, and
the complement survives all ten rounds. The inverted core's ciphertext is
therefore `~ciphertext`. Both tables are constants in `aes_pkg`. The
testbench computes the S-box independently, from the GF(2^8) inverse and
the affine map, and checks both tables against it.

Registers follow the same rule. The inverted core's plaintext register
resets to all ones while the normal core's resets to zeros, and its state
registers reset to ones as well. Because of this, the pair holds exactly 128
ones in total even straight after reset. The key register is the same in
both cores, which is why it is not balanced. `bitbal_aes` carries assertions
that the two cores stay in lockstep and that their outputs stay
complementary.

### Precharge and randomized storage (HD resistance)

Complementing the data balances HW but not HD. The change from `s` to `s'`
flips the same number of bits in both cores. Two measures address this.

* **Precharge.** Each round cycle is followed by a precharge cycle. In it,
  the round logic sees an all-zero state and an all-zero round key, and
  nothing is stored. The combinational logic therefore settles from a fixed
  value instead of from the previous round's data.
* **Randomized storage.** Each core has four state registers
  (`state_store`, `SLOTS=4`). Each round result is written to the register
  named by two bits of a free-running LFSR. A read pointer remembers which
  register holds the current state. Successive values seldom land in the
  same register, so register HD no longer follows the data. Both cores use
  the same slot, so the balance holds register by register.

## Decryption

The same core also decrypts, chosen per block. The decryption round
(`aes_decrypt`) is the standard inverse cipher: InvShiftRows, InvSubBytes,
AddRoundKey, then InvMixColumns, which the last round skips. Round 0 adds the
last round key, KD. KD is derived once per key: after a key load, a
background copy of the forward key schedule runs for ten enabled cycles. A
decryption request arriving before that finishes waits. An encryption
request does not wait. During decryption, the round keys are produced
backwards on the fly (`aes_inv_key_step`).

The countermeasures apply unchanged. The inverted core uses
`~InvS(~x)` for its inverse S-box. InvMixColumns also keeps the complement,
since its coefficients `0e ^ 0b ^ 0d ^ 09` add up to `01`. Precharge, slot
storage and the random clock work the same way, and so does the cycle
count.

## Encryption timing

One block takes these random-clock cycles:

| Cycle | Action |
|-------|--------|
| 1 | key load (`KRDY`) |
| 2 | plaintext load (`DRDY`) |
| 3 | round 0: AddRoundKey only |
| 4..13 | rounds 1..10; round 10 skips MixColumns |
| + 10 | precharge cycles, one after each of rounds 0..9 |

That gives 13 cycles without precharge (`HD_PROTECT=0`) and 23 cycles with
it, the default. A random-clock cycle is 3..6 system clocks, so a full block
takes 69..138 system clocks. Decryption takes the same number of cycles once KD is ready. Measured from the start request, the top-level
testbench sees 22 random-clock cycles, which came to 83..103 system clocks
in its runs.

## Random clock generator (`rclkgen`)

A counter runs from 0 to `len-1` system clocks, where `len` is the current
period, between 3 and 6. Near the end of each period the generator reads the
top bit of a 16-bit LFSR twice: at `cnt == len-2` and at `cnt == len-1`. The
LFSR steps after each read. The next period is `3 + {first_bit, second_bit}`.
The clock is high for the first `floor(len/2)` system clocks of a period.
`rclk_en` is high when `cnt == len-1`.

The LFSR polynomial is `x^16 + x^15 + x^13 + x^4 + 1`. Its reset seed is
`0x7575`. On every start request (`DRDY`) it is reseeded from a second,
free-running LFSR in the top, so no two encryptions share a clock pattern. A
zero seed is replaced by `0x0001`. An assertion checks that the period
always stays within 3..6.

## Host interface (`aes_regs`)

The bus has 32-bit words, a single write strobe, a 4-bit word address and
read data that is combinational on the address.

| Word | Name | Access |
|------|------|--------|
| 0 | CTRL | write: bit0 KRDY, bit1 DRDY (load and start), bit2 SRST (reset cores), bit3 DEC (with DRDY: decrypt). Read: bit0 busy, bit1 dvld, bit2 kvld |
| 1..4 | KEY | key, most significant word first |
| 5..8 | DIN | plaintext, most significant word first |
| 11..14 | DOUT | result, most significant word first |

To encrypt a block:

1. Optionally write SRST.
2. Write the four key words, then KRDY.
3. Write the four plaintext words, then DRDY. To decrypt, write ciphertext
   words instead, then DRDY together with DEC (`0xA`).
4. Poll CTRL until busy is 0 and dvld is 1.
5. Read words 11..14.

The core starts only at the next random-clock edge. Until then, the start is
held pending and status reads as busy, so the host cannot mistake the
previous result for the new one. DRDY is ignored while busy. KRDY is ignored
while the core is busy.

## Modules

| File | Contents |
|------|----------|
| `rtl/aes_pkg.sv` | types, S-box and inverted-rotated S-box tables, ShiftRows/MixColumns/xtime/rcon functions |
| `rtl/aes_sbox.sv` | one byte substitution, normal or inverted table (`INVERTED`) |
| `rtl/aes_round.sv` | SubBytes, ShiftRows, MixColumns (skipped in the last round), AddRoundKey |
| `rtl/aes_key_step.sv` | one step of the AES-128 key expansion |
| `rtl/aes_decrypt.sv` | one inverse-cipher round, normal or inverted inverse S-box |
| `rtl/aes_inv_key_step.sv` | one backward step of the key expansion |
| `rtl/lfsr16.sv` | 16-bit Fibonacci LFSR with load and enable |
| `rtl/rclkgen.sv` | random clock generator (period 3..6 system clocks, reseedable) |
| `rtl/state_store.sv` | randomized state storage: `SLOTS` registers and a read pointer |
| `rtl/aes_core.sv` | iterative AES-128 encryptor/decryptor with optional precharge and random storage |
| `rtl/bitbal_aes.sv` | normal and inverted cores sharing one slot LFSR |
| `rtl/aes_regs.sv` | host register interface |
| `rtl/dpa_aes_top.sv` | top level: registers, seed LFSR, random clock, bit-balanced AES |

Each module has a testbench named `tb/tb_<module>.sv`. They share the
reference model `tb/tb_aes_ref_pkg.sv`, an independent AES-128 (cipher and inverse cipher) that also
returns every round's intermediate value. The core testbench checks the
intermediate values of the reference example, key
`2b7e1516 28aed2a6 abf71588 09cf4f3c`. The top-level testbench drives only
the bus. It encrypts and decrypts random blocks and counts the following:

* random-clock periods of each length;
* reseeds;
* precharge cycles;
* storage slots used;
* soft resets;
* how much the encryption time varies.

It also checks that the inverted core always holds the complement.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_dpa_aes_top.sv --top-module tb_dpa_aes_top
./obj_dir/Vtb_dpa_aes_top
```

Replace `tb_dpa_aes_top` with any other testbench name. Every testbench ends
with a line `TB_RESULT checks=<n> failures=<m>`. Testbenches that need no
AES reference can omit `tb/tb_aes_ref_pkg.sv`.

## Design choices and limits

* **Decryption by analogy.** Decryption uses the textbook inverse cipher
  and copies the encryption-side countermeasures. Its extra costs are the
  background KD computation and the wait of the first decryption after a
  key load: up to ten random-clock cycles.
* **Clock enable instead of a generated clock.** The random clock is a
  clock-enable pulse in the single `clk` domain, not a divided clock driving
  the cores. The AES logic sees the same edges, and the design stays a
  single-domain synchronous circuit. In silicon, the power signature comes
  from the enabled cycles. The idle system-clock cycles still toggle the
  clock tree, so this is weaker hiding than gating the clock itself. A
  clock-gating cell can be placed on `rclk_en` where the target technology
  provides one.
* **Own choices, not fixed by the underlying scheme:**
  * the LFSR polynomial;
  * the seeds: `0x7575` for the clock LFSR, `0x1D2B` for the seed LFSR and
    `0x3C5A` for the slot LFSR;
  * which LFSR bit is read;
  * the seed source for reseeding;
  * the four-register storage;
  * the bus protocol and the register addresses other than the ciphertext
    words.
* **Clock ratio.** The period range of 3..6 system clocks gives a random
  clock at 16.7 % to 33 % of the system clock. Ideally it would span 50 % to
  100 %, which would need a faster source clock. Changing the range means
  editing `len_next` in `rclkgen` and the period assertion.
* **No host access to the inverted result.** The inverted core's ciphertext
  (`dout_inv`) exists only for balance and is not readable by the host.
* **Continuous random clock.** The random clock runs all the time, not only
  during an encryption.
* **Balance is logical, not physical.** The HW and HD balance holds at the
  RTL level. Whether it survives in hardware depends on placement and
  routing keeping the two cores' loads matched, which this RTL cannot
  enforce.
