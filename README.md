# Compact 8-bit AES-128 encryption/decryption core

This is a small AES-128 core for area- and power-limited devices such as sensor nodes. It
encrypts and decrypts. It does not use a 128-bit round datapath. It moves **one byte per
clock** through a single S-box. A 128-bit block takes 10 rounds × 16 clocks = **160 round
clocks**. Two choices keep the gate count low:

* **A composite-field S-box.** There is no 256-entry table. The S-box inverts in
  GF(2^8) built as a tower GF(2^8)/GF(2^4)/GF(2^2). One inverter serves both SubBytes and
  InvSubBytes.
* **Round constants from a few gates.** The key schedule's round constant comes from a
  sum-of-products on the 4-bit round index, not from a 10-way multiplexer. The decryption
  order is obtained by remapping the index.

The key schedule runs on the fly, one byte per clock, next to the data. For decryption it runs
backwards: starting from the last round key, it regenerates the earlier round keys.
A parameter also builds a smaller encryption-only or decryption-only core.

## Interface and protocol

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `load_in` | in | 1 | load one byte of `data_in`/`key_in` per clock |
| `unload_in` | in | 1 | advance `data_out` to the next result byte |
| `start_in` | in | 1 | one-clock start pulse |
| `inv_in` | in | 1 | 0 = encrypt, 1 = decrypt (sampled with `start_in`) |
| `key_in`, `data_in` | in | 8 | key and data bytes |
| `data_out` | out | 8 | result byte |
| `busy_out` | out | 1 | high for the 164 clocks of a run |
| `comp` | out | 1 | result ready and new data may be loaded; high from the end of a run until the next load or start |

Bytes travel in FIPS-197 order: byte *n* is row *n*%4, column *n*/4. For example, plaintext
`00112233445566778899aabbccddeeff` is sent as `00`, `11`, … `ff`.

1. **Load.** Hold `load_in` for 16 clocks with bytes 0..15 on `data_in` and `key_in`.
   * To encrypt, `key_in` carries the cipher key.
   * To decrypt, `key_in` carries the **round-10 key**, the last word of the key expansion.
     For key `000102…0f` that key is `13111d7fe3944a17f307a78b4d2b30c5`.
2. **Start.** Pulse `start_in` for one clock, with `inv_in` set to the mode.
   * `busy_out` is high for 164 clocks: 160 round clocks plus 4 drain clocks.
   * `comp` rises at the end of the run.
3. **Unload.** `data_out` already shows result byte 0.
   * Each clock with `unload_in` high moves `data_out` on to the next byte.
   * You may hold `load_in` in the same 16 clocks. The next block then shifts in while the
     result shifts out.

While `busy_out` is high the core ignores `load_in`, `unload_in` and `start_in`.

## The byte loop

```
 data_in^key_in (load)
        |
        v
  +--> XOR --> byte permutation --> S-box / InvS-box --> MixColumns --> parallel-to-serial --+
  |     ^      (ShiftRows by taps)   (one, shared)      (column at     (4 bytes -> 1/clock)  |
  |     |                                                 row 3)                             |
  |   key mux <-- raw round key byte (encrypt)                                               |
  |           <-- InvMixColumns(round key) via 2nd MixColumns + converter (decrypt)         |
  +------------------------------------------------------------------------------------------+
```

Round clock *k* (0..15) of a round handles state position *p* = *k*: column *p*/4, row *p*%4.

1. The **byte permutation unit** (`byte_perm`) returns the byte that ShiftRows moves to *p*.
   In encryption that is source *q* = 4·((col+row) mod 4)+row. In decryption
   (InvShiftRows) it is *q* = 4·((col−row) mod 4)+row.
2. The S-box substitutes that byte.
3. `mixcolumn` keeps rows 0..2 of the column. When row 3 arrives it forms the whole
   MixColumns (or InvMixColumns) column in that same clock.
4. `p2s` captures the column. It hands the bytes back one per clock, in the four clocks
   after the capture.
5. Each byte is XORed with its round-key byte and written back into the permutation unit as
   input to the next round.

**Why the permutation unit is 28 bytes deep.** Source byte *q* of a round comes out of the
converter 12 clocks before that round reads position *q*. So the byte wanted at position *p*
has waited *p − q + 12* clocks, which ranges from 0 to 24.

* In the worst case, a wait of 0, the byte goes straight from the XOR into the S-box.
* With those waits, round *r + 1* can start the clock after round *r* ends. No round needs a
  bubble clock.
* The first round reads bytes that came from the 16-clock load instead. For it the wait is
  *p − q + 16*, between 4 and 28 clocks.

The unit is therefore a 28-stage byte shift register with a tap multiplexer. The tap is chosen
from the position, the mode and a first-round flag.

**End of a run.** The tenth round skips MixColumns: the bypass input passes the column through.
Its bytes still go through the converter and the key XOR. They reach the shift register 4
clocks after the last round clock, which is why a run lasts 164 clocks. After those 4 drain
clocks the 16 result bytes sit in stages 15..0, with byte 0 oldest. `data_out` is stage 15, so
every unload shift brings the next byte.

## Key schedule, forward and backward

`key_expansion` keeps the round key in a 16-byte shift register `kr`. At the start of a round,
`kr[n]` holds byte *n*. In step *n* of a round the register moves down one place and the new
byte *n* of the next round key enters at `kr[15]`. At that point, old byte *m* (with *m* ≥ *n*)
sits at `kr[m−n]` and new byte *n*−4 sits at `kr[12]`.

* **Forward** (encryption, K_r from K_(r−1)):
  * Steps 0..3 add S(word 3 rotated) and, in step 0, the round constant. The S-box reads
    old byte 13, 14, 15 or 12, which is at `kr[13]` in steps 0..2 and at `kr[9]` in step 3.
  * Steps 4..15 XOR `kr[0]` with the new byte four places back, `kr[12]`.
* **Backward** (decryption, K_(r−1) from K_r):
  * Word 3 of the earlier key is w3' ⊕ w2'. The S-box therefore reads `kr[13]^kr[9]`, or
    `kr[9]^kr[5]` in step 3.
  * Steps 4..15 need the *old* byte *n*−4, which has already left the register. A 4-byte
    delay line `kd` keeps it.

The key bytes must be added at the converter output, 4 clocks after they are computed.
`kr[12]` holds exactly that delayed byte, so encryption adds `kr[12]` directly.

**Decryption uses the equivalent inverse cipher.** Each of rounds 1..9 runs InvShiftRows,
InvSubBytes, InvMixColumns, then AddRoundKey with InvMixColumns(K). The newly computed key
bytes therefore also pass through a second `mixcolumn` (fixed to inverse) and a second `p2s`,
which gives them the same 4-clock latency as the state. A multiplexer selects this path when
`inv_in` = 1. The last round key K0 is passed through unmixed.

## The S-box

`sbox` computes S(x) = A·x⁻¹ ⊕ 63, where A is the AES affine matrix. The inverse is taken in a
tower of **normal bases**:

| field | basis | defining relation |
|-------|-------|-------------------|
| GF(2^2) | (W², W) | W² + W + 1 = 0 |
| GF(2^4) over GF(2^2) | (Z⁴, Z) | Z² + Z + N = 0, with N = W² |
| GF(2^8) over GF(2^4) | (Y¹⁶, Y) | Y² + Y + ν = 0, with ν = N·Z⁴ (`4'h8`) |

For a = g1·Y¹⁶ + g0·Y the inverse is built in stages:

* **lin. map:** an 8×8 bit matrix takes the byte from the AES polynomial basis into the
  tower basis.
* **S1** (`sbox_s1`): computes Δ = g1·g0 ⊕ ν·(g1⊕g0)².
* **S2** (`sbox_s2`): inverts Δ in GF(2^4). It uses the same formula one level down; in
  GF(2^2) the inverse is a bit swap.
* **S3** (`sbox_s3`): forms a⁻¹ = (Δ⁻¹·g0)·Y¹⁶ + (Δ⁻¹·g1)·Y with two GF(2^4) multipliers.
* **inv. lin. map:** a second matrix goes back to the polynomial basis.

The affine step is folded into the maps:

* **Forward:** output map A·M⁻¹, then XOR `63`.
* **Inverse:** input map M·A⁻¹ with XOR `a9`, output map M⁻¹.

Here `a9` = M·A⁻¹·`63`. The `inv` input picks between the two pairs of maps.

The field constants and matrices are one valid choice. They were checked on all 256 inputs in
both directions against the FIPS-197 tables. Any other tower basis changes only the four
matrices in `sbox.sv`.

## Round constants

In `rcon`, "Block 2" decodes the round index 0..9 into 01, 02, 04, 08, 10, 20, 40, 80, 1B, 36
with two-level logic. Indices 10..15 are treated as don't-care. Examples:

* `rcon[4] = r3 | r2·~r1·~r0`
* `rcon[0] = ~r2·~r1·~r0`

For decryption, "Block 1" first maps the index to 9 − r. Its logic is `temp3 = ~r3·~r2·~r1`,
`temp2 = r2 ^ r1`, `temp1 = r1`, `temp0 = ~r0`. A multiplexer controlled by `inv_in` then
selects this remapped index instead of the plain one.

The decryption-only configuration (below) does not need the remapping. It uses a second
decoder that maps the index straight to the reversed sequence 36, 1B, 80, 40, 20, 10, 08, 04,
02, 01. For example, `rcon[1] = ~r3·~r2·~r1 | r3·~r0` and `rcon[0] = ~r2·~r1·r0`.

## Three configurations

The parameter `MODE` of `aes_core` (type `core_mode_e` in `aes_pkg`) selects the hardware to
build:

| `MODE` | core | what changes |
|--------|------|--------------|
| `MODE_ENC_DEC` (default) | encrypts and decrypts | everything described above; `inv_in` chooses the direction |
| `MODE_ENC` | encryption only | no key-side InvMixColumns or its converter; round constants from Block 2 alone; `inv_in` ignored |
| `MODE_DEC` | decryption only | key schedule always backwards; round constants from the decryption decoder; `inv_in` ignored |

In the single-direction builds the direction inputs of the S-box, MixColumns and byte
permutation are constants. Synthesis removes the unused half of each. The RTL does not
contain separate one-direction versions of those units. The protocol and the cycle counts
are the same in all three builds.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | shared types, GF(2^2)/GF(2^4) normal-basis functions, xtime |
| `rtl/aes_core.sv` | top level: the loop above |
| `rtl/aes_ctrl.sv` | counter, round/step indices, busy/comp, protocol assertions |
| `rtl/byte_perm.sv` | 28-byte state shift register with ShiftRows taps |
| `rtl/sbox.sv`, `sbox_s1.sv`, `sbox_s2.sv`, `sbox_s3.sv` | composite-field S-box / InvS-box |
| `rtl/mixcolumn.sv` | column collector with MixColumns / InvMixColumns / bypass |
| `rtl/p2s.sv` | 4-byte parallel-to-serial converter |
| `rtl/key_expansion.sv` | byte-serial key schedule with its own forward S-box and `rcon` |
| `rtl/rcon.sv` | round-constant logic |
| `tb/aes_ref_pkg.sv` | plain FIPS-197 reference model: S-box by exponentiation, whole-state cipher and standard inverse cipher |
| `tb/sbox_tower_pkg.sv` | expected values for S1/S2/S3 worked out in the AES field (norm x^17, powers x^254) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_aes_core_modes.sv` | end-to-end test of the encryption-only and decryption-only builds |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv \
          tb/tb_aes_core.sv --top-module tb_aes_core
./obj_dir/Vtb_aes_core
```

`tb_aes_core` runs the core at its default configuration, with nothing scaled down. It covers:

* the FIPS-197 / Appendix C.1 vector, in both directions: plaintext `00112233…ff`, key
  `000102…0f`, ciphertext `69c4e0d86a7b0430d8cdb78070b4c55a`. Decryption is given the
  round-10 key `13111d7f…c5`;
* six random keys and blocks, each encrypted and then decrypted, checked against the
  reference model;
* a check that `busy_out` lasts exactly 164 clocks and that `comp` rises at the end;
* a count of encryptions, decryptions and overlapped load/unload sequences, each of which must
  occur at least once.

The unit testbenches cover the following:

* `tb_sbox`: all 256 inputs in both modes.
* `tb_sbox_s1`, `tb_sbox_s2`, `tb_sbox_s3`: each inner stage on all of its inputs. The
  expected values come from the AES field, not from the tower formulas. In the tower basis,
  S1 must give the norm x^17, S2 the inverse of a GF(2^4) element, and S3 the image of x^-1.
* `tb_mixcolumn`: random columns in both modes and with bypass.
* `tb_byte_perm`: both permutations, first and later rounds, and the unload order.
* `tb_key_expansion`: every byte of all 10 round keys, forward and backward, including the
  4-clock aligned tap.
* `tb_rcon`: all ten indices in both orders, for the combined, encryption-only and
  decryption-only variants.
* `tb_aes_core_modes`: one `MODE_ENC` core encrypts the FIPS-197 example and four random
  blocks. One `MODE_DEC` core decrypts the results. `inv_in` is driven both ways to show it
  is ignored, and the 164-clock busy time is checked.
* `tb_p2s` and `tb_aes_ctrl`.

## Where this design makes its own choices

* **Latency.** The round loop uses exactly 160 clocks. Four more clocks drain the last
  column through the converter, so `busy_out` is high for 164 clocks. Load and unload take
  16 clocks each, outside the run.
* **Byte permutation.** Only the unit's name and place in the loop are given. The
  28-stage shift register with taps is this design's way to keep rounds at 16 clocks with no
  bubble. A denser 16-byte arrangement is possible but is not attempted here.
* **Decryption.** Decryption takes the last round key as input and uses the equivalent
  inverse cipher. This matches the key-side MixColumns and the key multiplexer of the
  combined architecture, and the decryption key shown in its waveforms.
* **Output path.** `data_out` is registered: the result is stored in the permutation unit
  and shifted out. The architecture drawing shows a combinational XOR of the S-box output and
  the key instead.
* **Load path.** During load, `data_in ⊕ key_in` goes straight into the permutation unit and
  does not pass through the parallel-to-serial converter.
* **Handshake details.** Level-sensitive 16-clock windows, the one-clock `start_in` pulse,
  `busy_out` meaning "running", `comp` as a level, and the asynchronous active-low reset are
  all assumed.
* **No key unload.** The key cannot be read back: there is no key output port.
* **Scope.** Only AES-128 is supported; there are no 192-bit or 256-bit keys.
* **Single-direction builds.** `inv_in` is ignored in `MODE_ENC` and `MODE_DEC`. The S-box,
  MixColumns and byte permutation are pruned by synthesis, not rewritten.
* **Physical results.** The 180 nm implementation is not represented in the RTL: clock rate
  around 50 MHz; about 2.9, 3.7 and 4.2 k gates and 34, 40 and 46 µW/MHz for the
  encryption, decryption and combined cores; 300 × 300 µm core with pad ring.
* **Lint.** Verilator reports `SYNCASYNCNET` for `rst_n` in `aes_ctrl`. It comes from the
  `disable iff (!rst_n)` of the protocol assertions, not from the logic.
