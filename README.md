# AES-128 encryption core with a memory-free S-box

This is a small, iterative AES-128 encryptor. It computes one AES round per
clock cycle and finishes a 128-bit block in 11 cycles. Its main feature is the
S-box, the only non-linear step of AES. The S-box is usually a 256-entry
table, and sixteen copies are needed to substitute a whole state at once.
Here it is built from AND and XOR gates instead: the GF(2^8) inversion at the
heart of the S-box is done in a tower field, GF(((2^2)^2)^2). That breaks the
inversion down, level by level, into 2-bit operations. The design uses no
memory for the S-box. The only ROM left is the 16 x 128-bit table of round
keys. A parameter switches to the classic table S-box, so both versions can be
compared. The two give identical results.

The core encrypts only, with a 128-bit key. The key is fixed: the eleven
round keys are precomputed and stored in the key ROM. As shipped, the ROM
holds the expansion of the FIPS-197 example key `000102030405060708090a0b0c0d0e0f`.
With plain text `00112233445566778899aabbccddeeff` that key gives
`69c4e0d86a7b0430d8cdb78070b4c55a`.

## Round schedule

```
                                       key ROM word (one word feeds both XORs)
                ┌─────────────────────────────────────────┴──────────────────────────────────────────┐
                ▼                                                                                    ▼
plain_text ──► XOR ──► Register 1 ──► MUX 1 ──► SubBytes ──► ShiftRows ─┬─► MixColumns ─► MUX 2 ──► XOR ──► Register 2 ─┬─► cipher_text
                                        ▲ 1                             └───────────────────▲ 1                         │
                                        └───────────────────────────────────────────────────────────────────────────────┘
```

A single round circuit serves every round. Register 1 holds the result of the
initial add-round-key. Register 2 holds the result of each round and feeds it
back through MUX 1. MUX 2 bypasses MixColumns in the last round. The same
key ROM word goes to both XORs; in any cycle only one of the two registers is
enabled.

The control unit (`aes_control`) is a four-state Moore machine with a 3-bit
round counter:

| state | cycles | Register 1 | Register 2 | MUX 1 | MUX 2 | key ROM address | round |
|-------|--------|------------|------------|-------|-------|-----------------|-------|
| S0    | 1 (waits for `start`) | load | hold | 0 (Reg 1) | 0 | `1111` (key 0) | initial add round key |
| S1    | 1      | hold | load | 0 | 0 (MixColumns) | `1110` (key 1) | round 1 |
| S2    | 8      | hold | load | 1 (Reg 2) | 0 | counter `0000`..`0111` (keys 2..9) | rounds 2..9 |
| S3    | 1      | hold | load | 1 | 1 (ShiftRows) | `1000` (key 10) | round 10, no MixColumns |

The order is S0 → S1 → S2 (eight times) → S3 → S0. The counter counts only in S2
and is held at zero elsewhere. The key ROM is laid out so that in S2 the
counter itself is the address.

### Interface and timing (`aes128_enc`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all registers update on the rising edge |
| `rst_n` | in | 1 | synchronous, active low; returns the control unit to S0 |
| `start` | in | 1 | sampled in S0; high starts an encryption |
| `plain_text` | in | 128 | plain text block |
| `cipher_text` | out | 128 | Register 2 |
| `done` | out | 1 | high for one cycle when `cipher_text` is the finished block |
| `busy` | out | 1 | high in S1..S3 |

In S0, Register 1 loads `plain_text ^ key0` on every clock edge. The edge at
which `start` is high is the one that counts, and it also moves the machine to
S1. After that edge `plain_text` may change freely. Ten more edges perform
rounds 1 to 10. `done` is high in the cycle after the tenth, and
`cipher_text` stays valid until the second edge of the next encryption. If
`start` is held high, a new block begins in the `done` cycle. That gives one
block every 11 cycles.

Byte order: byte S(r,c) of the 4x4 state (row r, column c) is byte `4c+r`
counted from the most significant end. So `plain_text[127:120]` is S(0,0)
and each 32-bit slice is one column. This is the usual FIPS-197 order.

The two datapath registers have no reset. Nothing reads them before they are
written.

## The gate-level S-box

`sbox_logic` computes S(a) = Affine(a^-1) in four combinational stages:

1. `gf256_to_composite`: an 8x8 GF(2) matrix, i.e. an XOR network. It maps the
   byte from the AES polynomial basis (x^8+x^4+x^3+x+1) into the tower field.
2. `gf256_inv`: the inversion in GF(((2^2)^2)^2).
3. `composite_to_gf256`: the inverse matrix, back to the AES basis.
4. `affine_transform`: the AES affine map with constant 0x63.

### Inversion in the tower field

Every level of the tower is a degree-2 extension of the level below. An
element is a pair {hi, lo} over the smaller field, written in a *normal
basis*. In a normal basis, inversion at every level follows the same pattern:

```
  d     = N·(hi ⊕ lo)²  ⊕  hi·lo        (norm: "squarer and scaler", one multiplier, XOR)
  d⁻¹   = inverse one level down
  out   = { d⁻¹·lo ,  d⁻¹·hi }          (two multipliers; the halves cross over)
```

| level | module | made of |
|-------|--------|---------|
| GF(2^8) inverse | `gf256_inv` | `gf16_sq_scl`, 3 × `gf16_mul`, `gf16_inv`, two 4-bit XORs |
| GF(2^4) inverse | `gf16_inv` | `gf4_sq_scl`, 3 × `gf4_mul`, a bit swap (GF(2^2) inverse), two 2-bit XORs |
| GF(2^4) multiply | `gf16_mul` | 2 × `gf4_mul` on hi·hi and lo·lo, 1 × `gf4_mul_scl` on (hi⊕lo)·(hi⊕lo), output XORs |
| GF(2^4) square-and-scale | `gf16_sq_scl` | `gf4_scl` and two bit swaps (GF(2^2) squares), one XOR |
| GF(2^2) multiply | `gf4_mul` | 3 AND, 4 XOR |
| GF(2^2) multiply-and-scale | `gf4_mul_scl` | 3 AND, 4 XOR |
| GF(2^2) scale, square-and-scale | `gf4_scl`, `gf4_sq_scl` | 1 XOR each |

In GF(2^2), squaring and inversion are the same operation, and in this basis
both just swap the two bits. Neither has a module of its own; both are plain
wiring inside the parents.

Concrete encodings, which are needed to extend or check the arithmetic:

* GF(2^2): bit 1 is the coefficient of w², bit 0 that of w, so `11` = 1,
  `01` = w, `10` = w². The scaler multiplies by N = w².
* GF(2^4) = {x[3:2], x[1:0]}. The constant of the next level, which
  `gf16_sq_scl` multiplies by, is v = `0001` in this encoding.
* GF(2^8) = {x[7:4], x[3:0]}. The field's one is `8'hff`.

### Basis-change matrices and their bit order

The two conversion matrices are written with vector element 0 = the most
significant bit of the byte. For example, forward row B5 = A7 means
`b[2] = a[0]`. The RTL uses bit-reversed copies of the ports
(`{<<{a}}`) so that its equations read exactly like the matrix rows. The
affine matrix uses the opposite, usual AES order (element 0 = bit 0). The
back conversion is the exact GF(2) inverse of the forward matrix. Read any
other way, the matrices do not match the tower field above, and the S-box
comes out wrong.

The whole chain was checked exhaustively against the AES S-box table for all
256 inputs. Each tower-field operator was also checked against a
logarithm-based model of the field.

### Cost and speed

One S-box takes about 104 two-input XOR and 36 AND gates, with no memory. A
synthesis of the whole default core (generic cells, no technology mapping)
gives 1664 one-bit XORs and 576 ANDs. Almost all of them are in the sixteen
S-boxes. The wider XOR cells are the add-round-key and MixColumns logic.
There are 262 flip-flops: two 128-bit registers, the 2-bit state, the 3-bit
counter and `done`. The original FPGA implementation reported 258 flip-flops
plus one counter; the extra `done` flip-flop is this design's own. The table version instead needs sixteen 256 x 8 ROMs. It
has a much shorter critical path, because the gate S-box is a deep
AND/XOR chain. On a Spartan-3E class FPGA, the gate version was reported at
about 15.5 ns per round against about 8.6 ns for the tables. Those figures
come from that study and were not reproduced here.

## Key ROM

`key_rom` is a combinational 16 x 128-bit ROM:

| address | contents |
|---------|----------|
| `0000`..`0111` | round keys 2..9 |
| `1000` | round key 10 |
| `1001`..`1101` | unused, zero |
| `1110` | round key 1 |
| `1111` | round key 0 (the cipher key itself) |

To use a different key, run the standard AES-128 key expansion (FIPS-197,
section 5.2) on it and put round key r at the address above. The testbench
package `tb/aes_ref_pkg.sv` has that expansion in `ref_round_key`. The core
has no key-schedule hardware.

## Round-function blocks

* `shift_rows`: row r rotates left by r bytes. Wiring only.
* `mix_column`: one column times the circulant matrix (02 03 01 01). 02·s is a
  left shift with conditional XOR of 0x1b, and 03·s = 02·s ⊕ s.
  `mix_columns` holds four of them in parallel.
* `add_round_key`: a 128-bit XOR.
* `sub_bytes_logic`: sixteen `sbox_logic` instances. `sub_bytes_lut`: sixteen
  copies of a constant 256-entry table. The table is filled at elaboration from
  S(a) = Affine(a^-1) (`aes_pkg::sbox_table`, using exponent and logarithm tables of the generator 03), so no data file is needed.

## Files

`rtl/` holds one module or package per file. `aes_pkg.sv` holds the shared
types, the key ROM address constants and the constant functions used to
build the table S-box. The hierarchy:

```
aes128_enc
├── aes_control
├── key_rom
└── aes_datapath
    ├── add_round_key (×2)
    ├── sub_bytes_logic ── sbox_logic (×16)             [SBOX_LOGIC = 1, default]
    │      ├── gf256_to_composite, composite_to_gf256, affine_transform
    │      └── gf256_inv ── gf16_sq_scl, gf16_mul, gf16_inv ── gf4_mul, gf4_mul_scl, gf4_scl, gf4_sq_scl
    ├── sub_bytes_lut                                   [SBOX_LOGIC = 0]
    ├── shift_rows
    └── mix_columns ── mix_column (×4)
```

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/aes_ref_pkg.sv`, which is written independently of the RTL. It
contains polynomial-basis GF(2^8) arithmetic, the published S-box table
(`tb/aes_sbox.hex`), the FIPS-197 key expansion, a plain AES-128 model, and a
normal-basis tower-field model built from GF(2^2) logarithms.

* Tower-field operators: exhaustive against the model. The multiplier is also
  checked for identity, associativity and the absence of zero divisors, the
  inverters for x·x⁻¹ = 1, and the basis changes for being field
  isomorphisms (all 65 536 products).
* S-box, sub bytes (both versions), affine map: exhaustive against the table.
* Shift rows, mix columns, add round key: random states plus the FIPS-197
  intermediate values of round 1.
* Key ROM: every word against the key expansion.
* Control unit: cycle-by-cycle against the state table, including waits in
  S0, back-to-back runs and a reset in mid-encryption.
* Datapath: driven by hand through S0..S3 for both S-box versions, with
  Register 2 checked after every round.
* `tb_aes128_enc` runs the whole core at its default parameters. It checks the
  FIPS-197 example, latency, `busy`/`done`, random blocks with idle gaps,
  back-to-back blocks, and plain text changed during an encryption. It counts
  how often each of these happened. `tb_aes128_enc_lut` repeats this for the
  table S-box.
* `tb_aes128_enc_rounds` follows the FIPS-197 example round by round. It
  checks Register 1 after the initial round, Register 2 after every round
  (table below), and which control state ran each round.

Round-by-round Register 2 contents for the example (useful when debugging a
change):

| after | state | Register 2 |
|-------|-------|------------|
| S0 (Register 1) | S0 | `00102030405060708090a0b0c0d0e0f0` |
| round 1 | S1 | `89d810e8855ace682d1843d8cb128fe4` |
| round 2 | S2 | `4915598f55e5d7a0daca94fa1f0a63f7` |
| round 3 | S2 | `fa636a2825b339c940668a3157244d17` |
| round 4 | S2 | `247240236966b3fa6ed2753288425b6c` |
| round 5 | S2 | `c81677bc9b7ac93b25027992b0261996` |
| round 6 | S2 | `c62fe109f75eedc3cc79395d84f9cf5d` |
| round 7 | S2 | `d1876c0f79c4300ab45594add66ff41f` |
| round 8 | S2 | `fde3bad205e5d0d73547964ef1fe37f1` |
| round 9 | S2 | `bd6e7c3df2b5779e0b61216e8b10b689` |
| round 10 | S3 | `69c4e0d86a7b0430d8cdb78070b4c55a` |

To run a testbench with Verilator from the repository root (the S-box table
is read by the path `tb/aes_sbox.hex`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_enc.sv --top-module tb_aes128_enc
./obj_dir/Vtb_aes128_enc
```

Each testbench takes well under a second.

## Choices and limits

* Only encryption and only 128-bit keys. AES-192/256 would need 12 or 14
  rounds, a larger key ROM and a wider round counter.
* The cipher key is built in. There is no key input and no on-the-fly key
  expansion.
* The `start`/`done`/`busy` handshake is this design's own. So are the
  synchronous reset of the control unit and the absence of a reset on the
  data registers.
* The plain text comes in on a port. It is not read from a plain-text ROM.
* The key ROM is read combinationally. On an FPGA it becomes distributed ROM
  or LUT logic. A synchronous block RAM would need one more cycle of address
  lead in the control unit.
