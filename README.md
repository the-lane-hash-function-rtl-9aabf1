# Lane hash function in SystemVerilog

Lane is an iterated cryptographic hash function with digests of 224, 256, 384 or
512 bits, built from the round components of the AES block cipher. This
repository holds synthesizable SystemVerilog for the whole hash: initial-value
derivation with optional salt, message padding and bit counter, the
compression function with its eight permutation lanes, and the output
transformation with truncation. The default build is Lane-256. One parameter
selects the other three variants.

The datapath is wide and parallel. Every one of the eight permutation lanes
has its own one-round-per-clock round unit. A compression therefore takes 9
clock cycles for Lane-224/256 and 12 for Lane-384/512.

## How Lane hashes a message

A message of `l` bits is processed in three steps:

1. **Initial value.** `IV = f(0, φ ‖ bin32(n) ‖ 0…0 ‖ S, 0)`. Here `n` is the
   digest size and `S` the salt, or zero bits without salt. The flag byte `φ`
   is `02` without salt and `03` with salt.
2. **Iteration.** The message is zero-padded to a whole number of blocks. The
   blocks are 512 bits for Lane-224/256 and 1024 bits for Lane-384/512. No
   length field is added, and a message that already fills whole blocks gets
   no padding, so the empty message has no blocks at all. Each block updates
   the chaining value: `H_i = f(H_{i-1}, M_i, C_i)`. `C_i` is a 64-bit count of
   the message bits hashed so far, including those in `M_i`. For the last,
   partly filled block it therefore equals `l`, not the padded length.
3. **Output transformation.** `H = f(H, φ ‖ bin64(l) ‖ 0…0 ‖ S, 0)` with
   `φ = 00` without salt and `01` with salt. The digest is the leftmost `n`
   bits of `H`.

Only the IV derivation and the output transformation use a zero counter. The
four values of `φ` keep these calls apart from each other.

| variant  | digest | state / chaining value | block | salt | rounds in P / Q lanes |
|----------|--------|------------------------|-------|------|-----------------------|
| Lane-224 | 224    | 256                    | 512   | 256  | 6 / 3                 |
| Lane-256 | 256    | 256                    | 512   | 256  | 6 / 3                 |
| Lane-384 | 384    | 512                    | 1024  | 512  | 8 / 4                 |
| Lane-512 | 512    | 512                    | 1024  | 512  | 8 / 4                 |

## The compression function

`f(H, M, C)` is built as follows (`lane_compress`):

* **Message expansion** (`lane_msg_exp`). `M` is split into quarters
  `m0..m3` and `H` into halves `h0, h1`. Six words, each the width of the
  state, are formed by XOR:

  ```
  W0 = h0^m0^m1^m2^m3 ‖ h1^m0^m2      W3 = h0 ‖ h1
  W1 = h0^h1^m0^m2^m3 ‖ h0^m1^m2      W4 = m0 ‖ m1
  W2 = h0^h1^m0^m1^m2 ‖ h0^m0^m3      W5 = m2 ‖ m3
  ```

* **First layer.** Six permutation lanes `P0..P5` take `W0..W5`.
* **Two XOR combiners** form `P0^P1^P2` and `P3^P4^P5`.
* **Second layer.** Lanes `Q0` and `Q1` take the two combiner outputs.
* **Third XOR combiner.** `H_i = Q0 ^ Q1`.

The grouping `P0..P2 → Q0` and `P3..P5 → Q1` follows the published Lane
specification. The digests of this RTL have been checked against an
independent software model, but not against official Lane test vectors (see
*How far to trust it*).

## Permutation lanes and rounds

A lane is a run of full rounds followed by one last round (`lane_perm`,
`lane_round`):

```
full round : SubBytes, ShiftRows, MixColumns, AddConstants(r), AddCounter(r), SwapColumns
last round : SubBytes, ShiftRows, MixColumns, SwapColumns
```

Every full round across the eight lanes of one compression has its own round
number `r`. The lanes are counted in the order `P0..P5, Q0, Q1`:

| lane      | Lane-224/256 rounds `r` | Lane-384/512 rounds `r` |
|-----------|-------------------------|-------------------------|
| `P_j`     | `5j .. 5j+4`            | `7j .. 7j+6`            |
| `Q_j`     | `30+2j .. 31+2j`        | `42+3j .. 44+3j`        |

`lane_perm` takes these as the parameters `FULL_ROUNDS` and `R_BASE`.

### State layout and byte order

Getting the byte order right is the hardest part of the datapath. Every
module uses the same convention:

* The state is a vector of 32-bit **column words**. Column 0 sits in the most
  significant bits, so the first byte of a byte string is the MSB.
* Within a column word, the most significant byte is row 0 and the least
  significant byte is row 3. This is the AES byte-to-state mapping.
* Columns `4a..4a+3` form AES state `a`. A 256-bit state holds two AES states
  and a 512-bit state holds four.

The round steps work on this layout as follows:

* **SubBytes** (`lane_subbytes`, `lane_sbox`) applies the AES S-box to every
  byte. The S-box is computed in logic: the inverse `a^254` in GF(2^8),
  modulo `x^8+x^4+x^3+x+1`, is formed with an addition chain of squarings and
  four multiplications. The AES affine map with constant `63` follows.
* **ShiftRows** (`lane_shiftrows`) rotates row `r` of each AES state left by
  `r` bytes. It never moves bytes between AES states.
* **MixColumns** (`lane_mixcolumns`) is the AES column mix with the matrix
  whose first row is `02 03 01 01`.
* **AddConstants** (`lane_addconstants`) XORs constant `k_{NCOL·r+j}` into
  column `j`. `NCOL` is 8 or 16.
* **AddCounter** (`lane_addcounter`) XORs one counter word into column 3,
  the fourth column of the first AES state. The counter is `C = c0 ‖ c1`.
  The word is `c0` in even rounds and `c1` in odd rounds.
* **SwapColumns** (`lane_swapcolumns`) transposes the column groups. For 256
  bits, the output is `x0 x1 x4 x5 x2 x3 x6 x7`. For 512 bits, output column
  `i` is input column `4·(i mod 4) + i/4`.

### Round constants

The constants come from a 32-bit LFSR that starts at `k0 = 07fc703d`:
`k_i = (k_{i-1} >> 1) ^ (k_{i-1}[0] ? d0000001 : 0)`. They are generated on
the fly, not stored.

Each lane has its own `lane_const_gen`. The generator's register holds the
first constant of the lane's current round. `NCOL` LFSR steps, unrolled in
logic, give that round's constants. The seed `k_{NCOL·R_BASE}` is computed
when the design is elaborated, by running the LFSR in a constant function.
Lane-256 uses 272 constants and Lane-512 uses 768.

## Hardware organisation and timing

```
                 ┌─ lane_fixed_block (IV block) ─┐
start, salt ───► │                               ├─► lane_compress ─► digest (truncated)
blk_data  ─────► ├─ lane_padder (mask, C_i) ─────┤      ▲      │
                 └─ lane_fixed_block (out block) ┘      └─ H ◄─┘
```

`lane_hash` is a six-state controller around one `lane_compress`:
`IDLE → IV → (MSG_WAIT ↔ MSG)* → OUT_GO → OUT → IDLE`.

Inside `lane_compress`, the six P lanes start together. Each does one round
per clock and starts round 0 in the same clock edge that samples its inputs.
When the P lanes finish, the two Q lanes start on the combiner outputs. Each
step has a fixed cost:

* **One compression:** `(P rounds) + (Q rounds)` cycles. That is 6 + 3 = 9
  for a 256-bit state and 8 + 4 = 12 for a 512-bit state.
* **One control cycle** is added to each compression.
* **A whole hash:** for a message of `k` blocks offered without delay,
  `digest_valid` first goes high `10·(k+2)` cycles after the cycle in which
  `start` was high. For Lane-384/512 the figure is `13·(k+2)`.

At the default size the design has about 3,800 flip-flops. Each of the eight
round units has 32 S-boxes (64 at 512 bits).

One property of Lane could be used for more speed: `P4` and `P5` depend
only on the message block. They could start while the previous block's
second layer is still running. This design does not overlap compressions, so
it does not use that property.

## Interface of `lane_hash`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse while `busy` is low to begin a hash |
| `msg_len` | in | 64 | message length `l` in bits, sampled at `start` |
| `use_salt`, `salt` | in | 1, `STATE_W` | salt flag and salt, sampled at `start` |
| `blk_valid` / `blk_ready` | in / out | 1 | block handshake; a block is taken in a cycle where both are high |
| `blk_data` | in | `2·STATE_W` | message block, first message bit in the MSB; bits past `l` are ignored |
| `busy` | out | 1 | a hash is in progress |
| `digest_valid`, `digest` | out | 1, `DIGEST_BITS` | digest, held until the next `start` |

The design asks for exactly `ceil(l / block size)` blocks. With `l = 0` it
asks for none.

`DIGEST_BITS` (default 256) is the only parameter. `STATE_W` and `BLOCK_W`
are derived from it.

The length-first interface, the handshake and the reset style belong to this
design, not to Lane. A stream interface that learns `l` only at the end would
need a different counter and padding scheme.

## Files

* `rtl/lane_pkg.sv` holds GF(2^8) arithmetic, the S-box function, the LFSR
  step and the round-count helpers.
* `rtl/lane_*.sv` holds one module per file, as named above.
* `tb/lane_<module>_tb.sv` holds a self-checking testbench for each module.
  Each one prints `TB_RESULT checks=N failures=M`.
* `tb/lane_hash_tb.sv` is the end-to-end test at the default parameters.
* `tb/lane_hash_variants_tb.sv` and `tb/lane_hash_variant_check.sv` run
  Lane-224, Lane-384 and Lane-512.
* `tb/lane_tb_ref.sv` holds the testbenches' own reference arithmetic.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lane_pkg.sv tb/lane_tb_ref.sv \
          tb/lane_hash_tb.sv --top-module lane_hash_tb
./obj_dir/Vlane_hash_tb
```

Swap in any other testbench the same way. Each one finishes in well under a
second.

## How far to trust it

The testbenches check the design in several ways:

* **AES components** are checked against published AES values. These cover
  S-box entries, MixColumns column pairs and the ShiftRows permutation. They
  are also checked against reference arithmetic written differently from the
  RTL: an exhaustive-search S-box and long-hand GF multiplication.
* **The round, the lanes, the compression function and the full hash** are
  compared with digests from a separate software model of Lane.
* **Cycle counts** are checked for every lane, every compression and every
  hash.
* **Hash cases:** all four variants hash messages of 0, 5, 512, 1000, 1024,
  1537 and 3000 bits, with and without salt. Each run is repeated with the
  input held back so that the design has to wait.
* **Fault tests:** for every module, a deliberately broken copy makes its
  testbench fail.

The software model was written from the same definition as the RTL. A
misreading shared by both would not be caught. No official Lane test vectors
were available, so the digests have not been compared with the reference
implementation. This matters most for two details:

* the grouping of lanes into the XOR combiners;
* the byte order of constants and counter words within a column.

Check these against official known-answer tests before relying on the
digests.
