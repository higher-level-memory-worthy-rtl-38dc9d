# Decimal matrix code (DMC) protected memory

Radiation can flip several neighbouring SRAM cells in one strike (a multiple
cell upset, MCU). Single-error-correcting codes cannot repair that. This
design protects each memory word with a *decimal matrix code*. The word is
cut into symbols laid out as a small matrix. Each pair of symbols in a row is
protected by the **integer sum** of the pair. Each column is protected by a
parity bit. Integer sums catch error patterns that XOR parity misses: an even
number of flips in one column of bits cancels out in parity, but it almost
always changes an arithmetic sum.

The decoder needs the same arithmetic as the encoder. So one encoder is
shared between the write path and the read path. This is called encoder
reuse, and it saves area.

## Word layout

The default word is 32 data bits, organised as `K1 = 2` rows of `K2 = 4`
symbols of `M = 4` bits. Symbol `s` holds `D[4s+3 : 4s]`:

```
            column 0   column 1   column 2   column 3
  row 0 :   sym 0      sym 1      sym 2      sym 3       (D0..D15)
  row 1 :   sym 4      sym 5      sym 6      sym 7       (D16..D31)
```

Redundant bits:

| bits        | value                          |
|-------------|--------------------------------|
| `H4..H0`    | sym0 + sym2 (5-bit integer sum) |
| `H9..H5`    | sym1 + sym3                    |
| `H14..H10`  | sym4 + sym6                    |
| `H19..H15`  | sym5 + sym7                    |
| `V15..V0`   | `V[j] = D[j] ^ D[j+16]`: parity of each bit column |

In general, symbol `c` of a row is paired with symbol `c + K2/2`, and each sum
is `M+1` bits wide. Each `V` bit is the XOR of one bit column over all rows.
The stored codeword is `{V, H, D}`: 16 + 20 + 32 = 68 bits. That is 36
redundant bits per 32 data bits, which is the main cost of the code. Wider
words keep the 2 x 4 symbol matrix and widen the symbols. `M = 8` gives a
64-bit word with a 132-bit codeword. `M = 16` gives a 128-bit word with a
260-bit codeword.

## Decoding: how an error is found and fixed

On a read, the shared encoder recomputes `H'` and `V'` from the data field of
the stored codeword. Then:

1. **Horizontal syndrome**: for each group, `dH = H' - H`. This is an integer
   subtraction, modulo `2^(M+1)`. A non-zero group says that one or both
   symbols of that pair, in that row, were hit.
2. **Vertical syndrome**: `S = V' ^ V`. A set bit says which bit column was
   hit.
3. **Locate**: a data bit is flipped when its column's `S` bit is set **and**
   the `dH` group that covers its symbol is non-zero. Because the two symbols
   of a pair sit in different columns, `S` tells them apart. Because the two
   rows have separate groups, `dH` tells the rows apart.
4. **Correct**: XOR the flagged bits into the data.

A worked case, using symbols 0 and 2:

- Stored: symbol 0 = `1100`, symbol 2 = `0110`, so `H4..H0 = 10010`.
- A strike turns symbol 0 into `1111` and symbol 2 into `0111`.
- Recompute: `H' = 1111 + 0111 = 10110`, so `dH = 10110 - 10010 = 00100`.
  The group is non-zero.
- `S3..S0 = 0011` and `S11..S8 = 0001`.
- All three flipped bits are restored.

An upset that hits only the redundant bits is harmless, as long as it hits
only the `H` bits or only the `V` bits. It sets only one of the two
syndromes, so no data bit is flagged.

### What it corrects, and what it does not

Correction is exact when, in each bit column, the errors are in one row only,
and the hit in every group changes that group's sum. This covers:

- any single-bit error;
- any burst inside two adjacent symbols. Adjacent symbols always fall in
  different groups or in different rows;
- any pattern confined to one row, unless that pattern leaves a pair's sum
  unchanged.

Known blind spots. They follow from the code itself, not from this
implementation:

- **Equal-sum upsets.** Symbol 0 = `0110` and symbol 2 = `1001` sum to
  `01111`. If every bit of both flips, they read `1001` and `0110`, which sum
  to `01111` again. `dH` is zero and the data comes back uncorrected. The
  same happens for any flip pattern that raises one symbol of a pair by as
  much as it lowers the other. The smallest case is the same bit position
  flipping 0->1 in one symbol and 1->0 in the other: a two-bit error that the
  code misses. The chance of this case is small, and it shrinks as `M` grows.
- **The same column hit in both rows.** For example, `D0` and `D16` flip
  together. The two hits cancel in `S`, so nothing is flipped.
- **Upsets in `H` and `V` together** can point at data bits that are fine.

In every one of these cases, `error_detected` is still raised whenever any
syndrome bit is non-zero. Only an upset that leaves both syndromes at zero
goes unseen. The testbenches check the equal-sum case explicitly, and in it
they expect the corrupted data to come back.

## Modules

| file | role |
|------|------|
| `rtl/dmc_pkg.sv` | default sizes (`DMC_M`, `DMC_K1`, `DMC_K2`, `DMC_DEPTH`) and width functions |
| `rtl/dmc_encoder.sv` | pair sums `H` and column parity `V`; combinational |
| `rtl/dmc_syndrome_calc.sv` | `dH = H' - H`, `S = V' ^ V`; combinational |
| `rtl/dmc_error_locator.sv` | flip mask = `S` gated by non-zero `dH` groups; also `error_detected` |
| `rtl/dmc_error_corrector.sv` | `data ^ flip` |
| `rtl/dmc_codec.sv` | one shared encoder; `en = 0` encodes the write data, `en = 1` decodes the read codeword |
| `rtl/codeword_memory.sv` | `DEPTH x WIDTH` array: synchronous write, asynchronous read, plus an upset (XOR mask) port |
| `rtl/dmc_memory.sv` | top: codec plus memory, with `en` driven by the read request |

### Top-level interface and timing (`dmc_memory`)

Parameters: `M = 4`, `K1 = 2`, `K2 = 4`, `DEPTH = 32`.

- **Write.** Drive `we`, `addr` and `wdata`. The codeword is stored on the
  rising edge.
- **Read.** Drive `re` and `addr` in cycle *t*. The word is decoded in cycle
  *t*. `rdata` and `error_detected` are registered and arrive with `rvalid`
  in cycle *t+1*. Back-to-back operations are allowed, one per cycle.
- **One operation per cycle.** `we` and `re` must not be high in the same
  cycle, because the single encoder can serve only one of them. An assertion
  checks this. If both are set anyway, the read wins.
- **Reset.** `rst_n` is a synchronous, active-low reset. It clears `rvalid`,
  `rdata` and `error_detected`. The array itself is not reset, so read only
  words that have been written.
- **Upset port.** `upset_en`, `upset_addr` and `upset_mask` XOR a mask into a
  stored codeword. This models a radiation strike in simulation. Tie
  `upset_en` low in real use. A write and an upset of the same word in one
  cycle store `codeword ^ mask`.

The whole decode is combinational, from the array's read port to the
`rdata` register. The only arithmetic on that path is a pair of (M+1)-bit
adders/subtractors per group.

## Where this follows the code's definition and where it chooses

Taken from the code's definition:

- the symbol matrix and the pairing of symbol `c` with `c + K2/2`;
- integer sums for `H` and column XOR for `V`;
- the subtraction syndrome `H' - H` and the XOR syndrome `V' ^ V`;
- the correction rule `D ^ S`, applied to the symbol whose group is non-zero;
- the shared encoder, selected by a read/write enable;
- the 32-bit, 2 x 4 x 4-bit default and the 32-word memory;
- the 8-bit and 16-bit symbol variants.

Choices made here:

- the bit order of `H` and `V` within their vectors;
- the `{V, H, D}` codeword order;
- the polarity of `en` (1 = decode);
- the `error_detected` flag;
- the register-array memory with asynchronous read;
- the one-cycle registered read;
- synchronous reset;
- the upset port;
- generalising to more than two rows (`K1 > 2`). This option is untested.

The memory here is a register array. A real design would put the codewords in
an SRAM macro, whose registered read would add a cycle in front of the
decoder.

Not included: a double-error-correcting (DEC) BCH-style decoder, and its
DEC-TED extension. They are described only in general terms, and their parity
check matrix is not specified. The comparison codes (Hamming, matrix codes,
punctured difference-set codes) are also not included.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. The testbenches can be
built with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dmc_pkg.sv \
    tb/tb_dmc_memory.sv --top-module tb_dmc_memory -Mdir obj_mem
./obj_mem/Vtb_dmc_memory
```

| testbench | what it covers |
|-----------|----------------|
| `tb_dmc_encoder` | hand-written sums and parity, both worked examples, random words; an 8-bit-symbol instance against a bit-serial model |
| `tb_dmc_syndrome_calc` | the `10110 - 10010` example, wrap-around, random groups |
| `tb_dmc_error_locator` | per-symbol rule, `H`-only and `V`-only syndromes, random syndromes |
| `tb_dmc_error_corrector` | bit-by-bit inversion |
| `tb_codeword_memory` | write, read, upsets, write and upset in the same cycle |
| `tb_dmc_codec` | directed cases, plus random trials at 4-, 8- and 16-bit symbols (32-, 64- and 128-bit words) using `dmc_codec_checker` |
| `tb_dmc_memory` | full-size top: fills 32 words and applies over 1,200 random upsets. Kinds: single bit, burst, random row pattern, `H`-only, `V`-only, upset during write, equal-sum. Checks data, flag and one-cycle `rvalid` latency, and counts each kind |

The expected values in the random tests are worked out in the testbench from
symbol values. A pair whose sum changed must be restored. A pair whose sum
did not change must come back as corrupted.

To change the word width, set `M` on `dmc_memory`. To change the memory
size, set `DEPTH`. `K2` must be even.
