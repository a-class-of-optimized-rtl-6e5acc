# (32,19) block-code encoder with shared message groups

This is the encoder for a systematic (32,19) linear block code meant for memory
words that suffer soft errors. The code adds 13 parity bits to a 19-bit message.
Its minimum distance is 4. Every single-bit error, every double-adjacent error and
every triple-adjacent error gives its own non-zero syndrome, so a decoder can
correct bursts of up to three neighbouring flipped bits (SEC-DAEC-TAEC). A plain
encoder computes each parity bit as one flat XOR tree over the message bits, and
those trees get longer as the code grows. This encoder first finds three-bit sets
of message bits that recur across several parity equations. It XORs each set
once and reuses the result, which makes every later parity tree shorter.

The RTL contains:
- the encoder;
- a syndrome generator for words read back;
- a small registered top level that joins the two.

The error-correcting decoder is not part of it. The syndrome is brought out for one.

## Codeword layout

All vectors use 1-based ranges, so an index in the RTL is the subscript used
throughout this document:

| vector | range | contents |
|---|---|---|
| `msg_t` | `[19:1]` | message bits m1..m19, `msg[i]` = m_i |
| `par_t` | `[13:1]` | parity p1..p13, also the syndrome S1..S13 |
| `grp_t` | `[5:1]`  | group values M1..M5 |
| `cw_t`  | `[32:1]` | codeword, column c of the generator matrix in `cw[c]` |

The generator matrix is G = [P : I19], so the codeword is X = m G = [p : m]:

- columns 1..13 (`cw[13:1]`) hold p1..p13;
- columns 14..32 (`cw[32:14]`) hold m1..m19 unchanged.

In SystemVerilog this is `cw = {msg, par}`. Burst errors are "adjacent" in this
column order: the SEC-DAEC-TAEC property holds for neighbouring columns of the
codeword as laid out here. Store the bits in a memory array in this order, or in
its reverse, and the property still holds.

## The parity equations

The parity bit p_j is the XOR of the message bits m_i whose row of P has a 1 in
column j:

| parity | message bits XORed |
|---|---|
| p1  | m1 m6 m13 m15 m17 |
| p2  | m2 m6 m7 m14 m15 m17 |
| p3  | m3 m6 m7 m8 m13 m15 m18 |
| p4  | m1 m4 m6 m7 m8 m9 m14 m16 m18 |
| p5  | m1 m2 m5 m6 m7 m8 m9 m10 m13 m16 m17 m19 |
| p6  | m1 m2 m3 m6 m7 m8 m9 m10 m11 m14 m16 m17 |
| p7  | m1 m2 m3 m4 m7 m8 m9 m10 m11 m12 m13 m15 m18 m19 |
| p8  | m1 m2 m3 m4 m5 m8 m9 m10 m11 m12 m14 m18 m19 |
| p9  | m2 m3 m4 m5 m9 m10 m11 m12 m13 m15 m17 m19 |
| p10 | m3 m4 m5 m10 m11 m12 m14 m16 m17 m19 |
| p11 | m4 m5 m11 m12 m16 m18 m19 |
| p12 | m5 m12 m14 m16 m18 |
| p13 | m3 m5 m7 m9 m10 m11 m12 m16 m17 m19 |

Two entries deserve care when P is copied elsewhere: m15 is not in p8, and m13
is not in p11. With this table, all 93 single-bit, double-adjacent and
triple-adjacent error patterns give distinct non-zero syndromes. Adding m15 to p8
makes three of them collide, and the code loses part of its triple-adjacent
correction. The testbenches check the distinct-syndrome property directly.

## Majority-message groups

This is the core of the design. The grouping rules are:

1. Look for sets of at least three message bits that occur together in several
   parity equations.
2. Give each set a name.
3. Keep the sets disjoint as far as each equation is concerned. No equation uses
   two groups that share a bit.

Five groups are used:

| group | bits | first found in | reused in |
|---|---|---|---|
| M1 | m6 m7 m8    | p3  | p4 p5 p6 |
| M2 | m1 m2 m3    | p6  | p7 p8 |
| M3 | m9 m10 m11  | p6  | p7 p8 p9 p13 |
| M4 | m3 m4 m5    | p9  | p10 |
| M5 | m16 m17 m19 | p10 | p13 |

M2 and M4 share m3, but no parity equation uses both of them.

A group's value is its "prediction": 1 if the group holds an odd number of ones,
0 if even. That is exactly the three-input XOR of the group's bits, and
`mm_group` builds it that way.

`parity_gen` then writes each parity bit from single message bits and group
values. For example:

- p7 = M2 ^ m4 ^ m7 ^ m8 ^ M3 ^ m12 ^ m13 ^ m15 ^ m18 ^ m19
- p13 = m3 ^ m5 ^ m7 ^ M3 ^ m12 ^ M5

Counted as two-input XORs, the flat equations need 109 gates. The grouped form
needs 10 for the groups and 77 for the parity bits, 87 in all. The longest parity
sum (p7) shrinks from 14 inputs to 10.

In the original formulation, the equation where a group is first found keeps its
three bits written out, and only later equations use the group. This RTL reads
the group value in that first equation as well: p3 uses M1, p6 uses M2 and M3, p9
uses M4, and p10 uses M5. The function is the same, and a single XOR serves every
user of the group. p11 contains m16 and m19 but not m17, so it does not use M5.

A synthesis tool with full XOR restructuring may re-share the trees on its own.
What the grouped description fixes is the starting structure that the tool sees.

## Modules

| file | role |
|---|---|
| `rtl/ecc_pkg.sv` | n = 32, k = 19, n-k = 13, five groups; the vector types above |
| `rtl/mm_group.sv` | the five group predictions M1..M5 (combinational) |
| `rtl/parity_gen.sv` | p1..p13 from message bits and groups (combinational) |
| `rtl/enc32_19.sv` | encoder: `mm_group` + `parity_gen`, `cw = {msg, par}` (combinational) |
| `rtl/syndrome_gen.sv` | syndrome of a received word and an error flag (combinational) |
| `rtl/ecc32_19_top.sv` | registered write (encode) and read (check) paths |

### Syndrome generator

For a received word Y = X ^ E, the syndrome is S = Y H^T with H = [I13 : P^T],
which is the parity-check matrix for the [p : m] column order. `syndrome_gen`
works it out in three steps:

1. It recomputes the parity of the received message bits, using the same
   grouped logic as the encoder.
2. It XORs that with the received parity bits.
3. It raises `err` when the result is non-zero.

A codeword gives S = 0. An error pattern gives S = E H^T, independent of the
message. The 93 burst syndromes are all different, so a lookup on `syn` is enough
to correct them. That corrector is not included here.

### Top level and timing

`ecc32_19_top` has two independent paths. Each takes one word per clock and has
no back-pressure.

- **Encode:** `enc_valid_i`, `enc_msg_i` → `enc_valid_o`, `enc_cw_o`.
- **Check:** `chk_valid_i`, `chk_rx_i` → `chk_valid_o`, `chk_syn_o`, `chk_err_o`.

Each path is combinational from its input to one register stage. A valid input
therefore appears at the output one clock later. Data registers load only on a
valid input and hold otherwise.

`rst_n` is synchronous and active low. It clears the valid flags and the data
registers.

An assertion checks that `chk_err_o` always equals "syndrome non-zero".

The register stage, the valid signals and the reset are choices made for this
top level. The code only defines the combinational encoder. For scale, the
grouped encoder alone has been reported at roughly 700 to 1150 µm² and 1.3 to
2.3 ns in a 180 nm library, depending on whether synthesis targeted area or
delay.

## Verification

Each testbench in `tb/` checks its module against `tb/ecc_ref_pkg.sv`. That
package is a reference model written from the rows of P (table above), not from
the grouped XOR trees. Every testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_mm_group` | all 2^19 messages against an odd/even ones count per group |
| `tb_parity_gen` | all 2^19 messages; each group input alone reaches only the parity bits whose equations use it |
| `tb_enc32_19` | all 2^19 codewords against [mP : m]; minimum non-zero weight is 4 |
| `tb_syndrome_gen` | zero syndrome on codewords; all 93 single/double-adjacent/triple-adjacent bursts give E H^T and are distinct; random errors |
| `tb_ecc32_19_top` | 50,000-cycle random traffic with idle gaps, error injection of every class, a mid-stream reset; latency 1, hold behaviour; fails if any of these events, or any group predicting 1, never occurred |

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc32_19_top.sv --top-module tb_ecc32_19_top
./obj_dir/Vtb_ecc32_19_top
```

Each run finishes in well under a second.

## Limits

- Only the encoder and the syndrome are implemented. The triple-adjacent error
  corrector that would use the syndrome is not given a design.
- The baseline encoder without grouping, and the extended Golay (24,12) encoder
  that the design is compared against, are not included.
- Area, delay and power were not re-measured. The yosys cell counts of this RTL
  say nothing about a 180 nm standard-cell result.
