# Table-driven neural-network stream cipher

This design encrypts a stream of data words in real time by passing it through
one layer of linear "neurons". The secret key is the layer's weight matrix `W`,
plus an XOR mask. Decryption runs the stream through a second layer that holds
the reverse transformation, after the mask is removed.

The hardware has no multipliers. The weights change only when the key changes,
so every partial sum of weights is worked out in advance and stored in small
RAMs. Each scalar product is then built by a pipeline of identical processing
units. Each unit handles one bit position of the operands: it does one table
lookup and one addition. The pipeline accepts a new block of operands every
clock. Its clock period is one register delay, plus one RAM read, plus one
addition.

## The arithmetic

A neuron computes `Z = sum_{j=1..N} W_j * X_j` for N operands `X_j` of `n` bits.
Split every operand into its bits `x_{j,i}` and swap the order of the two sums:

    Z = sum_i 2^i * ( sum_j W_j * x_{j,i} ) = sum_i 2^i * P_M[ a_i ]

Here `a_i` is the N-bit word made of bit `i` of every operand, with operand `j`
giving address bit `j-1`. `P_M[a]` is the **macro-partial product**: the sum of
the weights whose address bit is 1. For one neuron there are `2^N` such sums
(`P_M[0] = 0`, `P_M[1] = W_1`, `P_M[2] = W_2`, `P_M[3] = W_1 + W_2`, ...,
`P_M[2^N-1] = W_1 + ... + W_N`). They are computed off-line and loaded into a
RAM.

The sum over `i` is evaluated least significant bit first, as a halving
recurrence. Processing unit `i` (for `i = 1..n`) looks at bit `i-1`:

    Z_0 = 0,    Z_i = floor(Z_{i-1} / 2) + P_M[a_{i-1}]

Because repeated floors of halvings nest, the last unit delivers exactly
`floor(sum_j W_j * U_j / 2^(n-1))` for unsigned operands `U_j`. Halving at every
step keeps the adders narrow. A table word needs `n + log2(N)` bits. The
running result gets one guard bit more, because the recurrence can reach twice
the table's range.

**Signed operands.** The data words are two's complement. All processing units
are identical and all of them add, so the sign bit is handled outside them. Each
operand register inverts the operand's sign bit, which turns `X` into the
offset-binary value `U = X + 2^(n-1)`. The pipeline's result is then the
wanted value plus the constant `S = sum_j W_j`, which is removed later:

    Z' = floor(sum_j W_j X_j / 2^(n-1)) + S

- In the network, a subtractor at the output takes off `S_k` for each neuron
  `k`. `S_k` is simply `P_M[2^N - 1]`, so it is captured while that table word
  is loaded.
- In the stand-alone element, the activation table is addressed by `Z'`, so its
  contents are written as `f(Z' - S)`.

**Number format.** With integer weights the result is
`floor(sum W_j X_j / 2^(n-1))`. In other words, operands are fractions in
[-1, 1) with `n-1` fraction bits. The result is in the units of the weights,
truncated toward minus infinity.

## Structure

```
 encryption module (STAGES = 1)

   plain_data   RgIn1..RgIn8    element: 8 linear neurons     RgY1..RgY8     XOR
   8-bit words  serial to   --> Rg_X, PU_1 .. PU_8, RgZ   --> parallel to --> mask --> cipher_data
   ---------->  parallel                                      serial, Sub              12-bit words

 decryption module

   cipher_data     XOR     RgIn1..RgIn8    element: 8 linear neurons    RgY1..RgY8
   (loopback or --> mask --> serial to  --> Rg_X, PU_1 .. PU_12, RgZ --> parallel to --> rec_data
   external)                 parallel                                   serial, Sub     16-bit words
```

| Module | What it is |
|---|---|
| `psne_pkg` | default sizes and width functions |
| `psne_table_ram` | a table RAM with a synchronous write port and a combinational read port, used as RAM P_M and RAM f_a |
| `psne_pu` | one processing unit: address from one operand bit, `K` tables and adders (one per neuron), registers for the operands and the partial results |
| `psne_element` | the neural-like element: load registers RgA/RgD, operand registers with sign inversion, a chain of `XW` PUs, and the activation table RAM f_a (or identity), followed by output registers |
| `psne_s2p` | RgIn1..RgInN: gathers N serial words into a block |
| `psne_p2s_sub` | RgY1..RgYN and the subtractor: sends the N results out serially, each minus its `S_k` |
| `psne_network` | the stream network: `psne_s2p`, then `psne_element` with `K = N` linear neurons, then `psne_p2s_sub` |
| `otp_mask` | XOR masking with a key register |
| `nl_crypto_top` | the encryption and decryption modules: `STAGES` cascaded network-plus-mask stages and their reverse, with a loopback/external switch on the decryption input |

In the network, all N neurons share one operand pipeline. Every PU holds N
tables (one per neuron) and N adders, all addressed by the same operand bits.
A layer of N neurons therefore costs `n * N` tables of `2^N` words. At the
default size this is 8 × 8 × 256 × 11 bits for the encryption layer and
12 × 8 × 256 × 15 bits for the decryption layer.

The decryption layer reads the 12-bit ciphertext words as its operands. It
therefore has 12 PUs and 12-bit weights, and it gives 16-bit results.

### Cascade

With `STAGES > 1`, encryption stages are chained. The masked output words of
stage `s` are the operands of stage `s+1`, and every stage has its own weights
and mask. A longer chain makes the key longer, at the price of wider words.
Stage `s` takes words of `8 + 4s` bits and weights of the same width, and gives
words of `12 + 4s` bits.

Decryption undoes the stages in reverse order. After each decryption stage
except the last, the words are cut back to the width that the matching
encryption stage took in. Each side has a single key-load port, and
`enc_stage`/`dec_stage` select which stage's tables and mask it writes.

## Loading a key

The tables are written while the pipeline is idle, through the load registers:

1. Set `c2 = 0`. The operand registers stop and no input is accepted.
2. Set `c1 = 1`. Each clock, RgA and RgD capture `ld_addr` and `ld_data`.
3. Present `ld_addr = {neuron k, table address a}` and
   `ld_data = sum of W_kj over the set bits of a`, with `wr1_n = 0`. One clock
   later, that word is written into neuron `k`'s table in **all** PUs at once.
   In the element, `wr2_n = 0` writes RAM f_a instead, with the table address
   taken as the `ZW`-bit result `Z'`.
4. Return `wr1_n`/`wr2_n` to 1, then `c1 = 0` and `c2 = 1` to run.

On each side, a pulse on `*_mask_load` loads the XOR mask. The two sides have
separate load ports and hold separate copies of their keys. The number of
neurons N, which is also part of the key, is fixed when the design is built.

## Timing

At the defaults (`N = 8`, `n = 8`):

| Path | Clocks |
|---|---|
| element: operands taken → `y`/`z` valid | `XW + 2` |
| network: edge storing a block's last word → output word `k` | `XW + 4 + k` |
| top: last plaintext word of a block → ciphertext word `k` | `XW + 5 + k` |
| throughput, every stage | 1 word per clock, no stalls |

The input converter delivers one block per N words, and the output converter
needs N clocks per block. The two rates are equal, so the stream never backs
up. An assertion in `psne_p2s_sub` checks that a block never arrives while the
previous one is still being sent.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `N` | all | 8 | inputs per neuron, and neurons per layer; each table has `2^N` words |
| `XW` | element, network, top | 8 | operand width `n`, which is also the number of PUs |
| `WW` | element, network, top | 8 | weight width |
| `YW` | element | 8 | activation output width |
| `K`, `USE_FA` | element | 1, 1 | neurons sharing the pipeline; activation table present |
| `STAGES` | top | 1 | encryption stages in cascade |

Table memory grows as `XW * N * 2^N` words per layer, so `N` is the expensive
parameter. Every module has been simulated at its defaults.

## Keys that decrypt exactly

Both layers truncate, so the reverse layer recovers the plaintext exactly only
when the key's arithmetic is exact in the fixed-point format. One such family:

- forward weights `W_kj = -2^(n-1)` for `j = p(k)` and 0 otherwise, with `p` a
  permutation, so that `h_k = -X_p(k)`;
- reverse weights `V_jk = -2^(12-1)` at the inverse positions.

Any XOR mask can be combined with these. The end-to-end testbench uses this
family. For a general matrix and its inverse, the recovered words come out
close to the plaintext, but not exactly equal. How close depends on how the
weights were scaled.

The forward transformation is linear, and the mask is one fixed word. Judge
the cipher's strength with that in mind. This RTL implements the datapath; it
makes no claim about cryptographic security.

## Choices made in this design

The architecture fixes the principles: identical PUs, LSB-first halving,
precomputed tables, RAM f_a, serial/parallel converters and a subtractor. It
leaves the following open, and this design fills them in as stated:

- **Sizes.** `N = 8`, `n = 8`, 8-bit weights, 8-bit activation output.
- **Guard bit.** The accumulator has one bit more than the `n + log2 N` bits of
  a table word.
- **Sign bit.** Offset-binary operands, with the constant removed by the
  subtractor (network) or folded into the activation table (element).
- **Tri-state bus.** There is no tri-stated address bus. Each table has its own
  write address, and `c2 = 0` stops the operand registers instead of floating
  them.
- **Third control input.** It is generated internally as the strobe that loads
  RgY.
- **Neuron select.** Several neurons share one PU pipeline. The load address
  carries the neuron index.
- **No activation table in the network.** Its neurons are linear, so
  `USE_FA = 0` is used there.
- **Mask.** One mask word is held for the whole stream.
- **Decryption layer.** It uses the same network, widened to the ciphertext
  width.
- **Cascade.** The stage count is a parameter, 1 by default. Later stages use
  weights as wide as their operands. Keys are loaded through one port per
  side, with a stage select.
- **Handshake and reset.** A single valid bit travels with the data. Registers
  reset asynchronously, active low; the tables are not reset.

## Not included

- The training that computes the weights. This is the non-iterative
  "successive geometric transformations" method, and it runs off-line. The
  testbenches compute the tables from given weight matrices instead.
- Scaling of the input data before it enters the cipher.

## Simulation

Each module in `rtl/` has a self-checking testbench in `tb/`. Each testbench
prints `TB_RESULT checks=N failures=M` and includes a watchdog. Example with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nl_crypto_top \
    -y rtl -y tb +libext+.sv rtl/psne_pkg.sv tb/tb_nl_crypto_top.sv
./obj_dir/Vtb_nl_crypto_top
```

| Testbench | Covers |
|---|---|
| `tb_nl_crypto_top` | top at default size, no parameters overridden: exact round trip, external ciphertext path, a key change to a random key checked bit for bit, ciphertext latency, back-to-back and gapped input |
| `tb_nl_crypto_cascade` | top with two stages: exact round trip through both, then random keys in all four networks checked bit for bit against a model of the whole chain |
| `tb_psne_network` | one layer at default size: random and extreme keys, gaps, input ignored while `c2 = 0`, per-word latency |
| `tb_psne_element` | single element at default size: P_M and f_a loading, extreme operands and weights, latency |
| `tb_psne_element_multi` | two neurons with separate activation tables on one pipeline |
| `tb_psne_pu`, `tb_psne_table_ram`, `tb_psne_s2p`, `tb_psne_p2s_sub`, `tb_otp_mask` | unit tests |

The testbenches model the arithmetic directly, as
`floor(sum W x / 2^(width-1))` on 64-bit integers. They do not reuse the RTL's
method.
