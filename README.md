# Hamming-coded operational blocks

Error-correcting codes usually protect only storage. A word is decoded, the
ALU works on plain bits, and the result is re-encoded. Between the decoder
and the encoder nothing is protected. A single upset in the last gate of the
ALU, or in the encoder, produces a wrong word that *looks* valid.

This design never leaves the code. Operands, opcode and result stay
Hamming-coded, or BCH-coded, all the time. Every operation is built so that
its result is a *correctable* codeword of `Correct(X) op Correct(Y)`. This
holds when input errors plus faulty gates number no more than the code
corrects: one for the Hamming (7,4) code, two for BCH(15,7).

The design follows the construction in the paper "Towards Hamming
Processor". Where that paper is silent or inconsistent, the choices made here
are listed under "Departures and choices" below.

## The one idea: one circuit per output bit

A correctable result is allowed one wrong bit (two for BCH). So the design
only has to make sure that no single fault can reach two output bits. It
does this by building every output bit of every operation in a circuit of its
own, with no shared logic:

* **Linear operations (XOR, NOT).** The Hamming bits are XORs of data bits.
  So the XOR of two codewords is the codeword of the XOR of the data. One
  2-input XOR gate per codeword bit is enough. A wrong input bit or a faulty
  gate changes exactly one output bit, at the same position. Nothing is
  corrected, but nothing spreads.
* **Non-linear operations (AND, OR, shift).** Data bit `r_j` is one gate on
  the *raw* input bits `x_j`, `y_j`. A wrong input bit can only reach the
  output bit with the same index. Each Hamming bit `h_r^i` comes from its own
  *channel*, `ham_channel`. The channel has two private error correctors that
  recover `Correct(X)` and `Correct(Y)`. It applies the operation to the
  corrected words and computes the one parity bit `h_i` of the result. An
  input error therefore never reaches a Hamming bit. A faulty gate inside a
  channel damages only that channel's bit.
* **Addition.** A carry chain would link output bits together. So *every*
  output bit, data and Hamming alike, gets its own channel: correct both
  operands, add, and keep one bit. Because every channel works on corrected
  operands, the adder also removes input errors. With no faulty gate, its
  output is the exact codeword of the sum.
* **Correct-nop.** Adding the all-zero codeword with this adder returns the
  exact codeword of `Correct(X)`. This is how an operand is repaired on
  request.

The cost is replication: the (7,4) AND block holds six correctors, and the
adder fourteen. That replication *is* the protection (see "Keeping the
redundancy" below).

## Codes

### Hamming code of the operands

`K` data bits carry `M` Hamming bits. `M` is the smallest value with
`2^M >= K+M+1`. The default is `K = 4`, `M = 3`, the (7,4) code. The parity
equations come from the classic positional layout `h1 h2 d1 h3 d2 d3 d4 ...`.
Parity bit `h_i` covers every position whose bit `i-1` is set. For (7,4):

```
h1 = d1 ^ d2 ^ d4      h2 = d1 ^ d3 ^ d4      h3 = d2 ^ d3 ^ d4
```

Ports carry data and Hamming bits as separate vectors: `x_d[0]` is `d1` and
`x_h[0]` is `h1`. Packed codewords, as used inside `opcode_selector`, are
`{h, d}`. The coverage masks are computed at elaboration by functions in
`ham_pkg`, which accept any `K` up to 64. The testbenches simulate `K = 4`
and `K = 11`.

### Opcode code

| operation | `{e1,e2}` | `op_h = {h3c,h2c,h1c}` |
|-----------|-----------|------------------------|
| BW_XOR    | 11        | 110                    |
| BW_AND    | 10        | 011                    |
| ADD       | 01        | 101                    |
| BW_OR     | 00        | 000                    |

`op_e[1]` is `e1` and `op_e[0]` is `e2`. The check bits are `h1c = e1^e2`,
`h2c = e1` and `h3c = e2`. This is a shortened Hamming code with distance 3.

### BCH(15,7)

This is the primitive narrow-sense binary BCH code of length 15 with 7 data
bits. Its distance is 5, so it corrects `t = 2` errors. The field is GF(16),
built on `p(x) = x^4+x+1`. The generator is
`g(x) = x^8+x^7+x^6+x^4+1`. A codeword `c[14:0]` holds the coefficient of
`x^i` in `c[i]`. The data is in `c[14:8]` and the check bits are
`x^8 d(x) mod g(x)` in `c[7:0]`. All constants are in `bch_pkg`.

## Opcode selection

`hamming_alu` computes XOR, AND, ADD and OR every time, then picks one
result with `opcode_selector`. Without protection, a single wrong opcode bit
would select the wrong operation for the whole word. The selector prevents
this by giving every result bit its own copy of the selection logic,
`opsel_bit`. Each copy holds:

1. four opcode error correctors, one per operation;
2. four decode AND gates. Inputs are inverted where the opcode has a 0:
   XOR `e1&e2`, AND `e1&~e2`, ADD `~e1&e2`, OR `~e1&~e2`;
3. an AND-OR that passes the candidate bit of the decoded operation.

A single wrong opcode bit is removed by every corrector. A fault inside one
corrector or gate can do two things. It can make no decoder fire, so the bit
reads 0. Or it can make two decoders fire, so the bit is the OR of two
candidates. Either way only that one result bit is affected, and the result
stays correctable. The selector testbench forces exactly this fault and
checks that it stays in one bit.

## Blocks

All blocks are combinational. There is no clock and no reset. A result is
valid one propagation delay after its inputs.

| module | function | behaviour with errors |
|--------|----------|-----------------------|
| `hamming_processor` | top: the ALU, the unary units on X, the BCH units | see the units below |
| `hamming_alu` | XOR/AND/ADD/OR chosen by the coded opcode | result decodes to `Correct(X) op Correct(Y)` |
| `opcode_selector`, `opsel_bit` | protected selection, one copy per result bit | a wrong opcode bit is corrected |
| `ham_corrector` | syndrome decoder that outputs `Correct(D)` and a non-zero-syndrome flag | corrects 1 error |
| `ham_channel` | corrects X and Y, applies AND/OR/ADD/SHL/SHR, drives one data or Hamming bit | helper |
| `hbw_xor` | `K+M` XOR gates | input errors pass through at their position |
| `hbw_not` | XOR with the codeword of all ones | same as XOR |
| `hbw_and`, `hbw_or` | raw data gates and one channel per Hamming bit | Hamming bits exact; data errors stay in place |
| `hshift` | shift by a constant (default: left by 1, zero fill) | Hamming bits exact; a data error moves with its bit |
| `hadd` | one channel per output bit, sum modulo `2^K` | exact result under one input error |
| `hcorrect_nop` | `hadd` with the zero codeword | outputs exactly the codeword of `Correct(X)` |
| `bch_corrector` | syndromes `S1`, `S3`, locator `1 + S1 x + ((S3+S1^3)/S1) x^2`, all 15 positions tested in parallel | corrects 2 errors |
| `bch_encoder` | parallel division by `g(x)` | - |
| `bch_channel` | BCH counterpart of `ham_channel`, using AND/OR/ADD | helper |
| `bch_bw_and`, `bch_bw_or` | raw data gates and one channel per check bit | check bits exact |
| `bch_bw_xor` | 15 XOR gates | errors pass through |
| `bch_add` | one channel per output bit, sum modulo 128 | exact result under two input errors |

### Top-level ports (`hamming_processor`, `K = 4`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x_d`, `x_h`, `y_d`, `y_h` | in | 4, 3 | Hamming-coded operands |
| `op_e`, `op_h` | in | 2, 3 | coded opcode, see the table above |
| `r_d`, `r_h` | out | 4, 3 | ALU result |
| `not_d/h`, `shl_d/h`, `nop_d/h` | out | 4, 3 | NOT of X, X shifted left by 1, correct-nop of X |
| `bx`, `by` | in | 15 | BCH(15,7) operands |
| `br_and`, `br_xor`, `br_or`, `br_add` | out | 15 | BCH results |

NOT, shift and correct-nop are not among the four coded opcodes, so each
has its own port. The BCH units have no opcode selection at all; each has
its own result port.

## Keeping the redundancy through synthesis

The protection depends on logic that a synthesis tool sees as duplicate.
Examples are six identical correctors fed by the same wires, and full adders
of which only one bit is used. A flattening synthesis run merges all of
this. For example, a plain flattening synthesis of `hcorrect_nop`, with its
seven channels and fourteen correctors, gives 17 word-level cells. That is
barely more than one corrector (15) on its own. The merged netlist computes
the same function, but it no longer has the fault tolerance. For a real implementation, keep the hierarchy of `ham_channel`,
`opsel_bit`, `bch_channel` and the correctors, and mark those instances so
they are not optimised across (for example, `keep_hierarchy`/`dont_touch`
or your tool's equivalent). Also check that resource sharing did not join
channels. The RTL itself has no tool-specific attributes.

## Departures and choices

* **Opcode check bits.** The paper gives the 2-bit opcode two check bits
  and also says a single error in it is corrected. A 4-bit code with 2 data
  bits cannot correct single errors. This design uses three check bits.
* **NOT constants.** The paper computes `h_1(1...1)` as the parity of two
  data bits, which gives 0. The parity equations it draws for the AND block
  have `h1` covering three data bits. Those equations are used throughout,
  so `h_i(1...1) = 1, 1, 1` for the (7,4) code.
* **Error corrector.** The paper draws one "error corrector" box taking both
  operands. Here it is a one-operand `ham_corrector`, used twice per channel.
  The syndrome decoder inside is the standard one; the paper does not give
  its insides.
* **Shift.** The paper only says shift is built like AND. The constant
  amount, the direction parameter and the zero fill are choices of this
  design.
* **Carry.** Sums are modulo `2^K` (modulo 128 for BCH); the carry out is
  not produced.
* **BCH code.** The paper gives only the general BCH bounds. The (15,7),
  `t = 2` code, its field, its generator, the decoder algorithm and the
  parallel encoder are choices of this design. The paper draws only the BCH
  AND block. The BCH XOR, OR and ADD units follow its statement that the
  other operations are built in the same way.
* **Processor.** The paper speaks of a "Hamming processor" whose operands
  and microprograms are coded, but it describes only the operational blocks.
  There is no register file, sequencer or memory here.
* **Not built.** Reed-Solomon coded units (named by the paper, with no
  circuit given). Also not built: a separate input-correction stage before
  the ALU. The paper offers that stage as an alternative to the
  correct-nop.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/tb_ham_ref.sv` and `tb/tb_bch_ref.sv` are written independently of the
RTL:

* Hamming words are encoded from the positional layout and decoded by
  brute-force nearest-codeword search.
* BCH words are encoded by a bit-serial LFSR and decoded by brute force over
  all 128 codewords.

Coverage:

* **(7,4) units and the ALU.** Exhaustive over all operand pairs and opcodes.
  Each case runs clean and with every single-bit error in X, Y or the
  opcode. The ALU testbench also runs `K = 11`.
* **BCH corrector.** Every codeword with every error pattern of weight 0, 1
  and 2.
* **BCH encoder.** All 128 data words, and a check that the code's minimum
  distance is 5.
* **BCH operation units.** Random operands with 0 to 2 errors.
* **Gate faults.** These are emulated with `force` on an internal node.
  `tb_gate_faults` runs the whole core with one faulty node at a time, at 14
  sites. The sites are corrector outputs and operation results inside
  channels, decode gates of the selector, and single raw data gates. Each
  site runs over every opcode and operand pair with clean Hamming inputs.
  The BCH sites also get one input error, so the total is two. Every result
  must still decode correctly, and every site must visibly change some
  output. The ALU and selector testbenches force one site each as well.
* **End to end.** `tb_hamming_processor` runs the top at its default
  parameters for 20,000 random steps. It counts each mechanism it exercises
  (each opcode, corrected X, Y and opcode errors, correct-nop repairs, single
  and double BCH errors) and fails if any of them never occurred.

To run a testbench with Verilator (5.x), for example the top:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
  rtl/ham_pkg.sv rtl/bch_pkg.sv tb/tb_ham_ref.sv tb/tb_bch_ref.sv \
  tb/tb_hamming_processor.sv --top-module tb_hamming_processor
./obj_dir/Vtb_hamming_processor
```

This takes a few seconds. For another block, replace the testbench name.
The packages must be listed first. Lint a module alone with
`verilator --lint-only -Wall -y rtl rtl/ham_pkg.sv rtl/bch_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about intentionally unused outputs, such as
the correctors' `err` flags and the encoder bits a channel does not keep,
and about package constants that only document the code (`BCH_T`).

## Changing the design

* **Word width.** Set `K` on `hamming_processor` or on any Hamming block.
  `M` follows. The opcode code is independent of `K`.
* **Shift.** `hshift` takes `SHAMT` and `LEFT`.
* **Another BCH code.** Change the constants in `bch_pkg`. The decoder in
  `bch_corrector` is specific to `t = 2` and GF(16): the `gf_alpha` exponent
  wraps at 15, and the locator is quadratic. It needs rewriting for a larger
  `t` or field.
