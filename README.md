# (16,8) LDPC link with one-pass bit-flipping decoding

This is a small, complete forward-error-correction link. An 8-bit message is
encoded into a 16-bit codeword of a regular low-density parity-check (LDPC)
code. The codeword goes through a channel that flips bits, and a hard-decision
bit-flipping decoder recovers the message. The decoder works on the Tanner
graph of the code: check nodes reply with parities and variable nodes vote.
It is cheap (XOR gates and 3-input majority gates) and, for the codes used
here, corrects every single-bit error in one pass.

Two regular parity-check matrices are supported. You choose one with a
parameter. Both have 8 checks over 16 bits, with column weight 2 and row
weight 4.

## The two codes

Each matrix is defined by the four codeword positions joined to each check
node:

| check | matrix 1 (`H_REGULAR1`) | matrix 2 (`H_REGULAR2`) |
|------:|-------------------------|-------------------------|
| 0 | 0, 2, 8, 11  | 0, 3, 4, 14  |
| 1 | 1, 5, 8, 10  | 0, 9, 12, 13 |
| 2 | 1, 6, 9, 15  | 2, 4, 8, 11  |
| 3 | 3, 4, 5, 15  | 3, 7, 10, 11 |
| 4 | 0, 7, 10, 13 | 2, 5, 13, 15 |
| 5 | 3, 6, 12, 13 | 6, 8, 9, 10  |
| 6 | 7, 9, 11, 14 | 1, 6, 14, 15 |
| 7 | 2, 4, 12, 14 | 1, 5, 7, 12  |

These lists are in `rtl/ldpc_pkg.sv` (`H1_CONN`, `H2_CONN`). Everything else
(the standard form, the generator, and the decoder's wiring) is derived from
them at elaboration.

**Bit order.** Codeword position *i* is packed bit *i*. The message is
systematic and sits in bits 7:0, with message bit *i* in position *i*. Parity
is in bits 15:8. When a codeword is written as a string with position 0 first,
such as `1001010010000100`, reverse it to get the SystemVerilog literal
(`16'b0010000100101001` = `16'h2129`).

## Standard form and generator (the subtle part)

The encoder needs a systematic generator `G = [I_8 | P]`. The usual way to get
one is to bring H into the form `[A | I_8]` by GF(2) row operations. That is
not possible here. Every column of a weight-2 matrix has exactly two ones, so
the eight rows add up to the zero vector and H has rank 7. The design handles
this as follows (`ldpc_pkg::std_form`, `ldpc_pkg::gen_parity`):

* **Elimination.** Gaussian elimination uses columns 9..15 as pivots. Row
  *r* (0..6) of the standard form `Hs` has its single pivot in column 9+*r*.
  Row 7 becomes all zero. Parity bit 8 is left free.
* **Generator.** For message bit *i*, the generator row is the unit vector
  e_i with parity bit 8 set to 1. Parity bits 9..15 are solved from the seven
  pivot rows. So **parity bit 8 is the XOR of all message bits**.

For matrix 1 this rule gives exactly the generator published with the code:

```
u0: 10100000   u1: 11010000   u2: 10101100   u3: 11110101
u4: 11111101   u5: 11010001   u6: 11110100   u7: 10110000   (parity bits 8..15)
```

For matrix 2 it reproduces the reference codeword `0011001100111110` for the
message `00110011`.

Two consequences show up as constant outputs in synthesis:

* No matrix-1 generator row has a one in parity column 6, so codeword bit 14
  is always 0 for matrix 1.
* Syndrome bit 7 (the all-zero row of `Hs`) is always 0.

Neither is a bug.

## Blocks

| module | role |
|---|---|
| `ldpc_pkg` | sizes (N=16, K=8, M=8, WC=2, WR=4, NOISE_W=8), types, the two matrices, and the derivation functions |
| `ldpc_encoder` | `C = U·G`: one AND-XOR tree per parity bit, output register with reset |
| `awgn_channel` | XORs an 8-bit noise word onto codeword bits 7:0 |
| `ldpc_detector` | syndrome `Hs·Y^T` (combinational); `err` = syndrome nonzero |
| `check_node` | replies to each of its 4 bits with the XOR of the other 3 |
| `variable_node` | majority of its own bit and its 2 replies; reports a flip |
| `bit_flip_decoder` | FSM around a detector, 8 check nodes and 16 variable nodes |
| `ldpc_system` | top: encoder → channel → decoder |

### Channel

The channel does not generate noise. It applies a noise word supplied on a
port, which models the effect of noise after hard decisions: noise bit *i*
flips codeword position *i*. The noise word is 8 bits wide, so through the top
level only the message positions 0..7 can be corrupted. The decoder itself
corrects errors in any of the 16 positions. To exercise parity errors at
system level, widen the `NW` parameter of `awgn_channel` (up to 16) together
with `NOISE_W`.

### Decoder

The decoder takes `rx_data` when `load` is high and it is idle. Each
following clock either tests or flips:

1. **Test.** The detector checks the current word against `Hs`. If the
   syndrome is zero, the word is output: `decode_out` = bits 7:0. This is the
   bypass path for a clean word.
2. **Flip pass.** If the syndrome is nonzero and fewer than `MAX_ITER` passes
   have been made, all 16 bits are updated in parallel:
   * every check node *j* computes, for each joined bit *v*, the XOR of its
     other three bits;
   * every variable node takes the majority of its bit and its two replies.

   The word is then tested again.
3. **Give up.** A word that still fails after `MAX_ITER` passes is output
   anyway, with `fail` set.

With column weight 2, the majority vote flips a bit exactly when *both* of its
checks fail. In both matrices no two columns share the same pair of checks
(the Tanner graph has no 4-cycles). So a single error fails exactly the two
checks of the wrong bit and no other bit has both checks failing: every
single-bit error is corrected in one pass. The default `MAX_ITER = 1` is that
single-pass decoder. Raising it lets the decoder attempt multi-bit errors
with more passes, which may or may not converge.

The check nodes use the original matrix (the Tanner graph). The detector uses
the standard form. Both describe the same code, and an in-module assertion
checks that they agree on every decode.

### Timing

All registers use `clk`. The reset `rst` is synchronous and active high, and
clears the codeword and all decoder outputs to zero.

```
edge 0   data_in sampled          -> enc_data / err_data_out valid
edge 1   load sampled (idle)      -> decoder holds the word, busy=1
edge 2   test: clean word          -> done=1, decode_out valid       (bypass)
         test: error found         -> one flip pass
edge 3   test after the pass       -> done=1, decode_out valid (fail if still invalid)
```

So `done` comes 1 + *p* edges after the edge that samples `load`, where *p* is
the number of flip passes made. The encoder accepts a new message every
clock. The decoder takes a new word at most every 2 + *p* clocks. A `load`
while `busy` is ignored, and a change of `data_in` during a decode does not
affect it.

`done` is a one-cycle pulse. The following outputs hold until the next
decode:

* `decode_out` and `corrected`: the decoded message and the full decoded
  word.
* `err_detected` and `syndrome`: whether the received word failed the first
  test, and its syndrome.
* `flip_count`: the total number of bits flipped. It saturates at 31.
* `fail`: the word still failed after `MAX_ITER` passes.

## Top-level ports (`ldpc_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `load` | in | 1 | start decoding the channel output |
| `data_in` | in | 8 | message |
| `noise` | in | 8 | noise word, bit *i* flips codeword bit *i* |
| `enc_data` | out | 16 | registered codeword |
| `err_data_out` | out | 16 | corrupted codeword (combinational from `enc_data`, `noise`) |
| `decode_out` | out | 8 | decoded message |
| `corrected` | out | 16 | decoded word |
| `done`, `busy` | out | 1 | decode finished (pulse), decode in progress |
| `err_detected`, `syndrome` | out | 1, 8 | the received word was invalid; its syndrome |
| `flip_count` | out | 5 | bits flipped |
| `fail` | out | 1 | word still invalid after `MAX_ITER` passes |

Parameters: `MATRIX` (`H_REGULAR1` default, or `H_REGULAR2`) and `MAX_ITER`
(default 1).

## Where this design makes its own choices

* **Channel.** The channel is a modulo-2 adder driven by an external noise
  word. There is no Gaussian noise source and no soft information.
* **Generator and standard form.** These follow the rank-7 treatment
  described above. The choice of the free parity bit (bit 8 = XOR of the
  message) is the one that matches the published matrix-1 generator.
* **Noise alignment.** The 8-bit noise word is placed on codeword bits 7:0.
* **Load polarity.** `load` is active high.
* **Re-test after a pass.** After a flip pass the word is tested again
  before it is output. That costs one clock but lets the decoder report
  `fail` and make further passes when `MAX_ITER > 1`.
* **Timing and extra outputs.** The FSM, clocking and reset style, and the
  `done`, `busy`, `fail`, `flip_count` and `syndrome` outputs are
  implementation choices.

## Verification

Each testbench in `tb/` checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. `tb/ldpc_ref_pkg.sv` is an independent
reference. It types the matrices as row strings, uses the published matrix-1
generator directly, finds matrix-2 codewords by search, and models decoding
with the "flip a bit when all its checks fail" rule.

| testbench | what it covers |
|---|---|
| `tb_ldpc_pkg` | the derived standard form (pivots, zero row), the generators (matrix 1 against the published one), and the decoder's edge map |
| `tb_ldpc_encoder` | all 256 messages for both matrices, both reference codewords, reset, 1-cycle latency |
| `tb_awgn_channel` | 2000 random words and noise words, plus the two channel examples |
| `tb_ldpc_detector` | all 65536 words for both matrices against the reference checks |
| `tb_check_node`, `tb_variable_node` | exhaustive truth tables (degree 3 as well, for the tie rule) |
| `tb_bit_flip_decoder` | every message × (clean + 16 single errors) for both matrices, with flip count and latency; 2000 random 2- and 3-error words against the reference, including a 3-pass decoder |
| `tb_ldpc_system` | top at default parameters, end to end: reset, the reference example, all messages × (no noise + 8 single-bit noise positions), 500 random multi-bit noise words, input changes and `load` while busy; every outcome (bypass, corrected, failed) must occur |
| `tb_ldpc_system_m2` | the same for matrix 2 |

To run one with Verilator (from the folder holding `rtl/` and `tb/`):

```
verilator --binary --timing -y rtl -y tb rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv \
    tb/tb_ldpc_system.sv --top-module tb_ldpc_system
./obj_dir/Vtb_ldpc_system
```

Every testbench finishes in about a second. Packages must be listed first, as
above; the `-y` paths find the modules.

## Changing it

* **Another code of the same shape.** Replace the connection lists in
  `ldpc_pkg`. The derivation assumes the matrix has rank 7 with columns 9..15
  independent. For a matrix of full rank, or a different column weight,
  `std_form` and `gen_parity` need a different pivot choice.
* **More passes.** Set `MAX_ITER`. The pass counter and the latency scale
  with it.
* **Other sizes.** `N`, `K`, `M`, `WC` and `WR` are package constants. The
  modules are written in terms of them, but the derivation functions assume
  `M = N − K` with one dependent row.
