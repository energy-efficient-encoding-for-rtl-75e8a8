# Low-switching, error-correcting NoC link

Much of a network-on-chip's dynamic power goes into toggling long link
wires. Two things cost the most: a wire changing on its own (self switching)
and two neighbouring wires changing against each other (coupling switching).
This design cuts that activity without touching routers. It re-codes each flit
before it goes onto the link. Whenever the flit would cause mostly "bad"
transitions on adjacent wire pairs, the odd-numbered bits are inverted and one
extra wire, `inv`, tells the receiver. A (63,37) Euclidean-geometry LDPC code
protects the link against wire errors. Its one-step majority-logic decoder
corrects up to four flipped wires per word.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable. It includes a
small test-data generator, so the whole link can run on its own.

## Transition classes and odd inversion

Take two adjacent wires. Compare their value on the link now (previous flit)
with the value the next flit would put on them:

| class    | what happens to the pair                 | examples        |
|----------|------------------------------------------|-----------------|
| Type I   | exactly one of the two wires toggles     | 00→01, 11→10, 01→11 |
| Type II  | both toggle, in opposite directions      | 01→10, 10→01    |
| Type III | both toggle, in the same direction       | 00→11, 11→00    |
| Type IV  | neither toggles                          | 00→00, 10→10    |

Types I and II cost the most energy. Suppose one wire of a pair is inverted
before sending:

* a Type I pair becomes Type III or IV;
* a Type II pair becomes Type I;
* a Type III or IV pair becomes Type I.

So inverting every odd-numbered bit (1, 3, 5, ...) flips the Type I status of
every adjacent pair. It is worth doing when more than half of the pairs would
be Type I.

### The encoder (`odd_invert_encoder`)

For `DATA_W` data bits the link has `w = DATA_W + 1` wires: the data plus `inv`
on top. The encoder works on these w wires:

* `X` is the new flit with `X[w-1] = 0`.
* `Y` is the value now on the link, `{inv, data}` as registered last cycle.
* One `ty_detect` per adjacent pair `(i, i+1)`, `i = 0 .. w-2`, flags a Type I
  transition: `(x_i ^ y_i) ^ (x_i+1 ^ y_i+1)`. The pairs overlap, so there
  are `DATA_W` detectors.
* `majority_voter` sets `inv` when the number of flags is more than half of
  `DATA_W`. For 8 bits that means 5 or more.
* XOR gates invert the odd data bits when `inv` is set. Even bits pass
  unchanged. `inv` itself is the top wire.

The top pair is the one subtle case: data bit `w-2` next to the `inv` wire.
`X[w-1] = 0` asks "what if we do not invert?". When the encoder does invert,
both wires of this pair change relative to that assumption. So this pair keeps
its Type I status, while all other pairs swap theirs. The count after an
inversion is therefore always lower than before it.

The output register loads on a rising edge while `enb` is high and holds while
`enb` is low. Reset clears it, so the first "previous flit" is all zeros with
`inv = 0`.

### The decoder (`odd_invert_decoder`)

It XORs the odd bits with the received `inv` and registers the result.

## The EG-LDPC code

### Construction

The code comes from the two-dimensional Euclidean geometry EG(2, 2^3). It has
64 points. Lines have 8 points each. Nine lines pass through every point, and
eight of those avoid the origin. The geometry maps onto GF(2^6): code bit `i`
is the point `alpha^i`, with `alpha` a root of `x^6 + x + 1`. The origin is not
a code bit, so `n = 63`.

Every line that misses the origin gives one parity check. The check matrix is
a 63×63 circulant of rank 26, so `k = 37`. The code is cyclic, with generator
polynomial

    g(x) = x^26 + x^24 + x^14 + x^13 + x^12 + x^11 + x^10 + x^8 + x^6 + x^2 + 1

g(x) is the product of `(x - alpha^h)` over the 26 exponents `0 < h < 63` for
which the largest 8-ary digit sum of `h`, `2h mod 63` and `4h mod 63` is at
most 7.

`noc_enc_pkg` computes the lines from GF(2^6) arithmetic in constant
functions. No table is stored. The package also holds g(x).

### Encoder (`eg_ldpc_encoder`)

The encoder is systematic:

    c(x) = x^26 m(x) + (x^26 m(x) mod g(x))

Port `in_a[0:36]` carries the message, and `in_a[i]` is the coefficient of
x^i. In `out_a[0:62]`, bits 0..25 are parity and bits 26..62 are the message
in order. The output is registered: 63 flip-flops, one cycle of latency.

### Majority-logic decoder (`eg_ldpc_mldd`)

Take the eight lines through point `j` that miss the origin. They meet only at
`j`. So:

* an error in bit `j` makes all eight of their checks fail;
* an error anywhere else makes at most one of them fail.

Bit `j` is flipped when more than four of its eight checks fail. This corrects
any pattern of up to four errors, because the minimum distance is 9.

The check sums of bit `j` are those of bit 0 rotated by `j`.
`noc_enc_pkg::eg_check_masks()` builds all 63×8 masks at elaboration. All bits
are decoded in parallel. The corrected 37-bit message is registered one cycle
after the input. `corrected` goes high with it when any bit was flipped.

With five or more errors the decoder can give a wrong message. Nothing flags
that case.

## The whole link (`noc_link_top`)

    up_counter -> flit_source -> odd_invert_encoder -> eg_ldpc_encoder
        -> channel (code_word ^ chan_err) -> eg_ldpc_mldd -> odd_invert_decoder -> data_out

| stage | register | content |
|-------|----------|---------|
| `up_counter` | `addr` | address of the test memory; counts while `enb` is high |
| `flit_source` | `data` | random flit at `addr`, one cycle later |
| `odd_invert_encoder` | `{link_inv, link_data}` | coded flit; loads while `enb` is high |
| `eg_ldpc_encoder` | `code_word` | 63-bit word; message = `{0..., inv, flit}` |
| `eg_ldpc_mldd` | message, `corrected` | after correcting up to 4 errors from `chan_err` |
| `odd_invert_decoder` | `data_out` | restored flit |

* **Latency:** a flit loaded into the encoder at clock edge t appears on
  `data_out` after edge t+3.
* **Throughput:** one flit per clock while `enb` is high. While `enb` is low,
  the counter and the encoder hold and the link repeats its last word.
* **Errors:** `chan_err` models the channel. Each 1 flips that code wire
  before the decoder samples it.

The default flit is 8 bits wide. The coded flit and `inv` take the low 9 bits
of the 37-bit message, and the other 28 message bits are zero. As a result,
the `code_word` outputs for message bits 35..62 are constant. With
`DATA_W = 36` the flit and `inv` fill the message exactly. Any `DATA_W` up to
36 works.

The test data is `noc_enc_pkg::test_word(a)` for address `a`: a 64-bit
integer mixing function (constants in the package), truncated to `DATA_W`
bits. It is deterministic, so runs repeat.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `noc_link_top` | `DATA_W` | 8 | flit width (≤ 36) |
| `noc_link_top` | `ADDR_W` | 8 | test-memory address width |
| `up_counter` | `WIDTH` | 8 | counter width |
| `flit_source` | `ADDR_W`, `DATA_W` | 8, 8 | memory depth 2^ADDR_W, word width |
| `odd_invert_encoder` / `_decoder` | `DATA_W` | 8 | data wires (link has DATA_W+1) |
| `majority_voter` | `N_IN`, `BUS_W` | 8, 8 | votes; inv when 2·count > BUS_W |
| `noc_enc_pkg` | `LDPC_N`, `LDPC_K`, `LDPC_J` | 63, 37, 8 | code length, message length, check sums per bit |

The LDPC code is fixed by its construction. Changing `LDPC_N` or `LDPC_K`
alone does not give another valid code.

## What comes from the original scheme and what is this design's choice

**Taken from the published encoding scheme and its block diagrams:**

* the transition classes;
* the Ty / majority-voter / odd-XOR encoder, including `X[w-1] = 0` and
  `Y[w-1] = inv`;
* the rule "invert when more than half the bus width";
* the 8-bit counter → data memory → encoder → decoder chain with its `clk`,
  `rst` and `enb` pins;
* the EG-LDPC encoder symbol with 37 inputs, 63 outputs, clock and reset;
* majority-logic decoding of the EG-LDPC code.

**Choices of this design:**

* **Previous-flit reference:** `Y` is the previous value on the link, not the
  previous input. This makes `Y[w-1] = inv` meaningful.
* **Encoder details:** the Ty gate equation, and a population count for the
  voter.
* **Clocking:** every block is registered, with a synchronous, active-high
  reset to zero.
* **Code construction:** the field polynomial, the bit order of the code word,
  and cyclic systematic encoding.
* **Decoder form:** one-step majority decoding, fully parallel rather than
  serial. A serial cyclic decoder would be smaller but needs 63 cycles per
  word. The `corrected` flag is also this design's addition.
* **Link assembly:** the order transition coder → LDPC, and the zero-padded
  message packing. The original scheme does not say how the two codes are
  joined.
* **Test data:** the contents of the test memory, and the `chan_err`
  error-injection port.

The LDPC parity wires are not transition-coded. Only the flit and `inv` bits
of the code word follow the odd-inversion pattern.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
block against reference models in `tb/tb_ref_pkg.sv`, which are written
separately from the RTL:

* GF(2^6) by shift-and-add;
* check lines built point by point;
* encoding by polynomial long division;
* a model of the transition encoder.

| testbench | what it checks |
|-----------|----------------|
| `tb_ty_detect` | all 16 pair transitions against the class table |
| `tb_majority_voter` | every input for the 8- and 5-input voters |
| `tb_odd_invert_encoder` | 2000 random and patterned flits with enable gaps; the inversion never raises the Type I count |
| `tb_odd_invert_decoder` | random flits and `inv` |
| `tb_eg_ldpc_encoder` | unit and random messages; equals the reference and satisfies all 504 line checks |
| `tb_eg_ldpc_mldd` | 1500 words with 0–4 random errors and 4-bit bursts; message and `corrected` flag |
| `tb_up_counter`, `tb_flit_source` | counting, enable, wrap; every memory word |
| `tb_noc_link_top` | full link at default sizes, 4000 cycles (see below) |
| `tb_noc_link_top_w36` | the same with 36-bit flits |

`tb_noc_link_top` compares every pipeline register with a cycle model after
each edge. It also checks end to end that each accepted flit leaves three
clocks later. The run drives random `enb` stalls and 0–4 random wire errors
per word. It requires that each of these happens at least once: inversion, no
inversion, stall, and words with 0, 1, 2, 3 and 4 errors.

Over 2890 random 8-bit flits, the test counted Type I pair transitions:

| flit width | unencoded | encoded | reduction |
|------------|-----------|---------|-----------|
| 8 bits | 8854 | 7917 | about 11% |
| 36 bits | 44095 | 40149 | about 9% |

These counts are switching activity, not measured power.

Run a testbench with plain Verilator, from the folder that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-ASCRANGE --top-module tb_noc_link_top \
        -y rtl -y tb +libext+.sv rtl/noc_enc_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_link_top.sv
    ./obj_dir/Vtb_noc_link_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
`ASCRANGE` warning comes from the LDPC ports, whose `[0:36]` / `[0:62]` ranges
follow the encoder symbol's bit numbering.

## Limits

* The LDPC decoder does not detect uncorrectable words.
* The design has no flow control beyond `enb`.
* Power figures cannot be checked in simulation. The testbenches count
  transitions instead.
