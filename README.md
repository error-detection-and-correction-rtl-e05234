# Fire-code burst-error encoders and decoders

Noise on a serial channel often corrupts several neighbouring bits at once rather than
isolated ones. A Fire code protects against this. It is a cyclic code whose generator is

    g(X) = p(X) (X^c + 1)

where p(X) is irreducible of degree m and does not share a factor with X^c + 1. The code has
R = c + m check bits. It corrects any single burst of up to b bits when `m >= b` and
`c >= 2b - 1`. Its natural length is n = lcm(e, c), where e is the order of p(X) (2^m - 1 for
a primitive p).

This RTL builds bit-serial encoders and decoders that each need only one R-stage shift register
(one stage per check bit), however long the block is. It includes the "shortened" variant,
where a long code is cut to fewer information bits. A modified decoder register then keeps the
full correcting power without any extra stages.

## The codes built

`fire_codec_top` holds five independent links. Each link has an encoder and a decoder; the
only signals they share are clock and reset:

| link | code (n,k) | generator | corrects | register | buffer |
|------|-----------|-----------|----------|----------|--------|
| 0 | (279,265) | (X^5+X^2+1)(X^9+1) = X^14+X^11+X^9+X^5+X^2+1 | bursts ≤ 5 | 14 | 265 |
| 1 | (214,200) | same, shortened by 65 symbols | bursts ≤ 5 | 14 | 200 |
| 2 | (35,27) | (X^3+X+1)(X^5+1) = X^8+X^6+X^5+X^3+X+1 | bursts ≤ 3 | 8 | 27 |
| 3 | (23,15) | same, shortened by 12 symbols | bursts ≤ 3 | 8 | 15 |
| 4 | (7,4) | 1+X+X^3 (cyclic Hamming code) | single errors | 3 | 4 |

The generators and natural lengths are not typed in by hand. The functions in `fire_pkg`
compute them from p(X) and c while the design is elaborated.

## Polynomials as bits

A polynomial is stored as a vector in which bit i is the coefficient of X^i (`fire_pkg::poly_t`,
64 bits). Addition is XOR. A block is sent **highest-order coefficient first**, so the k
information bits go first and the R check bits last. The first information bit sent is the
coefficient of X^(n-1).

## The division register (`poly_div_register`)

The same circuit sits at the heart of every encoder and decoder. Stage i of the register
(i = 1..R) is `state[i-1]`. Stage R is the output. On each clock:

    fb     = gate & state[R-1]                    // Gate 1
    state' = (state << 1) ^ (fb ? FB_TAPS : 0) ^ (din ? IN_TAPS : 0)

`FB_TAPS` holds the coefficients of g(X) below X^R, and each set bit is one XOR in front of a
stage. With `IN_TAPS = FB_TAPS`, the register holds X^R·f(X) mod g(X) after a sequence f has
been shifted in. So a valid code block leaves it at zero. With `gate` low and no input, the
register becomes a plain shift register that pushes its contents out of stage R and fills
stage 1 with zeros. Both the encoder's check-bit phase and the decoder's correction phase rely
on this.

## Encoder (`fire_encoder`)

During the first K enabled symbols (`info_req` high), each information bit goes to the channel
unchanged and at the same time enters the register. After K symbols the register holds the
remainder r(X) = X^R·q(X) mod g(X). For the next R symbols, Gate 1 is closed and the check bits
shift out of stage R, highest order first. The block sent is X^R·q(X) + r(X), which is a
multiple of g(X). At the end of the block the register is empty again, so blocks can follow
back to back. An assertion checks this.

Timing: one symbol per clock in which `sym_en` is high. In the information slots, `code_out`
is combinational from `info_in` (zero latency). `code_sop` and `code_eop` mark the first and
last symbol. A shortened code uses the same encoder with a smaller `K`, because leading zero
information bits do not change the remainder.

## Decoder and burst trapping (`fire_decoder`)

This is the part that takes some thought. The decoder works in two phases per block.

**Receive** (`rx_ready` high). All N = K + R received symbols enter the register through
Gate 1, one per `rx_valid` clock. The first K of them are also written to the K-bit
`buffer_storage`. Because the sent block was a multiple of g(X), the register now holds only
the effect of the error e(X): the syndrome X^R·e(X) mod g(X).

**Correct** (`out_valid` high for K consecutive clocks). On each clock one buffered symbol
leaves, and the register shifts once with no input. Each shift multiplies the syndrome by X
modulo g(X). Since X^n = 1 modulo g(X), after j shifts the register holds the error pattern
"rotated". Take a burst B(X) of length ≤ b whose top bit is at position p. When j = n-1-p,
the rotation puts the burst exactly into the last b stages, in its original form, with its top
bit in stage R. That is the same clock in which the symbol at position p is leaving the buffer.
The TEST circuit (`burst_trap_test`) detects this moment: it sees stages 1..R-b all zero. From
that clock on:

* Gate 1 is closed, so the register stops dividing and just shifts the pattern out.
* Gate 2 is open, so each leaving symbol is XORed with stage R.

The burst is thereby added back onto exactly the bits it corrupted. Fire's conditions
(`c >= 2b-1`, `m >= b`) make sure that no other rotation of a correctable burst can pass the
TEST first.

When the last symbol leaves (`out_last`), `status` reports:

* `detected`: the syndrome was non-zero.
* `corrected`: the TEST fired while information symbols were still leaving.
* `uncorrectable`: the syndrome was non-zero and never trapped. The information goes out
  unchanged.

The TEST only runs while the K information symbols leave. So a burst that lies entirely in the
R check symbols is reported `uncorrectable`, although the information is intact in that case.
A burst that straddles the boundary is trapped and corrected in its information part.

Timing: the first output comes one clock after the last received symbol. A block occupies the
decoder for N + K clocks. No new symbol is accepted while the K outputs are produced, and the
outputs cannot be stalled. The register is cleared with the last output.

## Shortened codes (`fire_shortened_decoder`)

Shortening a code of natural length N_FULL by z symbols means treating its z highest
information symbols as zeros and not sending them. The encoder does not change. The decoder,
however, must now trap bursts relative to a block that is z symbols shorter. The fix is to have
the received bits enter already multiplied by X^z. The input taps become the residue

    IN_TAPS = X^(R+z) mod g(X)

while the feedback keeps the taps of g(X). Neither the register length nor the trapping logic
changes; only a few XORs move. This module computes the residue while the design is elaborated
(`fire_pkg::xpow_mod`) and passes it to `fire_decoder`:

* (214,200), z = 65: X^79 mod g = X^13+X^11+X^10+X^9+X^7+X^4+X^2+X+1
* (23,15), z = 12: X^20 mod g = X^7+X^6+X^5+X^2+X

Taps that appear in both sets are the shared "both" connections. The rest are "feedback only"
or "input only".

## Parameters and reuse

`fire_encoder` (`G`, `K`) and `fire_decoder` (`G`, `K`, `B`, `IN_TAPS`) accept any generator
up to degree 63. For example, `fire_generator(64'h13, 7)` gives the (105,94) Fire code, which
corrects bursts of 4 with p = X^4+X+1. Choosing a low-weight p(X) reduces the hardware: with
p = X^4+X+1 the generator has 5 feedback taps, and with X^4+X^3+X^2+X+1 it has 9. The
decoder's Gate-2 XOR adds one more in each case. `fire_length` computes lcm(e, c) from the real
order of p, so it also gives the right length when e divides c. For p = X^3+X+1 with c = 7 the
length is 7, not e·c = 49.

## What is not here

* The k-stage multiplying encoder (encoding as q(X)·g(X) with a register as long as the data)
  is not built. It is the costlier alternative to the encoder above.
* There is no hardware for generating code tables or for general polynomial arithmetic. The
  constant functions in `fire_pkg` do that work at elaboration time.
* The decoder does not search the check-symbol part for bursts (see above). It handles one
  block at a time with one buffer, so it cannot receive the next block while outputting the
  previous one.

The interfaces (enables, framing markers, ready/valid, status flags), the reset, the clearing
of the decoder register and the shift-register buffer are this design's choices. The register
taps, the gates, the TEST rule and the phase sequence follow the classic mechanization.

## Files and simulation

`rtl/`: `fire_pkg.sv` (types and polynomial functions), `poly_div_register.sv`,
`burst_trap_test.sv`, `buffer_storage.sv`, `fire_encoder.sv`, `fire_decoder.sv`,
`fire_shortened_decoder.sv`, `fire_codec_top.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_fire_table_codes.sv`: four further Fire codes from the code tables.
* `fire_ref_pkg.sv`: a reference encoder and decoder built from polynomial long division and
  an exhaustive burst search, not from shift registers.
* `dec_driver.sv`: shared decoder stimulus.

Each testbench prints `TB_RESULT checks=N failures=M`. The end-to-end test
(`tb_fire_codec_top`) runs all five links at full size. It sends encoder output through an
error-adding channel into the decoder, and checks that every outcome occurs on every link:
clean block, corrected burst, uncorrectable pattern, and burst confined to the check bits.
It finishes in about a second.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fire_pkg.sv tb/fire_ref_pkg.sv tb/tb_fire_codec_top.sv \
    --top-module tb_fire_codec_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other test. The RTL passes `verilator --lint-only -Wall`
without warnings.
