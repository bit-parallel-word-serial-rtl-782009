# Word-serial GF(2^233) multiplier and squarer

Elliptic-curve cryptography over binary fields comes down to
multiplications in GF(2^m). A fully bit-parallel multiplier finishes in one
clock but needs about m² AND and m² XOR gates, which is about 54,000 of each
for m = 233. A bit-serial multiplier is tiny but needs m clocks. Neither suits
a smart-card coprocessor, which is small and runs at a few MHz.

This RTL takes the middle path. Operand A is fed **one 8-bit word per
clock**. Operand B stays fully parallel (233 bits). The product is ready
after ⌈233/8⌉ = **30 clocks**, using about 8·233 AND gates and
8·233 + 36 XOR gates plus a single 233-bit register. A separate bit-parallel
squarer computes B² in one clock. Squaring and multiplication are enough to
build inversion (A⁻¹ = A^(2^m − 2)) and elliptic-curve point arithmetic.

The field is GF(2^233) in polynomial basis. It is generated by the NIST
trinomial

    F(x) = x^233 + x^74 + 1

An element is a 233-bit vector whose bit i is the coefficient of x^i.
Addition is bitwise XOR.

## The recurrence

A is cut into 30 words of 8 bits, A_0 = bits 7:0 up to A_29 = bits 239:232.
The top word is zero-padded above bit 232. By Horner's rule

    A·B = (…((A_29·B)·x^8 + A_28·B)·x^8 + …)·x^8 + A_0·B     (mod F)

so a single register C is enough, updated once per word, most significant
word (MSW) first:

    C_{-1} = 0
    C_j    = x^8 · C_{j-1}  +  A_{29-j} · B          j = 0 … 29
    A·B    = C_29

Each clock therefore needs one **8×233 partial product** A_j·B and one
**constant multiplication by x^8**. Both are cheap because x^8 and A_j are
"short" polynomials, as the next two sections show.

`bpws_msw_mult` maps the recurrence onto four units:

| unit | module | job |
|---|---|---|
| M1 | `gf_ppg` | partial product D_j = A_{29-j}·B |
| M2 | `gf_adder` | C_j = D_j + (x^8·C_{j-1}) — this is the multiplier output |
| M3 | `gf_const_mult` (S = 8) | x^8·C_j |
| M4 | `gf_register` | holds x^8·C_{j-1}; cleared by `rst` |

Because M3 sits *before* the register, the register holds x^8·C_{j-1}
rather than C_{j-1}. The output C_j is combinational from the word input and
the register. The product is valid during the cycle in which the last word
A_0 is applied, and the next clock edge would fold it into M4 again.

### The alternative, LSW-first form (`bpws_lsw_mult`)

The same product can be summed from the least significant word:

    D_0 = B,    D_j = x^8 · D_{j-1}
    C_j = C_{j-1} + A_j · D_j,     C_{-1} = 0,     A·B = C_29

Here the constant multiplier shifts B in a second 233-bit register (M2,
loaded with B by `init`). The partial product generator (M3) and adder (M4)
accumulate into M5. The constant multiplier is now outside the adder loop,
which removes one XOR delay from the critical path (T_A + 5T_X against
T_A + 6T_X). The cost is a second 233-bit register.

## Multiplying by x^s: the constant multiplier (`gf_const_mult`)

Multiplying Y by x^s shifts it up by s places. The s bits pushed above
x^232 are folded back using x^233 = x^74 + 1. Each folded bit therefore
lands twice: at position i − 233 and at position i − 233 + 74. For s = 8:

    z_i = y_{225+i}            i = 0 … 7
    z_i = y_{i-8}              i = 8 … 73
    z_i = y_{i-8} ^ y_{151+i}  i = 74 … 81
    z_i = y_{i-8}              i = 82 … 232

This is wiring plus **exactly s XOR gates**. The module takes `S` as a
parameter and handles any trinomial with S ≤ K and K + S ≤ M. Under those
conditions one fold is always enough. An elaboration-time check rejects
other values.

## The 8×233 partial product generator (`gf_ppg`)

This is the core of the design and what sets it apart from a plain AND
array. A_j is an 8-bit word, i.e. a field element a_7x^7 + … + a_0 whose
upper 225 coefficients are zero. So

    A_j · B = a_0·B + a_1·(x B) + a_2·(x² B) + … + a_7·(x^7 B)

It is built in three layers, all combinational:

1. **Seven constant multipliers** produce x^1·B … x^7·B
   (`gf_const_mult` with S = 1 … 7). They use 1 + 2 + … + 7 = 28 XOR gates in
   total, and each one's reduction is already complete.
2. **Eight AND networks** (`gf_and_network`) gate each x^i·B with its
   coefficient a_i: 8 × 233 AND gates.
3. **An XOR network** (`gf_xor_network`) adds the eight gated terms. It is a
   balanced tree of seven 233-bit adders (`gf_adder`) in three levels.

No reduction is needed after the sum, because every term is already
reduced. The full polynomial product would need a second reduction pass;
this structure never forms it. Cost: 8·233 AND + 7·233 + 28 XOR gates. Depth:
one AND plus four XOR delays (one in the constant multiplier, three in the
tree).

Adding M2 and M3 of the multiplier gives 8·233 AND and 8·233 + 36 XOR gates
for the whole MSW-first multiplier. Its critical path is T_A + 6T_X.

For other parameters `gf_ppg` builds W − 1 constant multipliers and a
W-input tree. The tree is padded to a power of two with zero inputs, which
synthesise away.

## The squarer (`gf_squarer`)

In characteristic 2, squaring only spreads the bits: (Σ a_i x^i)² = Σ a_i
x^{2i}. Let a'_j be the coefficient of x^j in that spread value, so
a'_{2i} = a_i and odd positions are 0. Reducing a' by x^233 + x^74 + 1
(twice for the highest bits) gives a closed form. For K even and M odd:

| output bits c_i | value |
|---|---|
| even i < K | a'_i ⊕ a'_{2M−K+i} |
| odd i < K | a'_{M+i} |
| even K ≤ i < 2K | a'_i ⊕ a'_{2M−2K+i} |
| odd K < i < M | a'_{M+i} ⊕ a'_{M−K+i} |
| even i ≥ 2K | a'_i |

Every output bit is one input bit or the XOR of two. The squarer therefore
has one XOR delay and fits in one clock. Only this trinomial case
(K even, M odd, 2K < M) is implemented. The module rejects other parameters
at elaboration.

## The chip datapath (`bpws_gf233_chip`)

The top level wraps the arithmetic behind an 8-bit bus:

```
 data[7:0], addr[4:0], w
        │
     codec ── 256-bit register file, byte addr written when w=1
        │  byte 0 ─────────────────────────────► multiplier word input (I2)
        │  bytes 1..30 (bits 240:8) ─► opreg (b_load) ─► multiplier B (I1)
        │                                         └──► squarer
        │                     multiplier ─┐
        │                                 ├─ mux (sel: 1 = product, 0 = square)
        │                     squarer ────┘        │
        │                                   resreg (res_load)
        │                                          │
     codecout ◄── byte addr of {23'b0, result}, registered, updated when w=0
        │
 data_out[7:0]
```

There is no controller. The host does all the sequencing through the pins.

### Host protocol and timing

All signals are sampled on the rising edge of `clk`.

**Multiplication (default, MSW-first)**

| clock | pins | effect at the edge |
|---|---|---|
| 1 … 30 | `w=1`, `addr=j+1`, `data`=B bits 8j+7:8j | B written into the register file |
| 31 | `b_load=1` | operand register := B |
| 32 | `w=1`, `addr=0`, `data`=A_29, `rst=1` | accumulator cleared, A_29 stored |
| 33 … 61 | `w=1`, `addr=0`, `data`=A_28 … A_0 | one word per clock |
| 62 | `sel=1`, `res_load=1` | result register := A·B |
| 63 … | `w=0`, `addr=j` | byte j of the result on `data_out` after this edge |

- The product exists only during clock 62, i.e. the clock right after the
  last word was written. `res_load` must be given exactly then.
- The word writes take 30 clocks (32 … 61). This is the 30-clock
  multiplication.
- `rst` and `b_load` must not be asserted together. An assertion checks
  this.
- With `LSW_FIRST = 1` the words go in the order A_0 … A_29 instead. `rst`
  also loads B into the multiplier's shift register, so `b_load` must come
  before it, as in the table.

**Squaring.** Write B and pulse `b_load` as above. On the next clock pulse
`res_load` with `sel=0`. B² is captured one clock after the operand is
loaded.

**Read-out.** While `w=0`, `data_out` takes byte `addr` of the
zero-extended result on every edge. Bytes 0 … 29 hold the result, least
significant first. Bytes 30 and 31 read zero. While `w=1`, `data_out`
holds its value.

No register in the chip has a reset except the accumulator's `rst`. Write
every operand byte before you use it, and read only after a capture.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 233 | field degree |
| `K` | 74 | middle term of F = x^M + x^K + 1 |
| `W` | 8 | word size (data bus width); ⌈M/W⌉ clocks per product |
| `ADDR_W` | 5 | byte address width; the register file has W·2^ADDR_W bits |
| `LSW_FIRST` | 0 | chip only: use the LSW-first multiplier |

The defaults live in `gf2m_pkg`. The multipliers, the partial product
generator and the constant multiplier work for any trinomial with
W ≤ K and K + W ≤ M. The testbenches also run a 16×409 instance with
F = x^409 + x^87 + 1. The squarer needs K even and M odd. The chip needs
W + M ≤ W·2^ADDR_W.

## Departures from the original chip

- **One clock.** The original clocks the operand register and the result
  register from separate pins. Here they are ordinary registers on `clk`
  with the load enables `b_load` and `res_load`.
- **Result register control.** In the original block diagram the result
  register follows the inverted `w`. With that scheme the accumulator keeps
  running while `w` is low, and the register would overwrite the product one
  clock after capturing it. So an explicit `res_load` is used instead.
- **Operand register.** Only B is registered. The multiplier's word comes
  straight from byte 0 of the register file, so each word costs exactly one
  clock.
- **LSW-first option.** The chip normally uses the MSW-first multiplier.
  `LSW_FIRST` is an addition that lets the alternative architecture run
  inside the same datapath.
- **Not included.** The I/O pad ring (39 pads of a 0.18 µm library) and the
  scan chain inserted at gate level are not part of this RTL. The chip's
  core ports are the top-level ports.
- **Squarer coverage.** Only the K-even / M-odd row of the squarer's closed
  form is built. GF(2^233) needs only that row.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=F` and has a watchdog. The reference is
`tb/gf_ref_pkg.sv`: a textbook bit-at-a-time shift-and-add multiplier with
a reduction after every shift. It shares no structure with the word-serial
hardware. Squares are checked as a·a.

| testbench | what it checks |
|---|---|
| `tb_bpws_gf233_chip` | full chip at default parameters, through the pins only: 1000+ random products and 1000+ random squares (as in the original functional tests), every result byte read back, 30 word clocks per product, no product after only 29 words, squaring in one clock, back-to-back products, top bytes zero, output hold while `w=1` |
| `tb_bpws_gf233_chip_lsw` | the same with `LSW_FIRST = 1` |
| `tb_bpws_msw_mult`, `tb_bpws_lsw_mult` | 200+ products at 8×233 and 100+ at 16×409, with the result checked in exactly the ⌈m/w⌉-th cycle |
| `tb_gf_ppg` | all single-bit and random words, 8×233 and 16×409 |
| `tb_gf_const_mult` | S = 1 … 8 on every single-bit input and random inputs; S = 8 in GF(2^409) |
| `tb_gf_squarer` | every single-bit input, all-ones, random inputs |
| `tb_gf_xor_network`, `tb_gf_and_network`, `tb_gf_adder`, `tb_gf_mux2`, `tb_gf_register`, `tb_codec`, `tb_codecout` | the small blocks against direct models |

Each testbench also fails against a deliberately broken copy of its module
(a wrong fold tap, swapped mux inputs, a missing clear, and so on).

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf2m_pkg.sv tb/gf_ref_pkg.sv tb/tb_bpws_gf233_chip.sv \
    --top-module tb_bpws_gf233_chip -o sim
./obj_dir/sim
```

The full-chip run takes about a second.

What is not verified: gate-level timing and the gate-count and
critical-path figures quoted above. Those are properties of the structure,
which the RTL follows, and have not been measured.

## Files

| file | contents |
|---|---|
| `rtl/gf2m_pkg.sv` | field constants and types |
| `rtl/bpws_gf233_chip.sv` | top level: register file, operand/result registers, multiplier, squarer, mux, read-out |
| `rtl/bpws_msw_mult.sv` | MSW-first word-serial multiplier |
| `rtl/bpws_lsw_mult.sv` | LSW-first word-serial multiplier |
| `rtl/gf_ppg.sv` | W×M partial product generator |
| `rtl/gf_const_mult.sv` | multiplication by x^S |
| `rtl/gf_and_network.sv`, `rtl/gf_xor_network.sv`, `rtl/gf_adder.sv` | AND layer, XOR tree, field adder |
| `rtl/gf_squarer.sv` | bit-parallel squarer |
| `rtl/gf_register.sv`, `rtl/gf_mux2.sv` | register with clear/load/enable, result select |
| `rtl/codec.sv`, `rtl/codecout.sv` | byte-addressed register file and read-out |
| `tb/gf_ref_pkg.sv` | reference arithmetic for the testbenches |
