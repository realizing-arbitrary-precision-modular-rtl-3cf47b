# Scalable bit-serial Montgomery multiplier

A bit-serial Montgomery multiplier is cheap and fast, but it is built for one
operand length: an N-bit datapath computes N-bit modular products and nothing
longer. This design removes that limit at almost no cost. The same N-bit
carry-save datapath has a second mode in which it computes an ordinary,
non-modular N x N -> 2N-bit product, at two partial products per clock. With
that primitive a host can run any word-level Montgomery algorithm (here the
Coarsely Integrated Operand Scanning method, CIOS) using N-bit words, so one
1024-bit multiplier also serves 2048-bit or longer moduli.

The architecture follows the article "Realizing Arbitrary-Precision Modular
Multiplication with a Fixed-Precision Multiplier Datapath" (Großschädl, Savaş,
Yumbul). The SystemVerilog, the control, the interface and the tests are this
implementation's own. Where it departs from the article, the text says so.

Default size: N = 1024 operand bits, D = 32-bit conversion adder, so the
datapath is W = N + D = 1056 bits wide.

| Operation | Result | Cycles (general) | Cycles at N=1024, D=32 |
|---|---|---|---|
| Montgomery multiplication | A·B·2^-(N+D) mod M, in [0, 2M) | N + D + (N+D)/D | 1089 |
| Ordinary multiplication | A·B, 2N bits | N/2 + 1 + (N+D)/D | 546 |
| 2N-bit Montgomery via CIOS (host-driven) | A·B·2^-2N mod M | 10 ordinary multiplications | 5460 multiplier cycles |

## The datapath

```
          RS, RC ──► >> (1 bit Montgomery / 2 bits ordinary) ──┐
                                                               ▼
   A·b_i ───────────────────────────────────────────► upper CSA (W bits)
                                                          │ sum, carry
                                  q = LSB(sum) ^ LSB(carry)
   mode ? 2A·b_(i+1) : q·M ───────────────────────────► lower CSA (W bits)
                                                          │ sum, carry
                                                          ▼
                                              RS, RC registers (W bits each)
                    RS[D-1:0] + RC[D-1:0] ──► D-bit adder ──► top of RS (conversion)
                    RS[1:0]  + RC[1:0]   ──► 2-bit adder ──► top of M register (ordinary mode)
```

The running sum never exists in binary while the multiplication runs. It is
kept as two vectors, sum (RS) and carry (RC), whose total is the value. Each
cycle two W-bit carry-save adders (3:2 compressors, no carry chain) add two
more terms, so the clock period does not depend on N.

The registers store the lower adder's output as it is. The alignment shift for
the next cycle sits on the feedback path (`fb_shift`), between the registers
and the upper adder.

### Montgomery mode

This is radix-2 Montgomery multiplication. B is scanned one bit per cycle,
least significant first. In cycle i:

1. The upper adder adds A·b_i to the halved running sum.
2. The reduction bit q is the XOR of the two LSBs coming out of the upper
   adder. It is the parity of the running sum.
3. The lower adder adds q·M. This makes the sum even, so the next 1-bit
   feedback shift loses nothing.

`mm_datapath` asserts that both LSBs of the lower adder's output are zero in
this mode.

There are N + D iterations, not N, so the result is A·B·2^-(N+D) mod M. The
extra D iterations, together with the D spare bits of the datapath, remove the
final conditional subtraction of the textbook algorithm:

- Inputs A, B < 2M give a result Z < (4M²)/2^(N+D) + M, which is below 2M for
  any D ≥ 2.
- Inside the loop the running sum stays below 6M < 2^(N+3).

So the result can go straight back in as an operand. For this reason the A and
B registers are N+1 bits wide. The constant 2^-(N+D) is the Montgomery radix
the host must work with. For D ≥ 4 the N+D-bit registers never overflow, and
`mm_ctrl` checks this at elaboration.

### Ordinary mode

Both adders now add partial products, A·b_i in the upper one and 2A·b_(i+1)
in the lower one. The factor 2 is a wired one-bit left shift, and B moves two
bits per cycle. The feedback shifts by 2.

The two bits dropped by that shift are final product bits. Each cycle the
2-bit adder sums the two LSBs of RS and RC, plus its own stored carry. The
resulting pair is pushed into the top of the M register, which moves right by
two. A modulus is not needed in this mode, so no extra register is spent.
After N/2 pairs, the M register holds the low half of the product in order.
The upper half stays in RS/RC in carry-save form until the conversion.

Timing detail: the first cycle has nothing to extract, because RS/RC were just
cleared. The last pair is still in RS/RC after the N/2-th partial-product
cycle. For that reason the sequence has one more cycle (N/2 + 1 in total). In
that cycle B is already exhausted, no partial product is added, and only the
last pair is moved out. This is one cycle more than the article counts.

The 2-bit adder's carry is defined to flow into the first word of the
conversion. In this exact arrangement, however, RC[1:0] is always zero in
ordinary mode:

- a carry-save adder's carry LSB is always 0;
- the lower adder's carry bit 1 can only come from bit 0 of 2A·b_(i+1), which
  is 0.

So this carry is never actually set. The adder and the path are kept as drawn,
and the end-to-end test confirms that the carry stays zero.

### Conversion to binary

After the partial-product phase a single D-bit carry-propagate adder
(`word_adder`) runs for (N+D)/D cycles. In each cycle:

- RS and RC shift right by D bits;
- the adder adds their lowest words together with the carry it stored in the
  previous cycle;
- the D-bit sum enters RS from the top, while RC shifts in zeros.

Afterwards RS holds the binary value.

**Where the result ends up.** No halving follows the last Montgomery
iteration, so RS holds 2·Z, and `mont_o` is `rs_o[N+1:1]`. In ordinary mode
`rs_o[N-1:0]` is the upper product half, and `prod_o = {rs_o[N-1:0], M}`.

## Control and timing (`mm_ctrl`)

`mm_ctrl` is a three-state machine (IDLE, RUN, CONV) with one counter:

1. On the clock edge that samples `start_i` it latches the mode and clears RS,
   RC and the 2-bit adder's carry.
2. It spends N+D (Montgomery) or N/2+1 (ordinary) cycles in RUN.
3. It spends (N+D)/D cycles in CONV.
4. It pulses `done_o`.

Counted from the start edge, `done_o` is high after exactly 1089 or 546
cycles at the default size. The outputs hold until the next start. The
per-cycle strobes travel to the datapath as the packed struct
`mm_pkg::ctrl_t`.

## Interface (`scalable_mm`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset |
| `load_a_i`, `load_b_i`, `load_m_i` | in | 1 | load A, B, M from `a_i`, `b_i`, `m_i` (only while idle) |
| `a_i`, `b_i` | in | N+1 | operands (Montgomery: < 2M; ordinary: < 2^N) |
| `m_i` | in | N | odd modulus |
| `mode_i` | in | `mode_e` | `MODE_MONT` or `MODE_MUL`, sampled with `start_i` |
| `start_i` | in | 1 | start; must not be raised while busy |
| `busy_o`, `done_o` | out | 1 | busy; one-cycle completion pulse |
| `mont_o` | out | N+1 | Montgomery result |
| `prod_o` | out | 2N | ordinary product |
| `rs_o` | out | N+D | raw converted RS register |

An ordinary multiplication overwrites the M register with the low product
half. Reload M before the next Montgomery multiplication. Assertions in
`scalable_mm` flag a start or load issued while busy.

## Double-size Montgomery multiplication (host side)

For a 2N-bit modulus the operands are split into k = 2 words of N bits. CIOS
needs 2k² + k = 10 word products per Montgomery multiplication:

- four a_j·b_i;
- two m = t_0·n0' mod 2^N, where only the low half is used;
- four m·M_j.

Each of these is one ordinary multiplication on this unit. The word additions,
the constant n0' = -M^-1 mod 2^N and the final conditional subtraction are done
by the host. They are not part of this RTL.

`tb/tb_cios_double.sv` contains a behavioural host that does exactly this on
the default 1024-bit unit, for 2048-bit moduli. The unit is busy for
10 × 546 = 5460 cycles. The article's estimate is "about 5N" = 5120 cycles,
because it ignores the conversion cycles.

## Where this implementation departs from the article

- Ordinary multiplication takes N/2 + 1 + (N+D)/D cycles, one more than the
  article's N/2 + (N+D)/D (see "Ordinary mode").
- The article describes the registers only as "n-bit" operand registers. Here
  A and B are N+1 bits, so that results in [0, 2M) can be chained as the
  article intends.
- The article does not specify any of the following; they are this design's
  own choices: the host interface, the reset, the state machine, the shift
  register that scans B, the carry flip-flops of the D-bit and 2-bit adders,
  and the convention that RS holds 2·Z.
- The 2-bit adder's carry into the upper half, which the article mentions, can
  never be 1 with this datapath (see above).
- N must be even and a multiple of D, and D ≥ 4. These limits are checked at
  elaboration.
- Running shorter operands on the fixed datapath and the CIOS host itself are
  not implemented in RTL.
- q is generated directly from the upper adder's output. Retiming the q·M
  path, which the article only mentions, is not done. That path (upper CSA,
  XOR, AND array, lower CSA) sets the clock period.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each uses references computed
independently of the RTL (wide integer arithmetic in the testbench):

- **Montgomery results**: checked by congruence, Z·2^(N+D) ≡ A·B (mod M), and
  by range, Z < 2M.
- **Ordinary products**: compared exactly with A·B.
- **Latencies**: checked as well.

| Testbench | Covers |
|---|---|
| `tb_scalable_mm` | N=64, D=8. 300 random operations: both modes, chained Montgomery products, moduli near 2^N. It counts and requires reduction steps, mode switches, carries between conversion words, results in [M, 2M) and operands ≥ M. |
| `tb_scalable_mm_full` | Default parameters: two Montgomery multiplications (1089 cycles each) and two ordinary ones (546 cycles each). |
| `tb_cios_double` | Default parameters: two 2048-bit Montgomery multiplications through CIOS. |
| `tb_scalable_mm_sizes` | Five sizes side by side: N from 32 to 512, D = 8, 16 and 32. Uses the driver `tb/mm_tester.sv`. |
| `tb_mm_datapath` | Datapath with testbench-driven control, N=64, D=8. |
| `tb_mm_ctrl`, `tb_operand_regs`, `tb_csa`, `tb_pp_gen`, `tb_fb_shift`, `tb_cs_reg`, `tb_word_adder`, `tb_pair_adder` | Unit tests. |

Verilator's wide-arithmetic limit of 4096 bits bounds the reference
arithmetic. It is enough for N = 1024 single-size checks and for 2048-bit CIOS
checks.

## Simulating

Each testbench is its own top. The package must come first:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/mm_pkg.sv rtl/*.sv tb/tb_scalable_mm_full.sv --top-module tb_scalable_mm_full
./obj_dir/Vtb_scalable_mm_full
```

To change the size, set `N` and `D` on `scalable_mm` (for example
`#(.N(2048), .D(32))`). Everything else derives from them.

## Files

| File | Content |
|---|---|
| `rtl/mm_pkg.sv` | mode enum, control-strobe struct |
| `rtl/scalable_mm.sv` | top: controller + datapath, host interface |
| `rtl/mm_ctrl.sv` | sequencing state machine |
| `rtl/mm_datapath.sv` | datapath wiring, q generation, assertions |
| `rtl/csa.sv` | W-bit carry-save adder |
| `rtl/pp_gen.sv` | A·b_i, 2A·b_(i+1), q·M generators and mode multiplexer |
| `rtl/fb_shift.sv` | 1-/2-bit feedback shifter |
| `rtl/cs_reg.sv` | RS/RC register with D-bit word shift |
| `rtl/word_adder.sv` | D-bit conversion adder with carry flip-flop |
| `rtl/pair_adder.sv` | 2-bit low-product adder with carry flip-flop |
| `rtl/operand_regs.sv` | A, B (scanned) and M / low-product registers |
