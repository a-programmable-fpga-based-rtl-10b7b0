# Programmable pairing cryptoprocessor over F(2^1223)

Bilinear pairings such as the eta_T pairing are built entirely from arithmetic in a
binary field F(2^m) and its extension F(2^4m). The algorithms are still moving: the
elliptic curve, the tower field, the distortion map and the version of the final
exponentiation differ from one publication to the next. This design therefore does
not hard-wire a pairing. It is a small programmable machine. Its datapath can do only
four things in F(2^m): add, multiply, square and take square roots. A pairing is a
program of 16-bit instructions that schedules those operations over a set of register
banks. The field is fixed when the hardware is built: m = 1223 with
f(x) = x^1223 + x^255 + 1, the 128-bit-security setting. Anything above the field
level is software.

Parts of this design follow the published architecture closely: the instruction
format, the instruction list, the six banks and their allowed paths, the adder in
front of each source bank, the 9-cycle serial Karatsuba multiplier, reduction by
parallel LFSRs, and the Jmp/For/Wait/Jz rules. Where that architecture is silent this
RTL makes its own choices. The main ones are the opcode numbers, the bank codes, the
End instruction, the host port and the pipeline of the instruction fetch. They are
listed in [Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## The machine a program sees

| Storage | Size | Read by | Written by |
|---|---|---|---|
| bank F (F0..F3) | 4 x m bits | F adder (Addition, Squaring, SquareRoot, LoadMult) | MoveBank from V or H, host |
| bank G (G0..G3) | 4 x m bits | G adder (same) | any arithmetic result, MoveBank from W or I, IncG0 (G0 only), host |
| banks V, W | 4 x m bits each | MoveBank | any arithmetic result, host |
| banks H, I | 4 x m bits each | MoveBank (H->F, I->G) | MoveBank (V->H, W->I), host |
| Fs, Gs | m bits each | multiplier, in place of the F or G adder | any arithmetic result, host |
| R | m bits | Jz | loaded from `r_in` at start |

A bank holds one element of F(q^4) as four coefficients, for example
g0 + g1 u + g2 v + g3 uv. Only F and G feed arithmetic. Each of them has a 4-input XOR
adder on its outputs, with one read enable per register. Every operand is therefore
the sum of any subset of a bank's registers. Extension-field formulas need exactly
this, because their inputs are nearly always sums of coefficients. V and W collect
results, and H and I are spill space behind them. Data flows in a ring:
F/G -> units -> G/V/W -> (H/I) -> F/G.

Constants are not needed. A xor A = 0, and IncG0 flips the low bit of G0 to add 1.

## Instruction set

Every instruction is 16 bits wide:

```
 15    12 11 10  9  8  7  6  5  4  3  2  1  0
+--------+-----+-----------+-----+-----------+
|  CMD   | S1 S0| R3 R2 R1 R0| S1 S0| R3 R2 R1 R0|
+--------+-----+-----------+-----+-----------+
            OP2 (destination)     OP1 (source)
```

S picks a bank. R is a register mask: read enables in a source, write enables in a
destination. A result can go to several registers of one bank at once. In control
instructions, {OP2, OP1} is a 12-bit constant n.

| CMD | Mnemonic | Effect |
|---|---|---|
| 0 | `Wait(n)` | hold the instruction pointer for n more cycles; `Wait(0)` is a no-op |
| 1 | `StoreMult(D[])` | D[mask] = last product |
| 2 | `Addition(D[], S[])` | D[mask] = sum of S[mask] |
| 3 | `Squaring(D[], S[])` | D[mask] = (sum of S[mask])^2 |
| 4 | `SquareRoot(D[], S[])` | D[mask] = sqrt(sum of S[mask]) |
| 5 | `LoadMult(S2[], S1[])` | start (sum of F[mask] or Fs) * (sum of G[mask] or Gs) |
| 6 | `IncG0()` | G0 = G0 xor 1 |
| 7 | `MoveBank(D, S[])` | D[i] = S[i] for each i in the OP1 mask |
| 8 | `Jmp(n)` | IP = n |
| 9 | `For(n)` | hardware loop, see below |
| A | `Jz()` | skip the next word if R[0] = 1; then R >>= 1 |
| F | `End()` | stop and raise `done` |

The S codes depend on the instruction, because each instruction reaches only certain
banks:

| Role | S = 00 | S = 01 | S = 10 | S = 11 |
|---|---|---|---|---|
| source of Addition/Squaring/SquareRoot (OP1) | F | G | - | - |
| destination of Addition/Squaring/SquareRoot/StoreMult (OP2) | G | V | W | Fs (R0), Gs (R1) |
| LoadMult first operand (OP2) | F adder | - | - | Fs |
| LoadMult second operand (OP1) | - | G adder | - | Gs |
| MoveBank destination (OP2) | F | G | H | I |
| MoveBank source (OP1) | V | W | H | I |

MoveBank supports six paths: V->F, V->H, H->F, W->G, W->I and I->G. Any other
combination, or a code marked "-", does nothing and raises the decoder's `illegal`
flag; in simulation an assertion in the top reports it. `gf2m_pkg` provides `mk_instr(cmd, s2, r2, s1, r1)` and `mk_ctrl(cmd, n)` to
build instruction words, together with named constants for all the codes.

### Timing of a program

- **One instruction per clock, with no fetch bubbles.** The program memory is
  synchronous and is addressed with the *next* instruction pointer, so a jump's
  target arrives in the cycle right after the jump.
- **Multiplication takes 10 cycles.** LoadMult captures both operands at the end of
  its cycle. The product is ready 10 cycles after the LoadMult cycle, so the usual
  pattern is `LoadMult; Wait(8); StoreMult`. The nine cycles in between may instead
  hold other useful instructions, because the operands are already captured and the
  source registers can be overwritten. There is no interlock. A StoreMult that comes
  too early is a program error, and an assertion reports it in simulation.
- **Addition, Squaring, SquareRoot, IncG0 and MoveBank take one cycle each.** They
  write on the clock edge that ends their cycle.
- **Wait(n) takes n+1 cycles.**
- **For(n) is a loop with a single hardware counter.** The idiom is:

  ```
  a:   For(n)       first arrival loads the counter with n
  a+1: Jmp(exit)    taken when the counter is 0 (the loop is left)
  a+2: body...      otherwise counter -= 1 and IP = a+2
       Jmp(a)
  exit:
  ```

  The body runs n times. A loop costs n+1 For cycles, one Jmp(exit) cycle and n
  back-jumps. Loops can follow one another, but they cannot be nested.
- **Jz tests R[0] and then shifts R right by one.** Repeated Jz instructions
  therefore walk through the bits of the loaded order r.

## Arithmetic units

**Multiplier (`gf2m_multiplier`, `koa_core`).** The multiplier pads both operands to
4n bits, where n = ceil(m/4) = 306, and splits them into quarters a0..a3 and b0..b3.
Two levels of Karatsuba-Ofman then give nine n-bit products, one computed per cycle:

| cycle | product | added at offsets (x n) |
|---|---|---|
| 1 | a0 b0 | 0, 1, 2, 3 |
| 2 | a1 b1 | 1, 2, 3, 4 |
| 3 | (a0+a1)(b0+b1) | 1, 3 |
| 4 | a2 b2 | 2, 3, 4, 5 |
| 5 | a3 b3 | 3, 4, 5, 6 |
| 6 | (a2+a3)(b2+b3) | 3, 5 |
| 7 | (a0+a2)(b0+b2) | 2, 3 |
| 8 | (a1+a3)(b1+b3) | 3, 4 |
| 9 | (a0+a1+a2+a3)(b0+b1+b2+b3) | 3 |

Each product is XORed into an 8n-bit accumulator at its offsets. After the ninth
product the accumulator holds the whole 2m-1 bit product, and it is then reduced (see
below). The offsets come from the Karatsuba merge rule applied twice. At one level,
with operands split at U bits, the rule reads
x*y = p1 x^2U + (pm + p0 + p1) x^U + p0. Here p0 is the product of the low halves
and lands at 0 and U. p1 is the product of the high halves and lands at U and 2U.
pm is the product of the half-sums and lands at U only.

The single n-bit product unit, `koa_core`, is itself a fully parallel Karatsuba
multiplier. It applies the same rule four more levels deep. That gives 81 leaf
products of 20 bits, each computed by a small AND/XOR array, and each added in at its
merged offsets. `DEPTH` sets the number of levels.

**Reduction (`gf2m_plfsr`).** Multiplying by x modulo f is one step of an LFSR: shift
up by one place, feed the bit that falls out back into bit 0, and XOR it into bit K.
A chain of D such steps computes x^D A mod f in a single pass, and is called a
parallel LFSR. A double-length product h x^m + l reduces to PLFSR_m(h) xor l. For a
trinomial, the chain of m steps costs m XOR gates plus wiring.

**Squarer (`gf2m_squarer`).** Squaring spreads the input bits apart, with a zero
between each pair of neighbours, and then reduces the result with the same m-step
PLFSR.

**Square root (`gf2m_sqrt`).** Write a = e(x^2) + x o(x^2), where e holds the even
coefficients of a and o the odd ones. Then sqrt(a) = e(x) + sqrt(x) o(x). For
x^m + x^K + 1 with m and K both odd, sqrt(x) = x^((m+1)/2) + x^((K+1)/2), and neither
product with o(x) reaches degree m. The square root is therefore the even half XOR
two shifted copies of the odd half. This closed form only works for odd m and K, and
an elaboration check enforces that.

## Using it

1. Hold `rst_n` low, then release it. All registers clear to zero.
2. With the processor idle, write the program through
   `prog_we`/`prog_addr`/`prog_wdata`.
3. Write the operands through `host_we`/`host_bank`/`host_reg`/`host_wdata`. Bank
   codes: 0 F, 1 G, 2 H, 3 I, 4 V, 5 W, 6 Fs (`host_reg`=0) or Gs (`host_reg`=1).
4. Pulse `start` for one cycle. The pulse sets IP to 0 and loads `r_in` into R.
   `busy` stays high while the program runs. Host writes are ignored during that time.
5. When `done` rises, read any register combinationally through `host_rdata`.

Example sequences, written in the mnemonics above:

- **q-th power in F(q^4), basis {1,u,v,uv}:** four Additions, for example
  `Addition(V[0], G[0,1,2])`, `Addition(V[1], G[1,2,3])`, `Addition(V[2], G[2,3])`,
  `Addition(V[3], G[3])`.
- **Squaring in F(q^4):** four Squarings of coefficient sums, for example
  `Squaring(W[0], G[0,1,3])`.
- **x1 * (sqrt(x1) + x2):** `SquareRoot(G[0],F[0])`, `Addition(G[1],F[2])`,
  `LoadMult(F[0], G[0,1])`. The other Miller-loop terms can be computed during the
  Wait that follows.
- **Inversion (Itoh-Tsujii):** follow an addition chain for m-1, squaring G0 in place
  inside For loops and multiplying through Fs. For m = 1223 the whole program is 120
  words and takes 3878 cycles. `tb/tb_pairing_cryptoprocessor.sv` assembles it.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `M` | 1223 | all arithmetic modules | field degree; with `K` fixes f = x^M + x^K + 1 (M, K odd) |
| `K` | 255 | same | middle term of the trinomial |
| `DEPTH` | 4 | `koa_core` and upward | Karatsuba levels inside the n-bit product unit |
| `R_W` | 1223 | top, `program_control` | width of the R register |
| `AW`, `DW` | 12, 16 | `program_memory` | 4K x 16-bit program store |

To move to another trinomial field, change `M_DEF` and `K_DEF` in `gf2m_pkg`, or
override `M` and `K` on the top. No other change is needed. A pentanomial field would
need a new step in `gf2m_plfsr` and a new square-root network.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a cycle-limit watchdog. The expected values
come from `tb/gf_ref_pkg.sv`, a bit-serial shift-and-add multiplier that reduces mod f
at every step and shares no structure with the RTL.

| Testbench | What it shows |
|---|---|
| `tb_gf2m_plfsr`, `tb_gf2m_squarer`, `tb_gf2m_sqrt` | x^D a mod f, a^2 and sqrt(a), at m = 1223 |
| `tb_koa_core` | 306-bit Karatsuba core and a padded 23-bit, 3-level one, against schoolbook products |
| `tb_gf2m_multiplier` | full-size products; `done` exactly 10 cycles after start; restart while busy |
| `tb_reg_bank`, `tb_bank_adder`, `tb_program_memory` | storage and masked adder against models |
| `tb_instr_decoder` | control word of every instruction kind and of every MoveBank path, including an illegal one |
| `tb_program_control` | exact IP trace through Jmp, For(3), Wait(5), Jz taken and not taken, End |
| `tb_pairing_datapath` | every datapath path on a small field (m = 17), driven by control words |
| `tb_pairing_cryptoprocessor` | end to end at full size: the mechanism tour plus the Itoh-Tsujii inversion (a*a^-1 = 1); cycle count predicted and checked; every mechanism counted |
| `tb_etat_fragments` | full size: F(q^4) q-th power in two bases, F(q^4) squaring, and the Miller-loop fragments for both gamma cases, with a computation overlapped with a multiplication |

Each testbench runs with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_pairing_cryptoprocessor \
  rtl/gf2m_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/tb_pairing_cryptoprocessor.sv
./obj_dir/Vtb_pairing_cryptoprocessor
```

Once built, the full-size end-to-end run finishes in under a second of wall-clock time.

## Where this RTL makes its own choices

- **Encoding.** The published architecture gives the instruction names, the field
  layout and the banks each instruction can reach. The opcode numbers and S codes in
  the tables above are this design's own.
- **End, done and the host port.** The original architecture defines no halt
  instruction and no way for a host to move data in or out. It assumes operands are
  already in F0..F3, and it leaves the host interface to future work. End, `done`,
  the program write port and the register port were added so that the design can be
  used and tested.
- **Jz shifts R.** In the original, Jz only tests R[0]. The shift was added so that a
  program can scan the bits of r.
- **Loop and Wait details.** There is one For counter, with the load-then-test rule
  described above. Wait(n) lasts n+1 cycles.
- **Fetch and multiplier timing.** The fetch has no bubbles. Multiplier operands are
  registered at LoadMult and the result is read 10 cycles later. The product is
  accumulated and reduced exactly; no cycle-level schedule for the merge was
  available to follow.
- **Square root.** The square root is a closed form that holds only for trinomials
  with odd m and K.
- **Product unit.** The 306-bit product unit is a plain four-level Karatsuba
  multiplier. Published refinements of that unit are not reproduced.
- **Program memory.** The program memory is an inferred RAM, not a vendor
  block-memory core.
- **Not included.** No complete eta_T pairing program is included, so the reported
  51.5k-cycle (first program version) and 57.6k-cycle (second version) pairing times
  have not been reproduced. A 4K-word store leaves ample room for such programs:
  they need about 340 and 660 words. Area and clock-frequency figures were not
  re-derived either.

## Files

`rtl/gf2m_pkg.sv` holds the field constants, instruction and control types, and the
instruction builders. The modules, from the top down:

- `pairing_cryptoprocessor` (top)
  - `program_memory`
  - `program_control`
  - `instr_decoder`
  - `pairing_datapath`
    - `reg_bank` x6
    - `bank_adder` x2
    - `gf2m_squarer` -> `gf2m_plfsr`
    - `gf2m_sqrt`
    - `gf2m_multiplier` -> `koa_core`, `gf2m_plfsr`

The testbenches and their reference package are in `tb/`.
