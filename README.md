# Compressor-based Montgomery multiplier

This is a modular multiplier for public-key arithmetic. It computes

    Z = X · Y · R⁻¹ mod M,   R = 2^N, M odd, 0 ≤ X, Y < M

without a division. It does this with Montgomery's method: three ordinary
integer multiplications, one addition, a shift and at most one subtraction.
The three multiplications run one after another on a single combinational
**array multiplier**. Its partial products are summed by rows of 3:2, 4:2 and
5:2 compressors rather than by rows of plain full adders. The idea is that
wider compressors sum more partial-product rows per stage, so the array
needs fewer stages and less logic.

The RTL implements the architecture described in *Area and Delay Efficient
Compressor based Montgomery Multiplier* (G. Revathi, K. V. Gowreesrinivas,
P. Samundiswary, 2019). The section "Where this RTL departs from the
published description" lists every point where the RTL differs from that
description or fills a gap in it.

Defaults: `N = 16` and `COMP = 5`, i.e. a 16-bit multiplier built on 5:2
compressors, the combination the publication reports as best. `COMP = 4` and
`COMP = 3` select the 4:2- and 3:2-compressor versions. `N = 8` is the other
size the publication evaluates.

## The algorithm

With `M1 = −M⁻¹ mod R` precomputed and supplied as an input:

1. `D = X · Y` (2N bits)
2. `E = (D mod R) · M1 mod R` (N bits)
3. `T = (D + E · M) / R`. The division is exact because `D + E·M ≡ 0 (mod R)`, so it only drops the low N bits. Also `T < 2M`.
4. `Z = T − M` if `T ≥ M`, else `Z = T`

Operands and results stay in the Montgomery domain (a value `a` is represented
by `a·R mod M`). Converting into and out of that domain is the user's job, as
is computing `M1`. For example, `M1` can be computed with the Newton
iteration `x ← x·(2 − M·x) mod R` started from `x = M`, then negated mod R.

## Datapath and schedule

```
 x  y  m1  m
 |  |   |  |      +---------------------------+
 v  v   v  v      |                           |
 operand mux ---> opa_q, opb_q (multiplier input registers)
                        |
          compressor_array_multiplier (combinational, 2N-bit product)
                        |
          register_file  R1 = D, R2 = (D mod R)·M1, R3 = E·M
                |               |
   low N bits of R1, R2 go back to the operand mux
                |
          adder_2n: (R1 + R3) >> N  ->  t_q  (N+1 bits)
                |
          conditional_subtractor: t_q − M, keep it if no borrow  ->  z (N bits)
```

`mm_controller` runs one state per clock cycle:

| state | action |
|-------|--------|
| IDLE  | on `start`: load X, Y into the multiplier input registers |
| MUL1  | R1 ← product (D) |
| LD2   | load R1[N-1:0], M1 |
| MUL2  | R2 ← product (its low half is E) |
| LD3   | load R2[N-1:0], M |
| MUL3  | R3 ← product (E·M) |
| ADD   | t_q ← (R1 + R3) / R |
| RED   | z ← t_q ≥ M ? t_q − M : t_q |

Interface timing:

- `start` is sampled on a rising edge while `busy` is low. X and Y are captured on that edge.
- `done` pulses high for one cycle, seven edges later. `z` is valid from that cycle until the next result.
- One operation therefore takes eight cycles, counting the start cycle. A new `start` can be given in the `done` cycle.
- `m` and `m1` must stay stable while `busy` is high. An assertion in the top checks this.
- `start` is ignored while `busy` is high.
- `reset` is synchronous and active high. It clears every register and returns the controller to IDLE.

The clock period is bounded by the array multiplier, which is the only deep
combinational path. The 2N-bit adder and the N+2-bit subtractor each have a
register cycle of their own.

## The compressor array multiplier

This is the part that carries the design's idea, and the least obvious part
of the RTL (`rtl/compressor_array_multiplier.sv`).

**Partial products.** Row `i` is `a[i] AND b`, shifted left by `i`. The bit
`a[i]·b[j]` therefore sits in column `i+j`.

**Stages.** The rows are summed in stages. A stage is a single row of column
elements running from column 0 up to column 2N−1.

- Every carry an element produces goes sideways, into the element of the next column in the same stage.
- A stage therefore leaves exactly one bit per column: the running sum.
- The first stage sums partial-product rows 0 … COMP−2.
- Each later stage sums the previous running sum and the next COMP−2 rows.
- The last stage's sum row is the product.

This is the classic ripple array multiplier generalised. With 3:2 compressors
each stage adds one row (N−1 stages). With 4:2 compressors it adds two, and
with 5:2 compressors three.

**Choosing the element in each column.** Each column receives its row bits
plus the carries of the column to its right. It uses the smallest element
that takes them all:

| bits arriving | element | carries passed left |
|---|---|---|
| 0–1 | wire | 0 |
| 2 | half adder | 1 |
| 3 | 3:2 compressor (full adder) | 1 |
| 4–5 | 4:2 compressor (X1..X4, Cin) | 2 (Carry, Cout) |
| 6–7 | 5:2 compressor (X1..X5, Cin1, Cin2) | 3 (Carry, Cout1, Cout2) |

A row of a 5:2 array thus starts with a half adder, grows through 3:2 and
4:2 compressors into a run of 5:2 compressors, and shrinks again at the top
end.

- **Why COMP−1 rows.** In steady state a 5:2 column receives 4 row bits and 3 carries: 7 inputs, its maximum. That is why COMP−1 rows is the most a stage can take while still leaving one sum bit per column.
- **Timing at elaboration.** Everything is worked out when the design is elaborated. Constant functions compute each column's height and carry-in count, and `generate` picks the element. A static check stops elaboration if a column would overflow its compressor.

**Wiring order, and why only one carry ripples.** Row bits fill the X inputs
first. Then come the previous column's carries, in the order Carry, Cout1,
Cout2. In a full 5:2 column this connects:

- the neighbour's Carry to X5
- the neighbour's Cout1 to Cin1
- the neighbour's Cout2 to Cin2

Inside the 5:2 compressor, Cout1 depends only on X1..X3, and Cout2 depends on
Cin1 but not on Cin2. So only the Carry outputs form a ripple chain along the
row. The 4:2 compressor works the same way: Cout depends on X1..X3 only, and
the Carry ripples.

**Carries out of the top column** (2N−1) are dropped. Every running sum is
the sum of some of the partial-product rows, never more than `a·b`, so it stays
below 2^(2N) and those carries are always zero.

**Size of the arrays.** "FA" counts full-adder cells: a 4:2 compressor is two,
a 5:2 compressor three.

| N | COMP | stages | 3:2 | 4:2 | 5:2 | HA | FA total |
|---|------|--------|-----|-----|-----|----|----------|
| 8  | 3 | 7  | 48  | –   | –  | 8  | 48  |
| 8  | 4 | 4  | 10  | 21  | –  | 4  | 52  |
| 8  | 5 | 3  | 9   | 4   | 12 | 3  | 53  |
| 16 | 3 | 15 | 224 | –   | –  | 16 | 224 |
| 16 | 4 | 8  | 22  | 105 | –  | 8  | 232 |
| 16 | 5 | 5  | 5   | 10  | 70 | 5  | 235 |

The 3:2 rows match the publication's stage and adder counts exactly. For 4:2
and 5:2 the publication gives fewer stages (3/5 and 2/3) and fewer full
adders (45/155 and 38/144). Those adder counts are below `N² − 2N`, which is
the minimum number of full adders any exact multiplier built from counters
needs. This RTL keeps an exact product and does not try to reach them; see
the departures below. The practical gain of wider compressors here is fewer
stages, so a shorter vertical path. The number of cells stays at what exact
multiplication needs.

## Compressors

- `compressor_3_2`: a full adder built as XOR, XOR, MUX.
  - `p = x1^x2`
  - `sum = p^cin`
  - `carry = p ? cin : x1`
- `compressor_4_2`: two full adders.
  - FA1 adds X1..X3 and produces Cout.
  - FA2 adds FA1's sum, X4 and Cin, and produces Sum and Carry.
  - `X1+X2+X3+X4+Cin = Sum + 2(Carry+Cout)`.
- `compressor_5_2`: three full adders in a chain.
  - FA1 adds X1..X3 and produces Cout1.
  - FA2 adds FA1's sum, X4 and Cin1, and produces Cout2.
  - FA3 adds FA2's sum, X5 and Cin2, and produces Sum and Carry.
  - `X1+…+X5+Cin1+Cin2 = Sum + 2(Carry+Cout1+Cout2)`.
- `half_adder`: XOR and AND.

## Where this RTL departs from the published description

- **Rows per stage.** The publication's 8-bit 5:2 example puts six partial-product rows into the first stage and finishes in two stages. That cannot be done with one compressor per column and sideways carries: a 5:2 compressor takes seven inputs and passes three carries on. This RTL uses the largest number of rows that works (COMP−1, then COMP−2 new rows per stage). It keeps the published features:
  - the mix of element kinds along a row
  - carries passed to the next column
  - half adders at the row ends

  This gives more stages for 4:2 and 5:2 than the publication's table, as listed above.
- **Final comparison.** The published algorithm says "if Z > M subtract M", but its stated result is `X·Y·R⁻¹ mod M`. The RTL subtracts when `T ≥ M`, so the result is always fully reduced. For a prime modulus and `0 < X, Y < M` the two rules never differ.
- **4:2 equation.** The publication writes the 4:2 equation without Cin, but draws and describes a Cin input. The RTL includes Cin.
- **Registers.** The publication's FPGA results and synthesis schematics show a nearly register-free implementation: separate multiplier instances, an adder, a subtractor and one output register. This RTL follows its architecture diagram instead: input registers on the multiplier, a register file, an intermediate register and an output register, all sequenced by a controller.
- **Product path.** The block diagram also draws lines from the multiplier straight to the adder. Here every product goes through the register file, and the adder reads R1 and R3.
- **Own choices.** These are not specified by the publication:
  - the operand multiplexer in front of the multiplier
  - the eight-cycle schedule
  - the start/busy/done handshake
  - the reset style
  - keeping the adder's carry-out (the N+1-bit intermediate value)
  - the third product register R3
  - the element-selection rule and input ordering in the array

## Files

`rtl/`:

- `mm_pkg.sv`: states, operand-select codes, element kinds and the element-selection functions
- `montgomery_multiplier.sv`: the top
- `mm_controller.sv`, `register_file.sv`, `adder_2n.sv`, `conditional_subtractor.sv`
- `compressor_array_multiplier.sv`, `compressor_5_2.sv`, `compressor_4_2.sv`, `compressor_3_2.sv`, `half_adder.sv`

`tb/` (each testbench is self-checking and prints `TB_RESULT checks=… failures=…`):

| testbench | what it checks |
|---|---|
| `tb_montgomery_multiplier` | Default size, end to end. Checks about 3,000 random and corner multiplications and the seven-edge latency. Also checks that start is ignored while busy, back-to-back operations, a reset in mid-operation, and both outcomes of the final subtraction. |
| `tb_mm_workloads` | All six evaluated configurations (N = 8, 16 × COMP = 3, 4, 5), about 2,000 multiplications each |
| `tb_compressor_array_multiplier` | All six multiplier configurations. Exhaustive at 8 bits, 20,000 random pairs and corners at 16 bits. |
| `tb_compressor_5_2`, `tb_compressor_4_2`, `tb_compressor_3_2`, `tb_half_adder` | Exhaustive, including which carry outputs must not depend on which carry inputs |
| `tb_mm_controller`, `tb_register_file`, `tb_adder_2n`, `tb_conditional_subtractor` | Each block against a model |

`tb/mm_ref_pkg.sv` holds the reference arithmetic. It does not reuse the
hardware's algorithm: the expected result is `(X·Y mod M) · ((M+1)/2)^N mod M`.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mm_pkg.sv tb/mm_ref_pkg.sv tb/tb_montgomery_multiplier.sv \
    --top-module tb_montgomery_multiplier -o sim
./obj_dir/sim
```

Replace the testbench name to run any other testbench. Each one runs in well
under a second. To change the size or compressor kind, override `N` and
`COMP` on `montgomery_multiplier`. The array multiplier accepts any `N ≥ 2`
and `COMP` in {3, 4, 5}. The reference package limits testbenches to N ≤ 30.
