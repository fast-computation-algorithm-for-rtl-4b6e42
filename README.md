# Row/column-bus array processor for robot-dynamics matrix arithmetic

The Newton-Euler equations of a robot arm are mostly small linear algebra:
3x3 rotation matrices times 3-vectors, cross products, dot products, sums.
A single processor spends almost all its time on these. This design is a
3x3 grid of floating-point processor elements (PEs) that does each of these
operations in a handful of parallel steps. A 3x3 matrix product, for
example, takes 4 steps.

There is no switching network. Every PE in row *i* hangs on a row bus
**X_i**, and every PE in column *j* on a column bus **Y_j**. In a step, one
PE per bus talks and all PEs on that bus use the value in the same cycle, so
no step is spent moving operands between PEs. In step *k* of a matrix
product C = A·B, PE(i,k) puts a_ik on X_i and PE(k,j) puts b_kj on Y_j.
Every PE(i,j) then multiplies the two values it sees and adds the product of
the previous step into its running sum c_ij.

The RTL is SystemVerilog (IEEE 1800-2017) and can be synthesised. The grid
size `N` is a parameter (default 3). The default configuration is 9 PEs and
six buses, with 32-bit floating-point data.

## Structure

```
                     +--------------------------------------+
 host bus  <-------> | host_interface      micro_sequencer  |
 (hold/hlda, sync,   +--------------------------------------+
  finish, rd/wr,              | per-PE commands, go, busy
  reg_sel, data)      Y0            Y1            Y2
                      |             |             |
              X0 -----PE(0,0)-------PE(0,1)-------PE(0,2)
              X1 -----PE(1,0)-------PE(1,1)-------PE(1,2)
              X2 -----PE(2,0)-------PE(2,1)-------PE(2,2)
```

| file | what it is |
|---|---|
| `rtl/ap_pkg.sv` | number format, command word, opcodes, and the micro-program of every operation (`op_steps`, `op_cmd`) |
| `rtl/array_processor.sv` | top level: PE grid, buses, sequencer, host interface |
| `rtl/processor_element.sv` | one PE: registers AR, BR, CR, PR, CMR, one multiplier and one adder |
| `rtl/fp_adder.sv` | 4-stage pipelined floating-point adder |
| `rtl/fp_multiplier.sv` | 3-stage pipelined floating-point multiplier |
| `rtl/shared_bus.sv` | one X or Y bus (one talker, N listeners) |
| `rtl/micro_sequencer.sv` | runs the micro-program step by step; hold/hlda, sync, finish |
| `rtl/host_interface.sv` | register-selector decode and host read/write |

## Inside a processor element

Each PE has these registers:

- **AR** holds operand A.
- **BR** holds operand B.
- **CR** holds the result. It also serves as the accumulator.
- **PR** holds the product. It sits between the multiplier and the adder.
- **CMR** holds the command for the current step.

Every PE has its own CMR, so PEs can do different things in the same step.
One PE can broadcast a value while its neighbour accumulates, for example.

A command (`pe_cmd_t`, 19 bits) sets the following for one step:

| field | choices |
|---|---|
| talk on the row bus X / column bus Y | off, or the value of AR, BR or CR |
| multiplier operands | a from AR, X or Y; b from BR, X or Y |
| multiplier destination | PR or CR |
| adder operands | a from CR or AR; b from PR, BR, X or Y |
| adder subtract | flip the sign bit of adder operand b |
| clear | set CR to 0 at the start of the step |

The multiplier and the adder run at the same time. Overlap comes from the
PR register: in a matrix-product step the multiplier forms the next product
into PR while the adder adds the previous PR into CR. Operands, including
bus values, are sampled in the step's `go` cycle. Results are written
`MUL_LAT` = 3 or `ADD_LAT` = 4 cycles later.

## Arithmetic units

The numbers are 32-bit floating point with the IEEE-754 single-precision
field layout: sign, an 8-bit exponent biased by 127, and a 23-bit fraction
with a hidden leading one.

- **Rounding:** round to nearest, ties to even.
- **Tiny results:** results below the normal range are flushed to (signed) zero.
- **Overflow:** results saturate to ±infinity.
- **Denormal inputs:** read as zero.
- **NaN and infinity inputs:** not given special treatment.
- **Zero signs:** follow IEEE. x + (−x) gives +0, (−0) + (−0) gives −0, and a zero product has the XOR of the signs.

**Adder** (`fp_adder`), 4 stages:

1. Compare the magnitudes, swap so the larger operand comes first, and shift
   the smaller mantissa right by the exponent difference. Guard, round and
   sticky bits keep what is shifted out.
2. Add the mantissas, or subtract them when the signs differ.
3. Count leading zeros and shift left to normalise. A carry-out is handled
   by a 1-bit right shift.
4. Add the shift count to the exponent, round, and range-check.

**Multiplier** (`fp_multiplier`), 3 stages:

1. Add the exponents and do a 24×24-bit mantissa multiply.
2. Normalise. The product lies in [1,4), so the shift is 0 or 1.
3. Adjust the exponent, round, and range-check.

Both units accept a new operand pair every cycle. A valid bit travels with
the data.

## Steps and the sequencer

The host writes an opcode and pulses `sync`. The sequencer then repeats the
following for each step of the operation's micro-program:

1. **load**, 1 cycle: every PE's CMR is loaded with that PE's command.
2. **go**, 1 cycle: the PEs start their units.
3. **wait:** the sequencer waits until no PE reports `busy`.

A step therefore lasts 5 cycles if it only multiplies and 6 cycles if it
adds. After the last step `finish` rises. It stays high until the next
`sync`.

The micro-programs are in `ap_pkg::op_cmd`, one case per operation, and are
the place to read or change an algorithm.

## Operations: where operands go and where results appear

The host places operands in AR/BR of particular PEs before starting an
operation. PE(i,j) is row i, column j. Cycles are counted from the `sync`
cycle to the first cycle `finish` is high.

| opcode | operands | result | steps | cycles |
|---|---|---|---|---|
| `OP_MAT_MUL` C=A·B | AR(i,j)=a_ij, BR(i,j)=b_ij | CR(i,j)=c_ij | 1 mul, 2 mul+add (overlapped), 1 add: 4 | 24 |
| `OP_MAT_ADD` C=A+B | AR(i,j)=a_ij, BR(i,j)=b_ij | CR(i,j) | 1 add | 7 |
| `OP_VEC_ADD` c=a+b | row i: AR(i,j)=a_j, BR(i,j)=b_j (up to 3 pairs) | CR(i,j) | 1 add | 7 |
| `OP_DOT` c=a·b | row i: AR(i,j)=a_j, BR(i,j)=b_j (up to 3 pairs) | CR(i,0) | 1 mul + 2 add | 18 |
| `OP_CROSS` c=a×b | see below | CR(i,0)=c_i | 1 mul + 1 subtract | 12 |
| `OP_VEC_MAT` cᵀ=aᵀ·B | AR(i,0)=a_i, BR(i,j)=b_ij | CR(0,j)=c_j | 1 mul + 2 add | 18 |
| `OP_MAT_VEC` c=A·b | AR(i,j)=a_ij, BR(0,j)=b_j | CR(i,0)=c_i | 1 mul + 2 add | 18 |
| `OP_VEC_SCALE` c=a·s | row i: AR(i,j)=a_j, BR(i,0)=s (up to 3 vectors) | CR(i,j) | 1 mul | 6 |
| `OP_SCA_MUL` | any PE: AR, BR | CR=AR·BR in every PE | 1 mul | 6 |

The cross product spreads its six partial products over columns 0 and 1:

| PE | AR | BR |
|---|---|---|
| (0,0) | a1 | b2 |
| (0,1) | a2 | b1 |
| (1,0) | a2 | b0 |
| (1,1) | a0 | b2 |
| (2,0) | a0 | b1 |
| (2,1) | a1 | b0 |

Step 0 forms every product in CR. In step 1, PE(i,1) puts its product on
X_i and PE(i,0) subtracts it by flipping the sign bit.

The reductions run one bus transfer per step. The dot product, matrix·vector
and vector·matrix each take 2 add steps, because a row bus carries only one
value per step. Results are rounded after every multiply and every add, in
the order shown. A matrix product entry is therefore ((0 + a_i0·b_0j) +
a_i1·b_1j) + a_i2·b_2j.

## Host bus

The port names follow the system's block diagram: `reset`, `sync`, `hold`,
`hlda`, `finish`, `rd`, `wr`, `reg_sel`, and the system data bus. The data
bus is split into `sys_wdata`, `sys_rdata` and `sys_rdata_oe`. There are no
tri-states inside.

`reg_sel = {row[1:0], col[1:0], reg[1:0]}`:

- **row < 3:** selects PE(row,col). `reg` picks AR (0), BR (1), CR (2) or CMR (3). CMR is read-only.
- **row = 3:** selects the sequencer. `reg` 0 is the opcode register (write). `reg` 1 is status (read): bit 0 `hlda`, bit 1 `finish`, bit 2 running, bits 7:4 the opcode.

Reads are combinational: `sys_rdata` carries the value in the cycle `rd` is
high. Writes are accepted only while `hlda` is high.

To run one operation, the host:

1. Raises `hold` and waits for `hlda`.
2. Writes the operands and the opcode.
3. Drops `hold`.
4. Pulses `sync` for one cycle.
5. Waits for `finish`.
6. Raises `hold` again and reads the results from CR.

The host may also raise `hold` during an operation. The sequencer grants it
between two steps and suspends the operation until `hold` falls. This lets
the host step through an operation and inspect every PE's CMR. The
end-to-end testbench uses this to watch the buses at work.

`reset` is synchronous and active high. There is one clock.

## How far to trust it, and where it departs from the original description

The architecture comes from the paper "Fast Computation Algorithm for Robot
Dynamics and Its Implementation". The following parts follow it:

- the grid with shared row and column buses and one talker per bus
- the PE registers AR, BR, CR and CMR, and a product register
- one adder and one multiplier per PE, used concurrently
- the adder and multiplier pipeline stages
- the operand layout and the parallel algorithm of every operation
- the n+1-step pipelined matrix product

The following are this design's own choices; the paper does not specify them:

- **Number format, rounding and exceptions.** The source gives only "32 bit
  (or other)".
- **Command-word encoding and mux options.** The PE diagram's mux inputs are
  not specified in detail. The options are the set the algorithms need. The
  diagram's separate ACC register is merged into CR.
- **Step timing.** A step is load, then go, then wait for busy.
- **Host protocol details.** These cover the meaning of `sync`, `hold` and
  `finish`, the register map, write gating by `hlda`, and combinational
  reads.
- **Result positions.** The description lists the cross-product and
  matrix·vector results as ending in c00, c01, c02. Its own algorithms
  accumulate into column 0, so they end in CR(0,0), CR(1,0), CR(2,0), and
  this design follows the algorithms. Vector·matrix results are in row 0, as
  stated.
- **Operation counts.** The description says in places that a 3x3 matrix
  product needs "3 multiplications and 2 additions" and elsewhere "3 and 3".
  It also says a scalar product needs "one multiplication and one addition"
  although its algorithm has two accumulation steps. This design follows the
  algorithms: 3 accumulations for the product and 2 for the scalar product.
- **Multiplier text.** One sentence describes the multiplier's first stage
  as subtracting the fractions. The multiplier diagram shows a mantissa
  multiplier, which is what is built.
- **Element-wise multiply.** `OP_SCA_MUL` covers the "Sca*Sca" entry of the
  paper's timing comparison.

Not included:

- **The prototype.** It was nine Intel 8088 CPUs on three PC boards, with
  the PC host and its C driver. The floating-point PE stands in for the
  8088s.
- **Trigonometric functions.** The host must supply sin and cos.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=N
failures=M` line. Reference values come from `tb/fp_ref_pkg.sv`, which does
the arithmetic in double precision and rounds once to the 32-bit format.
Double precision carries 53 significant bits, more than 2·24+2, so a sum or
product rounded first to double and then to 32 bits is still correctly
rounded.

| testbench | covers |
|---|---|
| `tb_fp_adder` | ~2500 sums: directed corners (cancellation, carry, ties to even, overflow, underflow, zeros) and random pairs, one per cycle; latency = 4 |
| `tb_fp_multiplier` | ~2500 products, directed and random over a wide exponent range; latency = 3 |
| `tb_processor_element` | every operand/destination path, sign-flip subtraction, pipelined multiply-accumulate, bus talkers, busy length |
| `tb_shared_bus` | single talker, idle value |
| `tb_micro_sequencer` | step counts (hand-written table), one talker per bus whenever a bus is read, matrix-product talker pattern, sync-to-finish cycles, hold between steps |
| `tb_host_interface` | register map, status word, write gating |
| `tb_array_processor` | end to end at the default size, through the host bus only: all nine operations, results bit-exact, cycle counts, plus counts of X/Y broadcasts, multiply/add overlap, subtraction and mid-operation hold (fails if any is zero) |
| `tb_puma_kinematics` | forward kinematics of a PUMA 560 (six random poses) as a chain of matrix·vector, vector-add and matrix-product operations; bit-exact against the rounding model and within 1e-5 of double precision |
| `tb_puma_dynamics` | recursive Newton-Euler inverse dynamics of a six-joint PUMA-type arm (three random states), every vector operation on the array; bit-exact against the rounding model and within 1e-4 (relative) of double precision |

For the inverse-dynamics workload, the paper's count for the array is 306
additions and 162 multiplications. This testbench's straightforward
formulation uses 186 array operations per evaluation: 114 multiply steps and
228 add steps, or 2124 array cycles, not counting host transfers. Forward
kinematics takes 15 operations and 245 array cycles per pose. The kinematic
table is the commonly published PUMA 560 one. The link masses and inertias
in the dynamics test are illustrative.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ap_pkg.sv tb/fp_ref_pkg.sv tb/tb_array_processor.sv \
    --top-module tb_array_processor -o sim
./obj_dir/sim
```

Replace `tb_array_processor` with any testbench name above. Each runs in
under a second.

## Changing it

- **Grid size:** `array_processor #(.N(n))`. The matrix product, the
  additions, the dot product, matrix·vector, vector·matrix and scaling are
  written for general n. The cross product uses the 3x2 corner. `RB` sizes
  the row and column fields of `reg_sel`.
- **New operation:** add an opcode, its step count in `op_steps`, and its
  commands in `op_cmd`. No other file changes.
- **Pipeline depths:** `ADD_LAT` and `MUL_LAT` document the unit latencies
  and are used by the testbenches. The sequencer waits for `busy`, so
  re-pipelining a unit needs no sequencer change.
