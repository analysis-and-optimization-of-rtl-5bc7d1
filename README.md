# A processor with native complex floating point arithmetic

Signal processing code that works on complex numbers usually runs on fixed-point
hardware. Every conversion between floating and fixed point then trades precision
against the number of bits used, and the dynamic range suffers. This design avoids
the conversion. It is a small processor with three arithmetic units side by side:

* a 32-bit **integer unit**;
* an IEEE 754 **single-precision unit** that adds, subtracts, multiplies, divides
  and takes square roots;
* a **complex unit**. It adds, subtracts and multiplies complex numbers whose real
  and imaginary parts are IEEE 754 half-precision (16-bit) floats. Both parts sit
  in one 32-bit register.

The units are fed by a register bank of 32 x 32-bit registers. Program and data
share an 8 KB on-chip RAM. A host can load the RAM, start the core and read back
the results, so the processor can serve as a co-processor. All of it is
synthesizable SystemVerilog (IEEE 1800-2017).

## Number formats

| format | sign | exponent | fraction | bias | used by |
|---|---|---|---|---|---|
| single | bit 31 | 8 bits | 23 bits | 127 | `fpu32`, `OP_FPU` instructions |
| half | bit 15 | 5 bits | 10 bits | 15 | both parts of a complex word |
| complex word | real part in `[31:16]` | | imaginary part in `[15:0]` | | `cfpu16`, `OP_CPX` instructions |

The floating point operators follow IEEE 754 semantics, with one simplification:
**there are no subnormal numbers.**

* A subnormal input is read as a zero of the same sign.
* A result whose magnitude is below the smallest normal number, before rounding,
  becomes a signed zero. The operator raises *underflow* and *inexact* when this
  happens.

Everything else is standard:

* four rounding modes: nearest-even, toward zero, toward -inf, toward +inf;
* signed zeros;
* infinities and overflow that respects the rounding mode (infinity, or the largest
  finite number);
* every NaN result is the quiet NaN `0x7fc00000` / `0x7e00`;
* the five exception flags, ordered `{invalid, divzero, overflow, underflow, inexact}`
  (`cfp_pkg::fp_flags_t`).

## How the floating point operators work

All four operators are written once, with the widths as parameters (`EXP_W`,
`FRAC_W`). They are instantiated at 8/23 for single precision and at 5/10 for the
halves of a complex number. Each operator is combinational and has three parts:

1. unpacking and special-case detection;
2. a significand datapath that yields a normalised significand, one guard bit and
   a sticky bit;
3. the shared rounding stage `fp_round`.

**`fp_round`** adds the rounding increment to the concatenation
`{exponent, fraction}`. A carry out of the fraction therefore moves into the
exponent without a separate renormalisation step. When the carry reaches the
all-ones exponent, the operation overflows. The increment is:

* nearest-even: `guard & (sticky | lsb)`;
* toward zero: never;
* toward -inf: `sign & (guard | sticky)`;
* toward +inf: `!sign & (guard | sticky)`.

**Adder (`fp_addsub`)**, organised as pre-normalisation, add/subtract and
post-normalisation:

* *Pre-normalisation* classifies both operands (NaN, infinity, zero). It orders them
  by magnitude and shifts the smaller significand right by the exponent difference.
  The shifted significand keeps three extra bits (guard, round, sticky); every bit
  shifted past them is ORed into sticky.
* The *add/subtract* step adds or subtracts the two significands. The operation
  (add or subtract) and the two signs decide which one it does.
* *Post-normalisation* finds the leading one and shifts it to the top. It adjusts
  the exponent by the shift and passes the result to `fp_round`.
* When the leading one must move left by more than one place, the exponents
  differed by at most one. No bits were lost in that case, so the three extra bits
  are always enough.
* An exact cancellation gives +0, or -0 when rounding toward -inf.

**Multiplier (`fp_mul`)**:

* Adds the exponents and removes one bias.
* Multiplies the significands exactly, hidden bits included. This gives 48 bits in
  single precision and 22 bits in half precision.
* Shifts the product by at most one place.
* Flags *invalid* for 0 x inf.

**Divider (`fp_div`)**:

* Uses radix-2 restoring division, one quotient bit per unrolled step. If the
  dividend significand is smaller than the divisor's, it is doubled first and the
  exponent is decremented. The quotient's leading one is then always in the same
  place.
* Produces 26 quotient bits. The last bit and a non-zero remainder form the sticky
  bit.
* Flags *divide-by-zero* when a finite number is divided by zero. Flags *invalid*
  for 0/0 and inf/inf.

**Square root (`fp_sqrt`)**:

* Halves the exponent. When the unbiased exponent is odd, it first doubles the
  significand.
* Computes a digit-by-digit integer square root of `significand << (FRAC_W+2)`. This
  gives the significand plus one guard bit. A non-zero remainder is the sticky bit.
* `sqrt(-0) = -0`. Any other negative operand gives NaN and *invalid*.

The divider and the square root unroll 26 and 25 subtract-and-compare steps into a
single combinational path. In the processor each has one full clock cycle. This is
the design's critical path. To speed up the clock, pipeline these two operators
first.

## The complex unit (`cfpu16`)

The 3-bit operation code passes through a 3-to-8 one-hot decoder
(`op_decoder3to8`; `din[2]` is the most significant bit, so code `110` raises
`dout[6]`). Three of its lines are used:

| code | operation | real part | imaginary part |
|---|---|---|---|
| 0 | add | `a.re + b.re` | `a.im + b.im` |
| 1 | subtract | `a.re - b.re` | `a.im - b.im` |
| 2 | multiply | `a.re*b.re - a.im*b.im` | `a.re*b.im + a.im*b.re` |

The unit holds four half-precision multipliers and two half-precision
adders/subtractors:

* For add and subtract, each adder handles one part.
* For multiply, the four multipliers form the partial products in parallel. The
  two adders then combine them, one subtracting and one adding.
* Every product and sum is rounded in the selected mode, exactly as separate IEEE
  instructions would be. A complex multiply therefore rounds twice per part. It is
  not a fused operation.
* The flags are the OR of the flags of every operator that took part.
* Codes 3 to 7 return 0 and raise the `illegal` output. The processor records an
  illegal code as *invalid*.

## The processor (`cfp_processor`)

### Pipeline and timing

The pipeline has two stages:

1. **Fetch.** The program counter addresses the RAM's read-only port A. The RAM
   reads synchronously, so the instruction word is available one cycle later.
2. **Execute.** `control_unit` decodes the word. The two register operands are read
   combinationally and all three arithmetic units compute. `bus_mux` selects the
   value to write back, and the register bank stores it at the end of the same
   cycle.

Because write-back happens in the execute cycle, the next instruction always sees
the new value. There are no operand hazards and no forwarding paths.

Only two events cost cycles:

* **Load stall.** A load computes its address in the execute stage and reads RAM
  port B. The data arrives one cycle later and is written back in that cycle. The
  instruction after the load is fetched again and executes one cycle late. Each
  load therefore costs 2 cycles.
* **Branch flush.** A taken branch discards the instruction already fetched. Each
  taken branch therefore costs 2 cycles.

Execution starts one cycle after `start`, which fills the pipeline. From a `start`
pulse to `done`, the cycle count is

    cycles = instructions + loads + taken branches + 1

The end-to-end testbench checks this formula.

### Host interface and sequencing

* `start` (a one-cycle pulse while idle or done) resets the PC to word 0, clears the
  sticky flags and the counters, and sets `busy`.
* `HALT` clears `busy` and sets `done` until the next `start`.
* While `busy` is low, the host owns RAM port B through `host_we`, `host_addr`
  (a word address) and `host_wdata`. `host_rdata` returns the addressed word one
  cycle later.
* The outputs `stall_count`, `flush_count` and `instr_count` report the last run.
* `rst_n` is a synchronous, active-low reset. It clears the registers and the
  control state. It does not clear the RAM.

### Instruction set

All instructions are 32 bits long, with this layout:

    [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  [15:0] imm16

| opcode | mnemonic | action |
|---|---|---|
| 0x00 | NOP | - |
| 0x01 | ALU | `rd = rs op rt`, op = `instr[3:0]` (`alu_op_t`: add, sub, mul, and, or, xor, sll, srl, sra, slt, sltu, nor) |
| 0x02 | FPU | `rd = rs op rt` in single precision; op = `instr[2:0]` (add, sub, mul, div, sqrt of rs), rounding mode = `instr[6:5]` |
| 0x03 | CPX | `rd = rs op rt` on complex words; op = `instr[2:0]` (0 add, 1 sub, 2 mul), rounding mode = `instr[6:5]` |
| 0x04 | ADDI | `rd = rs + sext(imm16)` |
| 0x05 | ORI | `rd = rs \| zext(imm16)` |
| 0x06 | LUI | `rd = imm16 << 16` |
| 0x08 | LW | `rd = mem[rs + sext(imm16)]` (word address, 1 stall cycle) |
| 0x09 | SW | `mem[rs + sext(imm16)] = rd` |
| 0x0A / 0x0B | BEQ / BNE | if `rd ==` / `!= rs`: `pc = pc + 1 + sext(imm16)` |
| 0x0C | RDFL | `rd = {27'b0, sticky flags}`, then clear the flags |
| 0x3F | HALT | stop, raise `done` |

Rounding-mode encoding: 0 nearest-even, 1 toward zero, 2 toward -inf, 3 toward +inf.

`cfp_pkg` has helper functions `enc_r` and `enc_i` that assemble instruction words.
`tb/tb_cfp_processor.sv` shows a complete program built with them.

Register 0 is an ordinary register. It is cleared by reset, and programs can use it
as zero if they never write it.

### Exception flags

Each FPU or CPX instruction ORs its five flags into a sticky register. `RDFL` reads
the register and clears it. The sticky register is also visible on the `fp_flags`
output.

## Files

| file | contents |
|---|---|
| `rtl/cfp_pkg.sv` | flag struct, rounding modes, operation and opcode enums, decoded-control struct, instruction encoders |
| `rtl/fp_round.sv` | shared rounding and packing stage |
| `rtl/fp_addsub.sv`, `fp_mul.sv`, `fp_div.sv`, `fp_sqrt.sv` | width-parameterised IEEE operators |
| `rtl/fpu32.sv` | single-precision unit |
| `rtl/op_decoder3to8.sv`, `rtl/cfpu16.sv` | operation decoder and complex unit |
| `rtl/int_alu.sv` | integer unit |
| `rtl/reg_bank.sv` | 32 x 32-bit register bank, 2 read ports, 1 write port |
| `rtl/onchip_ram.sv` | dual-port synchronous RAM, `BYTES` = 8192 by default, up to 65536 |
| `rtl/bus_mux.sv` | write-back bus multiplexer |
| `rtl/control_unit.sv` | instruction decoder |
| `rtl/cfp_processor.sv` | top level |
| `tb/fp_ref_pkg.sv` | reference floating point model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: `cfp_processor.RAM_BYTES` (default 8192; 65536 gives the 64 KB
configuration), `reg_bank.NREGS`/`WIDTH` (32/32), and `EXP_W`/`FRAC_W` on the four
operators.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog counts
a failure if a testbench hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/cfp_pkg.sv tb/fp_ref_pkg.sv tb/tb_cfp_processor.sv \
        --top-module tb_cfp_processor
    ./obj_dir/Vtb_cfp_processor

To run another testbench, replace `tb_cfp_processor` with its name (for example
`tb_fp_div`). Verilator finds the modules the testbench uses through `-y`.

**How the checks are made.** The testbenches check the operators against
`fp_ref_pkg`, which computes in double precision and then rounds to the target
format in the requested mode.

* Half-precision sums and products, and single-precision products, are exact in
  double precision.
* A double-precision quotient or square root of single-precision operands never
  lands on a single-precision rounding boundary unless it is exact. So the
  reference is correctly rounded for divide and square root as well.
* For single-precision adds in the directed rounding modes, the testbenches keep
  the exponent gap small enough that the double-precision sum is exact.

**Coverage.** Each arithmetic module sees 5,000 to 13,000 random and directed vectors. These
include NaNs, infinities, signed zeros, overflow, flush to zero and every rounding
mode.

**End-to-end test.** `tb_cfp_processor` runs at the default size (8 KB RAM). It
loads 64 random records and runs a loop of 28 instructions per record. The loop
uses every single-precision and complex operation, several rounding modes, integer
operations, loads, stores and branches. The testbench checks:

* all 640 stored results;
* the sticky flags, including forced overflow, divide-by-zero and an illegal complex
  code;
* the cycle-count formula;
* that every mechanism happened at least once: load stall, branch flush, each
  operation, each rounding mode and each flag.

It takes 2,131 cycles and a few seconds.

**64 KB configuration.** `tb_cfp_processor_64k` builds the processor with
`RAM_BYTES = 65536`. Its program loads from and stores to the top words of the
16,384-word memory. The testbench checks the results, confirms that nothing aliases
into the low 8 KB, and checks the cycle count.

## Where this design makes its own choices

The published description of this processor names its parts and their functions.
It does not give these details, so they are this design's own:

* **Instruction set and encoding.** The description gives only the 32-bit
  instruction width.
* **Pipeline.** The description gives only two pipeline stages. The execute-stage
  write-back, the load stall and the branch flush are this design's choices.
* **Memory organisation.** The description gives only 8 KB, extendable to 64 KB.
  Using one dual-port RAM for both program and data, with word addressing, is this
  design's choice.
* **Host port and start/done handshake.**
* **No subnormals.** Subnormal inputs are read as zero and tiny results are
  flushed.
* **Rounding modes.** The description asks only for rounding "according to the
  selected mode". The four IEEE modes are this design's choice.
* **Complex word layout.** The real part is in the upper half.
* **Fully parallel complex multiplier.** It uses four multipliers and two adders,
  rounded at each step.
* **Single-cycle divider and square root.** Both are combinational.
* **`illegal` output and *invalid* flag** for unused complex codes.
* **Integer operations beyond add, subtract and multiply.** There is no integer
  divide.

Two further points differ from, or go beyond, the description:

* **Product width.** The description gives the significand product of the complex
  unit's multiplier as 21 bits. The exact product of two 11-bit significands (hidden
  bit included) is 22 bits, and that is what is built.
* **Logic size.** The description claims the complex arithmetic needs fewer than
  5,500 logic gates. This implementation makes no attempt to meet or measure that
  figure. In particular, the single-cycle divider and square root are large.
