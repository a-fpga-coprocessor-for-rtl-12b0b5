# GAPPCO: a configurable sum-of-products coprocessor for geometric algebra

Geometric algebra programs, once a symbolic compiler has expanded and
simplified them, reduce to long lists of sums of products over the
coefficients of multivectors. GAPPCO runs such lists in hardware. It is an
array of identical floating point units, each computing sums of products,
joined by programmable routing. A compiler-generated configuration sets
every routing choice and unit mode, so one piece of hardware can run
different algorithms without being re-synthesised. The host processor
loads a configuration once, then for each data set writes the inputs,
starts a run and reads the results.

This repository holds synthesizable SystemVerilog for the coprocessor and
its AXI4-Lite host interface, with self-checking testbenches. The array
shape (two rows of eight units, 16 in all), the function of each block and
the host protocol follow the published description of the GAPPCO prototype
on a Zynq-7000 device. The internals of each block are this design's own,
because the description gives function, not implementation. Section
"What is specified and what is chosen" says which is which.

## The array

```
            host writes                                  host reads
                |                                            ^
        +---------------+                                    |
        | input file    |  32 words                          |
        +---------------+                                    |
          |          |                                       |
          |   row 1: 8 x (routing matrix -> Dot Vectors unit)|
          |          |                                       |
          |   +-------------------+                          |
          |   | intermediate file |  16 words (2 per unit)   |
          |   +-------------------+                          |
          |          |                                       |
          +----> row 2: 8 x (routing matrix -> Dot Vectors unit)
                     |                                       |
              +-------------+                                |
              | output file |  16 words ---------------------+
              +-------------+
```

* **Dot Vectors unit** (`dot_vectors_unit`). It takes eight single
  precision operands and forms four products, `p0 = op0*op1`, `p1 = op2*op3`,
  `p2 = op4*op5` and `p3 = op6*op7`. It has two modes. In *2x2* mode it
  gives `out0 = p0+p1` and `out1 = p2+p3`. In *1x4* mode it gives
  `out0 = (p0+p1)+(p2+p3)`, and `out1` still carries `p2+p3`. The mode is
  a configuration register. The unit is a three-stage pipeline: multiply,
  pair add, final add. It accepts one operand set per cycle, and results
  follow three cycles after `in_valid`.
* **Routing matrix** (`routing_matrix`). There is one in front of each unit.
  It holds eight 6-bit operand selects. A row-1 matrix chooses among the 32
  input words. A row-2 matrix chooses among the 32 input words (selects
  0-31) and the 16 intermediate words (selects 32-47). Any larger select,
  conventionally 63, gives +0.0, which removes a product from a sum. The
  chosen words are captured one cycle after `load`.
* **Register files** (`register_file`). There are three: input,
  intermediate and output. Every word is visible to the routing matrices
  at once. A row writes its results in one cycle: lane `l` writes `out0`
  to word `2l` and `out1` to word `2l+1`. The host writes the input file
  and reads the input and output files one word at a time.
* **Control unit** (`control_unit`). It distributes the configuration
  stream to the units and runs the two rows in sequence.

### Chaining units and running them in parallel

A single unit sums at most four products. Longer sums and multi-step
formulas use both rows. Row 1 computes partial sums into the
intermediate file. A row-2 unit can multiply an intermediate word by
another intermediate word or by an input word, because row 2 also sees the
input file. Units that work on one formula together form a larger
processing unit. Units that share nothing work in parallel within the same
run. Row 2's direct view of the input file matters for the common case
"scalar result of row 1 times an input coefficient". Without it, row 1
would have to waste units copying inputs forward.

### Worked example: reflecting a conformal vector

In the 5D conformal model (basis `e1, e2, e3, e+, e-`, with `e-^2 = -1`),
reflecting a vector `x` in a vector `a` gives

    x' = -a x a = (a.a) x - 2 (a.x) a

Each of `a.a` and `a.x` has five terms, one more than a unit can sum.
`tb/gappco_ref_pkg.sv` (`reflect_prog`) maps the formula onto the array:

| input word | 0-4 | 5-9 | 10 | 11 |
|---|---|---|---|---|
| content | a1..a5 | x1..x5 | -a5 | -2.0 |

| unit | mode | computes | to |
|---|---|---|---|
| row 1 lane 0 | 1x4 | a1x1+a2x2+a3x3+a4x4 | mid 0 |
| row 1 lane 1 | 2x2 | -a5*x5, -a5*a5 | mid 2, 3 |
| row 1 lane 2 | 1x4 | a1a1+a2a2+a3a3+a4a4 | mid 4 |
| row 1 lanes 3-5 | 2x2 | b_i = -2 a_i | mid 6-10 |
| row 2 lane i (i = 0..4) | 1x4 | mid4*x_i + mid3*x_i + mid0*b_i + mid2*b_i | out 2i |

So `a.a = mid4 + mid3` and `a.x = mid0 + mid2`, and each row-2 unit expands
`(a.a) x_i + (a.x) b_i` into four products. One reflection uses 11 of the
16 units. Each run therefore performs one reflection.

## Programming model

### Configuration stream

There are two 32-bit words per unit. Units are numbered
`stage*8 + lane`, from row 1 lane 0 up to row 2 lane 7, and the stream
sends them in that order, 32 words in all:

| word | bits | meaning |
|---|---|---|
| 0 | 31 | mode: 0 = 2x2, 1 = 1x4 |
| 0 | 6k+5 : 6k (k = 0..3) | select of operand k |
| 1 | 6k+5 : 6k (k = 0..3) | select of operand 4+k |

`encode()` in `tb/gappco_ref_pkg.sv` builds the stream from a table of
modes and selects. Writing bit 1 of CTRL clears the word pointer. After
32 words, STATUS.cfg_loaded is set. A further word is dropped and sets
STATUS.cfg_overflow. Words written during a run are dropped.

### Address map (AXI4-Lite, 32-bit data, 12-bit byte address)

| address | access | register |
|---|---|---|
| 0x000 | W | CTRL: bit 0 start, bit 1 clear configuration |
| 0x004 | R | STATUS: bit 0 busy, 1 done, 2 cfg_loaded, 3 cfg_overflow |
| 0x008 | W | CFG_DATA: next configuration word |
| 0x00C | R | CYCLES: busy cycles of the last run |
| 0x100 + 4i | RW | input register i, i < 32 |
| 0x200 + 4i | R | output register i, i < 16 |

CTRL and CFG_DATA read as 0. Any other address answers SLVERR. Write
strobes are ignored, so every write is a full word.

### A run

A start is ignored unless the configuration is loaded and no run is in
progress. Once a run starts, the control unit:

1. pulses `launch[0]`, and the row-1 routing matrices capture from the input
   file;
2. waits until row 1 reports results, 1 + 3 cycles later, and writes them
   to the intermediate file in that cycle;
3. pulses `launch[1]` in the next cycle, so row 2 reads the updated
   intermediate file;
4. writes row 2's results to the output file 4 cycles later and sets
   STATUS.done.

A run is busy for **10 cycles**. The testbenches check this number.
`done` stays set until the next start. The host polls STATUS, because
there is no interrupt.

## Bus interface timing

`axi_lite_slave` takes a write when AWVALID and WVALID are both high and no
write response is pending. AWREADY and WREADY are high in exactly that
cycle, and BVALID follows one cycle later. It takes a read when ARVALID is
high, no read data is pending and no write is taken in the same cycle.
RDATA and RVALID follow one cycle later. Writes win over reads because
the register files have one host address port. Responses hold until
accepted, and concurrent assertions check this.

## Floating point

`fp32_mul` and `fp32_add` are combinational IEEE-754 single precision
operators. They round to nearest, ties to even. For simplicity they treat
subnormal inputs as zero and flush results below the normal range to a
signed zero. Overflow gives infinity. NaN inputs, `inf*0` and `inf-inf`
give the quiet NaN `0x7FC00000`. An exact zero sum is +0, except
`-0 + -0 = -0`. Apart from flush-to-zero and the single NaN pattern, the
results match IEEE single precision bit for bit. The testbenches check this against double
precision references, which is valid because products of two singles are
exact in double precision and double rounding of single-precision sums is
harmless.

There is one register stage per operator level. At the prototype's
333 MHz clock, a real FPGA implementation would need deeper pipelining of
the multipliers and adders. That would change `DV_LATENCY` and the
10-cycle run length, and nothing else. No timing analysis has been done on
this RTL.

## What is specified and what is chosen

**Follows the published description:**

* 16 Dot Vectors units in two rows of eight, each with its own routing
  matrix;
* three register files (inputs, intermediate results, outputs);
* the second row reading both the input file and the intermediate file;
* the two unit modes (two sums of two products, or one sum of four);
* 32-bit floating point arithmetic;
* pipelined units;
* a control unit that distributes a configuration bitstream and
  supervises runs;
* attachment to the host through AXI with slave input and output registers;
* one clock shared with the host (333 MHz on the prototype);
* the run phases: the host writes inputs, the coprocessor reads them,
  computes and writes outputs, the host reads them.

**Chosen here, because the description is silent:**

* register file sizes (32 input words; 16 intermediate and 16 output
  words, two per unit);
* two result words per unit;
* the operand select encoding and the zero source;
* the configuration word format and loading order;
* the pipeline depths (capture register, then 3 stages);
* row-by-row sequencing and the control handshake;
* AXI4-Lite, the address map and the status bits;
* rounding, flush-to-zero and NaN conventions;
* asynchronous active-low reset: data registers reset to +0.0, units to 2x2
  mode and selects to the zero source.

**Known differences from the prototype:**

* A run processes one input set, and runs do not overlap. The prototype
  is reported to reach about 20 cycles per reflection over long series,
  and its host transfers are not described. Here a reflection costs
  10 cycles of computation inside about 63 bus cycles: 11 input writes, a
  start, status polling and 5 output reads, each a separate AXI4-Lite
  transaction of three cycles. Batching inputs, DMA and overlapping
  runs were not attempted, because nothing says how the prototype does it.
* The prototype maps its arithmetic onto DSP blocks (288 DSPs for 16
  units). Here the arithmetic is generic RTL, so resource figures will
  differ.
* The host processor and the compiler that produces configurations are
  not part of this RTL. The testbenches stand in for both.

## Files

`rtl/`:

* `gappco_pkg.sv`: sizes, the mode enum, the status struct, the
  configuration format and the address map.
* `fp32_mul.sv` and `fp32_add.sv`: the floating point operators.
* `dot_vectors_unit.sv`, `routing_matrix.sv`, `register_file.sv` and
  `control_unit.sv`: the blocks of the array.
* `gappco_core.sv`: the coprocessor array.
* `axi_lite_slave.sv`: the bus interface.
* `gappco_axi_top.sv`: the top level, made of the AXI slave and the core.

`tb/`:

* `fp_ref_pkg.sv`: reference single precision arithmetic.
* `gappco_ref_pkg.sv`: a bit-exact model of a run, the stream encoder,
  random programs and the reflection program.
* One `tb_<module>.sv` per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb_reflection_series.sv`: the reflection workload in series of 1, 10,
  100, 1000 and 10000 executions through the AXI port, each result
  bit-exact, reporting bus cycles per execution (63 with single-beat
  AXI4-Lite transfers that rewrite only the 11 changing input words and
  read only the 5 result words).
* `tb_gappco_axi_top.sv`: the end-to-end test at full size. Over AXI it
  exercises an ignored start, a configuration overflow, SLVERR
  responses, 12 random programs and 10 reflections, all bit-exact. It
  counts how often each mechanism happened and fails if one never did.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert --top-module tb_gappco_axi_top \
        -y rtl -y tb +libext+.sv rtl/gappco_pkg.sv \
        tb/fp_ref_pkg.sv tb/gappco_ref_pkg.sv tb/tb_gappco_axi_top.sv
    ./obj_dir/Vtb_gappco_axi_top

To run another testbench, replace the module and file name. Every
testbench finishes in well under a second of simulation time. To change
the array, edit `gappco_pkg`. `N_LANES`, `IN_REGS` and the latencies
are used symbolically throughout; the configuration word format assumes
6-bit selects. The reference model in
`tb/gappco_ref_pkg.sv` follows them too, except the reflection program,
which assumes at least 8 lanes and 12 input words.
