# FloRA: floating point on a 16-bit coarse-grained reconfigurable array

FloRA is an 8x8 array of small 16-bit integer processing elements (PEs). It is
reconfigured every cycle from a context memory, and it runs the inner loops
of a kernel for a host processor. It has no floating-point unit. A
floating-point operation is instead carried out by **two neighbouring integer
PEs working as a pair**, called an FPU-PE cluster:

- the *mantissa PE* handles the sign and the fraction;
- the *exponent PE* handles the exponent.

The pair runs a fixed sequence of micro-steps for several cycles. It passes
flags and partial values over a dedicated link, and it borrows the row's
shared integer multiplier, divider or square-root unit where it needs one.
The few extra pieces each PE needs are:

- a leading-one detector in the mantissa PE;
- an exponent saturator in the exponent PE;
- a small FSM and a decoder extension in both.

This costs far less area than a floating-point unit in every PE.

This repository holds synthesizable SystemVerilog for the reconfigurable
computing module (RCM): the PE array, the configuration memory, the
configuration control unit, the double-buffered data memory with its format
converters, and a small execution controller. The host processor, the DMA
engine and the system bus are not part of it. The top module `flora_rcm`
brings their side out as a simple host port.

## Number format

The data memory holds ordinary IEEE-754 single-precision words. The 16-bit
PEs work on a reduced 24-bit format that is split over the two PEs of a
cluster:

| PE        | 16-bit word                         |
|-----------|-------------------------------------|
| mantissa  | `{sign, fraction[22:8]}`            |
| exponent  | `{8'h00, exponent[7:0]}` (bias 127) |

The conversion happens on the row buses between memory and array, in
`fp_bus_if`:

- on a load, the 8 least significant fraction bits are dropped;
- on a store, they come back as zeros.

Each bus has its own FP/integer mode bit. A kernel can therefore read floats
on one bus and integers on the other.

The rules for special values are this design's own:

- exponent 0 means zero (there are no denormals), and a result that
  underflows is flushed to zero;
- overflow gives exponent 0xFF with a zero fraction (infinity);
- x/0 gives infinity;
- the square root of a negative number and 0/0 give a NaN (exponent 0xFF,
  fraction 0x4000);
- there is no other special-value decoding. An input with exponent 0xFF is
  treated as a very large number, so results involving it normally overflow
  to infinity again;
- results are rounded half-up on the first dropped bit. This is not IEEE
  round-to-nearest-even, so expect up to about 1 ulp of the 15-bit fraction
  per operation.

## How a cluster executes an operation

Both PEs of a cluster receive the same FP opcode in the same cycle (an
assertion checks this). Each then steps through its own half of the
schedule. Messages on the pair link are registered, so something sent in
step *k* is used in step *k+1*. Latencies, counted from issue until the
result is in the output register and usable by the next context:

| op          | cycles | what happens                                                                                                                                                                                                                                                                                                                    |
|-------------|--------|---------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| FADD / FSUB | 6      | **E** compares the exponents and sends the difference; **M** compares fractions. **M** aligns the smaller operand, then adds or subtracts. **M** finds the leading one and sends its position. **E** forms the exponent and sends the saturation flags for both rounding outcomes. **M** normalises and rounds; each PE then applies the flags. |
| FMUL        | 4      | **E** adds the exponents and subtracts the bias. **M** sends the fractions to the row multiplier and normalises by the product's top bit. **E** adds the carry and saturates. **M** rounds.                                                                                                                                             |
| FDIV        | 7      | **E** subtracts the exponents and adds the bias. **M** uses the row divider (`floor(a*2^18/b)`, 5-cycle pipeline). **E** corrects by the quotient's top bit and checks zero, infinity and NaN. **M** rounds.                                                                                                                         |
| FSQRT       | 7      | **E** tells **M** whether the unbiased exponent is odd. **M** shifts the radicand by one more bit if it is and uses the row square-root unit (4-cycle pipeline). **E** halves the exponent with `(e-127)>>>1 + 127`. Negative inputs give NaN.                                                                                        |
| MUL (int)   | 2      | The row multiplier, low 16 bits of the product.                                                                                                                                                                                                                                                                                 |
| others      | 1      | ADD SUB ABS AND OR XOR SHL SHR SRA MIN MAX SLT MOV                                                                                                                                                                                                                                                                              |

The four FP latencies are the document's figures. So is the order of the
steps. FADD, FDIV and FSQRT follow its prose, and FMUL follows its
cycle-by-cycle chart. The exact cycle of each micro-step within that order,
the message format and the rounding are this design's own.

While a PE is busy, it ignores the new contexts that arrive. The mapping must
leave those slots empty.

## The array

Rows 2k and 2k+1 of each column form a cluster. The mantissa PE is in rows 0,
3, 4 and 7, so clusters alternate M/E, E/M, M/E, E/M from the top. This places
the mantissa PEs where the shared units are:

- every row has a pipelined multiplier;
- rows 0, 3, 4 and 7 also have a divider;
- rows 0 and 7 have a square-root unit.

So FDIV runs in any row pair, but FSQRT only in the top and bottom pairs.

Each PE reads these sources:

- its four mesh neighbours and the PEs two hops away (edges read 0);
- its partner's output;
- one of four local registers;
- a 7-bit signed immediate;
- the two row read buses;
- its own output.

The document also mentions some 3-hop and pair-wise links. Their placement is
not given, so they are not built.

Units and buses shared by a row have no arbiter. Requests are ORed together
and the result is broadcast. The configuration must give each unit and bus at
most one user per cycle, and assertions in `pe_array` report violations in
simulation.

## Mapping a kernel: temporal mapping with loop pipelining, or spatial

In temporal mapping, the default, the configuration memory delivers one
32-bit context word per row every cycle. Column 0 executes it immediately. Each further column receives the same
word one cycle later than its left neighbour, and it adds its column number
to the context's bus address. Column *c* therefore runs loop iteration *c* on
data at address `addr + c`. Eight iterations are in flight, each one cycle
behind the previous.

Consequences for whoever writes contexts:

- **Row buses.** Context *k* of column *c* runs in cycle *k + c*. Two
  contexts of one row that use the same bus must therefore be at least 8
  steps apart. Keep values in the register file instead of reloading them.
- **Neighbour links.** The west neighbour's output, read by context *k*, is
  that neighbour's result of context *k*. A chain of `ADD SELF, W` therefore
  forms a running sum along the row. The east neighbour is two contexts
  behind. Vertical neighbours show their result of context *k-1*.

Context word (bit 31 down to 0):

```
imm[6:0] | addr[5:0] | st | rf_wa[1:0] | rf_we | rf_ra[1:0] | sb[3:0] | sa[3:0] | op[4:0]
```

- `sa`/`sb` select the sources: W E N S W2 E2 N2 S2 PAIR RF IMM BUS0 BUS1
  SELF ZERO.
- `st` drives the output onto the row write bus at `addr + column`.
- `rf_we` writes the result, including a multi-cycle result, into register
  `rf_wa`.

The opcode numbers are in `rtl/flora_pkg.sv`.

### Spatial mapping

The array can also run with a fixed layout instead of loop pipelining.
Setting BUSCFG bit 9 selects spatial mapping:

- every PE executes its own context word in the cycle it arrives;
- bus addresses are used as written, with no column offset;
- a dataflow graph is laid out over the whole array, and data streams
  through the neighbour links.

### Configuration memory and MCOs

The configuration memory is an 8x8 grid of configuration elements (CEs), one
per PE. Each CE holds 22 context words, 5632 bytes in all. The two mapping
modes view the CEs differently:

- **temporal:** the eight CEs of a row form one 176-word list for that row.
  Address *a* is word *a* % 22 of CE *a* / 22.
- **spatial:** address *a* (below 22) reads word *a* of every CE, giving one
  word per PE.

The host writes context words at index `entry*8 + row`, where `entry` is the
temporal address. In spatial terms, word *w* of the CE in column *c* is
entry `c*22 + w`.

The configuration control unit (`ccu`) does not step through it linearly. It
executes a list of up to 64 macro-configuration operations (MCOs), each
`{last[15], count-1[14:8], start[7:0]}`. Each MCO issues `count` consecutive
configuration addresses, one per cycle. Repeating an MCO replays a block of
contexts without storing it twice.

## Data memory and double buffering

The data memory has two sets. Each set has three banks of 64 entries, and an
entry has four 32-bit lanes, one per row pair (6144 bytes in all).

- The array uses one set. The host reads and writes the other, so data for
  the next kernel can be loaded while the current one runs. A swap command
  exchanges the sets.
- Each of the three row buses (read 0, read 1, write) is attached to any
  bank by the BUSCFG register.
- In FP mode, a lane word is split by the converter into the mantissa and
  exponent words of the pair. On a store, the pair's two words are packed
  back into one lane word at the mantissa PE's address.
- In integer mode, the low half-word of a lane belongs to the even row and
  the high half to the odd row.

## Host interface and control

`flora_rcm` has a synchronous host port: `h_en`, `h_we`, `h_addr[15:0]` and
`h_wdata[31:0]`. `h_rdata` is a combinational read. `irq_done` stays high
when a kernel has finished. `h_addr[15:12]` selects the region:

| region | contents                                                                                                                                                                                                         |
|--------|------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| 0x0    | configuration memory, word `entry*8 + row`                                                                                                                                                                       |
| 0x1    | MCO table, word = MCO index                                                                                                                                                                                      |
| 0x2    | data memory, host set: `{bank[1:0], entry[5:0], lane[1:0]}`                                                                                                                                                      |
| 0x3    | control. Word 0 CTRL (write bit0 = start, bit1 = swap sets). Word 1 STATUS (bit0 busy, bit1 done, bit2 active set). Word 2 BUSCFG (bank of read bus 0 [1:0], read bus 1 [3:2], write bus [5:4]; FP mode of the three buses [8:6]; spatial mapping [9]; reset 0/1/2, integer, temporal) |

A start makes `exec_ctrl` launch the CCU. When the last MCO has issued its
addresses, `exec_ctrl` waits a fixed 9 cycles (`COLS+1`) for the last column
to receive its contexts, then until no PE is busy, and then raises done. A
swap request is ignored while a kernel runs.

The document's system has an ARM7-class processor, a DMA engine and an AHB
bus around the RCM. Here these are replaced by this port, and its protocol
and address map are this design's own.

## Where this design departs from, or adds to, the document

- Rounding, special values, the context-word layout, the instruction set,
  the MCO field layout, the register map and the host port are this design's
  choices. The document gives sizes and latencies, not these encodings.
- The document only cites the organisation of its hybrid configuration
  memory. The CE grid and the way temporal addresses map onto it are this
  design's own.
- Only mesh and 2-hop links are built. The 3-hop and pair-wise links are
  not.
- The later enhancement that overlaps two FP operations in one cluster and
  forwards results between dependent operations is not built.
- The row divider and square-root unit are generic restoring and
  digit-by-digit designs. Their pipeline depths (5 and 4) are chosen so that
  FDIV and FSQRT take the document's 7 cycles.

## Files

- `rtl/flora_pkg.sv`: widths, latencies, opcode and source enums, context
  and pair-message structs.
- `rtl/flora_rcm.sv`: the top.
- `rtl/exec_ctrl.sv`, `rtl/ccu.sv`, `rtl/config_memory.sv`,
  `rtl/data_memory.sv` and `rtl/fp_bus_if.sv` (bus multiplexers and FP
  converters): control, configuration and memory.
- `rtl/pe_array.sv`, `rtl/fpu_pe_cluster.sv` and `rtl/pe.sv` (which uses
  `lod` and `exp_sat`): the array.
- `rtl/shared_mult.sv`, `rtl/shared_div.sv`, `rtl/shared_sqrt.sv`: the
  row-shared units.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_flora_rcm` runs the whole module at its default size through the host
port:

- a floating-point kernel with FMUL+FADD (including an overflow to infinity),
  FDIV, FSUB and FSQRT over eight pipelined iterations;
- an integer kernel with a repeated MCO and shared-multiplier MULs;
- a spatially mapped kernel in which data flows along the rows;
- while the first kernel runs, loading of the second kernel's data into the
  other set.

`tb_wl_complex_mult` runs complex multiplication kernels on the full
module:

- floating point: 16 products at once, done 32 cycles after the start;
- 16-bit integer: 32 products at once, done 25 cycles after the start.

`tb_wl_dot_product` runs the 1x4 dot product in the same way, with the
running sum kept in register 0:

- floating point: 32 results at once, done 52 cycles after the start;
- 16-bit integer: 64 results at once, done 41 cycles after the start.

`tb_fpu_pe_cluster` compares random FP operations with a real-number
reference and checks every latency.

## Simulating

With Verilator 5 (two-state; the testbenches initialise what they read):

```
verilator --binary --timing --assert -Irtl rtl/flora_pkg.sv \
  $(ls rtl/*.sv | grep -v flora_pkg) tb/tb_flora_rcm.sv \
  --top-module tb_flora_rcm -o sim && ./obj_dir/sim
```

Replace the testbench and top-module names to run another test. All
testbenches finish in well under a second of wall time. Verilator's lint
warnings that remain are unused bits of shared structs and wires, such as
the exponent PE's unused divider ports in a cluster, plus the reset
appearing in assertion `disable iff` clauses.
