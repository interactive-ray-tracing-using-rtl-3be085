# A fixed-point SIMD array for ray tracing on handheld devices

Ray tracing is costly because every ray is tested against every object, and
each test needs multiplies, divides and square roots. This design does that
work on a chip suited to a phone or PDA. It uses no floating-point unit.
Instead, an 8x8 array of small 16-bit fixed-point processing elements runs the
same program on 64 rays at once. The clock stays moderate and each element
stays simple: single-cycle multiply with scaling, count-leading-zeros for
normalisation, and shifts take the place of floating point.

The RTL follows the MorphoSys II-G reconfigurable SIMD architecture
(MorphoSys-style array, context memory, two-bank frame buffer, DMA). The
architecture description fixes the block structure, most widths and sizes, and
the instruction classes. It leaves bit encodings, handshakes, the control
processor and several memory sizes open. Those are this design's own choices
and are listed under [Departures and own choices](#departures-and-own-choices).

## System structure

```
             main memory (outside)          control processor (outside)
                  |   mem_*                         | ctl_*, dma_*
        +---------+-------------+                   |
        |   dma_controller      |<------------------+
        +---+------------+------+                   |
            |            |                          |
   +--------v---+   +----v-----------+              |
   | frame_buffer|   | context_memory |<-- plane ---+
   | bank0 bank1 |   | 64 x (8 x 32b) |
   +--+------^---+   +-------+--------+
      | line |  line          | 8 contexts
   +--v------+----------------v-----+
   |      rc_array  (8 x 8 rc)      |<-- cell RAM port (from dma_controller)
   +--------------------------------+
```

* **rc_array**: 64 reconfigurable cells (RCs) in an 8x8 mesh. Each cell reads
  the 16-bit output of its north, south, west and east neighbours. The mesh
  wraps around at the edges.
* **context_memory**: the SIMD program. One entry ("plane") holds eight 32-bit
  contexts (instructions), 256 bits in all.
* **frame_buffer**: two banks of 128 lines x 8 words x 16 bits. The array
  uses one bank while the DMA controller fills or drains the other.
* **dma_controller**: moves 32-bit words between main memory and the frame
  buffer, in both directions, and from main memory into the context memory.
  It also moves 16-bit words into and out of any cell's RAM. Results can
  then leave a cell for the next stage of a pipeline of cores without a trip
  through the frame buffer.

| `dma_dir` | transfer | local address |
|-----------|----------|---------------|
| 0 | main memory -> frame buffer (bank not used by the array) | line * 4 + word pair |
| 1 | frame buffer -> main memory | same |
| 2 | main memory -> context memory | plane * 8 + slot |
| 3 | main memory -> cell RAMs (low 16 bits of each word) | (row * 8 + col) * 512 + word |
| 4 | cell RAMs -> main memory (zero-extended) | same |

A transfer moves `dma_count` words, one memory transaction each. Both
addresses count up by one per word. Each cell RAM has a second port for the
DMA, so transfers run while the array computes. If the DMA and the cell write
the same word in the same cycle, the cell's write wins.
* The **control processor** (a general-purpose RISC) and **main memory** are not
  part of the RTL. `mgx_top` brings out their connections as ports.
  `tb/main_memory_model.sv` is a simple memory model for simulation.

## Row and column streams

Each cycle the control processor may issue one plane (`ctl_issue`,
`ctl_plane`). The eight contexts in the plane go out in one of two ways:

* column mode (`ctl_row_mode = 0`): every cell of column *c* runs context *c*;
* row mode (`ctl_row_mode = 1`): every cell of row *r* runs context *r*.

So up to eight different instruction streams run side by side, one per
column or one per row. This is how rows or columns can work on different
object types at the same time. If all eight contexts are equal, the whole
array runs one program.

The frame buffer feeds the array across the other dimension. In row mode,
cell (r,c) sees word *c* of the line being read. A row-mode plane in which
only row *r* loads from the frame buffer (the other rows get NOPs) therefore
gives that row a full line, one word per cell. Eight such planes fill the
whole array (see `run_batch` in `tb/tb_mgx_top.sv`). Results go back the same
way: `ctl_fb_we` writes the outputs of row `ctl_line_sel` (row mode) or of
that column (column mode) as one frame-buffer line.

**Timing.** A plane issued in cycle *t* is captured by every cell's context
register at the end of *t*. It executes in cycle *t+1*, and its results are in
the registers and output register from *t+2* on. The frame-buffer read address
(`ctl_fb_raddr`) and the row/column mode go with the plane and are registered
with it.

## The reconfigurable cell

```
  FB, N,S,W,E --[Mux A]--+                 R0..R15
                         +--[Mux N]-- left16 ---+----------+
  reg file --[Mux M]-----+                      |          |
  reg file --[Mux B]------------- right16 --+   |          |
                                            v   v          |
                                         16x16 multiplier  |
                                                | 32       |
     {left16, product, pair A} --[Mux C]--> a   v          |
     {right16, Rout, pair B}   --[Mux D]--> b  ALU (32) ---+
                                                |
                                           shifter (32)
                                                |
                            register file (16 or 32 bits), Rout (32)
  512x16 RAM  <-- base+index / base+register addressing
```

Each cell executes one context per clock. Its parts are a 16x16 signed
multiplier, a 32-bit ALU (add, subtract, and, or, xor, pass, count leading
zeros), a 32-bit shifter placed after the ALU, and a 32-bit output register
(Rout) whose low half goes to the neighbours and the frame buffer. It also has
sixteen 16-bit registers, which can be used as eight 32-bit pairs
({R(2k+1),R(2k)}), and a 512x16 RAM.

### Fixed-point scaling

Operands are 16-bit two's-complement fixed-point numbers. The programmer
chooses where the binary point lies. For a product of a Qm.n and a Qp.q
number, the 32-bit product has n+q fraction bits. A `MUL` context with a right
shift of *s* places the wanted bits in the low 16 bits that are written back.
For example, Q8.8 x Q8.8 uses s = 8. Since this is a single context, a scaled
fixed-point multiply costs one cycle.

`MAC` adds the product to Rout (or, with `ext[2]`, to the destination register
pair) and then applies the same shift. The order is accumulate first, then
shift, because the shifter sits after the ALU. If each product must be scaled
before it is added, use `MUL` followed by `ADD`.

`CLZ` (16-bit, or 32-bit on a pair) and `SHIFT16` (shift count taken from a
register) are there for normalisation. Typical uses are block floating point
and scaling a divisor into [1/2, 1). In block floating point, a group of
numbers shares one exponent and all of them are shifted together when one
grows too large.

### Context format

| bits    | field | meaning |
|---------|-------|---------|
| [31:27] | op    | opcode |
| [26:23] | dst   | destination register (source register for `ST`) |
| [22]    | sdir  | shifter direction: 0 left, 1 arithmetic right |
| [21:17] | nsh   | shift count; tag for `PBR` / `LABEL`; load count for `MLD` |
| [16:12] | muxa  | `0rrrr` register r; `10sss` external: 0 FB, 1 N, 2 S, 3 W, 4 E |
| [11:7]  | muxb  | register (bits [3:0]) |
| [6:4]   | ext   | [0] write flags, [1] 32-bit pair operation, [2] MAC accumulates dst pair |
| [3:0]   | gcond | guard condition |

`LDIMM` puts a 16-bit constant in [15:0]. The opcodes are `NOP ADD SUB AND OR
XOR MOV CMP MUL MAC LDIMM SHIFT16 CLZ LD ST LDT SETBASE PBR LABEL MLD`
(values 0..19, see `rtl/mgx_pkg.sv`). The guard codes are `AL EQ NE MI PL CS CC VS VC
LT GE GT LE` (0..12) and `NV` (15), with the usual ARM-like meanings on the
C, Z, S, V flags. `mk_ctx()` and `mk_ldimm()` in the package build context
words.

### RC RAM

`SETBASE` loads the base register from the left operand and clears the index.
`LD`/`ST` then use base+index and increment the index after each access. `LDT`
uses base+register, which is the data-dependent table look-up each cell does
on its own (e.g. the seed tables of a square root). Reads are combinational,
so a load completes within its own context.

`MLD dst, n` (multiple load, n = 1..3 in `nsh[1:0]`) starts n base+index
loads into registers dst, dst+1, ... They happen one per cycle in the cycles
after the `MLD` executes, and write through a second register-file port, so
the ALU keeps running the contexts that follow. The first loaded register is
readable two contexts after the `MLD`, the k-th one k+1 contexts after it.
Those following contexts must not use the RAM themselves; an assertion in
`rc_control.sv` checks this. If one of them writes a register that a load also
writes, the context's write wins.

## Conditional execution without a program counter

The cells have no program counter, since all of them receive the same
instruction stream. Data-dependent control flow is emulated in two ways.

**Guarded contexts.** ALU, `MUL`, `MAC`, `SHIFT16` and `CLZ` contexts carry a
guard condition. A cell whose flags fail the guard does nothing for that
context. `CMP`, or any context with `ext[0]` set, writes the flags.

**Pseudo branches.** `PBR tag, cond` is a guarded "branch". In a cell where
the condition holds, the cell goes to sleep with that tag. It then ignores
every following context until a `LABEL` with the same tag arrives, and that
label wakes it. Contexts inside a skipped block are ignored, including other
`PBR`s and `LABEL`s with other tags. Nested if-then-else therefore works as
long as each branch target has its own tag:

```
CMP  R1, R9            ; flags from D - 0.75
PBR  1, GE             ; D >= 0.75: skip the then-part
LDIMM R8, 1            ;   then-part
PBR  2, AL             ;   skip the else-part
LABEL 1
LDIMM R8, 2            ;   else-part
LABEL 2
```

Cells in which the condition differs take different paths through the same
stream. The `cell_sleeping` and `cell_executed` outputs show which cells are
nullified, for example to gate their clocks. `LDIMM` and memory contexts have
no guard field, but pseudo-branch sleep still nullifies them.

## Division and square root on the array

Division Q = N/D is done as N x (1/D). D is first normalised into [1/2, 1)
(with `CLZ` and a shift). The reciprocal then comes from the Newton-Raphson
step x <- x(2 - xD). The seed needs no table: with D = 0.1XXX..., the seed
1.YYY takes YYY = NOT XXX, which is one `XOR`/`AND` pair. Two iterations give
about 16 correct bits. The reciprocal takes 12 contexts. `tb/tb_mgx_top.sv`
runs it on all 64 cells inside a 31-context kernel, which also parks the
result in the RAM and reads it back with `MLD`. In Q3.13 the results stay
within 3 LSB of 2^28/D. `tb/tb_workload_div.sv` runs a complete 16-bit
division N/D on all 64 cells in 27 contexts. The operands come in and the
quotients go out through the cell-RAM DMA port. The kernel steps are:

* k = CLZ(D);
* Dn = D << (k-1), a shift by a register count;
* take the reciprocal of Dn;
* t = (N x) >> 14, a multiply with scaling;
* Q = t >> (15-k).

The quotients stay within 1 + (N/D)/512 of N/D. A 32-bit dividend adds a
second multiply for the upper half and a 32-bit register-pair add.

The square root is computed as z * (1/sqrt z), using x <- 1.5x - 0.5 z x^3. The
first iteration's 1.5x0 and 0.5x0^3 come from two small tables in each cell's
RAM (`LDT`), indexed by the top four fraction bits of z. `tb/tb_workload_sqrt.sv`
runs this on all 64 cells of the array for 16-bit z in [1/4, 1): a table step
and then two Newton steps. Each result is checked against the same
fixed-point steps and against sqrt(z), within 8 LSB. The 32-bit version would
need about 65 contexts, one more than the 64 context planes, so it needs a
context-memory reload by DMA partway through.

## Ray tests in column streams

`tb/tb_workload_rays.sv` runs ray-sphere hit tests for 64 rays at once. Each
cell's RAM holds one ray direction d. Columns 0..3 test one sphere and
columns 4..7 another. Only the planes that load the sphere constants differ
between the two column groups, so two objects are tested in one pass. The
kernel is in Q3.12 and takes 27 contexts:

* tca = C.d and d.d, each as one `MUL` and two `MAC`s, with the 12-bit
  scaling shift applied on the last `MAC`;
* disc = tca^2 - (d.d)(C.C - r^2), by a subtraction that writes the flags;
* hit = disc >= 0 and tca > 0, by two guarded `MOV`s.

Hit flags and discriminants leave through the RAM DMA port. They are checked
against the same fixed-point steps and against real-valued geometry.

## Parameters

| parameter | default | from the architecture description? |
|-----------|---------|-----------------------------------|
| `mgx_top.N`, `rc_array.N` | 8 (8x8 = 64 cells) | yes |
| contexts per plane | 8 x 32 bits | yes |
| register file | 16 x 16 bits, 8 pairs | yes |
| RC RAM | 512 x 16 bits | yes |
| multiplier / ALU / shifter | 16x16 / 32 / 32 bits | yes |
| neighbour bus | 16 bits | yes |
| `CM_DEPTH` (planes) | 64 | no, chosen |
| `FB_LINES` (per bank) | 128 lines x 8 words | no, chosen |
| DMA / main-memory word | 32 bits | no, chosen |

`N` must be even (the frame buffer's DMA port packs two words per 32-bit
access). Rows and columns are equal, since each plane holds N contexts.

## Departures and own choices

* Context bit layout, opcode values, guard codes and flag rules are this
  design's. The source names the instruction classes and fields but gives no
  positions.
* Pseudo-branch mechanism (sleep with a tag until the matching `LABEL`) is
  this design's. The source only requires that a branch-like context nullify
  the block up to a tagged target and support nesting.
* MAC adds and then shifts (see above). One reading of the source shifts the
  product before adding it.
* The operand multiplexers' exact input sets are an interpretation of the cell
  block diagram.
* The multiple load's encoding and timing (one load per cycle after the
  `MLD`, second register-file write port) are this design's. The source
  only says that up to three RAM operands can be loaded alongside ALU
  operations.
* DMA into and out of the cell RAMs goes to main memory. The source describes
  passing RAM data on to another core, but the second core and the link
  between cores are not part of this design.
* Not built: the per-cell express outputs and the quadrant-level links of
  the array. The source shows them but gives too little detail to build
  them.
* Not built because they are outside the core: the control processor, its
  cache and main memory.

## Using the RTL

All files are SystemVerilog 2017. `rtl/mgx_pkg.sv` must be compiled first.
Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mgx_pkg.sv tb/tb_mgx_top.sv --top-module tb_mgx_top
./obj_dir/Vtb_mgx_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_mgx_top` | whole core at default size: DMA of program and data, bank swaps with DMA overlapping execution, row/column planes, reciprocal kernel on 64 cells, guarded and pseudo-branched code, neighbour transfer, multiple load, results drained to memory, DMA out of every cell's RAM and into one |
| `tb_rc_array` | row/column broadcast, frame-buffer mapping, neighbours with wrap, output line, per-column if-then-else, DMA port of the cell RAMs |
| `tb_rc` | every context type, scaling, MAC, guards, nested pseudo branches, RAM modes, multiple load beside ALU contexts, 2-cycle latency |
| `tb_workload_div` | 16-bit division on all 64 cells: CLZ normalisation, reciprocal, multiply, shift back |
| `tb_workload_rays` | ray-sphere hit tests, two spheres in two column streams, 64 rays |
| `tb_workload_sqrt` | square root by table seed and Newton steps on all 64 cells of the array |
| `tb_rc_control` | all 16 guard codes x 16 flag values, decode, sleep/wake |
| `tb_rc_alu`, `tb_rc_shifter`, `tb_rc_multiplier`, `tb_rc_regfile`, `tb_rc_ram`, `tb_rc_operand_mux` | the datapath parts, against reference arithmetic |
| `tb_context_memory`, `tb_frame_buffer`, `tb_dma_controller` | storage and transfers against shadow models |

To add a context type, extend `op_e` in the package and its decode in
`rc_control.sv`. The datapath is driven only through the `ctrl_t` struct.
