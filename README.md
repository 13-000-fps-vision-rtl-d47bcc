# Column-parallel vision SoC with charge-domain filtering

This is the digital core of a single-chip vision sensor that measures laser
sheet-of-light profiles at over ten thousand profiles per second. The sensor
does not read out images. Every pixel column has its own small processor. The
pixel rows are summed as charges on the column line, with a chosen sign per row,
which gives a convolution across rows in the analog domain. Each column
digitises its sum with a counting ADC, and its processor keeps only what
matters, such as where along the column the laser line lies. A sparse output
chain then ships just the columns that found something. Three small 16-bit
stack processors (ASIPs) run the chip. They step the pixel rows, broadcast
instructions to the columns, and talk to the outside.

The RTL covers everything digital: the 1024-column SIMD array, its output
chain and the three control processors. The pixel field, readout amplifiers,
current sources, comparators and analog memory are analog. Their digital
controls are ports of `vsoc_top`. A behavioural model of them,
`tb/analog_column_model.sv`, is used only by the testbenches.

## How a measurement runs

The end-to-end testbench runs one coarse sheet-of-light scan. The steps are
the same on the real chip:

1. **LCTRL** (line control) clears the column charges. It then adds the
   charges of rows `k+C/2 .. k+C-1` positively and of rows `k .. k+C/2-1`
   negatively. Each column now holds a first-derivative box filter of size
   `C` at window position `k`. LCTRL sends an event to the SIMD ASIP and waits.
2. **SIMD** clears all ADC counters and issues ADC `STEP` instructions. Each
   step fires the current sources through `adc_pulse`, which removes a fixed
   charge from every column. Each column counts steps until its comparator
   trips, so the count is the charge in units of one pulse. Single slope is
   one run of steps. Other curves (dual slope, non-linear) are other step
   sequences, because the conversion is pure program.
3. Each column compares the new count with its running maximum (ALU `SUB`,
   then borrow to flag, then `IF`). Under the `IF` it stores the count and
   the window index. The same is done with the polarity reversed for the
   minimum.
4. After all windows, a column whose peak exceeds a threshold sets a flag.
   The neighbour look-up table keeps that flag only if a neighbouring column
   also sees the line. Those columns push `{kmax, kmin}` in 16-bit mode.
5. SIMD polls the output chain until it drains and signals **GLB**, which
   reports completion.

A second, fine pass would follow on the chip. It uses a 7-tap derivative at
step 1 around the coarse position and sub-pixel interpolation around the zero
crossing. It needs no hardware beyond what is here, because it is another
program. It is not part of the testbench.

## The column processing element (`pe`)

All columns execute the same 32-bit instruction in the same cycle. Each column
has:

| state | meaning |
|---|---|
| `r0..r7` | 8-bit working registers |
| `f0..f7` | 1-bit working flags |
| C, Z, N | status of the last 8-bit ALU operation |
| `adch:adcl`, comp, ovf | 12-bit ADC counter, latched comparator, counter wrap |
| `lut` | neighbour look-up table result |
| `src0 src1 ampp ampn` (8 bit), `pixm` (5 bit) | settings of the column's analog readout and analog-memory cell |
| `sel` | column selector; a selected column drives its scatter group |
| enable, flag stack, activity select | conditional execution |
| 128 x 8 memory | `pe_mem`, direct or `imm + r[i]` addressing |

**Operands.** An operand is 5 bits, `{side, idx}`. Side 0 is the column's own
register or flag, 1 is the left neighbour's, 2 is the right neighbour's, and
3 is special. Special byte operands are: the immediate, `adcl`, `adch`, the
scatter bus, `lut`, and the column index (low and high bits). Special flag
operands are: C, Z, N, `lut`, comp, ovf, `sel` and constant 1. Columns 0 and
N-1 read zero for the missing neighbour.

**Instruction word** (`vsoc_pkg::pe_instr_t`):

```
[31:28] class   [27:24] op   [23:21] dst   [20:16] a   [15:11] b   [10:8] csf   [7:0] imm
```

| class | effect |
|---|---|
| `C_ALU` | `r[dst] = a op b`. The ops are ADD SUB AND NAND OR NOR XOR XNOR SHL SHR MOV NOT MIN MAX ADC SBC. |
| `C_ALU_CS` | Same, but columns whose `f[csf]` is set run the paired inverse operation. This is complement selection. |
| `C_FLAG` | `f[dst] = a op b` on flag operands: AND NAND OR NOR XOR XNOR MOV NOT |
| `C_MEM` | `LD`/`ST` of `r[dst]` at `imm[6:0]`. If `a.side[0]` is set, `r[a.idx]` is added to the address. |
| `C_CTRL` | `IF a (inverted if csf[0])`, `ELSE`, `ENDIF`, `SETACT` (activity = flag `a`, optionally inverted), `RESET` |
| `C_ADC` | `CLR`, or `STEP` (count unless tripped; also drives `adc_pulse`) |
| `C_SPW` | write `src0 src1 ampp ampn pixm sel adcl adch` from operand `a` |
| `C_LUT` | `lut = imm[{left f[i], f[i], right f[i]}]` with `i = a.idx` |
| `C_SCAT` | set the scatter group size, or the register that selected columns drive |
| `C_OUT` | set the output mode (8/16/24/32 bit), or push `{r[d+3], r[d+2], r[d+1], r[d]}` |

The ALU operations come in pairs that differ only in opcode bit 0. That is how
complement selection can swap "ADD" for "SUB" per column at no cost.
`vsoc_pkg` has builder functions (`pe_i`, `own`, `lft`, `rgt`, `spc`) for
writing programs.

**Conditional execution.** A column is *active* when two things hold: its
enable bit is set, and the flag chosen by the activity multiplexer (or its
inverse, or constant 1) is 1. Inactive columns change no register, flag,
memory word or counter, and push nothing. The flag stack, 8 levels deep,
handles nested IFs:

- `IF c` pushes the enable bit and sets `enable &= c`.
- `ELSE` sets `enable = top & ~enable`.
- `ENDIF` pops the stack.

An empty stack reads 1. Overflowing the stack is reported by an assertion in
simulation.

**ADC counting.** `STEP` samples the comparator before the pulse of the same
cycle takes effect. So after `n` steps a column with charge `q > 0` holds
`min(n, ceil(q / unit))`. Once the comparator has tripped, the column stops
counting until the next `CLR`. The counter is writable through `adcl`/`adch`,
so a conversion can start from a preset value.

## Scatter unit: macro PEs

`scatter_unit` splits the array into aligned groups of 1, 4, 8 or 16 columns.
Every selected column (`sel = 1`) of a group drives the register named by the
last `C_SCAT` source instruction. All columns of the group read the OR of
those values in the same cycle, as the special operand "scatter bus". With
one selected column per group this is a broadcast across up to 16 columns.
With single-bit values it is an any-of test. The OR tree is combinational.

## Sparse output chain (`out_pipeline`)

Each column has a 2-word FIFO. A chain of stages runs from the last column to
column 0. A stage forwards the word of the stage above it if there is one;
otherwise it takes from its own FIFO. Stage 0 drives the output stream: column
index, data (masked to the mode's width) and byte count. The stream uses a
valid/ready handshake.

- Throughput is one word per cycle.
- A word from column `c` reaches the output `c + 2` cycles after its push,
  when the chain is empty.
- A push into a full FIFO loses the word and sets a sticky `overflow`.
- `busy` tells the program when everything has left.

Because the chain favours upstream words, a heavily loaded high-numbered
region can delay the low columns. Programs push at most one word per column
between drains.

## Control processors (`asip_core`)

There are three instances: ASIP 0 is GLB, ASIP 1 is LCTRL and ASIP 2 is SIMD.
Each has a 4096 x 16 program memory, a 256-word stack and a 2048 x 16
scratchpad, and executes one instruction per cycle. The top of stack is a
register; the rest of the stack lives in an array.

| opcode | action |
|---|---|
| `PUSH imm12`, `LUI imm4` | push a constant / set bits 15:12 of the top of stack |
| `DUP DROP SWAP OVER`, `ADD SUB AND OR XOR` (`nos op tos`), `NOT SHL SHR INC DEC` | stack arithmetic |
| `LD`, `ST` | scratchpad read / write (`spad[tos] = nos`) |
| `IN` | push the unit's 16-bit input |
| `JMP`, `JZ`, `JNZ` | absolute jumps; JZ/JNZ pop the tested value |
| `EXT` | send the next two program words as a 32-bit command (high word first) |
| `EXTS` | send `{nos, tos}` as a command and pop both |
| `SIG mask` / `WAIT k` | raise events to other ASIPs / wait for (and consume) one from ASIP k |
| `DELAY n` | idle n+1 cycles |
| `HALT` | stop |

`EXT`/`EXTS` stall until the unit accepts the command. In `vsoc_top` all units
always accept. The SIMD ASIP's input is `{any column with f0 set, output
overflow, output busy}`. The GLB and LCTRL inputs are `gpio_in`.

Line commands from LCTRL use this format: `[31:28]` 1 = clear the column
charges, 2 = add row `[9:0]` positively, 3 = add it negatively.

## Top level (`vsoc_top`, parameter `N` = 1024)

`vsoc_top` has these ports:

- program load (`prog_we[k]`, `prog_addr`, `prog_wdata`) and `start`;
- the line-command bus;
- the column comparators in and `adc_pulse` out;
- the per-column analog settings (`col_analog`, 37 bits per column);
- the output stream (to a serial link);
- the GLB command bus and `gpio_in`.

Every ASIP can send events to every other.

## Where this RTL departs from the chip

The register set, the array size, the memory sizes, the macro-PE sizes, the
output modes and the division of work among the three processors follow the
chip. The following are this design's own choices:

- Both instruction sets and their encodings, including the line-command format.
- The wired-OR realisation of the scatter exchange.
- The 3-input neighbour LUT.
- The IF/ELSE/ENDIF semantics.
- The 12-bit counter form of the ADC.
- Reset values and the widths of the calibration registers.
- The 2-word FIFOs.

Some parts behave differently from the silicon:

- **Output chain.** The chip's output chain is clockless. Here it is a
  synchronous valid/ready chain.
- **PE memory.** The chip's PE memory is dynamic. Here it is a register array
  with no refresh.
- **Program loading.** The serial and debug interfaces and the on-chip
  network are not built. Programs are loaded through a plain write port, and
  the ASIPs exchange only events, not data.

The 13 kHz profile rate depends on the chip's programs, which are not
available. The test program spends four ASIP cycles per ADC step, so its
coarse scan alone takes about 10,000 cycles. That is more than the 4,600 cycles
a 13 kHz profile allows at 60 MHz. A program that unrolls the step loop would
need about a quarter of that.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module vsoc_top_tb \
  -y rtl -y tb +libext+.sv rtl/vsoc_pkg.sv tb/vsoc_top_tb.sv
obj_dir/Vvsoc_top_tb
```

Replace `vsoc_top_tb` with any of these testbenches:

- `pe_alu_tb`, `flag_stack_tb`, `pe_mem_tb`, `pe_tb` (one column);
- `scatter_unit_tb`, `out_pipeline_tb`, `pe_array_tb` (32 columns);
- `asip_core_tb`;
- `vsoc_top_tb` (32 columns, about 10,000 cycles);
- `vsoc_top_full_tb`, the same scan on the full 1024-column design. It takes
  a few minutes, mostly compilation.

The end-to-end benches count each mechanism: comparator trips, IF branches not
taken, LUT suppressions, output stalls, columns skipped, and ASIP events. They
fail if any of them never occurs.
