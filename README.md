# BrainWave SoC with a Blocks-style CGRA, in SystemVerilog

This is a synthesizable model of the digital part of the BrainWave processor. BrainWave is an
ultra-low-power SoC for EEG-based detection of non-convulsive seizures. It pairs a RISC-V
micro-controller with a coarse-grained reconfigurable array (CGRA) of the *Blocks* type. The CGRA
runs the heavy feature-extraction kernels: band-pass filtering, wavelets, entropy, visibility
graphs and FFT.

What is built:

* **The SoC memory system.** It has 80 kB of SRAM in three parts: 32 kB RISC-V program memory
  (PMEM), 32 kB shared data memory (DMEM) and 16 kB CGRA program memory (CPMEM). An interconnect
  links the memories to four bus masters.
* **The complete CGRA**, with:
  * 21 functional units (FUs): 4 LSU, 9 ALU, 4 MUL, 1 ABU, 1 RF and 2 IU.
  * 11 instruction memories of 256 words: nine 12-bit memories, plus two 33-bit memories inside
    the IUs.
  * Four private 1 kB local memories (LMs).
  * A reconfigurable data network and a reconfigurable instruction network.
  * A global-memory interface into DMEM.
  * A program loader with a control interface for the core.

What is **not** built:

* **The RISC-V core, the APB peripherals and JTAG.** These are reused from the Pulpino platform,
  not designed here. The core's instruction and data ports, and one peripheral bus port, are
  ports of `brainwave_top`.
* **The analog and physical parts.** These are voltage stacking, level shifters, the current
  sink, the body-bias controllers and the IO pads. They have no logic function.
* **The chip's own Blocks instruction set.** Its encoding is not public with this design. The
  instruction set below is this design's own. It is shaped by the widths the chip gives: 12-bit
  FU instructions and 33-bit immediate words.
* **Most of the document's CGRA kernels.** The kernels of Table VI are written in the chip's
  instruction set, which is not available. Two of them were mapped again by hand, in this design's
  instruction set:
  * the 5-stage biquad band-pass filter (two channels in SIMD);
  * the full db4 wavelet decomposition (one channel);
  * the similarity check with early exit, which is the core of ApEn and SampEn;
  * the 32×32 16-bit fixed-point matrix multiply.

  Index sort, NVG/HVG node degree and the FFT were not ported.

## Files

| file | content |
|------|---------|
| `rtl/bw_pkg.sv` | constants, FU index map, opcodes, bus structs |
| `rtl/brainwave_top.sv` | SoC top: memories, interconnect, CGRA |
| `rtl/bw_xbar.sv` | request/grant crossbar with round-robin per slave and an error responder |
| `rtl/bw_sram.sv` | SRAM with byte enables and a one-cycle read |
| `rtl/cgra_fabric.sv` | the CGRA: FUs, IMs, networks, stall, configuration registers |
| `rtl/cgra_alu.sv`, `cgra_mul.sv`, `cgra_lsu.sv`, `cgra_rf.sv`, `cgra_abu.sv`, `cgra_iu.sv` | the six FU types |
| `rtl/cgra_im.sv`, `rtl/cgra_lm.sv` | 256x12 instruction memory, 256x32 local memory |
| `rtl/cgra_data_net.sv`, `rtl/cgra_instr_net.sv` | data and instruction networks |
| `rtl/cgra_gmem_if.sv` | shares one DMEM bus master between the four LSUs |
| `rtl/cgra_loader.sv` | control registers, kernel loader, start and interrupt |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_bpf_workload.sv`, `tb/tb_dwt_workload.sv`, `tb/tb_simcheck_workload.sv`, `tb/tb_matmul_workload.sv` | the four mapped document kernels, run on the whole SoC |
| `tb/tb_kernel_pkg.sv` | kernel builder (image format) and reference model used by the fabric, loader and top tests |

## Memory map and bus

| base | size | slave |
|------|------|-------|
| `0x0000_0000` | 32 kB | RISC-V PMEM |
| `0x0010_0000` | 32 kB | shared DMEM (CGRA global memory) |
| `0x0020_0000` | 16 kB | CGRA PMEM (kernel images) |
| `0x0030_0000` | 20 B | CGRA control registers |
| `0x1A10_0000` | 1 MB | peripheral bus port |

Any other address gets a response with read data 0.

The masters, in index order, are:

1. Core instruction port.
2. Core data port.
3. CGRA global-memory interface.
4. CGRA loader.

Every bus access follows one handshake:

* The master holds `req`, with `we`, `be`, `addr` and `wdata`, until `gnt` is high.
* `rvalid`, together with `rdata` for a read, is high exactly one cycle after the grant.
* A slave that two masters want in the same cycle grants them in round-robin order.

## CGRA execution model

* **One shared program counter.** The ABU holds a single program counter for all IMs, so the
  fabric runs as one wide VLIW machine.
* **Fetch and commit.**
  * In every cycle, each IM delivers the word at `pc`.
  * The instruction network routes those words to the FUs.
  * An FU commits when the fabric runs and is not stalled.
* **Registered results.** Every FU result is registered and reaches the data network in the next
  cycle. Chaining FUs through the network is how results bypass the register file.
* **SIMD.** Each FU has a 4-bit `im_sel`. Several FUs that select the same IM run the same
  instruction. This is how two EEG channels are processed by one instruction stream.
* **Static network configuration.** Each FU has one 14-bit configuration word. It stays fixed
  while a kernel runs:

  | bits | field | meaning |
  |------|-------|---------|
  | 13:10 | `im_sel` | IM 0–8; 9–15 gives a NOP |
  | 9:5 | `src_b` | FU index 0–20; 21–31 gives zero |
  | 4:0 | `src_a` | FU index 0–20; 21–31 gives zero |

* **Global-memory stall.**
  * A global load or store (`LDG`/`STG`) stalls the whole fabric until every such access of
    that cycle is done.
  * The accesses run one after another, in LSU order.
  * Each access takes 2 cycles when DMEM is free, so k accesses in one cycle add 2k cycles.
  * A load result appears on the LSU output together with the commit.

FU index map (`fu_id_e`):

| index | FU | index | FU | index | FU |
|---|---|---|---|---|---|
| 0 | LSU0 | 7 | MUL1 | 14 | RF |
| 1 | ALU0 | 8 | ALU3 | 15 | LSU3 |
| 2 | MUL0 | 9 | ABU | 16 | ALU6 |
| 3 | ALU1 | 10 | LSU2 | 17 | MUL3 |
| 4 | IU0 | 11 | ALU4 | 18 | ALU7 |
| 5 | LSU1 | 12 | MUL2 | 19 | ALU8 |
| 6 | ALU2 | 13 | ALU5 | 20 | IU1 |

## Instruction set (this design's own)

FU instructions are 12 bits wide. Bits [11:8] hold the opcode and bits [7:0] hold a field. In
every FU, opcode 0 is a NOP.

| FU | opcodes |
|----|---------|
| ALU | 1 ADD, 2 SUB, 3 AND, 4 OR, 5 XOR, 6 SLT, 7 SLTU, 8 PASSA, 9 MIN, 10 MAX, 11 ACC (out += a), 12 ABSDIFF, 13 ADDI (a + signed field), 14 SEQ, 15 PASSB |
| MUL | 1 MUL (low 32 bits), 2 MULH (signed high 32 bits), 3 SLL, 4 SRL, 5 SRA (shift by b), 6 SRAI (shift by field), 7 MULSR (a*b arithmetically shifted right by field[4:0]) |
| LSU | 1 LDG, 2 STG (DMEM word at a + field, data b), 3 LDL, 4 STL (local memory) |
| RF  | 1 RD (field[3:0]), 2 WR a to field[7:4], 3 RDWR (both). The RF has 16 registers. |
| ABU | 1 JMP field, 2 BNZ / 3 BZ on operand a, 4 HALT, 5 LDC (loop count from a), 6 DBNZ (decrement, branch while not zero) |

An IU word is 33 bits. When bit 32 is set, the IU output loads bits [31:0] as a constant. When
bit 32 is clear, the output keeps its value. Branches have no delay slot.

## Loading and starting a kernel

The core writes a kernel image into CPMEM and then uses the control registers at `0x0030_0000`:

| offset | register | use |
|--------|----------|-----|
| 0x00 | CTRL | write bit0 = LOAD the image, bit1 = START |
| 0x04 | STATUS | bit0 loading, bit1 running, bit2 done (cleared by START) |
| 0x08 | KADDR | byte address of the image |
| 0x0C | KROWS | rows in the image |
| 0x10 | CYCLES | cycle count of the last run |

The image is laid out as follows:

1. 21 configuration words, one per FU, in FU index order.
2. For every row, 13 words:
   * nine words for IM0–IM8, in bits [11:0];
   * then two words for each IU: first bits [31:0], then bit 32 in bit 0.

The image size is therefore 84 + 52·rows bytes. A full 256-row kernel takes 13.4 kB, which fits
in the 16 kB CPMEM.

A loaded kernel stays resident, so START can be repeated without reloading. `cgra_irq` pulses
when the kernel halts.

## Verification

Each testbench:

* checks its unit against a reference model, over random and corner-case stimulus;
* has a watchdog;
* ends with `TB_RESULT checks=N failures=M`.

`tb_brainwave_top` runs the SoC at its default sizes. It does the following:

* A core model writes a kernel image and sample data over the core data port.
* The CGRA loads and runs the kernel twice, and the results in DMEM are compared with the model.
* The cycle count is checked exactly. The first run, with DMEM free, takes 7n+15 cycles (365
  for n=50). The second run competes with random core traffic to DMEM and takes 7n+15 plus one
  cycle for every cycle the CGRA waited.
* The test counts each mechanism it uses: load, SIMD, stall, bypass, loop, contention, kernel
  reuse, interrupt and the peripheral port.

Four workload tests also run on the whole SoC at default sizes:

* **`tb_bpf_workload`.** It filters 2 × 128 12-bit samples through five Q20 direct-form-II
  biquads and checks every output bit-exactly.
  * Each stage takes 8 rows. w is written to the local memory and read back before the b0
    product, because every unit reads a fixed network source.
  * The next stage takes y straight from the previous stage's accumulator.
  * The run takes 6550 cycles, 51 per sample pair. The chip's own mapping needs 36 per pair
    (9221 cycles for 2 × 256 samples), with a stage at an initiation interval of 4.
* **`tb_dwt_workload`.** It splits 256 samples over five levels with the 8-tap db4 pair (Q15,
  periodic extension written by the kernel). It checks every detail coefficient and the final
  approximation.
  * The run takes 7864 cycles for one channel. The chip's mapping takes 7671 for two channels.
* **`tb_simcheck_workload`.** It counts the matching template pairs (m = 2, Chebyshev distance
  at most r) of a 64-sample series. Each pair stops at its first mismatching component.
  * The ABU branches on a comparison result (BNZ) to leave a pair early.
  * It branches on a pointer comparison (BZ) to close the j loop.
  * The run length differs for each pair, and the test checks it exactly.
* **`tb_matmul_workload`.** It computes C = A·B for 32×32 Q15 matrices, two output columns at a
  time in SIMD, and checks all 1024 results.
  * Both operands are reloaded from DMEM for every product, so three serialised global loads
    dominate each row.
  * The run takes 120325 cycles. The chip's mapping takes 23576.

Every workload test checks the cycle count exactly against rows + 2 cycles per global access.

To run one test with Verilator 5, list the package and kernel package first, then the RTL and
the testbench:

```
verilator --binary --timing --assert -Itb rtl/bw_pkg.sv tb/tb_kernel_pkg.sv \
    $(ls rtl/*.sv | grep -v bw_pkg) tb/tb_brainwave_top.sv --top-module tb_brainwave_top -o sim
./obj_dir/sim
```

## Departures from the chip

* **Networks.** The chip's switchbox mesh is drawn with 3×32-bit horizontal and 2×32-bit
  vertical data links, and 16-bit instruction links. Here both networks are modelled as full
  crossbars, which can route everything the mesh can. The FU placement in the grid is not
  reproduced.
* **Operand routing.** Each FU input reads one fixed network source for the whole kernel. An
  opcode cannot choose among several inputs. Kernels therefore need extra pass-through and
  multiplexing steps, and the mapped kernels run slower than the chip's own mappings. The same
  limit is why no mapping was attempted for:
  * the FFT (data-dependent twiddle addressing);
  * index sort;
  * the NVG/HVG node degree.
* **Number of FU types.** The text counts 5 FU types, but six kinds of unit are named (LSU, ALU,
  MUL, ABU, RF, IU). All six are built.
* **Interconnect.** The AXI interconnect is modelled as a simple request/grant crossbar. The
  SRAM macros are modelled as arrays.
* **Own choices.** The following are not given in the document and are this design's own:
  * arbitration;
  * stall policy;
  * RF size;
  * branch rules;
  * register map;
  * image format;
  * address map.
