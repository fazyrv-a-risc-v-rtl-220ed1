# FazyRV: an RV32I core whose data path is 1, 2, 4 or 8 bits wide

FazyRV fills the gap between bit-serial RISC-V cores, which are tiny but need
more than 32 cycles per instruction, and conventional 32-bit cores, which are
fast but several times larger. Every 32-bit operation is carried out on
*chunks* of `CHUNKSIZE` bits, one chunk per clock, least significant chunk
first. `CHUNKSIZE` is a parameter (1, 2, 4 or 8), so the same RTL gives a
bit-serial core, a nibble-serial core or a byte-serial core, and area and
speed grow together. Nothing is hand-optimised at gate level; the chunk width
is the only knob.

This repository holds the core (`fazyrv_core`), its register file, the
wrapper `fazyrv_top`, and `fsoc`, a minimal system built around it: 64 bytes
of memory and one memory-mapped output. The core runs the RV32I base
instruction set, without CSRs, interrupts or traps.

## How an instruction runs

The core does not pipeline instructions. Each one goes through a fixed
sequence of phases, and the controller in `fazyrv_core` chooses the phases
from the instruction class:

| phase  | cycles              | what happens |
|--------|---------------------|--------------|
| FETCH  | N_IF                | instruction-bus request held until acknowledge |
| DECODE | N_ID (1 to 3)       | register-file reads; operands loaded into shift registers |
| SHIFT  | ⌊shamt / CHUNKSIZE⌋ | shifts only: macro steps (see below) |
| EXEC   | 32 / CHUNKSIZE      | one pass of the chunk ALU |
| MEM    | until acknowledge   | loads and stores only: data-bus access |
| EXEC2  | 32 / CHUNKSIZE      | taken branches: PC + offset; loads: data into rd |

During a pass, the operands are held in 32-bit registers that shift by one
chunk per clock:

* operand a is rs1 (held in `fazyrv_shifter`), the PC or zero;
* operand b is rs2 or the immediate.

The chunk ALU (`fazyrv_alu`) passes the carry from one chunk to the next in a
flip-flop. It also accumulates an "all chunks equal" flag. The result chunks
collect in a result shift register. In the last cycle of a pass the complete
word is known: it is written to rd, becomes the new PC (jumps and branches),
or goes into the address register `spm_a` (loads and stores). Because of this,
no extra write-back cycle is needed.

Some results are only known after the last chunk. For SLT and SLTU the
comparison bit depends on every chunk, so the whole word `{31'b0, lt}` is
written at the end. Branches take their decision in the last cycle of the
compare pass. A taken branch then runs a second pass to add the offset to the
PC. JAL and JALR compute the target in the ALU pass. rd gets PC+4, which
comes from a separate 32-bit incrementer.

### Cycles per instruction

The core uses these numbers:

* `N = 32/CHUNKSIZE`: cycles in one pass.
* `N_IF`: fetch cycles. It is 2 with a Wishbone slave that answers one cycle after the request (as in `fsoc`). It is 1 with a slave that acknowledges in the request cycle.
* `N_ID`: decode cycles (next section).

| instruction                    | cycles |
|--------------------------------|--------|
| ALU, LUI, AUIPC, JAL, JALR, branch not taken, FENCE/SYSTEM | N_IF + N_ID + N  (= CPI_min) |
| branch taken                   | N_IF + N_ID + 2N |
| shift by s                     | N_IF + N_ID + N + ⌊s / CHUNKSIZE⌋ |
| store (slave with one cycle of delay) | N_IF + N_ID + N + 2 |
| load (slave with one cycle of delay)  | N_IF + N_ID + 2N + 2 |

Every instruction stays within the published bounds:

* `CPI_min = N_IF + N_ID + N`
* `CPI_max = N_IF + N_ID + 2N + (1 + N)`

With the defaults (2-bit chunks, two read ports with bypass, one-cycle
memory), an ALU instruction takes 19 cycles, a load 37, and `CPI_max` is 52.

## Register file variants and the bypass

`fazyrv_regfile` is written like an FPGA block RAM:

* a 32 × 32 array with a synchronous read, so data arrives one clock after the address;
* one write port;
* one read port (`RF_DUALPORT = 0`, "1R") or two (`RF_DUALPORT = 1`, "2R");
* x0 reads as zero.

With one port, rs1 and rs2 are read one after the other. The *bypass*
(`RF_BYPASS = 1`) takes the rs1/rs2 address fields straight from the
instruction bus in the cycle the instruction arrives, one cycle before the
instruction register holds them. Together:

| variant          | N_ID | rs1 data in decode cycle | rs2 data in decode cycle |
|------------------|------|--------------------------|--------------------------|
| 1R               | 3    | 2                        | 3                        |
| 1R + bypass      | 2    | 1                        | 2                        |
| 2R               | 2    | 2                        | 2                        |
| 2R + bypass      | 1    | 1                        | 1                        |

The core writes the register file once per instruction, with a whole word, in
the last cycle of the last pass. It never reads and writes in the same cycle,
so the array needs no read-during-write rule. Synthesis can map the array to
block RAM, LUT RAM or flip-flops without any change to the RTL.

## Shifts: macro steps and reversal

Shifts are what limit the chunk size to 8 bits. A shifter that moves one bit
per cycle needs up to 31 extra cycles, whatever the chunk size. A 32-bit
barrel shifter would cost more than the rest of a small core. FazyRV splits
the shift amount instead:

    shamt = q · CHUNKSIZE + r,   0 ≤ r < CHUNKSIZE

* **Macro steps (q cycles).** Before the pass, the operand register in
  `fazyrv_shifter` steps q times, one whole chunk per clock. Stepping by a
  chunk is free: it is the same move the register makes during every pass.
  The vacated top fills with zeros, or with the sign bit for SRA.
* **Fine shift (r bits).** During the pass, a small funnel shifter takes
  `CHUNKSIZE` bits out of the window formed by the current chunk and the next
  one, offset by r. Its cost grows with the chunk size. At 8 bits it is still
  an 8-bit shifter, but beyond that it turns into the barrel shifter the
  scheme avoids.

So both the overhead and the speed of a shift scale with the chunk size. A
shift by 13 on a 2-bit core costs 6 extra cycles; on a 4-bit core it costs 3.

Only right shifts exist in hardware. For SLL the operand is bit-reversed as it
is loaded (`fazyrv_reverser`), shifted right, and the result is reversed again
before write-back. This works because reverse(reverse(x) >> s) = x << s.

## Loads, stores and sign extension (spm_a, spm_d)

Loads and stores first run an address pass, rs1 + immediate. Its result goes
into `spm_a`, which drives the word address of the data bus. The data scratch
register `fazyrv_spm_d` handles the data:

* **Stores.** rs2 is loaded at the end of decode. On the bus it appears
  replicated: four copies of the byte, two copies of the halfword, or the
  word. Byte selects come from the address bits, so a slave only has to honour
  `sel`.
* **Loads.** On the acknowledge, the bus word is captured, shifted right by
  8·addr[1:0]. It is then shifted out one chunk per clock during the second
  pass.

Sign extension uses a property of chunk sizes up to 8 bits. The bit to
replicate (bit 7 or bit 15 of the loaded value) always leaves the register at
the same place: at the top, bit `CHUNKSIZE-1`, of the last chunk that still
holds data. `spm_d` latches that bit at that moment. For all later chunks it
outputs the bit replicated, or zeros for LBU/LHU. For chunks wider than 8
bits, a byte would end in the middle of a chunk and this shortcut would no
longer hold.

Misaligned accesses are not detected. The address is used as if it were
aligned.

## The reference system `fsoc`

`fsoc` is the smallest system that runs software:

* `fazyrv_top`: the core plus its register file.
* `fsoc_bram`: 64 bytes of memory (16 words) for code and data. It is a
  Wishbone slave that acknowledges one cycle after the request.
* `fsoc_gpo`: one output bit. Any data address with bit 31 set reaches it, and
  a store writes bit 0 of the data to `gpo_o`.
* `fsoc_xbar`: the interconnect. A MUX sends the data bus either to the output
  register or towards the memory. The memory has a single port. It is shared
  by ORing the instruction request and the memory-bound data request. This is
  safe because the core never drives both buses at once. Both `fazyrv_core`
  and `fsoc_xbar` assert this, so a simulation catches it.

The core starts at address 0 after the asynchronous, active-low reset. The
memory is not initialised by the hardware; a testbench writes the program
into `u_mem.mem` before releasing reset.

## Files

Everything shared lives in `rtl/fazyrv_pkg.sv`:

* the instruction classes (`ins_e`);
* the ALU operations (`alu_op_e`);
* the decoded-instruction struct (`dec_t`);
* `n_id()`, the decode-cycle formula.

| module            | role |
|-------------------|------|
| `fsoc`            | top: reference system, ports `clk_i`, `rst_n_i`, `gpo_o` |
| `fsoc_xbar`       | data-bus MUX and instruction/data OR onto the memory port |
| `fsoc_bram`       | 64-byte Wishbone memory, byte writes, one cycle of delay |
| `fsoc_gpo`        | the memory-mapped output bit |
| `fazyrv_top`      | core + register file; instruction and data bus ports |
| `fazyrv_core`     | controller, PC, operand selection, result collection, spm_a |
| `fazyrv_decoder`  | RV32I decoder (combinational) |
| `fazyrv_alu`      | chunk ALU with carry and comparison state |
| `fazyrv_shifter`  | operand register with macro steps and fine shifter |
| `fazyrv_reverser` | bit reversal for left shifts |
| `fazyrv_spm_d`    | store data, load alignment and extension |
| `fazyrv_regfile`  | 1R/2R register file |

Parameters are the same on `fsoc`, `fazyrv_top` and `fazyrv_core`:

| parameter     | default | values | meaning |
|---------------|---------|--------|---------|
| `CHUNKSIZE`   | 2       | 1, 2, 4, 8 | bits processed per clock |
| `RF_DUALPORT` | 1       | 0, 1 | one or two register-file read ports |
| `RF_BYPASS`   | 1       | 0, 1 | register addresses taken from the instruction bus |
| `BOOTADR`     | 0       | any  | reset PC (`fazyrv_top`, `fazyrv_core`) |
| `MEM_BYTES`   | 64      | multiple of 4 | memory size (`fsoc`) |

The default chunk size of 2 bits is this design's choice. It is the width
used for the TinyTapeout chip built from FazyRV; the design itself names no
default.

### Bus protocol

Both buses are a reduced Wishbone handshake:

* `stb` acts as cyc and stb together;
* `stb` rises with the address and stays high until the cycle in which `ack` is high;
* one 32-bit word is transferred per request, with no bursts;
* read data is valid in the `ack` cycle.

Addresses on the data bus are word aligned, with byte selects in `dmem_sel_o`.

## Simulation

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fazyrv_pkg.sv tb/tb_rv_pkg.sv tb/tb_fsoc.sv --top-module tb_fsoc
    ./obj_dir/Vtb_fsoc

Replace `tb_fsoc` with any other testbench name:

* `tb_fsoc`: the whole system at its default size. A 13-instruction program
  loops five times. It toggles the output, shifts with macro steps, stores and
  reloads a halfword with sign extension, and branches. The testbench checks:
  * the output sequence;
  * registers and memory;
  * the cycle count of every instruction against the table above;
  * that each mechanism occurred at least once: bypass decode, macro steps,
    taken and not-taken branch, sign extension, store, output write, shared
    memory port, jump.
* `tb_fazyrv_core`: six cores with different chunk sizes and register-file
  variants. Each runs a random program of 800 instructions, followed by a
  comparison with an instruction-set model (`tb_rv_pkg::rv_iss`) on all
  registers and the data area. Every instruction's cycle count is checked too.
* `tb_fazyrv_top`: the four register-file variants, with chunk sizes 1, 2, 4
  and 8, run a summing loop. The testbench checks that every ALU instruction
  takes exactly `N_IF + N_ID + 32/CHUNKSIZE` cycles.
* One testbench per building block: `tb_fazyrv_alu`, `tb_fazyrv_shifter`,
  `tb_fazyrv_spm_d`, `tb_fazyrv_decoder`, `tb_fazyrv_regfile`,
  `tb_fazyrv_reverser`, `tb_fsoc_bram`, `tb_fsoc_gpo`, `tb_fsoc_xbar`.

`tb/tb_rv_pkg.sv` holds the instruction encoders and the reference model.
Use it to write further programs.

## How closely this follows FazyRV

These parts follow the FazyRV design:

* the chunk-serial data path with chunk sizes of 1, 2, 4 and 8 bits;
* the 1R/2R register file with an optional bypass, and the resulting decode
  cycle counts;
* shifts made of macro steps plus a chunk-sized fine shifter;
* sign extension from the fixed bit position;
* the `spm_a`/`spm_d` registers;
* the minimal SoC with a 64-byte Wishbone memory, one output and the OR-shared
  memory port;
* the `CPI_min`/`CPI_max` bounds.

This design's own choices:

* **Controller and pass sequence.** The phase list, the second pass for taken
  branches and loads, and write-back in the last pass cycle. The exact cycle
  counts of the original for loads, stores and shifts may differ. Here they
  only respect the published bounds. In particular, the published shift
  measurements show left shifts costing clearly more than right shifts.
  Here both directions cost the same, `⌊shamt / CHUNKSIZE⌋` extra cycles.
* **Reversers.** They act on whole words, at operand load and write-back,
  not on the chunk stream between operand muxes and ALU.
* **PC.** A parallel register with its own +4 adder. A copy is shifted as ALU
  operand.
* **Register file.** It is word-parallel. The shift registers sit in the core.
* **Fetch delay.** The fixed-delay fetch mode (`N_IF = 1` without acknowledge)
  is not a separate mode. Any slave that acknowledges in the request cycle
  gives `N_IF = 1`.
* **Addresses.** The output register sits at bit 31 of the data address. The
  boot address is 0.

Not built:

* the INT and CSR variants: interrupts, control and status registers, traps.
  SYSTEM and FENCE instructions execute as no-ops;
* the PC mux input from `spm_d`, which only serves trap handling;
* the peripherals of the TinyTapeout chip: quad-SPI execute-in-place, the SPI
  peripheral, GPIO;
* an arbiter-based SoC variant.

Area and clock frequency of this RTL have not been measured. The figures
published for FazyRV do not carry over to it.
