# RISC-V edge node with SHA-256 instructions

A small 32-bit RISC-V processor for IoT edge devices. It hashes data with
SHA-256 through six custom instructions, not through a memory-mapped
accelerator. The SHA-256 engine sits in the processor datapath next to the
ALU. Software drives it one compression step per instruction, so no driver,
DMA or interrupt handling is needed. A C programmer gets hardware hashing
from inline assembly.

The processor is a single-cycle RV32I core: every instruction, including
every SHA instruction, completes in one clock cycle. Around it is a small
platform:

- a data bus with an address decoder;
- a read-data multiplexer;
- on-chip data memory;
- a UART for sensor data;
- a port for an Ethernet controller.

The published design targets low-cost FPGAs (Gowin GW1NR-9 at 27 MHz,
GW2A-18 at 50 MHz, Artix-7 at 75 MHz).

## The SHA-256 instructions

All six are R-type instructions with opcode `0x0F` and `func3 = 0`. They are
told apart by a one-hot `func7`:

| mnemonic      | func7 | operands        | effect (one cycle)                                              |
|---------------|-------|-----------------|------------------------------------------------------------------|
| `sha2rst`     | 1     | –               | H0..H7 ← SHA-256 initial value (new message stream)             |
| `sha2push rs1`| 2     | word in `rs1`   | shift the word into the 16-word message window                  |
| `sha2start`   | 4     | –               | working variables a..h ← H0..H7, round count ← 0                 |
| `sha2perform` | 8     | –               | one compression round                                            |
| `sha2finish`  | 16    | –               | H*i* ← H*i* + working variable *i* (end of a 64-byte block)       |
| `sha2read rd, rs1` | 32 | index in `rs1` | `rd` ← H[`rs1[2:0]`], H0 being the most significant digest word |

`0x0F` is the standard MISC-MEM opcode, so this core has no `FENCE`. A word
with opcode `0x0F` and any other `func7` or `func3` is a no-op.

### Hashing a message

Software pads the message (0x80, zeros, 64-bit bit length) and lays it out as
big-endian 32-bit words. It then runs this sequence:

```
sha2rst
for each 64-byte block:
    16 x { lw t, 0(p); sha2push t; addi p, p, 4 }
    sha2start
    64 x sha2perform
    sha2finish
for i in 0..7: { sha2read t, i; sw t, 4*i(out) }
```

Everything is single cycle, so the cost can be counted from the program. With
loops, as in the testbenches, a block costs 279 cycles:

| part           | instructions                                   | cycles |
|----------------|------------------------------------------------|--------|
| push           | 16 × (lw, push, 2 addi, bne)                   | 80     |
| rounds         | 64 × (perform, addi, bne)                      | 192    |
| block overhead | start, finish and loop control                 | 7      |

Fully unrolled, with the register use of the published flowchart
(`lw x1, 4i(x2); sha2push x1` and `addi x1, x0, i; sha2read x1, x1`), a block
costs 102 cycles. `tb_riscv_core` checks both counts.

Measured on the full-size platform (`tb_sha_workloads`), including reading
out the digest:

| message (bytes) | blocks | cycles | µs at 27 MHz | µs at 50 MHz | µs at 75 MHz |
|-----------------|--------|--------|--------------|--------------|--------------|
| 8 / 16          | 1      | 327    | 12.1         | 6.5          | 4.4          |
| 64              | 2      | 606    | 22.4         | 12.1         | 8.1          |
| 256             | 5      | 1443   | 53.4         | 28.9         | 19.2         |
| 1024            | 17     | 4791   | 177          | 96           | 64           |
| 8192            | 129    | 36039  | 1335         | 721          | 481          |
| 16384           | 257    | 71751  | 2657         | 1435         | 957          |

These figures cover only the hashing loop on data already in memory. The
execution times published for this design are about 4× longer for large
messages: 11.6 ms for 16384 bytes at 27 MHz, about 1200 cycles per block.
They probably include padding, data movement and compiled-code overhead. That
software is not specified, so the figures cannot be compared directly.

## Inside the SHA-256 engine (`sha256_core`)

The engine has three parts:

- eight digest registers H0..H7;
- eight working registers a..h;
- a 16-word shift register, the message window.

A push shifts a word in at the tail, so after 16 pushes the head holds W[0].
Each `sha2perform` does two things in the same cycle:

- It runs one FIPS 180-4 round with the head word as W[t] and K[t] taken from
  the round counter.
- It shifts the window and appends
  W[t+16] = σ1(W[t+14]) + W[t+9] + σ0(W[t+1]) + W[t], all read from fixed
  window positions.

So the message schedule is built on the fly, with no 64-word schedule memory.
This was chosen as the simplest structure that gives the instruction
behaviour above. The published design gives the instructions, not the
engine's internals.

Other behaviour:

- The round counter stops at 64.
- A hardware reset acts like `sha2rst`.
- `sha2read` is combinational. Its result goes through the write-back
  multiplexer like an ALU result.

The engine costs about 1030 flip-flops. This is most of the design's state
outside the memories.

## The processor datapath (`riscv_core`)

The datapath has these parts:

- the PC and its +4 adder;
- the instruction memory, read combinationally;
- the controller (decoder);
- the register file (2 read ports, 1 write port, x0 = 0);
- the sign-extension unit;
- the operand-B multiplexer (rs2 or immediate);
- the ALU, with the SHA-256 engine beside it;
- a four-way write-back multiplexer: ALU, load data, SHA word, PC+4.

The SHA engine takes register read port 1 as its push word and its read
index. The controller gives it its operation.

Branches are resolved from the ALU result. `beq`/`bne` use the zero flag of a
subtraction. `blt`/`bge` and `bltu`/`bgeu` use bit 0 of SLT and SLTU. Loads
and stores of bytes and halfwords are lane-shifted in the core, and the bus
carries whole words with byte enables.

The instruction set is RV32I without `FENCE`, `ECALL`/`EBREAK` and CSRs,
which execute as no-ops. The published design says only that it keeps "the
necessary" instructions. It does not say which.

Reset is asynchronous and active low, and sets the PC to `RESET_PC` (0). The
register file is not reset.

## The platform bus (`edge_soc`)

```
              d_addr ──► addr_valid ──► m_valid ─► data_mem  (memory interface)
                              │     └─► u_valid ─► uart_if
  riscv_core                  │     └─► e_valid ─► Ethernet port (top-level pins)
              d_wdata ──► all three interfaces
              d_rdata ◄── rdata_mux ◄─ sel, m/u/e read data
```

Timing on the bus:

- A load's address, decode, memory read and multiplexing all happen
  combinationally within the cycle.
- Stores take effect at the clock edge.
- An assertion in `edge_soc` checks that at most one valid line is high.

Memory map (this design's choice; the published design gives none):

| address bits 31..28 | device |
|---------------------|--------|
| `0x0` | data memory, 32 KiB (wraps) |
| `0x1` | UART: +0 data (write: send byte; read: received byte, clears valid); +4 status `{rx_overrun, rx_valid, tx_busy}` (a write clears overrun) |
| `0x2` | Ethernet port: `e_valid`, `e_we`, `e_be`, `e_addr`, `e_wdata` out, `e_rdata` in, same-cycle read |
| other | reads 0, writes ignored |

The UART is 8N1, LSB first, at `CLKS_PER_BIT` clocks per bit: 234, which is
115200 baud at 27 MHz. The receiver synchronises `rx`, checks the start bit at
mid-bit and samples each data bit at mid-bit. A byte that arrives while the
previous one is still unread sets `rx_overrun`.

The instruction memory is loaded through the `ld_we`/`ld_addr` (word
index)/`ld_data` port. Hold `rst_n` low while loading.

## Sizes

| parameter       | default | where                                 |
|-----------------|---------|---------------------------------------|
| `IMEM_WORDS`    | 4096    | instruction memory (16 KiB)           |
| `DMEM_WORDS`    | 8192    | data memory (32 KiB)                  |
| `CLKS_PER_BIT`  | 234     | UART bit time                         |
| `ROUNDS`        | 64      | round counter limit in `sha256_core`  |

The published design reports 432 Kbit of block RAM, without the split
between instruction and data memory. The split here totals 384 Kbit and fits
the GW1NR-9. Coarse synthesis gives about 1120 flip-flops outside the
memories. That is close to the roughly 1140 registers reported for the FPGA
builds.

## What is not here

- **Ethernet interface.** Only its place on the bus is defined. A MAC/PHY is
  board- and vendor-specific, so the interface is brought out as top-level
  signals.
- **I2C.** It is mentioned as an alternative sensor link but never specified.
- Message padding and byte-order conversion are software tasks.
- No interrupts, no exceptions, no misalignment checks.

## Trust and verification

Every module has a self-checking testbench in `tb/`:

- `sha256_core` is checked against published SHA-256 test vectors ("abc",
  the 448-bit two-block vector, the empty message). It is also checked
  against a reference model whose constants are recomputed from prime roots,
  on random messages of 1–4 blocks.
- `riscv_core` runs an RV32I self-test program and the SHA instruction flow.
  It checks results, the digest, and the exact cycle counts.
- `tb_edge_soc` runs the whole platform at default sizes. It takes 64 bytes
  from the UART, pads and hashes them, and stores the digest. It sends the
  digest back out over the UART and writes it to the Ethernet port. It counts
  every SHA operation, UART transfer, busy poll, Ethernet read/write and
  taken branch.
- `tb_sha_workloads` hashes the seven message sizes in the table above.

Each testbench prints `TB_RESULT checks=N failures=M`. They initialise
everything they read, so they pass with uninitialised state set to zeros or
to random values.

## Simulating

With Verilator 5. The shared packages go first:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/sha256_ref_pkg.sv tb/tb_edge_soc.sv \
    --top-module tb_edge_soc
./obj_dir/Vtb_edge_soc
```

Replace `tb_edge_soc` with any other `tb_*` module to run it. Lint the RTL
with `verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/rv_pkg.sv rtl/edge_soc.sv`.

## Files

- `rtl/rv_pkg.sv` – opcodes, SHA encodings, control struct, device select,
  memory map.
- `rtl/riscv_core.sv` – the single-cycle core. It uses `controller`,
  `regfile`, `imm_gen`, `alu`, `instr_mem` and `sha256_core`.
- `rtl/edge_soc.sv` – the platform: `addr_valid`, `rdata_mux`, `data_mem`,
  `uart_if`.
- `tb/rv_asm_pkg.sv` – instruction encoders, including the SHA instructions,
  for writing test programs.
- `tb/sha256_ref_pkg.sv` – the reference SHA-256 model and padding.
