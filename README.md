# Siwa: a small RV32I system on chip for implantable medical devices

Siwa is a microcontroller built for an implanted cardiac stimulator. The
device handles slow biological signals (hertz to a few kilohertz), so low
area and low energy matter more than speed. The design makes these choices
to save area:

- **One state machine.** There is no pipeline. A single control state
  machine runs every instruction through one shared datapath. There are no
  pipeline registers, forwarding paths or hazard logic. Most instructions
  take 4 clock cycles.
- **One memory.** An 8 kB SRAM holds both program and data. After reset, a
  hard-wired boot loader fills it from an external SPI flash.
- **A bus with no central arbiter.** The peripherals share a parallel bus.
  Each bus interface takes its turn by itself, so there is no arbiter to
  wire up and none that could fail.
- **Peripherals talk to the CPU only through interrupts.** The CPU reads
  and writes the peripherals as memory. Anything a peripheral sends on its
  own becomes an interrupt.

This repository is synthesizable SystemVerilog for the digital part of that
chip. The top is `siwa_soc`. The analog stimulation front end and the flash
chip are outside it.

```
            +------------------------------- siwa_soc --------------------------------+
            |  siwa_cpu                                                               |
 analog_irq-|-> irq_decoder  csr_file  timer      boot_loader                         |
 frls,isval,|   instr_decoder  alu(csk_adder, barrel_shifter)  reg_file               |
 isconf,    |        | m_en/mem_rdy/error_drs         |                               |
 istrg    <-|        +------------------> mbc <-------+          gpio <-> pads         |
            |                     sram <-' |  message register -> external interrupt  |
            |                         bus_interface(ID 0)                             |
            |   ======== 65 data lines + valid + ack (wired-OR) ========              |
            |     bus_interface(ID 1)                 bus_interface(ID 2)              |
            |        spi_ctrl  -> SPI flash              uart -> txd/rxd              |
            +-------------------------------------------------------------------------+
```

## Memory map

The map is fixed in the memory and bus controller (`mbc`):

| Byte address        | Target                                              |
|---------------------|-----------------------------------------------------|
| `0x0000_0000`–`0x0000_1FFF` | SRAM, 8 kB                                  |
| `0x0000_2000`–`0x007F_FFFF` | nothing: bad-address exception              |
| `0x0080_0000`–`0x017F_FFFF` | SPI flash over the bus (flash byte = address − 8 MB, 16 MB) |
| `0x0180_0000`–`0x01FF_FFFF` | UART over the bus                            |
| above `0x01FF_FFFF`         | bad-address exception                        |

Accesses also fail with a bad-address exception in two more cases:

- a half-word or word that is not aligned;
- any bus access while `mcr.bs_en` is 0 (the bus side is switched off).

The boundary between the SPI and UART windows at 24 MB is this design's own
choice.

## The system bus

### Packages

A bus package is 65 bits (`bus_pkg_t` in `siwa_pkg`):

| bits  | 64:62 | 61:60 | 59:57 | 56:32 | 31:0 |
|-------|-------|-------|-------|-------|------|
| field | dst   | src   | code  | addr  | data |

- Agent IDs: MBC (the CPU side) 0, SPI 1, UART 2.
- Codes: `MSG_WRITE` 0, `MSG_READ` 1, `MSG_READ_RSP` 2, `MSG_DATA` 3.
- The data field passes through untouched. Software gives it its meaning.

The original description calls this a 64-bit bus in one place. The field
layout used here has 65 bits.

### Interface and arbitration

Each agent connects to the bus through a `bus_interface`. It has two
two-entry FIFOs (`bus_fifo`): one for packages going out, one for packages
coming in. The depth is a parameter (`FIFO_DEPTH` on the top).

The shared lines are the 65 data lines plus two protocol lines, `valid` and
`ack`. Every interface drives all of them, and the top combines the drivers
with an OR. An interface drives zeros whenever it is not sending.

Arbitration works by time slots:

- Every interface runs its own copy of a counter that steps 0, 1, 2, 0, …
- All copies reset together, so they always agree.
- An agent may send only in the slot equal to its ID.

So no two agents ever drive the bus in the same cycle, and there is no
arbiter.

A package is delivered like this:

1. In its slot, an agent whose output FIFO is not empty puts the head
   package on the data lines and raises `valid`.
2. The agent named in `dst` raises `ack` in the same cycle, but only if its
   input FIFO has room.
3. On `ack`, the package moves from one FIFO to the other.
4. Without `ack`, the package stays at the head of the output FIFO. It is
   offered again three cycles later.

A full receiver therefore slows its senders down but never loses a package.
Arbitration costs at most two cycles of waiting per package.

## Boot

`boot_loader` holds the CPU in its `BOOT` state after reset. Meanwhile it
copies `BOOT_WORDS` words (2048, the whole SRAM):

1. It reads word *i* from flash byte 4*i*, through the MBC. This is a bus
   `MSG_READ` to the SPI agent.
2. It writes that word to SRAM address 4*i*.

Only one transaction is in flight at a time. With the SPI clock at a quarter
of the system clock (`SPI_DIV` = 2), a word read takes about 270 cycles, so
a full boot takes about 550 000 cycles.

When the copy ends, `boot_done` rises. The CPU's memory port then gets the
MBC and starts fetching at address 0. If a boot transaction fails,
`boot_err` is set and the copy carries on.

## The CPU

### Control state machine

`siwa_cpu` has five states.

| State   | What happens |
|---------|--------------|
| `BOOT`  | Wait for `boot_done`. |
| `FETCH` | Check for interrupts. If one is taken, save the PC in `mepc` and jump to `mtvec`. If not, send the instruction address to the MBC (`m_en` pulse). |
| `IWAIT` | Wait for `mem_rdy`. Then `ld_id` captures the word in the instruction decoder. |
| `EXEC`  | One ALU pass. Write the result back, or take the branch, jump, `MRET`, CSR access or exception. A load or store starts its MBC transaction here. |
| `DWAIT` | Wait for the load or store to finish. |

Every state makes its decision from one 4-input condition multiplexer
(`s_cond`). Its inputs are:

- 0;
- `{error_drs, mem_rdy}` from the MBC;
- `Ntrpt_dco`, the code from the interrupt decoder;
- the branch outcome.

Cycle counts, with the 1-cycle SRAM (the CPU testbench checks them):

| Instruction class                        | Cycles |
|------------------------------------------|--------|
| ALU, LUI/AUIPC, branch, JAL/JALR, CSR, system | 4 |
| LB/LH/LW/LBU/LHU, SW                     | 6      |
| SB, SH                                   | 7      |
| access over the bus                      | 6 + bus and peripheral time |

The original chip reports an average CPI of 4. That matches the ALU case
here; the exact average depends on the program.

### Instruction decoder

`instr_decoder` captures the instruction on `ld_id`. It outputs:

- a 7-bit instruction code, `CODIF`: 0–45, one per instruction, listed in
  `siwa_pkg`;
- the immediate, sign- or zero-extended as the instruction needs;
- `rd`, `rs1`, `rs2`, the CSR number, and `funct3`.

Anything that is not one of the 46 instructions gets code `7'h7F`, which is
an illegal-instruction exception. These are RV32I less FENCE, plus `MRET`.
FENCE and FENCE.I are illegal on purpose: the machine has one thread and
one memory, so it has no use for them.

### Datapath

- **ALU (`alu`):**
  - Add and subtract use a constant-width carry-skip adder (`csk_adder`,
    4-bit blocks). Within a block the carry ripples. When a whole block
    propagates, a multiplexer passes its incoming carry straight to the next
    block.
  - Shifts use a logarithmic barrel shifter (`barrel_shifter`). It shifts
    only right; a left shift reverses the bits before and after.
  - The compare flags `eq`, `lt` and `ltu` come from the subtraction. They
    serve both SLT/SLTU and the branches.
- **Register file (`reg_file`):**
  - 32 × 32 bits, two read ports and one write port; `x0` always reads 0.
  - A register can be read and written in the same cycle. The read returns
    the value from before the clock edge. The control unit never needs a
    result in the cycle it is written.
  - It is built from flip-flops. The original uses a custom latch array,
    which is smaller but not portable RTL.

### Traps and interrupts

Sources, with the code stored in `mcausea[2:0]`:

| Code | Source            | Maskable | Extra information |
|------|-------------------|----------|-------------------|
| 1    | illegal instruction | no     | `mcauseb` = instruction word |
| 2    | bad address       | no       | `mcauseb` = the address |
| 3    | bus message (SPI/UART) | `mcr.mieio` | `mcausea[31:3]` = {src, code, addr[23:0]}, `mcauseb` = data |
| 4    | timer             | `mcr.miet` | — |
| 5    | analog pin        | `mcr.maie` | — |
| 6    | ECALL             | no       | `mcauseb` = instruction word |
| 7    | EBREAK            | no       | `mcauseb` = instruction word |

How a trap is handled:

- **Exceptions** (illegal instruction, bad address, ECALL, EBREAK) are
  taken at once, even inside a handler.
- **Interrupts:**
  - Their pending bits live in `mcr`.
  - They are checked only in `FETCH`, before the next instruction is
    fetched.
  - When several are pending, the analog pin comes first, then the timer,
    then the bus message.
- **Entry:**
  - `mepc` gets the address of the instruction that was interrupted or
    faulted.
  - The PC is loaded from `mtvec`, which is 0 after reset.
  - The flip-flop `actv_ntrpt` is set, which blocks further interrupts.
- **Return:** `MRET` jumps to `mepc` and clears `actv_ntrpt`. After an
  exception, the handler must add 4 to `mepc` itself, or the faulting
  instruction runs again.
- **Pending bits:** taking an interrupt clears its pending bit. A bus
  message also leaves the MBC's message register at that moment, so the
  handler finds the whole package in `mcausea`/`mcauseb`.

### Control and status registers

| CSR      | Number | Fields |
|----------|--------|--------|
| `mtvec`  | 0x305  | [31:2] handler address |
| `mepc`   | 0x341  | [31:2] saved PC |
| `mcausea`| 0x342  | [31:3] information, [2:0] source |
| `mcr`    | 0x7C0  | [16] bs_en, [15:8] gpio_conf, [5] maip, [4] maie, [3] mipio, [2] mipt, [1] mieio, [0] miet |
| `mcauseb`| 0x7C1  | 32-bit information |
| `tmrfnc` | 0x7C2  | timer limit (0 stops the timer) |
| `tmrval` | 0x7C3  | timer value |
| `gpio`   | 0x7C4  | [7:0] pin values |
| `frls`   | 0x7C5  | [7:0] to the analog front end |
| `isval`  | 0x7C6  | 32 bits to the analog front end |
| `isconf` | 0x7C7  | 32 bits to the analog front end |
| `istrg`  | 0x7C8  | [4:0] to the analog front end |

- The register numbers from 0x7C0 up are this design's own. Change them in
  `siwa_pkg` if your toolchain expects others.
- Bits that are not listed read as 0.
- `mcr` resets to `0x0001_0000`: the bus side on, every interrupt masked.
- Software may clear a pending bit by writing `mcr`.
- The timer counts every clock while `tmrfnc` is not 0. When `tmrval`
  equals `tmrfnc`, it raises `mipt` and restarts from 0. The period is
  therefore `tmrfnc` + 1 cycles.

## Memory and bus controller

The CPU starts a transaction on `mbc` with a one-cycle pulse on `en`.
`mem_rdy` goes low from the next cycle until the transaction is done. For a
load, the data is then on `d_read`, already aligned and extended.

A bad address raises `error_drs` instead. `error_drs` stays up until the
next `en` pulse, and `err_addr` keeps the failing address.

How each access is served:

- **SRAM loads and word stores:** 2 cycles.
- **Byte and half-word stores:** 3 cycles. The SRAM has no byte mask, so
  the MBC reads the word, merges the new bytes in, and writes it back.
- **Bus stores:** a `MSG_WRITE` package. The store is done as soon as the
  MBC's output FIFO accepts it.
- **Bus loads:** a `MSG_READ` package. The MBC waits for a `MSG_READ_RSP`
  from the same agent.

Any other package that reaches the MBC goes into a one-package message
register, which requests the bus-message interrupt. The register empties
when the CPU takes that interrupt. While it is full, the MBC takes no more
packages. A read response stuck behind an unhandled message therefore waits
until software handles the message.

## Peripherals

- **`spi_ctrl`** (SPI agent, mode 0, clock = system clock / (2·`CLK_DIV`))
  drives a standard SPI NOR flash:
  - A read package becomes command `0x03`, a 24-bit address and 32 data
    bits, assembled little-endian.
  - A write package becomes `0x06` (write enable), then `0x02` (page
    program) with the address and four bytes.
  - It does not wait for the flash's internal program time. Software must
    leave that time before reading the same page again.
- **`uart`** (8 data bits, no parity, 1 stop bit; `BAUD_DIV` clocks per
  bit, 174 = 115 200 Bd at 20 MHz):
  - A write package sends `data[7:0]`. It is accepted only when the
    transmitter is free, so back-to-back writes wait in the bus FIFOs.
  - A read package is answered with `{31'b0, tx_busy}`.
  - A received byte is sent to the CPU as a `MSG_DATA` package.
  - A byte that arrives while the previous one is still waiting is dropped
    and counted in `uart_overruns`.
- **`gpio`** (8 pins):
  - A 1 in `mcr.gpio_conf` makes a pin an output.
  - Inputs pass through a two-flop synchroniser.
  - Reading the `gpio` CSR gives the output value for output pins and the
    pad value for input pins.
- **Analog front end:** not part of this RTL. Its four control registers
  are outputs of `siwa_soc`, and its interrupt is the `analog_irq` input.

## Files

- `rtl/siwa_pkg.sv` holds the shared types and constants: package layout,
  IDs, codes, memory map, CSR numbers, instruction and ALU codes. Read it
  first.
- There is one module per file in `rtl/`. They are listed from the top
  down:
  - `siwa_soc`
  - `siwa_cpu`, `instr_decoder`, `alu`, `csk_adder`, `barrel_shifter`,
    `reg_file`, `csr_file`, `timer`, `irq_decoder`
  - `mbc`, `sram`, `boot_loader`
  - `bus_interface`, `bus_fifo`
  - `spi_ctrl`, `uart`, `gpio`
- Each file opens with a comment on what the module does, its interface
  and its timing.

Parameters and their defaults:

| Parameter (top) | Default | Meaning |
|-----------------|---------|---------|
| `SRAM_WORDS`    | 2048    | SRAM size in 32-bit words (8 kB) |
| `BOOT_WORDS`    | 2048    | words copied from flash at boot |
| `SPI_DIV`       | 2       | SPI clock = clk / (2·SPI_DIV) |
| `UART_DIV`      | 174     | clocks per UART bit |
| `FIFO_DEPTH`    | 2       | depth of every bus FIFO |

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Two helpers in `tb/`
support them:

- `tb/rv_asm_pkg.sv` has functions that encode RV32I instructions, so the
  testbenches write their test programs in SystemVerilog.
- `tb/spi_flash_model.sv` is a behavioural SPI flash.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/siwa_pkg.sv tb/rv_asm_pkg.sv tb/tb_siwa_soc.sv --top-module tb_siwa_soc
./obj_dir/Vtb_siwa_soc
```

Replace `tb_siwa_soc` with any other testbench name. Registers that are not
reset start at random values (`+verilator+rand+reset+2`). The design does
not depend on them.

- **`tb_siwa_soc`** runs the whole chip at the default parameters, in about
  600 000 cycles:
  1. It boots the full 8 kB from the flash model.
  2. The program then runs ALU loops, sub-word stores, GPIO, a flash read
     and a flash write over the bus, and three UART bytes; the last of these
     makes a status read be refused and retried on the bus.
  3. The program raises the four exceptions. It then switches the bus side
     of the MBC off and shows that a flash read becomes a bad address. The
     testbench causes the timer, UART-receive and analog interrupts.
  4. The testbench counts each mechanism, and fails if any count is zero:
     boot copy, every agent sending in its slot, bus retry, FIFO
     back-pressure, CPU memory waits, each trap source, timer hit, flash
     programming and GPIO drive.
- **`tb_siwa_cpu`** runs a program covering every instruction class on the
  CPU, MBC and SRAM. It checks results, trap logging and the cycle counts.
- **`tb_instr_sweep`** repeats the original per-instruction test: each
  instruction runs 1000 times with random operands. It covers the 43
  instructions that do not trap.
  - A reference model in the testbench runs the same program. All
    registers, the CSRs used and 3 kB of data must match it.
  - Cycles per instruction must be exactly 4, 6 or 7, as in the table
    above. An even mix of the 43 instructions averages 4.42.
- The unit testbenches compare against reference models. Some are
  exhaustive or random: adder, shifter, ALU, FIFO, register file. Others use
  directed sequences.

## Where this differs from the original chip, and what to trust

Taken from the original design:

- the block structure and the 65-bit package fields;
- two-entry FIFOs and distributed arbitration;
- the memory map's SRAM, bad-address and 8–32 MB regions;
- the MBC handshake (`mem_rdy`, `en` pulse, `Error_drs` waiting for the
  next `en`);
- the CSR set and bit fields;
- the interrupt sources and the fact that exceptions are always taken;
- the interrupt check before the fetch;
- the decoder's all-ones code for illegal instructions;
- the carry-skip adder and the barrel shifter.

Choices of this implementation that the original does not specify:

- the slot-based arbitration scheme and the meaning of `valid`/`ack`;
- agent IDs and message codes;
- the SPI/UART address split;
- CSR numbers above 0x7C0, source codes, and what `mcausea`/`mcauseb` carry;
- interrupt priority;
- the exact state machine and cycle counts;
- SPI flash commands, the UART frame and baud rate;
- GPIO polarity;
- boot size and order.

Known departures and limits:

- The original control unit registers its decoded outputs. Here they are
  decoded straight from the current state, one cycle earlier. This is what
  gives 4 cycles for ALU instructions.
- The original feeds an ALU zero flag into the fourth condition input. Here
  that input carries the full branch outcome, because BLT/BGE/BLTU/BGEU need
  more than equality.
- The original block diagram also shows a general I/O agent on the bus,
  but nothing describes it. GPIO is reached through its CSR instead, and
  the bus has three agents.
- The register file uses flip-flops, not latches.
- The SRAM is a plain array. Replace it with a memory macro for a chip.
- There is no clock gating or sleep mode. The original left these for
  later too.
- The analog stimulation and sensing front end, the I/O pads and the flash
  chip are not included.
