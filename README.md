# Blitz-64 memory-mapped I/O subsystem

A Blitz-64 system has up to 128 cores and no I/O instructions. Software reaches
every device with ordinary LOADs and STOREs of 64-bit doublewords. These go into a
physical address region that starts at `0x4_0000_0000`, and each device owns one or
more 16 KiB pages there. This RTL is the part of the chip behind those addresses:

- an address decoder;
- an interrupt controller that shares device interrupts among many cores;
- a serial port;
- a sector-based disk controller;
- a DMA engine that can also hash (SHA-256) and encrypt (AES-256);
- a set of hardware lock registers for mutual exclusion between cores.

The cores, main memory, the disk medium, the Boot ROM, Secure Storage and the
emulator's host device are outside this design. Their connections are brought
out as ports of the top module `blitz_mmio_top`.

## Memory map

| Page base        | Device                          | PLIC device no. |
|------------------|---------------------------------|-----------------|
| `0x4_0000_0000`  | Boot ROM area, 64 pages (ext port) | –            |
| `0x4_0010_0000`  | Secure Storage area, 64 pages (ext port) | –      |
| `0x4_0020_0000`  | PLIC                            | –               |
| `0x4_0020_4000`  | UART0                           | 0               |
| `0x4_0020_8000`  | DISK0                           | 1               |
| `0x4_0020_C000`  | DMA controller                  | own interrupt line |
| `0x4_0021_0000`  | host device (ext port)          | –               |
| `0x4_0021_4000`  | lock controller                 | –               |

The lock controller's page is this design's choice, because no address was
specified for it. Every other address is the standard placement. A LOAD from a
page that holds no device returns 0, and a STORE there is dropped. Addresses
outside `0x4_0000_0000 .. 0x7_FFFF_FFFF` are treated the same way.

Doublewords are big-endian: the byte at address A is bits `[63:56]` of the
doubleword at `A & ~7`.

## Buses

Two bundles are defined in `rtl/blitz_io_pkg.sv`:

- **Core side** (`io_req_*` / `io_rsp_*` on the top). A valid/ready request
  carries a write flag, a 44-bit address and 64-bit data. Every request gets
  exactly one `io_rsp_valid` cycle, which carries the LOAD data.
  `mmio_decoder` keeps one request outstanding. An on-chip device is answered in
  the next cycle. An external access waits for `ext_rsp_valid`.
- **Device side** (`io_req_t`). Each device sees `valid`, `write`, a 14-bit page
  offset and the data. It returns LOAD data on `rdata` in the following cycle.
- **Memory side** (`mem_req_t`). This is a valid/ready request and one response
  cycle per request, read or write. DISK0 and the DMA controller each keep one
  request outstanding. They share the top's memory port through the round-robin
  arbiter `mem_arbiter`, which holds a grant until that master's response arrives.

## PLIC: claiming and retiring interrupts

This is the least conventional part of the design.

Each device has one request line into the PLIC. Each core gets one "PLIC
interrupt" line out of it. There are no priorities. The PLIC's job is to make
sure that each device request is handled by exactly one core.

Registers, as byte offsets in the PLIC page:

| Offset        | Register                      | Meaning |
|---------------|-------------------------------|---------|
| `0x000`       | EDGE_TRIGGERED_ARRAY          | bit d = 1: device d is edge-triggered |
| `0x008 + 8c`  | ENABLE_ARRAY[c]               | bit d = 1: core c may take device d |
| `0x408 + 8c`  | CLAIM_ARRAY[c]                | LOAD = claim, STORE = retire |

The PLIC keeps this state:

- For each device: a *claimed* flag and the number of the claiming core.
- For each edge-triggered device: a counter of requests that have not been
  claimed yet.

A device is **pending** when it is not claimed and one of these holds:

- it is edge-triggered and its counter is non-zero, or
- it is level-triggered and its line is high in this cycle.

A core's interrupt line is high while some pending device is enabled for it.
When one core claims the only pending device, the line therefore drops at every
other core. This is the "cancel at the other cores" behaviour.

**Claim** is a LOAD of CLAIM_ARRAY[c]:

1. If core c still holds a claim that it has not retired, the LOAD returns -1.
2. Otherwise the PLIC looks for the lowest-numbered device that is both pending
   and enabled for core c. If there is none, the LOAD returns -1.
3. If it finds device d, it marks d as claimed by c, decrements d's counter
   (edge-triggered devices only) and returns d.

Bus accesses arrive one at a time. So when several cores race for the same
interrupt, exactly one wins and the others read -1.

**Retire** is a STORE to CLAIM_ARRAY[c]; the value is ignored. It frees the device
that core c holds. A retire from a core with no claim does nothing. If a
level-triggered line is still high after the retire, or an edge counter is still
non-zero, the device becomes pending again straight away.

**Level-triggered lines.** These are sampled in every cycle. If a line drops
before any core claims it, the request is gone and a claim returns -1.

**Edge counting.** The counter goes up by one in every clock cycle that the line
is high. The devices here share the PLIC's clock and signal each event with a
one-cycle pulse, so one pulse counts as one request. This lets several requests
queue up while one is being serviced. The counter is 16 bits wide and saturates.

**Set-up checking.** EDGE and ENABLE are meant to be written before any core
starts claiming. A write to either of them after the first CLAIM access sets the
sticky `late_config` output. The write itself still takes effect.

Three points were settled in this design:

- The counter is decremented at claim, not at retire. The cores see the same
  interrupts either way.
- The lowest device number wins a claim.
- `core_irq` is registered, so it follows a state change one cycle later.

## UART0

| Offset | LOAD | STORE |
|--------|------|-------|
| `0x0`  | RECV_BYTE: reading it clears RECV_READY | SEND_BYTE: low 8 bits are sent |
| `0x8`  | STATUS: bit 0 RECV_READY, bit 1 SEND_READY | SETUP: bit 0 enables interrupts |

- Framing is 8N1, LSB first.
- A bit lasts `CLKS_PER_BIT` clock cycles. The default of 868 gives 115200 baud
  at 100 MHz.
- The receiver synchronises `rxd` through two flip-flops and samples each bit in
  its middle.
- With interrupts enabled, `irq` pulses for one cycle when a byte arrives and
  again when the transmitter is free. Configure its PLIC line as edge-triggered.

The line format, the baud rate and the rule that a new byte overwrites an unread
one are this design's choices.

## DISK0

To start a transfer, software stores three arguments and then a command:

- SECTOR_START (`0x08`)
- SECTOR_COUNT (`0x10`)
- MEMORY_ADDRESS (`0x18`)
- COMMAND (`0x20`): 0 = read from disk into memory, 1 = write memory to disk.

STATUS (`0x00`, LOAD) holds BUSY in bit 0 and ERROR in bit 1. A STORE to
offset `0x00` is SETUP; its bit 0 enables the interrupt.

The defaults are 512-byte sectors and 2000 sectors, which is 1,024,000 bytes.

The disk medium is outside the design. The controller reaches it through a
doubleword port `disk_st_*`, whose read data arrives one cycle after the request.
Data moves one doubleword at a time between that port and the memory port.

A command is refused (ERROR = 1, no data moved) in these cases:

- the count is 0;
- `start + count > NUM_SECTORS`;
- the memory address is not doubleword aligned;
- `address + bytes > PHYS_MEM_BYTES` (4 GiB by default);
- the command code is unknown.

Note the boundary: sectors 1998 and 1999 of a 2000-sector disk can be read.

A command or argument stored while BUSY is ignored. Completion, success or
failure, comes no earlier than `OP_DELAY` (10000) cycles after COMMAND. This
mimics a slow device. At completion BUSY clears and `irq` pulses if interrupts
are enabled.

## DMA controller

Registers, as byte offsets in the DMA page:

| Offset | Register |
|--------|----------|
| `0x00` | COMMAND (write-only) |
| `0x08` | STATUS: 0 = OK, 1 = BUSY |
| `0x10` | START_ADDR |
| `0x18` | TARGET_ADDR |
| `0x20` | BYTECOUNT |
| `0x28..0x40` | SHA256_0..3 |
| `0x48..0x60` | AES_KEY_0..3 |

Commands:

| Code | Command |
|------|---------|
| 1 | MOVE |
| 2 | ZERO |
| 3 | SHA256_SIMPLE |
| 4 | SHA256_INITIALIZE |
| 5 | SHA256_CHUNK |
| 6 | SHA256_FINALIZE |
| 7 | AES256_PREPARE |
| 8 | AES256_EN_SIMPLE |
| 9 | AES256_EN_INITIAL |
| 10 | AES256_EN_MIDDLE |
| 11 | AES256_EN_FINAL |
| 12 | AES256_DE_SIMPLE |
| 13 | AES256_DE_INITIAL |
| 14 | AES256_DE_MIDDLE |
| 15 | AES256_DE_FINAL |

Code 0 and codes above 15 are not defined. They finish at once and do nothing.

Every command, whatever it does, ends with a one-cycle pulse on `dma_irq`. This
is a separate interrupt line to the cores and does not pass through the PLIC. A
command stored while the controller is busy is ignored.

- **MOVE / ZERO** work on BYTECOUNT/8 doublewords. The low 3 bits of the
  addresses and of the count are ignored. Each doubleword is one memory access,
  or two for MOVE.
- **SHA-256.** INITIALIZE loads the standard initial hash. CHUNK feeds BYTECOUNT
  bytes, and any byte count is allowed. The bytes are collected one per cycle
  into a 64-byte block buffer that carries over from one chunk to the next. Each
  full block goes through `sha256_engine`, which runs one round per cycle, 65
  cycles per block. FINALIZE adds the usual padding: 0x80, zeros, and the 64-bit
  message length. The digest is read from SHA256_0..3, with SHA256_0 holding the
  most significant 64 bits. SIMPLE runs all three steps as one command.
- **AES-256.** PREPARE expands AES_KEY_0..3 (KEY_0 is the most significant) into
  60 round-key words inside `aes256_engine`. This takes 53 cycles. The
  encrypt/decrypt commands then process BYTECOUNT/16 blocks from START to TARGET,
  at 15 cycles per block.

Two AES behaviours are this design's choices:

- **Chaining.** Blocks are chained in CBC mode with an all-zero starting value.
  SIMPLE and INITIAL start a new chain; MIDDLE and FINAL continue it. A message
  can therefore be encrypted in several chunks and decrypted in a different
  split, and the result is the same. FINAL adds no padding.
- **No key yet.** An encrypt or decrypt before any PREPARE completes at once and
  moves nothing.

Addresses are 35 bits wide and are zero-extended onto the 44-bit memory port.

## Lock controller

There are 32 lock registers at offsets `0x00..0xF8`. A LOAD reads a register.
A STORE behaves like a normal memory write, with one exception: a non-zero value
stored into a register that already holds a non-zero value is dropped.

To take a lock, a core:

1. stores its own non-zero ID into the register;
2. loads the register back;
3. holds the lock if it finds its own ID there.

To release the lock, it stores 0. Locks reset to 0, which means free.

## CONTROLU board I/O

On the FPGA board, some devices are reached without memory-mapped I/O, through
the CONTROLU instruction. `controlu_io` is the board side of that instruction.
It sits beside the I/O subsystem with its own `ctl_*` ports. The core sends it
the instruction's 16-bit immediate and source register value, and it returns
the destination value one cycle later.

| Code | Operation | Effect |
|------|-----------|--------|
| 0 | DIGITAL_READ | returns the 8 slide switches in bits 7:0 |
| 1 | DIGITAL_WRITE | shows the low 16 bits on a 4-digit seven-segment display, in hex |
| 3 | SERIAL_STAT | bit 1 = output ready, bit 0 = input available |
| 4 | SERIAL_RECV | returns the received byte |
| 5 | SERIAL_SEND | sends the low 8 bits |
| 2, 6, 7, 8 | HALT, ENABLE_KERNEL, SET_STATUS, TLB_DEBUG | `op_core` is raised; these act inside the core |
| others | – | `op_illegal` is raised; the core should take an illegal-instruction exception |

Some details are this design's choices:

- **Display.** It is multiplexed and active-low, with each digit lit for
  `SCAN_CLKS` cycles (default 100,000). `an_n[0]` is the rightmost digit.
- **Serial channel.** It is a second copy of the UART0 logic, with its
  interrupts left off.
- **Switches.** They are synchronised through two flip-flops.

## What is not built

- **Outside parts.** The Boot ROM, Secure Storage and the host device have their
  page ranges decoded, and their accesses leave on the `ext_*` port. Their
  contents are not designed here.
- **Core-side parts.** The per-core timer is not designed. Nor are the
  core-internal CONTROLU operations (halt, kernel mode, status register, TLB
  read-out); these are only flagged.
- **Loosely sketched devices.** The memory-mapped digital I/O pins, the
  SPI/microSD interface, the links between neighbouring cores and HDMI/USB/WiFi
  are described only in outline, so they are not built.
- **Simplified DMA datapath.** It keeps one memory access in flight and gathers
  SHA bytes one per cycle. It is correct but does not reach full memory-bus
  bandwidth.
- **Delay units.** The disk's operation delay is counted in clock cycles, not in
  executed instructions.

## Files

| File | Contents |
|------|----------|
| `rtl/blitz_io_pkg.sv` | bus structs, base addresses, register offsets, DMA command codes |
| `rtl/blitz_mmio_top.sv` | top level |
| `rtl/mmio_decoder.sv` | page decoder and external port |
| `rtl/mem_arbiter.sv` | shares the memory port between DISK0 and DMA |
| `rtl/plic.sv` | interrupt controller |
| `rtl/uart0.sv` | serial port |
| `rtl/disk0.sv` | disk controller |
| `rtl/dma_ctrl.sv` | DMA controller |
| `rtl/sha256_engine.sv` | SHA-256 engine |
| `rtl/aes256_engine.sv` | AES-256 engine |
| `rtl/lock_ctrl.sv` | lock controller |
| `rtl/controlu_io.sv` | CONTROLU switches, display and serial channel |
| `tb/tb_<block>.sv` | self-checking testbench for each block |
| `tb/mem_model.sv` | behavioural main memory with random stalls |
| `tb/disk_store_model.sv` | behavioural disk medium |

Top-level parameters:

| Parameter | Default |
|-----------|---------|
| `NUM_CORES` | 128 |
| `NUM_PLIC_DEVS` | 64 |
| `UART_CLKS_PER_BIT` | 868 |
| `SECTOR_SIZE` | 512 |
| `NUM_SECTORS` | 2000 |
| `DISK_OP_DELAY` | 10000 |
| `PHYS_MEM_BYTES` | 4 GiB |
| `NUM_LOCKS` | 32 |
| `CTL_SCAN_CLKS` | 100,000 |

## Simulation

Each testbench checks its block against values worked out separately and ends
with `TB_RESULT checks=N failures=M`. The reference values are:

- the FIPS test vectors for SHA-256 and AES-256;
- a software SHA/AES/CBC model for the DMA tests;
- scoreboards for the disk, the decoder and the locks.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/blitz_io_pkg.sv rtl/*.sv tb/mem_model.sv tb/disk_store_model.sv \
    tb/tb_blitz_mmio_top.sv --top-module tb_blitz_mmio_top
./obj_dir/Vtb_blitz_mmio_top
```

To run another testbench, replace `tb_blitz_mmio_top` with its name.

`tb_blitz_mmio_top` runs the whole top at its default parameters (128 cores, 64
PLIC devices, a 2000-sector disk). It takes about 15 seconds. The test:

- has cores race for one interrupt;
- queues edge-triggered requests;
- services a level-triggered device;
- makes DISK0 and DMA contend for memory;
- sends a UART byte through the loopback and through the PLIC;
- moves a disk sector in both directions and has a bad disk request refused;
- hashes and encrypts with the DMA, and issues DMA commands while it is busy;
- contends for a lock;
- performs external and unmapped accesses;
- reads the switches, writes the display and loops a byte through the CONTROLU
  serial channel.

It counts each of these events and fails if any of them never happens.

`tb_disk0_full_image` runs DISK0 at its defaults on a whole disk image. The
image is 2000 sectors, the size of a small Unix file system of 1000 blocks of
1 KiB. The test writes the image with one command and reads it back with
another, and it takes a few seconds.
