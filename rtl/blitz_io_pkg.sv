// blitz_io_pkg: types and constants shared by the Blitz-64 memory-mapped I/O devices.
//
// The I/O region spans physical addresses 0x4_0000_0000 .. 0x7_FFFF_FFFF and is
// divided into 16 KiB pages; every device owns one or more whole pages. The base
// addresses below are the default placement of the Blitz-64 emulator. The page for
// the lock controller is this design's own choice: it is placed on the first page
// after the host device.
//
// Two bundles recur:
//   io_req_t   a LOAD/STORE from the cores to one device page (device side of the
//              address decoder). A device samples it in the cycle req.valid is high
//              and presents LOAD data on its rdata output in the following cycle.
//   mem_req_t  a doubleword access from a bus master (DISK0, DMA) to physical memory.
//              valid/ready handshake on the request; every request, read or write, is
//              answered by exactly one response cycle (rsp_valid), carrying read data
//              for a read. A master keeps at most one request outstanding.
// Doublewords are big-endian: the byte at address A is bits [63:56] of the
// doubleword at A & ~7.
package blitz_io_pkg;

  localparam int unsigned PADDR_W    = 44;   // physical address width
  localparam int unsigned PAGE_OFF_W = 14;   // 16 KiB pages
  localparam int unsigned DW         = 64;   // doubleword

  // Default device placement (emulator memory map).
  localparam logic [PADDR_W-1:0] IO_REGION_BASE = 44'h004_0000_0000;
  localparam logic [PADDR_W-1:0] IO_REGION_END  = 44'h007_FFFF_FFFF;
  localparam logic [PADDR_W-1:0] BOOT_ROM_BASE  = 44'h004_0000_0000;  // 64 pages
  localparam logic [PADDR_W-1:0] SECURE_BASE    = 44'h004_0010_0000;  // 64 pages
  localparam logic [PADDR_W-1:0] PLIC_BASE      = 44'h004_0020_0000;
  localparam logic [PADDR_W-1:0] UART_BASE      = 44'h004_0020_4000;
  localparam logic [PADDR_W-1:0] DISK_BASE      = 44'h004_0020_8000;
  localparam logic [PADDR_W-1:0] DMA_BASE       = 44'h004_0020_C000;
  localparam logic [PADDR_W-1:0] HOST_BASE      = 44'h004_0021_0000;
  localparam logic [PADDR_W-1:0] LOCK_BASE      = 44'h004_0021_4000;  // own choice

  // Index of each on-chip device on the address decoder's device ports.
  localparam int unsigned N_IO_DEVS = 5;
  localparam int unsigned IDX_PLIC = 0;
  localparam int unsigned IDX_UART = 1;
  localparam int unsigned IDX_DISK = 2;
  localparam int unsigned IDX_DMA  = 3;
  localparam int unsigned IDX_LOCK = 4;

  // PLIC device numbers used by the emulator.
  localparam int unsigned PLIC_DEV_UART0 = 0;
  localparam int unsigned PLIC_DEV_DISK0 = 1;

  typedef struct packed {
    logic                  valid;
    logic                  write;   // 1 = STORE, 0 = LOAD
    logic [PAGE_OFF_W-1:0] off;     // byte offset within the device page
    logic [DW-1:0]         wdata;
  } io_req_t;

  typedef struct packed {
    logic               write;
    logic [PADDR_W-1:0] addr;       // byte address, doubleword aligned
    logic [DW-1:0]      wdata;
  } mem_req_t;

  // ---------------- UART0 register offsets ----------------
  localparam logic [PAGE_OFF_W-1:0] UART_DATA  = 14'h0000; // W: SEND_BYTE  R: RECV_BYTE
  localparam logic [PAGE_OFF_W-1:0] UART_CTRL  = 14'h0008; // W: SETUP      R: STATUS

  // ---------------- DISK0 register offsets ----------------
  localparam logic [PAGE_OFF_W-1:0] DISK_STATUS   = 14'h0000; // R: STATUS  W: SETUP
  localparam logic [PAGE_OFF_W-1:0] DISK_SSTART   = 14'h0008;
  localparam logic [PAGE_OFF_W-1:0] DISK_SCOUNT   = 14'h0010;
  localparam logic [PAGE_OFF_W-1:0] DISK_MEMADDR  = 14'h0018;
  localparam logic [PAGE_OFF_W-1:0] DISK_COMMAND  = 14'h0020;

  // ---------------- DMA register offsets and codes ----------------
  localparam logic [PAGE_OFF_W-1:0] DMA_COMMAND     = 14'h0000;
  localparam logic [PAGE_OFF_W-1:0] DMA_STATUS      = 14'h0008;
  localparam logic [PAGE_OFF_W-1:0] DMA_START_ADDR  = 14'h0010;
  localparam logic [PAGE_OFF_W-1:0] DMA_TARGET_ADDR = 14'h0018;
  localparam logic [PAGE_OFF_W-1:0] DMA_BYTECOUNT   = 14'h0020;
  localparam logic [PAGE_OFF_W-1:0] DMA_SHA256_0    = 14'h0028;  // .. _3 at 0x40
  localparam logic [PAGE_OFF_W-1:0] DMA_AES_KEY_0   = 14'h0048;  // .. _3 at 0x60

  typedef enum logic [3:0] {
    CMD_NONE           = 4'd0,
    CMD_MOVE           = 4'd1,
    CMD_ZERO           = 4'd2,
    CMD_SHA256_SIMPLE  = 4'd3,
    CMD_SHA256_INIT    = 4'd4,
    CMD_SHA256_CHUNK   = 4'd5,
    CMD_SHA256_FINAL   = 4'd6,
    CMD_AES256_PREPARE = 4'd7,
    CMD_AES_EN_SIMPLE  = 4'd8,
    CMD_AES_EN_INITIAL = 4'd9,
    CMD_AES_EN_MIDDLE  = 4'd10,
    CMD_AES_EN_FINAL   = 4'd11,
    CMD_AES_DE_SIMPLE  = 4'd12,
    CMD_AES_DE_INITIAL = 4'd13,
    CMD_AES_DE_MIDDLE  = 4'd14,
    CMD_AES_DE_FINAL   = 4'd15
  } dma_cmd_e;

  localparam logic [DW-1:0] DMA_OK   = 64'd0;
  localparam logic [DW-1:0] DMA_BUSY = 64'd1;

endpackage
