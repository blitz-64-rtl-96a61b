// blitz_mmio_top: the Blitz-64 memory-mapped I/O subsystem.
//
// The cores reach every device with ordinary LOADs and STOREs into the I/O region
// (0x4_0000_0000 .. 0x7_FFFF_FFFF). This top joins:
//   mmio_decoder  routes each access to the device page that holds it
//   plic          0x4_0020_0000  routes device interrupts to the cores (claim/retire)
//   uart0         0x4_0020_4000  serial port, PLIC device 0
//   disk0         0x4_0020_8000  sector storage controller, PLIC device 1
//   dma_ctrl      0x4_0020_C000  move/zero/SHA-256/AES-256 engine, own interrupt line
//   lock_ctrl     0x4_0021_4000  32 lock registers for inter-core mutual exclusion
//   mem_arbiter   lets DISK0 and the DMA controller share one memory master port
//   controlu_io   the board I/O that the CONTROLU instruction reaches directly
//                 (switches, seven-segment display, debug serial channel); it is
//                 not memory-mapped and has its own ctl_* ports
// Boot ROM, Secure Storage and the host device are not designed here; their
// accesses leave through the ext_* port. The disk medium and main memory are also
// outside: DISK0's storage port and the shared memory master port are brought out.
// PLIC device lines 2..63 are inputs for further devices.
//
// The device list, addresses and PLIC numbers of UART0 and DISK0 follow the
// emulator's default memory map; the lock controller's page and the shared memory
// port are this design's choices. The DMA completion interrupt goes straight to the
// cores as its own interrupt type (the document lists "DMA Complete Interrupt"
// beside "PLIC Interrupt"), not through the PLIC.
//
// Timing: see mmio_decoder (an on-chip device answers one cycle after it accepts a
// request) and the individual devices.
module blitz_mmio_top
  import blitz_io_pkg::*;
#(
  parameter int unsigned NUM_CORES      = 128,
  parameter int unsigned NUM_PLIC_DEVS  = 64,
  parameter int unsigned UART_CLKS_PER_BIT = 868,
  parameter int unsigned SECTOR_SIZE    = 512,
  parameter int unsigned NUM_SECTORS    = 2000,
  parameter int unsigned DISK_OP_DELAY  = 10000,
  parameter longint unsigned PHYS_MEM_BYTES = 64'h1_0000_0000,
  parameter int unsigned NUM_LOCKS      = 32,
  parameter int unsigned CTL_SCAN_CLKS  = 100_000,
  localparam int unsigned ST_AW = $clog2(NUM_SECTORS * SECTOR_SIZE / 8)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // LOAD/STORE port from the cores
  input  logic                     io_req_valid,
  output logic                     io_req_ready,
  input  logic                     io_req_write,
  input  logic [PADDR_W-1:0]       io_req_addr,
  input  logic [DW-1:0]            io_req_wdata,
  output logic                     io_rsp_valid,
  output logic [DW-1:0]            io_rsp_rdata,
  // interrupts to the cores
  output logic [NUM_CORES-1:0]     plic_irq,
  output logic                     dma_irq,
  output logic                     plic_late_config,
  // further interrupting devices (PLIC device numbers 2..)
  input  logic [NUM_PLIC_DEVS-1:2] ext_dev_irq,
  // Boot ROM / Secure Storage / host device accesses
  output logic                     ext_req_valid,
  output mem_req_t                 ext_req,
  input  logic                     ext_req_ready,
  input  logic                     ext_rsp_valid,
  input  logic [DW-1:0]            ext_rsp_rdata,
  // UART0 line
  output logic                     uart_txd,
  input  logic                     uart_rxd,
  // DISK0 storage medium
  output logic                     disk_st_en,
  output logic                     disk_st_write,
  output logic [ST_AW-1:0]         disk_st_addr,
  output logic [DW-1:0]            disk_st_wdata,
  input  logic [DW-1:0]            disk_st_rdata,
  // physical memory, shared by DISK0 and DMA
  output logic                     mem_req_valid,
  output mem_req_t                 mem_req,
  input  logic                     mem_req_ready,
  input  logic                     mem_rsp_valid,
  input  logic [DW-1:0]            mem_rsp_rdata,
  // CONTROLU board I/O (switches, seven-segment display, debug serial channel)
  input  logic                     ctl_op_valid,
  input  logic [15:0]              ctl_op_imm,
  input  logic [DW-1:0]            ctl_op_src,
  output logic                     ctl_op_done,
  output logic [DW-1:0]            ctl_op_result,
  output logic                     ctl_op_core,
  output logic                     ctl_op_illegal,
  input  logic [7:0]               sw,
  output logic [6:0]               seg_n,
  output logic [3:0]               an_n,
  output logic                     ctl_txd,
  input  logic                     ctl_rxd
);
  io_req_t       dev_req   [N_IO_DEVS];
  logic [DW-1:0] dev_rdata [N_IO_DEVS];

  mmio_decoder u_dec (
    .clk, .rst_n,
    .io_req_valid, .io_req_ready, .io_req_write, .io_req_addr, .io_req_wdata,
    .io_rsp_valid, .io_rsp_rdata,
    .dev_req, .dev_rdata,
    .ext_req_valid, .ext_req, .ext_req_ready, .ext_rsp_valid, .ext_rsp_rdata
  );

  logic uart_irq, disk_irq;

  plic #(.NUM_CORES(NUM_CORES), .NUM_DEVS(NUM_PLIC_DEVS)) u_plic (
    .clk, .rst_n, .req(dev_req[IDX_PLIC]), .rdata(dev_rdata[IDX_PLIC]),
    .dev_irq({ext_dev_irq, disk_irq, uart_irq}), .core_irq(plic_irq),
    .late_config(plic_late_config)
  );

  uart0 #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .req(dev_req[IDX_UART]), .rdata(dev_rdata[IDX_UART]), .irq(uart_irq),
    .txd(uart_txd), .rxd(uart_rxd)
  );

  logic          m_req_valid [2];
  mem_req_t      m_req       [2];
  logic          m_req_ready [2];
  logic          m_rsp_valid [2];
  logic [DW-1:0] m_rsp_rdata [2];

  disk0 #(.SECTOR_SIZE(SECTOR_SIZE), .NUM_SECTORS(NUM_SECTORS), .OP_DELAY(DISK_OP_DELAY),
          .PHYS_MEM_BYTES(PHYS_MEM_BYTES)) u_disk (
    .clk, .rst_n, .req(dev_req[IDX_DISK]), .rdata(dev_rdata[IDX_DISK]), .irq(disk_irq),
    .st_en(disk_st_en), .st_write(disk_st_write), .st_addr(disk_st_addr),
    .st_wdata(disk_st_wdata), .st_rdata(disk_st_rdata),
    .mem_req_valid(m_req_valid[0]), .mem_req(m_req[0]), .mem_req_ready(m_req_ready[0]),
    .mem_rsp_valid(m_rsp_valid[0]), .mem_rsp_rdata(m_rsp_rdata[0])
  );

  dma_ctrl u_dma (
    .clk, .rst_n, .req(dev_req[IDX_DMA]), .rdata(dev_rdata[IDX_DMA]), .irq(dma_irq),
    .mem_req_valid(m_req_valid[1]), .mem_req(m_req[1]), .mem_req_ready(m_req_ready[1]),
    .mem_rsp_valid(m_rsp_valid[1]), .mem_rsp_rdata(m_rsp_rdata[1])
  );

  lock_ctrl #(.NUM_LOCKS(NUM_LOCKS)) u_lock (
    .clk, .rst_n, .req(dev_req[IDX_LOCK]), .rdata(dev_rdata[IDX_LOCK])
  );

  controlu_io #(.CLKS_PER_BIT(UART_CLKS_PER_BIT), .SCAN_CLKS(CTL_SCAN_CLKS)) u_ctl (
    .clk, .rst_n,
    .op_valid(ctl_op_valid), .op_imm(ctl_op_imm), .op_src(ctl_op_src), .op_done(ctl_op_done),
    .op_result(ctl_op_result), .op_core(ctl_op_core), .op_illegal(ctl_op_illegal),
    .sw, .seg_n, .an_n, .txd(ctl_txd), .rxd(ctl_rxd)
  );

  mem_arbiter u_arb (
    .clk, .rst_n,
    .m_req_valid, .m_req, .m_req_ready, .m_rsp_valid, .m_rsp_rdata,
    .s_req_valid(mem_req_valid), .s_req(mem_req), .s_req_ready(mem_req_ready),
    .s_rsp_valid(mem_rsp_valid), .s_rsp_rdata(mem_rsp_rdata)
  );

endmodule
