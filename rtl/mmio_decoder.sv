// mmio_decoder: address decoder for the Blitz-64 memory-mapped I/O region.
//
// Takes LOAD/STORE requests from the cores' side (valid/ready request, one response
// cycle per request) and sends each to the device whose page holds the address:
// the on-chip devices (PLIC, UART0, DISK0, DMA, lock controller) through io_req_t
// ports, and the regions whose hardware is outside this design (Boot ROM Area,
// Secure Storage Area, host device) through an external port with its own
// handshake. LOADs from addresses that hold no device return 0 and STOREs there
// are dropped, as are accesses outside 0x4_0000_0000 .. 0x7_FFFF_FFFF.
//
// Follows the document: 16 KiB pages, one device per page range, the emulator's
// default placement. This design's choices: the lock controller's page (next after
// the host device), answering unmapped accesses instead of faulting, and a single
// outstanding request.
//
// Timing: an on-chip device access is accepted at once and answered the next
// cycle; an external access is accepted when ext_req_ready is high and answered
// when ext_rsp_valid comes, with io_req_ready low in between.
module mmio_decoder
  import blitz_io_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // from the cores
  input  logic               io_req_valid,
  output logic               io_req_ready,
  input  logic               io_req_write,
  input  logic [PADDR_W-1:0] io_req_addr,
  input  logic [DW-1:0]      io_req_wdata,
  output logic               io_rsp_valid,
  output logic [DW-1:0]      io_rsp_rdata,
  // to the on-chip devices
  output io_req_t            dev_req   [N_IO_DEVS],
  input  logic [DW-1:0]      dev_rdata [N_IO_DEVS],
  // to the off-design regions (Boot ROM, Secure Storage, host device)
  output logic               ext_req_valid,
  output mem_req_t           ext_req,
  input  logic               ext_req_ready,
  input  logic               ext_rsp_valid,
  input  logic [DW-1:0]      ext_rsp_rdata
);
  typedef enum logic [2:0] {T_DEV, T_EXT, T_NONE} target_e;

  localparam int unsigned PN_W = PADDR_W - PAGE_OFF_W;
  function automatic logic [PN_W-1:0] pn(input logic [PADDR_W-1:0] a);
    return a[PADDR_W-1:PAGE_OFF_W];
  endfunction

  target_e     target;
  int unsigned dev_idx;
  logic [PN_W-1:0] page;
  assign page = pn(io_req_addr);

  always_comb begin
    target  = T_NONE;
    dev_idx = 0;
    if      (page == pn(PLIC_BASE)) begin target = T_DEV; dev_idx = IDX_PLIC; end
    else if (page == pn(UART_BASE)) begin target = T_DEV; dev_idx = IDX_UART; end
    else if (page == pn(DISK_BASE)) begin target = T_DEV; dev_idx = IDX_DISK; end
    else if (page == pn(DMA_BASE))  begin target = T_DEV; dev_idx = IDX_DMA;  end
    else if (page == pn(LOCK_BASE)) begin target = T_DEV; dev_idx = IDX_LOCK; end
    else if ((page >= pn(BOOT_ROM_BASE) && page < pn(BOOT_ROM_BASE) + PN_W'(64)) ||
             (page >= pn(SECURE_BASE)   && page < pn(SECURE_BASE)   + PN_W'(64)) ||
             (page == pn(HOST_BASE)))
      target = T_EXT;
  end

  logic ext_wait;            // external request outstanding
  logic int_rsp;             // on-chip / unmapped answer due this cycle
  logic [2:0] sel_q;
  logic       none_q;

  assign io_req_ready  = !ext_wait && (target != T_EXT || ext_req_ready);
  assign ext_req_valid = io_req_valid && !ext_wait && target == T_EXT;
  assign ext_req       = '{write: io_req_write, addr: io_req_addr, wdata: io_req_wdata};

  always_comb begin
    for (int i = 0; i < N_IO_DEVS; i++) begin
      dev_req[i].valid = io_req_valid && io_req_ready && target == T_DEV && dev_idx == i;
      dev_req[i].write = io_req_write;
      dev_req[i].off   = io_req_addr[PAGE_OFF_W-1:0];
      dev_req[i].wdata = io_req_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext_wait <= 1'b0;
      int_rsp  <= 1'b0;
      sel_q    <= '0;
      none_q   <= 1'b0;
    end else begin
      int_rsp <= io_req_valid && io_req_ready && target != T_EXT;
      if (io_req_valid && io_req_ready) begin
        sel_q  <= 3'(dev_idx);
        none_q <= (target == T_NONE);
      end
      if (ext_req_valid && ext_req_ready) ext_wait <= 1'b1;
      else if (ext_rsp_valid)            ext_wait <= 1'b0;
    end
  end

  always_comb begin
    io_rsp_valid = int_rsp || (ext_wait && ext_rsp_valid);
    io_rsp_rdata = '0;
    if (ext_wait)     io_rsp_rdata = ext_rsp_rdata;
    else if (!none_q) io_rsp_rdata = dev_rdata[sel_q];
  end

endmodule
