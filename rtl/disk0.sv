// disk0: DISK0 sector read/write controller.
//
// Software stores SECTOR_START, SECTOR_COUNT and MEMORY_ADDRESS (any order, kept
// between commands), then COMMAND: 0 = read (disk -> memory), 1 = write (memory ->
// disk). The controller checks the request, moves SECTOR_COUNT * SECTOR_SIZE bytes
// one doubleword at a time between the disk storage port and its memory master port,
// and then clears BUSY; ERROR tells whether the command was refused. With
// INTERRUPTS_REQUESTED set (SETUP bit 0), irq pulses once per completed command,
// success or failure, so its PLIC line is meant to be edge-triggered.
//
// Registers (byte offsets): 0x00 R STATUS {ERROR, BUSY} / W SETUP, 0x08 SECTOR_START,
// 0x10 SECTOR_COUNT, 0x18 MEMORY_ADDRESS, 0x20 COMMAND.
//
// A command is refused (ERROR = 1, nothing transferred) when SECTOR_COUNT is 0, when
// SECTOR_START + SECTOR_COUNT exceeds NUM_SECTORS, when MEMORY_ADDRESS is not
// doubleword aligned, when MEMORY_ADDRESS + bytes exceeds PHYS_MEM_BYTES, or when
// the command code is neither 0 nor 1. A COMMAND (or any argument store) while BUSY
// is ignored and the running command continues.
//
// Follows the document: register set and offsets, commands, error conditions, the
// error being found before any data moves, the status staying put until the next
// command, the 512-byte sectors, 2000 sectors, and the operation delay of 10000
// (counted here in clock cycles, as a minimum time from COMMAND to completion).
// This design's choices: the storage port (one doubleword per access, read data
// one cycle after the request), the physical memory size used for the range check,
// and a range check that allows the last sector (the document's rule reads ">=" but
// its own example reads sectors 1998-1999 of 2000, which is what is implemented).
//
// Timing: STATUS shows BUSY from the cycle after COMMAND. A transfer costs two
// memory-port round trips' worth of cycles per doubleword at most; completion is
// no earlier than OP_DELAY cycles after COMMAND.
module disk0
  import blitz_io_pkg::*;
#(
  parameter int unsigned SECTOR_SIZE    = 512,
  parameter int unsigned NUM_SECTORS    = 2000,
  parameter int unsigned OP_DELAY       = 10000,
  parameter longint unsigned PHYS_MEM_BYTES = 64'h1_0000_0000,
  localparam int unsigned ST_AW = $clog2(NUM_SECTORS * SECTOR_SIZE / 8)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  io_req_t          req,
  output logic [DW-1:0]    rdata,
  output logic             irq,
  // disk storage port (doubleword granularity)
  output logic             st_en,
  output logic             st_write,
  output logic [ST_AW-1:0] st_addr,
  output logic [DW-1:0]    st_wdata,
  input  logic [DW-1:0]    st_rdata,
  // memory master port
  output logic             mem_req_valid,
  output mem_req_t         mem_req,
  input  logic             mem_req_ready,
  input  logic             mem_rsp_valid,
  input  logic [DW-1:0]    mem_rsp_rdata
);
  localparam int unsigned DW_PER_SECTOR = SECTOR_SIZE / 8;

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_ST_RD, S_ST_CAP, S_MEM_WR, S_MEM_RD, S_ST_WR, S_WAIT} state_e;
  state_e state;

  logic          intr_en, busy, error;
  logic [DW-1:0] sector_start, sector_count, mem_addr, cmd;
  logic [31:0]   delay;
  logic [DW-1:0] left;          // doublewords still to move
  logic [ST_AW-1:0] st_ptr;
  logic [PADDR_W-1:0] m_ptr;
  logic [DW-1:0] data_q;
  logic          pending;

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      intr_en <= 1'b0; sector_start <= '0; sector_count <= '0; mem_addr <= '0; rdata <= '0;
    end else if (req.valid) begin
      if (req.write) begin
        if (req.off == DISK_STATUS) intr_en <= req.wdata[0];
        if (!busy) begin
          if (req.off == DISK_SSTART)  sector_start <= req.wdata;
          if (req.off == DISK_SCOUNT)  sector_count <= req.wdata;
          if (req.off == DISK_MEMADDR) mem_addr     <= req.wdata;
        end
      end else begin
        rdata <= (req.off == DISK_STATUS) ? {62'd0, error, busy} : '0;
      end
    end
  end

  logic wr_cmd;
  assign wr_cmd = req.valid && req.write && req.off == DISK_COMMAND && !busy;

  // Request checks, with widths that cannot overflow.
  logic bad;
  logic [DW:0] sec_end, mem_end;
  always_comb begin
    sec_end = {1'b0, sector_start} + {1'b0, sector_count};
    mem_end = {1'b0, mem_addr} + ({1'b0, sector_count} * (DW+1)'(SECTOR_SIZE));
    bad = (sector_count == '0) || (sec_end > (DW+1)'(NUM_SECTORS)) ||
          (mem_addr[2:0] != 3'b000) || (mem_end > (DW+1)'(PHYS_MEM_BYTES)) ||
          (cmd > 64'd1);
  end

  // ---------------- ports ----------------
  always_comb begin
    st_en    = (state == S_ST_RD) || (state == S_ST_WR && pending && mem_rsp_valid);
    st_write = (state == S_ST_WR);
    st_addr  = st_ptr;
    st_wdata = mem_rsp_rdata;
    mem_req_valid = !pending && (state == S_MEM_WR || state == S_MEM_RD);
    mem_req = '{write: (state == S_MEM_WR), addr: m_ptr, wdata: data_q};
  end

  // ---------------- control ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; error <= 1'b0; irq <= 1'b0; cmd <= '0;
      delay <= '0; left <= '0; st_ptr <= '0; m_ptr <= '0; data_q <= '0; pending <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (delay != '0) delay <= delay - 1'b1;
      if (mem_req_valid && mem_req_ready) pending <= 1'b1;
      if (pending && mem_rsp_valid) pending <= 1'b0;
      unique case (state)
        S_IDLE: if (wr_cmd) begin
          cmd   <= req.wdata;
          busy  <= 1'b1;
          delay <= 32'(OP_DELAY);
          state <= S_CHECK;
        end
        S_CHECK: begin
          error  <= bad;
          left   <= sector_count * DW'(DW_PER_SECTOR);
          st_ptr <= ST_AW'(sector_start * DW'(DW_PER_SECTOR));
          m_ptr  <= mem_addr[PADDR_W-1:0];
          if (bad) state <= S_WAIT;
          else     state <= cmd[0] ? S_MEM_RD : S_ST_RD;
        end
        // read: storage -> memory
        S_ST_RD:  state <= S_ST_CAP;              // st_rdata valid next cycle
        S_ST_CAP: begin data_q <= st_rdata; state <= S_MEM_WR; end
        S_MEM_WR: if (pending && mem_rsp_valid) begin
          st_ptr <= st_ptr + 1'b1; m_ptr <= m_ptr + 8; left <= left - 1'b1;
          state  <= (left == 64'd1) ? S_WAIT : S_ST_RD;
        end
        // write: memory -> storage (storage written as the response arrives)
        S_MEM_RD: if (mem_req_valid && mem_req_ready) state <= S_ST_WR;
        S_ST_WR:  if (pending && mem_rsp_valid) begin
          st_ptr <= st_ptr + 1'b1; m_ptr <= m_ptr + 8; left <= left - 1'b1;
          state  <= (left == 64'd1) ? S_WAIT : S_MEM_RD;
        end
        S_WAIT: if (delay <= 32'd1) begin
          busy  <= 1'b0;
          irq   <= intr_en;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
