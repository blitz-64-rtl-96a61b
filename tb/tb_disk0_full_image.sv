// tb_disk0_full_image: DISK0 at its default size (2000 sectors of 512 bytes, a
// 10000-cycle operation delay) moving a whole disk image in both directions.
//
// This is the size of a small Unix file system image: 1000 blocks of 1 KiB fill
// the 2000 sectors exactly. The test fills 1,024,000 bytes of memory with a
// pattern computed from the address and writes all 2000 sectors with one WRITE
// command. It checks the disk medium word by word, reads the image back into a
// second memory region with one READ command, and checks that region. It also checks that
// SECTOR_START 0 with SECTOR_COUNT 2001 is refused, and that every command took at
// least the operation delay.
module tb_disk0_full_image;
  import blitz_io_pkg::*;
  localparam int unsigned NSEC  = 2000, SSZ = 512, DELAY = 10000;
  localparam int unsigned NDW   = NSEC * SSZ / 8;           // 128,000 doublewords
  localparam int unsigned ST_AW = $clog2(NDW);
  localparam logic [34:0] SRC   = 35'h0_0000;
  localparam logic [34:0] DST   = 35'h10_0000;              // 1 MiB further on
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata; logic irq;
  logic st_en, st_write; logic [ST_AW-1:0] st_addr; logic [DW-1:0] st_wdata, st_rdata;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; mem_req_t mem_req; logic [DW-1:0] mem_rsp_rdata;

  disk0 dut (.*);
  disk_store_model #(.AW(ST_AW)) u_st (.clk, .en(st_en), .write(st_write), .addr(st_addr),
    .wdata(st_wdata), .rdata(st_rdata));
  mem_model #(.AW(18), .LATENCY(1), .STALL(1'b0)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid),
    .req(mem_req), .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  int checks = 0, failures = 0;

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic io_wr(input logic [13:0] off, input logic [DW-1:0] d);
    @(negedge clk); req = '{valid: 1'b1, write: 1'b1, off: off, wdata: d};
    @(negedge clk); req.valid = 1'b0;
  endtask
  task automatic io_rd(input logic [13:0] off, output logic [DW-1:0] d);
    @(negedge clk); req = '{valid: 1'b1, write: 1'b0, off: off, wdata: '0};
    @(negedge clk); req.valid = 1'b0; d = rdata;
  endtask

  // Image contents: a value that differs in every doubleword and every sector.
  function automatic logic [DW-1:0] image(input int unsigned i);
    return {16'hF5F5, 16'(i / 64), 32'(i * 32'h9E3779B1)};
  endfunction

  task automatic run(input logic [DW-1:0] sstart, input logic [DW-1:0] scount,
                     input logic [DW-1:0] maddr, input logic [DW-1:0] c,
                     output logic [DW-1:0] status, output int cyc);
    io_wr(DISK_SSTART, sstart); io_wr(DISK_SCOUNT, scount); io_wr(DISK_MEMADDR, maddr);
    io_wr(DISK_COMMAND, c);
    cyc = 0;
    io_rd(DISK_STATUS, status);
    while (status[0]) begin io_rd(DISK_STATUS, status); cyc += 2; end
  endtask

  initial begin
    logic [DW-1:0] s; int cyc, bad;
    req = '0;
    for (int i = 0; i < NDW; i++) u_mem.mem[(SRC >> 3) + i] = image(i);
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // refused: one sector too many
    run(0, NSEC + 1, 64'(SRC), 1, s, cyc);
    chk(s, 64'h2, "2001 sectors refused");
    chk(64'(cyc >= DELAY - 4), 1, "error still takes the operation delay");

    // the whole image to disk
    run(0, NSEC, 64'(SRC), 1, s, cyc);
    chk(s, 64'h0, "full-disk WRITE succeeds");
    chk(64'(cyc >= NDW), 1, "WRITE moved 128,000 doublewords");
    bad = 0;
    for (int i = 0; i < NDW; i++) if (u_st.mem[i] !== image(i)) bad++;
    chk(64'(bad), 0, "every doubleword of the disk medium");

    // and back into a second region
    run(0, NSEC, 64'(DST), 0, s, cyc);
    chk(s, 64'h0, "full-disk READ succeeds");
    bad = 0;
    for (int i = 0; i < NDW; i++) if (u_mem.mem[(DST >> 3) + i] !== image(i)) bad++;
    chk(64'(bad), 0, "every doubleword read back");
    chk(u_mem.mem[(DST >> 3) + NDW], 64'h0, "nothing written past the image");
    $display("full image: %0d doublewords, last READ took %0d cycles", NDW, cyc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
