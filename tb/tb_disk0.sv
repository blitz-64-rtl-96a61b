// tb_disk0: self-checking test of the DISK0 controller with behavioural memory and
// storage. Uses 16 sectors of 512 bytes and a 300-cycle operation delay. Checks a
// two-sector write and read-back, that each command takes at least the delay, the
// interrupt pulse per command, the error cases (count 0, range past the end,
// misaligned address, unknown command), that the last sectors of the disk are
// reachable, and that a COMMAND stored while busy is ignored.
module tb_disk0;
  import blitz_io_pkg::*;
  localparam int unsigned NSEC = 16, SSZ = 512, DELAY = 300;
  localparam int unsigned ST_AW = $clog2(NSEC * SSZ / 8);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata; logic irq;
  logic st_en, st_write; logic [ST_AW-1:0] st_addr; logic [DW-1:0] st_wdata, st_rdata;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; mem_req_t mem_req; logic [DW-1:0] mem_rsp_rdata;

  disk0 #(.SECTOR_SIZE(SSZ), .NUM_SECTORS(NSEC), .OP_DELAY(DELAY), .PHYS_MEM_BYTES(64'h8000)) dut (.*);
  disk_store_model #(.AW(ST_AW)) u_st (.clk, .en(st_en), .write(st_write), .addr(st_addr),
    .wdata(st_wdata), .rdata(st_rdata));
  mem_model #(.AW(12)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req),
    .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  int checks = 0, failures = 0, irqs = 0;
  always @(posedge clk) if (rst_n && irq) irqs++;

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

  // Issue a command and wait; returns STATUS and the cycles it took.
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
    logic [DW-1:0] s; int cyc, irq0;
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    io_wr(DISK_STATUS, 64'd1);   // SETUP: interrupts on

    // write sectors 3..4 from memory 0x400
    for (int i = 0; i < 128; i++) u_mem.mem[(16'h400 >> 3) + i] = {32'hD15C0000, 32'(i * 2654435761)};
    irq0 = irqs;
    run(3, 2, 64'h400, 1, s, cyc);
    chk(s, 64'd0, "write ok");
    checks++; if (cyc < DELAY - 10) begin failures++; $display("FAIL write finished after %0d cycles", cyc); end
    for (int i = 0; i < 128; i++) chk(u_st.mem[3 * 64 + i], {32'hD15C0000, 32'(i * 2654435761)}, "sector data");
    chk(u_st.mem[3 * 64 - 1], 64'd0, "sector 2 untouched"); chk(u_st.mem[5 * 64], 64'd0, "sector 5 untouched");
    chk(64'(irqs - irq0), 64'd1, "irq on write");

    // read them back to 0x2000
    run(3, 2, 64'h2000, 0, s, cyc);
    chk(s, 64'd0, "read ok");
    for (int i = 0; i < 128; i++) chk(u_mem.mem[(16'h2000 >> 3) + i], {32'hD15C0000, 32'(i * 2654435761)}, "read data");

    // last two sectors are valid (14, 15 of 16)
    run(14, 2, 64'h2000, 1, s, cyc); chk(s, 64'd0, "last sectors ok");
    chk(u_st.mem[15 * 64 + 63], {32'hD15C0000, 32'(127 * 2654435761)}, "last sector data");
    // errors
    irq0 = irqs;
    run(14, 3, 64'h2000, 0, s, cyc); chk(s, 64'd2, "past end -> error");
    run(0, 0, 64'h2000, 0, s, cyc);  chk(s, 64'd2, "count 0 -> error");
    run(0, 1, 64'h2004, 0, s, cyc);  chk(s, 64'd2, "misaligned -> error");
    run(0, 1, 64'h7E00, 0, s, cyc);  chk(s, 64'd0, "last memory bytes ok");
    run(0, 2, 64'h7E00, 0, s, cyc);  chk(s, 64'd2, "past memory -> error");
    run(0, 1, 64'h2000, 5, s, cyc);  chk(s, 64'd2, "bad command -> error");
    chk(64'(irqs - irq0), 64'd6, "irq on every completion");

    // a command while busy is ignored
    u_st.mem[0] = 64'h1111;
    io_wr(DISK_SSTART, 0); io_wr(DISK_SCOUNT, 1); io_wr(DISK_MEMADDR, 64'h3000);
    io_wr(DISK_COMMAND, 0);
    io_wr(DISK_COMMAND, 1);     // ignored
    io_rd(DISK_STATUS, s); while (s[0]) io_rd(DISK_STATUS, s);
    chk(u_mem.mem[16'h3000 >> 3], 64'h1111, "busy command ignored");
    chk(s, 64'd0, "status after ignored command");

    // interrupts off
    io_wr(DISK_STATUS, 64'd0); irq0 = irqs;
    run(0, 1, 64'h3000, 0, s, cyc);
    repeat (3) @(negedge clk);
    chk(64'(irqs - irq0), 64'd0, "no irq when not requested");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
