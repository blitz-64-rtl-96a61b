// tb_mmio_decoder: self-checking test of the I/O address decoder. Stand-in devices
// answer a LOAD with a value built from their index and the offset they saw; an
// external stand-in answers after a random delay. Checks that each device page
// reaches exactly its device with the right offset, that STOREs carry their data,
// that the Boot ROM, Secure Storage and host pages go out through the external
// port, that unmapped and out-of-region addresses read 0 and reach nobody, and the
// response timing (next cycle for on-chip devices).
module tb_mmio_decoder;
  import blitz_io_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic io_req_valid, io_req_ready, io_req_write, io_rsp_valid;
  logic [PADDR_W-1:0] io_req_addr; logic [DW-1:0] io_req_wdata, io_rsp_rdata;
  io_req_t dev_req [N_IO_DEVS]; logic [DW-1:0] dev_rdata [N_IO_DEVS];
  logic ext_req_valid, ext_req_ready, ext_rsp_valid; mem_req_t ext_req; logic [DW-1:0] ext_rsp_rdata;

  mmio_decoder dut (.*);

  int checks = 0, failures = 0;
  int hits [N_IO_DEVS];
  logic [DW-1:0] last_wdata [N_IO_DEVS];
  int ext_hits;

  // Stand-in devices: registered LOAD data = {index, offset}.
  for (genvar i = 0; i < N_IO_DEVS; i++) begin : g_dev
    always_ff @(posedge clk) begin
      if (dev_req[i].valid) begin
        hits[i] <= hits[i] + 1;
        if (dev_req[i].write) last_wdata[i] <= dev_req[i].wdata;
        else dev_rdata[i] <= {8'(i + 1), 42'd0, dev_req[i].off};
      end
    end
  end

  int ext_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin ext_cnt <= 0; ext_rsp_valid <= 0; ext_req_ready <= 0; end
    else begin
      ext_rsp_valid <= 0;
      if (ext_cnt == 0) ext_req_ready <= ($urandom_range(1) == 1);
      if (ext_req_valid && ext_req_ready) begin
        ext_req_ready <= 0; ext_cnt <= $urandom_range(5, 1); ext_hits <= ext_hits + 1;
        ext_rsp_rdata <= {20'hE0000, ext_req.addr};
      end else if (ext_cnt == 1) begin ext_cnt <= 0; ext_rsp_valid <= 1; end
      else if (ext_cnt > 1) ext_cnt <= ext_cnt - 1;
    end
  end

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic access(input logic [PADDR_W-1:0] a, input bit wr, input logic [DW-1:0] wd,
                        output logic [DW-1:0] rd, output int lat);
    @(negedge clk);
    io_req_valid = 1; io_req_write = wr; io_req_addr = a; io_req_wdata = wd;
    #1; // let the decoder settle on the new address before sampling ready
    while (!io_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); io_req_valid = 0; lat = 1;
    while (!io_rsp_valid) begin @(negedge clk); lat++; end
    rd = io_rsp_rdata;
  endtask

  initial begin
    logic [DW-1:0] d; int lat;
    logic [PADDR_W-1:0] base [N_IO_DEVS];
    base[IDX_PLIC] = PLIC_BASE; base[IDX_UART] = UART_BASE; base[IDX_DISK] = DISK_BASE;
    base[IDX_DMA] = DMA_BASE; base[IDX_LOCK] = LOCK_BASE;
    for (int i = 0; i < N_IO_DEVS; i++) begin hits[i] = 0; dev_rdata[i] = '0; last_wdata[i] = '0; end
    ext_hits = 0;
    io_req_valid = 0; io_req_write = 0; io_req_addr = '0; io_req_wdata = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    for (int i = 0; i < N_IO_DEVS; i++) begin
      for (int k = 0; k < 4; k++) begin
        automatic logic [13:0] off = (k == 3) ? 14'h3FF8 : 14'(8 * $urandom_range(200));
        int prev_hits [N_IO_DEVS];
        for (int j = 0; j < N_IO_DEVS; j++) prev_hits[j] = hits[j];
        access(base[i] + 44'(off), 0, '0, d, lat);
        chk(d, {8'(i + 1), 42'd0, off}, "device load data/offset");
        chk(64'(lat), 1, "on-chip latency");
        for (int j = 0; j < N_IO_DEVS; j++)
          chk(64'(hits[j] - prev_hits[j]), (j == i) ? 1 : 0, "only the addressed device");
      end
      access(base[i] + 44'h10, 1, 64'h1234_0000 + 64'(i), d, lat);
      chk(last_wdata[i], 64'h1234_0000 + 64'(i), "store data");
    end

    // external regions
    begin
      logic [PADDR_W-1:0] ea [5];
      int e0;
      ea = '{BOOT_ROM_BASE, BOOT_ROM_BASE + 44'hF_FFF8, SECURE_BASE + 44'h8_0000,
             SECURE_BASE + 44'hF_FFF8, HOST_BASE + 44'h20};
      foreach (ea[k]) begin
        e0 = ext_hits;
        access(ea[k], 0, '0, d, lat);
        chk(d, {20'hE0000, ea[k]}, "external load");
        chk(64'(ext_hits - e0), 1, "one external access");
      end
    end

    // unmapped: gap page, page past the lock controller, outside the I/O region
    begin
      logic [PADDR_W-1:0] ua [4];
      int tot0, tot1;
      ua = '{44'h004_0021_8000, 44'h005_0000_0000, 44'h000_0000_1000, 44'h008_0000_0000};
      foreach (ua[k]) begin
        tot0 = ext_hits; foreach (hits[j]) tot0 += hits[j];
        access(ua[k], 0, '0, d, lat);
        chk(d, 0, "unmapped reads 0");
        access(ua[k], 1, 64'hFFFF, d, lat);
        tot1 = ext_hits; foreach (hits[j]) tot1 += hits[j];
        chk(64'(tot1 - tot0), 0, "unmapped reaches nobody");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
