// tb_blitz_mmio_top: end-to-end test of the whole I/O subsystem at its default
// parameters (128 cores, 64 PLIC devices, 868 clocks per UART bit, 512-byte
// sectors, 2000 sectors, 10000-cycle disk delay). The testbench plays the cores:
// it programs every device through LOADs and STOREs at their physical addresses,
// handles interrupts by claiming and retiring through the PLIC, and checks the
// results in behavioural memory, disk storage and the UART line.
//
// Mechanisms that must each happen at least once (a failure is counted if one
// never does): a lost PLIC claim race, two queued edge interrupts from one device,
// a level-triggered external device, DISK0 and DMA contending for the memory port,
// an external-region access, an unmapped access, a refused lock acquire, a DISK0
// error, DMA_STATUS reading BUSY, and a byte sent and received through the
// CONTROLU debug serial channel. CONTROLU switch and display operations are
// checked as well.
module tb_blitz_mmio_top;
  import blitz_io_pkg::*;
  localparam int unsigned CPB = 868;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic io_req_valid, io_req_ready, io_req_write, io_rsp_valid;
  logic [PADDR_W-1:0] io_req_addr; logic [DW-1:0] io_req_wdata, io_rsp_rdata;
  logic [127:0] plic_irq; logic dma_irq, plic_late_config;
  logic [63:2] ext_dev_irq;
  logic ext_req_valid, ext_req_ready, ext_rsp_valid; mem_req_t ext_req; logic [DW-1:0] ext_rsp_rdata;
  logic uart_txd, uart_rxd, tb_rxd, loopback;
  logic disk_st_en, disk_st_write; logic [16:0] disk_st_addr; logic [DW-1:0] disk_st_wdata, disk_st_rdata;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; mem_req_t mem_req; logic [DW-1:0] mem_rsp_rdata;

  logic ctl_op_valid, ctl_op_done, ctl_op_core, ctl_op_illegal;
  logic [15:0] ctl_op_imm; logic [DW-1:0] ctl_op_src, ctl_op_result;
  logic [7:0] sw; logic [6:0] seg_n; logic [3:0] an_n; logic ctl_txd, ctl_rxd;
  assign ctl_rxd = ctl_txd;   // debug serial channel looped back

  blitz_mmio_top dut (.*);

  assign uart_rxd = loopback ? uart_txd : tb_rxd;

  mem_model #(.AW(16)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req),
    .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));
  disk_store_model #(.AW(17)) u_st (.clk, .en(disk_st_en), .write(disk_st_write),
    .addr(disk_st_addr), .wdata(disk_st_wdata), .rdata(disk_st_rdata));

  // External region (Boot ROM etc.): answers 3 cycles after accepting.
  int ext_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin ext_cnt <= 0; ext_rsp_valid <= 0; ext_req_ready <= 1; ext_rsp_rdata <= '0; end
    else begin
      ext_rsp_valid <= 0;
      if (ext_req_valid && ext_req_ready) begin
        ext_req_ready <= 0; ext_cnt <= 3; ext_rsp_rdata <= {20'hB0070, ext_req.addr};
      end else if (ext_cnt == 1) begin ext_cnt <= 0; ext_rsp_valid <= 1; ext_req_ready <= 1; end
      else if (ext_cnt > 1) ext_cnt <= ext_cnt - 1;
    end
  end

  int checks = 0, failures = 0;
  int n_race = 0, n_edge_queue = 0, n_level = 0, n_contend = 0, n_ext = 0, n_unmapped = 0;
  int n_ctl_serial = 0;
  int n_lock_refused = 0, n_disk_error = 0, n_dma_busy = 0, n_dma_irq = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.m_req_valid[0] && dut.m_req_valid[1]) n_contend++;
    if (dma_irq) n_dma_irq++;
  end

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // One CONTROLU operation; the result is valid one cycle later.
  task automatic ctl(input logic [15:0] imm, input logic [DW-1:0] src, output logic [DW-1:0] res);
    @(negedge clk); ctl_op_valid = 1; ctl_op_imm = imm; ctl_op_src = src;
    @(negedge clk); ctl_op_valid = 0;
    chk(64'(ctl_op_done), 1, "CONTROLU done");
    res = ctl_op_result;
  endtask

  // One LOAD or STORE from "a core".
  task automatic access(input logic [PADDR_W-1:0] a, input bit wr, input logic [DW-1:0] wd,
                        output logic [DW-1:0] rd);
    @(negedge clk);
    io_req_valid = 1; io_req_write = wr; io_req_addr = a; io_req_wdata = wd;
    #1; // let the decoder settle on the new address before sampling ready
    while (!io_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); io_req_valid = 0;
    while (!io_rsp_valid) @(negedge clk);
    rd = io_rsp_rdata;
  endtask
  task automatic st(input logic [PADDR_W-1:0] a, input logic [DW-1:0] d);
    logic [DW-1:0] x; access(a, 1, d, x);
  endtask
  task automatic ld(input logic [PADDR_W-1:0] a, output logic [DW-1:0] d);
    access(a, 0, '0, d);
  endtask

  function automatic logic [PADDR_W-1:0] claim_addr(input int c); return PLIC_BASE + 44'(16'h408 + 8 * c); endfunction
  function automatic logic [PADDR_W-1:0] en_addr(input int c);    return PLIC_BASE + 44'(8 + 8 * c); endfunction

  task automatic wait_irq(input int core, input int max_cycles);
    int n = 0;
    while (!plic_irq[core] && n < max_cycles) begin @(negedge clk); n++; end
    checks++;
    if (!plic_irq[core]) begin failures++; $display("FAIL no PLIC interrupt at core %0d", core); end
  endtask

  task automatic wait_dma;
    int n0 = n_dma_irq;
    logic [DW-1:0] s;
    ld(DMA_BASE + 44'(DMA_STATUS), s);
    if (s == DMA_BUSY) n_dma_busy++;
    while (n_dma_irq == n0) @(negedge clk);
    ld(DMA_BASE + 44'(DMA_STATUS), s);
    chk(s, DMA_OK, "DMA ok after interrupt");
  endtask

  // Serial monitor on the transmit line.
  logic [7:0] tx_seen [$];
  initial begin
    forever begin
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      if (!uart_txd) begin
        logic [7:0] b;
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
        repeat (CPB) @(posedge clk);
        tx_seen.push_back(b);
      end
    end
  end

  task automatic drive_rx(input logic [7:0] b);
    tb_rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin tb_rxd = b[i]; repeat (CPB) @(negedge clk); end
    tb_rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    logic [DW-1:0] d, e;
    io_req_valid = 0; io_req_write = 0; io_req_addr = '0; io_req_wdata = '0; ctl_op_valid = 0; ctl_op_imm = '0; ctl_op_src = '0; sw = '0;
    ext_dev_irq = '0; tb_rxd = 1; loopback = 0;
    repeat (5) @(negedge clk); rst_n = 1;

    // ---------------- PLIC set-up ----------------
    st(PLIC_BASE, 64'h3);                         // UART0, DISK0 edge-triggered
    st(en_addr(0),   64'h3);                      // core 0: UART0, DISK0
    st(en_addr(1),   64'h22);                     // core 1: DISK0, device 5
    st(en_addr(127), 64'h1);                      // core 127: UART0

    // ---------------- UART0 transmit with interrupt ----------------
    st(UART_BASE + 44'(UART_CTRL), 64'h1);
    st(UART_BASE + 44'(UART_DATA), 64'h48);
    wait_irq(127, 20 * CPB);
    chk(64'(plic_irq[0]), 1, "UART irq also at core 0");
    chk(64'(plic_irq[1]), 0, "UART irq not at core 1");
    ld(claim_addr(127), d); chk(d, 0, "core 127 claims UART0");
    ld(claim_addr(0), d);   chk(d, '1, "core 0 loses the claim");
    if (d == '1) n_race++;
    ld(UART_BASE + 44'(UART_CTRL), d); chk(d & 64'h2, 64'h2, "SEND_READY back");
    st(claim_addr(127), 0);
    chk(64'(tx_seen.size()), 1, "one byte on the line");
    if (tx_seen.size() > 0) chk(64'(tx_seen[0]), 64'h48, "byte on the line");

    // ---------------- UART0 loopback: two edge interrupts queue up ----------------
    loopback = 1;
    st(UART_BASE + 44'(UART_DATA), 64'h69);
    repeat (11 * CPB) @(negedge clk);             // received and sent: two events
    loopback = 0;
    chk(64'(dut.u_plic.counter[0]), 2, "two edge events counted");
    if (dut.u_plic.counter[0] == 2) n_edge_queue++;
    ld(claim_addr(0), d); chk(d, 0, "first of two");
    ld(UART_BASE + 44'(UART_CTRL), d); chk(d, 64'h3, "byte received, sender ready");
    ld(UART_BASE + 44'(UART_DATA), d); chk(d, 64'h69, "loopback byte");
    st(claim_addr(0), 0);
    wait_irq(0, 10);
    ld(claim_addr(0), d); chk(d, 0, "second of two");
    st(claim_addr(0), 0);
    ld(claim_addr(0), d); chk(d, '1, "none left");

    // ---------------- UART0 receive ----------------
    drive_rx(8'hC5);
    wait_irq(127, 10);
    ld(claim_addr(127), d); chk(d, 0, "rx interrupt");
    ld(UART_BASE + 44'(UART_DATA), d); chk(d, 64'hC5, "received byte");
    st(claim_addr(127), 0);
    st(UART_BASE + 44'(UART_CTRL), 64'h0);

    // ---------------- DISK0 write while DMA moves a page ----------------
    for (int i = 0; i < 128; i++) u_mem.mem[(32'h10000 >> 3) + i] = 64'hD00D_0000_0000_0000 | 64'(i);
    for (int i = 0; i < 2048; i++) u_mem.mem[(32'h40000 >> 3) + i] = 64'hFACE_0000_0000_0000 | 64'(i * 3);
    st(DISK_BASE + 44'(DISK_STATUS), 64'h1);
    st(DISK_BASE + 44'(DISK_SSTART), 64'd1998);
    st(DISK_BASE + 44'(DISK_SCOUNT), 64'd2);
    st(DISK_BASE + 44'(DISK_MEMADDR), 64'h10000);
    st(DMA_BASE + 44'(DMA_START_ADDR), 64'h40000);
    st(DMA_BASE + 44'(DMA_TARGET_ADDR), 64'h50000);
    st(DMA_BASE + 44'(DMA_BYTECOUNT), 64'd16384);
    st(DISK_BASE + 44'(DISK_COMMAND), 64'd1);
    st(DMA_BASE + 44'(DMA_COMMAND), 64'(CMD_MOVE));
    wait_dma();
    for (int i = 0; i < 2048; i++)
      if (u_mem.mem[(32'h50000 >> 3) + i] !== (64'hFACE_0000_0000_0000 | 64'(i * 3))) begin
        chk(u_mem.mem[(32'h50000 >> 3) + i], 64'hFACE_0000_0000_0000 | 64'(i * 3), "DMA page move");
        break;
      end
    checks++;
    wait_irq(1, 20000);
    ld(claim_addr(1), d); chk(d, 1, "core 1 claims DISK0");
    ld(DISK_BASE + 44'(DISK_STATUS), d); chk(d, 0, "disk write ok");
    st(claim_addr(1), 0);
    for (int i = 0; i < 128; i++) chk(u_st.mem[1998 * 64 + i], 64'hD00D_0000_0000_0000 | 64'(i), "disk sectors");

    // ---------------- DISK0 read back ----------------
    st(DISK_BASE + 44'(DISK_MEMADDR), 64'h20000);
    st(DISK_BASE + 44'(DISK_COMMAND), 64'd0);
    wait_irq(0, 20000);
    ld(claim_addr(0), d); chk(d, 1, "core 0 claims DISK0");
    st(claim_addr(0), 0);
    for (int i = 0; i < 128; i++) chk(u_mem.mem[(32'h20000 >> 3) + i], 64'hD00D_0000_0000_0000 | 64'(i), "read back");

    // ---------------- DISK0 error ----------------
    st(DISK_BASE + 44'(DISK_SCOUNT), 64'd3);      // 1998 + 3 > 2000
    st(DISK_BASE + 44'(DISK_COMMAND), 64'd0);
    wait_irq(0, 20000);
    ld(claim_addr(0), d); chk(d, 1, "error interrupt");
    ld(DISK_BASE + 44'(DISK_STATUS), d); chk(d, 64'h2, "disk error");
    if (d == 64'h2) n_disk_error++;
    st(claim_addr(0), 0);

    // ---------------- DMA SHA-256 and AES-256 ----------------
    u_mem.mem[32'h30000 >> 3] = 64'h6162630000000000;    // "abc"
    st(DMA_BASE + 44'(DMA_START_ADDR), 64'h30000);
    st(DMA_BASE + 44'(DMA_BYTECOUNT), 64'd3);
    st(DMA_BASE + 44'(DMA_COMMAND), 64'(CMD_SHA256_SIMPLE));
    wait_dma();
    e = 64'hba7816bf8f01cfea; ld(DMA_BASE + 44'(DMA_SHA256_0), d); chk(d, e, "sha256 word 0");
    e = 64'hb410ff61f20015ad; ld(DMA_BASE + 44'(DMA_SHA256_0) + 24, d); chk(d, e, "sha256 word 3");
    st(DMA_BASE + 44'(DMA_AES_KEY_0),      64'h0001020304050607);
    st(DMA_BASE + 44'(DMA_AES_KEY_0) + 8,  64'h08090a0b0c0d0e0f);
    st(DMA_BASE + 44'(DMA_AES_KEY_0) + 16, 64'h1011121314151617);
    st(DMA_BASE + 44'(DMA_AES_KEY_0) + 24, 64'h18191a1b1c1d1e1f);
    st(DMA_BASE + 44'(DMA_COMMAND), 64'(CMD_AES256_PREPARE));
    wait_dma();
    u_mem.mem[32'h30100 >> 3] = 64'h0011223344556677;
    u_mem.mem[32'h30108 >> 3] = 64'h8899aabbccddeeff;
    st(DMA_BASE + 44'(DMA_START_ADDR), 64'h30100);
    st(DMA_BASE + 44'(DMA_TARGET_ADDR), 64'h30200);
    st(DMA_BASE + 44'(DMA_BYTECOUNT), 64'd16);
    st(DMA_BASE + 44'(DMA_COMMAND), 64'(CMD_AES_EN_SIMPLE));
    wait_dma();
    chk(u_mem.mem[32'h30200 >> 3], 64'h8ea2b7ca516745bf, "aes hi");
    chk(u_mem.mem[32'h30208 >> 3], 64'heafc49904b496089, "aes lo");

    // ---------------- level-triggered external device 5 ----------------
    ext_dev_irq[5] = 1;
    wait_irq(1, 10);
    ld(claim_addr(1), d); chk(d, 5, "device 5 claimed");
    ext_dev_irq[5] = 0;
    st(claim_addr(1), 0);
    repeat (3) @(negedge clk);
    chk(64'(plic_irq[1]), 0, "device 5 quiet");
    if (d == 5) n_level++;

    // ---------------- lock controller ----------------
    st(LOCK_BASE + 44'h10, 64'd4);
    st(LOCK_BASE + 44'h10, 64'd8);
    ld(LOCK_BASE + 44'h10, d); chk(d, 4, "lock held by core 4");
    if (d == 4) n_lock_refused++;
    st(LOCK_BASE + 44'h10, 64'd0);
    st(LOCK_BASE + 44'h10, 64'd8);
    ld(LOCK_BASE + 44'h10, d); chk(d, 8, "lock now core 8");

    // ---------------- external and unmapped regions ----------------
    ld(BOOT_ROM_BASE + 44'h1_2340, d); chk(d, {20'hB0070, BOOT_ROM_BASE + 44'h1_2340}, "boot ROM load");
    if (d[63:44] == 20'hB0070) n_ext++;
    ld(HOST_BASE + 44'h8, d); chk(d, {20'hB0070, HOST_BASE + 44'h8}, "host device load");
    ld(44'h004_0030_0000, d); chk(d, 0, "unmapped page reads 0");
    if (d == 0) n_unmapped++;

    // ---------------- CONTROLU board I/O ----------------
    sw = 8'h5A; repeat (3) @(negedge clk);
    ctl(16'd0, '0, d); chk(d, 64'h5A, "CONTROLU DIGITAL_READ");
    ctl(16'd1, 64'hFFFF_0000_0000_0008, d);
    repeat (2) @(negedge clk);
    begin
      // digit 0 shows 8, digits 1-3 show 0 (all segments but g)
      logic [6:0] lit;
      int dig;
      lit = ~seg_n;
      dig = -1;
      for (int k = 0; k < 4; k++) if (an_n == ~(4'b0001 << k)) dig = k;
      chk(64'(dig >= 0), 1, "one display digit lit");
      chk(64'(lit), (dig == 0) ? 64'h7F : 64'h3F, "seven-segment pattern");
    end
    ctl(16'd5, 64'h77, d);
    ctl(16'd3, '0, d); chk(d, 0, "CONTROLU serial busy after send");
    do ctl(16'd3, '0, d); while (d[0] == 0);
    ctl(16'd4, '0, d); chk(d, 64'h77, "CONTROLU serial loopback byte");
    if (d == 64'h77) n_ctl_serial++;
    ctl(16'd2, '0, d); chk(64'({ctl_op_core, ctl_op_illegal}), 64'b10, "HALT left to the core");
    ctl(16'd12, '0, d); chk(64'({ctl_op_core, ctl_op_illegal}), 64'b01, "unknown CONTROLU code");

    // ---------------- every mechanism happened ----------------
    chk(64'(n_race > 0), 1, "claim race");
    chk(64'(n_edge_queue > 0), 1, "queued edge interrupts");
    chk(64'(n_level > 0), 1, "level-triggered device");
    chk(64'(n_contend > 0), 1, "memory port contention");
    chk(64'(n_ext > 0), 1, "external access");
    chk(64'(n_unmapped > 0), 1, "unmapped access");
    chk(64'(n_lock_refused > 0), 1, "refused lock");
    chk(64'(n_disk_error > 0), 1, "disk error");
    chk(64'(n_dma_busy > 0), 1, "DMA busy seen");
    chk(64'(n_ctl_serial > 0), 1, "CONTROLU serial round trip");
    chk(64'(plic_late_config), 0, "no late configuration");
    $display("mechanisms: race=%0d edge_queue=%0d level=%0d contention_cycles=%0d ext=%0d unmapped=%0d lock_refused=%0d disk_error=%0d dma_busy=%0d dma_irqs=%0d ctl_serial=%0d",
             n_race, n_edge_queue, n_level, n_contend, n_ext, n_unmapped, n_lock_refused, n_disk_error, n_dma_busy, n_dma_irq, n_ctl_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
