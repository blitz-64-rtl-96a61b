// tb_dma_ctrl: self-checking test of the DMA controller with a behavioural memory.
// Runs MOVE, ZERO, SHA-256 (simple, chunked across two chunks of 5 and 51 bytes,
// empty message) and AES-256 (prepare, simple encrypt/decrypt of two CBC-chained
// blocks, and an initial/middle/final chunk sequence), comparing memory and digest
// registers with published SHA-256/AES-256 results. Plaintexts are chosen so that
// every CBC step feeds the FIPS 197 example block 00112233..ff into the cipher, so
// the expected ciphertext of every block is that example's 8ea2b7ca..6089.
// Also checks that DMA_STATUS shows BUSY while a command runs and that one
// completion interrupt arrives per command.
module tb_dma_ctrl;
  import blitz_io_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata; logic irq;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid; mem_req_t mem_req; logic [DW-1:0] mem_rsp_rdata;

  dma_ctrl dut (.*);
  mem_model #(.AW(12)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req),
    .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  int checks = 0, failures = 0, irqs = 0, cmds = 0, busy_seen = 0;
  always @(posedge clk) if (rst_n && irq) irqs++;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
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

  task automatic run_cmd(input dma_cmd_e c);
    logic [DW-1:0] s;
    io_wr(DMA_COMMAND, 64'(c));
    cmds++;
    io_rd(DMA_STATUS, s);
    if (s == DMA_BUSY) busy_seen++;
    while (s != DMA_OK) io_rd(DMA_STATUS, s);
  endtask

  function automatic int dw(input logic [34:0] a); return int'(a[14:3]); endfunction

  // Place a string at a byte address (big-endian within doublewords).
  task automatic put_str(input logic [34:0] a, input string s);
    for (int i = 0; i < s.len(); i++) begin
      logic [34:0] b = a + 35'(i);
      u_mem.mem[dw(b)][63 - 8*b[2:0] -: 8] = s[i];
    end
  endtask

  task automatic chk_hash(input logic [255:0] exp, input string what);
    logic [DW-1:0] d;
    for (int i = 0; i < 4; i++) begin
      io_rd(DMA_SHA256_0 + 14'(8*i), d);
      chk(d, exp[255 - 64*i -: 64], what);
    end
  endtask

  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] CT = 128'h8ea2b7ca516745bfeafc49904b496089;

  initial begin
    logic [DW-1:0] d;
    string msg;
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // ---- MOVE 10 doublewords from 0x100 to 0x800 ----
    for (int i = 0; i < 10; i++) u_mem.mem[dw(35'h100) + i] = 64'hA5A5_0000_0000_0000 + 64'(i * 7919);
    io_wr(DMA_START_ADDR, 64'h100); io_wr(DMA_TARGET_ADDR, 64'h800); io_wr(DMA_BYTECOUNT, 64'd80);
    run_cmd(CMD_MOVE);
    for (int i = 0; i < 11; i++)
      chk(u_mem.mem[dw(35'h800) + i], (i < 10) ? 64'hA5A5_0000_0000_0000 + 64'(i * 7919) : 64'h0, "move");

    // ---- ZERO 5 doublewords at 0x108 (low address bits ignored) ----
    io_wr(DMA_START_ADDR, 64'h10F); io_wr(DMA_BYTECOUNT, 64'd47);
    run_cmd(CMD_ZERO);
    for (int i = 0; i < 7; i++)
      chk(u_mem.mem[dw(35'h100) + i], (i >= 1 && i <= 5) ? 64'h0 : 64'hA5A5_0000_0000_0000 + 64'(i * 7919), "zero");

    // ---- SHA-256 simple: "abc" ----
    put_str(35'h1000, "abc");
    io_wr(DMA_START_ADDR, 64'h1000); io_wr(DMA_BYTECOUNT, 64'd3);
    run_cmd(CMD_SHA256_SIMPLE);
    chk_hash(256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad, "sha abc");

    // ---- SHA-256 simple: empty message ----
    io_wr(DMA_BYTECOUNT, 64'd0);
    run_cmd(CMD_SHA256_SIMPLE);
    chk_hash(256'he3b0c442_98fc1c14_9afbf4c8_996fb924_27ae41e4_649b934c_a495991b_7852b855, "sha empty");

    // ---- SHA-256 chunked: 56-byte message as 5 + 51 bytes in separate places ----
    msg = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    put_str(35'h1100, msg.substr(0, 4));
    put_str(35'h1200, msg.substr(5, 55));
    run_cmd(CMD_SHA256_INIT);
    io_wr(DMA_START_ADDR, 64'h1100); io_wr(DMA_BYTECOUNT, 64'd5);
    run_cmd(CMD_SHA256_CHUNK);
    io_wr(DMA_START_ADDR, 64'h1200); io_wr(DMA_BYTECOUNT, 64'd51);
    run_cmd(CMD_SHA256_CHUNK);
    run_cmd(CMD_SHA256_FINAL);
    chk_hash(256'h248d6a61_d20638b8_e5c02693_0c3e6039_a33ce459_64ff2167_f6ecedd4_19db06c1, "sha chunked");

    // ---- AES-256 ----
    io_wr(DMA_AES_KEY_0,          64'h0001020304050607);
    io_wr(DMA_AES_KEY_0 + 14'h08, 64'h08090a0b0c0d0e0f);
    io_wr(DMA_AES_KEY_0 + 14'h10, 64'h1011121314151617);
    io_wr(DMA_AES_KEY_0 + 14'h18, 64'h18191a1b1c1d1e1f);
    run_cmd(CMD_AES256_PREPARE);
    // two-block simple encryption: PT, PT^CT -> CT, CT (CBC, zero initial value)
    {u_mem.mem[dw(35'h2000)], u_mem.mem[dw(35'h2008)]} = PT;
    {u_mem.mem[dw(35'h2010)], u_mem.mem[dw(35'h2018)]} = PT ^ CT;
    io_wr(DMA_START_ADDR, 64'h2000); io_wr(DMA_TARGET_ADDR, 64'h2100); io_wr(DMA_BYTECOUNT, 64'd32);
    run_cmd(CMD_AES_EN_SIMPLE);
    chk(u_mem.mem[dw(35'h2100)], CT[127:64], "aes en blk0 hi"); chk(u_mem.mem[dw(35'h2108)], CT[63:0], "aes en blk0 lo");
    chk(u_mem.mem[dw(35'h2110)], CT[127:64], "aes en blk1 hi"); chk(u_mem.mem[dw(35'h2118)], CT[63:0], "aes en blk1 lo");
    // decrypt it back
    io_wr(DMA_START_ADDR, 64'h2100); io_wr(DMA_TARGET_ADDR, 64'h2200); io_wr(DMA_BYTECOUNT, 64'd32);
    run_cmd(CMD_AES_DE_SIMPLE);
    chk({u_mem.mem[dw(35'h2200)], u_mem.mem[dw(35'h2208)]}, PT, "aes de blk0");
    chk({u_mem.mem[dw(35'h2210)], u_mem.mem[dw(35'h2218)]}, PT ^ CT, "aes de blk1");
    // chunked encryption: the chain carries across INITIAL / MIDDLE / FINAL
    {u_mem.mem[dw(35'h2300)], u_mem.mem[dw(35'h2308)]} = PT;
    {u_mem.mem[dw(35'h2400)], u_mem.mem[dw(35'h2408)]} = PT ^ CT;
    {u_mem.mem[dw(35'h2500)], u_mem.mem[dw(35'h2508)]} = PT ^ CT;
    io_wr(DMA_START_ADDR, 64'h2300); io_wr(DMA_TARGET_ADDR, 64'h2600); io_wr(DMA_BYTECOUNT, 64'd16);
    run_cmd(CMD_AES_EN_INITIAL);
    io_wr(DMA_START_ADDR, 64'h2400); io_wr(DMA_TARGET_ADDR, 64'h2700);
    run_cmd(CMD_AES_EN_MIDDLE);
    io_wr(DMA_START_ADDR, 64'h2500); io_wr(DMA_TARGET_ADDR, 64'h2800);
    run_cmd(CMD_AES_EN_FINAL);
    chk({u_mem.mem[dw(35'h2600)], u_mem.mem[dw(35'h2608)]}, CT, "aes initial");
    chk({u_mem.mem[dw(35'h2700)], u_mem.mem[dw(35'h2708)]}, CT, "aes middle");
    chk({u_mem.mem[dw(35'h2800)], u_mem.mem[dw(35'h2808)]}, CT, "aes final");
    // chunked decryption of those three blocks
    io_wr(DMA_START_ADDR, 64'h2600); io_wr(DMA_TARGET_ADDR, 64'h2900);
    run_cmd(CMD_AES_DE_INITIAL);
    io_wr(DMA_START_ADDR, 64'h2700); io_wr(DMA_TARGET_ADDR, 64'h2A00);
    run_cmd(CMD_AES_DE_MIDDLE);
    io_wr(DMA_START_ADDR, 64'h2800); io_wr(DMA_TARGET_ADDR, 64'h2B00);
    run_cmd(CMD_AES_DE_FINAL);
    chk({u_mem.mem[dw(35'h2900)], u_mem.mem[dw(35'h2908)]}, PT, "aes de initial");
    chk({u_mem.mem[dw(35'h2A00)], u_mem.mem[dw(35'h2A08)]}, PT ^ CT, "aes de middle");
    chk({u_mem.mem[dw(35'h2B00)], u_mem.mem[dw(35'h2B08)]}, PT ^ CT, "aes de final");

    repeat (5) @(negedge clk);
    chk(64'(irqs), 64'(cmds), "one interrupt per command");
    chk(64'(busy_seen > 0), 64'd1, "status showed busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
