// tb_aes256_engine: checks the AES-256 engine against published vectors: the
// FIPS 197 example (key 00..1f, plaintext 00112233..ff), the last round-key words
// of the FIPS 197 key-expansion example (key 603deb10..), and an SP 800-38A
// ECB-AES256 block; each block is also decrypted back. Latencies are checked too
// (53 cycles for key expansion, 15 per block).
module tb_aes256_engine;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic key_start, start, decrypt, busy, key_ready, done;
  logic [255:0] key; logic [127:0] din, dout;
  aes256_engine dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  task automatic wait_done(input int exp_cyc, input string what);
    int cyc = 1;
    @(negedge clk); key_start = 0; start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL %s latency %0d exp %0d", what, cyc, exp_cyc); end
  endtask

  task automatic load_key(input logic [255:0] k);
    @(negedge clk); key = k; key_start = 1;
    wait_done(53, "key");
  endtask

  task automatic run(input logic [127:0] d, input bit de, output logic [127:0] q);
    @(negedge clk); din = d; decrypt = de; start = 1;
    wait_done(15, de ? "dec" : "enc");
    q = dout;
  endtask

  initial begin
    logic [127:0] q;
    key_start = 0; start = 0; decrypt = 0; key = '0; din = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    load_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    run(128'h00112233445566778899aabbccddeeff, 0, q);
    chk(q, 128'h8ea2b7ca516745bfeafc49904b496089, "FIPS197 C.3 enc");
    run(128'h8ea2b7ca516745bfeafc49904b496089, 1, q);
    chk(q, 128'h00112233445566778899aabbccddeeff, "FIPS197 C.3 dec");

    load_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    chk({dut.w[56], dut.w[57], dut.w[58], dut.w[59]},
        128'hfe4890d1e6188d0b046df344706c631e, "key schedule w56..59");
    run(128'h6bc1bee22e409f96e93d7e117393172a, 0, q);
    chk(q, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8, "SP800-38A ECB enc");
    run(q, 1, q);
    chk(q, 128'h6bc1bee22e409f96e93d7e117393172a, "SP800-38A ECB dec");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
