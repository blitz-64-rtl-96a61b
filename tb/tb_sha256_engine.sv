// tb_sha256_engine: checks the SHA-256 compression engine against published
// SHA-256 digests: "abc" (one block) and the 448-bit message
// "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq" (two blocks, the
// second holding only padding and the length). Also checks the 65-cycle latency.
module tb_sha256_engine;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start; logic [511:0] block; logic [255:0] h_in, h_out; logic busy, done;
  sha256_engine dut (.*);

  int checks = 0, failures = 0;
  localparam logic [255:0] IV = 256'h6a09e667_bb67ae85_3c6ef372_a54ff53a_510e527f_9b05688c_1f83d9ab_5be0cd19;

  task automatic compress(input logic [511:0] blk, input logic [255:0] hin, output logic [255:0] hout);
    int cyc = 0;
    @(negedge clk); block = blk; h_in = hin; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    hout = h_out;
    checks++;
    if (cyc != 65) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  task automatic check(input logic [255:0] got, input logic [255:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [255:0] r;
    string m2;
    logic [511:0] b1, b2;
    start = 0; block = '0; h_in = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    compress({32'h61626380, 416'd0, 64'd24}, IV, r);
    check(r, 256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad, "abc");
    m2 = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    b1 = '0;
    for (int i = 0; i < 56; i++) b1[511 - 8*i -: 8] = m2[i];
    b1[511 - 8*56 -: 8] = 8'h80;
    b2 = {448'd0, 64'd448};
    compress(b1, IV, r);
    compress(b2, r, r);
    check(r, 256'h248d6a61_d20638b8_e5c02693_0c3e6039_a33ce459_64ff2167_f6ecedd4_19db06c1, "448-bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
