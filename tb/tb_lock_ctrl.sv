// tb_lock_ctrl: self-checking test of the lock controller: acquire by storing a
// core ID into a free lock, a competing non-zero store being dropped, release by
// storing zero, independence of the 32 locks, the last lock, and zero reads past it.
module tb_lock_ctrl;
  import blitz_io_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata;
  lock_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [32];

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

  initial begin
    logic [DW-1:0] d;
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 32; k++) begin io_rd(14'(8 * k), d); chk(d, 0, "free after reset"); end

    io_wr(14'h18, 64'd5);  io_rd(14'h18, d); chk(d, 5, "core 5 acquires lock 3");
    io_wr(14'h18, 64'd9);  io_rd(14'h18, d); chk(d, 5, "core 9 store dropped");
    io_wr(14'h18, 64'd0);  io_rd(14'h18, d); chk(d, 0, "release");
    io_wr(14'h18, 64'd9);  io_rd(14'h18, d); chk(d, 9, "core 9 acquires");
    io_wr(14'hF8, 64'h8000_0000_0000_0001); io_rd(14'hF8, d); chk(d, 64'h8000_0000_0000_0001, "lock 31");
    io_wr(14'h100, 64'd7); io_rd(14'h100, d); chk(d, 0, "past the last lock");

    // random traffic against a reference model of the rule
    for (int k = 0; k < 32; k++) begin io_wr(14'(8 * k), 0); model[k] = 0; end
    for (int n = 0; n < 400; n++) begin
      automatic int k = $urandom_range(31);
      automatic logic [DW-1:0] v = ($urandom_range(3) == 0) ? 64'd0 : 64'($urandom_range(16, 1));
      io_wr(14'(8 * k), v);
      if (v == 0 || model[k] == 0) model[k] = v;
      io_rd(14'(8 * k), d); chk(d, model[k], "random");
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
