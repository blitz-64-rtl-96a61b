// tb_plic: self-checking test of the PLIC at its full size (128 cores, 64 devices).
// Covers register read-back, routing of a level-triggered line to exactly the
// enabled cores, a claim race (one winner, others get -1), re-dispatch of a level
// line still high at retire, counting of edge-triggered pulses (including pulses
// arriving while the device is claimed), the one-claim-per-core rule, lowest-device
// selection, ignored retire without claim, the last core / last device corner, and
// the late-configuration flag.
module tb_plic;
  import blitz_io_pkg::*;
  localparam int unsigned NC = 128, ND = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata; logic [ND-1:0] dev_irq; logic [NC-1:0] core_irq; logic late_config;
  plic dut (.*);

  int checks = 0, failures = 0;
  localparam logic [DW-1:0] NONE = '1;

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic chk_irq(input logic [NC-1:0] exp, input string what);
    repeat (2) @(negedge clk);
    checks++;
    if (core_irq !== exp) begin failures++; $display("FAIL %s: irq %h exp %h", what, core_irq, exp); end
  endtask
  task automatic io_wr(input logic [13:0] off, input logic [DW-1:0] d);
    @(negedge clk); req = '{valid: 1'b1, write: 1'b1, off: off, wdata: d};
    @(negedge clk); req.valid = 1'b0;
  endtask
  task automatic io_rd(input logic [13:0] off, output logic [DW-1:0] d);
    @(negedge clk); req = '{valid: 1'b1, write: 1'b0, off: off, wdata: '0};
    @(negedge clk); req.valid = 1'b0; d = rdata;
  endtask
  function automatic logic [13:0] en_off(input int c); return 14'(8 + 8 * c); endfunction
  function automatic logic [13:0] cl_off(input int c); return 14'(16'h408 + 8 * c); endfunction
  task automatic claim(input int c, input logic [DW-1:0] exp, input string what);
    logic [DW-1:0] d; io_rd(cl_off(c), d); chk(d, exp, what);
  endtask
  task automatic retire(input int c); io_wr(cl_off(c), 64'hDEAD); endtask
  task automatic pulse(input int d); @(negedge clk); dev_irq[d] = 1; @(negedge clk); dev_irq[d] = 0; endtask

  function automatic logic [NC-1:0] cores(input int a, input int b = -1, input int c = -1);
    logic [NC-1:0] m = '0;
    m[a] = 1; if (b >= 0) m[b] = 1; if (c >= 0) m[c] = 1;
    return m;
  endfunction

  initial begin
    logic [DW-1:0] d;
    req = '0; dev_irq = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // ---- set-up ----
    io_wr(14'h0, 64'h0000_0000_0000_0003);               // devices 0,1 edge
    io_wr(en_off(0), 64'h0000_0000_0000_00FF);
    io_wr(en_off(1), 64'h0000_0000_0000_0005);
    io_wr(en_off(5), 64'h0000_0000_0000_0004);
    io_wr(en_off(127), 64'h8000_0000_0000_0000);
    io_rd(14'h0, d);       chk(d, 64'h3, "EDGE readback");
    io_rd(en_off(1), d);   chk(d, 64'h5, "ENABLE[1] readback");
    io_rd(en_off(127), d); chk(d, 64'h8000_0000_0000_0000, "ENABLE[127] readback");
    chk_irq('0, "idle");

    // ---- level-triggered device 2: enabled for cores 0, 1, 5 ----
    dev_irq[2] = 1;
    chk_irq(cores(0, 1, 5), "level dev2 routed");
    claim(1, 2, "core1 wins dev2");
    claim(0, NONE, "core0 loses race");
    claim(5, NONE, "core5 loses race");
    chk_irq('0, "irq withdrawn after claim");
    retire(1);                                           // line still high -> again
    chk_irq(cores(0, 1, 5), "level re-dispatch at retire");
    claim(5, 2, "core5 claims second");
    dev_irq[2] = 0;
    retire(5);
    chk_irq('0, "level line low after retire");
    claim(0, NONE, "nothing pending");

    // ---- edge-triggered device 1: three pulses ----
    pulse(1); pulse(1); pulse(1);
    chk_irq(cores(0), "edge dev1 routed");
    claim(0, 1, "edge claim 1");
    claim(0, NONE, "core busy: no second claim");
    pulse(1);                                            // arrives while claimed
    chk_irq('0, "no irq while claimed");
    retire(0); claim(0, 1, "edge claim 2");
    retire(0); claim(0, 1, "edge claim 3");
    retire(0); claim(0, 1, "edge claim 4 (pulse while claimed)");
    retire(0); claim(0, NONE, "edge counter drained");
    chk_irq('0, "edge idle");

    // ---- lowest device first; a busy core still sees other devices ----
    pulse(0); dev_irq[3] = 1;
    chk_irq(cores(0, 1), "dev0+dev3");
    claim(0, 0, "lowest device first");
    chk_irq(cores(0), "dev3 still raises irq at busy core");
    claim(0, NONE, "busy core cannot claim dev3");
    retire(0);
    claim(0, 3, "dev3 after retire");
    dev_irq[3] = 0;
    retire(0);
    retire(0);                                           // no claim: ignored
    claim(0, NONE, "stray retire ignored");

    // ---- last core, last device ----
    dev_irq[63] = 1;
    chk_irq(cores(127), "dev63 -> core127");
    claim(126, NONE, "core126 not enabled");
    claim(127, 63, "core127 claims dev63");
    dev_irq[63] = 0; retire(127);
    chk_irq('0, "all quiet");

    // ---- late configuration flag ----
    chk(64'(late_config), 0, "no late config yet");
    io_wr(en_off(3), 64'h1);
    chk(64'(late_config), 1, "late config flagged");

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
