// tb_uart0: self-checking test of UART0 at 8 clocks per bit. Decodes the txd frame
// of stored bytes bit by bit, drives frames into rxd, and checks STATUS bits,
// RECV_BYTE, the frame length (10 bit periods), the interrupt pulses with
// INTERRUPTS_REQUESTED on and their absence with it off.
module tb_uart0;
  import blitz_io_pkg::*;
  localparam int unsigned CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  io_req_t req; logic [DW-1:0] rdata; logic irq, txd, rxd;
  uart0 #(.CLKS_PER_BIT(CPB)) dut (.*);

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

  // Send a byte and decode what appears on txd.
  task automatic send_and_decode(input logic [7:0] b);
    logic [7:0] got; logic [DW-1:0] s; int t0, t1;
    io_wr(UART_DATA, {56'hFFFF_FFFF_FFFF_FF, b});      // upper bits ignored
    io_rd(UART_CTRL, s); chk(s & 64'h2, 64'h0, "SEND_READY drops");
    // txd fell at the store; sample in the middle of each bit period
    t0 = $time;
    repeat (CPB / 2 - 4) @(negedge clk);
    chk(64'(txd), 0, "start bit");
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); got[i] = txd; end
    repeat (CPB) @(negedge clk); chk(64'(txd), 1, "stop bit");
    chk(64'(got), 64'(b), "tx byte");
    do io_rd(UART_CTRL, s); while (!s[1]);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 < 10 * CPB - 8 || (t1 - t0) / 10 > 10 * CPB + 4) begin
      failures++; $display("FAIL frame time %0d cycles", (t1 - t0) / 10);
    end
  endtask

  task automatic drive_rx(input logic [7:0] b);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    logic [DW-1:0] s; int irq0;
    req = '0; rxd = 1;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    io_rd(UART_CTRL, s); chk(s, 64'h2, "reset status");

    send_and_decode(8'hA5);
    send_and_decode(8'h3C);

    drive_rx(8'h96);
    io_rd(UART_CTRL, s); chk(s, 64'h3, "RECV_READY set");
    io_rd(UART_DATA, s); chk(s, 64'h96, "RECV_BYTE");
    io_rd(UART_CTRL, s); chk(s, 64'h2, "RECV_READY cleared by load");

    // interrupts
    io_wr(UART_CTRL, 64'h1); irq0 = irqs;
    send_and_decode(8'h01);
    repeat (4) @(negedge clk);
    chk(64'(irqs - irq0), 1, "irq when send channel free");
    irq0 = irqs;
    drive_rx(8'h5A);
    repeat (4) @(negedge clk);
    chk(64'(irqs - irq0), 1, "irq on received byte");
    io_rd(UART_DATA, s); chk(s, 64'h5A, "RECV_BYTE 2");
    io_wr(UART_CTRL, 64'h0); irq0 = irqs;
    drive_rx(8'hC3);
    send_and_decode(8'h7E);
    repeat (4) @(negedge clk);
    chk(64'(irqs - irq0), 0, "no irq when not requested");
    io_rd(UART_DATA, s); chk(s, 64'hC3, "RECV_BYTE 3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
