// tb_controlu_io: self-checking test of the CONTROLU board I/O unit.
//
// Drives operations the way a core would and checks:
//   - DIGITAL_READ returns the switches, zero-extended;
//   - DIGITAL_WRITE shows four hex digits. The expected segment patterns are
//     built here from the names of the lit segments, not from the unit's table;
//   - SERIAL_SEND / SERIAL_STAT / SERIAL_RECV through a txd -> rxd loopback,
//     including "output ready" dropping at a send and "input available" rising
//     when the byte is back;
//   - op_core for the core-internal codes and op_illegal for unknown codes;
//   - the one-cycle result latency.
// A short bit period and scan period keep the run small.
module tb_controlu_io;
  import blitz_io_pkg::*;
  localparam int unsigned CPB  = 8;
  localparam int unsigned SCAN = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          op_valid, op_done, op_core, op_illegal;
  logic [15:0]   op_imm;
  logic [DW-1:0] op_src, op_result;
  logic [7:0]    sw;
  logic [6:0]    seg_n;
  logic [3:0]    an_n;
  logic          line;

  controlu_io #(.CLKS_PER_BIT(CPB), .SCAN_CLKS(SCAN)) dut (
    .clk, .rst_n, .op_valid, .op_imm, .op_src, .op_done, .op_result, .op_core, .op_illegal,
    .sw, .seg_n, .an_n, .txd(line), .rxd(line)
  );

  int checks = 0, failures = 0;

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // Issue one operation; returns the result and the flags seen one cycle later.
  task automatic op(input logic [15:0] imm, input logic [DW-1:0] src,
                    output logic [DW-1:0] res, output logic core, output logic ill);
    @(negedge clk); op_valid = 1'b1; op_imm = imm; op_src = src;
    @(negedge clk); op_valid = 1'b0;
    chk(64'(op_done), 1, "done one cycle after the operation");
    res = op_result; core = op_core; ill = op_illegal;
  endtask

  // Lit segments a..g of each hex digit, by name.
  function automatic logic [6:0] segs_of(input string lit);
    logic [6:0] s = '0;
    for (int i = 0; i < lit.len(); i++) s[lit[i] - "a"] = 1'b1;
    return s;
  endfunction

  function automatic logic [6:0] expect_digit(input logic [3:0] v);
    string names [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                          "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    return segs_of(names[v]);
  endfunction

  // Watch the display for one full scan and check every digit.
  task automatic chk_display(input logic [15:0] v);
    bit seen [4];
    foreach (seen[i]) seen[i] = 0;
    repeat (8 * SCAN + 4) begin
      @(negedge clk);
      for (int d = 0; d < 4; d++) begin
        if (an_n == ~(4'b0001 << d)) begin
          logic [6:0] lit = ~seg_n;
          seen[d] = 1;
          chk(64'(lit), 64'(expect_digit(v[4*d +: 4])), $sformatf("digit %0d of %h", d, v));
        end
      end
    end
    foreach (seen[i]) chk(64'(seen[i]), 1, "every digit is lit in turn");
  endtask

  initial begin
    logic [DW-1:0] r; logic core, ill;
    op_valid = 0; op_imm = '0; op_src = '0; sw = 8'h00;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // switches
    sw = 8'hA5; repeat (3) @(negedge clk);
    op(16'd0, 64'hFFFF_FFFF_FFFF_FFFF, r, core, ill);
    chk(r, 64'hA5, "DIGITAL_READ");
    chk(64'({core, ill}), 0, "DIGITAL_READ is a board operation");
    sw = 8'h3C; repeat (3) @(negedge clk);
    op(16'd0, '0, r, core, ill);
    chk(r, 64'h3C, "DIGITAL_READ after a change");

    // display: every hex digit appears in some position
    op(16'd1, 64'hDEAD_BEEF_0123_4567, r, core, ill);
    chk(r, 0, "DIGITAL_WRITE result");
    chk_display(16'h4567);
    op(16'd1, 64'h89AB, r, core, ill);
    chk_display(16'h89AB);
    op(16'd1, 64'hCDEF, r, core, ill);
    chk_display(16'hCDEF);
    op(16'd1, 64'h0123, r, core, ill);
    chk_display(16'h0123);

    // serial loopback
    op(16'd3, '0, r, core, ill);
    chk(r, 64'h2, "SERIAL_STAT idle: output ready, no input");
    op(16'd5, 64'hFFFF_FFFF_FFFF_FF4B, r, core, ill);
    op(16'd3, '0, r, core, ill);
    chk(r[1], 0, "output not ready right after SERIAL_SEND");
    begin
      int n = 0;
      do begin op(16'd3, '0, r, core, ill); n++; end while (r[0] == 1'b0 && n < 40 * CPB);
    end
    chk(r[0], 1, "input available after loopback");
    op(16'd4, '0, r, core, ill);
    chk(r, 64'h4B, "SERIAL_RECV returns the byte sent");
    op(16'd3, '0, r, core, ill);
    chk(r[0], 0, "input consumed by SERIAL_RECV");

    // core-internal and illegal codes
    begin
      logic [15:0] core_codes [4] = '{16'd2, 16'd6, 16'd7, 16'd8};
      logic [15:0] bad_codes  [2] = '{16'd9, 16'h56ab};
      foreach (core_codes[k]) begin
        op(core_codes[k], '0, r, core, ill);
        chk(64'({core, ill}), 64'b10, "core-internal code");
      end
      foreach (bad_codes[k]) begin
        op(bad_codes[k], '0, r, core, ill);
        chk(64'({core, ill}), 64'b01, "unknown code is illegal");
      end
    end
    // the display kept its value through all this
    chk_display(16'h0123);

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
