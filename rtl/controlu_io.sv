// controlu_io: board I/O behind the CONTROLU instruction (slide switches, a 4-digit
// seven-segment display and a debug serial channel).
//
// On the FPGA board the core reaches a few devices without memory-mapped I/O: the
// CONTROLU instruction carries a 16-bit immediate that selects an operation, a
// source register value and a destination register. This unit carries out the
// operations that touch board hardware and leaves the others to the core:
//   0 DIGITAL_READ   result = the 8 slide switches in bits [7:0], upper bits 0
//   1 DIGITAL_WRITE  the low 16 bits of the source are shown as four hex digits
//   3 SERIAL_STAT    result bit 1 = output ready, bit 0 = input available
//   4 SERIAL_RECV    result = received byte in bits [7:0], upper bits 0
//   5 SERIAL_SEND    the low 8 bits of the source are sent
//   2 HALT, 6 ENABLE_KERNEL, 7 SET_STATUS, 8 TLB_DEBUG
//                    core-internal: op_core is raised and nothing else happens
//   any other value  op_illegal is raised (the core takes an Illegal Instruction
//                    exception)
//
// The serial channel is a uart0 instance with its interrupts left off, so the
// status bits and the send/receive rules are exactly those of UART0: the program
// must check SERIAL_STAT before SERIAL_RECV or SERIAL_SEND. The switches pass
// through a two-flop synchroniser. The display is multiplexed: one digit is lit
// at a time for SCAN_CLKS cycles, digit 0 (rightmost, an_n[0]) showing bits [3:0].
// seg_n[0..6] drive segments a..g, and both seg_n and an_n are active low, as on
// common FPGA boards.
//
// Follows the document: the operation codes, the 8 switches into bits [7:0], the
// 16 bits shown as four hex digits, the serial status bit layout and the zeroed
// upper bits. This design's choices: the active-low multiplexed display and its
// scan period, the segment shapes of the hex digits, the serial line format
// (that of uart0), and the op_core / op_illegal split of the other codes.
//
// Timing: an operation is taken in the cycle op_valid is high; op_done,
// op_result, op_core and op_illegal are valid in the next cycle. A new value
// appears on the display at most one scan step later.
module controlu_io
  import blitz_io_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned SCAN_CLKS    = 100_000
) (
  input  logic          clk,
  input  logic          rst_n,
  // operation from the core
  input  logic          op_valid,
  input  logic [15:0]   op_imm,
  input  logic [DW-1:0] op_src,
  output logic          op_done,
  output logic [DW-1:0] op_result,
  output logic          op_core,
  output logic          op_illegal,
  // board
  input  logic [7:0]    sw,
  output logic [6:0]    seg_n,
  output logic [3:0]    an_n,
  output logic          txd,
  input  logic          rxd
);
  typedef enum logic [15:0] {
    OP_DIGITAL_READ  = 16'd0,
    OP_DIGITAL_WRITE = 16'd1,
    OP_HALT          = 16'd2,
    OP_SERIAL_STAT   = 16'd3,
    OP_SERIAL_RECV   = 16'd4,
    OP_SERIAL_SEND   = 16'd5,
    OP_ENABLE_KERNEL = 16'd6,
    OP_SET_STATUS    = 16'd7,
    OP_TLB_DEBUG     = 16'd8
  } ctl_op_e;

  // ---------------- switches ----------------
  logic [7:0] sw_meta, sw_sync;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_meta <= '0;
      sw_sync <= '0;
    end else begin
      sw_meta <= sw;
      sw_sync <= sw_meta;
    end
  end

  // ---------------- serial channel ----------------
  io_req_t       ser_req;
  logic [DW-1:0] ser_rdata;
  logic          ser_irq;    // interrupts are never enabled on this channel

  always_comb begin
    ser_req = '{valid: 1'b0, write: 1'b0, off: UART_DATA, wdata: op_src};
    if (op_valid) begin
      unique case (ctl_op_e'(op_imm))
        OP_SERIAL_STAT: ser_req = '{valid: 1'b1, write: 1'b0, off: UART_CTRL, wdata: op_src};
        OP_SERIAL_RECV: ser_req = '{valid: 1'b1, write: 1'b0, off: UART_DATA, wdata: op_src};
        OP_SERIAL_SEND: ser_req = '{valid: 1'b1, write: 1'b1, off: UART_DATA, wdata: op_src};
        default: ;
      endcase
    end
  end

  uart0 #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_serial (
    .clk, .rst_n, .req(ser_req), .rdata(ser_rdata), .irq(ser_irq), .txd, .rxd
  );

  // ---------------- operation decode ----------------
  logic          use_ser_q;
  logic [DW-1:0] res_q;
  logic [15:0]   disp_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_done    <= 1'b0;
      op_core    <= 1'b0;
      op_illegal <= 1'b0;
      use_ser_q  <= 1'b0;
      res_q      <= '0;
      disp_q     <= '0;
    end else begin
      op_done    <= op_valid;
      op_core    <= 1'b0;
      op_illegal <= 1'b0;
      use_ser_q  <= 1'b0;
      res_q      <= '0;
      if (op_valid) begin
        unique case (ctl_op_e'(op_imm))
          OP_DIGITAL_READ:  res_q  <= {56'd0, sw_sync};
          OP_DIGITAL_WRITE: disp_q <= op_src[15:0];
          OP_SERIAL_STAT, OP_SERIAL_RECV, OP_SERIAL_SEND: use_ser_q <= 1'b1;
          OP_HALT, OP_ENABLE_KERNEL, OP_SET_STATUS, OP_TLB_DEBUG: op_core <= 1'b1;
          default: op_illegal <= 1'b1;
        endcase
      end
    end
  end

  // A SEND returns nothing; uart0 answers a STORE with zero on rdata.
  assign op_result = use_ser_q ? ser_rdata : res_q;

  // ---------------- seven-segment display ----------------
  // Segment bits: [0]=a (top), [1]=b, [2]=c, [3]=d (bottom), [4]=e, [5]=f, [6]=g (middle).
  function automatic logic [6:0] hex_font(input logic [3:0] v);
    unique case (v)
      4'h0: return 7'h3F;  4'h1: return 7'h06;  4'h2: return 7'h5B;  4'h3: return 7'h4F;
      4'h4: return 7'h66;  4'h5: return 7'h6D;  4'h6: return 7'h7D;  4'h7: return 7'h07;
      4'h8: return 7'h7F;  4'h9: return 7'h6F;  4'hA: return 7'h77;  4'hB: return 7'h7C;
      4'hC: return 7'h39;  4'hD: return 7'h5E;  4'hE: return 7'h79;  4'hF: return 7'h71;
      default: return 7'h00;
    endcase
  endfunction

  localparam int unsigned SCAN_W = $clog2(SCAN_CLKS);

  logic [SCAN_W-1:0] scan_cnt;
  logic [1:0]        digit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scan_cnt <= '0;
      digit    <= '0;
    end else if (scan_cnt == SCAN_W'(SCAN_CLKS - 1)) begin
      scan_cnt <= '0;
      digit    <= digit + 2'd1;
    end else begin
      scan_cnt <= scan_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seg_n <= '1;
      an_n  <= '1;
    end else begin
      seg_n <= ~hex_font(disp_q[4*digit +: 4]);
      an_n  <= ~(4'b0001 << digit);
    end
  end

endmodule
