// uart0: minimal memory-mapped UART (one full-duplex Tx/Rx channel).
//
// Registers (byte offsets in the UART0 page, all doublewords):
//   0x0 STORE SEND_BYTE  low 8 bits are transmitted, the rest ignored
//   0x0 LOAD  RECV_BYTE  last received byte, zero-extended; the LOAD clears RECV_READY
//   0x8 LOAD  STATUS     bit0 RECV_READY, bit1 SEND_READY, other bits zero
//   0x8 STORE SETUP      bit0 INTERRUPTS_REQUESTED, other bits ignored
// A STORE to SEND_BYTE drops SEND_READY at once; it rises again when the stop bit has
// gone out. When INTERRUPTS_REQUESTED is set, irq pulses for one cycle when a byte
// has been received and when the transmitter becomes ready again, so the PLIC line
// for this device is meant to be configured edge-triggered.
//
// The register set, its offsets and the two interrupt causes follow the UART0
// description. The line format is this design's choice, since the document fixes no
// baud rate or framing: 8 data bits LSB first, no parity, one stop bit, a baud
// period of CLKS_PER_BIT clock cycles (868 = 115200 baud at 100 MHz). The receiver
// synchronises rxd with two flip-flops, finds the start bit's middle and samples each
// bit in its middle; a new byte overwrites one that was not yet read. Reset leaves
// interrupts off, SEND_READY 1, RECV_READY 0, txd idle high.
//
// Timing: a request is taken in the cycle req.valid is high; LOAD data is on rdata
// the next cycle. A byte takes 10*CLKS_PER_BIT cycles on the line.
module uart0
  import blitz_io_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic          clk,
  input  logic          rst_n,
  input  io_req_t       req,
  output logic [DW-1:0] rdata,
  output logic          irq,
  output logic          txd,
  input  logic          rxd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic intr_en;

  // ---------------- register access ----------------
  logic wr_send, wr_setup, rd_recv, rd_status;
  assign wr_send   = req.valid &&  req.write && req.off == UART_DATA;
  assign wr_setup  = req.valid &&  req.write && req.off == UART_CTRL;
  assign rd_recv   = req.valid && !req.write && req.off == UART_DATA;
  assign rd_status = req.valid && !req.write && req.off == UART_CTRL;

  // ---------------- transmitter ----------------
  logic          tx_busy;
  logic [9:0]    tx_shift;      // {stop, data[7:0], start}, sent LSB first
  logic [3:0]    tx_bits;       // bits left to send
  logic [CW-1:0] tx_cnt;
  logic          tx_done;       // stop bit finished this cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      txd      <= 1'b1;
      tx_done  <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      if (wr_send) begin
        // A store while busy restarts the frame (result undefined by the spec).
        tx_busy  <= 1'b1;
        tx_shift <= {1'b1, req.wdata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
        txd      <= 1'b0;
      end else if (tx_busy) begin
        if (tx_cnt != '0) begin
          tx_cnt <= tx_cnt - 1'b1;
        end else if (tx_bits == 4'd1) begin
          tx_busy <= 1'b0;
          tx_done <= 1'b1;
          txd     <= 1'b1;
        end else begin
          tx_shift <= {1'b1, tx_shift[9:1]};
          txd      <= tx_shift[1];
          tx_bits  <= tx_bits - 1'b1;
          tx_cnt   <= CW'(CLKS_PER_BIT - 1);
        end
      end
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift;
  logic [7:0]    rx_byte;
  logic          rx_ready;
  logic          rx_got;        // byte completed this cycle

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_sync  <= 2'b11;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_byte  <= '0;
      rx_ready <= 1'b0;
      rx_got   <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      rx_got  <= 1'b0;
      if (rd_recv) rx_ready <= 1'b0;
      unique case (rx_state)
        RX_IDLE: if (!rx_sync[1]) begin
          rx_state <= RX_START;
          rx_cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        RX_START: if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else if (rx_sync[1]) rx_state <= RX_IDLE;      // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_bit   <= '0;
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
          end
        RX_DATA: if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
            rx_bit <= rx_bit + 1'b1;
          end
        RX_STOP: if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            if (rx_sync[1]) begin                         // valid stop bit
              rx_byte  <= rx_shift;
              rx_ready <= 1'b1;
              rx_got   <= 1'b1;
            end
          end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ---------------- setup, read data, interrupt ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      intr_en <= 1'b0;
      rdata   <= '0;
      irq     <= 1'b0;
    end else begin
      if (wr_setup) intr_en <= req.wdata[0];
      if (rd_recv)   rdata <= {56'd0, rx_byte};
      if (rd_status) rdata <= {62'd0, !tx_busy, rx_ready};
      irq <= intr_en && (tx_done || rx_got);
    end
  end

endmodule
