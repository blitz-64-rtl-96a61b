// mem_model: behavioural main memory for the testbenches (not synthesizable intent).
//
// Serves the doubleword memory master port of blitz_io_pkg: a request is accepted
// when req_ready is high (ready is withheld on random cycles when STALL is set,
// to exercise the handshake), and exactly one response cycle follows LATENCY
// cycles later, carrying read data for a read. Storage is 2**AW doublewords
// indexed by address bits [AW+2:3]; the array `mem` is reached hierarchically by
// testbenches to preload and inspect memory.
module mem_model
  import blitz_io_pkg::*;
#(
  parameter int unsigned AW      = 12,
  parameter int unsigned LATENCY = 2,
  parameter bit          STALL   = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  mem_req_t      req,
  output logic          req_ready,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_rdata
);
  logic [DW-1:0] mem [2**AW];
  int unsigned   cnt;
  logic          busy;
  logic [DW-1:0] rd_q;
  int unsigned   accepted;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      req_ready <= 1'b0;
      accepted  <= 0;
    end else begin
      rsp_valid <= 1'b0;
      req_ready <= !busy && !(req_valid && req_ready) && (STALL ? ($urandom_range(3) != 0) : 1'b1);
      if (req_valid && req_ready && !busy) begin
        busy     <= 1'b1;
        cnt      <= LATENCY;
        accepted <= accepted + 1;
        if (req.write) mem[req.addr[AW+2:3]] <= req.wdata;
        else           rd_q <= mem[req.addr[AW+2:3]];
        req_ready <= 1'b0;
      end else if (busy) begin
        if (cnt <= 1) begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_rdata <= rd_q;
        end else cnt <= cnt - 1;
      end
    end
  end
endmodule
