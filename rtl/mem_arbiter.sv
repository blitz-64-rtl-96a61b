// mem_arbiter: shares one memory master port between two bus masters (DISK0 and
// the DMA controller), both of which keep at most one request outstanding.
//
// When the port is free, a requesting master is granted (round robin when both
// ask), its request is passed through, and the grant is held from acceptance until
// the response cycle, which is routed back to that master only. This arbiter is
// this design's own addition; the document only says that DMA traffic is
// interleaved with other bus traffic.
//
// Timing: no added latency for requests or responses; a master can be granted in
// the cycle after the other master's response.
module mem_arbiter
  import blitz_io_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          m_req_valid [2],
  input  mem_req_t      m_req       [2],
  output logic          m_req_ready [2],
  output logic          m_rsp_valid [2],
  output logic [DW-1:0] m_rsp_rdata [2],
  output logic          s_req_valid,
  output mem_req_t      s_req,
  input  logic          s_req_ready,
  input  logic          s_rsp_valid,
  input  logic [DW-1:0] s_rsp_rdata
);
  logic busy;        // a request has been accepted and awaits its response
  logic owner;       // master holding the port while busy
  logic last;        // master granted last, for round robin
  logic pick;

  always_comb begin
    if (m_req_valid[0] && m_req_valid[1]) pick = !last;
    else                                  pick = m_req_valid[1];
  end

  always_comb begin
    s_req_valid = !busy && m_req_valid[pick];
    s_req       = m_req[pick];
    for (int i = 0; i < 2; i++) begin
      m_req_ready[i] = !busy && (pick == 1'(i)) && s_req_ready;
      m_rsp_valid[i] = busy && (owner == 1'(i)) && s_rsp_valid;
      m_rsp_rdata[i] = s_rsp_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; owner <= 1'b0; last <= 1'b1;
    end else if (!busy) begin
      if (s_req_valid && s_req_ready) begin
        busy <= 1'b1; owner <= pick; last <= pick;
      end
    end else if (s_rsp_valid) begin
      busy <= 1'b0;
    end
  end

endmodule
