// lock_ctrl: memory-mapped lock controller.
//
// Holds NUM_LOCKS 64-bit lock registers at the start of its page (lock k at byte
// offset 8*k). A LOAD returns the register. A STORE behaves like an ordinary memory
// write except that a non-zero value written into a register that already holds a
// non-zero value is dropped. Zero means "free"; a core acquires a lock by storing its
// core ID (1..N) and then loading the register to see whether its ID is there, and
// releases it by storing zero. Because accesses arrive one at a time on the bus, two
// competing STOREs are resolved in bus order and only the first one lands.
//
// The register behaviour and the count of 32 locks follow the lock controller
// description. Loads from offsets past the last lock return zero and stores there
// are ignored (the page has no other usable locations); the reset value of every
// lock (free) is this design's choice.
//
// Interface: io_req_t request (see blitz_io_pkg); LOAD data appears on rdata the
// cycle after the request.
module lock_ctrl
  import blitz_io_pkg::*;
#(
  parameter int unsigned NUM_LOCKS = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  io_req_t       req,
  output logic [DW-1:0] rdata
);
  localparam int unsigned IDX_W = $clog2(NUM_LOCKS);

  logic [DW-1:0] locks [NUM_LOCKS];

  logic [IDX_W-1:0] idx;
  logic             in_range;
  assign idx      = req.off[3 +: IDX_W];
  assign in_range = (req.off >> 3) < PAGE_OFF_W'(NUM_LOCKS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_LOCKS; i++) locks[i] <= '0;
      rdata <= '0;
    end else if (req.valid) begin
      if (req.write) begin
        // A non-zero value only lands in a free lock; zero always lands.
        if (in_range && (req.wdata == '0 || locks[idx] == '0))
          locks[idx] <= req.wdata;
      end else begin
        rdata <= in_range ? locks[idx] : '0;
      end
    end
  end

endmodule
