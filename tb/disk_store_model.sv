// disk_store_model: behavioural stand-in for the DISK0 storage medium (the
// emulator keeps it in a host file). One doubleword per access: a write lands at
// the clock edge when en && write; for a read, rdata holds the addressed
// doubleword from the cycle after en until the next access. The array `mem` is
// reached hierarchically by testbenches.
module disk_store_model
  import blitz_io_pkg::*;
#(
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          en,
  input  logic          write,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always @(posedge clk)
    if (en) begin
      if (write) mem[addr] <= wdata;
      else       rdata <= mem[addr];
    end
endmodule
