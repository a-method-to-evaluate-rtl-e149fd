// ic_mem: interconnection memory of an LUT ring.
//
// One entry (rt_pkg::ic_entry_t) per LUT step: where the LUT lies in the LUT
// memory, which source drives each of its address bits, which of its outputs
// go to the output register and where, and whether it is the program's last
// step. The steps of all cascades of a ring are stored one after the other.
//
// Timing: written at the clock edge when we is high; read asynchronously, so
// the entry of the step the controller points at is available in the same
// cycle (a small register file). Nothing is reset; the program is loaded from
// outside. The paper names this memory; the entry format is this design's.
module ic_mem
  import rt_pkg::*;
#(
  parameter int AW = PROG_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ic_entry_t     wdata,
  input  logic [AW-1:0] raddr,
  output ic_entry_t     rdata
);

  ic_entry_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
