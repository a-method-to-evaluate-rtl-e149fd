// lut_mem: the LUT memory of an LUT ring, or one LUT of a fixed cascade.
//
// A plain single-port-read, single-port-write RAM of 2^AW words of DW bits.
// Every LUT of the emulated cascades sits in it as a block of consecutive
// words; the word at (base + local address) holds all outputs of that LUT for
// that input combination.
//
// Timing: synchronous. When re is high, rdata shows mem[raddr] from the clock
// edge on and holds it until the next read. A write (we) takes effect at the
// clock edge; a read of the same word in the same cycle returns the old data.
// Contents are loaded from outside through the write port; nothing is reset.
// The paper gives only the memory's role; the synchronous read and the
// separate write port are this design's choices.
module lut_mem #(
  parameter int AW = rt_pkg::MEM_AW,
  parameter int DW = rt_pkg::LUT_OUT
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
