// conn_net: programmable connection network of an LUT ring.
//
// Builds the LUT-memory address of the current step. Each of the LUT_IN
// local address bits picks one source through its select field in the
// interconnection entry: a rail (an output bit of the LUT read in the
// previous step), an input rail bit x_L[i] or x_H[i], or constant 0. The
// local address is then added to the LUT's base word. Using rails from the
// previous step is how the ring emulates the rail wires between adjacent
// cells of an LUT cascade; the first LUT of a cascade simply selects no rail.
//
// Purely combinational. Source numbering is given in rt_pkg. x_dr holds x_L
// in bits [N_VARS-1:0] and x_H in bits [N_DR-1:N_VARS]. Select codes above
// SRC_ZERO also give 0. The paper names this network and its place between
// the registers and the LUT memory; the multiplexer-per-address-bit form and
// the base adder are this design's.
module conn_net
  import rt_pkg::*;
(
  input  ic_entry_t          entry,
  input  logic [N_DR-1:0]    x_dr,
  input  logic [LUT_OUT-1:0] rails,
  output logic [MEM_AW-1:0]  addr
);

  logic [SRC_ZERO:0]  src;
  logic [LUT_IN-1:0]  local_addr;

  assign src = {1'b0, x_dr, rails};

  always_comb begin
    for (int i = 0; i < LUT_IN; i++) begin
      local_addr[i] = (int'(entry.sel[i]) <= SRC_ZERO) ? src[entry.sel[i]] : 1'b0;
    end
  end

  assign addr = entry.base + MEM_AW'(local_addr);

endmodule
