// ring_in_reg: input register of an LUT ring.
//
// Captures the double-rail input vector when an evaluation starts and holds
// it while the ring steps through its LUTs, so the caller may change its
// inputs meanwhile. Variable i arrives as (x_l[i], x_h[i]): (1,0) is 0,
// (0,1) is 1, (1,1) is unknown. The pair (0,0) is not a value; the register
// raises bad when any captured pair is (0,0), because the LUT contents are
// don't-care there and the outputs would mean nothing.
//
// Timing: loads at the clock edge when load is high; synchronous active-low
// reset clears it. Output x_dr = {x_h, x_l}. The register and the code
// follow the paper; the (0,0) flag is this design's addition.
module ring_in_reg
  import rt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [N_VARS-1:0] x_l,
  input  logic [N_VARS-1:0] x_h,
  output logic [N_DR-1:0]   x_dr,
  output logic              bad
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_dr <= '0;
      bad  <= 1'b0;
    end else if (load) begin
      x_dr <= {x_h, x_l};
      bad  <= |(~x_l & ~x_h);
    end
  end

endmodule
