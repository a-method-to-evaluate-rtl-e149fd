// ring_out_reg: output register of an LUT ring.
//
// Cleared at the start of an evaluation. In every cycle that wr is high, each
// LUT output bit j with en[j] set is copied to output position idx[j]; other
// positions keep their value. This lets a LUT in the middle of a cascade
// deliver intermediate outputs and lets several cascades share one register.
// If two enabled bits name the same position, the higher j wins. Positions at
// or above N_OUTS are ignored.
//
// Timing: synchronous; active-low reset and clear both zero the register.
// The register and intermediate outputs follow the paper; the per-bit
// destination and the clear on start are this design's.
module ring_out_reg
  import rt_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           wr,
  input  logic [LUT_OUT-1:0]             data,
  input  logic [LUT_OUT-1:0]             en,
  input  logic [LUT_OUT-1:0][OIDX_W-1:0] idx,
  output logic [N_OUTS-1:0]              q
);

  logic [N_OUTS-1:0] q_next;

  always_comb begin
    q_next = q;
    for (int j = 0; j < LUT_OUT; j++) begin
      if (en[j] && int'(idx[j]) < N_OUTS) q_next[idx[j]] = data[j];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (wr)         q <= q_next;
  end

endmodule
