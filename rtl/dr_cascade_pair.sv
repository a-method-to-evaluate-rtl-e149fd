// dr_cascade_pair: double-rail evaluation of a partially unate function by a
// pair of two-cell LUT cascades.
//
// f is binate in the N1 variables X1 and unate in the N2 variables X2. After
// the variables in which f is negative unate are complemented (x2_neg: for a
// double-rail pair this just swaps the rails), f is positive in X2. Then f_L
// depends only on X1L, X1H and X2L, and f_H only on X1L, X1H and X2H. Each
// rail function is a cascade of two LUTs: the first reads the 2*N1 rails of
// X1 and sends RAILS rails to the second, which adds the N2 rails of X2 it
// needs. Output bits of the second cell are the rail values of up to
// LUT_OUT-RAILS outputs, decoded to 0/1/u in y. The first cells only feed
// rails to the second, so their remaining output bits are left unused.
//
// Interface: load the cells with we, wsel (0 = f_L cascade, 1 = f_H),
// wcell, waddr, wdata. Present inputs with in_valid; results follow two
// clocks later with out_valid, one vector per clock.
// The split into these two cascades follows the paper; sizes, the
// polarity input and the pipelining are this design's. N1 = 4 and N2 = 11
// fill the second cell's 15 address bits with RAILS = 4.
module dr_cascade_pair
  import rt_pkg::*;
#(
  parameter int N1    = 4,
  parameter int N2    = 11,
  parameter int RAILS = 4,
  localparam int XW   = (2 * N1 > N2) ? 2 * N1 : N2,
  localparam int AW   = RAILS + XW,
  localparam int NO   = LUT_OUT - RAILS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [N1-1:0]      x1_l,
  input  logic [N1-1:0]      x1_h,
  input  logic [N2-1:0]      x2_l,
  input  logic [N2-1:0]      x2_h,
  input  logic [N2-1:0]      x2_neg,
  input  logic               we,
  input  logic               wsel,
  input  logic               wcell,
  input  logic [AW-1:0]      waddr,
  input  logic [LUT_OUT-1:0] wdata,
  output logic               out_valid,
  output logic [NO-1:0]      f_l,
  output logic [NO-1:0]      f_h,
  output tern_t [NO-1:0]     y
);

  logic [N2-1:0]           p_l, p_h;      // X2 rails after polarity
  logic [1:0][XW-1:0]      xl_in, xh_in;  // per-cell primary inputs
  logic [1:0][NO-1:0]      yl, yh;
  logic                    vl, vh;

  assign p_l = (x2_l & ~x2_neg) | (x2_h & x2_neg);
  assign p_h = (x2_h & ~x2_neg) | (x2_l & x2_neg);

  assign xl_in[0] = XW'({x1_h, x1_l});
  assign xl_in[1] = XW'(p_l);
  assign xh_in[0] = XW'({x1_h, x1_l});
  assign xh_in[1] = XW'(p_h);

  lut_cascade #(.N_CELLS(2), .RAILS(RAILS), .XW(XW), .DW(LUT_OUT)) u_cas_l (
    .clk, .rst_n, .in_valid, .x(xl_in), .we(we && !wsel), .wcell, .waddr,
    .wdata, .out_valid(vl), .y(yl)
  );

  lut_cascade #(.N_CELLS(2), .RAILS(RAILS), .XW(XW), .DW(LUT_OUT)) u_cas_h (
    .clk, .rst_n, .in_valid, .x(xh_in), .we(we && wsel), .wcell, .waddr,
    .wdata, .out_valid(vh), .y(yh)
  );

  assign out_valid = vl;
  assign f_l = yl[1];
  assign f_h = yh[1];

  always_comb begin
    for (int j = 0; j < NO; j++) y[j] = dr_decode(f_l[j], f_h[j]);
  end

  // both cascades run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) vl == vh);

endmodule
