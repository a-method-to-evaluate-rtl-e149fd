// rt_eval_top: evaluator of regular ternary (RT) functions with LUT rings.
//
// A two-valued multiple-output function F, evaluated on inputs that may be
// 0, 1 or unknown (u), should give u only where the unknown inputs really can
// change the output. The double-rail form turns that into two ordinary binary
// functions of the input rails: F_L is 1 where some completion of the
// unknowns gives 0, F_H is 1 where some completion gives 1. Ring L holds the
// cascades of F_L and ring H those of F_H; both read the same input vector
// and run at the same time. Output j is then 0 for (1,0), 1 for (0,1) and
// u for (1,1).
//
// Interface: x[i] is variable i in double-rail code (rt_pkg::tern_t, {L,H}).
// Programming: prog_ring selects ring L (0) or H (1) for a LUT-word write
// (prog_lut_we) or a program-entry write (prog_ic_we); write only while not
// busy. A start pulse captures x in both rings; done pulses one cycle after
// the slower ring has finished, and f_l, f_h and y hold until the next start.
// start is accepted when idle and in the done cycle, so evaluations can run
// back to back; it is ignored at other times while busy.
// A ring of S steps finishes S+1 clocks after the start edge. in_err is set
// when an input pair was (0,0).
//
// Beside the rings stands dr_cascade_pair (cp_* ports): the fixed two-cascade
// realisation of a partially unate function, pipelined, independent of the
// rings.
//
// Separate rings for F_L and F_H and the double-rail code follow the
// paper; the programming ports, handshake and done logic are this
// design's.
module rt_eval_top
  import rt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // ring pair
  input  logic                  start,
  input  tern_t [N_VARS-1:0]    x,
  input  logic                  prog_ring,
  input  logic                  prog_lut_we,
  input  logic [MEM_AW-1:0]     prog_lut_addr,
  input  logic [LUT_OUT-1:0]    prog_lut_data,
  input  logic                  prog_ic_we,
  input  logic [PROG_AW-1:0]    prog_ic_addr,
  input  ic_entry_t             prog_ic_data,
  output logic                  busy,
  output logic                  done,
  output logic                  in_err,
  output logic [N_OUTS-1:0]     f_l,
  output logic [N_OUTS-1:0]     f_h,
  output tern_t [N_OUTS-1:0]    y,
  // fixed cascade pair
  input  logic                  cp_in_valid,
  input  logic [3:0]            cp_x1_l,
  input  logic [3:0]            cp_x1_h,
  input  logic [10:0]           cp_x2_l,
  input  logic [10:0]           cp_x2_h,
  input  logic [10:0]           cp_x2_neg,
  input  logic                  cp_we,
  input  logic                  cp_wsel,
  input  logic                  cp_wcell,
  input  logic [14:0]           cp_waddr,
  input  logic [LUT_OUT-1:0]    cp_wdata,
  output logic                  cp_out_valid,
  output logic [11:0]           cp_f_l,
  output logic [11:0]           cp_f_h,
  output tern_t [11:0]          cp_y
);

  logic [N_VARS-1:0] x_l, x_h;
  logic              busy_l, busy_h, done_l, done_h, bad_l, bad_h;
  logic              fin_l, fin_h, running, accept;

  always_comb begin
    for (int i = 0; i < N_VARS; i++) {x_l[i], x_h[i]} = x[i];
  end

  // a new evaluation may start when idle or in the done cycle (rings idle)
  assign accept = start && (!running || done);

  lut_ring u_ring_l (
    .clk, .rst_n, .start(accept), .x_l, .x_h,
    .lut_we(prog_lut_we && !prog_ring), .lut_waddr(prog_lut_addr), .lut_wdata(prog_lut_data),
    .ic_we(prog_ic_we && !prog_ring), .ic_waddr(prog_ic_addr), .ic_wdata(prog_ic_data),
    .busy(busy_l), .done(done_l), .in_bad(bad_l), .out(f_l)
  );

  lut_ring u_ring_h (
    .clk, .rst_n, .start(accept), .x_l, .x_h,
    .lut_we(prog_lut_we && prog_ring), .lut_waddr(prog_lut_addr), .lut_wdata(prog_lut_data),
    .ic_we(prog_ic_we && prog_ring), .ic_waddr(prog_ic_addr), .ic_wdata(prog_ic_data),
    .busy(busy_h), .done(done_h), .in_bad(bad_h), .out(f_h)
  );

  // done once both rings have finished; they may run different step counts
  assign done = running && (fin_l || done_l) && (fin_h || done_h);
  assign busy = running;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      fin_l   <= 1'b0;
      fin_h   <= 1'b0;
    end else if (!running || done) begin
      running <= start;
      fin_l   <= 1'b0;
      fin_h   <= 1'b0;
    end else begin
      fin_l <= fin_l || done_l;
      fin_h <= fin_h || done_h;
    end
  end

  assign in_err = bad_l;

  always_comb begin
    for (int j = 0; j < N_OUTS; j++) y[j] = dr_decode(f_l[j], f_h[j]);
  end

  dr_cascade_pair #(.N1(4), .N2(11), .RAILS(4)) u_cp (
    .clk, .rst_n, .in_valid(cp_in_valid), .x1_l(cp_x1_l), .x1_h(cp_x1_h),
    .x2_l(cp_x2_l), .x2_h(cp_x2_h), .x2_neg(cp_x2_neg), .we(cp_we),
    .wsel(cp_wsel), .wcell(cp_wcell), .waddr(cp_waddr), .wdata(cp_wdata),
    .out_valid(cp_out_valid), .f_l(cp_f_l), .f_h(cp_f_h), .y(cp_y)
  );

  // both rings see the same inputs, so they agree on their validity
  assert property (@(posedge clk) disable iff (!rst_n) bad_l == bad_h);
  // the rings are started together and stay in step until both have finished
  assert property (@(posedge clk) disable iff (!rst_n) (busy_l || busy_h) |-> running);

endmodule
