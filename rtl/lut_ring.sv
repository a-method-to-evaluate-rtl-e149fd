// lut_ring: LUT ring that emulates one or more LUT cascades.
//
// Instead of one memory per cascade cell, all LUTs live in one large LUT
// memory and are applied one after another, one per clock. The
// interconnection memory holds one entry per LUT step; the connection network
// forms the step's address from its base word, the input register bits and
// the rails, which are simply the word read in the previous step. Outputs
// selected by the entry are copied into the output register one cycle later,
// when the word has been read. Several cascades are several runs of steps in
// one program; the first step of each selects no rail bits.
//
// Interface: load LUT words (lut_we/lut_waddr/lut_wdata) and program entries
// (ic_we/ic_waddr/ic_wdata, steps from address 0, the final one marked last)
// while idle. A start pulse with the double-rail inputs (x_l, x_h) begins an
// evaluation; `out` is valid once done pulses and stays until the next start.
// in_bad reports a (0,0) input pair.
//
// Timing: S steps take S+1 clocks from the start edge to done (see
// ring_ctrl), one LUT memory reference per step. Structure (input register,
// output register, control, interconnection memory, connection network, LUT
// memory) follows the paper's LUT ring; the entry format, the one-step-
// per-clock pipeline and the write ports are this design's.
module lut_ring
  import rt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [N_VARS-1:0]  x_l,
  input  logic [N_VARS-1:0]  x_h,
  input  logic               lut_we,
  input  logic [MEM_AW-1:0]  lut_waddr,
  input  logic [LUT_OUT-1:0] lut_wdata,
  input  logic               ic_we,
  input  logic [PROG_AW-1:0] ic_waddr,
  input  ic_entry_t          ic_wdata,
  output logic               busy,
  output logic               done,
  output logic               in_bad,
  output logic [N_OUTS-1:0]  out
);

  logic [PROG_AW-1:0]             step;
  logic                           load, run, wr_out;
  ic_entry_t                      entry;
  logic [N_DR-1:0]                x_dr;
  logic [LUT_OUT-1:0]             rails;
  logic [MEM_AW-1:0]              addr;
  logic [LUT_OUT-1:0]             p_en;
  logic [LUT_OUT-1:0][OIDX_W-1:0] p_idx;

  ring_ctrl u_ctrl (
    .clk, .rst_n, .start, .last(entry.last), .step, .load, .run, .wr_out,
    .busy, .done
  );

  ring_in_reg u_in (
    .clk, .rst_n, .load, .x_l, .x_h, .x_dr, .bad(in_bad)
  );

  ic_mem u_ic (
    .clk, .we(ic_we), .waddr(ic_waddr), .wdata(ic_wdata), .raddr(step),
    .rdata(entry)
  );

  conn_net u_net (
    .entry, .x_dr, .rails, .addr
  );

  lut_mem #(.AW(MEM_AW), .DW(LUT_OUT)) u_lut (
    .clk, .re(run), .raddr(addr), .rdata(rails),
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata)
  );

  // output fields of the step whose word is being read travel one cycle
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_en  <= '0;
      p_idx <= '0;
    end else if (run) begin
      p_en  <= entry.out_en;
      p_idx <= entry.out_idx;
    end
  end

  ring_out_reg u_out (
    .clk, .rst_n, .clear(load), .wr(wr_out), .data(rails), .en(p_en),
    .idx(p_idx), .q(out)
  );

  // the stored program must not change under a running evaluation
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(ic_we || lut_we));

endmodule
