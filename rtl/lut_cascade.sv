// lut_cascade: fixed LUT cascade, pipelined one cell per clock.
//
// N_CELLS LUTs in a chain. Cell k is addressed by {rails from cell k-1,
// its own XW primary inputs}; cell 0 has no predecessor and sees rails = 0.
// Of each cell's DW output bits, bits [RAILS-1:0] are the rails to the next
// cell and bits [DW-1:RAILS] leave the cascade as that cell's outputs
// (intermediate outputs for inner cells, final outputs for the last).
//
// Each cell is a lut_mem with a synchronous read, so cells form pipeline
// stages: the primary inputs of cell k are delayed k clocks to meet the rails
// that reach it, and the outputs of every cell are delayed so that all of
// them appear together. A vector accepted with in_valid at clock edge t shows
// on y with out_valid after edge t+N_CELLS-1 (latency N_CELLS clocks, one new
// vector per clock). Cells are loaded through the write port (we, wcell,
// waddr, wdata).
//
// The chain of LUTs joined by rails follows the paper's LUT cascade; the
// pipelining, the uniform cell size and the write port are this design's.
module lut_cascade #(
  parameter int N_CELLS = 4,
  parameter int RAILS   = 4,
  parameter int XW      = 11,
  parameter int DW      = rt_pkg::LUT_OUT,
  localparam int AW     = RAILS + XW,
  localparam int YW     = DW - RAILS,
  localparam int CW     = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [N_CELLS-1:0][XW-1:0]     x,
  input  logic                           we,
  input  logic [CW-1:0]                  wcell,
  input  logic [AW-1:0]                  waddr,
  input  logic [DW-1:0]                  wdata,
  output logic                           out_valid,
  output logic [N_CELLS-1:0][YW-1:0]     y
);

  // xs[s] = x delayed s clocks; vs[s] = in_valid delayed s clocks
  logic [N_CELLS-1:0][XW-1:0] xs [N_CELLS];
  logic [N_CELLS:0]           vs;
  logic [DW-1:0]              q [N_CELLS];

  assign xs[0] = x;
  assign vs[0] = in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) vs[N_CELLS:1] <= '0;
    else        vs[N_CELLS:1] <= vs[N_CELLS-1:0];
  end

  for (genvar s = 1; s < N_CELLS; s++) begin : g_xdly
    always_ff @(posedge clk) xs[s] <= xs[s-1];
  end

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    logic [RAILS-1:0] rin;
    if (k == 0) begin : g_first
      assign rin = '0;
    end else begin : g_next
      assign rin = q[k-1][RAILS-1:0];
    end

    lut_mem #(.AW(AW), .DW(DW)) u_lut (
      .clk, .re(vs[k]), .raddr({rin, xs[k][k]}), .rdata(q[k]),
      .we(we && int'(wcell) == k), .waddr, .wdata
    );

    // align this cell's outputs with those of the last cell
    localparam int D = N_CELLS - 1 - k;
    logic [YW-1:0] yd [D+1];
    assign yd[0] = q[k][DW-1:RAILS];
    for (genvar d = 1; d <= D; d++) begin : g_ydly
      always_ff @(posedge clk) yd[d] <= yd[d-1];
    end
    assign y[k] = yd[D];
  end

  assign out_valid = vs[N_CELLS];

endmodule
