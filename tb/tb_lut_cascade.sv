// tb_lut_cascade: self-checking test of lut_cascade at its default size
// (4 cells, 4 rails, 15 address bits per cell).
// Loads random words into every cell, streams random inputs with random
// gaps, and compares each result with a chain model (cell k addressed by
// {rails of cell k-1, x[k]}). Checks a latency of N_CELLS clocks and one
// result per clock for back-to-back inputs.
module tb_lut_cascade;
  localparam int N_CELLS = 4, RAILS = 4, XW = 11, DW = 16;
  localparam int AW = RAILS + XW, YW = DW - RAILS;
  logic clk = 0, rst_n = 0, in_valid = 0, we = 0;
  logic [N_CELLS-1:0][XW-1:0] x = '0;
  logic [1:0] wcell = '0;
  logic [AW-1:0] waddr = '0;
  logic [DW-1:0] wdata = '0;
  logic out_valid;
  logic [N_CELLS-1:0][YW-1:0] y;

  logic [DW-1:0] cells [N_CELLS][2**AW];
  logic [N_CELLS-1:0][YW-1:0] expq [$];
  int tinq [$];
  int cycle = 0, checks = 0, failures = 0, n_b2b = 0;

  lut_cascade dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [N_CELLS-1:0][YW-1:0] model(input logic [N_CELLS-1:0][XW-1:0] xv);
    logic [RAILS-1:0] r;
    logic [N_CELLS-1:0][YW-1:0] o;
    r = '0;
    for (int k = 0; k < N_CELLS; k++) begin
      logic [DW-1:0] w;
      w = cells[k][{r, xv[k]}];
      r = w[RAILS-1:0];
      o[k] = w[DW-1:RAILS];
    end
    return o;
  endfunction

  // compare on every valid output
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic [N_CELLS-1:0][YW-1:0] e;
        int t;
        e = expq.pop_front();
        t = tinq.pop_front();
        if (y !== e) begin
          failures++;
          $display("FAIL y %h expected %h", y, e);
        end
        checks++;
        if (cycle - t != N_CELLS) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N_CELLS; k++)
      for (int a = 0; a < 2**AW; a++) begin
        we = 1; wcell = 2'(k); waddr = AW'(a); wdata = DW'($urandom); cells[k][a] = wdata;
        @(negedge clk);
      end
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      bit prev;
      prev = in_valid;
      in_valid = ($urandom_range(3) != 0);
      if (in_valid && prev) n_b2b++;
      for (int k = 0; k < N_CELLS; k++) x[k] = XW'($urandom);
      if (in_valid) begin
        expq.push_back(model(x));
        tinq.push_back(cycle);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (N_CELLS + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
