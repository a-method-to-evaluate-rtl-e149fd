// tb_lut_ring: self-checking test of lut_ring.
// Loads random LUT words into a region of the LUT memory and random
// programs (random bases inside the region, random source selects, random
// output maps, random length), runs them on random double-rail inputs, and
// compares the output register with a step-by-step model of the ring
// (rails = word read in the previous step). Also checks the S+1 latency
// and that outputs not written by a program stay cleared.
module tb_lut_ring;
  import rt_pkg::*;
  localparam int REGION = 4096;          // words loaded
  logic clk = 0, rst_n = 0, start = 0;
  logic [N_VARS-1:0] x_l = '0, x_h = '0;
  logic lut_we = 0, ic_we = 0;
  logic [MEM_AW-1:0] lut_waddr = '0;
  logic [LUT_OUT-1:0] lut_wdata = '0;
  logic [PROG_AW-1:0] ic_waddr = '0;
  ic_entry_t ic_wdata;
  logic busy, done, in_bad;
  logic [N_OUTS-1:0] out;

  logic [LUT_OUT-1:0] words [REGION];
  ic_entry_t prog [2**PROG_AW];
  int checks = 0, failures = 0, n_rail_steps = 0, n_bad = 0;

  lut_ring dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [N_OUTS-1:0] model(input int nsteps);
    logic [N_OUTS-1:0] o;
    logic [LUT_OUT-1:0] r;
    logic [N_DR-1:0] xd;
    o = '0; r = '0; xd = {x_h, x_l};
    for (int s = 0; s < nsteps; s++) begin
      logic [LUT_IN-1:0] loc;
      int a;
      for (int i = 0; i < LUT_IN; i++) begin
        int sel;
        sel = int'(prog[s].sel[i]);
        if (sel < LUT_OUT) loc[i] = r[sel];
        else if (sel < LUT_OUT + N_DR) loc[i] = xd[sel - LUT_OUT];
        else loc[i] = 1'b0;
      end
      a = int'(prog[s].base) + int'(loc);
      r = words[a];
      for (int j = 0; j < LUT_OUT; j++)
        if (prog[s].out_en[j] && prog[s].out_idx[j] < N_OUTS) o[prog[s].out_idx[j]] = r[j];
    end
    return o;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ic_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < REGION; a++) begin
      lut_we = 1; lut_waddr = MEM_AW'(a); lut_wdata = LUT_OUT'($urandom); words[a] = lut_wdata;
      @(negedge clk);
    end
    lut_we = 0;
    for (int p = 0; p < 40; p++) begin
      int nsteps, cyc;
      logic [N_OUTS-1:0] exp;
      nsteps = (p == 0) ? 1 : $urandom_range(1, 30);
      for (int s = 0; s < nsteps; s++) begin
        ic_entry_t e;
        e = '0;
        // 10 local address bits, 1024-word LUTs inside the region
        e.base = MEM_AW'($urandom_range(REGION - 1024));
        for (int i = 0; i < LUT_IN; i++) begin
          if (i >= 10) e.sel[i] = SEL_W'(SRC_ZERO);
          else if (s > 0 && $urandom_range(2) == 0) e.sel[i] = SEL_W'($urandom_range(LUT_OUT - 1));
          else e.sel[i] = SEL_W'($urandom_range(SRC_X, SRC_ZERO - 1));
          if (int'(e.sel[i]) < LUT_OUT) n_rail_steps++;
        end
        e.out_en = LUT_OUT'($urandom) & LUT_OUT'($urandom);
        for (int j = 0; j < LUT_OUT; j++) e.out_idx[j] = OIDX_W'($urandom_range(N_OUTS - 1));
        e.last = (s == nsteps - 1);
        prog[s] = e;
        ic_we = 1; ic_waddr = PROG_AW'(s); ic_wdata = e;
        @(negedge clk);
      end
      ic_we = 0;
      for (int v = 0; v < 5; v++) begin
        logic eb;
        eb = 1'b0;
        for (int i = 0; i < N_VARS; i++) begin
          case ($urandom_range(2))
            0: {x_l[i], x_h[i]} = 2'b10;
            1: {x_l[i], x_h[i]} = 2'b01;
            default: {x_l[i], x_h[i]} = 2'b11;
          endcase
        end
        if (v == 4) begin {x_l[3], x_h[3]} = 2'b00; eb = 1'b1; n_bad++; end
        exp = model(nsteps);
        start = 1;
        @(negedge clk);
        start = 0;
        // inputs may change once captured
        x_l = ~x_l;
        cyc = 0;  // clock edges since the start edge
        while (!done && cyc < 100) begin @(negedge clk); cyc++; end
        chk(cyc == nsteps + 1, $sformatf("latency S+1 (%0d steps, %0d cycles)", nsteps, cyc));
        chk(out == exp, "outputs");
        chk(in_bad == eb, "in_bad");
        if (out != exp) $display("  got %h exp %h", out, exp);
      end
    end
    if (n_rail_steps == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
