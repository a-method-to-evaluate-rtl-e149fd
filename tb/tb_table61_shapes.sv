// tb_table61_shapes: runs rt_eval_top, at full size, with programs shaped
// like the published benchmark results: for each benchmark, ring L gets as
// many cascades of as many levels as its F_L realisation and ring H those of
// its F_H realisation (cascade count x largest level count, so the step
// count is an upper bound), with the benchmark's number of outputs.
// The benchmark functions themselves are not available, so LUT words are
// random; each ring's output is checked against a step-by-step model of a
// ring, and the evaluation time against max(S_L, S_H) + 1 clocks, one LUT
// memory reference per cascade level.
module tb_table61_shapes;
  import rt_pkg::*;
  localparam int REGION = 65536;
  localparam int NB = 9;
  // name, outputs, F_L levels, F_L cascades, F_H levels, F_H cascades
  string bname [NB] = '{"accpla", "apex1", "apex2", "C432", "exep", "misj", "rckl", "signet", "xparc"};
  int bout  [NB] = '{69, 45,  3,  7, 63, 14,  7,  8, 73};
  int llev  [NB] = '{15, 16,  3, 27, 10,  4,  7, 14, 15};
  int lcas  [NB] = '{ 3,  1,  1,  1,  1,  1,  1,  1,  1};
  int hlev  [NB] = '{16, 21,  3, 16, 16,  3,  7, 15, 16};
  int hcas  [NB] = '{ 7,  2,  1,  1,  2,  1,  1,  1,  3};

  logic clk = 0, rst_n = 0, start = 0;
  tern_t [N_VARS-1:0] x;
  logic prog_ring = 0, prog_lut_we = 0, prog_ic_we = 0;
  logic [MEM_AW-1:0] prog_lut_addr = '0;
  logic [LUT_OUT-1:0] prog_lut_data = '0;
  logic [PROG_AW-1:0] prog_ic_addr = '0;
  ic_entry_t prog_ic_data;
  logic busy, done, in_err;
  logic [N_OUTS-1:0] f_l, f_h;
  tern_t [N_OUTS-1:0] y;
  logic cp_in_valid = 0, cp_we = 0, cp_wsel = 0, cp_wcell = 0;
  logic [3:0] cp_x1_l = '0, cp_x1_h = '0;
  logic [10:0] cp_x2_l = '0, cp_x2_h = '0, cp_x2_neg = '0;
  logic [14:0] cp_waddr = '0;
  logic [LUT_OUT-1:0] cp_wdata = '0;
  logic cp_out_valid;
  logic [11:0] cp_f_l, cp_f_h;
  tern_t [11:0] cp_y;

  rt_eval_top dut (.*);

  always #5 clk = ~clk;

  logic [LUT_OUT-1:0] words [2][REGION];
  ic_entry_t prog [2][2**PROG_AW];
  int nsteps [2];
  int checks = 0, failures = 0, n_multi = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N_OUTS-1:0] model(input int ring);
    logic [N_OUTS-1:0] o;
    logic [LUT_OUT-1:0] r;
    logic [N_DR-1:0] xd;
    for (int i = 0; i < N_VARS; i++) {xd[i], xd[N_VARS + i]} = x[i];
    o = '0; r = '0;
    for (int s = 0; s < nsteps[ring]; s++) begin
      logic [LUT_IN-1:0] loc;
      for (int i = 0; i < LUT_IN; i++) begin
        int sel;
        sel = int'(prog[ring][s].sel[i]);
        if (sel < LUT_OUT) loc[i] = r[sel];
        else if (sel < LUT_OUT + N_DR) loc[i] = xd[sel - LUT_OUT];
        else loc[i] = 1'b0;
      end
      r = words[ring][int'(prog[ring][s].base) + int'(loc)];
      for (int j = 0; j < LUT_OUT; j++)
        if (prog[ring][s].out_en[j]) o[prog[ring][s].out_idx[j]] = r[j];
    end
    return o;
  endfunction

  task automatic make_prog(input int ring, input int ncas, input int nlev, input int nout);
    int s;
    s = 0;
    for (int c = 0; c < ncas; c++)
      for (int l = 0; l < nlev; l++) begin
        ic_entry_t e;
        e = '0;
        e.base = MEM_AW'($urandom_range(REGION - 4096));
        // 12 local address bits: 4 rails (none in a cascade's first LUT), 8 input rails
        for (int i = 0; i < LUT_IN; i++) e.sel[i] = SEL_W'(SRC_ZERO);
        for (int i = 0; i < 8; i++) e.sel[i] = SEL_W'($urandom_range(SRC_X, SRC_ZERO - 1));
        if (l > 0) for (int i = 8; i < 12; i++) e.sel[i] = SEL_W'(i - 8);
        // the cascade's last LUT and some inner LUTs deliver outputs
        if (l == nlev - 1 || $urandom_range(3) == 0)
          for (int j = 4; j < LUT_OUT; j++)
            if ($urandom_range(2) == 0) begin
              e.out_en[j] = 1'b1;
              e.out_idx[j] = OIDX_W'($urandom_range(nout - 1));
            end
        e.last = (c == ncas - 1) && (l == nlev - 1);
        prog[ring][s] = e;
        prog_ring = ring[0]; prog_ic_we = 1; prog_ic_addr = PROG_AW'(s); prog_ic_data = e;
        @(negedge clk);
        prog_ic_we = 0;
        s++;
      end
    nsteps[ring] = s;
    if (ncas > 1) n_multi++;
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    prog_ic_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ring = 0; ring < 2; ring++)
      for (int a = 0; a < REGION; a++) begin
        words[ring][a] = LUT_OUT'($urandom);
        prog_ring = ring[0]; prog_lut_we = 1; prog_lut_addr = MEM_AW'(a);
        prog_lut_data = words[ring][a];
        @(negedge clk);
      end
    prog_lut_we = 0;
    for (int b = 0; b < NB; b++) begin
      int lat;
      make_prog(0, lcas[b], llev[b], bout[b]);
      make_prog(1, hcas[b], hlev[b], bout[b]);
      lat = ((nsteps[0] > nsteps[1]) ? nsteps[0] : nsteps[1]) + 1;
      for (int v = 0; v < 20; v++) begin
        logic [N_OUTS-1:0] el, eh;
        int cyc;
        for (int i = 0; i < N_VARS; i++)
          case ($urandom_range(2)) 0: x[i] = T_ZERO; 1: x[i] = T_ONE; default: x[i] = T_U; endcase
        el = model(0);
        eh = model(1);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 0;
        while (!done && cyc < 400) begin @(negedge clk); cyc++; end
        chk(cyc == lat, $sformatf("%s: %0d clocks, expected %0d", bname[b], cyc, lat));
        chk(f_l == el, $sformatf("%s: F_L outputs", bname[b]));
        chk(f_h == eh, $sformatf("%s: F_H outputs", bname[b]));
        for (int j = 0; j < N_OUTS; j++)
          chk(y[j] == tern_t'({el[j], eh[j]}), $sformatf("%s: y[%0d]", bname[b], j));
      end
      $display("%-7s F_L %0d steps, F_H %0d steps, evaluation %0d clocks", bname[b], nsteps[0], nsteps[1], lat);
    end
    checks++;
    if (n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
