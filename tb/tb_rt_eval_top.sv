// tb_rt_eval_top: end-to-end test of rt_eval_top at its default size.
//
// Functions under test (all evaluated on ternary inputs):
//  * cascade A, variables 0..19 in four groups of five: a 2-bit state starts
//    at 0 and each group moves it through a random table; output 0 is bit 0
//    of the state after two groups (an intermediate output of the second
//    LUT), output 1 is bit 0 after all four.
//  * cascade B, variables 20..34 in three groups, likewise; output 3 after
//    the first group, output 2 after the third.
//  * cascade C, the three-variable example f = ~x1 x2 | x1 x3 on variables
//    47, 48, 49, output 72. Ring L holds it as one LUT, ring H as two LUTs
//    joined by four rails, so the rings run 8 and 9 steps.
// LUT contents are built as cascades over sets of reachable states (a LUT
// maps the set of states that its rails may stand for, and its inputs, to
// the set of states that may follow). Ring L stores the "some completion
// gives 0" bit of each output, ring H the "some completion gives 1" bit.
// The expected outputs come from enumerating every completion of the
// unknown inputs, independently of that construction. Outputs no program
// writes must read as the unused code.
//
// Also checks: done 10 clocks after the start edge (the slower ring), a new
// start accepted in the done cycle (back-to-back evaluations), the
// invalid-input flag, the worked example vectors (0,0,u), (u,1,1), (u,1,u),
// and how often a gate-by-gate ternary simulation of the AND-OR network of
// cascade C would have answered u where the exact value is 0 or 1. The fixed
// cascade pair beside the rings is loaded with f = a & b (a from X1, b from
// X2) and checked against the ternary AND table for all nine input pairs.
module tb_rt_eval_top;
  import rt_pkg::*;
  localparam int LUTW = 16384;   // words per 14-input LUT
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

  // random state tables: g[cell][state][group value] -> next state
  logic [1:0] ga [4][4][32];
  logic [1:0] gb [3][4][32];
  int checks = 0, failures = 0;
  int n_u = 0, n_0 = 0, n_1 = 0, n_def_with_u = 0, n_kleene_loose = 0;
  int n_bad = 0, n_inter = 0, n_uneven = 0, n_cp = 0, n_b2b = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- LUT contents ----------------
  // next-state set of a cell: state set s, five variables' rails in a[9:0]
  // (bit 2t = L rail, bit 2t+1 = H rail of variable t of the group)
  function automatic logic [3:0] step_set(input bit is_b, input int k, input logic [3:0] s,
                                          input logic [9:0] a);
    logic [3:0] ns;
    ns = '0;
    for (int c = 0; c < 32; c++) begin
      bit ok;
      ok = 1;
      for (int t = 0; t < 5; t++) ok &= c[t] ? a[2*t+1] : a[2*t];
      if (ok)
        for (int st = 0; st < 4; st++)
          if (s[st]) ns[is_b ? gb[k][st][c] : ga[k][st][c]] = 1'b1;
    end
    return ns;
  endfunction

  function automatic logic [5:0] set_word(input logic [3:0] ns);
    bit fl, fh;
    fl = ns[0] | ns[2];   // a state with bit 0 = 0 is reachable
    fh = ns[1] | ns[3];
    return {fh, fl, ns};
  endfunction

  // f = ~x1 x2 | x1 x3 on double-rail pairs: {fh, fl}
  function automatic logic [1:0] ex_word(input logic [5:0] a);
    bit fl, fh;
    fl = 0; fh = 0;
    for (int c = 0; c < 8; c++) begin
      bit ok, v;
      ok = 1;
      for (int t = 0; t < 3; t++) ok &= c[t] ? a[2*t+1] : a[2*t];
      v = (!c[0] & c[1]) | (c[0] & c[2]);
      if (ok) begin if (v) fh = 1; else fl = 1; end
    end
    return {fh, fl};
  endfunction

  task automatic wlut(input bit ring, input int a, input logic [LUT_OUT-1:0] d);
    prog_ring = ring; prog_lut_we = 1; prog_lut_addr = MEM_AW'(a); prog_lut_data = d;
    @(negedge clk);
    prog_lut_we = 0;
  endtask

  task automatic wic(input bit ring, input int a, input ic_entry_t e);
    prog_ring = ring; prog_ic_we = 1; prog_ic_addr = PROG_AW'(a); prog_ic_data = e;
    @(negedge clk);
    prog_ic_we = 0;
  endtask

  function automatic int sel_l(input int v); return SRC_X + v; endfunction
  function automatic int sel_h(input int v); return SRC_X + N_VARS + v; endfunction

  // entry for a group cell: rails from bits [3:0] unless first, group of 5 vars
  function automatic ic_entry_t grp_entry(input int base, input bit first, input int v0,
                                          input bit ring, input int oidx, input bit last);
    ic_entry_t e;
    e = '0;
    e.base = MEM_AW'(base);
    for (int i = 0; i < LUT_IN; i++) e.sel[i] = SEL_W'(SRC_ZERO);
    for (int t = 0; t < 5; t++) begin
      e.sel[2*t]   = SEL_W'(sel_l(v0 + t));
      e.sel[2*t+1] = SEL_W'(sel_h(v0 + t));
    end
    if (!first) for (int r = 0; r < 4; r++) e.sel[10 + r] = SEL_W'(r);
    if (oidx >= 0) begin
      e.out_en[ring ? 5 : 4] = 1'b1;
      e.out_idx[ring ? 5 : 4] = OIDX_W'(oidx);
    end
    e.last = last;
    return e;
  endfunction

  task automatic load_group_cells(input bit ring, input bit is_b, input int ncell, input int base0);
    for (int k = 0; k < ncell; k++) begin
      if (k == 0) begin
        for (int a = 0; a < 1024; a++)
          wlut(ring, base0 + a, LUT_OUT'(set_word(step_set(is_b, 0, 4'b0001, 10'(a)))));
      end else begin
        for (int a = 0; a < LUTW; a++)
          wlut(ring, base0 + k * LUTW + a,
               LUT_OUT'(set_word(step_set(is_b, k, 4'(a >> 10), 10'(a)))));
      end
    end
  endtask

  // ---------------- reference ----------------
  function automatic logic [1:0] run_chain(input bit is_b, input int ncell, input logic [19:0] v);
    logic [1:0] st;
    st = 2'd0;
    for (int k = 0; k < ncell; k++) st = is_b ? gb[k][st][v[5*k +: 5]] : ga[k][st][v[5*k +: 5]];
    return st;
  endfunction

  // exact ternary value of bit 0 of the state after ncell groups from v0
  function automatic tern_t rt_chain(input bit is_b, input int ncell, input int v0);
    int upos [$];
    logic [19:0] base;
    bit s0, s1;
    base = '0;
    for (int i = 0; i < 5 * ncell; i++) begin
      if (x[v0 + i] == T_U) upos.push_back(i);
      else if (x[v0 + i] == T_ONE) base[i] = 1'b1;
    end
    s0 = 0; s1 = 0;
    for (int c = 0; c < (1 << upos.size()); c++) begin
      logic [19:0] v;
      v = base;
      for (int k = 0; k < upos.size(); k++) v[upos[k]] = c[k];
      if (run_chain(is_b, ncell, v)[0]) s1 = 1; else s0 = 1;
      if (s0 && s1) break;
    end
    return (s0 && s1) ? T_U : (s1 ? T_ONE : T_ZERO);
  endfunction

  function automatic tern_t rt_ex();
    bit s0, s1;
    s0 = 0; s1 = 0;
    for (int c = 0; c < 8; c++) begin
      bit ok, v;
      ok = 1;
      for (int t = 0; t < 3; t++)
        ok &= (x[47 + t] == T_U) || (x[47 + t] == (c[t] ? T_ONE : T_ZERO));
      v = (!c[0] & c[1]) | (c[0] & c[2]);
      if (ok) begin if (v) s1 = 1; else s0 = 1; end
    end
    return (s0 && s1) ? T_U : (s1 ? T_ONE : T_ZERO);
  endfunction

  // gate-by-gate ternary simulation of the AND-OR network (NOT, AND, AND, OR)
  function automatic tern_t t_not(input tern_t a);
    return a == T_U ? T_U : (a == T_ONE ? T_ZERO : T_ONE);
  endfunction
  function automatic tern_t t_and(input tern_t a, input tern_t b);
    if (a == T_ZERO || b == T_ZERO) return T_ZERO;
    if (a == T_ONE && b == T_ONE) return T_ONE;
    return T_U;
  endfunction
  function automatic tern_t t_or(input tern_t a, input tern_t b);
    if (a == T_ONE || b == T_ONE) return T_ONE;
    if (a == T_ZERO && b == T_ZERO) return T_ZERO;
    return T_U;
  endfunction

  task automatic random_x(input int pu);
    for (int i = 0; i < N_VARS; i++) begin
      int r;
      r = $urandom_range(99);
      x[i] = (r < pu) ? T_U : ((r & 1) ? T_ONE : T_ZERO);
    end
  endtask

  task automatic eval_check(input string tag, input bit b2b = 0);
    tern_t exp [N_OUTS];
    bit eb;
    int cyc;
    bit any_u;
    for (int j = 0; j < N_OUTS; j++) exp[j] = T_BAD;
    exp[0]  = rt_chain(0, 2, 0);
    exp[1]  = rt_chain(0, 4, 0);
    exp[3]  = rt_chain(1, 1, 20);
    exp[2]  = rt_chain(1, 3, 20);
    exp[72] = rt_ex();
    eb = 0;
    for (int i = 0; i < N_VARS; i++) if (x[i] == T_BAD) eb = 1;
    if (eb) n_bad++;
    for (int j = 0; j < N_OUTS; j++) if (exp[j] != T_BAD) begin
      if (exp[j] == T_U) n_u++;
      if (exp[j] == T_ZERO) n_0++;
      if (exp[j] == T_ONE) n_1++;
    end
    any_u = 0;
    for (int i = 0; i < 20; i++) if (x[i] == T_U) any_u = 1;
    if (any_u && exp[1] != T_U) n_def_with_u++;
    if (exp[72] != T_U &&
        t_or(t_and(t_not(x[47]), x[48]), t_and(x[47], x[49])) == T_U) n_kleene_loose++;
    start = 1;
    @(negedge clk);
    start = 0;
    x[0] = t_not(x[0]);   // inputs are captured; changing them must not matter
    cyc = 0;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(cyc == 10, $sformatf("%s: done after %0d clocks", tag, cyc));
    if (cyc == 10) n_uneven++;
    chk(in_err == eb, $sformatf("%s: in_err", tag));
    for (int j = 0; j < N_OUTS; j++) begin
      chk(y[j] == exp[j], $sformatf("%s: y[%0d] = %s expected %s", tag, j, y[j].name(), exp[j].name()));
      chk({f_l[j], f_h[j]} == 2'(exp[j]), $sformatf("%s: rails of y[%0d]", tag, j));
    end
    if (exp[0] != T_BAD) n_inter++;
    if (b2b) n_b2b++;    // the next evaluation starts in this done cycle
    else begin
      @(negedge clk);
      chk(!done && !busy, "idle after done");
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ic_entry_t e;
    x = '0;
    prog_ic_data = '0;
    for (int k = 0; k < 4; k++) for (int s = 0; s < 4; s++) for (int c = 0; c < 32; c++) begin
      ga[k][s][c] = 2'($urandom);
      if (k < 3) gb[k][s][c] = 2'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- LUT memories: A at 0, B at 4*LUTW, C at 7*LUTW (and 8*LUTW) ----
    for (int ring = 0; ring < 2; ring++) begin
      load_group_cells(ring[0], 0, 4, 0);
      load_group_cells(ring[0], 1, 3, 4 * LUTW);
    end
    for (int a = 0; a < 64; a++)                     // ring L: C in one LUT
      wlut(0, 7 * LUTW + a, LUT_OUT'({ex_word(6'(a)), 4'b0}));
    for (int a = 0; a < 16; a++)                     // ring H: x1, x2 rails passed on
      wlut(1, 7 * LUTW + a, LUT_OUT'(a));
    for (int a = 0; a < 64; a++)                     // ring H: then x3
      wlut(1, 8 * LUTW + a, LUT_OUT'({ex_word(6'(a)), 4'b0}));

    // ---- programs ----
    for (int ring = 0; ring < 2; ring++) begin
      int p;
      p = 0;
      wic(ring[0], p++, grp_entry(0,        1, 0, ring[0], -1, 0));
      wic(ring[0], p++, grp_entry(1 * LUTW, 0, 5, ring[0], 0, 0));
      wic(ring[0], p++, grp_entry(2 * LUTW, 0, 10, ring[0], -1, 0));
      wic(ring[0], p++, grp_entry(3 * LUTW, 0, 15, ring[0], 1, 0));
      wic(ring[0], p++, grp_entry(4 * LUTW, 1, 20, ring[0], 3, 0));
      wic(ring[0], p++, grp_entry(5 * LUTW, 0, 25, ring[0], -1, 0));
      wic(ring[0], p++, grp_entry(6 * LUTW, 0, 30, ring[0], 2, 0));
      e = '0;
      for (int i = 0; i < LUT_IN; i++) e.sel[i] = SEL_W'(SRC_ZERO);
      e.base = MEM_AW'(7 * LUTW);
      if (ring == 0) begin
        for (int t = 0; t < 3; t++) begin
          e.sel[2*t] = SEL_W'(sel_l(47 + t)); e.sel[2*t+1] = SEL_W'(sel_h(47 + t));
        end
        e.out_en[4] = 1'b1; e.out_idx[4] = OIDX_W'(72);
        e.last = 1'b1;
        wic(0, p++, e);
      end else begin
        for (int t = 0; t < 2; t++) begin
          e.sel[2*t] = SEL_W'(sel_l(47 + t)); e.sel[2*t+1] = SEL_W'(sel_h(47 + t));
        end
        wic(1, p++, e);
        e = '0;
        for (int i = 0; i < LUT_IN; i++) e.sel[i] = SEL_W'(SRC_ZERO);
        e.base = MEM_AW'(8 * LUTW);
        for (int r = 0; r < 4; r++) e.sel[r] = SEL_W'(r);
        e.sel[4] = SEL_W'(sel_l(49)); e.sel[5] = SEL_W'(sel_h(49));
        e.out_en[5] = 1'b1; e.out_idx[5] = OIDX_W'(72);
        e.last = 1'b1;
        wic(1, p++, e);
      end
    end

    // ---- worked example vectors on x1, x2, x3 = variables 47..49 ----
    random_x(0);
    x[47] = T_ZERO; x[48] = T_ZERO; x[49] = T_U; eval_check("(0,0,u)");
    chk(y[72] == T_ZERO, "example (0,0,u) gives 0");
    x[47] = T_U; x[48] = T_ONE; x[49] = T_ONE; eval_check("(u,1,1)");
    chk(y[72] == T_ONE, "example (u,1,1) gives 1");
    x[47] = T_U; x[48] = T_ONE; x[49] = T_U; eval_check("(u,1,u)");
    chk(y[72] == T_U, "example (u,1,u) gives u");

    // ---- random vectors ----
    for (int n = 0; n < 300; n++) begin
      random_x((n % 3 == 0) ? 10 : (n % 3 == 1) ? 25 : 45);
      if (n % 37 == 5) x[$urandom_range(46, 35)] = T_BAD;   // a variable no program reads
      eval_check($sformatf("vector %0d", n), n % 4 == 1 && n < 296);
    end
    x = '0;

    // ---- fixed cascade pair: f = a & b, a = X1[0], b = X2[0] ----
    // cell 0 passes the rails of a on; other X1 variables are held at 0
    for (int a = 0; a < 4; a++) begin
      cp_we = 1; cp_wcell = 0; cp_waddr = 15'({4'b0, 4'b0, 3'b111, a[0]} | 15'(a[1] << 4));
      cp_wdata = LUT_OUT'(a);
      cp_wsel = 0; @(negedge clk);
      cp_wsel = 1; @(negedge clk);
    end
    // cell 1: rails {h_a, l_a}; L cascade sees l_b (others' L rails = 1),
    // H cascade sees h_b (others' H rails = 0)
    for (int r = 0; r < 4; r++) for (int b = 0; b < 2; b++) begin
      cp_we = 1; cp_wcell = 1;
      cp_wsel = 0; cp_waddr = 15'({4'(r), 10'h3ff, b[0]});
      cp_wdata = LUT_OUT'({r[0] | b[0], 4'b0});
      @(negedge clk);
      cp_wsel = 1; cp_waddr = 15'({4'(r), 10'h000, b[0]});
      cp_wdata = LUT_OUT'({r[1] & b[0], 4'b0});
      @(negedge clk);
    end
    cp_we = 0;
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) begin
      tern_t ta, tb, te;
      logic [1:0] ra, rb;
      int cyc;
      ta = (a == 0) ? T_ZERO : (a == 1) ? T_ONE : T_U;
      tb = (b == 0) ? T_ZERO : (b == 1) ? T_ONE : T_U;
      te = t_and(ta, tb);
      ra = ta; rb = tb;
      cp_x1_l = {3'b111, ra[1]};  cp_x1_h = {3'b000, ra[0]};
      cp_x2_l = {10'h3ff, rb[1]}; cp_x2_h = {10'h000, rb[0]};
      cp_in_valid = 1;
      @(negedge clk);
      cp_in_valid = 0;
      cyc = 1;
      while (!cp_out_valid && cyc < 10) begin @(negedge clk); cyc++; end
      chk(cyc == 2, "cascade pair latency");
      chk(cp_y[0] == te, $sformatf("cascade pair %s & %s = %s", ta.name(), tb.name(), cp_y[0].name()));
      n_cp++;
    end

    $display("coverage: u=%0d 0=%0d 1=%0d definite-with-unknown=%0d gate-sim-loose=%0d bad=%0d intermediate=%0d uneven-rings=%0d cascade-pair=%0d back-to-back=%0d",
             n_u, n_0, n_1, n_def_with_u, n_kleene_loose, n_bad, n_inter, n_uneven, n_cp, n_b2b);
    checks++;
    if (n_u == 0 || n_0 == 0 || n_1 == 0 || n_def_with_u == 0 || n_kleene_loose == 0 ||
        n_bad == 0 || n_inter == 0 || n_uneven == 0 || n_cp == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
