// tb_dr_cascade_pair: self-checking test of dr_cascade_pair.
// Test function, binate in the 4 variables X1 and unate in the 11 variables
// X2 (some of them negative, undone by x2_neg):
//   f = h1(X1) & M1(X2') | h2(X1) & M2(X2'),  X2' = X2 xor neg,
// with random h1, h2 and monotone M1, M2. The first cell of both cascades
// maps X1 to the set of reachable (h1,h2) pairs (4 rails); the second cell
// of the f_L cascade evaluates f at the smallest completion of X2' (from its
// L rails), that of the f_H cascade at the largest (from its H rails).
// The expected value of every output comes from enumerating all completions
// of the unknown inputs (the definition of the RT function), not from the
// cascade construction.
module tb_dr_cascade_pair;
  import rt_pkg::*;
  localparam int N1 = 4, N2 = 11, RAILS = 4, AW = 15, NO = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, we = 0, wsel = 0, wcell = 0;
  logic [N1-1:0] x1_l = '0, x1_h = '0;
  logic [N2-1:0] x2_l = '0, x2_h = '0, x2_neg;
  logic [AW-1:0] waddr = '0;
  logic [LUT_OUT-1:0] wdata = '0;
  logic out_valid;
  logic [NO-1:0] f_l, f_h;
  tern_t [NO-1:0] y;

  logic [15:0] h1, h2;
  tern_t expq [$];
  int cycle = 0, checks = 0, failures = 0;
  int n_u = 0, n_def_with_u = 0, n_0 = 0, n_1 = 0;

  dr_cascade_pair dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit m1(input logic [N2-1:0] v);
    return v[0] | (v[1] & v[2]) | (v[3] & v[4] & v[5]);
  endfunction
  function automatic bit m2(input logic [N2-1:0] v);
    return (v[6] & v[7]) | (v[8] & v[9] & v[10]);
  endfunction
  function automatic bit f(input logic [N1-1:0] a, input logic [N2-1:0] b);
    logic [N2-1:0] bp;
    bp = b ^ x2_neg;
    return (h1[a] & m1(bp)) | (h2[a] & m2(bp));
  endfunction

  // RT value by enumerating every completion of the unknowns
  function automatic tern_t rt_ref(input logic [N1-1:0] al, input logic [N1-1:0] ah,
                                   input logic [N2-1:0] bl, input logic [N2-1:0] bh);
    logic [N1+N2-1:0] umask, base;
    int upos [$];
    bit seen0, seen1;
    umask = {bl & bh, al & ah};
    base  = {bh & ~bl, ah & ~al};
    for (int i = 0; i < N1 + N2; i++) if (umask[i]) upos.push_back(i);
    seen0 = 0; seen1 = 0;
    for (int c = 0; c < (1 << upos.size()); c++) begin
      logic [N1+N2-1:0] v;
      v = base;
      for (int k = 0; k < upos.size(); k++) v[upos[k]] = c[k];
      if (f(v[N1-1:0], v[N1+N2-1:N1])) seen1 = 1; else seen0 = 1;
      if (seen0 && seen1) break;
    end
    return seen0 && seen1 ? T_U : (seen1 ? T_ONE : T_ZERO);
  endfunction

  task automatic wr(input bit sel, input bit cl, input int a, input logic [LUT_OUT-1:0] d);
    we = 1; wsel = sel; wcell = cl; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      tern_t e;
      e = expq.pop_front();
      checks++;
      if (y[0] !== e || {f_l[0], f_h[0]} !== 2'(e)) begin
        failures++;
        $display("FAIL y %s expected %s", y[0].name(), e.name());
      end
    end
  end

  initial begin
    h1 = 16'($urandom); h2 = 16'($urandom);
    x2_neg = 11'b001_0010_0101;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // cell 0 of both cascades: X1 rails -> set of reachable (h1,h2)
    for (int a = 0; a < 256; a++) begin
      logic [N1-1:0] al, ah;
      logic [3:0] s;
      {ah, al} = 8'(a);
      s = '0;
      for (int v = 0; v < 16; v++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < N1; i++) ok &= v[i] ? ah[i] : al[i];
        if (ok) s[{h1[v], h2[v]}] = 1'b1;
      end
      wr(0, 0, a, {12'b0, s});
      wr(1, 0, a, {12'b0, s});
    end
    // cell 1: f_L at the smallest, f_H at the largest completion of X2'
    for (int a = 0; a < 2**AW; a++) begin
      logic [3:0] s;
      logic [N2-1:0] p, vmin, vmax;
      bit fl, fh;
      {s, p} = AW'(a);
      vmin = ~p;   // L rail 1 means the variable may be 0
      vmax = p;    // H rail 1 means the variable may be 1
      fl = 0; fh = 0;
      for (int v = 0; v < 4; v++) if (s[v]) begin
        fl |= !((v[1] & m1(vmin)) | (v[0] & m2(vmin)));
        fh |=  ((v[1] & m1(vmax)) | (v[0] & m2(vmax)));
      end
      wr(0, 1, a, {11'b0, fl, 4'b0});
      wr(1, 1, a, {11'b0, fh, 4'b0});
    end
    // stream random ternary vectors
    for (int n = 0; n < 3000; n++) begin
      in_valid = ($urandom_range(4) != 0);
      for (int i = 0; i < N1; i++)
        case ($urandom_range(3)) 0: {x1_l[i], x1_h[i]} = 2'b11; 1: {x1_l[i], x1_h[i]} = 2'b10;
          default: {x1_l[i], x1_h[i]} = 2'b01; endcase
      for (int i = 0; i < N2; i++)
        case ($urandom_range(3)) 0: {x2_l[i], x2_h[i]} = 2'b11; 1: {x2_l[i], x2_h[i]} = 2'b10;
          default: {x2_l[i], x2_h[i]} = 2'b01; endcase
      if (in_valid) begin
        tern_t e;
        e = rt_ref(x1_l, x1_h, x2_l, x2_h);
        expq.push_back(e);
        if (e == T_U) n_u++;
        else if (|(x1_l & x1_h) || |(x2_l & x2_h)) n_def_with_u++;
        if (e == T_ZERO) n_0++;
        if (e == T_ONE) n_1++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_u == 0 || n_def_with_u == 0 || n_0 == 0 || n_1 == 0) begin
      failures++;
      $display("FAIL coverage u=%0d def_with_u=%0d 0=%0d 1=%0d left=%0d", n_u, n_def_with_u, n_0, n_1, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
