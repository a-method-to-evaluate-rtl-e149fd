// tb_ring_ctrl: self-checking test of ring_ctrl.
// Feeds a `last` flag at a chosen step, and checks: load only on an idle
// start, the step sequence 0,1,2,..., run for exactly S cycles, wr_out in the
// S cycles after each read, done S+1 clocks after the start edge, starts
// ignored while busy, and the wrap at the end of the program memory.
module tb_ring_ctrl;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, last;
  logic [PROG_AW-1:0] step;
  logic load, run, wr_out, busy, done;
  int checks = 0, failures = 0;
  int last_step;

  ring_ctrl dut (.*);

  assign last = (int'(step) == last_step);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one evaluation of S = last_step+1 steps
  task automatic run_prog(input int s_last, input int expect_steps);
    int cyc, n_run, n_wr;
    last_step = s_last;
    @(negedge clk);
    chk(!busy, "idle before start");
    start = 1;
    #1 chk(load, "load on idle start");
    @(negedge clk);
    start = 0;
    cyc = 0; n_run = 0; n_wr = 0;  // cyc = clock edges since the start edge
    while (!done && cyc < 400) begin
      if (run) begin
        chk(int'(step) == n_run % (2**PROG_AW), "step sequence");
        n_run++;
      end
      if (wr_out) n_wr++;
      chk(!load, "no load while busy");
      // a start while busy is ignored
      start = ($urandom_range(3) == 0);
      #1 chk(!load, "start ignored while busy");
      @(negedge clk);
      start = 0;
      cyc++;
    end
    chk(n_run == expect_steps, "run cycles");
    chk(n_wr == expect_steps, "one output write per step");
    chk(cyc == expect_steps + 1, $sformatf("latency S+1 (%0d steps, %0d cycles, %0d runs)", expect_steps, cyc, n_run));
    chk(wr_out == 1'b0 && busy == 1'b0, "idle when done");
    @(negedge clk);
    chk(!done, "done is one pulse");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last_step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_prog(0, 1);
    run_prog(2, 3);
    for (int n = 0; n < 10; n++) begin
      int s;
      s = $urandom_range(40);
      run_prog(s, s + 1);
    end
    // no step marked last: stops at the end of program memory
    run_prog(-1, 2**PROG_AW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
