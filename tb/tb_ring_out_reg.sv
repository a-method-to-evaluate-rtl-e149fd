// tb_ring_out_reg: self-checking test of ring_out_reg.
// Random scatter writes against a model that applies the enabled bits in
// ascending order; also checks clear, hold while wr is low and reset.
module tb_ring_out_reg;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0;
  logic [LUT_OUT-1:0] data = '0, en = '0;
  logic [LUT_OUT-1:0][OIDX_W-1:0] idx = '0;
  logic [N_OUTS-1:0] q, model;
  int checks = 0, failures = 0;

  ring_out_reg dut (.*);

  always #5 clk = ~clk;

  task automatic chk();
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL q %h expected %h", q, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk();
    for (int n = 0; n < 1000; n++) begin
      int op;
      op = $urandom_range(9);
      data = LUT_OUT'($urandom);
      en   = LUT_OUT'($urandom);
      for (int j = 0; j < LUT_OUT; j++) idx[j] = OIDX_W'($urandom_range((1 << OIDX_W) - 1));
      clear = (op == 0);
      wr    = (op > 2);
      if (clear) model = '0;
      else if (wr)
        for (int j = 0; j < LUT_OUT; j++)
          if (en[j] && idx[j] < N_OUTS) model[idx[j]] = data[j];
      @(negedge clk);
      chk();
    end
    clear = 0; wr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
