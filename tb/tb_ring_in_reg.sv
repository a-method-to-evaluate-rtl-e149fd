// tb_ring_in_reg: self-checking test of ring_in_reg.
// Loads random double-rail vectors, some with an unused (0,0) pair, checks
// the captured vector and the bad flag, and that both hold while load is low.
module tb_ring_in_reg;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [N_VARS-1:0] x_l = '0, x_h = '0;
  logic [N_DR-1:0] x_dr;
  logic bad;
  int checks = 0, failures = 0, n_bad = 0;

  ring_in_reg dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [N_DR-1:0] ex, input logic eb);
    checks++;
    if (x_dr !== ex || bad !== eb) begin
      failures++;
      $display("FAIL x_dr %h/%h bad %b/%b", x_dr, ex, bad, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk('0, 1'b0);
    for (int n = 0; n < 300; n++) begin
      logic [N_DR-1:0] ex;
      logic eb;
      // every pair valid: 0, 1 or u
      for (int i = 0; i < N_VARS; i++) begin
        case ($urandom_range(2))
          0: {x_l[i], x_h[i]} = 2'b10;
          1: {x_l[i], x_h[i]} = 2'b01;
          default: {x_l[i], x_h[i]} = 2'b11;
        endcase
      end
      eb = 1'b0;
      if ($urandom_range(3) == 0) begin
        int k;
        k = $urandom_range(N_VARS - 1);
        {x_l[k], x_h[k]} = 2'b00;
        eb = 1'b1;
        n_bad++;
      end
      ex = {x_h, x_l};
      load = 1;
      @(negedge clk);
      load = 0;
      chk(ex, eb);
      x_l = ~x_l; x_h = '0;
      @(negedge clk);
      chk(ex, eb);
    end
    if (n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
