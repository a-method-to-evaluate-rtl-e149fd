// tb_lut_mem: self-checking test of lut_mem.
// Writes random words into a small instance, reads them back against a
// shadow array, and checks that rdata holds while re is low and that a read
// colliding with a write to the same word returns the old word.
module tb_lut_mem;
  localparam int AW = 8;
  localparam int DW = 16;
  logic clk = 0;
  logic re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  lut_mem #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // random reads
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(2**AW - 1);
      @(negedge clk); re = 1; raddr = AW'(a);
      @(negedge clk); re = 0;
      check(rdata, shadow[a], "read");
      raddr = AW'($urandom);
      @(negedge clk);
      check(rdata, shadow[a], "hold while re low");
    end
    // read and write of the same word in one cycle: old data
    for (int n = 0; n < 20; n++) begin
      int a;
      a = $urandom_range(2**AW - 1);
      @(negedge clk);
      re = 1; raddr = AW'(a); we = 1; waddr = AW'(a); wdata = ~shadow[a];
      @(negedge clk);
      re = 0; we = 0;
      check(rdata, shadow[a], "read during write");
      shadow[a] = ~shadow[a];
      re = 1;
      @(negedge clk); re = 0;
      check(rdata, shadow[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
