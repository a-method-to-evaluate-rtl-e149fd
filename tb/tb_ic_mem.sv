// tb_ic_mem: self-checking test of ic_mem.
// Writes random interconnection entries to every address, then reads them
// back in random order through the asynchronous read port.
module tb_ic_mem;
  import rt_pkg::*;
  logic clk = 0, we = 0;
  logic [PROG_AW-1:0] waddr = '0, raddr = '0;
  ic_entry_t wdata, rdata;
  ic_entry_t shadow [2**PROG_AW];
  int checks = 0, failures = 0;

  ic_mem dut (.*);

  always #5 clk = ~clk;

  function automatic ic_entry_t rand_entry();
    logic [IC_BITS-1:0] v;
    for (int i = 0; i < IC_BITS; i += 32) v[i +: 32] = $urandom;
    return ic_entry_t'(v);
  endfunction
  localparam int IC_BITS = ((($bits(ic_entry_t) + 31) / 32) * 32);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    for (int a = 0; a < 2**PROG_AW; a++) begin
      @(negedge clk);
      we = 1; waddr = PROG_AW'(a); wdata = rand_entry(); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      int a;
      a = $urandom_range(2**PROG_AW - 1);
      raddr = PROG_AW'(a);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL entry %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
