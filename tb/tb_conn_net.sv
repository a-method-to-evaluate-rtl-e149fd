// tb_conn_net: self-checking test of conn_net.
// Random entries, input rails and previous-LUT words; the expected address
// is formed bit by bit from the source numbering (rail, x_L, x_H, zero).
module tb_conn_net;
  import rt_pkg::*;
  ic_entry_t          entry;
  logic [N_DR-1:0]    x_dr;
  logic [LUT_OUT-1:0] rails;
  logic [MEM_AW-1:0]  addr;
  int checks = 0, failures = 0;
  int n_rail = 0, n_xl = 0, n_xh = 0, n_zero = 0;

  conn_net dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [N_VARS-1:0] xl, xh;
      logic [LUT_IN-1:0] loc;
      logic [MEM_AW-1:0] exp;
      entry = '0;
      for (int b = 0; b < N_VARS; b++) begin xl[b] = 1'($urandom); xh[b] = 1'($urandom); end
      x_dr  = {xh, xl};
      rails = LUT_OUT'($urandom);
      entry.base = MEM_AW'($urandom);
      for (int i = 0; i < LUT_IN; i++) begin
        int s;
        s = $urandom_range((1 << SEL_W) - 1);
        entry.sel[i] = SEL_W'(s);
        if (s < LUT_OUT) begin loc[i] = rails[s]; n_rail++; end
        else if (s < LUT_OUT + N_VARS) begin loc[i] = xl[s - LUT_OUT]; n_xl++; end
        else if (s < LUT_OUT + 2 * N_VARS) begin loc[i] = xh[s - LUT_OUT - N_VARS]; n_xh++; end
        else begin loc[i] = 1'b0; n_zero++; end
      end
      exp = MEM_AW'(entry.base + MEM_AW'(loc));
      #1;
      checks++;
      if (addr !== exp) begin
        failures++;
        $display("FAIL addr %h expected %h", addr, exp);
      end
    end
    if (n_rail == 0 || n_xl == 0 || n_xh == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
