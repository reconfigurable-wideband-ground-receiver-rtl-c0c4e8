// Random samples and gains: output = round(x*gain/4096), saturated.
`include "tb_macros.svh"
module gain_scaler_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] gain;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  gain_scaler dut (.*);
  `WATCHDOG(5000)
  function automatic int ref_s(int x, int g);
    longint p;
    p = (longint'(x) * g + 2048) >>> 12;
    return (p > 32767) ? 32767 : (p < -32768) ? -32768 : int'(p);
  endfunction
  initial begin
    x_i = '0; gain = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 300; n++) begin
      int a, b, g;
      a = int'($urandom_range(0, 65535)) - 32768; b = int'($urandom_range(0, 65535)) - 32768;
      g = (n < 100) ? 4096 : int'($urandom_range(0, 20000));
      x_i <= '{i: 16'(a), q: 16'(b)}; gain <= 16'(g); valid_i <= 1;
      @(posedge clk); #1;
      `CHECK(valid_o && y_o.i == 16'(ref_s(a, g)) && y_o.q == 16'(ref_s(b, g)),
             $sformatf("x=%0d g=%0d got %0d exp %0d", a, g, y_o.i, ref_s(a, g)))
    end
    `TB_DONE
  end
endmodule
