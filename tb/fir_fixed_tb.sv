// Default 7-tap half-band filter with 2:1 decimation: random input with
// gaps, every output compared with a direct convolution taken at every second
// input, rounded and saturated as specified.
`include "tb_macros.svh"
module fir_fixed_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  fir_fixed dut (.*);
  `WATCHDOG(10000)
  int h [7] = '{-1, 0, 9, 16, 9, 0, -1};
  int xi [$], xq [$];
  int nout = 0;
  function automatic int conv(ref int x [$], input int n);
    longint s = 0;
    for (int t = 0; t < 7; t++) if (n - t >= 0) s += h[t] * x[n - t];
    s = (s + 16) >>> 5;
    return (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
  endfunction
  always @(posedge clk) if (!rst && valid_o) begin
    int n;
    n = 2 * nout + 1;
    `CHECK(y_o.i == 16'(conv(xi, n)) && y_o.q == 16'(conv(xq, n)), $sformatf("out %0d: %0d exp %0d", nout, y_o.i, conv(xi, n)))
    nout++;
  end
  initial begin
    x_i = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      int a, b;
      a = int'($urandom_range(0, 65535)) - 32768; b = int'($urandom_range(0, 65535)) - 32768;
      x_i <= '{i: 16'(a), q: 16'(b)}; valid_i <= 1; xi.push_back(a); xq.push_back(b);
      @(posedge clk);
      if (n % 5 == 4) begin valid_i <= 0; @(posedge clk); end
    end
    valid_i <= 0; repeat (3) @(posedge clk);
    `CHECK(nout == 200, $sformatf("%0d outputs", nout))
    `TB_DONE
  end
endmodule
