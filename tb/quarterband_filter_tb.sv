// Quarter-band filter: random input compared with a direct 11-tap
// convolution; then bypass, where the output must equal the input one clock
// later. Also checks the DC gain with a constant input.
`include "tb_macros.svh"
module quarterband_filter_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic bypass = 0, valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  quarterband_filter dut (.*);
  `WATCHDOG(10000)
  int h [11] = '{3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3};
  int xi [$];
  int nout = 0;
  always @(posedge clk) if (!rst && valid_o && !bypass) begin
    longint s;
    s = 0;
    for (int t = 0; t < 11; t++) if (nout - t >= 0) s += h[t] * xi[nout - t];
    s = (s + 256) >>> 9;
    `CHECK(y_o.i == 16'(s), $sformatf("out %0d: %0d exp %0d", nout, y_o.i, s))
    nout++;
  end
  initial begin
    x_i = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = (n < 250) ? int'($urandom_range(0, 40000)) - 20000 : 12345;
      xi.push_back(a); x_i <= '{i: 16'(a), q: 16'sd0}; valid_i <= 1; @(posedge clk);
    end
    valid_i <= 0; repeat (2) @(posedge clk);
    `CHECK(y_o.i == 16'sd12345, "unity DC gain")
    bypass <= 1; @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      int a;
      a = int'($urandom_range(0, 40000)) - 20000;
      x_i <= '{i: 16'(a), q: 16'(a/2)}; valid_i <= 1; @(posedge clk); #1;
      `CHECK(valid_o && y_o.i == 16'(a) && y_o.q == 16'(a/2), "bypass")
    end
    `TB_DONE
  end
endmodule
