// Loads nine random distinct taps, expands them to the 17-tap symmetric
// impulse response, and compares every output with a direct 17-tap
// convolution of random input; also checks the two-clock latency.
`include "tb_macros.svh"
module matched_filter_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic coef_we = 0;
  logic [3:0] coef_addr;
  logic signed [17:0] coef_data;
  logic [4:0] shift = 5'd14;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  matched_filter dut (.*);
  `WATCHDOG(10000)
  int c [9], h [17];
  int xi [$], xq [$];
  int nout = 0, cyc = 0, in_cyc [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && valid_i) in_cyc.push_back(cyc);
  function automatic int conv(ref int x [$], input int n);
    longint s;
    s = 0;
    for (int t = 0; t < 17; t++) if (n - t >= 0) s += longint'(h[t]) * x[n - t];
    s = (s + (longint'(1) << 13)) >>> 14;
    return (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
  endfunction
  always @(posedge clk) if (!rst && valid_o) begin
    int ci;
    ci = in_cyc.pop_front();
    `CHECK(y_o.i == 16'(conv(xi, nout)) && y_o.q == 16'(conv(xq, nout)),
           $sformatf("out %0d: %0d,%0d exp %0d,%0d", nout, y_o.i, y_o.q, conv(xi, nout), conv(xq, nout)))
    `CHECK(cyc - ci == 2, $sformatf("latency %0d", cyc - ci))
    nout++;
  end
  initial begin
    x_i = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int m = 0; m < 9; m++) begin
      c[m] = int'($urandom_range(0, 40000)) - 20000;
      coef_we <= 1; coef_addr <= 4'(m); coef_data <= 18'(c[m]); @(posedge clk);
    end
    coef_we <= 0;
    for (int t = 0; t < 17; t++) h[t] = c[(t <= 8) ? t : 16 - t];
    for (int n = 0; n < 400; n++) begin
      int a, b;
      a = int'($urandom_range(0, 20000)) - 10000; b = int'($urandom_range(0, 20000)) - 10000;
      xi.push_back(a); xq.push_back(b);
      x_i <= '{i: 16'(a), q: 16'(b)}; valid_i <= 1; @(posedge clk);
      if (n % 4 == 1) begin valid_i <= 0; @(posedge clk); end
    end
    valid_i <= 0; repeat (4) @(posedge clk);
    `CHECK(nout == 400, $sformatf("%0d outputs", nout))
    `TB_DONE
  end
endmodule
