// Fine interpolator with D_F = 1.37 and D_F = 1.0 on random input: output n
// must equal x[q] + r*(x[q+1]-x[q]) for q + r = n*df/2^16 (fraction r rounded
// as specified), and N inputs must give about N/D_F outputs.
`include "tb_macros.svh"
module fine_interpolator_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [16:0] df;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  fine_interpolator dut (.*);
  `WATCHDOG(20000)
  int xi [$];
  int nout;
  always @(posedge clk) if (!rst && valid_o) begin
    longint pos, q, r, e;
    pos = longint'(nout) * df; q = pos >>> 16; r = pos & 16'hFFFF;
    e = xi[q] + ((longint'(xi[q+1] - xi[q]) * r + 32768) >>> 16);
    `CHECK(y_o.i == 16'(e) && y_o.q == 16'(-e), $sformatf("df %0d out %0d: %0d exp %0d", df, nout, y_o.i, e))
    nout++;
  end
  initial begin
    int dfs [2] = '{89784, 65536};   // 1.37 and 1.0
    x_i = '0;
    foreach (dfs[d]) begin
      rst <= 1; df <= 17'(dfs[d]); xi.delete(); nout = 0;
      repeat (2) @(posedge clk); rst <= 0;
      for (int n = 0; n < 1000; n++) begin
        int a;
        a = int'($urandom_range(0, 30000)) - 15000;
        xi.push_back(a); x_i <= '{i: 16'(a), q: 16'(-a)}; valid_i <= 1; @(posedge clk);
        if (n % 7 == 3) begin valid_i <= 0; @(posedge clk); end
      end
      valid_i <= 0; repeat (3) @(posedge clk);
      // outputs at positions n*D_F < 999 (x[q+1] must exist)
      `CHECK(nout == int'(((longint'(999) << 16) - 1) / dfs[d]) + 1, $sformatf("df %0d: %0d outputs", dfs[d], nout))
    end
    `TB_DONE
  end
endmodule
