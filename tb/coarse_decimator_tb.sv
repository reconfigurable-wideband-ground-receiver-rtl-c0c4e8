// Runs the coarse decimator at 1:1, 2:1 and 4:1 on random input and checks
// every output against a model of two cascaded half-band decimators, and
// the number of outputs (N, N/2, N/4).
`include "tb_macros.svh"
module coarse_decimator_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [1:0] dec_sel;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  coarse_decimator dut (.*);
  `WATCHDOG(20000)
  int h [7] = '{-1, 0, 9, 16, 9, 0, -1};
  int xin [$], s1 [$], s2 [$], expq [$];
  int xneg [$], n1 [$], n2 [$], expn [$];
  function automatic void hb(ref int x [$], ref int y [$]);
    y.delete();
    for (int n = 1; n < x.size(); n += 2) begin
      longint s;
      s = 0;
      for (int t = 0; t < 7; t++) if (n - t >= 0) s += h[t] * x[n - t];
      s = (s + 16) >>> 5;
      y.push_back((s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s));
    end
  endfunction
  int nout;
  always @(posedge clk) if (!rst && valid_o) begin
    int e, en;
    e = (expq.size() > 0) ? expq.pop_front() : 99999;
    en = (expn.size() > 0) ? expn.pop_front() : 99999;
    `CHECK(y_o.i == 16'(e) && y_o.q == 16'(en), $sformatf("sel %0d out %0d: %0d exp %0d", dec_sel, nout, y_o.i, e))
    nout++;
  end
  initial begin
    x_i = '0; dec_sel = 0;
    for (int sel = 0; sel < 3; sel++) begin
      rst <= 1; repeat (2) @(posedge clk);
      dec_sel <= 2'(sel); xin.delete(); nout = 0;
      for (int n = 0; n < 256; n++) xin.push_back(int'($urandom_range(0, 30000)) - 15000);
      xneg.delete();
      foreach (xin[n]) xneg.push_back(-xin[n]);
      hb(xin, s1); hb(s1, s2); hb(xneg, n1); hb(n1, n2);
      expq = (sel == 0) ? xin : (sel == 1) ? s1 : s2;
      expn = (sel == 0) ? xneg : (sel == 1) ? n1 : n2;
      rst <= 0; @(posedge clk);
      for (int n = 0; n < 256; n++) begin
        x_i <= '{i: 16'(xin[n]), q: 16'(-xin[n])}; valid_i <= 1; @(posedge clk);
      end
      valid_i <= 0; repeat (5) @(posedge clk);
      `CHECK(nout == (256 >> sel), $sformatf("sel %0d: %0d outputs", sel, nout))
    end
    `TB_DONE
  end
endmodule
