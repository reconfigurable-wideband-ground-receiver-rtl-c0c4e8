// Integrate-and-dump with len = 1, 5 and 64: each output equals the rounded,
// shifted sum of the last len inputs, and there is one output per len inputs.
`include "tb_macros.svh"
module integrate_dump_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] len;
  logic [4:0] shift;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  integrate_dump dut (.*);
  `WATCHDOG(20000)
  longint si = 0, sq = 0;
  int cnt = 0, nout = 0;
  longint ei [$], eq [$];
  function automatic longint rs(longint v, int sh);
    v = (sh == 0) ? v : (v + (longint'(1) <<< (sh - 1))) >>> sh;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  always @(posedge clk) if (!rst && valid_o) begin
    longint a, b;
    a = ei.pop_front(); b = eq.pop_front();
    `CHECK(y_o.i == 16'(a) && y_o.q == 16'(b), $sformatf("len %0d: got %0d exp %0d", len, y_o.i, a))
    nout++;
  end
  initial begin
    int lens [3] = '{1, 5, 64};
    int shs [3] = '{0, 2, 6};
    x_i = '0;
    foreach (lens[k]) begin
      rst <= 1; len <= 16'(lens[k]); shift <= 5'(shs[k]); si = 0; sq = 0; cnt = 0; nout = 0;
      repeat (2) @(posedge clk); rst <= 0;
      for (int n = 0; n < 640; n++) begin
        int a, b;
        a = int'($urandom_range(0, 60000)) - 30000; b = int'($urandom_range(0, 2000)) - 1000;
        si += a; sq += b; cnt++;
        if (cnt == lens[k]) begin ei.push_back(rs(si, shs[k])); eq.push_back(rs(sq, shs[k])); si = 0; sq = 0; cnt = 0; end
        x_i <= '{i: 16'(a), q: 16'(b)}; valid_i <= 1; @(posedge clk);
        if (n % 3 == 0) begin valid_i <= 0; @(posedge clk); end
      end
      valid_i <= 0; repeat (3) @(posedge clk);
      `CHECK(nout == 640 / lens[k], $sformatf("len %0d: %0d outputs", lens[k], nout))
    end
    `TB_DONE
  end
endmodule
