// Random half symbols in QPSK and OQPSK mode; each error is compared with the
// Gardner formula evaluated on the stored stream, and there must
// be one error per four half symbols.
`include "tb_macros.svh"
module gardner_detector_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode;
  logic valid_i = 0, err_valid;
  cplx_t x_i;
  logic signed [23:0] err;
  gardner_detector dut (.*);
  `WATCHDOG(20000)
  int I [$], Q [$];
  int ng;
  // (x[a] - x[b]) * x[c], samples before the stream start are zero
  function automatic longint G(ref int x [$], input int a, input int b, input int c);
    longint va, vb, vc;
    va = (a >= 0) ? x[a] : 0; vb = (b >= 0) ? x[b] : 0; vc = (c >= 0) ? x[c] : 0;
    return (va - vb) * vc;
  endfunction
  always @(posedge clk) if (!rst && err_valid) begin
    int n; longint e;
    n = 4 * ng;
    if (mode == MOD_QPSK)
      e = G(I,n+1,n-1,n) + G(Q,n+1,n-1,n) + G(I,n+3,n+1,n+2) + G(Q,n+3,n+1,n+2);
    else
      e = G(I,n,n-2,n-1) + G(Q,n+1,n-1,n) + G(I,n+2,n,n+1) + G(Q,n+3,n+1,n+2);
    e = e >>> 16;
    `CHECK(err == 24'(e), $sformatf("group %0d: %0d exp %0d", ng, err, e))
    ng++;
  end
  initial begin
    x_i = '0;
    for (int md = 0; md < 2; md++) begin
      rst <= 1; mode <= mod_t'(md); I.delete(); Q.delete(); ng = 0;
      repeat (2) @(posedge clk); rst <= 0;
      for (int n = 0; n < 800; n++) begin
        int a, b;
        a = int'($urandom_range(0, 65535)) - 32768; b = int'($urandom_range(0, 65535)) - 32768;
                I.push_back(a); Q.push_back(b);
        x_i <= '{i: 16'(a), q: 16'(b)}; valid_i <= 1; @(posedge clk);
        if (n % 3 == 0) begin valid_i <= 0; @(posedge clk); end
      end
      valid_i <= 0; repeat (3) @(posedge clk);
      `CHECK(ng == 200, $sformatf("%0d errors", ng))
    end
    `TB_DONE
  end
endmodule
