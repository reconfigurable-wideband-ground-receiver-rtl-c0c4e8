// Random half symbols in QPSK and OQPSK mode; each error is compared with the
// polarity-type Costas formula evaluated on the stored stream, and there must
// be one error per four half symbols.
`include "tb_macros.svh"
module costas_detector_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode;
  logic valid_i = 0, err_valid;
  cplx_t x_i;
  logic signed [23:0] err;
  costas_detector dut (.*);
  `WATCHDOG(20000)
  int I [$], Q [$];
  int ng;
  function automatic int sg(int v); return v < 0 ? -1 : 1; endfunction
  always @(posedge clk) if (!rst && err_valid) begin
    int n, e;
    n = 4 * ng;
    if (mode == MOD_QPSK)
      e = Q[n+1]*sg(I[n+1]) - I[n+1]*sg(Q[n+1]) + Q[n+3]*sg(I[n+3]) - I[n+3]*sg(Q[n+3]);
    else
      e = Q[n]*sg(I[n]) - I[n+1]*sg(Q[n+1]) + Q[n+2]*sg(I[n+2]) - I[n+3]*sg(Q[n+3]);
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
        if (n % 37 == 0) a = 0;
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
