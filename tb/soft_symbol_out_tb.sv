// Half symbols in, soft symbols out: QPSK pairs I and Q of each odd half
// symbol; OQPSK pairs the I of the even half symbol with the Q of the
// following odd one. One soft symbol per two half symbols.
`include "tb_macros.svh"
module soft_symbol_out_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  soft_symbol_out dut (.*);
  `WATCHDOG(10000)
  int I [$], Q [$];
  int ns;
  always @(posedge clk) if (!rst && valid_o) begin
    int ei, eq;
    ei = (mode == MOD_QPSK) ? I[2*ns+1] : I[2*ns];
    eq = Q[2*ns+1];
    `CHECK(y_o.i == 16'(ei) && y_o.q == 16'(eq), $sformatf("symbol %0d: %0d,%0d exp %0d,%0d", ns, y_o.i, y_o.q, ei, eq))
    ns++;
  end
  initial begin
    x_i = '0;
    for (int md = 0; md < 2; md++) begin
      rst <= 1; mode <= mod_t'(md); I.delete(); Q.delete(); ns = 0;
      repeat (2) @(posedge clk); rst <= 0;
      for (int n = 0; n < 400; n++) begin
        int a, b;
        a = int'($urandom_range(0, 65535)) - 32768; b = int'($urandom_range(0, 65535)) - 32768;
        I.push_back(a); Q.push_back(b);
        x_i <= '{i: 16'(a), q: 16'(b)}; valid_i <= 1; @(posedge clk);
        if (n % 3 == 0) begin valid_i <= 0; @(posedge clk); end
      end
      valid_i <= 0; repeat (3) @(posedge clk);
      `CHECK(ns == 200, $sformatf("%0d symbols", ns))
    end
    `TB_DONE
  end
endmodule
