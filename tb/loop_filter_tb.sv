// Random error samples with alpha = -10^4, beta = 0 (the defaults) and then
// with random alpha and beta: the output must follow
// out[n] = alpha*sum(e) + beta*sum(sum(e)), wrapping at 48 bits.
`include "tb_macros.svh"
module loop_filter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic signed [31:0] alpha, beta;
  logic err_valid = 0;
  logic signed [23:0] err;
  logic signed [47:0] out;
  loop_filter dut (.*);
  `WATCHDOG(20000)
  initial begin
    longint s1, s2, e, ref_o;
    err = '0;
    for (int run = 0; run < 2; run++) begin
      rst <= 1;
      alpha <= (run == 0) ? -32'sd10000 : 32'(int'($urandom_range(0, 2000)) - 1000);
      beta  <= (run == 0) ? 32'sd0 : 32'(int'($urandom_range(0, 200)) - 100);
      s1 = 0; s2 = 0;
      repeat (2) @(posedge clk); rst <= 0;
      for (int n = 0; n < 500; n++) begin
        e = longint'($urandom_range(0, 200000)) - 100000;
        err <= 24'(e); err_valid <= 1; @(posedge clk);
        err_valid <= 0; @(posedge clk); #1;
        s1 += e; s2 += s1;
        ref_o = longint'(alpha) * s1 + longint'(beta) * s2;
        `CHECK(out == 48'(ref_o), $sformatf("run %0d n %0d: %0d exp %0d", run, n, out, 48'(ref_o)))
      end
    end
    `TB_DONE
  end
endmodule
