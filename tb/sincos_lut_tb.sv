// Checks the cosine/sine table against real-valued cos/sin for every phase
// (within one LSB of rounding) and its one-clock latency.
`include "tb_macros.svh"
module sincos_lut_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] phase;
  logic signed [15:0] c, s;
  sincos_lut dut (.clk, .phase, .cos_o(c), .sin_o(s));
  `WATCHDOG(5000)
  initial begin
    real a, ec, es;
    for (int p = 0; p < 1024; p++) begin
      phase <= 10'(p);
      @(posedge clk); #1;
      a = 2.0 * 3.14159265358979 * p / 1024.0;
      ec = 32767.0 * $cos(a); es = 32767.0 * $sin(a);
      `CHECK(($itor(c) - ec) < 1.0 && (ec - $itor(c)) < 1.0, $sformatf("cos[%0d]=%0d exp %f", p, c, ec))
      `CHECK(($itor(s) - es) < 1.0 && (es - $itor(s)) < 1.0, $sformatf("sin[%0d]=%0d exp %f", p, s, es))
    end
    `TB_DONE
  end
endmodule
