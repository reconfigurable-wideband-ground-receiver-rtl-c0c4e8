// Drives random samples and phases into the rotator, one per clock, and
// compares each output two clocks later with x*exp(-j*2*pi*phase/1024)
// computed in real arithmetic (tolerance 3 LSB).
`include "tb_macros.svh"
module cplx_rotator_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic valid_i = 0, valid_o;
  cplx_t x_i, y_o;
  logic [9:0] phase_i;
  cplx_rotator dut (.*);
  `WATCHDOG(5000)
  real ei [$], eq [$];
  always @(posedge clk) if (!rst && valid_o) begin
    real a, b;
    a = ei.pop_front(); b = eq.pop_front();
    `CHECK($itor(y_o.i) - a < 3.0 && a - $itor(y_o.i) < 3.0 && $itor(y_o.q) - b < 3.0 && b - $itor(y_o.q) < 3.0,
           $sformatf("got %0d,%0d exp %f,%f", y_o.i, y_o.q, a, b))
  end
  initial begin
    x_i = '0; phase_i = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 500; n++) begin
      int xi, xq, p; real ph;
      xi = int'($urandom_range(0, 40000)) - 20000; xq = int'($urandom_range(0, 40000)) - 20000;
      p = int'($urandom_range(0, 1023));
      ph = 2.0 * 3.14159265358979 * p / 1024.0;
      ei.push_back(xi * $cos(ph) + xq * $sin(ph));
      eq.push_back(xq * $cos(ph) - xi * $sin(ph));
      x_i <= '{i: 16'(xi), q: 16'(xq)}; phase_i <= 10'(p); valid_i <= 1;
      @(posedge clk);
    end
    valid_i <= 0;
    repeat (4) @(posedge clk);
    `CHECK(ei.size() == 0, "missing outputs")
    `TB_DONE
  end
endmodule
