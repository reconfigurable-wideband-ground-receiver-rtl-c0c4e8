// Feeds a ramp x[m] = 16*m (so the value at quarter-sample position p is
// exactly 4*p) and reads each output's sampling position back from its
// value. Checks: outputs half a symbol (8 quarter samples) apart when tau is
// steady; a change of tau seen at one output moves the next output by at
// most 3 quarter samples, and later ones until the whole change is applied; one output per two inputs on average.
`include "tb_macros.svh"
module signal_resampler_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] tau = 0, k0 = 0;
  logic valid_i = 0, valid_o, adjust;
  cplx_t x_i, y_o;
  signal_resampler dut (.*);
  `WATCHDOG(20000)
  logic [7:0] tk_d = 0;   // tau + k0 as the resampler saw it one clock earlier
  always @(posedge clk) tk_d <= tau + k0;
  int step = 0;
  int applied = 0, last_p = 0, nout = 0, nadj = 0;
  always @(posedge clk) if (!rst && valid_o) begin
    int p, want;
    p = y_o.i / 4;
    if (nout == 0) `CHECK(p == 0, $sformatf("first output at %0d", p))
    else `CHECK(p - last_p == 8 + step, $sformatf("output %0d at %0d, previous %0d, step %0d", nout, p, last_p, step))
    // the shift requested at this output moves the next one
    want = $signed(tk_d);
    step = want - applied;
    step = (step > 3) ? 3 : (step < -3) ? -3 : step;
    applied += step;
    `CHECK(y_o.q == -y_o.i, "Q arm")
    last_p = p; nout++;
  end
  always @(posedge clk) if (!rst && adjust) nadj++;
  initial begin
    x_i = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int m = 0; m < 1800; m++) begin
      if (m == 300) tau <= 8'd7;
      if (m == 600) tau <= 8'd2;
      if (m == 900) k0 <= 8'd250;     // -6
      if (m == 1200) tau <= 8'd1;
      x_i <= '{i: 16'(16 * m), q: 16'(-16 * m)}; valid_i <= 1; @(posedge clk);
      if (m % 5 == 0) begin valid_i <= 0; @(posedge clk); end
    end
    valid_i <= 0; repeat (3) @(posedge clk);
    `CHECK(nout > 895 && nout < 905, $sformatf("%0d outputs", nout))
    `CHECK(nadj > 3, "timing adjustments seen")
    `TB_DONE
  end
endmodule
