// Four-lane NCO mixer with a 24-bit accumulator: a constant input (8000, 0)
// must come out as 8000*exp(-j*phase) with phase = lane index of the overall
// sample count times the frequency word, and the phase must run on without
// a jump when the frequency word is changed mid-stream.
`include "tb_macros.svh"
module nco_mixer_tb;
  import rwgr_pkg::*;
  localparam int LANES = 4, ACC_W = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [ACC_W-1:0] fcw;
  logic valid_i = 0, valid_o;
  cplx_t x_i [LANES], y_o [LANES];
  nco_mixer #(.LANES(LANES), .ACC_W(ACC_W)) dut (.*);
  `WATCHDOG(5000)
  longint ph_ref [$];     // expected accumulator phase of lane 0 per word
  logic [ACC_W-1:0] fq [$];
  int nout = 0;
  always @(posedge clk) if (!rst && valid_o) begin
    longint p0; logic [ACC_W-1:0] f;
    p0 = ph_ref.pop_front(); f = fq.pop_front();
    for (int l = 0; l < LANES; l++) begin
      longint p; real a, ei, eq;
      p = (p0 + l * longint'(f)) % (longint'(1) << ACC_W);
      a = 2.0 * 3.14159265358979 * real'(p >> (ACC_W - 10)) / 1024.0;
      ei = 8000.0 * $cos(a); eq = -8000.0 * $sin(a);
      `CHECK($itor(y_o[l].i) - ei < 2.0 && ei - $itor(y_o[l].i) < 2.0 && $itor(y_o[l].q) - eq < 2.0 && eq - $itor(y_o[l].q) < 2.0,
             $sformatf("word %0d lane %0d got %0d,%0d exp %f,%f", nout, l, y_o[l].i, y_o[l].q, ei, eq))
    end
    nout++;
  end
  initial begin
    longint acc = 0;
    for (int l = 0; l < LANES; l++) x_i[l] = '{i: 16'sd8000, q: 16'sd0};
    fcw = 24'h01_2345;
    repeat (2) @(posedge clk); rst <= 0;
    for (int w = 0; w < 200; w++) begin
      if (w == 100) fcw <= 24'h1F_0ABC;
      valid_i <= (w % 3 != 2);
      @(posedge clk);
      if (valid_i) begin
        ph_ref.push_back(acc); fq.push_back(fcw);
        acc = (acc + LANES * longint'(fcw)) % (longint'(1) << ACC_W);
      end
    end
    valid_i <= 0;
    repeat (4) @(posedge clk);
    `CHECK(nout == 134 && ph_ref.size() == 0, $sformatf("%0d outputs", nout))
    `TB_DONE
  end
endmodule
