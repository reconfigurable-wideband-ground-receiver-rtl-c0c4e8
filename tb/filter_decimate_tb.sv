// Filter-decimate front-end at its default sizes, k = 3 (8:1, 64 taps).
// The ADC lanes carry a real tone at IF + delta (IF = f_s/4, delta = f_s/512)
// and the NCO is set to IF. Taps form a 64-tap boxcar of unity DC gain.
// Before the 1 pps epoch the decimated output turns by 2*pi*8*delta per
// sample; the epoch loads a predict equal to delta, after which the output
// must stop turning (Doppler removed) and keep a magnitude of half the tone
// amplitude. Also checked: one output per input word, the NTP seconds
// attached to the outputs, and one predict update.
`include "tb_macros.svh"
module filter_decimate_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic adc_valid = 0;
  logic signed [7:0] adc_lane [8];
  logic [39:0] if_fcw = 40'h40_0000_0000;        // f_s/4
  logic [3:0] k = 4'd3;
  logic [5:0] out_shift = 6'd16;
  logic coef_we = 0;
  logic [12:0] coef_idx;
  logic signed [17:0] coef_data;
  logic tbl_we = 0, arm = 0, pps = 0;
  logic [7:0] tbl_addr = 0;
  logic [31:0] tbl_time = 32'd10, utc_sec = 32'd10;
  logic signed [39:0] tbl_fcw = 40'sh00_8000_0000;   // f_s/512
  logic [8:0] tbl_len = 9'd1;
  logic valid_o, doppler_update;
  cplx_t y_o;
  logic [63:0] ntp_o;
  filter_decimate dut (.*);
  `WATCHDOG(20000)
  real ang [$], mag [$];
  int nupd = 0, after_pps = -1, nout = 0;
  always @(posedge clk) if (!rst && doppler_update) nupd++;
  always @(posedge clk) if (!rst && valid_o) begin
    ang.push_back($atan2($itor(y_o.q), $itor(y_o.i)));
    mag.push_back($sqrt($itor(y_o.i) * $itor(y_o.i) + $itor(y_o.q) * $itor(y_o.q)));
    if (after_pps >= 0 && nout > after_pps + 4) `CHECK(ntp_o[63:32] == 32'd10 + 32'd2208988800, "NTP seconds on output")
    nout++;
  end
  function automatic real wrap(real a);
    while (a > 3.14159265358979) a -= 2.0 * 3.14159265358979;
    while (a < -3.14159265358979) a += 2.0 * 3.14159265358979;
    return a;
  endfunction
  initial begin
    real w, d;
    int m;
    for (int l = 0; l < 8; l++) adc_lane[l] = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 64; i++) begin
      coef_we <= 1; coef_idx <= 13'(i); coef_data <= 18'sd1024; @(posedge clk);
    end
    coef_we <= 0;
    tbl_we <= 1; @(posedge clk); tbl_we <= 0; arm <= 1; @(posedge clk); arm <= 0;
    w = 2.0 * 3.14159265358979 * (0.25 + 1.0 / 512.0);
    m = 0;
    for (int wd = 0; wd < 600; wd++) begin
      if (wd == 300) begin pps <= 1; after_pps = nout; end
      else pps <= 0;
      for (int l = 0; l < 8; l++) begin adc_lane[l] <= 8'($rtoi(127.0 * $cos(w * m) + (($cos(w * m) >= 0) ? 0.5 : -0.5))); m++; end
      adc_valid <= 1; @(posedge clk);
    end
    adc_valid <= 0; repeat (6) @(posedge clk);
    `CHECK(nout == 600, $sformatf("%0d outputs for 600 words", nout))
    `CHECK(nupd == 1, "one predict update")
    // before the epoch: rotation of 2*pi*8/512 per output
    for (int n = 100; n < 290; n++) begin
      d = wrap(ang[n] - ang[n-1]);
      `CHECK(d > 0.0882 && d < 0.1082, $sformatf("before epoch: step %f at %0d", d, n))
    end
    for (int n = after_pps + 20; n < 600; n++) begin
      d = wrap(ang[n] - ang[n-1]);
      `CHECK(d > -0.01 && d < 0.01, $sformatf("after epoch: step %f at %0d", d, n))
      `CHECK(mag[n] > 15500.0 && mag[n] < 16600.0, $sformatf("after epoch: magnitude %f at %0d", mag[n], n))
    end
    `TB_DONE
  end
endmodule
