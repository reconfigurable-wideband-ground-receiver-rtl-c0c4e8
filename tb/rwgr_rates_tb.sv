// Variable symbol-rate test of the whole receiver at its default sizes.
// QPSK at several symbol rates is received through the filter-decimate
// front-end, the coarse decimator and the fine interpolator, each rate with
// its own split of the total decimation D = 2^k * D_core * D_F that brings
// the signal to 4 samples per symbol (R = 1.28 GS/s / (4 D)):
//   case 0: k = 3, D_core = 1, D_F = 1.25  -> D = 10,  32 MBd
//   case 1: k = 4, D_core = 2, D_F = 1.5   -> D = 48,  6.67 MBd
//   case 2: k = 6, D_core = 1, D_F = 1.75  -> D = 112, 2.86 MBd
// For each case the decimation filter gets 2^(k+3) taps of a
// Hamming-windowed sinc whose cut-off is the decimated Nyquist frequency
// 1/2^(k+1), with its passband gain scaled by 2^((k-3)/2) while the input
// amplitude falls by the same factor (input power proportional to symbol
// rate), so the soft-symbol level should stay the same. The signal sits on an
// IF of f_s/4 with a carrier phase and a timing offset; the receiver is reset
// between cases. Checks per case: the last 300 soft symbols decode without
// error (up to phase ambiguity and delay), the residual phase skew is small,
// the number of demodulator input samples matches ADC samples / D * 4 / 4,
// and the soft-symbol level is within 30 % of the first case's.
`include "tb_macros.svh"
module rwgr_rates_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic adc_valid = 0;
  logic signed [7:0] adc_lane [8];
  path_t path = PATH_FILTER_DECIMATE;
  logic [39:0] if_fcw = 40'h40_0000_0000;
  logic [3:0] fd_k = 4'd3;
  logic [5:0] fd_shift = 6'd16;
  logic fd_coef_we = 0;
  logic [12:0] fd_coef_idx = 0;
  logic signed [17:0] fd_coef_data = 0;
  logic tbl_we = 0, tbl_arm = 0, pps = 0;
  logic [7:0] tbl_addr = 0;
  logic [31:0] tbl_time = 0, utc_sec = 0;
  logic signed [39:0] tbl_fcw = 0;
  logic [8:0] tbl_len = 9'd0;
  logic [31:0] core_mix_fcw = 0;
  logic [1:0] core_dec_sel = 0;
  logic core_qb_bypass = 0;
  logic [16:0] core_df = 17'd65536;
  logic [15:0] core_gain = 16'd2867;
  logic [15:0] id_len = 16'd16;
  logic [4:0] id_shift = 5'd4;
  mod_t mode = MOD_QPSK;
  logic mf_we = 0;
  logic [3:0] mf_addr = 0;
  logic signed [17:0] mf_data = 0;
  logic [4:0] mf_shift = 5'd14;
  logic signed [31:0] alpha_c = ALPHA_DEFAULT, beta_c = BETA_DEFAULT, alpha_g = ALPHA_DEFAULT, beta_g = BETA_DEFAULT;
  logic [7:0] k0 = 0;
  logic fd_valid_o, doppler_update, sw_valid, core_valid, sym_valid, tim_adjust;
  logic [63:0] fd_ntp;
  cplx_t sw_y, sym, ram_data;
  logic [11:0] ram_addr = 0, ram_wr_ptr;
  logic [9:0] car_phase;
  logic [7:0] tau;

  rwgr_top dut (.*);
  `WATCHDOG(600000)

  int n_core = 0;
  always @(posedge clk) if (!rst && core_valid) n_core++;

  int di [$], dq [$];
  cplx_t syms [$];
  always @(posedge clk) if (!rst && sym_valid) begin
    di.push_back(sym.i < 0 ? -1 : 1); dq.push_back(sym.q < 0 ? -1 : 1); syms.push_back(sym);
  end

  localparam int NSYM = 1000;
  localparam real PI = 3.14159265358979;
  int ti [NSYM], tq [NSYM];

  function automatic bit bits_match(ref int d [$], ref int t [NSYM]);
    for (int dl = 0; dl < 60; dl++)
      for (int s = -1; s <= 1; s += 2) begin
        int err;
        err = 0;
        for (int k = d.size() - 300; k < d.size(); k++)
          if (k - dl < 0 || d[k] != s * t[k - dl]) err++;
        if (err == 0) return 1;
      end
    return 0;
  endfunction

  // mean |I|+|Q| and phase skew of the last 300 soft symbols
  function automatic void level_of(ref cplx_t s [$], output real lvl, output real skew);
    real a, b;
    lvl = 0; skew = 0;
    for (int k = s.size() - 300; k < s.size(); k++) begin
      a = (s[k].i < 0) ? -$itor(s[k].i) : $itor(s[k].i);
      b = (s[k].q < 0) ? -$itor(s[k].q) : $itor(s[k].q);
      lvl += (a + b) / 300.0;
      skew += (a > b ? a - b : b - a) / (a + b + 1.0) / 300.0;
    end
  endfunction

  task automatic load_mf();
    for (int m = 0; m < 9; m++) begin
      mf_we <= 1; mf_addr <= 4'(m); mf_data <= (m == 6) ? 18'sd2048 : (m >= 7) ? 18'sd4096 : 18'sd0;
      @(posedge clk);
    end
    mf_we <= 0;
  endtask

  // 2^(k+3) taps, cut-off 1/2^(k+1), DC gain 2^16 * 2^((k-3)/2)
  task automatic load_fd(int k);
    int n, d;
    real h [], sum, g;
    d = 1 << k; n = 8 * d;
    h = new[n];
    sum = 0;
    for (int i = 0; i < n; i++) begin
      real x;
      x = real'(i) - real'(n - 1) / 2.0;
      h[i] = ($sin(PI * x / real'(d)) / (PI * x)) * (0.54 - 0.46 * $cos(2.0 * PI * i / real'(n - 1)));
      sum += h[i];
    end
    g = 65536.0 * $pow(2.0, real'(k - 3) / 2.0);
    for (int i = 0; i < n; i++) begin
      fd_coef_we <= 1; fd_coef_idx <= 13'(i); fd_coef_data <= 18'($rtoi(g * h[i] / sum + 0.5)); @(posedge clk);
    end
    fd_coef_we <= 0;
  endtask

  // one ADC sample of the smoothed-NRZ QPSK signal on an f_s/4 IF
  function automatic real adc_value(int m, int sps, real amp, real ph);
    real a, b, wt;
    int f;
    a = 0; b = 0;
    for (int j = 0; j < sps / 2; j++) begin
      f = m - j;
      if (f >= 0 && f / sps < NSYM) begin a += ti[f / sps]; b += tq[f / sps]; end
    end
    a /= real'(sps / 2); b /= real'(sps / 2);
    wt = 2.0 * PI * 0.25 * m + ph;
    return amp * (a * $cos(wt) - b * $sin(wt));
  endfunction

  int   c_k [3]   = '{3, 4, 6};
  int   c_dec [3] = '{0, 1, 0};
  int   c_df [3]  = '{81920, 98304, 114688};   // D_F * 2^16
  int   c_D [3]   = '{10, 48, 112};
  real  lvl0;

  initial begin
    for (int l = 0; l < 8; l++) adc_lane[l] = '0;
    for (int c = 0; c < 3; c++) begin
      int sps, core0, words;
      real amp, lvl, skew;
      rst <= 1; repeat (3) @(posedge clk); rst <= 0;
      fd_k <= 4'(c_k[c]); core_dec_sel <= 2'(c_dec[c]); core_df <= 17'(c_df[c]);
      @(posedge clk);
      load_mf();
      load_fd(c_k[c]);
      repeat (4) @(posedge clk);
      di.delete(); dq.delete(); syms.delete();
      for (int k = 0; k < NSYM; k++) begin ti[k] = $urandom_range(0, 1) ? 1 : -1; tq[k] = $urandom_range(0, 1) ? 1 : -1; end
      sps = 4 * c_D[c];
      amp = 80.0 / $pow(2.0, real'(c_k[c] - 3) / 2.0);
      core0 = n_core;
      words = NSYM * sps / 8;
      for (int wd = 0; wd < words; wd++) begin
        for (int l = 0; l < 8; l++) begin
          real v;
          v = adc_value(8 * wd + l - 3 * sps / 16, sps, amp, 35.0 * PI / 180.0);
          adc_lane[l] <= 8'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
        end
        adc_valid <= 1; @(posedge clk);
      end
      adc_valid <= 0; repeat (200) @(posedge clk);
      `CHECK(di.size() > 600, $sformatf("case %0d: only %0d soft symbols", c, di.size()))
      if (di.size() > 600) begin
        level_of(syms, lvl, skew);
        if (c == 0) lvl0 = lvl;
        `CHECK(bits_match(di, ti) || bits_match(di, tq), $sformatf("case %0d: I decisions do not match", c))
        `CHECK(bits_match(dq, ti) || bits_match(dq, tq), $sformatf("case %0d: Q decisions do not match", c))
        `CHECK(skew < 0.15, $sformatf("case %0d: residual phase skew %f", c, skew))
        `CHECK(lvl > 0.7 * lvl0 && lvl < 1.3 * lvl0, $sformatf("case %0d: soft-symbol level %f against %f", c, lvl, lvl0))
        // demodulator input: 4 samples per symbol
        `CHECK(n_core - core0 > 4 * NSYM - 12 && n_core - core0 < 4 * NSYM + 4,
               $sformatf("case %0d: %0d demodulator samples for %0d symbols", c, n_core - core0, NSYM))
        $display("case %0d: k=%0d D=%0d (%f MBd): %0d soft symbols, %0d core samples, level %f, skew %f",
                 c, c_k[c], c_D[c], 1280.0 / (4.0 * c_D[c]), di.size(), n_core - core0, lvl, skew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
