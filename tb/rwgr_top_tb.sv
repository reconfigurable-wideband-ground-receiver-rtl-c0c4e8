// End-to-end test of the whole receiver at its default sizes.
// Part 1, low-rate path: a QPSK signal at 1/32 of the ADC rate (4 samples per
// symbol after 8:1 decimation) on an IF of f_s/4 plus a Doppler shift, with a
// 60 degree carrier offset and a timing offset, quantised to 8 bits and fed
// 8 samples per clock. Two 1 pps epochs load two Doppler predicts (the
// signal's Doppler changes at the second); the filter-decimate front-end runs
// at k = 3 with a 64-tap windowed-sinc low-pass (cut-off f_s/16).
// Part 2, high-rate path: an OQPSK signal at 1/24 of the ADC rate on an IF of
// f_s/4, routed directly to the receiver core (one ADC word per 8 clocks);
// the core mixes it down, decimates by 4, filters, and decimates by 1.5 in
// the fine interpolator. The demodulator is switched to OQPSK.
// In both parts the last 300 soft symbols must decode without error (up to
// phase ambiguity and delay) and sit at +-45 degrees. The soft-symbol RAM is
// read back and compared with the test port. Each mechanism must happen:
// predict updates, both router paths, time-coded decimated output, coarse
// decimation, fine-interpolator sample drops, resampler timing moves,
// integrate-and-dump output, both constellations.
`include "tb_macros.svh"
module rwgr_top_tb;
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
  logic [8:0] tbl_len = 9'd2;
  logic [31:0] core_mix_fcw = 0;
  logic [1:0] core_dec_sel = 0;
  logic core_qb_bypass = 1;
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
  `WATCHDOG(400000)

  // ---------------- event counters ----------------
  int n_upd = 0, n_fd = 0, n_ntp_ok = 0, n_core = 0, n_sw = 0, n_adj = 0, n_words_fd = 0, n_words_dir = 0;
  always @(posedge clk) if (!rst) begin
    if (doppler_update) n_upd++;
    if (fd_valid_o) begin n_fd++; if (fd_ntp[63:32] >= 32'd2208988800 + 32'd1000) n_ntp_ok++; end
    if (core_valid) n_core++;
    if (sw_valid) n_sw++;
    if (tim_adjust) n_adj++;
  end

  // ---------------- soft symbols ----------------
  int di [$], dq [$];
  cplx_t syms [$];
  always @(posedge clk) if (!rst && sym_valid) begin
    di.push_back(sym.i < 0 ? -1 : 1); dq.push_back(sym.q < 0 ? -1 : 1); syms.push_back(sym);
  end

  localparam int NSYM = 1200;
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

  function automatic real skew_of(ref cplx_t s [$]);
    real acc, a, b;
    acc = 0;
    for (int k = s.size() - 300; k < s.size(); k++) begin
      a = (s[k].i < 0) ? -$itor(s[k].i) : $itor(s[k].i);
      b = (s[k].q < 0) ? -$itor(s[k].q) : $itor(s[k].q);
      acc += (a > b ? a - b : b - a) / (a + b + 1.0);
    end
    return acc / 300.0;
  endfunction

  // baseband pulse value at ADC sample m: NRZ smoothed over half a symbol;
  // for OQPSK the Q arm is delayed by half a symbol
  function automatic real arm(ref int t [NSYM], input int m, input int sps, input int dly);
    real s;
    s = 0;
    for (int a = 0; a < sps / 2; a++) begin
      int f;
      f = m - a - dly;
      s += (f >= 0 && f / sps < NSYM) ? t[f / sps] : 0;
    end
    return s / real'(sps / 2);
  endfunction

  task automatic load_mf();
    for (int m = 0; m < 9; m++) begin
      mf_we <= 1; mf_addr <= 4'(m); mf_data <= (m == 6) ? 18'sd2048 : (m >= 7) ? 18'sd4096 : 18'sd0;
      @(posedge clk);
    end
    mf_we <= 0;
  endtask

  task automatic check_part(string name);
    `CHECK(di.size() > 600, $sformatf("%s: only %0d soft symbols", name, di.size()))
    if (di.size() > 600) begin
      `CHECK(bits_match(di, ti) || bits_match(di, tq), $sformatf("%s: I decisions do not match", name))
      `CHECK(bits_match(dq, ti) || bits_match(dq, tq), $sformatf("%s: Q decisions do not match", name))
      `CHECK(skew_of(syms) < 0.15, $sformatf("%s: residual phase skew %f", name, skew_of(syms)))
      $display("%s: %0d soft symbols, skew %f, phase %0d, tau %0d", name, di.size(), skew_of(syms), car_phase, $signed(tau));
    end
  endtask

  localparam real PI = 3.14159265358979;
  int n_core_p1, n_sw_p1, n_adj_p1;

  initial begin
    real ph, w, d1, d2;
    int m, sps;
    for (int l = 0; l < 8; l++) adc_lane[l] = '0;
    repeat (3) @(posedge clk); rst <= 0;
    load_mf();

    // ================= part 1: filter-decimate path, QPSK =================
    // 64-tap Hamming-windowed sinc, cut-off f_s/16, DC gain 2^16
    begin
      real h [64], sum;
      sum = 0;
      for (int i = 0; i < 64; i++) begin
        real x;
        x = real'(i) - 31.5;
        h[i] = ($sin(2.0 * PI * x / 16.0) / (PI * x)) * (0.54 - 0.46 * $cos(2.0 * PI * i / 63.0));
        sum += h[i];
      end
      for (int i = 0; i < 64; i++) begin
        fd_coef_we <= 1; fd_coef_idx <= 13'(i); fd_coef_data <= 18'($rtoi(65536.0 * h[i] / sum + 0.5)); @(posedge clk);
      end
      fd_coef_we <= 0;
    end
    // two predicts: seconds 1000 and 1001
    d1 = 1.0 / 4096.0; d2 = -1.0 / 2048.0;
    tbl_we <= 1; tbl_addr <= 0; tbl_time <= 32'd1000; tbl_fcw <= 40'(longint'(d1 * 2.0**40)); @(posedge clk);
    tbl_addr <= 1; tbl_time <= 32'd1001; tbl_fcw <= 40'(longint'(d2 * 2.0**40)); @(posedge clk);
    tbl_we <= 0; tbl_arm <= 1; @(posedge clk); tbl_arm <= 0;
    utc_sec <= 32'd1000; pps <= 1; @(posedge clk); pps <= 0;
    repeat (6) @(posedge clk);
    for (int k = 0; k < NSYM; k++) begin ti[k] = $urandom_range(0, 1) ? 1 : -1; tq[k] = $urandom_range(0, 1) ? 1 : -1; end
    path <= PATH_FILTER_DECIMATE; mode <= MOD_QPSK;
    sps = 32; ph = 60.0 * PI / 180.0;
    w = 0;
    m = 0;
    for (int wd = 0; wd < NSYM * sps / 8; wd++) begin
      if (wd == NSYM * sps / 16) begin utc_sec <= 32'd1001; pps <= 1; end
      else pps <= 0;
      for (int l = 0; l < 8; l++) begin
        real a, b, v;
        // the signal's Doppler steps when the second predict takes effect
        a = arm(ti, m - 7, sps, 0); b = arm(tq, m - 7, sps, 0);
        v = 80.0 * (a * $cos(w + ph) - b * $sin(w + ph));
        adc_lane[l] <= 8'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
        w += 2.0 * PI * (0.25 + ((wd > NSYM * sps / 16 + 2) ? d2 : d1));
        if (w > 2.0 * PI) w -= 2.0 * PI;
        m++;
      end
      adc_valid <= 1; n_words_fd++; @(posedge clk);
    end
    adc_valid <= 0; repeat (100) @(posedge clk);
    check_part("filter-decimate path, QPSK");
    // the RAM holds the latest soft symbols: compare the newest 64
    for (int k = 1; k <= 64; k++) begin
      ram_addr <= ram_wr_ptr - 12'(k); @(posedge clk); @(posedge clk); #1;
      `CHECK(ram_data == syms[syms.size() - k], $sformatf("RAM entry %0d back", k))
    end
    n_core_p1 = n_core; n_sw_p1 = n_sw; n_adj_p1 = n_adj;
    // the interpolator holds the newest sample until the next one arrives
    `CHECK(n_core == n_fd - 1, $sformatf("1:1 core rate: %0d core samples for %0d decimated", n_core, n_fd))

    // ================= part 2: direct path, OQPSK =================
    di.delete(); dq.delete(); syms.delete();
    for (int k = 0; k < NSYM; k++) begin ti[k] = $urandom_range(0, 1) ? 1 : -1; tq[k] = $urandom_range(0, 1) ? 1 : -1; end
    path <= PATH_DIRECT; mode <= MOD_OQPSK;
    core_mix_fcw <= 32'h4000_0000; core_dec_sel <= 2'd2; core_qb_bypass <= 0;
    core_df <= 17'd98304; core_gain <= 16'd3600;
    sps = 24; ph = -20.0 * PI / 180.0;
    m = 0;
    for (int wd = 0; wd < NSYM * sps / 8; wd++) begin
      for (int l = 0; l < 8; l++) begin
        real a, b, v, wt;
        a = arm(ti, m - 5, sps, 0); b = arm(tq, m - 5, sps, sps / 2);
        wt = 2.0 * PI * 0.25 * m + ph;
        v = 80.0 * (a * $cos(wt) - b * $sin(wt));
        adc_lane[l] <= 8'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
        m++;
      end
      adc_valid <= 1; n_words_dir++; @(posedge clk);
      adc_valid <= 0; repeat (7) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    check_part("direct path, OQPSK");

    // ================= mechanisms =================
    `CHECK(n_upd == 2, $sformatf("Doppler predict updates: %0d", n_upd))
    `CHECK(n_fd == n_words_fd, $sformatf("filter-decimate outputs %0d for %0d words", n_fd, n_words_fd))
    `CHECK(n_ntp_ok > 0, "time-coded decimated output")
    // direct: 8*words samples, /4 coarse, /1.5 fine
    `CHECK((n_core - n_core_p1) > 8 * n_words_dir / 6 - 10 && (n_core - n_core_p1) < 8 * n_words_dir / 6 + 10,
           $sformatf("direct path: %0d core samples for %0d ADC samples", n_core - n_core_p1, 8 * n_words_dir))
    `CHECK(n_sw_p1 > 0 && n_sw > n_sw_p1, $sformatf("integrate-and-dump outputs: %0d", n_sw))
    `CHECK(n_adj > 0, $sformatf("resampler timing moves: %0d", n_adj))
    $display("events: predict updates %0d, fd outputs %0d, direct words %0d, core samples %0d, I&D %0d, timing moves %0d",
             n_upd, n_fd, n_words_dir, n_core, n_sw, n_adj);
    `TB_DONE
  end
endmodule
