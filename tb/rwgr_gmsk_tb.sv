// GMSK reception with the demodulator core in OQPSK mode.
// A GMSK signal (modulation index 1/2, Gaussian pre-filter with BT = 0.5 and
// then BT = 0.25, pulse truncated to 4 bits) is generated at 8 samples per
// bit. Viewed as OQPSK, one OQPSK symbol spans two bits, so after decimation
// by 4 the core sees 4 samples per OQPSK symbol. The matched filter holds 17
// samples of the first amplitude-modulated pulse C0(t) of the GMSK signal's
// pulse decomposition:
//   psi(t) = (pi/2) q(t)               0 <= t < 4T
//          = pi/2 - (pi/2) q(t - 4T)   4T <= t < 8T   (q: 0 -> 1, phase pulse)
//   C0(t)  = prod_{i=0..3} sin(psi(t + iT)),  0 <= t < 5T
// sampled every T/2 around its centre and scaled to unity DC gain.
// The reference decisions are the signs of cos(phase) and sin(phase) of the
// noiseless signal at the best half-symbol-spaced sampling phase.
// Checks for each BT: the last 300 soft symbols decode without error (up to
// phase ambiguity and delay) at the default loop gains, the residual phase
// skew is small, and one soft symbol leaves per OQPSK symbol. Across the two:
// the soft symbols of BT = 0.25 are more dispersed than those of BT = 0.5
// (its first pulse is less dominant, leaving more intersymbol interference).
`include "tb_macros.svh"
module rwgr_gmsk_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode = MOD_OQPSK;
  logic mf_we = 0;
  logic [3:0] mf_addr = 0;
  logic signed [17:0] mf_data = 0;
  logic [4:0] mf_shift = 5'd14;
  logic signed [31:0] alpha_c = ALPHA_DEFAULT, beta_c = BETA_DEFAULT, alpha_g = ALPHA_DEFAULT, beta_g = BETA_DEFAULT;
  logic [7:0] k0 = 0;
  logic valid_i = 0;
  cplx_t x_i = '0;
  logic sym_valid;
  cplx_t sym, ram_data;
  logic [11:0] ram_addr = 0, ram_wr_ptr;
  logic [9:0] car_phase;
  logic [7:0] tau;
  logic tim_adjust, fifo_empty;
  demod_core dut (.*);
  `WATCHDOG(100000)

  localparam int NSYM = 1500;        // OQPSK symbols (2 bits each)
  localparam int NBIT = 2 * NSYM;
  localparam int FB   = 8;           // fine samples per bit
  localparam int LP   = 4;           // pulse length in bits
  localparam real PI  = 3.14159265358979;
  int ti [NSYM], tq [NSYM];
  int di [$], dq [$];
  cplx_t syms [$];
  always @(posedge clk) if (!rst && sym_valid) begin
    di.push_back(sym.i < 0 ? -1 : 1); dq.push_back(sym.q < 0 ? -1 : 1); syms.push_back(sym);
  end

  function automatic bit bits_match(ref int d [$], ref int t [NSYM]);
    for (int dl = 0; dl < 40; dl++)
      for (int s = -1; s <= 1; s += 2) begin
        int err;
        err = 0;
        for (int k = d.size() - 300; k < d.size(); k++)
          if (k - dl < 0 || d[k] != s * t[k - dl]) err++;
        if (err == 0) return 1;
      end
    return 0;
  endfunction

  function automatic real absr(real x); return x < 0 ? -x : x; endfunction

  // spread of |I| and |Q| around their mean, relative to the mean, and phase skew
  function automatic void stats(output real disp, output real skew);
    real m, v, a, b;
    m = 0; v = 0; skew = 0;
    for (int k = syms.size() - 300; k < syms.size(); k++) begin
      a = (syms[k].i < 0) ? -$itor(syms[k].i) : $itor(syms[k].i);
      b = (syms[k].q < 0) ? -$itor(syms[k].q) : $itor(syms[k].q);
      m += (a + b) / 600.0;
      skew += (a > b ? a - b : b - a) / (a + b + 1.0) / 300.0;
    end
    for (int k = syms.size() - 300; k < syms.size(); k++) begin
      a = (syms[k].i < 0) ? -$itor(syms[k].i) : $itor(syms[k].i);
      b = (syms[k].q < 0) ? -$itor(syms[k].q) : $itor(syms[k].q);
      v += ((a - m) * (a - m) + (b - m) * (b - m)) / 600.0;
    end
    disp = $sqrt(v) / m;
  endfunction

  task automatic run(real bt, output real disp);
    real g [LP * FB], qc [LP * FB], sum, sigma, c0 [(LP + 1) * FB], csum, skew;
    real ph [], best;
    int a [NBIT], nfine, bo;
    rst <= 1; di.delete(); dq.delete(); syms.delete();
    repeat (3) @(posedge clk); rst <= 0;
    // frequency pulse: one-bit rectangle convolved with a Gaussian, unit area
    sigma = $sqrt($ln(2.0)) / (2.0 * PI * bt) * FB;
    sum = 0;
    for (int n = 0; n < LP * FB; n++) begin
      real t;
      t = real'(n) + 0.5 - real'(LP * FB) / 2.0;
      g[n] = 0;
      for (int u = 0; u < 64; u++) begin
        real s;
        s = t - (real'(u) + 0.5) / 64.0 * FB + FB / 2.0;
        g[n] += $exp(-s * s / (2.0 * sigma * sigma));
      end
      sum += g[n];
    end
    for (int n = 0; n < LP * FB; n++) begin g[n] /= sum; qc[n] = (n == 0 ? 0.0 : qc[n-1]) + g[n]; end
    // C0 pulse
    csum = 0;
    for (int t = 0; t < (LP + 1) * FB; t++) begin
      c0[t] = 1.0;
      for (int i = 0; i < LP; i++) begin
        int u;
        real psi;
        u = t + i * FB;
        psi = (u < LP * FB) ? PI / 2.0 * qc[u] : PI / 2.0 - PI / 2.0 * qc[u - LP * FB];
        c0[t] *= $sin(psi);
      end
    end
    // 17 taps at T/2 (4 per OQPSK symbol) around the centre (LP+1)*FB/2
    for (int m = -8; m <= 8; m++) begin
      int t;
      t = (LP + 1) * FB / 2 + m * FB / 2;
      csum += (t >= 0 && t < (LP + 1) * FB) ? c0[t] : 0.0;
    end
    for (int m = 0; m < 9; m++) begin
      int t;
      real c;
      t = (LP + 1) * FB / 2 + (8 - m) * FB / 2;
      c = (t < (LP + 1) * FB) ? c0[t] : 0.0;
      mf_we <= 1; mf_addr <= 4'(m); mf_data <= 18'($rtoi(16384.0 * c / csum + 0.5)); @(posedge clk);
    end
    mf_we <= 0;
    // bits and phase
    for (int k = 0; k < NBIT; k++) a[k] = $urandom_range(0, 1) ? 1 : -1;
    nfine = NBIT * FB;
    ph = new[nfine];
    for (int f = 0; f < nfine; f++) begin
      real fr;
      fr = 0;
      for (int k = f / FB - LP; k <= f / FB + 1; k++) begin
        int n;
        n = f - k * FB;
        if (k >= 0 && k < NBIT && n >= 0 && n < LP * FB) fr += a[k] * g[n];
      end
      ph[f] = (f == 0 ? 0.0 : ph[f-1]) + PI / 2.0 * fr;
    end
    // reference: best sampling phase for cos at even and sin at odd bits
    best = -1; bo = 0;
    for (int o = 0; o < 2 * FB; o++) begin
      real e;
      e = 0;
      for (int k = 10; k < NSYM - 10; k++) e += absr($cos(ph[2 * FB * k + o])) + absr($sin(ph[2 * FB * k + o + FB]));
      if (e > best) begin best = e; bo = o; end
    end
    for (int k = 0; k < NSYM; k++) begin
      ti[k] = $cos(ph[2 * FB * k + bo]) < 0 ? -1 : 1;
      tq[k] = (2 * FB * k + bo + FB < nfine && $sin(ph[2 * FB * k + bo + FB]) < 0) ? -1 : 1;
    end
    // 4 samples per OQPSK symbol, carrier phase offset 50 degrees, timing offset 3 fine samples
    for (int f = 3; f < nfine; f += 4) begin
      real ci, cq;
      ci = 7000.0 * $cos(ph[f] + 50.0 * PI / 180.0);
      cq = 7000.0 * $sin(ph[f] + 50.0 * PI / 180.0);
      x_i <= '{i: 16'($rtoi(ci)), q: 16'($rtoi(cq))}; valid_i <= 1; @(posedge clk);
    end
    valid_i <= 0; repeat (60) @(posedge clk);
    `CHECK(di.size() >= NSYM - 8 && di.size() <= NSYM, $sformatf("BT %f: %0d soft symbols for %0d symbols", bt, di.size(), NSYM))
    `CHECK(bits_match(di, ti) || bits_match(di, tq), $sformatf("BT %f: I decisions do not match", bt))
    `CHECK(bits_match(dq, ti) || bits_match(dq, tq), $sformatf("BT %f: Q decisions do not match", bt))
    stats(disp, skew);
    `CHECK(skew < 0.2, $sformatf("BT %f: residual phase skew %f", bt, skew))
    $display("GMSK BT %f: %0d soft symbols, dispersion %f, skew %f, best sampling offset %0d", bt, di.size(), disp, skew, bo);
  endtask

  initial begin
    real d50, d25;
    run(0.5, d50);
    run(0.25, d25);
    `CHECK(d25 > d50, $sformatf("dispersion BT 0.25 (%f) not above BT 0.5 (%f)", d25, d50))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
