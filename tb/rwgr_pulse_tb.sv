// Pulse-shape and constellation test of the demodulator core.
// Square-root raised-cosine (SRRC) signals are generated at 16 samples per
// symbol with the transmit pulse spanning +-8 symbols, given a carrier phase
// and timing offset, and decimated to 4 samples per symbol. The matched filter
// holds the 17 samples of the same SRRC pulse at t = n/4 symbols, n = -8..8,
// i.e. the pulse truncated to +-2 symbols.
//   run 0: QPSK, roll-off 0.5
//   run 1: QPSK, roll-off 0.35
//   run 2: 16-QAM (levels +-1, +-3 per arm), roll-off 0.35, QPSK loops
// For every run the last 300 soft symbols must decide without error (up to a
// multiple of 90 degrees and a delay) at the default loop gains. For QPSK the
// soft-symbol dispersion with roll-off 0.35 must exceed that with 0.5: the
// 0.35 pulse decays more slowly, so the truncated matched filter leaves more
// intersymbol interference. The 16-QAM run shows that both loops also track
// a constellation they were not designed for.
`include "tb_macros.svh"
module rwgr_pulse_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode = MOD_QPSK;
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

  localparam int NSYM = 1500;
  localparam int SPS  = 16;          // generation rate
  localparam int SPAN = 8;           // transmit pulse half length, symbols
  localparam real PI  = 3.14159265358979;
  int ti [NSYM], tq [NSYM];          // transmitted levels
  cplx_t syms [$];
  always @(posedge clk) if (!rst && sym_valid) syms.push_back(sym);

  function automatic real absr(real x); return x < 0 ? -x : x; endfunction

  // SRRC pulse at t symbols, roll-off r (unit energy not needed)
  function automatic real srrc(real t, real r);
    if (absr(t) < 1e-9) return 1.0 - r + 4.0 * r / PI;
    if (absr(absr(t) - 1.0 / (4.0 * r)) < 1e-9)
      return r / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * r)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * r)));
    return ($sin(PI * t * (1.0 - r)) + 4.0 * r * t * $cos(PI * t * (1.0 + r))) /
           (PI * t * (1.0 - (4.0 * r * t) * (4.0 * r * t)));
  endfunction

  // decide soft symbols to levels (+-1 for QPSK; +-1, +-3 for 16-QAM) and
  // compare with the transmitted levels rotated by a multiple of 90 degrees
  // and delayed
  function automatic bit decide_match(bit qam);
    real m;
    int n, dI [300], dQ [300];
    m = 0;
    n = syms.size();
    for (int k = n - 300; k < n; k++) m += (absr($itor(syms[k].i)) + absr($itor(syms[k].q))) / 600.0;
    for (int k = 0; k < 300; k++) begin
      real a, b;
      a = $itor(syms[n - 300 + k].i); b = $itor(syms[n - 300 + k].q);
      dI[k] = (a < 0 ? -1 : 1) * ((qam && absr(a) > m) ? 3 : 1);
      dQ[k] = (b < 0 ? -1 : 1) * ((qam && absr(b) > m) ? 3 : 1);
    end
    for (int dl = 0; dl < 40; dl++)
      for (int rot = 0; rot < 4; rot++) begin
        int err;
        err = 0;
        for (int k = 0; k < 300; k++) begin
          int s, ri, rq;
          s = n - 300 + k - dl;
          if (s < 0) begin err++; continue; end
          case (rot)
            0: begin ri = ti[s];  rq = tq[s];  end
            1: begin ri = -tq[s]; rq = ti[s];  end
            2: begin ri = -ti[s]; rq = -tq[s]; end
            default: begin ri = tq[s]; rq = -ti[s]; end
          endcase
          if (dI[k] != ri || dQ[k] != rq) err++;
        end
        if (err == 0) return 1;
      end
    return 0;
  endfunction

  // relative spread of |I| and |Q| (QPSK)
  function automatic real dispersion();
    real m, v, a, b;
    int n;
    m = 0; v = 0; n = syms.size();
    for (int k = n - 300; k < n; k++) m += (absr($itor(syms[k].i)) + absr($itor(syms[k].q))) / 600.0;
    for (int k = n - 300; k < n; k++) begin
      a = absr($itor(syms[k].i)); b = absr($itor(syms[k].q));
      v += ((a - m) * (a - m) + (b - m) * (b - m)) / 600.0;
    end
    return $sqrt(v) / m;
  endfunction

  task automatic run(real r, bit qam, output real disp);
    real csum, amp, ph, smp_i [], smp_q [];
    int nfine;
    rst <= 1; syms.delete();
    repeat (3) @(posedge clk); rst <= 0;
    // matched filter: SRRC at n/4 symbols, unity DC gain (taps sum to 4 x 4096)
    csum = 0;
    for (int n = -8; n <= 8; n++) csum += srrc(real'(n) / 4.0, r);
    for (int m = 0; m < 9; m++) begin
      mf_we <= 1; mf_addr <= 4'(m);
      mf_data <= 18'($rtoi(16384.0 * srrc(real'(8 - m) / 4.0, r) / csum + 0.5)); @(posedge clk);
    end
    mf_we <= 0;
    for (int k = 0; k < NSYM; k++) begin
      ti[k] = ($urandom_range(0, 1) ? 1 : -1) * ((qam && $urandom_range(0, 1)) ? 3 : 1);
      tq[k] = ($urandom_range(0, 1) ? 1 : -1) * ((qam && $urandom_range(0, 1)) ? 3 : 1);
    end
    nfine = NSYM * SPS;
    smp_i = new[nfine]; smp_q = new[nfine];
    for (int f = 0; f < nfine; f++) begin
      smp_i[f] = 0; smp_q[f] = 0;
      for (int k = f / SPS - SPAN; k <= f / SPS + SPAN; k++)
        if (k >= 0 && k < NSYM) begin
          real p;
          p = srrc(real'(f - k * SPS) / real'(SPS), r);
          smp_i[f] += ti[k] * p; smp_q[f] += tq[k] * p;
        end
    end
    amp = qam ? 2000.0 : 5000.0;
    ph = 40.0 * PI / 180.0;
    for (int f = 5; f < nfine; f += 4) begin      // 5/16 symbol timing offset
      real a, b;
      a = amp * (smp_i[f] * $cos(ph) - smp_q[f] * $sin(ph));
      b = amp * (smp_i[f] * $sin(ph) + smp_q[f] * $cos(ph));
      x_i <= '{i: 16'($rtoi(a)), q: 16'($rtoi(b))}; valid_i <= 1; @(posedge clk);
    end
    valid_i <= 0; repeat (60) @(posedge clk);
    `CHECK(syms.size() >= NSYM - 8 && syms.size() <= NSYM, $sformatf("%s roll-off %f: %0d soft symbols", qam ? "16-QAM" : "QPSK", r, syms.size()))
    `CHECK(decide_match(qam), $sformatf("%s roll-off %f: decisions do not match", qam ? "16-QAM" : "QPSK", r))
    disp = dispersion();
    $display("%s roll-off %f: %0d soft symbols, dispersion %f, phase %0d, tau %0d",
             qam ? "16-QAM" : "QPSK", r, syms.size(), disp, car_phase, $signed(tau));
  endtask

  initial begin
    real d50, d35, dq;
    run(0.5, 0, d50);
    run(0.35, 0, d35);
    run(0.35, 1, dq);
    `CHECK(d35 > d50, $sformatf("dispersion roll-off 0.35 (%f) not above 0.5 (%f)", d35, d50))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
