// End-to-end test of the demodulator core at 4 samples per symbol.
// A QPSK (then OQPSK) signal with band-limited NRZ pulses is generated at 16
// samples per symbol, given a timing offset of 5/16 symbol and a carrier
// phase offset of 60 degrees, and decimated to 4 samples per symbol. The
// matched filter is loaded with a 4-sample rectangle. With the default loop
// coefficients (alpha = -10^4, beta = 0) both loops must lock:
//  - hard decisions of the last 300 soft symbols match the transmitted bits
//    (up to the four-fold phase ambiguity and a delay), with no error;
//  - the soft symbols sit at +-45 degrees (|I| close to |Q|), which needs the
//    carrier loop to have removed the offset;
//  - the resampler moved its grid at least once (timing loop active);
//  - one soft symbol leaves per 4 input samples;
//  - loop delay: the first non-zero Costas (Gardner) error reaches the loop
//    filter output exactly L_C - 1 (L_G - 1) error strobes after it appears.
`include "tb_macros.svh"
module demod_core_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  mod_t mode;
  logic mf_we = 0;
  logic [3:0] mf_addr;
  logic signed [17:0] mf_data;
  logic [4:0] mf_shift = 5'd14;
  logic signed [31:0] alpha_c = ALPHA_DEFAULT, beta_c = BETA_DEFAULT, alpha_g = ALPHA_DEFAULT, beta_g = BETA_DEFAULT;
  logic [7:0] k0 = 0;
  logic valid_i = 0;
  cplx_t x_i;
  logic sym_valid;
  cplx_t sym, ram_data;
  logic [11:0] ram_addr = 0, ram_wr_ptr;
  logic [9:0] car_phase;
  logic [7:0] tau;
  logic tim_adjust, fifo_empty;
  demod_core dut (.*);
  `WATCHDOG(100000)

  localparam int NSYM = 1500;
  int ti [NSYM], tq [NSYM];          // transmitted bits as +-1
  int di [$], dq [$];                // decided bits
  real mag_i, mag_q, skew;
  int nsym_out, nadj;
  always @(posedge clk) if (!rst && sym_valid) begin
    di.push_back(sym.i < 0 ? -1 : 1); dq.push_back(sym.q < 0 ? -1 : 1);
    if (di.size() > NSYM - 350) begin
      real a, b;
      a = (sym.i < 0) ? -$itor(sym.i) : $itor(sym.i);
      b = (sym.q < 0) ? -$itor(sym.q) : $itor(sym.q);
      mag_i += a; mag_q += b; skew += (a > b ? a - b : b - a) / (a + b + 1.0);
    end
  end
  always @(posedge clk) if (!rst && tim_adjust) nadj++;

  // loop delay, measured on the first run after reset
  int nce = 0, nge = 0, ce_first = -1, ge_first = -1, lfc_first = -1, lfg_first = -1;
  logic signed [47:0] lfc_prev = 0, lfg_prev = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.ce_v) begin nce++; if (ce_first < 0 && dut.ce != 0) ce_first = nce; end
    if (dut.ge_v) begin nge++; if (ge_first < 0 && dut.ge != 0) ge_first = nge; end
    if (lfc_first < 0 && dut.lf_c != lfc_prev) lfc_first = nce;
    if (lfg_first < 0 && dut.lf_g != lfg_prev) lfg_first = nge;
    lfc_prev = dut.lf_c; lfg_prev = dut.lf_g;
  end

  // does decided stream d match +-t delayed by some amount over the last 300?
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

  task automatic run(mod_t md);
    real ph, smp_i [], smp_q [];
    int nfine;
    rst <= 1; mode <= md; di.delete(); dq.delete();
    mag_i = 0; mag_q = 0; skew = 0; nadj = 0;
    repeat (3) @(posedge clk); rst <= 0;
    // matched filter: taps 6..10 = 0.5, 1, 1, 1, 0.5 (x 4096)
    for (int m = 0; m < 9; m++) begin
      mf_we <= 1; mf_addr <= 4'(m); mf_data <= (m == 6) ? 18'sd2048 : (m >= 7) ? 18'sd4096 : 18'sd0;
      @(posedge clk);
    end
    mf_we <= 0;
    for (int k = 0; k < NSYM; k++) begin
      ti[k] = $urandom_range(0, 1) ? 1 : -1; tq[k] = $urandom_range(0, 1) ? 1 : -1;
    end
    // 16 samples/symbol, NRZ smoothed over 8 fine samples; Q delayed by
    // 8 fine samples (half a symbol) for OQPSK
    nfine = NSYM * 16;
    smp_i = new[nfine]; smp_q = new[nfine];
    for (int f = 0; f < nfine; f++) begin
      real si, sq;
      si = 0; sq = 0;
      for (int a = 0; a < 8; a++) begin
        int fi, fq;
        fi = f - a; fq = f - a - ((md == MOD_OQPSK) ? 8 : 0);
        si += (fi >= 0) ? ti[fi / 16] : 0;
        sq += (fq >= 0) ? tq[fq / 16] : 0;
      end
      smp_i[f] = si / 8.0; smp_q[f] = sq / 8.0;
    end
    ph = 60.0 * 3.14159265358979 / 180.0;
    for (int f = 5; f < nfine; f += 4) begin      // 5/16 symbol timing offset
      real a, b;
      a = 7000.0 * (smp_i[f] * $cos(ph) - smp_q[f] * $sin(ph));
      b = 7000.0 * (smp_i[f] * $sin(ph) + smp_q[f] * $cos(ph));
      x_i <= '{i: 16'($rtoi(a)), q: 16'($rtoi(b))}; valid_i <= 1; @(posedge clk);
    end
    valid_i <= 0; repeat (60) @(posedge clk);
    nsym_out = di.size();
    `CHECK(nsym_out >= NSYM - 8 && nsym_out <= NSYM, $sformatf("%s: %0d soft symbols for %0d symbols", md.name(), nsym_out, NSYM))
    `CHECK(bits_match(di, ti) || bits_match(di, tq), $sformatf("%s: I decisions do not match", md.name()))
    `CHECK(bits_match(dq, ti) || bits_match(dq, tq), $sformatf("%s: Q decisions do not match", md.name()))
    `CHECK(skew / 350.0 < 0.15, $sformatf("%s: residual phase skew %f", md.name(), skew / 350.0))
    `CHECK(mag_i / 350.0 > 5000.0 && mag_q / 350.0 > 5000.0, $sformatf("%s: soft symbol size %f %f", md.name(), mag_i / 350.0, mag_q / 350.0))
    `CHECK(nadj > 0, $sformatf("%s: timing loop never moved the resampler", md.name()))
    $display("%s: phase %0d/1024 tau %0d skew %f mag %f adj %0d", md.name(), car_phase, $signed(tau), skew / 350.0, mag_i / 350.0, nadj);
  endtask

  initial begin
    x_i = '0; mf_addr = '0; mf_data = '0;
    run(MOD_QPSK);
    run(MOD_OQPSK);
    `CHECK(ce_first > 0 && lfc_first - ce_first == int'(dut.L_C) - 1,
           $sformatf("Costas loop delay: error %0d, filter %0d", ce_first, lfc_first))
    `CHECK(ge_first > 0 && lfg_first - ge_first == int'(dut.L_G) - 1,
           $sformatf("Gardner loop delay: error %0d, filter %0d", ge_first, lfg_first))
    $display("loop delays: Costas %0d, Gardner %0d updates beyond the first", lfc_first - ce_first, lfg_first - ge_first);
    `TB_DONE
  end
endmodule
