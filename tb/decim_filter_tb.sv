// Self-checking test of the decimation filter: random taps and samples for
// k = 3, 4, 5 and 10 at the default KMAX = 10, every output
// compared with a direct FIR-and-decimate model, and the output spacing
// checked to be one output per D/8 input words.
module decim_filter_tb;
  import rwgr_pkg::*;
  localparam int LANES = 8, KMAX = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] k;
  logic [5:0] out_shift = 6'd14;
  logic coef_we = 0;
  logic [KMAX+2:0] coef_idx;
  logic signed [17:0] coef_data;
  logic valid_i = 0;
  cplx_t x_i [LANES];
  logic valid_o;
  cplx_t y_o;
  int checks = 0, failures = 0;

  decim_filter dut (.*);

  int h [];
  int ks [4] = '{3, 4, 5, 10};
  int xi [$], xq [$];
  int nout = 0, last_out_cyc = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_out(int n, int D, bit qarm);
    longint s;
    s = 0;
    for (int i = 0; i < 8*D; i++) begin
      int m;
      m = (n+1)*D - 1 - i;
      if (m >= 0) s += longint'(h[i]) * (qarm ? xq[m] : xi[m]);
    end
    s = (s + (longint'(1) <<< 13)) >>> 14;
    if (s > 32767) s = 32767; if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  always @(posedge clk) if (valid_o && !rst) begin
    int D;
    D = 1 << k;
    checks += 2;
    if (y_o.i != 16'(ref_out(nout, D, 0)) || y_o.q != 16'(ref_out(nout, D, 1))) begin
      failures++;
      if (failures < 5) $display("cyc %0d xi=%0d k=%0d out %0d: got %0d,%0d exp %0d,%0d", cyc, xi.size(), k, nout, y_o.i, y_o.q, ref_out(nout,D,0), ref_out(nout,D,1));
    end
    if (nout > 0) begin
      checks++;
      if (cyc - last_out_cyc != D/8) begin failures++; $display("spacing %0d", cyc-last_out_cyc); end
    end
    last_out_cyc = cyc;
    nout++;
  end

  initial begin
    for (int l = 0; l < LANES; l++) x_i[l] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (ks[ki]) begin
      int D, kk, hr;
      kk = ks[ki];
      D = 1 << kk;
      hr = (kk > 5) ? 256 : 32768;     // keep the long filter's sums in range
      k <= 4'(kk);
      @(posedge clk);
      h = new[8*D];
      for (int i = 0; i < 8*D; i++) begin
        h[i] = int'($urandom_range(0, 2 * hr - 1)) - hr;
        coef_we <= 1; coef_idx <= (KMAX+3)'(i); coef_data <= 18'(h[i]);
        @(posedge clk);
      end
      coef_we <= 0;
      xi.delete(); xq.delete(); nout = 0;
      // continuous words, then a gap-ridden stretch
      for (int w = 0; w < 40 * D / 8; w++) begin
        for (int l = 0; l < LANES; l++) begin
          int a, b;
          a = int'($urandom_range(0, 8191)) - 4096; b = int'($urandom_range(0, 8191)) - 4096;
          x_i[l] <= '{i: 16'(a), q: 16'(b)};
          xi.push_back(a); xq.push_back(b);
        end
        valid_i <= 1;
        @(posedge clk);
      end
      valid_i <= 0;
      repeat (5) @(posedge clk);
      checks++;
      if (nout != 40) begin failures++; $display("k=%0d: %0d outputs, expected 40", kk, nout); end
      // next k: restart happens on the k change
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
