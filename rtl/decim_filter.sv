// Reprogrammable power-of-two decimation filter of the filter-decimate
// front-end. For a decimation factor D = 2^k (k = 3 .. KMAX) it computes
//   y[n] = sum_{i=0}^{8D-1} h[i] * x[(n+1)D - 1 - i]
// on complex samples that arrive as LANES (= 8) parallel lanes per clock, so a
// block of D input samples takes W = D/8 clocks and yields one output.
// The filter length is always 8D taps (the document's 2^(k+3)), so every input
// sample feeds exactly 8 outputs. The filter therefore keeps 8 rotating
// accumulators: in block b, accumulator j (0..7) collects output b+j, and
// lane l of word w needs tap j*D + 8*(W-1-w) + (7-l). The taps are held in
// 64 banks, bank (j,l) at address (W-1-w), so all 64 coefficients of a clock
// are read at one common address. At the end of each block the oldest
// accumulator is complete: it is rounded, shifted right by out_shift,
// saturated and sent out, then restarted for output b+8.
// That is 64 complex-by-real products per clock for every k.
// Taps are written one at a time through coef_we/coef_idx/coef_data, indexed
// 0 .. 8D-1 for the k in force; changing k restarts the accumulators. The
// gain law of the document (nominal filter scaled by 2^((k-3)/2)) lives in the
// coefficients the host writes; out_shift is this design's own scaling knob.
// Timing: valid_o comes two clocks after the input word that ends a block.
module decim_filter
  import rwgr_pkg::*;
#(
  parameter int unsigned LANES  = 8,
  parameter int unsigned KMIN   = 3,
  parameter int unsigned KMAX   = 10,
  parameter int unsigned COEF_W = 18,
  parameter int unsigned ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [3:0]               k,          // decimation 2^k, KMIN <= k <= KMAX
  input  logic [5:0]               out_shift,  // output = accumulator >>> out_shift
  input  logic                     coef_we,
  input  logic [KMAX+2:0]          coef_idx,   // tap index 0 .. 2^(k+3)-1
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     valid_i,
  input  cplx_t                    x_i [LANES],
  output logic                     valid_o,
  output cplx_t                    y_o
);
  localparam int unsigned NACC  = 8;                    // outputs each sample feeds
  localparam int unsigned MAXW  = 1 << (KMAX - KMIN);   // words per block at KMAX
  localparam int unsigned AW    = (KMAX - KMIN) > 0 ? (KMAX - KMIN) : 1;
  localparam int unsigned NBANK = NACC * LANES;

  // ---------------- coefficient banks ----------------
  logic [AW-1:0]            wr_addr;
  logic [$clog2(NACC)-1:0]  wr_j;
  logic [$clog2(LANES)-1:0] wr_l;
  always_comb begin
    // i = j*D + 8*a + (7-l)
    wr_j    = $clog2(NACC)'(coef_idx >> k);
    wr_addr = AW'((coef_idx & ((KMAX+3)'(1) << k) - 1) >> 3);
    wr_l    = $clog2(LANES)'(LANES - 1) - coef_idx[$clog2(LANES)-1:0];
  end

  logic [AW-1:0] rd_addr;
  logic signed [COEF_W-1:0] coef_q [NBANK];

  for (genvar bk = 0; bk < NBANK; bk++) begin : g_bank
    logic signed [COEF_W-1:0] mem [MAXW];
    always_ff @(posedge clk) begin
      if (coef_we && wr_j == bk / LANES && wr_l == bk % LANES) mem[wr_addr] <= coef_data;
      coef_q[bk] <= mem[rd_addr];
    end
  end

  // ---------------- block sequencing ----------------
  logic [3:0]    k_q;
  logic [AW-1:0] wc;       // word within block
  logic [2:0]    blk;      // block number mod 8
  logic [AW-1:0] wlast;
  logic          restart;

  assign wlast   = AW'((32'd1 << (k - KMIN)) - 1);
  assign rd_addr = wlast - wc;
  assign restart = (k != k_q);

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      k_q <= k; wc <= '0; blk <= '0;
    end else if (valid_i) begin
      if (wc == wlast) begin
        wc  <= '0;
        blk <= blk + 3'd1;
      end else wc <= wc + AW'(1);
    end
  end

  // stage 1: align samples with the coefficients read for them
  cplx_t     x_d [LANES];
  logic      v_d, last_d, clr_d;
  logic [2:0] blk_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      v_d <= 1'b0; last_d <= 1'b0; blk_d <= '0; clr_d <= 1'b1;
      for (int l = 0; l < LANES; l++) x_d[l] <= '0;
    end else begin
      v_d    <= valid_i && !restart;
      last_d <= (wc == wlast);
      blk_d  <= blk;
      clr_d  <= restart;
      for (int l = 0; l < LANES; l++) x_d[l] <= x_i[l];
    end
  end

  // stage 2: 64 products, 8 partial sums, rotating accumulators
  logic signed [ACC_W-1:0] part_i [NACC], part_q [NACC];
  always_comb begin
    for (int j = 0; j < NACC; j++) begin
      part_i[j] = '0; part_q[j] = '0;
      for (int l = 0; l < LANES; l++) begin
        part_i[j] += ACC_W'(x_d[l].i * coef_q[j*LANES + l]);
        part_q[j] += ACC_W'(x_d[l].q * coef_q[j*LANES + l]);
      end
    end
  end

  logic signed [ACC_W-1:0] acc_i [NACC], acc_q [NACC];
  logic signed [ACC_W-1:0] fin_i, fin_q;
  always_comb begin
    fin_i = acc_i[blk_d] + part_i[0];
    fin_q = acc_q[blk_d] + part_q[0];
  end

  function automatic logic signed [SW-1:0] scale(input logic signed [ACC_W-1:0] v, input logic [5:0] sh);
    logic signed [ACC_W:0] r;
    r = (ACC_W+1)'(v) + ((sh == 0) ? '0 : ((ACC_W+1)'(1) <<< (sh - 1)));
    return sat16(64'(r >>> sh));
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr_d) begin
      valid_o <= 1'b0;
      y_o     <= '0;
      for (int j = 0; j < NACC; j++) begin acc_i[j] <= '0; acc_q[j] <= '0; end
    end else begin
      valid_o <= v_d && last_d;
      if (v_d) begin
        for (int j = 0; j < NACC; j++) begin
          // relative accumulator j lives in slot (blk + j) mod 8
          acc_i[3'(blk_d + 3'(j))] <= acc_i[3'(blk_d + 3'(j))] + part_i[j];
          acc_q[3'(blk_d + 3'(j))] <= acc_q[3'(blk_d + 3'(j))] + part_q[j];
        end
        if (last_d) begin
          acc_i[blk_d] <= '0;
          acc_q[blk_d] <= '0;
          y_o.i <= scale(fin_i, out_shift);
          y_o.q <= scale(fin_q, out_shift);
        end
      end
    end
  end
endmodule
