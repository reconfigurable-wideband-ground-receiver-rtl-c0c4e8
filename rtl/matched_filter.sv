// 17-tap reprogrammable linear-phase FIR matched filter, one per arm (I, Q),
// running at 4 samples per symbol, so it spans four symbol intervals.
// Linear phase means h[8-m] = h[8+m]; only the nine distinct taps are stored:
// coef[m], m = 0..8, is the tap m places from either end, coef[8] the centre.
// Each output adds the two samples sharing a tap first (pre-adder), then
// multiplies, so nine multipliers per arm suffice:
//   y = round( sum_{m=0}^{7} coef[m]*(x[n-m] + x[n-16+m]) + coef[8]*x[n-8] ) >> shift
// Taps are written by the host through coef_we/coef_addr/coef_data.
// Timing: valid_o two clocks after valid_i (pre-add, then multiply-add).
// Tap count, symmetry and programmability follow the document; word widths
// and the shift are this design's choice.
module matched_filter
  import rwgr_pkg::*;
#(
  parameter int unsigned NTAPS  = 17,
  parameter int unsigned COEF_W = 18
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     coef_we,
  input  logic [3:0]               coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic [4:0]               shift,
  input  logic                     valid_i,
  input  cplx_t                    x_i,
  output logic                     valid_o,
  output cplx_t                    y_o
);
  localparam int unsigned NU = (NTAPS + 1) / 2;   // distinct taps
  logic signed [COEF_W-1:0] coef [NU];
  cplx_t dl [NTAPS];                                // dl[0] newest
  logic signed [SW:0] pre_i [NU], pre_q [NU];
  logic v1;

  always_ff @(posedge clk) begin
    if (rst) for (int m = 0; m < NU; m++) coef[m] <= '0;
    else if (coef_we && coef_addr < NU) coef[coef_addr] <= coef_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      for (int t = 0; t < NTAPS; t++) dl[t] <= '0;
      for (int m = 0; m < NU; m++) begin pre_i[m] <= '0; pre_q[m] <= '0; end
    end else begin
      v1 <= valid_i;
      if (valid_i) begin
        dl[0] <= x_i;
        for (int t = 1; t < NTAPS; t++) dl[t] <= dl[t-1];
        // pre-add on the new delay-line contents (x_i is x[n])
        for (int m = 0; m < NU - 1; m++) begin
          pre_i[m] <= (SW+1)'(m == 0 ? x_i.i : dl[m-1].i) + (SW+1)'(dl[NTAPS-2-m].i);
          pre_q[m] <= (SW+1)'(m == 0 ? x_i.q : dl[m-1].q) + (SW+1)'(dl[NTAPS-2-m].q);
        end
        pre_i[NU-1] <= (SW+1)'(dl[NU-2].i);
        pre_q[NU-1] <= (SW+1)'(dl[NU-2].q);
      end
    end
  end

  logic signed [47:0] acc_i, acc_q;
  always_comb begin
    acc_i = '0; acc_q = '0;
    for (int m = 0; m < NU; m++) begin
      acc_i += 48'(pre_i[m]) * coef[m];
      acc_q += 48'(pre_q[m]) * coef[m];
    end
  end

  function automatic logic signed [SW-1:0] rnd(input logic signed [47:0] v, input logic [4:0] sh);
    logic signed [48:0] r;
    r = 49'(v) + ((sh == 0) ? '0 : (49'sd1 <<< (sh - 1)));
    return sat16(64'(r >>> sh));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin valid_o <= 1'b0; y_o <= '0; end
    else begin
      valid_o <= v1;
      if (v1) begin
        y_o.i <= rnd(acc_i, shift);
        y_o.q <= rnd(acc_q, shift);
      end
    end
  end
endmodule
