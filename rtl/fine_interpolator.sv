// Linear (first-order Farrow) fine interpolator: decimation by a continuous
// factor D_F, 1 <= D_F < 2, given as the unsigned fixed-point word
// df = D_F * 2^FRAC_W.
// Output n is the input at the fractional position D_F*n = q + r:
//   y[n] = x[q] + r * (x[q+1] - x[q])
// The module keeps t, the position of the next output measured from the
// previous input sample x[m-1], with FRAC_W fraction bits. When x[m] arrives:
// if t < 1 the output lies between x[m-1] and x[m] and is emitted with r = t,
// after which t += D_F - 1; otherwise t -= 1 (no output this time). Because
// D_F >= 1 there is at most one output per input. The running position is
// exact, so the only error is the quantisation of D_F.
// Timing: valid_o one clock after the input x[q+1].
// The computation follows the document; the fixed-point widths are this
// design's choice.
module fine_interpolator
  import rwgr_pkg::*;
#(
  parameter int unsigned FRAC_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [FRAC_W:0]   df,       // D_F in [1, 2), FRAC_W fraction bits
  input  logic              valid_i,
  input  cplx_t             x_i,
  output logic              valid_o,
  output cplx_t             y_o
);
  logic [FRAC_W:0]  t;       // position of the next output relative to x[m-1]
  cplx_t            x1;      // x[m-1]
  logic             primed;
  logic [FRAC_W-1:0] r;

  assign r = t[FRAC_W-1:0];

  function automatic logic signed [SW-1:0] lerp(input logic signed [SW-1:0] a,
                                                input logic signed [SW-1:0] b,
                                                input logic [FRAC_W-1:0] f);
    logic signed [SW+FRAC_W+2:0] p;
    p = (SW+FRAC_W+3)'(b - 17'(a)) * $signed({1'b0, f});
    p = p + (SW+FRAC_W+3)'(1 <<< (FRAC_W-1));
    return sat16(64'(a) + 64'(p >>> FRAC_W));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      t <= '0; x1 <= '0; primed <= 1'b0; valid_o <= 1'b0; y_o <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        x1     <= x_i;
        primed <= 1'b1;
        if (primed) begin
          if (!t[FRAC_W]) begin
            valid_o <= 1'b1;
            y_o.i   <= lerp(x1.i, x_i.i, r);
            y_o.q   <= lerp(x1.q, x_i.q, r);
            t       <= t + df - (FRAC_W+1)'(1 << FRAC_W);
          end else begin
            t       <= t - (FRAC_W+1)'(1 << FRAC_W);
          end
        end
      end
    end
  end
endmodule
