// Closed-loop signal resampler: matched-filter samples (4 per symbol) in,
// half symbols (2 per symbol) out, at the timing the Gardner loop asks for.
// Conceptually the input is upsampled by 4 with linear interpolation (1/16
// symbol resolution), delayed by the timing estimate tau plus a fixed offset
// k0 (both in 1/16 symbol), and decimated by 8. Only the samples that survive
// the decimation are computed: T, the time of the next output in quarter
// samples relative to the newest input, drops by 4 per input; when it reaches
// the interval (-4, 0] the output is interpolated between the two newest
// inputs with weight (T+4)/4, and T advances by 8 (half a symbol) plus the
// change of tau + k0 since the previous output. That change is limited to
// +-3 per output (any excess is applied on later outputs), so outputs never
// crowd closer than 5/4 input samples and at most one leaves per input.
// Timing: valid_o one clock after the input that completes an output.
// The interpolation, resolution and decimation follow the document; the
// output-time bookkeeping is this design's own.
module signal_resampler
  import rwgr_pkg::*;
#(
  parameter int unsigned TAU_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [TAU_W-1:0] tau,     // Gardner loop estimate, 1/16 symbol, wraps
  input  logic [TAU_W-1:0] k0,      // fixed timing offset, 1/16 symbol
  input  logic             valid_i,
  input  cplx_t            x_i,
  output logic             valid_o,
  output cplx_t            y_o,
  output logic             adjust   // pulses when an output moved off the nominal grid
);
  logic signed [5:0]  t_q;           // next output time, quarter samples
  logic [TAU_W-1:0]   tau_last;
  cplx_t              x1;
  logic signed [5:0]  t_new;
  logic signed [TAU_W-1:0] dtau;
  logic signed [2:0]  step;

  assign t_new = t_q - 6'sd4;
  assign dtau  = $signed(tau + k0 - tau_last);
  assign step  = (dtau > 3) ? 3'sd3 : (dtau < -3) ? -3'sd3 : 3'(dtau);

  function automatic logic signed [SW-1:0] lerp4(input logic signed [SW-1:0] a,
                                                 input logic signed [SW-1:0] b,
                                                 input logic [2:0] f);
    logic signed [SW+3:0] s;
    s = (SW+4)'(a) * $signed({1'b0, 3'd4 - f}) + (SW+4)'(b) * $signed({1'b0, f});
    return SW'((s + 2) >>> 2);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      t_q <= 6'sd4; tau_last <= '0; x1 <= '0;
      valid_o <= 1'b0; y_o <= '0; adjust <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      adjust  <= 1'b0;
      if (valid_i) begin
        x1 <= x_i;
        if (t_new <= 0) begin
          valid_o  <= 1'b1;
          y_o.i    <= lerp4(x1.i, x_i.i, 3'(t_new + 6'sd4));
          y_o.q    <= lerp4(x1.q, x_i.q, 3'(t_new + 6'sd4));
          t_q      <= t_new + 6'sd8 + 6'(step);
          tau_last <= tau_last + TAU_W'(step);
          adjust   <= (step != 0);
        end else begin
          t_q <= t_new;
        end
      end
    end
  end
endmodule
