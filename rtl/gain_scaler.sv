// Programmable gain after the fine interpolator:
//   y = saturate( round( x * gain / 2^GAIN_FRAC ) )
// on both arms, so the demodulator and the integrate-and-dump path see a
// signal of known level whatever the decimation chain did to it.
// gain is unsigned with GAIN_FRAC fraction bits (1.0 = 2^GAIN_FRAC).
// Timing: one clock, one sample per clock. The document only says the signal
// is scaled; the format is this design's choice.
module gain_scaler
  import rwgr_pkg::*;
#(
  parameter int unsigned GAIN_W    = 16,
  parameter int unsigned GAIN_FRAC = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [GAIN_W-1:0] gain,
  input  logic              valid_i,
  input  cplx_t             x_i,
  output logic              valid_o,
  output cplx_t             y_o
);
  function automatic logic signed [SW-1:0] mul(input logic signed [SW-1:0] a, input logic [GAIN_W-1:0] g);
    logic signed [SW+GAIN_W+1:0] p;
    p = (SW+GAIN_W+2)'(a) * $signed({1'b0, g}) + (SW+GAIN_W+2)'(1 <<< (GAIN_FRAC-1));
    return sat16(64'(p >>> GAIN_FRAC));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin valid_o <= 1'b0; y_o <= '0; end
    else begin
      valid_o <= valid_i;
      if (valid_i) begin
        y_o.i <= mul(x_i.i, gain);
        y_o.q <= mul(x_i.q, gain);
      end
    end
  end
endmodule
