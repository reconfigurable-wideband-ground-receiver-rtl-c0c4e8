// Anti-aliasing low-pass filter in front of the fine interpolator.
// An 11-tap linear-phase FIR with cut-off at a quarter of the sampling rate,
// coefficients (3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3)/512, unity gain at
// DC. Because the fine decimation factor stays below 2, this band edge keeps
// the interpolator output free of aliases while passing the whole telemetry
// band of a signal sampled at 4 or more samples per symbol. With bypass set
// the input is only registered. Timing: one clock, one sample per clock.
// The cut-off follows the document; the length and coefficients are this
// design's choice.
module quarterband_filter
  import rwgr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  bypass,
  input  logic  valid_i,
  input  cplx_t x_i,
  output logic  valid_o,
  output cplx_t y_o
);
  logic  vf;
  cplx_t yf;
  fir_fixed #(.NTAPS(11), .COEFS('{3, 0, -25, 0, 150, 256, 150, 0, -25, 0, 3, 0, 0, 0, 0, 0}),
              .SHIFT(9), .DEC2(1'b0)) u_fir (
    .clk, .rst, .valid_i, .x_i, .valid_o(vf), .y_o(yf));

  logic  vb;
  cplx_t yb;
  always_ff @(posedge clk) begin
    if (rst) begin vb <= 1'b0; yb <= '0; end
    else begin vb <= valid_i; yb <= x_i; end
  end
  assign valid_o = bypass ? vb : vf;
  assign y_o     = bypass ? yb : yf;
endmodule
