// Complex rotator: y = x * exp(-j*phase), the multiplier behind every mixer.
// The phase word addresses a cosine/sine table (full turn = 2^PHASE_W); the
// products are rounded back to 16 bits and saturated:
//   y.i = ( x.i*cos + x.q*sin) / 2^(AMP_W-1)
//   y.q = ( x.q*cos - x.i*sin) / 2^(AMP_W-1)
// Timing: fully pipelined, one sample per clock, valid_o follows valid_i by
// two clocks (table read, then multiply).
module cplx_rotator
  import rwgr_pkg::*;
#(
  parameter int unsigned PHASE_W = 10,
  parameter int unsigned AMP_W   = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid_i,
  input  cplx_t              x_i,
  input  logic [PHASE_W-1:0] phase_i,
  output logic               valid_o,
  output cplx_t              y_o
);
  logic signed [AMP_W-1:0] c, s;
  cplx_t x_d;
  logic  v_d;

  sincos_lut #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_lut (
    .clk(clk), .phase(phase_i), .cos_o(c), .sin_o(s));

  always_ff @(posedge clk) begin
    if (rst) begin
      v_d <= 1'b0; valid_o <= 1'b0;
      x_d <= '0;   y_o <= '0;
    end else begin
      v_d     <= valid_i;
      x_d     <= x_i;
      valid_o <= v_d;
      y_o.i   <= sat16(64'((64'(x_d.i) * c + 64'(x_d.q) * s + (64'sd1 <<< (AMP_W-2))) >>> (AMP_W-1)));
      y_o.q   <= sat16(64'((64'(x_d.q) * c - 64'(x_d.i) * s + (64'sd1 <<< (AMP_W-2))) >>> (AMP_W-1)));
    end
  end
endmodule
