// Polarity-type Costas carrier phase error detector on half symbols.
// The loop updates once per two symbols, i.e. per group of four half symbols
// n .. n+3 (n+1 and n+3 are the on-time samples for QPSK):
//   QPSK : e = Q[n+1]sgn(I[n+1]) - I[n+1]sgn(Q[n+1]) + Q[n+3]sgn(I[n+3]) - I[n+3]sgn(Q[n+3])
//   OQPSK: e = Q[n]sgn(I[n])     - I[n+1]sgn(Q[n+1]) + Q[n+2]sgn(I[n+2]) - I[n+3]sgn(Q[n+3])
// with sgn(0) = +1. A sample x times sgn(y) is just x or -x.
// The group boundary is kept by a counter of input half symbols from reset.
// Timing: err_valid one clock after the last half symbol of a group.
// The equations are the document's; the widths are this design's.
module costas_detector
  import rwgr_pkg::*;
#(
  parameter int unsigned ERR_W = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  mod_t                    mode,
  input  logic                    valid_i,
  input  cplx_t                   x_i,
  output logic                    err_valid,
  output logic signed [ERR_W-1:0] err
);
  cplx_t w [3];        // w[0] = n+2, w[1] = n+1, w[2] = n once n+3 arrives
  logic [1:0] ph;

  function automatic logic signed [ERR_W-1:0] xs(input logic signed [SW-1:0] x, input logic signed [SW-1:0] y);
    return (y < 0) ? -ERR_W'(x) : ERR_W'(x);    // x * sgn(y)
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0; err_valid <= 1'b0; err <= '0;
      for (int i = 0; i < 3; i++) w[i] <= '0;
    end else begin
      err_valid <= 1'b0;
      if (valid_i) begin
        w[0] <= x_i; w[1] <= w[0]; w[2] <= w[1];
        ph <= ph + 2'd1;
        if (ph == 2'd3) begin
          err_valid <= 1'b1;
          if (mode == MOD_QPSK)
            err <= xs(w[1].q, w[1].i) - xs(w[1].i, w[1].q) + xs(x_i.q, x_i.i) - xs(x_i.i, x_i.q);
          else
            err <= xs(w[2].q, w[2].i) - xs(w[1].i, w[1].q) + xs(w[0].q, w[0].i) - xs(x_i.i, x_i.q);
        end
      end
    end
  end
endmodule
