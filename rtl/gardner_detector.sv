// Gardner symbol timing error detector on half symbols, one result per group
// of four half symbols n .. n+3 (two symbols):
//   QPSK : e = (I[n+1]-I[n-1])I[n]   + (Q[n+1]-Q[n-1])Q[n]
//            + (I[n+3]-I[n+1])I[n+2] + (Q[n+3]-Q[n+1])Q[n+2]
//   OQPSK: e = (I[n]-I[n-2])I[n-1]   + (Q[n+1]-Q[n-1])Q[n]
//            + (I[n+2]-I[n])I[n+1]   + (Q[n+3]-Q[n+1])Q[n+2]
// In OQPSK the I arm leads the Q arm by half a symbol, so its
// transition samples sit one half symbol earlier. The sum is shifted right by
// SHIFT to keep the loop-filter multiplier small. The group boundary is kept
// by a counter of input half symbols from reset (the same as the Costas
// detector's, as both see the same stream).
// Timing: err_valid one clock after the last half symbol of a group.
module gardner_detector
  import rwgr_pkg::*;
#(
  parameter int unsigned ERR_W = 24,
  parameter int unsigned SHIFT = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  mod_t                    mode,
  input  logic                    valid_i,
  input  cplx_t                   x_i,
  output logic                    err_valid,
  output logic signed [ERR_W-1:0] err
);
  cplx_t w [5];        // w[0] = n+2 ... w[4] = n-2 once n+3 arrives
  logic [1:0] ph;
  logic signed [39:0] s;

  function automatic logic signed [39:0] g(input logic signed [SW-1:0] late, input logic signed [SW-1:0] early,
                                           input logic signed [SW-1:0] mid);
    return 40'(40'(late) - 40'(early)) * 40'(mid);
  endfunction

  always_comb begin
    if (mode == MOD_QPSK)
      s = g(w[1].i, w[3].i, w[2].i) + g(w[1].q, w[3].q, w[2].q)
        + g(x_i.i,  w[1].i, w[0].i) + g(x_i.q,  w[1].q, w[0].q);
    else
      s = g(w[2].i, w[4].i, w[3].i) + g(w[1].q, w[3].q, w[2].q)
        + g(w[0].i, w[2].i, w[1].i) + g(x_i.q,  w[1].q, w[0].q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0; err_valid <= 1'b0; err <= '0;
      for (int i = 0; i < 5; i++) w[i] <= '0;
    end else begin
      err_valid <= 1'b0;
      if (valid_i) begin
        w[0] <= x_i;
        for (int i = 1; i < 5; i++) w[i] <= w[i-1];
        ph <= ph + 2'd1;
        if (ph == 2'd3) begin
          err_valid <= 1'b1;
          err <= ERR_W'(s >>> SHIFT);
        end
      end
    end
  end
endmodule
