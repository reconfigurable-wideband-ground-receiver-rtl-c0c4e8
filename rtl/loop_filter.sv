// Second-order tracking-loop filter
//   F(z) = alpha/(1 - z^-1) + beta/(1 - z^-1)^2
// realised as two accumulators updated once per error sample e:
//   v   <= v + beta*e
//   out <= out + alpha*e + (v + beta*e)
// so out is alpha times the running sum of e plus beta times its double sum.
// The output is the loop's estimate (carrier phase or symbol timing); the
// caller takes the bits it needs, and both accumulators wrap, as a phase
// should. alpha and beta are host registers; the document's defaults are
// alpha = -10^4 and beta = 0 for both loops.
// Timing: out changes one clock after err_valid.
module loop_filter #(
  parameter int unsigned ERR_W = 24,
  parameter int unsigned K_W   = 32,
  parameter int unsigned ACC_W = 48
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [K_W-1:0]   alpha,
  input  logic signed [K_W-1:0]   beta,
  input  logic                    err_valid,
  input  logic signed [ERR_W-1:0] err,
  output logic signed [ACC_W-1:0] out
);
  logic signed [ACC_W-1:0] v, v_next;
  assign v_next = v + ACC_W'(beta * err);
  always_ff @(posedge clk) begin
    if (rst) begin v <= '0; out <= '0; end
    else if (err_valid) begin
      v   <= v_next;
      out <= out + ACC_W'(alpha * err) + v_next;
    end
  end
endmodule
