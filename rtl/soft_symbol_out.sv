// Soft-symbol output: half symbols in, one 16-bit complex soft symbol per
// symbol out. Every second half symbol (the odd ones of each group, the
// on-time samples) becomes a soft symbol. For QPSK its I and Q are taken
// together; for OQPSK the I arm is staggered, delayed by one half symbol,
// so the symbol pairs I[n] with Q[n+1], the on-time samples of the two
// offset arms. The half-symbol phase is counted from reset, like the loops'.
// Timing: valid_o one clock after the odd half symbol.
module soft_symbol_out
  import rwgr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  mod_t  mode,
  input  logic  valid_i,
  input  cplx_t x_i,
  output logic  valid_o,
  output cplx_t y_o
);
  logic signed [SW-1:0] i_prev;
  logic odd;
  always_ff @(posedge clk) begin
    if (rst) begin
      i_prev <= '0; odd <= 1'b0; valid_o <= 1'b0; y_o <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        i_prev <= x_i.i;
        odd    <= ~odd;
        if (odd) begin
          valid_o <= 1'b1;
          y_o     <= '{i: (mode == MOD_OQPSK) ? i_prev : x_i.i, q: x_i.q};
        end
      end
    end
  end
endmodule
