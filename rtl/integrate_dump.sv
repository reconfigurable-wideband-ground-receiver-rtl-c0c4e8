// Integrate-and-dump decimator feeding the software demodulator.
// Sums `len` consecutive complex samples (len >= 1), then emits the sum
// shifted right by `shift` with rounding and saturation, and starts again.
// This lowers the rate by any integer factor for the low-rate software path.
// Timing: the output leaves one clock after the len-th input.
// The document names the operation; the widths and controls are this
// design's choice.
module integrate_dump
  import rwgr_pkg::*;
#(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [LEN_W-1:0] len,
  input  logic [4:0]       shift,
  input  logic             valid_i,
  input  cplx_t            x_i,
  output logic             valid_o,
  output cplx_t            y_o
);
  localparam int unsigned AW = SW + LEN_W;
  logic signed [AW-1:0] acc_i, acc_q, sum_i, sum_q;
  logic [LEN_W-1:0]     cnt;

  assign sum_i = acc_i + AW'(x_i.i);
  assign sum_q = acc_q + AW'(x_i.q);

  function automatic logic signed [SW-1:0] dump(input logic signed [AW-1:0] v, input logic [4:0] sh);
    logic signed [AW:0] r;
    r = (AW+1)'(v) + ((sh == 0) ? '0 : ((AW+1)'(1) <<< (sh - 1)));
    return sat16(64'(r >>> sh));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i <= '0; acc_q <= '0; cnt <= '0; valid_o <= 1'b0; y_o <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        if (cnt + 1'b1 >= len) begin
          valid_o <= 1'b1;
          y_o.i <= dump(sum_i, shift);
          y_o.q <= dump(sum_q, shift);
          acc_i <= '0; acc_q <= '0; cnt <= '0;
        end else begin
          acc_i <= sum_i; acc_q <= sum_q; cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
