// Coarse decimation of the receiver core: by 1, 2 or 4.
// Two cascaded 7-tap half-band filters, each keeping every second output,
// coefficients (-1, 0, 9, 16, 9, 0, -1)/32 (unity gain at DC, a zero at half
// the sampling rate). dec_sel = 0 passes the input through a register,
// 1 takes the first stage's output, 2 the second stage's.
// Timing: valid_o follows the input that completes an output by 1, 1 or 2
// clocks. The document gives only the rates 2:1 and 4:1; the filters are this
// design's choice.
module coarse_decimator
  import rwgr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] dec_sel,   // 0: 1:1, 1: 2:1, 2: 4:1
  input  logic       valid_i,
  input  cplx_t      x_i,
  output logic       valid_o,
  output cplx_t      y_o
);
  logic  v1, v2;
  cplx_t y1, y2;

  fir_fixed #(.NTAPS(7), .COEFS('{-1, 0, 9, 16, 9, 0, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0}), .SHIFT(5), .DEC2(1'b1)) u_hb1 (
    .clk, .rst, .valid_i, .x_i, .valid_o(v1), .y_o(y1));
  fir_fixed #(.NTAPS(7), .COEFS('{-1, 0, 9, 16, 9, 0, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0}), .SHIFT(5), .DEC2(1'b1)) u_hb2 (
    .clk, .rst, .valid_i(v1), .x_i(y1), .valid_o(v2), .y_o(y2));

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0; y_o <= '0;
    end else begin
      unique case (dec_sel)
        2'd1:    begin valid_o <= v1;      y_o <= y1;  end
        2'd2:    begin valid_o <= v2;      y_o <= y2;  end
        default: begin valid_o <= valid_i; y_o <= x_i; end
      endcase
    end
  end
endmodule
