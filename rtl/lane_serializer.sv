// Lane serializer for the direct (high-rate) path into the receiver core.
// The receiver core here processes one complex sample per clock. An 8-lane
// ADC word is captured and its lanes are sent out in order, lane 0 first, on
// the following LANES clocks; a new word may arrive at the earliest on the
// clock that sends the last lane of the previous one (checked by an
// assertion). Each 8-bit ADC code becomes the in-phase part of a complex
// sample, placed in the top byte of the 16-bit word; the quadrature part is 0.
// This block is this design's own: the document does not say how the core's
// front-end consumes the 8-lane word.
module lane_serializer
  import rwgr_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    valid_i,
  input  logic signed [ADC_W-1:0] lane_i [LANES],
  output logic                    valid_o,
  output cplx_t                   y_o
);
  logic signed [ADC_W-1:0] buf_q [LANES];
  logic [$clog2(LANES):0]  left;     // lanes still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      left <= '0; valid_o <= 1'b0; y_o <= '0;
      for (int l = 0; l < LANES; l++) buf_q[l] <= '0;
    end else begin
      valid_o <= 1'b0;
      if (left != 0) begin
        valid_o <= 1'b1;
        y_o     <= '{i: {buf_q[0], (SW-ADC_W)'(0)}, q: '0};
        for (int l = 0; l < LANES-1; l++) buf_q[l] <= buf_q[l+1];
        left    <= left - 1'b1;
      end
      if (valid_i) begin
        buf_q <= lane_i;
        left  <= ($clog2(LANES)+1)'(LANES);
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst) valid_i |-> left <= 1)
    else $error("lane_serializer: word arrived before the previous one was sent");
endmodule
