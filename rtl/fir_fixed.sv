// Fixed-coefficient complex FIR filter with optional 2:1 decimation.
// NTAPS may be at most 16; COEFS holds the taps in its first NTAPS entries.
// Samples arrive one per clock at most, with valid_i; a NTAPS-deep delay line
// advances on each valid input. The output is
//   y = round( sum_t COEFS[t] * x[n-t] / 2^SHIFT ), saturated to 16 bits,
// computed for every input (DEC2 = 0) or for every second input (DEC2 = 1).
// Timing: valid_o one clock after the input that produced it.
// Used for the receiver core's half-band decimators and its quarter-band
// anti-aliasing filter; the coefficient sets are this design's choice.
module fir_fixed
  import rwgr_pkg::*;
#(
  parameter int unsigned NTAPS = 7,
  parameter int          COEFS [16] = '{-1, 0, 9, 16, 9, 0, -1, 0, 0, 0, 0, 0, 0, 0, 0, 0},  // first NTAPS used
  parameter int unsigned SHIFT = 5,
  parameter bit          DEC2  = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_i,
  input  cplx_t x_i,
  output logic  valid_o,
  output cplx_t y_o
);
  cplx_t dl [NTAPS];   // dl[0] is the newest sample
  logic  phase;
  logic signed [47:0] acc_i, acc_q;

  always_comb begin
    acc_i = 48'(COEFS[0]) * x_i.i;
    acc_q = 48'(COEFS[0]) * x_i.q;
    for (int t = 1; t < NTAPS; t++) begin
      acc_i += 48'(COEFS[t]) * dl[t-1].i;
      acc_q += 48'(COEFS[t]) * dl[t-1].q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0; valid_o <= 1'b0; y_o <= '0;
      for (int t = 0; t < NTAPS; t++) dl[t] <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        dl[0] <= x_i;
        for (int t = 1; t < NTAPS; t++) dl[t] <= dl[t-1];
        phase <= DEC2 ? ~phase : 1'b0;
        if (!DEC2 || phase) begin
          valid_o <= 1'b1;
          y_o.i <= sat16(64'((acc_i + (48'sd1 <<< (SHIFT-1))) >>> SHIFT));
          y_o.q <= sat16(64'((acc_q + (48'sd1 <<< (SHIFT-1))) >>> SHIFT));
        end
      end
    end
  end
endmodule
