// Numerically controlled oscillator and baseband mixer for LANES parallel
// samples per clock (the filter-decimate front-end runs 8 lanes of a
// 1.28 GS/s stream at 160 MHz; the receiver core uses one lane).
// A phase accumulator of ACC_W bits advances by LANES*fcw per input word;
// lane l uses phase + l*fcw, so the LANES samples of a word see consecutive
// phases of one oscillator. Writing a new fcw changes only the step, never the
// phase, so retuning is phase continuous. The top PHASE_W bits of each lane
// phase drive a complex rotator, which multiplies the sample by
// exp(-j*2*pi*phase/2^ACC_W) (down-conversion to baseband).
// Frequency resolution is f_sample / 2^ACC_W; with the document's 40-bit
// accumulator at 1.28 GHz that is 1.16 mHz.
// Timing: valid_o follows valid_i by two clocks.
module nco_mixer
  import rwgr_pkg::*;
#(
  parameter int unsigned LANES   = 8,
  parameter int unsigned ACC_W   = 40,
  parameter int unsigned PHASE_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ACC_W-1:0] fcw,        // frequency control word: f / f_sample * 2^ACC_W
  input  logic             valid_i,
  input  cplx_t            x_i [LANES],
  output logic             valid_o,
  output cplx_t            y_o [LANES]
);
  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] lane_ph [LANES];

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else if (valid_i) acc <= acc + ACC_W'(LANES) * fcw;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) lane_ph[l] = acc + ACC_W'(l) * fcw;
  end

  logic [LANES-1:0] v_lane;
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cplx_rotator #(.PHASE_W(PHASE_W)) u_rot (
      .clk(clk), .rst(rst), .valid_i(valid_i), .x_i(x_i[l]),
      .phase_i(lane_ph[l][ACC_W-1 -: PHASE_W]),
      .valid_o(v_lane[l]), .y_o(y_o[l]));
  end
  assign valid_o = v_lane[0];
endmodule
