// Filter-decimate front-end for the lower symbol rates.
// Eight real 8-bit ADC lanes per clock (1.28 GS/s at 160 MHz) are mixed to
// complex baseband by a 40-bit, 8-lane NCO whose frequency is the IF word
// plus the Doppler predict in force, then low-pass filtered and decimated by
// 2^k (k = 3 .. 10) with host-written taps. Since at most one result leaves
// per clock, the smallest decimation is 8:1. Each output carries the NTP time
// code of the moment it left, derived from the UTC 1 pps time tag.
// Timing: the decimated sample leaves 4 clocks after the input word that
// completes its block (2 in the mixer, 2 in the filter).
// The structure follows the document; the IF word added to the predicts and
// the input scaling (ADC code placed in the top byte of a 16-bit word) are
// this design's choice.
module filter_decimate
  import rwgr_pkg::*;
#(
  parameter int unsigned LANES   = 8,
  parameter int unsigned ACC_W   = 40,
  parameter int unsigned KMAX    = 10,
  parameter int unsigned COEF_W  = 18,
  parameter int unsigned PRED_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  // ADC lanes
  input  logic                          adc_valid,
  input  logic signed [ADC_W-1:0]       adc_lane [LANES],
  // configuration
  input  logic [ACC_W-1:0]              if_fcw,
  input  logic [3:0]                    k,
  input  logic [5:0]                    out_shift,
  input  logic                          coef_we,
  input  logic [KMAX+2:0]               coef_idx,
  input  logic signed [COEF_W-1:0]      coef_data,
  // Doppler predicts and time
  input  logic                          tbl_we,
  input  logic [$clog2(PRED_DEPTH)-1:0] tbl_addr,
  input  logic [31:0]                   tbl_time,
  input  logic signed [ACC_W-1:0]       tbl_fcw,
  input  logic [$clog2(PRED_DEPTH):0]   tbl_len,
  input  logic                          arm,
  input  logic                          pps,
  input  logic [31:0]                   utc_sec,
  // decimated output
  output logic                          valid_o,
  output cplx_t                         y_o,
  output logic [63:0]                   ntp_o,
  output logic                          doppler_update
);
  logic signed [ACC_W-1:0] doppler_fcw;
  logic [ACC_W-1:0]        fcw;
  cplx_t                   adc_c [LANES];
  cplx_t                   mix [LANES];
  logic                    mix_v;
  logic [63:0]             ntp_now;

  doppler_predict #(.DEPTH(PRED_DEPTH), .FCW_W(ACC_W)) u_pred (
    .clk, .rst, .tbl_we, .tbl_addr, .tbl_time, .tbl_fcw, .tbl_len, .arm,
    .pps, .utc_sec, .doppler_fcw, .update(doppler_update));

  ntp_timecode u_ntp (.clk, .rst, .pps, .utc_sec, .ntp_time(ntp_now));

  assign fcw = if_fcw + ACC_W'(doppler_fcw);

  always_comb
    for (int l = 0; l < LANES; l++) adc_c[l] = '{i: {adc_lane[l], (SW-ADC_W)'(0)}, q: '0};

  nco_mixer #(.LANES(LANES), .ACC_W(ACC_W)) u_nco (
    .clk, .rst, .fcw, .valid_i(adc_valid), .x_i(adc_c), .valid_o(mix_v), .y_o(mix));

  decim_filter #(.LANES(LANES), .KMAX(KMAX), .COEF_W(COEF_W)) u_dec (
    .clk, .rst, .k, .out_shift, .coef_we, .coef_idx, .coef_data,
    .valid_i(mix_v), .x_i(mix), .valid_o, .y_o);

  always_ff @(posedge clk) begin
    if (rst) ntp_o <= '0;
    else if (valid_o) ntp_o <= ntp_now;
  end
endmodule
