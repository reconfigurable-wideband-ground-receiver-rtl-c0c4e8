// Front-end of the high-rate receiver core.
// Selects its input stream: the serialized direct ADC samples (high rates) or
// the filter-decimate output (low rates). The selected stream is mixed by an
// open-loop NCO (frequency set by the host, not predict-driven; zero for
// the already-mixed filter-decimate stream), decimated coarsely by 1, 2 or 4,
// low-pass filtered at a quarter of its rate (or not, with qb_bypass) and
// decimated finely by D_F in [1, 2) in the linear interpolator. The result
// is scaled, then goes both to the demodulator core and, through an
// integrate-and-dump stage, to the software demodulator port.
// Overall decimation D = D_C * D_F, D_C a power of two made of the
// filter-decimate factor and this coarse stage.
// All streams are one complex sample per clock at most, qualified by valid.
// The chain follows the document; the order of the scaler before the
// integrate-and-dump split and the 32-bit NCO are this design's choice.
module rx_frontend
  import rwgr_pkg::*;
#(
  parameter int unsigned NCO_W  = 32,
  parameter int unsigned FRAC_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  // configuration
  input  path_t             src,         // which stream feeds the core
  input  logic [NCO_W-1:0]  mix_fcw,     // open-loop mixer frequency word
  input  logic [1:0]        dec_sel,     // coarse decimation 1, 2, 4
  input  logic              qb_bypass,
  input  logic [FRAC_W:0]   df,          // fine decimation factor
  input  logic [15:0]       gain,        // 4.12 unsigned
  input  logic [15:0]       id_len,
  input  logic [4:0]        id_shift,
  // input streams
  input  logic              dir_valid,
  input  cplx_t             dir_x,
  input  logic              fd_valid,
  input  cplx_t             fd_x,
  // outputs
  output logic              valid_o,     // to the demodulator core
  output cplx_t             y_o,
  output logic              sw_valid,    // to the software demodulator
  output cplx_t             sw_y
);
  logic  sel_v;
  cplx_t sel_x [1];
  always_ff @(posedge clk) begin
    if (rst) begin sel_v <= 1'b0; sel_x[0] <= '0; end
    else begin
      sel_v    <= (src == PATH_DIRECT) ? dir_valid : fd_valid;
      sel_x[0] <= (src == PATH_DIRECT) ? dir_x : fd_x;
    end
  end

  logic  mix_v, cd_v, qb_v, fi_v;
  cplx_t mix_x [1];
  cplx_t cd_x, qb_x, fi_x;

  nco_mixer #(.LANES(1), .ACC_W(NCO_W)) u_mix (
    .clk, .rst, .fcw(mix_fcw), .valid_i(sel_v), .x_i(sel_x), .valid_o(mix_v), .y_o(mix_x));

  coarse_decimator u_cd (
    .clk, .rst, .dec_sel, .valid_i(mix_v), .x_i(mix_x[0]), .valid_o(cd_v), .y_o(cd_x));

  quarterband_filter u_qb (
    .clk, .rst, .bypass(qb_bypass), .valid_i(cd_v), .x_i(cd_x), .valid_o(qb_v), .y_o(qb_x));

  fine_interpolator #(.FRAC_W(FRAC_W)) u_fi (
    .clk, .rst, .df, .valid_i(qb_v), .x_i(qb_x), .valid_o(fi_v), .y_o(fi_x));

  gain_scaler u_gs (
    .clk, .rst, .gain, .valid_i(fi_v), .x_i(fi_x), .valid_o, .y_o);

  integrate_dump u_id (
    .clk, .rst, .len(id_len), .shift(id_shift), .valid_i(valid_o), .x_i(y_o),
    .valid_o(sw_valid), .y_o(sw_y));
endmodule
