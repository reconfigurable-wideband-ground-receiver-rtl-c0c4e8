// Hardware receiver of the reconfigurable wideband ground receiver.
// An 8-bit ADC samples the IF at 1.28 GS/s and delivers 8 samples per
// 160 MHz clock. The input router sends each word either to the
// filter-decimate front-end (predict-driven 40-bit NCO, 2^k:1 decimation
// filter, k = 3..10, NTP time code) or, for high symbol rates, to the
// receiver core directly through a lane serializer. The receiver core
// front-end (open-loop mixer, coarse 1/2/4:1 decimation, quarter-band filter,
// fine interpolator, scaler) feeds both the integrate-and-dump port for the
// software demodulator and the 4 sample/symbol demodulator core (closed-loop
// carrier NCO, matched filter, resampler, Costas and Gardner loops, soft
// symbols to a RAM and a test port).
// In the hardware the filter-decimate output crosses to the core over a
// serial transceiver link; here it is wired directly. The core here handles
// one sample per clock, so the direct path runs at up to one ADC sample per
// clock (an 8-lane word at most every 8 clocks).
module rwgr_top
  import rwgr_pkg::*;
#(
  parameter int unsigned KMAX       = 10,
  parameter int unsigned PRED_DEPTH = 256,
  parameter int unsigned RAM_DEPTH  = 4096
) (
  input  logic                          clk,
  input  logic                          rst,
  // ADC (8 lanes per clock)
  input  logic                          adc_valid,
  input  logic signed [ADC_W-1:0]       adc_lane [ADC_LANES],
  input  path_t                         path,
  // filter-decimate configuration
  input  logic [39:0]                   if_fcw,
  input  logic [3:0]                    fd_k,
  input  logic [5:0]                    fd_shift,
  input  logic                          fd_coef_we,
  input  logic [KMAX+2:0]               fd_coef_idx,
  input  logic signed [17:0]            fd_coef_data,
  input  logic                          tbl_we,
  input  logic [$clog2(PRED_DEPTH)-1:0] tbl_addr,
  input  logic [31:0]                   tbl_time,
  input  logic signed [39:0]            tbl_fcw,
  input  logic [$clog2(PRED_DEPTH):0]   tbl_len,
  input  logic                          tbl_arm,
  input  logic                          pps,
  input  logic [31:0]                   utc_sec,
  // receiver core front-end configuration
  input  logic [31:0]                   core_mix_fcw,
  input  logic [1:0]                    core_dec_sel,
  input  logic                          core_qb_bypass,
  input  logic [16:0]                   core_df,
  input  logic [15:0]                   core_gain,
  input  logic [15:0]                   id_len,
  input  logic [4:0]                    id_shift,
  // demodulator configuration
  input  mod_t                          mode,
  input  logic                          mf_we,
  input  logic [3:0]                    mf_addr,
  input  logic signed [17:0]            mf_data,
  input  logic [4:0]                    mf_shift,
  input  logic signed [31:0]            alpha_c,
  input  logic signed [31:0]            beta_c,
  input  logic signed [31:0]            alpha_g,
  input  logic signed [31:0]            beta_g,
  input  logic [7:0]                    k0,
  // outputs
  output logic                          fd_valid_o,     // filter-decimate output and its time code
  output logic [63:0]                   fd_ntp,
  output logic                          doppler_update,
  output logic                          sw_valid,       // to the software demodulator
  output cplx_t                         sw_y,
  output logic                          core_valid,     // demodulator input samples
  output logic                          sym_valid,      // soft-symbol test port
  output cplx_t                         sym,
  input  logic [$clog2(RAM_DEPTH)-1:0]  ram_addr,
  output cplx_t                         ram_data,
  output logic [$clog2(RAM_DEPTH)-1:0]  ram_wr_ptr,
  output logic [9:0]                    car_phase,
  output logic [7:0]                    tau,
  output logic                          tim_adjust
);
  logic                    r_fd_v, r_dir_v, ser_v;
  logic signed [ADC_W-1:0] r_lane [ADC_LANES];
  cplx_t                   fd_y, ser_y, core_x;
  logic                    fifo_empty;

  input_router u_router (
    .clk, .rst, .path, .adc_valid, .adc_lane,
    .fd_valid(r_fd_v), .dir_valid(r_dir_v), .lane_o(r_lane));

  filter_decimate #(.KMAX(KMAX), .PRED_DEPTH(PRED_DEPTH)) u_fd (
    .clk, .rst, .adc_valid(r_fd_v), .adc_lane(r_lane),
    .if_fcw, .k(fd_k), .out_shift(fd_shift),
    .coef_we(fd_coef_we), .coef_idx(fd_coef_idx), .coef_data(fd_coef_data),
    .tbl_we, .tbl_addr, .tbl_time, .tbl_fcw, .tbl_len, .arm(tbl_arm), .pps, .utc_sec,
    .valid_o(fd_valid_o), .y_o(fd_y), .ntp_o(fd_ntp), .doppler_update);

  lane_serializer u_ser (
    .clk, .rst, .valid_i(r_dir_v), .lane_i(r_lane), .valid_o(ser_v), .y_o(ser_y));

  rx_frontend u_fe (
    .clk, .rst, .src(path), .mix_fcw(core_mix_fcw), .dec_sel(core_dec_sel),
    .qb_bypass(core_qb_bypass), .df(core_df), .gain(core_gain),
    .id_len, .id_shift,
    .dir_valid(ser_v), .dir_x(ser_y), .fd_valid(fd_valid_o), .fd_x(fd_y),
    .valid_o(core_valid), .y_o(core_x), .sw_valid, .sw_y);

  demod_core #(.RAM_DEPTH(RAM_DEPTH)) u_dm (
    .clk, .rst, .mode, .mf_we, .mf_addr, .mf_data, .mf_shift,
    .alpha_c, .beta_c, .alpha_g, .beta_g, .k0,
    .valid_i(core_valid), .x_i(core_x),
    .sym_valid, .sym, .ram_addr, .ram_data, .ram_wr_ptr,
    .car_phase, .tau, .tim_adjust, .fifo_empty);
endmodule
