// 4 sample/symbol demodulator core for QPSK and OQPSK.
// Data path: complex baseband at 4 samples per symbol -> carrier rotator
// (closed-loop NCO) -> 17-tap matched filter on I and Q -> signal resampler
// (half symbols at 2 per symbol, timing from the Gardner loop) -> half-symbol
// FIFO -> tracking loops and soft-symbol output.
// Carrier loop: the Costas detector gives one error per two symbols, the
// loop filter integrates it, and bits [CAR_LSB+PHASE_W-1:CAR_LSB] of its
// output, negated, are the rotator phase. The negation lets the document's
// negative default alpha close the loop with negative feedback.
// Timing loop: the Gardner detector and its loop filter give tau (1/16
// symbol) = bits [TIM_LSB+TAU_W-1:TIM_LSB] of the filter output, which the
// resampler adds to the fixed offset k0.
// Loop delay: each loop's error reaches its loop filter L-1 updates late
// (L_C = 5, L_G = 7 by default, the delays quoted for these loops), on top of
// the one update the pipeline itself takes, so the linearised loop is
// A z^-L F(z) with the document's L.
// The half symbols leave the FIFO as soon as it holds one. Soft symbols
// (one per symbol, I staggered for OQPSK) go to the test port and to a RAM.
// The loop gain of each loop is alpha times the detector gain times the bit
// position chosen here; CAR_LSB and TIM_LSB are this design's choice, set
// so that the default alpha gives a stable loop for half-symbol amplitudes
// of a few thousand.
module demod_core
  import rwgr_pkg::*;
#(
  parameter int unsigned PHASE_W  = 10,
  parameter int unsigned TAU_W    = 8,
  parameter int unsigned ERR_W    = 24,
  parameter int unsigned LF_W     = 48,
  parameter int unsigned CAR_LSB  = 24,
  parameter int unsigned TIM_LSB  = 24,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned L_C      = 5,   // Costas loop delay, in loop updates
  parameter int unsigned L_G      = 7,   // Gardner loop delay, in loop updates
  parameter int unsigned RAM_DEPTH  = 4096
) (
  input  logic                         clk,
  input  logic                         rst,
  // configuration
  input  mod_t                         mode,
  input  logic                         mf_we,
  input  logic [3:0]                   mf_addr,
  input  logic signed [17:0]           mf_data,
  input  logic [4:0]                   mf_shift,
  input  logic signed [31:0]           alpha_c,
  input  logic signed [31:0]           beta_c,
  input  logic signed [31:0]           alpha_g,
  input  logic signed [31:0]           beta_g,
  input  logic [TAU_W-1:0]             k0,
  // samples in
  input  logic                         valid_i,
  input  cplx_t                        x_i,
  // soft symbols
  output logic                         sym_valid,
  output cplx_t                        sym,
  input  logic [$clog2(RAM_DEPTH)-1:0] ram_addr,
  output cplx_t                        ram_data,
  output logic [$clog2(RAM_DEPTH)-1:0] ram_wr_ptr,
  // loop state for monitoring
  output logic [PHASE_W-1:0]           car_phase,
  output logic [TAU_W-1:0]             tau,
  output logic                         tim_adjust,
  output logic                         fifo_empty
);
  logic signed [LF_W-1:0] lf_c, lf_g;
  logic  rot_v, mf_v, rs_v, hs_v, ce_v, ge_v;
  cplx_t rot_x, mf_x, rs_x, hs_x;
  logic signed [ERR_W-1:0] ce, ge;
  logic [31:0] fifo_dout;
  logic fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  assign car_phase = -lf_c[CAR_LSB +: PHASE_W];
  assign tau       = lf_g[TIM_LSB +: TAU_W];

  cplx_rotator #(.PHASE_W(PHASE_W)) u_rot (
    .clk, .rst, .valid_i, .x_i, .phase_i(car_phase), .valid_o(rot_v), .y_o(rot_x));

  matched_filter u_mf (
    .clk, .rst, .coef_we(mf_we), .coef_addr(mf_addr), .coef_data(mf_data), .shift(mf_shift),
    .valid_i(rot_v), .x_i(rot_x), .valid_o(mf_v), .y_o(mf_x));

  signal_resampler #(.TAU_W(TAU_W)) u_rs (
    .clk, .rst, .tau, .k0, .valid_i(mf_v), .x_i(mf_x), .valid_o(rs_v), .y_o(rs_x),
    .adjust(tim_adjust));

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push(rs_v), .din(rs_x), .pop(hs_v), .dout(fifo_dout),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count));
  assign hs_v = !fifo_empty;
  assign hs_x = cplx_t'(fifo_dout);

  costas_detector #(.ERR_W(ERR_W)) u_cd (
    .clk, .rst, .mode, .valid_i(hs_v), .x_i(hs_x), .err_valid(ce_v), .err(ce));
  gardner_detector #(.ERR_W(ERR_W)) u_gd (
    .clk, .rst, .mode, .valid_i(hs_v), .x_i(hs_x), .err_valid(ge_v), .err(ge));

  // Loop delay. The detector-to-estimate path above already takes one loop
  // update; each loop adds L-1 more by delaying its error by L-1 updates
  // (a shift register that moves on each error strobe, cleared by reset).
  logic signed [ERR_W-1:0] ce_dl [L_C];
  logic signed [ERR_W-1:0] ge_dl [L_G];
  logic signed [ERR_W-1:0] ce_f, ge_f;
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < L_C; i++) ce_dl[i] <= '0;
      for (int i = 0; i < L_G; i++) ge_dl[i] <= '0;
    end else begin
      if (ce_v) begin
        ce_dl[0] <= ce;
        for (int i = 1; i < L_C; i++) ce_dl[i] <= ce_dl[i-1];
      end
      if (ge_v) begin
        ge_dl[0] <= ge;
        for (int i = 1; i < L_G; i++) ge_dl[i] <= ge_dl[i-1];
      end
    end
  end
  assign ce_f = (L_C > 1) ? ce_dl[L_C-2] : ce;
  assign ge_f = (L_G > 1) ? ge_dl[L_G-2] : ge;

  loop_filter #(.ERR_W(ERR_W), .ACC_W(LF_W)) u_lfc (
    .clk, .rst, .alpha(alpha_c), .beta(beta_c), .err_valid(ce_v), .err(ce_f), .out(lf_c));
  loop_filter #(.ERR_W(ERR_W), .ACC_W(LF_W)) u_lfg (
    .clk, .rst, .alpha(alpha_g), .beta(beta_g), .err_valid(ge_v), .err(ge_f), .out(lf_g));

  soft_symbol_out u_so (
    .clk, .rst, .mode, .valid_i(hs_v), .x_i(hs_x), .valid_o(sym_valid), .y_o(sym));

  soft_symbol_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk, .rst, .valid_i(sym_valid), .x_i(sym), .rd_addr(ram_addr), .rd_data(ram_data),
    .wr_ptr(ram_wr_ptr));
endmodule
