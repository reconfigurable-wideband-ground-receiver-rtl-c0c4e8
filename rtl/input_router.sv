// Input router (the input FPGA of the receiver).
// Each 8-lane ADC word is forwarded, one clock later, to exactly one of two
// consumers: the filter-decimate front-end (symbol rates up to 40 MBd, which
// need at least 8:1 decimation) or the receiver core directly (40 to 320 MBd,
// decimation below 8:1). The path is chosen by the host from the data rate.
// The document gives this routing rule; the one-clock register stage is this
// design's choice.
module input_router
  import rwgr_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  path_t                   path,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_lane [LANES],
  output logic                    fd_valid,
  output logic                    dir_valid,
  output logic signed [ADC_W-1:0] lane_o [LANES]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      fd_valid <= 1'b0; dir_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) lane_o[l] <= '0;
    end else begin
      fd_valid  <= adc_valid && (path == PATH_FILTER_DECIMATE);
      dir_valid <= adc_valid && (path == PATH_DIRECT);
      if (adc_valid) for (int l = 0; l < LANES; l++) lane_o[l] <= adc_lane[l];
    end
  end
endmodule
