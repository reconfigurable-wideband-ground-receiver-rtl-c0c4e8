// Random ADC words on random paths: each word must appear one clock later on
// exactly the selected consumer's valid, with the lanes unchanged.
`include "tb_macros.svh"
module input_router_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  path_t path;
  logic adc_valid = 0, fd_valid, dir_valid;
  logic signed [7:0] adc_lane [8], lane_o [8];
  input_router dut (.*);
  `WATCHDOG(5000)
  initial begin
    logic signed [7:0] w [8]; path_t p; bit v;
    for (int l = 0; l < 8; l++) adc_lane[l] = '0;
    path = PATH_FILTER_DECIMATE;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 300; n++) begin
      v = 1'($urandom_range(0, 3) != 0); p = path_t'($urandom_range(0, 1));
      for (int l = 0; l < 8; l++) w[l] = 8'($urandom);
      adc_valid <= v; path <= p;
      for (int l = 0; l < 8; l++) adc_lane[l] <= w[l];
      @(posedge clk); #1;
      `CHECK(fd_valid == (v && p == PATH_FILTER_DECIMATE) && dir_valid == (v && p == PATH_DIRECT), "valid routing")
      if (v) for (int l = 0; l < 8; l++) `CHECK(lane_o[l] == w[l], $sformatf("lane %0d forwarded: %0d exp %0d", l, lane_o[l], w[l]))
    end
    `TB_DONE
  end
endmodule
