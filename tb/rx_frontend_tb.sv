// Receiver core front-end, two configurations.
// 1) Direct path: a complex tone at f_s/8 of amplitude 8000, mixer at f_s/8,
//    coarse 4:1, quarter-band filter on, D_F = 1.5, gain 1.0: the output must
//    settle at (8000, 0) within 1 %, at one output per 6 inputs, and the
//    integrate-and-dump (length 4, shift 2) must give the same value.
// 2) Filter-decimate path: constant (3000, -2000), no mixing, 1:1, filter
//    bypassed, D_F = 1, gain 2.0: every output is exactly (6000, -4000), one
//    per input, while the direct input (active at the same time) is ignored.
`include "tb_macros.svh"
module rx_frontend_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  path_t src;
  logic [31:0] mix_fcw;
  logic [1:0] dec_sel;
  logic qb_bypass;
  logic [16:0] df;
  logic [15:0] gain, id_len = 16'd4;
  logic [4:0] id_shift = 5'd2;
  logic dir_valid = 0, fd_valid = 0, valid_o, sw_valid;
  cplx_t dir_x, fd_x, y_o, sw_y;
  rx_frontend dut (.*);
  `WATCHDOG(50000)
  int nout, nsw;
  cplx_t last, last_sw;
  always @(posedge clk) if (!rst && valid_o) begin nout++; last = y_o; end
  always @(posedge clk) if (!rst && sw_valid) begin nsw++; last_sw = sw_y; end
  initial begin
    dir_x = '0; fd_x = '0;
    // ---- 1: direct path
    src = PATH_DIRECT; mix_fcw = 32'h2000_0000; dec_sel = 2'd2; qb_bypass = 0;
    df = 17'd98304; gain = 16'd4096; nout = 0; nsw = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int m = 0; m < 6000; m++) begin
      real a;
      a = 2.0 * 3.14159265358979 * m / 8.0;
      dir_x <= '{i: 16'($rtoi(8000.0 * $cos(a))), q: 16'($rtoi(8000.0 * $sin(a)))}; dir_valid <= 1;
      @(posedge clk);
      if (m > 3000 && valid_o)
        `CHECK(y_o.i > 7920 && y_o.i < 8080 && y_o.q > -80 && y_o.q < 80, $sformatf("direct: %0d,%0d", y_o.i, y_o.q))
    end
    dir_valid <= 0; repeat (20) @(posedge clk);
    `CHECK(nout >= 999 && nout <= 1001, $sformatf("direct: %0d outputs for 6000 inputs", nout))
    `CHECK(nsw >= 249 && nsw <= 251, $sformatf("direct: %0d integrate-and-dump outputs", nsw))
    `CHECK(last_sw.i > 7920 && last_sw.i < 8080, $sformatf("integrate-and-dump %0d", last_sw.i))
    // ---- 2: filter-decimate path
    rst <= 1; src <= PATH_FILTER_DECIMATE; mix_fcw <= '0; dec_sel <= 2'd0; qb_bypass <= 1;
    df <= 17'd65536; gain <= 16'd8192; @(posedge clk); @(posedge clk); rst <= 0;
    nout = 0;
    for (int m = 0; m < 500; m++) begin
      fd_x <= '{i: 16'sd3000, q: -16'sd2000}; fd_valid <= (m % 3 != 0);
      dir_x <= '{i: 16'sd100, q: 16'sd100}; dir_valid <= 1;
      @(posedge clk);
      if (m > 20 && valid_o) `CHECK(y_o.i == 16'sd6000 && y_o.q == -16'sd4000, $sformatf("fd path: %0d,%0d", y_o.i, y_o.q))
    end
    fd_valid <= 0; dir_valid <= 0; repeat (20) @(posedge clk);
    `CHECK(nout >= 331 && nout <= 333, $sformatf("fd path: %0d outputs for 333 inputs", nout))
    `TB_DONE
  end
endmodule
