// Sends 8-lane words every 8 to 11 clocks and checks that the lanes come out
// one per clock, lane 0 first, as the top byte of the in-phase word.
`include "tb_macros.svh"
module lane_serializer_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic valid_i = 0, valid_o;
  logic signed [7:0] lane_i [8];
  cplx_t y_o;
  lane_serializer dut (.*);
  `WATCHDOG(10000)
  logic signed [7:0] exp_q [$];
  int nout = 0;
  always @(posedge clk) if (!rst && valid_o) begin
    logic signed [7:0] e;
    e = exp_q.pop_front();
    `CHECK(y_o.i == {e, 8'h00} && y_o.q == 0, $sformatf("sample %0d: %0d exp %0d", nout, y_o.i, e))
    nout++;
  end
  initial begin
    for (int l = 0; l < 8; l++) lane_i[l] = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int w = 0; w < 100; w++) begin
      for (int l = 0; l < 8; l++) begin lane_i[l] <= 8'($urandom); end
      valid_i <= 1; @(posedge clk); valid_i <= 0;
      for (int l = 0; l < 8; l++) exp_q.push_back(lane_i[l]);
      repeat (7 + (w % 4)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    `CHECK(nout == 800, $sformatf("%0d samples", nout))
    `TB_DONE
  end
endmodule
