// With a 1 kHz clock (so a second is 1000 clocks), checks that a pps with
// UTC second S gives NTP seconds S + 2208988800 and fraction 0, that the
// fraction reaches k/1000 of 2^32 after k clocks, and that the seconds step
// on by themselves when a pps is missing.
`include "tb_macros.svh"
module ntp_timecode_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pps = 0;
  logic [31:0] utc_sec;
  logic [63:0] ntp_time;
  ntp_timecode #(.CLK_HZ(1000)) dut (.*);
  `WATCHDOG(10000)
  initial begin
    longint exp_frac;
    repeat (2) @(posedge clk); rst <= 0;
    utc_sec <= 32'd1700000000; pps <= 1; @(posedge clk); pps <= 0; #1;
    `CHECK(ntp_time[63:32] == 32'd1700000000 + 32'd2208988800, "seconds converted")
    `CHECK(ntp_time[31:0] == 0, "fraction zero at the epoch")
    for (int k = 1; k <= 999; k++) begin
      @(posedge clk); #1;
      exp_frac = (longint'(k) << 32) / 1000;
      if (k % 50 == 0)
        `CHECK(ntp_time[63:32] == 32'd3908988800 && (longint'(ntp_time[31:0]) - exp_frac) <= 1 && (exp_frac - longint'(ntp_time[31:0])) <= 1,
               $sformatf("k=%0d frac=%0d exp %0d", k, ntp_time[31:0], exp_frac))
    end
    @(posedge clk); #1;   // 1000 clocks, no pps
    `CHECK(ntp_time[63:32] == 32'd3908988801, $sformatf("free-running second: %0d", ntp_time[63:32]))
    `CHECK(ntp_time[31:0] < 32'd10, "fraction wrapped")
    `TB_DONE
  end
endmodule
