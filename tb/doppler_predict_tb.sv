// Loads five predicts (seconds 100, 101, 102, 104, 105), then sends pps
// epochs for seconds 99 .. 105 and checks which epochs load which frequency:
// none at 99, the matching entry at 100..102, none at 103, and at 104 the
// entry for 104. A re-arm followed by an epoch at 102 must skip the stale
// entries 100 and 101 and load 102.
`include "tb_macros.svh"
module doppler_predict_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tbl_we = 0, arm = 0, pps = 0, update;
  logic [7:0] tbl_addr;
  logic [31:0] tbl_time, utc_sec;
  logic signed [39:0] tbl_fcw, doppler_fcw;
  logic [8:0] tbl_len = 9'd5;
  doppler_predict dut (.*);
  `WATCHDOG(5000)
  int times [5] = '{100, 101, 102, 104, 105};
  function automatic longint f_of(int t); return longint'(t) * 1000 - 50000; endfunction
  int nupd;
  always @(posedge clk) if (!rst && update) nupd++;

  task automatic epoch(int sec, bit expect_load);
    int n_before;
    n_before = nupd;
    utc_sec <= 32'(sec); pps <= 1; @(posedge clk); pps <= 0;
    repeat (20) @(posedge clk);
    `CHECK((nupd - n_before) == (expect_load ? 1 : 0), $sformatf("epoch %0d: %0d updates", sec, nupd - n_before))
    if (expect_load) `CHECK(doppler_fcw == 40'(f_of(sec)), $sformatf("epoch %0d: fcw %0d", sec, doppler_fcw))
  endtask

  initial begin
    nupd = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int e = 0; e < 5; e++) begin
      tbl_we <= 1; tbl_addr <= 8'(e); tbl_time <= 32'(times[e]); tbl_fcw <= 40'(f_of(times[e]));
      @(posedge clk);
    end
    tbl_we <= 0; arm <= 1; @(posedge clk); arm <= 0;
    epoch(99, 0);
    epoch(100, 1);
    epoch(101, 1);
    epoch(102, 1);
    epoch(103, 0);
    `CHECK(doppler_fcw == 40'(f_of(102)), "value held between predicts")
    epoch(104, 1);
    arm <= 1; @(posedge clk); arm <= 0; @(posedge clk);
    epoch(102, 1);
    `TB_DONE
  end
endmodule
