// Random pushes and pops against a queue model: data order, empty, full and
// count must match; pushes only when not full, pops only when not empty.
`include "tb_macros.svh"
module sync_fifo_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [31:0] din, dout;
  logic [4:0] count;
  sync_fifo #(.WIDTH(32), .DEPTH(16)) dut (.*);
  `WATCHDOG(10000)
  logic [31:0] model [$];
  initial begin
    din = '0;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    for (int n = 0; n < 2000; n++) begin
      bit pu, po; logic [31:0] d;
      `CHECK(empty == (model.size() == 0) && full == (model.size() == 16) && count == 5'(model.size()),
             $sformatf("flags: size %0d count %0d", model.size(), count))
      if (!empty) `CHECK(dout == model[0], "head data")
      pu = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 35)) && !full;
      po = ($urandom_range(0, 1) == 1) && !empty;
      d = $urandom;
      push <= pu; pop <= po; din <= d;
      @(posedge clk); #1;
      if (po) void'(model.pop_front());
      if (pu) model.push_back(d);
    end
    `TB_DONE
  end
endmodule
