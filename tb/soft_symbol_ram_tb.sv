// Writes 300 soft symbols into a 256-entry buffer (so it wraps), then reads
// all entries back: each must hold the newest symbol written to it, and the
// write pointer must be 300 mod 256.
`include "tb_macros.svh"
module soft_symbol_ram_tb;
  import rwgr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic valid_i = 0;
  cplx_t x_i, rd_data;
  logic [7:0] rd_addr, wr_ptr;
  soft_symbol_ram #(.DEPTH(256)) dut (.*);
  `WATCHDOG(10000)
  cplx_t model [256];
  initial begin
    x_i = '0; rd_addr = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 300; n++) begin
      cplx_t v;
      v = '{i: 16'($urandom), q: 16'($urandom)};
      model[n % 256] = v;
      x_i <= v; valid_i <= 1; @(posedge clk);
      if (n % 4 == 0) begin valid_i <= 0; @(posedge clk); end
    end
    valid_i <= 0; @(posedge clk); #1;
    `CHECK(wr_ptr == 8'(300 % 256), $sformatf("write pointer %0d", wr_ptr))
    for (int a = 0; a < 256; a++) begin
      rd_addr <= 8'(a); @(posedge clk); #1;
      `CHECK(rd_data == model[a], $sformatf("entry %0d", a))
    end
    `TB_DONE
  end
endmodule
