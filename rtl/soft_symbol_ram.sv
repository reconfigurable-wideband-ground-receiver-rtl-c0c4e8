// Soft-symbol RAM buffer: a circular buffer of DEPTH complex soft symbols.
// Each incoming soft symbol is written at wr_ptr, which then advances and
// wraps. The host reads any entry through rd_addr, with one clock of latency,
// and sees wr_ptr to know where the newest symbol is. The document names the
// buffer; depth and addressing are this design's choice.
module soft_symbol_ram
  import rwgr_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     valid_i,
  input  cplx_t                    x_i,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output cplx_t                    rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr
);
  cplx_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (valid_i) mem[wr_ptr] <= x_i;
    rd_data <= mem[rd_addr];
  end
  always_ff @(posedge clk) begin
    if (rst) wr_ptr <= '0;
    else if (valid_i) wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
