// Synchronous first-in first-out buffer with show-ahead read: dout is the
// oldest entry whenever empty is low, and pop removes it. push and pop may
// happen on the same clock. Writing when full or reading when empty is a
// protocol error caught by assertions. DEPTH must be a power of two.
// In the demodulator it holds the half symbols between the resampler and the
// tracking loops; its depth is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  always_ff @(posedge clk) begin
    if (rst) begin wp <= '0; rp <= '0; end
    else begin
      if (push) begin mem[wp[AW-1:0]] <= din; wp <= wp + 1'b1; end
      if (pop)  rp <= rp + 1'b1;
    end
  end
  assign dout  = mem[rp[AW-1:0]];
  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop))
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty)
    else $error("sync_fifo: pop while empty");
endmodule
