// Doppler predict table for the open-loop, predict-driven NCO.
// The host loads a table of (UTC second, Doppler frequency word) entries,
// sorted by time, and pulses `arm`. At every 1 pps epoch the module compares
// the epoch's UTC time tag with the next table entry: an entry whose time has
// already passed is skipped, an entry for this second is loaded into
// doppler_fcw (and update pulses), a future entry waits. The NCO frequency is
// therefore updated at 1 Hz from the predicts, with no feedback from the signal.
// The table is a RAM with one-clock read latency; a pps epoch is handled within
// a few clocks, which is negligible against the one-second spacing.
// The document gives the function (predicts at 1 pps epochs, 1 Hz update);
// the table depth, entry format and skip rule are this design's choice.
module doppler_predict #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned FCW_W  = 40,
  parameter int unsigned TIME_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     tbl_we,
  input  logic [$clog2(DEPTH)-1:0] tbl_addr,
  input  logic [TIME_W-1:0]        tbl_time,
  input  logic signed [FCW_W-1:0]  tbl_fcw,
  input  logic [$clog2(DEPTH):0]   tbl_len,      // number of valid entries
  input  logic                     arm,          // restart from entry 0
  input  logic                     pps,          // one-clock pulse at each UTC second
  input  logic [TIME_W-1:0]        utc_sec,      // time tag of this epoch
  output logic signed [FCW_W-1:0]  doppler_fcw,
  output logic                     update
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [TIME_W-1:0]       t_mem [DEPTH];
  logic signed [FCW_W-1:0] f_mem [DEPTH];
  logic [AW:0]             ptr;
  logic [TIME_W-1:0]       nxt_time;
  logic signed [FCW_W-1:0] nxt_fcw;
  logic [TIME_W-1:0]       cur_sec;
  logic                    pending, rd_ok;

  always_ff @(posedge clk) begin
    if (tbl_we) begin
      t_mem[tbl_addr] <= tbl_time;
      f_mem[tbl_addr] <= tbl_fcw;
    end
    nxt_time <= t_mem[AW'(ptr)];
    nxt_fcw  <= f_mem[AW'(ptr)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0; pending <= 1'b0; rd_ok <= 1'b0; cur_sec <= '0;
      doppler_fcw <= '0; update <= 1'b0;
    end else begin
      update <= 1'b0;
      rd_ok  <= 1'b1;
      if (arm) begin
        ptr <= '0; pending <= 1'b0; rd_ok <= 1'b0;
      end else if (pps) begin
        pending <= 1'b1; cur_sec <= utc_sec;
      end else if (pending && rd_ok) begin
        if (ptr >= tbl_len || nxt_time > cur_sec) begin
          pending <= 1'b0;
        end else if (nxt_time < cur_sec) begin
          ptr <= ptr + 1'b1; rd_ok <= 1'b0;       // stale entry: skip it
        end else begin
          doppler_fcw <= nxt_fcw; update <= 1'b1;
          ptr <= ptr + 1'b1; rd_ok <= 1'b0; pending <= 1'b0;
        end
      end
    end
  end
endmodule
