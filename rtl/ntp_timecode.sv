// UTC 1 pps time tag to NTP time code.
// At each pps pulse the UTC second (counted from 1970-01-01, Unix style) is
// turned into NTP seconds (counted from 1900-01-01) by adding 2,208,988,800,
// and the 32-bit NTP fraction restarts at zero. Between pulses a 64-bit
// fraction accumulator advances by 2^64 / CLK_HZ per clock, so the fraction
// is the elapsed part of the second to better than one clock; if a pulse is
// missing the seconds count on by themselves when the fraction wraps.
// The output is a 64-bit NTP timestamp {seconds, fraction} that the
// filter-decimate front-end attaches to its decimated samples.
// The document gives the conversion's purpose; the epoch convention of the
// UTC input and the fraction method are this design's choice.
module ntp_timecode #(
  parameter longint unsigned CLK_HZ = 160_000_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pps,
  input  logic [31:0] utc_sec,
  output logic [63:0] ntp_time
);
  localparam logic [31:0] NTP_UNIX_OFFSET = 32'd2208988800;
  // rounded up, so CLK_HZ steps always carry into the seconds
  localparam logic [63:0] FRAC_STEP = 64'hFFFF_FFFF_FFFF_FFFF / 64'(CLK_HZ) + 64'd1;
  logic [31:0] sec;
  logic [63:0] frac;
  logic [64:0] nxt;

  assign nxt = {1'b0, frac} + {1'b0, FRAC_STEP};

  always_ff @(posedge clk) begin
    if (rst) begin
      sec <= '0; frac <= '0;
    end else if (pps) begin
      sec <= utc_sec + NTP_UNIX_OFFSET; frac <= '0;
    end else begin
      frac <= nxt[63:0];
      if (nxt[64]) sec <= sec + 32'd1;
    end
  end
  assign ntp_time = {sec, frac[63:32]};
endmodule
