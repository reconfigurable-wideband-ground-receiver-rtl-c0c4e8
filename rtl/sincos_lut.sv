// Cosine/sine table addressed by phase.
// The phase word spans one full turn (0 .. 2^PHASE_W - 1 maps to 0 .. 2*pi).
// The table holds round(AMP * cos) and round(AMP * sin) for every phase and is
// computed at elaboration from a constant function, so it becomes a ROM.
// Timing: one clock of latency from phase to cos/sin.
// The document names the oscillators but not their table; size and amplitude
// are this design's choice.
module sincos_lut #(
  parameter int unsigned PHASE_W = 10,
  parameter int unsigned AMP_W   = 16,
  parameter int          AMP     = 32767
) (
  input  logic                    clk,
  input  logic [PHASE_W-1:0]      phase,
  output logic signed [AMP_W-1:0] cos_o,
  output logic signed [AMP_W-1:0] sin_o
);
  localparam int unsigned N = 1 << PHASE_W;
  typedef logic signed [AMP_W-1:0] tab_t [N];

  function automatic tab_t make_tab(input bit want_sin);
    tab_t t;
    real pi, a;
    pi = 3.14159265358979323846;
    for (int k = 0; k < N; k++) begin
      a = 2.0 * pi * real'(k) / real'(N);
      t[k] = AMP_W'($rtoi(real'(AMP) * (want_sin ? $sin(a) : $cos(a)) + (want_sin ? ($sin(a) >= 0.0 ? 0.5 : -0.5) : ($cos(a) >= 0.0 ? 0.5 : -0.5))));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB = make_tab(1'b0);
  localparam tab_t SIN_TAB = make_tab(1'b1);

  always_ff @(posedge clk) begin
    cos_o <= COS_TAB[phase];
    sin_o <= SIN_TAB[phase];
  end
endmodule
