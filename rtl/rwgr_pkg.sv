// Shared types and constants of the wideband receiver.
// A complex sample is a pair of signed 16-bit words (in-phase, quadrature);
// every stage from the baseband mixers to the soft-symbol output carries this
// format. The ADC delivers 8-bit real samples as 8 lanes per 160 MHz clock.
package rwgr_pkg;
  localparam int unsigned ADC_W   = 8;    // ADC resolution (document: 8-bit ADC)
  localparam int unsigned ADC_LANES = 8;  // 1.28 GS/s demultiplexed to 8 lanes at 160 MHz
  localparam int unsigned SW      = 16;   // complex sample word width (own choice)

  typedef struct packed {
    logic signed [SW-1:0] i;
    logic signed [SW-1:0] q;
  } cplx_t;

  // Which processing chain the input router feeds.
  typedef enum logic {
    PATH_FILTER_DECIMATE = 1'b0,  // low rates: 8:1 .. 1024:1 coarse decimation first
    PATH_DIRECT          = 1'b1   // high rates: straight to the receiver core
  } path_t;

  // Constellation the demodulator is configured for.
  typedef enum logic {
    MOD_QPSK  = 1'b0,
    MOD_OQPSK = 1'b1
  } mod_t;

  // Default loop-filter coefficients of both tracking loops (alpha, beta).
  localparam int ALPHA_DEFAULT = -10000;
  localparam int BETA_DEFAULT  = 0;

  // Saturate a wide signed value to SW bits.
  function automatic logic signed [SW-1:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767) return 16'sd32767;
    else if (v < -64'sd32768) return -16'sd32768;
    else return v[SW-1:0];
  endfunction
endpackage
