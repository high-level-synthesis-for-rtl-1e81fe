// fx_pkg: number formats shared by the frequency translator and power meter.
//
// Every data path carries 16-bit signed fixed point with 6 integer bits and
// 10 fractional bits (Q6.10). Results are truncated (the low bits are simply
// dropped, i.e. rounded towards minus infinity) and saturated on overflow.
// The phase path is a 13-bit unsigned integer that wraps around: its 3 MSBs
// select one of eight 45-degree segments of the circle and its 10 LSBs
// address the sine and cosine tables. These formats follow the design
// specification; the helper functions are this implementation's own.
package fx_pkg;

  localparam int DATA_W  = 16;  // sample word length
  localparam int FRAC_W  = 10;  // fractional bits of a sample
  localparam int PHASE_W = 13;  // accumulator / phase word length
  localparam int ADDR_W  = 10;  // sine/cosine table address bits
  localparam int SEG_W   = PHASE_W - ADDR_W;  // segment bits (eighths of a turn)

  localparam int SAMPLE_MAX = (1 << (DATA_W - 1)) - 1;
  localparam int SAMPLE_MIN = -(1 << (DATA_W - 1));

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic [PHASE_W-1:0]       phase_t;

  // One complex sample: i is the real part, q the imaginary part.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // Clamp a wide signed value into the Q6.10 sample range.
  function automatic sample_t saturate(input logic signed [47:0] x);
    if (x > 48'(SAMPLE_MAX))      return sample_t'(SAMPLE_MAX);
    else if (x < 48'(SAMPLE_MIN)) return sample_t'(SAMPLE_MIN);
    else                          return sample_t'(x);
  endfunction

endpackage
