// ha_pkg: shared types, constants and fixed-point helpers of the hearing-aid
// datapath. Every audio sample, lattice signal and reflection coefficient is an
// 8-bit two's-complement number read as a Q0.7 fraction (value/128); the
// 8-bit sample width follows the design's 8-bit sample format, Q0.7 scaling,
// floor rounding and saturation are choices of this implementation.
package ha_pkg;

  localparam int DATA_W = 8;   // sample / coefficient width
  localparam int FRAC   = 7;   // fractional bits of a Q0.7 value
  localparam int PROD_W = 2 * DATA_W;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Processing arrangement of the channel.
  typedef enum logic {
    MODE_SPEECH_ENH = 1'b0,  // high-pass before the decorrelator, loudness control
    MODE_NOISE_RED  = 1'b1   // high-pass before analysis/synthesis, no loudness control
  } ha_mode_e;

  localparam sample_t SAMPLE_MAX = sample_t'(2**(DATA_W-1) - 1);
  localparam sample_t SAMPLE_MIN = sample_t'(-(2**(DATA_W-1)));

  // Saturate a wide signed value to the 8-bit sample range.
  function automatic sample_t sat8(input logic signed [31:0] v);
    if (v > 32'sd127)       return SAMPLE_MAX;
    else if (v < -32'sd128) return SAMPLE_MIN;
    else                    return sample_t'(v);
  endfunction

  // Q0.14 product back to Q0.7 (arithmetic shift, i.e. floor), widened for sums.
  function automatic logic signed [31:0] q7(input prod_t p);
    return 32'(p >>> FRAC);
  endfunction

endpackage
