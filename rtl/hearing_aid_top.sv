// hearing_aid_top: one digital hearing-aid channel with adaptive spectral
// sharpening, H(z) = (1 - A(z/beta)) / (1 - A(z/gamma)), 0 < beta < gamma < 1.
// An adaptive gradient lattice decorrelator estimates the reflection
// coefficients k_1..k_M of the speech every sample; an FIR lattice analysis
// filter (beta) and an all-pole lattice synthesis filter (gamma) reuse them.
// The analysis filter flattens the formants almost completely (small beta),
// the synthesis filter restores them more strongly (larger gamma), so the net
// effect emphasises the formants, which helps listeners with reduced
// frequency selectivity.
// mode selects one of two arrangements, sampled with each sample:
//   MODE_SPEECH_ENH (0): x -> FIR high-pass -> decorrelator;
//                        x -> analysis -> synthesis -> loudness control -> out
//   MODE_NOISE_RED  (1): x -> decorrelator;
//                        x -> IIR high-pass -> analysis -> synthesis -> out
// Both high-pass filters run on every sample, so a switch finds them settled.
// Interface: adc_valid/adc_code take one 14-bit offset-binary sample (8 kS/s)
// when ready is high; dac_valid/dac_code deliver the 12-bit offset-binary
// output 5 clocks later in both arrangements. ready drops for the coefficient
// update: the next sample may come 37 (speech enhancement) or 36 (noise
// reduction) clocks after the previous one; the analysis and synthesis filters of sample n use the
// coefficients produced after sample n-1. k_coef shows the current set.
// Structure, arrangements and parameter values (M = 8 stages, beta = 0.04,
// gamma = 0.6, eta = 0.98) follow the design; the handshake, fixed-point
// formats and the internals of the loudness control are this
// implementation's.
module hearing_aid_top
  import ha_pkg::*;
#(
  parameter int         STAGES   = 8,
  parameter sample_t    BETA_Q7  = 8'sd5,
  parameter sample_t    GAMMA_Q7 = 8'sd77,
  parameter logic [9:0] ETA_Q8   = 10'd251
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ha_mode_e             mode,
  input  logic                 adc_valid,
  input  logic [13:0]          adc_code,
  output logic                 ready,
  output logic                 dac_valid,
  output logic [11:0]          dac_code,
  output sample_t [STAGES-1:0] k_coef
);

  // ---- input ----
  logic     x_valid;
  sample_t  x;
  ha_mode_e mode_r;

  adc_interface u_adc (
    .clk, .rst_n, .adc_valid, .adc_code,
    .x_valid (x_valid), .x_out (x)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         mode_r <= MODE_SPEECH_ENH;
    else if (adc_valid) mode_r <= mode;
  end

  logic se;
  assign se = (mode_r == MODE_SPEECH_ENH);

  // ---- high-pass filters ----
  logic    fir_valid, iir_valid;
  sample_t x_fir, x_iir;

  fir_highpass u_fir (
    .clk, .rst_n, .in_valid (x_valid), .x_in (x),
    .out_valid (fir_valid), .y_out (x_fir)
  );

  iir_highpass u_iir (
    .clk, .rst_n, .in_valid (x_valid), .x_in (x),
    .out_valid (iir_valid), .y_out (x_iir)
  );

  // ---- adaptive decorrelator ----
  logic    dec_valid, dec_busy, k_valid, clamp_seen;
  sample_t dec_x, dec_e;

  assign dec_valid = se ? fir_valid : x_valid;
  assign dec_x     = se ? x_fir     : x;

  adaptive_decorrelator #(.STAGES(STAGES), .ETA_Q8(ETA_Q8)) u_dec (
    .clk, .rst_n,
    .in_valid   (dec_valid),
    .x_in       (dec_x),
    .busy       (dec_busy),
    .k          (k_coef),
    .k_valid    (k_valid),
    .e_out      (dec_e),
    .clamp_seen (clamp_seen)
  );

  // ---- analysis and synthesis lattices ----
  logic    ana_in_valid, ana_valid, syn_valid;
  sample_t ana_x, ana_y, syn_y;

  assign ana_in_valid = se ? x_valid : iir_valid;
  assign ana_x        = se ? x       : x_iir;

  analysis_filter #(.STAGES(STAGES), .BETA_Q7(BETA_Q7)) u_ana (
    .clk, .rst_n,
    .in_valid (ana_in_valid), .x_in (ana_x), .k (k_coef),
    .out_valid (ana_valid), .y_out (ana_y)
  );

  synthesis_filter #(.STAGES(STAGES), .GAMMA_Q7(GAMMA_Q7)) u_syn (
    .clk, .rst_n,
    .in_valid (ana_valid), .x_in (ana_y), .k (k_coef),
    .out_valid (syn_valid), .y_out (syn_y)
  );

  // ---- loudness control (speech enhancement only) ----
  logic       lc_valid, lc_busy;
  sample_t    lc_y;
  logic [7:0] lc_gain;

  loudness_control u_lc (
    .clk, .rst_n,
    .ref_valid (x_valid & se), .ref_in (x),
    .y_valid   (syn_valid & se), .y_in (syn_y),
    .out_valid (lc_valid), .y_out (lc_y),
    .gain      (lc_gain), .busy (lc_busy)
  );

  // ---- output ----
  logic    out_valid;
  sample_t out_y;
  assign out_valid = se ? lc_valid : syn_valid;
  assign out_y     = se ? lc_y     : syn_y;

  dac_interface u_dac (
    .clk, .rst_n, .y_valid (out_valid), .y_in (out_y),
    .dac_valid, .dac_code
  );

  // ---- sample handshake ----
  // One sample is in flight from adc_valid until its coefficient update ends.
  logic in_flight;
  always_ff @(posedge clk) begin
    if (!rst_n)         in_flight <= 1'b0;
    else if (adc_valid) in_flight <= 1'b1;
    else if (k_valid)   in_flight <= 1'b0;
  end
  assign ready = !in_flight && !dec_busy && !lc_busy;

  // A sample offered while not ready would corrupt the coefficient update.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    adc_valid |-> ready);

endmodule
