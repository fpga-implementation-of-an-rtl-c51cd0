// fir_highpass: direct-form (tapped delay line) FIR high-pass filter,
//   y(n) = sum_k c_k x(n-k),  k = 0..TAPS-1,
// placed in front of the adaptive decorrelator in the speech-enhancement
// arrangement to offset the spectral tilt of speech. Every tap has its own
// booth_wallace_mult; the Q0.14 products are summed at full precision,
// shifted back to Q0.7 (floor) and saturated to 8 bits.
// Interface: one in_valid strobe per sample; the output is registered and
// appears with out_valid on the next cycle (latency 1 clock).
// The 6-tap length and the 700 Hz cut-off at 8 kS/s follow the design; the
// coefficient values are this implementation's own type-IV (zero at DC)
// least-squares design, stop band 0-450 Hz and pass band 900-4000 Hz,
// quantised to Q0.7: {2, 18, 78, -78, -18, -2}.
module fir_highpass
  import ha_pkg::*;
#(
  parameter int      TAPS        = 6,
  parameter sample_t COEFS [TAPS] = '{8'sd2, 8'sd18, 8'sd78, -8'sd78, -8'sd18, -8'sd2}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output logic    out_valid,
  output sample_t y_out
);

  sample_t taps [TAPS];     // taps[0] = x(n), taps[k] = x(n-k)
  sample_t dly  [1:TAPS-1]; // delay line registers
  prod_t   prod [TAPS];

  assign taps[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign taps[k] = dly[k];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul (
      .a (taps[k]),
      .b (COEFS[k]),
      .p (prod[k])
    );
  end

  logic signed [31:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += 32'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) dly[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[1] <= x_in;
        for (int k = 2; k < TAPS; k++) dly[k] <= dly[k-1];
        y_out <= sat8(acc >>> FRAC);
      end
    end
  end

endmodule
