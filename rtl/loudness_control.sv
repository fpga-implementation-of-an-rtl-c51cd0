// loudness_control: keeps the loudness of the sharpened output close to that
// of the microphone signal, removing the signal-dependent gain of the
// spectral-sharpening filter (speech-enhancement arrangement only).
// Two envelope followers track the mean magnitude of the reference input and
// of the sharpened signal,
//   env += (|s| * 256 - env) / 2^ENV_SHIFT     (16-bit, first-order low-pass),
// and after every output sample a seq_divider forms gain = env_ref / env_y in
// unsigned Q2.6 (0 .. 255/64), clamped to 8 bits. The output sample is
// y * gain, shifted back and saturated, using the gain of the previous
// division; the gain starts at 1.0 and is held while env_y is 0.
// Interface: ref_valid/ref_in carry the input samples, y_valid/y_in the
// sharpened ones; out_valid/y_out follow y_valid by one clock. The gain
// division takes 24 clocks (busy); the next y_valid must come after it.
// Only the block's purpose and place come from the design description; the
// envelope followers, the ratio gain and all sizes are this implementation's.
module loudness_control
  import ha_pkg::*;
#(
  parameter int ENV_SHIFT = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ref_valid,
  input  sample_t    ref_in,
  input  logic       y_valid,
  input  sample_t    y_in,
  output logic       out_valid,
  output sample_t    y_out,
  output logic [7:0] gain,
  output logic       busy
);

  localparam int GF = 6;  // fractional bits of gain

  logic [15:0] env_ref, env_y;

  function automatic logic [15:0] env_next(input logic [15:0] env, input sample_t s);
    logic [15:0]        mag;
    logic signed [17:0] d;
    mag = (s < 0) ? 16'(-32'(s)) << 8 : 16'(s) << 8;
    d   = 18'($signed({2'b00, mag})) - 18'($signed({2'b00, env}));
    return 16'($signed(18'($signed({2'b00, env}))) + (d >>> ENV_SHIFT));
  endfunction

  // ---- output scaling ----
  logic signed [DATA_W+9:0] p_g;
  booth_wallace_mult #(.A_W(DATA_W), .B_W(10)) u_mul_g (
    .a (y_in), .b (signed'({2'b00, gain})), .p (p_g)
  );

  // ---- gain division ----
  logic               div_busy, div_done, div_start;
  logic signed [9:0]  q;
  logic [15:0]        env_y_new;
  assign env_y_new = env_next(env_y, y_in);
  assign div_start = y_valid && (env_y_new != '0);

  seq_divider #(.N_W(24), .D_W(16), .Q_W(10)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (signed'({2'b00, env_ref, 6'b000000})),
    .divisor  (env_y_new),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      env_ref   <= '0;
      env_y     <= '0;
      gain      <= 8'(1 << GF);
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= y_valid;
      if (ref_valid) env_ref <= env_next(env_ref, ref_in);
      if (y_valid) begin
        env_y <= env_y_new;
        y_out <= sat8(32'(p_g) >>> GF);
      end
      if (div_done) gain <= (q > 10'sd255) ? 8'd255 : 8'(q);
    end
  end

  assign busy = div_busy | div_done;

endmodule
