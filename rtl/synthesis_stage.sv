// synthesis_stage: one stage of the all-pole (IIR) lattice,
//   g'(n)      = gamma * g_{m-1}(n-1)
//   f_{m-1}(n) = f_m(n) + k_m * g'(n)
//   g_m(n)     = g'(n)  - k_m * f_{m-1}(n)
// The upper path runs from the stage above (f_in = f_m) to the stage below
// (f_out = f_{m-1}); the lower path register loads g_in = g_{m-1}(n) from the
// stage below on each in_valid strobe. Outputs are combinational. Three 8 x 8
// booth_wallace_mult; Q0.7 floor rounding and 8-bit saturation.
// The stage equations and the gamma multiplication after each delay element
// follow the design; gamma = 77/128 = 0.602 approximates its 0.6.
module synthesis_stage
  import ha_pkg::*;
#(
  parameter sample_t GAMMA_Q7 = 8'sd77
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t k,
  input  sample_t f_in,
  input  sample_t g_in,
  output sample_t f_out,
  output sample_t g_out
);

  sample_t g_d, g_s;
  prod_t   p_s, p_kg, p_kf;

  always_ff @(posedge clk) begin
    if (!rst_n)        g_d <= '0;
    else if (in_valid) g_d <= g_in;
  end

  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_s (
    .a (g_d), .b (GAMMA_Q7), .p (p_s)
  );
  assign g_s = sat8(q7(p_s));

  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_kg (
    .a (g_s), .b (k), .p (p_kg)
  );
  assign f_out = sat8(32'(f_in) + q7(p_kg));

  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_kf (
    .a (f_out), .b (k), .p (p_kf)
  );
  assign g_out = sat8(32'(g_s) - q7(p_kf));

endmodule
