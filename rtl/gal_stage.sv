// gal_stage: one stage of the adaptive gradient lattice decorrelator with its
// coefficient update.
// Filtering: a lattice_stage without scaling,
//   f_i(n) = f_{i-1}(n) - k_i b_{i-1}(n-1),  b_i(n) = b_{i-1}(n-1) - k_i f_{i-1}(n).
// Update, started on every in_valid strobe:
//   num        = f_i(n) b_{i-1}(n-1) + b_i(n) f_{i-1}(n)           (Q0.14)
//   sigma2(n)  = eta sigma2(n-1) + f_{i-1}(n)^2 + b_{i-1}(n-1)^2    (Q0.14)
//   k_i       += num / sigma2(n)
// Both stage outputs are multiplied with the opposite-path inputs and summed
// to form the numerator; the denominator is an exponentially windowed power
// estimate, so the step is normalised to the input level. The division runs
// in a seq_divider; the new k and an upd_done pulse appear 34 clocks
// after in_valid, and busy is high in between. The coefficient is held as a Q0.15
// value (its top 8 bits drive the multipliers) and clamped to +-127/128 so
// the synthesis lattice stays stable; k_clamped flags an update that hit the
// limit. Six 8 x 8 and one 24 x 10 booth_wallace_mult.
// The update rule and eta = 0.98 follow the design (eta = 251/256 here); the
// Q0.15 coefficient register, clamping and widths are this implementation's.
module gal_stage
  import ha_pkg::*;
#(
  parameter int         SIGMA_W = 24,
  parameter logic [9:0] ETA_Q8  = 10'd251
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t f_in,
  input  sample_t b_in,
  output sample_t f_out,
  output sample_t b_out,
  output sample_t k,
  output logic    busy,
  output logic    upd_done,
  output logic    k_clamped
);

  localparam int KF     = 15;                 // fractional bits of k_acc
  localparam int N_W    = 32;
  localparam int Q_W    = 18;
  localparam logic signed [Q_W:0] K_LIM = (Q_W+1)'(127 * 256);  // 127/128 in Q0.15

  logic signed [15:0] k_acc;
  sample_t            b_d;

  assign k = sample_t'(k_acc >>> (KF - FRAC));

  lattice_stage #(.USE_SCALE(1'b0), .SCALE_Q7(8'sd127)) u_lat (
    .clk, .rst_n, .in_valid,
    .k     (k),
    .f_in  (f_in),
    .b_in  (b_in),
    .f_out (f_out),
    .b_out (b_out),
    .b_dly (b_d)
  );

  // ---- numerator and power ----
  prod_t p_fb, p_bf, p_ff, p_bb;
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_fb (.a(f_out), .b(b_d),  .p(p_fb));
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_bf (.a(b_out), .b(f_in), .p(p_bf));
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_ff (.a(f_in),  .b(f_in), .p(p_ff));
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_bb (.a(b_d),   .b(b_d),  .p(p_bb));

  logic signed [PROD_W:0] num;
  logic        [PROD_W:0] pwr;
  assign num = {p_fb[PROD_W-1], p_fb} + {p_bf[PROD_W-1], p_bf};
  assign pwr = PROD_W'(p_ff) + PROD_W'(p_bb);   // both squares are >= 0

  // ---- exponentially windowed denominator ----
  logic [SIGMA_W-1:0] sigma, sigma_new;
  logic signed [SIGMA_W+9:0] p_eta;
  booth_wallace_mult #(.A_W(SIGMA_W), .B_W(10)) u_mul_eta (
    .a (signed'(sigma)), .b (signed'(ETA_Q8)), .p (p_eta)
  );

  logic [SIGMA_W:0] sig_sum;
  assign sig_sum   = (SIGMA_W+1)'(p_eta >>> 8) + (SIGMA_W+1)'(pwr);
  // sigma is kept non-negative in a signed SIGMA_W-bit multiplicand
  assign sigma_new = (sig_sum > (SIGMA_W+1)'(2**(SIGMA_W-1) - 1))
                   ? SIGMA_W'(2**(SIGMA_W-1) - 1) : SIGMA_W'(sig_sum);

  // ---- division ----
  logic signed [N_W-1:0] dividend;
  logic signed [Q_W-1:0] dk;
  logic                  div_busy, div_done;
  assign dividend = N_W'(num) <<< KF;

  seq_divider #(.N_W(N_W), .D_W(SIGMA_W), .Q_W(Q_W)) u_div (
    .clk, .rst_n,
    .start    (in_valid),
    .dividend (dividend),
    .divisor  (sigma_new),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (dk)
  );

  logic signed [Q_W:0] k_next;
  assign k_next = (Q_W+1)'(k_acc) + (Q_W+1)'(dk);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sigma     <= '0;
      k_acc     <= '0;
      upd_done  <= 1'b0;
      k_clamped <= 1'b0;
    end else begin
      upd_done <= div_done;
      if (in_valid && !div_busy) sigma <= sigma_new;
      if (div_done) begin
        if (k_next > K_LIM) begin
          k_acc     <= 16'(K_LIM);
          k_clamped <= 1'b1;
        end else if (k_next < -K_LIM) begin
          k_acc     <= 16'(-K_LIM);
          k_clamped <= 1'b1;
        end else begin
          k_acc     <= 16'(k_next);
          k_clamped <= 1'b0;
        end
      end
    end
  end

  assign busy = div_busy | div_done;

endmodule
