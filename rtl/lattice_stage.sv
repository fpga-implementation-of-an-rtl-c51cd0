// lattice_stage: one stage of the FIR lattice (analysis) structure,
//   b'(n)   = beta * b_{m-1}(n-1)         (beta = 1 when USE_SCALE = 0)
//   f_m(n)  = f_{m-1}(n) - k_m * b'(n)
//   b_m(n)  = b'(n)      - k_m * f_{m-1}(n)
// The z^-1 element on the lower path loads b_in on every in_valid strobe;
// f_out, b_out and b_dly are combinational in the current inputs and the
// stored value, so a chain of stages settles within one clock. Two 8 x 8
// booth_wallace_mult (three with the beta scaling) per stage; products are
// shifted back to Q0.7 (floor) and results saturated to 8 bits.
// With USE_SCALE = 0 this is the stage of the adaptive decorrelator; with
// USE_SCALE = 1 and SCALE_Q7 = beta it is the stage of the analysis filter
// 1 - A(z/beta), whose multiplication by beta follows each delay element.
// The equations and the placement of beta follow the design; number format
// and saturation are this implementation's.
module lattice_stage
  import ha_pkg::*;
#(
  parameter bit      USE_SCALE = 1'b1,
  parameter sample_t SCALE_Q7  = 8'sd5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t k,
  input  sample_t f_in,
  input  sample_t b_in,
  output sample_t f_out,
  output sample_t b_out,
  output sample_t b_dly
);

  sample_t b_d, b_s;
  prod_t   p_kb, p_kf;

  always_ff @(posedge clk) begin
    if (!rst_n)        b_d <= '0;
    else if (in_valid) b_d <= b_in;
  end
  assign b_dly = b_d;

  if (USE_SCALE) begin : g_scale
    prod_t p_s;
    booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_s (
      .a (b_d), .b (SCALE_Q7), .p (p_s)
    );
    assign b_s = sat8(q7(p_s));
  end else begin : g_noscale
    assign b_s = b_d;
  end

  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_kb (
    .a (b_s), .b (k), .p (p_kb)
  );
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_kf (
    .a (f_in), .b (k), .p (p_kf)
  );

  assign f_out = sat8(32'(f_in) - q7(p_kb));
  assign b_out = sat8(32'(b_s) - q7(p_kf));

endmodule
