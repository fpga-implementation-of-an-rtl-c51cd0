// iir_highpass: first-order high-pass Hhp(z) = b(1 - z^-1) / (1 - a z^-1),
// used in front of the analysis and synthesis filters in the noise-reduction
// arrangement. It runs the difference equation
//   y(n) = a*y(n-1) + b*(x(n) - x(n-1))
// with one 9 x 8 and one 8 x 8 booth_wallace_mult; the sum is shifted back to
// Q0.7 (floor) and saturated. Registers hold x(n-1) and y(n-1).
// Interface: one in_valid strobe per sample, output registered with out_valid
// one clock later. The transfer function follows the design; the values
// a = 115/128 (about 0.9) and b = 122/128 (about (1+a)/2, unity gain at
// 4 kHz) are this implementation's choice.
module iir_highpass
  import ha_pkg::*;
#(
  parameter sample_t A_Q7 = 8'sd115,
  parameter sample_t B_Q7 = 8'sd122
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output logic    out_valid,
  output sample_t y_out
);

  sample_t x1, y1;
  logic signed [DATA_W:0]         diff;
  logic signed [2*DATA_W:0]       p_b;
  prod_t                          p_a;

  assign diff = {x_in[DATA_W-1], x_in} - {x1[DATA_W-1], x1};

  booth_wallace_mult #(.A_W(DATA_W + 1), .B_W(DATA_W)) u_mul_b (
    .a (diff), .b (B_Q7), .p (p_b)
  );
  booth_wallace_mult #(.A_W(DATA_W), .B_W(DATA_W)) u_mul_a (
    .a (y1), .b (A_Q7), .p (p_a)
  );

  sample_t y_new;
  assign y_new = sat8((32'(p_b) + 32'(p_a)) >>> FRAC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1        <= '0;
      y1        <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1    <= x_in;
        y1    <= y_new;
        y_out <= y_new;
      end
    end
  end

endmodule
