// synthesis_filter: all-pole lattice realising [1 - A(z/gamma)]^-1.
// The input is f_M(n) at the top stage (index STAGES-1 holds k_M); the upper
// path runs down through the stages to f_0(n), which is the output and also
// g_0(n), the lower-path input of the first stage. Each lower-path register
// holds g_{m-1}(n-1) scaled by gamma. The filter is stable while every
// |k_m| < 1, which the decorrelator guarantees by clamping its coefficients.
// Coefficients are copied from the decorrelator through the k port. The chain
// is combinational between delay registers; output registered, out_valid one
// clock after in_valid. Structure follows the design; formats are this
// implementation's (Q0.7, floor, saturate).
module synthesis_filter
  import ha_pkg::*;
#(
  parameter int      STAGES   = 8,
  parameter sample_t GAMMA_Q7 = 8'sd77
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              x_in,
  input  sample_t [STAGES-1:0] k,
  output logic                 out_valid,
  output sample_t              y_out
);

  // g_st[m] realises lattice stage m+1 (coefficient k[m]).
  for (genvar m = 0; m < STAGES; m++) begin : g_st
    sample_t f_i, f_o, g_i, g_o;
    if (m == STAGES - 1) begin : g_top
      assign f_i = x_in;
    end else begin : g_mid
      assign f_i = g_st[m+1].f_o;
    end
    if (m == 0) begin : g_bot
      assign g_i = f_o;            // g_0(n) = f_0(n)
    end else begin : g_up
      assign g_i = g_st[m-1].g_o;
    end
    synthesis_stage #(.GAMMA_Q7(GAMMA_Q7)) u_stage (
      .clk, .rst_n, .in_valid,
      .k     (k[m]),
      .f_in  (f_i),
      .g_in  (g_i),
      .f_out (f_o),
      .g_out (g_o)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= g_st[0].f_o;
    end
  end

endmodule
