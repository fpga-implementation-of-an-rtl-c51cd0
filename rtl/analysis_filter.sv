// analysis_filter: FIR lattice realising 1 - A(z/beta).
// The input sample enters both paths of the first stage (f_0 = b_0 = x) and
// passes through STAGES lattice_stage instances with beta scaling after each
// delay element; the output is the upper-path value of the last stage. The
// reflection coefficients k are not adapted here: they are the decorrelator's,
// copied in through the k port. The whole chain is combinational between the
// delay registers, so one sample is processed per in_valid strobe and the
// output is registered, out_valid one clock after in_valid.
// The structure (decorrelator lattice plus beta after every z^-1) follows the
// design; beta = 5/128 = 0.039 approximates its beta = 0.04.
module analysis_filter
  import ha_pkg::*;
#(
  parameter int      STAGES  = 8,
  parameter sample_t BETA_Q7 = 8'sd5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              x_in,
  input  sample_t [STAGES-1:0] k,
  output logic                 out_valid,
  output sample_t              y_out
);

  for (genvar m = 0; m < STAGES; m++) begin : g_st
    sample_t f_i, b_i, f_o, b_o, b_q;
    if (m == 0) begin : g_first
      assign f_i = x_in;
      assign b_i = x_in;
    end else begin : g_next
      assign f_i = g_st[m-1].f_o;
      assign b_i = g_st[m-1].b_o;
    end
    lattice_stage #(.USE_SCALE(1'b1), .SCALE_Q7(BETA_Q7)) u_stage (
      .clk, .rst_n, .in_valid,
      .k     (k[m]),
      .f_in  (f_i),
      .b_in  (b_i),
      .f_out (f_o),
      .b_out (b_o),
      .b_dly (b_q)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y_out <= g_st[STAGES-1].f_o;
    end
  end

endmodule
