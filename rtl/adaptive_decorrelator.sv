// adaptive_decorrelator: STAGES gal_stage instances in a chain. The input
// sample enters both paths of the first stage (f_0 = b_0 = x); each stage
// passes f_i and b_i on to the next and adapts its own reflection coefficient
// every sample. All stages update in parallel, each with its own divider, so
// the coefficient set k is refreshed 34 clocks after in_valid (k_valid pulse);
// busy is high from the clock after in_valid until then, and a new sample
// must not arrive while busy. The decorrelated output e = f_M(n) is registered
// on in_valid; the hearing aid uses only the coefficients, which the analysis
// and synthesis filters copy. clamp_seen reports that at least one stage hit
// its coefficient limit in the last update.
// The lattice, its per-stage update and the use of its coefficients follow the
// design; the parallel dividers and the handshake are this implementation's.
module adaptive_decorrelator
  import ha_pkg::*;
#(
  parameter int         STAGES = 8,
  parameter logic [9:0] ETA_Q8 = 10'd251
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              x_in,
  output logic                 busy,
  output sample_t [STAGES-1:0] k,
  output logic                 k_valid,
  output sample_t              e_out,
  output logic                 clamp_seen
);

  logic [STAGES-1:0] st_busy, st_done, st_clamp;

  for (genvar i = 0; i < STAGES; i++) begin : g_st
    sample_t f_i, b_i, f_o, b_o;
    if (i == 0) begin : g_first
      assign f_i = x_in;
      assign b_i = x_in;
    end else begin : g_next
      assign f_i = g_st[i-1].f_o;
      assign b_i = g_st[i-1].b_o;
    end
    gal_stage #(.ETA_Q8(ETA_Q8)) u_stage (
      .clk, .rst_n, .in_valid,
      .f_in      (f_i),
      .b_in      (b_i),
      .f_out     (f_o),
      .b_out     (b_o),
      .k         (k[i]),
      .busy      (st_busy[i]),
      .upd_done  (st_done[i]),
      .k_clamped (st_clamp[i])
    );
  end

  assign busy       = |st_busy;
  assign k_valid    = &st_done;
  assign clamp_seen = |st_clamp;

  always_ff @(posedge clk) begin
    if (!rst_n)        e_out <= '0;
    else if (in_valid) e_out <= g_st[STAGES-1].f_o;
  end

endmodule
