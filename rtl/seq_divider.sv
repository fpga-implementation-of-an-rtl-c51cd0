// seq_divider: bit-serial restoring divider, signed dividend by unsigned
// divisor, forming the coefficient update Delta k = numerator / sigma^2.
// On start the magnitude of the dividend, its sign and the divisor are
// captured. Each following clock shifts one dividend bit into the partial
// remainder, subtracts the divisor when it fits and shifts the quotient bit
// in; after N_W such clocks quotient and a one-cycle done strobe appear
// together, N_W + 1 clocks after the clock in which start was high. The quotient is truncated toward zero,
// given the dividend's sign and saturated to Q_W signed bits; a zero divisor
// gives 0. start is ignored while busy.
// The division itself is the design's; the serial restoring algorithm,
// widths and divide-by-zero rule are this implementation's choices.
module seq_divider #(
  parameter int N_W = 32,
  parameter int D_W = 24,
  parameter int Q_W = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N_W-1:0] dividend,
  input  logic        [D_W-1:0] divisor,
  output logic                  busy,
  output logic                  done,
  output logic signed [Q_W-1:0] quotient
);

  localparam logic signed [N_W:0] QMAX = (N_W+1)'(2**(Q_W-1) - 1);

  logic [N_W-1:0]        shreg;    // dividend bits out, quotient bits in
  logic [D_W-1:0]        rem;      // partial remainder, always < divisor
  logic [D_W-1:0]        dvs;
  logic                  neg, zero;
  logic [$clog2(N_W+1)-1:0] cnt;

  logic [D_W:0] rem_sh, rem_sub;
  logic         fits;
  assign rem_sh  = {rem, shreg[N_W-1]};
  assign rem_sub = rem_sh - {1'b0, dvs};
  assign fits    = rem_sh >= {1'b0, dvs};

  // quotient of the last step, signed and saturated
  logic [N_W-1:0]        q_last;
  logic signed [N_W:0]   q_signed;
  assign q_last   = {shreg[N_W-2:0], fits};
  assign q_signed = neg ? -$signed({1'b0, q_last}) : $signed({1'b0, q_last});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg    <= '0;
      rem      <= '0;
      dvs      <= '0;
      neg      <= 1'b0;
      zero     <= 1'b0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          shreg <= dividend[N_W-1] ? N_W'(-dividend) : N_W'(dividend);
          neg   <= dividend[N_W-1];
          dvs   <= divisor;
          zero  <= (divisor == '0);
          rem   <= '0;
          cnt   <= ($clog2(N_W+1))'(N_W);
          busy  <= 1'b1;
        end
      end else begin
        rem   <= fits ? rem_sub[D_W-1:0] : rem_sh[D_W-1:0];
        shreg <= q_last;
        cnt   <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (zero)                 quotient <= '0;
          else if (q_signed > QMAX) quotient <= Q_W'(QMAX);
          else if (q_signed < -QMAX) quotient <= Q_W'(-QMAX);
          else                      quotient <= Q_W'(q_signed);
        end
      end
    end
  end

endmodule
