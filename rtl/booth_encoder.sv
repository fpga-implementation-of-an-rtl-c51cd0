// booth_encoder: radix-4 Booth recoder and partial-product generator for one
// group of three overlapping multiplier bits (x(i+1), x(i), x(i-1)).
// The group selects a digit of the multiplicand Y:
//   000,111 -> 0   001,010 -> +Y   011 -> +2Y   100 -> -2Y   101,110 -> -Y
// pp is A_W+1 bits wide (room for 2Y). For negative digits pp holds the one's
// complement of Y or 2Y and neg is 1: the caller adds neg at the row's LSB to
// complete the two's complement. Purely combinational. The recoding table is
// the design's; the one's-complement-plus-neg form is this implementation's.
module booth_encoder #(
  parameter int A_W = 8
) (
  input  logic [2:0]             grp,
  input  logic signed [A_W-1:0]  a,
  output logic signed [A_W:0]    pp,
  output logic                   neg
);

  logic one, two;
  logic signed [A_W:0] mag;

  always_comb begin
    one = grp[1] ^ grp[0];
    two = (grp == 3'b011) || (grp == 3'b100);
    neg = grp[2] & ~(grp[1] & grp[0]);
    if (two)      mag = {a, 1'b0};
    else if (one) mag = {a[A_W-1], a};
    else          mag = '0;
    pp = neg ? ~mag : mag;
  end

endmodule
