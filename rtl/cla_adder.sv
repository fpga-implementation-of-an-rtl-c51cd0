// cla_adder: W-bit carry-lookahead adder.
// Each bit forms generate G=a&b and propagate P=a^b. Bits are grouped by four;
// inside a group every carry is the expanded sum of products
//   C(j+1) = G(j) | P(j)G(j-1) | ... | P(j)..P(s)C(s)
// so no carry ripples inside a group, and the sum is S = P ^ C. The group carry
// out feeds the next group. Purely combinational; W need not be a multiple of 4.
// The G/P formulation and the 4-bit lookahead follow the design description;
// chaining the 4-bit groups for wider words is this implementation's choice.
module cla_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int GRP = 4;

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    c    = '0;
    c[0] = cin;
    for (int s = 0; s < W; s += GRP) begin
      for (int j = s; j < s + GRP && j < W; j++) begin
        logic term;
        logic prod;
        // carry in of the group through all propagates s..j
        prod = c[s];
        for (int t = s; t <= j; t++) prod = prod & p[t];
        term = prod;
        // generate of bit t propagated through bits t+1..j
        for (int t = s; t <= j; t++) begin
          prod = g[t];
          for (int u = t + 1; u <= j; u++) prod = prod & p[u];
          term = term | prod;
        end
        c[j+1] = term;
      end
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
