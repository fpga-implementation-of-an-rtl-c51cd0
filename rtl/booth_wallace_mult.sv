// booth_wallace_mult: signed A_W x B_W combinational multiplier.
// 1. Booth recoding: the multiplier b is cut into B_W/2 overlapping 3-bit
//    groups (b(2i+1), b(2i), b(2i-1), with b(-1)=0); each booth_encoder makes
//    one partial product 0, +-a or +-2a, sign-extended to the product width and
//    shifted left by 2i. This halves the number of rows of a plain array
//    multiplier.
// 2. The +1 that completes each negative (one's complement) row is collected in
//    one extra correction row, so NPP = B_W/2 + 1 rows enter the tree.
// 3. Wallace tree: at every level the rows are taken three at a time through
//    a carry_save_adder (3 rows -> 2) and the one or two left over pass on,
//    until two rows remain. For 8 x 8 that is 5 -> 4 -> 3 -> 2 rows.
// 4. A cla_adder merges the last two rows.
// All arithmetic is modulo 2^(A_W+B_W), which gives the exact signed product.
// Booth recoding, the CSA tree and the lookahead final adder follow the design
// description; reducing whole rows at each tree level is this
// implementation's way of building the tree. B_W must be even.
module booth_wallace_mult #(
  parameter int A_W = 8,
  parameter int B_W = 8
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int PW  = A_W + B_W;
  localparam int NG  = B_W / 2;     // Booth groups
  localparam int NPP = NG + 1;      // rows entering the tree

  // rows left after l levels of 3:2 reduction
  function automatic int rows_at(input int l);
    int r;
    r = NPP;
    for (int i = 0; i < l; i++) r = 2 * (r / 3) + (r % 3);
    return r;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  localparam int NLEV = num_levels();

  // synthesis-time sanity check
  if (B_W % 2 != 0) begin : g_bad_width
    $error("booth_wallace_mult: B_W must be even");
  end

  logic [B_W:0] bx;
  assign bx = {b, 1'b0};

  logic [NG-1:0] negs;
  logic [PW-1:0] corr;
  logic [PW-1:0] rows0 [NPP];

  // ---- partial products ----
  for (genvar i = 0; i < NG; i++) begin : g_pp
    logic signed [A_W:0] pp;
    logic                neg;
    booth_encoder #(.A_W(A_W)) u_enc (
      .grp (bx[2*i+2 : 2*i]),
      .a   (a),
      .pp  (pp),
      .neg (neg)
    );
    logic signed [PW-1:0] ext;
    assign ext      = PW'(pp);
    assign rows0[i] = PW'(ext <<< (2 * i));
    assign negs[i]  = neg;
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < NG; i++) corr[2*i] = negs[i];
  end
  assign rows0[NG] = corr;

  // ---- Wallace tree of carry-save adders ----
  // g_lev[l].rows holds the rows after l levels; only the first rows_at(l)
  // entries are used, the rest are tied to zero.
  for (genvar l = 0; l <= NLEV; l++) begin : g_lev
    localparam int R = rows_at(l);
    logic [PW-1:0] rows [NPP];
    if (l == 0) begin : g_in
      for (genvar j = 0; j < NPP; j++) begin : g_cp
        assign rows[j] = rows0[j];
      end
    end else begin : g_red
      localparam int RP = rows_at(l - 1);
      localparam int NC = RP / 3;
      for (genvar gi = 0; gi < NC; gi++) begin : g_csa
        carry_save_adder #(.W(PW)) u_csa (
          .x (g_lev[l-1].rows[3*gi]),
          .y (g_lev[l-1].rows[3*gi+1]),
          .z (g_lev[l-1].rows[3*gi+2]),
          .s (rows[2*gi]),
          .c (rows[2*gi+1])
        );
      end
      for (genvar j = 0; j < RP % 3; j++) begin : g_pass
        assign rows[2*NC+j] = g_lev[l-1].rows[3*NC+j];
      end
      for (genvar j = R; j < NPP; j++) begin : g_unused
        assign rows[j] = '0;
      end
    end
  end

  // ---- final carry-lookahead adder ----
  logic [PW-1:0] sum;
  logic          cout_unused;
  logic [PW-1:0] op_b;
  assign op_b = (rows_at(NLEV) > 1) ? g_lev[NLEV].rows[1] : '0;

  cla_adder #(.W(PW)) u_cla (
    .a    (g_lev[NLEV].rows[0]),
    .b    (op_b),
    .cin  (1'b0),
    .sum  (sum),
    .cout (cout_unused)
  );

  assign p = signed'(sum);

endmodule
