// carry_save_adder: W-bit 3:2 compressor built from W disjoint full adders.
// Three input vectors x, y, z give a sum vector s and a carry vector c with
// x + y + z == s + c (mod 2^W). No carry moves between bit positions inside
// the adder, so its delay is one full adder whatever W is. The carry vector is
// returned already shifted one place left (bit 0 is 0), the top carry is
// dropped. Purely combinational. The structure follows the design's CSA; the
// pre-shifted, modulo-2^W carry output is this implementation's convention.
module carry_save_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj;  // carries of bits 0..W-2; the top carry leaves the word

  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (y[W-2:0] & z[W-2:0]) | (x[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};

endmodule
