// csa_3to2 - one row of W full adders used as a 3:2 carry-save compressor.
//
// Adds three W-bit addends without carry propagation: s is the bitwise sum
// and c the bitwise majority shifted one column left, so that
// x + y + z == s + c modulo 2^W. The carry out of the top column is
// dropped, which is exact for a product truncated to W bits.
// Combinational. This is the 3-2 compression step of a Wallace tree.
module csa_3to2 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj;   // majority of the columns whose carry is kept

  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};

endmodule
