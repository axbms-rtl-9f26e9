// booth_r4_mult - exact signed N x N radix-4 Booth multiplier.
//
// The multiplier B is Booth-recoded into N/2 digits in {-2..+2}; the
// encoder (booth_r4_encoder) turns each digit into an (N+1)-bit partial
// product PP_i from {A, 2A, ~2A, ~A, 0} and a negation bit b[2i+1]. The
// partial products are laid out as a dot matrix of N/2+1 rows, each 2N bits
// wide, and summed by a Wallace tree of 3:2 compressors with a final
// carry-propagate adder (wallace_tree).
//
// Sign extension follows the three-step scheme of the document's dot
// diagram instead of replicating sign bits across the matrix:
//   1. the sign bit of every partial product is inverted; with PP_i taken as
//      an (N+2)-bit value, bits 0..N are its N+1 dots and the inverted sign
//      s_i (= PP_i[N]) sits at column 2i+N+1;
//   2. a single 1 is added at the lowest sign column, column N+1;
//   3. a 1 is added at the column above each inverted sign bit,
//      column 2i+N+2 (dropped when that is 2N or more).
// These constants sum to -2^(N+1) * (1 + 4 + ... + 4^(N/2-1)) modulo 2^2N,
// which is exactly what the inverted signs owe, so the product is exact.
// Row i also carries the negation bit of digit i-1 at column 2i-2, in the
// gap below the previous row's least significant dot; the extra row N/2
// holds the last negation bit and the step-2 constant.
//
// Interface: a, b (two's complement, N bits) in; p = a*b (2N bits) out.
// Purely combinational: the product is valid one tree delay after the
// operands; registers, if wanted, go around it. Following the document:
// 8x8 size, the encoder, the partial-product set, the sign-extension
// constants and their columns, the Wallace tree. This design's own choice:
// two's-complement operands, the row placement of the negation bits and of
// the step-2 constant, and the grouping inside the tree.
module booth_r4_mult #(
  parameter int unsigned N = 8   // operand width, even
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned M    = N / 2;    // number of partial products
  localparam int unsigned W    = 2 * N;    // product width
  localparam int unsigned ROWS = M + 1;    // dot-matrix rows

  logic [N:0]     pp  [M];
  logic [M-1:0]   neg;
  logic [W-1:0]   rows [ROWS];

  booth_r4_encoder #(.N(N)) u_enc (
    .a  (a),
    .b  (b),
    .pp (pp),
    .neg(neg)
  );

  // Dot matrix of the sign-extension scheme.
  always_comb begin
    for (int unsigned i = 0; i < ROWS; i++) rows[i] = '0;

    for (int unsigned i = 0; i < M; i++) begin
      rows[i][2*i +: N+1] = pp[i];                         // N+1 dots
      rows[i][2*i+N+1]    = ~pp[i][N];                     // step 1: inverted sign
      if (2*i + N + 2 < W) rows[i][2*i+N+2] = 1'b1;        // step 3
      rows[i+1][2*i]      = neg[i];                        // +1 of a negative digit
    end

    rows[M][N+1] = 1'b1;                                   // step 2
  end

  wallace_tree #(.W(W), .ROWS(ROWS)) u_tree (
    .rows(rows),
    .sum (p)
  );

endmodule
