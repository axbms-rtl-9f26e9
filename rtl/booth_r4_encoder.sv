// booth_r4_encoder - radix-4 Booth encoder and partial-product generator.
//
// Recodes the N-bit two's-complement multiplier B into N/2 radix-4 digits
// and, for each digit i, selects the (N+1)-bit partial product PP_i from
// {A, 2A, ~2A, ~A, 0}, as in the multiplier's block diagram. A is
// sign-extended to N+1 bits first, so every selection fits in N+1 bits.
// Negative digits use the one's complement of |digit|*A; the missing +1 is
// the negation bit neg[i] = b[2i+1], which the caller adds at weight 4^i
// (the "B_1, B_3, B_5, B_7" bits of the dot diagram). For the group 111 the
// magnitude is 0 and neg = 1, so ~0 + 1 = 0 and no special case is needed.
//
// Interface: a, b in; pp[N/2] and neg out. Purely combinational, no clock.
// Following the document: the digit grouping, the selection set and the
// use of B_{2i+1} as the +1 bit. This design's own choice: operands are
// two's complement (the document's sign-bit handling implies signed
// partial products but does not say whether A and B are signed).
module booth_r4_encoder
  import booth_pkg::*;
#(
  parameter int unsigned N = 8   // operand width, even
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N:0]     pp  [N/2],
  output logic [N/2-1:0] neg
);

  localparam int unsigned M = N / 2;

  if (N < 2 || (N % 2) != 0) begin : g_bad_n
    $error("booth_r4_encoder: N must be even and at least 2");
  end

  logic [N:0] a_x1;   // A  sign-extended to N+1 bits
  logic [N:0] a_x2;   // 2A in N+1 bits
  logic [N:0] b_ext;  // {B, 0}: b_ext[j+1] = b[j], b_ext[0] = b[-1] = 0

  assign a_x1  = {a[N-1], a};
  assign a_x2  = {a, 1'b0};
  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < M; i++) begin : g_digit
    booth_sel_e sel;
    logic [N:0] mag;

    assign sel = booth_decode(b_ext[2*i +: 3]);

    always_comb begin
      unique case (sel)
        BOOTH_POS1, BOOTH_NEG1: mag = a_x1;
        BOOTH_POS2, BOOTH_NEG2: mag = a_x2;
        default:                mag = '0;
      endcase
    end

    assign neg[i] = b[2*i+1];
    assign pp[i]  = neg[i] ? ~mag : mag;
  end

endmodule
