// booth_pkg - shared types and the radix-4 Booth recoding rule.
//
// A radix-4 Booth digit is formed from three overlapping bits of the
// multiplier, {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0). Its value lies in
// {-2, -1, 0, +1, +2}; the encoder turns it into one of the five partial
// products A, 2A, ~2A, ~A or 0, and a negative digit is completed to a
// two's complement by a +1 (the negation bit b[2i+1]) added in the
// compression tree. The five selections are the ones printed in the
// multiplier's block diagram; the enum encoding is this design's own.
package booth_pkg;

  typedef enum logic [2:0] {
    BOOTH_ZERO = 3'd0,  // digit  0 : partial product 0 (or ~0 with b[2i+1]=1)
    BOOTH_POS1 = 3'd1,  // digit +1 : A
    BOOTH_POS2 = 3'd2,  // digit +2 : 2A
    BOOTH_NEG2 = 3'd3,  // digit -2 : ~2A, plus 1
    BOOTH_NEG1 = 3'd4   // digit -1 : ~A,  plus 1
  } booth_sel_e;

  // Map a 3-bit group {b[2i+1], b[2i], b[2i-1]} to the selection it makes.
  function automatic booth_sel_e booth_decode(input logic [2:0] grp);
    unique case (grp)
      3'b000, 3'b111: return BOOTH_ZERO;
      3'b001, 3'b010: return BOOTH_POS1;
      3'b011:         return BOOTH_POS2;
      3'b100:         return BOOTH_NEG2;
      default:        return BOOTH_NEG1;  // 3'b101, 3'b110
    endcase
  endfunction

endpackage
