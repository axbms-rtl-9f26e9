// tb_booth_r4_encoder - exhaustive test of the radix-4 Booth encoder.
//
// For every pair of 8-bit operands it checks, digit by digit, that
//   * neg[i] equals b[2i+1],
//   * pp[i] is |d|*A in N+1 bits when neg[i] = 0, and its bitwise
//     complement when neg[i] = 1 (the {A, 2A, ~2A, ~A, 0} selection), and
//   * the signed value of pp[i] plus neg[i] equals d*A,
// where the digit d = -2 b[2i+1] + b[2i] + b[2i-1] is worked out here from
// the bits of b. Finally the weighted sum of all partial products must
// equal A*B. One operand pair per clock cycle; combinational block.
module tb_booth_r4_encoder;

  localparam int unsigned N = 8;
  localparam int unsigned M = N / 2;

  logic           clk;
  logic [N-1:0]   a, b;
  logic [N:0]     pp [M];
  logic [M-1:0]   neg;
  int unsigned    checks = 0, failures = 0;

  booth_r4_encoder #(.N(N)) u_dut (
    .a  (a),
    .b  (b),
    .pp (pp),
    .neg(neg)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%0d b=%0d", what, $signed(a), $signed(b));
    end
  endtask

  initial begin : stimulus
    logic [N:0] bx;
    int         d, av, mag, ppv, total;

    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        @(posedge clk);
        a = N'(ia);
        b = N'(ib);
        #1;
        av    = int'($signed(a));
        bx    = {b, 1'b0};
        total = 0;
        for (int i = 0; i < M; i++) begin
          d   = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
          mag = (d < 0 ? -d : d) * av;
          ppv = int'($signed(pp[i]));
          check(neg[i] == b[2*i+1], "negation bit");
          if (neg[i]) check(ppv == -mag - 1, "one's complement selection");
          else        check(ppv == mag, "positive selection");
          check(ppv + int'(neg[i]) == d * av, "digit value");
          total += (ppv + int'(neg[i])) * (4 ** i);
        end
        check(total == av * int'($signed(b)), "weighted sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
