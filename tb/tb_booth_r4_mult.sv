// tb_booth_r4_mult - exhaustive end-to-end test of the 8x8 Booth multiplier.
//
// Runs the multiplier at its default size over every one of the 65,536
// pairs of 8-bit two's-complement operands, one pair per clock cycle, and
// compares the product with the reference computed by the testbench as
// $signed(a) * $signed(b). It also counts how often each mechanism of the
// design was exercised - every Booth digit value -2..+2, the group 111
// (zero digit whose negation bit is still set), negative products and the
// extreme product (-2^(N-1))^2 - and counts a failure for any that never
// occurred. The product is combinational; it is sampled 1 time unit after
// the operands change, i.e. within the same cycle (zero-cycle latency).
module tb_booth_r4_mult;

  localparam int unsigned N = 8;
  localparam int unsigned M = N / 2;

  logic                 clk;
  logic [N-1:0]         a, b;
  logic [2*N-1:0]       p;
  int unsigned          checks = 0, failures = 0;

  // Mechanism counters.
  int unsigned digit_cnt [5];   // index = digit + 2
  int unsigned grp111_cnt = 0;
  int unsigned negprod_cnt = 0;
  int unsigned extreme_cnt = 0;

  booth_r4_mult u_dut (
    .a(a),
    .b(b),
    .p(p)
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

  initial begin : stimulus
    logic signed [2*N-1:0] expect_p;
    logic [N:0]            bx;
    int                    d;

    foreach (digit_cnt[k]) digit_cnt[k] = 0;
    a = '0;
    b = '0;

    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        @(posedge clk);
        a = N'(ia);
        b = N'(ib);
        #1;
        expect_p = (2*N)'($signed(a) * $signed(b));
        checks++;
        if (p !== expect_p) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH a=%0d b=%0d p=%0d expected %0d",
                     $signed(a), $signed(b), $signed(p), expect_p);
        end

        // Booth digits worked out from the bits of b.
        bx = {b, 1'b0};
        for (int i = 0; i < M; i++) begin
          d = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
          digit_cnt[d+2]++;
          if (bx[2*i +: 3] == 3'b111) grp111_cnt++;
        end
        if (expect_p < 0) negprod_cnt++;
        if (a == {1'b1, {(N-1){1'b0}}} && b == {1'b1, {(N-1){1'b0}}}) extreme_cnt++;
      end
    end

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (digit_cnt[k] == 0) begin
        failures++;
        $display("Booth digit %0d never occurred", k - 2);
      end
    end
    checks += 3;
    if (grp111_cnt == 0)  begin failures++; $display("group 111 never occurred"); end
    if (negprod_cnt == 0) begin failures++; $display("no negative product"); end
    if (extreme_cnt == 0) begin failures++; $display("extreme product never occurred"); end

    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, group111:%0d, negative products:%0d, extreme:%0d",
             digit_cnt[0], digit_cnt[1], digit_cnt[2], digit_cnt[3], digit_cnt[4],
             grp111_cnt, negprod_cnt, extreme_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
