// tb_booth_r4_mult_sizes - the Booth multiplier at widths other than 8.
//
// The sign-extension constants and the dot-matrix layout are written for
// any even width N. This testbench checks that: N = 2 and N = 4
// exhaustively, N = 16 (the other multiplier size common in convolution
// units) and N = 12 with random operands plus the corner operands
// 0, 1, -1, the most positive and the most negative value. Each product is
// compared with $signed(a) * $signed(b). One vector per clock cycle.
module tb_booth_r4_mult_sizes;

  localparam int unsigned NRAND = 30000;

  logic        clk;
  int unsigned checks = 0, failures = 0;

  logic [1:0]  a2,  b2;   logic [3:0]  p2;
  logic [3:0]  a4,  b4;   logic [7:0]  p4;
  logic [11:0] a12, b12;  logic [23:0] p12;
  logic [15:0] a16, b16;  logic [31:0] p16;

  booth_r4_mult #(.N(2))  u_n2  (.a(a2),  .b(b2),  .p(p2));
  booth_r4_mult #(.N(4))  u_n4  (.a(a4),  .b(b4),  .p(p4));
  booth_r4_mult #(.N(12)) u_n12 (.a(a12), .b(b12), .p(p12));
  booth_r4_mult #(.N(16)) u_n16 (.a(a16), .b(b16), .p(p16));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (NRAND + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] corner16(input int k);
    case (k % 5)
      0:       return 16'h0000;
      1:       return 16'h0001;
      2:       return 16'hFFFF;
      3:       return 16'h7FFF;
      default: return 16'h8000;
    endcase
  endfunction

  initial begin : stimulus
    for (int v = 0; v < NRAND; v++) begin
      @(posedge clk);
      a2 = 2'(v);        b2 = 2'(v >> 2);
      a4 = 4'(v);        b4 = 4'(v >> 4);
      if (v < 25) begin
        a16 = corner16(v);  b16 = corner16(v / 5);
        // same corners at 12 bits: keep the sign and the low 11 bits
        a12 = {a16[15], a16[10:0]};  b12 = {b16[15], b16[10:0]};
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom);
        a12 = 12'($urandom); b12 = 12'($urandom);
      end
      #1;
      if (v < 16)  check(p2  == 4'($signed(a2) * $signed(b2)), "N=2");
      if (v < 256) check(p4  == 8'($signed(a4) * $signed(b4)), "N=4");
      check(p12 == 24'($signed(a12) * $signed(b12)), "N=12");
      check(p16 == 32'($signed(a16) * $signed(b16)), "N=16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
