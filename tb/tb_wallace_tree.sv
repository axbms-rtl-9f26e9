// tb_wallace_tree - random test of the carry-save (Wallace) reduction tree.
//
// Four trees of different shapes are driven with random rows: the default
// (16 bits, 5 rows, three compression levels), 2 rows (no compressor,
// adder only), 3 rows (one level) and 12 rows at 32 bits (five levels).
// Each sum is compared with the plain sum of the rows modulo 2^W computed
// by the testbench. Also checked: all-ones rows, where every compressor
// column carries. One vector per clock cycle; the tree is combinational.
module tb_wallace_tree;

  localparam int unsigned NVEC = 20000;

  logic        clk;
  int unsigned checks = 0, failures = 0;

  logic [15:0] r5  [5];
  logic [15:0] r2  [2];
  logic [15:0] r3  [3];
  logic [31:0] r12 [12];
  logic [15:0] s5, s2, s3;
  logic [31:0] s12;

  wallace_tree u_def (.rows(r5), .sum(s5));
  wallace_tree #(.W(16), .ROWS(2))  u_r2  (.rows(r2),  .sum(s2));
  wallace_tree #(.W(16), .ROWS(3))  u_r3  (.rows(r3),  .sum(s3));
  wallace_tree #(.W(32), .ROWS(12)) u_r12 (.rows(r12), .sum(s12));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
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

  initial begin : stimulus
    logic [15:0] e5, e2, e3;
    logic [31:0] e12;

    for (int v = 0; v < NVEC; v++) begin
      @(posedge clk);
      for (int i = 0; i < 5; i++)  r5[i]  = (v == 0) ? '1 : 16'($urandom);
      for (int i = 0; i < 2; i++)  r2[i]  = (v == 0) ? '1 : 16'($urandom);
      for (int i = 0; i < 3; i++)  r3[i]  = (v == 0) ? '1 : 16'($urandom);
      for (int i = 0; i < 12; i++) r12[i] = (v == 0) ? '1 : $urandom;
      #1;
      e5 = '0; e2 = '0; e3 = '0; e12 = '0;
      for (int i = 0; i < 5; i++)  e5  += r5[i];
      for (int i = 0; i < 2; i++)  e2  += r2[i];
      for (int i = 0; i < 3; i++)  e3  += r3[i];
      for (int i = 0; i < 12; i++) e12 += r12[i];
      check(s5  == e5,  "5 rows x 16 bits");
      check(s2  == e2,  "2 rows x 16 bits");
      check(s3  == e3,  "3 rows x 16 bits");
      check(s12 == e12, "12 rows x 32 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
