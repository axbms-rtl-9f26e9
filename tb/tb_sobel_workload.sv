// tb_sobel_workload - Sobel edge detection computed with the Booth multiplier.
//
// Image-processing workload for the default 8x8 multiplier. A 32 x 32
// 8-bit grey image (a diagonal ramp, a bright square, a dark disc and
// pseudo-random texture) is generated here. Every product of a Sobel
// kernel coefficient (-2..+2) with a pixel of the 3 x 3 window goes through
// one booth_r4_mult instance, one product per clock cycle. Pixels are
// offset by -128 so that they fit a signed 8-bit operand; the Sobel
// kernels sum to zero, so the offset cancels in each gradient.
//
// Checked against a reference computed here with ordinary integer
// arithmetic: each product, each gradient Gx and Gy, and each edge
// decision (|Gx| + |Gy| > THRESH). Reported: the fraction of reference
// edges found (100% for an exact multiplier) and the PSNR of the gradient
// magnitude image (infinite for an exact multiplier, reported as MSE = 0).
module tb_sobel_workload;

  localparam int IMG    = 32;
  localparam int THRESH = 160;

  logic        clk;
  logic [7:0]  a, b;
  logic [15:0] p;
  int unsigned checks = 0, failures = 0;

  int img [IMG][IMG];

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
    repeat (IMG * IMG * 20 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Multiply a kernel coefficient by an offset pixel on the design.
  task automatic mul(input int coef, input int pix, output int prod);
    @(posedge clk);
    a = 8'(pix - 128);
    b = 8'(coef);
    #1;
    prod = int'($signed(p));
    checks++;
    if (prod != coef * (pix - 128)) begin
      failures++;
      if (failures <= 10)
        $display("product mismatch coef=%0d pix=%0d got %0d", coef, pix, prod);
    end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin : stimulus
    int kx [3][3];
    int ky [3][3];
    int gx, gy, rx, ry, prod, pix, diff;
    int ref_edges, hit_edges, false_edges;
    longint sq_err;

    kx = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    ky = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    a = '0;
    b = '0;

    // Synthetic test image.
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        pix = 4 * (x + y);
        if (x >= 8 && x < 20 && y >= 6 && y < 16) pix = 230;
        if ((x - 22) * (x - 22) + (y - 23) * (y - 23) < 36) pix = 10;
        pix += int'($urandom_range(0, 12));
        img[y][x] = pix > 255 ? 255 : pix;
      end

    ref_edges = 0; hit_edges = 0; false_edges = 0; sq_err = 0;
    for (int y = 1; y < IMG - 1; y++) begin
      for (int x = 1; x < IMG - 1; x++) begin
        gx = 0; gy = 0; rx = 0; ry = 0;
        for (int j = 0; j < 3; j++)
          for (int i = 0; i < 3; i++) begin
            pix = img[y+j-1][x+i-1];
            rx += kx[j][i] * pix;
            ry += ky[j][i] * pix;
            if (kx[j][i] != 0) begin mul(kx[j][i], pix, prod); gx += prod; end
            if (ky[j][i] != 0) begin mul(ky[j][i], pix, prod); gy += prod; end
          end
        checks += 2;
        if (gx != rx) failures++;
        if (gy != ry) failures++;
        diff = (iabs(gx) + iabs(gy)) - (iabs(rx) + iabs(ry));
        sq_err += longint'(diff) * longint'(diff);
        if (iabs(rx) + iabs(ry) > THRESH) begin
          ref_edges++;
          if (iabs(gx) + iabs(gy) > THRESH) hit_edges++;
        end else if (iabs(gx) + iabs(gy) > THRESH) begin
          false_edges++;
        end
      end
    end

    checks += 2;
    if (ref_edges == 0) begin failures++; $display("image has no edges"); end
    if (hit_edges != ref_edges || false_edges != 0) failures++;
    $display("edges: reference %0d, detected %0d (%0d%%), false %0d, gradient MSE %0d",
             ref_edges, hit_edges, (ref_edges != 0) ? 100 * hit_edges / ref_edges : 0,
             false_edges, sq_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
